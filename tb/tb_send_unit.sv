// Self-checking testbench for send_unit: a hit edge raises req, the
// acknowledge clears it and drives the pixel reset, a hit during the
// acknowledge is ignored, reset clears a pending request, and a stream of
// random hits/acknowledges is compared with a reference model.
module tb_send_unit;
  logic rst_n, hit, req, ack_n, fe_reset;
  int checks = 0, failures = 0;

  send_unit dut (.rst_n(rst_n), .hit(hit), .req(req), .ack_n(ack_n), .fe_reset(fe_reset));

  task automatic expect_state(input logic r, input logic f, input string msg);
    #1;
    checks++;
    if (req !== r || fe_reset !== f) begin
      failures++;
      $display("FAIL @%0t %s: req=%0b fe_reset=%0b expected %0b %0b", $time, msg, req, fe_reset, r, f);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    hit = 0; ack_n = 1; rst_n = 1;
    #1 rst_n = 0;
    expect_state(0, 0, "reset");
    rst_n = 1;
    expect_state(0, 0, "idle");
    hit = 1;
    expect_state(1, 0, "hit raises req");
    hit = 0;
    expect_state(1, 0, "req holds after hit falls");
    ack_n = 0;
    expect_state(0, 1, "ack clears req, resets pixel");
    hit = 1;
    expect_state(0, 1, "hit during ack ignored");
    hit = 0;
    ack_n = 1;
    expect_state(0, 0, "back to idle");
    hit = 1;
    expect_state(1, 0, "second hit");
    hit = 0;
    rst_n = 0;
    expect_state(0, 0, "reset clears pending request");
    rst_n = 1;
    expect_state(0, 0, "idle after reset");

    model = 0;
    for (int i = 0; i < 300; i++) begin
      int op;
      op = $urandom_range(2, 0);
      if (op == 0) begin
        hit = 1;
        if (ack_n) model = 1;
        expect_state(model, !ack_n, "random hit");
        hit = 0;
      end else if (op == 1) begin
        ack_n = 0; model = 0;
        expect_state(0, 1, "random ack");
      end else begin
        ack_n = 1;
        expect_state(model, 0, "random release");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
