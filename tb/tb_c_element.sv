// Self-checking testbench for c_element: walks the truth table
// (Reset, A, B -> Out) in both directions of every held state and checks
// that reset overrides the inputs.
module tb_c_element;
  logic rst_n, a, b, q;
  int checks = 0, failures = 0;

  c_element dut (.rst_n(rst_n), .a(a), .b(b), .q(q));

  task automatic apply(input logic r, input logic va, input logic vb, input logic exp);
    rst_n = r; a = va; b = vb;
    #1;
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL rst_n=%0b a=%0b b=%0b q=%0b expected %0b", r, va, vb, q, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 1, 1, 0);   // reset wins over 11
    apply(1, 0, 0, 0);
    apply(1, 0, 1, 0);   // hold 0
    apply(1, 1, 0, 0);   // hold 0
    apply(1, 1, 1, 1);   // set
    apply(1, 0, 1, 1);   // hold 1
    apply(1, 1, 1, 1);
    apply(1, 1, 0, 1);   // hold 1
    apply(1, 0, 0, 0);   // clear
    apply(1, 1, 0, 0);   // hold 0
    apply(1, 1, 1, 1);
    apply(0, 1, 1, 0);   // reset clears a held 1
    apply(1, 0, 1, 0);
    // random walk against a reference model
    begin
      logic ref_q;
      ref_q = 0;
      for (int i = 0; i < 200; i++) begin
        logic na, nb;
        na = 1'($urandom); nb = 1'($urandom);
        if (na == nb) ref_q = na;
        apply(1, na, nb, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
