// Self-checking testbench for fpa_node as an 8-to-1 controller (SIZE = 3)
// carrying 3 address bits per input.
//
// Eight sender processes play the lower level: each raises a request with
// a random address, waits for its acknowledge to fall, withdraws the request
// after a random delay and waits for the acknowledge to rise. A receiver plays
// the upper level with random response delays. The checks:
//   * every request is delivered exactly once with {index, address};
//   * at each grant the granted input is the highest-numbered one pending;
//   * at most one acknowledge is low, and only while req_out is high;
//   * req_out never rises while the receiver still holds its acknowledge low,
//     and never falls before the granted input withdrew its request;
//   * data_out is stable for the whole time req_out is high.
module tb_fpa_node;
  localparam int unsigned SIZE = 3;
  localparam int unsigned DW   = 3;
  localparam int unsigned N    = 1 << SIZE;
  localparam int unsigned ROUNDS = 300;

  bit   reset_done = 0;  // reset pulse finished
  logic                 rst_n;
  logic [N-1:0]         req_in, ack_in_n;
  logic [N-1:0][DW-1:0] data_in;
  logic                 req_out, ack_out_n;
  logic [SIZE+DW-1:0]   data_out;

  int checks = 0, failures = 0;
  int sent [N];
  int got  [N];
  int contested = 0;
  int done_cnt = 0;      // senders that finished
  bit started = 0;       // reset released: monitors active
  time rise_t [N];       // when each request last rose
  time grant_t;     // grants made while more than one input waited

  fpa_node #(.SIZE(SIZE), .DW(DW)) dut (
    .rst_n(rst_n), .req_in(req_in), .ack_in_n(ack_in_n), .data_in(data_in),
    .req_out(req_out), .ack_out_n(ack_out_n), .data_out(data_out));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Senders.
  for (genvar i = 0; i < N; i++) begin : g_snd
    initial begin
      req_in[i] = 0;
      data_in[i] = '0;
      sent[i] = 0;
      wait (reset_done);
      for (int r = 0; r < ROUNDS / N; r++) begin
        #($urandom_range(40, 0));
        data_in[i] = DW'($urandom);
        req_in[i] = 1;
        rise_t[i] = $time;
        sent[i]++;
        wait (ack_in_n[i] == 0);
        #($urandom_range(6, 1));
        req_in[i] = 0;
        data_in[i] = DW'($urandom);   // data may change once withdrawn
        wait (ack_in_n[i] == 1);
      end
      done_cnt++;
    end
  end

  // Receiver with expected-value check.
  logic [N-1:0] pend_at_grant;
  logic [DW-1:0] exp_data [N];
  always @(posedge req_out) begin
    pend_at_grant = req_in;
    grant_t = $time;
    for (int k = 0; k < N; k++) exp_data[k] = data_in[k];
  end

  initial begin
    ack_out_n = 1;
    rst_n = 1;          // give the asynchronous resets a falling edge
    #1 rst_n = 0;
    for (int k = 0; k < N; k++) got[k] = 0;
    #5 rst_n = 1;
    reset_done = 1;
    started = 1;
    forever begin
      logic [SIZE+DW-1:0] d;
      int idx, hi;
      wait (req_out == 1);
      #1;
      d = data_out;
      idx = int'(d[SIZE+DW-1:DW]);
      // A request that rose in the same instant as the grant may or may not
      // take part in it; only requests already waiting are binding.
      hi = -1;
      for (int k = 0; k < N; k++)
        if (pend_at_grant[k] && (rise_t[k] < grant_t || k == idx)) hi = k;
      if ($countones(pend_at_grant) > 1) contested++;
      check(idx == hi, $sformatf("granted %0d, highest pending %0d (pending %b)", idx, hi, pend_at_grant));
      check(d[DW-1:0] == exp_data[idx], $sformatf("data %0h expected %0h from input %0d", d[DW-1:0], exp_data[idx], idx));
      check(ack_in_n == ~(N'(1) << idx), $sformatf("ack_in_n %b after grant of %0d", ack_in_n, idx));
      got[idx]++;
      #($urandom_range(8, 1));
      ack_out_n = 0;
      wait (req_out == 0);
      check(data_out == d, "data_out changed while req_out was high");
      #($urandom_range(8, 1));
      check(ack_in_n == '1, "acknowledge still low after req_out fell");
      ack_out_n = 1;
    end
  end

  // Protocol monitors.
  always @(ack_in_n) if (started) begin
    check($countones(~ack_in_n) <= 1, $sformatf("several acknowledges low: %b", ack_in_n));
    if (ack_in_n != '1) check(req_out == 1, "acknowledge low while req_out low");
  end
  always @(posedge req_out) if (started) check(ack_out_n == 1, "req_out rose before the receiver released ack_out_n");
  logic [SIZE-1:0] cur;
  always @(posedge req_out) #1 cur = data_out[SIZE+DW-1:DW];
  always @(negedge req_out) if (started) check(req_in[cur] == 0 && ack_out_n == 0, "req_out fell early");

  initial begin
    #5;
    wait (done_cnt == N);
    wait (req_out == 0 && ack_out_n == 1);
    #20;
    for (int k = 0; k < N; k++)
      check(got[k] == sent[k], $sformatf("input %0d: %0d sent, %0d delivered", k, sent[k], got[k]));
    check(contested > 0, "no contested grant happened");
    $display("contested grants: %0d", contested);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
