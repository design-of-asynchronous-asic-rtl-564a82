// Self-checking testbench for fpa_tree with 512 pixels in the three
// controller sizes side by side: 9 levels of 2-to-1, 3 levels of 8-to-1 and
// 1 level of 512-to-1.
//
// For each tree a stimulus process raises pixel requests, each pixel
// withdraws its request once acknowledged, and a receiver with random
// response times reads the root. Phase 1 fires all 512
// pixels at once (the bandwidth test of the design) and expects 512
// deliveries, each address once. Phase 2 fires random pixels at random times.
// Checks: each delivered address has a hit not yet delivered; at most one
// acknowledge is low per first-level controller; every request is delivered
// exactly once; the root address is stable during its handshake; req_out
// rises only when ack_out_n is high.
module tb_fpa_tree;
  localparam int unsigned NPIX = 512;
  localparam int unsigned AW   = 9;
  localparam int NSIZES = 3;
  localparam int unsigned SIZES [NSIZES] = '{1, 3, 9};
  localparam int RANDOM_HITS = 600;

  bit   reset_done = 0;  // reset pulse finished
  logic rst_n;
  int checks = 0, failures = 0;
  int finished = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1;          // give the asynchronous resets a falling edge
    #1 rst_n = 0;
    #5 rst_n = 1;
    reset_done = 1;
  end

  for (genvar s = 0; s < NSIZES; s++) begin : g_sz
    logic [NPIX-1:0] req_in, ack_in_n;
    logic            req_out, ack_out_n;
    logic [AW-1:0]   addr_out;
    int              sent [NPIX];
    int              got  [NPIX];
    int              total_sent = 0, total_got = 0;
    int              phase = 0;
    int              multi = 0;   // grants while several pixels waited
    bit              random_done = 0;

    fpa_tree #(.NPIX(NPIX), .CTRL_SIZE(SIZES[s])) dut (
      .rst_n(rst_n), .req_in(req_in), .ack_in_n(ack_in_n),
      .req_out(req_out), .ack_out_n(ack_out_n), .addr_out(addr_out));

    // Lower side: pixels that request. A random-hit process raises requests;
    // the receiver withdraws the granted pixel's request once it is read.
    initial begin
      req_in = '0;
      for (int p = 0; p < NPIX; p++) begin sent[p] = 0; got[p] = 0; end
      wait (reset_done);
      #10;
      req_in = '1;                           // phase 1: every pixel at once
      for (int p = 0; p < NPIX; p++) sent[p]++;
      total_sent = NPIX;
      wait (phase == 2);
      for (int k = 0; k < RANDOM_HITS; k++) begin
        int p;
        #($urandom_range(12, 2));
        p = $urandom_range(NPIX - 1, 0);
        if (req_in[p] == 0 && ack_in_n[p] == 1) begin
          req_in[p] = 1;
          sent[p]++;
          total_sent++;
        end
      end
      random_done = 1;
    end

    // A pixel withdraws its request one time unit after its acknowledge
    // falls: the first-level controller has then stored its index.
    initial begin
      wait (reset_done);
      forever begin
        #1;
        req_in = req_in & ack_in_n;
      end
    end

    // At most one acknowledge low per first-level controller.
    always @(ack_in_n) if (reset_done) begin
      for (int g = 0; g < NPIX; g += (1 << SIZES[s]))
        check($countones(~ack_in_n[g +: (1 << SIZES[s])]) <= 1,
              $sformatf("size %0d: several acknowledges low in group %0d", SIZES[s], g));
    end

    // Receiver at the root.
    initial begin
      ack_out_n = 1;
      wait (reset_done);
      forever begin
        logic [AW-1:0] a;
        wait (req_out == 1);
        #1;
        a = addr_out;
        if (total_sent - total_got > 1) multi++;
        check(got[a] < sent[a], $sformatf("size %0d: address %0d delivered without a pending hit", SIZES[s], a));
        got[a]++;
        total_got++;
        #($urandom_range(6, 1));
        ack_out_n = 0;
        wait (req_out == 0);
        check(addr_out == a, "address changed during the handshake");
        #($urandom_range(5, 1));
        ack_out_n = 1;
      end
    end

    always @(posedge req_out) if (reset_done) check(ack_out_n == 1, "root request rose before acknowledge was released");

    // Phase control and final comparison.
    initial begin
      wait (reset_done);
      #20;
      wait (total_got == NPIX && req_out == 0 && ack_out_n == 1);
      for (int p = 0; p < NPIX; p++)
        check(got[p] == 1, $sformatf("size %0d functional test: pixel %0d read %0d times", SIZES[s], p, got[p]));
      $display("size %0d: all %0d pixels read, time %0t", SIZES[s], NPIX, $time);
      phase = 2;
      wait (random_done);
      wait (total_got == total_sent && req_out == 0 && ack_out_n == 1 && req_in == '0 && ack_in_n == '1);
      #50;
      for (int p = 0; p < NPIX; p++)
        check(got[p] == sent[p], $sformatf("size %0d: pixel %0d sent %0d read %0d", SIZES[s], p, sent[p], got[p]));
      check(multi > 0, "no contested grant");
      $display("size %0d: %0d requests delivered, %0d contested grants", SIZES[s], total_got, multi);
      finished++;
    end
  end

  initial begin
    wait (finished == NSIZES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
