// End-to-end testbench of fpa_readout at its default size: 512 pixels read
// through 3 levels of 8-to-1 controllers. One time unit stands for 1 ns.
//
// The pixel front ends are played by hit pulses, the end-of-column logic by a
// receiver at the root with random response times. A reference model counts,
// for every pixel, the hits that must come out: a hit edge while the pixel is
// being acknowledged (fe_reset high) is lost, a hit while its previous hit
// still waits is merged with it, any other hit is one read-out.
// Phases:
//   1. all 512 pixels hit at once (the bandwidth test): 512 reads, each once;
//   2. 940 random hits in 100 us (the 3.19 GHz/cm2 operating point);
//   3. 98 random hits in 100 us (the 330 MHz/cm2 operating point);
//   4. a dense burst on 16 pixels, to make merged and lost hits happen.
// Checks: every read address has an outstanding hit; every pixel is read as
// often as the model says; each read resets its pixel once (fe_reset pulse);
// the root address is stable during its handshake. Counted mechanisms (each
// must occur): contested grants, merged hits, lost hits, pixel resets.
module tb_fpa_readout;
  localparam int unsigned NPIX = 512;
  localparam int unsigned AW   = 9;

  bit   reset_done = 0;  // reset pulse finished
  logic            rst_n;
  logic [NPIX-1:0] hit, fe_reset;
  logic            req_out, ack_out_n;
  logic [AW-1:0]   addr_out;

  int checks = 0, failures = 0;
  int expected [NPIX];
  int got      [NPIX];
  int resets   [NPIX];
  bit waiting  [NPIX];
  int total_exp = 0, total_got = 0;
  time t0;
  int n_contested = 0, n_merged = 0, n_lost = 0, n_resets = 0;

  fpa_readout dut (
    .rst_n(rst_n), .hit(hit), .fe_reset(fe_reset),
    .req_out(req_out), .ack_out_n(ack_out_n), .addr_out(addr_out));

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

  // Reference model of one hit on pixel p.
  function automatic void model_hit(int p);
    if (fe_reset[p]) n_lost++;
    else if (waiting[p]) n_merged++;
    else begin
      waiting[p] = 1;
      expected[p]++;
      total_exp++;
    end
  endfunction

  // A pixel stops waiting when it is acknowledged.
  for (genvar p = 0; p < NPIX; p++) begin : g_mon
    always @(posedge fe_reset[p]) if (reset_done) begin
      waiting[p] = 0;
      resets[p]++;
      n_resets++;
    end
  end

  // A hit is a 2-unit pulse. Hits come at odd times, the receiver acts at
  // even times, so the model never sees a hit and an acknowledge change in
  // the same instant.
  task automatic pulse(int p);
    model_hit(p);
    hit[p] = 1;
    fork
      begin
        #2;
        hit[p] = 0;
      end
    join_none
  endtask

  task automatic to_odd();
    if ($time % 2 == 0) #1;
  endtask

  task automatic random_hits(int count, int span, int npix);
    for (int k = 0; k < count; k++) begin
      int p;
      #(2 * $urandom_range(span / count, 1));
      p = $urandom_range(npix - 1, 0);
      if (hit[p]) continue;
      pulse(p);
    end
  endtask

  task automatic drain();
    wait (total_got == total_exp && req_out == 0 && ack_out_n == 1 && fe_reset == '0);
    #20;
    to_odd();
  endtask

  // End-of-column receiver.
  initial begin
    ack_out_n = 1;
    wait (reset_done);
    forever begin
      logic [AW-1:0] a;
      wait (req_out == 1);
      #(($time % 2 == 0) ? 2 : 1);
      a = addr_out;
      if (total_exp - total_got > 1) n_contested++;
      check(got[a] < expected[a], $sformatf("address %0d read without an outstanding hit", a));
      got[a]++;
      total_got++;
      #(2 * $urandom_range(2, 1));
      ack_out_n = 0;
      wait (req_out == 0);
      check(addr_out == a, "address changed during the handshake");
      #(2 * $urandom_range(2, 1));
      ack_out_n = 1;
    end
  end

  initial begin
    for (int p = 0; p < NPIX; p++) begin
      expected[p] = 0; got[p] = 0; resets[p] = 0; waiting[p] = 0;
    end
    hit = '0;
    rst_n = 1;          // give the asynchronous resets a falling edge
    #1 rst_n = 0;
    #5 rst_n = 1;
    reset_done = 1;
    #10;

    // 1. every pixel at once
    to_odd();
    t0 = $time;
    for (int p = 0; p < NPIX; p++) pulse(p);
    drain();
    for (int p = 0; p < NPIX; p++)
      check(got[p] == 1, $sformatf("functional test: pixel %0d read %0d times", p, got[p]));
    $display("all %0d pixels read, %0t time units with this receiver", NPIX, $time - t0);

    // 2. and 3. operating points: hits spread over 100 us
    random_hits(940, 100000, NPIX);
    drain();
    $display("940-hit run: %0d reads so far", total_got);
    random_hits(98, 100000, NPIX);
    drain();

    // 4. dense burst on a few pixels
    random_hits(3000, 3000, 16);
    drain();

    for (int p = 0; p < NPIX; p++) begin
      check(got[p] == expected[p], $sformatf("pixel %0d: %0d hits expected out, %0d read", p, expected[p], got[p]));
      check(resets[p] == got[p], $sformatf("pixel %0d: %0d resets for %0d reads", p, resets[p], got[p]));
    end
    $display("reads %0d, contested %0d, merged %0d, lost %0d, pixel resets %0d",
             total_got, n_contested, n_merged, n_lost, n_resets);
    check(n_contested > 0, "no contested grant happened");
    check(n_merged > 0, "no merged hit happened");
    check(n_lost > 0, "no hit during acknowledge happened");
    check(n_resets > 0, "no pixel reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
