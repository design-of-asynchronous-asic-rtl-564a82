// Pixel send unit: the interface between one pixel and the arbiter tree.
//
// A rising edge on hit (the discriminated output of the pixel front end) sets
// a flag; the flag is the 4-phase request to the first arbiter level. When the
// tree acknowledges (ack_n low) the flag is cleared at once, which lowers the
// request, and fe_reset is held high for as long as ack_n stays low so the
// pixel front end can be reset. The next hit is accepted once ack_n is high
// again.
//
// Interface: req/ack_n is the 4-phase return-to-zero handshake used in the
// whole tree (acknowledge active low: high = idle/ready).
// Timing: asynchronous. hit is an edge, ack_n and rst_n are asynchronous
// clears. A hit edge that arrives while ack_n is low is not recorded.
//
// The arbiter tree places send units between the pixels and level 0; their
// circuit is this design's own choice, the simplest one that gives a clean
// request and a pixel reset.
module send_unit (
  input  logic rst_n,
  input  logic hit,
  output logic req,
  input  logic ack_n,
  output logic fe_reset
);

  logic flag;

  always_ff @(posedge hit or negedge ack_n or negedge rst_n) begin
    if (!rst_n)      flag <= 1'b0;
    else if (!ack_n) flag <= 1'b0;
    else             flag <= 1'b1;
  end

  assign req      = flag;
  assign fe_reset = ~ack_n;

endmodule
