// Asynchronous column readout of a CMOS pixel sensor (top level).
//
// Sparse readout without a clock: a pixel that sees a hit raises a request
// that travels, through a tree of fixed priority arbiters, to the end of the
// column; the address of the pixel is assembled on the way and presented at
// the root together with a request. The first-level arbiter acknowledges the
// pixel as soon as it has stored the pixel's index, which resets the pixel;
// every level hands the address on to the next in the same way, and the root
// waits for the end-of-column logic. Only the branches that carry a hit
// switch, so power follows the hit rate, and no global clock or hit-OR net
// spans the column.
//
// Structure: NPIX send units (one per pixel) feed an fpa_tree of
// log2(NPIX)/CTRL_SIZE levels of 2**CTRL_SIZE-to-1 controllers. The
// end-of-column logic/serializer is outside this module: it sees req_out,
// addr_out and answers with ack_out_n.
//
// Interface:
//   hit[i]       rising edge = hit in pixel i (output of its discriminator)
//   fe_reset[i]  high while pixel i is being acknowledged (pixel reset)
//   req_out      a pixel address is available on addr_out
//   ack_out_n    active-low acknowledge from the end of column: drive it low
//                after taking addr_out, high again after req_out has fallen
// Timing: 4-phase return-to-zero, bundled data, no clock. Pixels that wait
// together are read highest address first. A pixel hit again while it is
// still waiting is read once.
//
// Taken from the original architecture: a 512-pixel double column, controller sizes 1, 3 and 9
// (CTRL_SIZE), send units in front of level 0. The default CTRL_SIZE = 3 is
// the configuration that fitted the 20 um pitch; the send unit circuit is
// this design's own.
module fpa_readout #(
  parameter int unsigned NPIX      = 512,
  parameter int unsigned CTRL_SIZE = 3,
  localparam int unsigned AW       = $clog2(NPIX)
) (
  input  logic            rst_n,
  input  logic [NPIX-1:0] hit,
  output logic [NPIX-1:0] fe_reset,
  output logic            req_out,
  input  logic            ack_out_n,
  output logic [AW-1:0]   addr_out
);

  logic [NPIX-1:0] req_pix;
  logic [NPIX-1:0] ack_pix_n;

  for (genvar i = 0; i < NPIX; i++) begin : g_pix
    send_unit u_send (
      .rst_n    (rst_n),
      .hit      (hit[i]),
      .req      (req_pix[i]),
      .ack_n    (ack_pix_n[i]),
      .fe_reset (fe_reset[i])
    );
  end

  fpa_tree #(.NPIX(NPIX), .CTRL_SIZE(CTRL_SIZE)) u_tree (
    .rst_n     (rst_n),
    .req_in    (req_pix),
    .ack_in_n  (ack_pix_n),
    .req_out   (req_out),
    .ack_out_n (ack_out_n),
    .addr_out  (addr_out)
  );

endmodule
