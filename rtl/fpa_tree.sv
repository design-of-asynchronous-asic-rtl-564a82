// Fixed priority arbiter tree: the column readout of a double column.
//
// NPIX pixel channels are merged into one by LEVELS = log2(NPIX)/CTRL_SIZE
// levels of fpa_node controllers, each merging 2**CTRL_SIZE channels. Level 0
// faces the send units; level LEVELS-1 is the single root. Every controller
// prepends the index of the input it granted, so the address grows by
// CTRL_SIZE bits per level and arrives complete at the root: the bits added
// by level 0 are the least significant ones, those of the root the most
// significant. With NPIX = 512 the three controller sizes of the design give
//   CTRL_SIZE = 1: 9 levels of 2-to-1 (511 controllers)
//   CTRL_SIZE = 3: 3 levels of 8-to-1 (73 controllers)
//   CTRL_SIZE = 9: 1 level of 512-to-1 (1 controller)
// All are the same function; they differ in area, routing and speed.
//
// Interface: one 4-phase bundled-data channel per pixel (req_in[i],
// ack_in_n[i], no data), one at the root (req_out, ack_out_n, addr_out).
// Acknowledges are active low. addr_out is valid while req_out is high.
// Priority: at every node the highest-numbered input wins, so among pixels
// waiting at the same time the one with the highest address is read first.
// Timing: asynchronous, no clock. A request climbs one level per C element.
// Each level acknowledges the one below as soon as it has stored the address,
// so a pixel is released after the first level, and the levels work as an
// asynchronous pipeline.
//
// The tree structure, level counts and address-per-level scheme follow the
// original architecture; the bit order and the priority direction are this
// design's own choice.
module fpa_tree #(
  parameter int unsigned NPIX      = 512,
  parameter int unsigned CTRL_SIZE = 3,
  localparam int unsigned AW       = $clog2(NPIX),
  localparam int unsigned LEVELS   = AW / CTRL_SIZE,
  localparam int unsigned N        = 1 << CTRL_SIZE
) (
  input  logic            rst_n,
  input  logic [NPIX-1:0] req_in,
  output logic [NPIX-1:0] ack_in_n,
  output logic            req_out,
  input  logic            ack_out_n,
  output logic [AW-1:0]   addr_out
);

  // Channel bundle between level l-1 and level l (index 0: the send units).
  // Only the first NPIX >> (CTRL_SIZE*l) entries of a level are used and only
  // the low CTRL_SIZE*l address bits of each.
  logic [NPIX-1:0]          req_l   [LEVELS+1];
  logic [NPIX-1:0]          ack_l_n [LEVELS+1];
  logic [NPIX-1:0][AW-1:0]  addr_l  [LEVELS+1];

  assign req_l[0]  = req_in;
  assign ack_in_n  = ack_l_n[0];
  assign addr_l[0] = '0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NODES = NPIX >> (CTRL_SIZE * (l + 1));
    localparam int unsigned DW    = CTRL_SIZE * l;
    localparam int unsigned DWI   = (DW == 0) ? 1 : DW;
    localparam int unsigned OW    = DW + CTRL_SIZE;

    // Unused channel slots of this level's output.
    if (NODES < NPIX) begin : g_pad
      assign req_l[l+1][NPIX-1:NODES]  = '0;
      assign addr_l[l+1][NPIX-1:NODES] = '0;
    end

    for (genvar j = 0; j < NODES; j++) begin : g_node
      logic [N-1:0][DWI-1:0] din;
      logic [OW-1:0]         dout;

      for (genvar k = 0; k < N; k++) begin : g_in
        assign din[k] = DWI'(addr_l[l][j*N + k]);
      end

      fpa_node #(.SIZE(CTRL_SIZE), .DW(DW)) u_node (
        .rst_n     (rst_n),
        .req_in    (req_l[l][j*N +: N]),
        .ack_in_n  (ack_l_n[l][j*N +: N]),
        .data_in   (din),
        .req_out   (req_l[l+1][j]),
        .ack_out_n (ack_l_n[l+1][j]),
        .data_out  (dout)
      );

      assign addr_l[l+1][j] = AW'(dout);
    end
  end

  assign req_out  = req_l[LEVELS][0];
  assign addr_out = addr_l[LEVELS][0];
  assign ack_l_n[LEVELS] = {{(NPIX-1){1'b1}}, ack_out_n};

  if (LEVELS * CTRL_SIZE != AW || (1 << AW) != NPIX) begin : g_bad_size
    $error("fpa_tree: NPIX must be a power of 2**CTRL_SIZE");
  end

endmodule
