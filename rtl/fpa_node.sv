// Fixed priority arbiter (FPA) controller: an asynchronous N-to-1 merge of
// 4-phase bundled-data channels, N = 2**SIZE.
//
// How it works. Each input i carries a request req_in[i], an active-low
// acknowledge ack_in_n[i] and DW bits of data (the part of the pixel address
// already built by the levels below). Four elements do the work:
//   * rendez-vous (C element): req_out = C(go, ack_out_n), where go is the OR
//     of the requests between handshakes and the granted input's request
//     during one. req_out rises when some input requests and the next level
//     is ready; it falls when the granted input has withdrawn its request and
//     the next level has acknowledged;
//   * priority memory (gnt_q): loaded on the rising edge of req_out with the
//     one-hot index of the highest-numbered active request, cleared while
//     req_out is low. keep_q is the same register, reset to all ones instead
//     of zero, and feeds go;
//   * data memory (data_q): loaded on the same edge with {index, data_in[index]},
//     so the winner's index becomes the upper SIZE address bits. It is
//     transparent between handshakes (data_out shows the value it would load)
//     and holds from the rising edge of req_out until req_out falls;
//   * acknowledge coder: ack_in_n = ~gnt_q, so the winner is acknowledged as
//     soon as its address is stored, while its request still travels on. The
//     winner may then withdraw its request; the node finishes the handshake
//     once the next level has acknowledged in turn.
// Requests that lose stay high and are served, highest index first, in later
// handshakes; a node never drops a request.

// Handshake order on one channel (acknowledges active low, idle high):
//   req_in[i]^ -> req_out^ , ack_in_n[i]v -> req_in[i]v -> (ack_out_n v) ->
//   req_out v , ack_in_n[i]^ -> (ack_out_n ^) -> next grant.
// data_out is valid from the rising edge of req_out until it falls.
//
// Taken from the original architecture: the named parts (OR of the requests, priority memory,
// C element as rendez-vous, data memory, acknowledge coder), the active-low
// acknowledge and the handshake order. This design's own choices: the highest
// index wins, both memories are loaded by the rising edge of req_out, the
// same structure serves 2-to-1, 8-to-1 and 512-to-1 controllers, and one
// active-low reset clears all state (asynchronous; simulate it with a falling
// edge). No clock: the loop go -> C element -> req_out -> go is the
// intended asynchronous feedback of the controller, so the tools'
// combinational-loop warning on req_out stands.
// When DW = 0 (first level) data_in is a single unused bit per input.
module fpa_node #(
  parameter int unsigned SIZE = 1,   // address bits added by this node
  parameter int unsigned DW   = 0,   // address bits arriving on each input
  localparam int unsigned N   = 1 << SIZE,
  localparam int unsigned DWI = (DW == 0) ? 1 : DW,
  localparam int unsigned OW  = SIZE + DW
) (
  input  logic                    rst_n,
  input  logic [N-1:0]            req_in,
  output logic [N-1:0]            ack_in_n,
  input  logic [N-1:0][DWI-1:0]   data_in,
  output logic                    req_out,
  input  logic                    ack_out_n,
  output logic [OW-1:0]           data_out
);

  logic [N-1:0]  gnt_q;    // priority memory: one-hot grant, 0 when idle
  logic [N-1:0]  keep_q;   // copy of the grant, all ones when idle
  logic [OW-1:0] data_q;   // data memory
  logic          go;       // request seen by the rendez-vous
  logic          clr_n;    // grant cleared while req_out is low

  // Index of the highest active request (0 when none).
  function automatic logic [SIZE-1:0] highest(input logic [N-1:0] r);
    highest = '0;
    for (int unsigned i = 0; i < N; i++)
      if (r[i]) highest = SIZE'(i);
  endfunction

  // Between handshakes any request starts one (keep_q is all ones); during a
  // handshake only the granted input's request keeps it alive. keep_q only
  // narrows after req_out has risen, so go never dips while the grant loads.
  assign go = |(req_in & keep_q);

  c_element u_rdv (
    .rst_n (rst_n),
    .a     (go),
    .b     (ack_out_n),
    .q     (req_out)
  );

  // Priority and data memories, loaded when req_out rises. The grant is
  // cleared as soon as req_out falls, which also ends the acknowledge.
  assign clr_n = rst_n & req_out;

  always_ff @(posedge req_out or negedge clr_n or negedge rst_n) begin
    if (!rst_n || !req_out) begin
      gnt_q  <= '0;
      keep_q <= '1;
    end else begin
      gnt_q  <= N'(1) << highest(req_in);
      keep_q <= N'(1) << highest(req_in);
    end
  end

  always_ff @(posedge req_out or negedge rst_n) begin
    if (!rst_n) data_q <= '0;
    else        data_q <= load_value(req_in, data_in);
  end
  // Between handshakes the data memory is transparent: data_out shows the
  // value it would load. From the rising edge of req_out it shows the stored
  // value, which is the same one, so data_out does not change at the edge.
  assign data_out = (|gnt_q) ? data_q : load_value(req_in, data_in);

  // {winner index, winner data}
  function automatic logic [OW-1:0] load_value(input logic [N-1:0] r,
                                               input logic [N-1:0][DWI-1:0] d);
    logic [SIZE-1:0] w;
    w = highest(r);
    if (DW == 0) load_value = OW'(w);
    else         load_value = OW'({w, d[w]});
  endfunction

  // Acknowledge coder: active low on the granted input.
  assign ack_in_n = ~gnt_q;

endmodule
