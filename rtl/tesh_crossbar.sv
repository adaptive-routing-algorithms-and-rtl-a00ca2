// tesh_crossbar: virtual-channel crossbar switch of the router (stage 4).
//
// Every output virtual channel has a multiplexer over all input virtual
// channels. The control keeps, for each output channel, whether it is held by
// a packet (conn_valid) and which input channel holds it (conn_src); in a
// cycle where the control moves that input channel's flit (in_move), the flit
// is written into the output channel's buffer. Since wormhole switching gives
// an output channel to one packet at a time, no two inputs ever compete for
// one output. Purely combinational. Connecting buffers channel by channel
// follows the router figure; the select encoding is this design's choice.
module tesh_crossbar
  import tesh_pkg::*;
#(
  parameter int unsigned NI = 20,
  parameter int unsigned NO = 20,
  localparam int unsigned SW = $clog2(NI)
) (
  input  flit_t          in_flit  [NI],
  input  logic [NI-1:0]  in_move,
  input  logic [NO-1:0]  conn_valid,
  input  logic [SW-1:0]  conn_src [NO],
  output flit_t          out_flit [NO],
  output logic [NO-1:0]  out_push
);

  for (genvar o = 0; o < int'(NO); o++) begin : g_out
    assign out_flit[o] = in_flit[conn_src[o]];
    assign out_push[o] = conn_valid[o] && in_move[conn_src[o]];
  end

endmodule
