// tesh_input_port: demultiplexer and input buffers of one router port.
//
// A flit arriving on the physical link carries the number of its virtual
// channel; the demultiplexer writes it into that channel's FIFO. The upstream
// node may send a flit on a channel only while the channel's full flag is low,
// so no flit is ever dropped. Each FIFO exposes its first two flits and its
// count to the control, which pops it when the flit crosses the crossbar.
// Timing: a flit written in cycle t is visible at the FIFO output in t+1.
// One FIFO per virtual channel follows the router figure; the valid/vc/full
// link protocol is this design's choice.
module tesh_input_port
  import tesh_pkg::*;
#(
  parameter int unsigned NUM_VC = 4,
  parameter int unsigned DEPTH  = 2,
  localparam int unsigned VCW   = $clog2(NUM_VC),
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // physical link in
  input  logic              in_valid,
  input  logic [VCW-1:0]    in_vc,
  input  flit_t             in_flit,
  output logic [NUM_VC-1:0] in_full,
  // towards the crossbar and control
  input  logic [NUM_VC-1:0] pop,
  output flit_t             front  [NUM_VC],
  output flit_t             second [NUM_VC],
  output logic [CW-1:0]     count  [NUM_VC]
);

  logic [NUM_VC-1:0] fifo_full;

  for (genvar v = 0; v < int'(NUM_VC); v++) begin : g_vc
    logic push;
    assign push = in_valid && (in_vc == VCW'(v));
    tesh_flit_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push, .din(in_flit),
      .pop(pop[v]),
      .front(front[v]), .second(second[v]),
      .count(count[v]), .full(fifo_full[v]), .empty()
    );
  end

  // a channel popped this cycle has room for the flit arriving now
  assign in_full = fifo_full & ~pop;

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !in_full[in_vc])
    else $error("flit sent to a full input channel");

endmodule
