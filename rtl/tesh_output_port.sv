// tesh_output_port: output buffers and multiplexer of one router port.
//
// The crossbar writes flits into one FIFO per virtual channel. Each cycle the
// multiplexer sends at most one flit on the physical link, taken from a
// channel whose FIFO is not empty and whose buffer in the next node is not
// full; channels are served round robin. A flit written in cycle t can leave
// in cycle t+1, so one hop (output buffer to the next input buffer, then input
// buffer to output buffer) takes two cycles. The round-robin multiplexing of
// channels follows the paper's simulator; the link protocol is this design's.
module tesh_output_port
  import tesh_pkg::*;
#(
  parameter int unsigned NUM_VC = 4,
  parameter int unsigned DEPTH  = 2,
  localparam int unsigned VCW   = $clog2(NUM_VC),
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the crossbar
  input  logic [NUM_VC-1:0] push,
  input  flit_t             din   [NUM_VC],
  output logic [CW-1:0]     count [NUM_VC],
  output logic [NUM_VC-1:0] full,
  output logic [NUM_VC-1:0] sent,         // channel's front flit leaves now
  // physical link out
  output logic              out_valid,
  output logic [VCW-1:0]    out_vc,
  output flit_t             out_flit,
  input  logic [NUM_VC-1:0] out_full      // next node's input buffers
);

  flit_t             front [NUM_VC];
  flit_t             second_unused [NUM_VC];
  logic [NUM_VC-1:0] empty, ready, gnt, pop;

  for (genvar v = 0; v < int'(NUM_VC); v++) begin : g_vc
    tesh_flit_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .push(push[v]), .din(din[v]),
      .pop(pop[v]),
      .front(front[v]), .second(second_unused[v]),
      .count(count[v]), .full(full[v]), .empty(empty[v])
    );
  end

  assign ready = ~empty & ~out_full;

  tesh_rr_arbiter #(.N(NUM_VC)) u_mux_arb (
    .clk, .rst_n, .req(ready), .gnt
  );

  assign pop  = gnt;
  assign sent = gnt;

  always_comb begin
    out_valid = |gnt;
    out_vc    = '0;
    out_flit  = '0;
    for (int v = 0; v < int'(NUM_VC); v++) begin
      if (gnt[v]) begin
        out_vc   = VCW'(v);
        out_flit = front[v];
      end
    end
  end

endmodule
