// tesh_router: wormhole router of one TESH processing element.
//
// Five ports: four physical links (N = +y, E = +x, S = -y, W = -x) and the
// local PE. On the border of a basic module the free link ports carry the
// higher-level (inter-BM) links; inside, they go to the mesh neighbours. Each
// link has NUM_VC virtual channels. Data path per the router figure:
//   demultiplexer -> input VC buffers -> crossbar -> output VC buffers ->
//   multiplexer,
// all steered by tesh_control (selection, arbitration, buffer check,
// switching). The selection function rewrites the DR number and last-ring
// fields of a head flit as it crosses the crossbar.
//
// Link protocol (this design's choice): *_valid marks a flit on the link,
// *_vc its virtual channel; the receiver raises full[vc] while that input
// buffer has no room, and the sender only sends on channels whose full bit is
// low. Timing: a head flit reaching an empty router leaves its output buffer
// five cycles later (four control stages, one output-buffer cycle); body flits
// follow one per cycle.
// node_addr is the router's TESH address (base-4 digits, two bits each) and
// is meant to be tied to a constant.
module tesh_router
  import tesh_pkg::*;
#(
  parameter int unsigned LEVELS  = 3,
  parameter int unsigned NUM_VC  = 4,
  parameter int unsigned DEPTH   = 2,
  parameter bit          USE_CS  = 1'b1,
  parameter bit          USE_LS  = 1'b1,
  parameter bit          USE_DDR = 1'b1,
  localparam int unsigned VCW    = $clog2(NUM_VC),
  localparam int unsigned NV     = NPORTS * NUM_VC,
  localparam int unsigned SW     = $clog2(NV),
  localparam int unsigned CW     = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] node_addr,
  // incoming side of each port
  input  logic              in_valid [NPORTS],
  input  logic [VCW-1:0]    in_vc    [NPORTS],
  input  flit_t             in_flit  [NPORTS],
  output logic [NUM_VC-1:0] in_full  [NPORTS],
  // outgoing side of each port
  output logic              out_valid [NPORTS],
  output logic [VCW-1:0]    out_vc    [NPORTS],
  output flit_t             out_flit  [NPORTS],
  input  logic [NUM_VC-1:0] out_full  [NPORTS],
  // mechanism pulses (see tesh_control)
  output logic [4:0]        ev
);

  flit_t         ivc_front  [NV];
  flit_t         ivc_second [NV];
  logic [CW-1:0] ivc_count  [NV];
  logic [NV-1:0] ivc_pop;
  logic [CW-1:0] ovc_count  [NV];
  logic [NV-1:0] ovc_full;
  logic [NV-1:0] ovc_sent;
  logic [NV-1:0] conn_valid;
  logic [SW-1:0] conn_src   [NV];
  logic [2:0]    hd_dr      [NV];
  logic [2:0]    hd_last    [NV];
  flit_t         xin        [NV];
  flit_t         xout       [NV];
  logic [NV-1:0] xpush;

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    flit_t             f_front  [NUM_VC];
    flit_t             f_second [NUM_VC];
    logic [CW-1:0]     f_count  [NUM_VC];
    flit_t             o_din    [NUM_VC];
    logic [CW-1:0]     o_count  [NUM_VC];
    logic [NUM_VC-1:0] o_full;

    tesh_input_port #(.NUM_VC(NUM_VC), .DEPTH(DEPTH)) u_in (
      .clk, .rst_n,
      .in_valid(in_valid[p]), .in_vc(in_vc[p]), .in_flit(in_flit[p]),
      .in_full(in_full[p]),
      .pop(ivc_pop[p*NUM_VC +: NUM_VC]),
      .front(f_front), .second(f_second), .count(f_count)
    );

    for (genvar v = 0; v < int'(NUM_VC); v++) begin : g_vc
      assign ivc_front [p*NUM_VC+v] = f_front[v];
      assign ivc_second[p*NUM_VC+v] = f_second[v];
      assign ivc_count [p*NUM_VC+v] = f_count[v];
      assign o_din[v]               = xout[p*NUM_VC+v];
      assign ovc_count [p*NUM_VC+v] = o_count[v];
    end
    assign ovc_full[p*NUM_VC +: NUM_VC] = o_full;

    tesh_output_port #(.NUM_VC(NUM_VC), .DEPTH(DEPTH)) u_out (
      .clk, .rst_n,
      .push(xpush[p*NUM_VC +: NUM_VC]), .din(o_din),
      .count(o_count), .full(o_full), .sent(ovc_sent[p*NUM_VC +: NUM_VC]),
      .out_valid(out_valid[p]), .out_vc(out_vc[p]), .out_flit(out_flit[p]),
      .out_full(out_full[p])
    );
  end

  tesh_control #(
    .LEVELS(LEVELS), .NUM_VC(NUM_VC), .DEPTH(DEPTH),
    .USE_CS(USE_CS), .USE_LS(USE_LS), .USE_DDR(USE_DDR)
  ) u_ctrl (
    .clk, .rst_n, .node_addr,
    .in_front(ivc_front), .in_second(ivc_second), .in_count(ivc_count),
    .in_pop(ivc_pop),
    .out_count(ovc_count), .out_full(ovc_full), .out_sent(ovc_sent),
    .conn_valid, .conn_src,
    .hd_dr, .hd_last,
    .ev_cs(ev[0]), .ev_ls(ev[1]), .ev_path1(ev[2]), .ev_escape(ev[3]), .ev_dr_inc(ev[4])
  );

  // head flits leave with their updated DR number and last ring
  always_comb begin
    head_t h;
    for (int i = 0; i < int'(NV); i++) begin
      xin[i] = ivc_front[i];
      h      = head_t'(ivc_front[i]);
      if (is_head(ivc_front[i])) begin
        h.dr        = hd_dr[i];
        h.last_lam  = hd_last[i];
        xin[i]      = flit_t'(h);
      end
    end
  end

  tesh_crossbar #(.NI(NV), .NO(NV)) u_xbar (
    .in_flit(xin), .in_move(ivc_pop),
    .conn_valid, .conn_src,
    .out_flit(xout), .out_push(xpush)
  );

endmodule
