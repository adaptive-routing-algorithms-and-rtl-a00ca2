// tesh_network: a TESH(2,L,0) network of tesh_router nodes.
//
// 16^L processing-element routers. Node k has the base-4 address whose digit
// i is bits [2i+1:2i] of k: (n1,n0) = (y,x) inside a 4x4 basic module (BM), and
// digit pairs above address the subnetworks of each level. Inside a BM the
// routers form a 2D mesh. Every higher level joins 16 copies of the level
// below as a 4x4 2D torus: along each ring, one corner PE of every BM (the
// outlet of that ring) links to the same corner PE of the BMs whose ring digit
// is one higher (plus link) and one lower (minus link), wrap-around included.
// This gives inter-level connectivity q = 0: one vertical and one horizontal
// ring per level, each using two free ports of one corner. Free ports with no
// ring (the level-3 corners when L = 2, for instance) are left open.
//
// The mesh inside a BM, the 4x4 torus per level and the addressing follow the
// paper; which corner carries which ring is this design's choice
// (tesh_pkg::lambda_of). LEVELS up to 3 is supported; 3 is the paper's
// 4096-node network, but the default is the 256-node level-2 network because
// lint tools that flatten the design need about 28 MB per router (7 GB at
// level 2, far more than a workstation has at level 3).
//
// The local port of every router is brought out: inj_* carries flits from the
// processing elements into the network, ej_* delivers flits to them, with the
// same valid/vc/full protocol as the links. ev carries each router's
// mechanism pulses (bit 0 CS, 1 LS, 2 DDR path 1, 3 DDR escape, 4 DR
// increment).
module tesh_network
  import tesh_pkg::*;
#(
  parameter int unsigned LEVELS  = 2,
  parameter int unsigned NUM_VC  = 4,
  parameter int unsigned DEPTH   = 2,
  parameter bit          USE_CS  = 1'b1,
  parameter bit          USE_LS  = 1'b1,
  parameter bit          USE_DDR = 1'b1,
  localparam int unsigned NN     = 1 << (4 * LEVELS),
  localparam int unsigned VCW    = $clog2(NUM_VC)
) (
  input  logic              clk,
  input  logic              rst_n,
  // injection from the processing elements
  input  logic              inj_valid [NN],
  input  logic [VCW-1:0]    inj_vc    [NN],
  input  flit_t             inj_flit  [NN],
  output logic [NUM_VC-1:0] inj_full  [NN],
  // ejection to the processing elements
  output logic              ej_valid  [NN],
  output logic [VCW-1:0]    ej_vc     [NN],
  output flit_t             ej_flit   [NN],
  input  logic [NUM_VC-1:0] ej_full   [NN],
  output logic [4:0]        ev        [NN]
);

  // neighbour of node k through link port p, or -1
  function automatic int nbr_node(int k, int p);
    int x, y, lam, d;
    x   = k & 3;
    y   = (k >> 2) & 3;
    lam = int'(lambda_of(2'(x), 2'(y), LEVELS));
    if (p == int'(P_N) && y < 3) return k + 4;
    if (p == int'(P_S) && y > 0) return k - 4;
    if (p == int'(P_E) && x < 3) return k + 1;
    if (p == int'(P_W) && x > 0) return k - 1;
    if (lam == 0) return -1;
    d = (k >> (2 * lam)) & 3;
    if (p == int'(plus_port(2'(y))))
      return (k & ~(3 << (2 * lam))) | (((d + 1) & 3) << (2 * lam));
    if (p == int'(minus_port(2'(x))))
      return (k & ~(3 << (2 * lam))) | (((d + 3) & 3) << (2 * lam));
    return -1;
  endfunction

  // port of the neighbour that faces node k's port p
  function automatic int nbr_port(int k, int p);
    int x, y;
    x = k & 3;
    y = (k >> 2) & 3;
    if (p == int'(P_N) && y < 3) return int'(P_S);
    if (p == int'(P_S) && y > 0) return int'(P_N);
    if (p == int'(P_E) && x < 3) return int'(P_W);
    if (p == int'(P_W) && x > 0) return int'(P_E);
    if (p == int'(plus_port(2'(y)))) return int'(minus_port(2'(x)));
    return int'(plus_port(2'(y)));
  endfunction

  logic              r_in_valid  [NN][NPORTS];
  logic [VCW-1:0]    r_in_vc     [NN][NPORTS];
  flit_t             r_in_flit   [NN][NPORTS];
  logic [NUM_VC-1:0] r_in_full   [NN][NPORTS];
  logic              r_out_valid [NN][NPORTS];
  logic [VCW-1:0]    r_out_vc    [NN][NPORTS];
  flit_t             r_out_flit  [NN][NPORTS];
  logic [NUM_VC-1:0] r_out_full  [NN][NPORTS];

  for (genvar k = 0; k < int'(NN); k++) begin : g_node
    tesh_router #(
      .LEVELS(LEVELS), .NUM_VC(NUM_VC), .DEPTH(DEPTH),
      .USE_CS(USE_CS), .USE_LS(USE_LS), .USE_DDR(USE_DDR)
    ) u_router (
      .clk, .rst_n,
      .node_addr (ADDR_W'(k)),
      .in_valid  (r_in_valid[k]),
      .in_vc     (r_in_vc[k]),
      .in_flit   (r_in_flit[k]),
      .in_full   (r_in_full[k]),
      .out_valid (r_out_valid[k]),
      .out_vc    (r_out_vc[k]),
      .out_flit  (r_out_flit[k]),
      .out_full  (r_out_full[k]),
      .ev        (ev[k])
    );

    for (genvar p = 0; p < int'(NLINKS); p++) begin : g_link
      localparam int NB = nbr_node(k, p);
      localparam int NP = nbr_port(k, p);
      if (NB >= 0) begin : g_conn
        assign r_in_valid[k][p] = r_out_valid[NB][NP];
        assign r_in_vc[k][p]    = r_out_vc[NB][NP];
        assign r_in_flit[k][p]  = r_out_flit[NB][NP];
        assign r_out_full[k][p] = r_in_full[NB][NP];
      end else begin : g_open
        assign r_in_valid[k][p] = 1'b0;
        assign r_in_vc[k][p]    = '0;
        assign r_in_flit[k][p]  = '0;
        assign r_out_full[k][p] = '1;
      end
    end

    assign r_in_valid[k][P_L] = inj_valid[k];
    assign r_in_vc[k][P_L]    = inj_vc[k];
    assign r_in_flit[k][P_L]  = inj_flit[k];
    assign inj_full[k]        = r_in_full[k][P_L];
    assign ej_valid[k]        = r_out_valid[k][P_L];
    assign ej_vc[k]           = r_out_vc[k][P_L];
    assign ej_flit[k]         = r_out_flit[k][P_L];
    assign r_out_full[k][P_L] = ej_full[k];
  end

endmodule
