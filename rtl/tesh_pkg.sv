// tesh_pkg: types, constants and address helpers shared by the TESH router
// and network.
//
// A TESH(2,L,0) node address is a string of 2L base-4 digits
// n = (n[2L-1] n[2L-2]) ... (n[3] n[2]) (n[1] n[0]); (n1,n0) = (y,x) inside the
// 4x4 basic module (BM), (n[2l-1], n[2l-2]) = (row, column) of the level-(l-1)
// subnetwork inside the level-l torus. Digits are stored two bits each,
// digit i in bits [2i+1:2i].
//
// Higher-level links: digit index lambda (2..2L-1) names a ring, odd = vertical,
// even = horizontal, lambda = 2l-1 / 2l-2 for level l (the 5:3LV.V, 4:3LV.H,
// 3:2LV.V, 2:2LV.H code of the selection function). Each ring leaves a BM from
// one corner PE that carries both its plus and its minus link on the corner's two
// free ports. Which corner holds which ring and which free port is plus are
// choices of this design (see outlet_x/outlet_y and plus_port/minus_port).
package tesh_pkg;

  // Ports of a router: four mesh/free directions and the local PE.
  typedef enum logic [2:0] {
    P_N = 3'd0,  // +y (UPPER)
    P_E = 3'd1,  // +x (RIGHT)
    P_S = 3'd2,  // -y (LOWER)
    P_W = 3'd3,  // -x (LEFT)
    P_L = 3'd4   // local processing element
  } port_e;

  localparam int unsigned NPORTS     = 5;
  localparam int unsigned NLINKS     = 4;
  localparam int unsigned FLIT_W     = 32;
  localparam int unsigned MAX_DIGITS = 6;   // TESH(2,3,0) addresses, base 4
  localparam int unsigned ADDR_W     = 2 * MAX_DIGITS;

  typedef enum logic [1:0] {
    FT_BODY = 2'b00,
    FT_HEAD = 2'b01,
    FT_TAIL = 2'b10,
    FT_SNGL = 2'b11   // head and tail in one flit
  } flit_type_e;

  // Head flit layout. Body and tail flits carry payload in the low 30 bits.
  typedef struct packed {
    flit_type_e        ftype;     // [31:30]
    logic [5:0]        src_tag;   // [29:24] free for the PE (source id bits)
    logic [2:0]        last_lam;  // [23:21] last higher-level ring used, 0 = none
    logic [2:0]        dr;        // [20:18] dimension reversal number (DDR)
    logic [5:0]        rsvd;      // [17:12]
    logic [ADDR_W-1:0] dest;      // [11:0]  destination address digits
  } head_t;

  typedef logic [FLIT_W-1:0] flit_t;

  function automatic flit_type_e ftype_of(flit_t f);
    return flit_type_e'(f[FLIT_W-1 -: 2]);
  endfunction

  function automatic logic is_head(flit_t f);
    return f[FLIT_W-2];           // FT_HEAD or FT_SNGL
  endfunction

  function automatic logic is_tail(flit_t f);
    return f[FLIT_W-1];           // FT_TAIL or FT_SNGL
  endfunction

  function automatic logic [1:0] digit(logic [ADDR_W-1:0] a, int unsigned i);
    return a[2*i +: 2];
  endfunction

  // Ring held by the corner PE at (x,y) of every BM; 0 for a PE with no
  // higher-level link. Only rings that exist in a level-`levels` network count.
  function automatic logic [2:0] lambda_of(logic [1:0] x, logic [1:0] y, int unsigned levels);
    logic [2:0] lam;
    case ({y, x})
      {2'd0, 2'd0}: lam = 3'd5;   // level-3 vertical
      {2'd0, 2'd3}: lam = 3'd4;   // level-3 horizontal
      {2'd3, 2'd0}: lam = 3'd3;   // level-2 vertical
      {2'd3, 2'd3}: lam = 3'd2;   // level-2 horizontal
      default:      lam = 3'd0;
    endcase
    if (int'(lam) > 2 * int'(levels) - 1) lam = 3'd0;
    return lam;
  endfunction

  // Outlet PE coordinates (n0 = x, n1 = y) of ring lambda.
  function automatic logic [1:0] outlet_x(logic [2:0] lam);
    return (lam == 3'd5 || lam == 3'd3) ? 2'd0 : 2'd3;
  endfunction

  function automatic logic [1:0] outlet_y(logic [2:0] lam);
    return (lam == 3'd5 || lam == 3'd4) ? 2'd0 : 2'd3;
  endfunction

  // The plus link of a corner leaves through its free y port, the minus link
  // through its free x port.
  function automatic port_e plus_port(logic [1:0] y);
    return (y == 2'd0) ? P_S : P_N;
  endfunction

  function automatic port_e minus_port(logic [1:0] x);
    return (x == 2'd0) ? P_W : P_E;
  endfunction

endpackage
