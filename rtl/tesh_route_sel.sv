// tesh_route_sel: selection function of a TESH router (stage 1 of the control).
//
// For the head flit waiting in one input virtual channel it picks the output
// link (link selection) and the output virtual channel (channel selection). It
// is purely combinational; the control registers its result.
//
// Link selection (dimension order, R1): the highest address digit i >= 2 in
// which destination and current node differ is served first. If this node is
// the outlet PE of ring i the packet takes the ring's plus link when
// (d[i]-n[i]) mod 4 <= 2, else the minus link; otherwise it moves inside the BM
// towards the outlet PE of ring i, y first, then x. With no digit >= 2 left it
// moves towards (d[0], d[1]) and is ejected to the local port there.
//
// Channel selection (R1): on a ring the packet keeps its channel class, and
// takes class H (1) for the hop that crosses the wrap-around link; inside a BM
// it uses class L (0) on the way to an outlet and class H in the last phase.
//   USE_CS (R2): on a ring, a class-L packet whose path needs no wrap-around
//   link moves to class H when its class-L channel is busy.
//   USE_LS (R3): when the ring distance is 2 either way and the plus link's
//   channel is busy, the minus link is taken.
//   USE_DDR (R5, needs NUM_VC = 4): VCs 0,1 are adaptive, 2,3 deterministic
//   (class L, H). A packet in an adaptive VC at an outlet PE whose ring it has
//   not yet crossed may take that ring out of dimension order ("path 1"),
//   preferred to the dimension-order step ("path 2"). Each use of a ring of
//   lower order than the ring used before increments the packet's DR number.
//   If every adaptive candidate is busy and none is labelled with a DR larger
//   than the packet's, the packet escapes to the deterministic VCs and is
//   routed by dimension order from then on; otherwise it waits (req = 0).
// Without DDR and with NUM_VC = 4 the VCs form two pairs per class, {0,2} = L
// and {1,3} = H, and a free member of the pair is chosen.
//
// Which corner holds which ring, the y-then-x order inside a BM, the dateline
// rule on the wrap-around link and the meaning of "busy" (allocated to another
// packet or output buffer full) are this design's reading; the if-structure of
// the selection follows the paper's selection functions.
module tesh_route_sel
  import tesh_pkg::*;
#(
  parameter int unsigned LEVELS  = 3,
  parameter int unsigned NUM_VC  = 4,
  parameter bit          USE_CS  = 1'b1,
  parameter bit          USE_LS  = 1'b1,
  parameter bit          USE_DDR = 1'b1,
  localparam int unsigned VCW    = $clog2(NUM_VC)
) (
  input  logic [ADDR_W-1:0]  node_addr,
  input  head_t              hd,
  input  logic [VCW-1:0]     in_vc,
  input  logic [NUM_VC-1:0]  ovc_busy  [NPORTS],
  input  logic [2:0]         ovc_label [NPORTS][NUM_VC],
  output logic               req,        // a choice was made
  output port_e              out_port,
  output logic [VCW-1:0]     out_vc,
  output logic [2:0]         new_dr,
  output logic [2:0]         new_last_lam,
  // mechanism indicators, for statistics
  output logic               ev_cs,      // CS moved L -> H
  output logic               ev_ls,      // LS took the minus link
  output logic               ev_path1,   // DDR took a ring out of order
  output logic               ev_escape,  // DDR switched to deterministic VCs
  output logic               ev_dr_inc   // DR number incremented
);

  localparam int unsigned TOPD = 2 * LEVELS - 1;

  initial begin
    assert (LEVELS >= 1 && LEVELS <= 3) else $error("LEVELS must be 1..3");
    assert (NUM_VC == 2 || NUM_VC == 4) else $error("NUM_VC must be 2 or 4");
    assert (!USE_DDR || NUM_VC == 4) else $error("DDR needs 4 virtual channels");
  end

  logic [1:0] nx, ny;
  logic [2:0] lam;          // ring held by this node
  logic       found;        // some digit >= 2 differs
  logic [2:0] hi;           // highest differing digit >= 2
  logic       adaptive;     // packet is in DDR adaptive channels

  assign nx       = digit(node_addr, 0);
  assign ny       = digit(node_addr, 1);
  assign lam      = lambda_of(nx, ny, LEVELS);
  assign adaptive = USE_DDR && (in_vc < VCW'(2));

  always_comb begin
    found = 1'b0;
    hi    = 3'd0;
    for (int i = int'(TOPD); i >= 2; i--) begin
      if (!found && digit(hd.dest, i) != digit(node_addr, i)) begin
        found = 1'b1;
        hi    = 3'(i);
      end
    end
  end

  // Intra-BM step towards (tx, ty): y first, then x.
  function automatic port_e intra_step(logic [1:0] x, logic [1:0] y,
                                       logic [1:0] tx, logic [1:0] ty);
    if (ty > y)      return P_N;
    else if (ty < y) return P_S;
    else if (tx > x) return P_E;
    else if (tx < x) return P_W;
    else              return P_L;
  endfunction

  // Is class c of a port busy? (deterministic set for DDR, pair without DDR)
  function automatic logic class_busy(logic [NUM_VC-1:0] b, logic c);
    if (USE_DDR)          return b[{1'b1, c}];
    else if (NUM_VC == 4) return b[{1'b0, c}] & b[{1'b1, c}];
    else                  return b[VCW'(c)];
  endfunction

  // Concrete VC of class c on port p.
  function automatic logic [VCW-1:0] class_vc(logic [NUM_VC-1:0] b, logic c);
    if (USE_DDR)          return VCW'({1'b1, c});
    else if (NUM_VC == 4) return (b[{1'b0, c}] && !b[{1'b1, c}])
                                 ? VCW'({1'b1, c}) : VCW'({1'b0, c});
    else                  return VCW'(c);
  endfunction

  // ------------------------------------------------------------------
  // Dimension-order link and channel class, with CS and LS
  // ------------------------------------------------------------------
  logic [1:0] dl, nl, diff;
  logic       on_ring;
  port_e      pp, mp, dor_port;
  logic       dor_cls;
  logic       cls_p, cls_m, cur_cls;
  logic       cs_p, cs_m, ls_take;
  logic       go_plus;

  assign pp = plus_port(ny);
  assign mp = minus_port(nx);

  always_comb begin
    dl      = digit(hd.dest, int'(hi));
    nl      = digit(node_addr, int'(hi));
    diff    = dl - nl;                      // mod 4
    on_ring = found && (lam == hi);
    // an escaping DDR packet restarts in class L
    cur_cls = adaptive ? 1'b0 : in_vc[0];

    // class if the plus / minus link is used
    cls_p = (nl == 2'd3) ? 1'b1 : cur_cls;  // plus hop crosses 3 -> 0
    cls_m = (nl == 2'd0) ? 1'b1 : cur_cls;  // minus hop crosses 0 -> 3
    cs_p  = 1'b0;
    cs_m  = 1'b0;
    if (USE_CS) begin
      if (cls_p == 1'b0 && dl > nl && class_busy(ovc_busy[pp], 1'b0)) begin
        cls_p = 1'b1;
        cs_p  = 1'b1;
      end
      if (cls_m == 1'b0 && dl < nl && class_busy(ovc_busy[mp], 1'b0)) begin
        cls_m = 1'b1;
        cs_m  = 1'b1;
      end
    end

    go_plus = (diff <= 2'd2);
    ls_take = 1'b0;
    if (USE_LS && diff == 2'd2 && class_busy(ovc_busy[pp], cls_p)) begin
      go_plus = 1'b0;
      ls_take = 1'b1;
    end

    if (on_ring) begin
      dor_port = go_plus ? pp : mp;
      dor_cls  = go_plus ? cls_p : cls_m;
    end else if (found) begin
      dor_port = intra_step(nx, ny, outlet_x(hi), outlet_y(hi));
      dor_cls  = 1'b0;
    end else begin
      dor_port = intra_step(nx, ny, digit(hd.dest, 0), digit(hd.dest, 1));
      dor_cls  = 1'b1;
    end
  end

  // ------------------------------------------------------------------
  // DDR: path 1 (ring of this node out of order) and adaptive channels
  // ------------------------------------------------------------------
  logic       p1_ok;
  port_e      p1_port;
  logic [1:0] p1_diff;
  logic       p1_free, dor_free;
  logic       p1_vc, dor_vc;
  logic       any_higher;

  always_comb begin
    p1_diff  = digit(hd.dest, int'(lam)) - digit(node_addr, int'(lam));
    p1_ok    = adaptive && found && lam != 3'd0 && lam < hi && p1_diff != 2'd0;
    p1_port  = (p1_diff <= 2'd2) ? pp : mp;
    if (USE_LS && p1_diff == 2'd2 && (&ovc_busy[pp][1:0])) p1_port = mp;

    p1_free  = p1_ok && !(&ovc_busy[p1_port][1:0]);
    p1_vc    = ovc_busy[p1_port][0];
    dor_free = !(&ovc_busy[dor_port][1:0]);
    dor_vc   = ovc_busy[dor_port][0];

    any_higher = 1'b0;
    for (int v = 0; v < 2; v++) begin
      if (ovc_label[dor_port][v] > hd.dr) any_higher = 1'b1;
      if (p1_ok && ovc_label[p1_port][v] > hd.dr) any_higher = 1'b1;
    end
  end

  // ------------------------------------------------------------------
  // Final choice and DR bookkeeping
  // ------------------------------------------------------------------
  logic [2:0] used_lam;

  always_comb begin
    req       = 1'b1;
    out_port  = dor_port;
    out_vc    = class_vc(ovc_busy[dor_port], dor_cls);
    ev_cs     = on_ring && (go_plus ? cs_p : cs_m);
    ev_ls     = on_ring && ls_take;
    ev_path1  = 1'b0;
    ev_escape = 1'b0;
    if (adaptive) begin
      ev_cs = 1'b0;
      ev_ls = on_ring && ls_take;
      if (p1_free) begin
        out_port = p1_port;
        out_vc   = VCW'(p1_vc);
        ev_path1 = 1'b1;
        ev_ls    = 1'b0;
      end else if (dor_free) begin
        out_vc   = VCW'(dor_vc);
      end else if (any_higher) begin
        req      = 1'b0;           // wait for a higher-labelled channel
        ev_ls    = 1'b0;
      end else begin
        ev_escape = 1'b1;          // out_vc already = deterministic class VC
        ev_cs     = on_ring && (go_plus ? cs_p : cs_m);
      end
    end

    // ring used by this hop, if any
    if (ev_path1 || (on_ring && req)) used_lam = lam;
    else                              used_lam = 3'd0;
    new_last_lam = (used_lam != 3'd0) ? used_lam : hd.last_lam;
    ev_dr_inc    = (used_lam != 3'd0) && (hd.last_lam != 3'd0) && (used_lam > hd.last_lam);
    new_dr       = (ev_dr_inc && hd.dr != 3'd7) ? hd.dr + 3'd1 : hd.dr;
  end

endmodule
