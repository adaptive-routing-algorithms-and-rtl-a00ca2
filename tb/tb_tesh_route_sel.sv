// tb_tesh_route_sel: self-checking test of the selection function.
//
// Three instances: plain dimension order with 2 VCs, CS+LS with 2 VCs, and
// CS+LS+DDR with 4 VCs. The first two are compared on random node/destination/
// congestion patterns with a reference model written here from the routing
// rules (digit comparison, ring direction, y-then-x inside a BM, dateline,
// CS and LS conditions). The DDR instance is checked with directed cases:
// path 1 taken out of order, fallback to path 2, escape to the deterministic
// channels, waiting on a higher-labelled channel and the DR increment.
module tb_tesh_route_sel;
  import tesh_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  // ---------------- shared stimulus ----------------
  logic [ADDR_W-1:0] node;
  head_t             hd;
  logic [1:0]        ivc4;
  logic [1:0]        busy4  [NPORTS];
  logic [3:0]        busyd  [NPORTS];
  logic [2:0]        lab2   [NPORTS][2];
  logic [2:0]        lab4   [NPORTS][4];

  // outputs
  logic req_a, req_b, req_c;
  port_e port_a, port_b, port_c;
  logic vc_a, vc_b;
  logic [1:0] vc_c;
  logic [2:0] dr_a, dr_b, dr_c, ll_a, ll_b, ll_c;
  logic [4:0] ev_a, ev_b, ev_c;

  tesh_route_sel #(.LEVELS(3), .NUM_VC(2), .USE_CS(0), .USE_LS(0), .USE_DDR(0)) u_dor (
    .node_addr(node), .hd, .in_vc(ivc4[0]), .ovc_busy(busy4), .ovc_label(lab2),
    .req(req_a), .out_port(port_a), .out_vc(vc_a), .new_dr(dr_a), .new_last_lam(ll_a),
    .ev_cs(ev_a[0]), .ev_ls(ev_a[1]), .ev_path1(ev_a[2]), .ev_escape(ev_a[3]), .ev_dr_inc(ev_a[4]));

  tesh_route_sel #(.LEVELS(3), .NUM_VC(2), .USE_CS(1), .USE_LS(1), .USE_DDR(0)) u_csls (
    .node_addr(node), .hd, .in_vc(ivc4[0]), .ovc_busy(busy4), .ovc_label(lab2),
    .req(req_b), .out_port(port_b), .out_vc(vc_b), .new_dr(dr_b), .new_last_lam(ll_b),
    .ev_cs(ev_b[0]), .ev_ls(ev_b[1]), .ev_path1(ev_b[2]), .ev_escape(ev_b[3]), .ev_dr_inc(ev_b[4]));

  tesh_route_sel #(.LEVELS(3), .NUM_VC(4), .USE_CS(1), .USE_LS(1), .USE_DDR(1)) u_ddr (
    .node_addr(node), .hd, .in_vc(ivc4), .ovc_busy(busyd), .ovc_label(lab4),
    .req(req_c), .out_port(port_c), .out_vc(vc_c), .new_dr(dr_c), .new_last_lam(ll_c),
    .ev_cs(ev_c[0]), .ev_ls(ev_c[1]), .ev_path1(ev_c[2]), .ev_escape(ev_c[3]), .ev_dr_inc(ev_c[4]));

  // ---------------- reference model ----------------
  function automatic int dg(int a, int i);
    return (a >> (2 * i)) & 3;
  endfunction

  function automatic int ring_at(int x, int y);
    if (x == 0 && y == 0) return 5;
    if (x == 3 && y == 0) return 4;
    if (x == 0 && y == 3) return 3;
    if (x == 3 && y == 3) return 2;
    return 0;
  endfunction

  // returns port*16 + vc
  function automatic int ref_route(int n, int d, int cur, bit cs, bit ls);
    int x, y, hi, lam, tx, ty, dl, nl, rdist, cp, cm, pp, mp, port, vc;
    x = dg(n, 0); y = dg(n, 1);
    hi = -1;
    for (int i = 5; i >= 2; i--) if (hi < 0 && dg(d, i) != dg(n, i)) hi = i;
    lam = ring_at(x, y);
    pp = (y == 0) ? 2 : 0;     // S : N
    mp = (x == 0) ? 3 : 1;     // W : E
    if (hi >= 0 && lam == hi) begin
      dl = dg(d, hi); nl = dg(n, hi);
      rdist = (dl - nl + 4) % 4;
      cp = (nl == 3) ? 1 : cur;
      cm = (nl == 0) ? 1 : cur;
      if (cs && cp == 0 && dl > nl && busy4[pp][0]) cp = 1;
      if (cs && cm == 0 && dl < nl && busy4[mp][0]) cm = 1;
      if (rdist == 1 || (rdist == 2 && !(ls && busy4[pp][cp]))) begin port = pp; vc = cp; end
      else begin port = mp; vc = cm; end
      return port * 16 + vc;
    end
    if (hi >= 0) begin
      tx = (hi == 5 || hi == 3) ? 0 : 3;
      ty = (hi == 5 || hi == 4) ? 0 : 3;
      vc = 0;
    end else begin
      tx = dg(d, 0); ty = dg(d, 1);
      vc = 1;
    end
    if (ty > y) port = 0;
    else if (ty < y) port = 2;
    else if (tx > x) port = 1;
    else if (tx < x) port = 3;
    else port = 4;
    return port * 16 + vc;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (node %h dest %h)", what, got, exp, node, hd.dest);
    end
  endtask

  function automatic int mk_addr(int x, int y, int d2, int d3, int d4, int d5);
    return x | (y << 2) | (d2 << 4) | (d3 << 6) | (d4 << 8) | (d5 << 10);
  endfunction

  initial begin
    int e;
    int n_cs = 0, n_ls = 0;
    // defaults
    hd = '0; hd.ftype = FT_HEAD;
    for (int p = 0; p < 5; p++) begin
      busy4[p] = '0; busyd[p] = '0;
      for (int v = 0; v < 2; v++) lab2[p][v] = '0;
      for (int v = 0; v < 4; v++) lab4[p][v] = '0;
    end

    // ---------- random comparison: DOR and CS+LS ----------
    for (int t = 0; t < 20000; t++) begin
      // bias towards corner nodes, where the rings are
      node = ADDR_W'($urandom);
      if (t % 2 == 0) node[3:0] = {($urandom_range(1) ? 2'd3 : 2'd0), ($urandom_range(1) ? 2'd3 : 2'd0)};
      hd.dest = node;
      for (int i = 0; i < 6; i++) if ($urandom_range(2) == 0) hd.dest[2*i +: 2] = 2'($urandom);
      ivc4 = 2'($urandom_range(1));
      for (int p = 0; p < 5; p++) busy4[p] = 2'($urandom);
      #1;
      e = ref_route(int'(node), int'(hd.dest), int'(ivc4[0]), 0, 0);
      check("DOR port", int'(port_a), e / 16);
      check("DOR vc", int'(vc_a), e % 16);
      check("DOR req", int'(req_a), 1);
      e = ref_route(int'(node), int'(hd.dest), int'(ivc4[0]), 1, 1);
      check("CSLS port", int'(port_b), e / 16);
      check("CSLS vc", int'(vc_b), e % 16);
      if (ev_b[0]) n_cs++;
      if (ev_b[1]) n_ls++;
    end
    checks++;
    if (n_cs == 0 || n_ls == 0) begin
      failures++;
      $display("FAIL: CS (%0d) or LS (%0d) never applied", n_cs, n_ls);
    end

    // ---------- directed: CS and LS on a level-2 vertical ring ----------
    // node (0,3) holds ring 3 (digit n3); plus = N, minus = W
    for (int p = 0; p < 5; p++) busy4[p] = '0;
    node = ADDR_W'(mk_addr(0, 3, 0, 0, 0, 0));
    hd.dest = ADDR_W'(mk_addr(1, 1, 0, 1, 0, 0));
    ivc4 = 0;
    #1 check("ring plus port", int'(port_b), int'(P_N));
    check("ring plus vc L", int'(vc_b), 0);
    busy4[P_N] = 2'b01; #1;
    check("CS moves to H", int'(vc_b), 1);
    check("CS event", int'(ev_b[0]), 1);
    check("DOR stays L", int'(vc_a), 0);
    hd.dest = ADDR_W'(mk_addr(1, 1, 0, 2, 0, 0));   // distance 2
    busy4[P_N] = 2'b11; #1;
    check("LS takes minus", int'(port_b), int'(P_W));
    check("LS event", int'(ev_b[1]), 1);
    check("DOR takes plus", int'(port_a), int'(P_N));
    node = ADDR_W'(mk_addr(0, 3, 0, 3, 0, 0));       // plus from 3 wraps to 0
    hd.dest = ADDR_W'(mk_addr(1, 1, 0, 0, 0, 0));
    busy4[P_N] = 2'b00; #1;
    check("wrap uses H", int'(vc_a), 1);
    check("wrap port", int'(port_a), int'(P_N));

    // ---------- directed: DDR ----------
    // node (3,0) holds ring 4 (3LV.H): plus = S, minus = E.
    // Packet must still cross ring 5 (digit 5) and ring 4 (digit 4).
    for (int p = 0; p < 5; p++) busyd[p] = '0;
    node = ADDR_W'(mk_addr(3, 0, 0, 0, 0, 0));
    hd.dest = ADDR_W'(mk_addr(2, 2, 0, 0, 1, 2));
    hd.dr = 3'd0; hd.last_lam = 3'd0;
    ivc4 = 2'd0;
    #1 check("DDR path1 port", int'(port_c), int'(P_S));
    check("DDR path1 vc", int'(vc_c), 0);
    check("DDR path1 event", int'(ev_c[2]), 1);
    check("DDR last ring", int'(ll_c), 4);
    check("DOR goes to ring-5 outlet", int'(port_a), int'(P_W));
    busyd[P_S] = 4'b0011; #1;
    check("DDR path2 port", int'(port_c), int'(P_W));
    check("DDR path2 vc", int'(vc_c), 0);
    busyd[P_W] = 4'b0001; #1;
    check("DDR path2 second adaptive vc", int'(vc_c), 1);
    busyd[P_W] = 4'b0011;
    lab4[P_S][0] = 3'd0; lab4[P_S][1] = 3'd0; lab4[P_W][0] = 3'd0; lab4[P_W][1] = 3'd0;
    #1 check("DDR escape port", int'(port_c), int'(P_W));
    check("DDR escape vc", int'(vc_c), 2);
    check("DDR escape event", int'(ev_c[3]), 1);
    lab4[P_W][1] = 3'd1; #1;
    check("DDR waits on higher label", int'(req_c), 0);
    // a packet already in a deterministic channel never takes path 1
    busyd[P_S] = '0; busyd[P_W] = '0; lab4[P_W][1] = 3'd0;
    ivc4 = 2'd2; #1;
    check("deterministic stays DOR", int'(port_c), int'(P_W));
    check("deterministic vc", int'(vc_c), 2);
    // DR increment: at the ring-5 outlet (0,0), coming from ring 4
    node = ADDR_W'(mk_addr(0, 0, 0, 0, 1, 0));
    hd.dest = ADDR_W'(mk_addr(2, 2, 0, 0, 1, 2));
    hd.last_lam = 3'd4; hd.dr = 3'd0; ivc4 = 2'd0; #1;
    check("DDR ring5 port", int'(port_c), int'(P_S));
    check("DR incremented", int'(dr_c), 1);
    check("DR event", int'(ev_c[4]), 1);
    hd.last_lam = 3'd5; #1;
    check("no DR increment in order", int'(dr_c), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
