// tb_tesh_router: one router of a level-2 TESH network, at the corner PE
// (x=3, y=3) of BM (n3,n2) = (2,1), which holds the level-2 horizontal ring
// (plus link on N, minus link on E).
//
// Part 1 sends single packets and checks the output port, the flit order, the
// head latency (5 cycles from the link to the next link) and one flit per
// cycle for the body. Part 2 sends packets from all five inputs at once,
// several to the same output, with random back-pressure, and checks that
// every packet arrives whole at the expected port and that the flits of two
// packets never interleave on one virtual channel.
module tb_tesh_router;
  import tesh_pkg::*;
  localparam int NVC = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [ADDR_W-1:0] node;
  logic              in_valid  [NPORTS];
  logic [1:0]        in_vc     [NPORTS];
  flit_t             in_flit   [NPORTS];
  logic [NVC-1:0]    in_full   [NPORTS];
  logic              out_valid [NPORTS];
  logic [1:0]        out_vc    [NPORTS];
  flit_t             out_flit  [NPORTS];
  logic [NVC-1:0]    out_full  [NPORTS];
  logic [4:0]        ev;
  logic              backpressure = 0;

  tesh_router #(.LEVELS(2)) dut (
    .clk, .rst_n, .node_addr(node),
    .in_valid, .in_vc, .in_flit, .in_full,
    .out_valid, .out_vc, .out_flit, .out_full, .ev);

  // node (x,y) = (3,3), n2 = 1, n3 = 2
  function automatic logic [ADDR_W-1:0] addr(int x, int y, int d2, int d3);
    return ADDR_W'(x | (y << 2) | (d2 << 4) | (d3 << 6));
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // ---------------- output monitor ----------------
  flit_t rx [NPORTS][$];
  int    rx_cycle [NPORTS][$];
  int    open_pkt [NPORTS][NVC];   // packet id currently on (port, vc), -1 none
  int    interleave_err = 0;

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (out_valid[p]) begin
        rx[p].push_back(out_flit[p]);
        rx_cycle[p].push_back(cycle);
        if (is_head(out_flit[p])) begin
          if (open_pkt[p][out_vc[p]] != -1) interleave_err++;
          open_pkt[p][out_vc[p]] <= is_tail(out_flit[p]) ? -1 : int'(out_flit[p][29:24]);
        end else begin
          if (open_pkt[p][out_vc[p]] != int'(out_flit[p][29:24])) interleave_err++;
          if (is_tail(out_flit[p])) open_pkt[p][out_vc[p]] <= -1;
        end
      end
      out_full[p] <= backpressure ? NVC'($urandom) : '0;
    end
  end

  // ---------------- packet source ----------------
  function automatic flit_t mk_flit(int id, int idx, int len, logic [ADDR_W-1:0] dest);
    head_t h;
    flit_t f;
    if (idx == 0) begin
      h = '0;
      h.ftype   = (len == 1) ? FT_SNGL : FT_HEAD;
      h.src_tag = 6'(id);
      h.dest    = dest;
      return flit_t'(h);
    end
    f = '0;
    f[31:30] = (idx == len - 1) ? FT_TAIL : FT_BODY;
    f[29:24] = 6'(id);
    f[23:0]  = 24'(idx);
    return f;
  endfunction

  int inj_cycle [64];

  task automatic send(int p, int vc, int id, int len, logic [ADDR_W-1:0] dest);
    for (int k = 0; k < len; k++) begin
      @(negedge clk);
      while (in_full[p][vc]) @(negedge clk);
      in_valid[p] = 1'b1;
      in_vc[p]    = 2'(vc);
      in_flit[p]  = mk_flit(id, k, len, dest);
      if (k == 0) inj_cycle[id] = cycle;
      @(posedge clk);
      #1 in_valid[p] = 1'b0;
    end
  endtask

  // check that packet id arrived whole on port p
  task automatic expect_pkt(int p, int id, int len);
    int n = 0;
    int first = -1;
    foreach (rx[p][k]) begin
      if (int'(rx[p][k][29:24]) == id) begin
        if (n == 0) begin
          chk("head first", is_head(rx[p][k]), 1);
        end else begin
          chk("flit index", int'(rx[p][k][23:0]), n);
        end
        n++;
      end
    end
    chk($sformatf("packet %0d length on port %0d", id, p), n, len);
  endtask

  initial begin
    int hc, tc;
    node = addr(3, 3, 1, 2);
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = 0; in_vc[p] = 0; in_flit[p] = '0; out_full[p] = '0;
      for (int v = 0; v < NVC; v++) open_pkt[p][v] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- part 1: single packets ----
    // 1: local -> (1,3) same BM: W
    send(P_L, 0, 1, 16, addr(1, 3, 1, 2));
    repeat (30) @(posedge clk);
    expect_pkt(P_W, 1, 16);
    hc = -1; tc = -1;
    foreach (rx[P_W][k]) begin
      if (int'(rx[P_W][k][29:24]) == 1 && is_head(rx[P_W][k])) hc = rx_cycle[P_W][k];
      if (int'(rx[P_W][k][29:24]) == 1 && is_tail(rx[P_W][k])) tc = rx_cycle[P_W][k];
    end
    chk("head latency", hc - inj_cycle[1], 5);
    chk("one flit per cycle", tc - hc, 15);
    // 2: ring digit n2 +1 -> plus link (N)
    send(P_W, 0, 2, 4, addr(0, 0, 2, 2));
    // 3: ring digit n2 -1 -> minus link (E)
    send(P_S, 0, 3, 4, addr(0, 0, 0, 2));
    // 4: digit n3 differs -> towards level-2 vertical outlet (0,3): W
    send(P_N, 0, 4, 4, addr(2, 2, 1, 0));
    // 5: destination is this node -> local
    send(P_E, 1, 5, 3, addr(3, 3, 1, 2));
    // 6: final phase towards (3,0) -> S
    send(P_W, 1, 6, 2, addr(3, 0, 1, 2));
    repeat (40) @(posedge clk);
    expect_pkt(P_N, 2, 4);
    expect_pkt(P_E, 3, 4);
    expect_pkt(P_W, 4, 4);
    expect_pkt(P_L, 5, 3);
    expect_pkt(P_S, 6, 2);

    // ---- part 2: all inputs at once, contention, back-pressure ----
    backpressure = 1;
    fork
      begin send(P_L, 0, 10, 8, addr(1, 3, 1, 2)); send(P_L, 1, 11, 5, addr(0, 0, 2, 2)); end
      begin send(P_N, 0, 12, 8, addr(0, 3, 1, 2)); send(P_N, 1, 13, 6, addr(3, 3, 1, 2)); end
      begin send(P_E, 0, 14, 8, addr(2, 3, 1, 2)); send(P_E, 2, 15, 4, addr(3, 3, 1, 2)); end
      begin send(P_S, 1, 16, 8, addr(3, 3, 2, 2)); send(P_S, 0, 17, 7, addr(3, 3, 0, 2)); end
      begin send(P_W, 0, 18, 1, addr(3, 3, 1, 2)); send(P_W, 1, 19, 9, addr(3, 0, 1, 2)); end
    join
    repeat (200) @(posedge clk);
    backpressure = 0;
    repeat (20) @(posedge clk);
    expect_pkt(P_W, 10, 8);
    expect_pkt(P_N, 11, 5);
    expect_pkt(P_W, 12, 8);
    expect_pkt(P_L, 13, 6);
    expect_pkt(P_W, 14, 8);
    expect_pkt(P_L, 15, 4);
    expect_pkt(P_N, 16, 8);
    expect_pkt(P_E, 17, 7);
    expect_pkt(P_L, 18, 1);
    expect_pkt(P_S, 19, 9);
    chk("no interleaving", interleave_err, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
