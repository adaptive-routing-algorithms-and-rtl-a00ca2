// tb_tesh_control: the four-stage control of one router, with the input and
// output buffers modelled here.
//
// Node (1,1) of BM 0 in a level-2 network, DDR with 4 VCs. A 4-flit packet in
// input VC (local, 0) for node (3,1) must take port E on adaptive VC 0: the
// test checks the stage timing (route registered, output VC granted in the
// next cycle, first move two cycles later), one move per cycle after that,
// the release of the output VC by the tail, and the DR rewrite values. Then
// two heads from different inputs compete for the same output: both must be
// served, the second on the other adaptive channel.
module tb_tesh_control;
  import tesh_pkg::*;
  localparam int NVC = 4, NV = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0] node;
  flit_t             in_front [NV], in_second [NV];
  logic [1:0]        in_count [NV];
  logic [NV-1:0]     in_pop;
  logic [1:0]        out_count [NV];
  logic [NV-1:0]     out_full, out_sent, conn_valid;
  logic [4:0]        conn_src [NV];
  logic [2:0]        hd_dr [NV], hd_last [NV];
  logic              ev_cs, ev_ls, ev_path1, ev_escape, ev_dr_inc;

  tesh_control #(.LEVELS(2)) dut (
    .clk, .rst_n, .node_addr(node),
    .in_front, .in_second, .in_count, .in_pop,
    .out_count, .out_full, .out_sent,
    .conn_valid, .conn_src, .hd_dr, .hd_last,
    .ev_cs, .ev_ls, .ev_path1, .ev_escape, .ev_dr_inc);

  // input buffer model: unbounded queues shown through a 2-flit window
  flit_t iq [NV][$];
  int    moved [NV];
  function automatic void refresh();
    for (int i = 0; i < NV; i++) begin
      in_count[i]  = 2'((iq[i].size() > 2) ? 2 : iq[i].size());
      in_front[i]  = (iq[i].size() > 0) ? iq[i][0] : '0;
      in_second[i] = (iq[i].size() > 1) ? iq[i][1] : '0;
    end
  endfunction
  always @(posedge clk) begin
    for (int i = 0; i < NV; i++)
      if (rst_n && in_pop[i]) begin
        if (iq[i].size() == 0) begin
          failures++;
          $display("FAIL pop of an empty input buffer %0d", i);
        end else void'(iq[i].pop_front());
        moved[i]++;
      end
    refresh();
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic flit_t hdr(logic [ADDR_W-1:0] d);
    head_t h = '0;
    h.ftype = FT_HEAD;
    h.dest  = d;
    return flit_t'(h);
  endfunction

  localparam int I_L0 = 4 * NVC + 0;   // local port, vc 0
  localparam int I_W0 = 3 * NVC + 0;   // west port, vc 0
  localparam int O_E0 = 1 * NVC + 0;
  localparam int O_E1 = 1 * NVC + 1;

  initial begin
    int t0, tmove;
    node = ADDR_W'(1 | (1 << 2));
    for (int i = 0; i < NV; i++) begin out_count[i] = 0; moved[i] = 0; end
    refresh();
    out_full = '0; out_sent = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // packet to (3,1), 4 flits
    iq[I_L0].push_back(hdr(ADDR_W'(3 | (1 << 2))));
    iq[I_L0].push_back(flit_t'({FT_BODY, 30'd1}));
    iq[I_L0].push_back(flit_t'({FT_BODY, 30'd2}));
    iq[I_L0].push_back(flit_t'({FT_TAIL, 30'd3}));
    refresh();
    t0 = 0;
    @(posedge clk); #1;               // stage 1 done
    chk("no grant yet", conn_valid[O_E0], 0);
    @(posedge clk); #1;               // stage 2: granted
    chk("E vc0 granted", conn_valid[O_E0], 1);
    chk("owner", conn_src[O_E0], I_L0);
    chk("DR unchanged", hd_dr[I_L0], 0);
    @(posedge clk); #1;               // stage 3: move registered
    chk("first move", in_pop[I_L0], 1);
    tmove = 0;
    for (int k = 1; k < 4; k++) begin
      @(posedge clk); #1;
      chk("move each cycle", in_pop[I_L0], k < 4 ? 1 : 0);
    end
    @(posedge clk); #1;
    chk("all moved", moved[I_L0], 4);
    chk("released", conn_valid[O_E0], 0);

    // two heads for the same output
    @(negedge clk);
    iq[I_L0].push_back(flit_t'({FT_SNGL, 18'd0, 12'(3 | (1 << 2))}));
    iq[I_W0].push_back(hdr(ADDR_W'(3 | (1 << 2))));
    iq[I_W0].push_back(flit_t'({FT_TAIL, 30'd9}));
    refresh();
    repeat (4) @(posedge clk);
    #1;
    chk("both on E", int'(conn_valid[O_E0]) + int'(conn_valid[O_E1]) >= 1, 1);
    repeat (10) @(posedge clk);
    chk("single-flit packet moved", moved[I_L0], 5);
    chk("two-flit packet moved", moved[I_W0], 2);
    chk("all released", conn_valid, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
