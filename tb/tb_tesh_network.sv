// tb_tesh_network: end-to-end test of the TESH network at its default size
// (level 2, 256 PEs, 4 VCs, 2-flit buffers, CS + LS + DDR routing).
//
// Every PE model sends 16-flit packets (the paper's packet size) on adaptive
// channel 0 at a high request rate; destinations are uniform, except that 10%
// of the packets go to the hot-spot PE of its level-2 network, node (00)(00),
// as in the paper's hot-spot pattern. The ejection side checks that every
// flit arrives at the PE its head names, that packets arrive whole and in
// order on their channel, and that every packet sent is delivered. The
// routers' mechanism pulses are counted; CS, LS, DDR path 1, DDR escape to
// the deterministic channels and DR increments must each occur at least once.
module tb_tesh_network;
  import tesh_pkg::*;
  localparam int NN     = 256;
  localparam int NVC    = 4;
  localparam int PLEN   = 16;
  localparam int NPKT   = 6;       // packets per PE
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic           inj_valid [NN];
  logic [1:0]     inj_vc    [NN];
  flit_t          inj_flit  [NN];
  logic [NVC-1:0] inj_full  [NN];
  logic           ej_valid  [NN];
  logic [1:0]     ej_vc     [NN];
  flit_t          ej_flit   [NN];
  logic [NVC-1:0] ej_full   [NN];
  logic [4:0]     ev        [NN];

  tesh_network dut (
    .clk, .rst_n,
    .inj_valid, .inj_vc, .inj_flit, .inj_full,
    .ej_valid, .ej_vc, .ej_flit, .ej_full, .ev);

  // ---------------- sources ----------------
  int sent_pkts = 0, recv_pkts = 0, recv_flits = 0;
  int src_left  [NN];     // packets still to send
  int src_idx   [NN];     // flit index within current packet, -1 idle
  int src_dest  [NN];
  int src_id    [NN];
  int next_id = 1;
  int pkt_dest  [int];    // packet id -> destination
  int pkt_sent_cycle [int];
  longint lat_sum = 0;

  // ---------------- sinks ----------------
  int sink_id  [NN][NVC];  // packet in progress on (node, vc), 0 none
  int sink_cnt [NN][NVC];

  int n_ev [5];

  function automatic flit_t mk_flit(int idx, int dest, int id);
    head_t h;
    flit_t f;
    if (idx == 0) begin
      h = '0;
      h.ftype = FT_HEAD;
      h.dest  = ADDR_W'(dest);
      h.rsvd  = 6'(id);         // low bits of the id, for a cross-check
      return flit_t'(h);
    end
    f = '0;
    f[31:30] = (idx == PLEN - 1) ? FT_TAIL : FT_BODY;
    f[29:24] = 6'(idx);
    f[23:0]  = 24'(id);
    return f;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < NN; k++) begin
        // ---- sink ----
        if (ej_valid[k]) begin
          int v, id;
          v = int'(ej_vc[k]);
          recv_flits++;
          if (is_head(ej_flit[k])) begin
            head_t h;
            h = head_t'(ej_flit[k]);
            checks++;
            if (int'(h.dest) != k || sink_id[k][v] != 0) begin
              failures++;
              $display("FAIL head at node %0d for %0d (busy %0d)", k, h.dest, sink_id[k][v]);
            end
            sink_id[k][v]  = -1;    // id learnt from the first body flit
            sink_cnt[k][v] = 1;
          end else begin
            id = int'(ej_flit[k][23:0]);
            checks++;
            if (sink_id[k][v] == 0 || int'(ej_flit[k][29:24]) != sink_cnt[k][v] ||
                (sink_id[k][v] > 0 && sink_id[k][v] != id) ||
                !pkt_dest.exists(id) || pkt_dest[id] != k) begin
              failures++;
              $display("FAIL flit at node %0d vc %0d: id %0d idx %0d", k, v, id, ej_flit[k][29:24]);
            end
            sink_id[k][v] = id;
            sink_cnt[k][v]++;
            if (is_tail(ej_flit[k])) begin
              checks++;
              if (sink_cnt[k][v] != PLEN) begin
                failures++;
                $display("FAIL packet %0d length %0d", id, sink_cnt[k][v]);
              end
              if (pkt_sent_cycle.exists(id)) lat_sum += longint'(cycle - pkt_sent_cycle[id]);
              sink_id[k][v] = 0;
              recv_pkts++;
            end
          end
        end
        // ---- mechanism counters ----
        for (int e = 0; e < 5; e++) if (ev[k][e]) n_ev[e]++;
      end
    end
  end

  // sources drive on the negative edge
  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < NN; k++) begin
        inj_valid[k] = 1'b0;
        if (src_idx[k] < 0 && src_left[k] > 0 && $urandom_range(3) == 0) begin
          int d;
          if ($urandom_range(9) == 0) d = 0;                 // hot spot
          else d = int'($urandom_range(NN - 1));
          if (d == k) d = (k + 37) % NN;
          src_dest[k] = d;
          src_id[k]   = next_id++;
          pkt_dest[src_id[k]] = d;
          pkt_sent_cycle[src_id[k]] = cycle;
          src_idx[k]  = 0;
          src_left[k]--;
          sent_pkts++;
        end
        if (src_idx[k] >= 0 && !inj_full[k][0]) begin
          inj_valid[k] = 1'b1;
          inj_vc[k]    = 2'd0;
          inj_flit[k]  = mk_flit(src_idx[k], src_dest[k], src_id[k]);
          src_idx[k]   = (src_idx[k] == PLEN - 1) ? -1 : src_idx[k] + 1;
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < NN; k++) begin
      inj_valid[k] = 0; inj_vc[k] = 0; inj_flit[k] = '0; ej_full[k] = '0;
      src_left[k] = NPKT; src_idx[k] = -1;
      for (int v = 0; v < NVC; v++) begin sink_id[k][v] = 0; sink_cnt[k][v] = 0; end
    end
    for (int e = 0; e < 5; e++) n_ev[e] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (sent_pkts == NN * NPKT && recv_pkts == sent_pkts);
    repeat (5) @(posedge clk);
    checks++;
    if (recv_flits != sent_pkts * PLEN) begin
      failures++;
      $display("FAIL flits received %0d of %0d", recv_flits, sent_pkts * PLEN);
    end
    $display("packets %0d delivered in %0d cycles, mean latency %0d cycles",
             recv_pkts, cycle, lat_sum / longint'(recv_pkts));
    $display("mechanisms: CS %0d  LS %0d  DDR path1 %0d  DDR escape %0d  DR increment %0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4]);
    for (int e = 0; e < 5; e++) begin
      checks++;
      if (n_ev[e] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never happened", e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: sent %0d received %0d packets", sent_pkts, recv_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
