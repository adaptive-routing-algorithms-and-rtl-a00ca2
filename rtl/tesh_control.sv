// tesh_control: control block of the TESH router, a four-stage pipeline.
//
//   stage 1  link-channel selection: one selection unit (tesh_route_sel) is
//            shared by the input VCs whose front flit is a head; a round-robin
//            arbiter gives it to one of them per cycle. Output port and VC go
//            into that input VC's pipeline register together with the
//            packet's updated DR number and last ring.
//   stage 2  arbitration: the decoder turns (port, VC) into a one-hot request
//            for one output VC; one round-robin arbiter per output VC grants a
//            free output VC to one requester. The winner owns the output VC
//            until its tail flit has passed; the output VC is labelled with the
//            winner's DR number (used by DDR). A loser goes back to stage 1
//            and is routed again, so adaptive choices follow the congestion.
//   stage 3  buffer check: an owning input VC that holds a flit not yet moved
//            and whose output VC buffer has room (counting the move in flight
//            and the flit leaving the buffer this cycle) registers a move.
//   stage 4  switching: the registered move pops the input FIFO and, through
//            the crossbar, pushes the output FIFO. The tail flit frees the
//            output VC.
// A head flit therefore crosses the router in four cycles from the cycle it
// reaches the front of its input buffer; body flits follow one per cycle.
// Interface: flattened input VCs i = port*NUM_VC + vc and output VCs alike.
// The four stages, the decoders and one arbiter per output channel follow the
// paper's control-block figure; the register-level detail is this design's.
module tesh_control
  import tesh_pkg::*;
#(
  parameter int unsigned LEVELS  = 3,
  parameter int unsigned NUM_VC  = 4,
  parameter int unsigned DEPTH   = 2,
  parameter bit          USE_CS  = 1'b1,
  parameter bit          USE_LS  = 1'b1,
  parameter bit          USE_DDR = 1'b1,
  localparam int unsigned NV     = NPORTS * NUM_VC,
  localparam int unsigned VCW    = $clog2(NUM_VC),
  localparam int unsigned SW     = $clog2(NV),
  localparam int unsigned CW     = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] node_addr,
  // input VC buffers
  input  flit_t             in_front  [NV],
  input  flit_t             in_second [NV],
  input  logic [CW-1:0]     in_count  [NV],
  output logic [NV-1:0]     in_pop,          // stage-4 move of input VC i
  // output VC buffers
  input  logic [CW-1:0]     out_count [NV],
  input  logic [NV-1:0]     out_full,
  input  logic [NV-1:0]     out_sent,        // output VC sends a flit now
  // crossbar setting
  output logic [NV-1:0]     conn_valid,
  output logic [SW-1:0]     conn_src  [NV],
  // head-flit rewrite values per input VC
  output logic [2:0]        hd_dr     [NV],
  output logic [2:0]        hd_last   [NV],
  // one pulse per granted route that used a mechanism
  output logic              ev_cs,
  output logic              ev_ls,
  output logic              ev_path1,
  output logic              ev_escape,
  output logic              ev_dr_inc
);

  typedef enum logic [1:0] {
    S_IDLE,   // waiting for a head flit (stage 1 when one is there)
    S_ARB,    // route registered, arbitration this cycle
    S_ACT,    // owns an output VC, moving flits
    S_DRAIN   // tail flit's move registered
  } ivc_state_e;

  ivc_state_e        st     [NV];
  logic [SW-1:0]     tgt    [NV];     // output VC owned / requested
  logic [NV-1:0]     r_req;
  logic [NV-1:0]     mv_q;            // stage-3 pipeline register
  logic [4:0]        r_ev   [NV];     // registered mechanism flags
  logic [2:0]        ovc_label [NV];

  // ------------------------------------------------------------------
  // busy view of the output VCs for the selection function
  // ------------------------------------------------------------------
  logic [NUM_VC-1:0] ovc_busy  [NPORTS];
  logic [2:0]        ovc_lab2  [NPORTS][NUM_VC];

  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++)
      for (int v = 0; v < int'(NUM_VC); v++) begin
        ovc_busy[p][v] = conn_valid[p*NUM_VC+v] | out_full[p*NUM_VC+v];
        ovc_lab2[p][v] = ovc_label[p*NUM_VC+v];
      end
  end

  // ------------------------------------------------------------------
  // stage 1: one selection unit, shared round robin by the input VCs
  // that hold a head flit
  // ------------------------------------------------------------------
  logic [NV-1:0]     s1_want, s1_gnt;
  logic [SW-1:0]     s1_idx;
  logic              s1_req;
  port_e             s1_port;
  logic [VCW-1:0]    s1_vc;
  logic [2:0]        s1_dr, s1_last;
  logic [4:0]        s1_ev;

  always_comb begin
    for (int i = 0; i < int'(NV); i++)
      s1_want[i] = (st[i] == S_IDLE) && in_count[i] != '0 && !mv_q[i] && is_head(in_front[i]);
  end

  tesh_rr_arbiter #(.N(NV)) u_sel_arb (
    .clk, .rst_n, .req(s1_want), .gnt(s1_gnt)
  );

  always_comb begin
    s1_idx = '0;
    for (int i = 0; i < int'(NV); i++)
      if (s1_gnt[i]) s1_idx = SW'(i);
  end

  tesh_route_sel #(
    .LEVELS(LEVELS), .NUM_VC(NUM_VC),
    .USE_CS(USE_CS), .USE_LS(USE_LS), .USE_DDR(USE_DDR)
  ) u_sel (
    .node_addr,
    .hd          (head_t'(in_front[s1_idx])),
    .in_vc       (VCW'(32'(s1_idx) % NUM_VC)),
    .ovc_busy,
    .ovc_label   (ovc_lab2),
    .req         (s1_req),
    .out_port    (s1_port),
    .out_vc      (s1_vc),
    .new_dr      (s1_dr),
    .new_last_lam(s1_last),
    .ev_cs       (s1_ev[0]),
    .ev_ls       (s1_ev[1]),
    .ev_path1    (s1_ev[2]),
    .ev_escape   (s1_ev[3]),
    .ev_dr_inc   (s1_ev[4])
  );

  // ------------------------------------------------------------------
  // stage 2: decoders and one arbiter per output VC
  // ------------------------------------------------------------------
  logic [NV-1:0] dec   [NV];          // dec[i] one-hot over output VCs
  logic [NV-1:0] areq  [NV];          // areq[o][i]
  logic [NV-1:0] agnt  [NV];          // agnt[o][i]
  logic [NV-1:0] won;                 // input VC i was granted

  always_comb begin
    for (int i = 0; i < int'(NV); i++) begin
      dec[i] = '0;
      if (st[i] == S_ARB && r_req[i]) dec[i][tgt[i]] = 1'b1;
    end
    for (int o = 0; o < int'(NV); o++)
      for (int i = 0; i < int'(NV); i++)
        areq[o][i] = dec[i][o] && !conn_valid[o];
  end

  for (genvar o = 0; o < int'(NV); o++) begin : g_arb
    tesh_rr_arbiter #(.N(NV)) u_arb (
      .clk, .rst_n, .req(areq[o]), .gnt(agnt[o])
    );
  end

  always_comb begin
    won = '0;
    for (int o = 0; o < int'(NV); o++) won |= agnt[o];
  end

  // ------------------------------------------------------------------
  // stage 3: buffer check
  // ------------------------------------------------------------------
  logic [NV-1:0] chk_ok;
  logic [NV-1:0] chk_tail;

  always_comb begin
    for (int i = 0; i < int'(NV); i++) begin
      flit_t nxt;
      nxt         = mv_q[i] ? in_second[i] : in_front[i];
      chk_tail[i] = is_tail(nxt);
      chk_ok[i]   = (st[i] == S_ACT)
                    && (in_count[i] > CW'(mv_q[i]))
                    && ((32'(out_count[tgt[i]]) + 32'(mv_q[i]) - 32'(out_sent[tgt[i]])) < DEPTH);
    end
  end

  // ------------------------------------------------------------------
  // state registers
  // ------------------------------------------------------------------
  assign in_pop = mv_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NV); i++) begin
        st[i]      <= S_IDLE;
        tgt[i]     <= '0;
        hd_dr[i]   <= '0;
        hd_last[i] <= '0;
        r_ev[i]    <= '0;
      end
      r_req      <= '0;
      mv_q       <= '0;
      conn_valid <= '0;
      for (int o = 0; o < int'(NV); o++) begin
        conn_src[o]  <= '0;
        ovc_label[o] <= '0;
      end
    end else begin
      mv_q <= chk_ok;
      for (int i = 0; i < int'(NV); i++) begin
        case (st[i])
          S_IDLE: if (s1_gnt[i]) begin
            st[i]      <= S_ARB;
            r_req[i]   <= s1_req;
            tgt[i]     <= SW'(int'(s1_port) * NUM_VC + int'(s1_vc));
            hd_dr[i]   <= s1_dr;
            hd_last[i] <= s1_last;
            r_ev[i]    <= s1_ev;
          end
          S_ARB:   st[i] <= won[i] ? S_ACT : S_IDLE;
          S_ACT:   if (chk_ok[i] && chk_tail[i]) st[i] <= S_DRAIN;
          S_DRAIN: if (mv_q[i]) st[i] <= S_IDLE;
          default: st[i] <= S_IDLE;
        endcase
      end
      for (int o = 0; o < int'(NV); o++) begin
        for (int i = 0; i < int'(NV); i++) begin
          if (agnt[o][i]) begin
            conn_valid[o] <= 1'b1;
            conn_src[o]   <= SW'(i);
            ovc_label[o]  <= hd_dr[i];
          end
        end
        // the tail flit's move frees the output VC
        if (conn_valid[o] && st[conn_src[o]] == S_DRAIN && mv_q[conn_src[o]])
          conn_valid[o] <= 1'b0;
      end
    end
  end

  // mechanism pulses for granted routes
  always_comb begin
    logic [4:0] acc;
    acc = '0;
    for (int i = 0; i < int'(NV); i++)
      if (st[i] == S_ARB && won[i]) acc |= r_ev[i];
    {ev_dr_inc, ev_escape, ev_path1, ev_ls, ev_cs} = acc;
  end

  for (genvar i = 0; i < int'(NV); i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     (st[i] == S_IDLE && in_count[i] != '0 && !mv_q[i]) |-> is_head(in_front[i]))
      else $error("input VC %0d: packet does not start with a head flit", i);
  end

endmodule
