// tesh_rr_arbiter: round-robin arbiter.
//
// Grants one of N requests in the same cycle (combinational grant). The search
// starts one position after the last granted requester, which the arbiter
// remembers in a pointer register, so every steady requester is served within
// N grants. The router uses one per output virtual channel (the arbiters of
// the control block) and one per output multiplexer. Round robin is the
// arbitration the paper names; the pointer form is this design's.
module tesh_rr_arbiter #(
  parameter int unsigned N = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  logic [IW-1:0] last;

  always_comb begin
    logic [IW-1:0] idx;
    logic          done;
    gnt  = '0;
    done = 1'b0;
    idx  = last;
    for (int k = 0; k < int'(N); k++) begin
      idx = (idx == IW'(N - 1)) ? '0 : idx + IW'(1);
      if (!done && req[idx]) begin
        gnt[idx] = 1'b1;
        done     = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= IW'(N - 1);
    else begin
      for (int k = 0; k < int'(N); k++)
        if (gnt[k]) last <= IW'(k);
    end
  end

endmodule
