// tb_tesh_rr_arbiter: random requests against a round-robin reference model.
// The model keeps the last granted index and expects the first requester
// after it (cyclically); it also checks that a steady requester waits at most
// N-1 grants.
module tb_tesh_rr_arbiter;
  localparam int N = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  int last_m;

  always #5 clk = ~clk;

  tesh_rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .gnt);

  function automatic logic [N-1:0] model(logic [N-1:0] r, int last);
    for (int k = 1; k <= N; k++)
      if (r[(last + k) % N]) return N'(1) << ((last + k) % N);
    return '0;
  endfunction

  initial begin
    int wait_cnt;
    req = '0;
    last_m = N - 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait_cnt = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      if (t > 1500) req[2] = 1'b1;       // steady requester
      #1;
      checks++;
      if (gnt !== model(req, last_m)) begin
        failures++;
        $display("FAIL t=%0d req=%b gnt=%b exp=%b", t, req, gnt, model(req, last_m));
      end
      for (int k = 0; k < N; k++) if (gnt[k]) last_m = k;
      if (t > 1500) begin
        wait_cnt = gnt[2] ? 0 : wait_cnt + 1;
        checks++;
        if (wait_cnt > N - 1) begin
          failures++;
          $display("FAIL starvation");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
