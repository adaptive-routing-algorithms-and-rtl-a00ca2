// tb_tesh_input_port: random traffic into the per-VC input buffers.
// Flits are sent on random channels whose full flag is low and popped at
// random; a queue per channel models the expected contents, against which the
// front/second flits, the count and the full flags are checked every cycle.
module tb_tesh_input_port;
  import tesh_pkg::*;
  localparam int NVC = 4, D = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           in_valid;
  logic [1:0]     in_vc;
  flit_t          in_flit;
  logic [NVC-1:0] in_full, pop;
  flit_t          front [NVC], second [NVC];
  logic [1:0]     count [NVC];
  flit_t          q [NVC][$];

  tesh_input_port #(.NUM_VC(NVC), .DEPTH(D)) dut (
    .clk, .rst_n, .in_valid, .in_vc, .in_flit, .in_full, .pop, .front, .second, .count);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    int pushes = 0;
    in_valid = 0; in_vc = 0; in_flit = '0; pop = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // compare state
      for (int v = 0; v < NVC; v++) begin
        chk("count", count[v], q[v].size());
        chk("full", in_full[v], q[v].size() == D && !pop[v]);
        if (q[v].size() > 0) chk("front", front[v], q[v][0]);
        if (q[v].size() > 1) chk("second", second[v], q[v][1]);
      end
      // new stimulus
      for (int v = 0; v < NVC; v++) pop[v] = (q[v].size() > 0) && ($urandom_range(2) == 0);
      #1;
      // a channel popped this cycle can take a flit in the same cycle
      for (int v = 0; v < NVC; v++) chk("full with pop", in_full[v], q[v].size() == D && !pop[v]);
      in_vc    = 2'($urandom);
      in_valid = ($urandom_range(3) != 0) && !in_full[in_vc];
      in_flit  = flit_t'($urandom);
      @(posedge clk);
      for (int v = 0; v < NVC; v++) if (pop[v]) void'(q[v].pop_front());
      if (in_valid) begin q[in_vc].push_back(in_flit); pushes++; end
    end
    chk("traffic", pushes > 1000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
