// tb_tesh_output_port: per-VC output buffers and link multiplexer.
// Random pushes fill the channel FIFOs; the next node's full flags toggle at
// random. Checked: at most one flit per cycle, never on a channel marked full,
// per-channel order preserved, every flit delivered, and the link is not idle
// while a channel could send.
module tb_tesh_output_port;
  import tesh_pkg::*;
  localparam int NVC = 4, D = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NVC-1:0] push, full, out_full;
  flit_t          din [NVC];
  logic [1:0]     count [NVC];
  logic           out_valid;
  logic [1:0]     out_vc;
  flit_t          out_flit;
  flit_t          q [NVC][$];

  tesh_output_port #(.NUM_VC(NVC), .DEPTH(D)) dut (
    .clk, .rst_n, .push, .din, .count, .full, .out_valid, .out_vc, .out_flit, .out_full);

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  initial begin
    int sent = 0, pushed = 0;
    logic can_send;
    push = '0; out_full = '0;
    for (int v = 0; v < NVC; v++) din[v] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      for (int v = 0; v < NVC; v++) begin
        push[v] = (t < 4500) && !full[v] && ($urandom_range(1) == 0);
        din[v]  = flit_t'($urandom);
      end
      out_full = NVC'($urandom);
      #1;
      can_send = 1'b0;
      for (int v = 0; v < NVC; v++) if (q[v].size() > 0 && !out_full[v]) can_send = 1'b1;
      chk("work conserving", out_valid, can_send);
      if (out_valid) begin
        chk("not to full vc", out_full[out_vc], 0);
        chk("order", out_flit, q[out_vc][0]);
      end
      @(posedge clk);
      if (out_valid) begin void'(q[out_vc].pop_front()); sent++; end
      for (int v = 0; v < NVC; v++) if (push[v]) begin q[v].push_back(din[v]); pushed++; end
    end
    chk("all delivered", sent, pushed);
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
