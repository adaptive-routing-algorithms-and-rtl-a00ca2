// tb_tesh_crossbar: random connection tables and moves; each output channel
// must carry exactly the flit of the input channel that holds it, and be
// written only when that input moves.
module tb_tesh_crossbar;
  import tesh_pkg::*;
  localparam int NI = 20, NO = 20;
  int checks = 0, failures = 0;
  flit_t         in_flit [NI], out_flit [NO];
  logic [NI-1:0] in_move;
  logic [NO-1:0] conn_valid, out_push;
  logic [4:0]    conn_src [NO];

  tesh_crossbar #(.NI(NI), .NO(NO)) dut (.in_flit, .in_move, .conn_valid, .conn_src, .out_flit, .out_push);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < NI; i++) in_flit[i] = flit_t'($urandom);
      in_move = NI'($urandom);
      for (int o = 0; o < NO; o++) begin
        conn_valid[o] = 1'($urandom);
        conn_src[o]   = 5'($urandom_range(NI - 1));
      end
      #1;
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (out_push[o] != (conn_valid[o] && in_move[conn_src[o]]) ||
            (out_push[o] && out_flit[o] != in_flit[conn_src[o]])) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
