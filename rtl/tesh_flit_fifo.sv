// tesh_flit_fifo: small synchronous FIFO holding the flits of one virtual
// channel; used for the input buffers and output buffers of the router.
//
// A circular array of DEPTH entries with read and write pointers and an
// occupancy count. Push and pop may happen in the same cycle, also when the
// FIFO is full. The first two entries are visible without popping (front,
// second) so that the control can look one flit ahead while a move is in
// flight. Writing into a full FIFO or reading an empty one is a protocol
// error and is asserted. DEPTH = 2 flits per channel is the paper's buffer
// length; the FIFO organisation is this design's own.
module tesh_flit_fifo
  import tesh_pkg::*;
#(
  parameter int unsigned DEPTH = 2,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  flit_t         din,
  input  logic          pop,
  output flit_t         front,
  output flit_t         second,
  output logic [CW-1:0] count,
  output logic          full,
  output logic          empty
);

  flit_t         mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  assign front  = mem[rd_ptr];
  assign second = mem[inc(rd_ptr)];
  assign full   = (count == CW'(DEPTH));
  assign empty  = (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("push into full FIFO");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("pop from empty FIFO");

endmodule
