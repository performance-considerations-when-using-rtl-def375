// sync_fifo: single-clock first-in first-out buffer.
//
// Circular buffer of DEPTH entries of type T with registered pointers. Data
// written in one cycle is visible at the head in the next. push on a full
// FIFO and pop on an empty one are errors (asserted); the engine sizes its
// thread FIFOs to the number of threads so that neither can happen.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     dout,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned PW = $clog2(DEPTH);

  T             mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  assign empty = (count == 0);
  assign full  = (count == (PW+1)'(DEPTH));
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == PW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == PW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full || pop);
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
