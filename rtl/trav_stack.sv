// trav_stack: per-thread traversal stack with one pop and one push per cycle.
//
// Every hardware thread owns DEPTH items of 36 bytes (a node address plus
// near/far of its four rays, trav_item_t). The traversal unit pops when it
// submits a thread that has nothing else to visit, and pushes the farther
// child when both children of a node are hit; the read and the write of a
// cycle always belong to different threads, since a thread is in the
// traversal pipeline at most once. The item size, the one-read/one-write
// access and the depth of 32 follow the source design; the storage is one
// array indexed by {thread, level} with a stack pointer per thread.
//
// Timing: pop_item/pop_empty are combinational from pop_tid; push, pop and
// clear take effect at the clock edge. clr resets a thread's stack when the
// thread is given a new ray packet. overflow is sticky and flags a push to a
// full stack (the item is dropped).
module trav_stack
  import rte_pkg::*;
#(
  parameter int unsigned THREADS = 64,
  parameter int unsigned DEPTH   = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       pop_en,
  input  logic [$clog2(THREADS)-1:0] pop_tid,
  output trav_item_t                 pop_item,
  output logic                       pop_empty,
  input  logic                       push_en,
  input  logic [$clog2(THREADS)-1:0] push_tid,
  input  trav_item_t                 push_item,
  input  logic                       clr_en,
  input  logic [$clog2(THREADS)-1:0] clr_tid,
  output logic                       overflow
);
  localparam int unsigned TID_W = $clog2(THREADS);
  localparam int unsigned LVL_W = $clog2(DEPTH);

  trav_item_t       mem [THREADS*DEPTH];
  logic [LVL_W:0]   sp  [THREADS];

  logic [LVL_W:0] sp_pop;
  logic [LVL_W:0] sp_push;
  assign sp_pop    = sp[pop_tid];
  assign sp_push   = sp[push_tid];
  assign pop_empty = (sp_pop == 0);
  assign pop_item  = mem[{pop_tid, LVL_W'(sp_pop - 1'b1)}];

  always_ff @(posedge clk) begin
    if (push_en && sp_push != (LVL_W+1)'(DEPTH))
      mem[{push_tid, LVL_W'(sp_push)}] <= push_item;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < THREADS; t++) sp[t] <= '0;
      overflow <= 1'b0;
    end else begin
      if (pop_en && !pop_empty) sp[pop_tid] <= sp_pop - 1'b1;
      if (push_en) begin
        if (sp_push != (LVL_W+1)'(DEPTH)) sp[push_tid] <= sp_push + 1'b1;
        else                              overflow     <= 1'b1;
      end
      if (clr_en) sp[clr_tid] <= '0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   pop_en && push_en |-> pop_tid != push_tid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   clr_en && push_en |-> clr_tid != push_tid);
endmodule
