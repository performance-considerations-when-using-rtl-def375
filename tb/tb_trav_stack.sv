// tb_trav_stack: self-checking test of the per-thread traversal stack.
//
// Keeps a reference stack per thread (SystemVerilog queues) and, for 20000
// random cycles, pops one thread, pushes another and sometimes clears a
// third, as the traversal unit and IO unit do (the push and clear threads
// always differ from each other and from the popped one). Before each edge
// it checks pop_empty and pop_item of the popped thread against the
// reference; items are random 288-bit records. It then fills one thread to
// the depth of 32, checks that a further push raises the sticky overflow
// flag without disturbing the top item, and that the stack pops back in
// LIFO order. Default parameters (64 threads, depth 32).
module tb_trav_stack;
  import rte_pkg::*;

  localparam int THREADS = 64;
  localparam int DEPTH   = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       pop_en, push_en, clr_en, pop_empty, overflow;
  logic [5:0] pop_tid, push_tid, clr_tid;
  trav_item_t pop_item, push_item;

  trav_stack #(.THREADS(THREADS), .DEPTH(DEPTH)) dut (.*);

  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  trav_item_t model [THREADS][$];

  function automatic trav_item_t rnd_item();
    trav_item_t it;
    it.addr = $urandom;
    for (int r = 0; r < RAYS; r++) begin
      it.tnear[r] = $urandom;
      it.tfar[r]  = $urandom;
    end
    return it;
  endfunction

  initial begin
    int pushes, pops, clears;
    pushes = 0; pops = 0; clears = 0;
    pop_en = 0; push_en = 0; clr_en = 0;
    pop_tid = 0; push_tid = 0; clr_tid = 0; push_item = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      pop_tid  = 6'($urandom % 8);            // few threads: deep stacks
      push_tid = 6'($urandom % 8);
      if (push_tid == pop_tid) push_tid = push_tid + 1;
      clr_tid  = 6'($urandom % 8);
      pop_en   = ($urandom % 2) == 0;
      push_en  = ($urandom % 16) < 9 && model[push_tid].size() < DEPTH;
      clr_en   = ($urandom % 200) == 0 && clr_tid != push_tid && clr_tid != pop_tid;
      push_item = rnd_item();
      #1;
      check(pop_empty == (model[pop_tid].size() == 0),
            $sformatf("cycle %0d: empty flag of thread %0d", c, pop_tid));
      if (model[pop_tid].size() != 0)
        check(pop_item == model[pop_tid][$], $sformatf("cycle %0d: top item of thread %0d", c, pop_tid));
      @(posedge clk);
      if (pop_en && model[pop_tid].size() != 0) begin
        void'(model[pop_tid].pop_back());
        pops++;
      end
      if (push_en) begin
        model[push_tid].push_back(push_item);
        pushes++;
      end
      if (clr_en) begin
        model[clr_tid].delete();
        clears++;
      end
    end
    @(negedge clk);
    pop_en = 0; push_en = 0; clr_en = 0;
    check(!overflow, "overflow flagged during legal use");

    // overflow: fill thread 40 completely, then one more push
    for (int i = 0; i <= DEPTH; i++) begin
      @(negedge clk);
      push_en = 1; push_tid = 40; push_item = rnd_item();
      if (i < DEPTH) model[40].push_back(push_item);
    end
    @(negedge clk);
    push_en = 0;
    check(overflow, "no overflow after pushing DEPTH+1 items");
    for (int i = 0; i < DEPTH; i++) begin
      pop_en = 1; pop_tid = 40;
      #1;
      check(!pop_empty && pop_item == model[40][$], $sformatf("LIFO order at depth %0d", DEPTH - i));
      void'(model[40].pop_back());
      @(negedge clk);
    end
    #1;
    check(pop_empty, "thread 40 not empty after popping DEPTH items");
    pop_en = 0;
    $display("pushes %0d pops %0d clears %0d", pushes, pops, clears);
    check(pushes > 1000 && pops > 1000 && clears > 0, "too few operations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
