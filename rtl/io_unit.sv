// io_unit: ray packet intake, treelet queues, lazy scheduling and results.
//
// The IO unit connects the engine to the shader cores. A ray packet (four
// rays with their maximum distances and a 32-bit tag) is accepted when a
// hardware thread is free: the thread's rays and hit records are
// initialised in the ray state buffer, its stack is cleared and the thread
// is put into the queue of the root treelet, to start at ROOT_ADDR.
//
// Treelets are aligned 2**TREELET_SHIFT-byte regions of the node memory, each
// with its own queue. The queues are linked lists of thread numbers (one
// "next" pointer per thread, head/tail/count per treelet), and each queued
// thread keeps the work item it is to resume with. Threads that the traversal
// unit parks at a treelet boundary are appended to the queue of the treelet
// they want to enter. The lazy scheduler takes the treelet with the largest
// queue, dispatches its threads to the traversal unit whenever it can accept
// one, and only when that queue is empty switches to the then largest one,
// counting the switches and the queue sizes found at each switch. Finished
// threads are queued for output; the result (tag and four hit records) is
// offered to the shaders and the thread is freed when it is taken.
//
// One queue operation per cycle, in the priority park, dispatch, new packet,
// so a park is always accepted. With NUM_TREELETS = 1 this is the plain
// engine without treelets: one queue in arrival order.
// The treelet queues, the lazy scheduler and the packet life cycle follow
// the source design. Its queues live in main memory and hold rays; here they
// hold thread numbers on chip, so at most THREADS packets are in flight.
module io_unit
  import rte_pkg::*;
#(
  parameter int unsigned THREADS       = 64,
  parameter int unsigned NUM_TREELETS  = 64,
  parameter int unsigned TREELET_SHIFT = 15,
  parameter logic [31:0] ROOT_ADDR     = 32'h0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // shaders
  input  logic                         in_valid,
  output logic                         in_ready,
  input  ray_packet_t                  in_pkt,
  output logic                         out_valid,
  input  logic                         out_ready,
  output ray_result_t                  out_res,
  // traversal unit
  output logic                         disp_valid,
  input  logic                         disp_ready,
  output logic [$clog2(THREADS)-1:0]   disp_tid,
  output trav_item_t                   disp_item,
  input  logic                         park_valid,
  input  logic [$clog2(THREADS)-1:0]   park_tid,
  input  trav_item_t                   park_item,
  input  logic                         fin_valid,
  input  logic [$clog2(THREADS)-1:0]   fin_tid,
  // ray state buffer and stack
  output logic                         alloc_en,
  output logic [$clog2(THREADS)-1:0]   alloc_tid,
  output ray_t [RAYS-1:0]              alloc_rays,
  output fx_t  [RAYS-1:0]              alloc_tmax,
  output logic [$clog2(THREADS)-1:0]   rs_tid,
  input  hit_t [RAYS-1:0]              rs_hits,
  output logic                         clr_en,
  output logic [$clog2(THREADS)-1:0]   clr_tid,
  // status and statistics
  output logic                         busy,
  output logic [31:0]                  queue_switches,
  output logic [31:0]                  queue_size_sum,
  output logic [31:0]                  packets_in,
  output logic [31:0]                  packets_out
);
  localparam int unsigned TID_W = $clog2(THREADS);
  localparam int unsigned TL_W  = (NUM_TREELETS > 1) ? $clog2(NUM_TREELETS) : 1;
  localparam logic [TL_W-1:0] ROOT_TL = TL_W'(treelet_of(ROOT_ADDR, TREELET_SHIFT, NUM_TREELETS));

  logic [THREADS-1:0] free_q;
  logic [31:0]        tag_mem [THREADS];
  trav_item_t         tok_mem [THREADS];
  logic [TID_W-1:0]   nxt_mem [THREADS];
  logic [TID_W-1:0]   head    [NUM_TREELETS];
  logic [TID_W-1:0]   tail    [NUM_TREELETS];
  logic [TID_W:0]     qcnt    [NUM_TREELETS];
  logic [TL_W-1:0]    act;
  logic               act_valid;

  // ----------------------------------------------------- free thread pick
  logic             any_free;
  logic [TID_W-1:0] free_tid;
  always_comb begin
    any_free = 1'b0;
    free_tid = '0;
    for (int t = THREADS-1; t >= 0; t--) begin
      if (free_q[t]) begin
        any_free = 1'b1;
        free_tid = TID_W'(t);
      end
    end
  end

  // -------------------------------------------------- largest queue pick
  logic            big_any;
  logic [TL_W-1:0] big_tl;
  logic [TID_W:0]  big_cnt;
  always_comb begin
    big_any = 1'b0;
    big_tl  = '0;
    big_cnt = '0;
    for (int q = 0; q < NUM_TREELETS; q++) begin
      if (qcnt[q] > big_cnt) begin
        big_any = 1'b1;
        big_tl  = TL_W'(q);
        big_cnt = qcnt[q];
      end
    end
  end

  // -------------------------------------------------------- queue access
  logic [TL_W-1:0] park_tl;
  assign park_tl    = TL_W'(treelet_of(park_item.addr, TREELET_SHIFT, NUM_TREELETS));

  logic act_has;
  assign act_has    = act_valid && (qcnt[act] != 0);
  assign disp_valid = !park_valid && act_has;
  assign disp_tid   = head[act];
  assign disp_item  = tok_mem[head[act]];

  logic disp_fire, new_fire;
  assign disp_fire = disp_valid && disp_ready;
  assign in_ready  = !park_valid && !disp_fire && any_free;
  assign new_fire  = in_valid && in_ready;

  assign alloc_en   = new_fire;
  assign alloc_tid  = free_tid;
  assign alloc_rays = in_pkt.ray;
  assign alloc_tmax = in_pkt.tmax;
  assign clr_en     = new_fire;
  assign clr_tid    = free_tid;

  // enqueue request of this cycle
  logic             enq;
  logic [TL_W-1:0]  enq_q;
  logic [TID_W-1:0] enq_tid;
  trav_item_t       enq_item;
  always_comb begin
    enq      = park_valid || new_fire;
    enq_q    = park_valid ? park_tl : ROOT_TL;
    enq_tid  = park_valid ? park_tid : free_tid;
    enq_item = park_item;
    if (!park_valid) begin
      enq_item.addr = ROOT_ADDR;
      for (int r = 0; r < RAYS; r++) begin
        enq_item.tnear[r] = '0;
        enq_item.tfar[r]  = in_pkt.tmax[r];
      end
    end
  end

  // --------------------------------------------------------- result FIFO
  logic [TID_W-1:0] rf_dout;
  logic             rf_empty, rf_full, rf_pop;
  logic [TID_W:0]   rf_cnt;
  sync_fifo #(.T(logic [TID_W-1:0]), .DEPTH(THREADS)) u_resq (
    .clk, .rst_n, .push(fin_valid), .din(fin_tid), .pop(rf_pop), .dout(rf_dout),
    .empty(rf_empty), .full(rf_full), .count(rf_cnt));

  assign rs_tid    = rf_dout;
  assign out_valid = !rf_empty;
  assign out_res   = '{tag: tag_mem[rf_dout], hit: rs_hits};
  assign rf_pop    = out_valid && out_ready;
  assign busy      = !(&free_q);

  // ----------------------------------------------------------- sequencing
  always_ff @(posedge clk) begin
    if (enq) tok_mem[enq_tid] <= enq_item;
    if (enq && qcnt[enq_q] != 0) nxt_mem[tail[enq_q]] <= enq_tid;
    if (new_fire) tag_mem[free_tid] <= in_pkt.tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_q         <= '1;
      act            <= '0;
      act_valid      <= 1'b0;
      queue_switches <= '0;
      queue_size_sum <= '0;
      packets_in     <= '0;
      packets_out    <= '0;
      for (int q = 0; q < NUM_TREELETS; q++) begin
        head[q] <= '0;
        tail[q] <= '0;
        qcnt[q] <= '0;
      end
    end else begin
      if (enq) begin
        if (qcnt[enq_q] == 0) head[enq_q] <= enq_tid;
        tail[enq_q] <= enq_tid;
        qcnt[enq_q] <= qcnt[enq_q] + 1'b1;
      end
      if (disp_fire) begin
        head[act] <= nxt_mem[head[act]];
        qcnt[act] <= qcnt[act] - 1'b1;
      end
      // lazy scheduler: switch only when the active queue has run empty
      if (!act_has && !enq && big_any) begin
        act            <= big_tl;
        act_valid      <= 1'b1;
        queue_switches <= queue_switches + 1;
        queue_size_sum <= queue_size_sum + 32'(big_cnt);
      end
      if (new_fire) begin
        free_q[free_tid] <= 1'b0;
        packets_in       <= packets_in + 1;
      end
      if (rf_pop) begin
        free_q[rf_dout] <= 1'b1;
        packets_out     <= packets_out + 1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) fin_valid |-> !rf_full);
  assert property (@(posedge clk) disable iff (!rst_n) !(enq && disp_fire));
endmodule
