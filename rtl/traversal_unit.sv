// traversal_unit: multithreaded B-KD tree traversal of four-ray threads.
//
// A thread is a packet of four rays that visits one node at a time. Each
// pipeline stage may hold a different thread, and threads switch every cycle
// at no cost. Per visit the unit
//   A  selects a thread: recirculated from its own output, back from the
//      geometry unit, or newly dispatched by the IO unit, in that priority;
//   B  resolves the node to visit: a thread that asked to pop reads its
//      stack (an empty stack means the rays are finished and the IO unit is
//      told so); every ray's far value is clipped to its current closest
//      hit; a node outside the thread's current treelet sends the thread
//      back to the IO unit (parked); otherwise the node is read from the node
//      cache;
//   C  waits for the node and computes, for the four rays and both
//      children, the distances to the two planes bounding the child along
//      the node's axis;
//   D  clips these to each ray's [near, far] interval and decides: a leaf
//      goes to the geometry unit; otherwise the thread pops (no child hit),
//      continues into the single hit child, or continues into the closer
//      child and pushes the farther one onto its stack;
//   a run of delay stages then brings the loop to TRAV_LATENCY cycles.
// The node cache is the only source of stalls: while a node is missing the
// whole pipeline holds. The thread model, the traversal decisions, the
// stack use and the 14-cycle latency follow the source design; the stage
// split, the fixed-point arithmetic and the "closer child" rule (smallest
// entry distance over the hitting rays) are this design's.
//
// Timing: a thread selected in cycle 0 produces its outcome in cycle
// TRAV_LATENCY-1 and, if it stays in the unit, is selectable again in cycle
// TRAV_LATENCY (with node-cache hits).
module traversal_unit
  import rte_pkg::*;
#(
  parameter int unsigned THREADS       = 64,
  parameter int unsigned TRAV_LATENCY  = 14,
  parameter int unsigned NUM_TREELETS  = 64,
  parameter int unsigned TREELET_SHIFT = 15
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // dispatch from the IO unit
  input  logic                         disp_valid,
  output logic                         disp_ready,
  input  logic [$clog2(THREADS)-1:0]   disp_tid,
  input  trav_item_t                   disp_item,
  // back to the IO unit (always accepted)
  output logic                         park_valid,
  output logic [$clog2(THREADS)-1:0]   park_tid,
  output trav_item_t                   park_item,
  output logic                         fin_valid,
  output logic [$clog2(THREADS)-1:0]   fin_tid,
  // to the geometry unit (always accepted)
  output logic                         leaf_valid,
  output logic [$clog2(THREADS)-1:0]   leaf_tid,
  output leaf_item_t                   leaf_item,
  // from the geometry unit
  input  logic                         gret_valid,
  input  logic [$clog2(THREADS)-1:0]   gret_tid,
  input  logic                         gret_pop,
  input  trav_item_t                   gret_item,
  // node cache
  output logic                         nc_req_valid,
  input  logic                         nc_req_ready,
  output addr_t                        nc_req_addr,
  input  logic                         nc_resp_valid,
  output logic                         nc_resp_ready,
  input  logic [NODE_BITS-1:0]         nc_resp_data,
  // traversal stack
  output logic                         st_pop_en,
  output logic [$clog2(THREADS)-1:0]   st_pop_tid,
  input  trav_item_t                   st_pop_item,
  input  logic                         st_pop_empty,
  output logic                         st_push_en,
  output logic [$clog2(THREADS)-1:0]   st_push_tid,
  output trav_item_t                   st_push_item,
  // ray state buffer
  output logic [$clog2(THREADS)-1:0]   rb_tid,
  output logic                         rb_level,
  input  ray_t [RAYS-1:0]              rb_rays,
  output logic [$clog2(THREADS)-1:0]   rh_tid,
  input  hit_t [RAYS-1:0]              rh_hits,
  // statistics
  output logic [31:0]                  cnt_inner,
  output logic [31:0]                  cnt_leaf,
  output logic [31:0]                  cnt_push,
  output logic [31:0]                  cnt_pop,
  output logic [31:0]                  cnt_park,
  output logic [31:0]                  cnt_stall
);
  localparam int unsigned TID_W  = $clog2(THREADS);
  localparam int unsigned NDELAY = TRAV_LATENCY - 4;
  localparam int unsigned TL_W   = (NUM_TREELETS > 1) ? $clog2(NUM_TREELETS) : 1;

  initial begin
    assert (TRAV_LATENCY >= 5) else $error("TRAV_LATENCY must be at least 5");
  end

  typedef struct packed {
    logic             pop;
    trav_item_t       item;
  } tok_t;

  typedef struct packed {
    logic [TID_W-1:0] tid;
    tok_t             tok;
  } ftok_t;

  typedef enum logic [1:0] {K_POP, K_ONE, K_BOTH, K_LEAF} kind_e;

  // Outcome of one visit, carried through the delay stages.
  typedef struct packed {
    logic             valid;
    logic [TID_W-1:0] tid;
    kind_e            kind;
    trav_item_t       next;   // item to continue with (K_ONE, K_BOTH)
    trav_item_t       farc;   // item to push (K_BOTH)
    leaf_item_t       leaf;   // K_LEAF
  } out_t;

  // ---------------------------------------------------------------- FIFOs
  ftok_t rc_din, rc_dout, gr_din, gr_dout;
  logic  rc_push, rc_pop, rc_empty, gr_pop, gr_empty;
  logic  rc_full, gr_full;
  logic [TID_W:0] rc_cnt, gr_cnt;

  sync_fifo #(.T(ftok_t), .DEPTH(THREADS)) u_recirc (
    .clk, .rst_n, .push(rc_push), .din(rc_din), .pop(rc_pop), .dout(rc_dout),
    .empty(rc_empty), .full(rc_full), .count(rc_cnt));

  assign gr_din = '{tid: gret_tid, tok: '{pop: gret_pop, item: gret_item}};
  sync_fifo #(.T(ftok_t), .DEPTH(THREADS)) u_gret (
    .clk, .rst_n, .push(gret_valid), .din(gr_din), .pop(gr_pop), .dout(gr_dout),
    .empty(gr_empty), .full(gr_full), .count(gr_cnt));

  // ------------------------------------------------------------ registers
  logic       b_valid, c_valid, c_have;
  ftok_t      b_q;
  logic [TID_W-1:0] c_tid;
  trav_item_t c_item;
  logic [NODE_BITS-1:0] c_node;

  logic       d_valid;
  logic [TID_W-1:0] d_tid;
  trav_item_t d_item;
  bkd_node_t  d_node;
  fx_t [1:0][RAYS-1:0] d_ta, d_tb;   // plane distances per child and ray

  out_t       dly [NDELAY];

  logic [TL_W-1:0] cur_treelet [THREADS];

  logic stall;

  // ------------------------------------------------------ stage A: select
  ftok_t a_sel;
  logic  a_valid;
  always_comb begin
    a_valid    = 1'b1;
    rc_pop     = 1'b0;
    gr_pop     = 1'b0;
    disp_ready = 1'b0;
    a_sel      = '0;
    if (!rc_empty) begin
      a_sel  = rc_dout;
      rc_pop = !stall;
    end else if (!gr_empty) begin
      a_sel  = gr_dout;
      gr_pop = !stall;
    end else begin
      a_valid    = disp_valid;
      a_sel      = '{tid: disp_tid, tok: '{pop: 1'b0, item: disp_item}};
      disp_ready = !stall;
    end
  end

  // ----------------------------------------------------- stage B: resolve
  trav_item_t b_item;
  logic       b_fin, b_park, b_fetch;
  assign st_pop_tid = b_q.tid;
  assign rh_tid     = b_q.tid;
  always_comb begin
    b_item = b_q.tok.pop ? st_pop_item : b_q.tok.item;
    for (int r = 0; r < RAYS; r++) b_item.tfar[r] = fx_min(b_item.tfar[r], rh_hits[r].t);
    b_fin   = b_valid && b_q.tok.pop && st_pop_empty;
    b_park  = b_valid && !b_fin &&
              (TL_W'(treelet_of(b_item.addr, TREELET_SHIFT, NUM_TREELETS)) != cur_treelet[b_q.tid]);
    b_fetch = b_valid && !b_fin && !b_park;
  end

  // ---------------------------------------------------- stage C: node wait
  logic c_ok;
  assign nc_resp_ready = c_valid && !c_have;
  assign c_ok          = !c_valid || c_have || nc_resp_valid;
  assign stall         = !c_ok || (b_fetch && !nc_req_ready);

  assign nc_req_valid = b_fetch && !stall;
  assign nc_req_addr  = {1'b0, b_item.addr[30:0]};
  assign st_pop_en    = b_valid && b_q.tok.pop && !st_pop_empty && !stall;
  assign fin_valid    = b_fin && !stall;
  assign fin_tid      = b_q.tid;
  assign park_valid   = b_park && !stall;
  assign park_tid     = b_q.tid;
  assign park_item    = b_item;

  bkd_node_t c_nd;
  assign c_nd     = bkd_node_t'(c_have ? c_node : nc_resp_data);
  assign rb_tid   = c_tid;
  assign rb_level = c_item.addr[31];

  // plane distances
  fx_t [1:0][RAYS-1:0] c_ta, c_tb;
  always_comb begin
    for (int r = 0; r < RAYS; r++) begin
      fx_t o, iv;
      unique case (c_nd.axis)
        2'd0:    begin o = rb_rays[r].org.x; iv = rb_rays[r].inv.x; end
        2'd1:    begin o = rb_rays[r].org.y; iv = rb_rays[r].inv.y; end
        default: begin o = rb_rays[r].org.z; iv = rb_rays[r].inv.z; end
      endcase
      c_ta[0][r] = fx_mul(fx_sub(c_nd.lo0, o), iv);
      c_tb[0][r] = fx_mul(fx_sub(c_nd.hi0, o), iv);
      c_ta[1][r] = fx_mul(fx_sub(c_nd.lo1, o), iv);
      c_tb[1][r] = fx_mul(fx_sub(c_nd.hi1, o), iv);
    end
  end

  // ---------------------------------------------------- stage D: decision
  out_t d_out;
  always_comb begin
    trav_item_t ch [2];
    logic [1:0][RAYS-1:0] h;
    fx_t  m0, m1;
    logic first;
    d_out       = '0;
    d_out.valid = d_valid;
    d_out.tid   = d_tid;
    for (int c = 0; c < 2; c++) begin
      ch[c]      = d_item;
      ch[c].addr = (c == 0) ? d_node.w1 : d_node.w2;
      for (int r = 0; r < RAYS; r++) begin
        fx_t n, f;
        n = fx_max(d_item.tnear[r], fx_min(d_ta[c][r], d_tb[c][r]));
        f = fx_min(d_item.tfar[r],  fx_max(d_ta[c][r], d_tb[c][r]));
        h[c][r] = (d_item.tnear[r] <= d_item.tfar[r]) && (n <= f);
        ch[c].tnear[r] = h[c][r] ? n : FX_MAX;
        ch[c].tfar[r]  = h[c][r] ? f : FX_MIN;
      end
    end
    m0 = FX_MAX;
    m1 = FX_MAX;
    for (int r = 0; r < RAYS; r++) begin
      if (h[0][r]) m0 = fx_min(m0, ch[0].tnear[r]);
      if (h[1][r]) m1 = fx_min(m1, ch[1].tnear[r]);
    end
    first = (m1 < m0);
    if (d_node.is_leaf) begin
      d_out.kind           = K_LEAF;
      d_out.leaf.level     = d_item.addr[31];
      d_out.leaf.is_xform  = d_node.is_xform;
      d_out.leaf.geom_addr = d_node.w1;
      d_out.leaf.w2        = d_node.w2;
      d_out.leaf.tnear     = d_item.tnear;
      d_out.leaf.tfar      = d_item.tfar;
    end else if (|h[0] && |h[1]) begin
      d_out.kind = K_BOTH;
      d_out.next = first ? ch[1] : ch[0];
      d_out.farc = first ? ch[0] : ch[1];
    end else if (|h[0]) begin
      d_out.kind = K_ONE;
      d_out.next = ch[0];
    end else if (|h[1]) begin
      d_out.kind = K_ONE;
      d_out.next = ch[1];
    end else begin
      d_out.kind = K_POP;
    end
  end

  // ------------------------------------------------------------ pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_q     <= '0;
      c_valid <= 1'b0;
      c_have  <= 1'b0;
      c_tid   <= '0;
      c_item  <= '0;
      c_node  <= '0;
      d_valid <= 1'b0;
      d_tid   <= '0;
      d_item  <= '0;
      d_node  <= '0;
      d_ta    <= '0;
      d_tb    <= '0;
      for (int i = 0; i < NDELAY; i++) dly[i] <= '0;
      for (int t = 0; t < THREADS; t++) cur_treelet[t] <= '0;
    end else begin
      if (disp_valid && disp_ready && rc_empty && gr_empty)
        cur_treelet[disp_tid] <= TL_W'(treelet_of(disp_item.addr, TREELET_SHIFT, NUM_TREELETS));
      if (!stall) begin
        b_valid <= a_valid;
        b_q     <= a_sel;
        c_valid <= b_fetch;
        c_have  <= 1'b0;
        c_tid   <= b_q.tid;
        c_item  <= b_item;
        d_valid <= c_valid;
        d_tid   <= c_tid;
        d_item  <= c_item;
        d_node  <= c_nd;
        d_ta    <= c_ta;
        d_tb    <= c_tb;
        dly[0]  <= d_out;
        for (int i = 1; i < NDELAY; i++) dly[i] <= dly[i-1];
      end else if (c_valid && !c_have && nc_resp_valid) begin
        c_have <= 1'b1;
        c_node <= nc_resp_data;
      end
    end
  end

  // -------------------------------------------------------------- output
  out_t o;
  assign o = dly[NDELAY-1];
  assign rc_push      = o.valid && !stall && (o.kind != K_LEAF);
  assign rc_din       = '{tid: o.tid, tok: '{pop: (o.kind == K_POP), item: o.next}};
  assign st_push_en   = o.valid && !stall && (o.kind == K_BOTH);
  assign st_push_tid  = o.tid;
  assign st_push_item = o.farc;
  assign leaf_valid   = o.valid && !stall && (o.kind == K_LEAF);
  assign leaf_tid     = o.tid;
  assign leaf_item    = o.leaf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_inner <= '0;
      cnt_leaf  <= '0;
      cnt_push  <= '0;
      cnt_pop   <= '0;
      cnt_park  <= '0;
      cnt_stall <= '0;
    end else begin
      if (o.valid && !stall && o.kind != K_LEAF) cnt_inner <= cnt_inner + 1;
      if (leaf_valid)  cnt_leaf  <= cnt_leaf + 1;
      if (st_push_en)  cnt_push  <= cnt_push + 1;
      if (st_pop_en)   cnt_pop   <= cnt_pop + 1;
      if (park_valid)  cnt_park  <= cnt_park + 1;
      if (stall)       cnt_stall <= cnt_stall + 1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) gret_valid |-> !gr_full);
  assert property (@(posedge clk) disable iff (!rst_n) rc_push |-> !rc_full);
endmodule
