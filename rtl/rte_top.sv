// rte_top: ray traversal engine (RTE).
//
// A dedicated unit that finds, for packets of four rays, the closest
// triangle hit in a two-level B-KD tree, meant to sit next to the shader
// cores of a GPU the way a raster engine does. It contains
//   io_unit          packet intake, per-treelet queues, lazy scheduler,
//                    results
//   traversal_unit   multithreaded tree traversal (64 threads of 4 rays)
//   geometry_unit    triangle tests and ray transformation
//   trav_stack       per-thread traversal stack
//   ray_state_buffer rays and closest hits
//   2 x ro_cache     32 kB 4-way node cache and vertex cache
//   mem_arbiter      shares the line-fill port of the two caches
//   ro_cache (L2)    optional 1 MB 4-way cache with 100-cycle latency
// and connects them as the source design draws them: the traversal unit
// reads nodes through the node cache and its stack; leaves go to the
// geometry unit, which reads geometry through the vertex cache; both report
// threads back to the IO unit through the traversal unit. The main memory
// (shared scene storage) and the shader cores are outside: their ports are
// brought out.
//
// Interfaces: in_* accepts a ray packet (valid/ready), out_* returns the
// tag and four hit records (valid/ready), mem_* is a 64-byte line read port
// with one request outstanding (the response may come any number of cycles
// later). stats counts the events the document's evaluation reports (cache
// hits and misses, queue switches and sizes, packets).
// Parameter defaults are the document's sizes where it gives them; USE_L2
// selects the configuration with the L2 cache, NUM_TREELETS = 1 the one
// without treelets.
module rte_top
  import rte_pkg::*;
#(
  parameter int unsigned THREADS       = 64,
  parameter int unsigned STACK_DEPTH   = 32,
  parameter int unsigned NUM_TREELETS  = 64,
  parameter int unsigned TREELET_SHIFT = 15,
  parameter int unsigned L1_BYTES      = 32768,
  parameter int unsigned L1_WAYS       = 4,
  parameter bit          USE_L2        = 1'b1,
  parameter int unsigned L2_BYTES      = 1048576,
  parameter int unsigned L2_WAYS       = 4,
  parameter int unsigned L2_LATENCY    = 100,
  parameter int unsigned TRAV_LATENCY  = 14,
  parameter int unsigned GEOM_LATENCY  = 36,
  parameter logic [31:0] ROOT_ADDR     = 32'h0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  ray_packet_t          in_pkt,
  output logic                 out_valid,
  input  logic                 out_ready,
  output ray_result_t          out_res,
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output addr_t                mem_req_addr,
  input  logic                 mem_resp_valid,
  input  logic [LINE_BITS-1:0] mem_resp_data,
  output logic                 busy,
  output logic                 stack_overflow,
  output rte_stats_t           stats
);
  localparam int unsigned TID_W = $clog2(THREADS);

  // IO <-> traversal
  logic disp_valid, disp_ready, park_valid, fin_valid;
  logic [TID_W-1:0] disp_tid, park_tid, fin_tid;
  trav_item_t disp_item, park_item;
  // traversal <-> geometry
  logic leaf_valid, gret_valid, gret_pop;
  logic [TID_W-1:0] leaf_tid, gret_tid;
  leaf_item_t leaf_item;
  trav_item_t gret_item;
  // stack
  logic st_pop_en, st_pop_empty, st_push_en, clr_en;
  logic [TID_W-1:0] st_pop_tid, st_push_tid, clr_tid;
  trav_item_t st_pop_item, st_push_item;
  // ray state buffer
  logic alloc_en, obj_en, hit_en, rb_level, gr_level;
  logic [TID_W-1:0] alloc_tid, obj_tid, hit_tid, rb_tid, rh_tid, gr_tid, gh_tid, rs_tid;
  logic [$clog2(RAYS)-1:0] obj_lane, hit_lane, gr_lane, gh_lane;
  ray_t [RAYS-1:0] alloc_rays, rb_rays;
  fx_t  [RAYS-1:0] alloc_tmax;
  ray_t obj_ray, gr_ray;
  hit_t hit_data, gh_hit;
  hit_t [RAYS-1:0] rh_hits, rs_hits;
  // caches
  logic nc_req_valid, nc_req_ready, nc_resp_valid, nc_resp_ready;
  addr_t nc_req_addr;
  logic [NODE_BITS-1:0] nc_resp_data;
  logic vc_req_valid, vc_req_ready, vc_resp_valid, vc_resp_ready;
  addr_t vc_req_addr;
  logic [ROW_BITS-1:0] vc_resp_data;
  logic [1:0] l1m_valid, l1m_ready, l1m_resp;
  addr_t [1:0] l1m_addr;
  logic [LINE_BITS-1:0] l1m_data;
  logic lo_req_valid, lo_req_ready, lo_resp_valid;
  addr_t lo_req_addr;
  logic [LINE_BITS-1:0] lo_resp_data;

  io_unit #(
    .THREADS(THREADS), .NUM_TREELETS(NUM_TREELETS), .TREELET_SHIFT(TREELET_SHIFT),
    .ROOT_ADDR(ROOT_ADDR)
  ) u_io (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_pkt, .out_valid, .out_ready, .out_res,
    .disp_valid, .disp_ready, .disp_tid, .disp_item,
    .park_valid, .park_tid, .park_item, .fin_valid, .fin_tid,
    .alloc_en, .alloc_tid, .alloc_rays, .alloc_tmax, .rs_tid, .rs_hits,
    .clr_en, .clr_tid,
    .busy, .queue_switches(stats.queue_switches), .queue_size_sum(stats.queue_size_sum),
    .packets_in(stats.packets_in), .packets_out(stats.packets_out));

  traversal_unit #(
    .THREADS(THREADS), .TRAV_LATENCY(TRAV_LATENCY), .NUM_TREELETS(NUM_TREELETS),
    .TREELET_SHIFT(TREELET_SHIFT)
  ) u_trav (
    .clk, .rst_n,
    .disp_valid, .disp_ready, .disp_tid, .disp_item,
    .park_valid, .park_tid, .park_item, .fin_valid, .fin_tid,
    .leaf_valid, .leaf_tid, .leaf_item,
    .gret_valid, .gret_tid, .gret_pop, .gret_item,
    .nc_req_valid, .nc_req_ready, .nc_req_addr, .nc_resp_valid, .nc_resp_ready, .nc_resp_data,
    .st_pop_en, .st_pop_tid, .st_pop_item, .st_pop_empty,
    .st_push_en, .st_push_tid, .st_push_item,
    .rb_tid, .rb_level, .rb_rays, .rh_tid, .rh_hits,
    .cnt_inner(stats.inner_visits), .cnt_leaf(stats.leaf_visits), .cnt_push(stats.stack_pushes),
    .cnt_pop(stats.stack_pops), .cnt_park(stats.parks), .cnt_stall(stats.stall_cycles));

  geometry_unit #(
    .THREADS(THREADS), .GEOM_LATENCY(GEOM_LATENCY)
  ) u_geom (
    .clk, .rst_n,
    .leaf_valid, .leaf_tid, .leaf_item,
    .ret_valid(gret_valid), .ret_tid(gret_tid), .ret_pop(gret_pop), .ret_item(gret_item),
    .vc_req_valid, .vc_req_ready, .vc_req_addr, .vc_resp_valid, .vc_resp_ready, .vc_resp_data,
    .gr_tid, .gr_lane, .gr_level, .gr_ray, .gh_tid, .gh_lane, .gh_hit,
    .obj_en, .obj_tid, .obj_lane, .obj_ray, .hit_en, .hit_tid, .hit_lane, .hit_data,
    .cnt_tri_tests(stats.tri_tests), .cnt_hits(stats.tri_hits), .cnt_xforms(stats.xforms));

  trav_stack #(.THREADS(THREADS), .DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n,
    .pop_en(st_pop_en), .pop_tid(st_pop_tid), .pop_item(st_pop_item), .pop_empty(st_pop_empty),
    .push_en(st_push_en), .push_tid(st_push_tid), .push_item(st_push_item),
    .clr_en, .clr_tid, .overflow(stack_overflow));

  ray_state_buffer #(.THREADS(THREADS)) u_rsb (
    .clk, .rst_n,
    .alloc_en, .alloc_tid, .alloc_rays, .alloc_tmax,
    .obj_en, .obj_tid, .obj_lane, .obj_ray,
    .hit_en, .hit_tid, .hit_lane, .hit_data,
    .tr_tid(rb_tid), .tr_level(rb_level), .tr_rays(rb_rays),
    .th_tid(rh_tid), .th_hits(rh_hits),
    .gr_tid, .gr_lane, .gr_level, .gr_ray, .gh_tid, .gh_lane, .gh_hit,
    .rs_tid, .rs_hits);

  ro_cache #(
    .SIZE_BYTES(L1_BYTES), .WAYS(L1_WAYS), .LINE_W(LINE_BITS), .WORD_W(NODE_BITS), .HIT_LATENCY(1)
  ) u_node_cache (
    .clk, .rst_n,
    .req_valid(nc_req_valid), .req_ready(nc_req_ready), .req_addr(nc_req_addr),
    .resp_valid(nc_resp_valid), .resp_ready(nc_resp_ready), .resp_data(nc_resp_data),
    .mem_req_valid(l1m_valid[0]), .mem_req_ready(l1m_ready[0]), .mem_req_addr(l1m_addr[0]),
    .mem_resp_valid(l1m_resp[0]), .mem_resp_data(l1m_data),
    .hits(stats.node_hits), .misses(stats.node_misses));

  ro_cache #(
    .SIZE_BYTES(L1_BYTES), .WAYS(L1_WAYS), .LINE_W(LINE_BITS), .WORD_W(ROW_BITS), .HIT_LATENCY(1)
  ) u_vertex_cache (
    .clk, .rst_n,
    .req_valid(vc_req_valid), .req_ready(vc_req_ready), .req_addr(vc_req_addr),
    .resp_valid(vc_resp_valid), .resp_ready(vc_resp_ready), .resp_data(vc_resp_data),
    .mem_req_valid(l1m_valid[1]), .mem_req_ready(l1m_ready[1]), .mem_req_addr(l1m_addr[1]),
    .mem_resp_valid(l1m_resp[1]), .mem_resp_data(l1m_data),
    .hits(stats.vertex_hits), .misses(stats.vertex_misses));

  mem_arbiter #(.LINE_W(LINE_BITS)) u_arb (
    .clk, .rst_n,
    .req_valid(l1m_valid), .req_ready(l1m_ready), .req_addr(l1m_addr),
    .resp_valid(l1m_resp), .resp_data(l1m_data),
    .mem_req_valid(lo_req_valid), .mem_req_ready(lo_req_ready), .mem_req_addr(lo_req_addr),
    .mem_resp_valid(lo_resp_valid), .mem_resp_data(lo_resp_data));

  if (USE_L2) begin : g_l2
    logic l2_resp_valid;
    ro_cache #(
      .SIZE_BYTES(L2_BYTES), .WAYS(L2_WAYS), .LINE_W(LINE_BITS), .WORD_W(LINE_BITS),
      .HIT_LATENCY(L2_LATENCY)
    ) u_l2 (
      .clk, .rst_n,
      .req_valid(lo_req_valid), .req_ready(lo_req_ready), .req_addr(lo_req_addr),
      .resp_valid(l2_resp_valid), .resp_ready(1'b1), .resp_data(lo_resp_data),
      .mem_req_valid, .mem_req_ready, .mem_req_addr,
      .mem_resp_valid, .mem_resp_data,
      .hits(stats.l2_hits), .misses(stats.l2_misses));
    assign lo_resp_valid = l2_resp_valid;
  end else begin : g_no_l2
    assign mem_req_valid  = lo_req_valid;
    assign lo_req_ready   = mem_req_ready;
    assign mem_req_addr   = lo_req_addr;
    assign lo_resp_valid  = mem_resp_valid;
    assign lo_resp_data   = mem_resp_data;
    assign stats.l2_hits   = '0;
    assign stats.l2_misses = '0;
  end
endmodule
