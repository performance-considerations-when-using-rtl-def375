// ray_state_buffer: per-ray storage of every ray the engine holds.
//
// For each of THREADS x 4 rays it keeps the current closest hit (distance,
// triangle ID, barycentric u and v), as the source design's ray state
// buffer does, and in addition the ray itself twice: in world space as
// submitted, and in object space as last produced by a transformation leaf of
// the two-level hierarchy. Keeping the rays here instead of in the pipeline
// tokens is this design's choice.
//
// Writers (clock edge): alloc (IO unit, new packet: world rays, hit distance
// = tmax, triangle = none), obj (geometry unit, transformed ray of one lane)
// and hit (geometry unit, new closest hit of one lane). A hit and an alloc
// never address the same thread in the same cycle.
// Readers (combinational): rays of a thread for traversal (level selects
// world or object space), hit distances of a thread for traversal, one ray
// and one hit for the geometry unit, and all hits of a thread for the result.
module ray_state_buffer
  import rte_pkg::*;
#(
  parameter int unsigned THREADS = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // allocation of a thread to a new packet
  input  logic                          alloc_en,
  input  logic [$clog2(THREADS)-1:0]    alloc_tid,
  input  ray_t [RAYS-1:0]               alloc_rays,
  input  fx_t  [RAYS-1:0]               alloc_tmax,
  // object-space ray from the geometry unit
  input  logic                          obj_en,
  input  logic [$clog2(THREADS)-1:0]    obj_tid,
  input  logic [$clog2(RAYS)-1:0]       obj_lane,
  input  ray_t                          obj_ray,
  // new closest hit from the geometry unit
  input  logic                          hit_en,
  input  logic [$clog2(THREADS)-1:0]    hit_tid,
  input  logic [$clog2(RAYS)-1:0]       hit_lane,
  input  hit_t                          hit_data,
  // traversal reads
  input  logic [$clog2(THREADS)-1:0]    tr_tid,
  input  logic                          tr_level,
  output ray_t [RAYS-1:0]               tr_rays,
  input  logic [$clog2(THREADS)-1:0]    th_tid,
  output hit_t [RAYS-1:0]               th_hits,
  // geometry reads
  input  logic [$clog2(THREADS)-1:0]    gr_tid,
  input  logic [$clog2(RAYS)-1:0]       gr_lane,
  input  logic                          gr_level,
  output ray_t                          gr_ray,
  input  logic [$clog2(THREADS)-1:0]    gh_tid,
  input  logic [$clog2(RAYS)-1:0]       gh_lane,
  output hit_t                          gh_hit,
  // result read
  input  logic [$clog2(THREADS)-1:0]    rs_tid,
  output hit_t [RAYS-1:0]               rs_hits
);
  localparam int unsigned LANE_W = $clog2(RAYS);

  ray_t world_mem [THREADS*RAYS];
  ray_t obj_mem   [THREADS*RAYS];
  hit_t hit_mem   [THREADS*RAYS];

  always_ff @(posedge clk) begin
    if (alloc_en) begin
      for (int r = 0; r < RAYS; r++) begin
        world_mem[{alloc_tid, LANE_W'(r)}] <= alloc_rays[r];
        hit_mem[{alloc_tid, LANE_W'(r)}]   <= '{t: alloc_tmax[r], tri_id: TRI_NONE, u: '0, v: '0};
      end
    end
    if (obj_en) obj_mem[{obj_tid, obj_lane}] <= obj_ray;
    if (hit_en) hit_mem[{hit_tid, hit_lane}] <= hit_data;
  end

  always_comb begin
    for (int r = 0; r < RAYS; r++) begin
      tr_rays[r] = tr_level ? obj_mem[{tr_tid, LANE_W'(r)}] : world_mem[{tr_tid, LANE_W'(r)}];
      th_hits[r] = hit_mem[{th_tid, LANE_W'(r)}];
      rs_hits[r] = hit_mem[{rs_tid, LANE_W'(r)}];
    end
  end
  assign gr_ray = gr_level ? obj_mem[{gr_tid, gr_lane}] : world_mem[{gr_tid, gr_lane}];
  assign gh_hit = hit_mem[{gh_tid, gh_lane}];

  assert property (@(posedge clk) disable iff (!rst_n)
                   alloc_en && hit_en |-> alloc_tid != hit_tid);
endmodule
