// geometry_unit: ray-triangle intersection and ray transformation.
//
// The unit receives leaf work items from the traversal unit. For each it
// first fetches three 16-byte rows from the vertex cache and holds the thread
// until all three have arrived. Both kinds of leaf are then processed by the
// same datapath, three dot products of a row (m0, m1, m2, m3) with a vector:
//   * transformation leaf: the rows are the top three rows of an affine
//     object-from-world matrix. Each ray's origin (w = 1) and direction
//     (w = 0) are transformed, three dividers form the reciprocal of the new
//     direction, and the object-space ray is written to the ray state
//     buffer. The thread then returns to the traversal unit to continue at
//     the subtree root (address with bit 31 set, selecting object-space rays).
//   * triangle leaf: the rows are the affine map that takes the triangle to
//     the unit triangle (0,0,0), (1,0,0), (0,1,0). With O and D the mapped
//     origin and direction, t = -Oz/Dz, u = Ox + t*Dx, v = Oy + t*Dy; the ray
//     hits if t >= 0, t is below its current closest hit, u >= 0, v >= 0 and
//     u + v <= 1. A hit updates the ray state buffer, and the thread returns
//     to the traversal unit to pop its stack.
// Each ray occupies two consecutive cycles of the dot-product stage (origin,
// then direction), so the four rays of a thread enter in 8 cycles; a
// thread's return item follows GEOM_LATENCY cycles after its first ray
// entered. The sharing of one datapath between both leaf kinds, the three
// fetches, the two cycles per ray, the 8 cycles per thread and the 36-cycle
// latency follow the source design. The unit-triangle form of the triangle
// data, the fixed-point arithmetic and the divider are this design's.
module geometry_unit
  import rte_pkg::*;
#(
  parameter int unsigned THREADS      = 64,
  parameter int unsigned GEOM_LATENCY = 36,
  parameter int unsigned DIV_STAGES   = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // leaf items from the traversal unit (always accepted)
  input  logic                        leaf_valid,
  input  logic [$clog2(THREADS)-1:0]  leaf_tid,
  input  leaf_item_t                  leaf_item,
  // threads back to the traversal unit
  output logic                        ret_valid,
  output logic [$clog2(THREADS)-1:0]  ret_tid,
  output logic                        ret_pop,
  output trav_item_t                  ret_item,
  // vertex cache
  output logic                        vc_req_valid,
  input  logic                        vc_req_ready,
  output addr_t                       vc_req_addr,
  input  logic                        vc_resp_valid,
  output logic                        vc_resp_ready,
  input  logic [ROW_BITS-1:0]         vc_resp_data,
  // ray state buffer
  output logic [$clog2(THREADS)-1:0]  gr_tid,
  output logic [$clog2(RAYS)-1:0]     gr_lane,
  output logic                        gr_level,
  input  ray_t                        gr_ray,
  output logic [$clog2(THREADS)-1:0]  gh_tid,
  output logic [$clog2(RAYS)-1:0]     gh_lane,
  input  hit_t                        gh_hit,
  output logic                        obj_en,
  output logic [$clog2(THREADS)-1:0]  obj_tid,
  output logic [$clog2(RAYS)-1:0]     obj_lane,
  output ray_t                        obj_ray,
  output logic                        hit_en,
  output logic [$clog2(THREADS)-1:0]  hit_tid,
  output logic [$clog2(RAYS)-1:0]     hit_lane,
  output hit_t                        hit_data,
  // statistics
  output logic [31:0]                 cnt_tri_tests,
  output logic [31:0]                 cnt_hits,
  output logic [31:0]                 cnt_xforms
);
  localparam int unsigned TID_W  = $clog2(THREADS);
  localparam int unsigned LANE_W = $clog2(RAYS);
  localparam int unsigned NPAD   = GEOM_LATENCY - 8 - DIV_STAGES;

  initial begin
    assert (GEOM_LATENCY >= DIV_STAGES + 9) else $error("GEOM_LATENCY too small");
  end

  typedef struct packed {
    logic [TID_W-1:0] tid;
    leaf_item_t       leaf;
  } gtok_t;

  typedef struct packed {
    logic              valid;
    logic [TID_W-1:0]  tid;
    logic [LANE_W-1:0] lane;
    logic              xform;
    logic              last;
    logic              active;
    logic [31:0]       tri_id;
    vec3_t             o;
    vec3_t             d;
  } rec_t;

  typedef struct packed {
    logic             valid;
    logic [TID_W-1:0] tid;
  } pad_t;

  typedef enum logic [1:0] {G_IDLE, G_REQ, G_WAIT, G_ISSUE} gstate_e;

  // ------------------------------------------------------------ leaf FIFO
  gtok_t q_din, q_dout;
  logic  q_pop, q_empty, q_full;
  logic [TID_W:0] q_cnt;
  assign q_din = '{tid: leaf_tid, leaf: leaf_item};
  sync_fifo #(.T(gtok_t), .DEPTH(THREADS)) u_leafq (
    .clk, .rst_n, .push(leaf_valid), .din(q_din), .pop(q_pop), .dout(q_dout),
    .empty(q_empty), .full(q_full), .count(q_cnt));

  // ------------------------------------------------------ fetch and issue
  gstate_e              state;
  gtok_t                cur;
  logic [ROW_BITS-1:0]  rows [3];
  logic [1:0]           idx;
  logic [2:0]           cnt;
  vec3_t                o_reg;
  leaf_item_t           ret_info [THREADS];

  assign q_pop         = (state == G_IDLE) && !q_empty;
  assign vc_req_valid  = (state == G_REQ);
  assign vc_req_addr   = {1'b0, cur.leaf.geom_addr[30:0]} + {26'b0, idx, 4'b0};
  assign vc_resp_ready = (state == G_WAIT);

  assign gr_tid   = cur.tid;
  assign gr_lane  = LANE_W'(cnt >> 1);
  assign gr_level = cur.leaf.level;

  // shared dot-product stage: origin in even cycles, direction in odd ones
  logic  phase;
  vec3_t dp;
  assign phase = cnt[0];
  always_comb begin
    vec3_t v;
    v    = phase ? gr_ray.dir : gr_ray.org;
    dp.x = fx_dot4(rows[0], v, !phase);
    dp.y = fx_dot4(rows[1], v, !phase);
    dp.z = fx_dot4(rows[2], v, !phase);
  end

  rec_t issue_rec;
  always_comb begin
    issue_rec        = '0;
    issue_rec.valid  = (state == G_ISSUE) && phase;
    issue_rec.tid    = cur.tid;
    issue_rec.lane   = LANE_W'(cnt >> 1);
    issue_rec.xform  = cur.leaf.is_xform;
    issue_rec.last   = (cnt == 3'd7);
    issue_rec.active = cur.leaf.tnear[cnt >> 1] <= cur.leaf.tfar[cnt >> 1];
    issue_rec.tri_id = cur.leaf.w2;
    issue_rec.o      = o_reg;
    issue_rec.d      = dp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= G_IDLE;
      cur   <= '0;
      idx   <= '0;
      cnt   <= '0;
      o_reg <= '0;
      for (int i = 0; i < 3; i++) rows[i] <= '0;
    end else begin
      unique case (state)
        G_IDLE: if (!q_empty) begin
          cur   <= q_dout;
          idx   <= '0;
          state <= G_REQ;
        end
        G_REQ: if (vc_req_ready) state <= G_WAIT;
        G_WAIT: if (vc_resp_valid) begin
          rows[idx] <= vc_resp_data;
          if (idx == 2'd2) begin
            cnt   <= '0;
            state <= G_ISSUE;
          end else begin
            idx   <= idx + 1'b1;
            state <= G_REQ;
          end
        end
        G_ISSUE: begin
          if (!phase) o_reg <= dp;
          cnt <= cnt + 1'b1;
          if (cnt == 3'd7) state <= G_IDLE;
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == G_ISSUE && cnt == 3'd7) ret_info[cur.tid] <= cur.leaf;
  end

  // --------------------------------------------------------------- divide
  fx_t [2:0] div_num, div_den, div_q;
  logic [2:0] div_in_v, div_out_v;
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      div_num[k]  = issue_rec.xform ? FX_ONE : fx_t'(-issue_rec.o.z);
      div_den[k]  = (k == 0) ? dp.x : (k == 1) ? dp.y : dp.z;
      div_in_v[k] = issue_rec.valid && (issue_rec.xform || k == 2);
    end
  end

  for (genvar k = 0; k < 3; k++) begin : g_div
    logic unused_tag;
    fx_divider #(.STAGES(DIV_STAGES), .TAG_W(1)) u_div (
      .clk, .rst_n, .in_valid(div_in_v[k]), .num(div_num[k]), .den(div_den[k]),
      .in_tag(1'b0), .out_valid(div_out_v[k]), .quo(div_q[k]), .out_tag(unused_tag));
  end

  // records travel beside the dividers
  rec_t side [DIV_STAGES+1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= DIV_STAGES; i++) side[i] <= '0;
    end else begin
      side[0] <= issue_rec;
      for (int i = 1; i <= DIV_STAGES; i++) side[i] <= side[i-1];
    end
  end

  // ------------------------------------------------------------ hit / write
  rec_t e;
  assign e       = side[DIV_STAGES];
  assign gh_tid  = e.tid;
  assign gh_lane = e.lane;

  fx_t  e_t, e_u, e_v;
  logic e_hit;
  always_comb begin
    e_t   = div_q[2];
    e_u   = fx_add(e.o.x, fx_mul(e_t, e.d.x));
    e_v   = fx_add(e.o.y, fx_mul(e_t, e.d.y));
    e_hit = e.valid && !e.xform && e.active && (e.d.z != '0) &&
            (e_t >= 0) && (e_t < gh_hit.t) && (e_u >= 0) && (e_v >= 0) &&
            (fx_add(e_u, e_v) <= FX_ONE);
  end

  assign hit_en   = e_hit;
  assign hit_tid  = e.tid;
  assign hit_lane = e.lane;
  assign hit_data = '{t: e_t, tri_id: e.tri_id, u: e_u, v: e_v};

  assign obj_en   = e.valid && e.xform;
  assign obj_tid  = e.tid;
  assign obj_lane = e.lane;
  assign obj_ray  = '{org: e.o, dir: e.d, inv: '{x: div_q[0], y: div_q[1], z: div_q[2]}};

  // ------------------------------------------------------- return padding
  pad_t pad [NPAD];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPAD; i++) pad[i] <= '0;
    end else begin
      pad[0] <= '{valid: e.valid && e.last, tid: e.tid};
      for (int i = 1; i < NPAD; i++) pad[i] <= pad[i-1];
    end
  end

  leaf_item_t ri;
  assign ri        = ret_info[pad[NPAD-1].tid];
  assign ret_valid = pad[NPAD-1].valid;
  assign ret_tid   = pad[NPAD-1].tid;
  assign ret_pop   = !ri.is_xform;
  assign ret_item  = '{addr: {1'b1, ri.w2[30:0]}, tnear: ri.tnear, tfar: ri.tfar};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_tri_tests <= '0;
      cnt_hits      <= '0;
      cnt_xforms    <= '0;
    end else begin
      if (e.valid && !e.xform) cnt_tri_tests <= cnt_tri_tests + 1;
      if (e_hit)               cnt_hits      <= cnt_hits + 1;
      if (e.valid && e.xform && e.last) cnt_xforms <= cnt_xforms + 1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) leaf_valid |-> !q_full);
  assert property (@(posedge clk) disable iff (!rst_n) e.valid |-> div_out_v[2]);
endmodule
