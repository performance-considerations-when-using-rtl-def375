// tb_geometry_unit: self-checking test of the geometry unit.
//
// The geometry unit (default parameters: 64 threads, 36-cycle latency,
// 16-stage dividers) is fed leaf items by the testbench, which also plays
// the vertex cache (rows of a scene built by rte_scene_pkg, random request
// readiness and 1..6-cycle answers) and the ray state buffer (world and
// object rays, closest hits, written by the unit's obj/hit ports). Leaves are
// triangle leaves (rays aimed near the triangle, so about half hit, some
// lanes inactive, some with a closer hit already recorded) and
// transformation leaves of the scene's instances, in world space or in
// object space (level bit). For each leaf the expected result is computed
// beforehand with the reference arithmetic of rte_scene_pkg. Checks:
//   * exactly three row fetches per leaf at the leaf's geometry address +0,
//     +16, +32, and no ray enters the datapath before the third row arrived;
//   * each thread occupies the dot-product stage for exactly 8 cycles
//     (2 per ray) and returns exactly 36 cycles after its first ray entered;
//   * hit records (t, triangle ID, u, v) written only for rays that hit
//     closer than their current hit, object-space rays (origin, direction,
//     reciprocal) written for all four rays of a transformation leaf;
//   * the return: pop for triangle leaves; for transformation leaves the
//     subtree root with bit 31 set and the leaf's near/far values.
module tb_geometry_unit;
  import rte_pkg::*;
  import rte_scene_pkg::*;

  localparam int THREADS = 64;
  localparam int GLAT    = 36;
  localparam int N_LEAF  = 600;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        leaf_valid, ret_valid, ret_pop;
  logic [5:0]  leaf_tid, ret_tid, gr_tid, gh_tid, obj_tid, hit_tid;
  leaf_item_t  leaf_item;
  trav_item_t  ret_item;
  logic        vc_req_valid, vc_req_ready, vc_resp_valid, vc_resp_ready;
  addr_t       vc_req_addr;
  logic [ROW_BITS-1:0] vc_resp_data;
  logic [1:0]  gr_lane, gh_lane, obj_lane, hit_lane;
  logic        gr_level, obj_en, hit_en;
  ray_t        gr_ray, obj_ray;
  hit_t        gh_hit, hit_data;
  logic [31:0] cnt_tri_tests, cnt_hits, cnt_xforms;

  geometry_unit #(.THREADS(THREADS), .GEOM_LATENCY(GLAT), .DIV_STAGES(16)) dut (.*);

  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  scene_c scene;
  function automatic logic [127:0] row_at(input addr_t a);
    logic [127:0] r;
    for (int w = 0; w < 4; w++)
      r[32*w +: 32] = scene.words.exists(a + 32'(4*w)) ? scene.words[a + 32'(4*w)] : 32'h0;
    return r;
  endfunction

  // ray state buffer model
  ray_t m_world [THREADS][RAYS];
  ray_t m_obj   [THREADS][RAYS];
  hit_t m_hit   [THREADS][RAYS];
  assign gr_ray = gr_level ? m_obj[gr_tid][gr_lane] : m_world[gr_tid][gr_lane];
  assign gh_hit = m_hit[gh_tid][gh_lane];
  int hit_writes = 0, obj_writes = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (obj_en) begin
        m_obj[obj_tid][obj_lane] = obj_ray;
        obj_writes++;
      end
      if (hit_en) begin
        m_hit[hit_tid][hit_lane] = hit_data;
        hit_writes++;
      end
    end
  end

  // vertex cache model
  logic  vc_busy;
  int    vc_wait;
  addr_t vc_addr;
  logic  vc_rnd;
  int    fetches = 0;
  assign vc_req_ready = !vc_busy && vc_rnd;
  always @(posedge clk) begin
    if (!rst_n) begin
      vc_busy <= 0; vc_wait <= 0; vc_addr <= 0; vc_resp_valid <= 0; vc_resp_data <= '0; vc_rnd <= 1;
    end else begin
      vc_rnd <= ($urandom % 4) != 0;
      if (vc_resp_valid && vc_resp_ready) begin
        vc_resp_valid <= 1'b0;
        vc_busy       <= 1'b0;
      end
      if (vc_req_valid && vc_req_ready) begin
        vc_busy <= 1'b1;
        vc_addr <= vc_req_addr;
        vc_wait <= $urandom % 6;
        fetches++;
      end else if (vc_busy && !vc_resp_valid) begin
        if (vc_wait == 0) begin
          vc_resp_valid <= 1'b1;
          vc_resp_data  <= row_at(vc_addr);
        end else vc_wait <= vc_wait - 1;
      end
    end
  end

  // expectations per thread (one leaf in flight per thread)
  typedef struct {
    leaf_item_t leaf;
    hit_t       hit [RAYS];
    ray_t       obj [RAYS];
    int         issue_cyc;
    int         rows_got;
  } exp_t;
  exp_t exp_q [THREADS][$];
  bit   in_flight [THREADS];
  int   order [$];          // tids in submission order (service order)
  int   cyc = 0, returned = 0, issue_cycles = 0, n_hits_exp = 0, n_xf = 0;

  task automatic make_expect(input int tid, input leaf_item_t lf, output exp_t e);
    logic [127:0] rw [3];
    e.leaf = lf;
    e.issue_cyc = -1;
    e.rows_got = 0;
    for (int k = 0; k < 3; k++) rw[k] = row_at(lf.geom_addr + 32'(16*k));
    for (int r = 0; r < RAYS; r++) begin
      ray_t ry;
      fx_t t, u, v;
      ry = lf.level ? m_obj[tid][r] : m_world[tid][r];
      e.hit[r] = m_hit[tid][r];
      e.obj[r] = m_obj[tid][r];
      if (lf.is_xform) begin
        e.obj[r].org.x = fx_dot4(rw[0], ry.org, 1'b1);
        e.obj[r].org.y = fx_dot4(rw[1], ry.org, 1'b1);
        e.obj[r].org.z = fx_dot4(rw[2], ry.org, 1'b1);
        e.obj[r].dir.x = fx_dot4(rw[0], ry.dir, 1'b0);
        e.obj[r].dir.y = fx_dot4(rw[1], ry.dir, 1'b0);
        e.obj[r].dir.z = fx_dot4(rw[2], ry.dir, 1'b0);
        e.obj[r].inv.x = fx_div(FX_ONE, e.obj[r].dir.x);
        e.obj[r].inv.y = fx_div(FX_ONE, e.obj[r].dir.y);
        e.obj[r].inv.z = fx_div(FX_ONE, e.obj[r].dir.z);
      end else if (lf.tnear[r] <= lf.tfar[r] &&
                   scene_c::tri_test(rw, ry.org, ry.dir, m_hit[tid][r].t, t, u, v)) begin
        e.hit[r] = '{t: t, tri_id: lf.w2, u: u, v: v};
        n_hits_exp++;
      end
    end
  endtask

  // datapath entry observed inside the unit (first ray of a thread)
  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (dut.state == dut.G_ISSUE) begin
        int t;
        issue_cycles++;
        t = int'(dut.cur.tid);
        if (dut.cnt == 0) begin
          check(exp_q[t].size() > 0, "issue without leaf");
          if (exp_q[t].size() > 0) begin
            check(exp_q[t][0].rows_got == 3, $sformatf("thread %0d entered with %0d rows", t, exp_q[t][0].rows_got));
            exp_q[t][0].issue_cyc = cyc;
          end
        end
      end
      if (vc_req_valid && vc_req_ready) begin
        int t;
        t = order[0];
        check(vc_req_addr == exp_q[t][0].leaf.geom_addr + 32'(16 * exp_q[t][0].rows_got),
              $sformatf("row fetch address %h", vc_req_addr));
      end
      if (vc_resp_valid && vc_resp_ready) exp_q[order[0]][0].rows_got++;
      if (dut.state == dut.G_ISSUE && dut.cnt == 7) void'(order.pop_front());
      if (ret_valid) begin
        int t;
        exp_t e;
        t = int'(ret_tid);
        check(exp_q[t].size() > 0, "return without leaf");
        if (exp_q[t].size() > 0) begin
          e = exp_q[t].pop_front();
          check(cyc - e.issue_cyc == GLAT, $sformatf("return %0d cycles after the first ray entered, expected %0d",
                                                     cyc - e.issue_cyc, GLAT));
          check(ret_pop == !e.leaf.is_xform, "return pop flag");
          if (e.leaf.is_xform)
            check(ret_item.addr == {1'b1, e.leaf.w2[30:0]} && ret_item.tnear == e.leaf.tnear &&
                  ret_item.tfar == e.leaf.tfar, "transformation return item");
          for (int r = 0; r < RAYS; r++) begin
            check(m_hit[t][r] == e.hit[r], $sformatf("thread %0d lane %0d hit: t %h tri %0d, expected t %h tri %0d",
                                                      t, r, m_hit[t][r].t, m_hit[t][r].tri_id, e.hit[r].t, e.hit[r].tri_id));
            check(m_obj[t][r] == e.obj[r], $sformatf("thread %0d lane %0d object ray", t, r));
          end
          in_flight[t] = 0;
          returned++;
        end
      end
    end
  end

  initial begin
    int tris [$];
    int insts [$];
    int sent;
    scene = new();
    scene.make(40, 3, 6, 3);
    foreach (scene.world[i]) if (scene.world[i].is_inst) insts.push_back(i); else tris.push_back(i);
    foreach (in_flight[t]) begin
      in_flight[t] = 0;
      for (int r = 0; r < RAYS; r++) begin
        m_world[t][r] = '0; m_obj[t][r] = '0; m_hit[t][r] = '0;
      end
    end
    leaf_valid = 0; leaf_tid = 0; leaf_item = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    sent = 0;
    while (sent < N_LEAF && cyc < 400000) begin
      int t;
      @(negedge clk);
      leaf_valid = 0;
      t = int'($urandom % THREADS);
      if (!in_flight[t] && ($urandom % 3 == 0)) begin
        leaf_item_t lf;
        exp_t e;
        bit xf;
        int pi;
        xf = ($urandom % 4) == 0;
        pi = xf ? insts[$urandom % insts.size()] : tris[$urandom % tris.size()];
        lf.level    = ($urandom % 4) == 0;
        lf.is_xform = xf;
        lf.geom_addr = scene.world[pi].geom;
        lf.w2       = xf ? scene.world[pi].sub_root : 32'(scene.world[pi].id);
        for (int r = 0; r < RAYS; r++) begin
          ray_t ry;
          fx_t  tg [3];
          ry = scene.make_ray(32'($urandom));
          for (int c = 0; c < 3; c++)
            tg[c] = scene.world[pi].lo[c] + fx_t'((64'(scene.world[pi].hi[c] - scene.world[pi].lo[c]) * ($urandom % 1024)) >>> 10);
          ry.dir.x = (tg[0] - ry.org.x) >>> 4;
          ry.dir.y = (tg[1] - ry.org.y) >>> 4;
          ry.dir.z = (tg[2] - ry.org.z) >>> 4;
          ry.inv.x = fx_div(FX_ONE, ry.dir.x);
          ry.inv.y = fx_div(FX_ONE, ry.dir.y);
          ry.inv.z = fx_div(FX_ONE, ry.dir.z);
          if (lf.level) m_obj[t][r] = ry; else m_world[t][r] = ry;
          m_hit[t][r] = '{t: (($urandom % 4) == 0) ? fx_of_q(40) : fx_of_q(400), tri_id: TRI_NONE, u: '0, v: '0};
          lf.tnear[r] = fx_of_q(int'($urandom % 8));
          lf.tfar[r]  = (($urandom % 5) == 0) ? fx_of_q(-1) : fx_of_q(200);
        end
        make_expect(t, lf, e);
        exp_q[t].push_back(e);
        order.push_back(t);
        in_flight[t] = 1;
        if (xf) n_xf++;
        leaf_valid = 1;
        leaf_tid   = 6'(t);
        leaf_item  = lf;
        sent++;
      end
    end
    @(negedge clk);
    leaf_valid = 0;
    while (returned < sent && cyc < 400000) @(posedge clk);
    repeat (50) @(posedge clk);
    check(returned == N_LEAF, $sformatf("%0d of %0d leaves returned", returned, N_LEAF));
    check(fetches == 3 * N_LEAF, $sformatf("%0d row fetches for %0d leaves", fetches, N_LEAF));
    check(issue_cycles == 8 * N_LEAF, $sformatf("%0d datapath cycles for %0d leaves, expected 8 each", issue_cycles, N_LEAF));
    check(cnt_xforms == 32'(n_xf) && cnt_tri_tests == 32'(4 * (N_LEAF - n_xf)), "test / transformation counters");
    check(cnt_hits == 32'(n_hits_exp) && hit_writes == n_hits_exp, "hit counter / hit writes");
    check(obj_writes == 4 * n_xf, "object ray writes");
    $display("leaves %0d (transformations %0d), hits %0d, fetches %0d", N_LEAF, n_xf, n_hits_exp, fetches);
    check(n_hits_exp > 100 && n_xf > 50, "mechanism never happened: hits / transformations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
