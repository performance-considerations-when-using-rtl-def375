// tb_ray_state_buffer: self-checking test of the ray state buffer.
//
// A reference model holds the world rays, object-space rays and closest
// hits of all 64 x 4 rays. The test first allocates every thread and writes
// every object-space ray, so that all entries are defined, then for 20000
// random cycles drives allocations (world rays, hit distance = tmax,
// triangle = none), object-ray writes and hit writes together with random
// read addresses on all six read ports, and checks every read port against
// the model before the clock edge. An allocation and a hit write never name
// the same thread in one cycle, as in the engine. Default parameters.
module tb_ray_state_buffer;
  import rte_pkg::*;

  localparam int THREADS = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            alloc_en, obj_en, hit_en, tr_level, gr_level;
  logic [5:0]      alloc_tid, obj_tid, hit_tid, tr_tid, th_tid, gr_tid, gh_tid, rs_tid;
  logic [1:0]      obj_lane, hit_lane, gr_lane, gh_lane;
  ray_t [RAYS-1:0] alloc_rays, tr_rays;
  fx_t  [RAYS-1:0] alloc_tmax;
  ray_t            obj_ray, gr_ray;
  hit_t            hit_data, gh_hit;
  hit_t [RAYS-1:0] th_hits, rs_hits;

  ray_state_buffer #(.THREADS(THREADS)) dut (.*);

  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  ray_t m_world [THREADS][RAYS];
  ray_t m_obj   [THREADS][RAYS];
  hit_t m_hit   [THREADS][RAYS];

  function automatic ray_t rnd_ray();
    ray_t r;
    r.org = '{x: $urandom, y: $urandom, z: $urandom};
    r.dir = '{x: $urandom, y: $urandom, z: $urandom};
    r.inv = '{x: $urandom, y: $urandom, z: $urandom};
    return r;
  endfunction

  task automatic idle_inputs();
    alloc_en = 0; obj_en = 0; hit_en = 0;
  endtask

  // apply this cycle's writes to the model at the edge
  task automatic edge_update();
    @(posedge clk);
    if (alloc_en)
      for (int r = 0; r < RAYS; r++) begin
        m_world[alloc_tid][r] = alloc_rays[r];
        m_hit[alloc_tid][r]   = '{t: alloc_tmax[r], tri_id: TRI_NONE, u: '0, v: '0};
      end
    if (obj_en) m_obj[obj_tid][obj_lane] = obj_ray;
    if (hit_en) m_hit[hit_tid][hit_lane] = hit_data;
  endtask

  initial begin
    int n_alloc, n_obj, n_hit;
    n_alloc = 0; n_obj = 0; n_hit = 0;
    idle_inputs();
    {alloc_tid, obj_tid, hit_tid, tr_tid, th_tid, gr_tid, gh_tid, rs_tid} = '0;
    {obj_lane, hit_lane, gr_lane, gh_lane, tr_level, gr_level} = '0;
    alloc_rays = '0; alloc_tmax = '0; obj_ray = '0; hit_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // define every entry
    for (int t = 0; t < THREADS; t++) begin
      for (int r = 0; r < RAYS; r++) begin
        @(negedge clk);
        alloc_en = (r == 0);
        alloc_tid = 6'(t);
        for (int k = 0; k < RAYS; k++) begin
          alloc_rays[k] = rnd_ray();
          alloc_tmax[k] = $urandom;
        end
        obj_en = 1; obj_tid = 6'(t); obj_lane = 2'(r); obj_ray = rnd_ray();
        edge_update();
      end
    end

    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      alloc_en  = ($urandom % 8) == 0;
      alloc_tid = 6'($urandom);
      for (int k = 0; k < RAYS; k++) begin
        alloc_rays[k] = rnd_ray();
        alloc_tmax[k] = $urandom;
      end
      obj_en   = ($urandom % 3) == 0;
      obj_tid  = 6'($urandom);
      obj_lane = 2'($urandom);
      obj_ray  = rnd_ray();
      hit_en   = ($urandom % 3) == 0;
      hit_tid  = 6'($urandom);
      if (alloc_en && hit_tid == alloc_tid) hit_tid = hit_tid + 1;
      hit_lane = 2'($urandom);
      hit_data = '{t: $urandom, tri_id: $urandom, u: $urandom, v: $urandom};
      // reads; sometimes aimed at a thread written in this cycle
      tr_tid   = ($urandom % 4 == 0) ? obj_tid : 6'($urandom);
      tr_level = $urandom;
      th_tid   = ($urandom % 4 == 0) ? hit_tid : 6'($urandom);
      gr_tid   = 6'($urandom);
      gr_lane  = 2'($urandom);
      gr_level = $urandom;
      gh_tid   = 6'($urandom);
      gh_lane  = 2'($urandom);
      rs_tid   = ($urandom % 4 == 0) ? alloc_tid : 6'($urandom);
      #1;
      for (int r = 0; r < RAYS; r++) begin
        check(tr_rays[r] == (tr_level ? m_obj[tr_tid][r] : m_world[tr_tid][r]),
              $sformatf("cycle %0d: traversal ray %0d.%0d level %0d", c, tr_tid, r, tr_level));
        check(th_hits[r] == m_hit[th_tid][r], $sformatf("cycle %0d: traversal hit %0d.%0d", c, th_tid, r));
        check(rs_hits[r] == m_hit[rs_tid][r], $sformatf("cycle %0d: result hit %0d.%0d", c, rs_tid, r));
      end
      check(gr_ray == (gr_level ? m_obj[gr_tid][gr_lane] : m_world[gr_tid][gr_lane]),
            $sformatf("cycle %0d: geometry ray %0d.%0d", c, gr_tid, gr_lane));
      check(gh_hit == m_hit[gh_tid][gh_lane], $sformatf("cycle %0d: geometry hit %0d.%0d", c, gh_tid, gh_lane));
      n_alloc += int'(alloc_en);
      n_obj   += int'(obj_en);
      n_hit   += int'(hit_en);
      edge_update();
    end
    $display("allocs %0d obj writes %0d hit writes %0d", n_alloc, n_obj, n_hit);
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
