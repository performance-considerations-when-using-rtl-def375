// tb_traversal_unit: self-checking test of the traversal unit.
//
// The traversal unit (default parameters: 64 threads, 14-cycle latency, 64
// treelets of 32 kB) runs with a real trav_stack; the testbench plays the
// other blocks around it:
//   * node cache: nodes of a scene built by rte_scene_pkg (world triangles,
//     instanced object-space subtree, treelet-partitioned B-KD tree); one
//     request at a time, answered in the next cycle (hit) or, in the second
//     phase, often after 2..30 cycles (miss);
//   * ray state buffer: world rays, object-space rays and closest hits;
//   * geometry unit: takes each leaf, and after 36..60 cycles tests its
//     triangle for all active rays (same fixed-point test as the reference)
//     or transforms the rays into object space, and hands the thread back;
//   * IO unit: dispatches packets and parked threads, collects finished ones.
// Checks: every finished packet's four closest hits equal a brute-force
// reference over all triangles (so every needed leaf was visited, in both
// hierarchy levels); packets finish exactly once; in phase 1 (one thread at
// a time, no misses) the loop latency is exactly 14 cycles from a node
// request to the thread's next node request, stack pop-to-finish or park,
// and 12 cycles from a node request to the leaf it produces; stalls hold the
// pipeline (no request lost). Pushes, pops, parks, stalls, leaves and
// transformations must all have happened.
module tb_traversal_unit;
  import rte_pkg::*;
  import rte_scene_pkg::*;

  localparam int THREADS = 64;
  localparam int LAT     = 14;
  localparam int N1      = 12;    // phase 1 packets (one at a time)
  localparam int N_PKT   = 212;   // total packets

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            disp_valid, disp_ready, park_valid, fin_valid, leaf_valid;
  logic [5:0]      disp_tid, park_tid, fin_tid, leaf_tid, gret_tid;
  trav_item_t      disp_item, park_item, gret_item;
  leaf_item_t      leaf_item;
  logic            gret_valid, gret_pop;
  logic            nc_req_valid, nc_req_ready, nc_resp_valid, nc_resp_ready;
  addr_t           nc_req_addr;
  logic [NODE_BITS-1:0] nc_resp_data;
  logic            st_pop_en, st_pop_empty, st_push_en;
  logic [5:0]      st_pop_tid, st_push_tid;
  trav_item_t      st_pop_item, st_push_item;
  logic [5:0]      rb_tid, rh_tid;
  logic            rb_level;
  ray_t [RAYS-1:0] rb_rays;
  hit_t [RAYS-1:0] rh_hits;
  logic [31:0]     cnt_inner, cnt_leaf, cnt_push, cnt_pop, cnt_park, cnt_stall;
  logic            clr_en, overflow;
  logic [5:0]      clr_tid;

  traversal_unit #(.THREADS(THREADS), .TRAV_LATENCY(LAT), .NUM_TREELETS(64), .TREELET_SHIFT(15)) dut (.*);

  trav_stack #(.THREADS(THREADS), .DEPTH(32)) u_stack (
    .clk, .rst_n, .pop_en(st_pop_en), .pop_tid(st_pop_tid), .pop_item(st_pop_item),
    .pop_empty(st_pop_empty), .push_en(st_push_en), .push_tid(st_push_tid),
    .push_item(st_push_item), .clr_en, .clr_tid, .overflow);

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

  function automatic logic [31:0] word(input logic [31:0] a);
    return scene.words.exists(a) ? scene.words[a] : 32'h0;
  endfunction

  function automatic logic [NODE_BITS-1:0] node_at(input addr_t a);
    logic [NODE_BITS-1:0] n;
    for (int w = 0; w < 8; w++) n[32*w +: 32] = word({1'b0, a[30:0]} + 32'(4*w));
    return n;
  endfunction

  function automatic logic [127:0] row_at(input addr_t a);
    logic [127:0] r;
    for (int w = 0; w < 4; w++) r[32*w +: 32] = word({1'b0, a[30:0]} + 32'(4*w));
    return r;
  endfunction

  // ray state
  ray_t m_world [THREADS][RAYS];
  ray_t m_obj   [THREADS][RAYS];
  hit_t m_hit   [THREADS][RAYS];
  always_comb begin
    for (int r = 0; r < RAYS; r++) begin
      rb_rays[r] = rb_level ? m_obj[rb_tid][r] : m_world[rb_tid][r];
      rh_hits[r] = m_hit[rh_tid][r];
    end
  end

  // packets
  ray_t pk_ray  [N_PKT][RAYS];
  fx_t  pk_tmax [N_PKT][RAYS];
  hit_t pk_ref  [N_PKT][RAYS];
  bit   pk_tie  [N_PKT][RAYS];
  int   pk_of_tid [THREADS];
  bit   busy_tid  [THREADS];
  int   done_cnt [N_PKT];

  // --- node cache model
  logic  nc_busy;
  int    nc_wait;
  addr_t nc_addr;
  bit    miss_mode = 0;
  assign nc_req_ready = !nc_busy;
  always @(posedge clk) begin
    if (!rst_n) begin
      nc_busy <= 0; nc_wait <= 0; nc_addr <= 0; nc_resp_valid <= 0; nc_resp_data <= '0;
    end else begin
      if (nc_resp_valid && nc_resp_ready) begin
        nc_resp_valid <= 1'b0;
        nc_busy       <= 1'b0;
      end
      if (nc_req_valid && nc_req_ready) begin
        nc_busy <= 1'b1;
        nc_addr <= nc_req_addr;
        if (miss_mode && ($urandom % 3 == 0)) begin
          nc_wait <= 1 + $urandom % 29;
        end else begin
          nc_wait       <= 0;
          nc_resp_valid <= 1'b1;
          nc_resp_data  <= node_at(nc_req_addr);
        end
      end else if (nc_busy && !nc_resp_valid) begin
        if (nc_wait <= 1) begin
          nc_resp_valid <= 1'b1;
          nc_resp_data  <= node_at(nc_addr);
        end else nc_wait <= nc_wait - 1;
      end
    end
  end

  // --- geometry unit model
  typedef struct {
    int         tid;
    leaf_item_t leaf;
    int         due;
  } gjob_t;
  gjob_t gq [$];
  int    cyc = 0;
  int    n_tri = 0, n_xf = 0;

  task automatic do_leaf(input gjob_t j, output trav_item_t it, output logic pop);
    logic [127:0] rw [3];
    for (int k = 0; k < 3; k++) rw[k] = row_at(j.leaf.geom_addr + 32'(16*k));
    it = '{addr: {1'b1, j.leaf.w2[30:0]}, tnear: j.leaf.tnear, tfar: j.leaf.tfar};
    pop = !j.leaf.is_xform;
    for (int r = 0; r < RAYS; r++) begin
      ray_t ry;
      ry = j.leaf.level ? m_obj[j.tid][r] : m_world[j.tid][r];
      if (j.leaf.is_xform) begin
        ray_t o;
        o.org.x = fx_dot4(rw[0], ry.org, 1'b1);
        o.org.y = fx_dot4(rw[1], ry.org, 1'b1);
        o.org.z = fx_dot4(rw[2], ry.org, 1'b1);
        o.dir.x = fx_dot4(rw[0], ry.dir, 1'b0);
        o.dir.y = fx_dot4(rw[1], ry.dir, 1'b0);
        o.dir.z = fx_dot4(rw[2], ry.dir, 1'b0);
        o.inv.x = fx_div(FX_ONE, o.dir.x);
        o.inv.y = fx_div(FX_ONE, o.dir.y);
        o.inv.z = fx_div(FX_ONE, o.dir.z);
        m_obj[j.tid][r] = o;
      end else if (j.leaf.tnear[r] <= j.leaf.tfar[r]) begin
        fx_t t, u, v;
        if (scene_c::tri_test(rw, ry.org, ry.dir, m_hit[j.tid][r].t, t, u, v))
          m_hit[j.tid][r] = '{t: t, tri_id: j.leaf.w2, u: u, v: v};
      end
    end
    if (j.leaf.is_xform) n_xf++;
    else n_tri++;
  endtask

  // --- IO unit model
  int         rdy_tid [$];
  trav_item_t rdy_item [$];
  int         next_pkt = 0, finished = 0, parks = 0;
  int         last_req [THREADS];
  bit         phase1 = 1;
  int         lat_checks = 0;

  always @(negedge clk) begin
    // dispatch offer
    disp_valid = 0;
    disp_tid   = 0;
    disp_item  = '0;
    if (rdy_tid.size() > 0) begin
      disp_valid = 1;
      disp_tid   = 6'(rdy_tid[0]);
      disp_item  = rdy_item[0];
    end
    // geometry return
    gret_valid = 0;
    gret_tid   = 0;
    gret_pop   = 0;
    gret_item  = '0;
    foreach (gq[i]) begin
      if (gq[i].due <= cyc) begin
        trav_item_t it;
        logic pop;
        do_leaf(gq[i], it, pop);
        gret_valid = 1;
        gret_tid   = 6'(gq[i].tid);
        gret_pop   = pop;
        gret_item  = it;
        gq.delete(i);
        break;
      end
    end
  end

  task automatic start_packet(input int p);
    int t;
    t = -1;
    for (int k = 0; k < THREADS; k++) if (!busy_tid[k] && t < 0) t = k;
    busy_tid[t]  = 1;
    pk_of_tid[t] = p;
    for (int r = 0; r < RAYS; r++) begin
      m_world[t][r] = pk_ray[p][r];
      m_hit[t][r]   = '{t: pk_tmax[p][r], tri_id: TRI_NONE, u: '0, v: '0};
    end
    rdy_tid.push_back(t);
    begin
      trav_item_t it;
      it.addr = scene.root;
      for (int r = 0; r < RAYS; r++) begin
        it.tnear[r] = '0;
        it.tfar[r]  = pk_tmax[p][r];
      end
      rdy_item.push_back(it);
    end
    last_req[t] = -1;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (disp_valid && disp_ready) begin
        void'(rdy_tid.pop_front());
        void'(rdy_item.pop_front());
        last_req[disp_tid] = -1;
      end
      if (nc_req_valid && nc_req_ready) begin
        if (phase1 && last_req[rb_tid_b()] >= 0) begin
          check(cyc - last_req[rb_tid_b()] == LAT,
                $sformatf("node request %0d cycles after the previous one, expected %0d",
                          cyc - last_req[rb_tid_b()], LAT));
          lat_checks++;
        end
        last_req[rb_tid_b()] = cyc;
      end
      if (leaf_valid) begin
        gjob_t j;
        if (phase1 && last_req[leaf_tid] >= 0) begin
          check(cyc - last_req[leaf_tid] == LAT - 2,
                $sformatf("leaf %0d cycles after its node request, expected %0d", cyc - last_req[leaf_tid], LAT - 2));
          lat_checks++;
        end
        last_req[leaf_tid] = -1;
        j.tid = int'(leaf_tid);
        j.leaf = leaf_item;
        j.due = cyc + 36 + int'($urandom % 25);
        gq.push_back(j);
      end
      if (park_valid) begin
        if (phase1 && last_req[park_tid] >= 0) begin
          check(cyc - last_req[park_tid] == LAT, "park not 14 cycles after the node request");
          lat_checks++;
        end
        rdy_tid.push_back(int'(park_tid));
        rdy_item.push_back(park_item);
        parks++;
      end
      if (fin_valid) begin
        int p;
        if (phase1 && last_req[fin_tid] >= 0) begin
          check(cyc - last_req[fin_tid] == LAT, "finish not 14 cycles after the last node request");
          lat_checks++;
        end
        p = pk_of_tid[fin_tid];
        done_cnt[p]++;
        check(done_cnt[p] == 1, $sformatf("packet %0d finished twice", p));
        for (int r = 0; r < RAYS; r++) begin
          hit_t g, e;
          g = m_hit[fin_tid][r];
          e = pk_ref[p][r];
          if (pk_tie[p][r]) check(g.t == e.t && g.tri_id != TRI_NONE, $sformatf("pkt %0d ray %0d (tie)", p, r));
          else check(g == e, $sformatf("pkt %0d ray %0d: t %h tri %0d, expected t %h tri %0d",
                                       p, r, g.t, g.tri_id, e.t, e.tri_id));
        end
        busy_tid[fin_tid] = 0;
        finished++;
      end
    end
  end

  // thread of the node request in stage B
  function automatic int rb_tid_b();
    return int'(dut.b_q.tid);
  endfunction

  initial begin
    int hits;
    scene = new();
    scene.make(40, 3, 6, 11);
    hits = 0;
    for (int p = 0; p < N_PKT; p++) begin
      done_cnt[p] = 0;
      for (int r = 0; r < RAYS; r++) begin
        bit tie;
        pk_ray[p][r]  = scene.make_ray(32'(p * 97 + r * 13 + 5));
        pk_tmax[p][r] = ((p + r) % 7 == 0) ? fx_of_q(8) : fx_of_q(128);
        pk_ref[p][r]  = scene.trace(pk_ray[p][r], pk_tmax[p][r], tie);
        pk_tie[p][r]  = tie;
        if (pk_ref[p][r].tri_id != TRI_NONE) hits++;
      end
    end
    foreach (busy_tid[t]) begin
      busy_tid[t] = 0;
      pk_of_tid[t] = 0;
      last_req[t] = -1;
      for (int r = 0; r < RAYS; r++) begin
        m_world[t][r] = '0;
        m_obj[t][r]   = '0;
        m_hit[t][r]   = '0;
      end
    end
    $display("reference: %0d of %0d rays hit", hits, N_PKT * RAYS);
    clr_en = 0;
    clr_tid = 0;
    disp_valid = 0; disp_tid = 0; disp_item = '0;
    gret_valid = 0; gret_tid = 0; gret_pop = 0; gret_item = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // phase 1: one packet at a time, node cache always hits
    for (int p = 0; p < N1; p++) begin
      @(negedge clk);
      start_packet(p);
      while (finished < p + 1 && cyc < 200000) @(posedge clk);
    end
    check(cnt_stall == 0, "stall without node cache miss");
    phase1 = 0;
    miss_mode = 1;
    // phase 2: many threads, misses, stalls
    next_pkt = N1;
    while (finished < N_PKT && cyc < 1000000) begin
      @(negedge clk);
      if (next_pkt < N_PKT && ($urandom % 2 == 0)) begin
        int free_n;
        free_n = 0;
        foreach (busy_tid[t]) if (!busy_tid[t]) free_n++;
        if (free_n > 0) begin
          // clear the stack of the thread that will be used
          int t;
          t = -1;
          for (int k = 0; k < THREADS; k++) if (!busy_tid[k] && t < 0) t = k;
          clr_en = 1;
          clr_tid = 6'(t);
          start_packet(next_pkt);
          next_pkt++;
        end
      end
      @(posedge clk);
      #1 clr_en = 0;
    end
    repeat (100) @(posedge clk);
    check(finished == N_PKT, $sformatf("%0d of %0d packets finished", finished, N_PKT));
    check(!overflow, "stack overflow");
    $display("inner %0d leaf %0d push %0d pop %0d park %0d stall %0d tri %0d xform %0d latency checks %0d",
             cnt_inner, cnt_leaf, cnt_push, cnt_pop, cnt_park, cnt_stall, n_tri, n_xf, lat_checks);
    check(lat_checks > 50, "too few latency checks");
    check(cnt_push > 0 && cnt_pop > 0 && cnt_park > 0 && cnt_stall > 0 && cnt_leaf > 0 && n_xf > 0,
          "mechanism never happened (push/pop/park/stall/leaf/transform)");
    check(cnt_park == 32'(parks), "park counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
