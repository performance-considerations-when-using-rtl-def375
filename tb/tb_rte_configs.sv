// tb_rte_configs: end-to-end test of the engine without L2 and without
// treelets.
//
// Same scene, rays, reference and handshake stimulus as the full-size test,
// but the engine is built with USE_L2 = 0 (the L1 line-fill arbiter talks to
// the 600-cycle memory directly) and NUM_TREELETS = 1 (a single queue, so
// threads are never parked). These are the two other configurations the
// engine is meant to be run in. Every returned hit record is compared with
// the brute-force reference. Checked besides: no thread is ever parked, the
// scheduler never switches queues more than once (the first dispatch), the
// L2 counters stay at zero, and the mechanisms that remain (stack use,
// stalls, transformations, L1 hits and misses, back-pressure) all happen.
module tb_rte_configs;
  import rte_pkg::*;
  import rte_scene_pkg::*;

  localparam int N_PKT    = 160;
  localparam int WATCHDOG = 3_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, out_valid, out_ready;
  ray_packet_t in_pkt;
  ray_result_t out_res;
  logic        mem_req_valid, mem_req_ready, mem_resp_valid;
  addr_t       mem_req_addr;
  logic [LINE_BITS-1:0] mem_resp_data;
  logic        busy, stack_overflow;
  rte_stats_t  stats;
  int unsigned mem_reads;

  rte_top #(.USE_L2(0), .NUM_TREELETS(1)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_pkt, .out_valid, .out_ready, .out_res,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_resp_valid, .mem_resp_data,
    .busy, .stack_overflow, .stats);

  main_memory_model #(.LINES(8192), .LATENCY(600)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data),
    .reads(mem_reads));

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  scene_c      scene;
  ray_packet_t pkts [N_PKT];
  hit_t        ref_hit [N_PKT][RAYS];
  bit          ref_tie [N_PKT][RAYS];
  int          seen [N_PKT];

  // mechanism counters seen from outside
  int cyc = 0;
  int backpressure = 0;
  int out_stalls = 0;
  int miss_rays = 0;
  int hit_rays = 0;
  int obj_hits = 0;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && !in_ready) backpressure <= backpressure + 1;
    if (rst_n && out_valid && !out_ready) out_stalls <= out_stalls + 1;
  end

  // Handshakes are sampled at the clock edge, as the engine sees them.
  int sent = 0;
  int got  = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) sent++;
    if (rst_n && out_valid && out_ready) begin
      int tg;
      tg = int'(out_res.tag);
      got++;
      check(tg >= 0 && tg < N_PKT, $sformatf("result tag %0d out of range", tg));
      if (tg >= 0 && tg < N_PKT) begin
        seen[tg]++;
        check(seen[tg] == 1, $sformatf("packet %0d returned %0d times", tg, seen[tg]));
        for (int r = 0; r < RAYS; r++) begin
          hit_t e, g;
          e = ref_hit[tg][r];
          g = out_res.hit[r];
          if (ref_tie[tg][r])
            check(g.t == e.t && g.tri_id != TRI_NONE,
                  $sformatf("pkt %0d ray %0d: t %h tri %0d, expected t %h (tie)", tg, r, g.t, g.tri_id, e.t));
          else
            check(g == e, $sformatf("pkt %0d ray %0d: t %h tri %0d u %h v %h, expected t %h tri %0d u %h v %h",
                                    tg, r, g.t, g.tri_id, g.u, g.v, e.t, e.tri_id, e.u, e.v));
        end
      end
    end
  end

  initial begin
    scene = new();
    scene.make(40, 3, 6, 7);
    $display("scene: %0d world prims, %0d object tris, %0d nodes, root %h, bottom root %h",
             scene.world.size(), scene.object.size(), scene.n_nodes, scene.root, scene.bottom_root);
    for (int l = 0; l < 8192; l++) u_mem.mem[l] = '0;
    foreach (scene.words[a]) u_mem.mem[a >> 6][32*((a >> 2) & 15) +: 32] = scene.words[a];

    for (int p = 0; p < N_PKT; p++) begin
      pkts[p].tag = 32'(p);
      for (int r = 0; r < RAYS; r++) begin
        bit tie;
        pkts[p].ray[r]  = scene.make_ray(32'(p * 64 + r * 8 + 1));
        pkts[p].tmax[r] = ((p + r) % 9 == 0) ? fx_of_q(4) : fx_of_q(128);
        ref_hit[p][r]   = scene.trace(pkts[p].ray[r], pkts[p].tmax[r], tie);
        ref_tie[p][r]   = tie;
        if (ref_hit[p][r].tri_id == TRI_NONE) miss_rays++;
        else hit_rays++;
        if (ref_hit[p][r].tri_id != TRI_NONE && ref_hit[p][r].tri_id >= 1000) obj_hits++;
      end
      seen[p] = 0;
    end
    $display("reference: %0d rays hit (%0d in instances), %0d miss", hit_rays, obj_hits, miss_rays);

    in_valid  = 1'b0;
    in_pkt    = '0;
    out_ready = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    while (got < N_PKT && cyc < WATCHDOG) begin
      @(negedge clk);
      in_valid  = (sent < N_PKT) && ($urandom % 8 != 0);
      in_pkt    = pkts[(sent < N_PKT) ? sent : 0];
      out_ready = ($urandom % 4 != 0);
    end
    in_valid  = 1'b0;
    out_ready = 1'b1;
    repeat (20) @(posedge clk);

    check(cyc < WATCHDOG, "watchdog: not all packets returned");
    check(got == N_PKT, $sformatf("%0d of %0d packets returned", got, N_PKT));
    check(!busy, "engine still busy after the last result");
    check(!out_valid, "extra result offered");
    check(!stack_overflow, "traversal stack overflow");
    check(stats.packets_in == N_PKT && stats.packets_out == N_PKT,
          $sformatf("packet counters in %0d out %0d", stats.packets_in, stats.packets_out));

    $display("cycles %0d, memory reads %0d", cyc, mem_reads);
    $display("node cache   hits %0d misses %0d", stats.node_hits, stats.node_misses);
    $display("vertex cache hits %0d misses %0d", stats.vertex_hits, stats.vertex_misses);
    $display("L2           hits %0d misses %0d", stats.l2_hits, stats.l2_misses);
    $display("inner %0d leaf %0d push %0d pop %0d park %0d stall %0d",
             stats.inner_visits, stats.leaf_visits, stats.stack_pushes, stats.stack_pops,
             stats.parks, stats.stall_cycles);
    $display("tri tests %0d hits %0d xforms %0d queue switches %0d (size sum %0d)",
             stats.tri_tests, stats.tri_hits, stats.xforms, stats.queue_switches, stats.queue_size_sum);
    $display("input backpressure %0d cycles, output stalls %0d cycles", backpressure, out_stalls);

    // every mechanism must have been exercised
    check(stats.stack_pushes > 0,   "mechanism never happened: stack push");
    check(stats.stack_pops > 0,     "mechanism never happened: stack pop");
    check(stats.stall_cycles > 0,   "mechanism never happened: traversal stall");
    check(stats.parks == 0,         "thread parked although treelets are off");
    check(stats.queue_switches <= 1, "queue switch although there is one queue");
    check(stats.xforms > 0,         "mechanism never happened: ray transformation");
    check(stats.tri_hits > 0,       "mechanism never happened: triangle hit");
    check(stats.tri_tests > stats.tri_hits, "mechanism never happened: triangle test miss");
    check(stats.inner_visits > 0 && stats.leaf_visits > 0, "mechanism never happened: inner/leaf visit");
    check(stats.node_hits > 0,      "mechanism never happened: node cache hit");
    check(stats.node_misses > 0,    "mechanism never happened: node cache miss");
    check(stats.vertex_hits > 0,    "mechanism never happened: vertex cache hit");
    check(stats.vertex_misses > 0,  "mechanism never happened: vertex cache miss");
    check(stats.l2_hits == 0 && stats.l2_misses == 0, "L2 counters moved although there is no L2");
    check(backpressure > 0,         "mechanism never happened: input backpressure");
    check(out_stalls > 0,           "mechanism never happened: output stall");
    check(miss_rays > 0,            "mechanism never happened: ray without hit");
    check(obj_hits > 0,             "mechanism never happened: hit inside an instance");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hard watchdog in case the handshake loop itself hangs
  initial begin
    #(64'd10 * WATCHDOG + 64'd100000);
    $display("FAIL: hard watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
