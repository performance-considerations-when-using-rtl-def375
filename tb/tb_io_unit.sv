// tb_io_unit: self-checking test of the IO unit and its lazy scheduler.
//
// The testbench plays the shaders and the traversal unit around the IO
// unit (default parameters: 64 threads, 64 treelet queues of 32 kB regions,
// root at address 0). It offers 400 random ray packets with random gaps,
// accepts dispatched threads with random readiness, keeps each for 1..40
// cycles and then either parks it at a random treelet (with a random resume
// item) or finishes it, and takes results with random readiness. A model of
// the treelet queues checks:
//   * allocation: a free thread, the packet's rays and tmax, stack cleared;
//   * every dispatch is the head of its treelet queue (FIFO per treelet) and
//     carries the right item (root with [0, tmax] for a new packet, the
//     parked item otherwise);
//   * laziness: the scheduler leaves a treelet only after its queue ran
//     empty; at every queue switch the new queue is a largest one, and
//     queue_size_sum grows by its size;
//   * results come out in finishing order with the packet's tag and the
//     thread's hit records, and each thread is freed only then;
//   * input backpressure when all 64 threads are busy; counters; idle at end.
module tb_io_unit;
  import rte_pkg::*;

  localparam int THREADS = 64;
  localparam int NTL     = 64;
  localparam int N_PKT   = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            in_valid, in_ready, out_valid, out_ready;
  ray_packet_t     in_pkt;
  ray_result_t     out_res;
  logic            disp_valid, disp_ready, park_valid, fin_valid;
  logic [5:0]      disp_tid, park_tid, fin_tid, alloc_tid, rs_tid, clr_tid;
  trav_item_t      disp_item, park_item;
  logic            alloc_en, clr_en, busy;
  ray_t [RAYS-1:0] alloc_rays;
  fx_t  [RAYS-1:0] alloc_tmax;
  hit_t [RAYS-1:0] rs_hits;
  logic [31:0]     queue_switches, queue_size_sum, packets_in, packets_out;

  io_unit #(.THREADS(THREADS), .NUM_TREELETS(NTL), .TREELET_SHIFT(15), .ROOT_ADDR(32'h0)) dut (.*);

  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // hit records the "ray state buffer" holds for a thread
  function automatic hit_t [RAYS-1:0] hits_of(input logic [5:0] tid);
    hit_t [RAYS-1:0] h;
    for (int r = 0; r < RAYS; r++) h[r] = '{t: {tid, 26'(r)}, tri_id: 32'(tid) * 7 + 32'(r), u: 32'(r), v: 32'(tid)};
    return h;
  endfunction
  assign rs_hits = hits_of(rs_tid);

  function automatic int tl_of(input addr_t a);
    return int'(treelet_of(a, 15, NTL));
  endfunction

  ray_packet_t pkts [N_PKT];
  // model
  int          q_tid [NTL][$];
  trav_item_t  tok [THREADS];
  bit          in_use [THREADS];
  logic [31:0] tag_of_tid [THREADS];
  int          parks_of [THREADS];
  int          res_q [$];
  int          fly_tid [$];
  int          fly_cnt [$];
  int          sent = 0, got = 0, dispatches = 0, parks = 0, switches = 0, bp = 0;
  int          last_tl = -1;
  bit          last_tl_emptied = 0;
  int          sizes_before [NTL];
  logic [31:0] prev_switches = 0, prev_sum = 0;

  // traversal-unit side, decided at the negedge
  always @(negedge clk) begin
    park_valid = 0;
    fin_valid  = 0;
    park_tid   = 0;
    fin_tid    = 0;
    park_item  = '0;
    for (int i = 0; i < fly_cnt.size(); i++) if (fly_cnt[i] > 0) fly_cnt[i]--;
    for (int i = 0; i < fly_tid.size(); i++) begin
      if (fly_cnt[i] == 0) begin
        int t;
        t = fly_tid[i];
        if (parks_of[t] < 4 && ($urandom % 10) < 7) begin
          park_valid = 1;
          park_tid   = 6'(t);
          park_item.addr = 32'(($urandom % 6) * 32768 + ($urandom % 1024) * 32);
          for (int r = 0; r < RAYS; r++) begin
            park_item.tnear[r] = $urandom;
            park_item.tfar[r]  = $urandom;
          end
        end else begin
          fin_valid = 1;
          fin_tid   = 6'(t);
        end
        break;
      end
    end
    disp_ready = ($urandom % 5) != 0;
    out_ready  = ($urandom % 3) != 0;
    in_valid   = sent < N_PKT && ($urandom % 3) != 0;
    in_pkt     = pkts[(sent < N_PKT) ? sent : 0];
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // queue switch made at the previous edge
      if (queue_switches != prev_switches) begin
        int mx;
        mx = 0;
        for (int q = 0; q < NTL; q++) if (sizes_before[q] > mx) mx = sizes_before[q];
        check(queue_switches == prev_switches + 1, "more than one switch per cycle");
        check(sizes_before[dut.act] == mx && mx > 0,
              $sformatf("switch to treelet %0d with %0d queued, largest has %0d", dut.act, sizes_before[dut.act], mx));
        check(queue_size_sum == prev_sum + 32'(mx), "queue_size_sum not grown by the queue size");
        switches++;
      end
      prev_switches = queue_switches;
      prev_sum      = queue_size_sum;
      for (int q = 0; q < NTL; q++) sizes_before[q] = q_tid[q].size();

      if (in_valid && !in_ready) bp++;
      // new packet
      if (in_valid && in_ready) begin
        check(alloc_en && clr_en && clr_tid == alloc_tid, "allocation / stack clear not signalled");
        check(!in_use[alloc_tid], $sformatf("thread %0d allocated while in use", alloc_tid));
        check(alloc_rays == in_pkt.ray && alloc_tmax == in_pkt.tmax, "allocated rays differ from the packet");
        in_use[alloc_tid]     = 1;
        tag_of_tid[alloc_tid] = in_pkt.tag;
        parks_of[alloc_tid]   = 0;
        tok[alloc_tid].addr   = '0;
        for (int r = 0; r < RAYS; r++) begin
          tok[alloc_tid].tnear[r] = '0;
          tok[alloc_tid].tfar[r]  = in_pkt.tmax[r];
        end
        q_tid[0].push_back(int'(alloc_tid));
        sent++;
      end else begin
        check(!alloc_en && !clr_en, "allocation without accepted packet");
      end
      // dispatch
      if (disp_valid && disp_ready) begin
        int q;
        q = tl_of(disp_item.addr);
        check(!park_valid, "dispatch in a park cycle");
        check(q_tid[q].size() > 0 && q_tid[q][0] == int'(disp_tid),
              $sformatf("dispatch of thread %0d is not the head of treelet %0d", disp_tid, q));
        check(disp_item == tok[disp_tid], $sformatf("dispatch item of thread %0d", disp_tid));
        if (last_tl >= 0 && q != last_tl)
          check(last_tl_emptied, $sformatf("left treelet %0d before its queue ran empty", last_tl));
        if (q_tid[q].size() > 0) void'(q_tid[q].pop_front());
        last_tl = q;
        last_tl_emptied = (q_tid[q].size() == 0);
        fly_tid.push_back(int'(disp_tid));
        fly_cnt.push_back(1 + $urandom % 40);
        dispatches++;
      end
      // park / finish
      if (park_valid || fin_valid) begin
        int t, idx;
        t = park_valid ? int'(park_tid) : int'(fin_tid);
        idx = -1;
        foreach (fly_tid[i]) if (fly_tid[i] == t) idx = i;
        if (idx >= 0) begin
          fly_tid.delete(idx);
          fly_cnt.delete(idx);
        end
        if (park_valid) begin
          tok[t] = park_item;
          q_tid[tl_of(park_item.addr)].push_back(t);
          parks_of[t]++;
          parks++;
        end else begin
          res_q.push_back(t);
        end
      end
      // results
      if (out_valid && out_ready) begin
        int t;
        check(res_q.size() > 0, "result without finished thread");
        if (res_q.size() > 0) begin
          t = res_q.pop_front();
          check(rs_tid == 6'(t), $sformatf("result of thread %0d, expected %0d", rs_tid, t));
          check(out_res.tag == tag_of_tid[t] && out_res.hit == hits_of(6'(t)),
                $sformatf("result content of thread %0d", t));
          in_use[t] = 0;
          got++;
        end
      end
    end
  end

  initial begin
    for (int p = 0; p < N_PKT; p++) begin
      pkts[p].tag = 32'h1000 + 32'(p);
      for (int r = 0; r < RAYS; r++) begin
        pkts[p].ray[r]  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        pkts[p].tmax[r] = $urandom;
      end
    end
    foreach (in_use[t]) begin
      in_use[t] = 0;
      parks_of[t] = 0;
      tag_of_tid[t] = 0;
      tok[t] = '0;
    end
    foreach (sizes_before[q]) sizes_before[q] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (got < N_PKT && $time < 64'd20_000_000) @(posedge clk);
    repeat (5) @(posedge clk);
    check(got == N_PKT, $sformatf("%0d of %0d results", got, N_PKT));
    check(!busy, "busy with no thread in use");
    check(packets_in == N_PKT && packets_out == N_PKT, "packet counters");
    $display("dispatches %0d parks %0d switches %0d (size sum %0d) backpressure %0d",
             dispatches, parks, switches, queue_size_sum, bp);
    check(parks > 100 && switches > 50, "mechanism never happened: parks / queue switches");
    check(bp > 0, "mechanism never happened: input backpressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
