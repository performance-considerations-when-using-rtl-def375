// ro_cache_checker: stimulus and reference for one ro_cache configuration.
//
// Used by tb_ro_cache (node and vertex cache) and tb_l2_cache. It
// instantiates the cache with the given parameters in front of a memory
// stand-in that answers one line request after MEM_LAT cycles (its ready is
// randomly withheld), and issues N_OPS random reads whose addresses crowd a
// few sets with twice as many lines as there are ways, so that lines are
// evicted and fetched again. A reference model of the tags (same round-robin
// victim choice) predicts hit or miss for every access. Checked: returned
// data (line content is a function of its address), hit/miss as predicted and
// the hits/misses counters, hit latency exactly HIT_LATENCY cycles from
// acceptance to resp_valid, a memory request for every miss and none for a
// hit, the response held while resp_ready is low, and, for HIT_LATENCY = 1,
// that a new request is accepted in the cycle a response is taken.
// Reports its check and failure counts and raises done.
module ro_cache_checker
  import rte_pkg::*;
#(
  parameter int unsigned SIZE_BYTES  = 32768,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned WORD_W      = 256,
  parameter int unsigned HIT_LATENCY = 1,
  parameter int unsigned MEM_LAT     = 12,
  parameter int unsigned N_OPS       = 4000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned SETS = SIZE_BYTES / (64 * WAYS);

  logic              req_valid, req_ready, resp_valid, resp_ready;
  addr_t             req_addr;
  logic [WORD_W-1:0] resp_data;
  logic              mem_req_valid, mem_req_ready, mem_resp_valid;
  addr_t             mem_req_addr;
  logic [511:0]      mem_resp_data;
  logic [31:0]       hits, misses;

  ro_cache #(.SIZE_BYTES(SIZE_BYTES), .WAYS(WAYS), .LINE_W(512), .WORD_W(WORD_W),
             .HIT_LATENCY(HIT_LATENCY)) dut (.*);

  function automatic logic [511:0] line_of(input addr_t line_addr);
    logic [511:0] l;
    for (int k = 0; k < 16; k++) l[32*k +: 32] = (line_addr >> 6) * 32'h9E37_79B1 + 32'(k * 7);
    return l;
  endfunction

  function automatic logic [WORD_W-1:0] word_at(input addr_t a);
    logic [511:0] l;
    l = line_of({a[31:6], 6'b0});
    return l[(a[5:0] / (WORD_W / 8)) * WORD_W +: WORD_W];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL [%m]: %s", what);
    end
  endtask

  // memory stand-in
  logic  m_busy;
  int    m_cnt;
  addr_t m_addr;
  logic  m_rnd;
  int    mem_reqs;
  assign mem_req_ready = !m_busy && m_rnd;
  always @(posedge clk) begin
    if (!rst_n) begin
      m_busy <= 0; m_cnt <= 0; m_addr <= 0; m_rnd <= 1; mem_resp_valid <= 0; mem_resp_data <= '0;
      mem_reqs <= 0;
    end else begin
      m_rnd          <= ($urandom % 3) != 0;
      mem_resp_valid <= 1'b0;
      if (mem_req_valid && mem_req_ready) begin
        m_busy   <= 1'b1;
        m_cnt    <= MEM_LAT;
        m_addr   <= mem_req_addr;
        mem_reqs <= mem_reqs + 1;
      end else if (m_busy) begin
        if (m_cnt <= 1) begin
          m_busy         <= 1'b0;
          mem_resp_valid <= 1'b1;
          mem_resp_data  <= line_of(m_addr);
        end else m_cnt <= m_cnt - 1;
      end
    end
  end

  // reference tags
  logic [31:0] m_tag [SETS][WAYS];
  bit          m_vld [SETS][WAYS];
  int          m_rr  [SETS];

  function automatic bit model_access(input addr_t a);
    int s;
    logic [31:0] t;
    s = int'((a >> 6) % SETS);
    t = a >> 6;
    for (int w = 0; w < WAYS; w++) if (m_vld[s][w] && m_tag[s][w] == t) return 1'b1;
    m_tag[s][m_rr[s]] = t;
    m_vld[s][m_rr[s]] = 1'b1;
    m_rr[s] = (m_rr[s] + 1) % WAYS;
    return 1'b0;
  endfunction

  function automatic addr_t rnd_addr();
    int s, t;
    int sets_used [4];
    sets_used = '{0, 1, 5, SETS - 1};
    s = sets_used[$urandom % 4];
    t = $urandom % (2 * WAYS);
    return addr_t'(((t * SETS + s) * 64) + ($urandom % (64 / (WORD_W / 8))) * (WORD_W / 8));
  endfunction

  typedef struct {
    addr_t addr;
    bit    hit;
    int    cyc;
    int    mem_before;
  } pend_t;

  pend_t pend [$];
  int    cyc, ops, exp_hits, exp_misses, first_valid, back_to_back, held;
  logic  prev_stalled;
  logic [WORD_W-1:0] prev_data;

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0; ops <= 0; exp_hits <= 0; exp_misses <= 0; first_valid <= -1;
      back_to_back <= 0; held <= 0; prev_stalled <= 0; prev_data <= '0;
      req_valid <= 0; req_addr <= '0; resp_ready <= 0; done <= 0;
      checks = 0; failures = 0;
      foreach (m_vld[s, w]) begin m_vld[s][w] = 0; m_tag[s][w] = '0; end
      foreach (m_rr[s]) m_rr[s] = 0;
    end else begin
      cyc <= cyc + 1;
      if (resp_valid && first_valid < 0) first_valid <= cyc;
      if (prev_stalled) begin
        check(resp_valid && resp_data == prev_data, "response dropped or changed while not taken");
        held <= held + 1;
      end
      prev_stalled <= resp_valid && !resp_ready;
      prev_data    <= resp_data;
      if (resp_valid && resp_ready) begin
        pend_t p;
        check(pend.size() > 0, "response without request");
        if (pend.size() > 0) begin
          p = pend.pop_front();
          check(resp_data == word_at(p.addr), $sformatf("data of address %h", p.addr));
          if (p.hit) begin
            check((first_valid < 0 ? cyc : first_valid) - p.cyc == int'(HIT_LATENCY),
                  $sformatf("hit latency %0d, expected %0d",
                            (first_valid < 0 ? cyc : first_valid) - p.cyc, HIT_LATENCY));
            check(mem_reqs == p.mem_before, "memory request on a hit");
          end else begin
            check(mem_reqs == p.mem_before + 1, "no single memory request for a miss");
          end
        end
        first_valid <= -1;
        if (req_valid && req_ready) back_to_back <= back_to_back + 1;
      end
      if (req_valid && req_ready) begin
        pend_t p;
        p.addr = req_addr;
        p.hit  = model_access(req_addr);
        p.cyc  = cyc;
        p.mem_before = mem_reqs;
        pend.push_back(p);
        if (p.hit) exp_hits <= exp_hits + 1;
        else       exp_misses <= exp_misses + 1;
        ops <= ops + 1;
        req_valid <= 1'b0;
      end
      if ((!req_valid || req_ready) && ops + int'(req_valid && req_ready) < int'(N_OPS) && ($urandom % 4 != 0)) begin
        req_valid <= 1'b1;
        req_addr  <= rnd_addr();
      end
      resp_ready <= ($urandom % 4) != 0;
      if (ops == int'(N_OPS) && pend.size() == 0 && !done) begin
        check(hits == 32'(exp_hits) && misses == 32'(exp_misses),
              $sformatf("counters hits %0d misses %0d, expected %0d %0d", hits, misses, exp_hits, exp_misses));
        check(exp_hits > int'(N_OPS) / 10 && exp_misses > int'(N_OPS) / 10, "too few hits or misses");
        check(held > 0, "mechanism never happened: response held");
        if (HIT_LATENCY == 1) check(back_to_back > 0, "mechanism never happened: back-to-back accept");
        $display("[%m] hits %0d misses %0d held %0d back-to-back %0d", exp_hits, exp_misses, held, back_to_back);
        done <= 1'b1;
      end
    end
  end
endmodule
