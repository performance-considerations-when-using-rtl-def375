// ro_cache: blocking, set-associative, read-only cache.
//
// One module serves all three caches of the engine: the 32 kB 4-way node
// cache and vertex cache in front of the traversal and geometry units, and
// the optional 1 MB 4-way L2 with a 100-cycle hit latency behind them.
// Sizes, associativity, read-only use, the L2 latency and its 64-byte fetch
// width follow the source design; the line size of the L1 caches, the
// replacement policy (round robin per set) and the blocking organisation
// (one outstanding miss) are this design's choices.
//
// Client side: req_valid/req_ready with a byte address aligned to WORD_BITS;
// the word comes back on resp_valid/resp_ready, in order, one request at a
// time. A hit answers HIT_LATENCY cycles after the request was accepted and,
// with HIT_LATENCY = 1, a new request can be accepted every cycle. A miss
// sends the line address on mem_req_* and waits for mem_resp_valid with the
// whole LINE_BITS line, which is then installed and the word returned.
// hits/misses count lookups for hit-rate statistics. After reset the cache
// spends one cycle per set (128 for 32 kB, 4096 for the 1 MB L2) clearing
// its valid bits, with req_ready low.
module ro_cache
  import rte_pkg::*;
#(
  parameter int unsigned SIZE_BYTES  = 32768,
  parameter int unsigned WAYS        = 4,
  parameter int unsigned LINE_W      = 512,
  parameter int unsigned WORD_W      = 256,
  parameter int unsigned HIT_LATENCY = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // client
  input  logic              req_valid,
  output logic              req_ready,
  input  addr_t             req_addr,
  output logic              resp_valid,
  input  logic              resp_ready,
  output logic [WORD_W-1:0] resp_data,
  // next level
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output addr_t             mem_req_addr,
  input  logic              mem_resp_valid,
  input  logic [LINE_W-1:0] mem_resp_data,
  // statistics
  output logic [31:0]       hits,
  output logic [31:0]       misses
);
  localparam int unsigned LINE_BYTES = LINE_W / 8;
  localparam int unsigned SETS       = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);
  localparam int unsigned SET_W      = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W      = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W      = 31 - OFF_W - SET_W;
  localparam int unsigned WSEL_W     = (LINE_W / WORD_W > 1) ? $clog2(LINE_W / WORD_W) : 1;
  localparam int unsigned WOFF_W     = $clog2(WORD_W / 8);

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_HITWAIT, S_MISS_REQ, S_MISS_WAIT} state_e;

  // Tag, valid and replacement state are plain memories without reset: after
  // reset the cache walks through its sets once (S_INIT, one set per cycle)
  // and clears them before it accepts the first request.
  logic [LINE_W-1:0] data_mem [SETS*WAYS];
  logic [TAG_W-1:0]  tag_mem  [SETS*WAYS];
  logic [WAYS-1:0]   vld_mem  [SETS];
  logic [WAY_W-1:0]  rr_mem   [SETS];
  logic [SET_W-1:0]  init_set;

  state_e            state;
  addr_t             cur_addr;
  logic [LINE_W-1:0] hold_line;
  logic [31:0]       wait_cnt;

  function automatic logic [SET_W-1:0] set_of(input addr_t a);
    return (SETS > 1) ? SET_W'(a[OFF_W +: SET_W]) : '0;
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input addr_t a);
    return a[30 -: TAG_W];
  endfunction
  function automatic logic [WORD_W-1:0] word_of(input logic [LINE_W-1:0] l, input addr_t a);
    logic [WSEL_W-1:0] sel;
    sel = WSEL_W'(a[OFF_W-1:0] >> WOFF_W);
    return l[sel*WORD_W +: WORD_W];
  endfunction

  // Lookup of the incoming request.
  logic             lk_hit;
  logic [WAY_W-1:0] lk_way;
  always_comb begin
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (vld_mem[set_of(req_addr)][w] &&
          tag_mem[set_of(req_addr)*WAYS + w] == tag_of(req_addr)) begin
        lk_hit = 1'b1;
        lk_way = WAY_W'(w);
      end
    end
  end

  logic req_fire;
  assign req_ready     = (state == S_IDLE) && (!resp_valid || resp_ready);
  assign req_fire      = req_valid && req_ready;
  assign mem_req_valid = (state == S_MISS_REQ);
  assign mem_req_addr  = {1'b0, cur_addr[30:OFF_W], OFF_W'(0)};

  // Line fill: the victim is the set's round-robin way.
  logic [SET_W-1:0] fill_set;
  logic [WAY_W-1:0] fill_way;
  int unsigned      fill_idx;
  assign fill_set = set_of(cur_addr);
  assign fill_way = rr_mem[fill_set];
  assign fill_idx = fill_set * WAYS + fill_way;

  always_ff @(posedge clk) begin
    if (state == S_MISS_WAIT && mem_resp_valid) begin
      data_mem[fill_idx] <= mem_resp_data;
      tag_mem[fill_idx]  <= tag_of(cur_addr);
    end
  end

  // one write per cycle into the valid and round-robin memories
  logic [WAYS-1:0] fill_vld;
  always_comb begin
    fill_vld = vld_mem[fill_set];
    fill_vld[fill_way] = 1'b1;
  end
  always_ff @(posedge clk) begin
    if (state == S_INIT) begin
      vld_mem[init_set] <= '0;
      rr_mem[init_set]  <= '0;
    end else if (state == S_MISS_WAIT && mem_resp_valid) begin
      vld_mem[fill_set] <= fill_vld;
      rr_mem[fill_set]  <= (WAYS > 1) ? WAY_W'((fill_way + 1) % WAYS) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      init_set   <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      cur_addr   <= '0;
      hold_line  <= '0;
      wait_cnt   <= '0;
      hits       <= '0;
      misses     <= '0;
    end else begin
      if (resp_valid && resp_ready) resp_valid <= 1'b0;
      unique case (state)
        S_INIT: begin
          init_set <= init_set + 1'b1;
          if (init_set == SET_W'(SETS - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (req_fire) begin
            cur_addr <= req_addr;
            if (lk_hit) begin
              hits <= hits + 1;
              if (HIT_LATENCY <= 1) begin
                resp_valid <= 1'b1;
                resp_data  <= word_of(data_mem[set_of(req_addr)*WAYS + lk_way], req_addr);
              end else begin
                hold_line <= data_mem[set_of(req_addr)*WAYS + lk_way];
                wait_cnt  <= HIT_LATENCY - 2;
                state     <= S_HITWAIT;
              end
            end else begin
              misses <= misses + 1;
              state  <= S_MISS_REQ;
            end
          end
        end
        S_HITWAIT: begin
          if (wait_cnt == 0) begin
            resp_valid <= 1'b1;
            resp_data  <= word_of(hold_line, cur_addr);
            state      <= S_IDLE;
          end else begin
            wait_cnt <= wait_cnt - 1;
          end
        end
        S_MISS_REQ: begin
          if (mem_req_ready) state <= S_MISS_WAIT;
        end
        S_MISS_WAIT: begin
          if (mem_resp_valid) begin
            resp_valid             <= 1'b1;
            resp_data              <= word_of(mem_resp_data, cur_addr);
            state                  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A response is never overwritten before it was taken.
  assert property (@(posedge clk) disable iff (!rst_n) resp_valid && !resp_ready |=> resp_valid);
endmodule
