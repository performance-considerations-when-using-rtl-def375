// mem_arbiter: shares one line-fill port between the node and vertex caches.
//
// Both L1 caches of the engine fetch 64-byte lines from the level below
// (the L2 cache or main memory). This arbiter forwards one miss at a time,
// alternating priority between the two requesters (round robin), remembers
// who owns the outstanding request and routes the returning line to that
// requester only. The source design shows both caches connected to the
// memory side; how they share it is this design's choice.
//
// Requester side: req_valid/req_ready/req_addr per requester, resp_valid
// pulse with the line. Memory side: the same signals, one request
// outstanding at a time. A granted request reaches the memory side in the
// same cycle.
module mem_arbiter
  import rte_pkg::*;
#(
  parameter int unsigned LINE_W = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        req_valid,
  output logic [1:0]        req_ready,
  input  addr_t [1:0]       req_addr,
  output logic [1:0]        resp_valid,
  output logic [LINE_W-1:0] resp_data,
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output addr_t             mem_req_addr,
  input  logic              mem_resp_valid,
  input  logic [LINE_W-1:0] mem_resp_data
);
  logic busy;      // a request is outstanding
  logic owner;     // requester of the outstanding request
  logic prio;      // requester preferred next
  logic grant;

  always_comb begin
    if (req_valid[prio]) grant = prio;
    else                 grant = ~prio;
  end

  assign mem_req_valid = !busy && (|req_valid);
  assign mem_req_addr  = req_addr[grant];
  always_comb begin
    req_ready        = '0;
    req_ready[grant] = !busy && mem_req_ready;
  end

  assign resp_data = mem_resp_data;
  always_comb begin
    resp_valid        = '0;
    resp_valid[owner] = busy && mem_resp_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= 1'b0;
      prio  <= 1'b0;
    end else begin
      if (mem_req_valid && mem_req_ready) begin
        busy  <= 1'b1;
        owner <= grant;
        prio  <= ~grant;
      end else if (busy && mem_resp_valid) begin
        busy <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) mem_resp_valid |-> busy);
endmodule
