// tb_mem_arbiter: self-checking test of the line-fill arbiter.
//
// Two requesters behave like blocking caches: each raises a request with a
// random line address, holds it until accepted, and then waits for its line
// before it may issue again. A memory stand-in in the testbench accepts one
// request at a time (its ready is randomly withheld) and answers after a
// random 1..20 cycles with a line whose content is a function of the
// address. The test checks that every line goes to the requester that asked
// for it (and only to it) with the right data, that the memory side never
// sees a second request while one is outstanding, and that when both
// requesters wait at the same time the grants alternate (round robin).
module tb_mem_arbiter;
  import rte_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]   req_valid, req_ready, resp_valid;
  addr_t [1:0]  req_addr;
  logic [511:0] resp_data;
  logic         mem_req_valid, mem_req_ready, mem_resp_valid;
  addr_t        mem_req_addr;
  logic [511:0] mem_resp_data;

  mem_arbiter #(.LINE_W(512)) dut (.*);

  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [511:0] line_of(input addr_t a);
    logic [511:0] l;
    for (int k = 0; k < 16; k++) l[32*k +: 32] = a * 32'h0101_0101 + 32'(k);
    return l;
  endfunction

  // memory stand-in
  logic  m_busy = 1'b0;
  int    m_cnt = 0;
  addr_t m_addr = '0;
  logic  m_ready_rnd = 1'b1;
  assign mem_req_ready = !m_busy && m_ready_rnd;
  always @(posedge clk) begin
    m_ready_rnd    <= ($urandom % 4) != 0;
    mem_resp_valid <= 1'b0;
    if (rst_n) begin
      if (mem_req_valid && mem_req_ready) begin
        check(!m_busy, "second request while one is outstanding");
        m_busy <= 1'b1;
        m_cnt  <= 1 + $urandom % 20;
        m_addr <= mem_req_addr;
      end else if (m_busy) begin
        if (m_cnt <= 1) begin
          m_busy         <= 1'b0;
          mem_resp_valid <= 1'b1;
          mem_resp_data  <= line_of(m_addr);
        end else m_cnt <= m_cnt - 1;
      end
    end
  end

  // requesters
  logic [1:0] waiting = '0;
  addr_t      want [2];
  int         served [2];
  int         both_waiting_grants = 0;
  int         last_grant = -1;
  int         stop = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      // grant bookkeeping (values before the edge)
      if (|(req_valid & req_ready)) begin
        int g;
        g = req_ready[0] ? 0 : 1;
        if (req_valid[0] && req_valid[1]) begin
          both_waiting_grants++;
          if (last_grant >= 0)
            check(g != last_grant, "round robin: last granted requester preferred again");
        end
        last_grant = g;
      end
      for (int i = 0; i < 2; i++) begin
        if (resp_valid[i]) begin
          check(waiting[i] && !req_valid[i], $sformatf("requester %0d got a line it did not ask for", i));
          check(resp_data == line_of(want[i]), $sformatf("requester %0d: wrong line data", i));
          served[i]++;
          waiting[i] <= 1'b0;
        end
        if (req_valid[i] && req_ready[i]) begin
          check(mem_req_addr == req_addr[i], $sformatf("requester %0d: address not forwarded", i));
          req_valid[i] <= 1'b0;
          waiting[i]   <= 1'b1;
        end else if (!req_valid[i] && !waiting[i] && !resp_valid[i] && stop == 0 && ($urandom % 3 == 0)) begin
          req_valid[i] <= 1'b1;
          req_addr[i]  <= {1'b0, 25'($urandom), 6'b0};
        end
      end
    end
  end
  // the wanted address is the one requested
  always @(posedge clk) for (int i = 0; i < 2; i++) if (req_valid[i]) want[i] <= req_addr[i];

  initial begin
    req_valid = '0;
    req_addr  = '0;
    served[0] = 0;
    served[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20000) @(posedge clk);
    stop = 1;
    repeat (200) @(posedge clk);
    check(!req_valid[0] && !req_valid[1] && !waiting[0] && !waiting[1], "requests left hanging");
    $display("served %0d / %0d, contended grants %0d", served[0], served[1], both_waiting_grants);
    check(served[0] > 200 && served[1] > 200, "too few lines served");
    check(both_waiting_grants > 50, "mechanism never happened: contention");
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
