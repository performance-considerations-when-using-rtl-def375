// tb_l2_cache: self-checking test of the L2 cache configuration.
//
// Runs ro_cache_checker (random reads crowding a few sets, reference tag
// model, data, hit/miss, counter, latency and handshake checks; see there)
// on the optional L2: 1 MB, 4-way, whole 64-byte lines returned, and a hit
// latency of exactly 100 cycles from acceptance to response, in front of a
// memory stand-in with the 600-cycle main memory latency.
module tb_l2_cache;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   c_l2, f_l2;
  logic d_l2;

  ro_cache_checker #(.SIZE_BYTES(1048576), .WAYS(4), .WORD_W(512), .HIT_LATENCY(100),
                     .MEM_LAT(600), .N_OPS(800)) u_l2 (
    .clk, .rst_n, .checks(c_l2), .failures(f_l2), .done(d_l2));

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!d_l2 && cyc < 2000000) begin
      @(posedge clk);
      cyc++;
    end
    if (!d_l2) begin
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", c_l2 + 1, f_l2 + 1);
    end else
      $display("TB_RESULT checks=%0d failures=%0d", c_l2, f_l2);
    $finish;
  end
endmodule
