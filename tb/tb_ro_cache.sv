// tb_ro_cache: self-checking test of the L1 cache configurations.
//
// Runs ro_cache_checker (random reads crowding a few sets, reference tag
// model, data, hit/miss, counter, latency and handshake checks; see there)
// on the two L1 caches of the engine: the 32 kB 4-way node cache returning
// 256-bit nodes and the 32 kB 4-way vertex cache returning 128-bit geometry
// rows, both with a one-cycle hit latency and 64-byte lines.
module tb_ro_cache;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   c_node, f_node, c_vert, f_vert;
  logic d_node, d_vert;

  ro_cache_checker #(.SIZE_BYTES(32768), .WAYS(4), .WORD_W(256), .HIT_LATENCY(1),
                     .MEM_LAT(12), .N_OPS(6000)) u_node (
    .clk, .rst_n, .checks(c_node), .failures(f_node), .done(d_node));
  ro_cache_checker #(.SIZE_BYTES(32768), .WAYS(4), .WORD_W(128), .HIT_LATENCY(1),
                     .MEM_LAT(12), .N_OPS(6000)) u_vertex (
    .clk, .rst_n, .checks(c_vert), .failures(f_vert), .done(d_vert));

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!(d_node && d_vert) && cyc < 400000) begin
      @(posedge clk);
      cyc++;
    end
    if (!(d_node && d_vert)) begin
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", c_node + c_vert + 1, f_node + f_vert + 1);
    end else
      $display("TB_RESULT checks=%0d failures=%0d", c_node + c_vert, f_node + f_vert);
    $finish;
  end
endmodule
