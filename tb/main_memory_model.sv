// main_memory_model: behavioural model of the external main memory.
//
// Not synthesizable logic of the engine: a simulation stand-in for the DRAM
// behind it. It holds LINES lines of 64 bytes in an array that testbenches
// fill directly (mem[line][32*k +: 32] is the k-th 32-bit word of the line),
// accepts one line read at a time and answers LATENCY cycles after the
// request with the whole line. LATENCY defaults to 600 cycles, the memory
// latency the engine was evaluated with. reads counts accepted requests.
module main_memory_model #(
  parameter int unsigned LINES   = 8192,
  parameter int unsigned LATENCY = 600
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  output logic         req_ready,
  input  logic [31:0]  req_addr,
  output logic         resp_valid,
  output logic [511:0] resp_data,
  output int unsigned  reads
);
  logic [511:0] mem [LINES];

  logic        busy;
  int unsigned cnt;
  logic [31:0] line;

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= 0;
      line       <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      reads      <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        busy  <= 1'b1;
        cnt   <= (LATENCY > 1) ? LATENCY - 1 : 0;
        line  <= (req_addr >> 6) % LINES;
        reads <= reads + 1;
      end else if (busy) begin
        if (cnt <= 1) begin
          busy       <= 1'b0;
          resp_valid <= 1'b1;
          resp_data  <= mem[line];
        end else begin
          cnt <= cnt - 1;
        end
      end
    end
  end
endmodule
