// fx_divider: pipelined Q16.16 divider, q = (num << 16) / den.
//
// Restoring division on magnitudes: the 48-bit shifted dividend is consumed
// MSB first, BITS_PER_STAGE quotient bits per pipeline stage, so the
// latency is STAGES+1 cycles (input register, STAGES-1 inner registers and
// an output register) and a new division can start every cycle. The
// sign is applied at the end and the result saturates to the Q16.16 range;
// a zero divisor gives the saturated value with the sign of the dividend.
// A TAG_W-bit tag travels with each operation. The geometry unit uses three
// of these lanes: one for the hit distance of a triangle test, all three for
// the reciprocal direction of a transformed ray. This divider is this
// design's own construction; the source design does not describe its
// arithmetic units.
module fx_divider
  import rte_pkg::*;
#(
  parameter int unsigned STAGES = 16,
  parameter int unsigned TAG_W  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fx_t              num,
  input  fx_t              den,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output fx_t              quo,
  output logic [TAG_W-1:0] out_tag
);
  localparam int unsigned DW  = 48;
  localparam int unsigned BPS = DW / STAGES;

  initial begin
    assert (DW % STAGES == 0) else $error("STAGES must divide 48");
  end

  typedef struct packed {
    logic             valid;
    logic             neg;
    logic             dz;
    logic [32:0]      rem;
    logic [DW-1:0]    q;      // quotient bits shifted in from the right
    logic [DW-1:0]    n;      // remaining dividend bits, MSB first
    logic [31:0]      d;
    logic [TAG_W-1:0] tag;
  } st_t;

  st_t stage_q [STAGES];
  st_t stage_n [STAGES+1];

  // Stage 0: operands in magnitude form.
  always_comb begin
    logic [31:0] an, ad;
    an = num[31] ? 32'(-num) : 32'(num);
    ad = den[31] ? 32'(-den) : 32'(den);
    stage_n[0]       = '0;
    stage_n[0].valid = in_valid;
    stage_n[0].neg   = num[31] ^ den[31];
    stage_n[0].dz    = (den == '0);
    stage_n[0].n     = {an, 16'b0};
    stage_n[0].d     = ad;
    stage_n[0].tag   = in_tag;
  end

  always_comb begin
    for (int s = 1; s <= STAGES; s++) begin
      st_t x;
      x = stage_q[s-1];
      for (int b = 0; b < BPS; b++) begin
        logic [33:0] trial;
        x.rem = {x.rem[31:0], x.n[DW-1]};
        x.n   = {x.n[DW-2:0], 1'b0};
        trial = {1'b0, x.rem} - {2'b0, x.d};
        if (!trial[33]) begin
          x.rem = trial[32:0];
          x.q   = {x.q[DW-2:0], 1'b1};
        end else begin
          x.q   = {x.q[DW-2:0], 1'b0};
        end
      end
      stage_n[s] = x;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES; s++) stage_q[s] <= '0;
    end else begin
      stage_q[0] <= stage_n[0];
      for (int s = 1; s < STAGES; s++) stage_q[s] <= stage_n[s];
    end
  end

  // Output register after the last stage.
  st_t last_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= '0;
    else        last_q <= stage_n[STAGES];
  end

  always_comb begin
    logic [31:0] mag;
    if (last_q.dz || (last_q.q > DW'(32'h7FFF_FFFF))) mag = 32'h7FFF_FFFF;
    else                                           mag = last_q.q[31:0];
    out_valid = last_q.valid;
    quo       = last_q.neg ? fx_t'(-mag) : fx_t'(mag);
    out_tag   = last_q.tag;
  end

endmodule
