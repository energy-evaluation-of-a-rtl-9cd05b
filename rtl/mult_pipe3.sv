// mult_pipe3: stallable three-stage pipelined 32 x 32 multiplier.
//
// Stands in the place of the vendor multiplier the pipeline uses; it spans the
// EX, MEM1 and MEM2 stages (Mult1, Mult2, Mult3) and hands its 64-bit product
// to write-back, where it fills HI and LO. All three stages advance only when
// `en` is high, so a memory stall freezes the multiplier together with the
// rest of the pipeline.
//
// Stage 1 sign- or zero-extends both operands to 33 bits and forms two partial
// products, a * b[16:0] and a * b[32:17]. Stage 2 adds them into the 64-bit
// product. Stage 3 is the output register. The result of operands presented
// with `en` high appears on `p` after three more rising edges with `en` high.
// The split into partial products is this design's own.
module mult_pipe3 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        is_signed,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);

  logic signed [32:0] a_x, b_x;
  logic signed [50:0] a_w, b_lo_w, b_hi_w;
  logic signed [50:0] pp_lo_d, pp_hi_d;
  logic signed [50:0] pp_lo_q, pp_hi_q;
  logic        [63:0] sum_d, sum_q;

  assign a_x = {is_signed & a[31], a};
  assign b_x = {is_signed & b[31], b};

  // a (33b signed) * b[16:0] (17b unsigned) and a * b[32:17] (16b signed)
  assign a_w     = {{18{a_x[32]}}, a_x};
  assign b_lo_w  = {34'd0, b_x[16:0]};
  assign b_hi_w  = {{35{b_x[32]}}, b_x[32:17]};
  assign pp_lo_d = a_w * b_lo_w;
  assign pp_hi_d = a_w * b_hi_w;

  assign sum_d = {{13{pp_lo_q[50]}}, pp_lo_q} + ({{13{pp_hi_q[50]}}, pp_hi_q} << 17);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_lo_q <= '0;
      pp_hi_q <= '0;
      sum_q   <= '0;
      p       <= '0;
    end else if (en) begin
      pp_lo_q <= pp_lo_d;
      pp_hi_q <= pp_hi_d;
      sum_q   <= sum_d;
      p       <= sum_q;
    end
  end

endmodule
