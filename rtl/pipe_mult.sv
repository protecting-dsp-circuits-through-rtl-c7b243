// pipe_mult -- three-stage pipelined fixed-point multiplier.
//
// The folded filter shares one multiplier among all its coefficient products. The
// multiplier is pipelined by three stages, as the folded architecture assumes (P_M = 3):
//   stage 1 registers the operands,
//   stage 2 registers the full signed product,
//   stage 3 registers the product shifted right by FRAC_W and cut to DATA_W bits.
// Result p appears exactly 3 cycles after a and b are applied; one new product can
// start every cycle. The number format (two's complement data, coefficients with
// FRAC_W fraction bits, truncation and wrap-around) is this design's own choice.
// clr zeroes all stages synchronously (used when the filter changes mode).
module pipe_mult #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned FRAC_W = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic signed [DATA_W-1:0] a,
  input  logic signed [COEF_W-1:0] b,
  output logic signed [DATA_W-1:0] p
);
  localparam int unsigned PROD_W = DATA_W + COEF_W;

  logic signed [DATA_W-1:0] a_q;
  logic signed [COEF_W-1:0] b_q;
  logic signed [PROD_W-1:0] prod_q;
  logic signed [DATA_W-1:0] prod_sh;  // bits [FRAC_W+DATA_W-1:FRAC_W] of the product

  assign prod_sh = prod_q[FRAC_W +: DATA_W];

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      a_q    <= '0;
      b_q    <= '0;
      prod_q <= '0;
      p      <= '0;
    end else begin
      a_q    <= a;
      b_q    <= b;
      prod_q <= PROD_W'(a_q) * PROD_W'(b_q);
      p      <= prod_sh;
    end
  end
endmodule
