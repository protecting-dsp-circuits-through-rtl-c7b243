// pipe_adder -- two-input adder with one output register (P_A = 1).
//
// The folded filter shares this single adder among all its additions. s is the sum of
// the operands applied one cycle earlier, modulo 2^DATA_W (two's complement wrap-around,
// this design's own choice). clr zeroes the register synchronously.
module pipe_adder #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  output logic [DATA_W-1:0] s
);
  always_ff @(posedge clk) begin
    if (!rst_n || clr) s <= '0;
    else               s <= a + b;
  end
endmodule
