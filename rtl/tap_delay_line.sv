// tap_delay_line -- shift register with every stage brought out as a tap.
//
// Realises the folded delays of the filter: the delay boxes D, 3D and 2D of the
// folded structure are plain registers in a row, and each switch takes the word it
// needs from one tap. taps[0] is the input d itself; taps[k] is d delayed by k cycles.
// clr zeroes every stage synchronously.
module tap_delay_line #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned DEPTH  = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] taps [DEPTH+1]
);
  logic [DATA_W-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int k = 0; k < DEPTH; k++) stage[k] <= '0;
    end else begin
      stage[0] <= d;
      for (int k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
    end
  end

  always_comb begin
    taps[0] = d;
    for (int k = 1; k <= DEPTH; k++) taps[k] = stage[k-1];
  end
endmodule
