// folded_iir_datapath -- the shared datapath of the obfuscated third-order IIR filter.
//
// One 3-stage multiplier and one 1-stage adder carry out every multiplication and
// addition of the filter, one operation per unit per cycle. Their results wait in two
// delay lines:
//   adder side      : adder register, then D, D, 3D, 2D  -> taps 0, 1, 2, 5, 7
//   multiplier side : multiplier output, then D, D       -> taps 0, 1, 2
// Five switches pick each cycle what the units work on:
//   mul_in : multiplier data  <- null | adder taps 0,1,2,5,7
//   coef   : multiplier coefficient <- m0..m3
//   add_a  : upper adder input <- null | u(n) | multiplier tap 0 | adder tap 1
//   add_b  : lower adder input <- null | multiplier taps 0,1,2 | adder tap 0
//   y      : output register   <- adder register when y_en is set
// The hardware list and the switch inputs follow the published obfuscated structure
// (multiplier 3D, D, extra D; adder +D, D, D, 3D, 2D). The null input on every switch
// makes a unit idle without revealing it in the structure. Which setting is used in
// which cycle comes from the reconfigurator (sw), so this module by itself does not
// say which filter it computes.
//
// Timing: an addition selected in cycle t is in the adder register in cycle t+1; a
// product selected in cycle t is on the multiplier output in cycle t+3. y changes in
// the cycle after y_en. clr flushes every register. sw.u_take only marks the input
// instance for the surrounding logic; the add_a switch already selects u.
module folded_iir_datapath
  import obf_iir_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned FRAC_W = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  sw_ctrl_t                 sw,
  input  logic signed [COEF_W-1:0] coef [NCOEF],
  input  logic signed [DATA_W-1:0] u,
  output logic signed [DATA_W-1:0] y
);
  logic signed [DATA_W-1:0] mul_a, mul_p, add_a, add_b, add_s;
  logic signed [COEF_W-1:0] mul_b;
  logic        [DATA_W-1:0] at [ADD_DEPTH+1];  // adder-side taps
  logic        [DATA_W-1:0] mt [MUL_DEPTH+1];  // multiplier-side taps

  pipe_mult #(.DATA_W(DATA_W), .COEF_W(COEF_W), .FRAC_W(FRAC_W)) u_mult (
    .clk, .rst_n, .clr, .a(mul_a), .b(mul_b), .p(mul_p)
  );

  pipe_adder #(.DATA_W(DATA_W)) u_add (
    .clk, .rst_n, .clr, .a(add_a), .b(add_b), .s(add_s)
  );

  tap_delay_line #(.DATA_W(DATA_W), .DEPTH(ADD_DEPTH)) u_add_dl (
    .clk, .rst_n, .clr, .d(add_s), .taps(at)
  );

  tap_delay_line #(.DATA_W(DATA_W), .DEPTH(MUL_DEPTH)) u_mul_dl (
    .clk, .rst_n, .clr, .d(mul_p), .taps(mt)
  );

  // Switches.
  always_comb begin
    unique case (sw.mul_in)
      MI_A0:   mul_a = at[0];
      MI_A1:   mul_a = at[1];
      MI_A2:   mul_a = at[2];
      MI_A5:   mul_a = at[5];
      MI_A7:   mul_a = at[7];
      default: mul_a = '0;
    endcase

    mul_b = coef[sw.coef];

    unique case (sw.add_a)
      AA_U:    add_a = u;
      AA_M0:   add_a = mt[0];
      AA_A1:   add_a = at[1];
      default: add_a = '0;
    endcase

    unique case (sw.add_b)
      AB_M0:   add_b = mt[0];
      AB_M1:   add_b = mt[1];
      AB_M2:   add_b = mt[2];
      AB_A0:   add_b = at[0];
      default: add_b = '0;
    endcase
  end

  // Output switch.
  always_ff @(posedge clk) begin
    if (!rst_n)        y <= '0;
    else if (sw.y_en)  y <= add_s;
  end
endmodule
