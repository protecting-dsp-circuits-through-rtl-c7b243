// obf_iir_top -- key-protected, obfuscated third-order IIR filter.
//
// One folded datapath (one 3-stage multiplier, one 1-stage adder, delay lines and
// switches with null inputs) can be configured as either of two third-order IIR filters:
//   cfg=0 : H(z)=(1+m2 z^-1+m3 z^-2)/(1-m0 z^-2-m1 z^-3), one sample every 4 cycles
//   cfg=1 : H(z)=(1+m2 z^-1+m3 z^-2)/(1-m1 z^-3),        one sample every 3 cycles
//   cfg=2 : the cfg=1 filter on the 4-cycle schedule, with a null operation each period
// Which of them the structure computes is only visible in the switch settings. The key
// FSM must see the right initialization key after reset; until then the switches play
// the requested schedule with the coefficients rotated, and the output is wrong.
//
// Interface: the design takes u in each cycle where u_take is high (fixed instances of
// the schedule, no stall) and presents y(n) with y_valid high one cycle after the output
// switch closes. Latency from the u_take cycle of u(n) to the y_valid cycle of y(n) is
// 4 cycles in every mode. Changing cfg (or unlocking) flushes the filter state.
module obf_iir_top
  import obf_iir_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned FRAC_W = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     key_valid,
  input  logic [7:0]               key_word,
  input  logic [1:0]               cfg,
  input  logic signed [COEF_W-1:0] coef [NCOEF],
  input  logic signed [DATA_W-1:0] u,
  output logic                     u_take,
  output logic signed [DATA_W-1:0] y,
  output logic                     y_valid
);
  logic     unlocked;
  sw_ctrl_t sw;
  logic     clr;
  logic [2:0] take_sr;  // u_take of the last three cycles

  key_fsm u_key (
    .clk, .rst_n, .key_valid, .key_word, .unlocked, .locked()
  );

  switch_reconfigurator u_recfg (
    .clk, .rst_n, .unlocked, .cfg(mode_e'(cfg)), .sw, .clr, .mode()
  );

  folded_iir_datapath #(.DATA_W(DATA_W), .COEF_W(COEF_W), .FRAC_W(FRAC_W)) u_dp (
    .clk, .rst_n, .clr, .sw, .coef, .u, .y
  );

  assign u_take = sw.u_take;

  // An output is new only if its input was taken three cycles before the output
  // switch closes; this hides the empty outputs right after reset or a mode change.
  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      take_sr <= '0;
      y_valid <= 1'b0;
    end else begin
      take_sr <= {take_sr[1:0], sw.u_take};
      y_valid <= sw.y_en && take_sr[2];
    end
  end

  // In every meaningful schedule the output switch closes exactly three cycles after
  // the input switch, once the pipeline is full.
  assert property (@(posedge clk) disable iff (!rst_n || clr)
                   take_sr[2] |-> sw.y_en);
endmodule
