// switch_reconfigurator -- drives every switch of the folded datapath, cycle by cycle.
//
// A modulo-12 phase counter indexes the switch-instance schedule of the mode being
// played. Twelve is the least common multiple of the two folding factors (3 and 4),
// so the N=4 schedule repeats three times and the N=3 schedule four times in one
// period, and either filter keeps the latency of its own folded design.
//
// The mode played is the configure data cfg (see obf_iir_pkg; cfg=3 is played as
// cfg=0). While the key FSM has not unlocked the circuit, the same schedule is played
// with every coefficient selection rotated by one (m_i -> m_(i+1 mod 4)): the filter
// still runs and produces a plausible but wrong response. The rotation and the cfg
// encoding are this design's own choices.
//
// Whenever the played mode or the lock state changes, one cycle is spent with all
// switches on null and clr high, which flushes the datapath; the phase then restarts
// at 0. Outputs are decoded from registered state only.
module switch_reconfigurator
  import obf_iir_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     unlocked,
  input  mode_e    cfg,
  output sw_ctrl_t sw,
  output logic     clr,
  output mode_e    mode
);
  mode_e  mode_req;
  mode_e  mode_q;
  logic   unl_q;
  phase_t phase_q;
  logic   change;

  assign mode_req = (cfg == MODE_RSVD) ? MODE_IIR1_N4 : cfg;
  assign change   = (mode_req != mode_q) || (unlocked != unl_q);
  assign mode     = mode_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode_q  <= MODE_IIR1_N4;
      unl_q   <= 1'b0;
      phase_q <= '0;
    end else if (change) begin
      mode_q  <= mode_req;
      unl_q   <= unlocked;
      phase_q <= '0;
    end else begin
      phase_q <= (phase_q == phase_t'(PERIOD - 1)) ? '0 : phase_q + 1'b1;
    end
  end

  always_comb begin
    clr = change;
    if (change) begin
      sw = SW_IDLE;
    end else begin
      sw = schedule(mode_q, int'(phase_q));
      if (!unl_q) sw.coef = sw.coef + 2'd1;
    end
  end
endmodule
