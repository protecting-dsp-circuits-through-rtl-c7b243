// obf_iir_pkg -- types, switch encodings and switch-instance schedules shared by the
// obfuscated folded IIR filter.
//
// The filter hardware is one multiplier, one adder and a few delay lines. What it
// computes is decided only by the switches in front of those units, and the switches
// change setting every clock cycle following a periodic "switch-instance" schedule.
// This package holds the encoding of every switch (each one has a null input that
// feeds zero) and the schedule of each mode, as functions of the cycle phase.
//
// Schedules (instance i = cycle mod N):
//   MODE_IIR1_N4 : H(z)=(1+m2 z^-1+m3 z^-2)/(1-m0 z^-2-m1 z^-3), folding factor 4,
//                  multiplier order {M0,M1,M2,M3}, adder order {A0,A1,A2,A3}.
//   MODE_IIR2_N3 : H(z)=(1+m2 z^-1+m3 z^-2)/(1-m1 z^-3), folding factor 3,
//                  multiplier order {M3,M1,M2}, adder order {A2,A1,A3}.
//   MODE_IIR2_N4 : the same filter on the N=4 schedule with instance 0 a null operation.
// The switch settings follow the folding equation DF(U->V) = N w(e) - P_U + v - u
// applied after retiming, with a 3-stage multiplier and a 1-stage adder; the resulting
// instance labels are those of the published folded structures. Both N=3 and N=4
// schedules run on one 12-cycle period (lcm(3,4)), so one counter serves all modes.
// Widths, number format and the mode/select encodings are this design's own choices.
package obf_iir_pkg;

  localparam int unsigned PERIOD  = 12;  // lcm(3, 4)
  localparam int unsigned NCOEF   = 4;   // m0..m3
  localparam int unsigned ADD_DEPTH = 7; // D + D + 3D + 2D behind the adder register
  localparam int unsigned MUL_DEPTH = 2; // D + D behind the multiplier

  typedef logic [$clog2(PERIOD)-1:0] phase_t;

  // Requested / played mode. The encoding is the configure-data value.
  typedef enum logic [1:0] {
    MODE_IIR1_N4 = 2'd0,
    MODE_IIR2_N3 = 2'd1,
    MODE_IIR2_N4 = 2'd2,
    MODE_RSVD    = 2'd3
  } mode_e;

  // Multiplier data-input switch.
  typedef enum logic [2:0] {
    MI_NULL = 3'd0,
    MI_A0   = 3'd1,   // adder register
    MI_A1   = 3'd2,   // adder register delayed 1
    MI_A2   = 3'd3,   // delayed 2
    MI_A5   = 3'd4,   // delayed 5
    MI_A7   = 3'd5    // delayed 7
  } mul_in_e;

  // Upper adder-input switch (the one carrying u(n)).
  typedef enum logic [1:0] {
    AA_NULL = 2'd0,
    AA_U    = 2'd1,   // input sample
    AA_M0   = 2'd2,   // multiplier output
    AA_A1   = 2'd3    // adder register delayed 1
  } add_a_e;

  // Lower adder-input switch.
  typedef enum logic [2:0] {
    AB_NULL = 3'd0,
    AB_M0   = 3'd1,   // multiplier output
    AB_M1   = 3'd2,   // multiplier output delayed 1
    AB_M2   = 3'd3,   // multiplier output delayed 2
    AB_A0   = 3'd4    // adder register
  } add_b_e;

  // All switch settings for one clock cycle.
  typedef struct packed {
    mul_in_e    mul_in;
    logic [1:0] coef;    // which of m0..m3 feeds the multiplier
    add_a_e     add_a;
    add_b_e     add_b;
    logic       y_en;    // output switch closed: the adder register holds y(n)
    logic       u_take;  // input switch on u(n)
  } sw_ctrl_t;

  localparam sw_ctrl_t SW_IDLE = '{MI_NULL, 2'd0, AA_NULL, AB_NULL, 1'b0, 1'b0};

  // Fig. 1 filter, folding factor 4.
  function automatic sw_ctrl_t sched_iir1_n4(input int unsigned i);
    sw_ctrl_t s;
    unique case (i)
      0:       s = '{MI_A2, 2'd0, AA_M0, AB_M1, 1'b1, 1'b0}; // M0 ; A0 = M0 + M1
      1:       s = '{MI_A7, 2'd1, AA_U,  AB_A0, 1'b0, 1'b1}; // M1 ; A1 = u + A0
      2:       s = '{MI_A0, 2'd2, AA_M0, AB_M1, 1'b0, 1'b0}; // M2 ; A2 = M3 + M2
      default: s = '{MI_A5, 2'd3, AA_A1, AB_A0, 1'b0, 1'b0}; // M3 ; A3 = A1 + A2
    endcase
    return s;
  endfunction

  // Fig. 4 filter, folding factor 4, instance 0 is a null operation.
  function automatic sw_ctrl_t sched_iir2_n4(input int unsigned i);
    sw_ctrl_t s;
    unique case (i)
      0:       s = '{MI_NULL, 2'd0, AA_NULL, AB_NULL, 1'b1, 1'b0}; // null
      1:       s = '{MI_A7,   2'd1, AA_U,    AB_M1,   1'b0, 1'b1}; // M1 ; A1 = u + M1
      2:       s = '{MI_A0,   2'd2, AA_M0,   AB_M1,   1'b0, 1'b0}; // M2 ; M3 + M2
      default: s = '{MI_A5,   2'd3, AA_A1,   AB_A0,   1'b0, 1'b0}; // M3 ; y = A1 + (M2+M3)
    endcase
    return s;
  endfunction

  // Fig. 4 filter, folding factor 3.
  function automatic sw_ctrl_t sched_iir2_n3(input int unsigned i);
    sw_ctrl_t s;
    unique case (i)
      0:       s = '{MI_A1, 2'd3, AA_A1, AB_A0, 1'b0, 1'b0}; // M3 ; A2 = A1 + A3
      1:       s = '{MI_A5, 2'd1, AA_U,  AB_M0, 1'b1, 1'b1}; // M1 ; A1 = u + M1
      default: s = '{MI_A0, 2'd2, AA_M0, AB_M2, 1'b0, 1'b0}; // M2 ; A3 = M2 + M3
    endcase
    return s;
  endfunction

  // Settings of one mode at one phase of the 12-cycle period.
  function automatic sw_ctrl_t schedule(input mode_e m, input int unsigned phase);
    sw_ctrl_t s;
    unique case (m)
      MODE_IIR2_N3: s = sched_iir2_n3(phase % 3);
      MODE_IIR2_N4: s = sched_iir2_n4(phase % 4);
      default:      s = sched_iir1_n4(phase % 4);
    endcase
    return s;
  endfunction

endpackage
