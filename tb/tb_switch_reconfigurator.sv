// tb_switch_reconfigurator -- checks the switch settings the reconfigurator produces:
// the flush cycle on every mode or lock change, the 12-cycle period, and in each mode
// the instances at which the input and output switches close, the coefficient order
// and the null instance, with and without the coefficient rotation of the locked state.
// The expected instance lists are written out here from the folded schedules.
module tb_switch_reconfigurator;
  import obf_iir_pkg::*;
  logic clk = 0, rst_n = 0, unlocked = 0;
  mode_e cfg = MODE_IIR1_N4;
  sw_ctrl_t sw;
  logic clr;
  mode_e mode;
  int checks = 0, failures = 0;

  switch_reconfigurator dut (.clk, .rst_n, .unlocked, .cfg, .sw, .clr, .mode);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // Change configuration, check the flush cycle, then check 3 full periods.
  task automatic run_mode(input mode_e m, input logic unl);
    int n, y_inst, cseq [4], rot;
    logic null0;
    @(negedge clk);
    cfg = m; unlocked = unl;
    #1;
    expect_eq(int'(clr), 1, "flush on change");
    expect_eq(int'(sw.u_take) + int'(sw.y_en), 0, "idle switches during flush");
    @(negedge clk);
    expect_eq(int'(clr), 0, "single flush cycle");
    unique case (m)
      MODE_IIR2_N3: begin n = 3; y_inst = 1; cseq = '{3, 1, 2, 0}; null0 = 0; end
      MODE_IIR2_N4: begin n = 4; y_inst = 0; cseq = '{0, 1, 2, 3}; null0 = 1; end
      default:      begin n = 4; y_inst = 0; cseq = '{0, 1, 2, 3}; null0 = 0; end
    endcase
    rot = unl ? 0 : 1;
    for (int c = 0; c < 3 * 12; c++) begin
      int i;
      i = c % n;
      expect_eq(int'(sw.u_take), int'(i == 1), "u_take instance");
      expect_eq(int'(sw.y_en), int'(i == y_inst), "y_en instance");
      if (null0 && i == 0) begin
        expect_eq(int'(sw.mul_in), int'(MI_NULL), "null multiplier input");
        expect_eq(int'(sw.add_a), int'(AA_NULL), "null adder input a");
        expect_eq(int'(sw.add_b), int'(AB_NULL), "null adder input b");
      end else begin
        expect_eq(int'(sw.coef), (cseq[i] + rot) % 4, "coefficient order");
        expect_eq(int'(sw.mul_in == MI_NULL), 0, "multiplier busy");
      end
      expect_eq(int'(mode), (m == MODE_RSVD) ? int'(MODE_IIR1_N4) : int'(m), "mode");
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run_mode(MODE_IIR2_N3, 1'b0);
    run_mode(MODE_IIR2_N3, 1'b1);
    run_mode(MODE_IIR1_N4, 1'b1);
    run_mode(MODE_IIR2_N4, 1'b1);
    run_mode(MODE_IIR1_N4, 1'b0);
    run_mode(MODE_IIR2_N4, 1'b0);
    run_mode(MODE_IIR2_N3, 1'b1);
    // the reserved code plays the first filter
    @(negedge clk); cfg = MODE_RSVD; #1;
    expect_eq(int'(clr), 1, "reserved code changes mode");
    @(negedge clk); #1;
    expect_eq(int'(mode), int'(MODE_IIR1_N4), "reserved code plays mode 0");
    expect_eq(int'(sw.coef), 0, "mode 0 starts with m0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
