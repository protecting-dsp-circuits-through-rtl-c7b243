// tb_folded_iir_datapath -- runs the folded datapath under each folded schedule and
// compares every output sample with the direct-form reference filter.
//
// The testbench plays the switch settings itself (phase counter modulo 12), feeds a
// random input sample whenever the input switch closes and checks y after each closing
// of the output switch that follows an input by three cycles. It also checks the
// throughput: 3 samples per 12 cycles on the 4-cycle schedules, 4 on the 3-cycle one,
// and a 3-cycle distance from input switch to output switch.
module tb_folded_iir_datapath;
  import obf_iir_pkg::*;
  import tb_iir_ref_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  sw_ctrl_t sw = SW_IDLE;
  logic signed [15:0] coef [4];
  logic signed [15:0] u = 0, y;
  int checks = 0, failures = 0;

  folded_iir_datapath dut (.clk, .rst_n, .clr, .sw, .coef, .u, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input mode_e m, input int nsamp, input int amp);
    iir_ref r;
    logic signed [15:0] expq [$];
    logic [3:0] take_hist;
    int taken, outs, cycles;
    r = new();
    for (int k = 0; k < 4; k++) coef[k] = 16'($signed($urandom_range(0, 2 * 7000)) - 7000);
    r.set(int'(m), 1'b0, coef);
    // flush
    @(negedge clk); clr = 1; sw = SW_IDLE; @(negedge clk); clr = 0;
    take_hist = '0; taken = 0; outs = 0; cycles = 0;
    while (outs < nsamp) begin
      sw = schedule(m, cycles % 12);
      if (sw.u_take) begin
        u = 16'($signed($urandom_range(0, 2 * amp)) - amp);
        expq.push_back(r.step(u));
        taken++;
      end
      take_hist = {take_hist[2:0], sw.u_take};
      @(posedge clk); #1;
      if (sw.y_en && take_hist[3]) begin
        checks++;
        if (y !== expq[0]) begin
          failures++;
          if (failures < 10) $display("mode %0d sample %0d: y=%0d expected %0d", m, outs, y, expq[0]);
        end
        void'(expq.pop_front());
        outs++;
      end
      cycles++;
      @(negedge clk);
    end
    sw = SW_IDLE;
    // rate: samples per 12 cycles
    checks++;
    // one sample per N cycles: N = 3 or 4
    if (cycles - taken * ((m == MODE_IIR2_N3) ? 3 : 4) > 4 || taken * ((m == MODE_IIR2_N3) ? 3 : 4) - cycles > 4) begin
      failures++;
      $display("mode %0d: %0d samples in %0d cycles", m, taken, cycles);
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) coef[k] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // impulse-like start, then random data, in every schedule
    run(MODE_IIR1_N4, 300, 4000);
    run(MODE_IIR2_N3, 300, 4000);
    run(MODE_IIR2_N4, 300, 4000);
    run(MODE_IIR1_N4, 300, 30000);
    run(MODE_IIR2_N3, 300, 30000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
