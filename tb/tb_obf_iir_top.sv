// tb_obf_iir_top -- end-to-end test of the key-protected obfuscated IIR filter, with the
// top at its default parameters.
//
// Scenario: run without a key (locked), enter the right initialization key, play every
// configuration (first filter on the 4-cycle schedule, second filter on the 3-cycle
// schedule, second filter on the 4-cycle schedule with null operations, reserved code),
// switch between them, then reset and enter a wrong key. Every output is compared with
// the direct-form reference filter of the configuration in force (with the coefficient
// rotation when locked), the input-to-output latency (4 cycles) and the sample rate are
// checked, and the testbench counts that each mechanism happened: unlock, wrong key,
// mode switch with flush, null operation, each schedule, locked output differing from
// the correct filter.
module tb_obf_iir_top;
  import obf_iir_pkg::*;
  import tb_iir_ref_pkg::*;

  localparam logic [31:0] SECRET = 32'hA5C3_1E7B;

  logic clk = 0, rst_n = 0, key_valid = 0;
  logic [7:0] key_word = 0;
  logic [1:0] cfg = 0;
  logic signed [15:0] coef [4];
  logic signed [15:0] u = 0, y;
  logic u_take, y_valid;
  int checks = 0, failures = 0;

  obf_iir_top dut (.clk, .rst_n, .key_valid, .key_word, .cfg, .coef, .u, .u_take, .y, .y_valid);

  always #5 clk = ~clk;

  // reference state
  iir_ref ref_m  = new();   // what the circuit should produce in the configuration in force
  iir_ref good_m = new();   // the unlocked filter, to see that a locked circuit is wrong
  logic signed [15:0] expq [$];
  logic signed [15:0] goodq [$];
  longint takeq [$];
  bit checking = 0;
  int outs = 0;
  longint cyc = 0;

  // mechanism counters
  int n_unlock = 0, n_wrong_key = 0, n_flush = 0, n_null = 0, n_differ = 0, n_locked_out = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int cur_mode = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus and checking, every cycle
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.clr) n_flush++;
  end

  always @(negedge clk) begin
    if (rst_n && !dut.clr && dut.sw.mul_in == MI_NULL) n_null++;
    if (u_take) begin
      u = 16'($signed($urandom_range(0, 16000)) - 8000);
      if (checking) begin
        expq.push_back(ref_m.step(u));
        goodq.push_back(good_m.step(u));
        takeq.push_back(cyc);
      end
    end
  end

  always @(posedge clk) begin
    #1;
    if (checking && y_valid) begin
      checks++;
      if (expq.size() == 0 || y !== expq[0]) begin
        failures++;
        if (failures < 10) $display("cfg %0d output %0d: y=%0d expected %0d", cur_mode, outs, y,
                                    expq.size() != 0 ? expq[0] : 16'sd0);
      end
      checks++;
      if (takeq.size() == 0 || cyc - takeq[0] != 4) begin
        failures++;
        $display("latency %0d cycles", takeq.size() != 0 ? cyc - takeq[0] : -1);
      end
      if (!dut.u_key.unlocked) begin
        n_locked_out++;
        if (goodq.size() != 0 && y !== goodq[0]) n_differ++;
      end else begin
        n_mode[cur_mode]++;
      end
      if (expq.size() != 0)  void'(expq.pop_front());
      if (goodq.size() != 0) void'(goodq.pop_front());
      if (takeq.size() != 0) void'(takeq.pop_front());
      outs++;
    end
  end

  // Apply a configuration (cfg value) and check nsamp outputs.
  task automatic play(input int c, input int nsamp);
    longint t0, t1;
    int o0;
    checking = 0;
    @(negedge clk);
    cfg <= 2'(c);
    #1;  // the rest of this cycle is the flush cycle: switches idle, no input taken
    checks++;
    if (!dut.clr) begin failures++; $display("cfg %0d: no flush on configuration change", c); end
    expq.delete(); goodq.delete(); takeq.delete();
    ref_m.reset(); good_m.reset();
    ref_m.set(c, !dut.u_key.unlocked, coef);
    good_m.set(c, 1'b0, coef);
    cur_mode = c;
    checking = 1;
    o0 = outs; t0 = cyc;
    while (outs - o0 < nsamp) @(posedge clk);
    t1 = cyc;
    // throughput: one sample per 3 or 4 cycles
    checks++;
    if ((t1 - t0) > longint'(nsamp) * ((c == 1) ? 3 : 4) + 8 ||
        (t1 - t0) < (longint'(nsamp) - 1) * ((c == 1) ? 3 : 4)) begin
      failures++;
      $display("cfg %0d: %0d outputs took %0d cycles", c, nsamp, t1 - t0);
    end
    checking = 0;
  endtask

  task automatic send_key(input logic [31:0] k);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      key_valid <= 1; key_word <= k[31-8*i -: 8];
    end
    @(negedge clk);
    key_valid <= 0;
    @(negedge clk);
  endtask

  task automatic do_reset();
    checking = 0;
    rst_n <= 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
  endtask

  initial begin
    coef = '{16'sd4915, -16'sd3277, 16'sd8192, 16'sd2458};  // 0.3, -0.2, 0.5, 0.15 in Q1.14
    do_reset();
    // no key yet: the circuit runs, but as the rotated filter
    play(1, 40);
    play(0, 40);
    // right key
    send_key(SECRET);
    checks++;
    if (!dut.u_key.unlocked) begin failures++; $display("right key did not unlock"); end
    else n_unlock++;
    play(1, 200);
    play(0, 200);
    play(2, 200);
    play(3, 50);
    play(1, 100);
    coef = '{-16'sd6000, 16'sd1500, -16'sd7000, 16'sd5000};
    play(0, 150);
    play(2, 100);
    // wrong key after reset
    do_reset();
    send_key(SECRET ^ 32'h0000_0100);
    checks++;
    if (!dut.u_key.locked) begin failures++; $display("wrong key not detected"); end
    else n_wrong_key++;
    play(1, 100);
    play(0, 100);

    // every mechanism must have happened
    foreach (n_mode[i]) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("cfg %0d never played", i); end
    end
    checks++; if (n_unlock == 0)     begin failures++; $display("no unlock"); end
    checks++; if (n_wrong_key == 0)  begin failures++; $display("no wrong key"); end
    checks++; if (n_flush < 8)       begin failures++; $display("too few flushes: %0d", n_flush); end
    checks++; if (n_null == 0)       begin failures++; $display("no null operation"); end
    checks++; if (n_locked_out == 0) begin failures++; $display("no locked output"); end
    checks++; if (n_differ == 0)     begin failures++; $display("locked output never wrong"); end
    $display("mechanisms: unlock=%0d wrong_key=%0d flush=%0d null=%0d locked_out=%0d differ=%0d modes=%0d/%0d/%0d/%0d",
             n_unlock, n_wrong_key, n_flush, n_null, n_locked_out, n_differ,
             n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
