// tb_pipe_mult -- random operands into the 3-stage multiplier; every result is checked
// against an independently computed product exactly three cycles later, plus a check
// that the synchronous clear empties the pipeline.
module tb_pipe_mult;
  logic clk = 0, rst_n = 0, clr = 0;
  logic signed [15:0] a, b, p;
  logic signed [15:0] exp_q [$];
  int checks = 0, failures = 0;

  pipe_mult dut (.clk, .rst_n, .clr, .a, .b, .p);

  always #5 clk = ~clk;

  function automatic logic signed [15:0] ref_mul(logic signed [15:0] x, logic signed [15:0] y);
    longint t;
    t = (longint'(x) * longint'(y)) >>> 14;
    return t[15:0];
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      a <= 16'($urandom); b <= (i < 10) ? 16'sh4000 : 16'($urandom);
      @(posedge clk);
      exp_q.push_back(ref_mul(a, b));
      if (exp_q.size() > 3) void'(exp_q.pop_front());
      #1;
      if (exp_q.size() == 3) begin
        checks++;
        if (p !== exp_q[0]) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: p=%0d exp=%0d", i, p, exp_q[0]);
        end
      end
    end
    // clear flushes all three stages
    a <= 16'sh1234; b <= 16'sh2345;
    clr <= 1; @(posedge clk); clr <= 0; a <= 0; b <= 0;
    repeat (2) begin
      #1; checks++; if (p !== 0) failures++;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
