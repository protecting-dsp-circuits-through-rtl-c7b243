// tb_pipe_adder -- random operands into the one-stage adder; each sum (mod 2^16) is
// checked one cycle after its operands, and the clear is checked.
module tb_pipe_adder;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [15:0] a, b, s, expv;
  int checks = 0, failures = 0;

  pipe_adder dut (.clk, .rst_n, .clr, .a, .b, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      a <= 16'($urandom); b <= 16'($urandom);
      @(posedge clk);
      expv = 16'((32'(a) + 32'(b)) & 32'hFFFF);
      #1; checks++;
      if (s !== expv) begin
        failures++;
        if (failures < 10) $display("mismatch: %0h + %0h gave %0h", a, b, s);
      end
    end
    a <= 16'h7fff; b <= 1; clr <= 1;
    @(posedge clk); #1; checks++; if (s !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
