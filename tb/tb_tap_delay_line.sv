// tb_tap_delay_line -- random words into the tap delay line at its default depth (7); every tap is compared
// with a history of the inputs kept by the testbench, and the clear is checked.
module tb_tap_delay_line;
  localparam int DEPTH = 7;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [15:0] d;
  logic [15:0] taps [DEPTH+1];
  logic [15:0] hist [$];
  int checks = 0, failures = 0;

  tap_delay_line dut (.clk, .rst_n, .clr, .d, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < DEPTH; k++) hist.push_front(16'h0);
    for (int i = 0; i < 500; i++) begin
      d <= 16'($urandom);
      #1;
      hist.push_front(d);
      for (int k = 0; k <= DEPTH; k++) begin
        checks++;
        if (taps[k] !== hist[k]) begin
          failures++;
          if (failures < 10) $display("tap %0d: %0h exp %0h", k, taps[k], hist[k]);
        end
      end
      void'(hist.pop_back());
      @(posedge clk);
    end
    clr <= 1; @(posedge clk); clr <= 0; #1;
    for (int k = 1; k <= DEPTH; k++) begin
      checks++; if (taps[k] !== 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
