// tb_obf_iir_impulse -- workload test: impulse responses of the two meaningful filters.
//
// After unlocking, an impulse of amplitude 0.5 (8192 in Q1.14 data scaling) is fed
// through the top in cfg 0, cfg 1 and cfg 2, and 60 outputs of each response are
// compared with the impulse response of H1(z) or H2(z) computed in double precision
// from the transfer function, to within 6 LSB of fixed-point error. It then checks
// that without the key the cfg 0 response departs from H1 by far more than that.
module tb_obf_iir_impulse;
  localparam logic [31:0] SECRET = 32'hA5C3_1E7B;
  localparam int NOUT = 60;
  localparam real AMP = 8192.0;

  logic clk = 0, rst_n = 0, key_valid = 0;
  logic [7:0] key_word = 0;
  logic [1:0] cfg = 0;
  logic signed [15:0] coef [4];
  logic signed [15:0] u = 0, y;
  logic u_take, y_valid;
  int checks = 0, failures = 0;
  real mc [4] = '{0.3, -0.2, 0.5, 0.15};

  obf_iir_top dut (.clk, .rst_n, .key_valid, .key_word, .cfg, .coef, .u, .u_take, .y, .y_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // h[n] of (1 + b1 z^-1 + b2 z^-2) / (1 - a2 z^-2 - a3 z^-3), double precision
  function automatic void impulse(input real a2, a3, b1, b2, output real h [NOUT]);
    real w [NOUT];
    for (int n = 0; n < NOUT; n++) begin
      w[n] = (n == 0) ? 1.0 : 0.0;
      if (n >= 2) w[n] += a2 * w[n-2];
      if (n >= 3) w[n] += a3 * w[n-3];
      h[n] = w[n] + ((n >= 1) ? b1 * w[n-1] : 0.0) + ((n >= 2) ? b2 * w[n-2] : 0.0);
    end
  endfunction

  // play cfg c, send an impulse, collect NOUT outputs, return worst error against h
  task automatic response(input int c, input real h [NOUT], output real worst);
    int n_in, n_out;
    real e;
    @(negedge clk);
    cfg = 2'(c);
    n_in = 0; n_out = 0; worst = 0.0;
    while (n_out < NOUT) begin
      @(negedge clk);
      if (u_take) begin
        u = (n_in == 0) ? 16'sd8192 : 16'sd0;
        n_in++;
      end
      @(posedge clk); #1;
      if (y_valid) begin
        e = real'(y) - AMP * h[n_out];
        if (e < 0) e = -e;
        if (e > worst) worst = e;
        n_out++;
      end
    end
  endtask

  initial begin
    real h1 [NOUT], h2 [NOUT], worst;
    for (int k = 0; k < 4; k++) coef[k] = 16'($rtoi(mc[k] * 16384.0));
    impulse(mc[0], mc[1], mc[2], mc[3], h1);
    impulse(0.0,   mc[1], mc[2], mc[3], h2);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // locked: cfg 0 must be far from H1
    cfg = 2'd1;
    response(0, h1, worst);
    checks++;
    $display("locked cfg 0: worst deviation from H1 %0.1f LSB", worst);
    if (worst < 100.0) begin failures++; $display("locked circuit still behaves as H1"); end
    // unlock
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); key_valid = 1; key_word = SECRET[31-8*i -: 8];
    end
    @(negedge clk); key_valid = 0;
    cfg = 2'd3;  // runs as cfg 0; a real change follows below
    repeat (3) @(negedge clk);
    response(1, h2, worst);
    checks++;
    $display("cfg 1: worst error against H2 %0.1f LSB", worst);
    if (worst > 6.0) failures++;
    response(0, h1, worst);
    checks++;
    $display("cfg 0: worst error against H1 %0.1f LSB", worst);
    if (worst > 6.0) failures++;
    response(2, h2, worst);
    checks++;
    $display("cfg 2: worst error against H2 %0.1f LSB", worst);
    if (worst > 6.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
