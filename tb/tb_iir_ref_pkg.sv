// tb_iir_ref_pkg -- bit-exact software model of the third-order IIR filters, used by the
// testbenches as the independent reference.
//
// The model computes the filter directly from its difference equations, sample by
// sample, with no folding, retiming or switches:
//   w(n) = u(n) + q(d2*w(n-2)) + q(d3*w(n-3))
//   y(n) = w(n) + q(n1*w(n-1)) + q(n2*w(n-2))
// where q(x) keeps bits [FRAC+15:FRAC] of the full product (arithmetic shift, then
// truncation to 16 bits) and every sum wraps modulo 2^16. For
//   H(z)=(1+m2 z^-1+m3 z^-2)/(1-m0 z^-2-m1 z^-3): d2=m0, d3=m1, n1=m2, n2=m3
//   H(z)=(1+m2 z^-1+m3 z^-2)/(1-m1 z^-3):         no d2 product, d3=m1, n1=m2, n2=m3
package tb_iir_ref_pkg;

  localparam int FRAC = 14;

  function automatic logic signed [15:0] q(input logic signed [15:0] w,
                                           input logic signed [15:0] m);
    longint p;
    p = longint'(w) * longint'(m);
    p = p >>> FRAC;
    return p[15:0];
  endfunction

  class iir_ref;
    logic signed [15:0] w1, w2, w3;  // w(n-1), w(n-2), w(n-3)
    logic signed [15:0] d2, d3, n1, n2;
    bit has_d2;

    function new();
      reset();
    endfunction

    function void reset();
      w1 = '0; w2 = '0; w3 = '0;
    endfunction

    // mode: 0 = first filter, 1/2 = second filter; locked rotates the coefficient index.
    function void set(input int mode, input bit locked, input logic signed [15:0] m [4]);
      int r;
      r = locked ? 1 : 0;
      has_d2 = (mode == 0 || mode == 3);
      d2 = m[(0 + r) % 4];
      d3 = m[(1 + r) % 4];
      n1 = m[(2 + r) % 4];
      n2 = m[(3 + r) % 4];
    endfunction

    function logic signed [15:0] step(input logic signed [15:0] u);
      logic signed [15:0] w, y;
      w = u + q(w3, d3) + (has_d2 ? q(w2, d2) : 16'sd0);
      y = w + q(w1, n1) + q(w2, n2);
      w3 = w2; w2 = w1; w1 = w;
      return y;
    endfunction
  endclass

endpackage
