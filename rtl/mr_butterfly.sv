// Runtime-reconfigurable mixed-radix butterfly (radix 2, 3, 4 or 5).
//
// For the radix r chosen at run time it computes the r-point DFT of
// x[0..r-1] and multiplies output q by the decimation-in-frequency twiddle
// tw[q]:  y[q] = tw[q] * sum_m x[m] * exp(-2*pi*i*m*q/r).
// The small-DFT coefficients live in a constant table (Q2.16); the same
// complex multiply-accumulate hardware serves every radix, which is how one
// processing element covers the 4, 2 and 3 (or 5) radices of a sub-FFT.
// Products are rounded to nearest after each multiply.  Inputs beyond r are
// ignored and outputs beyond r are zero.  Purely combinational.
// Radix set and the one-butterfly-per-lane structure follow the analyzer;
// the coefficient format and rounding are this implementation's choices.
module mr_butterfly
  import ffast_pkg::*;
#(
  parameter int TWW = 18    // twiddle width, Q2.16
) (
  input  logic [2:0]                  radix,
  input  cplx_t                       x  [5],
  input  logic signed [2*TWW-1:0]     tw [5],   // {re, im}
  output cplx_t                       y  [5]
);
  localparam int FB = TWW - 2;   // fractional bits of coefficients

  function automatic logic signed [TWW-1:0] coef(int r, int e, bit im);
    real a, v;
    a = -2.0 * 3.141592653589793 * real'(e) / real'(r);
    v = (im ? $sin(a) : $cos(a)) * (2.0 ** FB);
    return TWW'(int'($floor(v + 0.5)));
  endfunction

  // C_RE/C_IM[r][e] = exp(-2*pi*i*e/r), r = 2..5
  logic signed [TWW-1:0] c_re [6][5];
  logic signed [TWW-1:0] c_im [6][5];
  for (genvar r = 0; r < 6; r++) begin : g_r
    for (genvar e = 0; e < 5; e++) begin : g_e
      assign c_re[r][e] = (r >= 2 && e < r) ? coef(r > 1 ? r : 2, e, 1'b0) : '0;
      assign c_im[r][e] = (r >= 2 && e < r) ? coef(r > 1 ? r : 2, e, 1'b1) : '0;
    end
  end

  localparam int AW = DW + TWW + 3;

  logic signed [AW-1:0]     acc_re [5], acc_im [5];
  logic signed [AW-1:0]     s_re [5], s_im [5];
  logic signed [AW+TWW-1:0] p_re [5], p_im [5];
  logic [2:0]               e;

  always_comb begin
    for (int q = 0; q < 5; q++) begin
      acc_re[q] = '0;
      acc_im[q] = '0;
      for (int m = 0; m < 5; m++) begin
        e = '0;
        if (m < int'(radix) && q < int'(radix)) begin
          e = 3'((m * q) % int'(radix));
          acc_re[q] += AW'(x[m].re) * AW'(c_re[radix][e]) - AW'(x[m].im) * AW'(c_im[radix][e]);
          acc_im[q] += AW'(x[m].re) * AW'(c_im[radix][e]) + AW'(x[m].im) * AW'(c_re[radix][e]);
        end
      end
      s_re[q] = (acc_re[q] + (AW'(1) <<< (FB-1))) >>> FB;
      s_im[q] = (acc_im[q] + (AW'(1) <<< (FB-1))) >>> FB;
      p_re[q] = (AW+TWW)'(s_re[q]) * (AW+TWW)'($signed(tw[q][2*TWW-1:TWW]))
              - (AW+TWW)'(s_im[q]) * (AW+TWW)'($signed(tw[q][TWW-1:0]));
      p_im[q] = (AW+TWW)'(s_re[q]) * (AW+TWW)'($signed(tw[q][TWW-1:0]))
              + (AW+TWW)'(s_im[q]) * (AW+TWW)'($signed(tw[q][2*TWW-1:TWW]));
      p_re[q] = (p_re[q] + ((AW+TWW)'(1) <<< (FB-1))) >>> FB;
      p_im[q] = (p_im[q] + ((AW+TWW)'(1) <<< (FB-1))) >>> FB;
      y[q].re = (q < int'(radix)) ? DW'(p_re[q]) : '0;
      y[q].im = (q < int'(radix)) ? DW'(p_im[q]) : '0;
    end
  end
endmodule
