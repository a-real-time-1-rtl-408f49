// Checks the mixed-radix butterfly for radix 2, 3, 4 and 5 with random data
// and random twiddles against a floating-point DFT-and-twiddle reference.
module mr_butterfly_tb;
  import ffast_pkg::*;
  localparam int TWW = 18;
  localparam real PI2 = 6.283185307179586;
  logic [2:0] radix;
  cplx_t x [5], y [5];
  logic signed [2*TWW-1:0] tw [5];
  mr_butterfly #(.TWW(TWW)) dut (.*);
  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction
  int checks = 0, failures = 0;
  initial begin
    for (int it = 0; it < 2000; it++) begin
      real twr [5], twi [5];
      int  r, xr [5], xi [5], yr, yi;
      r = 2 + (it % 4);
      radix = 3'(r);
      for (int m = 0; m < 5; m++) begin
        real a;
        xr[m] = int'($urandom_range(0, 2**16 - 1)) - 2**15;
        xi[m] = int'($urandom_range(0, 2**16 - 1)) - 2**15;
        x[m].re = DW'(xr[m]);
        x[m].im = DW'(xi[m]);
        a = -PI2 * $urandom_range(0, 999) / 1000.0;
        twr[m] = $rtoi($floor($cos(a) * 65536.0 + 0.5));
        twi[m] = $rtoi($floor($sin(a) * 65536.0 + 0.5));
        tw[m]  = {TWW'($rtoi(twr[m])), TWW'($rtoi(twi[m]))};
      end
      #1;
      for (int q = 0; q < 5; q++) begin
        real sr, si, er, ei;
        sr = 0.0;
        si = 0.0;
        for (int m = 0; m < r; m++) begin
          real a;
          a = -PI2 * m * q / r;
          sr += xr[m] * $cos(a) - xi[m] * $sin(a);
          si += xr[m] * $sin(a) + xi[m] * $cos(a);
        end
        er = (sr * twr[q] - si * twi[q]) / 65536.0;
        ei = (sr * twi[q] + si * twr[q]) / 65536.0;
        if (q >= r) begin er = 0.0; ei = 0.0; end
        yr = int'($signed(y[q].re));
        yi = int'($signed(y[q].im));
        checks++;
        if (fabs(yr - er) > 4.0 || fabs(yi - ei) > 4.0) begin
          failures++;
          if (failures < 10) $display("FAIL r=%0d q=%0d (%0d,%0d) exp (%f,%f)", r, q, yr, yi, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
