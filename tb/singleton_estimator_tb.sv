// Checks the singleton estimator with synthetic bin observations.  For a
// signal at location j with complex amplitude A, lane r of a stage sees
// Y[r] = A * exp(i*2*pi*j*delay[r]/n) (n = 21600), quantized, plus a little
// noise.  For 300 random singletons over all three stages the estimator must
// report a singleton, the exact j, and v within 1% + 8 of A.  For 100 random
// two-signal bins (two locations aliasing to the same bin, comparable
// amplitudes) it must not report a singleton.  The latency from start to done
// must be 2*(ITER+1) + 6 cycles.  Interface and timing are those of
// rtl/singleton_estimator.sv.
module singleton_estimator_tb;
  import ffast_pkg::*;
  localparam real PI2 = 6.283185307179586;
  localparam int ITER = 22;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, done, is_single;
  logic [1:0] stage = '0;
  logic [BINW-1:0] b = '0;
  cplx_t y [LANES], v;
  logic [LANES-1:0][DLYW-1:0] delay;
  logic [NCLUST-1:0][TAUW-1:0] tau;
  logic [EW-1:0] t_noise = EW'(1) << 20, resid;
  logic [JW-1:0] j;
  logic [ANGW-1:0] ang [LANES];
  singleton_estimator #(.ITER(ITER)) dut (.*);

  function automatic real fabs(real x);
    return x < 0.0 ? -x : x;
  endfunction

  int checks = 0, failures = 0;

  task automatic run(input int s, input int nsig, input int jj [2], input real am [2], input real ph [2],
                     output int lat);
    for (int r = 0; r < LANES; r++) begin
      real re, im, a;
      re = 0.0; im = 0.0;
      for (int k = 0; k < nsig; k++) begin
        a = ph[k] + PI2 * real'((jj[k] * DELAY_DEF[r]) % N_FFT) / N_FFT;
        re += am[k] * $cos(a);
        im += am[k] * $sin(a);
      end
      y[r].re = DW'($rtoi($floor(re + 0.5)) + int'($urandom_range(0, 6)) - 3);
      y[r].im = DW'($rtoi($floor(im + 0.5)) + int'($urandom_range(0, 6)) - 3);
    end
    stage = 2'(s);
    b = BINW'(jj[0] % NI[s]);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  initial begin
    int jj [2], lat, s, vr, vi;
    real am [2], ph [2], er, ei;
    for (int r = 0; r < LANES; r++) delay[r] = DLYW'(DELAY_DEF[r]);
    for (int c = 0; c < NCLUST; c++) tau[c] = TAUW'(TAU_DEF[c]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      s = t % 3;
      jj[0] = $urandom_range(0, N_FFT - 1); jj[1] = 0;
      am[0] = 1000.0 + $urandom_range(0, 60000); am[1] = 0.0;
      ph[0] = PI2 * $urandom_range(0, 999) / 1000.0; ph[1] = 0.0;
      run(s, 1, jj, am, ph, lat);
      er = am[0] * $cos(ph[0]); ei = am[0] * $sin(ph[0]);
      vr = int'($signed(v.re)); vi = int'($signed(v.im));
      checks++;
      if (lat != 2 * (ITER + 1) + 6) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if (!is_single || 32'(j) != jj[0] ||
          fabs(vr - er) > 0.01 * am[0] + 8.0 || fabs(vi - ei) > 0.01 * am[0] + 8.0) begin
        failures++;
        if (failures < 10) $display("FAIL single stage %0d j %0d A %f -> single %0b j %0d v (%0d,%0d) exp (%f,%f) resid %0d",
          s, jj[0], am[0], is_single, j, vr, vi, er, ei, resid);
      end
    end
    for (int t = 0; t < 100; t++) begin
      s = t % 3;
      jj[0] = $urandom_range(0, N_FFT - 1);
      jj[1] = (jj[0] + NI[s] * $urandom_range(1, N_FFT / NI[s] - 1)) % N_FFT;
      am[0] = 5000.0 + $urandom_range(0, 20000);
      am[1] = am[0] * (0.5 + $urandom_range(0, 100) / 100.0);
      ph[0] = PI2 * $urandom_range(0, 999) / 1000.0;
      ph[1] = PI2 * $urandom_range(0, 999) / 1000.0;
      run(s, 2, jj, am, ph, lat);
      checks++;
      if (is_single) begin
        failures++;
        if (failures < 10) $display("FAIL multiton j %0d,%0d taken as single j %0d resid %0d", jj[0], jj[1], j, resid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
