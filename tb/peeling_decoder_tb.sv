// Checks the peeling backend against memory models of the three sub-FFT
// stages filled with ideal aliased spectra: for signals (j_k, A_k), lane r of
// stage s holds in bin b the sum over j_k = b (mod n_s) of
// A_k * exp(i*2*pi*j_k*delay[r]/21600).  Three sparse scenes (10, 40 and 80
// random signals with random amplitudes and phases, so many bins hold
// collisions that only peeling resolves) are decoded; every signal must come
// out once with the exact location and an amplitude within 2% + 24, nothing
// else may come out, found must equal the count, stuck must stay low and the
// memories must be left with no bin above the noise threshold.  The access
// port model reads combinationally and writes at the clock edge, as the
// sub-FFT stages do.  Interface and timing are those of rtl/peeling_decoder.sv.
module peeling_decoder_tb;
  import ffast_pkg::*;
  localparam real PI2 = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, stuck, out_valid;
  peel_cfg_t cfg;
  logic [7:0] iterations;
  logic [JW-1:0] found;
  logic [BINW-1:0] acc_addr [NSTAGES];
  cplx_t acc_rdata [NSTAGES][LANES], acc_wdata [NSTAGES][LANES];
  logic [NSTAGES-1:0] acc_we;
  peel_out_t out_data;
  peeling_decoder #(.ITER(22)) dut (.*);

  function automatic real fabs(real x);
    return x < 0.0 ? -x : x;
  endfunction

  cplx_t mem [NSTAGES][LANES][1024];
  always_comb
    for (int s = 0; s < NSTAGES; s++)
      for (int r = 0; r < LANES; r++) acc_rdata[s][r] = mem[s][r][acc_addr[s]];
  always @(posedge clk)
    for (int s = 0; s < NSTAGES; s++)
      if (acc_we[s]) for (int r = 0; r < LANES; r++) mem[s][r][acc_addr[s]] <= acc_wdata[s][r];

  int checks = 0, failures = 0, nout;
  int sj [$];
  real sre [$], sim [$];
  bit  seen [$];
  always @(posedge clk) if (out_valid) begin
    int k, vr, vi;
    k = -1;
    nout++;
    for (int i = 0; i < sj.size(); i++) if (sj[i] == int'(out_data.j)) k = i;
    vr = int'($signed(out_data.v.re));
    vi = int'($signed(out_data.v.im));
    checks++;
    if (k < 0 || seen[k]) begin
      failures++;
      if (failures < 10) $display("FAIL unexpected output j %0d (%0d,%0d)", out_data.j, vr, vi);
    end else begin
      real tol;
      seen[k] = 1;
      tol = 0.02 * $sqrt(sre[k] * sre[k] + sim[k] * sim[k]) + 24.0;
      if (fabs(vr - sre[k]) > tol || fabs(vi - sim[k]) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL j %0d v (%0d,%0d) exp (%f,%f)", sj[k], vr, vi, sre[k], sim[k]);
      end
    end
  end

  task automatic scene(input int k);
    real br [NSTAGES][LANES][1024], bi [NSTAGES][LANES][1024];
    int j, left;
    bit dup;
    sj.delete(); sre.delete(); sim.delete(); seen.delete();
    while (sj.size() < k) begin
      j = $urandom_range(0, N_FFT - 1);
      dup = 0;
      foreach (sj[i]) if (sj[i] == j) dup = 1;
      if (!dup) begin
        real a, p;
        a = 2000.0 + $urandom_range(0, 18000);
        p = PI2 * $urandom_range(0, 999) / 1000.0;
        sj.push_back(j); sre.push_back(a * $cos(p)); sim.push_back(a * $sin(p)); seen.push_back(0);
      end
    end
    for (int s = 0; s < NSTAGES; s++)
      for (int r = 0; r < LANES; r++)
        for (int b = 0; b < 1024; b++) begin br[s][r][b] = 0.0; bi[s][r][b] = 0.0; end
    foreach (sj[i])
      for (int s = 0; s < NSTAGES; s++)
        for (int r = 0; r < LANES; r++) begin
          real a;
          a = PI2 * real'((sj[i] * DELAY_DEF[r]) % N_FFT) / N_FFT;
          br[s][r][sj[i] % NI[s]] += sre[i] * $cos(a) - sim[i] * $sin(a);
          bi[s][r][sj[i] % NI[s]] += sre[i] * $sin(a) + sim[i] * $cos(a);
        end
    for (int s = 0; s < NSTAGES; s++)
      for (int r = 0; r < LANES; r++)
        for (int b = 0; b < 1024; b++) begin
          mem[s][r][b].re = DW'($rtoi($floor(br[s][r][b] + 0.5)) + int'($urandom_range(0, 4)) - 2);
          mem[s][r][b].im = DW'($rtoi($floor(bi[s][r][b] + 0.5)) + int'($urandom_range(0, 4)) - 2);
        end
    nout = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    left = 0;
    foreach (seen[i]) if (!seen[i]) left++;
    checks++;
    if (left != 0 || nout != k || 32'(found) != k || stuck) begin
      failures++;
      $display("FAIL scene %0d: %0d missing, %0d out, found %0d, stuck %0b, passes %0d", k, left, nout, found, stuck, iterations);
    end
    for (int s = 0; s < NSTAGES; s++)
      for (int b = 0; b < NI[s]; b++) begin
        longint e;
        e = 0;
        for (int r = 0; r < LANES; r++)
          e += longint'($signed(mem[s][r][b].re)) ** 2 + longint'($signed(mem[s][r][b].im)) ** 2;
        checks++;
        if (e >= longint'(cfg.t_noise)) begin
          failures++;
          if (failures < 20) $display("FAIL stage %0d bin %0d left with energy %0d", s, b, e);
        end
      end
  endtask

  initial begin
    cfg.t_noise  = EW'(1) << 20;
    cfg.max_iter = 8'd16;
    for (int r = 0; r < LANES; r++) cfg.delay[r] = DLYW'(DELAY_DEF[r]);
    for (int c = 0; c < NCLUST; c++) cfg.tau[c] = TAUW'(TAU_DEF[c]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    scene(10);
    scene(40);
    scene(80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
