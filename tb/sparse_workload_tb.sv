// Sparse-spectrum workloads for the reconstruction backend at full size.
// The peeling decoder (all three stages, full circular buffers) and the
// 1944-entry output FIFO are run on ideal aliased sub-FFT spectra of random
// sparse inputs at the sparsities the analyzer is characterized at: 0.35 %
// (76 lines), 0.79 % (171 lines) and 3.2 % (691 lines) of the 21600 bins.
// Each line has a random location, amplitude (2000..20000) and phase; the
// lane memories hold the folded sums with the six lane phase turns and a
// little rounding noise, exactly what the sub-FFTs produce for such an input.
// For every workload the test requires: no FIFO overflow, no false positives
// (every record matches a line, once, exact j, value within 2 % + 24), and a
// recovered fraction of at least 99 % below 1 % sparsity and 95 % at 3.2 %.
// It prints the decoding time in core cycles and the number of peeling
// passes.  Interfaces as in rtl/peeling_decoder.sv and rtl/sync_fifo.sv.
module sparse_workload_tb;
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
  peeling_decoder #(.ITER(22)) u_peel (.*);

  logic f_clear = 0, f_pop = 0, f_empty, f_full;
  logic [54:0] f_rd;
  logic [10:0] f_count;
  logic [15:0] f_ovf;
  sync_fifo #(.DEPTH(1944), .W(55), .CW(11)) u_fifo (
    .clk, .rst_n, .clear(f_clear), .push(out_valid), .wr_data(out_data), .pop(f_pop),
    .rd_data(f_rd), .count(f_count), .empty(f_empty), .full(f_full), .overflow(f_ovf));

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

  int checks = 0, failures = 0;
  int sj [$];
  real sre [$], sim [$];
  int idx [N_FFT];
  bit seen [$];
  real br [NSTAGES][LANES][1024], bi [NSTAGES][LANES][1024];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic workload(input string name, input int k, input real min_frac);
    int j, rec, fp, cyc;
    peel_out_t o;
    sj.delete(); sre.delete(); sim.delete(); seen.delete();
    for (int i = 0; i < N_FFT; i++) idx[i] = -1;
    while (sj.size() < k) begin
      j = $urandom_range(0, N_FFT - 1);
      if (idx[j] < 0) begin
        real a, p;
        a = 2000.0 + $urandom_range(0, 18000);
        p = PI2 * $urandom_range(0, 999) / 1000.0;
        idx[j] = sj.size();
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
    @(negedge clk) f_clear = 1;
    @(negedge clk) begin f_clear = 0; start = 1; end
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(f_ovf == 0, $sformatf("%s: output FIFO overflowed", name));
    rec = 0; fp = 0;
    while (!f_empty) begin
      int i, vr, vi;
      real tol;
      o = peel_out_t'(f_rd);
      i = idx[o.j];
      vr = int'($signed(o.v.re)); vi = int'($signed(o.v.im));
      if (i < 0 || seen[i]) fp++;
      else begin
        seen[i] = 1;
        tol = 0.02 * $sqrt(sre[i] * sre[i] + sim[i] * sim[i]) + 24.0;
        if (fabs(vr - sre[i]) > tol || fabs(vi - sim[i]) > tol) fp++;
        else rec++;
      end
      @(negedge clk) f_pop = 1;
      @(negedge clk) f_pop = 0;
    end
    $display("%s: %0d lines, %0d recovered, %0d wrong records, %0d cycles, %0d passes, stuck %0b",
             name, k, rec, fp, cyc, iterations, stuck);
    check(fp == 0, $sformatf("%s: %0d wrong records", name, fp));
    check(real'(rec) >= min_frac * k, $sformatf("%s: only %0d of %0d recovered", name, rec, k));
  endtask

  initial begin
    cfg.t_noise  = EW'(1) << 20;
    cfg.max_iter = 8'd16;
    for (int r = 0; r < LANES; r++) cfg.delay[r] = DLYW'(DELAY_DEF[r]);
    for (int c = 0; c < NCLUST; c++) cfg.tau[c] = TAUW'(TAU_DEF[c]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    workload("0.35% sparsity", 76, 0.99);
    workload("0.79% sparsity", 171, 0.99);
    workload("3.2% sparsity", 691, 0.95);
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
