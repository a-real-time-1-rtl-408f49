// Checks the sub-FFT stage.  A reduced instance (N 60, radices 4, 3, 5, two
// lanes) is loaded with random complex data through the load port, run, and
// every bin read through the access port (bin addressing) is compared with a
// floating-point DFT scaled by 512/N, the stage's output format.  The run
// must take sum(N/r) = 47 cycles of busy with one done pulse.  The raw access
// port is checked by writing and reading back words.  A full-size instance
// (N 864, radices 4, 4, 2, 3, 3, 3) is then loaded with a single complex tone
// of amplitude 200 (words are 20 bits: the sum over 864 samples must fit)
// and run: it must take 1728 cycles and put the tone in its bin.  Interface
// and timing are those of rtl/fft_stage.sv.
module fft_stage_tb;
  import ffast_pkg::*;
  localparam real PI2 = 6.283185307179586;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  // small instance
  localparam int N = 60, NL = 2, AW = $clog2(N);
  logic [NL-1:0] ld_en = '0;
  logic [AW-1:0] ld_addr [NL];
  cplx_t ld_data [NL], acc_rdata [NL], acc_wdata [NL];
  logic start = 0, busy, done, acc_raw = 0, acc_we = 0;
  logic [AW-1:0] acc_addr = '0;
  fft_stage #(.N(N), .NRAD(3), .RADIX('{4, 3, 5, 1, 1, 1, 1, 1}), .NL(NL)) dut (.*);

  // full-size instance
  localparam int NF = 864, AWF = $clog2(NF);
  logic [NL-1:0] f_ld_en = '0;
  logic [AWF-1:0] f_ld_addr [NL];
  cplx_t f_ld_data [NL], f_rdata [NL], f_wdata [NL];
  logic f_start = 0, f_busy, f_done;
  logic [AWF-1:0] f_addr = '0;
  fft_stage #(.N(NF), .NRAD(6), .RADIX('{4, 4, 2, 3, 3, 3, 1, 1}), .NL(NL)) dutf (
    .clk, .rst_n, .ld_en(f_ld_en), .ld_addr(f_ld_addr), .ld_data(f_ld_data),
    .start(f_start), .busy(f_busy), .done(f_done), .acc_addr(f_addr), .acc_raw(1'b0),
    .acc_rdata(f_rdata), .acc_we(1'b0), .acc_wdata(f_wdata));

  int xr [NL][N], xi [NL][N];
  int nb, nd;

  initial begin
    real sr, si, a;
    int yr, yi;
    for (int l = 0; l < NL; l++) begin acc_wdata[l] = '0; f_wdata[l] = '0; f_ld_addr[l] = '0; f_ld_data[l] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      for (int n = 0; n < N; n++) begin
        for (int l = 0; l < NL; l++) begin
          xr[l][n] = int'($urandom_range(0, 4000)) - 2000;
          xi[l][n] = int'($urandom_range(0, 4000)) - 2000;
          ld_addr[l] = AW'(n);
          ld_data[l].re = DW'(xr[l][n]);
          ld_data[l].im = DW'(xi[l][n]);
        end
        ld_en = '1;
        @(negedge clk);
      end
      ld_en = '0;
      start = 1;
      @(negedge clk) start = 0;
      nb = 0; nd = 0;
      while (busy) begin nb++; if (done) nd++; @(negedge clk); end
      if (done) nd++;
      @(negedge clk);
      checks++;
      if (nb != 47 || nd != 1) begin failures++; $display("FAIL busy %0d cycles, %0d done", nb, nd); end
      for (int b = 0; b < N; b++) begin
        acc_addr = AW'(b);
        #1;
        for (int l = 0; l < NL; l++) begin
          sr = 0.0; si = 0.0;
          for (int n = 0; n < N; n++) begin
            a = -PI2 * real'((n * b) % N) / N;
            sr += xr[l][n] * $cos(a) - xi[l][n] * $sin(a);
            si += xr[l][n] * $sin(a) + xi[l][n] * $cos(a);
          end
          sr = sr * 512.0 / N; si = si * 512.0 / N;
          yr = int'($signed(acc_rdata[l].re));
          yi = int'($signed(acc_rdata[l].im));
          checks++;
          if (fabs(yr - sr) > 48.0 || fabs(yi - si) > 48.0) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d bin %0d (%0d,%0d) exp (%f,%f)", l, b, yr, yi, sr, si);
          end
        end
      end
    end
    // raw access port write / read back
    acc_raw = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      acc_addr = AW'(i);
      for (int l = 0; l < NL; l++) begin acc_wdata[l].re = DW'(i * 7 + l); acc_wdata[l].im = DW'(-i); end
      acc_we = 1;
    end
    @(negedge clk) acc_we = 0;
    for (int i = 0; i < N; i++) begin
      acc_addr = AW'(i);
      #1;
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (int'($signed(acc_rdata[l].re)) != i * 7 + l || int'($signed(acc_rdata[l].im)) != -i) failures++;
      end
    end
    // full size: tone in bin 101 of amplitude 200
    for (int n = 0; n < NF; n++) begin
      a = PI2 * real'((101 * n) % NF) / NF;
      for (int l = 0; l < NL; l++) begin
        f_ld_addr[l] = AWF'(n);
        f_ld_data[l].re = DW'($rtoi($floor(200.0 * $cos(a) + 0.5)));
        f_ld_data[l].im = DW'($rtoi($floor(200.0 * $sin(a) + 0.5)));
      end
      f_ld_en = '1;
      @(negedge clk);
    end
    f_ld_en = '0;
    f_start = 1;
    @(negedge clk) f_start = 0;
    nb = 0;
    while (f_busy) begin nb++; @(negedge clk); end
    checks++;
    if (nb != 1728) begin failures++; $display("FAIL full-size busy %0d cycles", nb); end
    for (int b = 0; b < NF; b++) begin
      f_addr = AWF'(b);
      #1;
      yr = int'($signed(f_rdata[0].re));
      yi = int'($signed(f_rdata[0].im));
      checks++;
      if (b == 101 ? (fabs(yr - 102400.0) > 150.0 || fabs(yi) > 150.0) : (fabs(yr) > 64.0 || fabs(yi) > 64.0)) begin
        failures++;
        if (failures < 20) $display("FAIL full bin %0d (%0d,%0d)", b, yr, yi);
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
