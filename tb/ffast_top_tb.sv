// End-to-end test of the FFAST analyzer at its full size (21600 points,
// 864/800/675-point sub-FFTs, 18 ADC lanes).
//
// The input is a sum of four on-grid real tones (1188, 9988, 6588, 2212)
// whose locations collide in several stages (e.g. 1188, 9988 and 6588 share a
// bin of the 800-point stage, 1188 and 6588 one of the 675-point stage), so
// resolving them needs peeling across stages and a second peeling pass.  The test
//  1. runs one frame in calibration mode and checks raw lane samples read
//     through the RAW registers against an independent model of the SAR
//     conversion (identity calibration table);
//  2. programs all 18 calibration tables with the inverse of the slices'
//     reduced-radix weights;
//  3. runs one frame in normal mode and checks that the output FIFO holds
//     every tone and its mirror image with the expected complex value, and
//     nothing else.
// It counts how often each mechanism occurred (calibration stop, table
// writes, frame windows, zero-bin removal, singletons, multi-signal bins put
// back, peeling into other stages, more than one pass) and fails any that
// never did.  The sub-FFT phase must take sum(n_i/r) = 1728 cycles.
module ffast_top_tb;
  import ffast_pkg::*;

  localparam int NT = 4;
  localparam int   TF [NT] = '{1188, 9988, 6588, 2212};
  localparam real  TA [NT] = '{5000.0, 4000.0, 3500.0, 3000.0};
  localparam real  TP [NT] = '{0.3, 1.1, -0.7, 2.0};
  localparam int   WGT [9] = '{15360, 7680, 3840, 2048, 1024, 512, 256, 128, 64};
  localparam real  PI2 = 6.283185307179586;

  logic clk_ref = 0, clk = 0, rst_ref_n = 0, rst_n = 0;
  logic signed [15:0] vin;
  logic [7:0]  scr_addr = '0;
  logic        scr_we = 0, scr_re = 0;
  logic [63:0] scr_wdata = '0, scr_rdata;
  logic        done_irq;

  always #132  clk_ref = ~clk_ref;   // ~3.78 GHz
  always #1250 clk     = ~clk;       // 400 MHz

  ffast_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------- stimulus
  real xs [N_FFT];
  int  tcount;
  initial begin
    for (int t = 0; t < N_FFT; t++) begin
      xs[t] = 0.0;
      for (int k = 0; k < NT; k++) xs[t] += TA[k] * $cos(PI2 * TF[k] * t / N_FFT + TP[k]);
    end
  end
  always @(posedge clk_ref or negedge rst_ref_n)
    if (!rst_ref_n) tcount <= 0;
    else tcount <= (tcount == N_FFT - 1) ? 0 : tcount + 1;
  assign vin = 16'($rtoi(xs[tcount] + (xs[tcount] >= 0 ? 0.5 : -0.5)));

  // Independent model of the SAR search and its ideal reconstruction.
  function automatic int sar_code(int v);
    int res = v, c = 0;
    for (int k = 0; k < 9; k++) begin
      c = c * 2 + (res >= 0);
      res = (res >= 0) ? res - WGT[k] : res + WGT[k];
    end
    return c;
  endfunction
  function automatic int cal_entry(int c);
    real s = 0.0;
    int  e;
    for (int k = 0; k < 9; k++) s += (((c >> (8 - k)) & 1) ? 1.0 : -1.0) * WGT[k];
    e = $rtoi($floor(s / 128.0 + 256.5));
    return e < 0 ? 0 : (e > 511 ? 511 : e);
  endfunction

  // ----------------------------------------------------------- SCR access
  task automatic scr_write(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk);
    scr_addr = a; scr_wdata = d; scr_we = 1;
    @(negedge clk);
    scr_we = 0;
  endtask
  task automatic scr_read(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk);
    scr_addr = a; scr_re = 1;
    #1 d = scr_rdata;
    @(negedge clk);
    scr_re = 0;
  endtask

  // ------------------------------------------------------ mechanism counts
  int n_win = 0, n_zero = 0, n_single = 0, n_multi = 0, n_peel = 0, n_calstop = 0, n_calwr = 0;
  int n_fifo = 0, n_busy0 = 0;
  logic win_q = 0;
  always @(posedge clk_ref) begin
    win_q <= dut.window;
    if (dut.window && !win_q) n_win++;
  end
  always @(posedge clk) begin
    if (dut.u_peel.st == dut.u_peel.P_EVAL && dut.u_peel.en[dut.u_peel.cur] < dut.cfg.t_noise) n_zero++;
    if (dut.u_peel.u_est.done && dut.u_peel.st == dut.u_peel.P_WAIT) begin
      if (dut.u_peel.u_est.is_single) n_single++; else n_multi++;
    end
    if (dut.u_peel.st == dut.u_peel.P_PEEL) n_peel++;
    if (dut.cal_we) n_calwr++;
    if (|dut.f_rd) n_fifo++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic wait_done(output int cycles);
    int c0 = cyc;
    do @(posedge clk); while (!done_irq);
    cycles = cyc - c0;
  endtask

  // ------------------------------------------------------------- the test
  logic [63:0] d;
  int cycles, fft_cycles, fft_c0, passes;
  always @(posedge clk) begin
    if (dut.fft_start[0]) fft_c0 = cyc;
    if (dut.p_start) fft_cycles = cyc - fft_c0;
    if (dut.g_st[0].u_fft.busy) n_busy0++;
  end

  initial begin
    #3000 rst_ref_n = 1;
    #2000 rst_n = 1;
    repeat (600) @(posedge clk);           // calibration tables self-initialize

    // 1. calibration mode: capture only, read raw lane data
    scr_write(8'h00, 64'h2);
    scr_write(8'h00, 64'h3);
    wait_done(cycles);
    n_calstop++;
    scr_read(8'h01, d);
    check(d[5:3] == 3'd4 && d[1], "calibration run did not stop after capture");
    for (int s = 0; s < NSTAGES; s++) begin
      for (int i = 0; i < 8; i++) begin
        int m;
        m = (i * 97 + s * 31) % NI[s];
        scr_write(8'h08, 64'({2'(s), 10'(m)}));
        for (int r = 0; r < LANES; r++) begin
          int t, expc;
          cplx_t w;
          t = DELAY_DEF[r] + m * SUBF[s];
          expc = sar_code($rtoi(xs[t] + (xs[t] >= 0 ? 0.5 : -0.5))) - 256;
          scr_read(8'h09 + 8'(r), d);
          w = d[39:0];
          check(int'(w.re) == expc && w.im == 0,
                $sformatf("raw stage %0d lane %0d sample %0d: %0d, expected %0d", s, r, m, w.re, expc));
        end
      end
    end

    // 2. program the calibration tables
    for (int s = 0; s < NSTAGES; s++)
      for (int r = 0; r < LANES; r++)
        for (int c = 0; c < 512; c++)
          scr_write(8'h07, 64'({2'(s), 3'(r), 9'(c), 9'(cal_entry(c))}));

    // 3. normal run
    scr_write(8'h00, 64'h0);
    scr_write(8'h00, 64'h1);
    wait_done(cycles);
    $display("normal run: %0d core cycles from start to done (sub-FFTs %0d, busy %0d)", cycles, fft_cycles, n_busy0);
    check(fft_cycles >= 1728 && fft_cycles <= 1732, $sformatf("sub-FFT phase took %0d cycles", fft_cycles));
    scr_read(8'h01, d);
    $display("status: passes=%0d found=%0d fifo=%0d stuck=%0d", d[15:8], d[30:16], d[42:32], d[2]);
    check(!d[2], "peeling reported stuck");
    passes = int'(d[15:8]);
    begin
      bit hit [2*NT];
      int nout = 0;
      for (int k = 0; k < 2*NT; k++) hit[k] = 0;
      forever begin
        peel_out_t o;
        scr_read(8'h06, d);
        if (!d[63]) break;
        o = d[54:0];
        nout++;
        begin
          bit known;
          known = 0;
          for (int k = 0; k < 2*NT; k++) begin
            int  f;
            real a, ph;
            f  = (k < NT) ? TF[k] : N_FFT - TF[k-NT];
            a  = (k < NT) ? TA[k] : TA[k-NT];
            ph = (k < NT) ? TP[k] : -TP[k-NT];
            if (int'(o.j) == f) begin
              real er, ei, dr, di;
              int  vr, vi;
              vr = int'($signed(d[39:20]));
              vi = int'($signed(d[19:0]));
              known  = 1;
              hit[k] = 1;
              er = 2.0 * a * $cos(ph);   // A/2 codes, 9 fractional bits, 1/128 code per vin unit
              ei = 2.0 * a * $sin(ph);
              dr = real'(vr) - er;
              di = real'(vi) - ei;
              check($sqrt(dr*dr + di*di) < 0.05 * 2.0 * a + 64.0,
                    $sformatf("j=%0d value (%0d,%0d), expected (%0.0f,%0.0f)", f, vr, vi, er, ei));
            end
          end
          check(known, $sformatf("unexpected output j=%0d (%0d,%0d)", o.j, $signed(d[39:20]), $signed(d[19:0])));
        end
      end
      for (int k = 0; k < 2*NT; k++) check(hit[k], $sformatf("tone %0d not recovered", k));
      $display("outputs read: %0d", nout);
    end

    $display("mechanisms: windows=%0d calstop=%0d calwrites=%0d fifo_pops=%0d zeroton_drops=%0d singletons=%0d multitons=%0d peels=%0d",
             n_win, n_calstop, n_calwr, n_fifo, n_zero, n_single, n_multi, n_peel);
    check(n_win >= 2, "frame window never opened twice");
    check(n_calstop >= 1, "calibration stop never happened");
    check(n_calwr == 18 * 512, "calibration writes missing");
    check(n_fifo > 0, "no lane FIFO traffic");
    check(n_single >= 2 * NT, "too few singletons");
    check(n_multi >= 1, "no multi-signal bin was put back");
    check(n_peel >= 2 * NT, "peeling into other stages missing");
    check(n_zero >= 1, "no bin became empty through peeling");
    check(passes >= 1, "no peeling pass completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
