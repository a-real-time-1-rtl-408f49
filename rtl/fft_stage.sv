// One sub-FFT stage: LANES memory-based, in-place, mixed-radix
// decimation-in-frequency FFTs of length N that share one controller.
//
// Each lane owns a memory of N complex words and one butterfly (mr_butterfly).
// The controller walks the radix sequence RADIX[0..NRAD-1] (product N).  In
// pass s with block size M and stride L = M / r, it visits every block base and
// offset k < L, reads the r points base + k + m*L, and writes the butterfly
// outputs back to the same addresses, one butterfly per lane per cycle.  The
// twiddle for output q is W_N^(k*q*N/M), taken from a cosine/sine table that
// is computed at elaboration.  The last pass also normalizes: instead of a
// divide by N the result is multiplied by 512/N and read with its binary point
// nine places further left, so the stored word is the DFT divided by N with
// nine fractional bits.  Outputs end up in mixed-radix digit-reversed order; a
// table, also computed at elaboration, maps a bin b to its memory address.
//
// Ports: ld_* writes one sample per lane per cycle (frame capture, natural
// order); start begins a transform, busy is high for sum_s(N/r_s) cycles and
// done pulses once at the end.  The access port reads (combinationally) and
// writes all lanes at one address, given as a bin (acc_raw = 0) or as a raw
// memory address (acc_raw = 1); it is for the peeling backend and for reading
// captured ADC data, and must not be used while busy.
// The memory organisation follows the analyzer; the natural-order input (no
// bank interleaving, every lane memory read r times per cycle) and the single
// butterfly per cycle are this implementation's simplifications.
module fft_stage
  import ffast_pkg::*;
#(
  parameter int N          = 864,
  parameter int NRAD       = 6,
  parameter int RADIX [8]  = '{4, 4, 2, 3, 3, 3, 1, 1},
  parameter int NL         = LANES,
  parameter int AW         = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  // frame load
  input  logic [NL-1:0]  ld_en,
  input  logic [AW-1:0]  ld_addr [NL],
  input  cplx_t          ld_data [NL],
  // transform control
  input  logic           start,
  output logic           busy,
  output logic           done,
  // shared access port
  input  logic [AW-1:0]  acc_addr,
  input  logic           acc_raw,
  output cplx_t          acc_rdata [NL],
  input  logic           acc_we,
  input  cplx_t          acc_wdata [NL]
);
  localparam int TWW = 18;
  localparam int FB  = TWW - 2;

  // ---------------------------------------------------------------- tables
  function automatic int blk_size(int s);   // M before pass s
    int m = N;
    for (int i = 0; i < s; i++) m = m / RADIX[i];
    return m;
  endfunction

  function automatic int bin_addr(int b);   // address of output bin b
    int a = 0, rem = b;
    for (int s = 0; s < NRAD; s++) begin
      a   += (rem % RADIX[s]) * (blk_size(s) / RADIX[s]);
      rem  = rem / RADIX[s];
    end
    return a;
  endfunction

  function automatic logic signed [2*TWW-1:0] twid(int m);
    real a;
    logic signed [TWW-1:0] re, im;
    a  = -2.0 * 3.141592653589793 * real'(m) / real'(N);
    re = TWW'(int'($floor($cos(a) * (2.0 ** FB) + 0.5)));
    im = TWW'(int'($floor($sin(a) * (2.0 ** FB) + 0.5)));
    return {re, im};
  endfunction

  logic signed [2*TWW-1:0] tw_rom [N];
  logic [AW-1:0]           bin_rom [N];
  for (genvar m = 0; m < N; m++) begin : g_rom
    assign tw_rom[m]  = twid(m);
    assign bin_rom[m] = AW'(bin_addr(m));
  end

  localparam int NORMQ = (512 * 65536 + N / 2) / N;   // round(2^16 * 512/N)

  // ------------------------------------------------------------ controller
  logic [2:0]      pass;
  logic [AW-1:0]   k;       // offset within block, < L
  logic [AW-1:0]   base;    // block base
  logic [AW-1:0]   mblk, stride;
  logic [2:0]      r;
  logic            last_pass, last_k, last_blk;

  always_comb begin
    mblk   = '0;
    stride = '0;
    r      = 3'd1;
    for (int s = 0; s < 8; s++) begin
      if (s < NRAD && pass == 3'(s)) begin
        mblk   = AW'(blk_size(s));
        stride = AW'(blk_size(s) / RADIX[s]);
        r      = 3'(RADIX[s]);
      end
    end
  end

  assign last_k    = (k == stride - 1'b1);
  assign last_blk  = (32'(base) + 32'(mblk) >= 32'(N));
  assign last_pass = (pass == 3'(NRAD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      pass <= '0;
      k    <= '0;
      base <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          pass <= '0;
          k    <= '0;
          base <= '0;
        end
      end else if (!last_k) begin
        k <= k + 1'b1;
      end else begin
        k <= '0;
        if (!last_blk) begin
          base <= base + mblk;
        end else begin
          base <= '0;
          if (last_pass) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            pass <= pass + 1'b1;
          end
        end
      end
    end
  end

  // Addresses and twiddles of the current butterfly.
  logic [AW-1:0]           pt_addr [5];
  logic signed [2*TWW-1:0] tw      [5];
  logic [AW:0]             tw_idx;
  always_comb begin
    for (int m = 0; m < 5; m++) begin
      pt_addr[m] = AW'(32'(base) + 32'(k) + m * 32'(stride));
      tw_idx     = (AW+1)'((32'(k) * m * N) / 32'(mblk == 0 ? 1 : mblk));
      tw[m]      = tw_rom[(m < int'(r)) ? AW'(tw_idx) : '0];
    end
  end

  // ----------------------------------------------------------------- lanes
  logic [AW-1:0] acc_a;
  assign acc_a = acc_raw ? acc_addr : bin_rom[acc_addr];

  for (genvar l = 0; l < NL; l++) begin : g_lane
    cplx_t mem [N];
    cplx_t bx [5];
    cplx_t by [5];
    cplx_t bn [5];

    always_comb begin
      for (int m = 0; m < 5; m++) begin
        bx[m] = (m < int'(r)) ? mem[pt_addr[m]] : '0;
      end
    end

    mr_butterfly #(.TWW(TWW)) u_bf (.radix(r), .x(bx), .tw(tw), .y(by));

    // Normalization on the last pass: multiply by 512/N (Q0.16).
    logic signed [DW+17:0] pr [5], pi [5];
    always_comb begin
      for (int m = 0; m < 5; m++) begin
  
        pr[m] = ((DW+18)'(by[m].re) * (DW+18)'(NORMQ) + (DW+18)'(32768)) >>> 16;
        pi[m] = ((DW+18)'(by[m].im) * (DW+18)'(NORMQ) + (DW+18)'(32768)) >>> 16;
        bn[m] = last_pass ? '{re: DW'(pr[m]), im: DW'(pi[m])} : by[m];
      end
    end

    always_ff @(posedge clk) begin
      if (busy) begin
        for (int m = 0; m < 5; m++) begin
          if (m < int'(r)) mem[pt_addr[m]] <= bn[m];
        end
      end else if (acc_we) begin
        mem[acc_a] <= acc_wdata[l];
      end else if (ld_en[l]) begin
        mem[ld_addr[l]] <= ld_data[l];
      end
    end

    assign acc_rdata[l] = mem[acc_a];
  end

  function automatic int radix_product();
    int p = 1;
    for (int s = 0; s < NRAD; s++) p *= RADIX[s];
    return p;
  endfunction
  initial assert (radix_product() == N) else $error("fft_stage: radices do not multiply to N");

  // A transform must not be restarted while one is running.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("fft_stage: start while busy");
endmodule
