// Singleton estimator: decides whether one sub-FFT bin holds exactly one
// signal and, if so, where (j) and how large (v) it is.
//
// The bin's six observations Y[r] come from the same bin b of the six delayed
// lanes of stage STAGE.  A lane delayed by delay[r] samples sees a signal at
// location j turned by 2*pi*j*delay[r]/n.  The estimator works in steps:
//  1. Six vectoring CORDICs give each observation's phase; the phase
//     difference of lane pair s (delay delta tau[s]) estimates <w*tau[s]>_2pi.
//  2. Successive refinement: w starts at theta_0/tau_0; for s = 1, 2 the
//     residue e = wrap(w*tau[s] - theta_s) is removed as w -= e/tau[s].  Each
//     step keeps the candidate of theta_s/tau[s] nearest the previous estimate,
//     so the uncertainty shrinks with the largest delta (7 by default).
//  3. j_est = round(w*n), snapped to the nearest j with j = b (mod n_i).
//  4. Lane angles 2*pi*<j*delay[r]>_n / n (Barrett reduction of j*delay[r]),
//     six rotation CORDICs turn each observation back by its angle, the CORDIC
//     gain is removed and the six results are averaged: v.
//  5. The residue sum_r |Y'[r] - v|^2 (which equals |Y - v*a_j|^2) is compared
//     with t_noise: below it the bin is a singleton.
// Interface: start with the inputs valid and held; done pulses with the
// results, which stay valid until the next start.  ang[] gives the lane angles
// for peeling.  Latency is 2*(ITER+1) + 6 cycles; one bin at a time.
// The method follows the analyzer; the sequential (not pipelined) schedule,
// integer sample delays and the fixed-point formats are this implementation's.
module singleton_estimator
  import ffast_pkg::*;
#(
  parameter int ITER = 22
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [1:0]                stage,
  input  logic [BINW-1:0]           b,
  input  cplx_t                     y [LANES],
  input  logic [LANES-1:0][DLYW-1:0]  delay,
  input  logic [NCLUST-1:0][TAUW-1:0] tau,
  input  logic [EW-1:0]             t_noise,
  output logic                      done,
  output logic                      is_single,
  output logic [JW-1:0]             j,
  output cplx_t                     v,
  output logic [ANGW-1:0]           ang [LANES],
  output logic [EW-1:0]             resid
);
  localparam int  XW    = DW + 2;
  localparam longint INVK  = 39797;   // round(2^16 / 1.646760258)
  localparam longint INV6  = 10923;   // round(2^16 / 6)
  localparam longint ANGSC = ((64'd1 << (ANGW + 16)) + 64'(N_FFT / 2)) / 64'(N_FFT);

  function automatic longint recip(int d);   // round(2^32 / d)
    return (d == 0) ? 0 : ((64'd1 << 32) + 64'(d / 2)) / 64'(d);
  endfunction

  typedef enum logic [2:0] {S_IDLE, S_PH, S_REF, S_J, S_ANG, S_ROT, S_AVG, S_RES} st_t;
  st_t st;

  // ---------------------------------------------------------------- CORDICs
  logic                    c_go, c_rot;
  logic [ANGW-1:0]         c_th   [LANES];
  logic [LANES-1:0]        c_ov;
  logic signed [XW-1:0]    c_ox   [LANES];
  logic signed [XW-1:0]    c_oy   [LANES];
  logic [ANGW-1:0]         c_oth  [LANES];
  logic [ANGW-1:0]         ang_c  [LANES];   // lane angles (step 4)

  for (genvar r = 0; r < LANES; r++) begin : g_cor
    cordic #(.W(DW), .AW(ANGW), .ITER(ITER)) u_c (
      .clk, .rst_n, .in_valid(c_go), .in_rot(c_rot),
      .in_x(y[r].re), .in_y(y[r].im), .in_th(c_th[r]),
      .out_valid(c_ov[r]), .out_x(c_ox[r]), .out_y(c_oy[r]), .out_th(c_oth[r]));
  end

  assign c_go  = (st == S_IDLE && start) || (st == S_ANG);
  assign c_rot = (st == S_ANG);
  always_comb begin
    for (int r = 0; r < LANES; r++) c_th[r] = (st == S_ANG) ? ANGW'(-ang_c[r]) : '0;
  end

  // ------------------------------------------------ refinement of w (step 2)
  logic [ANGW-1:0] ph [LANES];
  logic [ANGW-1:0] theta [NCLUST];
  logic [ANGW-1:0] w_ref;
  always_comb begin
    logic [ANGW+31:0]        w0;
    logic signed [ANGW-1:0]  e;
    logic signed [ANGW+33:0] corr;
    for (int s = 0; s < NCLUST; s++) theta[s] = ph[2*s+1] - ph[2*s];
    w0    = (ANGW+32)'(theta[0]) * (ANGW+32)'(recip(32'(tau[0])));
    w_ref = ANGW'((64'(w0) + (64'd1 << 31)) >> 32);
    for (int s = 1; s < NCLUST; s++) begin
      e     = $signed(ANGW'(w_ref * tau[s]) - theta[s]);
      corr  = (ANGW+34)'(e) * $signed((ANGW+34)'(recip(32'(tau[s]))));
      w_ref = w_ref - ANGW'((corr + $signed((ANGW+34)'(64'd1 << 31))) >>> 32);
    end
  end

  // ------------------------------------------------------ location (step 3)
  logic [ANGW-1:0] w;
  logic [JW-1:0]   j_snap;
  always_comb begin
    logic [ANGW+JW:0] jw;
    logic [JW:0]      jest, t;
    logic [JW+33:0]   kq;
    logic [JW+10:0]   jj;
    logic [31:0]      ni;
    longint           rni;
    ni  = 32'(NI[0]);
    rni = recip(NI[0]);
    for (int s = 1; s < NSTAGES; s++) if (stage == 2'(s)) begin ni = 32'(NI[s]); rni = recip(NI[s]); end
    jw   = (ANGW+JW+1)'(w) * (ANGW+JW+1)'(N_FFT) + (ANGW+JW+1)'(1 << (ANGW-1));
    jest = (JW+1)'(jw >> ANGW);
    if (32'(jest) >= N_FFT) jest = jest - (JW+1)'(N_FFT);
    t    = (jest >= (JW+1)'(b)) ? jest - (JW+1)'(b) : jest + (JW+1)'(N_FFT) - (JW+1)'(b);
    kq   = ((JW+34)'(t) * (JW+34)'(rni) + (JW+34)'(64'd1 << 31)) >> 32;
    jj   = (JW+11)'(b) + (JW+11)'(kq) * (JW+11)'(ni);
    if (32'(jj) >= N_FFT) jj = jj - (JW+11)'(N_FFT);
    j_snap = JW'(jj);
  end

  // -------------------------------------------------- lane angles (step 4)
  logic [JW-1:0]   jd_mod [LANES];
  for (genvar r = 0; r < LANES; r++) begin : g_ang
    logic [JW+DLYW-1:0] jd;
    assign jd = (JW+DLYW)'(j) * (JW+DLYW)'(delay[r]);
    barrett_mod #(.N(N_FFT), .XW(JW+DLYW)) u_mod (.x(jd), .r(jd_mod[r]));
    logic [JW+ANGW+16:0] pa;
    assign pa       = (JW+ANGW+17)'(jd_mod[r]) * (JW+ANGW+17)'(ANGSC) + (JW+ANGW+17)'(1 << 15);
    assign ang_c[r] = ANGW'(pa >> 16);
  end

  // ---------------------------------------------- average and residue (5)
  cplx_t yd [LANES];
  logic signed [DW+3:0] sre, sim;
  always_comb begin
    sre = '0;
    sim = '0;
    for (int r = 0; r < LANES; r++) begin
      sre += (DW+4)'(yd[r].re);
      sim += (DW+4)'(yd[r].im);
    end
  end

  logic [EW-1:0] res_c;
  always_comb begin
    logic signed [DW:0] dr, di;
    res_c = '0;
    for (int r = 0; r < LANES; r++) begin
      dr    = (DW+1)'(yd[r].re) - (DW+1)'(v.re);
      di    = (DW+1)'(yd[r].im) - (DW+1)'(v.im);
      res_c += EW'(dr * dr) + EW'(di * di);
    end
  end

  function automatic logic signed [DW-1:0] scale(logic signed [XW-1:0] a, longint k);
    logic signed [XW+17:0] p;
    p = ((XW+18)'(a) * (XW+18)'(k) + (XW+18)'(32768)) >>> 16;
    return DW'(p);
  endfunction

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      done      <= 1'b0;
      is_single <= 1'b0;
      j         <= '0;
      w         <= '0;
      v         <= '0;
      resid     <= '0;
      for (int r = 0; r < LANES; r++) begin
        ph[r]  <= '0;
        ang[r] <= '0;
        yd[r]  <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) st <= S_PH;
        S_PH: if (c_ov[0]) begin
          for (int r = 0; r < LANES; r++) ph[r] <= c_oth[r];
          st <= S_REF;
        end
        S_REF: begin
          w  <= w_ref;
          st <= S_J;
        end
        S_J: begin
          j  <= j_snap;
          st <= S_ANG;
        end
        S_ANG: begin
          for (int r = 0; r < LANES; r++) ang[r] <= ang_c[r];
          st <= S_ROT;
        end
        S_ROT: if (c_ov[0]) begin
          for (int r = 0; r < LANES; r++) begin
            yd[r].re <= scale(c_ox[r], INVK);
            yd[r].im <= scale(c_oy[r], INVK);
          end
          st <= S_AVG;
        end
        S_AVG: begin
          v.re <= DW'(((DW+21)'(sre) * (DW+21)'(INV6) + (DW+21)'(32768)) >>> 16);
          v.im <= DW'(((DW+21)'(sim) * (DW+21)'(INV6) + (DW+21)'(32768)) >>> 16);
          st   <= S_RES;
        end
        S_RES: begin
          resid     <= res_c;
          is_single <= res_c < t_noise;
          done      <= 1'b1;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
