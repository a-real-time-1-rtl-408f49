// Peeling reconstruction backend.
//
// Works on the three sub-FFT memories (six lanes each) through their access
// ports after the transforms finish.
//  * Scan: every bin b of every stage whose energy sum_r |Y[r]|^2 reaches
//    t_noise is entered into that stage's circular buffer (CB); the rest hold
//    only noise and are never looked at again.  One bin per stage per cycle.
//  * Peeling passes: stage by stage, each location present in the CB at the
//    start of the stage's turn is popped and its bin read.  A bin that has
//    fallen below t_noise is dropped.  Otherwise the singleton estimator runs.
//    A singleton's bin is zeroed, (j, v) goes to the output FIFO, and its
//    contribution v*a_j is peeled from bin j mod n_l of each other stage l
//    (set to zero instead if that bin is below t_noise); a rotation CORDIC per
//    lane forms v*a_j[r].  A multi-signal bin is pushed back into the CB.
//  * Termination: after a stage whose CB is empty, after a pass in which no
//    CB length changed, or after max_iter passes (stuck is then set if
//    locations remain).
// Interface: start (with cfg held) begins; busy stays high until done pulses.
// The access ports are combinational reads with a write in the same cycle.
// The algorithm (early termination, write-back of unresolved bins, peeling
// with the shared lane delays) follows the analyzer.  This implementation
// handles one bin at a time and waits for each estimate, so the
// read-before-update hazard of a stall-free pipeline cannot occur.
module peeling_decoder
  import ffast_pkg::*;
#(
  parameter int ITER = 22
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  peel_cfg_t            cfg,
  output logic                 busy,
  output logic                 done,
  output logic                 stuck,
  output logic [7:0]           iterations,
  output logic [JW-1:0]        found,
  // sub-FFT memory access (bin addressing)
  output logic [BINW-1:0]      acc_addr  [NSTAGES],
  input  cplx_t                acc_rdata [NSTAGES][LANES],
  output logic [NSTAGES-1:0]   acc_we,
  output cplx_t                acc_wdata [NSTAGES][LANES],
  // output FIFO
  output logic                 out_valid,
  output peel_out_t            out_data
);
  localparam int XW = DW + 2;
  localparam longint INVK = 39797;

  typedef enum logic [3:0] {
    P_IDLE, P_SCAN, P_ITER, P_STG, P_POP, P_EVAL, P_WAIT, P_PROT, P_PEEL, P_NEXT, P_STGEND, P_ITEREND
  } pst_t;
  pst_t st;

  logic [1:0]      cur;
  logic [BINW-1:0] cur_b, scan_b;
  logic [BINW:0]   remain;
  logic            changed;

  function automatic logic [EW-1:0] energy(cplx_t yv [LANES]);
    logic [EW-1:0] e = '0;
    for (int r = 0; r < LANES; r++)
      e += EW'(yv[r].re * yv[r].re) + EW'(yv[r].im * yv[r].im);
    return e;
  endfunction

  logic [EW-1:0] en [NSTAGES];
  always_comb for (int s = 0; s < NSTAGES; s++) en[s] = energy(acc_rdata[s]);

  // ------------------------------------------------------------------ CBs
  logic [NSTAGES-1:0] cb_push, cb_pop, cb_empty, cb_clear;
  logic [BINW-1:0]    cb_wdata [NSTAGES];
  logic [BINW-1:0]    cb_rdata [NSTAGES];
  logic [BINW:0]      cb_count [NSTAGES];
  for (genvar s = 0; s < NSTAGES; s++) begin : g_cb
    logic cb_full;
    circular_buffer #(.DEPTH(NI[s]), .W(BINW), .CW(BINW+1)) u_cb (
      .clk, .rst_n, .clear(cb_clear[s]), .push(cb_push[s]), .wr_data(cb_wdata[s]),
      .pop(cb_pop[s]), .rd_data(cb_rdata[s]), .count(cb_count[s]),
      .empty(cb_empty[s]), .full(cb_full));
  end

  // ------------------------------------------------------------ estimator
  logic            est_start, est_done, est_single;
  logic [JW-1:0]   est_j;
  cplx_t           est_v;
  logic [ANGW-1:0] est_ang [LANES];
  logic [EW-1:0]   est_resid;
  cplx_t           cur_y [LANES];
  assign cur_y = acc_rdata[cur];

  singleton_estimator #(.ITER(ITER)) u_est (
    .clk, .rst_n, .start(est_start), .stage(cur), .b(cur_b), .y(cur_y),
    .delay(cfg.delay), .tau(cfg.tau), .t_noise(cfg.t_noise),
    .done(est_done), .is_single(est_single), .j(est_j), .v(est_v),
    .ang(est_ang), .resid(est_resid));

  // -------------------------------------------- v * a_j per lane (peeling)
  logic                 pr_go;
  logic [LANES-1:0]     pr_ov;
  logic signed [XW-1:0] pr_x [LANES];
  logic signed [XW-1:0] pr_y [LANES];
  cplx_t                va [LANES];
  for (genvar r = 0; r < LANES; r++) begin : g_pr
    logic [ANGW-1:0] pr_th;
    cordic #(.W(DW), .AW(ANGW), .ITER(ITER)) u_c (
      .clk, .rst_n, .in_valid(pr_go), .in_rot(1'b1),
      .in_x(est_v.re), .in_y(est_v.im), .in_th(est_ang[r]),
      .out_valid(pr_ov[r]), .out_x(pr_x[r]), .out_y(pr_y[r]), .out_th(pr_th));
  end

  function automatic logic signed [DW-1:0] scale(logic signed [XW-1:0] a);
    logic signed [XW+17:0] p;
    p = ((XW+18)'(a) * (XW+18)'(INVK) + (XW+18)'(32768)) >>> 16;
    return DW'(p);
  endfunction

  // ----------------------------------------------- j mod n_l of each stage
  logic [BINW-1:0] q [NSTAGES];
  for (genvar s = 0; s < NSTAGES; s++) begin : g_q
    barrett_mod #(.N(NI[s]), .XW(JW)) u_m (.x(est_j), .r(q[s]));
  end

  // ------------------------------------------------------ datapath control
  assign est_start = (st == P_EVAL) && (en[cur] >= cfg.t_noise);
  assign pr_go     = (st == P_WAIT) && est_done && est_single;

  always_comb begin
    for (int s = 0; s < NSTAGES; s++) begin
      cb_clear[s] = (st == P_IDLE) && start;
      cb_push[s]  = 1'b0;
      cb_pop[s]   = 1'b0;
      cb_wdata[s] = cur_b;
      acc_we[s]   = 1'b0;
      acc_addr[s] = cur_b;
      for (int r = 0; r < LANES; r++) acc_wdata[s][r] = '0;
      unique case (st)
        P_SCAN: begin
          acc_addr[s] = scan_b;
          cb_wdata[s] = scan_b;
          cb_push[s]  = (32'(scan_b) < NI[s]) && (en[s] >= cfg.t_noise);
        end
        P_POP: begin
          cb_pop[s] = (cur == 2'(s));
        end
        P_WAIT: begin
          if (cur == 2'(s) && est_done) begin
            acc_we[s]  = est_single;             // zero the resolved bin
            cb_push[s] = !est_single;            // unresolved: back into the CB
          end
        end
        P_PEEL: begin
          if (cur != 2'(s)) begin
            acc_addr[s] = q[s];
            acc_we[s]   = 1'b1;
            for (int r = 0; r < LANES; r++) begin
              if (en[s] < cfg.t_noise) acc_wdata[s][r] = '0;
              else begin
                acc_wdata[s][r].re = acc_rdata[s][r].re - va[r].re;
                acc_wdata[s][r].im = acc_rdata[s][r].im - va[r].im;
              end
            end
          end
        end
        default: ;
      endcase
    end
  end

  assign out_valid = (st == P_WAIT) && est_done && est_single;
  assign out_data  = '{j: est_j, v: est_v};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= P_IDLE;
      busy       <= 1'b0;
      done       <= 1'b0;
      stuck      <= 1'b0;
      iterations <= '0;
      found      <= '0;
      cur        <= '0;
      cur_b      <= '0;
      scan_b     <= '0;
      remain     <= '0;
      changed    <= 1'b0;
      for (int r = 0; r < LANES; r++) va[r] <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        P_IDLE: if (start) begin
          busy       <= 1'b1;
          stuck      <= 1'b0;
          iterations <= '0;
          found      <= '0;
          scan_b     <= '0;
          st         <= P_SCAN;
        end
        P_SCAN: begin
          scan_b <= scan_b + 1'b1;
          if (32'(scan_b) == NI[0] - 1) st <= P_ITER;
        end
        P_ITER: begin
          changed <= 1'b0;
          cur     <= '0;
          st      <= P_STG;
        end
        P_STG: begin
          remain <= cb_count[cur];
          st     <= (cb_count[cur] == '0) ? P_STGEND : P_POP;
        end
        P_POP: begin
          cur_b <= cb_rdata[cur];
          st    <= P_EVAL;
        end
        P_EVAL: begin
          if (en[cur] < cfg.t_noise) begin      // became a zeroton: drop it
            changed <= 1'b1;
            st      <= P_NEXT;
          end else begin
            st <= P_WAIT;
          end
        end
        P_WAIT: if (est_done) begin
          if (est_single) begin
            changed <= 1'b1;
            found   <= found + 1'b1;
            st      <= P_PROT;
          end else begin
            st <= P_NEXT;
          end
        end
        P_PROT: if (pr_ov[0]) begin
          for (int r = 0; r < LANES; r++) begin
            va[r].re <= scale(pr_x[r]);
            va[r].im <= scale(pr_y[r]);
          end
          st <= P_PEEL;
        end
        P_PEEL: st <= P_NEXT;
        P_NEXT: begin
          remain <= remain - 1'b1;
          st     <= (remain == (BINW+1)'(1)) ? P_STGEND : P_POP;
        end
        P_STGEND: begin
          if (cb_empty[cur]) begin
            busy <= 1'b0;
            done <= 1'b1;
            st   <= P_IDLE;
          end else if (cur == 2'(NSTAGES - 1)) begin
            st <= P_ITEREND;
          end else begin
            cur <= cur + 1'b1;
            st  <= P_STG;
          end
        end
        P_ITEREND: begin
          iterations <= iterations + 1'b1;
          if (!changed || iterations + 1'b1 >= cfg.max_iter) begin
            stuck <= 1'b1;
            busy  <= 1'b0;
            done  <= 1'b1;
            st    <= P_IDLE;
          end else begin
            st <= P_ITER;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
