// FFAST sparse spectrum analyzer: 21600-point sparse Fourier transform from
// three sets of subsampling ADCs, three sub-FFT stages and a peeling decoder.
//
// Reference-clock domain (clk_ref, 3.78 GHz in the analyzer): one shift
// register divider per stage (25x, 27x, 32x) taps six sample delays
// (0, 1, 6, 9, 12, 19); each tap clocks one SAR ADC slice (18 in all) that
// converts the shared input vin.  The alignment circuit opens one 21600-cycle
// frame window per request and gates the lanes' writes into their dual-clock
// FIFOs, so each lane of stage i delivers n_i = 864, 800, 675 samples.
// Core domain (clk, 400 MHz in the analyzer): per stage, frame capture pops
// the six FIFOs, applies the calibration tables and fills the six lane
// memories of the stage's sub-FFT; the three sub-FFTs then run together and
// normalize their outputs; finally the peeling decoder finds the singletons,
// peels them off the other stages and writes (j, X[j]) pairs into the output
// FIFO.  In calibration mode the sequence stops after capture so the host
// can read the raw lane data (RAW registers).  The host (a RISC-V core in the
// analyzer; not part of this RTL) drives the SCR port.
// Sequencing: start -> capture (phase 1) -> FFT (2) -> peel (3) -> done (4).
module ffast_top
  import ffast_pkg::*;
#(
  parameter int ITER = 22     // CORDIC micro-rotations
) (
  input  logic               clk_ref,
  input  logic               rst_ref_n,
  input  logic signed [15:0] vin,
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         scr_addr,
  input  logic               scr_we,
  input  logic [63:0]        scr_wdata,
  input  logic               scr_re,
  output logic [63:0]        scr_rdata,
  output logic               done_irq
);
  localparam int NL = NSTAGES * LANES;

  // ------------------------------------------------- analog front end model
  logic [NL-1:0]      tap, adc_valid, lane_valid;
  logic [ADCW-1:0]    adc_code [NL];
  logic               window, align_ack, cap_req;

  for (genvar s = 0; s < NSTAGES; s++) begin : g_fe
    logic [LANES-1:0] t;
    logic             ph0;
    clock_divider #(.DIV(SUBF[s]), .NTAP(LANES), .TAPS(DELAY_DEF)) u_div (
      .clk_ref, .rst_n(rst_ref_n), .tap(t), .phase0(ph0));
    for (genvar r = 0; r < LANES; r++) begin : g_adc
      assign tap[s*LANES+r] = t[r];
      sar_adc u_adc (.clk_ref, .rst_n(rst_ref_n), .sample(t[r]), .vin,
                     .code(adc_code[s*LANES+r]), .valid(adc_valid[s*LANES+r]));
    end
  end

  fifo_align #(.LCM(N_FFT), .NL(NL)) u_align (
    .clk_ref, .rst_n(rst_ref_n), .req(cap_req), .lane_tap(adc_valid),
    .lane_valid, .window, .ack(align_ack));

  logic [NL-1:0]   f_empty, f_rd, f_full;
  logic [ADCW-1:0] f_data [NL];
  for (genvar l = 0; l < NL; l++) begin : g_fifo
    async_fifo #(.W(ADCW), .DEPTH(8)) u_f (
      .wr_clk(clk_ref), .wr_rst_n(rst_ref_n), .wr_en(lane_valid[l]),
      .wr_data(adc_code[l]), .wr_full(f_full[l]),
      .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(f_rd[l]),
      .rd_data(f_data[l]), .rd_empty(f_empty[l]));
  end

  // ---------------------------------------------------------------- SCRs
  logic            start, cal_mode, cal_we, fifo_pop, done_flag;
  logic [1:0]      cal_stage, raw_stage;
  logic [2:0]      cal_lane, phase;
  logic [ADCW-1:0] cal_addr, cal_data;
  logic [BINW-1:0] raw_addr;
  peel_cfg_t       cfg;
  cplx_t           raw_rdata [LANES];
  logic            p_busy, p_done, p_stuck;
  logic [7:0]      p_iter;
  logic [JW-1:0]   p_found;
  logic [10:0]     of_count;
  logic [15:0]     of_over;
  logic            of_empty, of_full;
  peel_out_t       of_data, p_out;
  logic            p_out_valid;

  scr_file u_scr (
    .clk, .rst_n, .addr(scr_addr), .we(scr_we), .wdata(scr_wdata), .re(scr_re),
    .rdata(scr_rdata), .start, .cal_mode, .cfg, .cal_we, .cal_stage, .cal_lane,
    .cal_addr, .cal_data, .raw_stage, .raw_addr,
    .busy(phase != 3'd0 && phase != 3'd4), .done_flag, .stuck(p_stuck), .phase,
    .iterations(p_iter), .found(p_found), .fifo_count(of_count),
    .fifo_overflow(of_over), .fifo_empty(of_empty), .fifo_data(of_data),
    .fifo_pop, .raw_rdata);

  // ------------------------------------------------------ stages: capture+FFT
  logic [NSTAGES-1:0] cap_start, cap_req_s, cap_done, cap_ok, fft_start, fft_busy, fft_done, fft_ok;
  logic [NSTAGES-1:0] cal_busy;
  logic [BINW-1:0]    p_addr  [NSTAGES];
  cplx_t              p_rdata [NSTAGES][LANES];
  logic [NSTAGES-1:0] p_we;
  cplx_t              p_wdata [NSTAGES][LANES];
  logic               peeling;

  assign cap_req = |cap_req_s;

  for (genvar s = 0; s < NSTAGES; s++) begin : g_st
    localparam int AW = $clog2(NI[s]);
    localparam int NRAD = (s == 0) ? 6 : 5;
    localparam int RAD [8] = (s == 0) ? '{4, 4, 2, 3, 3, 3, 1, 1} :
                             (s == 1) ? '{4, 4, 2, 5, 5, 1, 1, 1} :
                                        '{3, 3, 3, 5, 5, 1, 1, 1};
    logic [LANES-1:0] ld_en;
    logic [AW-1:0]    ld_addr [LANES];
    cplx_t            ld_data [LANES];
    logic             cib;

    frame_capture #(.NS(NI[s])) u_cap (
      .clk, .rst_n, .start(cap_start[s]), .req(cap_req_s[s]), .done(cap_done[s]),
      .cal_init_busy(cib), .fifo_empty(f_empty[s*LANES +: LANES]),
      .fifo_data(f_data[s*LANES +: LANES]), .fifo_rd(f_rd[s*LANES +: LANES]),
      .cal_we(cal_we && cal_stage == 2'(s)), .cal_lane, .cal_addr, .cal_data,
      .ld_en, .ld_addr, .ld_data);
    assign cal_busy[s] = cib;

    fft_stage #(.N(NI[s]), .NRAD(NRAD), .RADIX(RAD)) u_fft (
      .clk, .rst_n, .ld_en, .ld_addr, .ld_data,
      .start(fft_start[s]), .busy(fft_busy[s]), .done(fft_done[s]),
      .acc_addr(peeling ? AW'(p_addr[s]) : AW'(raw_addr)),
      .acc_raw(!peeling), .acc_rdata(p_rdata[s]),
      .acc_we(p_we[s] && peeling), .acc_wdata(p_wdata[s]));
  end

  assign raw_rdata = p_rdata[raw_stage > 2'd2 ? 2'd0 : raw_stage];

  // --------------------------------------------------------- peeling + FIFO
  logic p_start;
  peeling_decoder #(.ITER(ITER)) u_peel (
    .clk, .rst_n, .start(p_start), .cfg, .busy(p_busy), .done(p_done),
    .stuck(p_stuck), .iterations(p_iter), .found(p_found),
    .acc_addr(p_addr), .acc_rdata(p_rdata), .acc_we(p_we), .acc_wdata(p_wdata),
    .out_valid(p_out_valid), .out_data(p_out));

  sync_fifo #(.DEPTH(1944), .W($bits(peel_out_t)), .CW(11)) u_ofifo (
    .clk, .rst_n, .clear(start), .push(p_out_valid), .wr_data(p_out),
    .pop(fifo_pop), .rd_data(of_data), .count(of_count), .empty(of_empty),
    .full(of_full), .overflow(of_over));

  // ------------------------------------------------------------ sequencer
  typedef enum logic [2:0] {Q_IDLE, Q_CAP, Q_FFT, Q_PEEL, Q_DONE} seq_t;
  seq_t q;
  assign phase   = 3'(q);
  assign peeling = (q == Q_PEEL);
  assign done_flag = (q == Q_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q         <= Q_IDLE;
      cap_start <= '0;
      fft_start <= '0;
      p_start   <= 1'b0;
      cap_ok    <= '0;
      fft_ok    <= '0;
      done_irq  <= 1'b0;
    end else begin
      cap_start <= '0;
      fft_start <= '0;
      p_start   <= 1'b0;
      done_irq  <= 1'b0;
      unique case (q)
        Q_IDLE, Q_DONE: if (start && cal_busy == '0) begin
          cap_start <= '1;
          cap_ok    <= '0;
          q         <= Q_CAP;
        end
        Q_CAP: begin
          cap_ok <= cap_ok | cap_done;
          if ((cap_ok | cap_done) == '1) begin
            if (cal_mode) begin
              q        <= Q_DONE;
              done_irq <= 1'b1;
            end else begin
              fft_start <= '1;
              fft_ok    <= '0;
              q         <= Q_FFT;
            end
          end
        end
        Q_FFT: begin
          fft_ok <= fft_ok | fft_done;
          if ((fft_ok | fft_done) == '1) begin
            p_start <= 1'b1;
            q       <= Q_PEEL;
          end
        end
        Q_PEEL: if (p_done) begin
          q        <= Q_DONE;
          done_irq <= 1'b1;
        end
        default: q <= Q_IDLE;
      endcase
    end
  end
endmodule
