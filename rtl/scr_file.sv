// Status and control registers (SCRs) through which the host processor runs
// the analyzer.
//
// A simple synchronous register port: a write (we) takes effect at the clock
// edge, a read (re) returns rdata combinationally in the same cycle.  Map
// (64-bit registers, word addresses):
//   0x00 CTRL      W: bit0 start (pulse), bit1 calibration mode; R: bit1
//   0x01 STATUS    R: [0] busy [1] done [2] stuck [5:3] phase
//                     [15:8] peeling passes [30:16] signals found
//                     [42:32] output FIFO count [63:48] FIFO overflows
//   0x02 T_NOISE   RW: noise / singleton threshold (energy units)
//   0x03 MAX_ITER  RW: peeling pass limit
//   0x04 DELAYS    RW: six 5-bit lane sample delays, lane 0 in bits [4:0]
//   0x05 TAUS      RW: three 4-bit cluster delay deltas
//   0x06 OUT       R (pops): [63] valid [54:40] j [39:20] re [19:0] im
//   0x07 CAL_WR    W: [8:0] data [17:9] raw code [20:18] lane [22:21] stage
//   0x08 RAW_ADDR  RW: [9:0] memory address [11:10] stage (raw memory reads)
//   0x09-0x0E RAW  R: lane 0..5 word {re, im} at RAW_ADDR
// Defaults after reset: the analyzer's delays (0,1,6,9,12,19) and deltas
// (1,3,7); the threshold and pass limit defaults are this implementation's.
// The analyzer maps its runtime options to processor SCRs; this particular
// map and bus are this implementation's.
module scr_file
  import ffast_pkg::*;
#(
  parameter logic [EW-1:0] T_NOISE_DEF  = EW'(1 << 20),
  parameter logic [7:0]    MAX_ITER_DEF = 8'd16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         addr,
  input  logic               we,
  input  logic [63:0]        wdata,
  input  logic               re,
  output logic [63:0]        rdata,
  // control
  output logic               start,
  output logic               cal_mode,
  output peel_cfg_t          cfg,
  output logic               cal_we,
  output logic [1:0]         cal_stage,
  output logic [2:0]         cal_lane,
  output logic [ADCW-1:0]    cal_addr,
  output logic [ADCW-1:0]    cal_data,
  output logic [1:0]         raw_stage,
  output logic [BINW-1:0]    raw_addr,
  // status
  input  logic               busy,
  input  logic               done_flag,
  input  logic               stuck,
  input  logic [2:0]         phase,
  input  logic [7:0]         iterations,
  input  logic [JW-1:0]      found,
  input  logic [10:0]        fifo_count,
  input  logic [15:0]        fifo_overflow,
  input  logic               fifo_empty,
  input  peel_out_t          fifo_data,
  output logic               fifo_pop,
  input  cplx_t              raw_rdata [LANES]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cal_mode     <= 1'b0;
      cfg.t_noise  <= T_NOISE_DEF;
      cfg.max_iter <= MAX_ITER_DEF;
      for (int r = 0; r < LANES; r++) cfg.delay[r] <= DLYW'(DELAY_DEF[r]);
      for (int s = 0; s < NCLUST; s++) cfg.tau[s] <= TAUW'(TAU_DEF[s]);
      raw_stage    <= '0;
      raw_addr     <= '0;
    end else if (we) begin
      unique case (addr)
        8'h00: cal_mode     <= wdata[1];
        8'h02: cfg.t_noise  <= wdata[EW-1:0];
        8'h03: cfg.max_iter <= wdata[7:0];
        8'h04: cfg.delay    <= wdata[LANES*DLYW-1:0];
        8'h05: cfg.tau      <= wdata[NCLUST*TAUW-1:0];
        8'h08: {raw_stage, raw_addr} <= wdata[BINW+1:0];
        default: ;
      endcase
    end
  end

  assign start     = we && addr == 8'h00 && wdata[0];
  assign cal_we    = we && addr == 8'h07;
  assign cal_data  = wdata[8:0];
  assign cal_addr  = wdata[17:9];
  assign cal_lane  = wdata[20:18];
  assign cal_stage = wdata[22:21];
  assign fifo_pop  = re && addr == 8'h06 && !fifo_empty;

  always_comb begin
    rdata = '0;
    unique case (addr)
      8'h00: rdata[1] = cal_mode;
      8'h01: rdata = {fifo_overflow, 5'd0, fifo_count, 1'b0, found, iterations,
                      2'b0, phase, stuck, done_flag, busy};
      8'h02: rdata = 64'(cfg.t_noise);
      8'h03: rdata = 64'(cfg.max_iter);
      8'h04: rdata = 64'(cfg.delay);
      8'h05: rdata = 64'(cfg.tau);
      8'h06: rdata = {!fifo_empty, 8'd0, fifo_data};
      8'h08: rdata = 64'({raw_stage, raw_addr});
      8'h09, 8'h0a, 8'h0b, 8'h0c, 8'h0d, 8'h0e:
             rdata = 64'(raw_rdata[3'(addr - 8'h09)]);
      default: ;
    endcase
  end
endmodule
