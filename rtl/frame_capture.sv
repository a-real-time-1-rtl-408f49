// Core-side capture of one frame for one subsampling stage, with the ADC
// calibration tables of its six lanes.
//
// start requests a frame from the alignment circuit (req stays high) and
// clears the per-lane sample counters.  Every lane FIFO that is not empty is
// popped; its raw 9-bit code addresses the lane's calibration table, and one
// cycle later the corrected code is written, as a real sample (code - 256,
// imaginary part 0), into the lane's sub-FFT memory at the lane's sample
// count, i.e. in time order.  When every lane holds NS samples and the table
// pipeline is empty, done pulses and req drops.  Lanes are independent, so
// their different sample delays need no care here.  The table write port
// (cal_we, cal_lane, cal_addr, cal_data) reprograms one entry of one lane.
// Frame handshake, calibration before storage and time-ordered placement
// follow the analyzer; the plain sample-index address map is this
// implementation's, because its FFT reads its input in natural order.
module frame_capture
  import ffast_pkg::*;
#(
  parameter int NS = 864,
  parameter int NL = LANES,
  parameter int AW = $clog2(NS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                req,
  output logic                done,
  output logic                cal_init_busy,
  // lane FIFOs (raw ADC codes)
  input  logic [NL-1:0]       fifo_empty,
  input  logic [ADCW-1:0]     fifo_data [NL],
  output logic [NL-1:0]       fifo_rd,
  // calibration table programming
  input  logic                cal_we,
  input  logic [2:0]          cal_lane,
  input  logic [ADCW-1:0]     cal_addr,
  input  logic [ADCW-1:0]     cal_data,
  // sub-FFT memory load
  output logic [NL-1:0]       ld_en,
  output logic [AW-1:0]       ld_addr [NL],
  output cplx_t               ld_data [NL]
);
  logic [AW:0]          cnt [NL];
  logic [NL-1:0]        full, ib;
  logic [AW-1:0]        addr_q [NL];
  logic [ADCW-1:0]      cal_code [NL];

  assign cal_init_busy = |ib;

  for (genvar l = 0; l < NL; l++) begin : g_lane
    adc_cal_lut #(.AW(ADCW), .DW(ADCW)) u_lut (
      .clk, .rst_n, .raw_valid(fifo_rd[l]), .raw_code(fifo_data[l]),
      .cal_valid(ld_en[l]), .cal_code(cal_code[l]),
      .wr_en(cal_we && cal_lane == 3'(l)), .wr_addr(cal_addr), .wr_data(cal_data),
      .init_busy(ib[l]));
    assign full[l]       = (32'(cnt[l]) == NS);
    assign fifo_rd[l]    = req && !fifo_empty[l] && !full[l] && !ib[l];
    assign ld_addr[l]    = addr_q[l];
    assign ld_data[l].re = DW'($signed({1'b0, cal_code[l]}) - 256);
    assign ld_data[l].im = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req  <= 1'b0;
      done <= 1'b0;
      for (int l = 0; l < NL; l++) begin
        cnt[l]    <= '0;
        addr_q[l] <= '0;
      end
    end else begin
      done <= 1'b0;
      for (int l = 0; l < NL; l++) addr_q[l] <= AW'(cnt[l]);
      if (start) begin
        req <= 1'b1;
        for (int l = 0; l < NL; l++) cnt[l] <= '0;
      end else if (req) begin
        for (int l = 0; l < NL; l++) if (fifo_rd[l]) cnt[l] <= cnt[l] + 1'b1;
        if (&full && ld_en == '0) begin
          req  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
