// Calibration look-up table of one ADC slice.
//
// The raw 9-bit SAR code addresses a 512-entry table whose entry is the
// corrected code (offset binary, 256 = zero), which removes the missing-code
// steps of the reduced-radix capacitor array and the slice's gain and offset
// error.  After reset the table fills itself with the identity (entry a = a),
// which is the starting point of calibration, and reports init_busy for 512
// cycles; the processor then rewrites entries through the write port.  A raw
// code presented with raw_valid gives cal_code with cal_valid one cycle later
// (synchronous SRAM read).
// The 512 x 9-bit size (18 tables = 10.4 kB) and the identity start follow the
// analyzer; the self-initialization sequencer is this implementation's.
module adc_cal_lut #(
  parameter int AW = 9,
  parameter int DW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          raw_valid,
  input  logic [AW-1:0] raw_code,
  output logic          cal_valid,
  output logic [DW-1:0] cal_code,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  output logic          init_busy
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] init_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_a    <= '0;
      cal_valid <= 1'b0;
    end else begin
      cal_valid <= raw_valid;
      if (init_busy) begin
        init_a <= init_a + 1'b1;
        if (init_a == '1) init_busy <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (init_busy)   mem[init_a] <= DW'(init_a);
    else if (wr_en)  mem[wr_addr] <= wr_data;
    if (raw_valid)   cal_code <= mem[raw_code];
  end
endmodule
