// Checks the behavioural SAR ADC slice model: for random input voltages in
// the converter's range, the code must reconstruct the input to within one
// least-significant weight, s(code) = sum_k (2 b_k - 1) WGT[k] with
// |vin - s(code)| <= 64, and code/valid must appear one reference cycle after
// the sample enable and hold between samples.  Interface and timing are those
// of rtl/sar_adc.sv.
module sar_adc_tb;
  localparam int NB = 9;
  localparam int WGT [NB] = '{15360, 7680, 3840, 2048, 1024, 512, 256, 128, 64};
  logic clk_ref = 0, rst_n = 0;
  always #5 clk_ref = ~clk_ref;
  logic sample = 0, valid;
  logic signed [15:0] vin = '0;
  logic [NB-1:0] code;
  sar_adc #(.NB(NB), .WGT(WGT)) dut (.*);

  int checks = 0, failures = 0;
  function automatic int recon(logic [NB-1:0] c);
    int s;
    s = 0;
    for (int k = 0; k < NB; k++) s += c[NB-1-k] ? WGT[k] : -WGT[k];
    return s;
  endfunction

  initial begin
    int v, e;
    logic [NB-1:0] held;
    repeat (2) @(posedge clk_ref);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk_ref);
      v = int'($urandom_range(0, 60000)) - 30000;
      if (i < 2) v = (i == 0) ? 30000 : -30000;
      vin = 16'(v);
      sample = 1;
      @(negedge clk_ref);
      sample = 0;
      vin = 16'($urandom);
      checks++;
      e = v - recon(code);
      if (!valid || e > 64 || e < -64) begin
        failures++;
        if (failures < 10) $display("FAIL vin %0d code %0d s %0d valid %0b", v, code, recon(code), valid);
      end
      held = code;
      @(negedge clk_ref);
      checks++;
      if (valid || code != held) begin failures++; $display("FAIL code not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
