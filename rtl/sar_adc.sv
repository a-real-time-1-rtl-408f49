// Behavioural model of one asynchronous SAR ADC slice (not synthesizable
// logic: the real slice is an analog switched-capacitor converter).
//
// On each sample enable the model takes the input voltage vin (a signed
// number, full scale +-2**15) and performs a 9-step successive approximation
// with the capacitor weights WGT, most significant first: a step outputs 1
// and subtracts its weight if the residue is not negative, else outputs 0 and
// adds it.  The weights of the top bits shrink faster than radix 2, as in the
// real slice, so some raw codes never occur and the raw code is not linear in
// vin; the calibration table downstream maps it back.  The 9-bit code appears
// one reference cycle after the sample, with valid.
// The 9-wire output and the reduced-radix upper bits follow the analyzer; the
// weight values and the one-cycle latency are this model's choices.
module sar_adc #(
  parameter int NB         = 9,
  parameter int WGT [NB]   = '{15360, 7680, 3840, 2048, 1024, 512, 256, 128, 64}
) (
  input  logic                clk_ref,
  input  logic                rst_n,
  input  logic                sample,
  input  logic signed [15:0]  vin,
  output logic [NB-1:0]       code,
  output logic                valid
);
  logic [NB-1:0] c;
  int            res;

  always_comb begin
    res = int'(vin);
    for (int k = 0; k < NB; k++) begin
      c[NB-1-k] = (res >= 0);
      res       = (res >= 0) ? res - WGT[k] : res + WGT[k];
    end
  end

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      code  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) code <= c;
    end
  end
endmodule
