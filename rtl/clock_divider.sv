// Shift-register clock divider of one subsampling stage.
//
// A ring of DIV flip-flops clocked by the reference clock circulates a single
// one; tap r is the ring position TAPS[r], so every tap fires once per DIV
// reference cycles and tap r lags tap 0 by TAPS[r] reference cycles.  In the
// analog front end each tap gates the reference clock through to one ADC
// slice, so the slice samples at reference edges t = TAPS[r] + m*DIV.  Here the
// tap is delivered as a one-cycle enable in the reference domain.  While in
// reset the ring holds position 0 and tap 0 passes every reference edge, as
// the analog divider's zero-delay output does.
// Division ratios (25, 27, 32) and tap delays (0, 1, 6, 9, 12, 19) follow the
// analyzer; delivering the taps as enables is this implementation's choice.
module clock_divider #(
  parameter int DIV           = 25,
  parameter int NTAP          = 6,
  parameter int TAPS [NTAP]   = '{0, 1, 6, 9, 12, 19}
) (
  input  logic            clk_ref,
  input  logic            rst_n,
  output logic [NTAP-1:0] tap,
  output logic            phase0     // ring at position 0
);
  logic [DIV-1:0] ring;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) ring <= DIV'(1);
    else        ring <= {ring[DIV-2:0], ring[DIV-1]};
  end

  for (genvar r = 0; r < NTAP; r++) begin : g_tap
    if (TAPS[r] == 0) begin : g_z
      assign tap[r] = ring[0] | !rst_n;
    end else begin : g_nz
      assign tap[r] = ring[TAPS[r]];
    end
  end
  assign phase0 = ring[0];

  initial assert (TAPS[NTAP-1] < DIV) else $error("clock_divider: tap beyond ring");
endmodule
