// Checks the subsampling clock divider: after reset, tap r of a divide-by-25
// divider with the analyzer's delays {0,1,6,9,12,19} must pulse exactly once
// every 25 reference cycles, at cycle TAPS[r] modulo 25 counted from the
// first cycle after reset, and phase0 must coincide with tap 0.  The same is
// checked for the divide-by-27 and divide-by-32 dividers.  Interface and
// timing are those of rtl/clock_divider.sv.
module clock_divider_tb;
  import ffast_pkg::*;
  logic clk_ref = 0, rst_n = 0;
  always #5 clk_ref = ~clk_ref;
  logic [5:0] tap [3];
  logic       phase0 [3];
  for (genvar s = 0; s < 3; s++) begin : g_d
    clock_divider #(.DIV(SUBF[s]), .NTAP(6), .TAPS(DELAY_DEF)) dut (
      .clk_ref, .rst_n, .tap(tap[s]), .phase0(phase0[s]));
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (3) @(posedge clk_ref);
    @(negedge clk_ref) rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      // c counts reference edges since reset was released
      for (int s = 0; s < 3; s++) begin
        for (int r = 0; r < 6; r++) begin
          checks++;
          if (tap[s][r] != ((c % SUBF[s]) == DELAY_DEF[r])) begin
            failures++;
            if (failures < 10) $display("FAIL cycle %0d div %0d tap %0d = %0b", c, SUBF[s], r, tap[s][r]);
          end
        end
        checks++;
        if (phase0[s] != tap[s][0]) failures++;
      end
      @(negedge clk_ref);
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
