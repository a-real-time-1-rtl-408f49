// Checks the frame-alignment logic with a reduced alignment period (LCM 60)
// and three lanes whose sample enables come every 3, 4 and 5 reference
// cycles, all in phase at the alignment point.  For each of three requests
// (raised from a separate core clock) the window must open only at an
// alignment point, stay open exactly 60 cycles, let each lane deliver exactly
// 60/period samples, raise ack after closing, serve one frame per request,
// and drop ack after req is removed.  Interface and timing are those of
// rtl/fifo_align.sv.
module fifo_align_tb;
  localparam int LCM = 60, NL = 3;
  localparam int PER [NL] = '{3, 4, 5};
  logic clk_ref = 0, clk = 0, rst_n = 0;
  always #5 clk_ref = ~clk_ref;
  always #17 clk = ~clk;
  logic req = 0, window, ack;
  logic [NL-1:0] lane_tap, lane_valid;
  fifo_align #(.LCM(LCM), .NL(NL)) dut (.*);

  int cyc = 0;            // reference cycles since reset release (= alignment counter)
  always @(posedge clk_ref) if (rst_n) cyc <= cyc + 1;
  for (genvar l = 0; l < NL; l++) begin : g_t
    assign lane_tap[l] = rst_n && (cyc % PER[l] == 0);
  end

  int checks = 0, failures = 0, wlen = 0, nwin = 0;
  int nval [NL];
  always @(posedge clk_ref) if (rst_n) begin
    if (window) begin
      if (wlen == 0) begin
        checks++;
        if (cyc % LCM != 0) begin failures++; $display("FAIL window opened at %0d", cyc); end
        for (int l = 0; l < NL; l++) nval[l] = 0;
      end
      wlen++;
      for (int l = 0; l < NL; l++) if (lane_valid[l]) nval[l]++;
    end else if (wlen != 0) begin
      checks++;
      if (wlen != LCM) begin failures++; $display("FAIL window length %0d", wlen); end
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (nval[l] != LCM / PER[l]) begin failures++; $display("FAIL lane %0d delivered %0d", l, nval[l]); end
      end
      nwin++;
      wlen = 0;
    end
    if (!window) begin
      checks++;
      if (lane_valid != '0) begin failures++; $display("FAIL lane valid outside window"); end
    end
  end

  initial begin
    repeat (3) @(posedge clk_ref);
    @(negedge clk_ref) rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      repeat ($urandom_range(1, 40)) @(posedge clk);
      req <= 1;
      wait (ack);
      repeat (2) @(posedge clk_ref);
      @(posedge clk);
      checks++;
      if (nwin != f + 1) begin failures++; $display("FAIL %0d windows for %0d requests", nwin, f + 1); end
      repeat (3 * LCM) @(posedge clk_ref);   // no second frame while req stays high
      checks++;
      if (nwin != f + 1 || !ack) begin failures++; $display("FAIL extra window"); end
      @(posedge clk) req <= 0;
      wait (!ack);
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
