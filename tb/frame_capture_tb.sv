// Checks the frame capture of one stage with a reduced frame (NS 16) and six
// lanes fed from queue models of the lane FIFOs that fill at random times.
// After the calibration tables finish their identity fill, a random set of
// table entries is rewritten through the programming port; then two frames
// are captured.  Every lane must store exactly NS samples, sample k of a lane
// at address k, with value table[raw code] - 256 (imaginary part 0); done
// must pulse once per frame after the last write and req must then drop.
// Interface and timing are those of rtl/frame_capture.sv.
module frame_capture_tb;
  import ffast_pkg::*;
  localparam int NS = 16, NL = 6, AW = $clog2(NS);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, req, done, cal_init_busy, cal_we = 0;
  logic [NL-1:0] fifo_empty, fifo_rd, ld_en;
  logic [ADCW-1:0] fifo_data [NL];
  logic [2:0] cal_lane = '0;
  logic [ADCW-1:0] cal_addr = '0, cal_data = '0;
  logic [AW-1:0] ld_addr [NL];
  cplx_t ld_data [NL];
  frame_capture #(.NS(NS), .NL(NL)) dut (.*);

  logic [ADCW-1:0] q [NL][$];
  logic [ADCW-1:0] sent [NL][$];
  logic [ADCW-1:0] tbl [NL][512];
  int nld [NL];
  int checks = 0, failures = 0, ndone = 0;

  for (genvar l = 0; l < NL; l++) begin : g_f
    assign fifo_empty[l] = (q[l].size() == 0);
    assign fifo_data[l]  = (q[l].size() == 0) ? '0 : q[l][0];
  end

  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < NL; l++) begin
      if (ld_en[l]) begin
        int e;
        e = int'(tbl[l][sent[l][nld[l]]]) - 256;
        checks++;
        if (32'(ld_addr[l]) != nld[l] || int'($signed(ld_data[l].re)) != e || ld_data[l].im != '0) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d sample %0d addr %0d val %0d exp %0d", l, nld[l], ld_addr[l], int'($signed(ld_data[l].re)), e);
        end
        nld[l]++;
      end
      if (fifo_rd[l]) begin sent[l].push_back(q[l][0]); void'(q[l].pop_front()); end
      if ($urandom_range(0, 3) == 0 && q[l].size() < 8) q[l].push_back(ADCW'($urandom));
    end
    if (done) ndone++;
  end

  initial begin
    for (int l = 0; l < NL; l++) for (int a = 0; a < 512; a++) tbl[l][a] = ADCW'(a);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (!cal_init_busy);
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      cal_we   = 1;
      cal_lane = 3'($urandom_range(0, NL - 1));
      cal_addr = ADCW'($urandom);
      cal_data = ADCW'($urandom);
      tbl[cal_lane][cal_addr] = cal_data;
    end
    @(negedge clk) cal_we = 0;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      for (int l = 0; l < NL; l++) begin q[l].delete(); sent[l].delete(); nld[l] = 0; end
      start = 1;
      @(negedge clk) start = 0;
      wait (done);
      @(posedge clk);
      @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (nld[l] != NS) begin failures++; $display("FAIL lane %0d stored %0d", l, nld[l]); end
      end
      checks++;
      if (req || ndone != f + 1) begin failures++; $display("FAIL req %0b done count %0d", req, ndone); end
      repeat (20) @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (nld[l] != NS) begin failures++; $display("FAIL lane %0d stored after frame", l); end
      end
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
