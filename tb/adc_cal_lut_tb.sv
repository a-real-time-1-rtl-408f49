// Checks the ADC calibration table: after reset it must report init_busy for
// 512 cycles and then read back the identity for every code; after the
// processor writes a random table through the write port every raw code must
// map to the written entry, with cal_valid and cal_code one cycle after
// raw_valid.  Interface and timing are those of rtl/adc_cal_lut.sv.
module adc_cal_lut_tb;
  localparam int AW = 9, DW = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic raw_valid = 0, cal_valid, wr_en = 0, init_busy;
  logic [AW-1:0] raw_code = '0, wr_addr = '0;
  logic [DW-1:0] cal_code, wr_data = '0;
  adc_cal_lut #(.AW(AW), .DW(DW)) dut (.*);

  int checks = 0, failures = 0, busy_cycles = 0;
  logic [DW-1:0] table_m [2**AW];

  task automatic read_all();
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      raw_valid = 1;
      raw_code  = AW'(a);
      @(negedge clk);
      raw_valid = 0;
      checks++;
      if (!cal_valid || cal_code != table_m[a]) begin
        failures++;
        if (failures < 10) $display("FAIL code %0d -> %0d exp %0d", a, cal_code, table_m[a]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (init_busy) begin @(negedge clk); busy_cycles++; end
    checks++;
    if (busy_cycles != 2**AW) begin failures++; $display("FAIL init took %0d cycles", busy_cycles); end
    for (int a = 0; a < 2**AW; a++) table_m[a] = DW'(a);
    read_all();
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      wr_en = 1;
      wr_addr = AW'(a);
      wr_data = DW'($urandom);
      table_m[a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    read_all();
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
