// Checks the status and control register file: reset defaults (lane delays
// 0,1,6,9,12,19, deltas 1,3,7, threshold 2^20, pass limit 16), write and read
// back of every read/write register with random values, the start and
// calibration-write pulses and their fields, the packing of STATUS from
// random status inputs, the OUT register (valid flag, record, pop only when
// not empty) and the six RAW lane registers.  Interface and timing are those
// of rtl/scr_file.sv: writes at the clock edge, reads combinational.
module scr_file_tb;
  import ffast_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] addr = '0;
  logic we = 0, re = 0;
  logic [63:0] wdata = '0, rdata;
  logic start, cal_mode, cal_we, fifo_pop;
  peel_cfg_t cfg;
  logic [1:0] cal_stage, raw_stage;
  logic [2:0] cal_lane;
  logic [ADCW-1:0] cal_addr, cal_data;
  logic [BINW-1:0] raw_addr;
  logic busy = 0, done_flag = 0, stuck = 0, fifo_empty = 1;
  logic [2:0] phase = '0;
  logic [7:0] iterations = '0;
  logic [JW-1:0] found = '0;
  logic [10:0] fifo_count = '0;
  logic [15:0] fifo_overflow = '0;
  peel_out_t fifo_data = '0;
  cplx_t raw_rdata [LANES];
  scr_file dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk);
    addr = a; wdata = d; we = 1;
    #1;
    chk(start == (a == 8'h00 && d[0]), "start pulse");
    chk(cal_we == (a == 8'h07), "cal_we pulse");
    if (a == 8'h07) chk({cal_stage, cal_lane, cal_addr, cal_data} == d[22:0], "cal fields");
    @(negedge clk) we = 0;
    #1;
    chk(!start && !cal_we, "pulses end");
  endtask
  task automatic rd(input logic [7:0] a, output logic [63:0] q);
    addr = a;
    #1;
    q = rdata;
  endtask

  initial begin
    logic [63:0] d, m, q;
    for (int r = 0; r < LANES; r++) raw_rdata[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    chk(cfg.t_noise == EW'(1 << 20) && cfg.max_iter == 8'd16, "threshold / pass defaults");
    for (int r = 0; r < LANES; r++) chk(cfg.delay[r] == DLYW'(DELAY_DEF[r]), "delay default");
    for (int c = 0; c < NCLUST; c++) chk(cfg.tau[c] == TAUW'(TAU_DEF[c]), "tau default");
    for (int i = 0; i < 50; i++) begin
      logic [7:0] a;
      a = 8'($urandom_range(2, 5));
      d = {$urandom, $urandom};
      m = (a == 2) ? 64'((65'd1 << EW) - 1) : (a == 3) ? 64'hff : (a == 4) ? 64'((1 << 30) - 1) : 64'hfff;
      wr(a, d);
      rd(a, q);
      chk(q == (d & m), $sformatf("reg %0d read back", a));
    end
    wr(8'h04, 64'h0);
    wr(8'h04, {34'd0, 5'd19, 5'd12, 5'd9, 5'd6, 5'd1, 5'd0});
    for (int r = 0; r < LANES; r++) chk(cfg.delay[r] == DLYW'(DELAY_DEF[r]), "delay field order");
    wr(8'h00, 64'h3);
    chk(cal_mode, "cal mode set");
    rd(8'h00, q);
    chk(q == 64'h2, "ctrl read");
    wr(8'h00, 64'h0);
    chk(!cal_mode, "cal mode cleared");
    for (int i = 0; i < 20; i++) wr(8'h07, 64'($urandom));
    wr(8'h08, 64'h9ab);
    chk(raw_stage == 2'b10 && raw_addr == 10'h1ab, "raw address");
    for (int i = 0; i < 20; i++) begin
      busy = 1'($urandom); done_flag = 1'($urandom); stuck = 1'($urandom); phase = 3'($urandom);
      iterations = 8'($urandom); found = JW'($urandom); fifo_count = 11'($urandom); fifo_overflow = 16'($urandom);
      rd(8'h01, d);
      chk(d[0] == busy && d[1] == done_flag && d[2] == stuck && d[5:3] == phase && d[15:8] == iterations &&
          d[30:16] == found && d[42:32] == fifo_count && d[63:48] == fifo_overflow, "status packing");
    end
    for (int r = 0; r < LANES; r++) begin raw_rdata[r].re = DW'($urandom); raw_rdata[r].im = DW'($urandom); end
    for (int r = 0; r < LANES; r++) begin rd(8'(9 + r), q); chk(q == 64'(raw_rdata[r]), "raw lane read"); end
    fifo_empty = 1;
    re = 1;
    rd(8'h06, d);
    chk(d[63] == 0 && !fifo_pop, "empty OUT read");
    fifo_empty = 0;
    fifo_data = '{j: 15'd12345, v: '{re: 20'h12345, im: 20'habcde}};
    rd(8'h06, d);
    chk(d[63] && d[54:0] == 55'(fifo_data) && fifo_pop, "OUT read pops");
    addr = 8'h01;
    #1 chk(!fifo_pop, "no pop on other reads");
    re = 0;
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
