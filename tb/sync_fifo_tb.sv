// Checks the output FIFO against a queue model, including the overflow
// counter.  A small instance (DEPTH 16) gets random push and pop for 4000
// cycles, with pushes into a full FIFO allowed: those must be dropped and
// counted in overflow.  Read data (show-ahead), count, empty, full and
// overflow are compared every cycle; clear must empty the FIFO and zero the
// counter.  Interface and timing are those of rtl/sync_fifo.sv.
module sync_fifo_tb;
  localparam int DEPTH = 16, W = 55, CW = $clog2(DEPTH + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, push = 0, pop = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [CW-1:0] count;
  logic empty, full;
  logic [15:0] overflow;
  sync_fifo #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0, ovf = 0;
  logic [W-1:0] model [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (32'(count) != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          32'(overflow) != ovf || (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d count %0d model %0d ovf %0d/%0d", i, count, model.size(), overflow, ovf);
      end
      clear   = ($urandom_range(0, 499) == 0);
      pop     = ($urandom_range(0, 2) == 0) && model.size() > 0;
      push    = $urandom_range(0, 1);
      wr_data = {$urandom, $urandom};
      @(posedge clk);
      #1;
      if (clear) begin model.delete(); ovf = 0; end
      else begin
        bit acc;
        acc = push && model.size() < DEPTH;
        if (push && !acc) ovf++;
        if (pop) void'(model.pop_front());
        if (acc) model.push_back(wr_data);
      end
    end
    checks++;
    if (ovf == 0) begin failures++; $display("FAIL overflow never exercised"); end
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
