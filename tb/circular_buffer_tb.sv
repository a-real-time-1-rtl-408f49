// Checks the peeling decoder's circular buffer against a queue model.
// A small instance (DEPTH 13, so the pointers wrap often) gets 4000 cycles of
// random push and pop, never a push into a full buffer or a pop from an empty
// one (the design asserts on those), and an occasional clear.  Every cycle
// the show-ahead read data, count, empty and full are compared with the
// model.  Interface and timing are those of rtl/circular_buffer.sv: writes
// and pointer moves take effect at the clock edge, rd_data is combinational.
module circular_buffer_tb;
  localparam int DEPTH = 13, W = 10, CW = $clog2(DEPTH + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, push = 0, pop = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [CW-1:0] count;
  logic empty, full;
  circular_buffer #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (32'(count) != model.size() || empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
          (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d count %0d model %0d", i, count, model.size());
      end
      clear   = ($urandom_range(0, 299) == 0);
      pop     = $urandom_range(0, 2) != 0 && model.size() > 0;
      push    = $urandom_range(0, 3) != 0 && model.size() < DEPTH;
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (clear) model.delete();
      else begin
        if (pop) void'(model.pop_front());
        if (push) model.push_back(wr_data);
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
