// Checks the dual-clock lane FIFO with unrelated write and read clocks.
// 3000 random words are written (write clock period 7 units, random write
// enables, never into a full FIFO) and read on a read clock of period 11 with
// random read enables; every word must come out once, in order, with nothing
// extra.  Then the clocks are swapped in speed ratio by running a second pass
// with a fast reader, and the FIFO must drain to empty.  Interface and timing
// are those of rtl/async_fifo.sv (show-ahead read, Gray pointers).
module async_fifo_tb;
  localparam int W = 9, DEPTH = 8;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  int   rd_half = 11;
  always #7 wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;
  logic wr_en = 0, rd_en = 0, wr_full, rd_empty;
  logic [W-1:0] wr_data = '0, rd_data;
  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, nwr = 0, nrd = 0;
  logic [W-1:0] model [$];
  localparam int NWORDS = 3000;

  always @(posedge wr_clk) if (wr_rst_n) begin
    if (wr_en && !wr_full) begin model.push_back(wr_data); nwr++; end
    #1;
    wr_en   = (nwr < NWORDS) && $urandom_range(0, 2) != 0;
    wr_data = W'($urandom);
  end
  always @(posedge rd_clk) if (rd_rst_n) begin
    if (rd_en && !rd_empty) begin
      checks++;
      if (model.size() == 0 || rd_data != model[0]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d got %0d", nrd, rd_data);
      end
      if (model.size() > 0) void'(model.pop_front());
      nrd++;
    end
    #1;
    rd_en = $urandom_range(0, 2) != 0;
  end

  initial begin
    #50;
    wr_rst_n = 1;
    rd_rst_n = 1;
    wait (nrd == NWORDS / 2);
    rd_half = 3;          // reader becomes faster than the writer
    wait (nwr == NWORDS);
    #2000;
    checks++;
    if (nrd != NWORDS || !rd_empty || model.size() != 0) begin
      failures++;
      $display("FAIL written %0d read %0d empty %0b", nwr, nrd, rd_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
