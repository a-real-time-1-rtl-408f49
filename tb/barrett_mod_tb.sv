// Checks Barrett reduction against the % operator for edge values and
// random inputs, for the 21600-point modulus and for the sub-FFT sizes.
module barrett_mod_tb;
  localparam int XW = 20;
  logic [XW-1:0] x;
  logic [14:0]   r0;
  logic [9:0]    r1, r2;
  barrett_mod #(.N(21600), .XW(XW)) d0 (.x(x), .r(r0));
  barrett_mod #(.N(864),   .XW(XW)) d1 (.x(x), .r(r1));
  barrett_mod #(.N(675),   .XW(XW)) d2 (.x(x), .r(r2));
  int checks = 0, failures = 0;
  task automatic one(int v);
    x = XW'(v);
    #1;
    checks++;
    if (int'(r0) != v % 21600 || int'(r1) != v % 864 || int'(r2) != v % 675) begin
      failures++;
      $display("FAIL x=%0d: %0d %0d %0d", v, r0, r1, r2);
    end
  endtask
  initial begin
    int edges [8] = '{0, 1, 21599, 21600, 43199, 863, 864, 2**XW - 1};
    foreach (edges[i]) one(edges[i]);
    for (int i = 0; i < 5000; i++) one(int'($urandom_range(0, 2**XW - 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
