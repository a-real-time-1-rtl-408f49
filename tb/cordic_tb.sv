// Checks the CORDIC in both modes against floating-point references:
// vectoring must return atan2(y, x) and K*|(x, y)|, rotation must return
// K*(x, y) turned by the angle, for random inputs in all four quadrants,
// with one result per cycle and a latency of ITER+1 cycles.
module cordic_tb;
  localparam int W = 20, AW = 24, ITER = 22;
  localparam real PI2 = 6.283185307179586, KG = 1.6467602581210656;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_rot = 0, out_valid;
  logic signed [W-1:0] in_x = '0, in_y = '0;
  logic [AW-1:0] in_th = '0, out_th;
  logic signed [W+1:0] out_x, out_y;

  cordic #(.W(W), .AW(AW), .ITER(ITER)) dut (.*);
  function automatic real fabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  int checks = 0, failures = 0;
  typedef struct { bit rot; int x, y; longint th; int t0; } req_t;
  req_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (out_valid && rst_n) begin
    req_t r;
    real ex, ey, a, dth;
    r = q.pop_front();
    checks++;
    if (cyc - r.t0 != ITER + 1) begin failures++; $display("FAIL latency %0d", cyc - r.t0); end
    if (r.rot) begin
      a  = real'(r.th) / (2.0 ** AW) * PI2;
      ex = KG * (r.x * $cos(a) - r.y * $sin(a));
      ey = KG * (r.x * $sin(a) + r.y * $cos(a));
      checks++;
      if (fabs(real'(out_x) - ex) > 8 + 1e-4 * fabs(ex) || fabs(real'(out_y) - ey) > 8 + 1e-4 * fabs(ey)) begin
        failures++; $display("FAIL rot (%0d,%0d) th=%0d -> (%0d,%0d) exp (%f,%f)", r.x, r.y, r.th, out_x, out_y, ex, ey);
      end
    end else begin
      a   = $atan2(real'(r.y), real'(r.x)) / PI2 * (2.0 ** AW);
      dth = real'($signed(out_th - AW'(longint'(a))));
      checks++;
      if (fabs(dth) > 64.0 + (2.0 ** AW) * 4.0 / (PI2 * $sqrt(real'(r.x)*r.x + real'(r.y)*r.y + 1.0))) begin
        failures++; $display("FAIL vec (%0d,%0d) th=%0d exp %f", r.x, r.y, out_th, a);
      end
      checks++;
      if (fabs(real'(out_x) - KG * $sqrt(real'(r.x)*r.x + real'(r.y)*r.y)) > 16 + 1e-4 * fabs(real'(out_x))) begin
        failures++; $display("FAIL vec mag (%0d,%0d) -> %0d", r.x, r.y, out_x);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      req_t r;
      @(negedge clk);
      r.rot = i[0];
      r.x   = $signed($urandom_range(0, 2**19 - 1)) - 2**18;
      r.y   = $signed($urandom_range(0, 2**19 - 1)) - 2**18;
      r.th  = r.rot ? longint'($urandom_range(0, 2**AW - 1)) : 0;
      if (i < 4) begin r.x = (i < 2) ? -1000 : 1000; r.y = (i % 2) ? 0 : 5; end
      r.t0  = cyc;
      in_valid = 1; in_rot = r.rot; in_x = W'(r.x); in_y = W'(r.y); in_th = AW'(r.th);
      q.push_back(r);
    end
    @(negedge clk) in_valid = 0;
    repeat (ITER + 5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
