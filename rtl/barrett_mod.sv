// x mod N for a constant N by Barrett reduction.
//
// The quotient is estimated as (x * M) >> K with the precomputed reciprocal
// M = floor(2**K / N), so no divider is needed; the estimate is at most two
// below the true quotient, and two compare-and-subtract steps (the cheap
// "x - n < 0 ? x : x - n" form) finish the remainder.  Purely combinational.
// The reduction method is the one the analyzer uses for its modulo units;
// the widths are parameters of this implementation.
module barrett_mod #(
  parameter int N  = 21600,  // modulus
  parameter int XW = 20      // width of x
) (
  input  logic [XW-1:0]          x,
  output logic [$clog2(N)-1:0]   r
);
  localparam int NW = $clog2(N);
  localparam int K  = XW + 1;
  localparam logic [K:0] M = (K+1)'((64'd1 << K) / 64'(N));

  logic [XW+K:0]  prod;
  logic [XW-1:0]  q;
  logic [XW+NW:0] qn;
  logic [XW:0]    r0, r1, r2;

  always_comb begin
    prod = (XW+K+1)'(x) * (XW+K+1)'(M);
    q    = XW'(prod >> K);
    qn   = (XW+NW+1)'(q) * (XW+NW+1)'(N);
    r0   = (XW+1)'(x) - (XW+1)'(qn);
    r1   = (r0 >= (XW+1)'(N)) ? r0 - (XW+1)'(N) : r0;
    r2   = (r1 >= (XW+1)'(N)) ? r1 - (XW+1)'(N) : r1;
    r    = NW'(r2);
  end
endmodule
