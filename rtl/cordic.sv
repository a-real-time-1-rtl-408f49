// Pipelined CORDIC with a per-sample mode bit: rotation or vectoring.
//
// Rotation mode turns (x, y) by the angle th.  Vectoring mode drives y to
// zero and returns th + atan2(y, x).  Angles are ANGW-bit fractions of a full
// turn, so the signed reading spans [-pi, pi) and the unsigned one [0, 2pi).
// Because the iterations only reach +-pi/2, a first stage turns the vector by
// pi when needed (rotation: the angle lies in (pi/2, 3pi/2); vectoring:
// x < 0) and takes pi off the angle; ITER shift-and-add stages follow, one bit
// of angle per stage.  The magnitude grows by the CORDIC gain (about 1.6468);
// callers remove it.  Data widen by two bits to hold that gain.
//
// Timing: a new input every cycle; results leave ITER+1 cycles after in_valid.
// The algorithm is the textbook one the analyzer uses; widths and the
// iteration count are parameters of this implementation.
module cordic #(
  parameter int W    = 20,   // input data width (signed)
  parameter int AW   = 24,   // angle width
  parameter int ITER = 22    // micro-rotations
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_rot,      // 1: rotation, 0: vectoring
  input  logic signed [W-1:0]  in_x,
  input  logic signed [W-1:0]  in_y,
  input  logic [AW-1:0]        in_th,
  output logic                 out_valid,
  output logic signed [W+1:0]  out_x,
  output logic signed [W+1:0]  out_y,
  output logic [AW-1:0]        out_th
);
  localparam int XW = W + 2;

  function automatic logic [AW-1:0] atan_q(int i);
    real a;
    a = $atan(1.0 / (2.0 ** i)) / (2.0 * 3.141592653589793) * (2.0 ** AW);
    return AW'(longint'($floor(a + 0.5)));
  endfunction

  logic                 v_q   [ITER+1];
  logic                 rot_q [ITER+1];
  logic signed [XW-1:0] x_q   [ITER+1];
  logic signed [XW-1:0] y_q   [ITER+1];
  logic [AW-1:0]        th_q  [ITER+1];

  // Stage 0: move the vector into the right half plane (or the angle into
  // [-pi/2, pi/2]) by a rotation of pi.
  logic flip;
  logic [1:0] quad;
  assign quad = in_th[AW-1 -: 2];
  assign flip = in_rot ? (quad == 2'b01 && in_th[AW-3:0] != '0) || quad == 2'b10
                       : in_x < 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q[0] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    rot_q[0] <= in_rot;
    x_q[0]   <= flip ? -XW'(in_x) : XW'(in_x);
    y_q[0]   <= flip ? -XW'(in_y) : XW'(in_y);
    th_q[0]  <= flip ? in_th - (AW'(1) << (AW-1)) : in_th;
  end

  for (genvar i = 0; i < ITER; i++) begin : g_it
    localparam logic [AW-1:0] ATAN = atan_q(i);
    logic up;   // direction d = +1
    assign up = rot_q[i] ? !th_q[i][AW-1] : y_q[i][XW-1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_q[i+1] <= 1'b0;
      else        v_q[i+1] <= v_q[i];
    end

    always_ff @(posedge clk) begin
      rot_q[i+1] <= rot_q[i];
      if (up) begin
        x_q[i+1]  <= x_q[i] - (y_q[i] >>> i);
        y_q[i+1]  <= y_q[i] + (x_q[i] >>> i);
        th_q[i+1] <= th_q[i] - ATAN;
      end else begin
        x_q[i+1]  <= x_q[i] + (y_q[i] >>> i);
        y_q[i+1]  <= y_q[i] - (x_q[i] >>> i);
        th_q[i+1] <= th_q[i] + ATAN;
      end
    end
  end

  assign out_valid = v_q[ITER];
  assign out_x     = x_q[ITER];
  assign out_y     = y_q[ITER];
  assign out_th    = th_q[ITER];
endmodule
