// Frame alignment of the ADC lanes (reference-clock domain).
//
// All subsampling clocks line up again every LCM reference cycles (21600, the
// least common multiple of 25, 27 and 32).  A counter reset together with the
// dividers marks that point.  When the core requests a frame (req, a level
// from the core clock, synchronized here) a window opens at the next
// alignment point and stays open for exactly LCM cycles; lane_valid is each
// lane's sample enable qualified by the window, so every lane of stage i
// delivers exactly n_i samples of the same frame.  One frame is served per
// request: ack rises when the window closes and falls after req is dropped.
// The once-per-21600-cycle alignment and the handshake follow the analyzer;
// counter-based detection and the two-level handshake are this
// implementation's choices.
module fifo_align #(
  parameter int LCM = 21600,
  parameter int NL  = 18
) (
  input  logic          clk_ref,
  input  logic          rst_n,
  input  logic          req,           // from core clock domain
  input  logic [NL-1:0] lane_tap,      // divider taps
  output logic [NL-1:0] lane_valid,    // write enables of the lane FIFOs
  output logic          window,
  output logic          ack            // to core clock domain
);
  localparam int CW = $clog2(LCM);
  logic [CW-1:0] cnt;
  logic          req_s1, req_s2, served;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      req_s1 <= 1'b0;
      req_s2 <= 1'b0;
      window <= 1'b0;
      served <= 1'b0;
      ack    <= 1'b0;
    end else begin
      req_s1 <= req;
      req_s2 <= req_s1;
      cnt    <= (32'(cnt) == LCM - 1) ? '0 : cnt + 1'b1;
      if (32'(cnt) == LCM - 1) begin
        if (window) begin
          window <= 1'b0;
          ack    <= 1'b1;
        end else if (req_s2 && !served) begin
          window <= 1'b1;
          served <= 1'b1;
        end
      end
      if (!req_s2 && !window) begin
        served <= 1'b0;
        ack    <= 1'b0;
      end
    end
  end

  assign lane_valid = window ? lane_tap : '0;
endmodule
