// Check-node circular buffer of one sub-FFT stage.
//
// Holds the locations b of the stage's bins that are neither known to be
// empty nor resolved yet.  The peeling decoder pops a location from the read
// pointer, and, if the bin turns out to be an unresolved multi-signal bin,
// pushes it back at the write pointer for the next peeling pass.  Zero- and
// single-signal bins are simply not pushed back, which removes them.
// The head entry is visible on rd_data without a pop (show-ahead).  Push and
// pop may happen in the same cycle.  count is the current length; clear
// empties the buffer.  Depth n_i with BINW-bit entries follows the analyzer.
module circular_buffer #(
  parameter int DEPTH = 864,
  parameter int W     = 10,
  parameter int CW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  logic [W-1:0]  wr_data,
  input  logic          pop,
  output logic [W-1:0]  rd_data,
  output logic [CW-1:0] count,
  output logic          empty,
  output logic          full
);
  localparam int PW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rp, wp;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (count == '0);
  assign full    = (32'(count) == DEPTH);
  assign rd_data = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else if (clear) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (push && !full) wp <= inc(wp);
      if (pop && !empty) rp <= inc(rp);
      count <= count + CW'(push && !full) - CW'(pop && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full && !clear) mem[wp] <= wr_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("circular_buffer: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("circular_buffer: pop while empty");
endmodule
