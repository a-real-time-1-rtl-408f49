// Single-clock FIFO holding the recovered (j, X[j]) pairs until the
// processor reads them.
//
// A plain memory with read and write pointers; rd_data shows the oldest entry
// (show-ahead) and pop removes it.  A push into a full FIFO is dropped and
// counted in overflow so that software can tell the output was cut short.
// The default depth of 1944 entries (9 % of 21600 bins) of 55 bits follows
// the analyzer's sizing; the overflow counter is this implementation's own.
module sync_fifo #(
  parameter int DEPTH = 1944,
  parameter int W     = 55,
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
  output logic          full,
  output logic [15:0]   overflow
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
      rp       <= '0;
      wp       <= '0;
      count    <= '0;
      overflow <= '0;
    end else if (clear) begin
      rp       <= '0;
      wp       <= '0;
      count    <= '0;
      overflow <= '0;
    end else begin
      if (push && !full) wp <= inc(wp);
      if (push && full && overflow != '1) overflow <= overflow + 1'b1;
      if (pop && !empty) rp <= inc(rp);
      count <= count + CW'(push && !full) - CW'(pop && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full && !clear) mem[wp] <= wr_data;
  end
endmodule
