// Dual-clock FIFO carrying one ADC lane's samples from the reference-clock
// domain into the core-clock domain.
//
// Classic Gray-coded pointer design: each side keeps a binary and a Gray
// pointer, the other side's Gray pointer crosses through two flip-flops, and
// full/empty are decided from the synchronized copies, so both flags are
// pessimistic and never wrong.  wr_en while full and rd_en while empty are
// ignored.  rd_data shows the oldest entry.  DEPTH must be a power of two.
// The analyzer places one such FIFO at each of its 18 lane-to-core
// boundaries; the depth and the Gray-code scheme are this implementation's.
module async_fifo #(
  parameter int W     = 9,
  parameter int DEPTH = 8
) (
  input  logic          wr_clk,
  input  logic          wr_rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic          wr_full,
  input  logic          rd_clk,
  input  logic          rd_rst_n,
  input  logic          rd_en,
  output logic [W-1:0]  rd_data,
  output logic          rd_empty
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]  wbin_nx, rbin_nx;

  function automatic logic [AW:0] b2g(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_nx = wbin + (AW+1)'(wr_en && !wr_full);
  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= b2g(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // read side
  assign rd_empty = (rgray == wgray_r2);
  assign rbin_nx  = rbin + (AW+1)'(rd_en && !rd_empty);
  assign rd_data  = mem[rbin[AW-1:0]];
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= b2g(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
