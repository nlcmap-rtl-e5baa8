// opx_accumulator -- on-chip store of the output pixels of a tile.
//
// Each Conv2 dot product from the PE array (pixels times Q0.8 weights) is
// brought back to an 8-bit pixel, (sum >> 8) saturated to 0..255, and
// written at address (i*TWo + j)*TL + l.  After the tile the host reads the
// pixels out through the I/O port.  The requantization is this design's
// choice; the 8-bit output width and the THo*TWo*TL size follow the source.
//
// Timing: a write takes effect at the clock edge; a read returns rd_data
// with rd_valid one cycle after rd_en.
module opx_accumulator #(
  parameter int unsigned DEPTH = 512 * 11 * 6,
  parameter int unsigned ACC_W = 23,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_valid,
  input  logic [AW-1:0]           wr_addr,
  input  logic signed [ACC_W-1:0] wr_sum,
  input  logic                    rd_en,
  input  logic [AW-1:0]           rd_addr,
  output logic                    rd_valid,
  output logic [7:0]              rd_data
);
  import nlc_pkg::*;

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_valid) mem[wr_addr] <= out_q(32'(wr_sum));
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

endmodule
