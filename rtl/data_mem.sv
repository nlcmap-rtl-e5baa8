// data_mem -- on-chip buffer for the padded input feature-map tile.
//
// The tile of input pixels needed by one output tile, including the halo the
// convolution windows reach into, is held here: (THo+W-1) rows of (TWo+W-1)
// positions, W being the larger of the two window sizes.  One word holds the
// K channels of one position, so the data dispatcher reads a whole pixel
// column of channels per cycle.  The host writes one channel byte at a time
// (word address plus lane); the word layout is this design's choice.
//
// Interface: write port (wr_en, wr_addr, wr_lane, wr_data) and a read port
// with one cycle of latency (rd_en, rd_addr -> rd_data on the next cycle).
// Simultaneous read and write of the same word returns the old contents.
module data_mem #(
  parameter int unsigned K     = 3,
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = (512 + 2) * (11 + 2),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [LW-1:0]        wr_lane,
  input  logic [DW-1:0]        wr_data,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic [K-1:0][DW-1:0] rd_data
);

  logic [K-1:0][DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr][wr_lane] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
