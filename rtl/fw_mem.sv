// fw_mem -- on-chip buffer for the fixed weights u of a tile.
//
// Conv1 produces one space-variant weight v(n,m,p) of channel l per PE-array
// pass, and that pass needs the W2*W2*K fixed weights u_{n,m,p,l}(r,s,q).
// They are therefore stored as one wide word per (l,n,m,p), at address
// (l*W1 + n)*W1*K + m*K + p, with lane (r*W2 + s)*K + q holding the signed
// 8-bit weight.  TL*W1*W1*K words are needed per tile (the source's F_W term
// with the tiling it keeps fixed).  The word layout is this design's choice.
//
// Interface: byte-lane write port for the host, read port with one cycle of
// latency.  Read and write of the same word in one cycle returns old data.
module fw_mem #(
  parameter int unsigned LANES = 27,
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 162,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [AW-1:0]            wr_addr,
  input  logic [LW-1:0]            wr_lane,
  input  logic [DW-1:0]            wr_data,
  input  logic                     rd_en,
  input  logic [AW-1:0]            rd_addr,
  output logic [LANES-1:0][DW-1:0] rd_data
);

  logic [LANES-1:0][DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr][wr_lane] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
