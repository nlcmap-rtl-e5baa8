// svw_accumulator -- on-chip store of the space-variant weights of a tile.
//
// The space-variant weights never leave the chip: THo*TWo*TL words are kept,
// one per output pixel and channel (i,j,l) at address (i*TWo + j)*TL + l,
// each holding the W1*W1*K weights of that set, lane (n*W1 + m)*K + p.
// During Conv1 the PE array delivers the weights of a set one per cycle,
// lane by lane; the accumulator gathers them in a word register and writes
// the whole word when the last lane arrives.  During normalization the
// AF/Norm unit reads and rewrites whole words, and during Conv2 the PE
// array reads one word per cycle.  The word organisation is this design's
// choice; what is stored follows the source's SV_W term.
//
// Timing: writes take effect at the clock edge; the shared read port has
// one cycle of latency.  The phases never overlap, which the assertions
// check.
module svw_accumulator #(
  parameter int unsigned LANES = 27,
  parameter int unsigned DEPTH = 512 * 11 * 6,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // Conv1 results, one weight per cycle
  input  logic                   c1_valid,
  input  logic [LW-1:0]          c1_lane,
  input  logic [AW-1:0]          c1_addr,
  input  logic                   c1_last,
  input  logic [7:0]             c1_data,
  // normalizer read / write-back
  input  logic                   n_rd_en,
  input  logic [AW-1:0]          n_rd_addr,
  input  logic                   n_wr_en,
  input  logic [AW-1:0]          n_wr_addr,
  input  logic [LANES-1:0][7:0]  n_wr_data,
  // Conv2 read
  input  logic                   c2_rd_en,
  input  logic [AW-1:0]          c2_rd_addr,
  output logic [LANES-1:0][7:0]  rd_data
);

  logic [LANES-1:0][7:0] mem [DEPTH];
  logic [LANES-1:0][7:0] gather_q, gather_c;

  always_comb begin
    gather_c = gather_q;
    gather_c[c1_lane] = c1_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gather_q <= '0;
    else if (c1_valid) gather_q <= c1_last ? '0 : gather_c;
  end

  always_ff @(posedge clk) begin
    if (c1_valid && c1_last) mem[c1_addr] <= gather_c;
    else if (n_wr_en)        mem[n_wr_addr] <= n_wr_data;
  end

  always_ff @(posedge clk) begin
    if (n_rd_en)       rd_data <= mem[n_rd_addr];
    else if (c2_rd_en) rd_data <= mem[c2_rd_addr];
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(c1_valid && n_wr_en))
    else $error("svw_accumulator: Conv1 and normalizer write together");
  assert property (@(posedge clk) disable iff (!rst_n) !(n_rd_en && c2_rd_en))
    else $error("svw_accumulator: normalizer and Conv2 read together");

endmodule
