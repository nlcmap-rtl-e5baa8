// data_dispatcher -- feeds input pixels from the data mem to the PE array.
//
// For an output pixel (i,j) of the tile both convolutions read the same
// neighbourhood of the padded input: Conv1 a W2 x W2 x K window, Conv2 a
// W1 x W1 x K window, both centred on (i,j).  On `load` the dispatcher reads
// the WMAX x WMAX positions around the pixel (WMAX = max(W1,W2)) from the
// data mem, one position (all K channels) per cycle, into a window register,
// then raises `ready`.  The window is held while the PE array works through
// every output channel and weight set of that pixel, so each input pixel is
// read from the data mem only WMAX*WMAX times per output pixel.
//
// `mode` selects the lane order on a_vec:
//   MODE_CONV1: lane (r*W2 + s)*K + q carries x(i+r, j+s, q)  (window W2)
//   MODE_CONV2: lane (n*W1 + m)*K + p carries x(i+n, j+m, p)  (window W1)
// Lanes beyond the active window size are zero.  The source names the
// block; the window register and the lane orders are this design's choice.
//
// Timing: counting the cycle in which `load` is high as the first, `ready`
// is high from cycle WMAX*WMAX + 3 on, until the next load.  Data mem address of a position = row_in_tile * twi + col,
// with twi the padded tile width.
module data_dispatcher #(
  parameter int unsigned K     = 3,
  parameter int unsigned W1    = 3,
  parameter int unsigned W2    = 3,
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = (512 + 2) * (11 + 2),
  localparam int unsigned WMAX = (W1 > W2) ? W1 : W2,
  localparam int unsigned G1   = W1 * W1 * K,
  localparam int unsigned G2   = W2 * W2 * K,
  localparam int unsigned NPE  = (G1 > G2) ? G1 : G2,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [15:0]            row,
  input  logic [15:0]            col,
  input  logic [15:0]            twi,
  output logic                   ready,
  output logic                   mem_rd_en,
  output logic [AW-1:0]          mem_rd_addr,
  input  logic [K-1:0][DW-1:0]   mem_rd_data,
  input  nlc_pkg::pe_mode_e      mode,
  output logic [NPE-1:0][DW-1:0] a_vec
);
  import nlc_pkg::*;

  localparam int unsigned OFF1 = (WMAX - W1) / 2;
  localparam int unsigned OFF2 = (WMAX - W2) / 2;
  localparam int unsigned CW   = $clog2(WMAX + 1);

  logic [K-1:0][DW-1:0] win [WMAX][WMAX];

  logic          fetching;
  logic [CW-1:0] rr, ss;          // position being requested
  logic          cap_v;           // a read returns this cycle
  logic [CW-1:0] cap_r, cap_s;    // where it goes
  logic          cap_last;
  logic [15:0]   base_row, base_col;
  logic [31:0]   addr_full;

  assign addr_full   = (32'(base_row) + 32'(rr)) * 32'(twi) + 32'(base_col) + 32'(ss);
  assign mem_rd_en   = fetching;
  assign mem_rd_addr = addr_full[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetching <= 1'b0;
      ready    <= 1'b0;
      rr       <= '0;
      ss       <= '0;
      cap_v    <= 1'b0;
      cap_r    <= '0;
      cap_s    <= '0;
      cap_last <= 1'b0;
      base_row <= '0;
      base_col <= '0;
    end else begin
      cap_v    <= fetching;
      cap_r    <= rr;
      cap_s    <= ss;
      cap_last <= fetching && (rr == CW'(WMAX - 1)) && (ss == CW'(WMAX - 1));
      if (load && !fetching) begin
        fetching <= 1'b1;
        ready    <= 1'b0;
        rr       <= '0;
        ss       <= '0;
        base_row <= row;
        base_col <= col;
      end else if (fetching) begin
        if (ss == CW'(WMAX - 1)) begin
          ss <= '0;
          if (rr == CW'(WMAX - 1)) fetching <= 1'b0;
          else rr <= rr + 1'b1;
        end else begin
          ss <= ss + 1'b1;
        end
      end
      if (cap_v && cap_last) ready <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (cap_v) win[cap_r][cap_s] <= mem_rd_data;
  end

  always_comb begin
    a_vec = '0;
    if (mode == MODE_CONV1) begin
      for (int r = 0; r < W2; r++)
        for (int s = 0; s < W2; s++)
          for (int q = 0; q < K; q++)
            a_vec[(r * W2 + s) * K + q] = win[r + OFF2][s + OFF2][q];
    end else begin
      for (int n = 0; n < W1; n++)
        for (int m = 0; m < W1; m++)
          for (int p = 0; p < K; p++)
            a_vec[(n * W1 + m) * K + p] = win[n + OFF1][m + OFF1][p];
    end
  end

  // A new window may only be requested once the previous fetch is over.
  assert property (@(posedge clk) disable iff (!rst_n) load |-> !fetching)
    else $error("data_dispatcher: load while fetching");

endmodule
