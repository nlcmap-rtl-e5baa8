// nlc_accelerator -- accelerator for one tile of a Non-Linear Convolution
// (NLC) layer.
//
// An NLC layer replaces the constant kernel of a convolution with a
// space-variant one: for every output pixel (i,j) and output channel l a
// W1 x W1 x K kernel v_{i,j,l} is computed from the input itself, by a first
// convolution of the input x with fixed weights u over a W2 x W2 x K
// window (Conv1), an activation function and a normalization over the
// whole kernel.  A second convolution (Conv2) of x with v gives the output y.
// Feature maps are far larger than the on-chip memory, so the layer is
// computed tile by tile: the host (or a DMA engine) moves a padded input
// tile and the fixed weights of T_L output channels into the on-chip
// buffers, starts the tile, and reads back T_Ho x T_Wo x T_L output pixels.
// The space-variant weights are produced and consumed entirely on chip.
//
// Blocks, as in the architecture the design follows: data mem (input tile),
// fixed-weights mem, data dispatcher, PE array (27 MACs, shared by both
// convolutions), AF/Norm unit, s-v weights accumulator, output pixel
// accumulator and control unit.  The buffer sizes default to the largest
// mapping the source reports (1 MB budget: T_Ho = 512, T_Wo = 11, T_L = 6
// for a 3-channel layer with 3x3 windows and 6 output channels); any tile
// that fits is accepted at run time.  Number formats, the concrete AF and
// Norm and the host port are this design's choice (see nlc_pkg).
//
// Host port:
//   io_wr_*  writes one byte: target TGT_DATA, word = padded position
//            row*(T_Wo+W-1)+col, lane = channel; or target TGT_FW, word =
//            (l*W1+n)*W1*K + m*K + p, lane = (r*W2+s)*K + q.  Only while idle.
//   start/cfg  starts a tile; busy while it runs; done pulses at the end;
//            cfg_err (valid from done) tells that the tile was rejected.
//   io_rd_*  reads output pixel (i*T_Wo + j)*T_L + l, one cycle latency.
module nlc_accelerator #(
  parameter int unsigned K       = 3,
  parameter int unsigned W1      = 3,
  parameter int unsigned W2      = 3,
  parameter int unsigned BUF_THO = 512,
  parameter int unsigned BUF_TWO = 11,
  parameter int unsigned BUF_TL  = 6,
  localparam int unsigned WMAX   = (W1 > W2) ? W1 : W2,
  localparam int unsigned G1     = W1 * W1 * K,
  localparam int unsigned G2     = W2 * W2 * K,
  localparam int unsigned NPE    = (G1 > G2) ? G1 : G2,
  localparam int unsigned DATA_DEPTH = (BUF_THO + WMAX - 1) * (BUF_TWO + WMAX - 1),
  localparam int unsigned FW_DEPTH   = BUF_TL * G1,
  localparam int unsigned SV_DEPTH   = BUF_THO * BUF_TWO * BUF_TL,
  localparam int unsigned SV_AW  = (SV_DEPTH > 1) ? $clog2(SV_DEPTH) : 1,
  localparam int unsigned DATA_AW = (DATA_DEPTH > 1) ? $clog2(DATA_DEPTH) : 1,
  localparam int unsigned FW_AW  = (FW_DEPTH > 1) ? $clog2(FW_DEPTH) : 1,
  localparam int unsigned IO_AW  = (SV_AW > DATA_AW) ? SV_AW : DATA_AW,
  localparam int unsigned IO_LW  = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int unsigned ACC_W  = 18 + $clog2(NPE)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  nlc_pkg::tile_cfg_t  cfg,
  output logic                busy,
  output logic                done,
  output logic                cfg_err,
  input  logic                io_wr_en,
  input  nlc_pkg::wr_target_e io_wr_target,
  input  logic [IO_AW-1:0]    io_wr_addr,
  input  logic [IO_LW-1:0]    io_wr_lane,
  input  logic [7:0]          io_wr_data,
  input  logic                io_rd_en,
  input  logic [SV_AW-1:0]    io_rd_addr,
  output logic                io_rd_valid,
  output logic [7:0]          io_rd_data
);
  import nlc_pkg::*;

  localparam int unsigned LW1   = (G1 > 1) ? $clog2(G1) : 1;
  localparam int unsigned DM_LW = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned FW_LW = (G2 > 1) ? $clog2(G2) : 1;
  localparam int unsigned TAG_W = SV_AW + LW1 + 2;

  typedef struct packed {
    logic             conv2;
    logic             last;
    logic [LW1-1:0]   lane;
    logic [SV_AW-1:0] addr;
  } pe_tag_t;

  phase_e            phase;
  pe_mode_e          mode;
  logic [4:0]        af_shift;
  logic              disp_load, disp_ready;
  logic [15:0]       disp_row, disp_col, twi;
  logic              dm_rd_en;
  logic [DATA_AW-1:0] dm_rd_addr;
  logic [K-1:0][7:0] dm_rd_data;
  logic              fw_rd_en;
  logic [FW_AW-1:0]  fw_rd_addr;
  logic [G2-1:0][7:0] fw_rd_data;
  logic              c2_rd_en;
  logic [SV_AW-1:0]  c2_rd_addr;
  logic [G1-1:0][7:0] sv_rd_data;
  logic              op_valid, op_last, op_conv2;
  logic [SV_AW-1:0]  op_addr;
  logic [LW1-1:0]    op_lane;
  logic              norm_start, norm_done, norm_busy;
  logic [SV_AW-1:0]  norm_addr;
  logic              n_rd_en, n_wr_en;
  logic [SV_AW-1:0]  n_rd_addr, n_wr_addr;
  logic [G1-1:0][7:0] n_wr_data;
  logic [NPE-1:0][7:0] a_vec;
  logic [NPE-1:0][8:0] b_vec;
  pe_tag_t           in_tag, out_tag;
  logic              pe_out_valid;
  logic signed [ACC_W-1:0] pe_sum;
  logic [7:0]        af_out;

  control_unit #(.K(K), .W1(W1), .W2(W2), .BUF_THO(BUF_THO), .BUF_TWO(BUF_TWO),
                 .BUF_TL(BUF_TL)) u_ctrl (
    .clk, .rst_n, .start, .cfg, .busy, .done, .cfg_err, .phase, .af_shift,
    .disp_load, .disp_row, .disp_col, .twi, .disp_ready, .mode,
    .fw_rd_en, .fw_rd_addr, .c2_rd_en, .c2_rd_addr,
    .op_valid, .op_addr, .op_lane, .op_last, .op_conv2,
    .norm_start, .norm_addr, .norm_done
  );

  data_mem #(.K(K), .DEPTH(DATA_DEPTH)) u_data_mem (
    .clk,
    .wr_en   (io_wr_en && io_wr_target == TGT_DATA && !busy),
    .wr_addr (DATA_AW'(io_wr_addr)),
    .wr_lane (DM_LW'(io_wr_lane)),
    .wr_data (io_wr_data),
    .rd_en   (dm_rd_en),
    .rd_addr (dm_rd_addr),
    .rd_data (dm_rd_data)
  );

  fw_mem #(.LANES(G2), .DEPTH(FW_DEPTH)) u_fw_mem (
    .clk,
    .wr_en   (io_wr_en && io_wr_target == TGT_FW && !busy),
    .wr_addr (FW_AW'(io_wr_addr)),
    .wr_lane (FW_LW'(io_wr_lane)),
    .wr_data (io_wr_data),
    .rd_en   (fw_rd_en),
    .rd_addr (fw_rd_addr),
    .rd_data (fw_rd_data)
  );

  data_dispatcher #(.K(K), .W1(W1), .W2(W2), .DEPTH(DATA_DEPTH)) u_disp (
    .clk, .rst_n,
    .load        (disp_load),
    .row         (disp_row),
    .col         (disp_col),
    .twi         (twi),
    .ready       (disp_ready),
    .mem_rd_en   (dm_rd_en),
    .mem_rd_addr (dm_rd_addr),
    .mem_rd_data (dm_rd_data),
    .mode        (mode),
    .a_vec       (a_vec)
  );

  // Weight operands: signed fixed weights in Conv1, Q0.8 space-variant
  // weights in Conv2.
  always_comb begin
    b_vec = '0;
    if (op_conv2) begin
      for (int k = 0; k < G1; k++) b_vec[k] = {1'b0, sv_rd_data[k]};
    end else begin
      for (int k = 0; k < G2; k++) b_vec[k] = {fw_rd_data[k][7], fw_rd_data[k]};
    end
  end

  assign in_tag = '{conv2: op_conv2, last: op_last, lane: op_lane, addr: op_addr};

  pe_array #(.NPE(NPE), .TAG_W(TAG_W)) u_pe (
    .clk, .rst_n,
    .in_valid  (op_valid),
    .in_tag    (in_tag),
    .a         (a_vec),
    .b         (b_vec),
    .out_valid (pe_out_valid),
    .out_tag   (out_tag),
    .out_sum   (pe_sum)
  );

  af_norm #(.LANES(G1), .ACC_W(ACC_W), .DEPTH(SV_DEPTH)) u_af_norm (
    .clk, .rst_n,
    .af_in      (pe_sum),
    .af_shift   (af_shift),
    .af_out     (af_out),
    .norm_start (norm_start),
    .norm_addr  (norm_addr),
    .norm_busy  (norm_busy),
    .norm_done  (norm_done),
    .sv_rd_en   (n_rd_en),
    .sv_rd_addr (n_rd_addr),
    .sv_rd_data (sv_rd_data),
    .sv_wr_en   (n_wr_en),
    .sv_wr_addr (n_wr_addr),
    .sv_wr_data (n_wr_data)
  );

  svw_accumulator #(.LANES(G1), .DEPTH(SV_DEPTH)) u_svw (
    .clk, .rst_n,
    .c1_valid   (pe_out_valid && !out_tag.conv2),
    .c1_lane    (out_tag.lane),
    .c1_addr    (out_tag.addr),
    .c1_last    (out_tag.last),
    .c1_data    (af_out),
    .n_rd_en    (n_rd_en),
    .n_rd_addr  (n_rd_addr),
    .n_wr_en    (n_wr_en),
    .n_wr_addr  (n_wr_addr),
    .n_wr_data  (n_wr_data),
    .c2_rd_en   (c2_rd_en),
    .c2_rd_addr (c2_rd_addr),
    .rd_data    (sv_rd_data)
  );

  opx_accumulator #(.DEPTH(SV_DEPTH), .ACC_W(ACC_W)) u_opx (
    .clk, .rst_n,
    .wr_valid (pe_out_valid && out_tag.conv2),
    .wr_addr  (out_tag.addr),
    .wr_sum   (pe_sum),
    .rd_en    (io_rd_en && !busy),
    .rd_addr  (io_rd_addr),
    .rd_valid (io_rd_valid),
    .rd_data  (io_rd_data)
  );

  // The host may only touch the buffers between tiles.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(io_wr_en || io_rd_en))
    else $error("nlc_accelerator: host access while a tile is running");
  // Conv2 must not start before every set is normalized.
  assert property (@(posedge clk) disable iff (!rst_n) (phase == PH_C2_RUN) |-> !norm_busy)
    else $error("nlc_accelerator: Conv2 overlaps normalization");

endmodule
