// control_unit -- sequences the computation of one NLC output tile.
//
// The host chooses the tile (T_Ho x T_Wo output pixels, T_L output channels,
// all K input channels) and starts it; the control unit first checks that
// the tile fits the four buffers and rejects it with `cfg_err` otherwise.
// It then runs the loop nest of the NLC layer on the tile in three phases:
//
//   Conv1  for each pixel (i,j): have the dispatcher fetch the window, then
//          for each l < T_L and each weight set lane g = (n,m,p) issue one
//          PE-array pass that reads fixed-weight word l*W1*W1*K + g and
//          yields v_{i,j,l}(n,m,p).
//   Norm   for each set (i,j,l): start the normalizer and wait for it.
//   Conv2  for each pixel (i,j): fetch the window, then for each l issue one
//          pass that reads the s-v weight word (i*T_Wo + j)*T_L + l and
//          yields y(i,j,l).
//
// Normalization starts only when every set of the tile is complete, as the
// source requires (the loops over n, m and p finish before Norm).  The tile-
// level loop order inside each phase, the window reuse over all l, and the
// pipeline drain between pixels are this design's choice.
//
// Issue interface: in a RUN cycle the unit asserts the weight-memory read
// (fw_rd_* or c2_rd_*); one cycle later, aligned with the read data, it
// presents op_valid with op_addr (destination word), op_lane, op_last and
// op_conv2 for the PE-array tag.  `done` pulses for one cycle at the end
// of a tile (or at once after a rejected start).
module control_unit #(
  parameter int unsigned K       = 3,
  parameter int unsigned W1      = 3,
  parameter int unsigned W2      = 3,
  parameter int unsigned BUF_THO = 512,
  parameter int unsigned BUF_TWO = 11,
  parameter int unsigned BUF_TL  = 6,
  localparam int unsigned WMAX      = (W1 > W2) ? W1 : W2,
  localparam int unsigned G1        = W1 * W1 * K,
  localparam int unsigned DATA_DEPTH = (BUF_THO + WMAX - 1) * (BUF_TWO + WMAX - 1),
  localparam int unsigned FW_DEPTH  = BUF_TL * G1,
  localparam int unsigned SV_DEPTH  = BUF_THO * BUF_TWO * BUF_TL,
  localparam int unsigned FW_AW     = (FW_DEPTH > 1) ? $clog2(FW_DEPTH) : 1,
  localparam int unsigned SV_AW     = (SV_DEPTH > 1) ? $clog2(SV_DEPTH) : 1,
  localparam int unsigned LW        = (G1 > 1) ? $clog2(G1) : 1,
  localparam int unsigned DRAIN     = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  nlc_pkg::tile_cfg_t   cfg,
  output logic                 busy,
  output logic                 done,
  output logic                 cfg_err,
  output nlc_pkg::phase_e      phase,
  output logic [4:0]           af_shift,
  // data dispatcher
  output logic                 disp_load,
  output logic [15:0]          disp_row,
  output logic [15:0]          disp_col,
  output logic [15:0]          twi,
  input  logic                 disp_ready,
  output nlc_pkg::pe_mode_e    mode,
  // weight reads
  output logic                 fw_rd_en,
  output logic [FW_AW-1:0]     fw_rd_addr,
  output logic                 c2_rd_en,
  output logic [SV_AW-1:0]     c2_rd_addr,
  // operand issue, one cycle after the reads
  output logic                 op_valid,
  output logic [SV_AW-1:0]     op_addr,
  output logic [LW-1:0]        op_lane,
  output logic                 op_last,
  output logic                 op_conv2,
  // normalizer
  output logic                 norm_start,
  output logic [SV_AW-1:0]     norm_addr,
  input  logic                 norm_done
);
  import nlc_pkg::*;

  tile_cfg_t   cfg_q;
  logic [15:0] i_q, j_q;
  logic [31:0] pix_q;          // i*TWo + j
  logic [7:0]  l_q;
  logic [LW-1:0] g_q;
  logic [31:0] w_q;            // normalizer set counter
  logic [31:0] n_sets;         // THo*TWo*TL
  logic        load_sent;
  logic        norm_wait;
  logic [2:0]  drain_q;
  logic        fits;
  logic [31:0] thi_c, twi_c;
  logic [31:0] word_c;

  // Capacity check of a requested tile against the buffers.
  always_comb begin
    thi_c = 32'(cfg.tho) + 32'(WMAX - 1);
    twi_c = 32'(cfg.two) + 32'(WMAX - 1);
    fits  = (cfg.tho != 0) && (cfg.two != 0) && (cfg.tl != 0)
         && (thi_c * twi_c <= 32'(DATA_DEPTH))
         && (32'(cfg.tl) * 32'(G1) <= 32'(FW_DEPTH))
         && (32'(cfg.tho) * 32'(cfg.two) * 32'(cfg.tl) <= 32'(SV_DEPTH));
  end

  assign twi      = cfg_q.two + 16'(WMAX - 1);
  assign af_shift = cfg_q.af_shift;
  assign disp_row = i_q;
  assign disp_col = j_q;
  assign busy     = (phase != PH_IDLE);
  assign mode     = (phase == PH_C2_FETCH || phase == PH_C2_RUN || phase == PH_C2_DRAIN)
                    ? MODE_CONV2 : MODE_CONV1;
  assign word_c   = pix_q * 32'(cfg_q.tl) + 32'(l_q);

  assign disp_load  = (phase == PH_C1_FETCH || phase == PH_C2_FETCH) && !load_sent;
  assign fw_rd_en   = (phase == PH_C1_RUN);
  assign fw_rd_addr = FW_AW'(32'(l_q) * 32'(G1) + 32'(g_q));
  assign c2_rd_en   = (phase == PH_C2_RUN);
  assign c2_rd_addr = SV_AW'(word_c);
  assign norm_start = (phase == PH_NORM) && !norm_wait;
  assign norm_addr  = SV_AW'(w_q);

  // Operand issue is aligned with the one-cycle weight read.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_valid <= 1'b0;
      op_addr  <= '0;
      op_lane  <= '0;
      op_last  <= 1'b0;
      op_conv2 <= 1'b0;
    end else begin
      op_valid <= fw_rd_en || c2_rd_en;
      op_addr  <= SV_AW'(word_c);
      op_lane  <= g_q;
      op_last  <= c2_rd_en || (g_q == LW'(G1 - 1));
      op_conv2 <= c2_rd_en;
    end
  end

  // Advance to the next pixel, or leave the phase after the last one.
  function automatic logic last_pixel();
    return (i_q == cfg_q.tho - 16'd1) && (j_q == cfg_q.two - 16'd1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      cfg_q     <= '0;
      i_q       <= '0;
      j_q       <= '0;
      pix_q     <= '0;
      l_q       <= '0;
      g_q       <= '0;
      w_q       <= '0;
      n_sets    <= '0;
      load_sent <= 1'b0;
      norm_wait <= 1'b0;
      drain_q   <= '0;
      done      <= 1'b0;
      cfg_err   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE: if (start) begin
          cfg_err <= !fits;
          if (!fits) begin
            done <= 1'b1;
          end else begin
            cfg_q     <= cfg;
            n_sets    <= 32'(cfg.tho) * 32'(cfg.two) * 32'(cfg.tl);
            i_q       <= '0;
            j_q       <= '0;
            pix_q     <= '0;
            load_sent <= 1'b0;
            phase     <= PH_C1_FETCH;
          end
        end

        PH_C1_FETCH, PH_C2_FETCH: begin
          if (!load_sent) load_sent <= 1'b1;
          else if (disp_ready) begin
            load_sent <= 1'b0;
            l_q       <= '0;
            g_q       <= '0;
            phase     <= (phase == PH_C1_FETCH) ? PH_C1_RUN : PH_C2_RUN;
          end
        end

        PH_C1_RUN: begin
          if (g_q == LW'(G1 - 1)) begin
            g_q <= '0;
            if (l_q == cfg_q.tl - 8'd1) begin
              drain_q <= 3'(DRAIN);
              phase   <= PH_C1_DRAIN;
            end else begin
              l_q <= l_q + 8'd1;
            end
          end else begin
            g_q <= g_q + 1'b1;
          end
        end

        PH_C2_RUN: begin
          if (l_q == cfg_q.tl - 8'd1) begin
            drain_q <= 3'(DRAIN);
            phase   <= PH_C2_DRAIN;
          end else begin
            l_q <= l_q + 8'd1;
          end
        end

        PH_C1_DRAIN, PH_C2_DRAIN: begin
          if (drain_q != 0) begin
            drain_q <= drain_q - 3'd1;
          end else if (!last_pixel()) begin
            if (j_q == cfg_q.two - 16'd1) begin
              j_q <= '0;
              i_q <= i_q + 16'd1;
            end else begin
              j_q <= j_q + 16'd1;
            end
            pix_q <= pix_q + 32'd1;
            phase <= (phase == PH_C1_DRAIN) ? PH_C1_FETCH : PH_C2_FETCH;
          end else if (phase == PH_C1_DRAIN) begin
            w_q       <= '0;
            norm_wait <= 1'b0;
            phase     <= PH_NORM;
          end else begin
            done  <= 1'b1;
            phase <= PH_IDLE;
          end
        end

        PH_NORM: begin
          if (!norm_wait) begin
            norm_wait <= 1'b1;
          end else if (norm_done) begin
            norm_wait <= 1'b0;
            if (w_q == n_sets - 32'd1) begin
              i_q   <= '0;
              j_q   <= '0;
              pix_q <= '0;
              phase <= PH_C2_FETCH;
            end else begin
              w_q <= w_q + 32'd1;
            end
          end
        end

        default: phase <= PH_IDLE;
      endcase
    end
  end

  // Handshake with the normalizer: it only reports completion of a set
  // while the Norm phase is waiting for one.
  assert property (@(posedge clk) disable iff (!rst_n) norm_done |-> (phase == PH_NORM))
    else $error("control_unit: normalizer finished outside the Norm phase");

endmodule
