// tb_nlc_accelerator -- end-to-end test of the NLC tile accelerator at its
// default (full) buffer sizes.
//
// The testbench plays the host: it writes a padded input tile and the fixed
// weights, starts the tile, waits for done and reads every output pixel,
// comparing each with a reference model of the layer computed here in
// plain integer arithmetic (Conv1, ReLU + shift + saturation, sum-to-one
// normalization in Q0.8, Conv2, requantization).  Tiles run:
//   1. 3x4 pixels, 3 channels, weights crafted so that one channel's sets
//      are all zero, one has a single non-zero weight (Norm drives it to
//      full scale) and one is random;
//   2. a tile larger than the buffers (must be rejected with cfg_err);
//   3. 5x2 pixels, 2 channels, random weights, small AF shift (AF saturates);
//   4. the largest tile the buffers hold, 512x11 pixels x 6 channels.
// It also checks that Conv1 issues T_Ho*T_Wo*T_L*W1*W1*K PE-array passes
// and Conv2 T_Ho*T_Wo*T_L, and that every mechanism occurred.
module tb_nlc_accelerator;
  import nlc_pkg::*;

  localparam int K = 3, W1 = 3, W2 = 3, WMAX = 3;
  localparam int G = W1 * W1 * K;
  localparam int MAXH = 512 + WMAX - 1, MAXW = 11 + WMAX - 1, MAXL = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  tile_cfg_t cfg = '0;
  logic busy, done, cfg_err;
  logic io_wr_en = 0;
  wr_target_e io_wr_target = TGT_DATA;
  logic [15:0] io_wr_addr = '0;
  logic [4:0]  io_wr_lane = '0;
  logic [7:0]  io_wr_data = '0;
  logic io_rd_en = 0;
  logic [15:0] io_rd_addr = '0;
  logic io_rd_valid;
  logic [7:0] io_rd_data;

  nlc_accelerator dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_af_clamp = 0, n_af_sat = 0, n_zero_set = 0, n_norm_sat = 0, n_single_set = 0, n_reject = 0,
      n_tiles = 0;
  longint cyc = 0;
  longint c1_ops = 0, c2_ops = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.op_valid && !dut.op_conv2) c1_ops++;
    if (dut.op_valid &&  dut.op_conv2) c2_ops++;
  end

  byte unsigned xin [MAXH][MAXW][K];
  byte          uw  [MAXL][G][G];
  byte unsigned vref [];
  byte unsigned yref [];

  initial begin
    #(64'd10 * 64'd8_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input wr_target_e t, input int addr, input int lane, input int data);
    io_wr_en <= 1; io_wr_target <= t; io_wr_addr <= 16'(addr);
    io_wr_lane <= 5'(lane); io_wr_data <= 8'(data);
    @(posedge clk);
  endtask

  // weight pattern per channel: 0 random, 1 all negative, 2 only g==0 positive
  task automatic make_weights(input int tl, input int pattern[MAXL]);
    for (int l = 0; l < tl; l++)
      for (int g = 0; g < G; g++)
        for (int e = 0; e < G; e++) begin
          case (pattern[l])
            1: uw[l][g][e] = -byte'(1 + $urandom_range(0, 100));
            2: uw[l][g][e] = (g == 0) ? byte'(1 + $urandom_range(0, 60))
                                      : -byte'(1 + $urandom_range(0, 100));
            default: uw[l][g][e] = byte'($urandom_range(0, 255));
          endcase
        end
  endtask

  function automatic int af(input longint acc, input int sh);
    longint t;
    if (acc <= 0) begin n_af_clamp++; return 0; end
    t = acc / (longint'(1) << sh);
    if (t > 255) begin n_af_sat++; return 255; end
    return int'(t);
  endfunction

  task automatic reference(input int tho, input int two, input int tl, input int sh);
    int v8 [G];
    vref = new[tho * two * tl * G];
    yref = new[tho * two * tl];
    for (int i = 0; i < tho; i++)
      for (int j = 0; j < two; j++)
        for (int l = 0; l < tl; l++) begin
          longint s, recip, y;
          int base;
          base = ((i * two + j) * tl + l);
          s = 0;
          for (int g = 0; g < G; g++) begin
            longint acc = 0;
            for (int r = 0; r < W2; r++)
              for (int c = 0; c < W2; c++)
                for (int q = 0; q < K; q++)
                  acc += longint'(xin[i + r][j + c][q]) * longint'(uw[l][g][(r * W2 + c) * K + q]);
            v8[g] = af(acc, sh);
            s += v8[g];
          end
          if (s == 0) n_zero_set++;
          begin
            int nz = 0;
            for (int g = 0; g < G; g++) if (v8[g] != 0) nz++;
            if (nz == 1) n_single_set++;
          end
          recip = (s == 0) ? 0 : ((longint'(1) << 24) / s);
          for (int g = 0; g < G; g++) begin
            longint t = (longint'(v8[g]) * recip) >> 16;
            if (t > 255) begin n_norm_sat++; t = 255; end
            vref[base * G + g] = byte'(t);
          end
          y = 0;
          for (int n = 0; n < W1; n++)
            for (int m = 0; m < W1; m++)
              for (int p = 0; p < K; p++)
                y += longint'(xin[i + n][j + m][p]) *
                     longint'(vref[base * G + (n * W1 + m) * K + p]);
          y = y >>> 8;
          yref[base] = byte'((y > 255) ? 255 : y);
        end
  endtask

  task automatic run_tile(input int tho, input int two, input int tl, input int sh,
                          input int pattern[MAXL], input bit expect_reject);
    int thi = tho + WMAX - 1, twi = two + WMAX - 1;
    longint t0, c1_0, c2_0;
    int bad = 0;
    if (!expect_reject) begin
      for (int r = 0; r < thi; r++)
        for (int c = 0; c < twi; c++)
          for (int q = 0; q < K; q++) begin
            xin[r][c][q] = byte'($urandom_range(0, 255));
            wr(TGT_DATA, r * twi + c, q, xin[r][c][q]);
          end
      make_weights(tl, pattern);
      for (int l = 0; l < tl; l++)
        for (int g = 0; g < G; g++)
          for (int e = 0; e < G; e++) wr(TGT_FW, l * G + g, e, uw[l][g][e]);
      io_wr_en <= 0;
      reference(tho, two, tl, sh);
    end
    cfg <= '{tho: 16'(tho), two: 16'(two), tl: 8'(tl), af_shift: 5'(sh)};
    start <= 1;
    @(posedge clk);
    start <= 0;
    t0 = cyc; c1_0 = c1_ops; c2_0 = c2_ops;
    while (!done) @(posedge clk);
    checks++;
    if (cfg_err != expect_reject) begin
      failures++;
      $display("FAIL tile %0dx%0dx%0d: cfg_err=%0b expected %0b", tho, two, tl, cfg_err, expect_reject);
    end
    if (expect_reject) begin n_reject++; @(posedge clk); return; end
    n_tiles++;
    $display("tile %0dx%0dx%0d: %0d cycles", tho, two, tl, cyc - t0);
    checks++;
    if (c1_ops - c1_0 != longint'(tho * two * tl * G) || c2_ops - c2_0 != longint'(tho * two * tl)) begin
      failures++;
      $display("FAIL pass count conv1=%0d conv2=%0d", c1_ops - c1_0, c2_ops - c2_0);
    end
    @(posedge clk);
    for (int a = 0; a < tho * two * tl; a++) begin
      io_rd_en <= 1; io_rd_addr <= 16'(a);
      @(posedge clk);
      #1;
      checks++;
      if (!io_rd_valid || io_rd_data != yref[a]) begin
        failures++;
        if (bad++ < 10) $display("FAIL y[%0d] = %0d expected %0d", a, io_rd_data, yref[a]);
      end
    end
    io_rd_en <= 0;
  endtask

  initial begin
    int pat [MAXL];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    pat = '{0, 1, 2, 0, 0, 0};
    run_tile(3, 4, 3, 6, pat, 0);
    run_tile(600, 11, 6, 6, pat, 1);
    pat = '{0, 0, 0, 0, 0, 0};
    run_tile(5, 2, 2, 2, pat, 0);
    pat = '{0, 1, 2, 0, 0, 0};
    run_tile(512, 11, 6, 7, pat, 0);
    // every mechanism must have happened
    checks++; if (n_af_clamp == 0) begin failures++; $display("FAIL no AF clamp"); end
    checks++; if (n_af_sat   == 0) begin failures++; $display("FAIL no AF saturation"); end
    checks++; if (n_zero_set == 0) begin failures++; $display("FAIL no zero-sum set"); end
    checks++; if (n_single_set == 0) begin failures++; $display("FAIL no single-weight set"); end
    checks++; if (n_reject   == 0) begin failures++; $display("FAIL no rejected tile"); end
    checks++; if (n_tiles    <  3) begin failures++; $display("FAIL tiles run %0d", n_tiles); end
    $display("mechanisms: af_clamp=%0d af_sat=%0d zero_sets=%0d single_sets=%0d norm_sat=%0d rejected=%0d tiles=%0d",
             n_af_clamp, n_af_sat, n_zero_set, n_single_set, n_norm_sat, n_reject, n_tiles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
