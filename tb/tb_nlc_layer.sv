// tb_nlc_layer -- computes a whole NLC layer tile by tile, once for each of
// the five optimal mappings of the reference evaluation (50 KB to 1 MB
// budgets), on the default-sized accelerator.
//
// The layer has the evaluated shape (K = 3 input channels, 3x3 windows,
// L = 6 output channels).  The full 512 x 512 image is run with the 1 MB
// mapping (47 tiles); all five mappings are then run on a 64 x 64 image,
// which keeps the simulation to a couple of minutes.  The testbench is the host: it
// keeps the image and the fixed weights in its own arrays (standing in for
// the off-chip memory), cuts the layer into tiles of the mapping's
// <T_Ho, T_Wo, T_L>, clipping border tiles to the image, loads each tile
// with its zero-padded halo and the weights of its channels, runs it, and
// reads the outputs back into an output image.  The output image is
// compared with the layer computed directly on the whole padded image.  It
// also checks that the number of tiles is
// ceil(H/T_Ho) * ceil(W/T_Wo) * ceil(L/T_L) and counts border tiles.
module tb_nlc_layer;
  import nlc_pkg::*;

  localparam int HMAX = 512, WMAX = 512, K = 3, L = 6, G = 27, SH = 7;
  int H, W;

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
  byte unsigned img [HMAX + 2][WMAX + 2][K];   // padded: img[r+1][c+1] is pixel (r,c)
  byte          uw  [L][G][G];
  byte unsigned yref [HMAX][WMAX][L];
  byte unsigned yhw  [HMAX][WMAX][L];
  int n_border = 0;
  longint busy_cyc = 0, bytes_in = 0, bytes_out = 0;
  always @(posedge clk) begin
    if (busy) busy_cyc++;
    if (io_wr_en) bytes_in++;
    if (io_rd_en) bytes_out++;
  end

  initial begin
    #(64'd10 * 64'd400_000_000);
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

  // Direct computation of the layer on the whole image.
  task automatic reference();
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++)
        for (int l = 0; l < L; l++) begin
          longint v [G];
          longint s, recip, y;
          s = 0;
          for (int g = 0; g < G; g++) begin
            longint acc;
            acc = 0;
            for (int r = 0; r < 3; r++)
              for (int c = 0; c < 3; c++)
                for (int q = 0; q < K; q++)
                  acc += longint'(img[i + r][j + c][q]) * longint'(uw[l][g][(r * 3 + c) * K + q]);
            if (acc <= 0) v[g] = 0;
            else begin
              v[g] = acc >> SH;
              if (v[g] > 255) v[g] = 255;
            end
            s += v[g];
          end
          recip = (s == 0) ? 0 : ((longint'(1) << 24) / s);
          y = 0;
          for (int g = 0; g < G; g++) begin
            longint vn;
            vn = (v[g] * recip) >> 16;
            if (vn > 255) vn = 255;
            // g = (n*3 + m)*K + p
            y += longint'(img[i + g / 9][j + (g / 3) % 3][g % 3]) * vn;
          end
          y = y >> 8;
          yref[i][j][l] = byte'((y > 255) ? 255 : y);
        end
  endtask

  task automatic run_mapping(input int tho, input int two, input int tl);
    int tiles = 0, want_tiles;
    int bad = 0;
    longint b0 = busy_cyc, i0b = bytes_in, o0b = bytes_out;
    for (int l0 = 0; l0 < L; l0 += tl)
      for (int i0 = 0; i0 < H; i0 += tho)
        for (int j0 = 0; j0 < W; j0 += two) begin
          int th = (H - i0 < tho) ? H - i0 : tho;
          int tw = (W - j0 < two) ? W - j0 : two;
          int tc = (L - l0 < tl) ? L - l0 : tl;
          if (th != tho || tw != two || tc != tl) n_border++;
          for (int r = 0; r < th + 2; r++)
            for (int c = 0; c < tw + 2; c++)
              for (int q = 0; q < K; q++)
                wr(TGT_DATA, r * (tw + 2) + c, q, img[i0 + r][j0 + c][q]);
          for (int l = 0; l < tc; l++)
            for (int g = 0; g < G; g++)
              for (int e = 0; e < G; e++) wr(TGT_FW, l * G + g, e, uw[l0 + l][g][e]);
          io_wr_en <= 0;
          cfg <= '{tho: 16'(th), two: 16'(tw), tl: 8'(tc), af_shift: 5'(SH)};
          start <= 1;
          @(posedge clk);
          start <= 0;
          while (!done) @(posedge clk);
          checks++;
          if (cfg_err) begin failures++; $display("FAIL tile rejected"); end
          tiles++;
          @(posedge clk);
          for (int i = 0; i < th; i++)
            for (int j = 0; j < tw; j++)
              for (int l = 0; l < tc; l++) begin
                io_rd_en <= 1; io_rd_addr <= 16'((i * tw + j) * tc + l);
                @(posedge clk);
                #1;
                yhw[i0 + i][j0 + j][l0 + l] = io_rd_data;
              end
          io_rd_en <= 0;
        end
    want_tiles = ((H + tho - 1) / tho) * ((W + two - 1) / two) * ((L + tl - 1) / tl);
    checks++;
    if (tiles != want_tiles) begin failures++; $display("FAIL %0d tiles, expected %0d", tiles, want_tiles); end
    for (int i = 0; i < H; i++)
      for (int j = 0; j < W; j++)
        for (int l = 0; l < L; l++) begin
          checks++;
          if (yhw[i][j][l] != yref[i][j][l]) begin
            failures++;
            if (bad++ < 5) $display("FAIL y(%0d,%0d,%0d) = %0d expected %0d", i, j, l,
                                    yhw[i][j][l], yref[i][j][l]);
          end
        end
    $display("mapping <%0d,%0d>,%0d on %0dx%0d: %0d tiles, %0d busy cycles, %0d bytes in, %0d bytes out",
             tho, two, tl, H, W, tiles, busy_cyc - b0, bytes_in - i0b, bytes_out - o0b);
  endtask

  // New random image of h x w pixels with its zero border, and new weights.
  task automatic new_layer(input int h, input int w);
    H = h; W = w;
    for (int r = 0; r < H + 2; r++)
      for (int c = 0; c < W + 2; c++)
        for (int q = 0; q < K; q++)
          img[r][c][q] = (r == 0 || c == 0 || r == H + 1 || c == W + 1) ? 8'd0 : 8'($urandom);
    foreach (uw[l, g, e]) uw[l][g][e] = byte'($urandom_range(0, 255));
    reference();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // the evaluated layer at full size, with the largest mapping
    new_layer(512, 512);
    run_mapping(512, 11, 6);    // 1 MB
    // every mapping on a 64 x 64 image
    new_layer(64, 64);
    run_mapping(27, 20, 3);     // 50 KB
    run_mapping(43, 26, 3);     // 100 KB
    run_mapping(104, 14, 6);    // 256 KB
    run_mapping(262, 11, 6);    // 0.5 MB
    run_mapping(512, 11, 6);    // 1 MB
    checks++;
    if (n_border == 0) begin failures++; $display("FAIL no border tile"); end
    $display("border tiles: %0d", n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
