// tb_af_norm -- checks the activation function and the normalizer.
//
// AF: random signed Conv1 sums and shifts are compared with ReLU, shift and
// saturation computed here.  Norm: a model of the s-v weights store (one-
// cycle read) holds weight sets of several kinds (random, all zero, a
// single non-zero weight, all 255, a single weight of 128 whose scaled
// value overflows and must clamp); each set is normalized and the written
// word is compared with v * floor(2^24 / S) >> 16 clamped to 255.  The
// latency from norm_start to norm_done is checked too: 30 cycles, or 4 for
// a set that sums to zero.
module tb_af_norm;
  localparam int LANES = 27, ACC_W = 23, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [ACC_W-1:0] af_in = '0;
  logic [4:0] af_shift = '0;
  logic [7:0] af_out;
  logic norm_start = 0, norm_busy, norm_done;
  logic [3:0] norm_addr = '0;
  logic sv_rd_en, sv_wr_en;
  logic [3:0] sv_rd_addr, sv_wr_addr;
  logic [LANES-1:0][7:0] sv_rd_data, sv_wr_data;
  logic [LANES-1:0][7:0] store [DEPTH];
  int checks = 0, failures = 0;

  af_norm #(.LANES(LANES), .ACC_W(ACC_W), .DEPTH(DEPTH)) dut (.*);

  always @(posedge clk) begin
    if (sv_rd_en) sv_rd_data <= store[sv_rd_addr];
    if (sv_wr_en) store[sv_wr_addr] <= sv_wr_data;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LANES-1:0][7:0] orig [DEPTH];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- AF
    for (int t = 0; t < 300; t++) begin
      int v, sh, e;
      v  = int'($urandom_range(0, 1 << 22)) - (1 << 21);
      sh = $urandom_range(0, 12);
      @(negedge clk);
      af_in = ACC_W'(v); af_shift = 5'(sh);
      #1;
      if (v <= 0) e = 0;
      else begin
        e = v / (1 << sh);
        if (e > 255) e = 255;
      end
      checks++;
      if (af_out != 8'(e)) begin
        failures++;
        $display("FAIL af(%0d >> %0d) = %0d expected %0d", v, sh, af_out, e);
      end
    end
    // ---- Norm
    for (int w = 0; w < DEPTH; w++) begin
      for (int k = 0; k < LANES; k++)
        case (w % 5)
          0: store[w][k] = 8'($urandom);
          1: store[w][k] = 8'd0;
          2: store[w][k] = (k == w % LANES) ? 8'($urandom_range(1, 255)) : 8'd0;
          3: store[w][k] = 8'd255;
          default: store[w][k] = (k == 3) ? 8'd128 : 8'd0;
        endcase
      orig[w] = store[w];
    end
    for (int w = 0; w < DEPTH; w++) begin
      longint s, recip;
      int lat, want;
      s = 0;
      for (int k = 0; k < LANES; k++) s += orig[w][k];
      @(negedge clk);
      norm_start = 1; norm_addr = 4'(w);
      @(negedge clk);
      norm_start = 0;
      lat = 1;
      while (!norm_done) begin @(negedge clk); lat++; end
      want = (s == 0) ? 4 : 30;
      checks++;
      if (lat != want) begin failures++; $display("FAIL norm latency %0d expected %0d", lat, want); end
      @(negedge clk);
      recip = (s == 0) ? 0 : ((longint'(1) << 24) / s);
      for (int k = 0; k < LANES; k++) begin
        longint e;
        e = (longint'(orig[w][k]) * recip) >> 16;
        if (e > 255) e = 255;
        checks++;
        if (store[w][k] != 8'(e)) begin
          failures++;
          $display("FAIL set %0d lane %0d = %0d expected %0d", w, k, store[w][k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
