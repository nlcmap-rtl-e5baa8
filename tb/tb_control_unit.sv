// tb_control_unit -- checks the tile sequencing of the control unit.
//
// The dispatcher and the normalizer are modelled (ready / done after a
// random delay).  The testbench records every window load, weight read,
// operand issue and normalizer start and compares the recorded streams with
// the loop nest worked out here: Conv1 pixel by pixel (channel, then set
// lane), then every set normalized in order, then Conv2 pixel by pixel
// (channel).  It also checks the one-cycle alignment of op_* with the reads,
// that Norm starts only after the last Conv1 issue and Conv2 only after the
// last Norm, and that tiles too large for the buffers are rejected.
module tb_control_unit;
  import nlc_pkg::*;
  localparam int K = 3, W1 = 3, W2 = 3, G = 27;
  localparam int BT = 4, BW = 3, BL = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0;
  tile_cfg_t cfg = '0;
  logic busy, done, cfg_err;
  phase_e phase;
  logic [4:0] af_shift;
  logic disp_load, disp_ready = 0;
  logic [15:0] disp_row, disp_col, twi;
  pe_mode_e mode;
  logic fw_rd_en, c2_rd_en, op_valid, op_last, op_conv2, norm_start, norm_done = 0;
  logic [5:0] fw_rd_addr;
  logic [4:0] c2_rd_addr, op_addr, op_lane, norm_addr;

  control_unit #(.K(K), .W1(W1), .W2(W2), .BUF_THO(BT), .BUF_TWO(BW), .BUF_TL(BL)) dut (.*);

  int checks = 0, failures = 0;
  int got[$], want[$];
  int rd_prev_valid = 0, rd_prev_code = 0;

  // models of the dispatcher and the normalizer
  initial forever begin
    @(posedge clk);
    if (rst_n && disp_load) begin
      disp_ready <= 0;
      repeat ($urandom_range(1, 6)) @(posedge clk);
      disp_ready <= 1;
    end
  end
  initial forever begin
    @(posedge clk);
    norm_done <= 0;
    if (rst_n && norm_start) begin
      repeat ($urandom_range(1, 4)) @(posedge clk);
      norm_done <= 1;
    end
  end

  // event recorder: codes tag the kind of event
  always @(posedge clk) if (rst_n) begin
    if (disp_load) got.push_back(1_000_000 + (mode == MODE_CONV2) * 100_000 + disp_row * 100 + disp_col);
    if (fw_rd_en) got.push_back(2_000_000 + fw_rd_addr);
    if (c2_rd_en) got.push_back(3_000_000 + c2_rd_addr);
    if (norm_start) got.push_back(4_000_000 + norm_addr);
    // op_* must repeat the previous cycle's read
    if (op_valid || rd_prev_valid) begin
      checks++;
      if (op_valid != rd_prev_valid || (op_valid && (op_conv2 ? 3_000_000 + op_addr : 2_000_000) != rd_prev_code)) begin
        failures++;
        $display("FAIL op alignment");
      end
    end
    rd_prev_valid = fw_rd_en || c2_rd_en;
    rd_prev_code  = c2_rd_en ? 3_000_000 + c2_rd_addr : 2_000_000;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int tho, input int two, input int tl, input bit reject);
    got.delete(); want.delete();
    if (!reject) begin
      for (int i = 0; i < tho; i++)
        for (int j = 0; j < two; j++) begin
          want.push_back(1_000_000 + i * 100 + j);
          for (int l = 0; l < tl; l++)
            for (int g = 0; g < G; g++) want.push_back(2_000_000 + l * G + g);
        end
      for (int w = 0; w < tho * two * tl; w++) want.push_back(4_000_000 + w);
      for (int i = 0; i < tho; i++)
        for (int j = 0; j < two; j++) begin
          want.push_back(1_100_000 + i * 100 + j);
          for (int l = 0; l < tl; l++) want.push_back(3_000_000 + (i * two + j) * tl + l);
        end
    end
    @(negedge clk);
    cfg = '{tho: 16'(tho), two: 16'(two), tl: 8'(tl), af_shift: 5'd3};
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cfg_err != reject) begin failures++; $display("FAIL cfg_err %0b", cfg_err); end
    checks++;
    if (got.size() != want.size()) begin
      failures++;
      $display("FAIL %0d events, expected %0d", got.size(), want.size());
    end
    for (int e = 0; e < got.size() && e < want.size(); e++) begin
      checks++;
      if (got[e] != want[e]) begin
        failures++;
        $display("FAIL event %0d = %0d expected %0d", e, got[e], want[e]);
        break;
      end
    end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(2, 3, 2, 0);
    run(4, 3, 2, 0);     // the whole buffer
    run(1, 1, 1, 0);
    run(5, 3, 2, 1);     // too many rows
    run(4, 3, 3, 1);     // too many channels
    run(0, 3, 1, 1);     // empty tile
    run(3, 2, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
