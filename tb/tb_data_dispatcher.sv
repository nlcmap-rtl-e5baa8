// tb_data_dispatcher -- checks window fetch and operand ordering.
//
// A model of the data mem (one-cycle read) holds a random padded tile.  For
// random pixels the testbench requests a window, checks that `ready` comes
// WMAX*WMAX+2 cycles after the load, and compares every lane of a_vec in
// both modes with the pixel the lane order prescribes.  Two instances are
// tested: the 3x3/3x3 windows of the evaluated layer, and W1 = 5 with
// W2 = 3 so that the Conv1 window sits centred inside the fetched one.
module tb_data_dispatcher;
  import nlc_pkg::*;
  localparam int K = 3, TWI = 14, THI = 10, DEPTH = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  byte unsigned img [THI][TWI][K];
  int checks = 0, failures = 0;

  // instance A: W1 = W2 = 3; instance B: W1 = 5, W2 = 3
  logic        load_a = 0, load_b = 0;
  logic [15:0] row = '0, col = '0;
  logic        ready_a, ready_b;
  logic        rd_en_a, rd_en_b;
  logic [7:0]  addr_a, addr_b;
  logic [K-1:0][7:0] data_a, data_b;
  pe_mode_e    mode = MODE_CONV1;
  logic [26:0][7:0] a_vec_a;
  logic [74:0][7:0] a_vec_b;

  data_dispatcher #(.K(K), .W1(3), .W2(3), .DEPTH(DEPTH)) dut_a (
    .clk, .rst_n, .load(load_a), .row, .col, .twi(16'(TWI)), .ready(ready_a),
    .mem_rd_en(rd_en_a), .mem_rd_addr(addr_a), .mem_rd_data(data_a), .mode, .a_vec(a_vec_a));
  data_dispatcher #(.K(K), .W1(5), .W2(3), .DEPTH(DEPTH)) dut_b (
    .clk, .rst_n, .load(load_b), .row, .col, .twi(16'(TWI)), .ready(ready_b),
    .mem_rd_en(rd_en_b), .mem_rd_addr(addr_b), .mem_rd_data(data_b), .mode, .a_vec(a_vec_b));

  // data mem models
  always @(posedge clk) begin
    if (rd_en_a) for (int q = 0; q < K; q++) data_a[q] <= img[addr_a / TWI][addr_a % TWI][q];
    if (rd_en_b) for (int q = 0; q < K; q++) data_b[q] <= img[addr_b / TWI][addr_b % TWI][q];
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_window(input bit inst_b, input int r0, input int c0);
    int w = inst_b ? 5 : 3;
    int waited = 0;
    @(negedge clk);
    row = 16'(r0); col = 16'(c0);
    if (inst_b) load_b = 1; else load_a = 1;
    @(negedge clk);
    load_a = 0; load_b = 0;
    while (!(inst_b ? ready_b : ready_a)) begin @(negedge clk); waited++; end
    checks++;
    if (waited + 1 != w * w + 2) begin
      failures++;
      $display("FAIL ready after %0d cycles, expected %0d", waited + 1, w * w + 2);
    end
    for (int md = 0; md < 2; md++) begin
      int wc = (md == 0) ? 3 : w;           // Conv1 uses W2 = 3, Conv2 uses W1
      int off = (w - wc) / 2;
      mode = (md == 0) ? MODE_CONV1 : MODE_CONV2;
      #1;
      for (int r = 0; r < wc; r++)
        for (int c = 0; c < wc; c++)
          for (int q = 0; q < K; q++) begin
            int lane = (r * wc + c) * K + q;
            byte unsigned got = inst_b ? a_vec_b[lane] : a_vec_a[lane];
            checks++;
            if (got != img[r0 + r + off][c0 + c + off][q]) begin
              failures++;
              $display("FAIL inst %0d mode %0d lane %0d = %0d expected %0d", inst_b, md, lane,
                       got, img[r0 + r + off][c0 + c + off][q]);
            end
          end
      // lanes beyond the window are zero
      if (inst_b && md == 0) begin
        checks++;
        if (a_vec_b[74:27] != '0) begin failures++; $display("FAIL unused lanes not zero"); end
      end
    end
  endtask

  initial begin
    foreach (img[r, c, q]) img[r][c][q] = byte'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) check_window(0, $urandom_range(0, THI - 3), $urandom_range(0, TWI - 3));
    for (int t = 0; t < 20; t++) check_window(1, $urandom_range(0, THI - 5), $urandom_range(0, TWI - 5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
