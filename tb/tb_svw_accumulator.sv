// tb_svw_accumulator -- checks the space-variant weight store.
//
// Conv1 results are fed one lane per cycle (with bubbles) for a number of
// sets; each finished word must appear whole, with no lane of the previous
// set left over, when read through the Conv2 port one cycle later.  Words
// rewritten through the normalizer port must read back through the
// normalizer port.  Expected words are kept in a shadow array.
module tb_svw_accumulator;
  localparam int LANES = 27, DEPTH = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic c1_valid = 0, c1_last = 0;
  logic [4:0] c1_lane = '0, c1_addr = '0;
  logic [7:0] c1_data = '0;
  logic n_rd_en = 0, n_wr_en = 0, c2_rd_en = 0;
  logic [4:0] n_rd_addr = '0, n_wr_addr = '0, c2_rd_addr = '0;
  logic [LANES-1:0][7:0] n_wr_data = '0, rd_data;
  logic [LANES-1:0][7:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  svw_accumulator #(.LANES(LANES), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(input bit via_norm, input int a);
    @(negedge clk);
    if (via_norm) begin n_rd_en = 1; n_rd_addr = 5'(a); end
    else begin c2_rd_en = 1; c2_rd_addr = 5'(a); end
    @(negedge clk);
    n_rd_en = 0; c2_rd_en = 0;
    checks++;
    if (rd_data != shadow[a]) begin
      failures++;
      $display("FAIL word %0d = %h expected %h", a, rd_data, shadow[a]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Conv1 gathering
    for (int a = 0; a < DEPTH; a++) begin
      for (int k = 0; k < LANES; k++) begin
        @(negedge clk);
        c1_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);   // bubble
        c1_valid = 1; c1_lane = 5'(k); c1_addr = 5'(a); c1_last = (k == LANES - 1);
        // the first set of each pair has a zero lane 5, which must stay zero
        c1_data = (k == 5 && a % 2 == 0) ? 8'd0 : 8'($urandom_range(1, 255));
        shadow[a][k] = c1_data;
      end
    end
    @(negedge clk);
    c1_valid = 0;
    for (int a = 0; a < DEPTH; a++) read_check(0, a);
    // normalizer rewrite
    for (int a = 0; a < DEPTH; a += 3) begin
      @(negedge clk);
      n_wr_en = 1; n_wr_addr = 5'(a);
      for (int k = 0; k < LANES; k++) n_wr_data[k] = 8'($urandom);
      shadow[a] = n_wr_data;
    end
    @(negedge clk);
    n_wr_en = 0;
    for (int a = 0; a < DEPTH; a++) read_check(1, a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
