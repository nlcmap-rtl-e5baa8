// tb_fw_mem -- checks the fixed-weights buffer: byte-lane writes build whole
// words without disturbing the other lanes, and a read returns the word one
// cycle after rd_en.  Expected contents are kept in a shadow array.
module tb_fw_mem;
  localparam int K = 27, DEPTH = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0, rd_en = 0;
  logic [4:0] wr_addr = '0, rd_addr = '0;
  logic [4:0] wr_lane = '0;
  logic [7:0] wr_data = '0;
  logic [K-1:0][7:0] rd_data;
  logic [K-1:0][7:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  fw_mem #(.LANES(K), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every lane of every word
    for (int a = 0; a < DEPTH; a++)
      for (int q = 0; q < K; q++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 5'(a); wr_lane = 5'(q); wr_data = 8'($urandom);
        shadow[a][q] = wr_data;
      end
    // overwrite single lanes at random
    repeat (100) begin
      @(negedge clk);
      wr_addr = 5'($urandom_range(0, DEPTH - 1)); wr_lane = 5'($urandom_range(0, K - 1));
      wr_data = 8'($urandom);
      shadow[wr_addr][wr_lane] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    // read back with one cycle of latency
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 5'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== shadow[a]) begin
        failures++;
        $display("FAIL word %0d = %h expected %h", a, rd_data, shadow[a]);
      end
    end
    // rd_en low keeps the last output
    @(negedge clk);
    rd_addr = 0;
    @(negedge clk);
    checks++;
    if (rd_data !== shadow[DEPTH - 1]) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
