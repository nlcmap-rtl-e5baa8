// tb_opx_accumulator -- writes Conv2 sums (negative, in range and
// overflowing) into the output pixel store and reads them back, checking
// the requantization (sum >> 8, clamped to 0..255) and the one-cycle read.
module tb_opx_accumulator;
  localparam int DEPTH = 128, ACC_W = 23;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_valid = 0, rd_en = 0;
  logic [6:0] wr_addr = '0, rd_addr = '0;
  logic signed [ACC_W-1:0] wr_sum = '0;
  logic rd_valid;
  logic [7:0] rd_data;
  int checks = 0, failures = 0;
  int expv [DEPTH];
  int n_neg = 0, n_sat = 0;

  opx_accumulator #(.DEPTH(DEPTH), .ACC_W(ACC_W)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      int s;
      @(negedge clk);
      case (a % 4)
        0: s = -int'($urandom_range(1, 100000));
        1: s = int'($urandom_range(65536, 4000000));
        default: s = int'($urandom_range(0, 65535));
      endcase
      wr_valid = 1; wr_addr = 7'(a); wr_sum = ACC_W'(s);
      if (s < 0) begin expv[a] = 0; n_neg++; end
      else if ((s >> 8) > 255) begin expv[a] = 255; n_sat++; end
      else expv[a] = s >> 8;
    end
    @(negedge clk);
    wr_valid = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 7'(a);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (!rd_valid || rd_data != 8'(expv[a])) begin
        failures++;
        $display("FAIL y[%0d] = %0d expected %0d", a, rd_data, expv[a]);
      end
    end
    @(negedge clk);
    checks++;
    if (rd_valid) begin failures++; $display("FAIL rd_valid stuck"); end
    checks++;
    if (n_neg == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
