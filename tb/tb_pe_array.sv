// tb_pe_array -- drives the 27-PE array with a random operand set every
// cycle and checks each dot product, its tag, and the two-cycle latency.
// Operand sets include the extremes (a = 255 with b = -256 and b = 255).
module tb_pe_array;
  localparam int NPE = 27, TAG_W = 8, ACC_W = 18 + $clog2(NPE);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0;
  logic [TAG_W-1:0] in_tag = '0;
  logic [NPE-1:0][7:0] a = '0;
  logic [NPE-1:0][8:0] b = '0;
  logic out_valid;
  logic [TAG_W-1:0] out_tag;
  logic signed [ACC_W-1:0] out_sum;
  int checks = 0, failures = 0;
  longint exp_sum [256];
  int cyc = 0, sent_cyc [256];
  int n_sent = 0, n_got = 0;

  pe_array #(.NPE(NPE), .TAG_W(TAG_W)) dut (.*);

  always @(posedge clk) cyc++;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_sum != ACC_W'(exp_sum[out_tag]) || out_tag != TAG_W'(n_got)) begin
      failures++;
      $display("FAIL tag %0d sum %0d expected %0d", out_tag, out_sum, exp_sum[out_tag]);
    end
    checks++;
    if (cyc - sent_cyc[out_tag] != 2) begin
      failures++;
      $display("FAIL latency %0d", cyc - sent_cyc[out_tag]);
    end
    n_got++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      longint s;
      int bv;
      s = 0;
      @(negedge clk);
      in_valid = (t % 7 != 3);        // a few bubbles
      for (int k = 0; k < NPE; k++) begin
        case (t)
          0: begin a[k] = 8'd255; b[k] = 9'h100; end   // -256
          1: begin a[k] = 8'd255; b[k] = 9'h0FF; end   // +255
          default: begin a[k] = 8'($urandom); b[k] = 9'($urandom); end
        endcase
        bv = int'(b[k]);
        if (b[k][8]) bv -= 512;          // two's complement value of b
        s += longint'(a[k]) * longint'(bv);
      end
      if (in_valid) begin
        in_tag = TAG_W'(n_sent);
        exp_sum[n_sent] = s;
        sent_cyc[n_sent] = cyc + 1;
        n_sent++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_got != n_sent) begin failures++; $display("FAIL got %0d of %0d", n_got, n_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
