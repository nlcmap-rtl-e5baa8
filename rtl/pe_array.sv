// pe_array -- the array of multiply-and-accumulate processing engines.
//
// NPE PEs each multiply an unsigned 8-bit pixel a[k] by a signed 9-bit
// weight b[k]; an adder tree sums the NPE products.  With NPE = W*W*K (27
// for the 3x3x3 windows of the evaluated layer) one pass yields a whole
// dot product: one space-variant weight in Conv1 (fixed weights u are
// signed 8-bit, sign-extended to 9) or one output pixel in Conv2 (Q0.8
// weights v are unsigned 8-bit, zero-extended).  The array is shared by the
// two convolutions, which run one after the other.  The source gives the
// array and the MAC count as a product of unrolling factors; unrolling the
// whole window (3 x 3 x 3 for Conv1, and likewise for Conv2) and nothing
// else, which gives 27 PEs, is this design's choice, as are the two-stage
// pipeline and the operand formats.
//
// Timing: fully pipelined, one operand set per cycle; out_valid/out_sum/
// out_tag appear two cycles after in_valid.  in_tag is carried unchanged.
module pe_array #(
  parameter int unsigned NPE   = 27,
  parameter int unsigned TAG_W = 1,
  localparam int unsigned ACC_W = 18 + $clog2(NPE)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [TAG_W-1:0]             in_tag,
  input  logic [NPE-1:0][7:0]          a,
  input  logic [NPE-1:0][8:0]          b,
  output logic                         out_valid,
  output logic [TAG_W-1:0]             out_tag,
  output logic signed [ACC_W-1:0]      out_sum
);

  logic signed [17:0] prod_q [NPE];
  logic               v_q;
  logic [TAG_W-1:0]   tag_q;
  logic signed [ACC_W-1:0] tree;

  // Stage 1: the NPE multiplications.
  always_ff @(posedge clk) begin
    for (int k = 0; k < NPE; k++)
      prod_q[k] <= $signed({1'b0, a[k]}) * $signed(b[k]);
    tag_q <= in_tag;
  end

  // Stage 2: adder tree over the products.
  always_comb begin
    tree = '0;
    for (int k = 0; k < NPE; k++) tree += ACC_W'(prod_q[k]);
  end

  always_ff @(posedge clk) begin
    out_sum <= tree;
    out_tag <= tag_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
  end

endmodule
