// af_norm -- activation function and normalization of the space-variant
// weights.
//
// AF path (combinational): each Conv1 dot product leaving the PE array is
// passed through ReLU, shifted right by `af_shift` and saturated to 8
// unsigned bits before it is stored, because the stored weights are 8 bits
// wide.
//
// Norm engine: the normalization of one weight needs every weight of its
// set, the W1*W1*K weights v_{i,j,l}(:,:,:) of one output pixel and channel,
// so it runs only after Conv1 has finished the whole tile.  For each set the
// control unit gives the word address; the engine reads the word from the
// s-v weights accumulator, sums its lanes (S), computes floor(2^24/S) with a
// sequential divider, scales every lane to v*recip >> 16 (unsigned Q0.8,
// saturated at 255) and writes the word back.  A set whose sum is zero is
// written back as zeros.  The source fixes where AF and Norm sit in the
// dataflow and what the normalization depends on; the concrete ReLU and
// sum-to-one normalization are this design's choice, as the source leaves
// both to the application.
//
// Timing: counting the cycle in which norm_start is high as the first,
// norm_done is high in the 4th cycle for a zero sum and in the 30th
// (NORM_FRAC + 6) otherwise; norm_start is ignored while busy.
module af_norm #(
  parameter int unsigned LANES = 27,
  parameter int unsigned ACC_W = 23,
  parameter int unsigned DEPTH = 512 * 11 * 6,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // AF on the Conv1 result path
  input  logic signed [ACC_W-1:0] af_in,
  input  logic [4:0]              af_shift,
  output logic [7:0]              af_out,
  // normalization of one weight set
  input  logic                    norm_start,
  input  logic [AW-1:0]           norm_addr,
  output logic                    norm_busy,
  output logic                    norm_done,
  // access to the s-v weights accumulator
  output logic                    sv_rd_en,
  output logic [AW-1:0]           sv_rd_addr,
  input  logic [LANES-1:0][7:0]   sv_rd_data,
  output logic                    sv_wr_en,
  output logic [AW-1:0]           sv_wr_addr,
  output logic [LANES-1:0][7:0]   sv_wr_data
);
  import nlc_pkg::*;

  assign af_out = af_relu_q(32'(af_in), af_shift);

  typedef enum logic [2:0] {N_IDLE, N_READ, N_SUM, N_DIV, N_WRITE} nstate_e;
  nstate_e st;

  logic [AW-1:0]          addr_q;
  logic [LANES-1:0][7:0]  word_q;
  logic [15:0]            sum_c;
  logic                   zero_q;
  logic                   div_start, div_busy, div_done;
  logic [NORM_FRAC:0]     div_q, recip_q;

  always_comb begin
    sum_c = '0;
    for (int k = 0; k < LANES; k++) sum_c += 16'(sv_rd_data[k]);
  end

  seq_divider #(.NW(NORM_FRAC + 1), .DW(16)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend ((NORM_FRAC + 1)'(1) << NORM_FRAC),
    .divisor  (sum_c),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q)
  );

  assign div_start  = (st == N_SUM) && (sum_c != 16'd0);
  assign sv_rd_en   = (st == N_READ);
  assign sv_rd_addr = addr_q;
  assign sv_wr_en   = (st == N_WRITE);
  assign sv_wr_addr = addr_q;
  assign norm_busy  = (st != N_IDLE);

  always_comb begin
    for (int k = 0; k < LANES; k++)
      sv_wr_data[k] = zero_q ? 8'd0 : norm_scale(word_q[k], recip_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= N_IDLE;
      addr_q    <= '0;
      word_q    <= '0;
      zero_q    <= 1'b0;
      recip_q   <= '0;
      norm_done <= 1'b0;
    end else begin
      norm_done <= 1'b0;
      unique case (st)
        N_IDLE:  if (norm_start) begin
                   addr_q <= norm_addr;
                   st     <= N_READ;
                 end
        N_READ:  st <= N_SUM;                  // read issued, data next cycle
        N_SUM:   begin
                   word_q <= sv_rd_data;
                   zero_q <= (sum_c == 16'd0);
                   st     <= (sum_c == 16'd0) ? N_WRITE : N_DIV;
                 end
        N_DIV:   if (div_done) begin
                   recip_q <= div_q;
                   st      <= N_WRITE;
                 end
        N_WRITE: begin
                   norm_done <= 1'b1;
                   st        <= N_IDLE;
                 end
        default: st <= N_IDLE;
      endcase
    end
  end

  // The divider runs exactly while the engine waits for it.
  assert property (@(posedge clk) disable iff (!rst_n) (st == N_DIV) |-> (div_busy || div_done))
    else $error("af_norm: waiting for a divider that is not running");

endmodule
