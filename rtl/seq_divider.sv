// seq_divider -- unsigned restoring divider, one quotient bit per cycle.
//
// Used by the normalizer to form the reciprocal of a weight set's sum.
// On `start` (while not busy) it latches dividend and divisor; NW cycles
// later `done` pulses for one cycle with quotient = dividend / divisor.
// A zero divisor gives an all-ones quotient (callers avoid it).
module seq_divider #(
  parameter int unsigned NW = 25,  // dividend and quotient width
  parameter int unsigned DW = 16   // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [NW-1:0] num;      // dividend bits still to shift in
  logic [DW-1:0] rem;
  logic [DW-1:0] den;
  logic [CW-1:0] cnt;
  logic [DW:0]   trial;

  assign trial = {rem[DW-1:0], num[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      num      <= '0;
      rem      <= '0;
      den      <= '0;
      cnt      <= '0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        num      <= dividend;
        rem      <= '0;
        den      <= divisor;
        cnt      <= CW'(NW);
        quotient <= '0;
      end else if (busy) begin
        num <= num << 1;
        if (trial >= {1'b0, den}) begin
          rem      <= DW'(trial - {1'b0, den});
          quotient <= {quotient[NW-2:0], 1'b1};
        end else begin
          rem      <= trial[DW-1:0];
          quotient <= {quotient[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
