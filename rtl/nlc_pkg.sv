// nlc_pkg -- types, constants and arithmetic shared by the NLC layer accelerator.
//
// An NLC (non-linear convolution) layer first computes, for every output
// pixel (i,j) and output channel l, a set of W1*W1*K space-variant weights
// v by convolving the input x with fixed weights u (Conv1), passes them
// through an activation function (AF) and normalizes each set (Norm); it then
// convolves x with v (Conv2) to give the output y.  The layer equations
// follow the source; the number formats and the concrete AF and Norm below
// are this design's own choice, because the source leaves both to the
// application:
//   x  : unsigned 8-bit pixels
//   u  : signed 8-bit fixed weights
//   AF : ReLU, then arithmetic right shift by a run-time amount and
//        saturation to 8 unsigned bits (the stored weight is 8 bits wide)
//   Norm: each weight of a set is scaled so that the set sums to about one,
//        in unsigned Q0.8: v' = min(255, (v * floor(2^24 / S)) >> 16), where
//        S is the sum of the set; a set whose sum is zero becomes all zero
//   y  : (sum of x*v') >> 8, saturated to 8 unsigned bits
package nlc_pkg;

  localparam int unsigned DW       = 8;   // every stored datum is 8 bits wide
  localparam int unsigned NORM_FRAC = 24; // reciprocal is floor(2^NORM_FRAC / S)
  localparam int unsigned NORM_SHR  = 16; // (v * recip) >> NORM_SHR gives Q0.8

  // Host write target on the I/O port.
  typedef enum logic {
    TGT_DATA = 1'b0,   // input feature-map tile
    TGT_FW   = 1'b1    // fixed weights
  } wr_target_e;

  // Operand order the data dispatcher presents to the PE array.
  typedef enum logic {
    MODE_CONV1 = 1'b0, // lanes are (r,s,q): window of size W2
    MODE_CONV2 = 1'b1  // lanes are (n,m,p): window of size W1
  } pe_mode_e;

  // Phases of a tile, as sequenced by the control unit.
  typedef enum logic [2:0] {
    PH_IDLE,
    PH_C1_FETCH,
    PH_C1_RUN,
    PH_C1_DRAIN,
    PH_NORM,
    PH_C2_FETCH,
    PH_C2_RUN,
    PH_C2_DRAIN
  } phase_e;

  // Run-time tile configuration (the tiling factors the mapping chose).
  typedef struct packed {
    logic [15:0] tho;      // output tile height  T_Ho
    logic [15:0] two;      // output tile width   T_Wo
    logic [7:0]  tl;       // output channels     T_L
    logic [4:0]  af_shift; // AF requantization shift
  } tile_cfg_t;

  // AF: ReLU, shift, saturate to 8 unsigned bits.
  function automatic logic [DW-1:0] af_relu_q(input logic signed [31:0] acc,
                                              input logic [4:0] shift);
    logic signed [31:0] sh;
    if (acc <= 0) return '0;
    sh = acc >>> shift;
    if (sh > 255) return 8'hFF;
    return sh[DW-1:0];
  endfunction

  // Conv2 requantization: Q0.8 weights, so drop 8 bits and saturate.
  function automatic logic [DW-1:0] out_q(input logic signed [31:0] acc);
    logic signed [31:0] sh;
    if (acc <= 0) return '0;
    sh = acc >>> 8;
    if (sh > 255) return 8'hFF;
    return sh[DW-1:0];
  endfunction

  // Norm scaling of one weight with the reciprocal of its set's sum.
  function automatic logic [DW-1:0] norm_scale(input logic [DW-1:0] v,
                                               input logic [NORM_FRAC:0] recip);
    logic [NORM_FRAC+DW:0] p;
    logic [NORM_FRAC+DW:0] q;
    p = (NORM_FRAC+DW+1)'(v) * (NORM_FRAC+DW+1)'(recip);
    q = p >> NORM_SHR;
    if (q > 255) return 8'hFF;
    return q[DW-1:0];
  endfunction

endpackage
