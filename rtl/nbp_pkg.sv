// nbp_pkg: types, constants and arithmetic helpers shared by the neural branch
// prediction unit.
//
// Branch outcomes enter the neural nets as bipolar values: a taken branch is +1,
// a not-taken branch is -1. The single-layer perceptron keeps its weights as
// small signed integers; the multilayer perceptron keeps 32-bit weights, which
// here are signed fixed-point numbers with 16 fraction bits (Q16.16). The
// 32-bit width is the design's 4-byte MLP weight; the fixed-point format is
// this implementation's choice.
package nbp_pkg;

  // Which history feeds the neural predictor's inputs.
  //   HIST_G  : global history register only (G(A) configurations)
  //   HIST_P  : the branch's own per-address history (P(A) configurations)
  //   HIST_GP : a few global bits followed by per-address bits (GP(A))
  typedef enum logic [1:0] {
    HIST_G  = 2'd0,
    HIST_P  = 2'd1,
    HIST_GP = 2'd2
  } hist_mode_e;

  // Which neural predictor is paired with Gshare in the hybrid.
  typedef enum logic {
    NN_SLP = 1'b0,
    NN_MLP = 1'b1
  } nn_sel_e;

  // Q16.16 fixed point for the MLP.
  localparam int unsigned Q_FRAC = 16;
  typedef logic signed [31:0] q16_t;
  localparam q16_t Q_ONE     = 32'sh0001_0000;
  localparam q16_t Q_MAX     = 32'sh7fff_ffff;
  localparam q16_t Q_MIN     = -32'sh7fff_ffff - 32'sh1;

  // Saturate a wide signed value to Q16.16.
  function automatic q16_t q_sat(input logic signed [63:0] v);
    if (v > 64'(Q_MAX))      return Q_MAX;
    else if (v < 64'(Q_MIN)) return Q_MIN;
    else                     return q16_t'(v);
  endfunction

  // Q16.16 product, truncated toward minus infinity and saturated.
  function automatic q16_t q_mul(input q16_t a, input q16_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return q_sat(p >>> Q_FRAC);
  endfunction

  // Q16.16 saturating sum.
  function automatic q16_t q_add(input q16_t a, input q16_t b);
    return q_sat(64'(a) + 64'(b));
  endfunction

  // Two-bit saturating counter: taken counts up to 3, not taken down to 0.
  // Values 2 and 3 predict taken.
  function automatic logic [1:0] ctr2_next(input logic [1:0] c, input logic taken);
    if (taken) return (c == 2'b11) ? c : c + 2'b01;
    else       return (c == 2'b00) ? c : c - 2'b01;
  endfunction

endpackage
