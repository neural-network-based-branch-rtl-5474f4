// history_select: forms the history part of a neural predictor's input vector.
//
// The neural predictors can be fed three kinds of history (a run-time choice
// here, `mode`):
//   HIST_G  : the K most recent global outcomes,
//   HIST_P  : the K most recent outcomes of the branch's own BHT register,
//   HIST_GP : the G_BITS most recent global outcomes in bits [G_BITS-1:0],
//             followed by the K-G_BITS most recent per-address outcomes.
// Purely combinational. Bit value 1 means taken (+1 to the net), 0 not taken
// (-1). The global/local split of the GP mode (5+10 for the single-layer and
// 3+10 for the multilayer net) follows the design's 8K-bit configurations; the
// bit ordering inside the vector is this implementation's choice.
module history_select
  import nbp_pkg::*;
#(
  parameter int unsigned K      = 15,
  parameter int unsigned G_BITS = 5,
  parameter int unsigned GLEN   = 15,
  parameter int unsigned LLEN   = 15
) (
  input  hist_mode_e      mode,
  input  logic [GLEN-1:0] ghist,
  input  logic [LLEN-1:0] lhist,
  output logic [K-1:0]    x
);

  always_comb begin
    unique case (mode)
      HIST_G:  x = ghist[K-1:0];
      HIST_P:  x = lhist[K-1:0];
      default: x = {lhist[K-G_BITS-1:0], ghist[G_BITS-1:0]};
    endcase
  end

endmodule
