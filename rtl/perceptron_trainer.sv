// perceptron_trainer: the training stage of the single-layer predictor.
//
// When the outcome of a branch is known it is compared with the prediction.
// Only when the prediction was wrong are the weights of the selected
// perceptron changed, by the perceptron rule with targets t = +1 (taken) or
// -1 (not taken):
//   w[0] <- w[0] + t
//   w[i] <- w[i] + t * x_i          (x_i = +1 / -1 from hist[i-1])
// Each weight saturates at the ends of its signed W_BITS range instead of
// wrapping. Purely combinational: `update` says whether the row must be
// written back, `w_new` is the row to write.
//
// Updating only on a misprediction follows the design; the unit step and the
// saturation are this implementation's choices.
module perceptron_trainer #(
  parameter int unsigned N_IN   = 15,
  parameter int unsigned W_BITS = 8
) (
  input  logic signed [W_BITS-1:0] w     [N_IN+1],
  input  logic [N_IN-1:0]          hist,
  input  logic                     pred_taken,
  input  logic                     taken,
  output logic                     update,
  output logic signed [W_BITS-1:0] w_new [N_IN+1]
);

  localparam logic signed [W_BITS-1:0] W_MAX = {1'b0, {(W_BITS-1){1'b1}}};
  localparam logic signed [W_BITS-1:0] W_MIN = {1'b1, {(W_BITS-1){1'b0}}};

  function automatic logic signed [W_BITS-1:0] step(input logic signed [W_BITS-1:0] v,
                                                    input logic up);
    if (up) return (v == W_MAX) ? v : v + W_BITS'(1);
    else    return (v == W_MIN) ? v : v - W_BITS'(1);
  endfunction

  assign update = (pred_taken != taken);

  always_comb begin
    w_new[0] = step(w[0], taken);
    for (int i = 1; i <= int'(N_IN); i++)
      w_new[i] = step(w[i], taken == hist[i-1]);
  end

endmodule
