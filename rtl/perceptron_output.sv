// perceptron_output: the "compute y" and "> 0" stages of the single-layer
// predictor.
//
//   y = w[0] + sum_{i=1..N_IN} w[i] * x_i,   x_i = +1 if hist[i-1] else -1
//
// Because every input is +1 or -1, each product is the weight or its negation,
// so y is a plain signed sum with no multipliers. The branch is predicted taken
// when y > 0. Purely combinational.
//
// The output rule follows the design; y is wide enough that the sum never
// overflows.
module perceptron_output #(
  parameter int unsigned N_IN   = 15,
  parameter int unsigned W_BITS = 8,
  localparam int unsigned Y_BITS = W_BITS + $clog2(N_IN + 1) + 1
) (
  input  logic signed [W_BITS-1:0] w [N_IN+1],
  input  logic [N_IN-1:0]          hist,
  output logic signed [Y_BITS-1:0] y,
  output logic                     pred_taken
);

  always_comb begin
    y = Y_BITS'(w[0]);
    for (int i = 1; i <= int'(N_IN); i++) begin
      if (hist[i-1]) y = y + Y_BITS'(w[i]);
      else           y = y - Y_BITS'(w[i]);
    end
  end

  assign pred_taken = (y > 0);

endmodule
