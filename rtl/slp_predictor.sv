// slp_predictor: single-layer perceptron (SLP) branch predictor.
//
// A table of perceptrons takes the place of the pattern history table of a
// two-level predictor. The low I_BITS bits of the branch address select one
// perceptron; its output y is computed from the N_IN history bits applied as
// +1/-1 inputs, and the branch is predicted taken when y > 0. When the branch
// resolves, the same perceptron is evaluated again on the same inputs and, if
// the prediction was wrong, its corrected weights are written back.
//
// Interface and timing: `pc` and `hist` drive a combinational evaluation that
// gives `y` and `pred_taken` in the same cycle. A branch is trained by holding
// `pc` and `hist` at the values it was predicted with and raising `train_en`
// for one cycle with the real outcome on `taken`; the table is written at that
// clock edge (only on a misprediction, reported on `mispredict`).
//
// The structure and the defaults (64 perceptrons, 15 history bits, 8-bit
// weights) follow the design; the index taken from the lowest address bits is
// this implementation's choice.
module slp_predictor #(
  parameter int unsigned PC_W   = 32,
  parameter int unsigned I_BITS = 6,
  parameter int unsigned N_IN   = 15,
  parameter int unsigned W_BITS = 8,
  localparam int unsigned Y_BITS = W_BITS + $clog2(N_IN + 1) + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [PC_W-1:0]          pc,
  input  logic [N_IN-1:0]          hist,
  output logic signed [Y_BITS-1:0] y,
  output logic                     pred_taken,
  input  logic                     train_en,
  input  logic                     taken,
  output logic                     mispredict
);

  logic [I_BITS-1:0]        idx;
  logic signed [W_BITS-1:0] row     [N_IN+1];
  logic signed [W_BITS-1:0] row_new [N_IN+1];
  logic                     update;

  assign idx = pc[I_BITS-1:0];

  perceptron_table #(.I_BITS(I_BITS), .N_IN(N_IN), .W_BITS(W_BITS)) u_table (
    .clk    (clk),
    .rst_n  (rst_n),
    .rd_idx (idx),
    .rd_row (row),
    .wr_en  (train_en && update),
    .wr_idx (idx),
    .wr_row (row_new)
  );

  perceptron_output #(.N_IN(N_IN), .W_BITS(W_BITS)) u_output (
    .w          (row),
    .hist       (hist),
    .y          (y),
    .pred_taken (pred_taken)
  );

  perceptron_trainer #(.N_IN(N_IN), .W_BITS(W_BITS)) u_trainer (
    .w          (row),
    .hist       (hist),
    .pred_taken (pred_taken),
    .taken      (taken),
    .update     (update),
    .w_new      (row_new)
  );

  assign mispredict = train_en && update;

endmodule
