// neural_bpu: neural-network branch prediction unit (top level).
//
// A two-level branch predictor whose second level is a neural network instead
// of a table of two-bit counters, combined with a Gshare predictor into a
// hybrid:
//   * first level: a global history register (GBHR, 15 bits) and a
//     per-address history table (BHT, 4 registers of 15 bits);
//   * second level: a single-layer perceptron predictor (64 perceptrons x 16
//     eight-bit weights) and a multilayer perceptron predictor (21 inputs,
//     10 hidden neurons, 32-bit weights), each fed global (G), per-address (P)
//     or combined (GP) history, chosen by `hist_mode`;
//   * a Gshare predictor (1024 two-bit counters) and a chooser that picks,
//     per branch, Gshare or the neural predictor chosen by `nn_sel`. With
//     `hybrid_en` low the neural prediction is used alone.
//
// Protocol: one branch is in flight at a time.
//   1. Request: `req_valid` with the branch address on `req_pc` while
//      `req_ready` is high. `pred_taken` (and the component predictions) are
//      valid combinationally in that cycle. The unit is then busy
//      (`req_ready` low): a request made while busy is stalled.
//   2. Resolve: some cycles later `res_valid` with the real direction on
//      `res_taken`. In that cycle all components re-evaluate the held branch
//      (nothing has changed since the request), and at the clock edge every
//      component trains and both history registers shift in the outcome;
//      `mispredict` tells in that cycle whether the unit's prediction was
//      wrong (`slp_mispredict` / `mlp_mispredict` for the two nets, which
//      train only then). `req_ready` is high again in the next cycle.
// Histories are updated only when a branch resolves, as in a trace-driven
// evaluation that executes one instruction at a time; `hist_mode`, `nn_sel`
// and `hybrid_en` are captured with each request.
//
// The components, their sizes (the 8K-bit configurations), the G/P/GP input
// choices and the Gshare+neural hybrid follow the design. The request/resolve
// handshake, the single branch in flight and the run-time selection inputs are
// this implementation's choices.
module neural_bpu
  import nbp_pkg::*;
#(
  parameter int unsigned PC_W         = 32,
  parameter int unsigned GHR_LEN      = 15,
  parameter int unsigned BHT_J_BITS   = 2,
  parameter int unsigned BHT_LEN      = 15,
  parameter int unsigned SLP_I_BITS   = 6,
  parameter int unsigned SLP_K        = 15,
  parameter int unsigned SLP_GP_G     = 5,
  parameter int unsigned SLP_W_BITS   = 8,
  parameter int unsigned MLP_A_BITS   = 8,
  parameter int unsigned MLP_K        = 13,
  parameter int unsigned MLP_GP_G     = 3,
  parameter int unsigned MLP_ETA_SHIFT = 2,
  parameter int unsigned GSH_IDX_BITS = 10,
  parameter int unsigned SEL_IDX_BITS = 10,
  localparam int unsigned GSH_HIST    = (GHR_LEN < GSH_IDX_BITS) ? GHR_LEN : GSH_IDX_BITS,
  localparam int unsigned SLP_Y_BITS  = SLP_W_BITS + $clog2(SLP_K + 1) + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration, captured with each request
  input  hist_mode_e      hist_mode,
  input  nn_sel_e         nn_sel,
  input  logic            hybrid_en,
  // prediction request
  input  logic            req_valid,
  output logic            req_ready,
  input  logic [PC_W-1:0] req_pc,
  output logic            pred_taken,
  output logic            pred_gshare,
  output logic            pred_slp,
  output logic            pred_mlp,
  output logic            use_neural,
  // resolution
  input  logic            res_valid,
  input  logic            res_taken,
  output logic            mispredict,
  output logic            slp_mispredict,
  output logic            mlp_mispredict,
  // neural outputs of the current evaluation
  output logic signed [SLP_Y_BITS-1:0] slp_y,
  output q16_t            mlp_o
);

  // ------------------------------------------------------ in-flight branch
  logic            inflight;
  logic [PC_W-1:0] held_pc;
  hist_mode_e      held_mode;
  nn_sel_e         held_nn;
  logic            held_hyb;

  logic            accept, resolve;
  logic [PC_W-1:0] pc;
  hist_mode_e      mode;
  nn_sel_e         nn;
  logic            hyb;

  assign req_ready = !inflight;
  assign accept    = req_valid && req_ready;
  assign resolve   = res_valid && inflight;

  assign pc   = inflight ? held_pc   : req_pc;
  assign mode = inflight ? held_mode : hist_mode;
  assign nn   = inflight ? held_nn   : nn_sel;
  assign hyb  = inflight ? held_hyb  : hybrid_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight  <= 1'b0;
      held_pc   <= '0;
      held_mode <= HIST_G;
      held_nn   <= NN_SLP;
      held_hyb  <= 1'b0;
    end else if (accept) begin
      inflight  <= 1'b1;
      held_pc   <= req_pc;
      held_mode <= hist_mode;
      held_nn   <= nn_sel;
      held_hyb  <= hybrid_en;
    end else if (resolve) begin
      inflight  <= 1'b0;
    end
  end

  // ---------------------------------------------------------- first level
  logic [GHR_LEN-1:0] ghist;
  logic [BHT_LEN-1:0] lhist;

  global_history #(.LEN(GHR_LEN)) u_ghr (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (resolve),
    .taken    (res_taken),
    .hist     (ghist)
  );

  local_history_table #(.J_BITS(BHT_J_BITS), .LEN(BHT_LEN), .PC_W(PC_W)) u_bht (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_pc    (pc),
    .rd_hist  (lhist),
    .wr_en    (resolve),
    .wr_pc    (pc),
    .wr_taken (res_taken)
  );

  logic [SLP_K-1:0] slp_x;
  logic [MLP_K-1:0] mlp_x;

  history_select #(.K(SLP_K), .G_BITS(SLP_GP_G), .GLEN(GHR_LEN), .LLEN(BHT_LEN)) u_slp_sel (
    .mode (mode), .ghist (ghist), .lhist (lhist), .x (slp_x)
  );

  history_select #(.K(MLP_K), .G_BITS(MLP_GP_G), .GLEN(GHR_LEN), .LLEN(BHT_LEN)) u_mlp_sel (
    .mode (mode), .ghist (ghist), .lhist (lhist), .x (mlp_x)
  );

  // --------------------------------------------------------- second level
  logic                         neural_pred, hyb_pred;

  slp_predictor #(.PC_W(PC_W), .I_BITS(SLP_I_BITS), .N_IN(SLP_K), .W_BITS(SLP_W_BITS)) u_slp (
    .clk        (clk),
    .rst_n      (rst_n),
    .pc         (pc),
    .hist       (slp_x),
    .y          (slp_y),
    .pred_taken (pred_slp),
    .train_en   (resolve),
    .taken      (res_taken),
    .mispredict (slp_mispredict)
  );

  mlp_predictor #(.PC_W(PC_W), .A_BITS(MLP_A_BITS), .K(MLP_K), .ETA_SHIFT(MLP_ETA_SHIFT)) u_mlp (
    .clk        (clk),
    .rst_n      (rst_n),
    .pc         (pc),
    .hist       (mlp_x),
    .net_o      (),
    .o          (mlp_o),
    .pred_taken (pred_mlp),
    .train_en   (resolve),
    .taken      (res_taken),
    .mispredict (mlp_mispredict)
  );

  gshare_predictor #(.PC_W(PC_W), .IDX_BITS(GSH_IDX_BITS), .HIST_BITS(GSH_HIST)) u_gshare (
    .clk        (clk),
    .rst_n      (rst_n),
    .pc         (pc),
    .ghist      (ghist[GSH_HIST-1:0]),
    .pred_taken (pred_gshare),
    .train_en   (resolve),
    .taken      (res_taken)
  );

  assign neural_pred = (nn == NN_MLP) ? pred_mlp : pred_slp;

  hybrid_chooser #(.PC_W(PC_W), .IDX_BITS(SEL_IDX_BITS)) u_chooser (
    .clk        (clk),
    .rst_n      (rst_n),
    .pc         (pc),
    .pred_a     (pred_gshare),
    .pred_b     (neural_pred),
    .use_b      (use_neural),
    .pred_taken (hyb_pred),
    .train_en   (resolve),
    .taken      (res_taken)
  );

  assign pred_taken = hyb ? hyb_pred : neural_pred;
  assign mispredict = resolve && (pred_taken != res_taken);

  // A resolution must refer to a branch that was predicted.
  a_res_has_branch: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> inflight)
    else $error("neural_bpu: res_valid with no branch in flight");

  // A request and a resolution cannot meet in one cycle.
  a_no_req_on_res: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> !accept);

endmodule
