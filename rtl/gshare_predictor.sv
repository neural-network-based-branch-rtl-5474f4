// gshare_predictor: Gshare two-level predictor.
//
// A pattern history table (PHT) of 2**IDX_BITS two-bit saturating counters is
// indexed by the low IDX_BITS bits of the branch address XORed with the
// HIST_BITS most recent global outcomes (HIST_BITS <= IDX_BITS). XORing spreads
// branches that share a history pattern over different counters. A counter of
// 2 or 3 predicts taken.
//
// Interface and timing: `pc` and `ghist` give `pred_taken` combinationally.
// Holding them at the values used for the prediction and raising `train_en`
// with the outcome on `taken` moves the selected counter one step towards the
// outcome at that clock edge. Reset sets every counter to 1 (weakly not taken).
//
// The XOR index and the 1024-entry table of two-bit counters follow the
// design; using 10 history bits (as many as the index is wide) and the reset
// value are this implementation's choices.
module gshare_predictor
  import nbp_pkg::*;
#(
  parameter int unsigned PC_W      = 32,
  parameter int unsigned IDX_BITS  = 10,
  parameter int unsigned HIST_BITS = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [PC_W-1:0]      pc,
  input  logic [HIST_BITS-1:0] ghist,
  output logic                 pred_taken,
  input  logic                 train_en,
  input  logic                 taken
);

  localparam int unsigned ENTRIES = 1 << IDX_BITS;

  logic [1:0]          pht [ENTRIES];
  logic [IDX_BITS-1:0] idx;

  assign idx        = pc[IDX_BITS-1:0] ^ IDX_BITS'(ghist);
  assign pred_taken = pht[idx][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(ENTRIES); e++) pht[e] <= 2'b01;
    end else if (train_en) begin
      pht[idx] <= ctr2_next(pht[idx], taken);
    end
  end

endmodule
