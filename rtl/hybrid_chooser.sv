// hybrid_chooser: selection mechanism of the hybrid predictor.
//
// Chooses, per branch, between two component predictions: A (Gshare) and
// B (the neural predictor). A table of 2**IDX_BITS two-bit saturating
// counters, indexed by the low branch address bits, records which component
// has been right more often for that branch: values 2 and 3 select B, 0 and 1
// select A. When a branch resolves and exactly one of the two components was
// right, the counter moves one step towards that component; when both or
// neither were right it is left alone.
//
// Interface and timing: `pc`, `pred_a` and `pred_b` give `use_b` and
// `pred_taken` combinationally. Raising `train_en` with the outcome on `taken`
// (and `pc`, `pred_a`, `pred_b` held at their prediction-time values) updates
// the counter at that clock edge. Reset sets every counter to 2 (weakly B).
//
// The design combines Gshare with a neural predictor but does not describe the
// selector; this counter-table chooser and its size are this implementation's
// choices.
module hybrid_chooser
  import nbp_pkg::*;
#(
  parameter int unsigned PC_W     = 32,
  parameter int unsigned IDX_BITS = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] pc,
  input  logic            pred_a,
  input  logic            pred_b,
  output logic            use_b,
  output logic            pred_taken,
  input  logic            train_en,
  input  logic            taken
);

  localparam int unsigned ENTRIES = 1 << IDX_BITS;

  logic [1:0]          sel [ENTRIES];
  logic [IDX_BITS-1:0] idx;
  logic                a_ok, b_ok;

  assign idx        = pc[IDX_BITS-1:0];
  assign use_b      = sel[idx][1];
  assign pred_taken = use_b ? pred_b : pred_a;
  assign a_ok       = (pred_a == taken);
  assign b_ok       = (pred_b == taken);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(ENTRIES); e++) sel[e] <= 2'b10;
    end else if (train_en && (a_ok != b_ok)) begin
      sel[idx] <= ctr2_next(sel[idx], b_ok);
    end
  end

endmodule
