// perceptron_table: the table of perceptrons of the single-layer predictor.
//
// 2**I_BITS entries, each a perceptron of N_IN+1 signed W_BITS-bit weights:
// weight 0 is the bias, weight i (1..N_IN) belongs to history bit i-1.
// The entry is chosen ("select entry") by an index the caller forms from the
// branch address.
//
// Read is combinational: `rd_row` is the entry at `rd_idx`. When `wr_en` is high
// at a rising clock edge, `wr_row` replaces the entry at `wr_idx`; the new
// weights are visible the next cycle. Reset clears all weights to zero.
//
// The default size, 64 perceptrons of 16 eight-bit weights (8K bits), is the
// design's G(A)slp-8K configuration. Zero reset values are this
// implementation's choice.
module perceptron_table #(
  parameter int unsigned I_BITS = 6,
  parameter int unsigned N_IN   = 15,
  parameter int unsigned W_BITS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [I_BITS-1:0]        rd_idx,
  output logic signed [W_BITS-1:0] rd_row [N_IN+1],
  input  logic                     wr_en,
  input  logic [I_BITS-1:0]        wr_idx,
  input  logic signed [W_BITS-1:0] wr_row [N_IN+1]
);

  localparam int unsigned ENTRIES = 1 << I_BITS;

  logic signed [W_BITS-1:0] table_q [ENTRIES][N_IN+1];

  assign rd_row = table_q[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(ENTRIES); e++)
        for (int w = 0; w <= int'(N_IN); w++)
          table_q[e][w] <= '0;
    end else if (wr_en) begin
      table_q[wr_idx] <= wr_row;
    end
  end

endmodule
