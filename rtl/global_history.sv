// global_history: the global branch history register (GBHR).
//
// A LEN-bit shift register holding the outcomes of the last LEN resolved
// branches, whatever their address. Bit 0 is the most recent outcome
// (1 = taken). When `shift_en` is high at a rising clock edge the register
// shifts up by one and takes `taken` into bit 0; the new history is visible
// on `hist` the following cycle. Reset clears it to all not-taken.
//
// The register and its update on branch resolution follow the design; the
// length default (15) is the longest history the predictors use, and the
// reset value is this implementation's choice.
module global_history #(
  parameter int unsigned LEN = 15
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           taken,
  output logic [LEN-1:0] hist
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        hist <= '0;
    else if (shift_en) hist <= {hist[LEN-2:0], taken};
  end

endmodule
