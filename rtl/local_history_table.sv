// local_history_table: per-address branch history table (BHT).
//
// 2**J_BITS shift registers of LEN bits, one per group of static branches
// selected by the low J_BITS bits of the branch address. Each register records
// the recent outcomes of the branches that map onto it, bit 0 being the most
// recent (1 = taken).
//
// Read is combinational: `rd_hist` is the register selected by `rd_pc`.
// Write happens at the rising clock edge when `wr_en` is high: the register
// selected by `wr_pc` shifts up and takes `wr_taken` into bit 0.
// Reset clears every register.
//
// J_BITS = 2 (four registers) and LEN = 15 follow the 8K-bit configurations of
// the design; using the lowest address bits as the index is this
// implementation's choice.
module local_history_table #(
  parameter int unsigned J_BITS = 2,
  parameter int unsigned LEN    = 15,
  parameter int unsigned PC_W   = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] rd_pc,
  output logic [LEN-1:0]  rd_hist,
  input  logic            wr_en,
  input  logic [PC_W-1:0] wr_pc,
  input  logic            wr_taken
);

  localparam int unsigned ENTRIES = 1 << J_BITS;

  logic [LEN-1:0] bht [ENTRIES];

  assign rd_hist = bht[rd_pc[J_BITS-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(ENTRIES); e++) bht[e] <= '0;
    end else if (wr_en) begin
      bht[wr_pc[J_BITS-1:0]] <= {bht[wr_pc[J_BITS-1:0]][LEN-2:0], wr_taken};
    end
  end

endmodule
