// tb_perceptron_table: writes random rows to random entries and reads random
// entries back, comparing with a model table; also checks reset to zero.
module tb_perceptron_table;
  localparam int unsigned I_BITS = 6, N_IN = 15, W_BITS = 8;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [I_BITS-1:0] rd_idx = '0, wr_idx = '0;
  logic signed [W_BITS-1:0] rd_row [N_IN+1];
  logic signed [W_BITS-1:0] wr_row [N_IN+1];
  logic signed [W_BITS-1:0] model [64][N_IN+1];
  int checks = 0, failures = 0;

  perceptron_table #(.I_BITS(I_BITS), .N_IN(N_IN), .W_BITS(W_BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[e, w]) model[e][w] = '0;
    foreach (wr_row[w]) wr_row[w] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      rd_idx = I_BITS'($urandom);
      #1;
      for (int w = 0; w <= int'(N_IN); w++) begin
        checks++;
        if (rd_row[w] !== model[rd_idx][w]) begin
          failures++;
          $display("FAIL entry %0d weight %0d: %0d expected %0d", rd_idx, w, rd_row[w], model[rd_idx][w]);
        end
      end
      wr_en  = ($urandom_range(0, 1) == 1);
      wr_idx = I_BITS'($urandom_range(0, 15));  // revisit a few entries often
      foreach (wr_row[w]) wr_row[w] = W_BITS'($urandom);
      if (wr_en) foreach (wr_row[w]) model[wr_idx][w] = wr_row[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
