// tb_local_history_table: checks the per-address history table against an
// array-of-shift-registers model: random writes to random addresses, and a
// read of every register after each write.
module tb_local_history_table;
  localparam int unsigned J_BITS = 2, LEN = 15, PC_W = 32;
  logic clk = 0, rst_n = 0;
  logic [PC_W-1:0] rd_pc = '0, wr_pc = '0;
  logic [LEN-1:0] rd_hist;
  logic wr_en = 0, wr_taken = 0;
  logic [LEN-1:0] model [4];
  int checks = 0, failures = 0;

  local_history_table #(.J_BITS(J_BITS), .LEN(LEN), .PC_W(PC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[e]) model[e] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int e = 0; e < 4; e++) begin
        rd_pc = {$urandom_range(0, 1000000), 2'(e)};
        #1;
        checks++;
        if (rd_hist !== model[e]) begin
          failures++;
          $display("FAIL step %0d entry %0d: %h expected %h", n, e, rd_hist, model[e]);
        end
      end
      wr_en    = ($urandom_range(0, 4) != 0);
      wr_pc    = $urandom;
      wr_taken = $urandom_range(0, 1);
      if (wr_en) model[wr_pc[1:0]] = {model[wr_pc[1:0]][LEN-2:0], wr_taken};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
