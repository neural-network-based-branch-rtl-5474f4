// tb_gshare_predictor: random branch addresses, histories and outcomes,
// compared with a model PHT of two-bit counters indexed by address XOR
// history.
module tb_gshare_predictor;
  localparam int unsigned PC_W = 32, IDX_BITS = 10, HIST_BITS = 10;
  logic clk = 0, rst_n = 0, train_en = 0, taken = 0;
  logic [PC_W-1:0] pc = '0;
  logic [HIST_BITS-1:0] ghist = '0;
  logic pred_taken;
  int model [1024];
  int idx, checks = 0, failures = 0;

  gshare_predictor #(.PC_W(PC_W), .IDX_BITS(IDX_BITS), .HIST_BITS(HIST_BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[e]) model[e] = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      pc    = {$urandom_range(0, 3), 4'($urandom_range(0, 7))};
      ghist = HIST_BITS'($urandom_range(0, 3));   // few patterns: counters saturate
      idx   = int'((pc[IDX_BITS-1:0] ^ ghist));
      #1;
      checks++;
      if (pred_taken !== (model[idx] >= 2)) begin
        failures++; $display("FAIL n=%0d idx=%0d pred=%0b counter=%0d", n, idx, pred_taken, model[idx]);
      end
      train_en = $urandom_range(0, 1);
      taken    = ($urandom_range(0, 3) != 0) ^ pc[0];
      if (train_en) model[idx] = taken ? (model[idx] == 3 ? 3 : model[idx] + 1)
                                       : (model[idx] == 0 ? 0 : model[idx] - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
