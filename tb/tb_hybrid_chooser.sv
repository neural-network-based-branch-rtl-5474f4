// tb_hybrid_chooser: random component predictions and outcomes; the chosen
// component and the final prediction are compared with a model table of
// two-bit selection counters that move only when exactly one component was
// right. Both selections must occur.
module tb_hybrid_chooser;
  localparam int unsigned PC_W = 32, IDX_BITS = 10;
  logic clk = 0, rst_n = 0, train_en = 0, taken = 0;
  logic [PC_W-1:0] pc = '0;
  logic pred_a = 0, pred_b = 0, use_b, pred_taken;
  int model [1024];
  int idx, checks = 0, failures = 0, chose_a = 0, chose_b = 0;
  logic eb;

  hybrid_chooser #(.PC_W(PC_W), .IDX_BITS(IDX_BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[e]) model[e] = 2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      pc     = {$urandom_range(0, 65535), 3'($urandom)};
      idx    = int'(pc[IDX_BITS-1:0]);
      pred_a = $urandom_range(0, 1);
      pred_b = $urandom_range(0, 1);
      #1;
      eb = (model[idx] >= 2);
      if (eb) chose_b++; else chose_a++;
      checks += 2;
      if (use_b !== eb) begin failures++; $display("FAIL n=%0d use_b", n); end
      if (pred_taken !== (eb ? pred_b : pred_a)) begin failures++; $display("FAIL n=%0d pred", n); end
      train_en = 1;
      // Component A is right more often on even addresses, B on odd ones.
      taken = (pc[0] ^ ($urandom_range(0, 4) == 0)) ? pred_b : pred_a;
      if ((pred_a == taken) != (pred_b == taken)) begin
        if (pred_b == taken) model[idx] = (model[idx] == 3) ? 3 : model[idx] + 1;
        else                 model[idx] = (model[idx] == 0) ? 0 : model[idx] - 1;
      end
    end
    checks++;
    if (chose_a == 0 || chose_b == 0) begin failures++; $display("FAIL a selection never made"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
