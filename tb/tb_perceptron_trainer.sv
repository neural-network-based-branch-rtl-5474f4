// tb_perceptron_trainer: checks the update flag (mispredictions only) and
// each new weight, w + t*x with saturation at -128 and 127, for random rows
// that are often at the limits.
module tb_perceptron_trainer;
  localparam int unsigned N_IN = 15, W_BITS = 8;
  logic signed [W_BITS-1:0] w     [N_IN+1];
  logic signed [W_BITS-1:0] w_new [N_IN+1];
  logic [N_IN-1:0] hist;
  logic pred_taken, taken, update;
  int t, xi, e, checks = 0, failures = 0, sat_hits = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  perceptron_trainer #(.N_IN(N_IN), .W_BITS(W_BITS)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i <= int'(N_IN); i++)
        case ($urandom_range(0, 3))
          0: w[i] = 8'sd127;
          1: w[i] = -8'sd128;
          default: w[i] = W_BITS'($urandom);
        endcase
      hist       = N_IN'($urandom);
      pred_taken = $urandom_range(0, 1);
      taken      = $urandom_range(0, 1);
      #1;
      checks++;
      if (update !== (pred_taken != taken)) begin
        failures++;
        $display("FAIL update=%0b pred=%0b taken=%0b", update, pred_taken, taken);
      end
      t = taken ? 1 : -1;
      for (int i = 0; i <= int'(N_IN); i++) begin
        xi = (i == 0) ? 1 : (hist[i-1] ? 1 : -1);
        e  = int'(w[i]) + t * xi;
        if (e > 127)  begin e = 127;  sat_hits++; end
        if (e < -128) begin e = -128; sat_hits++; end
        checks++;
        if (int'(w_new[i]) != e) begin
          failures++;
          $display("FAIL weight %0d: %0d -> %0d expected %0d", i, w[i], w_new[i], e);
        end
      end
      @(posedge clk);
    end
    checks++;
    if (sat_hits == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
