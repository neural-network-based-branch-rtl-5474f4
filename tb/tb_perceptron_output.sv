// tb_perceptron_output: random weights (including the extremes) and random
// histories; y is compared with the bipolar dot product computed in integers
// and the prediction with y > 0.
module tb_perceptron_output;
  localparam int unsigned N_IN = 15, W_BITS = 8;
  localparam int unsigned Y_BITS = W_BITS + $clog2(N_IN + 1) + 1;
  logic signed [W_BITS-1:0] w [N_IN+1];
  logic [N_IN-1:0] hist;
  logic signed [Y_BITS-1:0] y;
  logic pred_taken;
  int exp_y, checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  perceptron_output #(.N_IN(N_IN), .W_BITS(W_BITS)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i <= int'(N_IN); i++) begin
        case (n % 4)
          0: w[i] = 8'sd127;
          1: w[i] = -8'sd128;
          default: w[i] = W_BITS'($urandom);
        endcase
        if (n % 4 < 2 && $urandom_range(0, 3) == 0) w[i] = W_BITS'($urandom);
      end
      hist = N_IN'($urandom);
      exp_y = int'(w[0]);
      for (int i = 1; i <= int'(N_IN); i++)
        exp_y += hist[i-1] ? int'(w[i]) : -int'(w[i]);
      #1;
      checks += 2;
      if (int'(y) != exp_y) begin
        failures++;
        $display("FAIL y=%0d expected %0d", y, exp_y);
      end
      if (pred_taken !== (exp_y > 0)) begin
        failures++;
        $display("FAIL pred=%0b for y=%0d", pred_taken, exp_y);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
