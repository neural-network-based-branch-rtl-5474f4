// tb_slp_predictor: runs the single-layer predictor on a branch stream drawn
// from a few static branches with learnable patterns, keeping a model of the
// perceptron table. Every prediction, y and misprediction flag is compared
// with the model; at the end the predictor must predict the stream well.
module tb_slp_predictor;
  localparam int unsigned PC_W = 32, I_BITS = 6, N_IN = 15, W_BITS = 8;
  localparam int unsigned Y_BITS = W_BITS + $clog2(N_IN + 1) + 1;
  logic clk = 0, rst_n = 0, train_en = 0, taken = 0;
  logic [PC_W-1:0] pc = '0;
  logic [N_IN-1:0] hist = '0;
  logic signed [Y_BITS-1:0] y;
  logic pred_taken, mispredict;

  int model [64][N_IN+1];
  int checks = 0, failures = 0;
  int my, idx, t, xi, late_ok, late_n;
  logic mp, outcome;
  logic [N_IN-1:0] ghist;
  int loopcnt;

  slp_predictor #(.PC_W(PC_W), .I_BITS(I_BITS), .N_IN(N_IN), .W_BITS(W_BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[e, w]) model[e][w] = 0;
    ghist = '0; loopcnt = 0; late_ok = 0; late_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      // Three static branches: a loop branch (taken 4 times then not),
      // a branch repeating the loop branch's last outcome, and an
      // alternating branch.
      case (n % 3)
        0: begin pc = 32'h0000_1040; outcome = (loopcnt != 4); loopcnt = (loopcnt + 1) % 5; end
        1: begin pc = 32'h0000_2085; outcome = ghist[0]; end
        default: begin pc = 32'h0000_30c9; outcome = ((n / 3) % 2 == 0); end
      endcase
      hist = ghist;
      @(negedge clk);
      idx = int'(pc[I_BITS-1:0]);
      my = model[idx][0];
      for (int i = 1; i <= int'(N_IN); i++) my += hist[i-1] ? model[idx][i] : -model[idx][i];
      mp = (my > 0);
      checks += 2;
      if (int'(y) != my) begin failures++; $display("FAIL n=%0d y=%0d expected %0d", n, y, my); end
      if (pred_taken !== mp) begin failures++; $display("FAIL n=%0d pred", n); end
      taken = outcome; train_en = 1;
      #1;
      checks++;
      if (mispredict !== (mp != outcome)) begin failures++; $display("FAIL n=%0d mispredict flag", n); end
      if (n >= 2400) begin late_n++; if (mp == outcome) late_ok++; end
      if (mp != outcome) begin
        t = outcome ? 1 : -1;
        for (int i = 0; i <= int'(N_IN); i++) begin
          xi = (i == 0) ? 1 : (hist[i-1] ? 1 : -1);
          model[idx][i] = model[idx][i] + t * xi;
          if (model[idx][i] > 127) model[idx][i] = 127;
          if (model[idx][i] < -128) model[idx][i] = -128;
        end
      end
      @(posedge clk);
      #1 train_en = 0;
      ghist = {ghist[N_IN-2:0], outcome};
    end
    checks++;
    $display("late accuracy %0d / %0d", late_ok, late_n);
    if (late_ok * 100 < late_n * 95) begin failures++; $display("FAIL predictor did not learn"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
