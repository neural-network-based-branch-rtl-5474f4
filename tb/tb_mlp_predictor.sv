// tb_mlp_predictor: runs the multilayer predictor on a stream of three static
// branches with learnable patterns (a loop branch, a branch that repeats the
// previous outcome, an alternating branch). At each branch it checks that
// the output lies in [-1, 1] and agrees in sign with the prediction, that a
// correct prediction leaves the network unchanged, and that after a
// misprediction one back-propagation step moves the output towards the
// target. At the end the network must predict the stream well.
module tb_mlp_predictor;
  import nbp_pkg::*;
  localparam int unsigned PC_W = 32, A_BITS = 8, K = 13;
  logic clk = 0, rst_n = 0, train_en = 0, taken = 0;
  logic [PC_W-1:0] pc = '0;
  logic [K-1:0] hist = '0;
  q16_t net_o, o, o_before;
  logic pred_taken, mispredict, outcome, p_before;
  logic [K-1:0] ghist;
  int loopcnt, late_ok, late_n, checks = 0, failures = 0, trained = 0;

  mlp_predictor #(.PC_W(PC_W), .A_BITS(A_BITS), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ghist = '0; loopcnt = 0; late_ok = 0; late_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      case (n % 3)
        0: begin pc = 32'h0000_1040; outcome = (loopcnt != 4); loopcnt = (loopcnt + 1) % 5; end
        1: begin pc = 32'h0000_2085; outcome = ghist[0]; end
        default: begin pc = 32'h0000_30c9; outcome = ((n / 3) % 2 == 0); end
      endcase
      hist = ghist;
      @(negedge clk);
      checks += 2;
      if (o > Q_ONE || o < -Q_ONE) begin failures++; $display("FAIL n=%0d o out of range", n); end
      if (pred_taken !== (net_o > 0) || (pred_taken && o < 0) || (!pred_taken && o > 0)) begin
        failures++; $display("FAIL n=%0d prediction sign", n);
      end
      o_before = o; p_before = pred_taken;
      taken = outcome; train_en = 1;
      #1;
      checks++;
      if (mispredict !== (p_before != outcome)) begin failures++; $display("FAIL n=%0d mispredict flag", n); end
      if (n >= 5100) begin late_n++; if (p_before == outcome) late_ok++; end
      @(posedge clk);
      #1 train_en = 0;
      #1;
      checks++;
      if (p_before == outcome) begin
        if (o != o_before) begin failures++; $display("FAIL n=%0d weights changed on a hit", n); end
      end else begin
        trained++;
        if (outcome ? (o <= o_before) : (o >= o_before)) begin
          failures++; $display("FAIL n=%0d output moved away from target: %0d -> %0d", n, o_before, o);
        end
      end
      ghist = {ghist[K-2:0], outcome};
    end
    checks += 2;
    $display("late accuracy %0d / %0d, %0d training steps", late_ok, late_n, trained);
    if (trained == 0) begin failures++; $display("FAIL never trained"); end
    if (late_ok * 100 < late_n * 90) begin failures++; $display("FAIL network did not learn"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
