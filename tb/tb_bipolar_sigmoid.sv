// tb_bipolar_sigmoid: sweeps x over [-12, 12] (and the range extremes) and
// compares f with 2/(1+exp(-x))-1 computed in real arithmetic (tolerance
// 0.009), df with (1-f^2)/2 of the exact f (tolerance 0.009), and checks that
// f is odd and never decreasing.
module tb_bipolar_sigmoid;
  import nbp_pkg::*;
  q16_t x, f, df, fprev;
  real xr, fr, er, dr, ed;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  bipolar_sigmoid dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q16_t fpos;
    fprev = Q_MIN;
    for (int n = -3000; n <= 3000; n++) begin
      x = q16_t'(n * 262);      // steps of about 0.004
      #1;
      xr = real'(x) / 65536.0;
      fr = real'(f) / 65536.0;
      dr = real'(df) / 65536.0;
      er = 2.0 / (1.0 + $exp(-xr)) - 1.0;
      ed = (1.0 - er * er) / 2.0;
      checks += 3;
      if (fr - er > 0.009 || er - fr > 0.009) begin
        failures++; $display("FAIL f(%f) = %f expected %f", xr, fr, er);
      end
      if (dr - ed > 0.009 || ed - dr > 0.009) begin
        failures++; $display("FAIL df(%f) = %f expected %f", xr, dr, ed);
      end
      if (f < fprev) begin failures++; $display("FAIL f decreases at %f", xr); end
      fprev = f;
      fpos = f;
      x = -x;
      #1;
      checks++;
      if (f != -fpos) begin failures++; $display("FAIL f not odd at %f", xr); end
    end
    x = Q_MAX; #1;
    checks++; if (f <= 32'sd65000 || f > Q_ONE) begin failures++; $display("FAIL f(max)"); end
    x = Q_MIN; #1;
    checks++; if (f >= -32'sd65000 || f < -Q_ONE) begin failures++; $display("FAIL f(min)"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
