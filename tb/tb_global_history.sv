// tb_global_history: checks the global history register against a shift
// register model over random outcomes, with and without shift enable.
module tb_global_history;
  localparam int unsigned LEN = 15;
  logic clk = 0, rst_n = 0, shift_en = 0, taken = 0;
  logic [LEN-1:0] hist, model;
  int checks = 0, failures = 0;

  global_history #(.LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      checks++;
      if (hist !== model) begin
        failures++;
        $display("FAIL step %0d: hist=%h expected %h", n, hist, model);
      end
      shift_en = ($urandom_range(0, 3) != 0);
      taken    = $urandom_range(0, 1);
      if (shift_en) model = {model[LEN-2:0], taken};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
