// tb_history_select: checks the G, P and GP input vectors for random global
// and per-address histories, bit by bit against the selection rule.
module tb_history_select;
  import nbp_pkg::*;
  localparam int unsigned K = 15, G_BITS = 5, GLEN = 15, LLEN = 15;
  hist_mode_e mode;
  logic [GLEN-1:0] ghist;
  logic [LLEN-1:0] lhist;
  logic [K-1:0] x;
  logic expb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  history_select #(.K(K), .G_BITS(G_BITS), .GLEN(GLEN), .LLEN(LLEN)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      ghist = GLEN'($urandom);
      lhist = LLEN'($urandom);
      mode  = hist_mode_e'(n % 3);
      #1;
      for (int b = 0; b < int'(K); b++) begin
        case (mode)
          HIST_G:  expb = ghist[b];
          HIST_P:  expb = lhist[b];
          default: expb = (b < int'(G_BITS)) ? ghist[b] : lhist[b - int'(G_BITS)];
        endcase
        checks++;
        if (x[b] !== expb) begin
          failures++;
          $display("FAIL mode %0d bit %0d", mode, b);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
