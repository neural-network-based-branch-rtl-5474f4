// tb_neural_bpu: end-to-end test of the branch prediction unit at its default
// sizes.
//
// A synthetic program of five static branches (a loop branch, a branch that
// repeats the last outcome, an alternating branch, a branch correlated with
// the loop branch two branches back, and a 90%-taken noisy branch) is run
// through every configuration: history G, P and GP, neural net SLP and MLP,
// hybrid off and on, with a reset between configurations. For every branch:
//   * a model of the history registers and of the perceptron table predicts
//     the SLP's y, which must match;
//   * the final prediction must be the component the configuration selects;
//   * while the branch is in flight, extra requests must be stalled and the
//     prediction must not change;
//   * the mispredict flags at resolution must match the predictions.
// Each configuration must reach a minimum accuracy over its second half, and
// every mechanism (stall, SLP training, MLP training, chooser picking Gshare,
// chooser picking the neural net, each history mode) must have happened.
module tb_neural_bpu;
  import nbp_pkg::*;
  localparam int NBR = 1500;   // branches per configuration

  logic clk = 0, rst_n = 0;
  hist_mode_e hist_mode = HIST_G;
  nn_sel_e nn_sel = NN_SLP;
  logic hybrid_en = 0, req_valid = 0, res_valid = 0, res_taken = 0;
  logic [31:0] req_pc = '0;
  logic req_ready, pred_taken, pred_gshare, pred_slp, pred_mlp, use_neural;
  logic mispredict, slp_mispredict, mlp_mispredict;
  logic signed [12:0] slp_y;
  q16_t mlp_o;

  neural_bpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_slp_train = 0, n_mlp_train = 0, n_pick_gshare = 0, n_pick_neural = 0;
  int n_mode [3] = '{0, 0, 0};

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference state for the SLP path.
  int          wt [64][16];
  logic [14:0] gh;
  logic [14:0] lh [4];

  function automatic logic [14:0] slp_inputs(input hist_mode_e m, input logic [31:0] pc);
    case (m)
      HIST_G:  return gh;
      HIST_P:  return lh[pc[1:0]];
      default: return {lh[pc[1:0]][9:0], gh[4:0]};
    endcase
  endfunction

  initial begin
    logic [31:0] pcs [5] = '{32'h0000_0410, 32'h0000_0825, 32'h0000_0c3a, 32'h0000_1053, 32'h0000_1467};
    int loopcnt, ok_half, n_half, idx, ey, t, xi, ncfg;
    logic outcome, p_req, ps_req, pm_req, pg_req, last_loop, prev_loop;
    logic [14:0] xin;

    ncfg = 0;
    for (int hy = 0; hy < 2; hy++)
    for (int nn = 0; nn < 2; nn++)
    for (int md = 0; md < 3; md++) begin
      hist_mode = hist_mode_e'(md);
      nn_sel    = nn_sel_e'(nn);
      hybrid_en = hy[0];
      rst_n = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      foreach (wt[e, w]) wt[e][w] = 0;
      gh = '0;
      foreach (lh[e]) lh[e] = '0;
      loopcnt = 0; ok_half = 0; n_half = 0; last_loop = 0; prev_loop = 0;

      for (int n = 0; n < NBR; n++) begin
        int b;
        b = n % 5;
        case (b)
          0: begin outcome = (loopcnt != 3); loopcnt = (loopcnt + 1) % 4;
                   prev_loop = last_loop; last_loop = outcome; end
          1: outcome = gh[0];
          2: outcome = ((n / 5) % 2 == 1);
          3: outcome = !prev_loop;
          default: outcome = ($urandom_range(0, 9) != 0);
        endcase

        // ---- request
        @(negedge clk);
        req_valid = 1; req_pc = pcs[b];
        #1;
        check(req_ready == 1, "idle unit not ready");
        xin = slp_inputs(hist_mode, req_pc);
        idx = int'(req_pc[5:0]);
        ey  = wt[idx][0];
        for (int i = 1; i < 16; i++) ey += xin[i-1] ? wt[idx][i] : -wt[idx][i];
        check(int'(slp_y) == ey, $sformatf("cfg %0d n %0d slp y %0d expected %0d", ncfg, n, slp_y, ey));
        check(pred_slp == (ey > 0), "slp prediction");
        check(pred_taken == (hybrid_en ? (use_neural ? (nn_sel == NN_MLP ? pred_mlp : pred_slp) : pred_gshare)
                                        : (nn_sel == NN_MLP ? pred_mlp : pred_slp)),
              "final prediction source");
        if (hybrid_en) begin
          if (use_neural) n_pick_neural++; else n_pick_gshare++;
        end
        n_mode[md]++;
        p_req = pred_taken; ps_req = pred_slp; pm_req = pred_mlp; pg_req = pred_gshare;
        @(posedge clk);

        // ---- in flight: sometimes try another request (must stall)
        for (int w = 0; w < int'($urandom_range(0, 2)); w++) begin
          @(negedge clk);
          req_valid = $urandom_range(0, 1);
          req_pc = pcs[(b + 1) % 5];
          #1;
          check(req_ready == 0, "busy unit ready");
          if (req_valid) n_stall++;
          check(pred_taken == p_req && pred_slp == ps_req && pred_mlp == pm_req && pred_gshare == pg_req,
                "prediction changed while in flight");
          @(posedge clk);
        end

        // ---- resolve
        @(negedge clk);
        req_valid = 0;
        res_valid = 1; res_taken = outcome;
        #1;
        check(pred_taken == p_req && pred_slp == ps_req && pred_mlp == pm_req, "prediction at resolve");
        check(mispredict == (p_req != outcome), "mispredict flag");
        check(slp_mispredict == (ps_req != outcome), "slp mispredict flag");
        check(mlp_mispredict == (pm_req != outcome), "mlp mispredict flag");
        if (slp_mispredict) n_slp_train++;
        if (mlp_mispredict) n_mlp_train++;
        if (n >= NBR / 2) begin n_half++; if (p_req == outcome) ok_half++; end

        // reference update
        if (ps_req != outcome) begin
          t = outcome ? 1 : -1;
          for (int i = 0; i < 16; i++) begin
            xi = (i == 0) ? 1 : (xin[i-1] ? 1 : -1);
            wt[idx][i] = wt[idx][i] + t * xi;
            if (wt[idx][i] > 127) wt[idx][i] = 127;
            if (wt[idx][i] < -128) wt[idx][i] = -128;
          end
        end
        gh = {gh[13:0], outcome};
        lh[pcs[b][1:0]] = {lh[pcs[b][1:0]][13:0], outcome};
        @(posedge clk);
        #1 res_valid = 0;
      end
      $display("config hist=%0d nn=%0d hybrid=%0d: accuracy %0d / %0d", md, nn, hy, ok_half, n_half);
      // The noisy branch limits the best accuracy to about 98%.
      check(ok_half * 100 >= n_half * 85, $sformatf("config %0d accuracy too low", ncfg));
      ncfg++;
    end

    $display("stalls=%0d slp_trainings=%0d mlp_trainings=%0d chooser_gshare=%0d chooser_neural=%0d modes=%0d/%0d/%0d",
             n_stall, n_slp_train, n_mlp_train, n_pick_gshare, n_pick_neural, n_mode[0], n_mode[1], n_mode[2]);
    check(n_stall > 0, "no stall happened");
    check(n_slp_train > 0, "no SLP training happened");
    check(n_mlp_train > 0, "no MLP training happened");
    check(n_pick_gshare > 0, "chooser never picked Gshare");
    check(n_pick_neural > 0, "chooser never picked the neural net");
    check(n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0, "a history mode never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
