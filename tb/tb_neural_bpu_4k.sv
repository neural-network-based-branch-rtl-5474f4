// tb_neural_bpu_4k: the end-to-end test of tb_neural_bpu, run on the 4K-bit
// configurations: 7 history bits for both networks (SLP table 64 x 8 x 8 bits,
// MLP 15 inputs, 7 hidden neurons, (16x7+8) x 32 bits) and a GP split of
// 3 global + 4 per-address bits. The reference model of the SLP path follows
// these sizes. With only 7 history bits the loop branch of the synthetic
// program cannot be fully learned from global history, so the accuracy floor
// is lower than in the 8K-bit test.
module tb_neural_bpu_4k;
  import nbp_pkg::*;
  localparam int NBR = 1500;   // branches per configuration
  localparam int SK  = 7;      // SLP history inputs
  localparam int SG  = 3;      // global bits in GP mode (both networks)
  localparam int MK  = 7;      // MLP history inputs
  localparam int SY  = 8 + $clog2(SK + 1) + 1;

  logic clk = 0, rst_n = 0;
  hist_mode_e hist_mode = HIST_G;
  nn_sel_e nn_sel = NN_SLP;
  logic hybrid_en = 0, req_valid = 0, res_valid = 0, res_taken = 0;
  logic [31:0] req_pc = '0;
  logic req_ready, pred_taken, pred_gshare, pred_slp, pred_mlp, use_neural;
  logic mispredict, slp_mispredict, mlp_mispredict;
  logic signed [SY-1:0] slp_y;
  q16_t mlp_o;

  neural_bpu #(.SLP_K(SK), .SLP_GP_G(SG), .MLP_K(MK), .MLP_GP_G(SG)) dut (.*);

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
  int          wt [64][SK+1];
  logic [14:0] gh;
  logic [14:0] lh [4];

  function automatic logic [SK-1:0] slp_inputs(input hist_mode_e m, input logic [31:0] pc);
    case (m)
      HIST_G:  return gh[SK-1:0];
      HIST_P:  return lh[pc[1:0]][SK-1:0];
      default: return {lh[pc[1:0]][SK-SG-1:0], gh[SG-1:0]};
    endcase
  endfunction

  initial begin
    logic [31:0] pcs [5] = '{32'h0000_0410, 32'h0000_0825, 32'h0000_0c3a, 32'h0000_1053, 32'h0000_1467};
    int loopcnt, ok_half, n_half, idx, ey, t, xi, ncfg;
    logic outcome, p_req, ps_req, pm_req, pg_req, last_loop, prev_loop;
    logic [SK-1:0] xin;

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
        for (int i = 1; i <= SK; i++) ey += xin[i-1] ? wt[idx][i] : -wt[idx][i];
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
          for (int i = 0; i <= SK; i++) begin
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
      // The noisy branch limits the best accuracy to about 98%; the short
      // history costs more.
      check(ok_half * 100 >= n_half * 70, $sformatf("config %0d accuracy too low", ncfg));
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
