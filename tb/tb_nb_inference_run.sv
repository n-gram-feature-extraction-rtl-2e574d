// tb_nb_inference_run -- one instance of nb_inference with its own stimulus
// and checker, used by tb_nb_inference for each size it tests.
module tb_nb_inference_run #(
  parameter int unsigned NF   = 248,
  parameter int unsigned N_PU = 62,
  parameter int unsigned SEED = 1
) (
  input  logic clk,
  input  int   cycle,
  output bit   done
);
  localparam int unsigned COUNT_W = nb_pkg::DEF_COUNT_W;
  localparam int unsigned LL_W    = nb_pkg::DEF_LL_W;
  localparam int unsigned ACC_W   = nb_pkg::DEF_ACC_W;
  localparam int unsigned NG      = (NF + N_PU - 1) / N_PU;
  localparam int unsigned NVEC    = 40;

  logic rst_n = 0;
  logic feat_valid = 0, feat_ready;
  logic [COUNT_W-1:0] feat_count [NF];
  logic ll_we = 0, ll_class = 0, prior_we = 0, prior_class = 0;
  logic [$clog2(NF)-1:0] ll_feat = '0;
  logic signed [LL_W-1:0] ll_wdata = '0, prior_wdata = '0;
  logic res_valid, res_malware;
  logic signed [ACC_W-1:0] res_score [2];

  nb_inference #(.NUM_FEATURES(NF), .N_PU(N_PU)) dut (.*);

  int checks = 0, failures = 0, n_malware = 0, n_benign = 0, n_b2b = 0;
  logic signed [LL_W-1:0] model [2][NF];
  logic signed [LL_W-1:0] prior [2];
  longint exp_score [$][2];
  int     exp_cycle [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL(%0d features): %s", NF, what); end
  endtask

  // Result checker.
  always @(negedge clk) begin
    if (rst_n && res_valid) begin
      if (exp_cycle.size() == 0) check(0, "unexpected result");
      else begin
        check(cycle == exp_cycle[0], $sformatf("result in cycle %0d expected %0d", cycle, exp_cycle[0]));
        check(longint'(res_score[0]) == exp_score[0][0] && longint'(res_score[1]) == exp_score[0][1],
              $sformatf("scores %0d,%0d expected %0d,%0d", res_score[0], res_score[1],
                        exp_score[0][0], exp_score[0][1]));
        check(res_malware == (exp_score[0][1] > exp_score[0][0]), "decision");
        if (res_malware) n_malware++; else n_benign++;
        exp_cycle.delete(0);
        exp_score.delete(0);
      end
    end
  end

  initial begin
    longint s [2];
    int seed;
    seed = $urandom(SEED);
    for (int f = 0; f < NF; f++) feat_count[f] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // Model: log2 likelihoods in [-16, 0) with 10 fraction bits; class 1
    // favours the odd features so that both decisions occur.
    for (int c = 0; c < 2; c++)
      for (int f = 0; f < NF; f++) begin
        model[c][f] = -LL_W'($urandom_range(1, 16 << 10));
        if ((f & 1) == c) model[c][f] = model[c][f] / 4;
        ll_we <= 1; ll_class <= c[0]; ll_feat <= f[$clog2(NF)-1:0]; ll_wdata <= model[c][f];
        @(posedge clk);
      end
    ll_we <= 0;
    prior[0] = -LL_W'(300); prior[1] = -LL_W'(3000);
    for (int c = 0; c < 2; c++) begin
      prior_we <= 1; prior_class <= c[0]; prior_wdata <= prior[c];
      @(posedge clk);
    end
    prior_we <= 0;
    @(posedge clk);

    for (int v = 0; v < NVEC; v++) begin
      automatic bit gap = (v < 3) || ($urandom_range(0, 1) == 0);
      automatic bit odd = $urandom_range(0, 1);
      @(negedge clk);
      if (gap) begin
        feat_valid = 0;
        repeat ($urandom_range(1, 8)) @(negedge clk);
      end else n_b2b += (v > 0);
      s[0] = prior[0]; s[1] = prior[1];
      for (int f = 0; f < NF; f++) begin
        feat_count[f] = (v == 0) ? '1 : (((f & 1) == odd) ? COUNT_W'($urandom_range(0, 9)) : COUNT_W'($urandom_range(0, 2)));
        s[0] += longint'(feat_count[f]) * model[0][f];
        s[1] += longint'(feat_count[f]) * model[1][f];
      end
      exp_score.push_back(s);
      exp_cycle.push_back(cycle + NG + 5);
      feat_valid = 1;
      for (int g = 0; g < NG; g++) begin
        #1;
        check(feat_ready == (g == NG - 1), $sformatf("feat_ready in issue cycle %0d", g));
        if (g < NG - 1) @(negedge clk);
      end
    end
    @(negedge clk);
    feat_valid = 0;
    repeat (NG + 10) @(posedge clk);
    check(exp_cycle.size() == 0, "all results delivered");
    done = 1;
  end
endmodule
