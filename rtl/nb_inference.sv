// nb_inference -- six-stage pipelined Naive Bayes inference module.
//
// Scores a feature-count vector x for both classes in the log2 domain,
//   score[c] = log2 P(c) + sum_i x[i] * log2 P(feature i | c),
// and calls the payload malware when score[1] > score[0] (ties are benign).
// The vector is walked in NUM_GROUPS = ceil(NUM_FEATURES/N_PU) groups of N_PU
// features, one group issued per cycle, through six stages:
//   1 read     model memory group read, feature-count slice registered
//   2 multiply N_PU processing units form count * log2 likelihood
//   3 add lo   lower half of the adder tree (one tree per class)
//   4 add hi   upper half of the adder tree
//   5 acc      class accumulators; the first group starts from the prior
//   6 compare  result registered and res_valid pulsed
// Lanes of the last group beyond NUM_FEATURES get a count of zero.
//
// Interface: while feat_valid is high the module issues one group per cycle
// from feat_count, which must stay stable; feat_ready pulses in the cycle the
// last group is issued. Vectors may follow each other with no gap. res_valid
// is a one-cycle pulse PIPE_STAGES (6) cycles after the last group is issued,
// so a vector presented in cycle T yields its result in cycle
// T + NUM_GROUPS + 5. There is no back-pressure on the result.
// The model is loaded through the ll_* and prior_* ports of nb_model_mem,
// only while no vector is in flight.
//
// The parallel processing units, the default of 62 of them, the six-stage
// pipeline and the log2 fixed-point arithmetic follow the source design;
// the split of the work into these six stages, the widths and the handshakes
// are this design's own choices.
module nb_inference #(
  parameter int unsigned NUM_FEATURES = nb_pkg::DEF_NUM_FEATURES,
  parameter int unsigned N_PU         = nb_pkg::DEF_N_PU,
  parameter int unsigned COUNT_W      = nb_pkg::DEF_COUNT_W,
  parameter int unsigned LL_W         = nb_pkg::DEF_LL_W,
  parameter int unsigned ACC_W        = nb_pkg::DEF_ACC_W,
  localparam int unsigned NUM_GROUPS  = (NUM_FEATURES + N_PU - 1) / N_PU,
  localparam int unsigned FA_W        = (NUM_FEATURES > 1) ? $clog2(NUM_FEATURES) : 1,
  localparam int unsigned GA_W        = (NUM_GROUPS > 1) ? $clog2(NUM_GROUPS) : 1,
  localparam int unsigned PROD_W      = COUNT_W + LL_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // feature vector
  input  logic                    feat_valid,
  output logic                    feat_ready,
  input  logic [COUNT_W-1:0]      feat_count [NUM_FEATURES],
  // model load
  input  logic                    ll_we,
  input  logic                    ll_class,
  input  logic [FA_W-1:0]         ll_feat,
  input  logic signed [LL_W-1:0]  ll_wdata,
  input  logic                    prior_we,
  input  logic                    prior_class,
  input  logic signed [LL_W-1:0]  prior_wdata,
  // result
  output logic                    res_valid,
  output logic                    res_malware,
  output logic signed [ACC_W-1:0] res_score [nb_pkg::NUM_CLASSES]
);

  localparam int unsigned NC = nb_pkg::NUM_CLASSES;

  // ---------------------------------------------------------------- issue
  logic [GA_W-1:0] grp;
  logic            issue, issue_last;

  assign issue      = feat_valid;
  assign issue_last = feat_valid && (32'(grp) == NUM_GROUPS - 1);
  assign feat_ready = issue_last;

  always_ff @(posedge clk) begin
    if (!rst_n)          grp <= '0;
    else if (issue_last) grp <= '0;
    else if (issue)      grp <= grp + 1'b1;
  end

  // --------------------------------------------------------- stage 1: read
  logic signed [LL_W-1:0] ll_s1 [NC][N_PU];
  logic signed [LL_W-1:0] log_prior [NC];
  logic [COUNT_W-1:0]     cnt_s1 [N_PU];
  logic                   v_s1;

  nb_model_mem #(.NUM_FEATURES(NUM_FEATURES), .N_PU(N_PU), .LL_W(LL_W)) u_mem (
    .clk, .rst_n,
    .ll_we, .ll_class, .ll_feat, .ll_wdata,
    .prior_we, .prior_class, .prior_wdata,
    .rd_en(issue), .rd_group(grp), .rd_ll(ll_s1), .log_prior
  );

  always_ff @(posedge clk) begin
    if (issue) begin
      for (int p = 0; p < N_PU; p++) begin
        automatic int unsigned idx = 32'(grp) * N_PU + p;
        cnt_s1[p] <= (idx < NUM_FEATURES) ? feat_count[idx] : '0;
      end
    end
  end

  // Valid and last-group flags of stages 1 to 5, first-group flag to stage 4.
  logic [5:1] v, last;
  logic [4:1] first;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v <= '0; first <= '0; last <= '0;
    end else begin
      v     <= {v[4:1], issue};
      first <= {first[3:1], issue && grp == '0};
      last  <= {last[4:1], issue_last};
    end
  end
  assign v_s1 = v[1];

  // ----------------------------------------------------- stage 2: multiply
  logic signed [PROD_W-1:0] prod [N_PU][NC];
  logic signed [PROD_W-1:0] prod_c [NC][N_PU];

  for (genvar p = 0; p < N_PU; p++) begin : g_pu
    logic signed [LL_W-1:0] ll_pair [NC];
    for (genvar c = 0; c < NC; c++) begin : g_c
      assign ll_pair[c]   = ll_s1[c][p];
      assign prod_c[c][p] = prod[p][c];
    end
    nb_pu #(.COUNT_W(COUNT_W), .LL_W(LL_W)) u_pu (
      .clk, .en(v_s1), .count(cnt_s1[p]), .ll(ll_pair), .prod(prod[p])
    );
  end

  // ------------------------------------------------ stages 3, 4: add tree
  logic signed [ACC_W-1:0] grp_sum [NC];

  for (genvar c = 0; c < NC; c++) begin : g_tree
    nb_adder_tree #(.N_IN(N_PU), .IN_W(PROD_W), .OUT_W(ACC_W)) u_tree (
      .clk, .en(1'b1), .din(prod_c[c]), .sum(grp_sum[c])
    );
  end

  // ----------------------------------------------------- stage 5: accumulate
  logic signed [ACC_W-1:0] acc [NC];
  always_ff @(posedge clk) begin
    if (v[4]) begin
      for (int c = 0; c < NC; c++)
        acc[c] <= (first[4] ? ACC_W'(log_prior[c]) : acc[c]) + grp_sum[c];
    end
  end

  // ------------------------------------------------------ stage 6: compare
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid   <= 1'b0;
      res_malware <= 1'b0;
      for (int c = 0; c < NC; c++) res_score[c] <= '0;
    end else begin
      res_valid <= v[5] && last[5];
      if (v[5] && last[5]) begin
        res_malware <= acc[nb_pkg::CLASS_MALWARE] > acc[nb_pkg::CLASS_BENIGN];
        for (int c = 0; c < NC; c++) res_score[c] <= acc[c];
      end
    end
  end

  // A new vector must not be presented mid-way: feat_valid, once high, stays
  // high until the last group has been issued.
  a_vector_whole: assert property (@(posedge clk) disable iff (!rst_n)
    feat_valid && !feat_ready |=> feat_valid);

endmodule
