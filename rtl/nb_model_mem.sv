// nb_model_mem -- storage of the trained Naive Bayes model.
//
// The model is a set of base-2 logarithms in signed fixed point (LL_W bits):
// log2 P(feature i | class c) for every feature and both classes, and the
// class priors log2 P(c). The likelihoods are split into N_PU banks so that
// the N_PU processing units get their operands in one read: feature i lives
// in bank i mod N_PU at row i div N_PU, and a read of group g returns
// features g*N_PU .. g*N_PU+N_PU-1 for both classes. The read data is
// registered (one cycle after rd_en), like a block RAM output register; this
// is the first stage of the inference pipeline. Rows past the last feature
// are never written and read as whatever they hold; the inference module
// gives those lanes a count of zero.
//
// Writes come from the host one word at a time and should only be made while
// no classification is running. The priors live in registers cleared by reset.
//
// Log-domain, fixed-point model parameters follow the source design; the word
// format, banking and one-cycle read are this design's own choices.
module nb_model_mem #(
  parameter int unsigned NUM_FEATURES = nb_pkg::DEF_NUM_FEATURES,
  parameter int unsigned N_PU         = nb_pkg::DEF_N_PU,
  parameter int unsigned LL_W         = nb_pkg::DEF_LL_W,
  localparam int unsigned NUM_GROUPS  = (NUM_FEATURES + N_PU - 1) / N_PU,
  localparam int unsigned FA_W        = (NUM_FEATURES > 1) ? $clog2(NUM_FEATURES) : 1,
  localparam int unsigned GA_W        = (NUM_GROUPS > 1) ? $clog2(NUM_GROUPS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // likelihood load
  input  logic                   ll_we,
  input  logic                   ll_class,
  input  logic [FA_W-1:0]        ll_feat,
  input  logic signed [LL_W-1:0] ll_wdata,
  // prior load
  input  logic                   prior_we,
  input  logic                   prior_class,
  input  logic signed [LL_W-1:0] prior_wdata,
  // group read
  input  logic                   rd_en,
  input  logic [GA_W-1:0]        rd_group,
  output logic signed [LL_W-1:0] rd_ll [nb_pkg::NUM_CLASSES][N_PU],
  output logic signed [LL_W-1:0] log_prior [nb_pkg::NUM_CLASSES]
);

  logic signed [LL_W-1:0] bank [nb_pkg::NUM_CLASSES][N_PU][NUM_GROUPS];

  int unsigned wr_bank, wr_row;
  always_comb begin
    wr_bank = 32'(ll_feat) % N_PU;
    wr_row  = 32'(ll_feat) / N_PU;
  end

  always_ff @(posedge clk) begin
    if (ll_we && 32'(ll_feat) < NUM_FEATURES)
      bank[ll_class][wr_bank][wr_row] <= ll_wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en && 32'(rd_group) < NUM_GROUPS) begin
      for (int c = 0; c < nb_pkg::NUM_CLASSES; c++)
        for (int p = 0; p < N_PU; p++)
          rd_ll[c][p] <= bank[c][p][rd_group];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < nb_pkg::NUM_CLASSES; c++) log_prior[c] <= '0;
    end else if (prior_we) begin
      log_prior[prior_class] <= prior_wdata;
    end
  end

endmodule
