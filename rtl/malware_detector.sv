// malware_detector -- packet-payload malware detector: n-gram feature
// extraction followed by a Naive Bayes classifier.
//
// Payload bytes stream into the n-gram extractor, which counts how often each
// n-gram of its vocabulary occurs in the payload. At the end of the payload
// the count vector goes to the six-stage inference pipeline, which computes
// the log2 posterior score of the benign and the malware class with N_PU
// parallel processing units and reports the larger one.
//
// Interface: a host loads the vocabulary (pat_*) and the fixed-point log2
// model (ll_*, prior_*) before traffic starts. Payload bytes use a
// valid/ready stream with in_last on the final byte of each payload. The
// extractor stalls the stream while its vector is being read by the
// classifier (NUM_GROUPS cycles); it takes bytes again in the cycle after the
// last group is issued. Timing: if the last byte of a payload is accepted in
// cycle L, res_valid pulses in cycle L + NUM_GROUPS + 6 with res_malware and
// both class scores. A payload of B bytes therefore occupies the input for
// B + NUM_GROUPS cycles.
//
// Extractor-plus-classifier structure, the 62 processing units and the
// six-stage pipeline follow the source design; n-gram length, vocabulary
// size, widths and handshakes are this design's own choices.
module malware_detector #(
  parameter int unsigned NGRAM_LEN    = nb_pkg::DEF_NGRAM_LEN,
  parameter int unsigned NUM_FEATURES = nb_pkg::DEF_NUM_FEATURES,
  parameter int unsigned N_PU         = nb_pkg::DEF_N_PU,
  parameter int unsigned COUNT_W      = nb_pkg::DEF_COUNT_W,
  parameter int unsigned LL_W         = nb_pkg::DEF_LL_W,
  parameter int unsigned ACC_W        = nb_pkg::DEF_ACC_W,
  localparam int unsigned GRAM_W      = 8 * NGRAM_LEN,
  localparam int unsigned FA_W        = (NUM_FEATURES > 1) ? $clog2(NUM_FEATURES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // vocabulary load
  input  logic                    pat_we,
  input  logic [FA_W-1:0]         pat_addr,
  input  logic [GRAM_W-1:0]       pat_data,
  // model load
  input  logic                    ll_we,
  input  logic                    ll_class,
  input  logic [FA_W-1:0]         ll_feat,
  input  logic signed [LL_W-1:0]  ll_wdata,
  input  logic                    prior_we,
  input  logic                    prior_class,
  input  logic signed [LL_W-1:0]  prior_wdata,
  // payload stream
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [7:0]              in_data,
  input  logic                    in_last,
  // result
  output logic                    res_valid,
  output logic                    res_malware,
  output logic signed [ACC_W-1:0] res_score [nb_pkg::NUM_CLASSES]
);

  logic               feat_valid, feat_ready;
  logic [COUNT_W-1:0] feat_count [NUM_FEATURES];

  ngram_extractor #(
    .NGRAM_LEN(NGRAM_LEN), .NUM_FEATURES(NUM_FEATURES), .COUNT_W(COUNT_W)
  ) u_extract (
    .clk, .rst_n,
    .pat_we, .pat_addr, .pat_data,
    .in_valid, .in_ready, .in_data, .in_last,
    .feat_valid, .feat_ready, .feat_count
  );

  nb_inference #(
    .NUM_FEATURES(NUM_FEATURES), .N_PU(N_PU), .COUNT_W(COUNT_W),
    .LL_W(LL_W), .ACC_W(ACC_W)
  ) u_infer (
    .clk, .rst_n,
    .feat_valid, .feat_ready, .feat_count,
    .ll_we, .ll_class, .ll_feat, .ll_wdata,
    .prior_we, .prior_class, .prior_wdata,
    .res_valid, .res_malware, .res_score
  );

endmodule
