// ngram_extractor -- byte n-gram feature extractor for one packet payload.
//
// Payload bytes arrive one per cycle on a valid/ready stream with a last flag.
// A shift register keeps the previous NGRAM_LEN-1 bytes; together with the new
// byte it forms the current n-gram (earliest byte in the most significant
// bits). That n-gram is compared against every vocabulary entry at once and
// the count of each matching entry goes up by one, saturating at
// 2**COUNT_W-1. N-grams do not span payloads: the window is emptied at the
// start of every payload, so a payload of L bytes yields L-NGRAM_LEN+1
// n-grams.
//
// When the last byte has been counted, feat_valid rises and the counts stay
// still on feat_count; in_ready is low meanwhile. The classifier takes the
// vector with feat_ready (a one-cycle acknowledge, sampled while feat_valid is
// high); the counts then clear and in_ready rises on the next cycle.
//
// The vocabulary is loaded by the host through pat_we/pat_addr/pat_data. A
// slot that was never written since reset never matches. Load it only while
// no payload is in flight.
//
// Using an n-gram extractor on the payload in front of the classifier follows
// the source design; the n-gram length, the vocabulary size, count features
// and the stall-on-full hand-off are this design's own choices.
module ngram_extractor #(
  parameter int unsigned NGRAM_LEN    = nb_pkg::DEF_NGRAM_LEN,   // 2 or more
  parameter int unsigned NUM_FEATURES = nb_pkg::DEF_NUM_FEATURES,
  parameter int unsigned COUNT_W      = nb_pkg::DEF_COUNT_W,
  localparam int unsigned GRAM_W      = 8 * NGRAM_LEN,
  localparam int unsigned FA_W        = (NUM_FEATURES > 1) ? $clog2(NUM_FEATURES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // vocabulary load
  input  logic                pat_we,
  input  logic [FA_W-1:0]     pat_addr,
  input  logic [GRAM_W-1:0]   pat_data,
  // payload byte stream
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [7:0]          in_data,
  input  logic                in_last,
  // feature vector
  output logic                feat_valid,
  input  logic                feat_ready,
  output logic [COUNT_W-1:0]  feat_count [NUM_FEATURES]
);

  localparam int unsigned FILL_W = $clog2(NGRAM_LEN + 1);
  localparam logic [COUNT_W-1:0] CNT_MAX = '1;

  logic [GRAM_W-1:0]  pattern   [NUM_FEATURES];
  logic               pat_valid [NUM_FEATURES];
  logic [GRAM_W-9:0]  window;          // previous NGRAM_LEN-1 bytes
  logic [FILL_W-1:0]  fill;            // bytes of this payload seen, saturating
  logic               hold;            // vector complete, waiting for feat_ready

  logic               take;
  logic [GRAM_W-1:0]  gram;
  logic               gram_ok;

  assign in_ready   = !hold;
  assign feat_valid = hold;
  assign take       = in_valid && in_ready;

  // Current n-gram: previous NGRAM_LEN-1 bytes followed by the new byte.
  assign gram    = {window, in_data};
  assign gram_ok = (32'(fill) >= NGRAM_LEN - 1);

  // Vocabulary registers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_FEATURES; i++) pat_valid[i] <= 1'b0;
    end else if (pat_we && 32'(pat_addr) < NUM_FEATURES) begin
      pattern[pat_addr]   <= pat_data;
      pat_valid[pat_addr] <= 1'b1;
    end
  end

  // Window, fill level and hand-off state.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      window <= '0;
      fill   <= '0;
      hold   <= 1'b0;
    end else if (hold) begin
      if (feat_ready) hold <= 1'b0;
    end else if (take) begin
      window <= gram[GRAM_W-9:0];
      if (in_last) begin
        fill <= '0;
        hold <= 1'b1;
      end else if (32'(fill) < NGRAM_LEN) begin
        fill <= fill + 1'b1;
      end
    end
  end

  // One saturating counter per vocabulary entry.
  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_FEATURES; i++) begin
      if (!rst_n || (hold && feat_ready)) begin
        feat_count[i] <= '0;
      end else if (take && gram_ok && pat_valid[i] && pattern[i] == gram
                   && feat_count[i] != CNT_MAX) begin
        feat_count[i] <= feat_count[i] + 1'b1;
      end
    end
  end

  // The vector must stay on the outputs until it is acknowledged.
  a_hold_until_ack: assert property (@(posedge clk) disable iff (!rst_n)
    feat_valid && !feat_ready |=> feat_valid);

endmodule
