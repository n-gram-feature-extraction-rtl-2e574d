// nb_pu -- one Naive Bayes processing unit.
//
// Computes, for one feature, the log-domain term of both class scores:
// prod[c] = count * log2 P(feature | c), with count unsigned and the
// likelihood signed fixed point, so the product has the likelihood's scaling.
// The products are registered when en is high (pipeline stage 2, one cycle
// latency). N_PU copies run side by side on one group of features, the same
// operation on different data.
//
// Parallel processing units in the inference module follow the source design;
// what one unit computes (a multinomial count-times-log-likelihood term) is
// this design's reading of it.
module nb_pu #(
  parameter int unsigned COUNT_W = nb_pkg::DEF_COUNT_W,
  parameter int unsigned LL_W    = nb_pkg::DEF_LL_W,
  localparam int unsigned PROD_W = COUNT_W + LL_W
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [COUNT_W-1:0]       count,
  input  logic signed [LL_W-1:0]   ll   [nb_pkg::NUM_CLASSES],
  output logic signed [PROD_W-1:0] prod [nb_pkg::NUM_CLASSES]
);

  always_ff @(posedge clk) begin
    if (en) begin
      for (int c = 0; c < nb_pkg::NUM_CLASSES; c++)
        prod[c] <= $signed({1'b0, count}) * ll[c];
    end
  end

endmodule
