// nb_adder_tree -- two-stage pipelined signed adder tree.
//
// Adds N_IN signed inputs in a balanced binary tree of LEVELS = clog2(N_IN)
// levels; leaves beyond N_IN are zero. The tree is cut once in the middle:
// the lower ceil(LEVELS/2) levels end in a register (pipeline stage 3), the
// upper levels end in the output register (stage 4). With en high every
// cycle, sum follows din by two cycles. All partial sums are OUT_W bits wide,
// which must hold N_IN * 2**(IN_W-1).
//
// The split into two pipeline stages is this design's choice, made so that the
// inference pipeline has six stages in all.
module nb_adder_tree #(
  parameter int unsigned N_IN  = nb_pkg::DEF_N_PU,
  parameter int unsigned IN_W  = nb_pkg::DEF_COUNT_W + nb_pkg::DEF_LL_W,
  parameter int unsigned OUT_W = nb_pkg::DEF_ACC_W
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  din [N_IN],
  output logic signed [OUT_W-1:0] sum
);

  localparam int unsigned LEVELS = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int unsigned LEAVES = 1 << LEVELS;
  localparam int unsigned SPLIT  = (LEVELS + 1) / 2;     // levels before the cut
  localparam int unsigned MID_N  = LEAVES >> SPLIT;      // values at the cut

  logic signed [OUT_W-1:0] lo  [SPLIT+1][LEAVES];
  logic signed [OUT_W-1:0] mid [MID_N];
  logic signed [OUT_W-1:0] hi  [LEVELS-SPLIT+1][MID_N];

  // Lower levels: leaves to the cut.
  always_comb begin
    for (int l = 0; l <= SPLIT; l++)
      for (int i = 0; i < LEAVES; i++) lo[l][i] = '0;
    for (int i = 0; i < N_IN; i++) lo[0][i] = OUT_W'(din[i]);
    for (int l = 1; l <= SPLIT; l++)
      for (int i = 0; i < (LEAVES >> l); i++)
        lo[l][i] = lo[l-1][2*i] + lo[l-1][2*i+1];
  end

  always_ff @(posedge clk) begin
    if (en)
      for (int i = 0; i < MID_N; i++) mid[i] <= lo[SPLIT][i];
  end

  // Upper levels: cut to root.
  always_comb begin
    for (int l = 0; l <= LEVELS - SPLIT; l++)
      for (int i = 0; i < MID_N; i++) hi[l][i] = '0;
    for (int i = 0; i < MID_N; i++) hi[0][i] = mid[i];
    for (int l = 1; l <= LEVELS - SPLIT; l++)
      for (int i = 0; i < (MID_N >> l); i++)
        hi[l][i] = hi[l-1][2*i] + hi[l-1][2*i+1];
  end

  always_ff @(posedge clk) begin
    if (en) sum <= hi[LEVELS-SPLIT][0];
  end

endmodule
