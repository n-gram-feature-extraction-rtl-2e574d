// tb_nb_inference -- self-checking test of the six-stage inference module.
//
// Runs at the default size (248 features, 62 processing units, 4 groups).
// Loads a random fixed-point log2 model, then presents random count vectors,
// some back to back and some with idle gaps, and checks for every vector:
// the two class scores against prior + sum(count * likelihood) computed here,
// the malware/benign decision, feat_ready in the last issue cycle, and that
// res_valid comes exactly NUM_GROUPS + 5 cycles after the vector was first
// presented. A second instance with 100 features and 31 units checks a
// partly filled last group (its spare lanes must count as zero).
module tb_nb_inference;
  localparam int unsigned COUNT_W = nb_pkg::DEF_COUNT_W;
  localparam int unsigned LL_W    = nb_pkg::DEF_LL_W;
  localparam int unsigned ACC_W   = nb_pkg::DEF_ACC_W;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit done_a = 0, done_b = 0;
  tb_nb_inference_run #(.NF(248), .N_PU(62), .SEED(1)) run_a (.clk, .cycle, .done(done_a));
  tb_nb_inference_run #(.NF(100), .N_PU(31), .SEED(7)) run_b (.clk, .cycle, .done(done_b));

  initial begin
    wait (done_a && done_b);
    checks   = run_a.checks + run_b.checks;
    failures += run_a.failures + run_b.failures;
    if (run_a.n_malware == 0 || run_a.n_benign == 0) begin
      failures++; $display("FAIL: both decisions were not exercised");
    end
    if (run_a.n_b2b == 0) begin
      failures++; $display("FAIL: no back-to-back vectors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
