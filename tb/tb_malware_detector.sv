// tb_malware_detector -- end-to-end test of the malware detector at its
// default size (2-gram vocabulary of 248 entries, 62 processing units).
//
// The vocabulary is 248 distinct byte 2-grams. A synthetic model in log2
// fixed point makes the first half of the vocabulary more likely under the
// benign class and the second half under the malware class. Payloads are
// generated here: "benign-like" ones draw mostly from the bytes of the first
// half, "malware-like" ones from the second, plus random noise bytes. For
// every payload the testbench computes the n-gram counts (with saturation),
// both class scores and the decision itself and compares them with the
// result, and checks that the result arrives NUM_GROUPS + 6 cycles after the
// last byte was accepted.
//
// Mechanisms counted, each of which must occur at least once:
//   stall       the byte stream offered while in_ready is low
//   saturate    an n-gram count reaching its maximum (a 300-byte run)
//   overlap     a payload's bytes accepted before the previous result
//   malware     a payload classified as malware
//   benign      a payload classified as benign
//   multigroup  a vector taking more than one issue cycle (NUM_GROUPS > 1)
module tb_malware_detector;
  localparam int unsigned NF      = nb_pkg::DEF_NUM_FEATURES;
  localparam int unsigned N_PU    = nb_pkg::DEF_N_PU;
  localparam int unsigned COUNT_W = nb_pkg::DEF_COUNT_W;
  localparam int unsigned LL_W    = nb_pkg::DEF_LL_W;
  localparam int unsigned ACC_W   = nb_pkg::DEF_ACC_W;
  localparam int unsigned NG      = (NF + N_PU - 1) / N_PU;
  localparam int unsigned CMAX    = (1 << COUNT_W) - 1;
  localparam int unsigned NPAY    = 60;

  logic clk = 0, rst_n = 0;
  logic pat_we = 0;
  logic [$clog2(NF)-1:0] pat_addr = '0, ll_feat = '0;
  logic [15:0] pat_data = '0;
  logic ll_we = 0, ll_class = 0, prior_we = 0, prior_class = 0;
  logic signed [LL_W-1:0] ll_wdata = '0, prior_wdata = '0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [7:0] in_data = '0;
  logic res_valid, res_malware;
  logic signed [ACC_W-1:0] res_score [2];

  malware_detector dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  int n_stall = 0, n_saturate = 0, n_overlap = 0, n_malware = 0, n_benign = 0;
  logic [15:0] vocab [NF];
  logic signed [LL_W-1:0] model [2][NF];
  logic signed [LL_W-1:0] prior [2];
  longint exp_score [$][2];
  int     exp_cycle [$];
  int     pending = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result checker, sampled mid-cycle.
  always @(negedge clk) begin
    if (rst_n && in_valid && !in_ready) n_stall++;
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
        pending--;
      end
    end
  end

  // Reference: count 2-grams with saturation, score both classes.
  task automatic expect_payload(const ref byte unsigned pay [$], input int last_cycle);
    longint s [2];
    int unsigned cnt;
    s[0] = prior[0]; s[1] = prior[1];
    for (int f = 0; f < NF; f++) begin
      cnt = 0;
      for (int i = 0; i + 1 < pay.size(); i++)
        if ({pay[i], pay[i+1]} == vocab[f]) cnt++;
      if (cnt >= CMAX) begin cnt = CMAX; n_saturate++; end
      s[0] += longint'(cnt) * model[0][f];
      s[1] += longint'(cnt) * model[1][f];
    end
    exp_score.push_back(s);
    exp_cycle.push_back(last_cycle + NG + 6);
  endtask

  task automatic send(const ref byte unsigned pay [$]);
    for (int i = 0; i < pay.size(); i++) begin
      in_valid = 1; in_data = pay[i]; in_last = (i == pay.size() - 1);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      if (i == 0 && pending > 0) n_overlap++;
      if (in_last) begin
        expect_payload(pay, cycle);
        pending++;
      end
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 0; in_last = 0;
        @(negedge clk);
      end
    end
    in_valid = 0; in_last = 0;
  endtask

  initial begin
    byte unsigned pay [$];
    // Vocabulary: 2-grams {a,b} with a from 16 "lead" bytes and b from 16
    // "tail" bytes; feature f = 16*a_idx + b_idx, first 248 of the 256.
    for (int f = 0; f < NF; f++) vocab[f] = {8'(8'h20 + f / 16), 8'(8'h60 + f % 16)};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      pat_we = 1; pat_addr = f[$clog2(NF)-1:0]; pat_data = vocab[f];
      @(negedge clk);
    end
    pat_we = 0;
    for (int c = 0; c < 2; c++)
      for (int f = 0; f < NF; f++) begin
        // log2 likelihood in Q5.10: favoured half around -4, other around -9.
        automatic bit fav = ((f < NF / 2) == (c == 0));
        model[c][f] = -LL_W'((fav ? 4096 : 9216) + $urandom_range(0, 2047));
        ll_we = 1; ll_class = c[0]; ll_feat = f[$clog2(NF)-1:0]; ll_wdata = model[c][f];
        @(negedge clk);
      end
    ll_we = 0;
    prior[0] = -LL_W'(154); prior[1] = -LL_W'(3400);   // about log2(0.9), log2(0.1)
    for (int c = 0; c < 2; c++) begin
      prior_we = 1; prior_class = c[0]; prior_wdata = prior[c];
      @(negedge clk);
    end
    prior_we = 0;

    for (int p = 0; p < NPAY; p++) begin
      automatic bit mal = $urandom_range(0, 1);
      automatic int len = $urandom_range(2, 120);
      pay.delete();
      if (p == 5) begin
        repeat (300) pay.push_back(8'h20);        // lead byte
        pay[299] = 8'h60;
        for (int i = 0; i < 300; i += 2) pay[i+1] = 8'h60;  // "20 60" 150 times
        for (int i = 0; i < 300; i++) pay.push_back(i[0] ? 8'h60 : 8'h20);
      end else begin
        for (int i = 0; i < len; i++) begin
          if ($urandom_range(0, 9) == 0) pay.push_back(8'($urandom));
          else if (i[0] == 0)
            pay.push_back(8'(8'h20 + (mal ? $urandom_range(8, 15) : $urandom_range(0, 6))));
          else pay.push_back(8'(8'h60 + $urandom_range(0, 15)));
        end
      end
      send(pay);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 20)) @(negedge clk);
    end
    repeat (NG + 20) @(negedge clk);
    check(exp_cycle.size() == 0, "every payload produced a result");

    $display("mechanisms: stall=%0d saturate=%0d overlap=%0d malware=%0d benign=%0d groups=%0d",
             n_stall, n_saturate, n_overlap, n_malware, n_benign, NG);
    check(n_stall > 0, "stall exercised");
    check(n_saturate > 0, "saturation exercised");
    check(n_overlap > 0, "overlap exercised");
    check(n_malware > 0, "malware decision exercised");
    check(n_benign > 0, "benign decision exercised");
    check(NG > 1, "multi-group vector exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
