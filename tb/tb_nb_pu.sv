// tb_nb_pu -- self-checking test of one Naive Bayes processing unit.
//
// Drives random counts (including 0 and the maximum) and random signed
// log-likelihoods (including the most negative value), and checks one cycle
// later that each class product equals count * likelihood computed here in
// 64-bit integers. Also checks that the output holds while en is low.
module tb_nb_pu;
  localparam int unsigned COUNT_W = nb_pkg::DEF_COUNT_W;
  localparam int unsigned LL_W    = nb_pkg::DEF_LL_W;
  localparam int unsigned PROD_W  = COUNT_W + LL_W;

  logic clk = 0, en = 0;
  logic [COUNT_W-1:0] count = '0;
  logic signed [LL_W-1:0] ll [2];
  logic signed [PROD_W-1:0] prod [2];
  int checks = 0, failures = 0;

  nb_pu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expect0, expect1;
    ll[0] = '0; ll[1] = '0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      en = 1;
      count = (t < 4) ? ((t & 1) ? '1 : '0) : COUNT_W'($urandom);
      ll[0] = (t < 2) ? LL_W'(1 << (LL_W - 1)) : LL_W'($urandom);
      ll[1] = LL_W'($urandom);
      expect0 = longint'(count) * longint'(ll[0]);
      expect1 = longint'(count) * longint'(ll[1]);
      @(negedge clk);
      checks++;
      if (longint'(prod[0]) != expect0 || longint'(prod[1]) != expect1) begin
        failures++;
        $display("FAIL: count=%0d ll=%0d,%0d prod=%0d,%0d", count, ll[0], ll[1], prod[0], prod[1]);
      end
      // Hold with en low.
      en = 0; count = count + 1'b1; ll[1] = ll[1] + 1'b1;
      @(negedge clk);
      checks++;
      if (longint'(prod[0]) != expect0 || longint'(prod[1]) != expect1) begin
        failures++;
        $display("FAIL: output changed with en low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
