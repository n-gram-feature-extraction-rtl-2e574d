// tb_nb_adder_tree -- self-checking test of the two-stage adder tree.
//
// Feeds a new random vector of 62 signed inputs every cycle (extreme values
// in the first vectors) and checks that each sum appears exactly two cycles
// later and equals the sum computed here in 64-bit integers.
module tb_nb_adder_tree;
  localparam int unsigned N_IN  = 62;
  localparam int unsigned IN_W  = 24;
  localparam int unsigned OUT_W = 32;
  localparam int unsigned LAT   = 2;

  logic clk = 0;
  logic signed [IN_W-1:0] din [N_IN];
  logic signed [OUT_W-1:0] sum;
  longint expect_q [$];
  int checks = 0, failures = 0;

  nb_adder_tree #(.N_IN(N_IN), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.clk, .en(1'b1), .din, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (t >= LAT) begin
        checks++;
        if (longint'(sum) != expect_q[0]) begin
          failures++;
          $display("FAIL: vector %0d sum %0d expected %0d", t - LAT, sum, expect_q[0]);
        end
        void'(expect_q.pop_front());
      end
      s = 0;
      for (int i = 0; i < N_IN; i++) begin
        case (t)
          0: din[i] = {1'b1, {(IN_W-1){1'b0}}};
          1: din[i] = {1'b0, {(IN_W-1){1'b1}}};
          default: din[i] = IN_W'($urandom);
        endcase
        s += longint'(din[i]);
      end
      expect_q.push_back(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
