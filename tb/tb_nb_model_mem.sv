// tb_nb_model_mem -- self-checking test of the banked model memory.
//
// Writes a random log2 likelihood for every feature and both classes, and
// both priors, then reads every group and checks that lane p of group g
// returns feature g*N_PU+p one cycle after the read, and that the output
// holds when rd_en is low. Uses 100 features so that the last group is only
// partly filled. Then overwrites single entries and reads them back.
module tb_nb_model_mem;
  localparam int unsigned NF   = 100;
  localparam int unsigned N_PU = 31;
  localparam int unsigned LL_W = 16;
  localparam int unsigned NG   = (NF + N_PU - 1) / N_PU;

  logic clk = 0, rst_n = 0;
  logic ll_we = 0, ll_class = 0, prior_we = 0, prior_class = 0, rd_en = 0;
  logic [$clog2(NF)-1:0] ll_feat = '0;
  logic signed [LL_W-1:0] ll_wdata = '0, prior_wdata = '0;
  logic [$clog2(NG)-1:0] rd_group = '0;
  logic signed [LL_W-1:0] rd_ll [2][N_PU];
  logic signed [LL_W-1:0] log_prior [2];
  logic signed [LL_W-1:0] model [2][NF];
  logic signed [LL_W-1:0] prior [2];
  int checks = 0, failures = 0;

  nb_model_mem #(.NUM_FEATURES(NF), .N_PU(N_PU), .LL_W(LL_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic read_group(int g);
    @(negedge clk); rd_en = 1; rd_group = g[$clog2(NG)-1:0];
    @(negedge clk); rd_en = 0; rd_group = ~rd_group;
    for (int k = 0; k < 2; k++) begin   // read data, then held data
      for (int c = 0; c < 2; c++)
        for (int p = 0; p < N_PU; p++)
          if (g * N_PU + p < NF)
            check(rd_ll[c][p] == model[c][g*N_PU+p],
                  $sformatf("group %0d lane %0d class %0d: %0d expected %0d",
                            g, p, c, rd_ll[c][p], model[c][g*N_PU+p]));
      @(negedge clk);
    end
  endtask

  task automatic write_ll(int c, int f, logic signed [LL_W-1:0] v);
    @(negedge clk); ll_we = 1; ll_class = c[0]; ll_feat = f[$clog2(NF)-1:0]; ll_wdata = v;
    model[c][f] = v;
    @(negedge clk); ll_we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(log_prior[0] == 0 && log_prior[1] == 0, "priors cleared by reset");
    for (int c = 0; c < 2; c++)
      for (int f = 0; f < NF; f++) write_ll(c, f, LL_W'($urandom));
    for (int c = 0; c < 2; c++) begin
      prior[c] = LL_W'($urandom);
      @(negedge clk); prior_we = 1; prior_class = c[0]; prior_wdata = prior[c];
      @(negedge clk); prior_we = 0;
    end
    check(log_prior[0] == prior[0] && log_prior[1] == prior[1], "priors written");
    for (int g = 0; g < NG; g++) read_group(g);
    for (int k = 0; k < 20; k++) begin
      automatic int f = $urandom_range(0, NF - 1);
      automatic int c = $urandom_range(0, 1);
      write_ll(c, f, LL_W'($urandom));
      read_group(f / N_PU);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
