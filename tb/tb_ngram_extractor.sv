// tb_ngram_extractor -- self-checking test of the byte n-gram extractor.
//
// Loads a small vocabulary of 2-grams, streams random payloads drawn from a
// four-letter alphabet (so that vocabulary n-grams occur often), with random
// gaps on in_valid, and compares every count with a count made here
// directly from the payload bytes. A long run of one byte drives a counter
// into saturation. The test also checks that in_ready stays low while the
// finished vector waits for feat_ready, that the vector does not change
// meanwhile, and that the counts clear after the acknowledge.
module tb_ngram_extractor;
  localparam int unsigned NGRAM_LEN = 2;
  localparam int unsigned NF        = 12;
  localparam int unsigned COUNT_W   = 4;
  localparam int unsigned CMAX      = (1 << COUNT_W) - 1;

  logic clk = 0, rst_n = 0;
  logic pat_we = 0;
  logic [$clog2(NF)-1:0] pat_addr = '0;
  logic [15:0] pat_data = '0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [7:0] in_data = '0;
  logic feat_valid, feat_ready = 0;
  logic [COUNT_W-1:0] feat_count [NF];

  int checks = 0, failures = 0;
  logic [15:0] vocab [NF];
  bit written [NF];
  byte unsigned payload [$];

  ngram_extractor #(.NGRAM_LEN(NGRAM_LEN), .NUM_FEATURES(NF), .COUNT_W(COUNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic byte unsigned letter(int k);
    case (k & 3) 0: return 8'h41; 1: return 8'h42; 2: return 8'h43; default: return 8'h00;
    endcase
  endfunction

  task automatic send_payload();
    for (int i = 0; i < payload.size(); i++) begin
      while ($urandom_range(0, 3) == 0) begin
        in_valid <= 0; @(posedge clk);
      end
      in_valid <= 1; in_data <= payload[i]; in_last <= (i == payload.size() - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0; in_last <= 0;
  endtask

  task automatic check_vector(string tag);
    int unsigned ref_cnt;
    wait (feat_valid);
    @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      ref_cnt = 0;
      if (written[f])
        for (int i = 0; i + 1 < payload.size(); i++)
          if ({payload[i], payload[i+1]} == vocab[f]) ref_cnt++;
      if (ref_cnt > CMAX) ref_cnt = CMAX;
      check(feat_count[f] == COUNT_W'(ref_cnt),
            $sformatf("%s feature %0d count %0d expected %0d", tag, f, feat_count[f], ref_cnt));
    end
    // Hold the vector for a few cycles: the stream must stall, counts stay.
    in_valid <= 1; in_data <= 8'h41; in_last <= 0;
    repeat (3) begin
      @(negedge clk);
      check(!in_ready && feat_valid, {tag, " stall while vector held"});
    end
    in_valid <= 0;
    @(posedge clk); feat_ready <= 1;
    @(posedge clk); feat_ready <= 0;
    @(negedge clk);
    check(!feat_valid && in_ready, {tag, " released after acknowledge"});
    for (int f = 0; f < NF; f++) check(feat_count[f] == 0, {tag, " counts cleared"});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Vocabulary: all 2-grams of {A,B,C} except one slot left unwritten.
    for (int f = 0; f < NF; f++) begin
      vocab[f] = {letter(f / 3), letter(f % 3)};
      written[f] = (f != 5) && (f < 9);
      if (written[f]) begin
        pat_we <= 1; pat_addr <= f[$clog2(NF)-1:0]; pat_data <= vocab[f];
        @(posedge clk);
      end
    end
    pat_we <= 0;
    @(posedge clk);

    for (int t = 0; t < 20; t++) begin
      payload.delete();
      for (int i = 0; i < $urandom_range(1, 40); i++) payload.push_back(letter($urandom));
      send_payload();
      check_vector($sformatf("payload %0d", t));
    end

    // Saturation: 30 x 'A' contains 29 "AA" 2-grams, above the 15 limit.
    payload.delete();
    repeat (30) payload.push_back(8'h41);
    send_payload();
    check_vector("saturation");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
