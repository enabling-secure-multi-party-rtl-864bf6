// tb_rng32: checks the RNG word sequence against a reference model of the
// LFSR (taps 43,42,38,37) and the rule-90/150 automaton, that en=0 holds the
// word, that 300 words contain no repeat, and that the bits are balanced.
module tb_rng32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [79:0] S = 80'h0123_4567_89AB_CDEF_FEDC;
  logic        en;
  logic [31:0] out_word;
  rng32 #(.SEED(S)) dut (.*);

  logic [42:0] ml;
  logic [36:0] mc;
  logic [31:0] words [300];
  int ones = 0;

  task automatic model_step();
    logic [36:0] n;
    ml = {ml[41:0], ml[42] ^ ml[41] ^ ml[37] ^ ml[36]};
    for (int i = 0; i < 37; i++)
      n[i] = ((i < 36) ? mc[i+1] : 1'b0) ^ ((i > 0) ? mc[i-1] : 1'b0) ^ ((i == 28) ? mc[i] : 1'b0);
    mc = n;
  endtask

  initial begin
    en = 1'b0;
    ml = S[79:37] | 43'h1;
    mc = S[36:0] | 37'h1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 en = 1'b1;
    for (int k = 0; k < 300; k++) begin
      #1;
      checks++;
      if (out_word !== (ml[31:0] ^ mc[31:0])) begin
        failures++;
        if (failures < 5) $display("FAIL word %0d: %h vs %h", k, out_word, ml[31:0] ^ mc[31:0]);
      end
      words[k] = out_word;
      ones += $countones(out_word);
      if (k == 100) begin            // en low: the word must hold for 3 cycles
        en = 1'b0;
        repeat (3) @(posedge clk);
        #1;
        checks++;
        if (out_word !== words[k]) begin failures++; $display("FAIL hold"); end
        en = 1'b1;
      end
      @(posedge clk);
      model_step();
    end
    for (int i = 0; i < 300; i++)
      for (int j = i + 1; j < 300; j++)
        if (words[i] == words[j]) begin failures++; $display("FAIL repeat %0d %0d", i, j); end
    checks++;
    if (ones < 300*32*45/100 || ones > 300*32*55/100) begin failures++; $display("FAIL balance %0d", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
