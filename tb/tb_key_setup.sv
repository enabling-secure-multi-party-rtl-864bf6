// tb_key_setup: feeds known RNG words and checks that the party key is their
// concatenation, that it is sent once, visible after the 4th clock edge after reset, and that
// keys_ready waits for the neighbour key. Run twice: neighbour key late, then
// neighbour key early (before the party's own key is ready).
module tb_key_setup;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rng_en;
  logic [31:0]  rng_word;
  logic         key_out_valid, key_in_valid, keys_ready;
  logic [127:0] key_out, key_in, key_own, key_nbr;

  key_setup dut (.*);

  // RNG stand-in: word = 0x1111_1111 * (number of words drawn + 1)
  int drawn = 0;
  assign rng_word = 32'h1111_1111 * 32'(drawn + 1);
  always @(posedge clk) if (rst_n && rng_en) drawn <= drawn + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(int nbr_delay);
    int cyc, sent_at, pulses;
    logic [127:0] nkey;
    nkey = {4{32'hCAFE_0000 + 32'(nbr_delay)}};
    rst_n = 1'b0; drawn = 0; key_in_valid = 1'b0; key_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    sent_at = -1; pulses = 0;
    for (cyc = 1; cyc <= 30; cyc++) begin
      if (cyc == nbr_delay) begin key_in_valid = 1'b1; key_in = nkey; end
      @(posedge clk);
      #1;
      key_in_valid = 1'b0;
      if (key_out_valid) begin pulses++; sent_at = cyc; end
      if (keys_ready) break;
    end
    check(pulses == 1, "one key pulse");
    check(sent_at == 4, $sformatf("key sent after edge 4 (was %0d)", sent_at));
    check(key_own == 128'h11111111_22222222_33333333_44444444, "own key = four RNG words");
    check(key_out == key_own, "key sent = own key");
    check(key_nbr == nkey, "neighbour key stored");
    check(keys_ready, "keys ready");
    check(cyc == ((nbr_delay > 4) ? nbr_delay + 1 : 6), $sformatf("keys_ready cycle %0d", cyc));
    repeat (5) @(posedge clk);
    #1 check(keys_ready && drawn == 4, "ready holds, no more draws");
  endtask

  initial begin
    key_in_valid = 1'b0; key_in = '0;
    run(12);
    run(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
