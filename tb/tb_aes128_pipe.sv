// tb_aes128_pipe: checks the pipelined AES-128 core against published
// FIPS-197 / SP 800-38A test vectors. Five blocks under three different keys
// are fed on consecutive cycles, then one more after a gap; each result must
// appear exactly 21 cycles after its input with the right tag.
module tb_aes128_pipe;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NV = 6;
  logic [127:0] kv [NV] = '{
    128'h000102030405060708090a0b0c0d0e0f,
    128'h2b7e151628aed2a6abf7158809cf4f3c,
    128'h2b7e151628aed2a6abf7158809cf4f3c,
    128'h00000000000000000000000000000000,
    128'h2b7e151628aed2a6abf7158809cf4f3c,
    128'h000102030405060708090a0b0c0d0e0f};
  logic [127:0] pv [NV] = '{
    128'h00112233445566778899aabbccddeeff,
    128'h3243f6a8885a308d313198a2e0370734,
    128'h6bc1bee22e409f96e93d7e117393172a,
    128'h00000000000000000000000000000000,
    128'hae2d8a571e03ac9c9eb76fac45af8e51,
    128'h00112233445566778899aabbccddeeff};
  logic [127:0] cv [NV] = '{
    128'h69c4e0d86a7b0430d8cdb78070b4c55a,
    128'h3925841d02dc09fbdc118597196a0b32,
    128'h3ad77bb40d7a3660a89ecaf32466ef97,
    128'h66e94bd4ef8a2c3b884cfa59ca342b2e,
    128'hf5d3d58503b9699de785895a96fdbaaf,
    128'h69c4e0d86a7b0430d8cdb78070b4c55a};

  logic         in_valid;
  logic [127:0] in_key, in_pt, out_ct;
  logic [3:0]   in_tag, out_tag;
  logic         out_valid;

  aes128_pipe #(.TAG_W(4)) dut (.*);

  int cycle = 0;
  int in_cycle [NV];
  int seen = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // input sequence: vectors 0..4 back to back, vector 5 after 7 idle cycles
  initial begin
    in_valid = 1'b0; in_key = '0; in_pt = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) begin
      if (i == 5) begin
        in_valid <= 1'b0;
        repeat (7) @(posedge clk);
      end
      in_valid <= 1'b1; in_key <= kv[i]; in_pt <= pv[i]; in_tag <= 4'(i);
      @(posedge clk);
    end
    in_valid <= 1'b0;
  end

  // an input counts at the edge that samples it, an output at the edge where it is first seen
  always @(posedge clk) if (in_valid) in_cycle[in_tag] = cycle;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int t;
      t = int'(out_tag);
      checks++;
      if (t >= NV || out_ct !== cv[t]) begin
        failures++;
        $display("FAIL tag %0d ct %h", t, out_ct);
      end
      checks++;
      if (t < NV && cycle - in_cycle[t] != 21) begin
        failures++;
        $display("FAIL tag %0d latency %0d", t, cycle - in_cycle[t]);
      end
      seen++;
      if (seen == NV) begin
        checks++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog, %0d outputs seen", seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
