// tb_reconstruct: random z and c words in both modes; the output must be
// z ^ c (Boolean) or z - c mod 2^128 (arithmetic), one cycle later.
module tb_reconstruct;
  import mpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  in_valid, in_ready, out_valid, out_ready;
  mode_e in_mode;
  word_t in_z_prev, in_c, out_v, exp_v;

  reconstruct dut (.*);

  initial begin
    in_valid = 1'b0; in_mode = MODE_BOOL; in_z_prev = '0; in_c = '0; out_ready = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      in_valid  = 1'b1;
      in_mode   = mode_e'(i % 2);
      in_z_prev = {$urandom, $urandom, $urandom, $urandom};
      in_c      = (i == 3) ? in_z_prev : {$urandom, $urandom, $urandom, $urandom};
      exp_v     = in_mode == MODE_BOOL ? in_z_prev ^ in_c : in_z_prev - in_c;
      if (i == 5) begin      // small arithmetic case worked by hand: 5 - 7 = -2
        in_mode = MODE_ARITH; in_z_prev = 128'd5; in_c = 128'd7; exp_v = ~128'd1;
      end
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || out_v != exp_v) begin failures++; $display("FAIL %0d: %h vs %h", i, out_v, exp_v); end
    end
    in_valid = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid after input stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
