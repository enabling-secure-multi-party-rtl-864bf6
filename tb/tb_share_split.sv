// tb_share_split: splits random secrets in both modes and checks, from the
// outputs alone, that the x values cancel, that every pair of neighbouring
// parties recovers the secret (v = x_(i-1) op^-1 a_i), that fresh randomness is
// used for each secret, and the 8-cycle draw time.
module tb_share_split;
  import mpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   in_valid, in_ready, out_valid, out_ready;
  mode_e  in_mode, out_mode;
  word_t  in_v;
  share_t out_share [3];

  share_split dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    word_t v, prev_x1, rec;
    int wait_cyc;
    in_valid = 1'b0; in_mode = MODE_BOOL; in_v = '0; out_ready = 1'b0;
    prev_x1 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      v = (i == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom};
      in_valid = 1'b1; in_mode = mode_e'(i % 2); in_v = v;
      do @(posedge clk); while (!in_ready);
      #1 in_valid = 1'b0;
      wait_cyc = 0;
      while (!out_valid) begin @(posedge clk); #1; wait_cyc++; end
      check(wait_cyc == 8, $sformatf("draw time %0d", wait_cyc));
      check(out_mode == mode_e'(i % 2), "mode");
      if (out_mode == MODE_BOOL)
        check((out_share[0].x ^ out_share[1].x ^ out_share[2].x) == '0, "x xor to 0");
      else
        check((out_share[0].x + out_share[1].x + out_share[2].x) == '0, "x sum to 0");
      for (int p = 0; p < 3; p++) begin
        rec = (out_mode == MODE_BOOL) ? (out_share[(p + 2) % 3].x ^ out_share[p].a)
                                      : (out_share[(p + 2) % 3].x - out_share[p].a);
        check(rec == v, $sformatf("secret %0d from parties %0d,%0d", i, (p + 2) % 3, p));
        check(out_share[p].x != v, "x is not the secret");
      end
      check(out_share[0].x != prev_x1, "fresh randomness");
      prev_x1 = out_share[0].x;
      // hold the output for a few cycles before taking it
      repeat (i % 3) begin @(posedge clk); #1; check(out_valid, "output held"); end
      out_ready = 1'b1;
      @(posedge clk);
      #1 out_ready = 1'b0;
      check(!out_valid, "output taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
