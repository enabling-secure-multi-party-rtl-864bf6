// tb_local_gate: random XOR and ADD operations on share tuples, with the
// output stalled now and then; checks every result and the tag order, and
// that back-to-back operations complete one per cycle when not stalled.
module tb_local_gate;
  import mpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             in_valid, in_ready, out_valid, out_ready;
  mode_e            in_mode, out_mode;
  logic [TAG_W-1:0] in_tag, out_tag;
  share_t           in_p, in_q, out_s;

  local_gate dut (.*);

  function automatic word_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  localparam int NOPS = 200;
  share_t exp_s [NOPS];
  mode_e  exp_m [NOPS];
  int     got = 0, stall_cycles = 0, first_out = -1, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // driver
  initial begin
    in_valid = 1'b0; in_mode = MODE_BOOL; in_tag = '0; in_p = '0; in_q = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++) begin
      in_valid = 1'b1;
      in_mode  = mode_e'(i[0] ^ i[3]);
      in_tag   = TAG_W'(i);
      in_p     = '{x: rnd(), a: rnd()};
      in_q     = '{x: rnd(), a: rnd()};
      exp_m[i] = in_mode;
      exp_s[i].x = (in_mode == MODE_BOOL) ? (in_p.x ^ in_q.x) : (in_p.x + in_q.x);
      exp_s[i].a = (in_mode == MODE_BOOL) ? (in_p.a ^ in_q.a) : (in_p.a + in_q.a);
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 1'b0;
  end

  // consumer: stalls during cycles 60..69 of the run
  assign out_ready = !(cyc >= 60 && cyc < 70);

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) stall_cycles++;
    if (out_valid && out_ready) begin
      if (first_out < 0) first_out = cyc;
      checks++;
      if (out_tag != TAG_W'(got) || out_mode != exp_m[got] || out_s != exp_s[got]) begin
        failures++;
        $display("FAIL op %0d tag %0d", got, out_tag);
      end
      got++;
      if (got == NOPS) begin
        checks++;
        // 200 ops, one per cycle, plus the 10 stalled cycles
        if (cyc - first_out != NOPS - 1 + 10) begin
          failures++; $display("FAIL rate: %0d cycles", cyc - first_out);
        end
        checks++;
        if (stall_cycles == 0) begin failures++; $display("FAIL no stall seen"); end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
