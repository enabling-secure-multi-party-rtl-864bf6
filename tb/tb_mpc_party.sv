// tb_mpc_party: three parties wired in a ring by the testbench (keys towards
// party i-1, r values towards party i+1). The testbench shares random secrets
// itself, sends 40 mixed XOR/ADD/AND/MUL messages to every party in lockstep,
// recovers each result from neighbouring shares and compares it with the
// value in the clear. Also checks the message field order, the tags, the
// latency of the first AND (3 cycles) and of XOR (1 cycle, 2 when it
// yields the result port to an AND), and that keys are
// ready everywhere and no AND/MUL is accepted before randomness exists.
module tb_mpc_party;
  import mpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NOPS = 40;

  logic             cmd_valid [3], cmd_ready [3], res_valid [3], res_ready [3];
  op_t              cmd_op [3], res_op [3];
  logic [TAG_W-1:0] cmd_tag [3], res_tag [3];
  logic [511:0]     cmd_data [3];
  share_t           res_data [3];
  logic             key_out_valid [3], r_out_valid [3];
  logic [127:0]     key_out [3];
  word_t            r_out [3];
  logic             keys_ready [3], alpha_avail [3], rx_overflow [3];

  for (genvar i = 0; i < 3; i++) begin : g_p
    mpc_party #(.SEED(80'h1357_9BDF_2468_ACE0_1111 * 80'(i + 3))) dut (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[i]), .cmd_ready(cmd_ready[i]), .cmd_op(cmd_op[i]), .cmd_tag(cmd_tag[i]),
      .cmd_data(cmd_data[i]),
      .res_valid(res_valid[i]), .res_ready(res_ready[i]), .res_op(res_op[i]), .res_tag(res_tag[i]),
      .res_data(res_data[i]),
      .key_out_valid(key_out_valid[i]), .key_out(key_out[i]),
      .key_in_valid(key_out_valid[(i + 1) % 3]), .key_in(key_out[(i + 1) % 3]),
      .r_out_valid(r_out_valid[i]), .r_out(r_out[i]),
      .r_in_valid(r_out_valid[(i + 2) % 3]), .r_in(r_out[(i + 2) % 3]),
      .keys_ready(keys_ready[i]), .alpha_avail(alpha_avail[i]), .rx_overflow(rx_overflow[i])
    );
    assign res_ready[i] = 1'b1;
  end

  function automatic word_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic void make_shares(mode_e m, word_t v, output share_t s [3]);
    word_t x [3];
    x[0] = rnd(); x[1] = rnd();
    x[2] = (m == MODE_BOOL) ? (x[0] ^ x[1]) : ('0 - x[0] - x[1]);
    for (int i = 0; i < 3; i++)
      s[i] = '{x: x[i], a: (m == MODE_BOOL) ? (x[(i + 2) % 3] ^ v) : (x[(i + 2) % 3] - v)};
  endfunction

  op_t    op [NOPS];
  word_t  expv [NOPS];
  share_t sp [NOPS][3], sq [NOPS][3], res [NOPS][3];
  int     nres [3] = '{0, 0, 0};
  int     cyc = 0, acc_cyc [NOPS], done_cyc [NOPS];
  int     early_accept = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 3; i++) begin
      if (cmd_valid[i] && cmd_ready[i] && cmd_op[i].gate == GATE_MULT && !alpha_avail[i]) early_accept++;
      if (res_valid[i] && res_ready[i]) begin
        int k;
        k = int'(res_tag[i]);
        checks++;
        if (k >= NOPS || res_op[i] != op[k]) begin failures++; $display("FAIL party %0d tag %0d", i, k); end
        else begin
          res[k][i] = res_data[i];
          if (i == 0) done_cyc[k] = cyc;
        end
        nres[i]++;
      end
    end
  end

  initial begin
    for (int k = 0; k < NOPS; k++) begin
      word_t v1, v2;
      op[k] = '{gate: gate_e'((k % 4) >= 2), mode: mode_e'((k / 4) % 2)};
      v1 = rnd(); v2 = rnd();
      if (op[k].gate == GATE_MULT) expv[k] = (op[k].mode == MODE_BOOL) ? (v1 & v2) : (v1 * v2);
      else                         expv[k] = (op[k].mode == MODE_BOOL) ? (v1 ^ v2) : (v1 + v2);
      make_shares(op[k].mode, v1, sp[k]);
      make_shares(op[k].mode, v2, sq[k]);
    end
    for (int i = 0; i < 3; i++) cmd_valid[i] = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (keys_ready[0] && keys_ready[1] && keys_ready[2]);
    // offer the first AND right away: it must wait for correlated randomness
    for (int k = 0; k < NOPS; k++) begin
      int kk;
      kk = (k == 0) ? 2 : (k == 2) ? 0 : k;      // AND first
      @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        cmd_valid[i] = 1'b1; cmd_op[i] = op[kk]; cmd_tag[i] = TAG_W'(kk);
        cmd_data[i] = {sp[kk][i].x, sp[kk][i].a, sq[kk][i].x, sq[kk][i].a};
      end
      do @(posedge clk); while (!(cmd_ready[0] && cmd_ready[1] && cmd_ready[2]));
      acc_cyc[kk] = cyc;
      @(negedge clk);
      for (int i = 0; i < 3; i++) cmd_valid[i] = 1'b0;
    end
    wait (nres[0] == NOPS && nres[1] == NOPS && nres[2] == NOPS);
    for (int k = 0; k < NOPS; k++)
      for (int i = 0; i < 3; i++) begin
        word_t rec;
        rec = (op[k].mode == MODE_BOOL) ? (res[k][(i + 2) % 3].x ^ res[k][i].a) : (res[k][(i + 2) % 3].x - res[k][i].a);
        checks++;
        if (rec != expv[k]) begin failures++; $display("FAIL op %0d pair %0d", k, i); end
      end
    checks += 4;
    if (done_cyc[2] - acc_cyc[2] != 3) begin failures++; $display("FAIL AND latency %0d", done_cyc[2] - acc_cyc[2]); end
    begin
      int lmin, lmax;
      lmin = 99; lmax = 0;
      for (int k = 0; k < NOPS; k++) if (op[k].gate == GATE_LOCAL) begin
        lmin = (done_cyc[k] - acc_cyc[k] < lmin) ? done_cyc[k] - acc_cyc[k] : lmin;
        lmax = (done_cyc[k] - acc_cyc[k] > lmax) ? done_cyc[k] - acc_cyc[k] : lmax;
      end
      // 1 cycle, or 2 when an AND/MUL result takes the port first
      if (lmin != 1 || lmax > 2) begin failures++; $display("FAIL XOR latency %0d..%0d", lmin, lmax); end
    end
    if (early_accept != 0) begin failures++; $display("FAIL AND accepted without randomness"); end
    if (rx_overflow[0] || rx_overflow[1] || rx_overflow[2]) begin failures++; $display("FAIL overflow"); end
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
