// tb_mult_gate: three AND/MUL primitives wired in a ring, as parties 1..3.
// The testbench shares random secrets itself (x_i random with zero sum,
// a_i = x_(i-1) op v) and supplies zero-sum correlated randomness. For every
// operation the product (Boolean AND or product mod 2^128) is recovered from
// each pair of neighbouring output shares. Phase 1 runs the parties in
// lockstep with back-to-back operations (rate and latency checked), phase 2
// delays party 3 by three cycles, so that r values arrive before the local one
// is ready, and stalls all result ports for a while.
module tb_mult_gate;
  import mpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NOPS = 64;

  logic             in_valid [3], in_ready [3], alpha_pop [3], out_valid [3], out_ready [3];
  logic             r_out_valid [3], rx_overflow [3];
  mode_e            in_mode [3], alpha_mode [3], out_mode [3];
  logic [TAG_W-1:0] in_tag [3], out_tag [3];
  share_t           in_p [3], in_q [3], out_s [3];
  word_t            alpha [3], r_out [3];

  for (genvar i = 0; i < 3; i++) begin : g_p
    mult_gate dut (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_mode(in_mode[i]), .in_tag(in_tag[i]),
      .in_p(in_p[i]), .in_q(in_q[i]),
      .alpha_valid(1'b1), .alpha_pop(alpha_pop[i]), .alpha_mode(alpha_mode[i]), .alpha(alpha[i]),
      .r_out_valid(r_out_valid[i]), .r_out(r_out[i]),
      .r_in_valid(r_out_valid[(i + 2) % 3]), .r_in(r_out[(i + 2) % 3]),
      .out_valid(out_valid[i]), .out_ready(out_ready[i]), .out_mode(out_mode[i]),
      .out_tag(out_tag[i]), .out_s(out_s[i]), .rx_overflow(rx_overflow[i])
    );
  end

  function automatic word_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // operation table, built up front
  mode_e  op_mode [NOPS];
  word_t  op_prod [NOPS];
  share_t sp [NOPS][3], sq [NOPS][3];
  word_t  al [NOPS][3];

  function automatic void make_shares(mode_e m, word_t v, output share_t s [3]);
    word_t x [3];
    x[0] = rnd(); x[1] = rnd();
    x[2] = (m == MODE_BOOL) ? (x[0] ^ x[1]) : ('0 - x[0] - x[1]);
    for (int i = 0; i < 3; i++)
      s[i] = '{x: x[i], a: (m == MODE_BOOL) ? (x[(i + 2) % 3] ^ v) : (x[(i + 2) % 3] - v)};
  endfunction

  initial begin
    for (int k = 0; k < NOPS; k++) begin
      word_t v1, v2;
      op_mode[k] = mode_e'((k / 3) % 2);
      v1 = rnd(); v2 = rnd();
      if (k == 3) begin v1 = 128'd7; v2 = 128'd6; end        // 7*6 = 42 in arithmetic mode
      op_prod[k] = (op_mode[k] == MODE_BOOL) ? (v1 & v2) : (v1 * v2);
      if (k == 3) op_prod[k] = 128'd42;
      make_shares(op_mode[k], v1, sp[k]);
      make_shares(op_mode[k], v2, sq[k]);
      al[k][0] = rnd(); al[k][1] = rnd();
      al[k][2] = (op_mode[k] == MODE_BOOL) ? (al[k][0] ^ al[k][1]) : ('0 - al[k][0] - al[k][1]);
    end
  end

  // per-party drivers: party i starts its operations at start[i], with
  // operation k offered from cycle start[i] + k*gap
  int idx [3];
  int start_cyc [3];
  int cyc = 0;
  int phase_end = NOPS / 2;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar i = 0; i < 3; i++) begin : g_drv
    always_comb begin
      int k;
      k = idx[i];
      in_valid[i] = rst_n && (k < NOPS) && (cyc >= start_cyc[i]) && !(k == phase_end && cyc < start_cyc[i] + 200);
      in_mode[i]  = op_mode[k % NOPS];
      in_tag[i]   = TAG_W'(k);
      in_p[i]     = sp[k % NOPS][i];
      in_q[i]     = sq[k % NOPS][i];
      alpha[i]    = al[k % NOPS][i];
    end
    always @(posedge clk) if (in_valid[i] && in_ready[i]) begin
      checks++;
      if (alpha_mode[i] != op_mode[idx[i]]) begin failures++; $display("FAIL alpha mode"); end
      idx[i] <= idx[i] + 1;
    end
  end

  // in phase 2 every result port stalls for 6 cycles
  int stall_at = 1 << 30;
  for (genvar i = 0; i < 3; i++) begin : g_rdy
    assign out_ready[i] = !(cyc >= stall_at && cyc < stall_at + 6);
  end

  // collector
  share_t res [NOPS][3];
  int     nres [3];
  int     accept_cyc [NOPS], done_cyc [NOPS];
  int     early_r = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 3; i++) begin
      if (in_valid[i] && in_ready[i] && i == 0) accept_cyc[idx[0]] = cyc;
      if (out_valid[i] && out_ready[i]) begin
        checks++;
        if (out_tag[i] != TAG_W'(nres[i]) || out_mode[i] != op_mode[nres[i]]) begin
          failures++; $display("FAIL party %0d order", i);
        end
        res[nres[i]][i] = out_s[i];
        if (i == 0) done_cyc[nres[0]] = cyc;
        nres[i]++;
      end
    end
    // r from party 2 arriving at party 3 before party 3 has sent its own
    if (r_out_valid[1] && (idx[2] < idx[1])) early_r++;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin idx[i] = 0; nres[i] = 0; start_cyc[i] = 3; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // phase 1: lockstep; phase 2: party 3 lags by 3 cycles
    wait (idx[0] == phase_end && idx[1] == phase_end && idx[2] == phase_end);
    start_cyc[0] = cyc + 5; start_cyc[1] = cyc + 5; start_cyc[2] = cyc + 8;
    stall_at = cyc + 20;
    // release the phase boundary hold
    phase_end = -1;
    wait (nres[0] == NOPS && nres[1] == NOPS && nres[2] == NOPS);
    for (int k = 0; k < NOPS; k++) begin
      word_t zs;
      zs = '0;
      for (int i = 0; i < 3; i++) begin
        word_t rec;
        rec = (op_mode[k] == MODE_BOOL) ? (res[k][(i + 2) % 3].x ^ res[k][i].a)
                                        : (res[k][(i + 2) % 3].x - res[k][i].a);
        checks++;
        if (rec != op_prod[k]) begin failures++; $display("FAIL op %0d pair %0d: %h vs %h", k, i, rec, op_prod[k]); end
        zs = (op_mode[k] == MODE_BOOL) ? (zs ^ res[k][i].x) : (zs + res[k][i].x);
      end
      checks++;
      if (zs != '0) begin failures++; $display("FAIL op %0d: z shares do not cancel", k); end
    end
    // lockstep: result 3 cycles after acceptance, one operation per cycle
    checks++;
    if (done_cyc[0] - accept_cyc[0] != 3) begin failures++; $display("FAIL latency %0d", done_cyc[0] - accept_cyc[0]); end
    checks++;
    if (accept_cyc[NOPS/2 - 1] - accept_cyc[0] != NOPS/2 - 1) begin
      failures++; $display("FAIL rate: %0d cycles for %0d ops", accept_cyc[NOPS/2 - 1] - accept_cyc[0], NOPS/2);
    end
    checks++;
    if (early_r == 0) begin failures++; $display("FAIL skew never exercised"); end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (rx_overflow[i]) begin failures++; $display("FAIL overflow %0d", i); end
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
