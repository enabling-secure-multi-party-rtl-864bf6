// tb_mpc_system: end-to-end run of the engine at its default size.
//
// 1. The parties generate and trade keys. 2. The dealer splits 8 Boolean and
// 8 arithmetic secrets into shares, which the host loads into all three
// parties. 3. Every party runs the same list of operations:
//    a small circuit ((s0 & s1) ^ s2) & s3 and ((s8 * s9) + s10) * s11,
//    a batch of 60 AND/MUL gates that drains the correlated-randomness buffer,
//    a pattern AND, XOR, XOR that makes both primitives finish together,
//    a block during which party 3 is 3 cycles behind its neighbours,
//    and a window in which the host holds the result ports.
// 4. Every result is recovered three times through the reconstruction unit,
// once from each pair of neighbouring parties, and compared with the value
// computed in the clear. The testbench counts each mechanism (key exchange,
// randomness stall, result arbitration, skewed parties, result back-pressure,
// Boolean/arithmetic switch) and fails if one never happened. It also checks
// the steady rate of one AND/MUL per 2 cycles once the buffer is empty.
module tb_mpc_system;
  import mpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NP = 3;
  localparam int NSEC = 16;
  localparam int NOPS = 90;
  localparam int NSLOT = NSEC + NOPS;

  logic             cmd_valid [NP], cmd_ready [NP], res_valid [NP], res_ready [NP];
  op_t              cmd_op [NP], res_op [NP];
  logic [TAG_W-1:0] cmd_tag [NP], res_tag [NP];
  logic [511:0]     cmd_data [NP];
  share_t           res_data [NP];
  logic             keys_ready [NP], alpha_avail [NP], rx_overflow [NP];
  logic             split_in_valid, split_in_ready, split_out_valid, split_out_ready;
  mode_e            split_in_mode, split_out_mode;
  word_t            split_in_v;
  share_t           split_out_share [3];
  logic             recon_in_valid, recon_in_ready, recon_out_valid, recon_out_ready;
  mode_e            recon_in_mode;
  word_t            recon_in_z_prev, recon_in_c, recon_out_v;

  mpc_system dut (.*);

  function automatic word_t rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // ---------------- operation list ----------------
  op_t   op     [NOPS];
  int    opa    [NOPS], opb [NOPS];      // operand slots
  word_t val    [NSLOT];                 // values in the clear
  mode_e smode  [NSLOT];
  share_t sh    [NP][NSLOT];
  bit     have  [NP][NSLOT];

  localparam int BATCH0 = 6, BATCH1 = 66, ARB1 = 78, SKEW0 = 78;

  function automatic void add_op(int k, gate_e g, mode_e m, int a, int b);
    op[k]  = '{gate: g, mode: m};
    opa[k] = a; opb[k] = b;
    smode[NSEC + k] = m;
    if (g == GATE_MULT) val[NSEC + k] = (m == MODE_BOOL) ? (val[a] & val[b]) : (val[a] * val[b]);
    else                val[NSEC + k] = (m == MODE_BOOL) ? (val[a] ^ val[b]) : (val[a] + val[b]);
  endfunction

  initial begin
    for (int s = 0; s < NSEC; s++) begin
      val[s] = rnd();
      smode[s] = (s < 8) ? MODE_BOOL : MODE_ARITH;
    end
    val[8] = 128'd3; val[9] = '1;      // 3 * (-1) = -3 mod 2^128, checked below
    add_op(0, GATE_MULT,  MODE_BOOL,  0, 1);
    add_op(1, GATE_LOCAL, MODE_BOOL,  NSEC + 0, 2);
    add_op(2, GATE_MULT,  MODE_ARITH, 8, 9);
    add_op(3, GATE_LOCAL, MODE_ARITH, NSEC + 2, 10);
    add_op(4, GATE_MULT,  MODE_BOOL,  NSEC + 1, 3);
    add_op(5, GATE_MULT,  MODE_ARITH, NSEC + 3, 11);
    for (int k = BATCH0; k < BATCH1; k++) begin        // 60 independent AND/MUL
      mode_e m;
      int base;
      m = mode_e'((k / 7) % 2);
      base = (m == MODE_BOOL) ? 0 : 8;
      add_op(k, GATE_MULT, m, base + (k % 8), base + ((3 * k + 1) % 8));
    end
    for (int k = BATCH1; k < ARB1; k++) begin          // AND, XOR, XOR, ...
      if (k % 3 == 0) add_op(k, GATE_MULT, MODE_BOOL, k % 8, (k + 5) % 8);
      else            add_op(k, GATE_LOCAL, MODE_BOOL, (k + 1) % 8, (k + 2) % 8);
    end
    for (int k = SKEW0; k < NOPS; k++)                 // party 3 lags here
      add_op(k, (k % 2) ? GATE_MULT : GATE_LOCAL, MODE_ARITH, 8 + (k % 8), 8 + ((k + 3) % 8));
  end

  // ---------------- clocking and counters ----------------
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int n_keys = 0, n_alpha_stall = 0, n_arb = 0, n_early_r = 0, n_backpressure = 0, n_switch = 0;
  int accept_cyc [NOPS];
  int next [NP];
  int got [NP];
  int hold_from = 1 << 30;
  int skew_release = 1 << 30;
  logic go = 1'b0;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (cmd_valid[p] && !cmd_ready[p] && cmd_op[p].gate == GATE_MULT && !alpha_avail[p]) n_alpha_stall++;
      if (res_valid[p] && !res_ready[p]) n_backpressure++;
    end
    if (dut.g_group[0].g_party[0].u_party.mg_valid && dut.g_group[0].g_party[0].u_party.lg_valid) n_arb++;
    // r from party 2 reaches party 3 while party 3 has not started that operation
    if (dut.g_group[0].g_party[1].u_party.r_out_valid && next[2] <= next[1] - 1 &&
        dut.g_group[0].g_party[2].u_party.u_mult.pend_empty) n_early_r++;
  end

  // ---------------- host drivers, one per party ----------------
  for (genvar p = 0; p < NP; p++) begin : g_host
    always_comb begin
      int k;
      k = next[p];
      cmd_valid[p] = 1'b0;
      cmd_op[p]    = '{gate: GATE_LOCAL, mode: MODE_BOOL};
      cmd_tag[p]   = '0;
      cmd_data[p]  = '0;
      if (k < NOPS && have[p][opa[k]] && have[p][opb[k]] && !(p == 2 && k == SKEW0 && cyc < skew_release)) begin
        cmd_valid[p] = go;
        cmd_op[p]    = op[k];
        cmd_tag[p]   = TAG_W'(k);
        cmd_data[p]  = {sh[p][opa[k]], sh[p][opb[k]]};
      end
    end
    always @(posedge clk) if (cmd_valid[p] && cmd_ready[p]) begin
      if (p == 0) begin
        accept_cyc[next[p]] = cyc;
        if (next[p] > 0 && op[next[p]].mode != op[next[p] - 1].mode) n_switch++;
      end
      next[p] <= next[p] + 1;
    end
    assign res_ready[p] = !(cyc >= hold_from && cyc < hold_from + 8);
    always @(posedge clk) if (rst_n && res_valid[p] && res_ready[p]) begin
      int k;
      k = int'(res_tag[p]);
      checks++;
      if (k >= NOPS || res_op[p] != op[k] || have[p][NSEC + k]) begin
        failures++; $display("FAIL party %0d bad result tag %0d", p, k);
      end else begin
        sh[p][NSEC + k]   = res_data[p];
        have[p][NSEC + k] = 1'b1;
      end
      got[p]++;
    end
  end

  // ---------------- main sequence ----------------
  initial begin
    int kr;
    split_in_valid = 1'b0; split_in_mode = MODE_BOOL; split_in_v = '0; split_out_ready = 1'b0;
    recon_in_valid = 1'b0; recon_in_mode = MODE_BOOL; recon_in_z_prev = '0; recon_in_c = '0; recon_out_ready = 1'b1;
    for (int p = 0; p < NP; p++) begin
      next[p] = 0; got[p] = 0;
      for (int s = 0; s < NSLOT; s++) have[p][s] = 1'b0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. keys
    wait (keys_ready[0] && keys_ready[1] && keys_ready[2]);
    n_keys++;

    // 2. dealer
    for (int s = 0; s < NSEC; s++) begin
      @(negedge clk);
      split_in_valid = 1'b1; split_in_mode = smode[s]; split_in_v = val[s];
      do @(posedge clk); while (!split_in_ready);
      @(negedge clk) split_in_valid = 1'b0;
      while (!split_out_valid) @(negedge clk);
      for (int p = 0; p < NP; p++) begin sh[p][s] = split_out_share[p]; have[p][s] = 1'b1; end
      split_out_ready = 1'b1;
      @(negedge clk) split_out_ready = 1'b0;
    end

    // 3. operations; party 3 is released 3 cycles after party 1 reaches SKEW0
    @(negedge clk) go = 1'b1;
    wait (next[0] == SKEW0);
    skew_release = cyc + 3;
    hold_from = cyc + 12;
    wait (got[0] == NOPS && got[1] == NOPS && got[2] == NOPS);

    // 4. reconstruction, three pairs per result
    for (int k = 0; k < NOPS; k++) begin
      for (int i = 0; i < 3; i++) begin
        @(negedge clk);
        recon_in_valid  = 1'b1;
        recon_in_mode   = op[k].mode;
        recon_in_z_prev = sh[(i + 2) % 3][NSEC + k].x;
        recon_in_c      = sh[i][NSEC + k].a;
        @(negedge clk);
        recon_in_valid = 1'b0;
        checks++;
        if (!recon_out_valid || recon_out_v != val[NSEC + k]) begin
          failures++; $display("FAIL op %0d pair %0d: %h vs %h", k, i, recon_out_v, val[NSEC + k]);
        end
      end
    end

    checks++;
    if (val[NSEC + 2] != ~128'd2) begin failures++; $display("FAIL reference product"); end

    // 5. rate: the last 16 gates of the AND/MUL batch, buffer empty, one per 2 cycles
    kr = accept_cyc[BATCH1 - 1] - accept_cyc[BATCH1 - 16];
    checks++;
    if (kr != 30) begin failures++; $display("FAIL rate: 16 AND/MUL in %0d cycles", kr); end

    // 6. mechanisms
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (rx_overflow[p]) begin failures++; $display("FAIL ring overflow in party %0d", p); end
    end
    $display("mechanisms: keys %0d alpha-stall %0d arbitration %0d early-r %0d back-pressure %0d mode-switch %0d",
             n_keys, n_alpha_stall, n_arb, n_early_r, n_backpressure, n_switch);
    checks += 6;
    if (n_keys == 0)         begin failures++; $display("FAIL key exchange never happened"); end
    if (n_alpha_stall == 0)  begin failures++; $display("FAIL randomness stall never happened"); end
    if (n_arb == 0)          begin failures++; $display("FAIL result arbitration never happened"); end
    if (n_early_r == 0)      begin failures++; $display("FAIL skewed parties never happened"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL result back-pressure never happened"); end
    if (n_switch == 0)       begin failures++; $display("FAIL mode switch never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog at cycle %0d: next %0d %0d %0d got %0d %0d %0d", cyc, next[0], next[1], next[2], got[0], got[1], got[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
