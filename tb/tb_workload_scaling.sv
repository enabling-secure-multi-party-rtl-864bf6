// tb_workload_scaling: throughput workload on a larger configuration, four
// three-party groups (12 AND units) with two AES cores per party, so that every
// AND/MUL unit can take one 128-bit operation per cycle. All twelve parties
// are fed back-to-back AND/MUL messages at the same time (64 per group, Boolean
// and arithmetic mixed). The testbench shares the secrets itself, recovers
// every product from every pair of neighbouring parties and checks it against
// the value in the clear. It also checks that, with the randomness buffers
// kept busy, each group sustains one operation per cycle: 12 x 128 product
// bits per cycle, 192 Gbit/s at 125 MHz.
module tb_workload_scaling;
  import mpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int G = 4;
  localparam int NP = 3 * G;
  localparam int NOPS = 64;

  logic             cmd_valid [NP], cmd_ready [NP], res_valid [NP], res_ready [NP];
  op_t              cmd_op [NP], res_op [NP];
  logic [TAG_W-1:0] cmd_tag [NP], res_tag [NP];
  logic [511:0]     cmd_data [NP];
  share_t           res_data [NP];
  logic             keys_ready [NP], alpha_avail [NP], rx_overflow [NP];
  logic             split_in_valid, split_in_ready, split_out_valid;
  mode_e            split_out_mode;
  share_t           split_out_share [3];
  logic             recon_in_ready, recon_out_valid;
  word_t            recon_out_v;

  mpc_system #(.NUM_GROUPS(G), .NUM_AES(2)) dut (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_tag, .cmd_data,
    .res_valid, .res_ready, .res_op, .res_tag, .res_data,
    .keys_ready, .alpha_avail, .rx_overflow,
    .split_in_valid(1'b0), .split_in_ready, .split_in_mode(MODE_BOOL), .split_in_v('0),
    .split_out_valid, .split_out_ready(1'b0), .split_out_mode, .split_out_share,
    .recon_in_valid(1'b0), .recon_in_ready, .recon_in_mode(MODE_BOOL), .recon_in_z_prev('0), .recon_in_c('0),
    .recon_out_valid, .recon_out_ready(1'b1), .recon_out_v
  );

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

  mode_e  om [G][NOPS];
  word_t  expv [G][NOPS];
  share_t sp [G][NOPS][3], sq [G][NOPS][3], res [G][NOPS][3];
  int     next [NP], nres [NP];
  int     cyc = 0, first_acc [NP], last_acc [NP];
  logic   go = 1'b0;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar p = 0; p < NP; p++) begin : g_host
    localparam int GG = p / 3, J = p % 3;
    always_comb begin
      int k;
      k = (next[p] < NOPS) ? next[p] : NOPS - 1;
      cmd_valid[p] = go && next[p] < NOPS;
      cmd_op[p]    = '{gate: GATE_MULT, mode: om[GG][k]};
      cmd_tag[p]   = TAG_W'(k);
      cmd_data[p]  = {sp[GG][k][J], sq[GG][k][J]};
    end
    assign res_ready[p] = 1'b1;
    always @(posedge clk) if (rst_n) begin
      if (cmd_valid[p] && cmd_ready[p]) begin
        if (next[p] == 0) first_acc[p] = cyc;
        last_acc[p] = cyc;
        next[p] <= next[p] + 1;
      end
      if (res_valid[p]) begin
        res[GG][int'(res_tag[p])][J] = res_data[p];
        nres[p]++;
      end
    end
  end

  initial begin
    bit all_done;
    for (int g = 0; g < G; g++)
      for (int k = 0; k < NOPS; k++) begin
        word_t v1, v2;
        om[g][k] = mode_e'((k / 5 + g) % 2);
        v1 = rnd(); v2 = rnd();
        expv[g][k] = (om[g][k] == MODE_BOOL) ? (v1 & v2) : (v1 * v2);
        make_shares(om[g][k], v1, sp[g][k]);
        make_shares(om[g][k], v2, sq[g][k]);
      end
    for (int p = 0; p < NP; p++) begin next[p] = 0; nres[p] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // let every party fill its randomness buffer, then start all at once
    wait (keys_ready[0]);
    repeat (40) @(posedge clk);
    #1 go = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int p = 0; p < NP; p++) if (nres[p] != NOPS) all_done = 1'b0;
    end while (!all_done);
    for (int g = 0; g < G; g++)
      for (int k = 0; k < NOPS; k++)
        for (int i = 0; i < 3; i++) begin
          word_t rec;
          rec = (om[g][k] == MODE_BOOL) ? (res[g][k][(i + 2) % 3].x ^ res[g][k][i].a)
                                        : (res[g][k][(i + 2) % 3].x - res[g][k][i].a);
          checks++;
          if (rec != expv[g][k]) begin failures++; $display("FAIL group %0d op %0d pair %0d", g, k, i); end
        end
    for (int p = 0; p < NP; p++) begin
      checks += 2;
      if (last_acc[p] - first_acc[p] != NOPS - 1) begin
        failures++; $display("FAIL party %0d: %0d ops took %0d cycles", p, NOPS, last_acc[p] - first_acc[p] + 1);
      end
      if (rx_overflow[p]) begin failures++; $display("FAIL overflow %0d", p); end
    end
    $display("12 AND units: %0d products of 128 bits in %0d cycles", G * NOPS, last_acc[0] - first_acc[0] + 1);
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
