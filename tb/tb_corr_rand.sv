// tb_corr_rand: three correlated-randomness units per configuration (one
// AES core shared by both keys, and two cores), keyed as in a ring: unit j owns
// K_j and holds K_(j+1). Checks that the alphas of one ID XOR (Boolean) or sum
// (arithmetic) to zero, that both configurations give the same sequence, one
// known value from published AES-128 answers (AES_K(0) for K = 0 and for
// K = 8000..0), the delay to the first alpha and the steady rate of one
// alpha per 2 cycles (one core) or per cycle (two cores).
module tb_corr_rand;
  import mpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NA = 300;
  logic [127:0] K [3];
  logic keys_ready;
  mode_e pop_mode [2];

  logic  av [2][3];
  logic  pop [2];
  word_t al [2][3];
  logic [127:0] idc [2][3];

  for (genvar s = 0; s < 2; s++) begin : g_set
    for (genvar j = 0; j < 3; j++) begin : g_u
      corr_rand #(.NUM_AES(s + 1)) dut (
        .clk, .rst_n, .keys_ready, .key_own(K[j]), .key_nbr(K[(j + 1) % 3]),
        .alpha_valid(av[s][j]), .alpha_pop(pop[s]), .alpha_mode(pop_mode[s]), .alpha(al[s][j]),
        .id_count(idc[s][j])
      );
    end
  end

  int cyc = 0, ready_cyc = 0;
  int first_av [2] = '{-1, -1};
  int npop [2] = '{0, 0};
  int win_pops [2] = '{0, 0};
  word_t rec [2][NA];
  mode_e rec_m [2][NA];
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar s = 0; s < 2; s++) begin : g_pop
    assign pop[s]      = av[s][0] && av[s][1] && av[s][2] && npop[s] < NA && cyc > ready_cyc + 60;
    assign pop_mode[s] = mode_e'((npop[s] / 5) % 2);
    always @(posedge clk) if (rst_n) begin
      if (first_av[s] < 0 && av[s][0]) first_av[s] = cyc;
      if (pop[s]) begin
        word_t t;
        checks++;
        t = (pop_mode[s] == MODE_BOOL) ? (al[s][0] ^ al[s][1] ^ al[s][2]) : (al[s][0] + al[s][1] + al[s][2]);
        if (t != '0) begin failures++; $display("FAIL set %0d alpha %0d does not cancel", s, npop[s]); end
        rec[s][npop[s]]   = al[s][0];
        rec_m[s][npop[s]] = pop_mode[s];
        if (cyc >= ready_cyc + 150 && cyc < ready_cyc + 350) win_pops[s]++;
        npop[s]++;
      end
    end
  end

  initial begin
    K[0] = 128'h8000_0000_0000_0000_0000_0000_0000_0000;
    K[1] = '0;
    K[2] = 128'h0F1E_2D3C_4B5A_6978_8796_A5B4_C3D2_E1F0;
    keys_ready = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (5) @(posedge clk);
    #1 keys_ready = 1'b1;
    ready_cyc = cyc;
    wait (npop[0] == NA && npop[1] == NA);
    // first ID of unit 0, Boolean: AES_K0(0) ^ AES_0(0)
    checks++;
    if (rec_m[0][0] != MODE_BOOL || rec[0][0] != (128'h0edd33d3c621e546455bd8ba1418bec8 ^ 128'h66e94bd4ef8a2c3b884cfa59ca342b2e)) begin
      failures++; $display("FAIL known alpha %h", rec[0][0]);
    end
    for (int k = 0; k < NA; k++) begin
      checks++;
      if (rec[0][k] != rec[1][k]) begin failures++; $display("FAIL sets differ at %0d", k); end
    end
    // issue at the first edge with keys_ready, 21 AES stages, pair/FIFO registers
    checks++;
    if (first_av[0] - ready_cyc != 23 || first_av[1] - ready_cyc != 22) begin
      failures++; $display("FAIL first alpha after %0d / %0d cycles", first_av[0] - ready_cyc, first_av[1] - ready_cyc);
    end
    checks++;
    if (win_pops[0] < 99 || win_pops[0] > 101 || win_pops[1] < 199) begin
      failures++; $display("FAIL rate: %0d and %0d alphas in 200 cycles", win_pops[0], win_pops[1]);
    end
    checks++;
    if (idc[0][0] < 128'(NA) || idc[1][0] < 128'(NA)) begin failures++; $display("FAIL id count"); end
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
