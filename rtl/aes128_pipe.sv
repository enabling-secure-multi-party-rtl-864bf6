// aes128_pipe: fully pipelined AES-128 encryption, used as the PRF of a party.
//
// Both the plaintext and the key enter with every block, so consecutive
// blocks may use different keys (the correlated-randomness unit alternates its
// two keys cycle by cycle). The round keys are expanded in the pipeline next to
// the data. Stage 0 registers pt ^ key; each of the ten rounds then takes two
// register stages: SubBytes+ShiftRows (next round key computed alongside), then
// MixColumns (skipped in round 10) and AddRoundKey. Latency is therefore 21
// cycles from in_valid to out_valid and one block is accepted every cycle; the
// pipeline never stalls. The 21-cycle latency and one-output-per-cycle rate
// follow the document; the stage split is this design's own.
module aes128_pipe #(
  parameter int unsigned TAG_W = 1          // side information carried with each block
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [127:0]       in_key,
  input  logic [127:0]       in_pt,
  input  logic [TAG_W-1:0]   in_tag,
  output logic               out_valid,
  output logic [127:0]       out_ct,
  output logic [TAG_W-1:0]   out_tag
);
  import aes_pkg::*;

  localparam int unsigned STAGES = 21;

  // s[k], key[k], v[k], tag[k]: contents of register stage k (0..20).
  block_t           st  [STAGES];
  block_t           rk  [STAGES];
  logic             vld [STAGES];
  logic [TAG_W-1:0] tg  [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < STAGES; k++) vld[k] <= 1'b0;
    end else begin
      vld[0] <= in_valid;
      for (int k = 1; k < STAGES; k++) vld[k] <= vld[k-1];
    end
  end

  always_ff @(posedge clk) begin
    st[0] <= in_pt ^ in_key;
    rk[0] <= in_key;
    tg[0] <= in_tag;
    for (int k = 1; k < STAGES; k++) tg[k] <= tg[k-1];
  end

  for (genvar r = 1; r <= 10; r++) begin : g_round
    localparam int unsigned SA = 2*r - 1;   // after SubBytes/ShiftRows
    localparam int unsigned SB = 2*r;       // after MixColumns/AddRoundKey
    localparam logic [7:0]  RC = rcon(r);

    block_t     sub;
    logic [31:0] w3, sw;

    // SubBytes on the state
    for (genvar b = 0; b < 16; b++) begin : g_sb
      aes_sbox u_sbox (.in_byte(st[SA-1][127 - 8*b -: 8]), .out_byte(sub[127 - 8*b -: 8]));
    end
    // SubWord(RotWord(w3)) for the key schedule
    assign w3 = rk[SA-1][31:0];
    for (genvar b = 0; b < 4; b++) begin : g_kb
      aes_sbox u_sbox (.in_byte(w3[31 - 8*((b + 1) % 4) -: 8]), .out_byte(sw[31 - 8*b -: 8]));
    end

    logic [31:0] n0, n1, n2, n3;
    assign n0 = rk[SA-1][127:96] ^ sw ^ {RC, 24'h0};
    assign n1 = rk[SA-1][95:64] ^ n0;
    assign n2 = rk[SA-1][63:32] ^ n1;
    assign n3 = rk[SA-1][31:0]  ^ n2;

    always_ff @(posedge clk) begin
      st[SA] <= shift_rows(sub);
      rk[SA] <= {n0, n1, n2, n3};
      st[SB] <= ((r == 10) ? st[SA] : mix_columns(st[SA])) ^ rk[SA];
      rk[SB] <= rk[SA];
    end
  end

  assign out_valid = vld[STAGES-1];
  assign out_ct    = st[STAGES-1];
  assign out_tag   = tg[STAGES-1];
endmodule
