// share_split: turns a secret value v into three share tuples (x_i, a_i).
//
// Two random words x_1, x_2 are drawn from an RNG (eight 32-bit words, first
// word in the top bits of x_1) and the third is set so that the x values
// cancel: x_3 = x_1 ^ x_2 (Boolean) or x_3 = -(x_1 + x_2) (arithmetic). Each
// party then gets a_i = x_(i-1) ^ v (Boolean) or a_i = x_(i-1) - v
// (arithmetic), indices taken around the ring (party 1 uses x_3). Any two
// parties can recover v; a single one sees only random words. The sharing
// equations follow the document; the RNG word order and the handshake are
// this design's own. Output index 0..2 is party 1..3.
//
// Timing: an accepted value takes 8 cycles of RNG draws, then out_valid is
// held until out_ready.
module share_split #(
  parameter logic [79:0] SEED = 80'h0D1E_A1E5_5EC2_E7A5_0001
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  mpc_pkg::mode_e   in_mode,
  input  mpc_pkg::word_t   in_v,
  output logic             out_valid,
  input  logic             out_ready,
  output mpc_pkg::mode_e   out_mode,
  output mpc_pkg::share_t  out_share [3]
);
  import mpc_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_DRAW, S_OUT} state_e;

  state_e       state;
  logic [2:0]   nword;
  logic [255:0] pool;
  word_t        v_q;
  logic [31:0]  rword;
  logic         rng_en;

  rng32 #(.SEED(SEED)) u_rng (.clk, .rst_n, .en(rng_en), .out_word(rword));

  assign rng_en    = (state == S_DRAW);
  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      nword    <= '0;
      out_mode <= MODE_BOOL;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          state    <= S_DRAW;
          nword    <= '0;
          out_mode <= in_mode;
        end
        S_DRAW: begin
          nword <= nword + 1'b1;
          if (nword == 3'd7) state <= S_OUT;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && in_valid) v_q <= in_v;
    if (state == S_DRAW)             pool <= {pool[223:0], rword};
  end

  word_t x1, x2, x3;
  assign x1 = pool[255:128];
  assign x2 = pool[127:0];
  assign x3 = (out_mode == MODE_BOOL) ? (x1 ^ x2) : ('0 - (x1 + x2));

  assign out_share[0] = '{x: x1, a: ring_sub(out_mode, x3, v_q)};
  assign out_share[1] = '{x: x2, a: ring_sub(out_mode, x1, v_q)};
  assign out_share[2] = '{x: x3, a: ring_sub(out_mode, x2, v_q)};
endmodule
