// corr_rand: correlated randomness (alpha_i) for the AND/MUL primitive.
//
// Every party runs AES-128 in counter mode as a PRF under two keys: its own
// K_i and its neighbour's K_(i+1). The counter ("ID") starts at 0 in every
// party and advances in lockstep, so party i+1 computes the same PRF(K_(i+1), ID)
// value without any communication. For each ID the pair
// (PRF(K_i, ID), PRF(K_(i+1), ID)) is stored in a FIFO and turned into
//   alpha_i = PRF(K_i) xor PRF(K_(i+1))   (Boolean)
//   alpha_i = PRF(K_i) -   PRF(K_(i+1))   (arithmetic, mod 2^128)
// at the moment it is consumed, in the mode the consumer asks for. The three
// alphas of one ID then XOR (or sum) to zero across the parties.
//
// NUM_AES = 1: one AES core alternates the two keys cycle by cycle and the ID
// advances every second cycle: one alpha per 2 cycles. NUM_AES = 2: two cores,
// one alpha per cycle. Generation starts when keys_ready rises and runs ahead
// of demand until the FIFO (DEPTH entries, in-flight blocks included) is full.
// The first alpha is available 21 cycles (AES latency) plus one (NUM_AES = 2)
// or two (NUM_AES = 1) cycles after keys_ready. The PRF, counter mode, key
// alternation, ID stepping and the two combining functions follow the
// document; the FIFO and the per-use choice of mode are this design's own.
module corr_rand #(
  parameter int unsigned NUM_AES = 1,       // 1: shared, alternating core; 2: one core per key
  parameter int unsigned DEPTH   = 32       // alphas held or in flight; >= 23 keeps the AES busy
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           keys_ready,
  input  logic [127:0]   key_own,
  input  logic [127:0]   key_nbr,
  // consumer side
  output logic           alpha_valid,
  input  logic           alpha_pop,
  input  mpc_pkg::mode_e alpha_mode,
  output mpc_pkg::word_t alpha,
  // status
  output logic [127:0]   id_count        // next ID to be issued
);
  import mpc_pkg::*;

  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [CW-1:0]  fifo_count;
  logic [CW-1:0]  inflight;
  logic           issue;              // a new ID enters the PRF
  logic           push;
  logic [255:0]   push_data, head;
  logic           fifo_empty, fifo_full;
  logic           phase_busy;         // single core: the second key of the current ID uses this cycle

  assign issue = keys_ready && (32'(inflight) + 32'(fifo_count) < DEPTH) && !phase_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inflight <= '0;
      id_count <= '0;
    end else begin
      inflight <= inflight + CW'(issue) - CW'(push);
      if (NUM_AES == 1) begin
        if (phase_busy) id_count <= id_count + 1'b1;
      end else if (issue) begin
        id_count <= id_count + 1'b1;
      end
    end
  end

  if (NUM_AES == 1) begin : g_one
    logic         ph;                       // 1: second half of the ID in progress
    logic         o_valid;
    logic [127:0] o_ct, p_own;
    logic         o_tag;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ph <= 1'b0;
      else        ph <= issue;
    end
    assign phase_busy = ph;

    aes128_pipe #(.TAG_W(1)) u_aes (
      .clk, .rst_n,
      .in_valid (issue || ph),
      .in_key   (ph ? key_nbr : key_own),
      .in_pt    (id_count),
      .in_tag   (ph),
      .out_valid(o_valid),
      .out_ct   (o_ct),
      .out_tag  (o_tag)
    );

    always_ff @(posedge clk) begin
      if (o_valid && !o_tag) p_own <= o_ct;
    end
    assign push      = o_valid && o_tag;
    assign push_data = {p_own, o_ct};
  end else begin : g_two
    logic         v0, v1;
    logic [127:0] c0, c1;
    logic         t0, t1;
    assign phase_busy = 1'b0;

    aes128_pipe #(.TAG_W(1)) u_aes_own (
      .clk, .rst_n, .in_valid(issue), .in_key(key_own), .in_pt(id_count), .in_tag(1'b0),
      .out_valid(v0), .out_ct(c0), .out_tag(t0)
    );
    aes128_pipe #(.TAG_W(1)) u_aes_nbr (
      .clk, .rst_n, .in_valid(issue), .in_key(key_nbr), .in_pt(id_count), .in_tag(1'b1),
      .out_valid(v1), .out_ct(c1), .out_tag(t1)
    );
    assign push      = v0;
    assign push_data = {c0, c1};

    a_paired: assert property (@(posedge clk) disable iff (!rst_n) (v0 == v1) && (!v0 || (!t0 && t1)));
  end

  sync_fifo #(.WIDTH(256), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push, .wr_data(push_data),
    .pop(alpha_pop), .rd_data(head),
    .full(fifo_full), .empty(fifo_empty), .count(fifo_count)
  );

  assign alpha_valid = !fifo_empty;
  assign alpha       = ring_sub(alpha_mode, head[255:128], head[127:0]);

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) alpha_pop |-> alpha_valid);
  a_no_full_push: assert property (@(posedge clk) disable iff (!rst_n) push |-> !fifo_full);
endmodule
