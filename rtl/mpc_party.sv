// mpc_party: one compute party of the three-party secret-sharing engine.
//
// The host writes 512-bit messages, each holding two share tuples
// {x_i, a_i, y_i, b_i} (x_i in bits [511:384]) plus an operation: which
// primitive (XOR/ADD or AND/MUL) and which mode (Boolean or arithmetic). The
// party parses the message and hands it to that primitive; results (z_i, c_i)
// come back on one result port with the operation and the host's tag.
//
// Inside: an RNG feeds key_setup, which builds the party key and trades keys
// with the neighbours (key sent to party i-1, key of party i+1 received);
// corr_rand then pre-computes correlated randomness with AES-128 in counter
// mode; mult_gate exchanges r values with the neighbours (r_i sent to party
// i+1, r_(i-1) received); local_gate needs no communication. When both
// primitives have a result in the same cycle the AND/MUL one is returned first.
// The message contents, the one-gate-per-message flow, key and r passing and
// the PRF follow the document; the plain valid/ready message port (standing in
// for the platform's AXI bus), tag, result arbitration and buffer sizes are this
// design's own.
//
// Timing: after reset about 5 cycles of key generation, then keys_ready once
// the neighbour key arrived; the first AND/MUL can start about 23 cycles
// later. XOR/ADD: one per cycle, 1 cycle latency; AND/MUL: one per 2 cycles
// (NUM_AES = 1) or per cycle (NUM_AES = 2), 3 cycles latency in lockstep.
module mpc_party #(
  parameter logic [79:0] SEED        = 80'h1234_5678_9ABC_DEF0_1357,
  parameter int unsigned NUM_AES     = 1,
  parameter int unsigned ALPHA_DEPTH = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host message in
  input  logic                         cmd_valid,
  output logic                         cmd_ready,
  input  mpc_pkg::op_t                 cmd_op,
  input  logic [mpc_pkg::TAG_W-1:0]    cmd_tag,
  input  logic [511:0]                 cmd_data,
  // result out
  output logic                         res_valid,
  input  logic                         res_ready,
  output mpc_pkg::op_t                 res_op,
  output logic [mpc_pkg::TAG_W-1:0]    res_tag,
  output mpc_pkg::share_t              res_data,
  // key ring: to party i-1, from party i+1
  output logic                         key_out_valid,
  output logic [127:0]                 key_out,
  input  logic                         key_in_valid,
  input  logic [127:0]                 key_in,
  // r ring: to party i+1, from party i-1
  output logic                         r_out_valid,
  output mpc_pkg::word_t               r_out,
  input  logic                         r_in_valid,
  input  mpc_pkg::word_t               r_in,
  // status
  output logic                         keys_ready,
  output logic                         alpha_avail,
  output logic                         rx_overflow
);
  import mpc_pkg::*;

  // ---- key generation ----
  logic         rng_en;
  logic [31:0]  rng_word;
  logic [127:0] key_own, key_nbr;

  rng32 #(.SEED(SEED)) u_rng (.clk, .rst_n, .en(rng_en), .out_word(rng_word));

  key_setup u_keys (
    .clk, .rst_n,
    .rng_en, .rng_word,
    .key_out_valid, .key_out, .key_in_valid, .key_in,
    .key_own, .key_nbr, .keys_ready
  );

  // ---- correlated randomness ----
  logic   alpha_pop;
  mode_e  alpha_mode;
  word_t  alpha;
  logic [127:0] id_count;

  corr_rand #(.NUM_AES(NUM_AES), .DEPTH(ALPHA_DEPTH)) u_corr (
    .clk, .rst_n,
    .keys_ready, .key_own, .key_nbr,
    .alpha_valid(alpha_avail), .alpha_pop, .alpha_mode, .alpha,
    .id_count
  );

  // ---- message parsing ----
  share_t p_in, q_in;
  assign p_in = '{x: cmd_data[511:384], a: cmd_data[383:256]};
  assign q_in = '{x: cmd_data[255:128], a: cmd_data[127:0]};

  logic lg_in_ready, mg_in_ready;
  assign cmd_ready = (cmd_op.gate == GATE_MULT) ? mg_in_ready : lg_in_ready;

  // ---- primitives ----
  logic             lg_valid, lg_ready, mg_valid, mg_ready;
  mode_e            lg_mode, mg_mode;
  logic [TAG_W-1:0] lg_tag, mg_tag;
  share_t           lg_s, mg_s;

  local_gate u_local (
    .clk, .rst_n,
    .in_valid(cmd_valid && cmd_op.gate == GATE_LOCAL), .in_ready(lg_in_ready),
    .in_mode(cmd_op.mode), .in_tag(cmd_tag), .in_p(p_in), .in_q(q_in),
    .out_valid(lg_valid), .out_ready(lg_ready), .out_mode(lg_mode), .out_tag(lg_tag), .out_s(lg_s)
  );

  mult_gate u_mult (
    .clk, .rst_n,
    .in_valid(cmd_valid && cmd_op.gate == GATE_MULT), .in_ready(mg_in_ready),
    .in_mode(cmd_op.mode), .in_tag(cmd_tag), .in_p(p_in), .in_q(q_in),
    .alpha_valid(alpha_avail), .alpha_pop, .alpha_mode, .alpha,
    .r_out_valid, .r_out, .r_in_valid, .r_in,
    .out_valid(mg_valid), .out_ready(mg_ready), .out_mode(mg_mode), .out_tag(mg_tag), .out_s(mg_s),
    .rx_overflow
  );

  // ---- result return: AND/MUL first ----
  assign mg_ready  = res_ready;
  assign lg_ready  = res_ready && !mg_valid;
  assign res_valid = mg_valid || lg_valid;
  assign res_op    = mg_valid ? '{gate: GATE_MULT, mode: mg_mode} : '{gate: GATE_LOCAL, mode: lg_mode};
  assign res_tag   = mg_valid ? mg_tag : lg_tag;
  assign res_data  = mg_valid ? mg_s : lg_s;

  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd_op) && $stable(cmd_data) && $stable(cmd_tag));
endmodule
