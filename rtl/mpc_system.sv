// mpc_system: top level of the three-party secret-sharing MPC engine.
//
// The engine evaluates Boolean (XOR/AND over 128 independent bits) and
// arithmetic (ADD/MUL modulo 2^128) gates on secret-shared data, following the
// honest-majority three-party protocol of Araki et al. It holds NUM_GROUPS
// groups of three compute parties. Within a group the parties form a ring:
// party j sends its r values to party j+1 and its PRF key to party j-1
// (indices mod 3). All parties sit on one device here, which is the tested
// configuration; across devices the two ring links would be carried by a
// network link instead of wires. Next to the groups sit a share-splitting
// dealer (secret -> three share tuples) and a reconstruction unit (two
// neighbouring shares -> secret), which the host uses at the start and the
// end of a computation.
//
// Party p = 3*g + j (group g, position j) has its own host message port
// (cmd_*), result port (res_*) and status bits; the host loads every party of
// a group with the same operation sequence. The NUM_GROUPS duplication mirrors
// how the document scaled its tests; the port layout is this design's own.
module mpc_system #(
  parameter int unsigned NUM_GROUPS = 1,
  parameter int unsigned NUM_AES    = 1,
  localparam int unsigned NP        = 3 * NUM_GROUPS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host message ports, one per party
  input  logic                         cmd_valid [NP],
  output logic                         cmd_ready [NP],
  input  mpc_pkg::op_t                 cmd_op    [NP],
  input  logic [mpc_pkg::TAG_W-1:0]    cmd_tag   [NP],
  input  logic [511:0]                 cmd_data  [NP],
  output logic                         res_valid [NP],
  input  logic                         res_ready [NP],
  output mpc_pkg::op_t                 res_op    [NP],
  output logic [mpc_pkg::TAG_W-1:0]    res_tag   [NP],
  output mpc_pkg::share_t              res_data  [NP],
  output logic                         keys_ready  [NP],
  output logic                         alpha_avail [NP],
  output logic                         rx_overflow [NP],
  // dealer: secret in, three share tuples out
  input  logic                         split_in_valid,
  output logic                         split_in_ready,
  input  mpc_pkg::mode_e               split_in_mode,
  input  mpc_pkg::word_t               split_in_v,
  output logic                         split_out_valid,
  input  logic                         split_out_ready,
  output mpc_pkg::mode_e               split_out_mode,
  output mpc_pkg::share_t              split_out_share [3],
  // output party: z_(i-1) and c_i in, secret out
  input  logic                         recon_in_valid,
  output logic                         recon_in_ready,
  input  mpc_pkg::mode_e               recon_in_mode,
  input  mpc_pkg::word_t               recon_in_z_prev,
  input  mpc_pkg::word_t               recon_in_c,
  output logic                         recon_out_valid,
  input  logic                         recon_out_ready,
  output mpc_pkg::word_t               recon_out_v
);
  import mpc_pkg::*;

  logic           key_v [NP];
  logic [127:0]   key_d [NP];
  logic           r_v   [NP];
  word_t          r_d   [NP];

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_group
    for (genvar j = 0; j < 3; j++) begin : g_party
      localparam int unsigned P     = 3*g + j;
      localparam int unsigned PREV  = 3*g + (j + 2) % 3;   // party j-1
      localparam int unsigned NEXT  = 3*g + (j + 1) % 3;   // party j+1
      localparam logic [79:0] SEED  = 80'hA5C3_96E1_7B2D_4F08_1E6D ^ (80'(P + 1) * 80'h9E37_79B9_7F4A_7C15_F39C);

      mpc_party #(.SEED(SEED), .NUM_AES(NUM_AES)) u_party (
        .clk, .rst_n,
        .cmd_valid(cmd_valid[P]), .cmd_ready(cmd_ready[P]), .cmd_op(cmd_op[P]),
        .cmd_tag(cmd_tag[P]), .cmd_data(cmd_data[P]),
        .res_valid(res_valid[P]), .res_ready(res_ready[P]), .res_op(res_op[P]),
        .res_tag(res_tag[P]), .res_data(res_data[P]),
        .key_out_valid(key_v[P]), .key_out(key_d[P]),
        .key_in_valid(key_v[NEXT]), .key_in(key_d[NEXT]),
        .r_out_valid(r_v[P]), .r_out(r_d[P]),
        .r_in_valid(r_v[PREV]), .r_in(r_d[PREV]),
        .keys_ready(keys_ready[P]), .alpha_avail(alpha_avail[P]), .rx_overflow(rx_overflow[P])
      );
    end
  end

  share_split u_dealer (
    .clk, .rst_n,
    .in_valid(split_in_valid), .in_ready(split_in_ready), .in_mode(split_in_mode), .in_v(split_in_v),
    .out_valid(split_out_valid), .out_ready(split_out_ready), .out_mode(split_out_mode),
    .out_share(split_out_share)
  );

  reconstruct u_recon (
    .clk, .rst_n,
    .in_valid(recon_in_valid), .in_ready(recon_in_ready), .in_mode(recon_in_mode),
    .in_z_prev(recon_in_z_prev), .in_c(recon_in_c),
    .out_valid(recon_out_valid), .out_ready(recon_out_ready), .out_v(recon_out_v)
  );
endmodule
