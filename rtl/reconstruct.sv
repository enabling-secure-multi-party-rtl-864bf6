// reconstruct: recovers a secret from the shares of two neighbouring parties.
//
// The output party takes z_(i-1) from party i-1 and c_i from party i and
// computes v = z_(i-1) ^ c_i (Boolean) or v = z_(i-1) - c_i (arithmetic,
// mod 2^128). The equations follow the document; the handshake is this
// design's own. Timing: one register stage, one value per cycle.
module reconstruct (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  mpc_pkg::mode_e in_mode,
  input  mpc_pkg::word_t in_z_prev,     // z_(i-1), from party i-1
  input  mpc_pkg::word_t in_c,          // c_i, from party i
  output logic           out_valid,
  input  logic           out_ready,
  output mpc_pkg::word_t out_v
);
  import mpc_pkg::*;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) out_v <= ring_sub(in_mode, in_z_prev, in_c);
  end
endmodule
