// local_gate: XOR / addition primitive of one party.
//
// With input shares (x_i, a_i) and (y_i, b_i) the output share is
// z_i = x_i + y_i, c_i = a_i + b_i, where + is XOR in Boolean mode and
// addition modulo 2^128 in arithmetic mode. No communication is needed
// because the one-time pads of the shares add up the same way. The function
// follows the document; the handshake is this design's own.
//
// Interface: valid/ready on input and output, the tag travels with the
// operation. Timing: one register stage, one operation accepted per cycle
// while the output is free or being taken.
module local_gate (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  mpc_pkg::mode_e               in_mode,
  input  logic [mpc_pkg::TAG_W-1:0]    in_tag,
  input  mpc_pkg::share_t              in_p,      // (x_i, a_i)
  input  mpc_pkg::share_t              in_q,      // (y_i, b_i)
  output logic                         out_valid,
  input  logic                         out_ready,
  output mpc_pkg::mode_e               out_mode,
  output logic [mpc_pkg::TAG_W-1:0]    out_tag,
  output mpc_pkg::share_t              out_s      // (z_i, c_i)
);
  import mpc_pkg::*;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      out_mode <= in_mode;
      out_tag  <= in_tag;
      out_s.x  <= ring_add(in_mode, in_p.x, in_q.x);
      out_s.a  <= ring_add(in_mode, in_p.a, in_q.a);
    end
  end
endmodule
