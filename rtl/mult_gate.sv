// mult_gate: AND / multiplication primitive of one party (party i).
//
// Step 1 (local): with input shares (x_i, a_i), (y_i, b_i) and a correlated
// random alpha_i it computes
//   Boolean:    r_i = (x_i & y_i) ^ (a_i & b_i) ^ alpha_i
//   arithmetic: r_i = (a_i*b_i - x_i*y_i + alpha_i) * q,  q*3 = 1 mod 2^128
// registers it, sends it to party i+1 on r_out and keeps it in a pending FIFO.
// Step 2 (after the exchange): when r_(i-1) from party i-1 is in the receive
// FIFO, the pair is popped and the output share is
//   Boolean:    z_i = r_i ^ r_(i-1),        c_i = r_i
//   arithmetic: z_i = r_(i-1) - r_i,         c_i = -2*r_(i-1) - r_i
// The equations follow the document. Both FIFOs, the handshakes and the
// overflow flag are this design's own: they let parties that run skewed by a
// few cycles still pair the right r values, because every party handles its
// operations in the same order.
//
// Interface: valid/ready on the operation input and the result output; the
// alpha port pops the correlated-randomness FIFO; the ring port r_out / r_in
// has no back-pressure. Timing: one operation per cycle when alpha is
// available; in lockstep the result appears 3 cycles after acceptance.
// rx_overflow is a sticky error set if r_(i-1) arrives with the receive FIFO
// full, which cannot happen while no party runs more than RX_DEPTH - 3
// operations ahead of its successor.
module mult_gate #(
  parameter int unsigned PEND_DEPTH = 4,
  parameter int unsigned RX_DEPTH   = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // operation
  input  logic                         in_valid,
  output logic                         in_ready,
  input  mpc_pkg::mode_e               in_mode,
  input  logic [mpc_pkg::TAG_W-1:0]    in_tag,
  input  mpc_pkg::share_t              in_p,      // (x_i, a_i)
  input  mpc_pkg::share_t              in_q,      // (y_i, b_i)
  // correlated randomness
  input  logic                         alpha_valid,
  output logic                         alpha_pop,
  output mpc_pkg::mode_e               alpha_mode,
  input  mpc_pkg::word_t               alpha,
  // ring: to party i+1, from party i-1
  output logic                         r_out_valid,
  output mpc_pkg::word_t               r_out,
  input  logic                         r_in_valid,
  input  mpc_pkg::word_t               r_in,
  // result
  output logic                         out_valid,
  input  logic                         out_ready,
  output mpc_pkg::mode_e               out_mode,
  output logic [mpc_pkg::TAG_W-1:0]    out_tag,
  output mpc_pkg::share_t              out_s,     // (z_i, c_i)
  output logic                         rx_overflow
);
  import mpc_pkg::*;

  localparam int unsigned PW = $clog2(PEND_DEPTH + 1);
  localparam int unsigned PEND_W = 1 + TAG_W + N;   // mode, tag, r_i

  // ---- step 1: r_i ----
  word_t        r_comb;
  logic         r_vld;
  mode_e        r_mode;
  logic [TAG_W-1:0] r_tag;
  logic [PW-1:0] pend_count;
  logic         pend_empty, pend_full, pend_pop;
  logic [PEND_W-1:0] pend_head;

  always_comb begin
    if (in_mode == MODE_BOOL)
      r_comb = (in_p.x & in_q.x) ^ (in_p.a & in_q.a) ^ alpha;
    else
      r_comb = (in_p.a * in_q.a - in_p.x * in_q.x + alpha) * INV3;
  end

  // room for the operation in flight in r_out plus the new one
  assign in_ready   = alpha_valid && (32'(pend_count) + 32'(r_vld) < PEND_DEPTH);
  assign alpha_pop  = in_valid && in_ready;
  assign alpha_mode = in_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_vld <= 1'b0;
    else        r_vld <= in_valid && in_ready;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      r_out  <= r_comb;
      r_mode <= in_mode;
      r_tag  <= in_tag;
    end
  end

  assign r_out_valid = r_vld;

  sync_fifo #(.WIDTH(PEND_W), .DEPTH(PEND_DEPTH)) u_pend (
    .clk, .rst_n,
    .push(r_vld), .wr_data({r_mode, r_tag, r_out}),
    .pop(pend_pop), .rd_data(pend_head),
    .full(pend_full), .empty(pend_empty), .count(pend_count)
  );

  // ---- exchange: r_(i-1) from party i-1 ----
  logic   rx_empty, rx_full, rx_push;
  word_t  rx_head;
  logic [$clog2(RX_DEPTH+1)-1:0] rx_count;

  assign rx_push = r_in_valid && !rx_full;

  sync_fifo #(.WIDTH(N), .DEPTH(RX_DEPTH)) u_rx (
    .clk, .rst_n,
    .push(rx_push), .wr_data(r_in),
    .pop(pend_pop), .rd_data(rx_head),
    .full(rx_full), .empty(rx_empty), .count(rx_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        rx_overflow <= 1'b0;
    else if (r_in_valid && rx_full)    rx_overflow <= 1'b1;
  end

  // ---- step 2: output share ----
  mode_e            h_mode;
  logic [TAG_W-1:0] h_tag;
  word_t            h_r;
  assign {h_mode, h_tag, h_r} = pend_head;

  assign pend_pop = !pend_empty && !rx_empty && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         out_valid <= 1'b0;
    else if (!out_valid || out_ready)   out_valid <= pend_pop;
  end

  always_ff @(posedge clk) begin
    if (pend_pop) begin
      out_mode <= h_mode;
      out_tag  <= h_tag;
      if (h_mode == MODE_BOOL) begin
        out_s.x <= h_r ^ rx_head;
        out_s.a <= h_r;
      end else begin
        out_s.x <= rx_head - h_r;
        out_s.a <= '0 - (rx_head << 1) - h_r;
      end
    end
  end

  a_rx_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) r_in_valid |-> !rx_full);
endmodule
