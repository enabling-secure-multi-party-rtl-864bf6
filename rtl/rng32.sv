// rng32: pseudo-random number generator with a 32-bit output word per cycle.
//
// A 43-bit Fibonacci LFSR (feedback taps 43, 42, 38, 37) runs next to a
// 37-bit hybrid cellular automaton (rule 90 in every cell, rule 150 in cell
// 28, null boundaries). Each cycle both step once and the output word is the
// XOR of their low 32 bits. Both registers load from SEED at reset, forced
// non-zero. The document only gives the 32-bit output width and the RNG's
// role (keys, share splitting); the generator structure is this design's own.
// It is not a cryptographic generator: a production build would use a
// hardware entropy source.
//
// Timing: out_word changes every cycle while en is high; it is a register.
module rng32 #(
  parameter logic [79:0] SEED = 80'h5EED_0123_4567_89AB_CDEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] out_word
);
  logic [42:0] lfsr;
  logic [36:0] ca;

  function automatic logic [36:0] ca_step(logic [36:0] c);
    logic [36:0] n;
    for (int i = 0; i < 37; i++) begin
      logic l, r;
      l = (i == 36) ? 1'b0 : c[i+1];
      r = (i == 0)  ? 1'b0 : c[i-1];
      n[i] = l ^ r ^ ((i == 28) ? c[i] : 1'b0);
    end
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= SEED[79:37] | 43'h1;
      ca   <= SEED[36:0]  | 37'h1;
    end else if (en) begin
      lfsr <= {lfsr[41:0], lfsr[42] ^ lfsr[41] ^ lfsr[37] ^ lfsr[36]};
      ca   <= ca_step(ca);
    end
  end

  assign out_word = lfsr[31:0] ^ ca[31:0];
endmodule
