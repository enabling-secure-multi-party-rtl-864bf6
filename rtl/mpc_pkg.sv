// mpc_pkg: types and constants shared by the three-party secret-sharing engine.
//
// A value is held as 128-bit words. In Boolean mode the 128 bits are 128
// independent one-bit secrets (XOR/AND gates); in arithmetic mode they are one
// element of the ring Z_(2^128) (ADD/MUL gates). Each party i holds a share
// tuple (x_i, a_i). The share width of 128 bits and the two modes follow the
// document; the tag field and the op encoding are this design's own choice.
package mpc_pkg;

  localparam int unsigned N = 128;              // share width, ring Z_(2^N)
  localparam int unsigned TAG_W = 8;            // host tag carried with each operation

  typedef logic [N-1:0] word_t;

  // Share tuple of one party: x_i and a_i (a_i derives from x_(i-1)).
  typedef struct packed {
    word_t x;
    word_t a;
  } share_t;

  typedef enum logic {
    MODE_BOOL  = 1'b0,   // XOR / AND over 128 independent bits
    MODE_ARITH = 1'b1    // ADD / MUL modulo 2^128
  } mode_e;

  typedef enum logic {
    GATE_LOCAL = 1'b0,   // XOR / ADD, no communication
    GATE_MULT  = 1'b1    // AND / MUL, one ring exchange
  } gate_e;

  typedef struct packed {
    gate_e gate;
    mode_e mode;
  } op_t;

  // Multiplicative inverse of 3 modulo 2^128: 3 * INV3 = 1 (mod 2^128).
  localparam word_t INV3 = {{31{4'hA}}, 4'hB};

  // "plus" of the selected mode: XOR for Boolean, addition for arithmetic.
  function automatic word_t ring_add(mode_e m, word_t p, word_t q);
    return (m == MODE_BOOL) ? (p ^ q) : (p + q);
  endfunction

  // "minus" of the selected mode: XOR for Boolean, subtraction for arithmetic.
  function automatic word_t ring_sub(mode_e m, word_t p, word_t q);
    return (m == MODE_BOOL) ? (p ^ q) : (p - q);
  endfunction

endpackage
