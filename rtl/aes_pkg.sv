// aes_pkg: AES-128 round functions (FIPS-197) used by the pipelined PRF core.
//
// The S-box is not stored as a table of numbers: sbox_calc derives each entry
// from its definition, the multiplicative inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 followed by the affine map b ^ rotl(b,1..4) ^ 0x63. The
// table SBOX is evaluated once, at elaboration time. A 128-bit state is taken as
// 16 bytes, byte 0 in bits [127:120], column c made of bytes 4c..4c+3.
package aes_pkg;

  typedef logic [127:0] block_t;

  function automatic logic [7:0] xtime(logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(logic [7:0] p, logic [7:0] q);
    logic [7:0] acc, t;
    acc = '0;
    t   = p;
    for (int i = 0; i < 8; i++) begin
      if (q[i]) acc = acc ^ t;
      t = xtime(t);
    end
    return acc;
  endfunction

  // S-box entry from its definition: inverse (b^254, 0 maps to 0), then affine map.
  function automatic logic [7:0] sbox_calc(logic [7:0] b);
    logic [7:0] inv, sq, r;
    inv = 8'h01;
    sq  = b;
    for (int i = 0; i < 8; i++) begin      // 254 = 0b1111_1110
      if (i != 0) inv = gf_mul(inv, sq);
      sq = gf_mul(sq, sq);
    end
    if (b == 8'h00) inv = 8'h00;
    r = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
            ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return r;
  endfunction

  // Whole S-box, entry i in bits [8*i +: 8], built once at elaboration.
  function automatic logic [2047:0] sbox_table();
    logic [2047:0] t;
    for (int i = 0; i < 256; i++) t[8*i +: 8] = sbox_calc(8'(i));
    return t;
  endfunction

  localparam logic [2047:0] SBOX = sbox_table();

  function automatic logic [7:0] get_byte(block_t s, int idx);
    return s[127 - 8*idx -: 8];
  endfunction

  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(r + 4*c) -: 8] = get_byte(s, r + 4*((c + r) % 4));
    return o;
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t o;
    logic [7:0] b0, b1, b2, b3;
    for (int c = 0; c < 4; c++) begin
      b0 = get_byte(s, 4*c);
      b1 = get_byte(s, 4*c + 1);
      b2 = get_byte(s, 4*c + 2);
      b3 = get_byte(s, 4*c + 3);
      o[127 - 8*(4*c)     -: 8] = xtime(b0) ^ (xtime(b1) ^ b1) ^ b2 ^ b3;
      o[127 - 8*(4*c + 1) -: 8] = b0 ^ xtime(b1) ^ (xtime(b2) ^ b2) ^ b3;
      o[127 - 8*(4*c + 2) -: 8] = b0 ^ b1 ^ xtime(b2) ^ (xtime(b3) ^ b3);
      o[127 - 8*(4*c + 3) -: 8] = (xtime(b0) ^ b0) ^ b1 ^ b2 ^ xtime(b3);
    end
    return o;
  endfunction

  // Round constant of round r (1..10).
  function automatic logic [7:0] rcon(int r);
    logic [7:0] v;
    v = 8'h01;
    for (int i = 1; i < r; i++) v = xtime(v);
    return v;
  endfunction

endpackage
