// aes_sbox: one AES S-box lookup in a 256-entry constant table.
//
// The table is aes_pkg::SBOX, which is computed at elaboration from the
// S-box definition, so the source holds no list of numbers. Combinational,
// no clock.
module aes_sbox (
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);
  assign out_byte = aes_pkg::SBOX[8*in_byte +: 8];
endmodule
