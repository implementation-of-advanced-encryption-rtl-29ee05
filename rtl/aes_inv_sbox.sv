// aes_inv_sbox: the inverse Rijndael substitution box for one byte.
//
// A 256-entry read-only table (aes_pkg::INV_SBOX) that undoes aes_sbox:
// INV_SBOX[SBOX[x]] == x for every byte x. Purely combinational.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  assign out_byte = INV_SBOX[in_byte];

endmodule
