// aes_sbox: the Rijndael substitution box for one byte.
//
// A 256-entry read-only table (aes_pkg::SBOX), indexed by the input byte. Each
// entry is the multiplicative inverse of the index in GF(2^8) followed by the
// AES affine transform. Purely combinational; an FPGA tool may place the table
// in LUTs or, if the caller registers around it, in block RAM.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  assign out_byte = SBOX[in_byte];

endmodule
