// aes_add_round_key: AddRoundKey, the key-mixing step of every AES round.
//
// Addition in GF(2^8) is bitwise XOR, so the whole step is a 128-bit XOR of the
// state with the round key. It is its own inverse and is used unchanged by the
// inverse cipher. Combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
