// aes_mix_columns: the MixColumns transformation of the AES round.
//
// Each of the four 32-bit columns (a0..a3, a0 in the most significant byte) is
// multiplied in GF(2^8) by the circulant matrix
//   [02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02].
// Multiplication by 02 is xtime (shift left, XOR 1B on carry); 03*a is
// xtime(a) ^ a. Purely combinational.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  function automatic word_t mix_col(word_t col);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = col;
    return { xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3,
             a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3,
             a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3),
             (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3) };
  endfunction

  for (genvar c = 0; c < 4; c++) begin : g_col
    assign state_out[127 - 32*c -: 32] = mix_col(state_in[127 - 32*c -: 32]);
  end

endmodule
