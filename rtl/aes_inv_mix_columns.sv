// aes_inv_mix_columns: the InvMixColumns transformation of the inverse round.
//
// Each column is multiplied in GF(2^8) by the inverse circulant matrix
//   [0E 0B 0D 09; 09 0E 0B 0D; 0D 09 0E 0B; 0B 0D 09 0E].
// The products are built from repeated xtime: with x2 = 2a, x4 = 4a, x8 = 8a,
// 9a = x8^a, 0Ba = x8^x2^a, 0Da = x8^x4^a, 0Ea = x8^x4^x2. Combinational.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  typedef struct packed {
    byte_t m9, mb, md, me;
  } mults_t;

  function automatic mults_t mults(byte_t a);
    byte_t x2, x4, x8;
    x2 = xtime(a);
    x4 = xtime(x2);
    x8 = xtime(x4);
    return '{m9: x8 ^ a, mb: x8 ^ x2 ^ a, md: x8 ^ x4 ^ a, me: x8 ^ x4 ^ x2};
  endfunction

  function automatic word_t inv_mix_col(word_t col);
    mults_t m0, m1, m2, m3;
    m0 = mults(col[31:24]);
    m1 = mults(col[23:16]);
    m2 = mults(col[15:8]);
    m3 = mults(col[7:0]);
    return { m0.me ^ m1.mb ^ m2.md ^ m3.m9,
             m0.m9 ^ m1.me ^ m2.mb ^ m3.md,
             m0.md ^ m1.m9 ^ m2.me ^ m3.mb,
             m0.mb ^ m1.md ^ m2.m9 ^ m3.me };
  endfunction

  for (genvar c = 0; c < 4; c++) begin : g_col
    assign state_out[127 - 32*c -: 32] = inv_mix_col(state_in[127 - 32*c -: 32]);
  end

endmodule
