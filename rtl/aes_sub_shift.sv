// aes_sub_shift: SubBytes and ShiftRows fused into one combinational stage.
//
// Sixteen S-boxes run in parallel, one per state byte. ShiftRows (row r rotated
// left by r positions) is nothing but wiring, so it is folded into the choice of
// which input byte feeds each S-box:
//   out s[r][c] = S( in s[r][(c + r) mod 4] ).
// Fusing the two steps lets one clock cycle do both, which is how the round
// takes two cycles in this design. Byte order: byte n of the 128-bit block
// (n = 0 in bits [127:120]) is s[n mod 4][n div 4].
module aes_sub_shift
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int unsigned SRC = 4 * ((c + r) % 4) + r;
      localparam int unsigned DST = 4 * c + r;
      aes_sbox u_sbox (
        .in_byte  (state_in[127 - 8*SRC -: 8]),
        .out_byte (state_out[127 - 8*DST -: 8])
      );
    end
  end

endmodule
