// aes_inv_sub_shift: InvShiftRows and InvSubBytes fused into one stage.
//
// Sixteen inverse S-boxes in parallel; InvShiftRows (row r rotated right by r)
// is folded into the wiring that feeds them:
//   out s[r][c] = InvS( in s[r][(c - r) mod 4] ).
// The two steps commute, so fusing them is exact. Purely combinational; one
// clock cycle of the inverse round. Byte order as in aes_sub_shift.
module aes_inv_sub_shift
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int unsigned SRC = 4 * ((c + 4 - r) % 4) + r;
      localparam int unsigned DST = 4 * c + r;
      aes_inv_sbox u_isbox (
        .in_byte  (state_in[127 - 8*SRC -: 8]),
        .out_byte (state_out[127 - 8*DST -: 8])
      );
    end
  end

endmodule
