// aes_ref_pkg: behavioural AES reference used by the testbenches.
//
// Written from the mathematical definition rather than from the RTL tables:
// the S-box is computed as the GF(2^8) multiplicative inverse (by search)
// followed by the affine transform, multiplication is shift-and-add modulo
// x^8+x^4+x^3+x+1, and the round constants are successive powers of {02}.
// Blocks are 128-bit values with byte 0 in bits [127:120], column-major.
// Also holds the NIST SP 800-38A ECB test vectors (four blocks, two keys).
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [31:0]  u32;
  typedef logic [127:0] u128;

  function automatic u8 gmul(u8 a, u8 b);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic u8 ginv(u8 a);
    if (a == 0) return 0;
    for (int b = 1; b < 256; b++) if (gmul(a, u8'(b)) == 8'h01) return u8'(b);
    return 0;
  endfunction

  function automatic u8 rotl8(u8 x, int n);
    return u8'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic u8 sbox(u8 a);
    u8 b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic u8 inv_sbox(u8 a);
    for (int x = 0; x < 256; x++) if (sbox(u8'(x)) == a) return u8'(x);
    return 0;
  endfunction

  // Tables filled once by init() to keep the reference fast.
  u8 S [256];
  u8 IS[256];
  bit ready = 0;
  function automatic void init();
    if (ready) return;
    for (int x = 0; x < 256; x++) S[x] = sbox(u8'(x));
    for (int x = 0; x < 256; x++) IS[S[x]] = u8'(x);
    ready = 1;
  endfunction

  function automatic u8 gb(u128 s, int n); return s[127 - 8*n -: 8]; endfunction

  function automatic u128 sub_bytes(u128 s, bit inv);
    u128 o;
    init();
    for (int n = 0; n < 16; n++) o[127 - 8*n -: 8] = inv ? IS[gb(s, n)] : S[gb(s, n)];
    return o;
  endfunction

  function automatic u128 shift_rows(u128 s, bit inv);
    u128 o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = gb(s, 4 * ((inv ? (c - r + 4) : (c + r)) % 4) + r);
    return o;
  endfunction

  function automatic u128 mix_columns(u128 s, bit inv);
    u8 m [4];
    u128 o;
    m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        u8 v = 0;
        for (int k = 0; k < 4; k++) v ^= gmul(m[(k - r + 4) % 4], gb(s, 4*c + k));
        o[127 - 8*(4*c + r) -: 8] = v;
      end
    return o;
  endfunction

  // Round keys 0..nr of a key of nk words (nk = 4 or 8), key in the MSBs.
  function automatic void expand(input logic [255:0] key, input int nk, output u128 rk [15]);
    u32 w [60];
    u8  rc = 8'h01;
    int nr = nk + 6;
    init();
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    for (int i = nk; i < 4*(nr + 1); i++) begin
      u32 t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {S[t[31:24]], S[t[23:16]], S[t[15:8]], S[t[7:0]]} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = {S[t[31:24]], S[t[23:16]], S[t[15:8]], S[t[7:0]]};
      end
      w[i] = w[i-nk] ^ t;
    end
    for (int r = 0; r < 15; r++) rk[r] = (r <= nr) ? {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]} : '0;
  endfunction

  function automatic u128 encrypt(u128 pt, logic [255:0] key, int nk);
    u128 rk [15];
    u128 s;
    int nr = nk + 6;
    expand(key, nk, rk);
    s = pt ^ rk[0];
    for (int r = 1; r < nr; r++) s = mix_columns(shift_rows(sub_bytes(s, 0), 0), 0) ^ rk[r];
    return shift_rows(sub_bytes(s, 0), 0) ^ rk[nr];
  endfunction

  function automatic u128 decrypt(u128 ct, logic [255:0] key, int nk);
    u128 rk [15];
    u128 s;
    int nr = nk + 6;
    expand(key, nk, rk);
    s = ct ^ rk[nr];
    for (int r = nr - 1; r > 0; r--) s = mix_columns(sub_bytes(shift_rows(s, 1), 1) ^ rk[r], 1);
    return sub_bytes(shift_rows(s, 1), 1) ^ rk[0];
  endfunction

  // NIST SP 800-38A, F.1.1 and F.1.5 (ECB-AES128 / ECB-AES256).
  localparam logic [255:0] NIST_KEY128 = {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0};
  localparam logic [255:0] NIST_KEY256 =
    256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
  localparam u128 NIST_PT [4] = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
                                  128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  localparam u128 NIST_CT128 [4] = '{128'h3ad77bb40d7a3660a89ecaf32466ef97, 128'hf5d3d58503b9699de785895a96fdbaaf,
                                     128'h43b1cd7f598ece23881b00e3ed030688, 128'h7b0c785e27e8ad3f8223207104725dd4};
  localparam u128 NIST_CT256 [4] = '{128'hf3eed1bdb5d2a03c064b5a7e3db181f8, 128'h591ccb10d410ed26dc5ba74a31362870,
                                     128'hb6ed21b99ca6f4f9f153e7b1beafed1d, 128'h23304b7a39f9f3ff067d8d8f9e24ecc7};

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
