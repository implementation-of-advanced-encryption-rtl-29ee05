// aes_key_expansion: Rijndael key schedule, one 128-bit round key per cycle.
//
// On start the cipher key is loaded into a window register that always holds
// the most recent Nk words of the expanded key (Nk = KEY_BITS/32, 4 or 8). In
// every following cycle the four next words w[i..i+3] (i = 4*idx) are formed
// from that window and presented on wr_key with wr_idx = idx:
//   t    = SubWord(RotWord(w[i-1])) ^ Rcon[i/Nk]   when i mod Nk == 0
//   t    = SubWord(w[i-1])                         when Nk == 8, i mod Nk == 4
//   w[i] = w[i-Nk] ^ t,  w[i+k] = w[i+k-Nk] ^ w[i+k-1]  (k = 1..3)
// and the window shifts by four words. The round keys that are the cipher key
// itself (k0, and k1 for a 256-bit key) are not presented here; the key store
// loads them directly at start. So generation takes Nr+1-Nk/4 cycles: 10 for
// AES-128 and 13 for AES-256, round key Nr appearing with wr_last on the last.
// Timing: start sampled at edge 0, round key Nk/4 presented in the cycle after
// edge 0 and written at edge 1, ..., round key Nr written at edge Nr+1-Nk/4.
// The Rcon table, RotWord, SubWord and one-key-per-cycle rate follow the AES
// key schedule; the window register organisation is this design's own.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [KEY_BITS-1:0] key,
  output logic                wr_en,
  output logic [3:0]          wr_idx,
  output block_t              wr_key,
  output logic                wr_last,
  output logic                busy
);

  localparam int unsigned NK   = KEY_BITS / 32;
  localparam int unsigned NR   = NK + 6;
  localparam int unsigned NPRE = NK / 4;

  initial begin
    assert (KEY_BITS == 128 || KEY_BITS == 256)
      else $fatal(1, "aes_key_expansion supports 128- and 256-bit keys only");
  end

  logic [KEY_BITS-1:0] win;
  logic [3:0]          idx;

  // Oldest word of the window is word 0 (most significant).
  function automatic word_t win_word(logic [KEY_BITS-1:0] w, int unsigned n);
    return w[KEY_BITS - 1 - 32*n -: 32];
  endfunction

  word_t prev, sub_in, sub_out, t;
  word_t n0, n1, n2, n3;
  logic  use_rot;
  byte_t rcon;

  // i mod Nk == 0 happens for every idx when Nk == 4, for even idx when Nk == 8.
  assign use_rot = (NK == 4) ? 1'b1 : ~idx[0];
  assign prev    = win[31:0];
  assign sub_in  = use_rot ? {prev[23:0], prev[31:24]} : prev;

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (.in_byte(sub_in[31 - 8*b -: 8]), .out_byte(sub_out[31 - 8*b -: 8]));
  end

  always_comb begin
    int unsigned ri;
    ri   = (NK == 4) ? int'(idx) : int'(idx) / 2;
    rcon = (ri >= 1 && ri <= 10) ? RCON[ri] : 8'h00;
  end

  assign t  = use_rot ? (sub_out ^ {rcon, 24'h0}) : sub_out;
  assign n0 = win_word(win, 0) ^ t;
  assign n1 = win_word(win, 1) ^ n0;
  assign n2 = win_word(win, 2) ^ n1;
  assign n3 = win_word(win, 3) ^ n2;

  assign wr_en   = busy;
  assign wr_idx  = idx;
  assign wr_key  = {n0, n1, n2, n3};
  assign wr_last = busy && (idx == 4'(NR));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      win  <= '0;
    end else if (start) begin
      busy <= 1'b1;
      idx  <= 4'(NPRE);
      win  <= key;
    end else if (busy) begin
      win  <= KEY_BITS'({win, wr_key});   // drop the oldest four words
      idx  <= idx + 4'd1;
      busy <= (idx != 4'(NR));
    end
  end

endmodule
