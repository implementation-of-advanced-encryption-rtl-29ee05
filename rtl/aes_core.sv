// aes_core: AES-128/AES-256 engine with concurrent encryption and decryption.
//
// A start pulse captures the cipher key, one plaintext block and one
// ciphertext block. From that edge three things run:
//   * aes_key_expansion generates the round keys, one per cycle, into
//     aes_round_key_ram (the cipher-key round keys are loaded at start);
//   * aes_encrypt starts at once, because encryption consumes round keys in
//     order and the schedule (one key per cycle) outpaces it (two cycles per
//     round);
//   * aes_decrypt waits: it needs round key Nr first, so it is started in the
//     cycle the key expansion produces that key, which is forwarded to it.
// Latencies, counted in clock edges after the edge that samples start:
//   key expansion 10 (AES-128) / 13 (AES-256); encryption 19 / 27;
//   decryption 29 / 40 (key expansion + 2*Nr-1).
// ct_out/enc_done and pt_out/dec_done hold until the next start.
// KEY_BITS selects 128 or 256; 256 is the default.
module aes_core
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [KEY_BITS-1:0] key,
  input  block_t              pt_in,
  input  block_t              ct_in,
  output block_t              ct_out,
  output logic                enc_done,
  output block_t              pt_out,
  output logic                dec_done,
  output logic                keys_ready
);

  localparam int unsigned NR = num_rounds(KEY_BITS);

  logic       kx_wr_en, kx_wr_last, kx_busy, dec_finished;
  logic [3:0] kx_wr_idx, enc_rk_idx, dec_rk_idx;
  block_t     kx_wr_key, enc_rk, dec_rk, ct_reg;

  aes_key_expansion #(.KEY_BITS(KEY_BITS)) u_kx (
    .clk, .rst_n, .start, .key,
    .wr_en(kx_wr_en), .wr_idx(kx_wr_idx), .wr_key(kx_wr_key),
    .wr_last(kx_wr_last), .busy(kx_busy)
  );

  aes_round_key_ram #(.KEY_BITS(KEY_BITS)) u_rk (
    .clk,
    .load(start), .load_key(key),
    .we(kx_wr_en), .waddr(kx_wr_idx), .wdata(kx_wr_key),
    .raddr_a(enc_rk_idx), .rdata_a(enc_rk),
    .raddr_b(dec_rk_idx), .rdata_b(dec_rk)
  );

  aes_encrypt #(.NR(NR)) u_enc (
    .clk, .rst_n, .start,
    .block_in(pt_in), .key0(key[KEY_BITS-1 -: 128]),
    .rk_idx(enc_rk_idx), .rk(enc_rk),
    .block_out(ct_out), .done(enc_done)
  );

  aes_decrypt #(.NR(NR)) u_dec (
    .clk, .rst_n, .start(kx_wr_last && !start),
    .block_in(ct_reg), .key_last(kx_wr_key),
    .rk_idx(dec_rk_idx), .rk(dec_rk),
    .block_out(pt_out), .done(dec_finished)
  );

  // The decryption datapath is only restarted when the last round key appears,
  // so its done flag is masked until then to drop at every start.
  assign dec_done = dec_finished && keys_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ct_reg     <= '0;
      keys_ready <= 1'b0;
    end else if (start) begin
      ct_reg     <= ct_in;
      keys_ready <= 1'b0;
    end else if (kx_wr_last) begin
      keys_ready <= 1'b1;
    end
  end

  // The encryption datapath must never use a round key that has not yet been
  // written: with one key per cycle against two cycles per round it cannot,
  // and this checks it. A key is used in MIXKEY and in the final SUBSHIFT.
  logic [3:0] written;   // round keys 0..written-1 are valid
  always_ff @(posedge clk) begin
    if (!rst_n)        written <= '0;
    else if (start)    written <= 4'(KEY_BITS / 128);
    else if (kx_wr_en) written <= kx_wr_idx + 4'd1;
  end
  assert property (@(posedge clk) disable iff (!rst_n)
                   (!start && (u_enc.phase == ENC_MIXKEY ||
                                (u_enc.phase == ENC_SUBSHIFT && enc_rk_idx == 4'(NR))))
                   |-> (enc_rk_idx < written))
    else $error("encryption read round key %0d before it was generated", enc_rk_idx);

  logic unused;
  assign unused = kx_busy;

endmodule
