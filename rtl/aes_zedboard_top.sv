// aes_zedboard_top: board-level demonstration of the AES core on a Zedboard.
//
// After configuration the design runs the first NIST SP 800-38A ECB test case
// through aes_core: it encrypts plaintext 6bc1bee2... and decrypts the known
// ciphertext of that case under the same key. When both results are ready the
// eight LEDs show the first hex digit of the ciphertext (led[7:4]) and of the
// decrypted plaintext (led[3:0]): 0xF6 for AES-256 (ciphertext f3ee...), 0x36
// for AES-128 (ciphertext 3ad7...). The LEDs stay dark (0) until then.
// The only inputs are the board clock and, through register initial values
// loaded at configuration, a power-up reset: a 4-bit counter holds rst_n low
// for 8 cycles and gives one start pulse 14 cycles after configuration. This
// keeps the I/O to the clock plus 8 LEDs. Which test case, which LEDs and the
// key sizes follow the design being reproduced; the reset sequence is this
// implementation's own.
module aes_zedboard_top
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 256
) (
  input  logic       clk,
  output logic [7:0] led
);

  localparam logic [255:0] KEY_256 =
    256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;
  localparam logic [127:0] KEY_128 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam block_t PT1     = 128'h6bc1bee22e409f96e93d7e117393172a;
  localparam block_t CT1_128 = 128'h3ad77bb40d7a3660a89ecaf32466ef97;
  localparam block_t CT1_256 = 128'hf3eed1bdb5d2a03c064b5a7e3db181f8;

  // Key left-aligned in 256 bits; the core takes its top KEY_BITS bits.
  localparam logic [255:0] KEY = (KEY_BITS == 128) ? {KEY_128, 128'h0} : KEY_256;
  localparam block_t       CT1 = (KEY_BITS == 128) ? CT1_128 : CT1_256;

  logic [3:0] por_cnt = 4'd0;   // configuration value gives the power-up reset
  logic       rst_n, start;

  always_ff @(posedge clk) begin
    if (por_cnt != 4'hf) por_cnt <= por_cnt + 4'd1;
  end
  assign rst_n = por_cnt[3];
  assign start = (por_cnt == 4'he);

  block_t ct_out, pt_out;
  logic   enc_done, dec_done, keys_ready;

  aes_core #(.KEY_BITS(KEY_BITS)) u_core (
    .clk, .rst_n, .start,
    .key(KEY[255 -: KEY_BITS]), .pt_in(PT1), .ct_in(CT1),
    .ct_out, .enc_done, .pt_out, .dec_done, .keys_ready
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                     led <= 8'h00;
    else if (enc_done && dec_done)  led <= {ct_out[127:124], pt_out[127:124]};
    else                            led <= 8'h00;
  end

endmodule
