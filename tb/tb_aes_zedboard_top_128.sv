// tb_aes_zedboard_top_128: the board design built for AES-128.
//
// Only the clock is driven, as on the board. The testbench follows the whole
// power-up run: reset released by the configuration-initialised counter, one
// start pulse, key expansion, encryption, decryption and the LED value.
// Checked: the LEDs stay 0 until both results exist and then show 0x36
// (ciphertext 3ad7..., plaintext 6bc1...) and hold it; the full ciphertext
// and plaintext inside the core match NIST SP 800-38A; key expansion takes
// 10, encryption 19 and decryption 29 cycles after the start edge, and the
// LEDs change one cycle after that. Each mechanism (reset, start, encryption
// overlapping key expansion, decryption waiting for the last round key, LED
// update) is counted and must have happened.
module tb_aes_zedboard_top_128;
  import aes_ref_pkg::*;
  localparam int KB = 128;
  localparam logic [7:0] WANT_LED = 8'h36;
  localparam int WANT_KX = 10, WANT_ENC = 19, WANT_DEC = 29;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] led;
  always #5 clk = ~clk;

  aes_zedboard_top #(.KEY_BITS(128)) dut (.clk, .led);

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, start_at = -1, rst_rel = -1, kx_at = -1, enc_at = -1, dec_at = -1, led_at = -1;
  int n_overlap = 0, n_dec_wait = 0, n_led_dark = 0;

  initial begin
    for (cyc = 1; cyc <= 120; cyc++) begin
      @(negedge clk);
      if (dut.rst_n && rst_rel < 0) rst_rel = cyc;
      if (dut.start) start_at = cyc;                     // start sampled at the next edge
      if (start_at >= 0) begin
        if (dut.u_core.keys_ready && kx_at < 0)  kx_at  = cyc - start_at - 1;
        if (dut.u_core.enc_done   && enc_at < 0) enc_at = cyc - start_at - 1;
        if (dut.u_core.dec_done   && dec_at < 0) dec_at = cyc - start_at - 1;
        if (led != 0 && led_at < 0)              led_at = cyc - start_at - 1;
        if (cyc > start_at + 1 && !dut.u_core.keys_ready && !dut.u_core.enc_done) n_overlap++;
        if (cyc > start_at + 1 && !dut.u_core.keys_ready &&
            dut.u_core.u_dec.phase == aes_pkg::DEC_IDLE) n_dec_wait++;
      end
      if (led_at < 0) begin
        n_led_dark++;
        checks++;
        if (led != 8'h00) begin failures++; $display("FAIL LEDs lit early: %h", led); end
      end else begin
        checks++;
        if (led !== WANT_LED) begin failures++; $display("FAIL LEDs %h want %h", led, WANT_LED); end
      end
    end
    checks += 8;
    if (rst_rel < 0) begin failures++; $display("FAIL reset never released"); end
    if (start_at < 0) begin failures++; $display("FAIL no start pulse"); end
    if (kx_at != WANT_KX) begin failures++; $display("FAIL key expansion %0d cycles", kx_at); end
    if (enc_at != WANT_ENC) begin failures++; $display("FAIL encryption %0d cycles", enc_at); end
    if (dec_at != WANT_DEC) begin failures++; $display("FAIL decryption %0d cycles", dec_at); end
    if (led_at != WANT_DEC + 1) begin failures++; $display("FAIL LEDs lit %0d cycles after start", led_at); end
    if (dut.u_core.ct_out !== ((KB == 128) ? NIST_CT128[0] : NIST_CT256[0])) begin
      failures++; $display("FAIL ciphertext %h", dut.u_core.ct_out);
    end
    if (dut.u_core.pt_out !== NIST_PT[0]) begin failures++; $display("FAIL plaintext %h", dut.u_core.pt_out); end
    checks += 3;
    if (n_overlap == 0)  begin failures++; $display("FAIL encryption never overlapped key expansion"); end
    if (n_dec_wait == 0) begin failures++; $display("FAIL decryption never waited for the last key"); end
    if (n_led_dark == 0) begin failures++; $display("FAIL LEDs never dark"); end
    $display("reset released at %0d, start at %0d; kx %0d enc %0d dec %0d led %0d; overlap %0d, dec wait %0d",
             rst_rel, start_at, kx_at, enc_at, dec_at, led_at, n_overlap, n_dec_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
