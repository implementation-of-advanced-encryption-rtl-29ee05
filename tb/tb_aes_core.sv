// tb_aes_core: the complete engine for both key sizes, end to end.
//
// An AES-128 and a default AES-256 instance each get one start per test: a
// key, a plaintext to encrypt and a ciphertext to decrypt. Checked per run:
//   * ciphertext and decrypted plaintext (NIST SP 800-38A vectors, then random
//     blocks and keys with the reference model);
//   * latencies in edges after the start edge: keys_ready 10 / 13,
//     enc_done 19 / 27, dec_done 29 / 40;
//   * that decryption started only once the last round key existed (it waits
//     for the key expansion) while encryption overlapped with it;
//   * back-to-back operation: a new start right after a result, and a start
//     that interrupts an operation in progress.
module tb_aes_core;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  int overlap_seen = 0, dec_wait_seen = 0, restart_seen = 0;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic [127:0] key128;
  logic [255:0] key256;
  u128  pt, ct[2], ct_out[2], pt_out[2];
  logic enc_done[2], dec_done[2], ready[2];

  aes_core #(.KEY_BITS(128)) dut128 (.clk, .rst_n, .start, .key(key128), .pt_in(pt), .ct_in(ct[0]),
    .ct_out(ct_out[0]), .enc_done(enc_done[0]), .pt_out(pt_out[0]), .dec_done(dec_done[0]), .keys_ready(ready[0]));
  aes_core dut256 (.clk, .rst_n, .start, .key(key256), .pt_in(pt), .ct_in(ct[1]),
    .ct_out(ct_out[1]), .enc_done(enc_done[1]), .pt_out(pt_out[1]), .dec_done(dec_done[1]), .keys_ready(ready[1]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] k1, logic [255:0] k2, u128 p, u128 c1, u128 c2, int abort_at = 0);
    int  at_ready[2] = '{-1, -1}, at_enc[2] = '{-1, -1}, at_dec[2] = '{-1, -1};
    int  want_r[2] = '{10, 13}, want_e[2] = '{19, 27}, want_d[2] = '{29, 40};
    logic [255:0] kk[2];
    kk[0] = {k1, 128'h0}; kk[1] = k2;
    key128 = k1; key256 = k2; pt = p; ct[0] = c1; ct[1] = c2;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    key128 = '0; key256 = '0; pt = '0; ct = '{default: '0};
    for (int e = 1; e <= 44; e++) begin
      if (abort_at != 0 && e == abort_at) return;     // caller restarts mid-operation
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        if (ready[d] && at_ready[d] < 0) at_ready[d] = e;
        if (enc_done[d] && at_enc[d] < 0) at_enc[d] = e;
        if (dec_done[d] && at_dec[d] < 0) at_dec[d] = e;
        // encryption busy while the schedule still runs
        if (!ready[d] && !enc_done[d] && e > 1) overlap_seen++;
        // decryption idle while keys are still being generated
        if (!ready[d] && d == 1 && dut256.u_dec.phase == aes_pkg::DEC_IDLE) dec_wait_seen++;
      end
    end
    for (int d = 0; d < 2; d++) begin
      u128 we, wd;
      we = encrypt(p, kk[d], d ? 8 : 4);
      wd = decrypt(d ? c2 : c1, kk[d], d ? 8 : 4);
      checks += 5;
      if (ct_out[d] !== we) begin failures++; $display("FAIL %0d-bit ct %h want %h", 128*(d+1), ct_out[d], we); end
      if (pt_out[d] !== wd) begin failures++; $display("FAIL %0d-bit pt %h want %h", 128*(d+1), pt_out[d], wd); end
      if (at_ready[d] != want_r[d]) begin failures++; $display("FAIL %0d-bit keys ready at %0d", 128*(d+1), at_ready[d]); end
      if (at_enc[d] != want_e[d]) begin failures++; $display("FAIL %0d-bit enc done at %0d", 128*(d+1), at_enc[d]); end
      if (at_dec[d] != want_d[d]) begin failures++; $display("FAIL %0d-bit dec done at %0d", 128*(d+1), at_dec[d]); end
    end
  endtask

  initial begin
    key128 = '0; key256 = '0; pt = '0; ct = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      run(NIST_KEY128[255:128], NIST_KEY256, NIST_PT[i], NIST_CT128[i], NIST_CT256[i]);
      checks += 4;
      if (ct_out[0] !== NIST_CT128[i]) begin failures++; $display("FAIL NIST AES-128 ct %0d", i); end
      if (ct_out[1] !== NIST_CT256[i]) begin failures++; $display("FAIL NIST AES-256 ct %0d", i); end
      if (pt_out[0] !== NIST_PT[i] || pt_out[1] !== NIST_PT[i]) begin failures++; $display("FAIL NIST pt %0d", i); end
      checks++;
      if (dut128.u_dec.phase != aes_pkg::DEC_IDLE) failures++;
    end
    // a start that interrupts an operation in flight, then a clean run
    run(rand128(), {rand128(), rand128()}, rand128(), rand128(), rand128(), 7);
    restart_seen++;
    for (int i = 0; i < 6; i++) begin
      u128 p = rand128();
      logic [127:0] k1 = rand128();
      logic [255:0] k2 = {rand128(), rand128()};
      run(k1, k2, p, encrypt(p, {k1, 128'h0}, 4), rand128());
      checks++;
      if (pt_out[0] !== p) begin failures++; $display("FAIL round trip AES-128"); end
    end
    checks += 3;
    if (overlap_seen == 0) begin failures++; $display("FAIL encryption never overlapped key expansion"); end
    if (dec_wait_seen == 0) begin failures++; $display("FAIL decryption never waited for keys"); end
    if (restart_seen == 0) failures++;
    $display("overlap cycles %0d, decrypt wait cycles %0d, restarts %0d", overlap_seen, dec_wait_seen, restart_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
