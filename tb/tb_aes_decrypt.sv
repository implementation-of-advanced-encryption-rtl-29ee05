// tb_aes_decrypt: the decryption datapath with an ideal round-key store.
//
// Instances for Nr = 10 and the default Nr = 14 are started with round key Nr
// on key_last, as the key expansion forwards it, and read the other round keys
// from the reference schedule. Checked: the state after every
// AddRoundKey+InvMixColumns edge against the reference inverse rounds, the
// plaintext of the four NIST SP 800-38A blocks and of random blocks, and that
// done rises exactly 2*Nr-1 = 19 / 27 edges after start. For NIST block 1 the
// state after inverse round 1 is also checked against the worked example
// (8333f0af...).
module tb_aes_decrypt;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  u128        ct, klast[2], rk[2], out[2];
  logic [3:0] idx[2];
  logic       done[2];
  u128        keys[2][15];

  aes_decrypt #(.NR(10)) dut10 (.clk, .rst_n, .start, .block_in(ct), .key_last(klast[0]),
    .rk_idx(idx[0]), .rk(rk[0]), .block_out(out[0]), .done(done[0]));
  aes_decrypt dut14 (.clk, .rst_n, .start, .block_in(ct), .key_last(klast[1]),
    .rk_idx(idx[1]), .rk(rk[1]), .block_out(out[1]), .done(done[1]));

  always_comb for (int d = 0; d < 2; d++) rk[d] = (idx[d] < 15) ? keys[d][idx[d]] : '0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs both instances on the same ciphertext under their own keys.
  task automatic run(u128 c, logic [255:0] k128, logic [255:0] k256, u128 want128, u128 want256,
                    u128 want_r1 = '0);
    u128 rs [2][15];   // reference state after inverse round j (j = 1..Nr)
    int  nr[2] = '{10, 14};
    int  done_at[2] = '{-1, -1};
    expand(k128, 4, keys[0]);
    expand(k256, 8, keys[1]);
    for (int d = 0; d < 2; d++) begin
      rs[d][0] = c ^ keys[d][nr[d]];
      for (int j = 1; j < nr[d]; j++)
        rs[d][j] = mix_columns(sub_bytes(shift_rows(rs[d][j-1], 1), 1) ^ keys[d][nr[d]-j], 1);
      rs[d][nr[d]] = sub_bytes(shift_rows(rs[d][nr[d]-1], 1), 1) ^ keys[d][0];
    end
    checks += 2;
    if (want128 != 0 && rs[0][10] !== want128) begin failures++; $display("FAIL reference AES-128"); end
    if (want256 != 0 && rs[1][14] !== want256) begin failures++; $display("FAIL reference AES-256"); end
    ct = c; klast[0] = keys[0][10]; klast[1] = keys[1][14];
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    ct = rand128(); klast = '{rand128(), rand128()};   // only sampled at start
    for (int e = 1; e <= 30; e++) begin
      @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        if (e % 2 == 0 && e / 2 < nr[d]) begin
          checks++;
          if (out[d] !== rs[d][e/2]) begin
            failures++; $display("FAIL nr=%0d inv round %0d state %h want %h", nr[d], e/2, out[d], rs[d][e/2]);
          end
        end
        if (done[d] && done_at[d] < 0) done_at[d] = e;
      end
      if (e == 2 && want_r1 != 0) begin         // worked example: state entering inverse round 2
        checks++;
        if (out[0] !== want_r1) begin failures++; $display("FAIL example inverse round 1: %h", out[0]); end
      end
    end
    for (int d = 0; d < 2; d++) begin
      checks += 2;
      if (done_at[d] != 2*nr[d] - 1) begin failures++; $display("FAIL nr=%0d done after %0d edges", nr[d], done_at[d]); end
      if (out[d] !== rs[d][nr[d]]) begin failures++; $display("FAIL nr=%0d pt %h want %h", nr[d], out[d], rs[d][nr[d]]); end
    end
  endtask

  initial begin
    ct = '0; klast = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      run(NIST_CT128[i], NIST_KEY128, {rand128(), rand128()}, NIST_PT[i], '0,
          (i == 0) ? 128'h8333f0afff15a6edc191b409770e815e : '0);
      run(NIST_CT256[i], {rand128(), 128'h0}, NIST_KEY256, '0, NIST_PT[i]);
    end
    for (int i = 0; i < 10; i++) begin
      logic [255:0] k1, k2;
      u128 p;
      k1 = {rand128(), 128'h0}; k2 = {rand128(), rand128()}; p = rand128();
      run(encrypt(p, k1, 4), k1, k2, p, '0);
      run(encrypt(p, k2, 8), k1, k2, '0, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
