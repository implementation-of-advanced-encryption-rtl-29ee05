// tb_aes_encrypt: the encryption datapath with an ideal round-key store.
//
// Instances for Nr = 10 (AES-128) and the default Nr = 14 (AES-256) are fed
// round keys from the reference schedule through their rk_idx/rk port. Each
// run checks the state after every MixColumns+AddRoundKey edge against the
// reference round output (the round-1 result of NIST vector 1 is also checked
// against the worked example f265e8d5...), the ciphertext, and that done rises
// exactly 2*Nr-1 = 19 / 27 edges after the start edge. Vectors: the four NIST
// SP 800-38A blocks per key size and random blocks under random keys.
module tb_aes_encrypt;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  u128        pt, key0[2], rk[2], out[2];
  logic [3:0] idx[2];
  logic       done[2];
  u128        keys[2][15];

  aes_encrypt #(.NR(10)) dut10 (.clk, .rst_n, .start, .block_in(pt), .key0(key0[0]),
    .rk_idx(idx[0]), .rk(rk[0]), .block_out(out[0]), .done(done[0]));
  aes_encrypt dut14 (.clk, .rst_n, .start, .block_in(pt), .key0(key0[1]),
    .rk_idx(idx[1]), .rk(rk[1]), .block_out(out[1]), .done(done[1]));

  always_comb for (int d = 0; d < 2; d++) rk[d] = (idx[d] < 15) ? keys[d][idx[d]] : '0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(u128 p, logic [255:0] k128, logic [255:0] k256, u128 want128, u128 want256);
    u128 rs [2][15];   // reference state after round r
    int  nr[2] = '{10, 14};
    int  done_at[2] = '{-1, -1};
    expand(k128, 4, keys[0]);
    expand(k256, 8, keys[1]);
    for (int d = 0; d < 2; d++) begin
      rs[d][0] = p ^ keys[d][0];
      for (int r = 1; r < nr[d]; r++)
        rs[d][r] = mix_columns(shift_rows(sub_bytes(rs[d][r-1], 0), 0), 0) ^ keys[d][r];
      rs[d][nr[d]] = shift_rows(sub_bytes(rs[d][nr[d]-1], 0), 0) ^ keys[d][nr[d]];
    end
    checks += 2;
    if (want128 != 0 && rs[0][10] !== want128) begin failures++; $display("FAIL reference AES-128"); end
    if (want256 != 0 && rs[1][14] !== want256) begin failures++; $display("FAIL reference AES-256"); end
    pt = p; key0[0] = keys[0][0]; key0[1] = keys[1][0];
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;                    // edge 0 has passed
    pt = rand128();                              // the input is captured at start
    for (int e = 1; e <= 30; e++) begin
      @(negedge clk);                            // edge e has passed
      for (int d = 0; d < 2; d++) begin
        if (e % 2 == 0 && e / 2 < nr[d]) begin   // after a MixColumns+AddRoundKey edge
          checks++;
          if (out[d] !== rs[d][e/2]) begin
            failures++; $display("FAIL nr=%0d round %0d state %h want %h", nr[d], e/2, out[d], rs[d][e/2]);
          end
        end
        if (done[d] && done_at[d] < 0) done_at[d] = e;
      end
    end
    for (int d = 0; d < 2; d++) begin
      checks += 2;
      if (done_at[d] != 2*nr[d] - 1) begin failures++; $display("FAIL nr=%0d done after %0d edges", nr[d], done_at[d]); end
      if (out[d] !== rs[d][nr[d]]) begin failures++; $display("FAIL nr=%0d ct %h want %h", nr[d], out[d], rs[d][nr[d]]); end
    end
  endtask

  initial begin
    pt = '0; key0 = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) run(NIST_PT[i], NIST_KEY128, NIST_KEY256, NIST_CT128[i], NIST_CT256[i]);
    // round 1 of NIST vector 1, as in the worked example
    expand(NIST_KEY128, 4, keys[0]);
    checks++;
    if ((mix_columns(shift_rows(sub_bytes(NIST_PT[0] ^ keys[0][0], 0), 0), 0) ^ keys[0][1])
        !== 128'hf265e8d51fd2397bc3b9976d9076505c) begin failures++; $display("FAIL example round 1"); end
    for (int i = 0; i < 10; i++) run(rand128(), {rand128(), 128'h0}, {rand128(), rand128()}, '0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
