// tb_aes_add_round_key: random states and keys against a bytewise GF(2^8) sum.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  u128 s, k, y, want;
  aes_add_round_key dut (.state_in(s), .round_key(k), .state_out(y));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // Round 1 of the AES-128 example: state 193de3be... plus key a0fafe17...
    s = 128'h046681e5e0cb199a48f8d37a2806264c; k = 128'ha0fafe1788542cb123a339392a6c7605; #1;
    checks++; if (y !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin failures++; $display("FAIL example"); end
    for (int i = 0; i < 200; i++) begin
      s = rand128(); k = rand128(); #1;
      for (int n = 0; n < 16; n++) want[127 - 8*n -: 8] = gmul(gb(s, n), 8'h01) ^ gmul(gb(k, n), 8'h01);
      checks++;
      if (y !== want) begin failures++; $display("FAIL %h ^ %h = %h", s, k, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
