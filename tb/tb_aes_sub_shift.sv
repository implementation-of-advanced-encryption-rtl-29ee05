// tb_aes_sub_shift: SubBytes+ShiftRows stage against the reference.
// Checks the worked example of the first AES-128 round (FIPS-197 Appendix B)
// and 500 random states against the behavioural reference.
module tb_aes_sub_shift;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  u128 s, y, want;
  aes_sub_shift dut (.state_in(s), .state_out(y));
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    s = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    checks++; if (y !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin failures++; $display("FAIL example: %h", y); end
    for (int i = 0; i < 500; i++) begin
      s = rand128(); #1;
      want = shift_rows(sub_bytes(s, 0), 0);
      checks++;
      if (y !== want) begin failures++; $display("FAIL in=%h got=%h want=%h", s, y, want); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
