// tb_aes_inv_sbox: exhaustive check of the inverse S-box against the GF(2^8) definition.
module tb_aes_inv_sbox;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, y;
  aes_inv_sbox dut (.in_byte(a), .out_byte(y));
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    init();
    for (int x = 0; x < 256; x++) begin
      a = 8'(x); #1;
      checks++;
      if (y !== IS[x]) begin failures++; $display("FAIL IS(%02h)=%02h want %02h", x, y, IS[x]); end
    end
    // Worked example of the field arithmetic: {53} and {CA} are inverses.
    checks++; if (ginv(8'h53) != 8'hca) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
