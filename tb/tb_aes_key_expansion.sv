// tb_aes_key_expansion: key schedule for 128- and 256-bit keys.
//
// Two instances (KEY_BITS = 128 and the default 256) are started together on
// the NIST keys and on random keys. Every presented round key is compared with
// the reference schedule, the indices must run Nk/4..Nr one per cycle with no
// gap, and wr_last must come exactly 10 (AES-128) and 13 (AES-256) cycles
// after start, the key-expansion latency of the design.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic [127:0] key128;
  logic [255:0] key256;
  logic         we[2], last[2], busy[2];
  logic [3:0]   idx[2];
  u128          wk[2];

  aes_key_expansion #(.KEY_BITS(128)) dut128 (.clk, .rst_n, .start, .key(key128),
    .wr_en(we[0]), .wr_idx(idx[0]), .wr_key(wk[0]), .wr_last(last[0]), .busy(busy[0]));
  aes_key_expansion dut256 (.clk, .rst_n, .start, .key(key256),
    .wr_en(we[1]), .wr_idx(idx[1]), .wr_key(wk[1]), .wr_last(last[1]), .busy(busy[1]));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] k1, logic [255:0] k2);
    u128 rk [2][15];
    int  next[2], last_cycle[2];
    expand({k1, 128'h0}, 4, rk[0]);
    expand(k2, 8, rk[1]);
    key128 = k1; key256 = k2;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    key128 = '0; key256 = '0;            // key must be captured at start
    next = '{1, 2};
    last_cycle = '{-1, -1};
    for (int cyc = 1; cyc <= 16; cyc++) begin
      // sampled mid-cycle: what will be written at edge number cyc
      for (int d = 0; d < 2; d++) begin
        if (we[d]) begin
          checks++;
          if (idx[d] != 4'(next[d]) || wk[d] !== rk[d][next[d]]) begin
            failures++;
            $display("FAIL kx%0d cycle %0d idx=%0d key=%h want idx=%0d %h", d, cyc, idx[d], wk[d], next[d], rk[d][next[d]]);
          end
          if (last[d]) last_cycle[d] = cyc;
          next[d]++;
        end
      end
      @(negedge clk);
    end
    checks += 4;
    if (last_cycle[0] != 10) begin failures++; $display("FAIL AES-128 last key at %0d, want 10", last_cycle[0]); end
    if (last_cycle[1] != 13) begin failures++; $display("FAIL AES-256 last key at %0d, want 13", last_cycle[1]); end
    if (next[0] != 11 || next[1] != 15) begin failures++; $display("FAIL key counts %0d %0d", next[0], next[1]); end
    if (busy[0] || busy[1]) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    key128 = '0; key256 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(NIST_KEY128[255:128], NIST_KEY256);
    for (int i = 0; i < 20; i++) run(rand128(), {rand128(), rand128()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
