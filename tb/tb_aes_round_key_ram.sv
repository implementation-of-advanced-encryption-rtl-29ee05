// tb_aes_round_key_ram: load port, write port and the two read ports.
//
// For the default 256-bit store: loading a cipher key must fill entries 0
// and 1; writes to 2..14 must be read back on both ports in the next cycle;
// a later load must leave the generated entries untouched; indices 15 read 0.
module tb_aes_round_key_ram;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, load = 0, we = 0;
  always #5 clk = ~clk;
  logic [255:0] load_key;
  logic [3:0]   waddr, ra, rb;
  u128          wdata, da, db;
  u128          model [15];

  aes_round_key_ram dut (.clk, .load, .load_key, .we, .waddr, .wdata,
                         .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < 16; i++) begin
      ra = 4'(i); rb = 4'(15 - i); #1;
      checks += 2;
      if (da !== ((i < 15) ? model[i] : '0)) begin failures++; $display("FAIL a[%0d]=%h", i, da); end
      if (db !== ((15 - i < 15) ? model[15 - i] : '0)) begin failures++; $display("FAIL b[%0d]=%h", 15 - i, db); end
    end
  endtask

  initial begin
    waddr = 0; wdata = 0; ra = 0; rb = 0;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk);
      load_key = {rand128(), rand128()}; load = 1;
      @(negedge clk) load = 0;
      model[0] = load_key[255:128]; model[1] = load_key[127:0];
      for (int i = 2; i < 15; i++) begin
        we = 1; waddr = 4'(i); wdata = rand128(); model[i] = wdata;
        @(negedge clk);
        // written at the last edge, visible now on both ports
        we = 0; ra = 4'(i); rb = 4'(i); #1;
        checks += 2;
        if (da !== model[i] || db !== model[i]) begin failures++; $display("FAIL readback %0d", i); end
      end
      check_all();
      // a new load changes only entries 0 and 1
      @(negedge clk);
      load_key = {rand128(), rand128()}; load = 1;
      @(negedge clk) load = 0;
      model[0] = load_key[255:128]; model[1] = load_key[127:0];
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
