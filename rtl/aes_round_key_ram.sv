// aes_round_key_ram: storage for all Nr+1 round keys of one cipher key.
//
// All round keys are produced once, at the start of an operation, and kept
// here for both datapaths. The round keys that equal the cipher key (k0, and
// k1 for a 256-bit key) are written in one cycle through the load port; the
// generated keys arrive one per cycle through the write port. Two
// combinational read ports serve the encryption (port a) and decryption
// (port b) datapaths, so a key written at one edge can be used at the next.
// Reads of an index beyond Nr return zero. Built as a register array.
module aes_round_key_ram
  import aes_pkg::*;
#(
  parameter int unsigned KEY_BITS = 256
) (
  input  logic                clk,
  input  logic                load,
  input  logic [KEY_BITS-1:0] load_key,
  input  logic                we,
  input  logic [3:0]          waddr,
  input  block_t              wdata,
  input  logic [3:0]          raddr_a,
  output block_t              rdata_a,
  input  logic [3:0]          raddr_b,
  output block_t              rdata_b
);

  localparam int unsigned NK    = KEY_BITS / 32;
  localparam int unsigned NKEYS = NK + 7;
  localparam int unsigned NPRE  = NK / 4;

  block_t mem [NKEYS];

  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < NPRE; i++) mem[i] <= load_key[KEY_BITS - 1 - 128*i -: 128];
    end else if (we && (int'(waddr) < NKEYS)) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata_a = (int'(raddr_a) < NKEYS) ? mem[raddr_a] : '0;
  assign rdata_b = (int'(raddr_b) < NKEYS) ? mem[raddr_b] : '0;

  always_ff @(posedge clk) begin
    if (we) assert (int'(waddr) >= NPRE && int'(waddr) < NKEYS)
      else $error("round key write to index %0d outside %0d..%0d", waddr, NPRE, NKEYS - 1);
  end

endmodule
