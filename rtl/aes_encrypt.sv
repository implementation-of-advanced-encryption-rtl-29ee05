// aes_encrypt: iterative AES encryption datapath, two clock cycles per round.
//
// One 128-bit state register is reused for every round. The initial
// AddRoundKey is applied as the plaintext is loaded (edge 0, with key0 = the
// first 128 bits of the cipher key). Each of rounds 1..Nr-1 then takes two
// cycles: SUBSHIFT registers SubBytes+ShiftRows (one fused stage), MIXKEY
// registers MixColumns followed by AddRoundKey with round key r. The final
// round has no MixColumns, so SubBytes+ShiftRows+AddRoundKey is one cycle.
// Ciphertext is valid, with done high, 2*Nr-1 edges after start: 19 for
// AES-128, 27 for AES-256. rk_idx tells the key store which round key is
// needed in the current cycle; it must be valid by then (the key expansion,
// one key per cycle, stays ahead). done stays high until the next start.
// The round split (fused SubBytes/ShiftRows in one cycle, MixColumns in the
// other) follows the design being reproduced; placing AddRoundKey in the
// MixColumns cycle is this implementation's choice.
module aes_encrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR = 14
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  block_t     block_in,
  input  block_t     key0,
  output logic [3:0] rk_idx,
  input  block_t     rk,
  output block_t     block_out,
  output logic       done
);

  enc_phase_t phase;
  logic [3:0] round;
  block_t     state, ss_out, mc_out, ark_in, ark_out, load_val;

  aes_sub_shift     u_ss  (.state_in(state), .state_out(ss_out));
  aes_mix_columns   u_mc  (.state_in(state), .state_out(mc_out));
  aes_add_round_key u_ark (.state_in(ark_in), .round_key(rk), .state_out(ark_out));
  aes_add_round_key u_ark0 (.state_in(block_in), .round_key(key0), .state_out(load_val));

  assign ark_in    = (phase == ENC_MIXKEY) ? mc_out : ss_out;
  assign rk_idx    = round;
  assign block_out = state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= ENC_IDLE;
      round <= '0;
      state <= '0;
      done  <= 1'b0;
    end else if (start) begin
      state <= load_val;
      round <= 4'd1;
      phase <= ENC_SUBSHIFT;
      done  <= 1'b0;
    end else begin
      unique case (phase)
        ENC_SUBSHIFT: begin
          if (round == 4'(NR)) begin
            state <= ark_out;          // final round: no MixColumns
            phase <= ENC_IDLE;
            done  <= 1'b1;
          end else begin
            state <= ss_out;
            phase <= ENC_MIXKEY;
          end
        end
        ENC_MIXKEY: begin
          state <= ark_out;
          round <= round + 4'd1;
          phase <= ENC_SUBSHIFT;
        end
        default: ;
      endcase
    end
  end

endmodule
