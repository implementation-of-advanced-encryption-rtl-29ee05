// aes_decrypt: iterative AES decryption (inverse cipher), two cycles per round.
//
// The ciphertext is loaded together with the last round key (key_last, round
// key Nr), which is the initial AddRoundKey of the inverse cipher. Each of the
// inverse rounds Nr-1..1 then takes two cycles: INVSUB registers
// InvShiftRows+InvSubBytes (one fused stage), MIXKEY registers AddRoundKey
// with round key r followed by InvMixColumns. The last inverse round has no
// InvMixColumns, so InvShiftRows+InvSubBytes+AddRoundKey(k0) is one cycle.
// Plaintext is valid, with done high, 2*Nr-1 edges after start. Since the
// inverse cipher needs round key Nr first, start is given when the key
// expansion produces that key (key_last is forwarded in the same cycle); the
// other keys are read through rk_idx/rk. done stays high until the next start.
// The step order follows the AES inverse cipher; the cycle split mirrors the
// encryption datapath and is this implementation's choice.
module aes_decrypt
  import aes_pkg::*;
#(
  parameter int unsigned NR = 14
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  block_t     block_in,
  input  block_t     key_last,
  output logic [3:0] rk_idx,
  input  block_t     rk,
  output block_t     block_out,
  output logic       done
);

  dec_phase_t phase;
  logic [3:0] round;
  block_t     iss_out, ark_out, imc_out, load_val, state;

  aes_inv_sub_shift   u_iss  (.state_in(state), .state_out(iss_out));
  aes_add_round_key   u_ark  (.state_in((phase == DEC_MIXKEY) ? state : iss_out),
                              .round_key(rk), .state_out(ark_out));
  aes_inv_mix_columns u_imc  (.state_in(ark_out), .state_out(imc_out));
  aes_add_round_key   u_ark0 (.state_in(block_in), .round_key(key_last), .state_out(load_val));

  assign rk_idx    = round;
  assign block_out = state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= DEC_IDLE;
      round <= '0;
      state <= '0;
      done  <= 1'b0;
    end else if (start) begin
      state <= load_val;
      round <= 4'(NR - 1);
      phase <= DEC_INVSUB;
      done  <= 1'b0;
    end else begin
      unique case (phase)
        DEC_INVSUB: begin
          if (round == 4'd0) begin
            state <= ark_out;          // last inverse round: no InvMixColumns
            phase <= DEC_IDLE;
            done  <= 1'b1;
          end else begin
            state <= iss_out;
            phase <= DEC_MIXKEY;
          end
        end
        DEC_MIXKEY: begin
          state <= imc_out;
          round <= round - 4'd1;
          phase <= DEC_INVSUB;
        end
        default: ;
      endcase
    end
  end

endmodule
