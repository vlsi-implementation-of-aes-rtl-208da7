// aes_encrypt_core: iterative AES-128 encryption of one 128-bit block.
//
// The cipher follows the standard round structure: the cipher key (round key
// 0) is XORed onto the plaintext, then rounds 1..9 apply SubBytes, ShiftRows,
// MixColumns and AddRoundKey, and round 10 the same without MixColumns. One
// round datapath is reused: the state register goes through it once per
// clock, and the single AddRoundKey XOR also does the initial key addition on
// the start clock.
//
// Interface: start (one clock) loads block_in; round_keys must stay stable
// until done. done pulses for one clock NR clocks after the clock edge that
// samples start (a block occupies the core for NR+1 cycles), and block_out
// then holds the ciphertext until the next start. A start while
// busy abandons the block in progress. Reusing one round per clock is this
// design's choice.
module aes_encrypt_core
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  block_t      block_in,
  input  round_keys_t round_keys,
  output block_t      block_out,
  output logic        done,
  output logic        busy
);

  block_t     state_q;
  logic [3:0] round_q;
  logic       busy_q;
  logic       done_q;

  block_t sb_out, sr_out, mc_out, ark_in, ark_key, ark_out;

  aes_sub_bytes     u_sb  (.state_in(state_q), .state_out(sb_out));
  aes_shift_rows    u_sr  (.state_in(sb_out),  .state_out(sr_out));
  aes_mix_columns   u_mc  (.state_in(sr_out),  .state_out(mc_out));
  aes_add_round_key u_ark (.state_in(ark_in), .round_key(ark_key), .state_out(ark_out));

  always_comb begin
    if (start) begin
      ark_in  = block_in;
      ark_key = round_keys[0];
    end else begin
      ark_in  = (round_q == 4'(NR)) ? sr_out : mc_out;   // last round skips MixColumns
      ark_key = round_keys[round_q];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      round_q <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (start) begin
        state_q <= ark_out;
        round_q <= 4'd1;
        busy_q  <= 1'b1;
      end else if (busy_q) begin
        state_q <= ark_out;
        if (round_q == 4'(NR)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end else begin
          round_q <= round_q + 4'd1;
        end
      end
    end
  end

  assign block_out = state_q;
  assign done      = done_q;
  assign busy      = busy_q;

endmodule
