// aes_decrypt_core: iterative AES-128 decryption of one 128-bit block.
//
// The inverse cipher first XORs the last round key (round key 10) onto the
// ciphertext. Each of the ten rounds then applies InvShiftRows, InvSubBytes,
// AddRoundKey with the round keys taken in reverse order (9 down to 0) and
// InvMixColumns, which the last round leaves out. One round datapath is
// reused, one round per clock; its AddRoundKey XOR also does the initial key
// addition on the start clock.
//
// Interface: start (one clock) loads block_in; round_keys must stay stable
// until done. done pulses for one clock NR clocks after the clock edge that
// samples start (a block occupies the core for NR+1 cycles), and block_out
// then holds the plaintext until the next start. A start while
// busy abandons the block in progress. Reusing one round per clock is this
// design's choice.
module aes_decrypt_core
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

  block_t isr_out, isb_out, ark_in, ark_key, ark_out, imc_out, state_d;

  aes_inv_shift_rows  u_isr (.state_in(state_q), .state_out(isr_out));
  aes_inv_sub_bytes   u_isb (.state_in(isr_out), .state_out(isb_out));
  aes_add_round_key   u_ark (.state_in(ark_in), .round_key(ark_key), .state_out(ark_out));
  aes_inv_mix_columns u_imc (.state_in(ark_out), .state_out(imc_out));

  always_comb begin
    if (start) begin
      ark_in  = block_in;
      ark_key = round_keys[NR];
      state_d = ark_out;
    end else begin
      ark_in  = isb_out;
      ark_key = round_keys[4'(NR) - round_q];
      state_d = (round_q == 4'(NR)) ? ark_out : imc_out;   // last round skips InvMixColumns
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
        state_q <= state_d;
        round_q <= 4'd1;
        busy_q  <= 1'b1;
      end else if (busy_q) begin
        state_q <= state_d;
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
