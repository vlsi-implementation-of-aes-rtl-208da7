// aes_key_expand: AES-128 key schedule, one round key per clock.
//
// A key_load pulse stores the cipher key as round key 0 (words w[0..3]) and
// then, on each of the next NR clocks, derives round key r from round key r-1:
// the last word is rotated by one byte (RotWord), passed through four S-boxes
// (SubWord) and XORed with the round constant Rcon, which starts at 01h and is
// doubled in GF(2^8) every round; the four new words are running XORs with the
// previous key's words. All NR+1 round keys stay in registers, so the
// encryptor can walk them forward and the decryptor backward.
//
// Timing: keys_valid drops on the clock that samples key_load and rises NR
// clocks later; round_keys is stable while keys_valid is high. The schedule is
// the standard AES one; computing it serially and keeping every round key is
// this design's choice.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  block_t      key,
  output round_keys_t round_keys,
  output logic        keys_valid
);

  round_keys_t rk_q;
  block_t      prev_q;      // most recently derived round key
  byte_t       rcon_q;
  logic [3:0]  round_q;     // index of the round key derived next
  logic        busy_q;
  logic        valid_q;

  word_t rot_word, sub_word, w4, w5, w6, w7;

  assign rot_word = {prev_q[23:0], prev_q[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox u_sbox (
      .in_byte (rot_word[31-8*b -: 8]),
      .out_byte(sub_word[31-8*b -: 8])
    );
  end

  assign w4 = prev_q[127:96] ^ sub_word ^ {rcon_q, 24'h0};
  assign w5 = prev_q[95:64]  ^ w4;
  assign w6 = prev_q[63:32]  ^ w5;
  assign w7 = prev_q[31:0]   ^ w6;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rk_q    <= '0;
      prev_q  <= '0;
      rcon_q  <= 8'h01;
      round_q <= '0;
      busy_q  <= 1'b0;
      valid_q <= 1'b0;
    end else if (key_load) begin
      rk_q[0] <= key;
      prev_q  <= key;
      rcon_q  <= 8'h01;
      round_q <= 4'd1;
      busy_q  <= 1'b1;
      valid_q <= 1'b0;
    end else if (busy_q) begin
      rk_q[round_q] <= {w4, w5, w6, w7};
      prev_q        <= {w4, w5, w6, w7};
      rcon_q        <= xtime(rcon_q);
      if (round_q == 4'(NR)) begin
        busy_q  <= 1'b0;
        valid_q <= 1'b1;
      end else begin
        round_q <= round_q + 4'd1;
      end
    end
  end

  assign round_keys = rk_q;
  assign keys_valid = valid_q;

endmodule
