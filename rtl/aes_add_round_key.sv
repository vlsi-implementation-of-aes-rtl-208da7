// aes_add_round_key: the AddRoundKey step of AES-128 (combinational).
//
// Column c of the state is XORed with key word w[l+c], l = round * Nb. With
// the state and the round key both held as 128-bit vectors in the same
// column-major byte order this is a single 128-bit XOR. XOR is its own
// inverse, so the same block serves encryption and decryption; only the order
// in which the round keys are applied differs. No clock.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
