// aes_sub_bytes: the SubBytes step of AES-128 (combinational).
//
// Each of the 16 bytes of the state goes through its own copy of the
// S-box (aes_sbox), so the whole state is substituted in one clock cycle of the
// round datapath that uses it. Input and output are 128-bit states in
// FIPS-197 byte order; there is no clock and no latency. Sixteen parallel
// tables are this design's choice; the byte-wise table lookup itself is the
// standard algorithm.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar k = 0; k < 16; k++) begin : g_byte
    aes_sbox u_sbox (
      .in_byte (state_in[127-8*k -: 8]),
      .out_byte(state_out[127-8*k -: 8])
    );
  end

endmodule
