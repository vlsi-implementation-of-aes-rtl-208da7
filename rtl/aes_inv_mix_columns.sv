// aes_inv_mix_columns: the InvMixColumns step of AES-128 (combinational).
//
// Each of the four columns is treated as a polynomial over GF(2^8) and
// multiplied by the fixed circulant matrix whose first row is (0e 0b 0d 09), so
// every output byte depends on all four bytes of its column. The products
// are built from xtime (multiply by 2 with reduction by 11Bh) and XORs, in
// aes_pkg::inv_mix_column. 128-bit state in and out, no clock.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    assign state_out[127-32*c -: 32] = inv_mix_column(state_in[127-32*c -: 32]);
  end

endmodule
