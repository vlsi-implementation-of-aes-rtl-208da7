// aes_inv_sbox: the AES inverse S-box for one byte (combinational).
//
// The 256-entry table is the inverse of the AES S-box; each entry is computed at
// elaboration from its definition (inverse affine map followed by the GF(2^8)
// inverse, see aes_pkg::inv_sbox_calc), then the input byte indexes it,
// the high nibble selecting the row and the low nibble the column of the
// 16x16 table. Purely combinational, no clock.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  byte_t table_q [256];

  for (genvar i = 0; i < 256; i++) begin : g_entry
    localparam byte_t ENTRY = inv_sbox_calc(byte_t'(i));
    assign table_q[i] = ENTRY;
  end

  assign out_byte = table_q[in_byte];

endmodule
