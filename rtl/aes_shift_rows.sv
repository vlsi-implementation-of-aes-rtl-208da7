// aes_shift_rows: the ShiftRows step of AES-128 (combinational).
//
// Row r of the 4x4 state (r = 0..3) is rotated left by r byte positions:
// row 0 is left alone, row 3 moves by three. With bytes stored column by
// column (byte 4*c + r is row r, column c), output byte (r, c) is input byte
// (r, (c + r) % 4), i.e. a fixed byte permutation: wires only, no clock.
module aes_shift_rows
  import aes_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c + r) % 4)+r) -: 8];
      end
    end
  end

endmodule
