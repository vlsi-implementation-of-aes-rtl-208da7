// aes128_top: AES-128 frame encryption followed by frame decryption.
//
// One key schedule (aes_key_expand) derives the 11 round keys from a 128-bit
// key and feeds two frame units. The encryption unit takes a plaintext frame
// of up to 256 bytes as a byte stream (sof, eof, clkin strobe, din), keeps it
// in its BRAM and emits the ciphertext as a byte stream in 16-byte bursts
// (sofout, eofout, clkout strobe, dout). That stream is written straight into
// the BRAM of the decryption unit, which returns the plaintext the same way.
// With dec_ext_sel high the decryption unit takes its own input stream
// (dec_sof, dec_eof, dec_clkin, dec_din) instead, so ciphertext from
// elsewhere can be decrypted. enc_block/dec_block show the 128-bit block
// each core is working on and enc_result/dec_result the block it produced.
//
// Usage: pulse key_load with key; keys_valid rises NR clocks later and the
// frame units start work only while it is high. Do not reload the key while a
// frame is in flight. All strobes are single-clock pulses synchronous to clk;
// rst_n is an asynchronous active-low reset that restarts both units.
// The chain encryptor -> second BRAM -> decryptor and the shared key
// expansion follow the described design; the external decryptor input is
// this design's addition for decrypting a stream on its own.
module aes128_top
  import aes_pkg::*;
#(
  parameter int unsigned FRAME_BYTES = 256,
  parameter int unsigned OUT_PERIOD  = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  block_t key,
  output logic   keys_valid,
  // plaintext in
  input  logic   enc_sof,
  input  logic   enc_eof,
  input  logic   enc_clkin,
  input  byte_t  enc_din,
  // ciphertext out
  output logic   enc_sofout,
  output logic   enc_eofout,
  output logic   enc_clkout,
  output byte_t  enc_dout,
  output block_t enc_block,
  output block_t enc_result,
  output logic   enc_discard,
  // decryptor input select and external ciphertext in
  input  logic   dec_ext_sel,
  input  logic   dec_sof,
  input  logic   dec_eof,
  input  logic   dec_clkin,
  input  byte_t  dec_din,
  // plaintext out
  output logic   dec_sofout,
  output logic   dec_eofout,
  output logic   dec_clkout,
  output byte_t  dec_dout,
  output block_t dec_block,
  output block_t dec_result,
  output logic   dec_discard
);

  round_keys_t round_keys;
  logic        d_sof, d_eof, d_clkin;
  byte_t       d_din;

  aes_key_expand u_key_expand (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_load  (key_load),
    .key       (key),
    .round_keys(round_keys),
    .keys_valid(keys_valid)
  );

  aes_frame_unit #(.DECRYPT(1'b0), .FRAME_BYTES(FRAME_BYTES), .OUT_PERIOD(OUT_PERIOD)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .keys_valid(keys_valid),
    .round_keys(round_keys),
    .sof       (enc_sof),
    .eof       (enc_eof),
    .clkin     (enc_clkin),
    .din       (enc_din),
    .sofout    (enc_sofout),
    .eofout    (enc_eofout),
    .clkout    (enc_clkout),
    .dout      (enc_dout),
    .block_data(enc_block),
    .result_data(enc_result),
    .discard   (enc_discard)
  );

  always_comb begin
    if (dec_ext_sel) begin
      d_sof   = dec_sof;
      d_eof   = dec_eof;
      d_clkin = dec_clkin;
      d_din   = dec_din;
    end else begin
      d_sof   = enc_sofout;
      d_eof   = enc_eofout;
      d_clkin = enc_clkout;
      d_din   = enc_dout;
    end
  end

  aes_frame_unit #(.DECRYPT(1'b1), .FRAME_BYTES(FRAME_BYTES), .OUT_PERIOD(OUT_PERIOD)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .keys_valid(keys_valid),
    .round_keys(round_keys),
    .sof       (d_sof),
    .eof       (d_eof),
    .clkin     (d_clkin),
    .din       (d_din),
    .sofout    (dec_sofout),
    .eofout    (dec_eofout),
    .clkout    (dec_clkout),
    .dout      (dec_dout),
    .block_data(dec_block),
    .result_data(dec_result),
    .discard   (dec_discard)
  );

endmodule
