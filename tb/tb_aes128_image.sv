// tb_aes128_image: frame workloads for aes128_top at its default sizes.
//
// Part 1 repeats the two single-frame runs the design is built around, with
// the key 00 01 02 .. 0f: a 256-byte frame holding the bytes 00, 01, .. ff
// is encrypted (and decrypted again through the chain), and the same 256
// bytes are given to the decryptor on its own input and decrypted.
// Part 2 treats an 8-bit grey image of IMG_W x IMG_H pixels, generated
// here as pixel(x, y) = (x + 2*y) mod 256 XOR (x*y / 64) mod 256, as a
// sequence of 256-byte frames: each frame is encrypted, the ciphertext goes
// through the decryptor, and the image must come back unchanged while no
// ciphertext frame equals its plaintext. The next frame is sent once the
// decrypted frame has been delivered. All outputs are compared with the
// independent reference model in aes_model_pkg.
module tb_aes128_image;
  import aes_model_pkg::*;
  import aes_pkg::*;

  localparam int FRAME_BYTES = 256;
  localparam int IMG_W = 128;
  localparam int IMG_H = 128;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic   rst_n, key_load, keys_valid;
  block_t key;
  logic   enc_sof, enc_eof, enc_clkin;
  byte_t  enc_din;
  logic   enc_sofout, enc_eofout, enc_clkout, enc_discard;
  byte_t  enc_dout;
  block_t enc_block, dec_block, enc_result, dec_result;
  logic   dec_ext_sel, dec_sof, dec_eof, dec_clkin;
  byte_t  dec_din;
  logic   dec_sofout, dec_eofout, dec_clkout, dec_discard;
  byte_t  dec_dout;

  aes128_top dut (
    .clk(clk), .rst_n(rst_n), .key_load(key_load), .key(key), .keys_valid(keys_valid),
    .enc_sof(enc_sof), .enc_eof(enc_eof), .enc_clkin(enc_clkin), .enc_din(enc_din),
    .enc_sofout(enc_sofout), .enc_eofout(enc_eofout), .enc_clkout(enc_clkout), .enc_dout(enc_dout),
    .enc_block(enc_block), .enc_result(enc_result), .enc_discard(enc_discard),
    .dec_ext_sel(dec_ext_sel), .dec_sof(dec_sof), .dec_eof(dec_eof), .dec_clkin(dec_clkin),
    .dec_din(dec_din),
    .dec_sofout(dec_sofout), .dec_eofout(dec_eofout), .dec_clkout(dec_clkout), .dec_dout(dec_dout),
    .dec_block(dec_block), .dec_result(dec_result), .dec_discard(dec_discard)
  );

  byte_t enc_q [$], dec_q [$];
  int    dec_eof_n;
  always @(negedge clk) begin
    if (enc_clkout) enc_q.push_back(enc_dout);
    if (dec_clkout) dec_q.push_back(dec_dout);
    if (dec_eofout) dec_eof_n++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic send(input byte_t bytes [$], input bit ext);
    for (int i = 0; i < bytes.size(); i++) begin
      if (ext) begin
        dec_clkin = 1'b1; dec_din = bytes[i]; dec_sof = (i == 0); dec_eof = (i == bytes.size() - 1);
      end else begin
        enc_clkin = 1'b1; enc_din = bytes[i]; enc_sof = (i == 0); enc_eof = (i == bytes.size() - 1);
      end
      @(negedge clk);
      {enc_clkin, enc_sof, enc_eof, dec_clkin, dec_sof, dec_eof} = '0;
    end
  endtask

  task automatic wait_frame();
    int w = 0;
    int n0 = dec_eof_n;
    while (dec_eof_n == n0 && w < 20000) begin
      @(negedge clk);
      w++;
    end
    check(dec_eof_n != n0, "decrypted frame never ended");
    repeat (4) @(negedge clk);
  endtask

  // expected output of one frame: the model applied to each 16-byte block
  function automatic void model_frame(input byte_t f [$], input bit decrypt, output byte_t r [$]);
    block_t b;
    r.delete();
    for (int k = 0; k < f.size() / 16; k++) begin
      for (int j = 0; j < 16; j++) b[127-8*j -: 8] = f[16*k + j];
      b = decrypt ? model_decrypt(key, b) : model_encrypt(key, b);
      for (int j = 0; j < 16; j++) r.push_back(b[127-8*j -: 8]);
    end
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t f [$], e [$];
    int    same;
    model_init();
    rst_n = 1'b0; key_load = 1'b0;
    {enc_sof, enc_eof, enc_clkin, dec_sof, dec_eof, dec_clkin, dec_ext_sel} = '0;
    enc_din = '0; dec_din = '0;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    wait (keys_valid);
    @(negedge clk);

    // part 1a: encrypt the frame 00..ff
    f.delete();
    for (int i = 0; i < FRAME_BYTES; i++) f.push_back(8'(i));
    enc_q.delete(); dec_q.delete();
    send(f, 0);
    wait_frame();
    model_frame(f, 0, e);
    check(enc_q == e, "frame 00..ff: ciphertext");
    check(dec_q == f, "frame 00..ff: decrypted again");

    // part 1b: decrypt the frame 00..ff on the decryptor's own input
    dec_ext_sel = 1'b1;
    enc_q.delete(); dec_q.delete();
    send(f, 1);
    wait_frame();
    model_frame(f, 1, e);
    check(dec_q == e, "frame 00..ff: decryptor alone");
    dec_ext_sel = 1'b0;

    // part 2: an image, frame by frame
    same = 0;
    for (int fr = 0; fr < IMG_W * IMG_H / FRAME_BYTES; fr++) begin
      f.delete();
      for (int i = 0; i < FRAME_BYTES; i++) begin
        int p = fr * FRAME_BYTES + i;
        int x = p % IMG_W;
        int y = p / IMG_W;
        f.push_back(8'((x + 2*y) % 256) ^ 8'((x*y / 64) % 256));
      end
      enc_q.delete(); dec_q.delete();
      send(f, 0);
      wait_frame();
      model_frame(f, 0, e);
      check(enc_q == e, $sformatf("image frame %0d: ciphertext", fr));
      check(dec_q == f, $sformatf("image frame %0d: decrypted", fr));
      if (enc_q == f) same++;
    end
    check(same == 0, "a ciphertext frame equals its plaintext");
    $display("image %0dx%0d: %0d frames encrypted and decrypted", IMG_W, IMG_H, IMG_W * IMG_H / FRAME_BYTES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
