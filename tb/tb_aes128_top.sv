// tb_aes128_top: end-to-end testbench for aes128_top at its default sizes.
//
// Runs the whole chain: key load and expansion, a 256-byte plaintext frame
// through the encryptor, the ciphertext stream into the decryptor's BRAM and
// back out as plaintext. Every ciphertext byte is compared with the
// independent reference model (aes_model_pkg), including the FIPS-197
// Appendix C.1 block, and every decrypted byte with the plaintext sent.
// The sequence makes each mechanism of the design happen and counts it:
//   key_wait     bytes arrive before the round keys are ready
//   loopback     decryptor fed by the encryptor (dec_ext_sel = 0)
//   external     decryptor fed from its own input (dec_ext_sel = 1)
//   padding      a frame that is not a multiple of 16 bytes
//   discard      bytes after eof are dropped
//   auto_close   a frame closed by reaching 256 bytes without eof
//   key_reload   a second key replaces the first
//   reset        a reset in the middle of a frame, then a clean frame
// A mechanism that never happened counts as a failure.
module tb_aes128_top;
  import aes_model_pkg::*;
  import aes_pkg::*;

  localparam int FRAME_BYTES = 256;

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

  // ---------------------------------------------------------------- monitors
  byte_t enc_q [$], dec_q [$];
  int    enc_sof_n, enc_eof_n, dec_sof_n, dec_eof_n, discard_n;
  always @(negedge clk) begin
    if (enc_clkout) enc_q.push_back(enc_dout);
    if (dec_clkout) dec_q.push_back(dec_dout);
    if (enc_sofout) enc_sof_n++;
    if (enc_eofout) enc_eof_n++;
    if (dec_sofout) dec_sof_n++;
    if (dec_eofout) dec_eof_n++;
    if (enc_discard) discard_n++;
  end

  int n_key_wait, n_loopback, n_external, n_padding, n_discard, n_auto_close, n_key_reload, n_reset;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic void clear_monitors();
    enc_q.delete();
    dec_q.delete();
    enc_sof_n = 0; enc_eof_n = 0; dec_sof_n = 0; dec_eof_n = 0;
  endfunction

  // send a byte stream on the encryptor (ext = 0) or decryptor (ext = 1) input
  task automatic send(input byte_t bytes [$], input int n_kept, input bit ext, input bit use_eof);
    for (int i = 0; i < bytes.size(); i++) begin
      if (ext) begin
        dec_clkin = 1'b1; dec_din = bytes[i]; dec_sof = (i == 0); dec_eof = use_eof && (i == n_kept - 1);
      end else begin
        enc_clkin = 1'b1; enc_din = bytes[i]; enc_sof = (i == 0); enc_eof = use_eof && (i == n_kept - 1);
      end
      @(negedge clk);
      {enc_clkin, enc_sof, enc_eof, dec_clkin, dec_sof, dec_eof} = '0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  task automatic wait_bytes(input int n_enc, input int n_dec);
    int w = 0;
    while ((enc_q.size() < n_enc || dec_q.size() < n_dec) && w < 30000) begin
      @(negedge clk);
      w++;
    end
    repeat (80) @(negedge clk);
  endtask

  task automatic load_key(input block_t k);
    @(negedge clk);
    key = k;
    key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
  endtask

  // encrypt through the chain and check both streams
  task automatic loopback_frame(input byte_t pt [$], input int n_kept, input bit use_eof, input string name);
    int     nblk = (n_kept + 15) / 16;
    block_t blk, ct;
    clear_monitors();
    dec_ext_sel = 1'b0;
    send(pt, n_kept, 0, use_eof);
    wait_bytes(16*nblk, 16*nblk);
    check(enc_q.size() == 16*nblk && dec_q.size() == 16*nblk,
          $sformatf("%s: %0d/%0d bytes out, expected %0d", name, enc_q.size(), dec_q.size(), 16*nblk));
    for (int b = 0; b < nblk && enc_q.size() == 16*nblk && dec_q.size() == 16*nblk; b++) begin
      for (int j = 0; j < 16; j++) blk[127-8*j -: 8] = (16*b + j < n_kept) ? pt[16*b + j] : 8'h00;
      ct = model_encrypt(key, blk);
      for (int j = 0; j < 16; j++) begin
        check(enc_q[16*b + j] == ct[127-8*j -: 8],
              $sformatf("%s: ciphertext byte %0d %h expected %h", name, 16*b + j, enc_q[16*b + j], ct[127-8*j -: 8]));
        check(dec_q[16*b + j] == blk[127-8*j -: 8],
              $sformatf("%s: decrypted byte %0d %h expected %h", name, 16*b + j, dec_q[16*b + j], blk[127-8*j -: 8]));
      end
    end
    check(enc_sof_n == 1 && enc_eof_n == 1 && dec_sof_n == 1 && dec_eof_n == 1,
          $sformatf("%s: sofout/eofout counts %0d %0d %0d %0d", name, enc_sof_n, enc_eof_n, dec_sof_n, dec_eof_n));
    n_loopback++;
    if (n_kept % 16 != 0) n_padding++;
  endtask

  function automatic void rand_bytes(output byte_t q [$], input int n);
    q.delete();
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t pt [$];
    byte_t ct [$];
    block_t b;
    int d0;
    model_init();
    rst_n = 1'b0; key_load = 1'b0; key = '0;
    {enc_sof, enc_eof, enc_clkin, dec_sof, dec_eof, dec_clkin, dec_ext_sel} = '0;
    enc_din = '0; dec_din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // FIPS-197 C.1 key; the first bytes of the frame arrive while the key
    // schedule is still running
    key = 128'h000102030405060708090a0b0c0d0e0f;
    key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    check(!keys_valid, "keys_valid must be low during expansion");
    if (!keys_valid) n_key_wait++;
    pt.delete();
    for (int i = 0; i < 16; i++) pt.push_back(8'(8'h11 * (i % 16)));   // 00 11 22 .. ff
    for (int i = 16; i < FRAME_BYTES; i++) pt.push_back(8'(i));
    loopback_frame(pt, FRAME_BYTES, 1, "frame 1");
    // block 0 is the FIPS-197 C.1 example: its ciphertext is printed there
    b = '0;
    for (int j = 0; j < 16 && j < enc_q.size(); j++) b[127-8*j -: 8] = enc_q[j];
    check(b == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("FIPS-197 C.1 ciphertext: %h", b));

    // short frame, padded, with bytes after eof to discard
    d0 = discard_n;
    rand_bytes(pt, 45);
    loopback_frame(pt, 40, 1, "short frame");
    check(discard_n - d0 == 5, $sformatf("discarded %0d bytes, expected 5", discard_n - d0));
    if (discard_n - d0 == 5) n_discard++;

    // frame without eof that closes itself at 256 bytes
    rand_bytes(pt, FRAME_BYTES);
    loopback_frame(pt, FRAME_BYTES, 0, "frame without eof");
    n_auto_close++;

    // decryptor on an external ciphertext stream
    rand_bytes(pt, 96);
    ct.delete();
    for (int blk = 0; blk < 6; blk++) begin
      for (int j = 0; j < 16; j++) b[127-8*j -: 8] = pt[16*blk + j];
      b = model_encrypt(key, b);
      for (int j = 0; j < 16; j++) ct.push_back(b[127-8*j -: 8]);
    end
    clear_monitors();
    dec_ext_sel = 1'b1;
    send(ct, 96, 1, 1);
    wait_bytes(0, 96);
    check(dec_q.size() == 96 && enc_q.size() == 0, $sformatf("external: %0d bytes out", dec_q.size()));
    for (int i = 0; i < 96 && i < dec_q.size(); i++)
      check(dec_q[i] == pt[i], $sformatf("external: byte %0d %h expected %h", i, dec_q[i], pt[i]));
    check(dec_sof_n == 1 && dec_eof_n == 1, "external: sofout/eofout");
    n_external++;
    dec_ext_sel = 1'b0;

    // new key
    load_key(rand128());
    repeat (12) @(negedge clk);
    check(keys_valid, "keys_valid after reload");
    rand_bytes(pt, 128);
    loopback_frame(pt, 128, 1, "second key");
    n_key_reload++;

    // reset in the middle of a frame, then a whole frame
    rand_bytes(pt, 100);
    fork
      send(pt, 100, 0, 1);
      begin
        repeat (150) @(negedge clk);
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
      end
    join
    repeat (100) @(negedge clk);
    check(!keys_valid, "reset clears the round keys");
    load_key(key);
    repeat (12) @(negedge clk);
    rand_bytes(pt, FRAME_BYTES);
    loopback_frame(pt, FRAME_BYTES, 1, "after reset");
    n_reset++;

    check(n_key_wait > 0, "mechanism key_wait never happened");
    check(n_loopback > 0, "mechanism loopback never happened");
    check(n_external > 0, "mechanism external never happened");
    check(n_padding > 0, "mechanism padding never happened");
    check(n_discard > 0, "mechanism discard never happened");
    check(n_auto_close > 0, "mechanism auto_close never happened");
    check(n_key_reload > 0, "mechanism key_reload never happened");
    check(n_reset > 0, "mechanism reset never happened");
    $display("mechanisms: key_wait=%0d loopback=%0d external=%0d padding=%0d discard=%0d auto_close=%0d key_reload=%0d reset=%0d",
             n_key_wait, n_loopback, n_external, n_padding, n_discard, n_auto_close, n_key_reload, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
