// tb_aes_frame_unit: self-checking testbench for aes_frame_unit.
//
// An encrypting unit (DECRYPT = 0) and a decrypting unit (DECRYPT = 1), both
// at the default 256-byte frame, receive the same byte stream; their outputs
// are compared with the independent reference (aes_model_pkg) applied block
// by block, the first byte of a block being its most significant byte. The
// frames exercise: a full 256-byte frame with sof and eof on the first and
// last byte strobes; a 40-byte frame ended by a lone eof (last block padded
// with zeros) followed by bytes that must be discarded; a frame started by a
// lone sof that runs past 256 bytes without eof (closes by itself, the excess
// is discarded); and a frame whose processing waits for keys_valid.
// Checked for every frame: each output byte, sofout only on the first and
// eofout only on the last output byte, OUT_PERIOD clocks between bytes of a
// burst, and the 32-clock delay from the clock cycle that presents the 16th
// input byte to the first output byte; every output byte must also match
// result_data. All signals are driven and sampled on the falling clock edge.
module tb_aes_frame_unit;
  import aes_model_pkg::*;
  import aes_pkg::*;

  localparam int FRAME_BYTES = 256;
  localparam int OUT_PERIOD  = 2;
  localparam int FIRST_OUT_LATENCY = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  logic        rst_n, keys_valid;
  round_keys_t round_keys;
  logic        sof, eof, clkin;
  byte_t       din;
  logic        sofout [2], eofout [2], clkout [2], discard [2];
  byte_t       dout [2];
  block_t      block_data [2], result_data [2];
  block_t      key;

  for (genvar u = 0; u < 2; u++) begin : g_dut
    aes_frame_unit #(.DECRYPT(u == 1), .FRAME_BYTES(FRAME_BYTES), .OUT_PERIOD(OUT_PERIOD)) dut (
      .clk(clk), .rst_n(rst_n), .keys_valid(keys_valid), .round_keys(round_keys),
      .sof(sof), .eof(eof), .clkin(clkin), .din(din),
      .sofout(sofout[u]), .eofout(eofout[u]), .clkout(clkout[u]), .dout(dout[u]),
      .block_data(block_data[u]), .result_data(result_data[u]), .discard(discard[u])
    );
  end

  // ---------------------------------------------------------------- monitors
  typedef struct {
    byte_t b;
    bit    so;
    bit    eo;
    int    t;
  } out_rec_t;
  out_rec_t got [2][$];
  int discards = 0;
  int byte16_cycle = -1;       // cycle of the 16th byte of the current frame

  always @(negedge clk) begin
    for (int u = 0; u < 2; u++)
      if (clkout[u]) begin
        // the byte sent must come from the core's result block
        checks++;
        if (result_data[u][127 - 8*(got[u].size() % 16) -: 8] != dout[u]) begin
          failures++;
          $display("FAIL unit %0d: dout %h not from result_data %h", u, dout[u], result_data[u]);
        end
        got[u].push_back('{dout[u], sofout[u], eofout[u], cycle});
      end
    if (discard[0]) discards++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- stimulus
  // bytes[] is sent; n_kept of them belong to the frame
  task automatic send(input byte_t bytes [$], input bit sof_alone, input bit eof_alone,
                      input int n_kept, input bit eof_with_last);
    if (sof_alone) begin
      sof = 1'b1;
      @(negedge clk);
      sof = 1'b0;
    end
    for (int i = 0; i < bytes.size(); i++) begin
      clkin = 1'b1;
      din   = bytes[i];
      sof   = !sof_alone && (i == 0);
      eof   = eof_with_last && (i == n_kept - 1);
      if (i == 15) byte16_cycle = cycle;
      @(negedge clk);
      clkin = 1'b0;
      sof   = 1'b0;
      eof   = 1'b0;
      din   = 8'($urandom);
      repeat ($urandom_range(0, 4)) @(negedge clk);
      if (eof_alone && i == n_kept - 1) begin
        eof = 1'b1;
        @(negedge clk);
        eof = 1'b0;
      end
    end
  endtask

  task automatic expect_frame(input byte_t bytes [$], input int n_kept, input bit expect_eof,
                              input string name);
    byte_t  exp [2][$];
    int     nblk = (n_kept + 15) / 16;
    int     waited = 0;
    for (int b = 0; b < nblk; b++) begin
      block_t blk = '0;
      block_t r0, r1;
      for (int j = 0; j < 16; j++)
        blk[127-8*j -: 8] = (16*b + j < n_kept) ? bytes[16*b + j] : 8'h00;
      r0 = model_encrypt(key, blk);
      r1 = model_decrypt(key, blk);
      for (int j = 0; j < 16; j++) begin
        exp[0].push_back(r0[127-8*j -: 8]);
        exp[1].push_back(r1[127-8*j -: 8]);
      end
    end
    while ((got[0].size() < 16*nblk || got[1].size() < 16*nblk) && waited < 20000) begin
      @(negedge clk);
      waited++;
    end
    repeat (60) @(negedge clk);    // nothing more may follow
    for (int u = 0; u < 2; u++) begin
      check(got[u].size() == 16*nblk,
            $sformatf("%s unit %0d: %0d bytes out, expected %0d", name, u, got[u].size(), 16*nblk));
      for (int i = 0; i < got[u].size() && i < 16*nblk; i++) begin
        check(got[u][i].b == exp[u][i],
              $sformatf("%s unit %0d byte %0d: %h expected %h", name, u, i, got[u][i].b, exp[u][i]));
        check(got[u][i].so == (i == 0), $sformatf("%s unit %0d sofout at byte %0d", name, u, i));
        check(got[u][i].eo == (expect_eof && i == 16*nblk - 1),
              $sformatf("%s unit %0d eofout at byte %0d", name, u, i));
        if (i % 16 != 0)
          check(got[u][i].t - got[u][i-1].t == OUT_PERIOD,
                $sformatf("%s unit %0d byte spacing %0d", name, u, got[u][i].t - got[u][i-1].t));
      end
      got[u].delete();
    end
  endtask

  function automatic void make_bytes(output byte_t q [$], input int n);
    q.delete();
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t  q [$];
    u128    rk [11];
    int     d0;
    model_init();
    rst_n = 1'b0; keys_valid = 1'b0; sof = 1'b0; eof = 1'b0; clkin = 1'b0; din = '0;
    key = rand128();
    m_expand(key, rk);
    for (int r = 0; r <= NR; r++) round_keys[r] = rk[r];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    keys_valid = 1'b1;

    // 1: full frame 0..255, first output latency measured
    q.delete();
    for (int i = 0; i < FRAME_BYTES; i++) q.push_back(8'(i));
    fork
      send(q, 0, 0, FRAME_BYTES, 1);
      begin
        wait (got[0].size() > 0);
        check(got[0][0].t - byte16_cycle == FIRST_OUT_LATENCY,
              $sformatf("first output %0d clocks after byte 16, expected %0d",
                        got[0][0].t - byte16_cycle, FIRST_OUT_LATENCY));
      end
    join
    expect_frame(q, FRAME_BYTES, 1, "full frame");

    // 2: 40 bytes, eof alone after the last, then 5 bytes to discard
    d0 = discards;
    make_bytes(q, 45);
    send(q, 0, 1, 40, 0);
    expect_frame(q, 40, 1, "short frame");
    check(discards - d0 == 5, $sformatf("short frame: %0d bytes discarded, expected 5", discards - d0));

    // 3: sof alone, 260 bytes without eof: closes after 256
    d0 = discards;
    make_bytes(q, FRAME_BYTES + 4);
    send(q, 1, 0, FRAME_BYTES, 0);
    expect_frame(q, FRAME_BYTES, 1, "overlong frame");
    check(discards - d0 == 4, $sformatf("overlong frame: %0d bytes discarded, expected 4", discards - d0));

    // 4: keys not ready: nothing may come out until keys_valid rises
    keys_valid = 1'b0;
    make_bytes(q, 64);
    send(q, 0, 0, 64, 1);
    repeat (50) @(negedge clk);
    check(got[0].size() == 0 && got[1].size() == 0, "output while keys_valid low");
    keys_valid = 1'b1;
    expect_frame(q, 64, 1, "stalled frame");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
