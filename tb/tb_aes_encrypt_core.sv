// tb_aes_encrypt_core: self-checking testbench for aes_encrypt_core.
//
// Round keys come from the reference schedule in aes_model_pkg. The core must
// reproduce the FIPS-197 Appendix B and C.1 encryption examples and agree with the
// independent reference on 60 random key/block pairs. Each block checks that
// done rises exactly NR clocks after the edge that samples start and stays
// high for one clock only. One block is interrupted by a second start after
// three clocks; the core must return the result of the second block.
module tb_aes_encrypt_core;
  import aes_model_pkg::*;
  import aes_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        rst_n;
  logic        start;
  block_t      block_in, block_out;
  round_keys_t round_keys;
  logic        done, busy;

  aes_encrypt_core dut (
    .clk(clk), .rst_n(rst_n), .start(start), .block_in(block_in),
    .round_keys(round_keys), .block_out(block_out), .done(done), .busy(busy)
  );

  task automatic set_key(input block_t k);
    u128 rk [11];
    m_expand(k, rk);
    for (int r = 0; r <= NR; r++) round_keys[r] = rk[r];
  endtask

  task automatic run(input block_t k, input block_t din, input block_t exp, input int abort_after);
    int n;
    @(negedge clk);
    set_key(k);
    if (abort_after > 0) begin
      block_in = ~din;             // a block that gets abandoned
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      repeat (abort_after - 1) @(negedge clk);
    end
    block_in = din;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    block_in = rand128();          // the core must have captured its input
    n = 0;
    while (!done && n < 40) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != NR) begin
      failures++;
      $display("FAIL latency: done after %0d clocks, expected %0d", n, NR);
    end
    checks++;
    if (block_out !== exp) begin
      failures++;
      $display("FAIL data: in %h got %h expected %h", din, block_out, exp);
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL done/busy still high one clock later");
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t k, d;
    model_init();
    rst_n = 1'b0;
    start = 1'b0;
    block_in = '0;
    round_keys = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32, 0);
    for (int i = 0; i < 60; i++) begin
      k = rand128();
      d = rand128();
      run(k, d, model_encrypt(k, d), (i == 7) ? 3 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
