// tb_aes_key_expand: self-checking testbench for aes_key_expand.
//
// Loads the FIPS-197 Appendix A.1 key and compares round keys 1 and 10 with
// the printed values, then compares all eleven round keys of that key and of
// 30 random keys with the independent reference schedule in aes_model_pkg.
// It also checks that keys_valid is low while the schedule runs and rises
// exactly NR clocks after the edge that samples key_load. Stimulus changes on
// the falling clock edge.
module tb_aes_key_expand;
  import aes_model_pkg::*;
  import aes_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        rst_n;
  logic        key_load;
  block_t      key;
  round_keys_t round_keys;
  logic        keys_valid;

  aes_key_expand dut (
    .clk(clk), .rst_n(rst_n), .key_load(key_load), .key(key),
    .round_keys(round_keys), .keys_valid(keys_valid)
  );

  task automatic expect_eq(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_and_check(input block_t k);
    u128 rk [11];
    int n;
    m_expand(k, rk);
    @(negedge clk);
    key = k;
    key_load = 1'b1;
    @(negedge clk);
    key_load = 1'b0;
    n = 0;
    while (!keys_valid && n < 50) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != NR) begin
      failures++;
      $display("FAIL latency: keys_valid after %0d clocks, expected %0d", n, NR);
    end
    for (int r = 0; r <= NR; r++) expect_eq(round_keys[r], rk[r], $sformatf("round key %0d", r));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_init();
    rst_n = 1'b0;
    key_load = 1'b0;
    key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (keys_valid) begin
      failures++;
      $display("FAIL keys_valid high after reset");
    end
    load_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c);
    expect_eq(round_keys[1],  128'ha0fafe1788542cb123a339392a6c7605, "FIPS-197 round key 1");
    expect_eq(round_keys[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 round key 10");
    for (int i = 0; i < 30; i++) load_and_check(rand128());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
