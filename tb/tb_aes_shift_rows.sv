// tb_aes_shift_rows: self-checking testbench for aes_shift_rows (ShiftRows).
//
// Drives the FIPS-197 Appendix B round-1 value through the block and compares
// with the printed result, then all 256 byte values (sixteen states of
// consecutive bytes) and 300 random states against the independent reference
// in aes_model_pkg. The block is combinational; a free-running clock only
// paces the watchdog.
module tb_aes_shift_rows;
  import aes_model_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic [127:0] a, y;

  aes_shift_rows dut (
    .state_in(a),
    .state_out(y)
  );

  task automatic check(input logic [127:0] exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s: in %h got %h expected %h", what, a, y, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_init();
    a = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1 check(128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS-197 example");
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) a[127-8*j -: 8] = 8'(16*i + j);
     
      #1 check(m_shift_rows(a, 0), "byte sweep");
    end
    for (int i = 0; i < 300; i++) begin
      a = rand128();
      #1 check(m_shift_rows(a, 0), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
