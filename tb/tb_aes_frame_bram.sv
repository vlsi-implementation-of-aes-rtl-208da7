// tb_aes_frame_bram: self-checking testbench for aes_frame_bram (256 x 8).
//
// Fills every location with random bytes while reading other locations at
// the same time, then reads every address back and checks that the byte
// appears exactly one clock after its address (registered read). A read of
// the address being written must return the old contents. The expected
// contents come from an array kept by the testbench.
module tb_aes_frame_bram;

  localparam int DEPTH = 256;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic       we;
  logic [7:0] waddr, wdata, raddr, rdata;
  logic [7:0] ref_mem [DEPTH];
  bit         ref_ok  [DEPTH];

  aes_frame_bram #(.DEPTH(DEPTH), .WIDTH(8)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  task automatic expect_byte(input logic [7:0] exp, input int addr);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL read %0d: got %h expected %h", addr, rdata, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_addr;
    logic [7:0] last_exp;
    bit last_chk;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    foreach (ref_ok[i]) ref_ok[i] = 1'b0;
    last_chk = 1'b0;
    // write pass, in a scrambled order, with reads of written locations
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      if (last_chk) expect_byte(last_exp, last_addr);
      we    = 1'b1;
      waddr = 8'(i * 37 + 11);
      wdata = 8'($urandom);
      raddr = (i % 3 == 0) ? waddr : 8'($urandom);
      last_chk  = ref_ok[raddr];
      last_exp  = ref_mem[raddr];           // old contents on a same-address read
      last_addr = raddr;
      ref_mem[waddr] = wdata;
      ref_ok[waddr]  = 1'b1;
    end
    // read pass
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      if (last_chk) expect_byte(last_exp, last_addr);
      we = 1'b0;
      raddr = 8'(DEPTH - 1 - i);
      last_chk  = 1'b1;
      last_exp  = ref_mem[raddr];
      last_addr = raddr;
    end
    @(negedge clk);
    expect_byte(last_exp, last_addr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
