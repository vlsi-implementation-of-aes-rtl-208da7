// aes_frame_bram: frame buffer of DEPTH bytes, one write port and one read port.
//
// Holds one frame of the byte stream (256 bytes by default, the frame size of
// the design) between the byte-serial input and the 16-byte block reads of
// the cipher. Writes happen on the clock where we is high. The read is
// synchronous: rdata shows the byte at raddr one clock after raddr is
// presented, which lets the array map onto an FPGA block RAM or an SRAM macro.
// Contents are not cleared by reset; the frame controller never reads a
// location it has not written in the current frame.
module aes_frame_bram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
