// aes_frame_unit: byte-stream frame encryptor (DECRYPT = 0) or decryptor (DECRYPT = 1).
//
// A frame of up to FRAME_BYTES bytes (256 by default) arrives one byte per
// clkin strobe between sof and eof and is written into a frame BRAM. As soon
// as 16 bytes of the frame are stored, they are read back one per clock,
// assembled into a 128-bit block (first byte in bits [127:120]) and handed to
// the AES-128 core; the 16 result bytes are then sent out one per OUT_PERIOD
// clocks, each with a one-clock clkout pulse, so the output leaves in bursts of
// 16 bytes while the rest of the frame is still coming in. sofout marks the
// first output byte of the frame and eofout its last one.
//
// Input rules: clkin, sof and eof are sampled on the rising clk edge. sof may
// come with the first byte's clkin or alone before it; it always restarts the
// unit (a frame in progress is dropped). eof may come with the last byte's
// clkin or alone after it; the frame also closes by itself after FRAME_BYTES
// bytes. Bytes outside a frame are dropped and flagged on discard. A frame
// whose length is not a multiple of 16 has its last block padded with zero
// bytes. If eof arrives alone after a last block that was already sent, that
// frame ends without an eofout pulse. Processing waits for keys_valid.
//
// Timing per block: 17 clocks to read the block from the BRAM, 1 clock to
// start the core, NR clocks of cipher rounds, then 16 bytes at one every
// OUT_PERIOD clocks. block_data shows the block handed to the core and
// result_data the core's output block (valid from the clock after done until
// the core's next start).
// With keys ready and the unit idle, the first output strobe comes 32 clocks
// after the clock cycle that presents the 16th byte of a block.
//
// The frame size, the signal names and the 16-byte output bursts with
// sofout/eofout/clkout follow the described design; strobe semantics, zero
// padding, output pacing and reading each block as soon as it is complete are
// this design's choices.
module aes_frame_unit
  import aes_pkg::*;
#(
  parameter bit          DECRYPT     = 1'b0,
  parameter int unsigned FRAME_BYTES = 256,
  parameter int unsigned OUT_PERIOD  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        keys_valid,
  input  round_keys_t round_keys,
  // input byte stream
  input  logic        sof,
  input  logic        eof,
  input  logic        clkin,
  input  byte_t       din,
  // output byte stream
  output logic        sofout,
  output logic        eofout,
  output logic        clkout,
  output byte_t       dout,
  // observation
  output block_t      block_data,
  output block_t      result_data,
  output logic        discard
);

  localparam int unsigned AW = $clog2(FRAME_BYTES);
  localparam int unsigned CW = $clog2(FRAME_BYTES + 1) + 1;   // byte counts, one spare bit
  localparam int unsigned PW = $clog2(OUT_PERIOD) + 1;

  if (FRAME_BYTES % 16 != 0 || FRAME_BYTES < 16) begin : g_bad_size
    $error("FRAME_BYTES must be a positive multiple of 16");
  end
  if (OUT_PERIOD < 1) begin : g_bad_period
    $error("OUT_PERIOD must be at least 1");
  end

  // ---------------------------------------------------------------- receive
  typedef enum logic [1:0] {RX_IDLE, RX_RECV, RX_CLOSED} rx_state_e;
  rx_state_e       rx_state_q;
  logic [CW-1:0]   wr_cnt_q;     // bytes of the current frame stored so far
  logic            we;
  logic [AW-1:0]   waddr;

  assign we      = clkin && (sof || rx_state_q == RX_RECV);
  assign waddr   = sof ? '0 : wr_cnt_q[AW-1:0];
  assign discard = clkin && !we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_state_q <= RX_IDLE;
      wr_cnt_q   <= '0;
    end else if (sof) begin
      wr_cnt_q   <= clkin ? CW'(1) : '0;
      rx_state_q <= (clkin && eof) ? RX_CLOSED : RX_RECV;
    end else if (rx_state_q == RX_RECV) begin
      if (clkin) begin
        wr_cnt_q <= wr_cnt_q + CW'(1);
        if (eof || wr_cnt_q == CW'(FRAME_BYTES - 1)) rx_state_q <= RX_CLOSED;
      end else if (eof) begin
        rx_state_q <= RX_CLOSED;
      end
    end
  end

  // ---------------------------------------------------------------- frame BRAM
  logic [AW-1:0] raddr;
  byte_t         rdata;

  aes_frame_bram #(.DEPTH(FRAME_BYTES), .WIDTH(8)) u_bram (
    .clk  (clk),
    .we   (we),
    .waddr(waddr),
    .wdata(din),
    .raddr(raddr),
    .rdata(rdata)
  );

  // ---------------------------------------------------------------- cipher core
  logic   core_start, core_done, core_busy;
  block_t blk_q, core_out;

  if (DECRYPT) begin : g_dec
    aes_decrypt_core u_core (
      .clk(clk), .rst_n(rst_n), .start(core_start), .block_in(blk_q),
      .round_keys(round_keys), .block_out(core_out), .done(core_done), .busy(core_busy)
    );
  end else begin : g_enc
    aes_encrypt_core u_core (
      .clk(clk), .rst_n(rst_n), .start(core_start), .block_in(blk_q),
      .round_keys(round_keys), .block_out(core_out), .done(core_done), .busy(core_busy)
    );
  end

  // ---------------------------------------------------------------- block engine
  typedef enum logic [2:0] {BE_IDLE, BE_FETCH, BE_START, BE_CIPHER, BE_SEND, BE_DONE} be_state_e;
  be_state_e     be_state_q;
  logic [CW-1:0] base_q;         // frame offset of the current block
  logic [4:0]    fcnt_q;         // fetch step 0..16
  logic [3:0]    send_idx_q;     // output byte 0..15
  logic [PW-1:0] ph_q;           // output pacing phase
  block_t        out_q;          // result bytes still to send, next in [127:120]
  logic          rx_closed, full_block, part_block, final_block, pad_byte;

  assign rx_closed   = (rx_state_q == RX_CLOSED);
  assign full_block  = wr_cnt_q >= base_q + CW'(16);
  assign part_block  = rx_closed && (wr_cnt_q > base_q);
  assign final_block = rx_closed && (base_q + CW'(16) >= wr_cnt_q);
  // byte fetch_idx-1 (arriving now from the BRAM) lies past the end of a short frame
  assign pad_byte    = (base_q + CW'(fcnt_q) - CW'(1)) >= wr_cnt_q;
  assign raddr       = AW'(base_q + CW'(fcnt_q));
  assign core_start  = (be_state_q == BE_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      be_state_q <= BE_IDLE;
      base_q     <= '0;
      fcnt_q     <= '0;
      send_idx_q <= '0;
      ph_q       <= '0;
      blk_q      <= '0;
      out_q      <= '0;
      sofout     <= 1'b0;
      eofout     <= 1'b0;
      clkout     <= 1'b0;
      dout       <= '0;
    end else begin
      clkout <= 1'b0;
      sofout <= 1'b0;
      eofout <= 1'b0;
      if (sof) begin
        be_state_q <= BE_IDLE;
        base_q     <= '0;
      end else begin
        unique case (be_state_q)
          BE_IDLE: begin
            if (rx_state_q != RX_IDLE && keys_valid && (full_block || part_block)) begin
              be_state_q <= BE_FETCH;
              fcnt_q     <= '0;
            end else if (rx_closed && !part_block) begin
              be_state_q <= BE_DONE;      // nothing left of this frame
            end
          end
          BE_FETCH: begin
            if (fcnt_q != 5'd0) blk_q <= {blk_q[119:0], pad_byte ? 8'h00 : rdata};
            if (fcnt_q == 5'd16) be_state_q <= BE_START;
            fcnt_q <= fcnt_q + 5'd1;
          end
          BE_START: be_state_q <= BE_CIPHER;
          BE_CIPHER: begin
            if (core_done) begin
              out_q      <= core_out;
              send_idx_q <= '0;
              ph_q       <= '0;
              be_state_q <= BE_SEND;
            end
          end
          BE_SEND: begin
            ph_q <= (ph_q == PW'(OUT_PERIOD - 1)) ? '0 : ph_q + PW'(1);
            if (ph_q == '0) begin
              clkout     <= 1'b1;
              dout       <= out_q[127:120];
              out_q      <= {out_q[119:0], 8'h00};
              sofout     <= (base_q == '0) && (send_idx_q == 4'd0);
              eofout     <= (send_idx_q == 4'd15) && final_block;
              send_idx_q <= send_idx_q + 4'd1;
              if (send_idx_q == 4'd15) begin
                base_q     <= base_q + CW'(16);
                be_state_q <= final_block ? BE_DONE : BE_IDLE;
              end
            end
          end
          BE_DONE: ;                       // wait for the next sof
          default: be_state_q <= BE_IDLE;
        endcase
      end
    end
  end

  assign block_data  = blk_q;
  assign result_data = core_out;

  // output framing rules
  a_sofout_with_byte: assert property (@(posedge clk) disable iff (!rst_n) sofout |-> clkout);
  a_eofout_with_byte: assert property (@(posedge clk) disable iff (!rst_n) eofout |-> clkout);
  // a block is only handed over once the core has finished the previous one
  a_core_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n) core_start |-> !core_busy);

endmodule
