# AES-128 frame encryption and decryption in SystemVerilog

This RTL encrypts and decrypts a byte stream with AES-128. Bytes arrive one at
a time in frames of up to 256 bytes. Each frame is buffered in a block RAM and
cut into 16-byte AES blocks. An iterative cipher core processes one block at a
time, and the result leaves again as a byte stream in bursts of 16 bytes. Two
such frame units are chained. The encryptor's ciphertext stream is written
into the decryptor's BRAM, and the decryptor gives back the plaintext. Both
units share one key schedule.

The structure follows the design published as "VLSI Implementation of AES 128
Algorithm for Secure Data Transmission":

- an AES-128 encryptor and decryptor with the standard round steps;
- a key expansion that produces the 11 round keys;
- 256-byte frames held in BRAM, with `sof`/`eof` framing on input;
- `sofout`/`eofout`/`clkout` on output, data sent 16 bytes at a time;
- the encrypted data stored in a second BRAM that feeds the decryptor.

The cipher itself is plain FIPS-197 AES-128. The original says its AES has
"some modification" for extra security but never says what that is, so none
is built here.

## Block diagram

```
            key, key_load
                 |
          +--------------+   round_keys[0..10], keys_valid
          | aes_key_expand|-------------------+---------------------+
          +--------------+                   |                     |
                                             v                     v
 enc_sof/eof/clkin/din   +--------------------------+   +--------------------------+
 ----------------------->| aes_frame_unit DECRYPT=0 |   | aes_frame_unit DECRYPT=1 |--> dec_sofout/eofout/
                         |  frame BRAM -> encrypt   |   |  frame BRAM -> decrypt   |    clkout/dout
                         |  core -> byte serializer |   |  core -> byte serializer |
                         +--------------------------+   +--------------------------+
                                  |  enc_sofout/eofout/clkout/dout   ^
                                  +---------------+-----------------+  (dec_ext_sel = 0)
                                                  |
                                   dec_sof/eof/clkin/din (dec_ext_sel = 1)
```

## The cipher cores

State layout. A 128-bit block holds byte 0 in bits `[127:120]` and byte 15 in
bits `[7:0]`. The 4x4 state is filled column by column: byte `4*c + r` is
row `r`, column `c`. This is the FIPS-197 convention, so published test
vectors can be used as hex strings directly.

Encryption (`aes_encrypt_core`):

- the cipher key (round key 0) is XORed onto the plaintext;
- rounds 1 to 9 apply SubBytes, ShiftRows, MixColumns and AddRoundKey;
- round 10 leaves out MixColumns.

Decryption (`aes_decrypt_core`):

- round key 10 is XORed onto the ciphertext;
- each round applies InvShiftRows, InvSubBytes, AddRoundKey (round keys 9
  down to 0) and InvMixColumns;
- the last round leaves out InvMixColumns.

Both cores are iterative. One round datapath is reused every clock, and its
single AddRoundKey XOR also does the initial key addition on the start cycle.

| core | start | done | cycles per block | register bits |
|------|-------|------|------------------|---------------|
| `aes_encrypt_core` | 1-cycle pulse loads `block_in` | pulses 10 clocks after the edge that sampled `start` | 11 | 128 state, 4-bit round counter |
| `aes_decrypt_core` | same | same | 11 | same |

`block_out` holds the result until the next start. A start while busy
abandons the current block.

The step modules are combinational and kept separate so each can be tested
alone:

- `aes_sub_bytes` and `aes_inv_sub_bytes`: 16 parallel S-boxes.
- `aes_shift_rows` and `aes_inv_shift_rows`: row `r` is rotated by `r` bytes,
  left for encryption and right for decryption.
- `aes_mix_columns` (matrix 02 03 01 01) and `aes_inv_mix_columns` (matrix
  0e 0b 0d 09).
- `aes_add_round_key`: one 128-bit XOR.

The S-box tables are not typed in. `aes_pkg` has constant functions that
compute each entry from its definition:

- S-box: the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, taken
  as a^254, then the affine map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^
  rotl(b,4) ^ 63h`.
- Inverse S-box: the inverse affine map `rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^
  05h`, then the GF inverse.

`aes_sbox` and `aes_inv_sbox` evaluate these functions for all 256 inputs at
elaboration, so synthesis still sees a 256 x 8 lookup table.

## Key schedule

`aes_key_expand` works serially and produces one round key per clock.

- A `key_load` pulse stores the key as round key 0 and clears `keys_valid`.
- On each of the next 10 clocks it derives the next round key. The last word
  goes through RotWord and SubWord (four S-boxes) and is XORed with Rcon,
  which starts at 01h and is doubled every round. The new words are running
  XORs with the previous key's words.
- `keys_valid` rises 10 clocks after the edge that sampled `key_load`.

All 11 round keys (1408 flip-flops) stay in registers, so the encryptor reads
them forward and the decryptor backward, and both share them. Reset clears
the round keys, so load the key again after a reset. Do not reload the key
while a frame is in flight.

## Frame units: the byte-stream protocol

`aes_frame_unit` is the part that needs the most care to use. `DECRYPT`
selects the core. All strobes are single-clock pulses, synchronous to `clk`.
`clkin` and `clkout` are byte-valid strobes, not separate clocks.

### Input

- `sof` starts a frame. It may come with the first byte's `clkin` or alone
  before it. It always restarts the unit, and a frame still being processed
  is dropped.
- Each `clkin` writes `din` into the next BRAM address.
- `eof` ends the frame. It may come with the last byte's `clkin` or alone
  after it. The frame also closes by itself after `FRAME_BYTES` (256) bytes.
- Bytes outside a frame are dropped and flagged on `discard`.

### Block engine

1. It waits until 16 bytes of the current block are in the BRAM, or until the
   frame has closed with a partial block, and until `keys_valid` is high.
2. It reads the 16 bytes one per clock through the BRAM's registered read
   port. This takes 17 clocks, and the first byte lands in bits `[127:120]`.
   A short last block is padded with zero bytes.
3. It starts the core (1 clock) and waits for `done` (10 clocks).
4. It shifts the 16 result bytes out, one every `OUT_PERIOD` clocks (default
   2). Each byte comes with a one-clock `clkout`:
   - `sofout` marks the first output byte of the frame;
   - `eofout` marks the last output byte, once the frame has closed.

Blocks are processed while the rest of the frame is still arriving. Output
therefore comes in 16-byte bursts spread over the input.

### Timing and throughput

With keys ready and the unit idle, the first `clkout` comes 32 clocks after
the cycle that presents the 16th byte of a block. A block takes about 62
clocks end to end:

| step | clocks |
|------|--------|
| detect | 1 |
| fetch | 17 |
| start | 1 |
| rounds | 10 |
| capture | 1 |
| send (16 bytes x `OUT_PERIOD`) | 32 |

That is roughly 3.9 clocks per byte. Input may arrive faster: the BRAM holds
the whole frame, and the engine catches up.

### Rules the user must keep

- Start the next frame only after the previous one has left the unit. In the
  chained design this means waiting for the decryptor's `eofout`. A new `sof`
  aborts the frame in progress.
- If `eof` comes alone after a frame whose length is a multiple of 16, and
  its last block has already been sent, that frame ends without an `eofout`.
  Put `eof` on the last byte's strobe to avoid this.

### Observation ports

- `block_data`: the 128-bit block handed to the core.
- `result_data`: the block the core produced.

## Top level (`aes128_top`)

`aes128_top` holds the key schedule and the two frame units.

- With `dec_ext_sel = 0`, the encryptor's output stream (`sofout`, `eofout`,
  `clkout`, `dout`) drives the decryptor's input (`sof`, `eof`, `clkin`,
  `din`). The decryptor's BRAM is then the second BRAM that holds the
  encrypted frame.
- With `dec_ext_sel = 1`, the decryptor takes the `dec_*` inputs, so
  ciphertext from elsewhere can be decrypted.
- `rst_n` is asynchronous and active low. It clears everything, after which
  the key must be loaded again.

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `FRAME_BYTES` | 256 | frame size and BRAM depth; a multiple of 16 |
| `OUT_PERIOD` | 2 | clocks between output bytes of a burst |

After coarse, technology-independent synthesis the top has about 2430
flip-flop bits and 77,824 memory bits. The memory bits are the two 256-byte
frame buffers plus 36 S-box tables of 256 bytes (16 in each core, 4 in the
key schedule).

## Where this design departs from, or adds to, the original

- **Cipher.** Standard AES-128. The unspecified "modification" is not built.
- **Bus byte order.** The original's waveform shows the 128-bit bus with the
  first byte in the low bits (`0f0e0d...`). Here the first byte is in the
  high bits (FIPS-197 order). The cipher result for a given byte stream is
  the standard one.
- **Figure values.** The published waveforms print ciphertext and plaintext
  values. They cannot be reproduced: the hardware key used there is not
  given, and standard AES-128 with key 00 01 .. 0f does not produce them.
- **Design choices not specified in the original:**
  - strobe semantics of `clkin`/`clkout`;
  - the output pacing `OUT_PERIOD`;
  - zero padding of short frames;
  - processing each block as soon as it is complete;
  - the serial key schedule;
  - one round per clock;
  - the external decryptor input `dec_ext_sel`;
  - the `discard`, `block_data` and `result_data` ports.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come from
`tb/aes_model_pkg.sv`, a behavioural AES-128 written independently of the
RTL:

- log/antilog tables instead of xtime chains;
- a bit-wise affine map;
- a `[row][column]` state array.

Results are also compared against the FIPS-197 Appendix B and C.1 vectors:
round values, round keys 1 and 10, and ciphertexts.

| testbench | what it covers |
|-----------|----------------|
| `tb_aes_sub_bytes`, `tb_aes_inv_sub_bytes`, `tb_aes_shift_rows`, `tb_aes_inv_shift_rows`, `tb_aes_mix_columns`, `tb_aes_inv_mix_columns`, `tb_aes_add_round_key` | FIPS-197 round-1 values, all 256 byte values, 300 random states |
| `tb_aes_key_expand` | all round keys for 31 keys; `keys_valid` timing |
| `tb_aes_encrypt_core`, `tb_aes_decrypt_core` | FIPS vectors, 60 random key/block pairs, exact `done` latency, restart while busy |
| `tb_aes_frame_bram` | every address, registered read, read of the address being written |
| `tb_aes_frame_unit` | both directions; full, short (padded), over-long and key-stalled frames; discards; `sofout`/`eofout` placement; byte spacing; first-byte latency |
| `tb_aes128_top` | whole chain at default sizes, counting and requiring each mechanism: key wait, loopback, external decryption, padding, discard, auto-close at 256 bytes, key reload, reset mid-frame |
| `tb_aes128_image` | the frame 00..ff encrypted, and decrypted on its own, with key 00..0f; a generated 128x128 8-bit image (64 frames) encrypted and decrypted frame by frame |

Known limits:

- Only functional simulation was done, with a two-state simulator.
- No timing closure or gate-level checks.
- The RTL contains concurrent assertions on the output framing (`sofout` and
  `eofout` only with `clkout`) and on the core handshake.

## Simulating

Every file holds one module or package named after the file. Packages must
come first on the command line. For example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv tb/aes_model_pkg.sv tb/tb_aes128_top.sv \
  --top-module tb_aes128_top -o sim
./obj_dir/sim
```

Replace `tb_aes128_top` with any other testbench name to run that one. Lint a
module with:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/aes_pkg.sv rtl/<module>.sv
```

Verilator reports `SYNCASYNCNET` on `rst_n`. This is expected: the reset is
used asynchronously in the flip-flops and synchronously in the assertions'
`disable iff`.

## Files

| file | content |
|------|---------|
| `rtl/aes_pkg.sv` | types, GF(2^8) functions, S-box and MixColumns functions |
| `rtl/aes_sbox.sv`, `rtl/aes_inv_sbox.sv` | one-byte S-box and inverse S-box tables |
| `rtl/aes_sub_bytes.sv` ... `rtl/aes_add_round_key.sv` | the eight round steps |
| `rtl/aes_key_expand.sv` | key schedule |
| `rtl/aes_encrypt_core.sv`, `rtl/aes_decrypt_core.sv` | iterative cipher cores |
| `rtl/aes_frame_bram.sv` | 256 x 8 frame buffer, registered read |
| `rtl/aes_frame_unit.sv` | byte-stream frame encryptor/decryptor |
| `rtl/aes128_top.sv` | encryptor -> decryptor chain with shared key schedule |
| `tb/aes_model_pkg.sv` | independent reference model |
| `tb/tb_*.sv` | testbenches |
