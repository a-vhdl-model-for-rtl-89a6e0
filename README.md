# MD5 hash engine with a bit-serial message input

This is a hardware MD5 engine built the way a small FPGA design for data
integrity checks would be. A short message is clocked in one bit at a time and padded into a
fixed 1024-bit frame. The frame is hashed by a fully unrolled, purely combinational MD5 datapath
of 2 × 64 steps, and the 128-bit digest is captured in an output register. The
design holds almost no state: four message bits, a bit counter, one delayed
strobe and the 128-bit result. Everything between the input register and the
result register is logic.

The default configuration hashes messages of up to 4 bits, in a frame of two
512-bit blocks. Two parameters change both sizes. With one block, the engine
computes standard RFC 1321 MD5 of messages up to 447 bits.

## Interface and timing

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clock`     | in  | 1     | clock; every register uses the rising edge |
| `wr`        | in  | 1     | high while message bits are presented on `data` |
| `data`      | in  | 1     | message bit, least significant bit of the message first |
| `G1`        | out | 128   | digest, `{D, C, B, A}` (D in bits 127:96, A in bits 31:0) |

There is no reset and no "valid" output. The protocol is:

1. Raise `wr`. Each rising edge of `clock` with `wr` high takes one bit from
   `data`. The edge that first sees `wr` high starts a new message, so one
   message is one continuous `wr` burst.
2. Bits arrive least significant first. To hash the 4-bit message `1010`
   (written most significant bit first), drive `data` = 0, 1, 0, 1 on four
   successive clocks.
3. Lower `wr`. On the first rising edge with `wr` low, `G1` loads the digest
   of the message. This is one clock after the last data bit. `G1` then holds
   until the next burst ends.

A burst longer than `MSG_BITS` bits keeps its first `MSG_BITS` bits and
drops the rest. A burst shorter than `MSG_BITS` is hashed as a shorter
message, because its length is counted. Bursts may follow each other with a
single idle clock between them. Until the first message completes, `G1` holds
whatever the flip-flops powered up with.

The hashing path from the message register to `G1` is combinational. For the
default two blocks it is 128 steps deep, and each step has four chained
32-bit additions. It must settle within one clock period. The RTL carries no
pipeline registers. At high clock rates you would add them, or slow the clock.

## The message frame

This part decides whether two implementations agree, so it is spelled out in
full. `md5_padder` builds a frame of `NBLK × 512` bits:

```
| message (len bits) | 1 | 0 ... 0 | len as 64-bit number |
  \__________ NBLK*512 - 64 bits ___/ \____ 64 bits ______/
```

The frame size is fixed by `NBLK` and does not depend on the length.
RFC 1321 would pad a 4-bit message into one block. The default design pads it
into two blocks, so its digests are *not* the RFC 1321 MD5 of those 4 bits.
Set `NBLK = 1` to get RFC 1321 results.

The frame is read as a bit string and turned into 32-bit words the MD5 way:

* The first bit of the message string is the most significant bit of the
  message value: the last bit received on `data`.
* The string fills bytes from their most significant bit down. Byte 0 holds
  string bits 0..7.
* Four bytes make a word, little-endian: word `X[w]` holds bytes `4w`..`4w+3`,
  with byte `4w` in bits 7:0.
* The 64-bit length goes in the last two words, low word first:
  `X[NBLK*16-2] = len`, `X[NBLK*16-1] = 0`.

Example: the message `1010`, 4 bits long, gives byte 0 = `1010_1000`. That is
the four message bits, then the padding 1. So `X[0] = 32'h0000_00A8` and
`X[30] = 4`, and every other word of the 32 is zero.

The words are split into blocks: block `j` uses `X[16j .. 16j+15]`.

## The compression datapath

Each block runs through `md5_compress`: 64 instances of `md5_step`, followed by
the feed-forward addition. The first block starts from the MD5 initial value
`A = 67452301, B = efcdab89, C = 98badcfe, D = 10325476`. Each later block
starts from the result of the block before it.

One step `i` (0..63) computes

```
A' = B + ((A + f_r(B, C, D) + X[k_i] + T[i]) <<< s_i)
(A, B, C, D) <= (D, A', B, C)          -- all four at once
```

Here `<<<` is a left rotation. Every step reads the *old* A, B, C, D. The
round `r = i / 16` selects the logic function (`md5_func`):

| steps | function |
|-------|----------|
| 0-15  | F = (B and C) or (not B and D) |
| 16-31 | G = (B and D) or (C and not D) |
| 32-47 | H = B xor C xor D |
| 48-63 | I = C xor (B or not D) |

The per-step constants (`md5_const_rom`) are:

* `T[i] = floor(|sin(i+1)| × 2^32)`, i.e. the 64-entry MD5 table;
* `k_i = i`, `(1 + 5i) mod 16`, `(5 + 3i) mod 16`, `7i mod 16` in rounds 0-3;
* `s_i` cycles through `7 12 17 22`, `5 9 14 20`, `4 11 16 23` and `6 10 15 21`
  in rounds 0-3.

`md5_step` takes its step number as the parameter `STEP`, so the constants
and the rotation are fixed when each instance is built. After 64 steps the
block's input value is added back word by word:
`A+AA, B+BB, C+CC, D+DD`.

## The result word order

`G1 = {D, C, B, A}`, with D in the most significant word. The usual hex
digest string lists bytes 0..15, with A's least significant byte first.
To compare the two, reverse the byte order of the 128-bit value. For example,
MD5("abc") = `900150983cd24fb0d6963f7d28e17f72` appears on `G1` as
`727fe1287d3f96d6b04fd23c98500190`.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `md5_top`, `md5_serial_in`, `md5_padder` | `MSG_BITS` | 4 | longest message, in bits |
| `md5_top`, `md5_padder` | `NBLK` | 2 | frame size in 512-bit blocks; `MSG_BITS + 65 <= 512 × NBLK` |
| `md5_step` | `STEP` | 0 | step number 0..63 |

Logic grows linearly with `NBLK`. The serial capture and padding grow with
`MSG_BITS`. At the defaults, synthesis gives 136 flip-flops: 128 for `G1`,
4 message bits, 3 length bits and 1 delayed `wr`. The rest is 130 adder trees
and bitwise logic.

## Digests of the 4-bit messages (default configuration)

Message written most significant bit first, so it is sent right to left on
`data`:

| IM   | G1 |
|------|----|
| 0000 | 4DC5D19083DA74F718861843A42A48CD |
| 0001 | F6BD2CAB5B64E97ABAAC2BC5B70553D3 |
| 0010 | 6E6D11E9BD230B1F54141BB5E7A95A20 |
| 0011 | 6A39A8BE1C025080B9FD7CECC99A0F9F |
| 0100 | 33A07EDF1DAB74626E9CB037DC53AA61 |
| 0101 | 1CDE5A2FE70F0E9B6CCD7A29CFDA7721 |
| 0110 | D881D13FAAAD4A26D332C8B850CA7FDC |
| 0111 | 251A9729CBED7FB396B54D9D40D7FC27 |
| 1000 | 7FF6024725C9C7977627FE798CFA8884 |
| 1001 | D0A8E78B0CC1A7E05BD37B336DFB2D05 |
| 1010 | 1A2F9D540E847C0EEC6BD03A3CA32E11 |
| 1011 | 5809F9FBBE3587A13577CAEFC4296C31 |
| 1100 | 2D0266AD66C1AECAEB74D090A5E4CA18 |
| 1101 | 654C668B0D5D93161A2D905EAA351BC0 |
| 1110 | 5498B0703DA9203A6CBB5105ECE0AAFC |
| 1111 | 874BD6CBABC736958055E5654B8CB4EB |

## How this relates to the original design

This RTL re-implements a published FPGA design of the same structure. That
design took a serial 4-bit input, used a 1024-bit frame and a combinational
core, and produced a registered 128-bit output in D C B A order. It ran at
50 MHz on a Spartan-3A. The following points were decided here, where the
original description was ambiguous or inconsistent:

* **Round function G.** The original prints G as
  `(B and D) or (B and not D)`. That reduces to B and leaves C unused. This
  RTL uses the MD5 function `(B and D) or (C and not D)`.
* **Round function I.** The original has both `C xor (B or not D)` (MD5) and
  `C xor (B and not D)`. The MD5 form is used.
* **Rotation.** The whole sum `A + f + X[k] + T[i]` is rotated, as MD5 does.
  One form of the original design rotated only `T[i]` and added it
  unrotated.
* **Register update.** `D = C; C = B; B = A'; A = D` is implemented as
  simultaneous register transfer. Carried out one statement after another, it
  would lose D.
* **Padding layout, bit order and length field.** The MD5 conventions above
  are used. The original fixes only the frame size (1024 bits for a 4-bit
  message) and the serial bit order.
* **Published test vectors.** Digests published for the original
  implementation for 4-bit inputs could not be reproduced. That includes
  several literal readings of its algorithm description. This RTL is therefore
  verified against standard MD5 and an independent reference model. It does
  not claim to match those published numbers.
* **Reset and handshake.** The original has no reset pin (131 I/Os = clock,
  wr, data, 128 outputs). The end-of-message detection, length counter and
  one-clock latency are this design's own choices.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `md5_const_rom_tb` | all 64 T, k, s entries; T against `floor(abs(sin(i+1))*2^32)` computed in the testbench |
| `md5_func_tb` | F, G, H, I against bit-level definitions, corner and random operands |
| `md5_step_tb` | six step instances (every round) against a reference step, random inputs |
| `md5_compress_tb` | the one-block "abc" digest, plus random blocks and chaining values against the reference model |
| `md5_padder_tb` | the whole frame for every message of the default size; random messages of every length in a 40-bit, one-block configuration |
| `md5_serial_in_tb` | captured message, length and `done` pulse for bursts of 1..6 bits with 1..3 idle clocks between them |
| `md5_top_tb` | end to end at the default parameters: all 30 messages of 1..4 bits, over-long bursts, back-to-back bursts, the load timing of `G1`, and two known answers from the table above |
| `md5_top_rfc_tb` | `MSG_BITS=24, NBLK=1`: MD5("a") and MD5("abc") sent bit by bit, plus random messages of every length |

`tb/md5_ref_pkg.sv` is the shared software model. It computes T from the sine
function, pads byte by byte, and shuffles the registers with a temporary,
so it shares no code with the RTL.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/md5_pkg.sv tb/md5_ref_pkg.sv rtl/*.sv tb/md5_top_tb.sv \
  --top-module md5_top_tb -Mdir obj_md5_top
./obj_md5_top/Vmd5_top_tb
```

Replace `md5_top_tb` with any other testbench name. Build times are a few
seconds. The unrolled core takes about 15 s to build, and every simulation
finishes in well under a second.

## Files

| file | contents |
|------|----------|
| `rtl/md5_pkg.sv` | word and state types, round enum, initial value |
| `rtl/md5_top.sv` | the engine: capture, padding, NBLK chained compressions, `G1` register |
| `rtl/md5_serial_in.sv` | serial capture and length counter |
| `rtl/md5_padder.sv` | frame construction and word split |
| `rtl/md5_compress.sv` | one 512-bit block: 64 steps and feed-forward |
| `rtl/md5_step.sv` | one MD5 step |
| `rtl/md5_func.sv` | F/G/H/I |
| `rtl/md5_const_rom.sv` | T, k, s per step |
| `tb/*.sv` | testbenches and the reference model package |
