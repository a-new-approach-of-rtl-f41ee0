# Group-based VLC codec with fully programmable tables

This is a Huffman (variable-length code, VLC) encoder and decoder that run at
the same time and handle one symbol per clock in each direction. They share
one small table that describes the code. The code is not stored as a tree or
as a list of bit patterns to match. It is stored as a handful of numeric
*groups*, and both encoding and decoding are done with subtractions, shifts and
additions. Any prefix code with codewords of up to 16 bits, up to 256 symbols
and up to 32 groups can be loaded at run time. The front end is built for
MPEG-style DCT coefficients, given as (run, signed level) pairs. It handles
the sign bit, the 24-bit escape format (escape codeword, 6-bit run, 12-bit
level) and end-of-block (EOB).

The architecture follows a published design: a 0.6 µm codec chip rated at
100 Msymbols/s at 100 MHz. Everything here is synthesizable SystemVerilog.
Where the published description is silent, the choices made here are listed
in [Departures and choices](#departures-and-choices).

## The idea: codes as numbers

Pad every codeword with zeros on the right to the longest codeword length
(16 bits). The padded word, read as a binary number, is the codeword's
*PCLC number* (pseudo-constant-length code). Because the code is prefix-free,
sorting the codewords by PCLC number gives a strictly increasing list.

A **group** is a run of codewords that have the same length and occupy
consecutive numbers. Codewords that come from the same merge step of the
Huffman construction are such a run. Each group is stored as one 29-bit entry:

| field        | bits | meaning                                                         |
|--------------|------|-----------------------------------------------------------------|
| valid        | 1    | entry in use                                                    |
| PCLC_mincode | 16   | smallest codeword of the group, left-justified (zero padded)     |
| CL-1         | 4    | codeword length minus one                                       |
| base_address | 8    | symbol-memory address of the group's smallest codeword           |

Symbols are stored so that within a group, symbol address = base_address +
(codeword − smallest codeword). Across groups, base addresses increase in the
same order as PCLC_mincode. This gives two sorted keys over the same list of
groups, one for each direction:

* **Decoding.** Take the next 16 stream bits as a number `w`. The matching
  group is the last one with `PCLC_mincode ≤ w`. Compute `w − PCLC_mincode`
  and keep its top CL bits: that is the offset inside the group. Adding the
  offset to base_address gives the symbol address, and the symbol memory gives
  the symbol.
* **Encoding.** The matching group is the last one with `base_address ≤ addr`.
  Keep the top CL bits of PCLC_mincode: that is the group's smallest codeword
  as a CL-bit number. Adding `addr − base_address` gives the codeword.

"The last one with key ≤ x" is found in parallel. Each group detector
subtracts its key from `x` and keeps the borrow as a *sign* bit. The signs of
the sorted groups read 0…0 1…1, so the hit is where a detector's sign is 0 and
the next detector's sign is 1. An unused (invalid) entry forces its sign to 1.
Valid groups must therefore be loaded first, in ascending order.

Worked example, with the 9-group code used by the testbenches. The stream
`00111110 0110…` falls in group 1 (length 6, mincode `00110000`, base 4).
`00111110 − 00110000 = 00001110`, whose top 6 bits are 3, so the symbol
address is 4 + 3 = 7. In the other direction, symbol address 19 falls in
group 7 (length 7, mincode `11110000`, base 15). The top 7 bits of the mincode
give 120, and 120 + (19 − 15) = 124 = `1111100`, the 7-bit codeword.

## From run/level pairs to symbol addresses

A full 12-bit symbol would need a 4096-entry address table for encoding.
Instead, the **symbol converter** numbers the non-escaped pairs compactly. A
32-entry **CBS look-up table** holds, for each run `r`, the sum of the largest
allowed level of all runs below `r`. The converted symbol is
`CBS[run] + |level|` (8 bits). The **symbol address memory** (256 × 8) maps it
to the symbol address.

The largest level allowed for a run is `CBS[run+1] − CBS[run]`. A pair whose
level is larger, or whose run exceeds 31, is *escaped*. For MPEG-2 table 15 the
largest levels start 40, 18, 5, 4, 3 …, so CBS starts 0, 40, 58, 63, 67, 70 …
and the pair (run 4, level 2) becomes converted symbol 69.

Escape and EOB each have their own symbol address, held in two registers of
the **special code detector**. The encoder sends that address in place of the
memory output. The decoder compares each decoded symbol address with the same
two registers, so it knows within the decode cycle how many side bits follow
the codeword:

| codeword | side bits that follow          | pointer advance |
|----------|--------------------------------|-----------------|
| ordinary | 1 sign bit (1 = negative)      | CL + 1          |
| EOB      | none                           | CL              |
| escape   | 6-bit run, 12-bit signed level | CL + 18         |

On the decode side, the **symbol memory** (256 × 12) holds each symbol as
`{run[5:0], |level|[5:0]}`. The **symbol recoverer** applies the sign bit, or
takes run and level from the escape field, and raises `dec_finish` on EOB.

## Bit stream buffers

This is the hardest part to follow, and the part that sets the throughput.

**Decoder: `dec_bitstream_selector`.**

* Two 32-bit registers, MSB and LSB, hold the next 64 stream bits. `decCL_acc`
  points at the first unused bit of MSB.
* A barrel shifter moves `{MSB, LSB}` left by `decCL_acc`. The top 16 bits of
  the result are the decoder's window.
* Once the group logic returns CL-1, a second shifter moves the remaining 31
  bits left by CL-1. Its top 18 bits are the side field: the escape field, or
  the sign bit in the MSB.
* The new pointer is `decCL_acc + CL + {1, 0, 18}`. If it reaches 32, LSB moves
  into MSB, 32 new bits enter LSB from the input FIFO, and 32 is subtracted.

The loop from the pointer register, through the window, the 32 group
detectors, the offset shifter, the special-code compare and back to the
pointer, is a single clock cycle. That is what allows one codeword per clock.

**Encoder: `enc_bitstream_concatenator`.**

* The same two registers collect output bits. `encCL_acc` counts the bits
  already placed in MSB.
* One shifter places `{32'b0, codeword16, side18, 30'b0}` so that the codeword
  starts at bit `encCL_acc`. The shift is `48 − (encCL_acc + CL)`.
* A second shifter builds `buf_en` by moving `{32'b0, 32'b1…1, 32'b0}` left by
  `32 − encCL_acc`. These are per-bit write enables for the 32 positions from
  the pointer on, so bits already placed are never overwritten.
* When the pointer reaches 32, the `shift_out` register is set and 32 is
  subtracted. In the next active clock, MSB goes to the output FIFO. Each MSB
  bit that is not being newly written takes the LSB bit at the same position.

Both designs need codeword plus side bits to fit in 32 bits. **An escape
codeword may therefore be at most 14 bits.** (MPEG uses 6.) Ordinary codewords
can be up to 16 bits.

Both FIFOs are 64 bits, as four 16-bit words. The external stream ports are
16 bits wide. The first bit of the stream is bit 15 of the first word.

## Pipelines, handshakes and stalls

```
encoder:  enc_run/enc_level -> [1] symbol_converter (CBS-LUT)
                             -> [2] symaddr_mem
                             -> [3] vlc_enc_dec (encode) + enc_bitstream_concatenator
                             -> output_fifo -> out_bitstream (16 b)
decoder:  in_bitstream (16 b) -> input_fifo
                             -> [3] dec_bitstream_selector + vlc_enc_dec (decode)
                                    + special_code_detector
                             -> [2] symbol_mem
                             -> [1] symbol_recoverer -> dec_run/dec_level/dec_finish
```

`vlc_enc_dec` holds the 32 group detectors. Its encode and decode paths are
independent, so both directions use the one table in the same clock.

Every handshake transfers on a rising clock edge where both of its signals are
high:

| interface       | signals                                          |
|-----------------|--------------------------------------------------|
| encoder input   | `enc_valid` / `enc_ready`                        |
| encoded output  | `out_valid` / `received`                         |
| stream input    | `in_valid` / `request`                           |
| decoded output  | `dec_valid` / `dec_receive`                      |

Stall rules:

* **Encoder.** The whole encoder pipeline holds, and `enc_ready` is low, while
  the output FIFO has fewer than 32 free bits (`output_fifo_full`).
* **Decoder.** The whole decoder pipeline holds while `dec_receive` is low.
* **Decoder starvation.** A bubble enters the decoder when the current
  codeword would empty the MSB register and the input FIFO holds fewer than
  32 bits.

Latency:

* **Encoder:** an accepted pair reaches the concatenator three clocks later.
* **Decoder:** a decoded pair appears on `dec_run`/`dec_level` three active
  clocks after its codeword was selected.

Throughput is one pair per clock in each direction, apart from FIFO bubbles.
In the testbench with the encoder output looped into the decoder:

| pairs   | encoder clocks | decoder clocks |
|---------|----------------|----------------|
| 590,302 | 590,368        | 590,348        |
| 289,129 | 289,183        | 289,156        |

The encoder counts include 40 padding EOBs.

`enc_flush` pads the last partial 32-bit word with zeros, so a finished stream
leaves the buffers. It acts only after the encoder pipeline has drained.
After the last real codeword, the decoder needs enough further bits to make
one more 32-bit refill. The testbenches send a few EOBs after the data.

## Loading a code

All tables are written through one port. While `prog_we` is high, `prog_data`
is written to the table chosen by `prog_sel` at `prog_addr`:

| `prog_sel`     | `prog_addr`                      | `prog_data`                          |
|----------------|----------------------------------|--------------------------------------|
| `PROG_CBS`     | run 0..31; 32 = end register     | CBS value (end register: total number of converted symbols) |
| `PROG_SYMADDR` | converted symbol                 | symbol address `[7:0]`               |
| `PROG_SYMBOL`  | symbol address                   | `{run, |level|}` `[11:0]`            |
| `PROG_GROUP`   | group 0..31                      | `{valid, mincode16, CL-1, base8}` `[28:0]` |
| `PROG_SPECIAL` | 0 = escape, 1 = EOB              | symbol address `[7:0]`               |

Rules for a table:

* Groups are loaded in ascending PCLC_mincode order, with base addresses
  ascending in the same order. Unused entries stay invalid (the reset state).
* The escape codeword is at most 14 bits.
* Gaps in a group's codeword numbers leave unused symbol-memory locations.
  Codes with many gaps need more locations, or the group can be split in two.
  For tables used only for decoding, base addresses need not ascend, so a
  small group may sit in the unused locations inside another group's range.
  Both techniques run unchanged hardware; `tb_table_layouts` exercises them.

Sized examples (group and location counts as published for these tables):

| table          | groups | locations |
|----------------|--------|-----------|
| MPEG-2 table 1 | 7      | 48        |
| MPEG-2 table 9 | 6      | 63        |
| MPEG-2 table 15| 22     | 122       |
| JPEG AC        | 15     | 162–164   |

All fit in 32 groups and 256 locations.

Reloading any table while data is flowing gives undefined codes for the
symbols in flight.

## Files

| file | what it is |
|------|------------|
| `rtl/vlc_pkg.sv` | widths, `group_info_t`, `prog_sel_e`, side-bit count function |
| `rtl/vlc_codec_top.sv` | the codec: both pipelines, programming decode |
| `rtl/vlc_enc_dec.sv`, `rtl/group_detector.sv` | group search, barrel shifters, adders |
| `rtl/symbol_converter.sv`, `rtl/cbs_lut.sv` | pair → converted symbol, escape/EOB detection |
| `rtl/symaddr_mem.sv`, `rtl/symbol_mem.sv` | 256 × 8 and 256 × 12 tables (synchronous read) |
| `rtl/special_code_detector.sv` | escape/EOB symbol-address registers and compare |
| `rtl/dec_bitstream_selector.sv`, `rtl/input_fifo.sv` | decoder stream buffers |
| `rtl/enc_bitstream_concatenator.sv`, `rtl/output_fifo.sv` | encoder stream buffers |
| `rtl/enc_en_ctrl.sv`, `rtl/dec_en_ctrl.sv` | stall and valid-bit control |
| `rtl/symbol_recoverer.sv` | symbol/escape field → run and signed level |

Default parameters are the reference sizes: `NG = 32` groups, 256-entry
memories and 64-bit FIFOs. The widths (16-bit codewords, 12-bit symbols,
8-bit addresses) are package constants. Changing them means re-checking the
shifter widths in the selector and concatenator.

## Simulation

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_vlc_codec_top` | End to end at default size, with the encoder looped into the decoder. It compares every output bit with a reference encoder built from the plain codeword list, and every decoded pair. It checks full rate without back-pressure. It also checks that each mechanism occurs: output-FIFO stall, input starvation, `dec_receive` stall, both kinds of escape, EOB, sign, shift-in/out, flush, concurrent operation. |
| `tb_table_layouts` | The example code in two space-saving layouts: gapped groups split in two (encode and decode, 21 locations), and a decode-only layout with one group placed in another's hole (22 locations, base addresses out of order). |
| `tb_hdtv_rate` | Three frame-sized streams (590,302 / 252,817 / 289,129 pairs) at one pair per clock. |
| one per block | Each module against an independent model. |

`tb/tb_vlc_tables.sv` holds the 9-group example code and the reference encoder.
Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/vlc_pkg.sv tb/tb_vlc_tables.sv $(ls rtl/*.sv | grep -v vlc_pkg) \
  tb/tb_vlc_codec_top.sv --top-module tb_vlc_codec_top
./obj_dir/Vtb_vlc_codec_top
```

The package goes first, and each file only once. Every testbench builds the
same way with its own name in place of `tb_vlc_codec_top`, and they need no
warning switches. To build the codec alone, leave out the two `tb/` files and
use `--top-module vlc_codec_top` with `--lint-only`, or a synthesis tool that
reads SystemVerilog packages.

Each run finishes in seconds.

## Departures and choices

These follow the published design:

* the 29-bit group entry and the sign/XOR hit rule;
* the two barrel shifters and their widths;
* CBS conversion and the escape test (level above the run's maximum, or
  run > 31);
* the special-code compare on symbol addresses;
* the pointer arithmetic of both stream buffers (+1/0/18, subtract 32);
* the 64-bit FIFOs with 16-bit alignment;
* the three-stage split and the stall causes;
* the table sizes (32 × 8, 256 × 8, 256 × 12, 32 × 29).

These are this design's own choices:

* **Hit-driven outputs.** Detectors AND their outputs with their hit, and the
  results are ORed together, instead of driving a tri-state bus.
* **End register for run 31.** The CBS table has an extra 9-bit end register.
  It stands in for the missing `CBS[32]`, so run 31 has a defined largest
  level.
* **EOB and sign encoding.** On the encoder input, EOB is a pair with level 0.
  A sign bit of 1 means negative.
* **Symbol layout.** Decoded symbols are stored as `{run, |level|}`.
* **Programming port.** A single port loads every table (layout above).
* **Handshakes.** The exact handshake rules, and the `dec_valid`, `enc_flush`
  and `dec_miss` signals, are additions.
* **Buffer fill.** After reset the decoder fills both stream registers before
  it decodes.
* **Idle encoder input.** When `enc_valid` is low, the encoder takes a bubble
  instead of freezing: pairs already inside keep moving, and the stream is
  the same.
* **Starvation.** The decoder stalls on an empty input FIFO only when a refill
  is actually due.
* **Pointer threshold.** The pointer test "exceeds 32" is taken as "reaches
  32".

Not covered:

* **Standard tables.** The real MPEG-2 and JPEG tables are not included. The
  testbenches use a 9-group example code, with an MPEG-2-table-15-like profile
  for the CBS table alone.
* **Malformed input.** A window that matches no group is flagged on
  `dec_miss`. Decoding carries on, but its output from that point is
  meaningless. There is no resynchronisation.
* **Silicon.** The fabricated chip's pads, cell library and RAM macros have no
  counterpart here. The memories are plain arrays.

`dec_en_ctrl` passes `dec_receive` straight through as its `adv` output. It is
kept as a named signal so the stall rule stays in one place.
