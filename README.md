# Variable-rate Huffman decoder for compressed instruction memory

Embedded programs can be stored compressed, with each instruction byte replaced by a
Huffman code word. The bytes are restored on the fly while the instruction cache
refills a line. For this to pay off, the decoder has to be small and fast. Most of
the input is made of short, frequent code words, and the rare long ones cost little
overall. So the decoder spends a short cycle on a short code word and a longer one
on a long code word. It consumes a variable number of input bits per output byte
and takes a variable time per byte.

This RTL models the decompression engine described in *A High-Speed Asynchronous
Decompression Circuit for Embedded Processors*. The circuit described there is
self-timed (clockless, domino logic). Here it is a synchronous, synthesizable model.
The block structure and the decoding method are the same. Every asynchronous event
(a phase change, a shift pulse, a handshake edge) happens on a rising edge of one
clock.

## Interface

`huffman_decoder` (all signals sampled on `posedge clk`, `rst` synchronous, active high):

| port | dir | width | meaning |
|---|---|---|---|
| `in_data` | in | 32 | compressed word, valid while `in_rqst` is high |
| `in_rqst` / `in_ack` | in / out | 1 | 4-phase input handshake; the memory drives the request |
| `out_data` | out | 32 | four decoded bytes, valid while `out_rqst` is high |
| `out_rqst` / `out_ack` | out / in | 1 | 4-phase output handshake to the cache |
| `rst` | in | 1 | the cache refill logic asserts it after each 8-word (32-byte) line |

Bit order: `in_data[31]` is the first bit of the compressed stream. The first byte of
an output word is `out_data[31:24]`. Each compressed line must start on a 32-bit word
boundary in memory, because after reset the decoder starts at bit 0 of the first word
it is given. The memory keeps feeding words past the end of a line, as a program
memory naturally does. The decoder needs up to two bytes beyond the last code word,
and it may decode garbage from them until the refill logic resets it. Address
generation and the word count belong to the refill logic and are not part of this
RTL. The testbench models them.

## The code and its match classes

This is the part that makes the decoder small, and the one to understand before
changing anything.

**The code.** There are 256 byte values, with code words of 2 to 14 bits. The number
of code words per length is:

| length | 2 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| count | 1 | 4 | 12 | 15 | 38 | 50 | 46 | 39 | 34 | 15 | 2 |

The code is *canonical*. Take the bytes in the order of `huff_pkg::SYMBOLS`. The first
code word is `00`. Every later one is the previous code word plus one, shifted left
when the length grows. The Kraft sum is exactly 1, so every 14-bit string begins with
exactly one code word. The 2-bit word `00` encodes byte `0x00`, the most frequent byte
in instruction code.

**Classes.** A Huffman code fixes only the lengths. The bit patterns can be arranged
so that code words of equal length share prefixes. With the canonical arrangement,
the code words of one length form runs of consecutive values. Each run is cut into a
few *classes*. A class is:

- a prefix of `plen` bits, and
- `nenum` enumerating bits (0 to 5) that pick the member.

All members of a class have the same length `len`. Classes are tried in table order
and the first match wins. A class prefix may therefore also cover code words that
belong to earlier classes. `eoff` counts the enumeration values lost to them. For
example, class 8 has prefix `101` and 5 enumerating bits. Its first 14 values are
taken by the 7-bit classes 4 to 7 before it, so it holds the 18 8-bit words
`10101110`…`10111111`.

The ROM word of a code word is `base + enum - eoff`, where `enum` is the value of
its enumerating bits. `huff_pkg::CLASSES` lists the 30 classes. The published design
uses 31 classes. The class split here is derived from the code above by the greedy
rule given under "Changing the code", with at most 5 enumerating bits per class.

**Why this helps.** The match logic only compares short prefixes, and the short,
frequent code words are the first entries. The code ROM does not wait for the class.
Every class decodes its own enumerating bits into a candidate word line at once, in
parallel with matching. The one-hot class signal then enables exactly one of them.

## One decode step

The 7-byte input buffer (`huff_input_buffer`) holds the stream:

- R0 to R2 are being decoded.
- R3 to R6 receive each new 32-bit word and carry status bits.

The buffer only moves in whole bytes, so the current code word starts 0 to 7 bits
into R0. That bit offset lives in `huff_offset_register`. In the evaluation phase:

1. `huff_alignment_network` shifts the 21 leftmost buffer bits by the offset, in 1-, 2- and 4-bit stages, and delivers 14 aligned bits.
2. `huff_match_logic` finds the class (one-hot).
3. `huff_length_rom` gives the code length.
4. `huff_code_rom` gives the byte. Class 0 (byte `0x00`) bypasses the ROM.
5. `huff_adder` adds the length to the offset:
   - the low 3 bits become the next offset;
   - the carry (0, 1 or 2) becomes the one-hot request `shift0` / `shift8` / `shift16`.

When evaluation ends, the byte goes into the output buffer, the offset register
loads, and the request goes to the shift sequencer.

## Control: the phase `phi` and the shift sequencer

`huff_timing_control` holds the global phase `phi`.

- **Evaluation** (`phi` high) lasts one clock. It ends when the adder and the code ROM
  report completion. The adder's completion also waits for the shift sequencer to
  have taken the request.
- **Precharge** (`phi` low) lasts until both of these hold:
  - the shift sequencer reports `shift_done`;
  - the output buffer has room: it is not full and `out_ack` is low.

`huff_shift_sequencer` is a chain of six flip-flops F0 to F5 holding one token:

| event | token set to | byte shifts |
|---|---|---|
| reset | F0 | 3 (to fill R0 to R2) |
| `shift16` | F2 | 2 |
| `shift8` | F4 | 1 |
| `shift0` | F5 | 0 |

A token in F0, F2 or F4 moves on with a shift pulse, but only while R3 holds valid
data (`shift_enable`). A token in F1 or F3 moves on after one clock, which stands for
the completion of the shift. F5 is `shift_done`.

Resulting rate, with data available and room at the output:

| byte shifts for the symbol | clocks per symbol |
|---|---|
| 0 | 2 |
| 1 | 3 |
| 2 | 5 |

**Input refill.** The input side runs independently of decoding.
`huff_reload_sequencer` loads the next word as soon as all four status bits are
clear. The load overlaps with the decoding of the bytes already in R0 to R2. Load
and shift can never coincide:

- a load needs an empty buffer;
- a shift needs R3 to be valid.

`huff_output_buffer` collects four bytes, raises `out_rqst`, and clears itself on
`out_ack`.

## Throughput on a typical byte mix

`tb_huffman_decoder_throughput` decodes 4800 lines (150 KB of program). Each byte is
drawn with probability 2^-L, where L is its code length, so the mean code length is
5.92 bits. Memory and cache answer their handshakes at once. Typical results:

| measure | value |
|---|---|
| symbols with 0 / 1 / 2 byte shifts | 31% / 66% / 3.5% |
| mean symbol cycle without waits | 2.76 clocks (slowest symbol: 5) |
| clocks per 32-bit output word | 13.3 |
| clocks per 32-byte line, reset to last word | 113 (range 106 to 124) |
| input bits consumed per clock | 1.68 |

Most waiting happens at the output, about 2.2 clocks per word. With four bytes of
output storage, a full buffer must be read before the next symbol can be stored.
The 4-phase handshake then costs at least two clock edges: one for `out_ack` to
rise and clear the buffer, and one for it to fall. The input side waits only while
the buffer first fills after each reset. Each later reload overlaps with decoding.
A faster output path would need a fifth output register. The design as described
does not have one.

## Where this model departs from the published circuit

- **Clocking.** The control is synchronous, with one clock. The original has no
  clock: it uses a C-element, dual-rail completion signals, and a delayed copy of the
  shift clock. The cycle counts above are this model's own. The original reports
  times in nanoseconds that depend on the data.
- **Code lengths.** The counts for 12 bits and longer (34, 15, 2) were chosen here
  to make the code complete. They also give the three 13-bit classes with 3, 2 and
  1 enumerating bits 8, 4 and 2 members. Those three classes select the 14 bytes
  `d7 d5 75 7a d3 5d ba 3b da 9d 5f 57 bb 9a`. The byte order of the code and the
  lengths up to 11 bits follow the published code.
- **Classes.** There are 30 classes instead of 31, so the class numbers do not match
  the published numbering. The 13-bit classes with 3, 2 and 1 enumerating bits are
  numbered 25, 26 and 27 here.
- **Code ROM.** Each class has its own enumeration decoder. The published ROM shares
  decoders between classes (145 instead of 240). Synthesis is left to do its own
  sharing. The three ROM banks are split by word index (0-85, 86-171, 172-255).
- **Datapath logic.** The alignment network, match logic and length ROM are single-rail
  combinational logic, not dual-rail domino logic.
- **Choices made here.** The bit and byte order, the synchronous reset, the push-style
  input handshake, and the rule that the output buffer clears on `out_ack` are this
  design's choices.

## Files

- `rtl/huff_pkg.sv`: widths, types, the class table and the 256-byte ROM contents.
- `rtl/huffman_decoder.sv`: the top level.
- `rtl/huff_*.sv`: one block each, as named above.
- `tb/tb_huff_ref_pkg.sv`: a reference model of the code. It is built only from the
  length counts and the byte order, not from the class table.
- `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_huffman_decoder` runs the whole decoder at its default configuration (the design
has no size parameters). It covers the following:

- **Line content.** It decodes 300 cache lines. The first eight contain all 256 byte
  values. The rest are random with many zero bytes.
- **Random delays.** Both handshakes get random delays, so the decoder waits for
  input as well as for output room.
- **Words.** Every output word is checked.
- **Events.** It requires each of these to happen at least once: 0-, 1- and 2-byte
  shifts, the zero bypass, a reload, an input wait, an output wait, a per-line
  reset, and every class.
- **Rate.** It checks the clocks per symbol whenever neither side stalled.

Running it with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/huff_pkg.sv tb/tb_huff_ref_pkg.sv tb/tb_huffman_decoder.sv \
  --top-module tb_huffman_decoder -o sim && ./obj_dir/sim
```

Replace the testbench name to run any other testbench, for instance
`tb_huffman_decoder_throughput` for the rate figures above. All testbenches pass. Each
one was also run against a copy of its module with a deliberate bug, and each one
failed there.

## Changing the code

To use a different code, make these edits together:

1. Replace `SYMBOLS` (bytes in code word order).
2. Replace `LEN_COUNT` in `tb/tb_huff_ref_pkg.sv`.
3. Rebuild `CLASSES`. Walk the canonical code in order, starting each class at
   the first code word not yet covered. Consider each prefix of that word that
   leaves at most 5 enumerating bits. A prefix qualifies when its subtree, at the
   class length, ends at or before the last code word of that length. Take the
   qualifying prefix that covers the most new words; on a tie, take the longest.
   Then set `base`, `eoff` and `len` to match.

`tb_huff_match_logic` and `tb_huff_code_rom` check the table exhaustively against
the reference code.
