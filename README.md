# Bus-encoded 7-bit link: invert, then send only the positions of the 1s

Neighbouring wires on a wide on-chip bus couple capacitively. When many lines
switch at once, and especially when two neighbours switch in opposite
directions, the coupling slows the victim line and injects noise. This design
reduces the wires of a 7-bit link to four and bounds how much information
moves on them per word:

1. Count the 1s in the word. If there are four or more, invert the whole word
   and raise a separate line, **ED**. After this step the word has at most
   three 1s, whatever it was.
2. Send the *positions* of those (at most three) 1s as 3-bit codes on a 3-bit
   bus, one code per clock cycle, three cycles per word.
3. At the far end, rebuild a mask of the named lines and XOR it with ED.

So 7 data wires become 4 (ED + 3 position lines). The cost is bandwidth: one
word every three cycles.

The RTL is synthesizable SystemVerilog, with a self-checking testbench for
every block and an end-to-end testbench that sends all 128 possible words
through the link.

## The position code

A position code is 3 bits wide. Code `k` = 1..7 names line `k`, which is bit
`k-1` of the word. Code `000` is the **null** code: "no line". A word with
fewer than three 1s (after the optional inversion) fills its remaining slots
with null codes.

| code | meaning          |
|------|------------------|
| 000  | null, no line    |
| 001  | line 1 = bit 0   |
| 010  | line 2 = bit 1   |
| ...  | ...              |
| 111  | line 7 = bit 6   |

The published scheme lists eight 3-bit register values for the flip
positions, and it calls an empty register "null". Making `000` the null value
and numbering the seven lines from 1 is this design's reading of that list. It
is the only reading in which a word with fewer than three 1s can be told apart
from one whose bit 0 is set. Slots are filled from the lowest line up: slot 0
holds the lowest set line. The published scheme does not fix that order.

Example: `1110111` has six 1s, so ED = 1 and the inverted word is `0001000`.
Its only 1 is bit 3 (line 4). The frame is ED = 1 with codes `100`, `000`,
`000`. The decoder's mask is `0001000`, and XOR with ED gives back `1110111`.
The all-ones word is sent as ED = 1 with three null codes.

## Frame timing

Encoder and decoder each run a `frame_counter` that cycles through phases
0, 1, 2 and raises `last` in phase 2. Both counters start together when a
common synchronous reset (`rst_n` low) is released. That shared start is the
only way the decoder knows which cycle carries which slot. The bus itself
carries no frame marker. If the two ends ever lose step, they stay out of
step until the next reset.

```
cycle          ... | 3f    | 3f+1  | 3f+2  | 3f+3  | ...
phase              |  0    |  1    |  2    |  0    |
enc in_take        |  0    |  0    |  1    |  0    |   data_in sampled at the end of phase 2
bus ED             | ED(W) | ED(W) | ED(W) | ED(W')|   W = word sampled at the end of cycle 3f-1
bus pos            | s0(W) | s1(W) | s2(W) | s0(W')|
dec out_valid      |  1    |  0    |  0    |  1    |   data_out = W in cycle 3f+3
```

- **Input.** The encoder has no ready/valid handshake. It samples `data_in`
  at every rising edge where `in_take` is high, which is once every three
  cycles. A source that has nothing to send must present a word anyway. Zero
  is the cheapest: ED = 0 and three null codes.
- **Latency.** A word sampled at edge *n* is on the bus during the next three
  cycles. It appears on `data_out` with `out_valid` high in the cycle after
  that: three clock edges after sampling.
- **Output.** `data_out` is valid only in the cycle where `out_valid` is 1. In
  the next cycle the decoder starts overwriting its slot-0 register.
- **After reset.** The encoder's registers are cleared, so the first frame
  carries the all-zero word, and the decoder's first `out_valid` presents
  `0000000`.

ED is registered together with the three codes, so it is constant for the
whole frame. The decoder samples it in phase 2.

## Encoder (`bus_encoder`)

The data path is combinational from `data_in` to the inputs of four
registers:

- **`ones_counter`**: the number of 1s, 0..7. It is a tree of six 4-bit
  carry select adders: three add the bit pairs, two add the pair sums (and
  bit 6), and one adds the partial counts.
- **`csla4`**: the low-area carry select adder. A 2-bit ripple adder handles
  bits 1:0 and produces carry C2. Bits 3:2 are added once, with carry 0 (a half
  adder, then a full adder). A 2-bit binary-to-excess-1 converter produces
  the same sum plus one. A multiplexer picks one of the two results using C2.
  This replaces the second ripple adder of a classic carry select adder with
  three gates. The adder has no carry input.
- **`full_adder_18t`**: the full-adder cell used in `csla4`. It is written at
  gate level in the structure of an 18-transistor pass-transistor adder:
  x = A xnor B, sum = x xnor C, carry = x ? A : C. Both outputs go through
  inverter-pair buffers, which in the transistor circuit restore the levels.
  In RTL they are logically transparent.
- **`controller`**: ED = (count >= `THRESH`), with `THRESH` = 4.
- **`comparator`**: `w = data_in ^ {7{ED}}`. It has at most three 1s.
- **`pos_estimate`**: a priority search from bit 0 upwards that yields the
  three slot codes in one cycle.
- Three **`pos_register`**s (3-bit, with enable, cleared to null) plus a
  1-bit one for ED. All four are loaded together on `in_take`. A
  phase-indexed multiplexer puts slot 0, 1, 2 on `pos` in phases 0, 1, 2.

## Decoder (`bus_decoder`)

- Three `pos_register`s. Register *i* loads `pos` in phase *i*. ED is loaded
  in phase 2.
- **`line_identifier`**: three `pos_decoder` cells turn each code into a
  one-hot 7-bit mask, with null giving no bit. The three masks are ORed.
- **`inversion_module`**: the **splitter** copies ED onto seven lines, and
  each line is XORed with its mask bit. It is one module because a splitter
  alone is only wiring.
- A 1-bit register turns `last` into `out_valid` for the following cycle.

## Top level (`crosstalk_avoidance_top`)

The top holds the encoder, the decoder and a stand-alone `full_adder_18t`,
which is the test circuit of the original work. It has its own pins
`fa_a/fa_b/fa_c -> fa_sum/fa_carry`.

The four bus lines leave the encoder on `tx_ed`/`tx_pos` and enter the
decoder on `rx_ed`/`rx_pos`. Whatever sits between them is left outside the
RTL. In the original work that is an analog coupled-RC (pseudo-2π) model of
the wires, which has no logic function and no given element values. For a
working link, tie `rx_*` to `tx_*`.

There are no parameters to set at the top. The package `bem_pkg` holds the
sizes:

| constant | value | meaning                                        |
|----------|-------|------------------------------------------------|
| `DATA_W` | 7     | word width                                     |
| `POS_W`  | 3     | code width                                     |
| `SLOTS`  | 3     | codes per word = cycles per frame              |
| `THRESH` | 4     | invert when this many 1s or more               |

The four values form one consistent set. `SLOTS` must be at least
`DATA_W - THRESH` and at least `THRESH - 1`, and `POS_W` must be able to
name `DATA_W` lines plus null. `ones_counter` and `csla4` are written for
7 bits. Changing `DATA_W` means rewriting the counter tree.

## Where this departs from the original description

- **Position search.** The original RTL finds the positions with a clocked
  bit-by-bit search: a counter on a separate `clk_7` clock, a bit multiplexer,
  a compare, and enabled registers. Its prose says the three registers are
  loaded "simultaneously". Here the search is combinational, in a single
  clock domain.
- **Serial versus parallel transfer.** The original RTL schematics pass the
  three registers from encoder to decoder in parallel (10 wires). The
  described scheme, followed here, uses 4 wires and three cycles.
- **Frame alignment** by a common reset, the input sampling rule, and the
  registered ED line are choices made here. The original says only that "the
  clock cycle directs the sequence".
- **The register block.** The published register schematic shows an adder
  in front of the register, with no explanation. It is not built.
- **The test circuit.** How the test full adder's two outputs would form the
  7-bit bus word is not stated. The adder stands beside the link and is also
  used as the adder cell inside the ones counter.
- The wire-coupling model and the peak-noise estimate are analysis, not
  logic, and are not part of the RTL.

## What the testbench measures about switching

`crosstalk_avoidance_top_tb` prints switching statistics. It sends the 128
words in random order and compares the raw 7-line bus (one word per cycle)
with the 4-line encoded bus (three cycles per word). A typical run:

| bus          | line toggles | adjacent pairs switching in opposite directions |
|--------------|--------------|-------------------------------------------------|
| raw, 7 lines | ~440         | ~90–110                                         |
| encoded, 4   | ~660–690     | ~110–117                                        |

On random data the encoded bus switches *more* per word, because each word
becomes three successive codes. What the scheme guarantees is fewer wires, so
fewer neighbour pairs, and a bounded pattern: at most three non-null codes
per word. Whether that reduces coupling noise in a given layout depends on the
wire spacing the 4-line bus allows. That is a physical question this RTL does
not answer. Expect no activity reduction from it for random traffic.

## Verification

Each block has a testbench in `tb/`. Each one checks its block against values
computed independently: loops over bits, integer arithmetic, and a small
reference encoder in `tb/bem_ref_pkg.sv`. Each prints
`TB_RESULT checks=N failures=M`.

- Combinational blocks are checked exhaustively: full adder on 8 inputs,
  `csla4` on 256 input pairs, counter and comparator on all 128 words,
  `pos_estimate` on every word with three or fewer 1s, `line_identifier` on
  all 512 code triples.
- `bus_encoder_tb` changes `data_in` every cycle and checks that only the
  word present at the `in_take` edge is sent, in slot order.
- `bus_decoder_tb` plays reference frames for all 128 words and checks both
  `data_out` and the `out_valid` cycle.
- `crosstalk_avoidance_top_tb` loops the bus back and sends all 128 words. It
  checks each decoded word, the three-edge latency, the one-in-three
  `in_take` rate, and that no frame carries more than three codes. It also
  counts inverted words, plain words, frames with null codes, frames with
  three codes, and the all-ones case, and fails if any never occurs. It runs
  the top at its default sizes.

Each testbench was also run against a deliberately broken copy of its block
(for example, swapped carry-mux inputs, or a `>` instead of a `>=`
threshold). Every one reported failures.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing rtl/bem_pkg.sv tb/bem_ref_pkg.sv \
    tb/crosstalk_avoidance_top_tb.sv -y rtl -y tb \
    --top-module crosstalk_avoidance_top_tb -Mdir obj
./obj/Vcrosstalk_avoidance_top_tb
```

Replace the testbench name to run any other block's test. Lint a module with
`verilator --lint-only -Wall rtl/bem_pkg.sv rtl/<module>.sv -y rtl`. The
only `-Wall` warnings are the carry outputs of the counter's adders, which
are never set because a 7-bit count fits in 3 bits, and are left unconnected.

## Files

| file                          | contents                                        |
|-------------------------------|-------------------------------------------------|
| `rtl/bem_pkg.sv`              | sizes, types, code-to-mask function             |
| `rtl/full_adder_18t.sv`       | XNOR/XNOR/mux full adder                        |
| `rtl/csla4.sv`                | 4-bit carry select adder with BEC               |
| `rtl/ones_counter.sv`         | 1s count of the word                            |
| `rtl/controller.sv`           | ED decision                                     |
| `rtl/comparator.sv`           | conditional inversion                           |
| `rtl/pos_estimate.sv`         | positions of the remaining 1s                   |
| `rtl/pos_register.sv`         | 3-bit register with enable                      |
| `rtl/frame_counter.sv`        | phase 0..2 of a frame                           |
| `rtl/bus_encoder.sv`          | encoder                                         |
| `rtl/pos_decoder.sv`          | code to one-hot line                            |
| `rtl/line_identifier.sv`      | three decoders ORed                             |
| `rtl/inversion_module.sv`     | splitter and XOR stage                          |
| `rtl/bus_decoder.sv`          | decoder                                         |
| `rtl/crosstalk_avoidance_top.sv` | top level                                    |
| `tb/*_tb.sv`                  | one testbench per module                        |
| `tb/bem_ref_pkg.sv`           | reference encoder for the testbenches           |
