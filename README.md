# Deterministic built-in pattern generator for sequential circuits

Sequential circuits with many flip-flops and only a few primary inputs (DSP
filters, legacy non-scan cores) need long, precise test sequences. Pseudorandom
BIST reaches them poorly, and a ROM holding the whole precomputed sequence is too
large. This RTL stores the sequence **compressed** and expands it on chip during
self test. Precomputed sequences for such circuits have few distinct patterns,
each repeated many times. The s444 benchmark sequence, for example, has 1881
patterns of 3 bits, but only 8 of them are distinct, and pattern `000` alone
makes up 87 % of it. Each pattern is therefore replaced by a variable-length,
prefix-free codeword: a Huffman code or the simpler Comma code. The codeword
stream can be compressed once more by run-length coding. A small decoder next to
the circuit under test (CUT) turns the stream back into patterns. It clocks the
CUT only when a whole pattern is ready, so the CUT receives the original
sequence, in order, with no extra vectors.

The scheme and the s444 numbers follow the article *Deterministic Built-in
Pattern Generation for Sequential Circuits* (Iyengar, Chakrabarty, Murray). The
RTL, its interfaces and its tests are an independent implementation. The places
where it had to choose for itself are listed under
[Departures and choices](#departures-and-choices).

## Structure

```
              test generator circuit (tgc_top)
  +---------------------------------------------------------------+
  |  sg_rom  --bit-->  huffman_decoder  --pattern[N]-------------+---> CUT 0..NUM_CUTS-1
  |  (T_E)             or comma_decoder --test_vec--+            |
  |    |                                            v            |
  |    +--code--> rl_decoder --bit-->   cut_clock_ctrl --cut_clk-+---> CUT clocks
  |   (USE_RL=1)                             ^ normal            |
  +---------------------------------------------------------------+
```

| module | role |
|---|---|
| `tgc_pkg` | code-selection enum, s444 sizes and decoder tables |
| `sg_rom` | sequence generator: ROM with the encoded test set and its address counter |
| `huffman_decoder` | FSM with one state per internal node of the Huffman tree |
| `comma_decoder` | counter of received 1s and a count-to-pattern table |
| `rl_decoder` | run-code table, down counter and zero detector; one bit per clock |
| `cut_clock_ctrl` | gates the CUT clock with TEST_VEC; test/normal clock multiplexer |
| `tgc_top` | wires it all; `CODE` and `USE_RL` pick one of four configurations |

The defaults reproduce the main worked example: the s444 test set, Huffman
coding, a 2280-bit bit-serial ROM and one CUT.

## How a pattern reaches the CUT

The stream is consumed at **one encoded bit per clock**. A pattern whose
codeword has *w* bits therefore takes *w* cycles. The whole test takes as many
cycles as there are stored bits: 2280 cycles for the 1881 s444 patterns, on
average 1.21 cycles per pattern. During the first *w−1* bits the decoder only
changes state. On the last bit it drives the pattern and raises `test_vec`, both
combinational outputs of that cycle. The next rising clock edge is passed on to
the CUT, which latches the pattern on it.

| cycle | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| ROM bit | 1 | 1 | 0 | 0 | 1 | 0 |
| decoder state in the cycle | S1 | S2 | S3 | S1 | S1 | S2 |
| `test_vec` | 0 | 0 | 1 | 1 | 0 | 1 |
| `pattern` | – | – | 001 | 000 | – | 010 |
| `cut_clk` rises at the end of the cycle | no | no | yes | yes | no | yes |

(s444 Huffman code: the bits spell `110`, `0`, `10`, i.e. patterns 001, 000, 010.)

Both codes are prefix-free, so the decoder knows a codeword has ended as soon as
its last bit arrives, with no look-ahead and no word alignment in the ROM.

### Huffman decoder

For s444 the Huffman tree is *skewed*. Each internal node has one leaf child and
one internal child, so the codewords are `0, 10, 110, …, 1111110, 1111111`.

| pattern | occurrences | Huffman | Comma |
|---|---|---|---|
| 000 | 1631 | 0 | 0 |
| 010 | 139 | 10 | 10 |
| 001 | 93 | 110 | 110 |
| 011 | 7 | 1110 | 1110 |
| 110 | 5 | 11110 | 11110 |
| 101 | 3 | 111110 | 111110 |
| 111 | 2 | 1111110 | 1111110 |
| 100 | 1 | 1111111 | 11111110 |

The FSM has 7 states (S1 = root = encoding 0). From state *i*, a 0 emits the
pattern of rank *i* and returns to the root. A 1 moves on to state *i+1*. The
last state emits `111` on 0 and `100` on 1. The decoder is table-driven. Three
parameter arrays indexed `[state][bit]` hold the tree:

* `LEAF`: this edge ends a codeword;
* `NEXT`: the next state when it does not;
* `PATTERN`: the pattern when it does.

Any Huffman tree (or any other prefix code) can be loaded by overriding `N`,
`STATES`, `SW` and the three tables.

### Comma decoder

The Comma codeword of the pattern of rank *i* is *i* ones followed by a 0. The
decoder counts the ones. `test_vec` is simply the inverted input bit, and the
count indexes the table `PATTERNS` (rank → pattern). The same 0 bit that raises
`test_vec` also clears the counter at that clock edge. For s444 the Comma code
costs one more bit than Huffman (2281 against 2280): only the rarest pattern
gets a longer codeword. The decoder, however, is just a 3-bit counter and a few
gates.

### Run-length stage

After Huffman or Comma coding the stream is dominated by runs of 0s. With
`USE_RL = 1` the ROM holds 3-bit run codes instead of bits:

| code | run | code | run |
|---|---|---|---|
| 000 | 0 ×1 | 100 | 0 ×8 |
| 001 | 0 ×2 | 101 | 1 ×1 |
| 010 | 0 ×3 | 110 | 1 ×2 |
| 011 | 0 ×7 | 111 | 1 ×4 |

Runs with no code of their own are stored as several shorter runs. Examples:
0×5 = 0×3 + 0×2; 1×3 = 1×2 + 1×1. Long runs of zeros become 8s followed by the
remainder. `rl_decoder` looks up the code and presets a down counter with the
length minus one (7 → `110`). It sends the run's bit every cycle while the
counter counts to zero. At zero it fetches and loads the next code in the same
cycle. The output is therefore still one bit per clock, with a single load cycle
at the start. The stream `0000000 1111 0 1111 00000`, for instance, is stored as
`011 111 000 111 010 001`.

## Clocking the CUT

`cut_clock_ctrl` produces the CUT clock:

* `normal = 0` (test mode): `cut_clk = clk & en_q`. Here `en_q` is `test_vec`
  sampled on the falling edge of `clk`. `test_vec` is a Mealy output that
  settles in the first half of the cycle, and the enable only changes while
  `clk` is low. The gated clock is therefore glitch-free. Its rising edges
  coincide with the rising edges of `clk` that end a `test_vec` cycle.
* `normal = 1` (normal mode): `cut_clk = clk`. The ROM address and the decoder
  state freeze, and `test_vec` stays low. Returning to test mode resumes the
  sequence where it stopped.

All `NUM_CUTS` outputs carry the same pattern and clock. Several CUTs with the
same inputs can share one decoder and one (jointly encoded) test set.

**Simulating a CUT model.** In a zero-delay simulation, the pattern changes in
the same time step as the `cut_clk` edge that should latch it, because the
decoder state also changes at that `clk` edge. Which value a model clocked by
`cut_clk` sees is then up to the simulator's scheduling. Real flip-flops see the
value from before the edge. The testbench CUT model (`tb/tb_tgc_capture.sv`)
mimics this by sampling the pattern at the preceding falling edge of `clk`. Do
the same, or add a clock-to-Q delay, in your own CUT models.

## Parameters of `tgc_top`

| parameter | default | meaning |
|---|---|---|
| `CODE` | `CODE_HUFFMAN` | `CODE_HUFFMAN` or `CODE_COMMA` |
| `USE_RL` | 0 | 1 inserts the run-length stage; the ROM then holds 3-bit codes |
| `N`, `M` | 3, 8 | pattern width, number of distinct patterns |
| `NUM_CUTS` | 1 | CUTs driven by the shared decoder |
| `ROM_BITS` | 2280 | bit-serial ROM size (s444 Huffman; 2281 for Comma) |
| `RL_WORDS` | 651 | run-code ROM size (1953 bits for s444 Huffman + run length) |
| `INIT_FILE` | "" | `$readmemh` file with the ROM contents, one word per line |
| `HUFF_*`, `COMMA_PATTERNS`, `RUN_BIT`, `RUN_LEN_M1` | s444 tables | decoder tables |

To target another circuit, encode its sequence offline: sort the distinct
patterns by frequency, build the Huffman tree or the Comma ranks, optionally
run-length encode. Then pass the tables and ROM size as parameters and supply
the ROM image through `INIT_FILE`. A Comma code suits a sequence whose
frequencies fall off fast. Its cost over Huffman is exactly the probability of
the rarest pattern when each frequency *p_i* is at least the sum of the
frequencies from *p_(i+2)* onward. For s444 the cost is 0.0005 bits per pattern.
The ROM has no contents of its own. Without `INIT_FILE`, synthesis sees an empty
ROM and removes it.

Sizes for the four s444 configurations:

| configuration | stored bits | test cycles |
|---|---|---|
| Huffman | 2280 | 2280 |
| Comma | 2281 | 2281 |
| Huffman + run length | 1953 (651 codes) | 1 + decoded bits |
| Comma + run length | 2013 (671 codes) | 1 + decoded bits |

The run-length figures assume the original s444 sequence order, which is not
reproduced here. The testbenches use a random order with the same pattern
counts. Its encoded stream has about 720 run codes, and it is simulated with a
larger `RL_WORDS`.

## Departures and choices

* **Comma counter reset edge.** The published circuit clears the counter on the
  falling clock edge, half a cycle after the CUT has latched. Here it clears at
  the same rising edge. The CUT sees the same pattern at every edge, and the
  whole design uses one edge except for the clock-gate enable.
* **Huffman state S7.** One published state diagram swaps the outputs of the
  last state (0 → 100, 1 → 111). The code table and the tree give 0 → 111 and
  1 → 100. The RTL follows the code table, which is consistent with how the
  stream is encoded.
* **Behavioural FSM.** The decoder is written from the state diagram with a
  binary state encoding. It is not a copy of any particular gate netlist.
  Don't-care pattern outputs are driven to 0.
* **Added signals:** `test_done`, the ROM `valid` flag, the run-length `busy`
  flag and the asynchronous active-low reset are this design's additions. So is
  the freezing of the generator in normal mode.
* **Not included.** The CUT itself, and any response compactor at its outputs,
  are outside this RTL. Offline encoding is not hardware. A reference encoder in
  SystemVerilog is in `tb/tgc_tb_pkg.sv`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

* `tb_sg_rom`: random contents and read enables; every word, valid flag,
  stop at the end, reset; and a second instance loaded through `INIT_FILE`
  from `tb/sg_rom_test.hex` (word i = (5·i + 3) mod 8).
* `tb_huffman_decoder`, `tb_comma_decoder`: every codeword, then a random
  1881-pattern sequence with the s444 counts and random idle cycles. They check
  the pattern at each `test_vec`, that `test_vec` stays silent elsewhere, and
  that the input bits total the summed codeword lengths.
* `tb_rl_decoder`: the example stream above, then a full encoded s444-like
  stream with and without enable pauses. The output must be bit-exact with no
  gaps, and every run code must be used.
* `tb_cut_clock_ctrl`: one CUT edge exactly per `test_vec` cycle in test mode,
  one per cycle in normal mode, and low while `clk` is low.
* `tb_tgc_top`: all four configurations side by side, one of them with three
  CUTs. Each applies the full sequence, with a 50-cycle detour into normal mode
  halfway through. It checks that every CUT receives the exact sequence, that
  the test takes one cycle per stored bit (plus one load cycle with run-length
  coding), and that `test_vec` stays silent and the CUT clock runs freely in
  normal mode. It counts every mechanism (TEST_VEC pulses, run-code fetches,
  mode switches, completion).
* `tb_tgc_full`: `tgc_top` at its defaults, with a 2280-bit Huffman stream of
  1881 patterns. It checks 2280 cycles, 1881 pulses and the exact sequence.
* `tb_tgc_table1`: the small 4-bit, 80-pattern example code with both decoders,
  through parameter overrides. It takes 135 Huffman and 140 Comma cycles.
* `tb_tgc_joint`: two 5-input CUTs sharing one decoder with a jointly encoded
  test set (two 200-pattern sets over the same 5 patterns, one after the
  other). Both CUTs must receive the full joint sequence; it takes 532 Huffman
  cycles (1.33 bits per pattern) and 537 Comma cycles.

Run one with plain Verilator, for example:

```
verilator --binary --timing --assert --top-module tb_tgc_top -y rtl -y tb \
    rtl/tgc_pkg.sv tb/tgc_tb_pkg.sv tb/tb_tgc_top.sv
./obj_dir/Vtb_tgc_top
```

The two packages go first on the command line; `-y` lets Verilator find every
module in the file of the same name. Lint with `-Wall` reports only unused
package constants and the reset being used both asynchronously and in assertion
`disable iff` clauses, both harmless.
