# Twin-symbol run-length decompressor for scan test data

Scan test data is mostly don't-care bits. If every don't-care bit is given the value of the bit
before it ("adjacent filling"), the scan stream becomes long runs of equal bits: few transitions
while shifting, so little test power, and good material for run-length coding. The runs are cut
into symbols, the symbols are Huffman coded off-chip, and a small on-chip decoder expands the code
back into the scan stream while the tester sends it.

To keep the decoder small, a run may be at most **M** bits per symbol. The earlier run-length
Huffman scheme pays for this limit with an extra "empty" symbol every time a long run is cut.
Twin-symbol encoding (TSE) avoids it with one extra symbol meaning "M bits, and the next block
keeps the same value". This repository holds synthesizable SystemVerilog for the TSE decoder, the
scan chain it fills, and testbenches that include a reference encoder.

## The symbol alphabet

Each symbol stands for a block of equal bits and says what the value of the next block is:

| symbol | bits produced                    | value of the next block |
|--------|----------------------------------|-------------------------|
| k, 1 ≤ k ≤ M | k copies of the current value | inverted ("toggle")   |
| M'     | M copies of the current value    | unchanged ("hold")      |

There are M+1 symbols, the same number as in run-length Huffman (whose symbols are 0..M). A run
of L bits becomes `ceil(L/M) - 1` symbols M' followed by one symbol `L - (ceil(L/M)-1)*M`.
Run-length Huffman needs `2*ceil(L/M) - 1` symbols for the same run.

Worked example with M = 4 (checked by `tb_tse_fig1_example`):

```
test cube     1XXX 0XX 11XX1X1 0XXXXX 1XXX1XXX 0XX
filled        1111 000 1111111 000000 11111111 000
TSE symbols   4[1] 3[0] 4'[1] 3[1] 4'[0] 2[0] 4'[1] 4[1] 3[0]         9 symbols
run-length    4[1] 3[0] 4[1] 0 3[1] 4[0] 0 2[0] 4[1] 0 4[1] 3[0]    12 symbols
Huffman
```

(brackets give the value of the block). A 12-bit run becomes `4' 4' 4`: three symbols against
five.

## Decoder structure

```
             clk_ate domain                        clk_soc domain
          +-------------------+   run_len      +--------------+
ate_data->|     tse_fsm       |--------------->|  tse_counter |--shift--+
ate_valid>| Huffman tree walk |   run_req ~~~> |  down-count  |         |
   stop <-| data value, hold/ |   <~~~ run_ack |  run length  |         v
  cfg_* ->| toggle rule       |                +--------------+   +-----------+
          |                   |--data line---------------------->-| scan_chain|
          +-------------------+                     scan_in       +-----------+
                                                   (~~~ = toggle through a 2-flop synchroniser)
```

* **`tse_fsm`** (tester clock) receives the Huffman code one bit per cycle and walks the code
  tree. At a leaf it has a symbol: it puts the run length on `run_len`, the run's value on the
  one-bit data line, and toggles `run_req`. It then sets the value for the next run: inverted
  after symbols 1..M, unchanged after M'. That hold-or-toggle update is the only logic that
  differs from a run-length Huffman decoder.
* **`tse_counter`** (chip clock) sees the request, loads the length and raises `shift` for that
  many cycles in which `scan_en` is high. Each such cycle shifts the data line into the scan
  chain. After the last bit it toggles `run_ack`.
* **`scan_chain`** is a plain shift register that stands for the scan chain of the circuit under
  test.
* **`tse_decoder`** is the top. It connects the three blocks.

### Hand-over between the clocks and the `stop` signal

The tester clock and the chip clock may be unrelated. Exactly one run is in flight at a time:

1. The FSM decodes a codeword, latches the run and toggles `run_req`. `stop` goes high, since
   `stop = run_req XOR synchronised run_ack`.
2. The counter sees the toggle after 2 chip cycles, loads the length on the 3rd, and shifts one
   bit per enabled cycle.
3. On the edge of the last shift it toggles `run_ack`. After 2 tester cycles the FSM sees it and
   `stop` falls.

While `stop` is high the tester must hold its current bit, and the FSM takes no bit. So
`run_len` and the data line never change while the counter is using them, and the data line
needs no synchroniser. The FSM can be in the middle of a codeword when `stop` rises; it stays at
its tree node. Decoding of the next codeword therefore overlaps the shifting of the current run
only up to the point where the next codeword would complete.

Tester protocol: on a rising `clk_ate` edge, a bit on `ate_data` is consumed if and only if
`ate_valid` is high and `stop` is low. `stop` is a function of registers only, so a tester can
sample it in the half cycle before the edge.

### The code table

The Huffman code depends on the test set, so the tree is a writable table rather than fixed
logic. A tree over M+1 symbols has M internal nodes. Node `n` has one entry for each input bit,
and each entry is either `{leaf=0, idx=next node}` or `{leaf=1, idx=symbol}`. Symbol index
`s < M` means a run of `s+1` bits then toggle, and `s = M` means the twin M'. The walk starts at
node 0 (the root) and returns there after each leaf. The tree node is the FSM state, so there are
M walking states; the "run waiting" condition is the extra state, and it shows as `stop`.

Write the table through `cfg_we/cfg_node/cfg_bit/cfg_leaf/cfg_idx`, one entry per tester clock,
while the FSM is at the root (between codewords). Reset loads a default code: node n sends bit 0
to symbol n and bit 1 to node n+1, and the last node sends bit 1 to M'. So the codeword of
symbol index s is s ones followed by a zero, and M' is M ones. An assertion flags writes that
point outside the table.

`tse_tb_pkg::huff_code::build()` in `tb/` shows how a table is made. It builds a Huffman tree
from symbol counts and numbers the nodes breadth-first from the root.

### Value of the first run

No symbol says what the first run's value is. `init_data` sets it: the data line is the FSM's
internal value XOR `init_data`, and the internal value resets to 0. Hold `init_data` constant
for a whole test.

## Interfaces (top `tse_decoder`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_ate`, `clk_soc` | in | 1 | tester clock, chip clock |
| `rst_n` | in | 1 | asynchronous active-low reset for both domains (release with both clocks running) |
| `init_data` | in | 1 | value of the first run |
| `ate_valid`, `ate_data` | in | 1 | serial compressed data |
| `stop` | out | 1 | tester must hold its bit |
| `cfg_we`, `cfg_node`, `cfg_bit`, `cfg_leaf`, `cfg_idx` | in | 1, clog2(M), 1, 1, clog2(M+1) | code-table write |
| `scan_en` | in | 1 | scan shifting allowed; a run pauses while it is low |
| `scan_shift`, `scan_in` | out | 1 | a bit enters the chain this cycle, and its value |
| `scan_out`, `scan_q` | out | 1, SCAN_LEN_P | chain output and contents |
| `run_busy`, `last_hold` | out | 1 | counter busy; the current run came from M' |

Parameters: `M` (block-length limit, default 16) and `SCAN_LEN_P` (chain length, default 64).
Their defaults live in `rtl/tse_pkg.sv`. At the defaults the decoder is about 150 word-level
cells and 216 flip-flops. 192 of those flip-flops are the code table (16 nodes × 2 entries × 6
bits). The chain adds 64.

## What follows the method and what is this design's own

Taken from the method:

* the symbol set and the toggle/hold rule;
* Huffman-coded serial input;
* an FSM on the tester clock driving a one-bit data line;
* a counter on the chip clock;
* the data line gated into the scan chain;
* a stop signal to the tester;
* the evaluated limits M = 8, 16 and 32.

This design's own choices:

* the programmable tree table and its default code;
* the req/ack toggle hand-over with two-flop synchronisers, and one run in flight;
* `stop` is high whenever a run is waiting, not only when the next codeword completes;
* the counter pauses while `scan_en` is low;
* `ate_valid` and `init_data`;
* the reset scheme;
* M = 16 as the default among the three evaluated limits;
* the 64-cell chain.

Not built:

* several parallel scan chains (the method can serve them);
* the circuit's capture cycle;
* the encoder, which is host software. Its reference model is in `tb/tse_tb_pkg.sv`.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_scan_chain` | the chain against a reference shift register, random shifts |
| `tb_tse_counter` | exact shift count per run, no shift while `en` is low, one ack per run, latency of 3 edges to the first shift |
| `tb_tse_fsm` | runs handed over (length, value, twin flag) for 900 random symbols; default and written codes; `init_data`; stop timing and stable outputs while stop is high |
| `tb_tse_decoder` | end to end at the default size: random cubes (70 % and 85 % don't-care), filled, encoded, decoded with the default and with a written Huffman code. Every bit entering the chain and the final chain contents are checked. The number of transitions in the shifted stream must equal the number of toggle symbols less one. It also counts toggle symbols, twins, stop, scan_en pauses, tester idle cycles and table writes, and fails if any never happened |
| `tb_tse_fig1_example` | the M = 4 example above: encoder symbol list, symbol counts, hardware output |
| `tb_tse_block_limits` | M = 8, 16 and 32 side by side on a 90 % don't-care stream. Each decoder must be exact. TSE must never need more symbols than run-length Huffman, and its saving must be largest at M = 8 |

One run of `tb_tse_block_limits` on 6000 bits gave symbol savings over run-length Huffman of
40 %, 31 % and 16 % at M = 8, 16 and 32. Random data is not a benchmark test set, but the trend
is the expected one: the shorter the limit, the more divisions there are for the twin symbol to
save.

Simulate, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/tse_pkg.sv tb/tse_tb_pkg.sv rtl/sync_2ff.sv rtl/tse_fsm.sv rtl/tse_counter.sv \
  rtl/scan_chain.sv rtl/tse_decoder.sv tb/tb_tse_decoder.sv --top-module tb_tse_decoder
./obj_dir/Vtb_tse_decoder
```

`tb_tse_block_limits` also needs `tb/tse_e2e_harness.sv`. Each testbench runs in well under a
second.

## Limits and cautions

* The decoder takes at most one tester bit per tester cycle. Each run costs a hand-over
  latency: 2 chip cycles to see the request and 1 to load it, then 2 tester cycles to see the
  acknowledgement. The run itself takes its length in chip cycles. When the chip clock is not much faster than the tester clock, `stop` holds the tester
  often. The method does not specify the throughput, so none is claimed here.
* Write the code table only between codewords. Writing it mid-codeword changes the walk under
  way.
* The reset is asynchronous in both domains and is not synchronised per domain. Release it while
  both clocks run, or add reset synchronisers for silicon.
