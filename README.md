# State-transition adders for single-flux-quantum style datapaths

In a bit-serial or bit-slice adder the carry is a feedback loop: the carry out
of one bit (or slice) is an input to the next. In single-flux-quantum (SFQ)
logic only one pulse may be in flight in such a loop, so the loop delay, not
the gate delay, limits the clock rate. The idea implemented here removes the
loop from the data path. The adder is treated as a sequential machine whose
state is the carry. The state is held in nondestructive-readout (NDRO) cells.
The operands never compute the next carry from the current one. Instead they
are decoded into an **action** on the stored carry:

| operand condition          | action on the carry cell |
|----------------------------|--------------------------|
| generate  `g = x & y`      | set                      |
| kill      `k = ~(x \| y)`  | reset                    |
| propagate `p = x ^ y`      | retain                   |

The sum is `p XOR carry`, where the carry is read from the cell without
destroying it. Every step (decode, cell update, sum) is a separate pipeline
stage, so a new bit or slice enters every cycle.

The RTL is ordinary synchronous SystemVerilog. One clock edge stands for one
SFQ clock pulse. A `valid` input stands for "a pulse arrived": without it, the
state is left alone. The design does not model pulse timing, bias margins or
the achievable clock rate. The SFQ test chip this approach was shown on ran
this adder at up to 36 GHz.

## The carry cell (`state_cell`)

`state_cell` holds one bit. It accepts one of four actions per cycle:
`ACT_HOLD`, `ACT_SET`, `ACT_RESET` or `ACT_INVERT`. In SFQ logic this is a
toggle flip-flop modified to also set and reset. The adders use only set,
reset and hold. Invert is part of the general scheme and is kept in the cell.
The action type, the apply function and the prefix combine rule live in
`sfq_arith_pkg`.

## Bit-serial adder (`bit_serial_adder`)

Operands arrive least significant bit first, one bit pair per cycle.

```
cycle t     x, y            -> stage 1 registers k, p, g
cycle t+1   g: set, k: reset, else hold  -> carry cell
            sum <= p ^ carry (carry read before this update = carry into the bit)
cycle t+2   sum, sum_valid visible
```

The latency is 2 cycles and the throughput is 1 bit per cycle.

**Carry controller.** `carry_kill` and `carry_set` arrive together with an
operand bit. They replace that bit's own carry-out action. Kill wins over set,
and both win over the operands. They model confluence buffers merged into the
cell's reset and set inputs. In a pipelined serial processor, kill on the most
significant bit stops one word's overflow from leaking into the next word.
Set on the most significant bit gives the next word a carry-in of 1. Tie both
low to get the bare adder, which is how the original test chip was built.

## Bit-slice adder (`bit_slice_adder`)

This is the part that takes the most thought. A word is cut into `SLICE_W`-bit
slices (default 4), fed one per cycle with the least significant slice first.
`first_slice` marks the first slice of each word. There is one carry cell per
bit position `j`, and it holds `c[j+1]`, the carry into bit `j+1`.

### Pipeline (SLICE_W = 4)

| stage | work |
|-------|------|
| 1 | `p[j] = x^y`, `g[j] = x&y` |
| 2 | prefix level 1: group p/g over spans of 2 bits |
| 3 | prefix level 2: group p/g `[0:j]` for every `j` |
| 4 | `k[0:j] = ~(p[0:j] \| g[0:j])`; action for cell j: set on `g[0:j]`, reset on `k[0:j]`, else hold |
| 5 | the cells are updated |
| 6 | `sum[j] = p[j] ^ c[j]`, registered |

The prefix rule is `p[i:j] = p[i:k-1] & p[k:j]` and
`g[i:j] = g[k:j] | g[i:k-1] & p[k:j]`. It is used in a Kogge-Stone
arrangement, with one level per stage and `log2(SLICE_W)` levels. Values that a
level does not change go through plain flip-flops, so every path has the same
depth. `k` is formed from `p` and `g` at the end, not from the operands. This
is because `p` and `g` are what the prefix network produces.

The latency is `log2(SLICE_W) + 4` cycles: 6 for 4-bit slices, 7 for 8-bit
slices. The throughput is one slice per cycle, and the pipeline accepts
bubbles.

### How the carry crosses from one slice to the next

A cell that gets "hold" for slice `s` must end up holding the carry into slice
`s`. But after slice `s-1` it holds that slice's `c[j+1]`, which is generally
something else. The adder fixes this without a carry loop. The action that the
top cell received for slice `s-1` is stored in a link flip-flop. That action is
the slice-level generate/kill. For slice `s`, it is applied to **every** cell
together with the cell's own action. The own set or reset takes precedence.

Why this is enough:

- If slice `s-1` generated or killed its carry-out, the linked set or reset
  puts that carry-out into every cell.
- If slice `s-1` propagated through all its bits, every one of its carries
  equalled its carry-in. That carry-in is also its carry-out. So the cells
  already hold the right value, and "hold" leaves them alone.

**Chain break.** `first_slice` replaces the linked action by reset. The first
slice of a word therefore sees a carry-in of 0, whatever the previous word
left behind.

Bit 0 of the sum needs the carry into the slice, and that is not in any cell
after the update. A flip-flop therefore samples the top cell just before the
slice's own update. `carry_out` is the top cell after the update: it is the
carry into the next slice, or the word's carry out on the last slice.

`first_slice` must be raised only together with `in_valid`, and an assertion
checks this.

## Test circuit (`serial_adder_test_circuit`) and `shift_register`

This wraps the bit-serial adder the way it would be tested on chip. Two input
shift registers and one output shift register (4 bits, `DATA_W`) let slow
equipment feed a fast adder:

1. **write**: `wr_en` high for `DATA_W` cycles, operand bits on `x_in`/`y_in`,
   LSB first;
2. **calc**: `calc_en` high for `DATA_W` cycles. This is the burst of fast
   clocks that a ladder oscillator gives on chip. The operands shift into the
   adder. Each sum bit shifts into the output register when it becomes valid,
   so the whole sum word is present 2 cycles after the burst;
3. **read**: `rd_en` high for `DATA_W` cycles; `sum_out` gives the sum, LSB first.
   `sum_word` shows the output register in parallel.

The reference example is `1001 + 0011 = 1100` (9 + 3 = 12), which the
testbenches run first.

## Top (`sfq_adders_top`)

The two adders sit side by side, sharing only `clk` and `rst`:
`ser_*` ports go to the test circuit and `slc_*` ports to the bit-slice adder.
Parameters: `DATA_W = 4` (serial word width), `SLICE_W = 4` (slice width, a
power of two ≥ 2). All registers reset synchronously with active-high `rst`.

## What follows the method and what is this design's own

These parts follow the method directly:

- the k/p/g decode;
- the set/reset/hold mapping onto NDRO cells;
- `sum = p XOR carry`;
- one carry cell per bit in the slice adder, driven by `g[0:j]` and `k[0:j]`;
- two prefix stages for 4-bit slices;
- `k` derived from `p` and `g`;
- equal-depth pipelining;
- one-cycle-delayed flip-flops between slices, resettable to break the chain;
- external carry control merged in front of the cell;
- 4-bit test words with shift registers around the serial adder.

These are choices made here:

- the exact number of register stages and the resulting latencies;
- the Kogge-Stone shape of the prefix network;
- **what** the link flip-flops carry (the previous slice's top-cell action), and
  the chain break implemented as a forced reset;
- the carry-in flip-flop for sum bit 0;
- the priority kill > set > operands in the carry controller; the original
  notes only that such a controller adds a little latency in SFQ, and here it
  adds none;
- the `valid`/`first` side signals, the write/calc/read phase inputs, the
  parallel register views, the 2-bit action encoding and synchronous reset.

Not built: the ladder oscillator. It is an analog SFQ clock source, and here the
`calc_en` window stands in for its burst. Nothing in the RTL models SFQ pulse
timing or clock rate.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_state_cell` | 400 random actions with and without valid, against a reference bit; every action occurs |
| `tb_shift_register` | random shifts/idles against a model of the register |
| `tb_bit_serial_adder` | 60 random 8-bit words back to back with gaps, the sum against integer addition, the 2-cycle latency, carry kill/set and the retained carry out |
| `tb_bit_slice_adder` | 300 random words of 1–6 four-bit slices and 150 words of 1–4 eight-bit slices, with bubbles, slice by slice against integer addition, the latency 6 / 7, carry out; counts slice-to-slice carries, full-propagate slices and chain breaks after a carry out |
| `tb_serial_adder_test_circuit` | 9 + 3, then all 256 pairs of 4-bit operands through write/calc/read; checks the partial word one cycle early, the full word, the read-out and the killed carry |
| `tb_sfq_adders_top` | both adders at default parameters, concurrently: 201 serial additions with random carry kill/set, 400 slice-stream words of 1–8 slices; each mechanism (generate, kill, propagate, external kill, external set, slice link, full propagate, chain break, bubble) must occur |

To run one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/sfq_arith_pkg.sv tb/tb_sfq_adders_top.sv --top-module tb_sfq_adders_top
./obj_dir/Vtb_sfq_adders_top
```

Lint any module with `verilator --lint-only -Wall -Irtl -y rtl rtl/sfq_arith_pkg.sv rtl/<module>.sv`.
Verilator reports the input registers' parallel outputs in
`serial_adder_test_circuit` as unused. They are left open on purpose, since
only the serial end of those registers feeds the adder.
