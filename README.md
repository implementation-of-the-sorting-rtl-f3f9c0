# Parallel K-of-N sorters for a muon trigger

A first-level muon trigger has to pick, on every bunch crossing, the few best
track candidates out of several tens. It must be done within a fixed, small
number of 40 MHz clocks. The sorters here find the K best of N patterns in one
to four clocks and report them best first. They need no loop and no sorting
network. Every pair of patterns is compared at the same time, and the K
winners are read straight out of the comparison results.

Four sorters are provided, one per trigger subsystem. Each one is meant to be
a device of its own:

| Sorter | Intended use | Inputs | Outputs | Latency |
|---|---|---|---|---|
| `sort_3of18` | muon port card (CSC) | 18 x 8-bit pattern | 3 x 5-bit address | 1 clock |
| `sort_4of8`  | RPC sorting processor | 8 x (8-bit pattern + 8-bit address) | 4 x (pattern + address) | 1 clock |
| `sort_4of24` | DT muon sorter | 24 x 7-bit pattern | 4 x 5-bit address | 2 clocks |
| `sort_4of36` | CSC muon sorter | 36 x 7-bit pattern | 4 x 6-bit address | 4 clocks |

`sorter_top` places all four side by side. They share only `clk` and `rst_n`.

## Ranking rule

A larger pattern value is a better candidate. Among equal values, the pattern
at the higher input position wins. With this tie rule any two patterns are
strictly ordered, and that is what makes the selection logic simple (see
below). In `sort_4of8` each pattern arrives with an address supplied by the
logic in front of it. There the tie is still broken by *input position*, not
by the value of the supplied address. This is one reading of the rule "the
pattern with the largest address wins". Change `sorter_cmp_matrix` if your
system means the supplied address.

The other three sorters number their inputs themselves. Input `i` has address
`i`, counting from 0.

## How one sorter works (`sorter_core`)

```
 in_pat ──► input reg ──► all comparisons ──► select r-th best ──► K one-hot muxes ──► output reg ──► out_addr / out_pat
 in_addr ─► (or constant i) ─────────── {pattern, address} words ──────────┘
```

1. **Input register.** All N patterns are latched on the same clock edge.
   Supplied addresses are latched too, when there are any.
2. **All comparisons** (`sorter_cmp_matrix`). There is one comparator per pair,
   N(N-1)/2 in all: 28, 153, 276 or 630. For i < j, bit (i,j) is
   `pat[j] >= pat[i]`, meaning "j ranks above i". The `>=` is what puts the
   tie rule into the comparison. `sorter_pkg::cmp_index` gives the bit layout,
   row by row: (0,1), (0,2), …, (1,2), ….
3. **Selection** (`sorter_rank_select`). This is the key step. For pattern i,
   count how many other patterns rank above it:
   - j > i beats i when bit (i,j) is 1;
   - j < i beats i when bit (j,i) is 0.

   Ties are broken, so the order is strict. Exactly one pattern therefore has
   a count of 0 (the best), exactly one has a count of 1, and so on. Select
   vector r is `sel[r][i] = (count_i == r)`, which is one-hot by construction.
   The counts saturate at K, because a pattern beaten K times cannot be among
   the K best. This gives K x N select signals, for example three vectors of
   18 bits in the 3-of-18 sorter.
4. **Multiplexers** (`sorter_onehot_mux`). Each rank has an AND-OR mux. It
   takes the word `{pattern, address}` of the one selected input. The 3-of-18,
   4-of-24 and 4-of-36 sorters bring out only the address; the pattern half
   of their muxes is unused and synthesis removes it.
5. **Output register.** It holds the ranked results, best at index 0.

An assertion in `sorter_core` checks that every select vector is one-hot once
the pipeline has filled after reset.

## Latency and pipelining

`LATENCY` is the number of clocks from the edge that latches a frame into the
input register to the edge that loads its result into the output register. A
new frame is accepted on every clock at every latency. There is no valid or
ready signal: as in the trigger system, every clock carries a frame.

| LATENCY | registers between input and output register |
|---|---|
| 1 | none |
| 2 | after the comparisons |
| 3 | + on the two half counts inside the selection (`SPLIT_REG`) |
| 4 | + after the K select vectors |

The `{pattern, address}` words are delayed alongside, so that they meet their
select vectors at the muxes. The target latencies are 1, 1, 2 and 4 clocks.
The 4-of-24 and 4-of-36 sorters need intermediate registers to reach about
40 MHz on the intended FPGA. Where those registers sit is a choice of this
design, not a given. Move them in `sorter_core` if timing on your device
prefers another cut. The half-count split in `sorter_rank_select` exists only
to give that fourth cut.

The published results were for 40.08 MHz operation. They include an external
register that latches the outputs on a clock shifted by half a period, and
external registers that hold the full candidate objects and are steered by
the output addresses. Both are outside this RTL: the sorter outputs are plain
ports.

## Parameters

Every sorter module has `N`, `K`, `PW` (pattern bits), `AW` (address bits)
and `LATENCY`. The defaults are the published sizes above. `sorter_core`
adds `EXT_ADDR`: 1 means addresses are inputs, 0 means address = position.
`sorter_pkg` holds the four sets of sizes (`MPC_*`, `RPC_*`, `DT_*`,
`CSC_*`) used by `sorter_top`. `LATENCY` must be 1 to 4. With
`EXT_ADDR = 0`, `AW` must be wide enough for N addresses; elaboration stops
otherwise.

Reset is active-low and asynchronous, and clears every register, so all
outputs read 0 during reset. Reset is this design's own addition. The
published pin budgets (144, 128, 168 and 252 inputs besides the clock) count
only pattern and address pins, so `rst_n` is one pin beyond them. The
pipeline flushes itself within `LATENCY` clocks of running data, so you can
tie `rst_n` high if that pin cannot be spared.

## Files

- `rtl/sorter_pkg.sv`: comparison count, pair index, saturating add, scheme sizes
- `rtl/sorter_cmp_matrix.sv`, `rtl/sorter_rank_select.sv`, `rtl/sorter_onehot_mux.sv`: the three stages
- `rtl/sorter_core.sv`: one generic sorter with its registers
- `rtl/sort_3of18.sv`, `rtl/sort_4of8.sv`, `rtl/sort_4of24.sv`, `rtl/sort_4of36.sv`: the four sorters
- `rtl/sorter_top.sv`: all four side by side
- `tb/tb_*.sv`: one self-checking testbench per module
- `tb/sorter_stream_check.sv`: reusable stimulus and checker
- `tb/tb_sort_ref_pkg.sv`: software reference (repeated max search)

## Verification

`sorter_stream_check` feeds a sorter a new frame on every clock. The frames
come in four kinds:

- fully random values;
- values 0..3, which give many ties;
- all values equal;
- mostly zero, with a few random entries.

It compares every ranked output with the reference at the expected latency.
It also checks that the outputs are zero in reset. Finally it measures the
latency directly with a single marked frame. `tb_sorter_top` runs all four
sorters at their default sizes for 3000 frames each. It fails if any sorter
never saw a tied frame, if the frames did not arrive back to back, or if the
4-of-8 sorter never received supplied addresses. It finishes in about 15 s.
The unit testbenches check the comparison bits, the select vectors (both with
and without the count register) and the multiplexer on their own.

Every testbench ends with a line `TB_RESULT checks=N failures=M`. To run one
with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/sorter_pkg.sv tb/tb_sort_ref_pkg.sv tb/tb_sorter_top.sv \
    --top-module tb_sorter_top -Mdir obj && ./obj/Vtb_sorter_top
```

## What is not checked

Clock speed and FPGA resource use were not measured. The logic is purely
combinational between registers, and the biggest stage is the 630-comparator
array of the 4-of-36 sorter. Whether a given device reaches 40 MHz at the
chosen register cuts has to be found with that device's tools.
