# Radix-64 FFT engine on a high-density multi-chip substrate

Large FFTs (a million points and up, as in synthetic aperture radar) are
limited by memory bandwidth, not arithmetic. This engine puts 128 DDR SDRAM
chips, each on its own 16-bit bus, around four accelerator chips on a dense
silicon interposer. Each step reads 64 complex words from 64 DRAMs at once and
computes a complete **64-point FFT** (radix 64) in a pipelined pair of radix-8
levels. All 64 DRAMs stay busy through two tricks:

* **Staggered placement.** Element `i` of 64-point transform `f` is written to
  DRAM `(f + i) mod 64`. The next pass needs element `r` of 64 consecutive
  transforms, and these now lie on 64 different DRAMs, so it too can read all
  64 at once. A lane rotation puts them back in order.
* **Bank-interleaved addressing.** Consecutive transforms go to the four DRAM
  banks in turn. A bank therefore changes row only four transform cycles after
  its previous access, and the precharge and activate are hidden.

At the intended 5 ns memory beat, one 64-point transform takes 4 beats (20 ns).
A million-point FFT is 4 passes of 16,384 such transforms, so it takes
4 x 16,384 x 20 ns = 1.31 ms.

The RTL here is the digital part: the four chips' arithmetic, the bus between
them, the memory interfaces, the rotators, address generation and pass
control. The DRAMs, the interposer and the pad drivers are not modelled as
RTL. The testbench has a simple memory model.

## Data path of one pass

```
 read DRAMs (64 x 16 bit)        fft_ctrl: per-channel read addresses, meta FIFO
        |
 mem_deser x2 (32 ch each)       4 beats -> one 64-bit complex word per channel
        |
 lane_rotator "sort"             out[j] = in[(j + g) mod 64]
        |
 micro_accelerator ROLE 0 x2     8 radix-8 units over n1, twiddle W64^(n2*k1)
        |
 pe_bus                          256 bits x 4 bus beats per core clock, broadcast
        |
 micro_accelerator ROLE 1 x2     8 radix-8 units over n2, inter-pass twiddle
        |
 lane_rotator "stagger"          element i -> DRAM (g + i) mod 64
        |
 mem_ser x2 (32 ch each)         one word -> 4 beats; address from dram_addr_gen
        |
 write DRAMs (64 x 16 bit)
```

The 64-point transform is split as 8 x 8. With `n = 8*n1 + n2` and
`k = k1 + 8*k2`:

```
X[k1 + 8*k2] = sum_n2 W8^(n2*k2) * ( W64^(n2*k1) * sum_n1 x[8*n1 + n2] * W8^(n1*k1) )
```

The first-level unit `u = n2` (chips 0 and 1, four units each) computes the
inner sum and multiplies its output `k1` by `W64^(u*k1)`. The second-level unit
`k1` (chips 2 and 3) computes the outer sum. It then multiplies its output
`X[i]` by the inter-pass twiddle `W_N^((i*tw_m) << tw_shift)`. Here `tw_m` is
the transform number `g` when `tw_en` is set and 0 otherwise. `N = 2^LOG_N`.

### Lane numbering

`fft64_engine.sv` holds all the wiring between levels, so the lane orders are
fixed there:

* first-level chip `c`, lane `l*8 + n1` = sorted element `8*n1 + 4*c + l`;
* bus word `u*8 + k1` = first-level unit `u`, output `k1`. Chip 0 sends words
  0..31 and chip 1 sends words 32..63;
* second-level chip `c`, lane `l*8 + n2` = bus word `n2*8 + 4*c + l`. Its
  output lane `l*8 + k2` is `X[4*c + l + 8*k2]`.

## Staggering, sorting and multi-pass transforms

Each DRAM channel stores one complex word per *slot*. Transform `g` of a pass
is written to slot `g` of all 64 write channels. The stagger rotator sends
output element `i` to channel `(g + i) mod 64`.

`fft_ctrl` knows two read patterns:

| pattern | channel `d` reads slot | lane `d` holds element |
|---|---|---|
| linear (`transposed=0`) | `g` | `(d - g) mod 64` of transform `g` |
| transposed (`transposed=1`) | `64*(g/64) + ((d - g) mod 64)` | element `g mod 64` of transform `64*(g/64) + ((d-g) mod 64)` |

In both cases the sort rotator turns the lanes by `g mod 64`. The transposed
pattern is the corner turn of a two-level decomposition. Together with the
inter-pass twiddles, it builds a 4096-point FFT in two passes:

1. Pass 1 runs linear with `tw_en=1` and `tw_shift = LOG_N - 12`. Input
   `x[64*n1 + g]` must already sit on channel `(g + n1) mod 64`, slot `g`.
2. Pass 2 runs transposed with `tw_en=0` and reads what pass 1 wrote.
   `X[h + 64*k2]` ends up on channel `(h + k2) mod 64`, slot `h`.

The read DRAM group and the write DRAM group are separate ports. Between
passes, the data written in one pass has to be offered as read data to the
next. The testbench does this by swapping the memory arrays. Larger transforms
(the million-point case) need more passes and an index mapping between them,
which this RTL does not sequence. The building blocks are there: any number of
transforms per pass (20-bit count), twiddles up to `N = 2^20`, and both read
patterns.

## Memory addressing

`dram_addr_gen` maps slot `f` and beat `b` (0..3) to a DDR SDRAM address:

```
bank   = f mod 4
column = 4*((f / 4) mod 64) + b       (4 columns of 16 bits = one complex word)
row    = row_base + f / 256
```

The geometry is 4 banks x 4096 rows x 256 columns x 16 bits, a 64 Mbit x16
part. Every bank sees every fourth slot, and a row change in a bank always
comes four slots after that bank's previous access. `rd_row_base` and
`wr_row_base` place the two buffers of a pass.

## Arithmetic

* Samples are 32-bit two's-complement integers (real and imaginary), 64 bits
  per complex word. Twiddle factors have 30 fraction bits (1.0 = 2^30).
  Products are rounded to nearest.
* Nothing is scaled. A 64-point transform can grow values by 64x and a
  4096-point transform by 4096x, so keep inputs below 2^24 and 2^18
  respectively. Overflow wraps silently.
* `radix8_unit` is a decimation-in-time 8-point FFT. Stages 1 and 2 use only
  additions and the factors +-1 and +-j. Stage 3 multiplies by `W8^k`, using
  cos(pi/4) = 759250125 / 2^30, and then adds. Each stage has one register.
* `cmul` is the multiply-accumulate unit: four 32x32 products, two sums and one
  register.
* `twiddle_gen` makes `W_N^e` as the product of a coarse table
  `W_N^(h*2^LOG_FINE)` and a fine table `W_N^l`, with `e = h*2^LOG_FINE + l`.
  Cycle 1 reads the SRAM and cycle 2 multiplies, which overlaps the two
  multiplication-free radix-8 stages. Each output lane has its own generator,
  32 per chip, each holding 2 x 1024 words at the defaults. The tables start
  empty: load them through `tw_wr_*` (broadcast to all 128 generators) before
  the first pass. Coarse entry `h` holds `W_N^(h*1024)` and fine entry `l`
  holds `W_N^l`, each rounded to 2^30 scale.

Accuracy measured in simulation: a 64-point transform stays within 32 LSB of a
double-precision DFT. A 4096-point transform of 18-bit inputs stayed within
about 33 LSB, against outputs up to about 2^29.

## Timing

One clock is one core cycle, 2 ns in the intended technology. In this model
one memory beat takes one clock.

| stage | clocks |
|---|---|
| assemble word after 4th beat (`mem_deser`) | 1 |
| sort rotator | 1 |
| first level: radix-8 stages 1, 2, 3 + twiddle | 4 |
| inter-accelerator bus, 4 slots + receive | 5 |
| second level | 4 |
| stagger rotator | 1 |
| first write beat (`mem_ser`) | 1 |

A pass of `n` transforms keeps the read stream busy without a gap for `4n`
clocks. It then finishes after the pipeline latency plus the memory's read
latency: 320 transforms took 1304 clocks with a 3-clock memory. The bus is the
only shared resource. At 256 bits and four bus beats per core clock it needs
exactly four clocks per transform. Both `pe_bus` and `mem_ser` assert that a
new block never arrives before the previous one is out.

## Interface of `fft64_engine`

| port | dir | meaning |
|---|---|---|
| `start`, `num_fft[19:0]`, `transposed`, `tw_en`, `tw_shift[4:0]`, `rd_row_base`, `wr_row_base` | in | pass setup, sampled on `start` when not `busy` (`tw_shift` is used live) |
| `busy`, `done` | out | `done` rises after the last write beat and stays until the next `start` |
| `tw_wr_en`, `tw_wr_coarse`, `tw_wr_addr_fine`, `tw_wr_addr_coarse`, `tw_wr_data` | in | twiddle table load |
| `rd_cmd_valid`, `rd_addr[64]` | out | one read beat: bank/row/column for every read channel |
| `rd_beat_valid`, `rd_dq[64]` | in | read data, four beats per word in command order, any fixed latency |
| `wr_valid`, `wr_addr`, `wr_dq[64]` | out | one write beat; all 64 channels share the address |

A complex word travels as four beats: `re[15:0]`, `re[31:16]`, `im[15:0]`,
`im[31:16]`. `dram_addr_t` is `{bank[1:0], row[11:0], col[7:0]}` and `cplx_t`
is `{re[31:0], im[31:0]}`. Both are in `fft_pkg`. Reset (`rst_n`) is
asynchronous and active low.

Parameters: `LOG_N = 20` (largest transform the twiddles cover),
`LOG_FINE = 10` (fine table size), `BUS_W = 256`, `BUS_RATIO = 4` (bus beats
per core clock).

## Files

`rtl/`: `fft_pkg`, `cmul`, `radix8_unit`, `twiddle_gen`, `micro_accelerator`,
`lane_rotator`, `pe_bus`, `mem_deser`, `mem_ser`, `dram_addr_gen`, `fft_ctrl`,
`fft64_engine` (top).

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each compares
against values computed independently (double-precision DFTs and cos/sin, or
address formulas) and checks latencies. Each prints
`TB_RESULT checks=N failures=M`. `tb_fft64_engine` runs the top at its default
parameters. It runs 320 independent 64-point transforms and checks their rate.
It then runs a 4096-point transform in two passes and counts that each
mechanism occurred: sort rotation, stagger, transposed read, bus blocks,
inter-pass twiddles, bank interleave, and row changes at least 16 clocks after
the bank's last access.

`tb_million_pass` runs the first pass of a 2^20-point FFT at the default
parameters. The transform is split as 64 x 16384, so the pass is 16,384
64-point transforms over stride 16384, each output `i` of transform `g`
multiplied by `W_(2^20)^(g*i)`. The read memory is a function of the address,
not an array. Every written word is checked against a double-precision
reference: all 1,048,576 words came within 6 LSB. The pass took 65,560 clocks,
which is 4 per transform plus 24. At a 5 ns memory beat this is 328 us per
pass, or 1.31 ms for four such passes.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/fft_pkg.sv tb/tb_fft64_engine.sv \
          --top-module tb_fft64_engine -j 8
./obj_dir/Vtb_fft64_engine
```

The top's test builds in under a minute and runs in under a second.

## Where this departs from, or goes beyond, the original architecture

* **Number format.** The original speaks of 32-bit multiply-accumulate units
  but also of floating-point multipliers for twiddle generation. This RTL is
  32-bit fixed point throughout.
* **Bus width.** The original gives the inter-accelerator bus as 256 bits in
  one place and 128 bits at 2 GHz in another. This RTL uses 256 bits. The four
  2 GHz beats of a 2 ns core cycle are modelled as one 1024-bit transfer per
  core clock, with no separate bus clock.
* **Chip boundaries.** The sort and stagger rotations move data between the
  two chips of a level. The original calls the sort an on-chip shift-register
  stage and does not say how lanes cross between chips. Here both rotators sit
  at engine level as one-clock barrel shifters.
* **Memory interface.** Only data beats and addresses are modelled. There are
  no DDR commands, strobes, refresh or CAS timing. The memory side must return
  read beats in order.
* **Multiply-accumulate count.** The original gives 64 32-bit
  multiply-accumulate units per chip. Here a chip has 32 output twiddle
  multipliers, 32 twiddle generators with one complex multiplier each, and the
  constant multipliers of the third radix-8 stages. The units are not a shared
  pool of 64.
* **The million-point sequence** (four passes of 16,384 transforms) is not
  sequenced. Its index mapping between passes is not given, and 64^4 is not
  2^20. The twiddle range, counters and address space are sized for it.
* **Reading and writing the same DRAM group** across passes is outside this
  RTL. Each DRAM group is wired to one pair of chips, so the hand-over between
  passes is left to the system.
* **Twiddle storage.** Every output lane has its own copy of the twiddle
  tables, so the engine holds 128 x 2048 x 64 bits = 16.8 Mbit of table SRAM.
  This is simple to read but far more than one shared SRAM bank per chip would
  need. The first-level factors are only the 64 values of `W64` and could be
  constants. Sharing one multi-ported table per radix-8 unit, or lowering
  `LOG_FINE`, are the obvious ways to reduce it.
* The coarse/fine twiddle tables, one generator per lane, the address mapping
  formula, the beat order, the register per radix-2 stage and all handshakes
  are this design's own choices. The original gives only what these parts must
  achieve.
