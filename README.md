# Self-adjusting output data compression for RAM BIST

A RAM that is checked periodically for lost or corrupted data normally needs a
reference signature of its correct contents. With ordinary signature analysis
that reference has to be recomputed from the whole array after every write,
which defeats the purpose for a memory that is written all the time.

This design uses a different memory characteristic, the **modulo-2 address
characteristic**: the bitwise EXOR of the addresses of all cells that hold a
`1`. Because the characteristic is linear in the memory contents, a write
changes it by a term that depends only on the written address and on which
bits changed. The reference is therefore kept up to date in one clock per
write, using the same compressor that computes it, and never has to be
re-learned. This is the technique of the paper *Self-Adjusting Output Data
Compression: An Efficient BIST Technique for RAMs*. The RTL here is an
independent implementation of the architecture it describes: a DRAM-style,
row-organized RAM with a built-in self-test.

## The characteristic

### Bit-oriented RAM

For a RAM of single-bit cells, with `A1` the set of addresses holding a `1`:

    C = XOR of a, over all a in A1

A compressor register computes it while an address generator walks over all
cells, doing `C <= C xor (d ? a : 0)` (module `odc_bit`). If the cell at `a*`
changes, then `C_new = C_old xor a*`.

This characteristic has three useful properties:

- If exactly one cell is wrong, `C_REF xor C_TEST` is that cell's address. The
  fault is both detected and located.
- If exactly two cells are wrong, `C_REF xor C_TEST = a_r xor a_s`, which is
  non-zero. Every double error is detected.
- Take a test pattern generator (TPG) that is an LFSR with primitive
  polynomial phi. Reading the RAM in that LFSR's order gives the same result as
  a serial signature register with the reciprocal polynomial. The only
  difference is that the components come out in reversed order. So the
  aliasing probability is that of signature analysis, 2^-k for a k-bit
  characteristic. `tb_odc_bit` checks this equivalence exhaustively for k = 3
  and on a sample of contents for k = 4.

### Word-oriented RAM

A RAM of `m` words of `n` bits is treated as a bit-oriented RAM whose bit
addresses are pairs `(a_w, a_b)`: the word address and the bit position. The
characteristic is `K = ceil(log2 m) + ceil(log2 n)` bits wide. This design lays
it out as `{a_w part, a_b part}`. A whole word is absorbed in one clock. Its
contribution `C_w` splits into two parts:

- **Word-address part.** This is `F0 * a_w`, where `F0` is the parity of the
  word. An odd number of ones adds `a_w` once; an even number adds nothing.
- **Bit-position part.** This is `(FL, ..., F1)`. `Fi` is the parity of the
  bits whose position has bit `i-1` set. Only those bits can contribute to bit
  `i-1` of the EXORed positions.

`char_parity_tree` computes `F0..FL` with reduction EXORs. `odc_word` builds
the compressor from that tree, one `odc_bit` for the word-address part (with
`d = F0`) and an `L`-bit EXOR register for the bit-position part.

When the word at `a_w` changes from `old` to `new`, the compressor is fed with
the **difference word** `old xor new` at `a_w`. By linearity this adds exactly
the bit addresses that flipped.

For 2^20 words of 8 bits the characteristic has 20 + 3 = 23 flip-flops. The
paper's cost table gives these register widths:

| words | bits | flip-flops |
|-------|------|-----------:|
| 2^20  | 8    | 23 |
| 2^20  | 16   | 24 |
| 2^20  | 32   | 25 |
| 2^30  | 8    | 33 |
| 2^30  | 16   | 34 |
| 2^30  | 32   | 35 |

`tb_odc_table1` builds the compressor at all six sizes and checks the widths
and the arithmetic. The paper also counts EXOR gates (at most
`ceil(log2 m) + l + sum_{j=1..l}(2^j - 1)`). Here the tree is written
behaviourally and gate sharing is left to synthesis, so that count is not
reproduced.

## Architecture

```
              sys_addr/we/wdata                       rdata
                    |                                   ^
                    v                                   |
 +-----------+   +---------------------------------------------+
 | bist_ctrl |-->|  dram_core: array of rows                    |
 | (modes,   |   |    row --act--> refreshment register        |
 |  counter, |   |    switching matrix -> selected word  -------+--> word
 |  pipeline)|   |    wr: word := data register, row written    |
 +-----------+   +---------------------------------------------+
   |   ^  |                         ^ dr              | word
   |   |  |   +-----+               |                 v
   |   +--+---| tpg |     +---------+------------------------+
   |      |   +-----+     | diff_unit: data reg DR, test reg |
   |      |  (LFSR/cnt)   |   TR;  out = TR xor (DR if write) |
   |      |               +----------------+-----------------+
   |      |                                v
   |      |          +---------------------------------------+
   |      +--------->| odc_word: char_parity_tree + odc_bit  |  C (= C_TEST
   |                 |   C <= C xor {F0 ? a_w : 0, FL..F1}   |   in BIST)
   |                 +-------------------+-------------------+
   |                                     v
   |                 +---------------------------------------+
   +---------------->| cref_compare: register C_REF,         |--> bist_fail,
                     |   comparator, syndrome C_REF xor C    |    syndrome
                     +---------------------------------------+
```

The BIST equipment is off the read path. Read data come straight from the
switching matrix, so a read costs exactly what the RAM alone costs.

## Modes and timing

`bist_ctrl` has three modes. Every access flows through a short pipeline:

1. **Stage 0, activate.** The row goes into the refreshment register.
2. **Stage 1, select.** The switching matrix presents the word. For a read it
   is the read data. For a write it is the old word: it goes to the test
   register while the new word is written back.
3. **Stage 2, absorb.** The compressor absorbs the test register contents
   (XORed with the data register for a write).
4. **Stage 3, write only.** `C_REF` is reloaded from the compressor.

**Initialization loop** (`init_start`). The compressor is cleared. The TPG
then issues one address per clock for 2^AW clocks. After the pipeline drains,
`C_REF` takes the compressor value and `init_done` pulses. The loop takes
2^AW + 3 clocks from its start clock, and 2^AW + 4 clocks from an idle
`init_start` pulse.

**System operation.** A request is taken when `sys_req && sys_ready`. One
access takes two clocks of the RAM. Read data appear with `rvalid` one clock
after the request.

A write proceeds as follows:

| clock | RAM | BIST |
|-------|-----|------|
| 0 | row -> refreshment register | new word -> data register |
| 1 | new word written, row written back | old word -> test register |
| 2 | (next access may start) | compressor absorbs `old xor new` at `a_w` |
| 3 | | `C_REF` <- compressor |

Clocks 2 and 3 overlap the next access. The RAM is busy for two clocks per
write.

**BIST loop** (`bist_start`). It runs the same way as the initialization
loop, but `C_REF` is left alone. At the end the comparison is registered:
`bist_fail = (C_REF != C_TEST)` and `syndrome = C_REF xor C_TEST`.
`bist_done` pulses at that point.

Loops are off-line. While a loop request is pending or a loop runs,
`sys_ready` is low and system accesses wait. A loop begins only once any write
adjustment still in flight (clocks 2 and 3 above) has finished. That can delay
the start by up to two clocks. If both loops are requested, initialization
goes first.

After a BIST that passed, the compressor holds `C_TEST = C_REF`. System
operation can therefore continue at once: later writes keep adjusting the
compressor and copying it to `C_REF`.

## Top-level interface (`sabist_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (the array itself is not reset) |
| `init_start`, `bist_start` | in | 1 | one-clock request pulses |
| `busy` | out | 1 | loop pending or running |
| `init_done`, `bist_done` | out | 1 | one-clock end-of-loop pulses |
| `cref_valid` | out | 1 | `C_REF` has been learned |
| `bist_fail` | out | 1 | result of the last BIST |
| `syndrome` | out | K | `C_REF xor C_TEST` of the last BIST: `{word address, bit position}` of a single faulty cell |
| `c_ref`, `c_odc` | out | K | reference register and compressor state |
| `cref_match` | out | 1 | live comparator output |
| `sys_req`, `sys_we`, `sys_addr`, `sys_wdata` | in | 1,1,AW,N | system access |
| `sys_ready` | out | 1 | access accepted when high |
| `rvalid`, `rdata` | out | 1, N | read data, one clock after the request |

| parameter | default | meaning |
|-----------|---------|---------|
| `AW` | 20 | word address bits (2^20 words, as in the cost table's first row) |
| `N` | 8 | word width |
| `CW` | 7 | word-in-row bits: rows of 128 words (1024 bits). This is this design's choice. |
| `USE_LFSR` | 1 | TPG: 1 = LFSR, 0 = binary counter |
| `L`, `K` | derived | `clog2(N)`, `AW + L`. Leave these at their defaults. |

## Blocks

| file | block |
|------|-------|
| `rtl/sabist_pkg.sv` | controller state type, table of primitive LFSR polynomials for 2..32 bits |
| `rtl/tpg.sv` | address generator: Fibonacci LFSR with a primitive polynomial, seed 0...01. It adds the zero state (feedback inverted when all bits below the MSB are 0), so all 2^AW addresses come once per loop. Alternatively a counter. |
| `rtl/char_parity_tree.sv` | `F0..FL` |
| `rtl/odc_bit.sv` | bit-oriented compressor; used as the word-address part of `odc_word` |
| `rtl/odc_word.sv` | word-oriented compressor |
| `rtl/diff_unit.sv` | data register and test register, difference word |
| `rtl/dram_core.sv` | row array, refreshment register, switching matrix |
| `rtl/cref_compare.sv` | `C_REF`, comparator, result and syndrome registers |
| `rtl/bist_ctrl.sv` | control unit |
| `rtl/sabist_top.sv` | the self-testing RAM |

## Where this design departs from, or adds to, the paper

- **Address 0.** The paper numbers words from 1. This design uses addresses
  0 .. 2^AW-1. The cell at word 0, bit 0 has the all-zero bit address, so the
  characteristic cannot see it. Every other cell is covered. A plain LFSR would
  also skip word 0; the TPG's zero-state insertion is there so that the rest of
  word 0 is read.
- **Register widths.** The paper's summary speaks of "n-bit" registers
  `C_REF`, `C_TEST`, TPG and test register. Here `C_REF` and the compressor are
  K bits, as the flip-flop count of the word-oriented compressor requires. The
  TPG is AW bits and the test register N bits.
- **Write latency.** The paper notes that the extra clock for moving the old
  word into the test register can be hidden with two clock phases, or with a
  dual-ported refreshment register. This design uses one clock phase. The cost
  is that a write occupies the RAM for two clocks, and the compressor/C_REF
  update trails it by two clocks, overlapping the next access.
- **Controller size.** The paper estimates one AW-bit counter and two
  flip-flops for the control unit. This one also holds the pipeline's valid,
  write and address flags and two request flags (74 flip-flops in total at the
  defaults).
- **The RAM.** The paper assumes a DRAM whose refresh scheme copies the whole
  row of a written word into the refreshment register. `dram_core` models this
  as a synchronous array with static storage. Cell leakage, periodic refresh
  and sense amplifiers are not modelled, and the row length is chosen here.
- **Power-of-two size.** The word count is always 2^AW. The paper's formulas
  allow any `m`, and its theorem covers shorter LFSR runs. A RAM with fewer
  words would need the loop length and the TPG seed to follow `m`; that is
  not built.
- **Not built.** The start-up / production test that writes test patterns with
  standard march algorithms is not part of the technique and is not built.
  Neither are the dual-clock-phase and dual-port write variants.
- **Writing into a corrupted word.** A write after a cell has silently
  flipped computes the difference from the corrupted old word. The error
  therefore stays in `C_REF` at that cell's address. The next BIST still
  reports it, even though the word now holds correct data. This follows from
  the method and is not a defect of the RTL.

## Simulation

Each testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sabist_pkg.sv tb/tb_sabist_top.sv --top-module tb_sabist_top
./obj_dir/Vtb_sabist_top
```

Replace `tb_sabist_top` with any testbench name below. Every testbench has a
watchdog that fails the run if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_sabist_top` | End to end at 2^8 x 8. It preloads the array and learns `C_REF`, which must equal a bit-by-bit reference. It then runs 400 random reads and writes, checking data and `C_REF` tracking. A BIST requested during a write adjustment must pass with the expected loop length, and a stalled read must be served afterwards. Single flipped cells must fail BIST with the exact syndrome; double flips must fail. Re-learning must give a passing BIST. It counts every mechanism (loops, adjustment, reads, stalls, held loop start, diagnosis) and fails if any never occurred. |
| `tb_sabist_top_full` | The same at the default size, 2^20 x 8: 1M-clock loops, about 10M clocks in all. |
| `tb_sabist_top_small` | The same at the size of the paper's word-oriented example: 8 words of 4 bits. This run uses the counter as address generator. |
| `tb_bist_ctrl` | Clock-by-clock schedule of loops, reads and writes; stalls; a loop start held back by a write adjustment. |
| `tb_tpg` | Every address exactly once per period for AW = 3, 8, 12, 20 and for the counter. |
| `tb_char_parity_tree` | `F0..FL`: exhaustive for N = 4, 7, 8; random for N = 32. |
| `tb_odc_bit` | Characteristic, write adjustment, single-error location, double-error detection. Also the equivalence with serial signature analysis (k = 3, 4). |
| `tb_odc_word` | The same for words (N = 8 and 7). |
| `tb_odc_table1` | The compressor at the six cost-table sizes. |
| `tb_cref_compare`, `tb_diff_unit`, `tb_dram_core` | The registers, the difference path, and the RAM against a word model. |

The testbenches write into the array through hierarchical references
(`dut.u_mem.mem`). They use this to preload it and to flip cells behind the
controller's back. The array has no reset, so a testbench fills it while reset
is asserted.
