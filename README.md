# SSI repeat-accumulate encoder

A repeat-accumulate (RA) code is an LDPC code whose parity-check matrix is
`H = [H_c | H_m]`. `H_m` is dual-diagonal, so the parity bits come out of a
running XOR (an accumulator), and all the design freedom sits in `H_c`, the
interleaver. This RTL encodes RA codes whose `H_c` is built from
*superimposed structured interleavers* (SSI). `H_c` is tiled into `L x L`
blocks with `L = 2^p - 1`. Every nonzero block is one structured permutation
`pi(i,j)`, or the XOR of several (that XOR is the "superimposition"). Each
`pi(i,j)` is fully described by two small integers, so the interleaver costs no
permutation table. Its addresses are produced by a GF(2^p) multiplier.

The design follows the SSI codec architecture of Zhang, Yin and Lu ("New Code
Construction Method and High-Speed VLSI Codec Architecture for Repeat-Accumulate
Codes"): an interleaver memory array (MEMI), a parity-check-bit-generating unit
(PCBGU) and an output multiplexer. It is sized by default for their FPGA
reference code: length 15330, rate 5/6. Only the encoder is here. See
[What is not here](#what-is-not-here).

## The code

Notation used throughout:

| symbol | meaning | default |
|---|---|---|
| `P` | field size exponent, `L = 2^P - 1` | 9, so `L = 511` |
| `NB` | column-blocks of `H` | 30 |
| `MB` | row-blocks of `H` = parity column-blocks | 5 |
| `KB = NB - MB` | information column-blocks | 25 |
| `K = KB*L`, `M = MB*L` | information and parity bits | 12775, 2555 |

**The permutation `pi(i,j)`.** Let `alpha` be the primitive element of
GF(2^P). Row `k` of `pi(i,j)` (`k = 0 .. L-1`) has its single 1 in column
`alpha^(i + j*k) - 1`, 0-based. Here a field element is read as the integer
whose bit `n` is the coefficient of `alpha^n`. `pi(i,j)` is a permutation when
`j` is coprime with `L`. Example, with `P = 3` and the polynomial `x^3 + x + 1`:
`pi(1,2)` puts its ones in columns 1, 2, 6, 0, 3, 5, 4 for rows 0 to 6.
`tb_ssi_addr_gen` checks exactly this sequence.

**The table.** `H_c` is given as a list of entries `(rb, cb, i, j)`. Each
entry places one `pi(i,j)` in row-block `rb` and information column-block
`cb`. Entries that share a block are XORed together. Row `rb*L + k` of `H_c`
therefore checks the bits

    m[cb*L + alpha^(i + j*k) - 1]    for every entry (rb, cb, i, j) with this rb.

Call the XOR of those bits `g(rb*L + k)`.

**The parity.** The unsplit RA code accumulates over all `M` rows:
`p_r = p_{r-1} xor g_r`, starting from `p_{-1} = 0`. The codeword is
`c = [m, p]`.

### The default table is a stand-in

A good SSI table comes out of an offline search. That search picks the
`(i, j)` values and positions so that the Tanner graph has no short cycles
and no two superimposed permutations put a 1 in the same place. The reference
code's table has not been published, so `ssi_pkg::ssi_entry()` returns a
deterministic table with the reference code's weights:

- 10 information column-blocks of weight 3 and 15 of weight 4, 90 entries in
  total.
- 18 entries per row-block. Together with the two ones of `H_m` this gives a
  row weight of about 20.

Entries `2q` and `2q+1` form a pair. A pair shares a row-block and `j` but has
different `i`. When both entries fall in the same column-block, they are
superimposed without overlapping ones, because `i1 + j*k = i2 + j*k (mod L)`
has no solution. The default table has 40 such superimposed blocks. The table
is **not girth-optimised**: it is good for exercising the hardware, not for
error-correction performance.

To encode a real SSI code, rewrite `ssi_entry()` (and, if the column weights
differ, `col_weight()` and `ssi_num_entries()`). The memories, address
generators and combiner masks are all generated from what these functions
return.

## How the encoder computes parity

### MEMI: one memory per permutation

`memi` holds one `L x 1`-bit memory per table entry, 90 at the default size.
An entry's memory stores a copy of the information bits of its column-block.

- **Writing.** Bits are written in natural order: bit `t` of column-block `c`
  goes to address `t` of every memory in column-block `c`.
- **Reading.** Bits are read back in interleaved order: in read step `k`, the
  memory of entry `(rb, cb, i, j)` is read at address `alpha^(i + j*k) - 1`.
  Its output is therefore that entry's contribution to check row `rb*L + k`.

Keeping one copy per entry costs memory but gives every permutation its own
read port. All the entries of a row are then available in the same cycle.

### The address generator

`ssi_addr_gen` produces the read address without a table. It holds
`a_k = alpha^(i + j*k)` in a `P`-bit register:

- `load` sets `a_0 = alpha^i`.
- Each `step` multiplies the register by the constant `alpha^j`. That is a
  fixed XOR network, generated by `ssi_pkg::gf_mul`.
- The address is `a_k - 1`.

Both constants are worked out at elaboration from the entry's `i` and `j`.

### PCBGU: combiner and accumulator

`pcbgu` XORs the memory outputs of one row into `g`, the combiner. It then
updates its register: `p <= (first ? 0 : p) xor g`. It produces one parity bit
per enabled cycle. `first` starts a new accumulator chain.

Each PCBGU receives all 90 MEMI outputs, ANDed with a constant mask that keeps
the entries of its row-block. Synthesis removes the unused inputs.

### The two forms: parallel splits the code

`ra_encoder` has a `PARALLEL` parameter.

- **`PARALLEL = 1` (default, the form used for the FPGA reference).** This
  form removes the sub-diagonal 1 of `H_m` at every row-block boundary (rows
  `L, 2L, ...`). The single accumulator chain thus becomes `MB` independent
  chains of length `L`:

      p(rb, k) = p(rb, k-1) xor g(rb*L + k),    p(rb, -1) = 0

  `MB` PCBGUs run side by side, and the parity phase takes `L` cycles. **This
  is a different code from the unsplit one:** a decoder must use the split
  `H_m`. The weight-1 parity column at the end of each chain matches the
  reference code's degree distribution, which has 5 degree-1 variable nodes.
- **`PARALLEL = 0` (serial form).** One PCBGU walks the unsplit chain over all
  `M` rows, one row-block after another. A multiplexer switches the combiner
  mask to the current row-block. Data moves one bit per cycle, in and out.

## Interface and timing

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | 1 | input handshake; a slice is taken when both are high |
| `in_data` | `KB` (parallel) / 1 (serial) | parallel: bit `c` = `m[c*L + t]` for slice `t`; serial: `m[n]` in order |
| `cw_valid` | 1 | a codeword slice is on `cw_data` |
| `cw_is_parity` | 1 | the slice is parity: parallel, bit `rb` = `p(rb, k)`; serial, `p_k` |
| `cw_last` | 1 | last parity slice of the codeword |
| `cw_data` | `max(KB, MB)` (parallel) / 1 (serial) | the slice; parity slices use the low bits, the rest are zero |

A codeword goes through four phases:

| phase | parallel | serial | what happens |
|---|---|---|---|
| load | `L` accepted slices | `K` accepted bits | written to MEMI and passed to the output one cycle later |
| start | 1 | 1 | address generators reset to row 0 |
| parity | `L` | `M` | one row per PCBGU per cycle |
| drain | 2 | 2 | memory read and accumulator pipeline empties |

`in_ready` is high only during load, and `in_valid` may drop at any time.
The output has no back-pressure.

- **Parallel form.** With `in_valid` held high, a codeword takes `2L + 3 = 1025`
  cycles. That is 12,775 information bits per 1025 cycles, about 12.5 bits per
  clock.
- **Serial form.** A codeword takes `NB*L + 3 = 15333` cycles, the `N` cycles
  of the serial schedule plus 3.
- **Latency.** In both forms, the first parity slice appears 5 cycles after
  the last information slice is accepted.

There is no double buffering. A new codeword cannot load while the previous
one is in its parity phase.

## Size

At the defaults, coarse synthesis gives:

- 90 memories of 511 bits (45,990 bits).
- About 860 flip-flops, most of them the 90 nine-bit address registers.
- About 2000 word-level cells.

On an FPGA each 511-bit memory fits in a fraction of a block RAM, and several
can share one if read ports allow.

For comparison, the published FPGA encoder for the same code used 746
flip-flops, 40 block RAMs and 17 I/O pins. Its external interface is not
described. This RTL brings out the full slice width instead: 57 port bits in
the parallel form.

## Files

| file | contents |
|---|---|
| `rtl/ssi_pkg.sv` | GF(2^P) arithmetic, primitive polynomials, entry type, default table |
| `rtl/ssi_addr_gen.sv` | row-to-column address generator of one `pi(i,j)` |
| `rtl/memi.sv` | interleaver memory array, one memory and address generator per entry |
| `rtl/pcbgu.sv` | XOR combiner and accumulator |
| `rtl/cw_mux.sv` | registered output multiplexer, information then parity |
| `rtl/ra_encoder.sv` | top: control, memory array, parity units, output mux |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_ra_encoder.sv` | full-size parallel encoder, 4 codewords, with stalls, back-pressure, timing checks |
| `tb/tb_ra_encoder_serial.sv` | full-size serial encoder, 3 codewords, with the `N + 3` cycle check |
| `tb/tb_ra_workloads.sv`, `tb/ra_enc_workload.sv` | parallel encoder re-sized for codes of length 2032 (`P=7, NB=16, MB=8`), 16352 (`P=9, NB=32, MB=16`) and 9690 (`P=8, NB=38, MB=19`), all information columns of weight 4 |

Every testbench computes its expected values independently. It builds the
powers of `alpha` by stepping an LFSR, reads the table from
`ssi_pkg::ssi_entry()`, and applies the definitions above. Each testbench
prints `TB_RESULT checks=N failures=F` and has a cycle watchdog.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/ssi_pkg.sv \
        tb/tb_ra_encoder.sv --top-module tb_ra_encoder -Mdir obj_enc
    ./obj_enc/Vtb_ra_encoder

Replace `tb_ra_encoder` with any other testbench name. The full-size runs
finish in well under a second once built.

## Where this departs from, or adds to, the source architecture

- **The table.** The default table is not the reference code's (see above).
- **Primitive polynomials.** These are this design's choice.
  `x^3 + x + 1` for `P = 3` reproduces the published `pi(1,2)` example;
  `x^9 + x^4 + 1` is used for `P = 9`.
- **`L = 511`.** The construction asks for `L = 2^p - 1` with `p` prime. The
  reference code has length 15330 and rate 5/6. That length also splits into
  blocks of 7, but with `L = 7` the parallel split would give 365 chains. The
  code's degree distribution has only 5 degree-1 variable nodes, one per
  chain, and about 5 lighter rows, one per chain start. Both fit 30 blocks of
  511 with `MB = 5`, which means `p = 9`, not prime. This design follows the
  degree distribution.
- **The parallel split.** The sub-diagonal ones are removed at the `MB - 1`
  row-block boundaries, giving `MB` chains. The source lists the removed
  positions up to block `N_b - 1`, but `H_m` has only `MB` row-blocks.
- **Own choices.** The slice-wide interface, handshake, phase sequencing,
  pipeline registers and reset style are this design's choices. So is the
  memory organisation detail: natural-order write with permuted read, 1-bit
  wide memories and synchronous read. Memories are not reset; every word is
  written before it is read.
- **The serial form** takes 3 cycles more per codeword than the `N` cycles
  quoted for the serial architecture: 1 start cycle and 2 drain cycles.
- **Not verified.** The 240 MHz clock of the FPGA reference was not checked.
  No timing analysis was done.

## What is not here

- **The decoder.** The source codec pairs this encoder with an existing
  high-speed parallel LDPC decoder (6-bit quantised messages). That decoder is
  not specified in enough detail to implement, so it is left out.
- **The code search.** The SSI construction algorithm is an offline program,
  not hardware.
