# LTE PDSCH baseband transmitter in SystemVerilog

This is the downlink shared-channel (PDSCH) transmit chain of LTE as streaming
RTL. The input is two code words of bits, the output four antenna ports of
OFDM time-domain samples. Each code word is scrambled with its own Gold
sequence and mapped onto QPSK, 16QAM or 64QAM symbols. The two symbol streams
are then spread over four layers by spatial multiplexing (two code words, four
layers) and multiplied by a 4x4 complex precoding matrix. For each antenna
port, the resulting symbols are placed on the used subcarriers around DC and
transformed by an inverse FFT.

```
 cw0 bits ─► scrambler(q=0) ─► mod_mapper ─┐                      ┌─► re_mapper ─► ifft ─► port 0
                                           ├─► layer_mapper ─► precoder ─► re_mapper ─► ifft ─► port 1
 cw1 bits ─► scrambler(q=1) ─► mod_mapper ─┘                      ├─► re_mapper ─► ifft ─► port 2
                                                                  └─► re_mapper ─► ifft ─► port 3
```

The chain was conceived as a set of functions for a coarse-grained
reconfigurable fabric: cells with a 16-bit datapath unit, a 64-word 16-bit
register file and a sequencer, backed by distributed SRAM. Here every function
is a dedicated hardware block instead. The blocks keep the structure of that
mapping where it is known: LFSRs plus an initialisation calculator, look-up
tables selected by a sequencer, a matrix held in a register file and 16-bit
data words. The fabric itself (DPUs, register files, sequencers, SRAM banks
and networks) is not part of this RTL.

## Configurations

One run processes one OFDM symbol. With `n_sc` used subcarriers per antenna,
each code word supplies `2·n_sc·Q_m` bits, where `Q_m` = 2, 4 or 6. That gives
`2·n_sc` symbols per code word, `n_sc` layer vectors, and `n_sc` symbols per
antenna port. The three reference configurations all run on the default
parameters; you choose one at run time:

| configuration | bits per code word | symbols per code word | n_sc per port | IFFT size | cycles for one symbol (measured, no stalls) |
|---|---|---|---|---|---|
| QPSK  | 1200  | 600  | 300  | 512  | ≈ 6 100 |
| 16QAM | 4800  | 1200 | 600  | 1024 | ≈ 15 300 (run with random stalls) |
| 64QAM | 14400 | 2400 | 1200 | 2048 | ≈ 31 400 |

The three rows are the 5, 10 and 20 MHz LTE bandwidths. The smaller ones work
the same way: 1.4 MHz (72 subcarriers in 128 points) and 3 MHz (180 in 256).
The 15 MHz case needs a 1536-point FFT, which is not
a power of two, so it is not supported. The cycle counts cover everything from
`start` to the last sample of the last port: the 1600-cycle scrambler warm-up,
one bit per cycle per code word, the IFFT passes and the output. They are this
RTL's own figures. They are not the latency or sample-interval numbers of the
original fabric mapping, which come from a different, time-multiplexed
implementation.

## Number format

Every complex value is a `cplx_t`: two signed 16-bit words (`re` = I,
`im` = Q) in Q1.14, where 16384 means 1.0. Q1.14 leaves room for the largest
64QAM level, 7/√42 ≈ 1.08. Precoder rows and IFFT butterflies round half up
and saturate to 16 bits. The IFFT halves its data in every stage, so the
output is scaled by 1/N. For a full 1200-subcarrier symbol this gives sample
magnitudes of a few hundred LSB. Widen `DW`/`FRAC` in `lte_pkg` if you need
more dynamic range after the IFFT.

## The blocks

### Scrambler (`scrambler`, `cinit_calc`)

The scrambling sequence is the length-31 Gold sequence
`c(n) = x1(n+1600) ⊕ x2(n+1600)`, built from two m-sequences:

- `x1(n+31) = x1(n+3) ⊕ x1(n)`, starting from `x1 = 1,0,…,0`.
- `x2(n+31) = x2(n+3) ⊕ x2(n+2) ⊕ x2(n+1) ⊕ x2(n)`, starting from `c_init`.

`cinit_calc` forms `c_init` combinationally:

- PDSCH: `n_RNTI·2^14 + q·2^13 + ⌊n_s/2⌋·2^9 + N_ID^cell`.
- PMCH: `⌊n_s/2⌋·2^9 + N_ID^MBSFN`.

Both registers are 31-bit Fibonacci LFSRs. Cell 0 holds `x(n)`, and the
feedback bit enters at cell 30. The 1600-sample offset is realised by stepping
both registers 1600 times after `start`; `busy` is high during that time. After
the warm-up, one bit per cycle is XORed with `c(n)`, with no register in the
data path, and both LFSRs advance only on an accepted bit. Code word 0 uses
`q = 0` and code word 1 uses `q = 1`.

### Modulation mapper (`mod_mapper`)

A small sequencer counts `Q_m` bits into a shift register. The first bit
received is the most significant bit of the table index, i.e. `b(i)` of the LTE
tables. The group then addresses one of three I/Q look-up tables (4, 16 or 64
entries), and a multiplexer picks the table of the order latched at `start`.
The tables are computed at elaboration from the LTE rule:

- First bit: sign of I. Second bit: sign of Q.
- 16QAM: bits 3 and 4 choose the amplitude 1 or 3.
- 64QAM: bits 3/5 (I) and 4/6 (Q) choose the amplitude from {3, 1, 5, 7}.

All values are rounded to Q1.14. The mapper takes one bit per cycle, so QPSK
yields a symbol every 2 cycles, 16QAM every 4 and 64QAM every 6.

### Layer mapper (`layer_mapper`)

Only spatial multiplexing with two code words on four layers is supported:
`x0(i)=d0(2i)`, `x1(i)=d0(2i+1)`, `x2(i)=d1(2i)`, `x3(i)=d1(2i+1)`. Each input
has a two-symbol holding stage. When both stages are full, the four symbols
are registered as one vector. The two inputs are independent handshakes; the
block needs 3 cycles per vector, faster than the mappers can feed it.

### Precoder (`precoder`)

The 4x4 complex matrix sits in a 16-entry register file, written through
`w_we/w_addr/w_data` (address = 4·row + column) while the chain is idle.
Rewriting it is how a new codebook index (precoder matrix indicator) takes
effect. The block does not generate the matrix. For four ports, LTE defines
`W_n = I − 2·u_n·u_nᴴ / (u_nᴴ·u_n)`, with columns possibly permuted and the
result scaled by 1/√(layers). The testbenches compute it that way for `u_0`
and `u_4`.

The product `y = W·x` is formed one antenna row per cycle, four complex
multiply-accumulates per row. A vector takes 4 cycles, and the next vector is
accepted in the cycle of the last row, so the block keeps up with QPSK, the
fastest input.

### Resource element mapper (`re_mapper`)

Each antenna port buffers its `n_sc` symbols, then emits all N IFFT bins in
order:

- Bin 0 (DC) is zero.
- Bins 1…n_sc/2 carry the upper half of the band (subcarriers n_sc/2…n_sc−1).
- Bins N−n_sc/2…N−1 carry the lower half (subcarriers 0…n_sc/2−1).
- Everything else is the zero guard band.

Only PDSCH data is placed. Reference signals, synchronisation signals and
control channels are not inserted into the grid. Timing: `n_sc` input cycles,
then N output cycles (without stalls).

### IFFT (`ifft`)

This is the hardest part of the chain. It is an in-place radix-2
decimation-in-time inverse FFT over one memory of `2^LOG2N_MAX` complex
words, with the size N = 2^log2n chosen per run (128…2048 with the
defaults). It runs in three phases:

1. **Load:** the N inputs are written at bit-reversed addresses. The reversal
   is over log2n bits, so smaller sizes use the low part of the memory.
2. **Compute:** log2n stages of N/2 butterflies, one butterfly per cycle
   (reads two words, writes two words). In stage s, the partners are
   m = 2^s apart. A butterfly index j splits into a group `j >> s` and a
   position `p = j mod m`, giving addresses `i0 = group·2m + p` and
   `i1 = i0 + m`. The twiddle is `exp(+j·2π·p/(2m))`, read from a table of
   2^(LOG2N_MAX−1) cosine/sine words at index `p << (LOG2N_MAX−1−s)`. The
   table is computed at elaboration. Each butterfly produces `(a ± W·b)/2`,
   rounded and saturated.
3. **Output:** the N samples are read out in natural order.

Without stalls, one transform takes `N + log2n·N/2 + N` cycles: 2304 compute
cycles for N = 512 and 11264 for N = 2048. No cyclic prefix is added after
the IFFT.

### Top (`pdsch_tx`)

The top wires the blocks as in the diagram. All blocks take `start` as a
synchronous restart. The configuration inputs (`mode`, `chan`, `n_rnti`,
`n_s`, `cell_id`, `mbsfn_id`, `n_sc`, `log2n`) must stay stable from `start`
to the end of the run; the mappers, RE mappers and IFFTs latch their part of
it. A precoded vector is handed to the four port branches only when all four
can take it, so the branches stay in lock step. The outputs `ant_valid[p]` /
`ant_ready[p]` are independent per port. Parameters: `NSC_MAX` (1200, the
buffer size per port) and `LOG2N_MAX` (11, the largest IFFT).

## Interfaces and conventions

- Clock `clk`, asynchronous active-low reset `rst_n`. Reset clears all
  control state; data memories are not cleared, and are never read before
  they are written.
- Streams use valid/ready. A transfer happens in a cycle where both are high.
- Shared types are in `rtl/lte_pkg.sv`: `cplx_t`, `mod_t` (QPSK/16QAM/64QAM),
  `chan_t` (PDSCH/PMCH), `bits_per_sym`, `sat16`.
- Typical sequence:
  1. Write the 16 matrix entries.
  2. Set the configuration and pulse `start`.
  3. Wait for `busy` to drop (1600 cycles).
  4. Stream `2·n_sc·Q_m` bits into each code word.
  5. Collect N samples from each port.
  6. Pulse `start` again for the next symbol.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl --top-module tb_pdsch_tx \
    rtl/lte_pkg.sv tb/tb_pdsch_tx.sv
./obj_dir/Vtb_pdsch_tx
```

The other testbenches build the same way: `tb_cinit_calc`, `tb_scrambler`,
`tb_mod_mapper`, `tb_layer_mapper`, `tb_precoder`, `tb_re_mapper` and
`tb_ifft`.

The reference models in the testbenches are written independently of the
RTL:

- Gold sequence from the recurrences on bit arrays.
- Constellations from closed formulas rather than tables.
- A direct O(N·n_sc) inverse DFT in real arithmetic.

`tb_pdsch_tx` runs the design at its default parameters and takes about
15 seconds to build and run. It runs the three configurations above, a
PMCH-scrambled QPSK symbol on the 1.4 MHz size and a 64QAM symbol on the
3 MHz size. Every antenna sample must be
within 6 LSB of the model; the observed worst case is 3 LSB. The testbench
also requires each of these to occur at least once:

- a modulation switch and an FFT-size switch
- a matrix reload and a PMCH initialisation
- the scrambler warm-up
- input gaps and output stalls

Block testbenches check exact values where the arithmetic is exact and the
cycle counts given above.

## Where this design departs from or goes beyond the source description

- **Run-time switching.** The source mapping produced three separate
  implementations, one per configuration, because its tool could not switch
  modulation at run time. Its mapper description does include a multiplexer
  and sequencer that change the order. This RTL follows that description: one
  design, with modulation, subcarrier count and FFT size selected per run.
- **Slot number `n_s`.** The `c_init` formula uses ⌊n_s/2⌋, while the
  parameter is also described as a subframe index 0…9. The formula is
  implemented as written, and `n_s` accepts 0…19.
- **Layer mapping** covers only the two-code-word, four-layer case. Other
  layer counts and transmit diversity are not built.
- **Precoding matrices** are loaded, not generated. The codebook vectors
  `u_n` and the 1/√(layers) scaling live outside the block.
- **The IFFT** is this design's own radix-2 core. The original reused an
  existing FFT for the fabric. 1536 points are not supported.
- **Not included:**
  - cyclic prefix insertion
  - the rest of the resource grid (reference, synchronisation and control
    channels, multiple OFDM symbols per slot)
  - channel coding and rate matching upstream of the scrambler
  - the reconfigurable fabric itself
- **Data path width and schedule.** All choices of fixed-point format,
  rounding, handshakes and per-cycle schedules are this design's own. That
  includes the bit-serial scrambler and mapper, the row-serial precoder and
  one butterfly per cycle in the IFFT. The source only fixes the 16-bit data
  word.
