# Streaming Reed-Solomon decoder, GF(2^8), up to 16 symbol errors per block

This is a Reed-Solomon decoder for byte-oriented codes of up to 255 symbols per block. It corrects
up to t symbol errors per block, with t up to 16 (32 parity symbols). It is built to take one
received byte every clock cycle and to keep doing so block after block.

The decoder is a chain of five stages. Each stage works on a different block at the same time,
and FIFOs sit between the stages so that none waits for another more than it must. Two things set
its speed:

- **The Forney stage executes out of order.** Computing an error value takes 17 cycles, while a
  clean symbol takes none. The stage computes error values in the background, lets clean
  positions flow past, and puts everything back in order at its output.
- **The received-data buffer is sized by simulation.** This FIFO holds the received symbols until
  their error values are known. Its size decides how far the front of the decoder can run ahead
  of the back.

With the default sizes (T = 16, a 765-symbol buffer), a stream of RS(255,223) blocks is decoded at
one block per 255 cycles when blocks have a few errors. With the worst case of 16 errors in the
data of every block, the rate is one block per 272 cycles. That is 750 Mbit/s of received data
at 100 MHz.

The architecture follows the Bluespec Reed-Solomon decoder described in A. Agarwal's MIT thesis
*Comparison of high level design methodologies for algorithmic IPs: Bluespec and C-based
synthesis* (2009). That work reports 276 cycles per block for its final design, with the same
765-byte buffer. This RTL is a new implementation of that architecture. The section "Where this
design departs from its model" lists what differs.

## The decoding algorithm in brief

A block holds n symbols: k data symbols followed by 2t parity symbols, with n = k + 2t. It is
read as a polynomial R(x) = r_{n-1} x^{n-1} + ... + r_0, and r_{n-1} arrives first.

1. **Syndromes.** S_j = R(alpha^j) for j = 1..2t. All of them are zero when the block is error-free.
2. **Berlekamp-Massey.** This step finds the error locator Lambda(x), whose degree L is the number
   of errors. It also finds the error evaluator Omega(x) = S(x) Lambda(x) mod x^2t, where
   S(x) = S_1 + S_2 x + ...
3. **Chien search.** Position i holds an error exactly when Lambda(alpha^-i) = 0.
4. **Forney.** The error value at such a position is e = Omega(z) / Lambda'(z), with
   z = alpha^-i. Lambda' is the formal derivative, which keeps only the odd terms of Lambda.
   In GF(2^m) the usual minus sign drops out.
5. **Correction.** d_i = r_i XOR e_i for the data symbols. The parity symbols are dropped.

Arithmetic is in GF(2^8). Addition is XOR. Multiplication is carry-less and reduced modulo the
primitive polynomial PRIM_POLY. The default is x^8+x^4+x^3+x^2+1 (0x11D), the field that
IEEE 802.16 uses, and alpha = x (0x02). The code's first root is alpha^1, so the generator
polynomial is g(x) = prod_{j=1..2t} (x + alpha^j). An encoder for this decoder must use the
same convention (see `tb/rs_ref_pkg.sv`).

## Interface and block format (`rs_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears control state only) |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/8 | received symbols, highest power first |
| `in_cfg` | in | 16 | `{n, t}` of the block (`rs_pkg::rs_cfg_t`), sampled with its first symbol |
| `out_valid`, `out_ready`, `out_data`, `out_last` | out/in/out/out | 1/1/8/1 | the n-2t corrected data symbols, in order, with `out_last` on the final one |

- **Handshakes.** Every port pair is a valid/ready handshake, and a transfer happens on a clock
  edge where both are high.
- **Block configuration.** n and t can change from block to block. This covers full-length
  codes (n = 255) and shortened codes (n < 255). The configuration must satisfy 2t < n <= 255
  and 1 <= t <= T.
- **Input rate.** The decoder counts symbols itself to find where a block ends. Blocks may follow
  each other without gaps.
- **Blocks it cannot correct.** A block with more than t errors comes out with whatever
  correction the algorithm produced. No failure flag is raised.

## Stages, their timing and their buffers

```
in --+--> rs_syndrome --> rs_berlekamp --> rs_chien --loc FIFO (16)--> rs_forney --+
     |                                         \--poly FIFO (2)------>/            |
     +--> received-data buffer (rs_fifo, 765) ----------------------> rs_correction +--> out
```

| stage | work per block | cycles per block |
|---|---|---|
| `rs_syndrome` | 2T Horner updates per symbol, in parallel (`PAR = 2T`) | n |
| `rs_berlekamp` | 2t iterations of one cycle each, then t cycles for Omega | 3t + 2 (50) |
| `rs_chien` | one position per cycle, from i = 254 down to 2t | 256 - 2t (224) |
| `rs_forney` | 17 cycles per error, out of order | about max(17 x errors, n - 2t) |
| `rs_correction` | one symbol per cycle | n |

**Syndrome.** The loop over j is unrolled PAR times. With the default PAR = 2T the stage takes
one symbol per cycle, and every alpha^j multiplier is a constant multiplier. Smaller PAR values
trade area for ceil(2T/PAR) cycles per symbol. The result leaves through a one-entry register,
and the first symbol of the next block can enter in the same cycle.

**Berlekamp-Massey.** One iteration takes one cycle, and the work is unrolled over all T+1
coefficients. Two details keep the logic small:

- x^l Lambda_prev(x) is kept already shifted.
- The syndromes pass through a window register that shifts once per iteration.

As a result the stage needs no variable shifters and no wide multiplexers. The same dot-product
network computes the discrepancy and, in a second pass, each Omega coefficient. The reciprocal
1/d_m comes from the inverse table `gf_inv_rom`. This stage is far faster than the others, so
its long single-cycle path (three multipliers in series) is the first place to pipeline if the
clock is pushed.

**Chien search.** Register term_k holds Lambda_k alpha^(-ik). Stepping to position i-1
multiplies each term by the constant alpha^k. The scan always starts at position 254, where
term_k = Lambda_k alpha^k. A shortened block therefore needs no table of starting powers: the
positions above n-1 are stepped through without output. Parity positions are not searched. The
stage emits one entry per data position, `{err, z = alpha^-i, last}`, in the order the data
arrives. This lets the Forney stage start on an error location as soon as it is found. Lambda
and Omega go on to the Forney stage once per block, through their own FIFO.

## The out-of-order Forney stage

In arrival order, a block with t errors would need (n - 2t) + 16t cycles in this stage: 479 for
RS(255,223) with 16 errors. That is almost twice the 255 cycles of the other stages. No error
value depends on another, so only the order of the output is fixed. `rs_forney` therefore has
four parts:

- **Check input** takes the block's polynomials at the block's first position. It then sorts
  every position:
  - An error position goes into the error unit's job queue as `{z, first}`. The `first` job of
    a block also pushes that block's polynomials into a 2-deep FIFO for the error unit.
  - Every position, error or clean, leaves a 2-bit order tag `{is_err, last}`.
- **Error unit** (`rs_forney_eval`) evaluates Omega(z) and Lambda'(z) together by Horner's rule,
  one coefficient per cycle (T cycles). It then divides through the inverse table (one cycle):
  17 cycles per error for T = 16. It takes its next job in the division cycle of the current
  one, so it needs no idle cycle between jobs. Its results wait in a T-deep FIFO.
- **Zero unit.** A clean position's result is the constant 0, so the order tag itself stands in
  for it.
- **Merge** pops the order tags in order. An error tag waits for the next result of the error
  unit; a clean tag yields 0 at once.

The FIFO depths are what make the stage fast across blocks, not only within one. Take blocks
whose errors all sit at the very start:

- The order-tag FIFO (256) lets check input run a whole block ahead.
- The T-deep job queue lets check input pass a whole block's errors without stopping.
- The T-deep result queue lets the error unit finish all errors of block b+1 while merge is
  still emitting the clean positions of block b.

With these depths the stage sustains exactly max(17t, n - 2t) cycles per block: 272 for 16
errors, measured in `tb_rs_forney`. With only a one-entry result register in place of the result
queue, it falls back to about 450 cycles per block.

## The received-data buffer and the decoder's rate

The buffer (`rs_fifo`, `BUF_DEPTH` entries of 10 bits: symbol, parity flag, last flag) is the
only path by which the front of the decoder can run ahead of the back. It must hold at least
one whole block. Otherwise the input stalls before the block's last symbol reaches the syndrome
stage, and the decoder deadlocks. Measured with `tb_rs_buffer_sweep` on back-to-back RS(255,223)
blocks, each with 16 errors in the data symbols:

| buffer (symbols) | 255 | 510 | 765 | 1020 | 1275 |
|---|---|---|---|---|---|
| cycles per block, steady state | 410 | 271 | 272 | 272 | 272 |
| reference design, for comparison | 622 | 298 | 276 | 276 | 276 |

A larger buffer only delays the moment the decoder settles at its stage-bound rate. While a
larger buffer is still filling, the input runs at 255 cycles per block. The default of 765
symbols (three blocks) is the size the reference design chose.

## Where this design departs from its model

- **Omega.** It is computed from its definition S(x)Lambda(x) mod x^2t once Lambda is known
  (t extra cycles). It is not updated alongside Lambda inside the Berlekamp-Massey loop.
- **Length-change test.** The Berlekamp-Massey length change uses the textbook test 2L <= j-1
  (1-based j). The tests confirm that it returns the minimal locator.
- **Chien search order.** It runs downward from position 254 and skips parity positions. Its
  output is one entry per data position rather than a list of error locations.
- **Forney details.** The zero unit is folded into the order-tag FIFO. Polynomials travel to the
  error unit once per block that has errors.
- **Sizes and details chosen here.** The reference design does not give them:
  - FIFO depths other than the 765-symbol buffer;
  - the valid/ready handshake and reset behaviour;
  - carrying `{n, t}` in-band with the first symbol;
  - the default primitive polynomial 0x11D;
  - the full unrolling of the syndrome, Berlekamp-Massey and Chien stages.
- **Decoding failure** (more than t errors) is not detected.
- **Timing closure.** The logic has not been synthesized or timed for an FPGA or ASIC here.
  The reference design reached 108.5 MHz on a Virtex-II Pro, and these numbers say nothing about
  this RTL's clock rate.

## Parameters (`rs_decoder`)

| parameter | default | meaning |
|---|---|---|
| `T` | 16 | largest t supported; sets every polynomial width and the Forney cost (T+1 cycles per error) |
| `SYN_PAR` | 2T | syndromes updated per cycle |
| `BUF_DEPTH` | 765 | received-data buffer, symbols; must be >= the largest n |
| `LOC_DEPTH` | 16 | Chien-to-Forney position FIFO |
| `ORDER_DEPTH` | 256 | Forney order-tag FIFO |
| `PRIM_POLY` | 9'h11D | primitive polynomial of the field |

The inverse table and the alpha-power constants are computed at elaboration from `PRIM_POLY`
(`rs_pkg::gf_inv_table`, `rs_pkg::gf_alpha_table`). There are no data files.

## Files

- `rtl/rs_pkg.sv`: GF(2^8) multiply, table generators, the `{n, t}` configuration type.
- `rtl/gf_inv_rom.sv`: 256-entry inverse table, for division.
- `rtl/rs_fifo.sv`: the FIFO used everywhere, with any depth.
- `rtl/rs_syndrome.sv`, `rtl/rs_berlekamp.sv`, `rtl/rs_chien.sv`, `rtl/rs_forney.sv`
  (with `rtl/rs_forney_eval.sv`), `rtl/rs_correction.sv`: the stages.
- `rtl/rs_decoder.sv`: the top level.
- `tb/rs_ref_pkg.sv`: the reference model (log/antilog arithmetic, encoder, syndromes, locator,
  evaluator), written independently of the RTL.
- `tb/tb_*.sv`: self-checking testbenches, one per module. Each prints
  `TB_RESULT checks=N failures=M`. `tb/rs_sweep_lane.sv` is a helper of the buffer sweep.

## Verification

Each stage's testbench checks its block against the reference model on random codewords.
These include full-length and shortened blocks, t = 1 to 16, and 0 to t errors, some of them in
the parity symbols. Each testbench also checks the stage's cycle counts: n cycles for the
syndromes, 3t after input for Berlekamp-Massey, 255 - 2t for the Chien search, and 272 cycles
per block for Forney with 16 errors.

`tb_rs_decoder` runs the whole decoder at its default parameters:

- mixed blocks with random input gaps and output back-pressure;
- 60 back-to-back worst-case blocks, which must settle at 272 cycles per block or better
  (276 is the limit checked);
- 10 lightly damaged blocks, at 255 cycles per block.

The testbench also counts input stalls, output back-pressure, out-of-order Forney events,
shortened blocks, blocks with t < 16, error-free blocks, blocks with the full t errors, and the
buffer holding more than two blocks. It fails if any of these never happened. All testbenches
pass.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/rs_pkg.sv tb/rs_ref_pkg.sv tb/tb_rs_decoder.sv --top-module tb_rs_decoder -o sim
./obj_dir/sim
```

Replace `tb_rs_decoder` with any other `tb_*` module. The testbenches do not use X or Z, so
they also run on two-state simulators. Each finishes in well under a second of host time.
