# Multi-point distributed random number generator

Monte Carlo pricing with *simplified weak Taylor schemes* does not need
Gaussian increments. A discrete random variable that matches enough moments
of the Wiener increment does just as well, and it can be built from a few
random bits:

| scheme order | variable | values (times sqrt(D)) | probabilities | bits per sample |
|---|---|---|---|---|
| 1 | two-point | +1, -1 | 1/2, 1/2 | 1 |
| 2 | three-point | 0, +sqrt3, -sqrt3 | 2/3, 1/6, 1/6 | 3 (8 combinations, 2 rejected) |
| 3 | five-point | 0, +-1, +-sqrt6 | 1/3, 9/30 each, 1/30 each | 5 (32 combinations, 2 rejected) |

The five-point variable matches the first seven moments of N(0, D):
E[W^2] = D, E[W^4] = 3D^2 and E[W^6] = 15D^3, with the odd moments zero.

This RTL produces samples of these variables at one per clock. It does not
produce floating-point values. It produces short codes of 1, 2 or 3 bits and
packs them into 32-bit words, which a bus master moves to host memory. The
host then turns each code into a float with a table lookup. The intended
system is a PCI card in a PC. The host's software uses one batch of numbers
while the card generates the next.

## Structure

```
            SEED/WR (async)                          rd_clk domain
                 |                                        |
           +------------+   len, coef, order,            |
           | cfg_loader |-- enable, seed words --+        |
           +------------+                        |        |
                 | cfg_wr (drop partial word)    v        |
                 |              +---------------------+   |
                 |              | mpd_rng             |   |
                 |              |  srg_lfsr -> x[4:0] |   |
                 |              |  accept_group       |   |
                 |              +---------------------+   |
                 |                 rn[2:0], buff_wr  ^ fifo_full
                 v                        v          |    |
           +----------------------------------------------------+
           | rn_queue:  rn_packer --32-bit word--> async_fifo    |--> rd_data, rd_empty
           +----------------------------------------------------+
```

All of it runs on one clock `ck`, except the FIFO's read side, which runs on
`rd_clk`. `mpd_rng_top` wires the parts together. `mpd_pkg` holds the
scheme-order enum, the code layout and the per-order constants.

## The shift register generator (`srg_lfsr`)

The generator uses a primitive polynomial modulo 2:
y(x) = 1 + c1 x + ... + c(n-1) x^(n-1) + x^n. It defines the recurrence

    a(k+1) = c1 a(k) ^ c2 a(k-1) ^ ... ^ c(n-1) a(k-n+2) ^ a(k-n+1)

whose period is 2^n - 1. Both the order n and the coefficients are run-time
registers. The state is `NMAX` bits wide (default 521). Bit 0 holds the newest
bit and bit i holds a(k-i). Every clock the feedback tap vector is rebuilt
into a register from `len` and `coef`:

- tap i is ci for i < n;
- tap n is 1;
- every tap above n is 0.

Each new bit is the XOR-reduction of `taps & state`. So a software-style
polynomial with many non-null coefficients costs no extra time. Only the
XOR tree gets wider.

One sample needs 1, 3 or 5 bits. The recurrence is unrolled five times in one
cycle, and the state advances by exactly the number of bits the current
scheme order uses. Every bit is used once, so the bit stream is the same as
that of a bit-serial software generator with the same polynomial and seed.
The testbenches rely on this: their reference model is such a bit-serial
generator.

Seeds of any length are loaded 32 bits at a time, and the last word written
becomes the newest bits. For order n, write ceil(n/32) words. The low n state
bits must not all be zero.

## Accept/group logic (`accept_group`)

This logic is combinational. X1 (`x[0]`) is the sign. The remaining bits of
the sample form a magnitude group m:

| order | m | result |
|---|---|---|
| 1 | (none) | X1 = 0 gives +sqrt(D) (code 0); X1 = 1 gives -sqrt(D) (code 1) |
| 2 | {X3,X2} = 3 | rejected (2 of 8) |
| 2 | 2 | +-sqrt(3D) (1 each) |
| 2 | 0, 1 | 0 (4 of 8) |
| 3 | {X5..X2} = 15 | rejected (2 of 32) |
| 3 | 14 | +-sqrt(6D) (1 each) |
| 3 | 9..13 | 0 (10 of 32) |
| 3 | 0..8 | +-sqrt(D) (9 each) |

A rejected combination still uses up its bits, but nothing is written. On
average a number therefore takes 1, 8/6 or 32/30 cycles.

## Codes and words

A code is `{magnitude index, sign}`: bit 0 is the sign (0 for positive) and
the bits above it are the magnitude index. The value 0 is always code 0.

| order | code width | values |
|---|---|---|
| 1 | 1 bit | 0 = +sqrt(D), 1 = -sqrt(D) |
| 2 | 2 bits | 00 = 0, 10 = +sqrt(3D), 11 = -sqrt(3D) |
| 3 | 3 bits | 000 = 0, 010 = +sqrt(D), 011 = -sqrt(D), 100 = +sqrt(6D), 101 = -sqrt(6D) |

`rn_packer` puts number i of a word at bit `i*width`, so the first number is
in the least significant bits. A word holds 32, 16 or 10 numbers. At order 3,
bits 31:30 are alignment bits and are always zero.

## Configuration port

The port is asynchronous to `ck`. To write a word:

1. Set `sel` and `seed_in`.
2. Raise `wr`.
3. Hold all three for at least 3 `ck` periods.
4. Drop `wr` and keep it low for at least 3 `ck` periods.

The write takes effect 2 to 4 `ck` cycles after `wr` rises.

| sel | name | action |
|---|---|---|
| 0 | SEED | shift the word into the generator state |
| 1 | COEF | shift the word into the coefficient register; the last word written holds c1..c32, with bit 0 = c1 |
| 2 | LEN | polynomial order n, clamped to 2..NMAX |
| 3 | CTRL | bits 1:0 = scheme order (1, 2, 3; 0 means 1); bit 2 = enable |

Reset values:

- order 31 with c3 = 1, which is x^31 + x^3 + 1;
- state 1;
- scheme order 1;
- generator disabled.

Each write also drops any partly filled word. A word therefore never mixes
numbers of two configurations. This also means that a batch's last numbers
are lost at a disable, if they did not complete a word.

A typical start, here for x^521 + x^32 + 1 at scheme order 3:

1. Write LEN = 521.
2. Write 17 COEF words, the last one being 0x8000_0000.
3. Write 17 SEED words.
4. Write CTRL = 0b111.

## Output queue and read port

`async_fifo` is a Gray-pointer dual-clock FIFO with 2^`FIFO_AW` words
(default 256). The read side works as follows:

- `rd_data` shows the oldest word whenever `rd_empty` is low.
- Asserting `rd_en` at a `rd_clk` edge removes that word.

`fifo_full` stops the generator: the state is held and the pending number
waits. No number is ever lost or duplicated. The full flag is the word FIFO's
flag, so it can also pause a word that is only partly filled.

`rn`, `buff_wr` and `fifo_full` are brought out of the top for observation.
A PCI target/DMA engine, which is not part of this RTL, would connect to the
read port.

## Timing and size

- **Throughput:** one sample per `ck` cycle, less the rejected combinations.
  At a 33 MHz, 32-bit read side, one word per read cycle is far more than
  the generator produces (at most one word per 10 to 32 `ck` cycles). The
  reader only sets the pace when it stops reading.
- **Critical path:** it runs through the five chained XOR reductions of the
  unrolled recurrence. Each reduction is as wide as the tap vector (up to
  NMAX bits, but only the non-zero taps matter after the register). If a
  target needs a faster clock, pipelining that chain is the first change to
  make.
- **Size:** after coarse synthesis at the defaults, the top has about 1700
  flip-flops (two 521-bit vectors for state and taps, and a 521-bit
  coefficient register) and an 8 Kbit memory.

## What follows the source design and what is chosen here

Taken from the source design:

- the recurrence;
- the run-time programmable polynomial order and coefficients;
- the 1/3/5-bit acceptance-rejection schemes and how many combinations go to
  each value;
- the order-1 mapping;
- one number per clock, on the signals RN, BUFF_WR and FIFO_FULL;
- a seed of any length uploaded asynchronously through SEED/WR;
- ceil(log2 n)-bit codes packed into 32-bit words, with alignment bits at 3
  bits;
- a FIFO read asynchronously with 32-bit data that suspends generation when
  full;
- order 521 as the largest evaluated polynomial.

Chosen here:

- which bit combinations form each group;
- the code layout for orders 2 and 3;
- the configuration register map, its `sel` input and the write handshake;
- the enable bit;
- the reset polynomial and state;
- the bit order of seeds and words;
- dropping partial words on a configuration write;
- the FIFO's depth, its Gray-code structure and its show-ahead read;
- doing the packing before the FIFO rather than in it.

Not included:

- the PCI 2.2 interface and its DMA burst engine;
- the host-side decoding (software);
- the host itself.

The source design's clock rates (116 to 167 MHz on an Altera Stratix
EP1S10) were measured on that device and are not reproduced here.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mpd_pkg.sv tb/mpd_ref_pkg.sv tb/tb_mpd_rng_top.sv --top-module tb_mpd_rng_top
    ./obj_dir/Vtb_mpd_rng_top

The testbenches:

- **`tb_srg_lfsr`:** compares the generator against the bit-serial model for
  orders 31, 521 and 17, the last with seven coefficients. It mixes the
  three step sizes, multi-word seeds and holds. It also checks the
  31-bit period of x^5 + x^2 + 1.
- **`tb_accept_group`:** exhaustive; counts the combinations per value for
  each order.
- **`tb_cfg_loader`:** asynchronous writes from an unrelated clock; checks
  the register contents, clamping and write latency.
- **`tb_mpd_rng`:** cycle-by-cycle comparison with random stalls, and rate
  checks.
- **`tb_rn_packer`**, **`tb_async_fifo`** and **`tb_rn_queue`:** packing,
  clear, full and empty behaviour, and data integrity across clocks.
- **`tb_mpd_rng_top`:** end to end at the default parameters. It programs
  the polynomials through the port, runs all three scheme orders on the
  order-31 and order-521 trinomials and on polynomials with many non-null
  coefficients, lets the FIFO fill so that FIFO_FULL
  stalls the generator, and compares every word read with the reference
  stream.

- **`tb_moments`:** a statistical workload at the default parameters. It
  draws 96,000 to 100,000 numbers per scheme order from the order-521
  trinomial and checks each value's frequency and the moments up to the
  sixth against the target distributions, within five standard errors.

`tb/mpd_ref_pkg.sv` holds the reference models: the bit-serial generator,
the acceptance mapping written as value ranges, the code and the packing.
