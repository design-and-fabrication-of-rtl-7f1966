# Half-butterfly processing element for a 2-D systolic FFT array

A mesh of identical processing elements (PEs), 2^m x 2^n of them, can compute
an N = 2^(m+n) point FFT with only nearest-neighbour wiring. Every PE holds one
complex data point. Each of the log2 N butterfly stages has two parts. First
the data are shuffled: each point moves a distance D(q) = N/2^q through the
mesh, one hop per clock, so that partners meet. Then every PE computes one
**half-butterfly (HBA)** at the same time as all the others:

    HBA+ = f(k) + f(k+D) * W^p        (in the PE holding f(k))
    HBA- = f(k) - f(k+D) * W^p        (in the PE holding f(k+D))

Each radix-2 decimation-in-time butterfly is split across its two PEs. Both
halves are computed at once, so no PE idles and no data has to be sent back
after the stage.

This RTL describes one such PE. The data path is 8 bits wide. It has no
multiplier: the complex product B*W is computed by distributed arithmetic
(DA) on two adders. An HBA takes 10 clocks, which is 0.5 us at 20 MHz.

## Number format and scaling

- Data and coefficients are 8-bit two's complement fractions: a sign bit and
  seven fraction bits, range [-1, 1).
- A complex word travels as two 8-bit words, real first, then imaginary.
- The twiddle factor W = Wr + jWi is not stored directly. The PE stores two
  derived coefficients:
  - Kr = (Wr + Wi)/2
  - Ki = (Wr - Wi)/2
- Every stage scales its inputs by 1/2 with an arithmetic right shift before
  the arithmetic starts. A PE therefore computes

      HBA = A/2 & (B/2) * W,    & = + or -

  Without this, the results could grow past the 8-bit range over the stages.
  After log2 N stages the output is the FFT divided by N.
- All shifts truncate, rounding towards minus infinity. The result is within
  3 LSB of the exact value, and usually within 1-2 LSB.
- Because truncation always rounds down, each stage adds a small negative
  bias, about 1 LSB per output. Over a long transform the biases add up.
  In a 1024-point transform of two tones of amplitude 0.45 (57 LSB after the
  1/N scaling), the tone bins came out as 49-4j and 56-1j. Bin 0 came out
  at about -17-17j instead of 0. The largest error anywhere was under
  2 LSB per stage.

## Distributed arithmetic in the HBAU

This is the core of the design and the least obvious part.

Write each bit of Br and Bi in offset form, d = 2b - 1, so that d is +1 or -1.
The real part of the product becomes a sum over bit positions n, where n = 0
is the sign bit and n = 7 is the LSB:

    Re{B*W} = Br*Wr - Bi*Wi
            = sum_n Q_r(n) * 2^-n  -  2^-7 * Ki
    Im{B*W} = Br*Wi + Bi*Wr
            = sum_n Q_i(n) * 2^-n  -  2^-7 * Kr

Each Q depends only on the bit pair (Br_n, Bi_n):

| Br_n Bi_n | Q_r (n > 0) | Q_i (n > 0) |
|-----------|-------------|-------------|
| 0 0       | -Ki         | -Kr         |
| 0 1       | -Kr         | +Ki         |
| 1 0       | +Kr         | -Ki         |
| 1 1       | +Ki         | +Kr         |

At n = 0 (the sign bit) every sign is reversed. Three rules follow from the
table:

- **Which coefficient:** the real half uses Kr when Br_n differs from Bi_n
  (an XOR) and Ki otherwise. The imaginary half does the opposite (an XNOR).
- **Which sign:** the sign comes from Br_n in the real half and from Bi_n in
  the imaginary half. It is inverted at the sign bit (SCT) and, for HBA-, on
  every step.
- **Negation:** a negative coefficient is formed by the add/subtract (A/S)
  block. It inverts the bits and sets the adder's carry input to 1.

Each half of the HBAU (`hbau_half`) evaluates its sum LSB-first, in Horner
form, with one adder pass per clock:

| clock | control | adder inputs | accumulator after the clock |
|-------|---------|--------------|-----------------------------|
| 1 | IN | Q(7) + constant term | t7 |
| 2..7 | SHS | Q(n) + t(n+1)/2 | t(n) |
| 8 | SHS, SCT | -Q(0) + t1/2 | t0 = B*W part |
| 9 | M1 | t0 + A/2 | result |

Clock 0, the scaling step, comes before these. A/2 and B/2 are formed then,
and the adder is idle.

Some details of this scheme:

- **Constant term.** It enters in the first step through the IN multiplexer,
  in place of the accumulator feedback. For HBA+ it is -K, and the circuit
  adds the ones' complement ~K = -K - 1 LSB. The extra -1 LSB sits at weight
  2^-7 and is shifted out long before the result.
- **The '&' operator.** It is folded into the signs: for HBA- every
  coefficient and the constant term are negated. The final M1 step is then
  always an addition of A/2.
- **Ninth bit V.** A partial sum can need 9 bits even when the final result
  fits in 8. The adder's true sign bit, V = a7 ^ b7 ^ carry_out, is stored
  next to the 8-bit accumulator. The right shifter feeds it into the MSB,
  which keeps the feedback t/2 exact apart from truncation.
- **Role of the accumulators.** They also hold the PE's own data point
  between stages. ILD loads them from a DRU with the initial data. QSF
  selects which half, real or imaginary, is sent back to the DRUs.

Each 8-bit adder is a binary lookahead carry (Brent-Kung prefix) adder,
`blc_adder`. The chip also carries one such adder as a stand-alone test cell;
it is brought out on `t_a`, `t_b`, `t_ass` (carry in) and `t_s` (S8..S0).

## Data routing units and registers

There are two data routing units (DRUs), each an 8-bit register (`dru`).

- **N/W DRU:** takes NI or WI, or the PE's own result. It drives SO, and it
  feeds Reg.A, the Kr/Ki registers and the accumulators' initial load.
- **S/E DRU:** takes SI or EI, or the PE's own result. It drives NO, and it
  feeds Reg.B.

The first multiplexer in each DRU picks vertical or horizontal shuffling,
depending on the stage. The second picks between the neighbour's word and
the PE's own result.

The registers:

- **Reg.A (`reg_a`)** holds Ar and Ai in parallel.
- **Reg.B (`reg_b`)** is a pair of shift registers. It hands one bit of Br
  and one of Bi to the HBAU per clock.
- **Kr/Ki (`coef_reg`)** are plain load registers.

Both Reg.A and Reg.B halve their contents in clock 0 of the HBA.

### A butterfly between two PEs

The testbench `tb_fft_pe` shows how two PEs are used. PE0 holds f(k) and PE1
holds f(k+D), stacked north-south. For each half-word (real, then imaginary)
the exchange takes three clocks:

1. Each PE puts its own word into a DRU (`n_res`/`s_res`, with `qsf`
   choosing the half). PE0 uses its N/W DRU, so the word appears on SO. PE1
   uses its S/E DRU, so the word appears on NO.
2. Each PE loads the partner's word into its other DRU over the vertical
   link. In the same clock, each loads its own word into A (PE0) or B (PE1).
3. Each PE loads the partner's word into B (PE0) or A (PE1).

GO is then issued to both PEs, with HBA+ in PE0 and HBA- in PE1.

## Control: the 17-bit control word and the HBA sequencer

`ci` is a packed struct, `pe_ctrl_t` (see `fft_pe_pkg`):

| field | effect |
|-------|--------|
| `go` | start an HBA |
| `op_minus` | operator: 0 = HBA+, 1 = HBA- |
| `n_horiz`, `n_res`, `n_ld` | N/W DRU: take WI / take own result / load |
| `s_horiz`, `s_res`, `s_ld` | S/E DRU: take EI / take own result / load |
| `lar`, `lai` | load Ar, Ai |
| `lbr`, `lbi` | load Br, Bi |
| `lkr`, `lki` | load Kr, Ki |
| `ildr`, `ildi` | initial load of the real / imaginary accumulator |
| `qsf` | 0 = real, 1 = imaginary accumulator to the DRUs |

The internal control logic (`icl`) works as follows:

- `go` is sampled at a clock edge while `busy` is low. The operator is
  latched at that edge.
- Over the next 10 clocks the ICL runs: scale, IN, SHS x 6, SHS+SCT, M1.
- `busy` is high for exactly those 10 clocks. The result is in the
  accumulators after the 10th edge.
- While busy, the loads of A, B, Kr/Ki and the accumulators are ignored, and
  so is `go`. An assertion in `fft_pe` flags a `go` issued while busy.
- The DRU controls and `qsf` stay live while busy, so shuffling traffic can
  pass through a busy PE.

## How far this follows the source design, and where it departs

Taken from the published design:

- the block structure: two DRUs with two multiplexers and a register each,
  registers A, B and Kr/Ki, two adder halves, and the control logic;
- the 8-bit word length;
- the coefficient table and the Kr/Ki definitions;
- the IN / SHS / SCT / M1 / LXR / LXI / ILD / QSF sequencing;
- per-stage scaling by 1/2 before the DA;
- the 10-clock HBA;
- the Brent-Kung adder with a carry input (ASS);
- the pin names NI, WI, EI, SI, NO and SO.

Choices made here because the source leaves them open:

- the fields and encoding of the 17-bit control word;
- which DRU feeds which register;
- blocking register loads while busy;
- the asynchronous active-low reset;
- the exact Brent-Kung tree.

Points where this design reads the source differently:

- **Sign of the constant term.** The source prints it with a plus sign. The
  sign used here is negative, which the offset-binary derivation requires
  and the tests confirm against exact arithmetic.
- **Applying the '&' operator.** The source does this with set/clear logic
  on the coefficient registers' sign bits. Here the HBAU's sign control does
  it, and the coefficient registers hold plain Kr and Ki.
- **The V bit.** Treating the block marked V as the adder's ninth bit is an
  interpretation.
- **Constant-term coefficient.** The real half takes its constant term from
  Ki and the imaginary half from Kr, as the equations require. The source's
  block diagram appears to wire them the other way round.

Not modelled:

- the self-test output pin, whose function is not specified;
- the ring-oscillator delay test structures;
- the pads;
- the mesh array. Its wiring between PEs and its stage-by-stage controller
  are not specified: each PE has four inputs but only NO and SO as outputs.
  The pairwise exchange above is one consistent way to use the PE, not the
  array's own scheme.

## Files

| file | content |
|------|---------|
| `rtl/fft_pe_pkg.sv` | word length, HBA length, control structs |
| `rtl/fft_pe.sv` | the PE (top) |
| `rtl/icl.sv` | control word gating and 10-step HBA sequencer |
| `rtl/dru.sv` | data routing unit |
| `rtl/reg_a.sv`, `rtl/reg_b.sv`, `rtl/coef_reg.sv` | operand and coefficient registers |
| `rtl/hbau.sv`, `rtl/hbau_half.sv` | half-butterfly arithmetic unit |
| `rtl/blc_adder.sv` | Brent-Kung adder |
| `tb/hba_ref_pkg.sv` | reference models (table-driven exact model, ideal value) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_fft_array.sv` | a full 1024-point FFT on 1024 PEs |

## Simulating

Each testbench checks its block against independently computed values. It
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.
For example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fft_pe_pkg.sv tb/hba_ref_pkg.sv tb/tb_fft_pe.sv \
        --top-module tb_fft_pe -o sim && ./obj_dir/sim

What the testbenches cover:

- **`tb_fft_pe`** runs the PE at its default size. It does 300 trials of two
  back-to-back butterfly stages in a PE pair, with twiddles
  exp(-j 2 pi p / 16). It checks:
  - every result bit-exactly against the reference model, and within 3 LSB
    of the exact complex butterfly;
  - the 10-clock HBA length;
  - that a load issued during an HBA is ignored;
  - the test adder.

  It also counts how often each mechanism was used: horizontal and vertical
  paths, result routing, initial load, both QSF halves, HBA+ and HBA-,
  sums needing the ninth bit, and loads blocked while busy. A mechanism that
  never occurs is counted as a failure.
- **`tb_fft_array`** computes a whole 1024-point FFT on 1024 PE instances,
  one point each, in 10 stages of 20 clocks. The testbench supplies the
  partner exchange of each stage. Upper PEs see their partner's NO on SI;
  lower PEs see their partner's SO on NI. Twiddles use
  p = bitrev_{q-1}(k / 2D) * D, and the output is in bit-reversed order.
  Every output is checked bit-exactly against a stage-by-stage reference
  model, and against the DFT/N within 2 LSB per stage. Building it takes
  about a minute.
- **`tb_hbau`** and **`tb_hbau_half`** run thousands of random HBAs with the
  control sequence driven directly.
- **`tb_blc_adder`** is exhaustive over all operands and carry inputs.
