# Low-power R4SDC pipelined FFT with a multiplier-less twiddle stage

This is a streaming FFT for short OFDM transforms, such as the 64-point FFT of IEEE 802.11a/g
wireless LAN. It accepts one complex sample per clock and returns one transformed sample per
clock. It is a radix-4 single-path delay commutator (R4SDC) pipeline. Three changes aimed at
power set it apart from the textbook version:

* **No multipliers in the 16-word stage.** In a stage that processes 16-word blocks (stage 1 of
  a 16-point FFT, stage 2 of a 64-point FFT), the 16 twiddle factors are built from only three
  constants: `5a82`, `7641` and `30fb`. The coefficients that are 1 or -j are handled without
  arithmetic. The real products are formed by shifts and additions that share two
  subexpressions, `5X` and `65X`. A small state machine replaces the coefficient ROM.
* **A six-RAM commutator (IDR).** The delay commutator is built from six dual-port RAMs in two
  chains. On average each RAM is written in only 5 of every 12 quarter-block periods. A RAM
  whose data is not needed keeps its read address, so its output stays still.
* **A summation butterfly.** The radix-4 butterfly is two 5-input adders. Negated operands are
  one's complemented, and a decoder adds back the missing ones, so the result is exact.

The architecture follows W. Han, T. Arslan, A. T. Erdogan and M. Hasan, *A Novel Low Power
Pipelined FFT Based on Subexpression Sharing for Wireless LAN Applications*. It implements the
configuration they call Scheme III. The RTL here is an independent implementation. Where that
description leaves a detail open, this design makes its own choice; these choices are listed in
[Departures and own choices](#departures-and-own-choices).

## What is computed

`r4sdc_fft #(.N(N))`, with `N` = 16, 64, 256 and so on (a power of 4, at least 16; default 64):

* **Word format.** One 32-bit word per sample: `{re[15:0], im[15:0]}` in two's complement.
  Coefficients are 16-bit with 15 fraction bits. Each part is quantized as
  `floor(value * 32768)`, and 1.0 is saturated to `7fff`.
* **Result.** The output is `X(k)/N`, where `X(k) = sum_n x(n) exp(-j 2 pi n k / N)`. Each
  butterfly divides by 4. Every rounding is towards minus infinity: an arithmetic right shift.
* **Output order.** Outputs come in base-4 digit-reversed order. For N = 16 this is
  X0 X4 X8 X12 X1 X5 X9 X13 ... The `out_index` port gives `k` with each word.
* **Accuracy.** On the test frames (amplitudes up to about 12 000), the sum of the real and
  imaginary errors against a floating-point DFT/N is below 6 LSB for N = 64.
* **Overflow.** A twiddle product whose result does not fit in 16 bits wraps around; it is not
  saturated. Keep input magnitudes below about 0.7 of full scale.

## Pipeline

Stage `t` (t = 1 .. log4 N) works on blocks of `4*N_t` words, where `N_t = N / 4^t`. Within a
block, sample `x_p(q) = x(p*N_t + q)`. For every `q` the stage produces the four radix-4 outputs
`m = 0..3`. It emits them m-major and q-minor, and multiplies output `(m, q)` by
`W_(4 N_t)^(q*m)`. The output stream of one stage is therefore the input stream of the next,
whose blocks are a quarter as long.

| stage (N = 64) | N_t | commutator              | butterfly      | multiplier                       |
|----------------|-----|-------------------------|----------------|----------------------------------|
| 1              | 16  | six RAMs (`idr_commutator`) | `lp_butterfly` | conventional, ROM (`cmult`)      |
| 2              | 4   | six RAMs                | `lp_butterfly` | multiplier-less (`mless_mult` + `mless_ctrl`) |
| 3              | 1   | shift register (`sr_commutator`) | `lp_butterfly` | none                      |

For N = 16 the chain is: six-RAM commutator, butterfly and multiplier-less unit, then a
shift-register commutator and butterfly. For larger N, every stage before the 16-word stage gets
a six-RAM commutator and a ROM multiplier.

Each stage is `r4sdc_stage`: a combinational commutator output, then the butterfly, a register,
the multiplier and a second register. The last stage has no multiplier and so only one register.

## Commutator schedule (the part to read carefully)

The butterfly needs `x_0(q) .. x_3(q)` all at once, four times: once for each `m`. Output `m` of
a block is produced while input quarter `(m + 3) mod 4` arrives:

* `m = 0` is produced while the block's own last quarter arrives. `x_3(q)` comes straight from
  the input.
* `m = 1, 2, 3` are produced while the first three quarters of the **next** block arrive.

So the commutator stores up to six quarters of data. Let the period be the `m` being produced.
The counter's quarter index is `m - 1`, and every RAM is addressed by the low counter bits `q`.
In each period:

| period m | RAMs written, with what            | port O1 | O2  | O3  | O4  |
|----------|------------------------------------|---------|-----|-----|-----|
| 0        | DM1 <- In, DM3 <- DM1              | C = x0  | In = x3 | A = x2 | B = x1 |
| 1        | DM0 <- In, DM2 <- DM0, DM4 <- DM2  | C = x0  | D = x1  | B = x3 | A = x2 |
| 2        | DM1 <- In, DM3 <- DM1, DM5 <- DM3  | D = x1  | C = x2  | B = x3 | E = x0 |
| 3        | DM0 <- In, DM2 <- DM0              | D = x3  | C = x2  | F = x1 | E = x0 |

A..F are the read data of DM0..DM5. The RAM chains are DM0 -> DM2 -> DM4 and
DM1 -> DM3 -> DM5. In the cycle a RAM is written, its read returns the old word, so a word moves
one RAM down the chain as its slot is refilled. DM2 is read in every period and uses the counter
as its read address. Each other RAM has its own read address, which follows the counter while
the RAM's data is used and holds otherwise. An idle RAM's output therefore changes at most once
per period, at its start, because the held address was written in the last cycle before.
Ten writes per four periods means 5/3 writes per RAM
per block, where a commutator with one write per RAM per period would need 4.

Because the ports carry the operands in a different order in each period, the commutator also
gives the butterfly the rotation `(-j)^((p*m) mod 4)` to apply to each port (`bf_ctrl`).

The last stage (`N_t = 1`) uses `sr_commutator` instead. It is a 6-word shift register with a
tap every `N_t` words; operand `x_p` of output `m` is the tap at delay `(3 + m - p) * N_t`. The
schedule is the same, so the stages fit together either way.

## Butterfly

`lp_butterfly` forms `y = (1/4) * sum_p x_p * (-j)^k_p`. Multiplying by `-j` swaps the real and
imaginary parts and negates one of them. So every operand of the real sum (SUM0) and of the
imaginary sum (SUM1) is one part of one port, passed straight or one's complemented. The decoder
counts the complemented operands of each sum and adds that count as a fifth operand. This turns
the one's complements into exact two's complement negations. The sums are 18 bits wide, and the
result keeps bits [17:2]. The only overflow is a true sum of +131072, from four negated -32768
operands, and that result has no 16-bit form anyway.

## Multiplier-less unit

The 16-word stage's coefficients are `W16^(q*m)`, with sequence
`W0 W0 W0 W0 | W0 W1 W2 W3 | W0 W2 W4 W6 | W0 W3 W6 W9`:

| W    | (Wr, Wi)     | handling                                      | s1 s2 s3 s4 s5 s6 s7 |
|------|--------------|-----------------------------------------------|----------------------|
| W0   | 7fff, 0000   | pass unchanged (taken as exactly 1)           | 0 0 0 0 0 0 0 |
| W4   | 0000, 8000   | swap re/im, negate new im                     | 0 0 0 0 0 0 1 |
| W1   | 7641, cf04   | Wr = +7641, Wi = -30fc                        | 0 0 0 1 0 1 0 |
| W2   | 5a82, a57d   | Wr = +5a82, Wi = -5a83                        | 1 0 0 0 0 1 0 |
| W3   | 30fb, 89be   | Wr = +30fb, Wi = -7642 (swapped)              | 0 0 1 0 1 1 0 |
| W6   | a57d, a57d   | Wr = Wi = -5a83                               | 1 1 0 0 0 1 0 |
| W9   | 89be, 30fb   | Wr = -7642, Wi = +30fb                        | 0 0 1 0 0 1 0 |

Each negative constant is `-(c + 1)` for one of the three base constants. `shift_add` builds
the three products from the shared terms `5X = X + X<<2` and `65X = X + X<<6`:

```
5a82 X = 5X<<12 + 5X<<9 + 65X<<1        (plain binary digits)
7641 X = X<<15  + 65X   - 5X<<9         (canonic signed digits)
30fb X = 65X<<8 - X<<12 - 5X            (canonic signed digits)
```

It adds `X` once more to get `c + 1`, and negates that when the block's control bit is set.
That is eleven adders per real input. `mless_mult` runs one `shift_add` on the real part and one
on the imaginary part, then forms `Yr = XrWr - XiWi` and `Yi = XrWi + XiWr` and drops the 15
fraction bits. The products are exact, so the unit gives the same result as an exact multiplier
by the same 16-bit coefficients (including the `7fff` entries, which it treats as exactly 1).
`mless_ctrl` is a 16-state counter that decodes the table above.

The other stages use `cmult`: four real products with `*`, one subtracter and one adder. Its
coefficients come from `twiddle_rom`, which builds its table at elaboration time with
`$cos`/`$sin` and the quantization rule above.

## Interface and timing

| port        | dir | width       | meaning                               |
|-------------|-----|-------------|---------------------------------------|
| `clk`       | in  | 1           | clock                                 |
| `rst_n`     | in  | 1           | asynchronous reset, active low        |
| `in_valid`  | in  | 1           | `in_data` holds the next sample       |
| `in_data`   | in  | 32          | `{re, im}` sample                     |
| `out_valid` | out | 1           | `out_data` holds a result             |
| `out_data`  | out | 32          | `X(k)/N`                              |
| `out_index` | out | log2 N      | `k` of `out_data`                     |

* **Frames.** Frames follow one another with no separator. The first valid sample after reset
  is sample 0 of frame 0.
* **Stalls.** All counters and registers advance only on valid words, so the source may pause
  at any time.
* **Flushing.** A frame's last outputs are released by the next frame's samples. To flush the
  last frame, feed one more frame (zeros will do).
* **Latency.** With no gaps in the input, the first output appears 3·N_t + 2 cycles per stage
  after the frame's first sample (3·N_t + 1 for the last stage). That is 68 cycles for N = 64
  and 18 for N = 16. After that, one output comes per input.
* **Resets.** Counters, valid flags and pipeline registers are reset. RAM and shift-register
  contents are not; they are never read before being written.

## Departures and own choices

These follow the published description: the stage structure, the Scheme III choice of parts,
the IDR write schedule and RAM chaining, the summation butterfly with one's complement
compensation, the three constants with their shift-add equations and the `-(c+1)` trick, the
s1–s7 roles, and the `W0` pass-through and `W4` swap.

These are this design's own:

* **Scaling and rounding.** Dividing by 4 per butterfly, floor rounding, and wrapping instead of
  saturating.
* **Handshake and reset.** The `in_valid`/`out_valid` handshake, the reset behaviour, and the
  `out_index` output.
* **Commutator periods and ports.** Which period is labelled `m = 1`: it is taken as the first
  quarter of a new block. Also which RAM output goes to which butterfly port.
* **Read-port behaviour.** The asynchronous, read-before-write RAM read port, and freezing the
  read address as the way idle RAM outputs are kept still.
* **Butterfly control.** The published butterfly has control lines C4–C7, shared inverters and
  four operand multiplexers. Their encoding is not given. Here each port carries a 2-bit
  rotation and has its own inverter/multiplexer pair.
* **Polarity of s1–s7.** As in the table above.
* **Shift-register commutator.** Only its name is given in the source. It is built here as a
  tapped shift register.
* **Conventional multiplier.** It uses `*`; the non-Booth Wallace tree is left to synthesis.
* **Coefficient quantization.** `floor(v * 32768)` reproduces every printed 16-point
  coefficient. For other sizes it is an extrapolation.

## Files

* **Shared types (`rtl/fft_pkg.sv`).** `cplx_t`, the butterfly rotation type, the `s1..s7`
  struct and the multiplier kind.
* **Top and stage.** `rtl/r4sdc_fft.sv` is the top; `rtl/r4sdc_stage.sv` is one stage.
* **Commutators.** `rtl/idr_commutator.sv` and `rtl/dp_ram.sv` form the six-RAM commutator;
  `rtl/sr_commutator.sv` is the shift-register one.
* **Butterfly.** `rtl/lp_butterfly.sv`.
* **Multiplier-less unit.** `rtl/mless_mult.sv`, `rtl/shift_add.sv` and `rtl/mless_ctrl.sv`.
* **Conventional multiplier.** `rtl/cmult.sv` and `rtl/twiddle_rom.sv`.
* **Testbenches (`tb/`).** Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
  cycle-count watchdog. `tb/fft_ref_pkg.sv` holds the reference models: a fixed-point model of
  the whole algorithm that works on arrays, not on the hardware schedule, and a floating-point
  DFT.
  * `tb_r4sdc_fft`: the default 64-point top, end to end.
  * `tb_r4sdc_fft16`: the 16-point top, end to end.
  * One testbench per module.

  The two end-to-end benches compare every output bit-exactly with the fixed-point model and,
  within a tolerance, with the DFT. They also check latency, throughput and output order, and
  count each mechanism: each commutator period, each coefficient class, the ROM multiplier, the
  shift-register commutator and input stalls.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fft_pkg.sv tb/fft_ref_pkg.sv rtl/*.sv tb/tb_r4sdc_fft.sv \
  --top-module tb_r4sdc_fft -o sim
./obj_dir/sim
```

Use any other `tb/tb_*.sv` and its module name in the same way. To try another size, change
`N` of `r4sdc_fft` to a power of 4. The multiplier-less stage is placed automatically at the
stage whose blocks are 16 words.
