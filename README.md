# 32-tap symmetric FIR filter for audio: distributed arithmetic, Baugh-Wooley MAC and signed-digit realisations

This RTL is a 32-tap low-pass FIR filter for audio samples. It takes 10-bit two's-complement samples and produces 16-bit results. The filter is built three ways, and all three run side by side on the same sample stream:

| engine | idea | output | latency (clock edges, sample to output register) | sample rate |
|---|---|---|---|---|
| `da_fir` | bit-serial **distributed arithmetic (DA)**: no multiplier; precomputed coefficient-sum tables are read one bit slice at a time | `dout` | 13 | 1 per 13 cycles |
| `mac_fir` | direct form with **one multiply-accumulate unit**, whose multiplier is a **Baugh-Wooley** two's-complement array; tap count programmable at run time (1..32) | `dout_bw` | N + 2 (34 at 32 taps) | 1 per N + 1 cycles (33) |
| `sd_fir` | fully parallel; each coefficient is a **signed-digit shift-and-add** constant multiplier | `dout_sd` | 1 | 1 per cycle |

With the same coefficients, the three engines give bit-identical results. The testbench checks this on every sample.

The filter is even-symmetric: h[k] = h[31-k]. Two of the engines use this by adding the two samples that share a coefficient before weighting them. That leaves 16 products per output instead of 32.

## Number formats

- **Samples:** 10-bit signed, range -512..511.
- **Coefficients:** 16-bit signed Q2.13, i.e. the real value times 8192, range about ±4.
- **Accumulator:** 32 bits. Each 10 × 16-bit product fits in 26 bits, so a sum of 32 products cannot overflow.
- **Output:** `y = round(acc / 2^13)`, rounding half up, clipped to 16 bits. The output is in the same units as the input. A `*_sat` flag is raised when clipping happened.

The default coefficient set is `fir_pkg::H_DEFAULT`:

| k | h[k] = h[31-k] | Q2.13 |
|---|---|---|
| 0 | 0.098 | 803 |
| 1 | -0.811 | -6644 |
| 2 | 1.097 | 8987 |
| 3 | 0.353 | 2892 |
| 4 | 0.0091 | 75 |
| 5 | -0.6692 | -5482 |
| 6 | -0.0236 | -193 |
| 7 | 0.9774 | 8007 |
| 8 | 0.0624 | 511 |
| 9 | 1.5443 | 12651 |
| 10 | 1.2018 | 9845 |
| 11 | -1.05689 | -8658 |
| 12..15 | not specified, set to 0 | 0 |

Any other symmetric set can be passed as the `H` parameter of `frty`, `da_fir`, `sd_fir` or `mac_fir`. With the default set, |y| stays below 8100, so the default filters never saturate.

## The distributed-arithmetic engine (`da_fir`)

The engine computes

    y = sum_{k=0}^{15} h[k] * u[k],     u[k] = x(n-k) + x(n-31+k)

Each `u[k]` is an 11-bit two's-complement number. Write it bit by bit, with the sign bit having weight -2^10:

    u[k] = -u[k]_10 * 2^10 + sum_{b=0}^{9} u[k]_b * 2^b

Swapping the order of the two sums gives

    y = sum_b w_b * 2^b * ( sum_k h[k] * u[k]_b ),   w_10 = -1, other w_b = +1

The bracketed term depends only on the 16 bits `u[0]_b .. u[15]_b`. So it can be read from a table addressed by those bits, holding every possible subset sum of the coefficients. The filter then needs no multiplier. It makes one table read and one add per bit, 11 steps per output.

A single 16-input table would need 65536 entries. Instead the address is split into two 8-bit halves, each addressing a 256-entry table (`da_lut`). An adder combines the two table outputs. The tables are computed by a SystemVerilog function when the design is elaborated. Entry `a` of table `g` is the sum of `h[8g+i]` over the bits `i` set in `a`.

Per sample, `da_fir` runs this sequence:

1. **Edge 0:** the sample enters the delay line (`sym_tap_line`). The 16 pre-adders produce `u[k]` combinationally.
2. **LOAD cycle:** the `u[k]` are copied into 16 parallel-to-serial shift registers.
3. **11 SERIAL cycles:** the most significant bit of every shift register forms the table address, and the registers shift left. The shift-accumulator (`da_shift_acc`) loads `-sum` on the first slice, which is the sign bit. On each later slice it computes `acc = 2*acc + sum`.
4. **Next edge:** the round-off unit writes the result into the output register, and `dout_valid` pulses. This is 13 edges after the sample edge.

`din_ready` is low from the sample edge until the output cycle.

## The single-MAC engine (`mac_fir`) and the Baugh-Wooley multiplier

### Datapath

This engine is a classic programmable direct-form filter:

- **XRAM:** sample memory, 64 × 10 bits, written circularly.
- **BRAM:** coefficient memory, 64 × 16 bits. It is preloaded with the 32 symmetric taps and can be rewritten at run time. Tap k is at address k, written through `coef_we/coef_addr/coef_wdata`.
- **XREG, BREG:** operand registers.
- **MAC:** one multiply-accumulate unit (`mac_datapath`).
- **Round-off unit and output register.**
- **Control unit:** `mac_ctrl`.

The number of taps N is programmable at run time through `num_taps`, from 1 to 32; 0, or any value above 32, means 32. It is taken together with each sample, and the sum then covers only taps 0..N-1.

Both memories have a synchronous write and a combinational read. XREG and BREG are the only registers between the memories and the multiplier.

### Timing

The control unit produces the following sequence:

| edge / cycle | action |
|---|---|
| edge 0 | `XRAM[wptr] <= din`; `newest <= wptr`; `wptr++` |
| cycles 1..N | `XREG <= XRAM[newest-k]`, `BREG <= BRAM[k]`, k = 0..N-1 |
| cycles 2..N+1 | `acc <= (k==0 ? 0 : acc) + XREG*BREG` |
| edge N+2 | output register `<= round(acc)`; `dout_bw_valid` pulses (edge 34 for 32 taps) |

A new sample can be taken at cycle N+1, so at full length this engine sets the sample rate of the whole top: one sample per 33 cycles. With fewer than 12 taps, the DA engine's 13-cycle period sets the rate instead. After reset the control unit spends 64 cycles writing zeros into XRAM, so the first outputs see an all-zero history. `din_ready` is low during that pass.

A coefficient written while a sample is being processed takes effect from that point of the running sum onward.

### Baugh-Wooley array (`bw_mult`, `bw_cell`)

The MAC multiplies with a 16 × 16 two's-complement Baugh-Wooley array. The 10-bit sample is sign-extended to 16 bits.

For n-bit signed A and B, the modified Baugh-Wooley form writes the product as a sum of positive bits only:

- the partial products `a_i b_j` with i, j < n-1;
- the corner bit `a_{n-1} b_{n-1}`;
- the **complemented** partial products of the sign row and sign column, `~(a_i b_{n-1})` and `~(a_{n-1} b_j)`;
- the constants `2^n` and `2^(2n-1)`.

Computed modulo `2^(2n)`, this sum equals `A*B`.

Each cell (`bw_cell`) contains an AND gate and a full adder. Its `inv` input complements the partial product, which turns the cell into a sign-row or sign-column cell. Cell (i, j) has weight `2^(i+j)`. Its sum goes to cell (i-1, j+1) and its carry to cell (i, j+1), in carry-save form.

- **Low product bits:** row j produces product bit j.
- **Upper product bits:** a ripple-carry merge row adds the sums and carries left over after the last row. It produces bits 16..31.
- **Constants:** `2^16` enters through the merge row's carry input, and `2^31` is XORed into the top bit.

**8-bit precision (`half = 1`).** The multiplier can also multiply the low 8 bits of each operand as signed 8-bit numbers:

- the upper operand bits are gated to zero, so the upper part of the array does not switch;
- the complemented cells move to row and column 7;
- the constants `2^8` and `2^15` enter through free carry inputs of row 0;
- a row of multiplexers replaces output bits 31..16 with the sign of the 16-bit product.

The filter itself always uses 16-bit mode. The 8-bit mode is verified in `tb_bw_mult`, exhaustively over all 65536 operand pairs.

## The signed-digit engine (`sd_fir`)

`sd_fir` uses the same delay line and pre-adders as the DA engine. Each `u[k]` is then multiplied by its fixed coefficient in a `csd_mult`. That module recodes the coefficient at elaboration into canonical signed digits: digits in {-1, 0, +1}, with no two adjacent digits non-zero. The product is `sum d_i (u << i)`, which costs one adder or subtractor per non-zero digit. The 16 products are summed, rounded and registered on the edge after the sample edge. A new sample may be offered every cycle.

## Top level (`frty`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `reset` | in | 1 | synchronous, active high |
| `din` | in | 10 | sample |
| `din_valid` | in | 1 | sample offered; taken on a rising edge where `din_ready` is also high |
| `din_ready` | out | 1 | all engines can take a sample |
| `num_taps` | in | 6 | tap count of the single-MAC engine, 1..32; 0 means 32; taken with each sample |
| `coef_we`, `coef_addr[5:0]`, `coef_wdata[15:0]` | in | | write one tap of the single-MAC engine's coefficient memory |
| `dout`, `dout_valid`, `dout_sat` | out | 16, 1, 1 | DA engine result |
| `dout_bw`, `dout_bw_valid`, `dout_bw_sat` | out | 16, 1, 1 | single-MAC (Baugh-Wooley) engine result |
| `dout_sd`, `dout_sd_valid`, `dout_sd_sat` | out | 16, 1, 1 | signed-digit engine result |

Each `*_valid` output is a one-cycle pulse, and each result stays in its register until the next one. The DA and SD coefficients are fixed by the `H` parameter. Only the single-MAC engine's coefficients can be reprogrammed, so after `coef_*` writes, or with `num_taps` below 32, `dout_bw` no longer matches the other two outputs.

## Where this design departs from its source, or fills gaps

- **Coefficient width.** The source gives 32-bit coefficients, but also 10-bit component widths, a 16 × 16 → 32-bit multiplier and a 32-bit MAC result. The design uses 16-bit Q2.13 coefficients, so that the 16-bit Baugh-Wooley multiplier and the 32-bit accumulator fit together.
- **Coefficients and scaling.** The design uses 12 specified coefficient values and sets the other four, h[12]..h[15], to zero. The 2^13 scaling is this design's choice. A ×128 signed-digit scaling is also described in the source, but its examples do not agree with the coefficient values.
- **Output multiplexers.** The source speaks of 8 output multiplexers for the 8-bit mode. This design uses one multiplexer per output bit 31..16.
- **Latency.** The source gives 34 cycles, which the single-MAC engine meets at 32 taps. The source also says that a structure produces its output after one clock cycle, which the SD engine does. The DA engine's 13 cycles and the sequencing of all three engines are this design's own.
- **Interface choices.** The encoding of the run-time tap count, the handshake (`din_valid`/`din_ready`/`dout_valid`), the saturation flags, the synchronous reset, the XRAM clearing pass, the circular XRAM addressing, the two-table DA split and the MSB-first bit order are all this design's choices.
- **Not built.** The source evaluates against a constant-coefficient-multiplier filter and a decimation filter for comparison only. Neither is part of this RTL. Nor is anything about power, area or clock frequency.

## Files

- **`rtl/fir_pkg.sv`:** widths, sizes, types and the default coefficients.
- **DA engine:** `rtl/da_fir.sv`, `rtl/sym_tap_line.sv`, `rtl/da_lut.sv`, `rtl/da_shift_acc.sv`.
- **Single-MAC engine:** `rtl/mac_fir.sv`, `rtl/mac_ctrl.sv`, `rtl/mac_datapath.sv`, `rtl/fir_ram.sv`, `rtl/bw_mult.sv`, `rtl/bw_cell.sv`.
- **SD engine:** `rtl/sd_fir.sv`, `rtl/csd_mult.sv`.
- **Shared:** `rtl/round_sat.sv`. `rtl/frty.sv` is the top.
- **Tests:** `tb/tb_<module>.sv`, one per module. `tb/fir_ref_pkg.sv` is the integer reference model the filter testbenches compare against.

## Simulating

Every testbench checks its own results. It ends by printing `TB_RESULT checks=N failures=M`, and has a watchdog. For example, the whole design at its default parameters:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fir_pkg.sv tb/fir_ref_pkg.sv tb/tb_frty.sv --top-module tb_frty -Mdir obj_frty
    ./obj_frty/Vtb_frty

Replace `frty` with any other module name to run that module's test. `-Irtl -Itb` lets Verilator find the other modules by file name.

`tb_frty` runs the following phases:

1. It checks the 64-cycle clearing pass after reset.
2. It sends an impulse, full-scale steps and 300 samples of a synthetic noisy two-tone audio signal (440 Hz and 3 kHz at 40 kHz sampling, plus noise). It raises `din_valid` while the engines are busy, to exercise stalls.
3. It runs the single-MAC engine with random shortened tap counts, then returns it to 32 taps.
4. It reprograms the single-MAC engine's coefficients and drives that engine into saturation.

Every output of every engine is compared with the reference model, its latency is checked, and the engines are checked against each other.

`tb_speech` is a longer audio workload. It generates 0.1 s of a synthetic noisy speech-like signal: 150 Hz voiced bursts with harmonics, 25 ms syllables, pauses and noise, at 40 kHz. It streams the 4000 samples through the top, checks all 12000 outputs, and prints the input and output power.

The unit testbenches cover the following:

- the multiplier, exhaustively in 8-bit mode;
- the CSD multiplier, exhaustively over its input range;
- every DA table entry;
- the rounding and saturation corner cases;
- the control unit's address and strobe sequence, cycle by cycle, for random tap counts.

## How far to trust it

All three engines agree with an independent integer model on every sample tested, including extreme inputs and saturation. The cycle timings above are checked by the testbenches.

None of this has been checked on an FPGA or in a gate-level flow. The stated 34-cycle latency is met, but the clock frequency is not. The default coefficient set is incomplete, so its frequency response is not a designed low-pass response. Its gain at DC is the sum of the 32 taps, about 7.6. In `tb_speech` the output power is about 26 times the input power. For real use, supply your own 16 symmetric Q2.13 coefficients through `H`.
