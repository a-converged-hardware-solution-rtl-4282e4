# Converged 64-point FFT / DCT / Walsh transform processor

A multi-standard wireless baseband needs a 64-point FFT for OFDM (IEEE 802.11a/g). It also needs a
*modified Walsh transform* to demodulate the complementary code keying (CCK) of IEEE 802.11b.
This processor computes both on one datapath, and a 64-point DCT as well.

The idea behind it: written as a radix-4 algorithm, the 64-point FFT is three passes of 4-point
DFT kernels, with twiddle multiplications between them. The modified Walsh transform of
8 inputs has the same three-pass structure, with the twiddles removed and 2-input butterflies in
place of 4-input ones. The adders that do one radix-4 butterfly per cycle can therefore do two
Walsh butterflies per cycle. One mode bit steers the operand multiplexers. The DCT runs on the FFT
machinery: its input order is different, and the last pass multiplies by compensation factors
where the FFT's last-pass twiddles are unity.

| transform | input | output | busy cycles |
|---|---|---|---|
| FFT  | 64 complex 12-bit samples | X(k)/64, 64 complex 12-bit samples | 50 |
| DCT  | 64 real 12-bit samples | C(k)/64 with C(k)=Σ x(n)cos(π(2n+1)k/128) | 50 |
| FWT  | 8 complex 12-bit samples | 64 complex values Y(l)/8 | 14 |

## The three transforms as one algorithm

Write the indices in radix 4: `k = 16k2 + 4k1 + k0` and `l = 16l2 + 4l1 + l0`. The 64-point DFT
then becomes three passes. Each pass is a 4-point DFT over one digit of `k`. Between passes the
data is multiplied by twiddles:

```
pass 0: sum over k2 of x(k)(-j)^(k2*l2), then times W64^(l2*(4k1+k0))
pass 1: sum over k1 of ...   (-j)^(k1*l1), then times W64^(4*l1*k0)
pass 2: sum over k0 of ...   (-j)^(k0*l0)             (no twiddle)
```

The result for frequency `l2 + 4l1 + 16l0` sits at address `{l2,l1,l0}`. The output is
therefore in radix-4 digit-reversed order.

The modified Walsh transform is defined as `Y(l) = Σ_{k=0..7} x(k)(-j)^(k2*l2 + k1*l1 + k0*l0)`.
Here `k = {k2,k1,k0}` is binary and `l = {l2,l1,l0}` is radix 4. It is the same three passes with
two changes:
- the twiddles are left out;
- every digit of `k` takes only the values 0 and 1.

Sample `k` is stored at FFT address `{0,k2,0,k1,0,k0}` (addresses 0, 1, 4, 5, 16, 17, 20, 21),
and the other 56 words are never read. A pass then reduces to 2-input butterflies
`u + (-j)^l v` with four outputs each (l = 0..3). The result Y(l) ends up at address `l`.

The DCT-II uses the usual FFT-based method. Store `v(i) = x(2i)` and `v(63-i) = x(2i+1)`, take
the FFT `V(k)`, and the DCT is `C(k) = Re(W256^k V(k))`. The factor `W256^k` is applied in
pass 2, by the multipliers that sit idle (multiply by 1) during an FFT.

## Datapath (`datapath`, `butterfly`, `cmult`)

Four memory words enter per cycle.

**FFT/DCT: a three-stage pipeline, one radix-4 butterfly per cycle.**
- Stage 1: two levels of complex adders. The first level computes `t0=x0+x2`, `t1=x0-x2`,
  `t2=x1+x3`, `t3=x1-x3`. The second computes `y0=t0+t2`, `y2=t0-t2`, `y1=t1-j·t3`,
  `y3=t1+j·t3`. The results are registered.
- Stage 2: four complex multipliers. Each has four 16×12 real multipliers, and the products are
  registered.
- Stage 3: two 30-bit adders per multiplier, then rounding to 16 bits. The result goes to memory
  at the next clock edge.

**FWT: no pipeline, two Walsh butterflies per cycle.** Butterfly A works on `(x0,x1)` and B on
`(x2,x3)`. The first adder level gives `u±v` by pairing `(x0,x1)` and `(x2,x3)` instead of
`(x0,x2)` and `(x1,x3)`. The second level gives `u∓j·v`, with the memory words fed to it
directly. Every result is therefore one addition deep. The multipliers and the ROM are not used.
The eight results are written back in the same cycle.

The first multiplier is only needed for the DCT, because every FFT butterfly's first coefficient
is 1. It is built anyway, so that one datapath serves both.

### Number format and scaling

All widths are per part, real and imaginary:

| quantity | width |
|---|---|
| memory word | 16 + 16 bits |
| port samples | 12 bits |
| coefficients | 12 bits, 10 fraction bits (1.0 = 1024, exact) |
| products | 28 bits |
| sums | 30 bits |

In FFT/DCT mode the input port stores `2·x`. Each pass divides by 4 in its rounding step
(round half up, then saturate). After three passes the memory holds `X/32`, and the output port
returns `X/64` rounded to 12 bits, saturating. With this scaling the 16-bit intermediate values
cannot overflow for any 12-bit input:
- a memory value is at most 5793 in magnitude;
- a butterfly output is at most 4× that.

The FWT has no rounding. Inputs are stored as they are, results are exact integers in memory
(at most 8 × 2048 per part), and the output port returns `Y/8`. The 16-bit word is also
available on `out_word` for full precision, for example to pick the CCK correlation peak.

Measured against a floating-point reference, the 16-bit FFT and DCT results are within 1 LSB.

## Memory: four reads and eight writes per cycle without conflicts (`cf_memory`, `bank_select`, `regfile`)

All transforms work in place in one 64-word memory, built as a register file. It has four banks
of two subbanks of eight words each:
- each bank has one read port, so four reads per cycle;
- each subbank has one write port, so eight writes per cycle.

Inside a subbank the word is selected by the three address MSBs. The memory must meet four
conditions:

1. The four words of any FFT butterfly are in four different banks. These are four addresses
   that differ in one radix-4 digit, for each of the three digits.
2. The four words read by any FWT cycle are in four different banks.
3. The eight words written by any FWT cycle are in eight different subbanks.
4. For each value of the three MSBs, the eight addresses occupy all eight (bank, subbank) slots.
   Otherwise two addresses would collide in one row.

The mapping used here costs two 2-bit adders and one XOR gate. With `a = {b5..b0}`:

```
bank    = ({b1,b0} + {b2,b3} + {b4,b5}) mod 4     // digit d0 plus bit-swapped d1 and d2
subbank = b1 ^ b0
row     = {b5,b4,b3}
```

**Why the plain digit sum fails.** `d0+d1+d2 mod 4` is the classic radix-4 conflict-free scheme,
and it satisfies condition 1. It breaks condition 2. An FWT cycle reads words that differ in the
low bit of two different digits, so two of its four reads get the same bank sum.

**Why the swap fixes it.** Swapping the bits of the upper two digits turns a change in their low
bit into a change of 2 in the bank number, while a change in `b0` is a change of 1. The four
combinations then land on four different banks, and condition 1 still holds because each digit
is still a permutation of 0..3.

The XOR subbank bit separates the pairs of FWT writes that share a bank. `tb_bank_select` checks
all four conditions exhaustively.

The crossbar in `cf_memory` does two things:
- it routes each read address to its bank port and returns that bank's word;
- it routes each enabled write to its subbank port.

An assertion reports two writes aimed at one subbank. Reads are combinational. This is what lets
the unpipelined FWT read, compute and write back in one cycle.

## Address generation (`addr_gen`)

Two 6-bit counters drive everything:
- a read counter;
- a write counter, which is the read counter delayed by the pipeline depth (2 cycles in
  FFT/DCT mode, none in FWT mode).

The coefficient ROM is addressed by the read counter delayed by one cycle, so its output meets
the data in stage 2. Call the counter bits `{x0..x5}`, with x0 the MSB, and `m` the butterfly
output index.

FFT/DCT: the counter runs 0..47, and `{x0,x1}` is the pass.

| pass | addresses a_m, m=0..3 (read and write) |
|---|---|
| 0 (`x0x1=00`) | `{m, x2,x3,x4,x5}` |
| 1 (`x0x1=01`) | `{x2,x3, m, x4,x5}` |
| 2 (`x0=1`)    | `{x2,x3,x4,x5, m}` |

FWT: the counter runs 2..15, and `{x2,x3}` is the pass. The passes take 2, 4 and 8 cycles. Each
cycle reads a0..a3 and writes a0..a7:
- butterfly A reads a0 (u) and a1 (v), and writes its outputs l = 0, 1, 2, 3 to a0, a1, a4, a5;
- butterfly B reads a2 and a3, and writes a2, a3, a6, a7.

In each pass the digit being transformed carries `{i2,i0}` of address `ai`. Bit `i1` selects the
butterfly and sits in the low bit of another digit:

| pass | ai |
|---|---|
| 0 | `{i2, i0, 0, x5, 0, i1}` |
| 1 | `{x4, x5, i2, i0, 0, i1}` |
| 2 | `{x3, x4, x5, i1, i2, i0}` |

Read-after-write hazards cannot occur with a 2-cycle write delay in FFT/DCT mode. The first
butterfly of a pass needs data that the previous pass wrote at least four cycles earlier.

## Coefficient ROM (`coef_rom`)

The ROM has 64 rows of four complex coefficients, addressed by the delayed counter value `r`.
Each entry is `W256^e = exp(-j2πe/256)`:

| rows | use | exponent e for column m |
|---|---|---|
| 0..15  | pass 0 twiddles | `4·m·r` (= W64^(m·(4k1+k0))) |
| 16..31 | pass 1 twiddles | `16·m·(r mod 4)` |
| 32..47 | FFT pass 2 | 0 (unity) |
| 48..63 | DCT pass 2 | `k = (r/4 mod 4) + 4(r mod 4) + 16m`, the DCT output index |

In a DCT's last pass the address generator sets counter bit 4, so rows 48..63 are used. The
table is computed at elaboration with `$cos`/`$sin` and rounded to nearest. There is no data file.

## Ports and sample order (`io_reorder`, `cfft_top`)

Reordering is built into the ports. In the table below, `n` is the sample index on the port.

| mode | input sample n stored at | output sample n read from | port value |
|---|---|---|---|
| FFT | n | digit reverse of n: `{n1n0, n3n2, n5n4}` | in: 2x; out: word/2 |
| DCT | n/2 (n even), 63-(n-1)/2 (n odd) | digit reverse of n | same as FFT |
| FWT | `{0,n2,0,n1,0,n0}` (n = 0..7) | n | in: x; out: word/8 |

`cfft_top` protocol:
1. While `busy` is low, set `mode` and write samples with `in_we`/`in_idx`/`in_re`/`in_im`, one
   per clock.
2. Pulse `start` for one cycle. `mode` is sampled at that point.
3. `busy` is high for 50 cycles (FFT/DCT) or 14 cycles (FWT). Input writes are ignored while busy.
4. `done` pulses for one cycle once the last result is in memory.
5. While idle, `out_idx` selects a result. It appears combinationally on `out_re`/`out_im` and
   `out_word`.

Ports 0 of the memory serve the I/O while idle. For a DCT, drive `in_im` with 0.

`rst_n` is an asynchronous, active-low reset of the sequencer. The memory and the pipeline
registers have no reset: every word is written before it is read.

## Where this RTL departs from, or adds to, the original design

- **Cycle counts.** The original design quotes 54 cycles for FFT/DCT and 18 for FWT. This RTL
  takes 50 and 14: 48 or 14 compute cycles, plus a 2-cycle pipeline drain for FFT/DCT. The
  difference is 4 cycles in both modes. It is presumably start/stop overhead that is not
  described, so it is not modelled.
- **FFT output order.** The published text says the FFT output is bit-reversed, with sample
  `{s0..s5}` at address `{s5..s0}`. Its own derivation gives radix-4 digit reversal, and the
  address generation produces exactly that. This RTL reads out in digit-reversed order, and the
  end-to-end test confirms the result against a DFT.
- **Choices made in this design.** Several details were not specified in the original and were chosen here:
  - the bank/subbank bit assignment (only its cost is given);
  - the DCT input order and the FWT output order;
  - the coefficient format;
  - the per-pass scaling, rounding and saturation;
  - the port protocol and the start/busy/done handshake.
- **Complex input in DCT mode.** The DCT mode accepts an imaginary input too and then returns
  `W256^k·V(k)` of the complex reordered sequence. Only its real part for a real input is the DCT.
- **Not built.** Computing two real DCTs at once, one on the real and one on the imaginary input
  with a post-processing step, is described only in passing. The DCT here handles one real
  sequence.
- **Fixed at 64 points.** Larger sizes (256 or 1024 points) would change the memory size and part
  of the address generation. They are not parameterised.

## Files

| file | contents |
|---|---|
| `rtl/cfft_pkg.sv` | widths, `cplx_t`/`coef_t` structs, `mode_e` |
| `rtl/cfft_top.sv` | the processor |
| `rtl/addr_gen.sv` | counters, address tables, start/busy/done |
| `rtl/datapath.sv` | pipeline around `butterfly` and four `cmult` |
| `rtl/butterfly.sv` | shared radix-4 / Walsh adders |
| `rtl/cmult.sv` | complex multiplier with rounding |
| `rtl/coef_rom.sv` | 64×4 coefficient ROM |
| `rtl/cf_memory.sv` | bank selection and crossbars |
| `rtl/bank_select.sv` | address to bank, subbank and row |
| `rtl/regfile.sv` | the 8 subbanks |
| `rtl/io_reorder.sv` | port reordering and scaling |
| `tb/tb_<module>.sv` | self-checking test per module; `tb_cfft_top` runs FFT, DCT and FWT end to end |
| `tb/tb_cck_demod.sv` | 802.11b CCK decoding through the FWT |

## Verification

Every module has its own self-checking testbench, with results worked out independently of the
RTL:
- `tb_bank_select` checks every conflict-free condition exhaustively;
- `tb_addr_gen` checks the address tables cycle by cycle;
- `tb_cmult` and `tb_datapath` compare with exact integer models;
- `tb_coef_rom` compares with `cos`/`sin`.

The end-to-end test compares FFT and DCT results with a floating-point DFT/DCT, and the FWT with
an exact integer transform. The CCK test decodes noisy 802.11b symbols.

Not verified here: timing closure at any clock rate, and gate-level behaviour.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and exits. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cfft_pkg.sv tb/tb_cfft_top.sv \
          --top-module tb_cfft_top -o sim && ./obj_dir/sim
```

Replace `tb_cfft_top` with any other testbench name. Every test runs in well under a second.

`tb_cfft_top` runs the design at its only size and exercises:
- FFT, DCT and FWT runs, with mode switches between them;
- the busy time of each mode;
- input writes attempted while busy, which must be ignored;
- a worst-case FFT input that saturates the output port.
