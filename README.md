# Coefficient-ordered radix-4 pipelined FFT (16 and 64 points)

A word-serial pipelined FFT spends much of its power in the complex
multiplier between stages. One input of that multiplier is a twiddle factor
that changes every clock. In the usual schedule, successive twiddles share
few bits, so the multiplier's coefficient input toggles heavily. This design
computes the first radix-4 stage of a 16-point transform in a different
order. The sixteen results are chosen so that successive twiddles differ in
as few bits as possible. Over one 16-word frame, the twiddle words toggle 78
bits instead of 192.

Three pieces of hardware make that order possible:

* a **commutator** built from three 8-word triple-port RAMs. It delivers the
  four butterfly inputs of each result in the new order.
* a **twiddle ROM** whose words carry a *flag*. When the flag is set, the
  stored real part is the negated real part of the twiddle. The multiplier
  undoes the negation.
* a **six-word reorder memory (ADM)** with a ROM-driven address sequence. It
  puts the results back into natural order for stage 2.

The 16-point processor (`fft16_ordered`) is the main design. A 64-point
processor (`fft64_ordered`) reuses the whole 16-point processor as its
stages 2 and 3, behind a conventional first stage. The top level,
`fft_ordered_top`, holds both processors side by side.

The architecture follows M. Hasan, T. Arslan and J. S. Thompson, "A Novel
Coefficient Ordering based Low Power Pipelined Radix-4 FFT Processor for
Wireless LAN Applications". That publication gives these parts:

* the structure
* the commutator control ROM
* the ordered twiddle table
* the data sequences

These parts were worked out for this RTL:

* word widths and pipelining
* the start-up sequencing
* the butterfly control code
* the reorder-memory address sequence
* the 64-point first stage

The section "Departures and open points" lists them all.

## The arithmetic

Let the input be x(0..15). Stage 1 computes, for q1, m1 in 0..3,

    x1(q1, m1) = W16^(q1*m1) * sum_p x(4p + q1) * W4^(p*m1)

Stage 2 then computes

    X(4*m2 + m1) = sum_q1 x1(q1, m1) * W4^(q1*m2)

Here W_N = exp(-j*2*pi/N). Each stage makes one result per clock. A stage-1
result is "result k", with k = 4*m1 + q1. In natural order, stage 1 gives
k = 0..15, and its twiddles are W^0 W^0 W^0 W^0, W^0 W^1 W^2 W^3,
W^0 W^2 W^4 W^6, W^0 W^3 W^6 W^9.

In the ordered schedule, the results of one frame leave the multiplier in
slots j = 0..15 as follows:

| slot j | 0-3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| (m1, q1) | (0,0..3) | (1,0) | (2,0) | (3,0) | (2,2) | (1,1) | (1,3) | (3,1) | (1,2) | (2,1) | (2,3) | (3,2) | (3,3) |
| result k | 0..3 | 4 | 8 | 12 | 10 | 5 | 7 | 13 | 6 | 9 | 11 | 14 | 15 |
| twiddle | W^0 | W^0 | W^0 | W^0 | W^4 | W^1 | W^3 | W^3 | W^2 | W^2 | W^6 | W^6 | W^9 |
| stored {flag, re, im} | 1,8001,0000 | ← | ← | ← | 0,0000,8000 | 0,7641,cf04 | 1,cf05,89be | ← | 0,5a82,a57d | ← | 1,5a83,a57d | ← | 1,7642,30fb |

Twiddles are Q1.15 words equal to floor(v * 2^15), with 1.0 clipped to
0x7fff. The order was found in two steps. First the imaginary parts were
chained by Hamming distance. Then each real part was stored either as it is
or negated, whichever is closer to the previous real part. For example,
W^0 is stored as -0x7fff = 0x8001 with the flag set.

## Block diagram

```
              stage 1                                   stage 2
 din ─► comm1_ordered ═4═► r4_bfly ─► cmul_flag ─DI─► adm_reorder ─DO─► r4sdc_comm ═4═► r4_bfly ─► dout
        (3 TMs, ROM1,  c[2:0]─┘          ▲                (6 words,      (6 shift regs,  c[2:0]─┘
         4 muxes)                 coef_rom_ordered          ROM0)         3 muxes)
```

`═4═` marks the four parallel butterfly lines O1..O4.

## Stage-1 ordered commutator (`comm1_ordered`, `comm1_ctrl`, `tm_ram`)

This is the block that needs the most care. A conventional commutator only
delays the input stream. The ordered one must make any of the four needed
input samples available in any slot. It has three triple-port RAMs (TMs).
Each has one write port and two asynchronous read ports, and each is eight
words deep, twice the usual FIFO length. The TMs are chained:

| RAM | written with | write address | read port 1 | read port 2 |
|---|---|---|---|---|
| TM0 | input | a1 | A @ aa | B @ a1, so B is the input from 8 slots ago |
| TM1 | B | a1 | C @ ac | D @ ad |
| TM2 | D (only while cs = 0) | aw | E @ ae | F @ af |

Four multiplexers choose the butterfly lines:

* O1 = {A, D, F}, selected by m[1:0]
* O2 = {input, C, E}, selected by m[3:2]
* O3 = {A, D, F}, selected by m[5:4]
* O4 = {A, B, C, E}, selected by m[7:6]

A select value picks the inputs in the order listed, starting from 0.

The control block has a 4-bit slot counter (the FSM). Its low three bits
are a1. The counter also addresses ROM1, a 16-word table that gives every
other address, the TM2 write-disable `cs`, the mux selects and the
butterfly code `c`. The ROM output is registered, so slot n uses ROM1 row
(n-1) mod 16. A ROM1 word is `{cs, c[2:0], aw, af, ae, ad, ac, aa, m[7:0]}`,
30 bits in all; the contents are in `fft16_pkg::rom1_lookup`. TM2 is
written in only 6 of the 16 slots. Many read addresses stay constant for
several slots, which keeps unused read ports from toggling.

Timing: the input x_f(i) of frame f arrives in slot 16f + i. The four
lines then hold the inputs of ordered result j of frame f in slot
16f + 12 + j. Line k (O1 = 0) carries x_f(4p + q1) with p = (m1 - k) mod 4.
Results therefore start in the last quarter of a frame, while the next
frame is already streaming in. The 8-word TMs hold both frames' samples.

## Butterfly (`r4_bfly`)

Because of the line rotation p = (m1 - k) mod 4, each line's factor
W4^(p*m1) reduces to a simple operation:

| c | m1 | O1 | O2 | O3 | O4 |
|---|---|---|---|---|---|
| 000 | 0 | 1 | 1 | 1 | 1 |
| 101 | 1 | -j | 1 | +j | -1 |
| 011 | 2 | 1 | -1 | 1 | -1 |
| 110 | 3 | -j | -1 | +j | 1 |

So c[2] rotates O1 by -j and O3 by +j, c[1] negates O2, and c[0] negates
O4. These codes are exactly the c field of ROM1. The butterfly has no
adder/subtractor switching. Each term passes through XOR "control
inverters", and one summer adds the four terms. The +1 of every inverted
component enters the summer as a carry. The output is registered and grows
by 2 bits. Both stages use the same module. The stage-2 commutator produces
the same line rotation and derives c from its slot count.

## Multiplier with flagged twiddles (`cmul_flag`, `coef_rom_ordered`)

Take data a + jb and a stored twiddle (flag, cr, ci). The two real products
that use cr are complemented when the flag is set:

    re = s*a*cr - b*ci
    im = a*ci + s*b*cr
    s  = -1 if flag, else +1

This gives the exact product with the true twiddle. The sums are shifted
right by 15, which rounds toward minus infinity, and then registered. The
real multipliers are written as `*` and left to synthesis.

## Reorder memory (`adm_reorder`)

DI carries results in the ordered sequence 0,1,2,3,4,8,12,10,5,7,13,6,9,11,14,15.
DO must carry result k exactly seven slots after DI slot k, which gives
natural order at a fixed latency. At every slot boundary six results are
waiting, so six words suffice. This only works if the word read in a slot
and the word written in that slot share one address: the read comes first,
and the read is synchronous into the DO register.

The address sequence that results does not repeat every frame. Following
the chain "the word written in slot t takes over the address of result
(t - 6) mod 16" gives a period of six frames. ROM0 therefore holds 96
three-bit addresses. `fft16_pkg::rom0_table()` computes them when the
design is elaborated: the first six words of the first frame take
addresses 0..5, and the chain fixes every later address.

## Stage-2 commutator (`r4sdc_comm`)

This is a conventional delay commutator for partners L words apart (L = 1
here). The input runs through six L-word shift registers, giving taps
d0..d6, where tap d_i is the input delayed by i*L words. The four lines are:

* O1 = d3
* O2 = d0 when m = 0, else d4
* O3 = d1 when m < 2, else d5
* O4 = d2 when m < 3, else d6

Three 2:1 multiplexers make this selection. The group's outputs for m, q
appear in slot 3L + m*L + q of the group. The same module with L = 16 is
the first-stage commutator of the 64-point processor.

## 64-point processor (`fft64_ordered`, `tw64_rom`)

The first stage is conventional. It consists of `r4sdc_comm` with L = 16,
`r4_bfly`, and `cmul_flag` with natural-order W64^(q1*m1) twiddles from
`tw64_rom` (flag always 0). For each m1 it emits a group of 16 words, and
each group is a 16-point sub-transform. An embedded `fft16_ordered`
processes the groups. Its ordered stage is stage 2 of the 64-point
transform. The core is held in reset until the first group arrives, which
is cycle 50.

## Interface and timing

| processor | input | output | latency x(0)→X(0) | result order |
|---|---|---|---|---|
| `fft16_ordered` | `din` {re, im}, 16 + 16 bits | `dout` 21 + 21 bits, `dout_valid`, `dout_bin[3:0]` | 25 clocks | X(4*m2 + m1), m1 outer: 0,4,8,12,1,5,… |
| `fft64_ordered` | `din` 16 + 16 bits | `dout` 24 + 24 bits, `dout_valid`, `dout_bin[5:0]` | 75 clocks | X(16*m3 + 4*m2 + m1), m1 outermost, then m2 |

Both processors behave the same way in these respects:

* **Input.** After `rst_n` rises, frames are expected back to back, one
  word per clock, with x(0) in the first clock. There is no input valid or
  stall.
* **Output.** One result leaves every clock once `dout_valid` is high.
  `dout_bin` gives the bin number of each result.
* **Numbers.** Data is two's complement and is never scaled. The bits grow
  by 2 in each butterfly and by 1 in each multiplier.
* **Reset.** `rst_n` is an asynchronous, active-low reset. It clears
  counters and control registers only. RAMs and shift registers are not
  cleared. Their contents are only read once valid data has been written.

The `W` parameter sets the input width.

## Verification

Every module has a self-checking testbench in `tb/`:

* `tb_tm_ram` checks the RAM against a reference array, under random
  traffic with chip-select gating.
* `tb_comm1_ctrl` checks the ROM1 fields and the a1 sequence.
* `tb_comm1_ordered` checks that every line carries the correct sample of
  the correct frame in every slot. It also checks the butterfly code.
* `tb_r4_bfly` and `tb_cmul_flag` compare against integer arithmetic,
  using random and extreme operands.
* `tb_coef_rom_ordered` checks every word against the quantised twiddle. It
  also recounts the 192 and 78 toggles.
* `tb_adm_reorder` checks natural order and the 7-slot latency over two ROM0
  periods.
* `tb_r4sdc_comm` checks the delay commutator for L = 1 and L = 4.
* `tb_tw64_rom` checks all 64 words of the 64-point twiddle ROM.
* `tb_fft16_ordered` and `tb_fft64_ordered` stream frames and compare every
  result bit for bit against the model in `tb/fft_ref_pkg.sv`. The frames
  are random, impulse, constant, most-negative and tone data. The model is
  a radix-4 DIF FFT with the same quantisation. The results are also
  compared with a floating-point DFT, within the error the truncation
  allows. These testbenches also check latency and the bin numbers.
* `tb_fft_ordered_top` runs both processors together. It counts TM2 write
  gating, flagged twiddles, every mode of all five butterflies, and full
  ROM0 periods. It fails if any of them never happens. It also counts the
  bits that toggle on the 16-point multiplier's twiddle input while the
  processor runs. It measures 78 per frame, against 192 for natural order.

All of these testbenches pass. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/fft16_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft_ordered_top.sv \
  --top-module tb_fft_ordered_top
./obj_dir/Vtb_fft_ordered_top
```

Each testbench prints `TB_RESULT checks=N failures=M`.

## Departures and open points

* **ROM1 alignment and mux numbering.** Both were inferred: slot n uses
  row n-1, and the listed order of mux inputs is select 0, 1, 2. With them,
  the published ROM1 contents produce a consistent ordered sequence in all
  16 slots, over frame boundaries. The ROM1 word is 30 bits wide, the sum of
  its fields.
* **Meaning of c[2:0].** The control code is read off the ROM1 contents.
  The original design describes the c bits only as butterfly controls.
* **ADM addressing.** The original gives only the six-word depth and the
  DI/DO sequences. The shared read/write address and the 96-entry ROM0 are
  this design's. With an asynchronous read, the same DI/DO timing would
  need seven words.
* **Widths, rounding, pipeline registers.** The only published width is
  the 16-bit twiddle. Data widths, floor rounding, the absence of scaling
  and one register after each butterfly and multiplier were chosen here.
  The resulting latencies (25 and 75 clocks) follow from these choices.
* **Multiplier and FIFO styles.** The original compares carry-save-array
  and Wallace-tree multipliers, and SR-based and DM-based FIFOs. This RTL
  uses `*` and shift registers.
* **64-point first stage.** It uses shift-register FIFOs. The original
  64-point design seems to use dual-port-memory FIFOs there.
* **Power figures.** The power savings reported for this architecture
  (about 23% for 16 points and 9% for 64 points, at 0.18 µm, 1.8 V and
  100 MHz) are not reproduced here. Only the twiddle toggle counts are
  checked.
* **No flow control.** Input is continuous from reset. A gap in the input
  stream would need a stall added to every counter.
