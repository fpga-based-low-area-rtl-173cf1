# Self-checking motion estimation array with residue-and-quotient codes

Motion estimation in a video encoder spends most of its effort computing sums
of absolute differences (SADs) between a block of the current frame and
candidate blocks of a reference frame. This design is such an array of SAD
processing elements (PEs) that checks itself while it runs: every PE has a
small companion, a *test code generator* (TCG), which predicts a short code of
the SAD the PE should produce. A shared checker compares the code of what the
PE actually produced with the prediction, flags the PE if they differ, and in
the same cycle **rebuilds the correct SAD from the prediction alone**, so a
faulty PE is both detected and repaired without external test equipment. The
scheme is called built-in self-detection and correction (BISDC).

The default configuration is 16 PEs, each computing the SAD of a 4x4 block
(16 pixel pairs) of 8-bit luminance pixels, checked modulo m = 63.

## The residue-and-quotient code

Everything rests on writing a number as quotient and remainder with respect
to a modulus of the form m = 2^J − 1 (J = 6, m = 63 by default):

    v = m·q + r,   0 ≤ r < m

The pair (r, q) is the RQ code of v. A residue alone (the classic residue
check) catches many errors but cannot restore the value; the quotient adds
the missing information, because (r, q) determines v exactly. This has two
consequences that the design uses:

1. **Detection is exact.** If the PE's SAD is corrupted to any other value
   that still fits the SAD width, its RQ code changes, so comparing codes
   finds every such error, single-bit or multi-bit.
2. **Recovery is cheap.** Since m = 2^J − 1,

       v = m·q + r = (q << J) − q + r

   which is a shift and one add/subtract. No multiplier is needed.

### Predicting the code without computing the SAD

The TCG must reach the code of SAD = Σ|x_k − y_k| by a different route from
the PE, or a shared fault would go unnoticed. It codes each absolute
difference separately, d_k = m·q_k + r_k, and then combines:

    R_T = (Σ r_k) mod m
    Q_T = Σ q_k + ⌊(Σ r_k) / m⌋

The second term of Q_T is the carry from folding the residue sum back below
m. Worked example with two pixels, d = 100 and d = 62:

    100 = 63·1 + 37      62 = 63·0 + 62
    Σ r = 99 = 63·1 + 36  →  R_T = 36,  Q_T = 1 + 0 + 1 = 2
    check: 63·2 + 36 = 162 = 100 + 62

### One check, step by step

Suppose a PE's true SAD is 1000 = 63·15 + 55, so its TCG gives
(R_T, Q_T) = (55, 15). A fault flips bit 9 and the PE outputs 488:

    RQCG:  488 = 63·7 + 47      → (R_PE, Q_PE) = (47, 7)
    EDC:   (47, 7) ≠ (55, 15)   → S4 = 1 (error)
    DRC:   (15 << 6) − 15 + 55 = 960 − 15 + 55 = 1000
    MUX4:  S4 = 1 selects the DRC value, 1000

With no fault the codes match, S4 = 0 and MUX4 passes the PE's own SAD.

## Array organisation

```
 cur_blk ──┬──────────────┬─────────── ...            (block registers, loaded on start)
 ref_blk[i]│              │
        ┌──▼──┐        ┌──▼──┐
        │ PE_i│        │TCG_i│   x N_PE
        └──┬──┘        └──┬──┘
     SAD_i │ (^ err_inject[i])  R_Ti, Q_Ti
        ┌──▼──────────────▼──┐
        │ MUX1 / MUX2 / MUX3 │  pe_select, index sel from the sequencer
        └──┬─────────┬───────┘
      sad_i│         │r_ti, q_ti
        ┌──▼───┐     │
        │ RQCG │     │
        └──┬───┘     │
  R_PE,Q_PE│   ┌─────▼─┐   ┌─────┐
           └──►│  EDC  │   │ DRC │◄── r_ti, q_ti
               └───┬───┘   └──┬──┘
                   │S4        │sad_rec
               ┌───▼──────────▼───┐
   sad_i ─────►│      MUX4        │
               └────────┬─────────┘
                        │sad_chk, S4
               ┌────────▼─────────┐
               │ De-MUX + results │──► sad_out[N_PE], err_map, err_count
               └──────────────────┘
```

All PEs and all TCGs work in parallel, but there is only **one** RQCG, EDC,
DRC and MUX4. The sequencer walks the select index over the PEs, one PE per
clock cycle, so the whole array is covered at the cost of checking a single
PE per step. The De-MUX writes each checked value into that PE's result
slot while the next PE is being checked; after the last PE the full set is
exported.

The PEs and TCGs are combinational; the clocked state is the block input
registers, the sequencer and the result store. The critical path in one
cycle is block register → TCG (the slowest unit) → EDC/DRC → MUX4 → result
register. Detection and recovery run side by side, so the error flag and the
repaired value arrive together.

### Timing of a run

| cycle after `start` | what happens |
|---|---|
| 0 | `start` sampled while idle: pixels and `err_inject` captured, store cleared |
| 1 … N_PE | PE `i = cycle − 1` checked; its result written at the end of the cycle |
| N_PE + 1 | `done` and `export_valid` high for one cycle; `sad_out`, `err_map`, `err_count` final |

With the defaults a run is 17 cycles. `start` while `busy` is ignored. The
outputs hold until the next run clears them.

### Fault injection

`err_inject[i]` is XORed onto PE *i*'s SAD before it reaches the checker. It
is captured together with the pixels, so it stays fixed for the run. It
exists so the self-test can be exercised in simulation or on a board. Tie it
to zero in normal use.

## Modules

| module | role |
|---|---|
| `bisdc_pkg` | default sizes (N_PE, N_PIX, PIX_W, J, SAD_W, Q_W) and the sequencer state type |
| `me_bisdc_top` | the whole array: block registers, PEs, TCGs, selectors, checker, sequencer, result store |
| `sad_pe` | PE: SAD of one 4x4 block pair |
| `tcg` | test code generator: (R_T, Q_T) from per-pixel RQ codes |
| `rqcg` | RQ code of a value: r = v mod m, q = v div m |
| `bisdc_checker` | RQCG + EDC + DRC + MUX4, the test path for one PE |
| `edc` | error detection: S4 = (R_PE ≠ R_T) or (Q_PE ≠ Q_T) |
| `drc` | data recovery: (Q_T << J) − Q_T + R_T |
| `barrel_shifter` | logarithmic left shifter used by the DRC |
| `result_mux` | MUX4: PE data if S4 = 0, recovered data if S4 = 1 |
| `pe_select` | MUX1/2/3: SAD, R_T, Q_T of the PE under test |
| `result_demux` | De-MUX into per-PE result slots, error map and count, export pulse |
| `test_ctrl` | sequencer: load, PE index, last, done |

## Parameters and widths

| parameter | default | meaning |
|---|---|---|
| `N_PE` | 16 | PEs, and TCGs, in the array |
| `N_PIX` | 16 | pixels per block (4x4) |
| `PIX_W` | 8 | pixel width |
| `J` | 6 | modulus m = 2^J − 1 = 63 |
| `SAD_W` | PIX_W + log2(N_PIX) = 12 | SAD width; max SAD 16·255 = 4080 |
| `Q_W` | SAD_W − J + 1 = 7 | quotient width; max 4095/63 = 65 |

`N_PE` should be a power of two, or the index width `IDX_W` left at its
default of `$clog2(N_PE)`. `J` must be at most `PIX_W`. Any error that
leaves the corrupted SAD inside `SAD_W` bits is detected, because (r, q) with
r < m determines the value.

## What is specified and what is chosen

Taken from the source description of the scheme: the 16-PE / 16-TCG
organisation, 4x4 blocks, the modulus form 2^J − 1, the TCG equations, the
EDC rule (error-free if and only if both residue and quotient agree, S4 = 0
error-free, S4 = 1 error), recovery by shift and corrector, detection and
recovery in parallel, MUX1–MUX4 and the De-MUX, and testing the PEs one
after another.

Choices made in this design where the description gives no detail:

- 8-bit pixels and J = 6 (m = 63).
- The TCG codes the **absolute** differences. One form of the residue
  equation is written over signed differences, but the value to be checked
  is the SAD, so the absolute differences are the consistent choice.
- The RQCG is a division by a constant, left to synthesis, rather than a
  hand-built residue unit.
- One current block shared by all PEs, one reference block per PE (one
  candidate position each), all presented in parallel and captured in input
  registers. The systolic shifting of pixels between PEs in a conventional
  ME array is not modelled.
- One PE checked per clock cycle; synchronous active-low reset.
- The per-PE error map and error count, and the `err_inject` port.

Not included: picking the best motion vector (minimum SAD) from the
exported SADs, which the description names as the purpose of the array but
does not design; and the area-saving variant with a single shared TCG,
which is only mentioned as a comparison point.

Note on pins: the top brings all 16 reference blocks in parallel
(2,587 port bits). For an FPGA build, wrap it with on-chip block storage.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
values computed independently inside the testbench (integer SAD, `%` and `/`
by 63, etc.) and prints `TB_RESULT checks=N failures=M`:

- `tb_rqcg`: every 12-bit and every 8-bit input.
- `tb_drc`: every (Q, R) pair whose value fits 12 bits; `tb_barrel_shifter`:
  every shift amount on random words.
- `tb_sad_pe`, `tb_tcg`: corner blocks (equal, all-255 vs all-0, residues
  summing to 992 to exercise the quotient carry) and thousands of random
  blocks.
- `tb_edc`, `tb_bisdc_checker`: matching codes, single-bit and random
  errors.
- `tb_pe_select`, `tb_result_mux`, `tb_result_demux`, `tb_test_ctrl`:
  routing, export pulse, error count, sequencing and a start while busy.
- `tb_me_bisdc_top`: 200 runs of the full-size array with random blocks,
  extreme blocks and errors injected into random PEs. It checks every
  exported SAD against the true SAD, the error map and count, and the
  17-cycle run length. It counts the error-free passes, single-bit and
  multi-bit repairs, exports, and ignored starts, and fails if any of these
  never happened.

Each testbench was also run against a deliberately broken copy of its
module, and every one of those runs reported failures.

Timing in nanoseconds (TCG ≈ 40 ns being the slowest unit in the reference
FPGA implementation) is not modelled; the clock period must cover one TCG
plus the checker.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/bisdc_pkg.sv \
    tb/tb_me_bisdc_top.sv --top-module tb_me_bisdc_top -o sim
./obj_dir/sim
```

Replace `tb_me_bisdc_top` with any other testbench name to run a single
module's test. Include `rtl/bisdc_pkg.sv` first; the other modules are found
through `-Irtl`.
