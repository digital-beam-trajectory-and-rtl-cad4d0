# Digital beam trajectory and orbit acquisition for a proton synchrotron

A synchrotron's beam-position pick-ups (PUs) deliver one short pulse per
bunch per revolution. To measure where each bunch is on each turn, you must
integrate the pick-up's sum and difference signals over each bunch. In a
machine like the CERN PS that is hard for two reasons. The revolution
frequency sweeps (about 437 to 477 kHz for protons) while the beam
accelerates. The bunch pattern also changes during the cycle: bunches are
split, merged or compressed.

This design samples the PU signals at a **fixed 125 MHz** and makes all beam
timing in logic. A **numerical phase-locked loop** drives a DDS whose phase
follows the beam revolution. A **phase table** turns that phase into three
timing signals:

- the integration gate of every bunch;
- the window in which the baseline is restored;
- the local-oscillator (LO) pulses that feed the loop's phase detector.

A change of bunch pattern is a swap between two table banks at a turn
boundary. For each bunch the design produces the integrated sum Σ and
differences Δx, Δy, and the position `x = Sx·Δx/Σ`, `y = Sy·Δy/Σ`. It
writes the results into a large circular buffer in external SDRAM and keeps
an index of timing events into that buffer. An embedded logic analyser lets
the operator see the internal signals remotely.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017) for one
pick-up. The ADCs, the SDRAM and its controller, and the host computer are
outside the RTL; their buses are ports of the top module `bto_top`.

```
 adc_rf ──┐
          ├─ sync_select ─ pll_mixer ─ loop_filter ─ dds ─ phase ─┐
 adc_sum ─┘                    ▲                                  │
                               └──── LO ───── phase_table ◄───────┘
                                               │ gate, blr
 adc_sum ─ baseline_restorer ─ integrator ─┐   ▼
 adc_dx  ─ baseline_restorer ─ integrator ─┼─► position_calc ─► pos_x/pos_y
 adc_dy  ─ baseline_restorer ─ integrator ─┘
                                           └─► circular_buffer ─► SDRAM port
 trig_harm/inj/ms ─► pointer_array (buffer address at each event)
 internal signals ─► logic_analyser           host bus ─► host_regs
```

## The numerical PLL (`numerical_pll`)

The loop has five blocks.

**DDS (`dds`).** A 32-bit phase accumulator adds the frequency word `ftw`
every clock. One wrap of the accumulator is one revolution:
`f_rev = ftw·f_clk/2^32`. At 437 kHz and 125 MHz, `ftw ≈ 15 015 456`. The
top 10 phase bits address the phase table. `ftw` itself is the
reconstructed revolution frequency: register `FTW` of the bus, and probe 4 of
the analyser.

**Phase table (`phase_table`).** The table has two banks of 1024 entries.
Each bank covers one revolution, so one entry is 1/1024 of a turn. An entry
(`bto_pkg::pt_entry_t`) holds four bits:

| bit | name     | meaning                                                  |
|-----|----------|----------------------------------------------------------|
| 3   | `lo_en`  | LO pulse active: the mixer multiplies by ±1, otherwise 0 |
| 2   | `lo_neg` | LO polarity: 1 → −1                                      |
| 1   | `gate`   | integrate the restored signals                           |
| 0   | `blr`    | baseline-restoration window (no beam expected)           |

The host writes only the idle bank. A swap request comes from the external
harmonic-change trigger or a host command. The request is held until the
next revolution start, so one turn never mixes two patterns. The table is
indexed by revolution phase, not by RF phase. For that reason a change of
harmonic number needs no change of DDS frequency: after a split from h=2 to
h=4, the new bank simply has four gates and four LO pulse pairs. Software
must wait for the swap (STATUS bit 2) before it reloads the bank that has
just gone idle.

The loop locks to the nearest bunch, so it knows the bunches only modulo
the bunch spacing. For splitting that does not matter. After a batch
compression, bunches are spaced more closely and some buckets are empty,
so table entry 0 must mark the start of the beam's own turn. Two ways to
get this:

- The DDS stays at phase 0 until F0 is first written. Writing F0 at a
  revolution marker starts the table turn with the beam turn. The
  batch-compression test does this.
- Software rotates the table patterns to match the bunches seen on the
  analyser.

The testbenches build their patterns with the following rule, and it is a
sensible starting point. Let `p = (i+0.5)/1024` be the phase of entry `i`,
and `d` the distance in turns from `p` to the nearest bunch centre. Bunch
`k` sits at `(k+0.5)/h` for harmonic `h`, and not every bucket needs a
bunch. Then:

- LO is +1 for `−1/(4h) ≤ d < 0` and −1 for `0 ≤ d < 1/(4h)`;
- the gate is on for `|d| < min(0.06, 0.35/h)`;
- BLR is on within `1/(8h)` of the point half a bucket after each bunch.

**Phase detector (`pll_mixer`).** The mixer multiplies the reference by
the LO. The LO is +1 just before the expected bunch centre and −1 just
after it. A bunch that arrives early therefore gives a positive product,
and the loop raises the frequency. A late bunch gives a negative product.
Outside the LO pulses the product is zero, so signal between bunches does
not disturb the loop.

**Loop filter (`loop_filter`).** A one-pole low pass, `lp += err − lp/256`,
removes the revolution-frequency ripple. A proportional-integral controller
follows it:

```
ftw = f0 + (lp·kp) >>> 12 + (Σlp · ki) >>> 28      clamped to [fmin, fmax]
```

The integral term lets the loop follow the acceleration ramp. It stops
integrating while the output is clamped and the error points further into
the clamp.

Tuning depends on signal size. Take a small timing error of `d` samples,
`h` bunches of peak height `A` counts, and `N` samples per turn. The mean
mixer output is then about `2hA·d/N`. With the values used in the
testbenches (bunch peaks of 6000/h counts, N ≈ 286, `kp = 2000`,
`ki = 11000`), the loop time constant is about 10 turns. The integral
zero sits about four time constants lower. Slower real ramps allow smaller gains, which reduce
noise. If the beam intensity changes a lot, rescale `kp`/`ki`.

**Reference selection (`sync_select`).** Before injection there is no beam
to lock to, so the loop follows the digitised RF (`adc_rf`). The RF is
expected to peak at the bunch positions. Once the injection trigger has
arrived and the PU sum exceeds `det_thresh` on `det_count` consecutive
turns, the reference switches to the PU sum. It stays there until
`cycle_start`. The host can also force RF or PU mode. The same mechanism
handles a machine whose beam is injected without bunches: the loop stays on
the RF until bunches form.

**Alignment.** The reference register in `sync_select` and the output
register of `baseline_restorer` are both one clock deep. The phase-table
entry read for a given phase therefore lines up with both the mixer input
and the restored sample. When the loop is locked with the LO centred on
the bunch, the gate is centred on the same bunch in the data path. In the
closed-loop tests the mean offset stays within the 4-sample test limit,
and the gate is ±17 samples wide.

## Baseline restoration (`baseline_restorer`)

An electrostatic pick-up does not pass DC, so a bunch train sags (droops)
and the baseline wanders with intensity. The PU is modelled as a
first-order high pass with a time constant of `2^droop_shift` samples. The
restorer inverts it exactly by adding back the scaled running sum of its
input:

```
out = x + (acc >>> droop_shift);   acc += x
```

On its own this integrator would also integrate ADC offsets and run away.
In the BLR window the output should be zero. There the **switched DC
restorer** also subtracts `(out << droop_shift) >>> blr_shift` from `acc`,
which pulls the output to zero by `2^-blr_shift` of its error every sample.
This cancels offsets and bounds the accumulator. The accumulator is also
clamped, and the output saturates at 18 bits (`clipped`). With the
pick-up's real time constant in `droop_shift`, the test restores a drooping
bunch train with a 40-count ADC offset to within 12 counts, sample by
sample. The same
`droop_shift`/`blr_shift` is used for Σ, Δx and Δy.

## Integration and position

`integrator` sums the restored signal while `gate` is high. One clock after
the gate falls it presents the 24-bit sum (saturating, flag `sat`). There is
one result per gate, so one per bunch. The three integrators share the gate
and produce results together.

`position_calc` computes both planes with two 23-stage pipelined dividers.
It accepts a bunch every clock, which matters when the bunch spacing is only
a few samples. `Sx`, `Sy` are 16-bit unsigned scales: with S in µm, the
position comes out in µm. The quotient is truncated toward zero and
saturates. A bunch with Σ ≤ 0 gives position 0 and `no_beam`. Latency is 25
clocks.

## Result storage

**Circular buffer (`circular_buffer`).** Each bunch becomes a 128-bit
record:

| bits    | field                                         |
|---------|-----------------------------------------------|
| 127:120 | bunch index within the turn                   |
| 119:96  | turn number (counts revolution starts)        |
| 95:64   | Σ, sign-extended                              |
| 63:32   | Δx, sign-extended                             |
| 31:0    | Δy, sign-extended                             |

Records queue in a 16-entry FIFO. They are then written to consecutive
record addresses of a 2^23-record (128 MB) SDRAM space, which wraps. The
memory port is a valid/ready command channel (`mem_cmd_*`); a command stays
unchanged until it is accepted, and an assertion checks this. Read data
comes back later on `mem_rd_valid`/`mem_rdata`. A host read of one record
is put on the same port, alternating with pending writes. A record that
arrives while the FIFO is full is lost and sets the sticky `overflow` flag.
The Σ, Δx, Δy integrals are stored, not positions, so software can redo the
position calculation with other calibrations.

**Pointer array (`pointer_array`).** This is an on-chip RAM of 4096 32-bit
entries `{type[31:30], address[22:0]}`. It logs the buffer address of the
next record at every harmonic change (type 0), injection (1) and 1 ms tick
(2). Entries are written in order and wrap. Events that arrive together are
written on consecutive clocks, harmonic change first. Software uses the
array to find, for example, the records that follow millisecond 350 of the
cycle.

## Embedded logic analyser (`logic_analyser`)

The analyser records two of eight 24-bit probes:

| probe | signal              |
|-------|---------------------|
| 0     | raw ADC sum         |
| 1     | restored sum        |
| 2     | timing bits         |
| 3     | mixer output        |
| 4     | DDS frequency word  |
| 5     | integrated Σ        |
| 6     | x position          |
| 7     | restored Δx         |

The trigger is one of eight sources:

| trigger | source                     |
|---------|----------------------------|
| 0       | gate                       |
| 1       | BLR                        |
| 2       | revolution start           |
| 3       | injection                  |
| 4       | harmonic change            |
| 5       | 1 ms tick                  |
| 6       | bunch result               |
| 7       | switch of PLL reference    |

After `arm`, the analyser waits for a rising edge of the chosen trigger,
then waits `delay` clocks. It then stores 1024 samples, one every
`decim+1` clocks. The same memory can therefore cover anything from 8 µs
up to about 0.5 s.

## Host register map (`host_regs`)

The bus is word-addressed, and reads return one clock later.

| addr | register | content |
|------|----------|---------|
| 00 | CTRL | [0] acquisition on, [1] restorer on, [3:2] reference mode (0 auto, 1 RF, 2 PU). Write-one pulses: [8] loop clear, [9] buffer and pointer clear, [10] table swap, [11] analyser arm, [12] cycle start, [13] buffer read |
| 01–03 | F0, FMIN, FMAX | DDS frequency words |
| 04 | GAINS | {ki, kp} |
| 05 | DET | {count[19:16], threshold[13:0]} |
| 06 | BLR | {blr_shift[12:8], droop_shift[4:0]} |
| 07 | PT_WRITE | {addr[25:16], entry[3:0]}: writes the idle bank |
| 08 | SCALE | {Sy, Sx} |
| 09–0B | LA_CFG, LA_DELAY, LA_DECIM | LA_CFG is {trigger[10:8], probe B[6:4], probe A[2:0]} |
| 0C–0E | LA_RDADDR, LA data low/high | |
| 10 | BUF_RDADDR | record address |
| 11–14 | record words | 127:96 … 31:0 |
| 15–16 | PTR_RDINDEX, PTR_DATA | |
| 18 | STATUS | bits listed in `rtl/bto_top.sv` |
| 19 | FTW | |
| 1A | BUF_NEXT | |
| 1B | PTR_WR_INDEX | |
| 1C | TURN | |

## Sizes and what they hold

| parameter | default | basis |
|---|---|---|
| ADC width | 14 | original system |
| internal bus / integral width | 24 | original system |
| clock | 125 MHz | original system |
| SDRAM buffer | 2^23 × 16 B = 128 MB | original system's 128 MB |
| DDS | 32 bits | own choice |
| phase table | 2 × 1024 entries | depth is own choice |
| FIFO | 16 records | own choice |
| pointer array | 4096 entries | own choice |
| analyser | 1024 samples | own choice |

With 8 bunches per turn and a mean revolution frequency of about 460 kHz, a
2 s cycle makes 7.4 M records. That is 118 MB, which fits in the buffer
(about 1.14 cycles). With 16 bunches, the buffer holds only about 1.1 s. The
pointer array holds the 2000 millisecond ticks of a 2 s cycle, plus the
other events. The DDS reaches any revolution frequency below half the
clock. The preliminary setup ran at 62.5 MHz and needs only different
frequency words.

## Where this departs from the original system, and what is not here

- **Position.** Positions are computed in logic, for the output ports and
  the analyser. The buffer stores the integrals, not the positions.
  Software reading the buffer therefore computes positions itself, as the
  original system's measurements did.
- **Own choices.** The original system does not give these details, so they
  are this design's own:
  - loop-filter form and gains;
  - phase-table encoding, depth and swap rule;
  - how the reference is detected and switched;
  - the restorer's first-order droop model;
  - record format, FIFO and overflow rule;
  - pointer-array layout;
  - analyser depth and probe list;
  - the whole register map and both external bus protocols.
- **One pick-up.** Each `bto_top` serves one pick-up. A ring of pick-ups
  needs one instance per pick-up.
- **Not included:**
  - the ADCs;
  - the DDR2 SDRAM and its controller: `tb/sdram_model.sv` stands in for
    them in simulation;
  - the host computer and its software, including serving several clients
    and the off-line FFT for the tune.
- **One clock.** There is no clock-domain crossing. The ADC data, the logic
  and the host bus all use `clk`.

## Simulation

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`. Each has a watchdog. They need
Verilator 5 with `--timing`. Name the two packages first; `-y` lets
Verilator find every module by its file name. For example, from the
top directory:

```
verilator --binary --timing --assert -Itb -y rtl -y tb --top-module tb_bto_top_full \
  rtl/bto_pkg.sv tb/tb_beam_pkg.sv tb/tb_bto_top_full.sv
./obj_dir/Vtb_bto_top_full
```

Replace `tb_bto_top_full` with any testbench below. Each builds without
warnings and runs in seconds.

| testbench | what it shows |
|---|---|
| `tb_bto_top_full` | The whole design at default sizes through one compressed acceleration cycle. The PLL locks to the RF, then switches to the beam after injection. The frequency ramps up by 10 kHz. A kick starts betatron oscillations. Two bunches split into four through a table swap. 1 ms ticks are logged. Every bunch position is checked against the true position (±0.3 mm). Records and pointers are read back over the host bus. The analyser captures a turn. An SDRAM stall forces an overflow. Each of these mechanisms is counted and must occur. |
| `tb_bto_top` | The same scenario with a 1024-record buffer and an 8-entry pointer array, so both wrap. |
| `tb_sis18` | A slower machine: 62.5 MHz sampling, 4 bunches, 215→225 kHz. The beam is unbunched at injection and bunches slowly, and the loop must catch it once it does. |
| `tb_batch_compression` | The whole design at default sizes through a batch compression. Eight bunches at harmonic 8 move to harmonic 9 and then 10 by two triggered table swaps, leaving empty buckets. Lock and every position are checked before and after each step. |
| `tb_numerical_pll` | The loop alone: RF lock, switch to the PU, lock through the ramp and the split, final frequency within 100 Hz. |
| unit benches | `tb_dds`, `tb_phase_table`, `tb_sync_select`, `tb_pll_mixer`, `tb_loop_filter` (clock-exact model), `tb_baseline_restorer` (droop and offset model), `tb_integrator`, `tb_position_calc` (exact quotients and latency), `tb_circular_buffer` (random stalls, wrap, overflow, host reads), `tb_pointer_array`, `tb_logic_analyser`, `tb_host_regs`. |

The beam (`tb/beam_model.sv`) is a behavioural model. Its Gaussian bunches,
first-order AC coupling, ADC offset, noise and linear bunching are chosen
to exercise the logic; they are not measured signals.

### How far to trust it

- The loop has been run only against this model: noise-free timing, and
  ramps much faster than real ones over a narrow frequency range.
- The ramp the loop can follow is limited by the integral gain. With the
  gains above, the loop follows 7.7 Hz per turn at 125 MHz and 5 Hz per
  turn at 62.5 MHz. It lost lock at 20 Hz per turn at 62.5 MHz. A real
  SIS-18 ramp to about 1.3 MHz needs gains scheduled by the host during the
  cycle.
- Loop stability with real pick-up signals, real intensity changes and real
  RF gymnastics is untested.
- Timing closure at 125 MHz is untested. The 23-stage dividers and the
  40-bit restorer accumulators are the likely critical paths.
