# Square-wave music synthesizer chip

This is a small synchronous SystemVerilog model of a music-playing chip
first designed as a one-channel student ASIC (a "TinyChip") in 1991. It
plays a song stored in an external memory as a square wave on one pin. A
speaker can be driven from that pin through a line driver.

The main idea is that pitch comes from counting. A 100 kHz "toggle clock"
is counted by an 8-bit counter. For each half of the output wave, the
counter is loaded with a count word N and counted up until it wraps to
zero. That takes 256 − N ticks, so the tone is

    f = 100 kHz / (2 × (256 − N))

It ranges from 195 Hz (N = 0) to 50 kHz (N = 255). Each song entry plays
for one sixteenth note. The user picks the pitch, a rest, and whether the
note is separated from the next one. A single TEMPO pin picks the speed.

## The song data

Each song entry is 6 bits: `{note code[4:0], endnote}`.

- The **note code** is a semitone number. 0 is C4 and 24 is C6, which
  gives 25 notes over two octaves. Code 31 is a rest.
- A **Count Map** ROM (`count_map`) turns each entry into the chip's 8-bit
  input word. That word is the count N, with the endnote bit copied into
  bit 0. This lets the chip take both through eight pins. The cost is that
  an endnote of 1 makes the tone period 20 µs shorter.
- The rest word is `20` hex.

| note | code | word (endnote 0) | tone |
|------|------|------|------|
| C4 | 0 | 40 | 260.4 Hz |
| A4 | 9 | 8C | 431.0 Hz |
| C5 | 12 | 9E | 510.2 Hz |
| C6 | 24 | CE | 1000.0 Hz |
| rest | 31 | 20 | silent |

The full table is in `rtl/count_map.sv`. With these words, all 13 notes
from C4 to C5 are within 2.5 % of equal temperament. The notes above
drift flat, down to 4.4 % at C6. `tb_note_scale` prints the whole list:
7 of 25 notes are within 1 % and 20 are within 3 %. The original
description claims that most notes are within 1 %. With the table as
given here, that claim does not hold.

**Endnote** decides how an entry ends:

- With endnote = 1, the entry falls silent after about 80 % of its time
  slot. This is an *implicit rest*, so a row of such entries sounds as
  separate notes.
- With endnote = 0, the tone runs into the next entry. Sixteen entries of
  the same note, with only the last one marked endnote, make one whole
  note.

## Chip structure

```
            CLK3 100 kHz ─► ct_latch ──CT──┐
            CLK1 10 Hz ──► tempo_gen ─CN───┤
            CLK2 100 Hz ─► duration_counter┤ DUR[3], DETECT
                                           ▼
   INITIAL ─► controller_fsm ──LOAD/COUNT/CHTOGGLE/CLRN/CLRT──► channel_proc ──► OUT
                    │  ▲                                   (freq_counter,
                    │  └──────────── CHZERO ──────────────  implicit_rest_gen,
                    ▼                                        rest_gen)
            ADDR[1:0] to the song address counter      IN[7:0] from the Count Map
```

`music_synth_asic` is the chip, and `music_synth_system` (the top) adds
the Count Map. The parts that handle one voice are grouped in
`channel_proc`, because the original meant that block to be copied for
more voices. The controller, the CT latch, the tempo generator and the
duration counter would be shared. As built, the design has one channel,
the same as the original chip.

## The controller

`controller_fsm` is an 11-state Moore machine. The controller knows
nothing about rests: it plays every entry the same way. Rests only gate
the output pin.

| state | role | ADDR | LOAD | COUNT | CHTOGGLE | CLRN | CLRT | next |
|---|---|---|---|---|---|---|---|---|
| S0 | start-up, address held clear | 3 | 0 | 0 | 0 | 1 | 0 | CN ? S1 : S0 |
| S1 | remove clear, clear note timing | 2 | 0 | 0 | 0 | 0 | 0 | S2 |
| S2 | low half: load N, wait for CT | 2 | 1 | 0 | 0 | 1 | 1 | CT ? S3 : S2 |
| S3 | low half: count, test zero | 2 | 0 | 1 | 0 | 1 | 0 | CHZERO ? S4 : S9 |
| S9 | low half: wait for CT | 2 | 0 | 0 | 0 | 1 | 1 | CT ? S3 : S9 |
| S4 | high half: load N, wait for CT | 2 | 1 | 0 | 1 | 1 | 1 | CT ? S5 : S4 |
| S5 | high half: count, test zero | 2 | 0 | 1 | 1 | 1 | 0 | CHZERO ? S6 : S10 |
| S10 | high half: wait for CT | 2 | 0 | 0 | 1 | 1 | 1 | CT ? S5 : S10 |
| S6 | end of period: slot over? | 2 | 0 | 0 | 1 | 1 | 0 | CN ? S7 : S2 |
| S7 | note change | 0 | 0 | 0 | 1 | 0 | 0 | S8 |
| S8 | note change: step address | 1 | 0 | 0 | 1 | 0 | 0 | S2 |

CLRN and CLRT are active low. INITIAL overrides everything: the state
goes to S0, ADDR is 3 and both clears are asserted.

- **Half periods.** A half period runs as S2, then S3/S9 repeated once per
  CT, until CHZERO. Each CT tick adds one to the counter, so a half period
  lasts exactly 256 − N toggle-clock periods. The controller needs only
  two clocks between one tick and waiting for the next. Nothing is lost as
  long as the chip clock is fast enough (see *Clocks*).
- **Look-ahead strobes.** The counter obeys the LOAD and COUNT values of
  the state being *entered*. These are the `load_o` and `count_o` outputs.
  As a result, the increment made on entering S3 or S5 is already visible
  on CHZERO while that state is present. The original chip had the same
  behaviour, because its counter was clocked by the COUNT line itself.
  Also, LOAD stays high for all of S2 and S4. This gives the new Count Map
  word time to settle after an address step, before the first tick.
- **Note changes** happen only in S6, at the end of a full period, so a
  tone never stops halfway through a cycle. S7/S8 assert CLRN, which
  clears the note clock latch, the tempo divider, the duration counter and
  the implicit rest latch. They also pulse the address field: code 0, then
  code 1.
- **Pulse at a note change.** CHTOGGLE stays high through S7/S8 while the
  implicit rest latch is being cleared. So a note that ended in an
  implicit rest shows an output pulse of about 2 µs at the change. This
  follows the original state table and was kept. The testbenches count
  this pulse separately.

## Note timing: tempo, duration and implicit rest

- **`tempo_gen`** sets the latch CN when the current time slot is over.
  At TEMPO = 1 (fast), every rising edge of the 10 Hz CLK1 sets it: a
  sixteenth lasts 0.1 s and a whole note 1.6 s. At TEMPO = 0 (slow), only
  the fourth edge after the last note change sets it: 0.4 s and 6.4 s.
- **`duration_counter`** is a 5-bit count of 100 Hz CLK2 edges since the
  note started. It is cleared by CLRN. DETECT is high when all five bits
  are set.
- **`implicit_rest_gen`** latches IREST once `endnote AND (TEMPO ?
  DUR[3] : DETECT)` is true:
  - fast: 8 edges, 80 ms into a 100 ms slot;
  - slow: 31 edges, 310 ms into a 400 ms slot.
- **`rest_gen`** drives `OUT = CHTOGGLE AND NOT (REST OR IREST)`. REST
  decodes the rest word from input bits 7..4 only: `0010`. No note word
  has that pattern.

CLK1 and CLK2 are free-running. Because of that, a slot's length varies
by up to one tone period, and the implicit rest comes between 70 and
80 ms (fast) or 300 and 310 ms (slow) after the note starts.

## Clocks and pins

| port | meaning |
|---|---|
| `clk` | chip clock, replacing the original two-phase PHI1/PHI2 |
| `initial_i` | INITIAL, synchronous reset |
| `tempo_i` | TEMPO: 1 = fast, 0 = slow |
| `clk1_i`, `clk2_i`, `clk3_i` | 10 Hz, 100 Hz and 100 kHz from the external oscillator and decade counters |
| `song_entry_i` | 6-bit song memory data (top only) |
| `map_word_o` / `in_i` | Count Map word, the chip's eight input pins |
| `addr_o` | address select `{ADDR2, ADDR1}` |
| `out_o` | tone output |

Each slow clock passes through a two-flip-flop synchronizer
(`ext_clk_sync`). Its rising edge becomes a one-clock pulse. The CT and
CN events are then latched until the controller clears them.

`clk` must run at least about 8 times faster than the 100 kHz CLK3.
Otherwise an edge can arrive during a clearing state and be lost, which
lengthens the tone. The testbenches use 1 MHz.

The address select field drives an external song address counter. This
design reads the codes as follows:

- 3 holds the counter at zero;
- 2 lets it hold its value;
- the sequence 0 then 1 advances it by one. Code 1 lasts exactly one clock.

The song memory, the address counter, the decade counters, the
oscillator, the line driver and the pads are standard or analog parts.
They are left outside the RTL. Behavioural models of the first three are
in `tb/`: `song_prom.sv`, `address_counter.sv` and
`decade_counter_chain.sv`.

## Where this model differs from the original circuit

- **One clock.** The original clocked its latches and the duration
  counter directly from the slow external clocks, with asynchronous
  clears. Here everything is synchronous to `clk`, with synchronizers and
  synchronous clears. The counter is loaded synchronously rather than
  through set/clear pins.
- **Fast implicit rest tap.** This design uses duration bit 3 (8 counts,
  80 ms), which is what the written timing analysis describes. The
  original gate netlist taps bit 2 instead, which would silence fast
  notes after only 40 ms. `FAST_TAP_BIT` on `music_synth_asic` selects
  the tap.
- **Slow tempo divider.** Here, CN fires on the fourth 10 Hz edge after
  each note change, which gives the stated 0.4 s sixteenth. The original
  took bit 1 of a 2-bit counter that was cleared at each note change. Its
  first rise comes after two edges.
- **Unused Count Map codes.** Codes 25 to 30 are unassigned in the
  original table. Here they map to the rest word.
- **Not built:**
  - a second or third channel: the original had no room for one, and its
    controller had no states for one;
  - the option of driving a DAC or waveform ROM instead of a square wave;
  - the pad frame.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The main ones:

| testbench | what it checks |
|---|---|
| `tb_controller_fsm` | every transition and output of the state table, and the look-ahead strobes |
| `tb_freq_counter` | wrap after 256 − N counts for random N; load priority |
| `tb_ct_latch`, `tb_tempo_gen`, `tb_duration_counter` | edge latching, divide-by-four, clears |
| `tb_implicit_rest_gen`, `tb_rest_gen`, `tb_channel_proc` | exhaustive gating of the rest logic |
| `tb_count_map` | all 64 entries; pitch within 3 % up to C5 and within 5 % above |
| `tb_music_synth_asic` | the chip in real time: exact tone periods, slot lengths at both tempos, rests, implicit rests |
| `tb_music_synth_system` | end to end, at the default parameters, with the behavioural models: a 12-entry tune with tempo change |
| `tb_note_scale` | all 25 notes measured on the pin |
| `tb_whole_note` | gap-free whole notes of 1.6 s and 6.4 s |

To run one with plain Verilator (5.x), from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/music_synth_pkg.sv \
    tb/tb_music_synth_system.sv --top-module tb_music_synth_system -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl -Itb`. The end-to-end
testbenches simulate a few seconds of real time at a 1 MHz chip clock.
Each takes a few seconds of wall time.

## Changing it

- `music_synth_pkg` holds the state encoding, the per-state output table
  (`state_outputs`) and the widths.
- `tempo_gen` has a `SLOW_DIV` parameter, and `music_synth_asic` has
  `SLOW_DIV` and `FAST_TAP_BIT`.
- To change the scale, edit the `count_map` case table. Use
  N = 256 − 100 kHz / (2 f).
- A second voice would need a second `channel_proc` and new controller
  states. The single controller serves one counter at a time and cannot
  handle two counters reaching zero together.
