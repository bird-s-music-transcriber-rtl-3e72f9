# A music transcriber in hardware

A musician picks a tempo on three switches and plays into a microphone or
line input. The circuit writes what was played as sheet music on a
1024x768 monitor. Each note appears on a treble-clef stave at the right
pitch, with a head that shows its length: whole, dotted half, half or
quarter. A sharp sign is added where needed. Silences appear as rests.
An LED and a beep mark the beat, so the player can keep time. When the
page is full the display stops, so the player can read it. A reset press
clears the page.

The work is split into two halves that meet at four signals:

```
                 27 MHz                                   |  65 MHz
 codec ─ready──► ready_pulse ──ce──► FFT core (external)  |
       ─sample───────────────xn──►  4096 points           |
                                      │ bins              |
                       peak detector ◄┘                   |
                             │ peak bin                   |
                       look-up table ── note, sharp       |
                             │                            |
  tempo switches ► tempo ► rhythm ── new_note, note,      |
                   select    │        sharp, duration ──► control ─► fontgen
                             └ beat ► metronome ─► LED, beep    │ cx,cy   │ glyph codes
                                                          |  ┌──┴─────────┴───┐
                                                          |  │ clock crossing │
                                                          |  └────────┬───────┘
                                                          |  stave │ note │ clef sprites
                                                          |        └──OR──┘
                                                          |  non-erasable 1-bit page RAM
                                                          |           │
                                                          |  xvga timing ─► monitor
```

- **Note recognizer**, at 27 MHz. It turns audio into a stream of timed note
  events. Each event is a note number, a sharp flag and a duration in beats,
  marked by a one-cycle `new_note` pulse.
- **Video display**. It keeps track of where the next symbol goes, at
  27 MHz. It draws the page at the 65 MHz pixel clock.

Three parts are not in this RTL:
- the audio codec (amplifier, A/D converter and its serial link);
- the FFT core, a vendor IP block;
- the FPGA clock synthesiser that makes 65 MHz.

Their signals are ports of `transcriber_top`. The testbenches replace the
FFT with a behavioural model, `tb/fft_stream_model.sv`, which streams one
spectrum per frame with a single peak.

## Encodings shared by both halves (`rtl/mt_pkg.sv`)

| signal | width | meaning |
|---|---|---|
| `note` | 5 | diatonic steps above C4: D4 = 1, E4 = 2, … G5 = 11. 0 = rest or a pitch outside the table |
| `sharp` | 1 | the pitch is the black key above `note` |
| `duration` | 3 | length in beats: 1 quarter, 2 half, 3 dotted half, 4 whole |
| `new_note` | 1 | one-cycle strobe; the three fields above are valid with it |

A diatonic step number is used, not a semitone number, because the display
needs the line or space on the stave. C#5 is therefore note 7 with sharp 1.

## From sound to a pitch

**Sampling.** The codec delivers a sample and a `ready` level at 48 kHz.
`level_to_pulse` turns each rising edge of `ready` into a one-cycle pulse.
That pulse is the FFT core's clock enable, so the core takes one sample and
moves its output stream one bin per sample.

**Peak detector** (`peak_detector`). The FFT streams its 4096 bins. For each
bin that arrives with both the sample pulse and the core's `dv`, the
detector forms re² + im² exactly. It keeps a running maximum and the index
where the maximum was found. Only bins below 77 are considered, and only
magnitudes above 100:
- 77 bins × 48000/4096 Hz = 902 Hz, just above the highest note in the
  table;
- the floor of 100 keeps noise from being read as a note.

When bin 77 arrives the detector does three things:
1. it publishes the kept index with a one-cycle `peak_valid`;
2. it clears the maximum;
3. it clears the kept index to 0.

A frame with nothing above the floor therefore reports bin 0, which later
becomes a rest.

**Look-up table** (`note_lut`). The bin becomes hertz as
`f = bin × 48000 >> 12`, floored. The frequency is then placed in one of
19 semitone bands, D4 to G#5. Together these cover the treble stave with
one step to spare on each side. Each band edge is the midpoint between
neighbouring equal-tempered frequencies. The table of those frequencies is
in `mt_pkg`, in hundredths of a hertz. The edges are computed at
elaboration, so widening the range only needs new `LO_SEMI`/`HI_SEMI`
values.

| note | band (Hz) | note | band (Hz) | note | band (Hz) |
|---|---|---|---|---|---|
| D4  | 285–301 | G#4 | 404–427 | D5  | 571–604 |
| D#4 | 302–319 | A4  | 428–452 | D#5 | 605–640 |
| E4  | 320–338 | A#4 | 453–479 | E5  | 641–678 |
| F4  | 339–359 | B4  | 480–508 | F5  | 679–718 |
| F#4 | 360–380 | C5  | 509–538 | F#5 | 719–761 |
| G4  | 381–403 | C#5 | 539–570 | G5  | 762–806 |
|     |         |     |         | G#5 | 807–854 |

A frequency outside all bands gives note 0, just like a rest. The bins are
11.7 Hz apart, and the narrowest band (D4) is 17 Hz wide, so every band
holds at least one bin. The output is registered and changes once per FFT
frame, about every 85 ms.

## Rhythm: turning a pitch stream into notes with durations

This is the least obvious part of the design. `rhythm` sees only the
current pitch, which may change once per FFT frame. From that alone it must
decide when a note ended and how long it was. Let L be the beat length in
27 MHz cycles (`beat_len`, from `tempo_select`).

- A counter runs while the pitch (note and sharp) stays the same.
- **Change of pitch.** The count is compared with half-beat thresholds:

  | count when the pitch changes | action |
  |---|---|
  | < L/2 | the pitch that just ended was too short to be a note: no event |
  | < 3L/2 | event, duration 1 |
  | < 5L/2 | event, duration 2 |
  | < 7L/2 | event, duration 3 |
  | otherwise | event, duration 4 |

  In every case the new pitch becomes the held pitch and the counter
  restarts from 0. A stray frame between two frames of the same note
  therefore ends that note early and then vanishes itself. The note's
  second part is measured afresh.

- **Long notes.** When the count reaches 4L without a change, a whole-note
  event is sent and counting restarts from 0, so a held note repeats every
  4L + 1 cycles. A note held for 9 beats is drawn as
  two whole notes, then a quarter note.
- `note_out`, `sharp_out` and `duration` are registered and valid in the
  same cycle as `new_note`. The event appears one cycle after the clock in
  which the changed pitch was seen.
- **Beat.** A separate counter runs 0…L and pulses `beat` for one cycle at
  L. The beat period is therefore L + 1 cycles. The beat is free-running
  and not tied to note starts; note durations are measured from each note's
  own start.
- A pitch lasting one FFT frame (85 ms) is shorter than L/2 for every
  tempo (L/2 is at least 167 ms), so a one-frame misreading never
  becomes a note of its own.

**Tempo select.** `tempo_select` registers L from the three switches. L is
one of 9.0, 13, 15, 17, 22, 25, 27 or 33.5 million cycles, which is 3 to
0.8 beats per second. While reset is held, L is 10 million cycles.

**Metronome.** `metronome` toggles one level on every beat. That level
drives both the LED and the audio output, so the LED changes state on each
beat and the speaker clicks.

## Where the next symbol goes (`display_control`)

The controller holds:
- `cx`, the x position of the next symbol;
- `cy_fixed`, the reference row of the current stave.

It acts only on `new_note`:

- **Vertical.** `cy = cy_fixed − 4·note`, so each diatonic step moves the
  symbol up half a line spacing. Rests go to the fixed row
  `cy = cy_fixed − 20`.
- **Horizontal.** `cx` grows by 30 × (duration of the *previous* event).
  The gap after a symbol is then proportional to its own length. The first
  symbol after reset lands at x = 35.
- **Line wrap.** Once `cx ≥ 900`, the next symbol starts a new line:
  - `cx = 35`;
  - `cy_fixed` grows by 62;
  - the clef sprite moves to `(10, cy_fixed + 62 − 27)`.
- **Page full.** When `cy_fixed ≥ 700` and `cx ≥ 900`:
  - both note positions are parked at (1030, 750), outside the visible
    area;
  - `newpage` rises and stays high until reset;
  - no further symbols are drawn.

`cy_fixed` starts at 80, so the page holds 11 lines.

**Glyph codes** (`fontgen`). Each symbol is two 8×12 glyphs side by side.
Their 4-bit codes form `cstring` (left glyph in `[7:4]`):

| event | cstring |
|---|---|
| note, 1/2/3/4 beats | `4_`, `3_`, `2_`, `1_`. The right glyph is `0` (sharp) or `9` (blank) |
| rest, 1 beat | `89` (quarter rest, blank) |
| rest, 2 beats | `79` (half rest, blank) |
| rest, 3 beats | `78` (half rest + quarter rest) |
| rest, 4 beats | `59` (whole rest, blank) |
| other durations | `AA` (error mark) |
| reset or page full | `99` (nothing drawn) |

The clef code is always 1, the treble clef.

## Drawing a page that is never erased

Only one note sprite and one clef sprite exist. The page is still full of
notes, because the sprites draw into a 1-bit, 1024×768 video memory that the
sprites can only add to. A sprite that moves to a new position leaves its
old image behind.

Each pixel clock, for the raster position (hcount, vcount):

1. `stave_display`, `note_display` and `clef_display` each give a 1-bit
   pixel, and the three are ORed.
   - Staves: rows `55 + 62·s + 8·l` for stave s = 0…10 and line l = 0…4.
   - Note sprite: the two glyphs, each pixel doubled, in a 32×24 box at
     (cx, cy).
   - Clef sprite: one 16×24 glyph, doubled, in a 32×48 box.
2. `countaddr` forms the address `{vcount, hcount[9:0]}` and a `visible`
   flag.
3. `videoram` is read at that address. The read is synchronous, with one
   cycle of latency.
4. One cycle later the same address is written with:
   ```
   write enable = visible & (reset | (!stored & sprite_pixel))
   write data   = !reset
   ```
   A stored 1 is never rewritten. A 0 becomes 1 where a sprite is. While
   reset is held, every visible pixel is written to 0.
5. The monitor shows a stored 1 as black and a 0 as white. Blanking gives
   black.

Points to be aware of:
- Clearing happens as the raster sweeps. Reset must be held for one whole
  frame (16.7 ms) to clear the page. The reset button's debounce needs
  10 ms of stable input before reset even starts.
- Stave lines are stored, like any other sprite pixel. They reappear after
  reset, one frame later.
- A note is stored in the first frame after its position reaches the 65 MHz
  domain. The sprite then sits on top of an already-set image, so it causes
  no further writes.

## Two clocks

`display_control` and `fontgen` run at 27 MHz, next to the recognizer. The
raster, sprites and memory run at 65 MHz. The sprite positions, glyph codes
and `newpage` change at most once per note and otherwise hold still.
`cdc_bus_sync` moves each group across as follows:
- the source captures the word into a holding register and flips a toggle;
- the toggle passes through two flip-flops in the 65 MHz domain;
- when it changes, the destination copies the holding register, which by
  then is stable.

Reset reaches the 65 MHz side through its own two-flop synchroniser.

`xvga` has no reset. Its counters wrap into range within one frame from any
start value:
- horizontal: 1344 clocks per line, sync low on 1048–1183;
- vertical: 806 lines per frame, sync low on lines 777–782.

## Files

| file | contents |
|---|---|
| `rtl/mt_pkg.sv` | note table, encodings, glyph codes, widths |
| `rtl/transcriber_top.sv` | the whole design: debounced reset, recognizer, display |
| `rtl/note_recognizer.sv` | ready pulse, peak detector, look-up table, tempo, rhythm, metronome |
| `rtl/level_to_pulse.sv`, `peak_detector.sv`, `note_lut.sv`, `tempo_select.sv`, `rhythm.sv`, `metronome.sv`, `debounce.sv` | recognizer parts |
| `rtl/video_display.sv` | tracking, clock crossing, sprites, page memory, timing |
| `rtl/display_control.sv`, `fontgen.sv`, `note_display.sv`, `clef_display.sv`, `stave_display.sv`, `countaddr.sv`, `videoram.sv`, `xvga.sv`, `cdc_bus_sync.sv` | display parts |
| `rtl/note_font.hex` | 16 glyphs × 12 rows of 8 bits, address = code·12 + row, MSB = left pixel |
| `rtl/clef_font.hex` | 16 glyphs × 24 rows of 16 bits; only code 1 (treble clef) is drawn |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/transcriber_top_tb.sv` | end to end with short beats |
| `tb/transcriber_full_tb.sv` | end to end at full size |
| `tb/fft_stream_model.sv` | behavioural FFT stand-in |

The two sprite modules read their fonts from `rtl/*.hex` by a path
relative to the repository root, so simulate from there. The glyph pictures
are simple pictures of this design's own.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. From the
repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module rhythm_tb \
    -y rtl -y tb +libext+.sv -Irtl rtl/mt_pkg.sv tb/rhythm_tb.sv
./obj_dir/Vrhythm_tb +verilator+rand+reset+2
```

Replace `rhythm_tb` with any testbench name. `+verilator+rand+reset+2`
starts all uninitialised state at random values, and the testbenches are
written to pass that way.

- **`transcriber_top_tb`** runs the top with a beat of 2048 cycles and a
  debounce of 100 cycles. It feeds the FFT model note by note and follows
  the events through to the pixels in the video memory. It counts each
  mechanism and fails if any never happens:
  - every duration, sharps, rests, and a pitch too short to become a note;
  - line wraps, the page-full stall and page clearing by reset;
  - beats against LED changes, and a tempo change.

  It takes about 15 s.
- **`transcriber_full_tb`** runs the top with every parameter at its
  default:
  - the real 48 kHz sample rate;
  - 4096-bin frames;
  - the 9-million-cycle tempo.

  It checks three events (a rest, a 2-beat A4, and a 1-beat C#5 with its
  sharp), the beat period and the glyphs in the video memory. It takes
  about one minute.
- **`pitch_sweep_tb`** plays every equal-tempered note from C4 to B5 through
  the recognizer with 4096-bin frames. It checks the peak bin and the
  note/sharp output for each tone: the 19 notes D4–G#5 must be recognised,
  and the notes outside that range must read as 0.

## How far it follows the original design, and where it departs

These parts follow the original design:
- the block structure;
- the 4096-point FFT at 48 kHz;
- the 77-bin scan and magnitude floor of 100;
- the D4–G#5 range;
- the half-beat duration thresholds and the whole-note cut-off;
- the eight tempos;
- the metronome toggle;
- every position constant of the page layout;
- the stave geometry;
- the non-erasable OR-of-sprites memory;
- the 1024×768 timing.

Departures and additions:
- **Band edges** are midpoints computed from the equal-tempered table.
  The original used hand-picked round numbers, up to a few hertz away.
- **Peak index** is 12 bits, to hold all 4096 bins. It is cleared to 0 at
  the end of each scan, so silence reads as a rest.
- **Look-up table** updates once per FFT frame, not on every sample. The
  note values are the same.
- **Control** acts only on `new_note`, and `newpage` stays high until
  reset.
- **Font ROMs** are read combinationally, so sprite pixels line up with
  `hcount` without a one-pixel-early address. The glyph pictures and code
  assignment are new.
- **Page memory** is read and written one cycle apart, so the read and the
  write refer to the same pixel.
- **The clock crossing** between 27 and 65 MHz is explicit.
- **Debug outputs.** The original showed its debug values on board LEDs.
  `transcriber_top` brings out `note_now`, `sharp_now` and `page_full`
  instead.

Not included: the audio codec and its driver, the FFT core, and the clock
synthesiser. Real instruments give spectra whose strongest bin may be a
harmonic rather than the fundamental. Like the original, this design
simply takes the strongest bin, so it is most reliable with pure tones.
