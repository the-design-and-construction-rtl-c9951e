# A raster display that stores only the edges of a picture

A raster-scan screen of 512 × 512 elements needs 262,144 bits if the picture is held as one bit per element. Line drawings such as circuit diagrams are almost entirely background. This display unit therefore stores only the places where the beam intensity changes. Each change is one 19-bit word: an 18-bit screen address and a flag bit. The words are kept in a circulating shift-register store, sorted in the order the raster visits them. While the raster is drawn, the next stored address is compared with the beam position. At equality the video changes, and the store steps on by one word.

A flag of 0 means the change lasts until the next stored address ("begin" or "end" of a bright run). A flag of 1 means the element is inverted for one section only, a single dot. This "begin-end + flag" coding suits diagrams that are mostly horizontal runs with sparse vertical strokes. A circuit symbol costs a few dozen words instead of thousands of bits.

The RTL describes the prototype configuration: a 64-word store, 8 MHz section clock and 625-line interlaced television timing.

## Screen addresses

| bits   | meaning |
|--------|---------|
| 18     | flag: 1 = one-section (temporary) change, 0 = permanent change |
| 17     | field (0 = first, 1 = second interlaced field) |
| 16..9  | line within the field, 0..255 |
| 8..0   | section along the line, 0..511 |

The field bit is the most significant address bit. The numeric order of addresses is therefore the order in which the interlaced raster reaches them: all of field 0, then all of field 1. The all-zero word means "empty". As a result, address 0 (first section of line 0 of field 0) cannot be used as a picture address.

## The store ring

```
            +-----------------------------------------------+
            v                                               |
  A ---> [ B ] ---> [ C ] ---> [ main store, DEPTH words ] ---> [ D ] ---+
  ^                   ^                                          |
  |                   +----------- D (delete path) --------------+
  +------------------------------- D (insert / delete / erase) --+
```

- **B, C** (`path_register`) are the first two word positions. Each has a main input and an alternate input, plus a "break" that loads zero.
- **main store** (`main_store`) is DEPTH words of plain shift register, 19 bits wide, with no reset.
- **D** is the word position after the store. It is the word being compared with the beam.
- **A** (`register_a`) holds a new address to insert, or an address to delete. It is normally outside the ring. The insert, delete and erase paths bring it into the ring.
- **Ring length:** B + C + 64 + D gives 67 word positions on the normal path, and 68 on the erase path, which includes A.

A single shift command (`store_shift`) moves every position at once. Which path the words take is decided anew before every shift, by `insdel_control` from the comparator outputs (`magnitude_comparators`).

| Path | Word flow | When |
|------|-----------|------|
| read | D → B → C → store → D | normal display |
| insert | D → A → B → C | INSERT and one of the conditions below |
| delete | D → C, D → A, B ← 0 | delete bistable set |
| erase | A → B → C → store → D → A, B and C forced to 0 | ERASE |

### Inserting a word

The master computer sets a base address and raises INSERT. A microcomputer then feeds address modifiers. Each modifier is added to the base, loaded into A, and must be placed so that the ring stays sorted. The insert path is taken when A is non-zero and one of these holds:

1. A < D and B = 0: A is smaller than every stored address (B empty means the first word is now in D).
2. B < A < D: A belongs between B and D.
3. A > B, D = 0 and B ≠ 0: A is larger than every stored address.

On the insert path, D moves into A and A into B. The new word therefore enters the ring, and the word that was in D waits in A. The condition keeps holding for each word that follows, because each is larger than the one before. The tail of the list therefore ripples through A, one word per shift, until an empty word reaches A. At that point A has gone to zero, the ring is one word longer and sorted, and the step is finished.

An **empty-store bistable**, set by ERASE, forces the insert path for the first word written after an erase. None of the conditions can hold in an all-zero ring. It is cleared when A next returns to zero.

The extra requirement B ≠ 0 in condition 3 is this design's own. It stops a word from being placed inside the run of empty words when it arrives while that run is passing B and D.

### Deleting a word

With DELETE raised, the address to remove is loaded into A. The ring circulates normally until B holds the same address (A = B, A ≠ 0). That sets the **delete bistable**. From then on, D goes to both C and A, and B is zeroed. The matching word is overwritten, and everything after it moves up one position. The bistable is cleared when A and D are both zero, once the empty tail has arrived. The store must therefore have at least two empty words for a delete to finish.

### Erase

ERASE selects the erase path. It holds B and C at zero and shifts once every four clocks (the 2 MHz "CLK II" rate). One pass of 68 shifts takes 34 µs and leaves every position zero. Hold ERASE for at least that long. The unit gives no indication that the erase is complete. ERASE is also the only way to clear the store after power-up.

### Shift command

The store shifts when any of these apply:

- the beam reaches the address in D (MOVE STORE, one shift), unless INSERT or DELETE is active;
- D is empty, on each CLK II tick, which brings the first address round for the next frame;
- ERASE is active, on each CLK II tick;
- a bulk-shift bistable is set. It is loaded from STP and OUT3 bit 2 on each CLK II tick and held clear while A is empty, so the ring runs round while an insert or delete is in progress.

No shift occurs in the clock where A is loaded, so the comparators see the new A before the ring moves.

## Microcomputer interface and the adder unit

In the original design the symbol shapes are tables of address modifiers, held in a small microcomputer. That microcomputer, its software and its tables are not part of this RTL. Its ports are the top-level ports `out1`, `out2`, `out3`, `stp` and `int_out`. The protocol is:

1. The microcomputer puts a modifier on OUT1/OUT2 and an action code on OUT3, then halts. Halting raises STP.
2. The modifier is spread over the address like this:
   - OUT1 bits 6..0 → address bits 6..0 (sections)
   - OUT2 bits 6..0 → address bits 15..9 (lines)
   - OUT2 bit 7 → bit 17 (field)
   - OUT1 bit 7 is the word's flag.
3. What happens next depends on OUT3:
   - **OUT3 = 004**: base + modifier is loaded into A, and the insert or delete proceeds. When it is complete (A back to zero, and for a delete also B zero), `int_out` is raised. It stays high until STP falls, and the microcomputer then continues with the next modifier. While OUT3 = 004 and STP is low, A is held clear.
   - **OUT3 = 002**: base + modifier replaces the base address. This moves the origin, for example to the next character position.
   - **OUT3 = 001**: idle, waiting for the master.
4. The master computer:
   - loads the 17-bit base address with `base_clear` followed by `base_load` (the load ORs the bits in);
   - may interrupt the microcomputer with `master_int`.

The base register is 17 bits wide. All base addresses lie in the first field, and a symbol reaches the second field through the modifier's field bit.

## Reading the picture and the video

`monitor_control` runs one clock per section, at 8 MHz, so a 64 µs line is 512 sections. Its counters form the beam address {field, line, section}. When D equals the beam address:

- a flag-0 word toggles the video bistable, so brightness changes from here on;
- a flag-1 word inverts the video for this one section only;
- the store shifts to bring up the next word, unless an insert or delete is in progress.

During field blanking the bistable is set to the background colour. `reverse` = 1 selects black-on-white. Video is forced black during both kinds of blanking.

Two consecutive changes need the next word to be in D by the next section. In this RTL a shift completes within one clock, so adjacent addresses work. The original's shift-register store was slower than the beam, so two stored addresses could not be immediately adjacent on a line.

## Raster timing and interlace

All timing is counted in 125 ns clocks. The line and field-sync values are parameters of `monitor_control`.

| Event | Starts | Length |
|-------|--------|--------|
| line blanking | end of each line (section 511) | 96 clocks (12 µs) |
| line sync | 12 clocks (1.5 µs) after line blanking starts | 38 clocks (4.7 µs) |
| field blanking | section 255 of line 255 (half-way through the last used line) | 57 line ends, during which the line count is held at 0 |
| field sync | 8000 clocks (1 ms) after field blanking starts | 9600 clocks (1.2 ms) |

- `comp_sync` is line sync XOR field sync.
- At the end of the first field the line counter carries into the field bit.
- At the field blanking of the second field, the section and line counters and the field bit are all reset half-way through a line. The next line sync then comes 1.5 lines after the previous one, which produces the interlace.
- Fields are therefore 312 and 312.5 lines long, 624.5 lines per frame.

The unused lines and field blanking are the time in which the store must circulate back to its first word. That is about 3.4 ms in the original budget, and 3.7 ms here from the last reachable address to line 1 of the first field. At one shift per CLK II tick (2 MHz) this allows a store of about 6,800 words.

## Store capacity

| Picture | Words | Fits in 64-word default | Fits at DEPTH = 1024 |
|---------|-------|-------------------------|----------------------|
| one horizontal inductor symbol with its leads | 32 | yes | yes |
| the same symbol with three 6-word characters | 50 | yes | yes |
| pi filter, horizontal symbols | 391 | no | yes |
| h-parameter equivalent circuit, horizontal | 664 | no | yes |
| pi filter, vertical symbols | 941 | no | yes |
| h-parameter equivalent circuit, vertical | 1122 | no | no |

Vertical symbols cost more than horizontal ones. Their leads are vertical strokes, and every line of a vertical stroke needs its own word. Delete needs two empty words, so the usable capacity is the ring length (DEPTH + 3) less two.

## Parameters

| Module | Parameter | Default | Meaning |
|--------|-----------|---------|---------|
| `vdu_top`, `main_store` | `DEPTH` | 64 | store words (prototype size; a commercial unit would want about 1,024) |
| `vdu_top`, `adder_unit` | `BASE_W` | 17 | base register width |
| `monitor_control` | `LINE_BLANK`, `LSYNC_DELAY`, `LSYNC_WIDTH` | 96, 12, 38 | line timing in clocks |
| `vdu_top`, `monitor_control` | `FBLANK_LINES`, `FSYNC_DELAY`, `FSYNC_WIDTH` | 57, 8000, 9600 | field timing |

## Departures from the original and known limitations

**Clocking, reset and polarity**
- One synchronous clock with enables replaces the original's edge-clocked bistables, monostables and 2 MHz CLK II. Monostables are clock counters.
- A synchronous `rst` is added. The store contents are not reset; issue ERASE after reset.
- All ports are active high.

**Section time**
- The original text also quotes 102 ns per section over a 52 µs visible line.
- Here the 512 sections span the whole 64 µs line, so sections 0..95 of every line fall in line blanking and are never visible.

**Field blanking**
- Field blanking is counted as 57 lines, the "unused lines" it is meant to cover. That is 3.65 ms, not the 3.1 ms also quoted.

**Delete**
- The delete bistable is released by A = 0 and D = 0. An alternative description releases it on A = B = 0.

**Empty-store bistable**
- It is released when A returns to zero. An alternative description releases it on a change of B.
- It does not act during DELETE.

**Unreachable addresses**
- Line 0 of each field is scanned during field blanking. Words addressed there are consumed but never seen.
- Addresses in the second half of line 255 of the second field are never reached. A word there stops the read until the ring is modified.

**Operations that never finish**
- Inserting an address that is already stored never finishes.
- Deleting an address that is not stored never finishes.
- The microcomputer must avoid both.

**Not included**
- Video mixing into a composite television signal, and the TTL-to-MOS level converters.
- The two-register multiplexed store the original proposes for faster or cheaper large stores.

## Files

| File | Contents |
|------|----------|
| `rtl/vdu_pkg.sv` | word type, OUT3 codes, modifier mapping |
| `rtl/vdu_top.sv` | top level: the ring and all control |
| `rtl/adder_unit.sv` | base register, adder, interrupt bistable |
| `rtl/register_a.sv` | register A |
| `rtl/path_register.sv` | registers B and C |
| `rtl/main_store.sv` | shift-register store and register D |
| `rtl/magnitude_comparators.sv` | A:B, A:D, D:beam comparators, zero detectors |
| `rtl/insdel_control.sv` | path selection, delete and empty-store bistables, interrupt, shift command |
| `rtl/monitor_control.sv` | raster counters, blanking, sync, interlace, video |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_vdu_large_store.sv` | whole unit with a 1,024-word store and 941 words |
| `tb/tb_vdu_realign.sv` | whole unit with a 6,800-word store, worst-case realignment |

`tb/tb_vdu_top.sv` runs the complete unit at its default parameters, taking about 2 seconds of simulation. It:

- plays the microcomputer's part;
- erases the store;
- writes a horizontal inductor symbol (28 words) with the start and end of a lead (2 words), then writes the same 6-word character at three base addresses reached by base moves, 48 words in all;
- checks whole frames of video against a model built from the inserted address list;
- deletes words again, and checks black-on-white mode and a final erase.

It also counts how often each mechanism occurred: each insert condition, deletes, temporary words, base moves and interrupts.

Two more tests exercise store sizes beyond the prototype:

- `tb/tb_vdu_large_store.sv` sets `DEPTH = 1024`, the size a practical unit would need. It inserts 941 distinct random words in random order. That is the size, in words, of the largest circuit drawing the coding was evaluated on. It checks that one frame reads every word exactly once and in ascending order. It then deletes a random third of the words, checks again, and erases. It runs in about 20 s.
- `tb/tb_vdu_realign.sv` sets `DEPTH = 6800`. It stores only a dot near the start of the frame and one at the last reachable address. It checks that both dots appear in every frame. It measures the realignment: 27,205 clocks (3.40 ms), inside the 3.7 ms between the two dots.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/vdu_pkg.sv $(ls rtl/*.sv | grep -v vdu_pkg) \
          tb/tb_vdu_top.sv --top-module tb_vdu_top -o sim
./obj_dir/sim
```

Replace the testbench and top-module name to run a block test, e.g. `tb/tb_insdel_control.sv` with `--top-module tb_insdel_control`. Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.
