# Braille PDA on an FPGA: print-to-Braille translator and Braille keyboard controller

This design is the hardware part of a note-taker for blind users that is built around a
soft-core processor on an FPGA. Two functions are moved from software into logic:

* a **print-to-Braille translator**. It turns ASCII text into contracted (Grade 2) Braille in
  North American Computer Braille code, using a rule table held in external flash memory.
* a **Braille keyboard controller**. It scans a 6 x 4 key matrix (six dot keys, twelve function
  keys and six control keys), debounces it, and turns each chord into a Computer Braille
  character or a control code.

Both sit as slaves on an OPB (CoreConnect On-chip Peripheral Bus). An interrupt controller
merges their "data ready" interrupts into one interrupt to the processor. The processor
itself is not part of the RTL. The top module `cub_soc` brings the OPB master port out, and
the system testbench plays the processor.

The translator is faster than a processor doing the same work in software. The reference
point is the word "and", which translates to the single Braille sign `&`. The target is
12 µs at 16 MHz, which is 192 clock cycles. With the default flash timing and the test rule
table, this design needs 107 cycles.

## How the translator works

### Rules

Contracted Braille is produced by context-sensitive replacement rules of the form

    left-context [FOCUS] right-context = result

Rules are grouped by the first character of their focus, called the *entry character*. For
the current position in a word, the translator walks through the entry character's rules in
order. The first rule that matches fires, and three things must hold for a match:

* the focus equals the text at the current position;
* the right context equals the text just after the focus;
* the left context equals the text just before the focus.

When a rule fires, its result characters are emitted and the position moves forward by the
focus length. Text outside the current word reads as a space. A space in a context therefore
means a word boundary. For example, `[AND]` followed by a space and preceded by a space
means the whole word "and".

If a character has no rules, or its list ends with no match, the character is passed through
unchanged (Grade 1). A complete table ends each list with a one-character rule, so this only
happens for characters the table does not cover.

### Rule record in flash

Each rule is a 32-byte record. The record layout is this design's own choice:

| byte  | content |
|-------|---------|
| 0     | focus length, 1..8; a value of 0 ends the entry's list |
| 1     | bits 6:4 left-context length (0..4), bits 2:0 right-context length (0..4) |
| 2     | result length, 0..8 |
| 3     | unused |
| 4–11  | focus characters |
| 12–15 | left context, the character nearest the focus first |
| 16–19 | right context |
| 20–27 | result characters (Computer Braille ASCII) |
| 28–31 | unused |

A rule list is a run of records followed by a record whose byte 0 is zero. The flash is 16
bits wide and asynchronous. The flash interface drives an address, waits
`FLASH_WAIT_CYCLES` clocks (default 6, about 120 ns at 50 MHz) and samples the data. A whole
record takes 16 such reads, but an end record stops after the first read. The packed
`rule_t` in `cub_pkg` is what the interface hands on.

A start-address table, `p2b_find_entry`, holds where each character's list begins. It is
indexed by the 7-bit character code and is written through the `entry_*` port. The flash
contents and this table are both loaded from outside before translation starts. The loader
is not part of this design.

### Datapath (`p2b_translator`)

```
 text ─► p2b_ctrl ──entry char──► p2b_find_entry ──addr──► p2b_output_rule ◄──► p2b_flash_if ◄──► flash
         (word regs)                                         │ rule
             │ word, pos           ┌─────────────────────────┼───────────────┐
             └──────────────► p2b_focus_check   p2b_right_check   p2b_left_check   (combinational)
                                   └──────── focus_ok / right_ok / left_ok ─┘
                                                   ▼
               step_done/count ◄── p2b_load_codes ──next──► p2b_output_rule
                                                   │ group
                                                   ▼
                                            p2b_out_codes ──► Braille stream, word_done
```

* `p2b_ctrl` collects characters into word registers (`WORD_LEN` = 12). Any code ≤ 0x20
  ends a word. A word longer than 12 characters is handled in 12-character pieces. For each
  step it offers the character at the current position as the entry character.
* `p2b_find_entry` answers one cycle later with found or fail and the list address.
* `p2b_output_rule` has the interface fetch the rule at the list address. On each `next`
  pulse it moves 32 bytes on. On a fail it presents an empty rule.
* The three checks compare the rule with the word in parallel, with no clock in between.
* `p2b_load_codes` looks at the check results one cycle after a rule appears:
  * If any check fails, it asks for the next rule.
  * If all pass, it hands the result to `p2b_out_codes` and tells the controller how many
    characters were consumed.
  * If the rule is empty, it passes the entry character through as Grade 1.
* `p2b_out_codes` sends one result group out one character at a time on a valid/ready
  stream. It pulses `word_done` after the last group of a word.

Cost per step: about 4 cycles of handshake, plus one flash record read (16 × wait) for every
rule tried. Table order therefore matters for speed: put long, frequent rules first.

## Keyboard controller

`kbd_scanner` is a five-state machine:

* A 4-bit shift register, reset to `0111`, drives the active-low column lines `I0..I3`.
* Each of State0..State3 holds one column low for `DEBOUNCE_CYCLES` clocks. The default is
  650 000, which is 13 ms at 50 MHz. At the end of that time it samples the six row lines
  `O0..O5` into `Rn` and ANDs them into `Regn`, then rotates the shift register.
* State4 checks `R1..R4`. If all four are all ones, every key has been released. The
  accumulated image `Reg4..Reg1` is then output and the Regs are set back to all ones.

So a chord is reported once, when its last key is released, and holds every key pressed at
any time during it.

In the 24-bit image, the bit for a key is `6*column + row`, and a pressed key reads 0.
`kbd_decoder` maps the image as follows:

| keys pressed | output |
|---|---|
| dot keys only (column 0) | the Computer Braille character for those dots; the dot-to-ASCII table is the standard North American one, 0x20–0x5F |
| one of F1..F12 (columns 1–2) | 0x81..0x8C |
| Enter | 0x0D |
| Left | 0x90 |
| Right | 0x91 |
| Space | 0x20 |
| Up | 0x92 |
| Down | 0x93 |
| an image with no key | nothing |
| a mixed chord | nothing |

`kbd_controller` chains the two blocks. A code appears within two scan periods of the
release.

## Bus, registers and interrupts

The OPB is reduced to what these slaves need:

* from the master, a request `opb_req_t`: select, read-not-write, 32-bit address, 32-bit
  write data;
* from each slave, a response `opb_rsp_t`: read data, transfer acknowledge, timeout
  suppress.

The slaves' responses are ORed together. Each slave acknowledges in the same cycle and
drives zeros when it is not addressed. An assertion in `cub_soc` checks that at most one
slave acknowledges at a time.

| address | register |
|---|---|
| 0x4000_0000 | translator Reg1. Write: next ASCII character. Read status: bit 0 Reg1 empty, bit 1 busy, bit 2 result waiting, bit 8 more follows, bit 9 overrun (cleared by the read) |
| 0x4000_0004 / 8 / C | translator Reg2..Reg4: result characters 0–3, 4–7, 8–11, with character *i* in bits `8*(i%4)+7 : 8*(i%4)`. Reading Reg4 frees the result |
| 0x4001_0000 | keyboard Reg1: bits 7:0 last code, bit 8 new since the last read |
| 0x4120_0000 | interrupt controller: ISR +0x0, IPR +0x4, IER +0x8, IAR +0xC, IVR +0x18, MER +0x1C |

A translation result of at most 12 characters fits in the three 32-bit registers, so the
processor reads it in three bus cycles. A longer result is delivered 12 characters at a time
with "more follows" set. The translator's output stream is held while a delivered result is
unread, so nothing is overwritten. Writes to Reg1 are never stalled. A write that arrives
while Reg1 is still full is dropped and sets the overrun flag. Software therefore polls
bit 0 before writing.

Each IP raises a one-cycle interrupt pulse when its data are ready. The interrupt controller
latches the pulses, masks them with IER, and raises `irq` while MER bit 0 is set. IVR gives
the number of the highest-priority pending input. Input 0 is the keyboard and has priority
over input 1, the translator. The software shown in the system testbench follows this
pattern:

1. Read IVR.
2. Read the keyboard code, or Reg2..Reg4 of the translator.
3. Write the bit to IAR.

A global mode flag selects what the processor does. F1 selects note taking: keyboard codes
are collected as text. F2 selects translation: text is fed to the translator. The other
function keys return to idle.

## What is taken from the original design, and what is not

Taken from the original design:

* the block split of the translator;
* the parallel focus/context checks;
* the rule form;
* the Grade 1 fallback;
* the 8-bit input register and the three 32-bit result registers;
* the 12-character limit;
* one-cycle data-ready interrupts;
* keyboard priority;
* the five-state scanner with its `0111` shift register, R/Reg registers, AND accumulation
  and all-released test;
* the key layout;
* the 13 ms debounce.

This design's own choices:

* the rule record layout and flash bus width;
* the start-address table and how it is loaded;
* the limits of 8 focus, 4 context and 8 result characters;
* the handling of words longer than 12 characters;
* the status, overrun and "more follows" bits;
* the address map;
* the interrupt-controller register set;
* the control-code values;
* rejecting mixed chords.

Not built:

* the rule-class decision table used by software translators of this family. Contexts here
  are literal characters, with a space for a word boundary. Wildcard classes such as "any
  letter" would need an extra class-match stage in the three checks.
* the processor, memories, UART, Ethernet and speech interfaces, and run-time partial
  reconfiguration.

The rule table in the testbenches is a small invented Grade 2 subset. It is not a complete
Braille table.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops, with a watchdog. The helpers are:

* `flash_model` (asynchronous flash with a fixed latency of 5 cycles; the interface needs
  a wait of at least latency + 1);
* `kbd_matrix_model` (the key switches);
* `p2b_rules_pkg` (the test rule table, its flash image and a reference translator);
* `braille_ref_pkg` (the dot table used as the independent reference for the decoder).

With verilator 5:

```
t=tb_p2b_translator
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  -y rtl -y tb rtl/cub_pkg.sv tb/p2b_rules_pkg.sv tb/braille_ref_pkg.sv tb/$t.sv \
  --top-module $t -Mdir obj_$t -o sim && ./obj_$t/sim
```

Replace `t` with any other testbench:

* `tb_p2b_ctrl`, `tb_p2b_find_entry`, `tb_p2b_output_rule`, `tb_p2b_flash_if`,
  `tb_p2b_checks`, `tb_p2b_load_codes`, `tb_p2b_out_codes` (translator blocks);
* `tb_p2b_opb` (translator IP);
* `tb_kbd_scanner`, `tb_kbd_decoder`, `tb_kbd_controller`, `tb_kbd_opb` (keyboard);
* `tb_intc_opb` (interrupt controller);
* `tb_cub_soc` (whole system).

The block testbenches shorten the debounce time. `tb_cub_soc` runs the top with every
parameter at its default, 13 ms debounce included. It takes under a minute. It does the
following:

* types words on the keyboard model;
* switches modes with F1 and F2;
* sends text through the translator, including a word whose result is longer than 12
  characters;
* fires both interrupts in the same cycle to check the priority;
* compares every result with the reference translator;
* counts how often each mechanism happened (rule fired, next rule, Grade 1, split result,
  simultaneous interrupts, mode switch).

Useful knobs:

* `FLASH_WAIT_CYCLES` for a different flash speed or clock;
* `DEBOUNCE_CYCLES` for a different clock (cycles = 13 ms × f_clk);
* `WORD_LEN` for longer word registers (the checks grow linearly with it).
