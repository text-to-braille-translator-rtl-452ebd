# Text-to-Braille translator in hardware

This is a synthesizable SystemVerilog translator from plain ASCII text to
contracted (grade 2) English Braille, written in North American Braille ASCII.
A software translator looks words up in a dictionary. This circuit instead
applies context-sensitive rewrite rules of the kind Paul Blenkhorn proposed
for print-to-Braille translation:

    left-context [focus] right-context = codes

If the text at the current position equals the *focus*, the characters in
front of it fit the *left context* and the characters after it fit the *right
context*, then the rule fires. Its Braille *codes* are emitted and the position
moves past the focus. Rules are tried in a fixed order, so a specific rule such
as `~[but]~ = b` (the word "but" standing alone) is listed before the plain
letter rule `[b] = b`.

The RTL follows a published FPGA design. That design was built on a Virtex-4
board. A PC sent text over RS-232 at 4800 baud and got Braille ASCII back at
57600 baud. Its structure is kept here: a data controller, a rule look-up
table, and a translating block made of eight sub-blocks. Where the published
description gives only a block's purpose, this RTL fills in the details. Those
choices are listed in [What is this design's own](#what-is-this-designs-own).

## How a rule is stored

All rules have the same length. Each rule is four fields of `FIELD_LEN` = 10
bytes, and an ASCII 0 ends each part. A rule is therefore 320 bits, and the
look-up table reads one whole rule per clock (`braille_pkg::rule_t`):

| field   | element 0 holds                              | notes                                  |
|---------|----------------------------------------------|----------------------------------------|
| `focus` | first character of the focus                 | literal characters only                |
| `right` | character right after the focus              | literals and wildcards                 |
| `left`  | character right *before* the focus           | stored nearest-first, i.e. reversed    |
| `codes` | first Braille ASCII code to emit             | 0 to 10 codes                          |

The left context is stored reversed. This lets the left check walk its field
with the same index as the other checks: `left[i]` is held against the text at
`pos-1-i`.

Context wildcards. Each one stands for exactly one text position:

| byte | accepts                                                                  |
|------|--------------------------------------------------------------------------|
| `~`  | a word boundary: space, punctuation, or a position outside the stored text |
| `!`  | a letter `a`–`z`                                                          |
| `#`  | a digit `0`–`9`                                                           |

Rules with the same first focus character must be contiguous. Within such a
group they are tried in table order. The first rule of each group is found
through a 128-entry *entry table* indexed by the character (`find_entry`).

The built-in table (`braille_pkg::default_rule`, 95 rules) is loaded at power-up. It covers:

* letters;
* digits, which become `#` plus a letter, and only the letter after another
  digit (`#[1] = a` before `[1] = #a`);
* common punctuation;
* the one-cell whole-word contractions (`~[knowledge]~ = k`);
* the strong contractions `and`, `for`, `of`, `the`, `with`;
* the group signs `ch gh sh th wh ed er ou ow st ar`;
* `ing` when it follows a letter (`![ing] = +`).

Examples: `the children sing with knowledge.` becomes `! *ildren s+ ) k4`, and
`12` becomes `#ab`. The built-in table shows the mechanism. It is not a complete
standard English table. A full table can be loaded (see below).

## How a group of text is translated

`translating_controller` stores incoming characters in 40 registers. It stops
at a space, CR or LF (which is stored too) or when all 40 are full. It then
walks the group:

1. It sends the character at position `pos` to `find_entry`. If there is no
   entry, the character goes unchanged to the output buffer and `pos` advances
   by one.
2. Otherwise `output_rule` reads the first rule of the group from
   `lookup_table` and presents it to the three checks.
3. The checks form a chain of registered stages, one clock each:
   `focus_check`, then `right_context_check`, then `left_context_check`. Each
   stage passes on a failure from an earlier one. The focus check also
   produces the focus length.
4. `load_translated_codes` copied the rule's codes when the rule was
   presented. If the whole rule matched, it writes the codes to
   `output_translated_codes`, one per clock. It then tells the controller how
   many characters were translated (`pos` jumps past the focus) and tells
   `output_rule` to stop. If the rule did not match, it asks `output_rule` for
   the next rule.
5. The search for a character also ends when the next rule belongs to another
   character or lies past the last loaded rule. The character is then emitted
   unchanged.

When `pos` reaches the end of the group, `output_translated_codes` sends the
buffered codes out one by one. When the buffer is empty, the controller
collects the next group.

Timing: the first rule for a character is presented 3 clocks after its
entry address is known (address, synchronous memory, register). While the
checks work on a rule, `output_rule` already reads the next one, so a
rejected rule is replaced on the following clock. Each rule tried costs
5 clocks: 3 clocks of checks, 1 for the verdict and 1 to present the next
rule. A word takes at most a few hundred clocks: the longest group in the
full-size system test needed well under 200 clocks of rule matching. That is
negligible next to one character time on the 4800-baud line (208,330 clocks
at 100 MHz).

Context only reaches as far as the stored group. Each group starts after a
space, so the text in front of a group's first character reads as a word
boundary, which is correct.

## Serial system and throughput

`braille_fpga_top` is the FPGA as a whole:

* `uart_rx` receives 8N1 frames at 4800 baud;
* `translator` contains `data_controller`, `lookup_table` and
  `translating_block`;
* `uart_tx` sends 8N1 frames at 57600 baud.

The clock is 100 MHz.

The translator works on whole words and does not accept text while a word is
being translated and sent. The input line is therefore 12 times slower than
the output line. After a space arrives, the next character can wait in the
data controller's one-byte hold register. A character is lost only if a third
one arrives before the word's codes have left. So a continuous stream works
for every word that produces up to 23 Braille codes. A lost character sets the
sticky `overrun` output.

| port          | dir | meaning                                                        |
|---------------|-----|----------------------------------------------------------------|
| `clk`         | in  | 100 MHz clock (`CLK_HZ`)                                       |
| `rst_n`       | in  | asynchronous reset, active low; restores the built-in table    |
| `uart_rxd`    | in  | text, 4800 baud 8N1 (`RX_BAUD`)                                |
| `uart_txd`    | out | Braille ASCII, 57600 baud 8N1 (`TX_BAUD`)                      |
| `load_mode`   | in  | high: received bytes are loaded as rules instead of translated |
| `busy`        | out | a group is being translated or sent                            |
| `overrun`     | out | sticky: a text character was lost                              |
| `frame_error` | out | one-clock strobe: a received frame had a low stop bit          |

Other parameters: `MAX_CHARS` = 40 characters per group and `RULE_DEPTH` =
512 rules.

## Loading another rule table

Raising `load_mode` clears the entry table and restarts at rule 0. Every 40
received bytes form one rule, sent least significant byte first:

* `codes[0..9]`;
* `right[0..9]`;
* `focus[0..9]`;
* `left[0..9]`, with `left[0]` being the character next to the focus.

Each rule is written at the next address. `find_entry` watches these writes
and records the first rule of each character. Rules must therefore be sent
grouped by first focus character, each group in trial order. `n_rules` counts
the rules loaded, and the search never reads past it. Only load while the
translator is idle. Reset returns to the built-in table.

## Source files

| file | what it is |
|------|------------|
| `rtl/braille_pkg.sv` | rule types, wildcards, context matching, built-in table |
| `rtl/braille_fpga_top.sv` | receiver + translator + transmitter |
| `rtl/translator.sv` | data controller + look-up table + translating block |
| `rtl/translating_block.sv` | the eight translating sub-blocks, wired |
| `rtl/data_controller.sv`, `rtl/lookup_table.sv` | input side and rule memory |
| `rtl/translating_controller.sv`, `rtl/find_entry.sv`, `rtl/output_rule.sv` | group store, entry table, rule sequencer |
| `rtl/focus_check.sv`, `rtl/right_context_check.sv`, `rtl/left_context_check.sv` | the three checks |
| `rtl/load_translated_codes.sv`, `rtl/output_translated_codes.sv` | verdict handling, output buffer |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | serial lines |

Each file opens with a description of its interface and timing.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. Testbenches that
compare translations use `tb/tb_braille_ref.svh`, an independent string-based
reference translator. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/braille_pkg.sv tb/tb_translator.sv --top-module tb_translator
    ./obj_dir/Vtb_translator

* `tb_braille_fpga_full` runs the top at its default parameters. It sends the
  sentence "The children and you sing with knowledge. " continuously at 4800
  baud and decodes the 57600-baud reply. About 9 million clocks.
* `tb_braille_fpga_top` runs the same system at a 2 MHz clock. It covers the
  40-character group, a hold and an overrun, a frame error, loading a table
  over the serial line, and exhausted rule groups, and counts that each one
  happened. It also sends a word of 23 codes followed at once by the next
  word, and checks that no character is lost.
* `tb_translating_block` and `tb_translator` compare random words against the
  reference translator.

## What is this design's own

These points follow the published design:

* the block structure;
* the rule form and the fixed-length rules ended by a 0;
* the check order: focus, then right context, then left context;
* the 40-character groups ended by a space;
* feeding back the number of translated characters;
* sending a group's codes only after it is fully translated;
* the baud rates and the 100 MHz clock.

The published description does not give the following, so they are choices
made for this RTL:

* **Rule table contents and wildcards.** The wildcard set is not given, and
  neither is the rule table (the description mentions 189 grade 2
  contractions). The three wildcards and the 95-rule table are this design's
  own. Blenkhorn-style tables also use multi-position wildcards ("one or more
  letters") and input classes and states. Neither is supported. The published
  design drops classes and states too.
* **Sizes.** The field length (10 bytes), the table depth (512 rules) and the
  output buffer (400 codes, enough for any 40-character group) are assumed.
* **Data controller.** The published design only names this block. Its case
  folding, one-byte hold, overrun flag and serial rule loading are this
  design's own.
* **Who addresses the rule memory.** In this RTL find-entry supplies the first
  address and output-rule reads the following rules.
* **Where failures go.** The published text routes a focus failure to the
  controller as well. Here only the final result of a character reaches the
  controller.
* **One word per group.** The published design sizes the 40-character
  buffer for about five words, but it also ends a group at a space and sends
  each word back before taking the next. This RTL ends a group at the first
  space, CR or LF, so 40 is only the upper limit for one long word.
* **Exhausted rule groups.** If no rule of a group fires, the character is
  emitted unchanged. With a complete table this never happens.
* **Characters.** Capitals are folded to lower case, and no capital sign is
  produced. Characters 128–255 have no entry and are passed through.
* **Glue.** The UART frame format (8N1), the handshakes and the asynchronous
  reset are assumptions.

Not included:

* the PC;
* the RS-232 line driver;
* the unused board parts (memory, Flash, Ethernet, the embedded processor);
* the microcontroller-based system on chip that was planned as future work.

## Notes for synthesis

`lookup_table` and the output buffer are plain arrays. The table has an
`initial` block that fills it with the built-in rules, which FPGA tools turn
into block-RAM contents. The entry table resets to constants computed from the
same built-in rules.

`output_translated_codes` writes its buffer without a reset, so it can map to
RAM. It also checks its write rules with immediate assertions under `rst_n`.
This is why lint reports `rst_n` as used both synchronously and
asynchronously.
