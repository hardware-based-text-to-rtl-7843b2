# Text-to-Braille translator in hardware

This is a text-to-Braille translator for grade-2 (contracted) English, done entirely in
logic. ASCII text comes in. Braille ASCII goes out: one printable character per six-dot cell,
in the North American Braille ASCII code. Contractions replace common words and letter
groups with single cells. For example, `the` becomes `!`, `and` becomes `&`, `ing` becomes `+`,
and `but` on its own becomes `B`.

The translation works by rule matching, after Paul Blenkhorn's table-driven method. Each rule
reads

    left-context [focus] right-context = output

For example, `~[BUT]~ = B` means: the letters `BUT` become `B` when there is a non-letter on
both sides. The hardware takes the first character not yet translated. It looks up the rules
whose focus starts with that character and tries them in table order. The first rule whose
focus, left context and right context all match the text is applied. The rule's output cells
are emitted, and the position moves forward by the length of the focus. If a character has no
rules, it is copied to the output unchanged. This is how spaces, digits, punctuation, `X` and
`Z` pass through.

The RTL is a re-implementation of a published FPGA design. The block structure, the
rule-matching algorithm, the five-word groups and the serial rates follow that design. The
rule table, every width and timing, the handshakes and the corner-case behaviour are this
implementation's own choices. They are listed in "Where this design makes its own choices"
below.

## Block structure

```
            rxd ──► uart_rx ──► translator ──► uart_tx ──► txd        (braille_fpga_top)

  translator
  ├── data_controller          gathers bytes into a group of five words
  ├── look_up_table            rule ROM, 128 × rule_t, synchronous read
  └── translating_block
      ├── translating_controller   holds the group, steps the position
      ├── find_entry               character → address of its first rule, or fail
      ├── output_rule              fetches rules one by one, presents them
      ├── focus_check          ┐
      ├── right_context_check  ├   evaluate the presented rule concurrently
      ├── left_context_check   ┘
      ├── load_translated_codes    accept → emit codes + advance; reject → next rule
      └── output_translated_codes  buffers a group's codes, sends them one by one
```

`braille_pkg` holds the shared types (`rule_t`, `entry_t`), the sizes, the character-class
helpers and the rule table itself.

## The rule table

`rule_t` is a packed struct with these fields:

| field | size | meaning |
|---|---|---|
| `left[0..1]`, `left_len` | up to 2 chars | `left[0]` is the character right before the focus |
| `focus[0..5]`, `focus_len` | up to 6 chars | `focus[0]` is the entry character |
| `right[0..1]`, `right_len` | up to 2 chars | `right[0]` is the character right after the focus |
| `out[0..1]`, `out_len` | up to 2 cells | output Braille ASCII |

In a context, two characters are classes rather than literals:

- `~` matches any non-letter: a space, punctuation, or text outside the group.
- `!` matches any letter A–Z.

The table is built at elaboration by `build_rules()`, written as calls such as
`mk("~", "BUT", "~", "B")`. Rules are grouped by their first focus character, in ASCII order.
Within a group, rules come in priority order, and the group ends with a catch-all rule that maps
the single letter to itself. `find_entry`'s 256-entry table is computed from the rule table by
`build_entries()`, so the two cannot drift apart. To change the language, edit
`build_rules()` and nothing else.

The table has 68 rules. It is a representative subset of English grade 2:

- whole-word signs (`but`, `can`, `do`, `every`, …, `you`) guarded by `~` on both sides
- the strong contractions `and`, `for`, `of`, `the`, `with`
- the group signs `ch gh sh th wh ed er ou ow st ar ing`
- the middle group signs `ea bb cc ff gg`, guarded by `!` on both sides

It does not cover the full standard. Capitals signs, number signs, and short-form words are not
generated. Every rule's output is no longer than its focus, so a group of N characters produces
at most N cells. The output buffer is sized on that basis.

## How a group is translated

1. **Collect.** `data_controller` folds each byte to upper case and appends it to a 64-byte
   buffer. The group closes on one of three conditions:
   - the fifth space (five words)
   - a CR or LF
   - a full buffer

   The closing character belongs to the group. The controller then raises `grp_valid`.
2. **Take.** The group is taken only when `translating_controller` is idle *and*
   `output_translated_codes` has finished sending the previous group. The group is then copied
   into the translating controller's registers. The data controller's buffer is free again
   immediately, so the next group can be collected while this one is translated.
3. **Step.** For position `pos`, the controller sends `text[pos]` to `find_entry`. One cycle
   later, `find_entry` returns either the first rule address or *fail*.
4. **Rule loop** (`output_rule`, four cycles per rule):
   - FETCH: the address goes to the ROM.
   - LATCH: the rule is registered.
   - CHECK: `rule_valid` is raised, and the three checks evaluate the rule combinationally
     against the whole group.
   - WAIT: `load_translated_codes` answers, one cycle later.

   On reject, the next address is fetched. If the fetched rule no longer starts with the entry
   character, or the slot is empty, or the table ends, no rule applied. The character is then
   passed through.
5. **Apply.** `load_translated_codes` writes the rule's output cells into the output buffer.
   It also reports `adv_cnt` = focus length back to the controller, which moves `pos` on and
   returns to step 3.
6. **Send.** When `pos` reaches the group length, `group_done` switches the output buffer to
   sending. The cells leave one per `out_valid`/`out_ready` handshake. `busy` stays high until
   the last cell is taken, and only then can the next group start.

The checks need some context:

- `focus_check` reports `focus_end = pos + focus_len`. `right_context_check` starts from that
  position.
- Text beyond the end of the group reads as a space.
- The left context comes from `left_text`, which the controller builds from the characters
  before `pos`. At the start of a group, the last two characters of the previous group are used.
  After reset, both characters are spaces.

### Timing

Costs are as follows, in cycles:

| item | cost |
|---|---|
| a character | 2 (step, entry lookup) + 4 per rule tried + 1 to report |
| a pass-through character | about 4 |
| a group | one extra cycle at the end |

The longest rule group in the table has five rules (`E`), so a character costs at most about
22 cycles. A 64-character group therefore needs at most about 1,400 cycles; a group of 63 `E`s
and a line end, the worst case for this table, measures 1,391.

At the assumed 100 MHz clock, one bit at 57,600 baud is 1,736 cycles. So a group is translated
within the time the output line needs for a single bit, as the original design claims. The
end-to-end test checks this on serial traffic; its slowest group took 881 cycles.

## The serial setup

`braille_fpga_top` matches the original test arrangement:

- Text arrives from a host over RS-232 at 4,800 baud.
- The Braille result goes back at 57,600 baud.
- Both directions use 8N1 frames, LSB first.

The bit periods are derived from `CLK_FREQ_HZ`. `uart_rx` synchronises the line through two
flip-flops and samples each bit in the middle. A frame with a low stop bit is dropped and
reported on `frame_err`. `uart_tx` accepts a byte on `tx_valid && tx_ready`. An assertion
checks that an offered byte stays stable until it is taken.

The output runs twelve times faster than the input. A group's cells have therefore left long
before the next five words have arrived, and at these rates no byte is lost. `in_overflow`
pulses only when the output is held back while input keeps arriving.

## Parameters

| parameter | default | where |
|---|---|---|
| `CLK_FREQ_HZ` | 100 000 000 | top (own choice) |
| `RX_BAUD` / `TX_BAUD` | 4800 / 57600 | top (original design) |
| `BUF_LEN` | 64 | top, translator, data/translating controller, checks (own choice) |
| `WORDS_PER_GROUP` | 5 | top, translator, data controller (original design) |
| `NUM_RULES`, `FOCUS_MAX`, `LEFT_MAX`, `RIGHT_MAX`, `OUT_MAX` | 128, 6, 2, 2, 2 | `braille_pkg` (left context of one or two characters follows the original; the rest is own choice) |

## Where this design makes its own choices

- **Rule contents.** The original relies on Blenkhorn's complete Standard English Braille
  tables, which include input classes and states. Like the original hardware, this design
  keeps only the rules. The 68-rule subset and the `~`/`!` context classes are this
  implementation's own.
- **Group closing.** The original describes both "five words at a time" and "translate when a
  space arrives". This design closes groups at the fifth space. It also closes them at a line
  end or a full buffer, so that short last lines and very long words are still translated. A
  group cut by a full buffer can split a word; the right context then sees a boundary there.
- **Case.** Lower case is folded to upper case, and no capitals sign is produced.
- **Rule table loading.** The original block diagram shows a path from the data controller to
  the rule table, which suggests the table could be loaded at run time. Here the table is a
  constant ROM, with no load path.
- **Where the left context comes from.** The original says only that the left-context check
  looks at one or two previously translated characters. Here the translating controller
  supplies the two input characters before the focus, including across a group boundary.
- **No-match fallback.** When no rule of a character matches, the character passes through.
- **Timing and handshakes.** All cycle timing, the valid/ready handshakes, the
  overflow-and-drop behaviour and the status outputs are this design's own.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/*.sv tb/tb_translator.sv --top-module tb_translator
./obj_dir/Vtb_translator
```

`rtl/braille_pkg.sv` must come before the modules that import it (the `rtl/*.sv` glob does
this).

The testbenches:

- `tb_braille_fpga_top` runs the whole FPGA at its default sizes. It sends text as serial
  frames at 4,800 baud and decodes the 57,600-baud reply with its own sampler. It compares the
  reply with hand-worked translations. It also requires each of the following at least once:
  - five-word, line-end and full-buffer groups
  - pass-through characters
  - rejected-and-retried rules
  - applied rules that depend on left context, right context or a multi-character focus

  It takes about 15 s.
- `tb_translator_stream` sends about 2,000 characters of random sentences through the
  translator. The sentences mix case, punctuation and line ends. The testbench compares the
  output with a reference model inside it: a plain sequential rule search over the whole text.
- `tb_translator` and `tb_translating_block` check the same translations at the byte and group
  level. They also check the input overflow and the per-group cycle bound.
- The unit testbenches check each sub-block against values worked out by hand.

Example translations used in the tests:

| text | Braille ASCII |
|---|---|
| `The cat and the dog ` | `! CAT & ! DOG ` |
| `But it is so` | `B X IS S` |
| `Singing with them` | `S++ ) !M` |
| `every child should read` | `E *ILD %\LD R1D` |
| `rabbit coffee egg` | `RA2IT C(FEE EGG` |
