# Pre-decoded shift-and-compare string matcher for intrusion detection

Network intrusion detection has to check every byte of traffic against
hundreds or thousands of fixed strings ("content" patterns such as
`/cgi-bin/phf` or `/scripts/root.exe`). This RTL does it in hardware, one
byte per clock (or several bytes per clock in the wide variant), with an
individual match signal for every pattern.

It rests on three ideas:

1. **Pre-decoding.** Each byte is turned into a set of bit lines, one line for
   each character that appears in any pattern. After this, comparing one
   pattern character is just reading one bit.
2. **Shift and compare.** The decoded lines pass through a shift register. A
   pattern of length L matches when stage L-1 holds its first character, ...
   and stage 0 its last. So a pattern matcher is a single AND gate with one
   selected bit from each stage.
3. **Partitioning and prefix sharing.** The rule set is split offline into
   groups of patterns that use similar characters. Each group gets its own
   small pipeline that carries only that group's bit lines. Inside a group,
   patterns that start with the same four or eight characters share the
   hardware that matches those characters (the *tree* architecture).

## Hierarchy

```
ids_top                       byte stream in, match[rule] out
 ├─ ids_partition   (×NUM_PARTS, BYTES = 1)
 │   ├─ char_decoder          bit lines of this partition's characters
 │   ├─ char_pipeline         DEPTH stages of decoded lines
 │   ├─ unary_matcher         one per pattern ≤ 8 chars (or every pattern, TREE = 0)
 │   ├─ prefix_block          one per distinct level-1 / level-2 prefix (TREE = 1)
 │   └─ tree_matcher          one per pattern > 8 chars (TREE = 1)
 └─ ids_wide_partition (×NUM_PARTS, BYTES > 1)
     ├─ char_decoder          one per byte lane
     ├─ char_pipeline         stages are whole words
     └─ unary_matcher         BYTES per pattern, one per byte offset
ids_pkg                       types, key/line helper functions, default rule set
```

All structure is built when the design is elaborated, from the rule set given
as parameters. Constant functions in `ids_pkg` and `ids_partition` work out,
for each partition:

* which bit lines it needs;
* how deep its pipeline must be;
* which prefixes are shared.

No generator script is needed. To change the rule set, change the parameters.

## Rule set encoding

A rule is a right-aligned `ids_pkg::rule_text_t` (256 bits, `MAX_LEN` = 32
characters). This is exactly how a string literal is stored, so
`rule_text_t'("/cmd.exe")` is a valid rule. Byte 0 (bits 7:0) holds the *last*
character. In general, byte k is the character that must sit in pipeline
stage k at the moment the pattern has fully arrived. Every matcher relies on
this: the tap for byte k is simply stage k.

A pattern's length is the position of its highest non-zero byte, so **a
pattern cannot contain the byte 0x00**.

The top-level rule set parameters are:

| parameter | meaning |
|---|---|
| `NUM_RULES` | number of rules |
| `RULE_TEXT[NUM_RULES]` | the patterns |
| `RULE_NOCASE` | bit r set: rule r ignores letter case |
| `RULE_PART[NUM_RULES]` | partition number of each rule, 0 .. `NUM_PARTS`-1 |

The partition assignment comes from an offline tool. The method it stands for
works like this:

* Build a graph with one vertex per pattern.
* Add an edge between two patterns when they share a character. The edge
  weight grows with the number of leading characters they have in common.
* Cut the graph into `NUM_PARTS` groups so that few edges cross between
  groups.

The RTL takes the result as given. Any assignment works functionally; the
assignment only changes how many bit lines each pipeline carries.

The default rule set in `ids_pkg` is an illustrative set of 16 patterns (234
characters) in two partitions. The first partition holds `pattern1`,
`pattern2`, `root` and five `/cgi-…` URLs. The second holds `cracker`,
`hacker`, `/cmd.exe` and five `/scripts/…` URLs. The two partitions decode 25
and 22 distinct characters. `root`, `hacker` and `/scripts/..%c1%9c../` are
case-insensitive.

## Bit lines and case

Each bit line has a 9-bit key `{nocase, byte}`:

* A case-sensitive character, or any non-letter, uses `nocase = 0` and is
  compared on all eight bits.
* A letter of a case-insensitive rule uses `nocase = 1` with the lower-case
  byte. Its comparator ignores bit 5, the ASCII case bit.

So the input `A` can raise both the line `{0,'A'}` and the line `{1,'a'}`.

A partition's used keys form a 512-bit mask `USED`. Line i is the i-th set bit
of that mask. `ids_pkg::line_of()` converts a key into its line number, and
every matcher uses it to pick its taps.

## Timing of a match (both architectures)

```
edge E0   in_valid=1, in_char = last byte of the pattern
          -> stage 0 gets its decoded lines, fire <= 1
edge E1   matcher AND over the stages, qualified by fire -> match register
after E1  match[r] = 1 for exactly one clock
```

The match is set by the clock edge after the one that accepts the last byte:
it is high two clocks after the clock in which that byte is offered.

`in_valid` low stalls the whole design:

* no stage shifts;
* the prefix delay chains do not shift;
* `fire` is 0, so no match repeats while the pipeline holds.

A pattern may therefore arrive with idle clocks between its bytes.
Overlapping occurrences and several rules matching in the same clock are all
reported. `rst_n` is an asynchronous active-low reset that clears every
register.

## The tree architecture (TREE = 1)

This is the least obvious part. A pattern longer than eight characters is
split into three parts:

* a **level-1 prefix**: characters 0–3;
* a **level-2 prefix**: characters 4–7;
* a **suffix**: characters 8 .. L-1.

Four characters fit one 4-input LUT of decoded bits. Many web-attack patterns
share such prefixes. For example, `/cgi-bin/…` and `/cgi-win/…` share `/cgi`,
and every `/scripts/…` pattern shares both `/scr` and `ipts`.

A `prefix_block` does not wait for the whole pattern. It compares the **four
newest** stages with its four characters, so it fires as soon as its prefix
has arrived. The result goes into a flip-flop (`hits[0]`) and then down a
chain of delay registers (`hits[1..]`) that shift together with the character
pipeline. `hits[k]` therefore means "the prefix ended k+1 characters before
the byte now in stage 0".

For a pattern of length L, when its last byte is in stage 0:

| part | ended … characters before the last byte | tap used by `tree_matcher` |
|---|---|---|
| level-1 prefix (chars 0–3) | L-4 | `l1_hits[L-5]` |
| level-2 prefix (chars 4–7) | L-8 | `l2_hits[L-9]` |
| suffix char i (8 .. L-1) | L-1-i | stage L-1-i, read directly |

`tree_matcher` ANDs these taps with `fire` into its output register. The
timing is identical to the unary matcher, and the two architectures give
bit-identical outputs (the testbenches check both against the same
reference).

Sharing works through an owner rule. In each partition, the first tree rule
with a given level-1 prefix builds the level-1 block, and every later rule
with the same four characters taps that block's chain. Level-2 blocks are
shared only between rules that have the same first **eight** characters, so
each level-1 prefix has its own set of level-2 prefixes. Patterns of eight
characters or fewer keep a plain `unary_matcher`.

Compared with the unary form, each shared prefix saves four taps per extra
pattern. The cost is one delay chain per prefix block and a higher fanout on
the shared bits.

## Multi-byte variant (BYTES > 1)

To handle one fast channel, `ids_top #(.BYTES(4))` (or 8) accepts a word of
BYTES bytes per clock. Byte 0 of `in_char` comes first in the stream.

In each `ids_wide_partition`:

* every byte lane has its own decoder;
* `char_pipeline` stores whole decoded words;
* read backwards from the newest byte, the stored words form a byte window;
* each pattern gets BYTES `unary_matcher`s, one per byte offset o, reading
  the window from position o.

`match[r][o]` means "pattern r ended o bytes before the newest byte of the
accepted word". With `BYTES = 1` the index o is always 0.

The tree form is used only with `BYTES = 1`. With `BYTES > 1`, `TREE` has no
effect.

## Using it

```
ids_top #(
  .NUM_RULES(N), .NUM_PARTS(P), .RULE_TEXT(texts), .RULE_NOCASE(nc),
  .RULE_PART(parts), .TREE(1'b1), .BYTES(1)
) u_ids (.clk, .rst_n, .in_valid, .in_char, .match);
```

With no parameters you get the default 16-rule set, two partitions, tree
architecture, one byte per clock. `tb/tb_ids_workload.sv` shows how to compute
a larger rule set with a constant function and pass it in.

Build cost grows steeply with the rule set. The line-number and
prefix-sharing functions are plain loops evaluated at elaboration, and every
matcher is a distinct parameterisation that Verilator compiles to its own C++:

* 64 rules (1199 characters), 4 partitions: about 100 s to build, most of it
  C++ compilation; elaboration alone takes about 13 s;
* 128 rules: elaboration alone takes about 40 s.

Rule sets of evaluation size (hundreds of patterns) have not been simulated.

## Simulation

Each testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ids_top \
    rtl/ids_pkg.sv tb/tb_ids_ref_pkg.sv rtl/*.sv tb/tb_ids_top.sv
./obj_dir/Vtb_ids_top
```

| testbench | what it checks |
|---|---|
| `tb_ids_top` | Whole design at its defaults. Runs 40 000 clocks against a byte-history reference, and counts that each mechanism happens: matches in each partition, shared level-1 and level-2 prefixes, unary matches, case-insensitive matches on upper-case input, stalls inside a pattern, simultaneous matches in both partitions, every rule |
| `tb_ids_top_unary` | The same test with `TREE = 0` |
| `tb_ids_top_wide` | `BYTES = 4`: matches at every byte offset, several matches in one clock |
| `tb_ids_workload` | A generated rule set of 64 URL-style patterns (1199 characters) in 4 partitions (tree form) |
| `tb_ids_partition`, `tb_ids_wide_partition` (8 bytes) | One partition pipeline on its own |
| `tb_char_decoder` | All 256 bytes against eight line classes |
| `tb_char_pipeline`, `tb_unary_matcher`, `tb_prefix_block`, `tb_tree_matcher` | Each leaf block against its own model |

`tb/tb_ids_ref_pkg.sv` holds the reference model. It compares raw bytes, with
no decoded lines, so it does not share the design's logic.

## Where this RTL departs from, or adds to, the architecture it implements

* **Rule set and partition assignment.** Both are illustrative. The
  evaluation used the first 204, 361, 602 and 1000 rules of the Nikto web
  rule set (4518 to 19584 characters) with 1 to 8 partitions. The RTL is
  parameterised for such sets, but is only exercised here with up to 64
  generated rules (see the build cost above).
* **Choices of this implementation.** The architecture leaves the following
  open, so this RTL chooses them:
  * the handshake (`in_valid` as stall);
  * the output register and two-clock latency;
  * the reset;
  * the case-insensitive key scheme;
  * the restriction to 32 characters and no 0x00 byte.
* **Prefix delay chains.** The architecture says that the prefix results are
  registered, "appropriately delayed" and combined with the suffix. This RTL
  delays them with one chain per shared prefix and lets each pattern pick its
  tap. Both prefix levels therefore read the same four newest stages, and
  differ only in the tap they give; a drawing of the original places the
  level-2 block further along the pipeline than the level-1 block.
* **Multi-byte matchers.** Only their principle is given (duplicated,
  offset matchers). The window arrangement here is the simplest form of that
  principle.
* **Deep-end pruning.** Characters used only near the front of patterns are
  not carried deep into the pipeline. This is left to synthesis: unread stage
  bits have no load and are removed.
* **Measured results.** Clock rates of 200–250 MHz and densities of 5 to 7
  pattern characters per slice on Virtex-II Pro were measured for the original
  generated designs. They have not been reproduced for this RTL.
