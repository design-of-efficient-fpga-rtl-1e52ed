# NFA pattern matching co-processor for network intrusion detection

An intrusion detection system has to check every packet payload against
thousands of signature strings. Done in software, that search dominates the
run time. This design does the search in FPGA logic instead. Every signature
becomes its own small circuit, and all of them look at the same character in
the same clock cycle. So the cost of adding a pattern is area, not time. The
circuit takes one payload character per clock (8 bits per cycle). At 100 MHz
that is 800 Mb/s, however many patterns are loaded.

The circuits are non-deterministic finite automata (NFAs) built in hardware.
Each pattern character is one flip-flop and one AND gate. An active bit moves
along the chain while the text keeps matching. The key area saving is a single
8-to-256 decoder that all patterns share. It turns the current character into
256 one-hot "this is character c" lines. A pattern character therefore needs
only the one decoder line it cares about, not its own 8-bit comparator.

The same cell-and-chain idea extends to the options that real signatures use:

- case-insensitive strings;
- strings that must lie inside a window of positions in the packet, or at a
  bounded distance after another string;
- approximate matches that allow up to k differences;
- strings that only count inside the argument of a request line (for example
  the URL of an HTTP `GET`), plus a length check on that argument that flags
  buffer overflow attempts.

A second datapath handles four characters per clock for higher line rates.
Two controllers connect the matcher to the SRAM banks through which a
network processor hands over packets and collects results.

## Character match cells and the shared decoder

`char_decoder` registers the incoming character and sets exactly one of its
256 output lines. The line is left low when no character is present, which is
how idle cycles and unused lanes are masked. `nocase_select` picks the line
for one pattern character. For a case-insensitive letter it ORs the upper-
and lower-case lines, which differ only in bit 5. One cell then serves both
cases.

`char_match_unit` is one NFA state. Its flip-flop holds "the pattern so far
matched up to the previous character". Its output is that bit ANDed with the
decoder line. `string_nfa` chains LEN of these cells:

```
 en_in --AND(c0)--> [FF] --AND(c1)--> [FF] --AND(c2)--> ... --AND(cLEN-1)--> hit
```

`en_in` says "a match may start here". For an ordinary pattern it is tied
high, because any text may come before a signature. `hit` is combinational.
It is high in the cycle of the pattern's last character.

Every chain takes two control signals:

- `adv`: a character is present. The flip-flops only move on `adv`, so stall
  and idle cycles leave all match state untouched.
- `sop`: the first character of a packet. At `sop` every stored bit is
  ignored, so no match can run across two packets.

### Shared prefixes (`prefix_tree_nfa`)

Strings that begin with the same characters compute the same values in their
first cells, so only one copy of those cells is needed. `prefix_tree_nfa`
takes a list of strings and builds cell j of a string only when no earlier
string in the list has the same first j+1 characters and the same case rule.
Otherwise that position is a wire to the earlier string's cell. The chains
merge into a tree rooted at the first character:

```
            +--AND(c)--> [FF] --> hit "abc"
 AND(a)-->[FF]--AND(b)--+
                        +--> hit "ab"
            +--AND(d)--> [FF] --> hit "abd"
```

So {`abc`, `abd`, `ab`} needs 4 cells instead of 8. The sharing is worked
out when the circuit is elaborated, from the string parameters; the number
of cells built is available as `N_CELLS`. The matcher uses one tree for its
plain strings (`abc`, `cd`, `abd`, `USER`). `abc` and `abd` share the cells
for `ab`.

## Pipeline of the one-character-per-cycle matcher (`hids_matcher_top`)

```
 32-bit words -> input_buffer -> char_decoder -> pattern circuits -> match_vector -> output_encoder -> 32-bit result words
                 (1 char/clk)    (registered)    (all in parallel)   (per rule)       (after each packet)
```

- **`input_buffer`** holds one 32-bit word and sends out its characters one
  per clock. The first character is in bits 31:24. It asks for the next word
  in the cycle its last character leaves, so a continuous input gives one
  character every clock with no bubbles. `in_last` marks a packet's last
  word. `in_nbytes` gives how many bytes of that word are valid, with 0
  meaning 4.
- **Stage 1** is the decoder register, together with the character's valid,
  start-of-packet and end-of-packet flags. All pattern circuits evaluate in
  this stage.
- **`match_vector`** turns the one-cycle hit pulses into per-packet facts. It
  keeps a sticky flag per pattern, cleared at the packet start. For a rule
  made of two strings, it ANDs the two flags. For the approximate rule it
  keeps the smallest number of differences seen. Its `*_now` outputs already
  include the current character, so the result is complete in the cycle of
  the packet's last character.
- **`output_encoder`** loads the whole result vector in that cycle. It then
  sends the vector as 32-bit words over a valid/ready handshake, with
  `out_last` on the final word. The next packet is matched while it sends.

**Latency.** A character is matched two clocks after its word is accepted.
The result record is loaded in the cycle of the last character, and its
first word is offered on the next clock. A packet of n characters, sent
without gaps into a result sink that is always ready, therefore takes n + 4
clocks from its first word to its last result word: 68 clocks (0.68 µs at
100 MHz) for 64 bytes, and 1504 clocks for 1500 bytes.

**Stall.** If the encoder is still sending the previous record when the next
packet ends, the pipeline freezes with that last character held in stage 1.
`adv` goes low and the input buffer stops. Once the encoder is free, the
character is processed and the record loaded. A sink that takes one result word
per clock only causes stalls behind packets of a few characters, shorter than
the time it takes to send one record.

### Result record

Two words per packet, in this order:

| word | bits | meaning |
|------|------|---------|
| 0 | `N_RULES-1:0` | bit r set: rule r matched somewhere in the packet |
| 1 | `K_BITS-1:0` | fewest differences found for the approximate rule |
| 1 | 8 | the approximate rule matched (bits 1:0 are valid) |

## Position constraints: bounded wildcards

Signature options such as *offset/depth* ("starts at least `offset`
characters into the packet and ends within `depth` characters of that
point") and
*distance/within* ("starts at least `distance` characters after the previous
string, and within a further span") are turned into bounded wildcards in
front of the string:

```
 (any character, at least MIN_GAP times) (any character, at most MAX_GAP times) PATTERN
```

- **`wildcard_min`** (`*≥N`) is a chain of N flip-flops that delays the
  enable by N characters. With `HOLD=1` a final flip-flop feeds back on
  itself, so the enable stays on for the rest of the packet ("at least N").
  With `HOLD=0` the gap is exactly N.
- **`wildcard_max`** (`*≤N`) ORs the enable with N delayed copies of itself.
  That opens a window N+1 characters wide.
- **`content_matcher`** joins them in front of a `string_nfa`.
  - offset/depth: `x = sop`, `MIN_GAP = offset`, `HOLD = 0`,
    `MAX_GAP = depth - length`. The string must start in characters
    `offset .. offset+depth-length`, counting from 0.
  - distance/within: the previous string's hit (delayed one character,
    `AFTER_HIT=1`) is the start condition, with `MIN_GAP = distance` and
    `MAX_GAP = within - length`.

Both wildcard blocks let *any* character pass while they wait. A version
that let everything pass except the pattern's first character would be
smaller, but it is only correct for one-character patterns. With a longer
pattern, a partial match that fails would end the wait early and miss a
later real match.

`within` is counted from the end of the `distance` gap, just as `depth` is
counted from `offset`. Some signature engines count `within` from the end of
the previous match instead. With `distance = 1` the two readings differ by
one character.

## Approximate matching (`approx_matcher`)

This is the least obvious part of the design. The question is: does any
piece of the text differ from the pattern P1..Pm by at most K edits? An edit
is a changed character, an extra character, or a missing character.

The circuit holds a grid of flip-flops. Bit (i, j) means "the first j
pattern characters have been matched, using i edits, ending at the
previous character". Row i = 0 is the plain `string_nfa` chain. For each
character, and using the states before it:

| move | from | to | condition |
|------|------|----|-----------|
| match | (i, j-1) | (i, j) | the character equals Pj |
| substitution | (i-1, j-1) | (i, j) | any character |
| insertion | (i-1, j) | (i, j) | any character; the text has an extra character |
| deletion | (i-1, j-1) | (i, j) | within the same character step; Pj is skipped |

Because deletions use no character, they chain inside one step. In the
logic, the new value of (i, j) ORs in the *new* value of (i-1, j-1). That
gives a combinational ripple along each diagonal, K cells long. The start
state (0,0) is not stored; it is `en_in`. Deletions out of (0,0) enter the
grid as (i, i) wherever `en_in` is high. The states (i, 0) for i > 0 are
left out, since text before a match costs nothing.

Output i is the last column, (i, m). `out_next` is the value being written
for the current character, so the match ends at this character. `out_q` is
the registered copy. Several outputs can be high together, because a text
that matches with one edit also matches "with two". `priority_encoder` picks
the lowest active output, which is the smallest edit count. The match vector
keeps the smallest count over the packet.

Cost is (K+1)·m flip-flops. Per cell there is an OR of up to four terms. The
testbench compares the circuit with a dynamic-programming edit-distance
calculation (the Sellers variant, where a match may begin anywhere) at every
character.

## Request-line analysis (`protocol_analyzer`, `char_counter`)

Some signatures only mean something inside the argument of a request method,
such as the URL after `GET`. A small controller tracks where the current
character sits:

```
 IDLE --method string ends--> CMD --whitespace--> WS --non-space--> ARG --whitespace--> IDLE
```

- Method strings (`GET`, `POST`, `HEAD` in the example) are `string_nfa`
  chains. Any method hit moves the controller to CMD, from any state.
- CMD followed by anything other than whitespace drops back to IDLE. So
  `GETX` does not open an argument.
- `en_args` is high for every argument character, from the first
  non-whitespace character after the method until the next whitespace.
  Whitespace means space, tab, CR or LF.
- Argument strings are `string_nfa` chains whose start enable is `en_args`.
  Their hit also needs `en_args`, so the whole string must lie inside one
  argument.
- `char_counter` counts argument characters. It restarts at each argument
  and raises `overflow` once the count exceeds `MAX_ARG` (16 in the example).
  This flags requests whose argument is long enough to be a buffer overflow
  attempt.

## Four characters per clock (`parallel_datapath`)

For more throughput the same idea is applied to a whole 32-bit word per
clock.

`parallel_decoder` holds four decoders, one per byte lane. Lanes beyond
`in_nvalid` in a packet's last word are forced to "no character".

`parallel_string_nfa` builds one row per possible starting lane of the
pattern:

- Row r places pattern character j on lane (r+j) mod 4 of word (r+j)/4.
- Each row is an AND of the lines that fall in one word, followed by a
  pipeline flip-flop. That flip-flop passes the partial match to the next
  word.
- The pattern's hit is the OR of the rows' final ANDs.

`parallel_datapath` runs four example strings. It gives each packet's
results two clocks after the packet's last word, with `match_valid`.

In the top level this datapath sits beside the one-character pipeline and
has its own `w_*` ports.

## Packet exchange through SRAM banks

On the board, a network processor and the FPGA share single-ported SRAM
banks. Each bank has a lock that either side can hold. Two banks carry
packets to the FPGA and one carries results back.

**`sram_packet_reader`** works the two packet banks in alternation: lock,
read, clear, release. While the FPGA empties one bank, the network processor
can fill the other. The bank layout is:

| word | content |
|------|---------|
| 0 | number of packets P (0 = empty; the reader writes 0 when done) |
| then, per packet | header, bits 15:0 = length in bytes, followed by ceil(length/4) payload words (first character in bits 31:24) |

The reader prefetches payload words into an 8-word buffer and only reads
while there is room. With the buffer drained it reads one word per clock.
Packets of length 0 are skipped. An empty bank is released and polled again.

**`sram_result_writer`** handles each result record in one lock period:

1. Lock the result bank.
2. Read the count of stored words from word 0.
3. Append the record behind them.
4. Write the new count back to word 0, then release the lock.

The network processor consumes records by reading them and writing 0 to
word 0. If a record would not fit, the writer releases the lock, waits
`HOLDOFF` clocks and tries again. Meanwhile the result stays in the output
encoder, so back-pressure reaches all the way to the packet reader.

Both controllers assume synchronous banks: read data appears one clock after
the address, and a bank is touched only while its lock is granted (checked by
an assertion). **`hids_coprocessor_top`** connects reader, matcher and
writer. It brings the bank and lock signals out as ports, for the board's
memories and lock logic.

## Baselines: brute force and distributed comparators

Two older hardware matching styles are included for comparison. Each stands
beside the co-processor in `hids_coprocessor_top` with its own ports (`b_*`).
Both watch the same character stream for the same two strings, `snort` and
`stat ` (any case). Neither uses the shared decoder, so both take the raw
8-bit character.

- `brute_force_matcher` keeps no match state. A shift register holds the
  last characters of the packet, as many as the longest string needs.
  Every clock, each string is compared in full against the newest
  characters: m comparators for a string of m characters, all ANDed. A
  valid bit per register slot empties the window at a packet start.
- `comparator_nfa` is the same cell chain as `string_nfa`, but each cell
  has its own comparator instead of a decoder line. The comparator is two
  4-input tables, one per half of the character, ANDed. For a
  case-insensitive letter the high-half table accepts both high halves.

Both give their hits in the same cycle as the decoder-based chains, so all
three can be compared character by character. In an FPGA the brute-force
style costs about m comparators plus m register bytes per string. The
comparator style costs two 4-input tables per character, and every cell
needs all 8 character bits routed to it. The decoder style needs one line
per cell.

## Module map

| module | role |
|--------|------|
| `hids_coprocessor_top` | top level: packet reader, matcher, result writer; bank ports; four-wide datapath ports |
| `sram_packet_reader`, `sram_result_writer` | SRAM bank controllers |
| `hids_matcher_top` | one-character-per-clock matcher holding the example rule set |
| `input_buffer`, `char_decoder`, `match_vector`, `output_encoder` | pipeline stages |
| `char_match_unit`, `nocase_select`, `string_nfa`, `prefix_tree_nfa` | NFA cells, string chains, and string sets with shared prefixes |
| `wildcard_min`, `wildcard_max`, `content_matcher` | position constraints |
| `approx_matcher`, `priority_encoder` | k-differences matching |
| `protocol_analyzer`, `char_counter` | request-line analysis |
| `parallel_decoder`, `parallel_string_nfa`, `parallel_datapath` | four-characters-per-clock datapath |
| `brute_force_matcher`, `comparator_nfa` | baseline matchers beside the co-processor |
| `hids_pkg` | character, decoder and pattern types; helper functions |
| `hids_rules_pkg` | the example rule set |

Reset is asynchronous and active low throughout. Patterns are passed as
string parameters (`pat_t`, up to `MAX_PAT` = 16 characters), right-aligned,
with the first character in the most significant byte.

## The built-in rule set and how to change it

The matcher is meant to be generated from a signature file, one circuit per
rule. This repository carries a small hand-written example, chosen so that
every mechanism is exercised:

| rule | signature |
|------|-----------|
| 0 | `abc` and `cd` both in the packet |
| 1 | `abd` (shares its first two cells with `abc` of rule 0) |
| 2 | `stat ` in any letter case |
| 3 | `snort` with offset 2, depth 8 |
| 4 | `USER`, then `root` with distance 1, within 10 |
| 5 | `abcd` with at most 2 differences |
| 6 | `/bin/sh` inside a request argument |
| 7 | request argument longer than 16 characters |

To change it:

1. Edit the constants in `hids_rules_pkg`.
2. Add or remove strings in the prefix tree's list, or `content_matcher`,
   `approx_matcher` or protocol analyzer instances, in `hids_matcher_top`.
3. Wire each instance's hit to its rule bit.

Rules made of several strings use the second input of `match_vector`, with
`TWO_PAT` set for that rule. Rules with more than two strings need a wider
match vector.

The four-wide datapath takes its strings from its `PATS`, `LENS` and
`NOCASE` parameters. The test references (`hids_expected` in
`tb/tb_ref_pkg.sv`, and the expected four-wide results in the top-level
testbenches) encode the example set and must follow any change.

The sizes built here are small. The example uses 48 pattern characters
(8 rules plus 3 method strings, 46 cells after prefix sharing) in the
one-character path and 17 in the
four-character path. A full public signature set has around 17,500 pattern
characters. It would be the same structure with many more instances: about
one flip-flop and one small gate per pattern character, plus the shared
decoders. The real signature text is not part of this repository.

## Departures and limitations

- **Per-packet overhead.** A hardware matcher built on this scheme was
  reported with about 21 cycles of setup and 39 cycles of output per packet.
  Here setup is two clocks and output is one clock per result word. Those
  figures belong to that implementation's result vector and board interface,
  which are not reproduced.
- **Wildcard waits accept any character.** See the position constraints
  section for why.
- **String hits are combinational.** The last flip-flop of each chain (and
  the output flip-flop column of the four-wide rows) is left out. The
  per-packet result register in the match vector takes its place. Matching
  is unchanged; the result is ready in the cycle of the last character.
- **`within` semantics.** See the position constraints section.
- **Prefix sharing is partial.** Only plain strings (no position window,
  approximate or argument condition) go into the prefix tree. Strings with
  options and the four-wide datapath keep one chain per string.
- **Prefix-tree elaboration time.** `prefix_tree_nfa` finds the shared cells
  with constant functions. Their cost grows quickly with the number of
  strings. Verilator elaborates 32 strings in seconds, but 248 strings
  (2,001 characters) did not finish within 10 minutes. For large rule sets the
  sharing is better worked out by whatever writes the rule set, with this
  module's search kept for small sets.
- **Baselines are minimal.** They run at one character per clock, with no
  four-wide versions and no prefix tree for the comparator style. They are
  there for comparison and do not feed the result records.
- **Protocol analysis details.** At least one whitespace character must
  follow a method. The whitespace set and `MAX_ARG` are choices of this
  design.
- **Bank formats.** The SRAM layouts, the lock handshake and the bank sizes
  are this design's conventions. The network processor software must match
  them.
- **Lint notes.** Verilator reports `rst_n` as used both as an asynchronous
  reset and synchronously. The synchronous use is the `disable iff` of the
  handshake assertions, not logic. Unused-signal notes remain for outputs the
  example rule set does not use, such as `out_q` of the approximate matcher,
  and for the clock and reset of one-character chains, which have no
  flip-flops.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and stops, and each has a watchdog.
Expected values come from reference functions in `tb/tb_ref_pkg.sv`, not from
the circuits. These are substring searches, window checks, an edit-distance
table and a request-line parser. With Verilator 5:

```
verilator --binary --timing --assert \
  rtl/hids_pkg.sv rtl/hids_rules_pkg.sv tb/tb_ref_pkg.sv tb/tb_hids_coprocessor_top.sv \
  -y rtl -y tb --top-module tb_hids_coprocessor_top -Mdir obj
./obj/Vtb_hids_coprocessor_top
```

Replace the testbench name to run another one.

- `tb_hids_coprocessor_top` runs the complete design at its default sizes.
  Random packet batches go through modelled SRAM banks and locks, and every
  result record is compared with the reference. It also checks the
  four-wide datapath. It counts each mechanism and fails if one never
  happened. The mechanisms are:
  - stall;
  - empty packet;
  - empty-bank polling;
  - both packet banks;
  - result-bank contention;
  - partial last word;
  - case-insensitive hit;
  - window hit and miss;
  - distance/within hit;
  - approximate hits with 1 and 2 edits;
  - argument string;
  - argument overflow;
  - four-wide hit;
  - both strings of the shared prefix `ab` in one packet;
  - a baseline hit (the same packets go through both baseline matchers,
    checked at every character).
- `tb_hids_matcher_top` does the same for the matcher alone, with random
  back-pressure on the result port.
- `tb_hids_matcher_top` also measures the n + 4 clock latency for 64- and
  1500-byte packets.
- `tb_brute_force_matcher` and `tb_comparator_nfa` check the two baselines
  against a direct comparison for six strings, one of them case-insensitive.
- `tb_prefix_tree_capacity` runs a generated set of 32 strings (284
  characters, 227 cells after sharing) against random traffic.
- `tb_prefix_tree_nfa` checks every hit of a six-string tree against a
  direct comparison, and that exactly 11 cells are built for 18 characters.
- `tb_approx_k_sweep` runs the approximate matcher for an 8-character pattern
  at k = 0, 1, 2 and 4 side by side.
- `tb_input_buffer` checks that a continuous input gives one character per
  clock. `tb_sram_packet_reader` checks one payload word per clock.
  `tb_parallel_datapath` checks the two-clock result latency.
