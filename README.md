# Multi-byte string matching with token-fed FSMs

This is RTL for a network intrusion detection string matcher. It takes one
32-bit network word per clock and reports, for each of a set of search
strings, whether the string appears in the packet. Each search string gets its
own small table-driven finite state machine (FSM). A plain table FSM that reads
32-bit words directly would need a table with 2^32 rows per state, which is far
too big. So a shared front end first turns each word into a short **token**.
The token says which piece of the string, if any, the word holds and at which
byte offset. Each FSM then only needs a table indexed by {5-bit state, 6-bit
token}, which is 12 Kbit and fits one FPGA block RAM.

Everything that depends on the rule set sits in lookup tables that are loaded
at run time: two ternary CAMs, the classifier-group tables, and the merge and
FSM tables. Changing the rules means reloading tables, not rebuilding the
hardware. Working out what goes into those tables is the hard part. It is
explained in detail below, and `tb/ids_compile_pkg.sv` contains a complete
reference compiler.

## Symbols: what a word can tell a string's FSM

Take a word of W = 4 bytes and the search string `ABCDEFGF` (length L = 8).
Byte 0 is the first byte on the wire. A word can relate to an occurrence of
the string in only three ways:

| kind | patterns (`*` = any byte) | meaning |
|---|---|---|
| window | `ABCD` `BCDE` `CDEF` `DEFG` `EFGF` | the word lies inside the string |
| end | `FGF*` `GF**` `F***`: the last k < W bytes, then wildcards | the string ends in this word |
| start | `*ABC` `**AB` `***A`: the first k < W bytes, after wildcards | the string starts in this word |

A word can match an end pattern of one occurrence and a start pattern of the
next occurrence at the same time, for example `GFAB` = `GF**` + `**AB`.
Because of that, a single priority classifier would lose information.
The design therefore classifies each word twice, in parallel:

* the **primary** symbol set is the windows (exact, no wildcards), then the
  ends with the longest first, then `****`;
* the **secondary** symbol set is the starts with the longest first, then
  `****`.

Within each set, the more bytes a pattern fixes, the higher its priority.
All ends are left-aligned and all starts are right-aligned. So two patterns in
the same set that fix the same number of bytes can never match the same word,
and the first match is always the longest one. The token of a word is the
index of its first match in the set.

## Front end: two TCAMs and a tree of classifier groups

```
                 +-------+   +----------+   +-----------+        +---------------+
 data ---+-----> | TCAM  |-->| level 2  |-->| level 1 0 |--+---->| merge + FSM 0 |--> match[0]
         |       | prim. |   | group    |-->| level 1 1 |--|-+-->| merge + FSM 1 |--> match[1]
         |       +-------+   +----------+   +-----------+  | |   |     ...       |
         |       +-------+   +----------+   +-----------+  | |   |               |
         +-----> | TCAM  |-->| level 2  |-->| level 1 0 |--+-+-->| merge + FSM 3 |--> match[3]
                 | second|   | group    |   | (4 outs)  |        +---------------+
                 +-------+   +----------+   +-----------+
```

* **TCAM** (`tcam`). Each entry holds a value, a care mask and a valid bit.
  The TCAM returns the lowest matching address. The primary TCAM holds the
  union of all strings' primary symbols, and the secondary TCAM holds the
  union of all strings' start symbols. Both are sorted by the number of fixed
  bytes and end with `****`, so a loaded TCAM always hits. Defaults: 753 and
  165 entries of 32 bits, which is what the reference rule set (74 strings)
  needed at 32 bits.
* **Classifier group** (`classifier_group`). A classifier group is one lookup
  table whose address is an input token. The output word is cut into one
  field per output; each field is that output's token. The level 2 group
  narrows the TCAM address to one token per level 1 group. Each level 1 group
  narrows that token to the token of each string it serves. The tree shares
  the expensive input classification between all strings. Only the small
  tables near the leaves are per string.

**Loading a group table.** The mapping from a symbol `g` of a wider set to a
narrower set is this: take the first symbol of the narrower set that contains
every word `g` contains (every fixed byte of it is fixed to the same value in
`g`). Suppose the wider set is ordered by fixed-byte count and includes every
symbol of the narrower one. Then this rule gives exactly the narrower set's
longest match for any word, so classifying in several steps gives the same
token as classifying directly. For example, for the string `ABCDEFGF` the
symbol `FGHI` (a window of another string, `CDEFGHIJ`) maps to `F***`.

The default tree is the four-string example: one primary level 2 group feeds
two level 1 groups of two strings each, and the secondary side has one level 1
group for all four strings. Four parameters (`N_P_L1`, `FSM_PER_P_L1`,
`N_S_L1`, `FSM_PER_S_L1`) set the shape. Both trees must serve the same
number of strings.

## Merge: one token per word for the FSM

`merge_stage` combines a string's primary token `p` and secondary token `s`
into the merged token the FSM reads:

* The compiler numbers a string's exact windows first, as `0 .. n_exact-1`.
  A window identifies the word completely, so if `p < n_exact` the merge
  passes `p` through unchanged. This is the **bypass**.
* Otherwise `p` is one of the W wildcard symbols (the ends and `****`). The
  small table at address `{p - n_exact, s}` gives the merged token. This
  token stands for the intersection of the two patterns (for example
  `FGF*` + `***A` gives `FGFA`). Pairs that cannot both match, such as
  `FGF*` with `*ABC`, are never addressed.

Because only wildcard primaries reach the table, it has W x W = 16 entries for
any string length. The merged symbol count (windows plus compatible pairs)
must fit in the 6-bit FSM token.

## FSM: Knuth-Morris-Pratt over whole words

`token_fsm` holds the state in a register. It reads `table[{state, token}]` =
`{next_state, match}` once per clock. The state is the length of the longest
tail of the stream seen so far that is also a proper head of the string
(0..L-1). So strings of up to 32 bytes fit a 5-bit state.

**Loading the FSM table.** For state `q` and merged symbol `c`, run an
ordinary byte search over the string's first `q` bytes followed by the 4
bytes of `c`. Treat a wildcard byte as a value that equals no character.

* `match` is set if an occurrence ends within the last 4 positions.
* `next_state` is the longest tail of that sequence that is a proper head of
  the string.

This is exact. The only parts of a word that can take part in an occurrence
are:

* a window, which the primary symbol gives exactly;
* a head at the end of the word, which the secondary symbol gives;
* a tail at the start of the word, which the primary symbol gives.

The state is forced to 0 on the first word of a packet, so occurrences never
run across packets. Idle cycles (`in_valid` low) leave the state unchanged.

`string_matcher` wraps the merge and the FSM. It also ORs the per-word match
flags over a packet into the bit that header-rule logic needs: `pkt_match`,
valid while `pkt_done` is high on the packet's last word.

## Timing

Every stage is registered and there is no back-pressure. A new word can enter
on every clock, whatever the rules or the data. The results for a word appear
5 cycles after it is presented: TCAM, level 2, level 1, merge, FSM. The
network word throughput is 32 bits/clock. `cls_miss` follows its word by 1
cycle and is set only when a TCAM has no matching entry, which means the
tables were not loaded.

## Interface of `ids_top`

| port | width | |
|---|---|---|
| `data` | 32 | network word, first byte in bits 31:24 |
| `in_valid`, `in_sop`, `in_eop` | 1 | word valid, first and last word of a packet |
| `match` | N_FSM | string f ends in the word presented 5 cycles earlier |
| `pkt_match`, `pkt_done` | N_FSM, 1 | per-string "found in packet" bits, valid while `pkt_done` |
| `merge_bypass` | N_FSM | status: merge took the exact-token path |
| `cls_miss` | 1 | status: a TCAM found no entry |
| `cfg_we`, `cfg_tgt`, `cfg_idx`, `cfg_addr`, `cfg_wdata` | 1, 4, 8, 16, CFG_DW | table write port; CFG_DW is the widest table word, 65 bits (a TCAM entry) at the default size |

Table writes: `cfg_tgt` (`ids_pkg::cfg_tgt_e`) selects the kind of table,
`cfg_idx` the instance (level 1 group or string) and `cfg_addr` the entry.

| target | address | data (LSB-aligned) |
|---|---|---|
| `CFG_P_TCAM`, `CFG_S_TCAM` | entry | `{valid, mask[31:0], value[31:0]}`, mask bit 1 = must match |
| `CFG_P_L2`, `CFG_S_L2` | TCAM address | level 1 group g's token in bits `[g*8 +: 8]` |
| `CFG_P_L1` | level 2 token | string k of the group in bits `[k*6 +: 6]` |
| `CFG_S_L1` | level 2 token | string k of the group in bits `[k*2 +: 2]` |
| `CFG_MERGE_NX` | - | number of exact primary tokens of string `cfg_idx` |
| `CFG_MERGE` | `{p - n_exact, s}` | merged token |
| `CFG_FSM` | `{state, token}` | `{next_state[4:0], match}` |

Writes can be made while traffic flows, but a rule change is only consistent
once all its tables are written.

## Sizes

| item | default | per instance |
|---|---|---|
| word | 32 bits | |
| primary / secondary TCAM | 753 / 165 entries | 32-bit value + mask + valid |
| primary level 2 group | 1024 x 16 bits | |
| secondary level 2 group | 256 x 8 bits | |
| primary level 1 group | 256 x 12 bits | x 2 |
| secondary level 1 group | 256 x 8 bits | x 1 |
| merge table | 16 x 6 bits | x 4 strings |
| FSM table | 2048 x 6 bits = 12 Kbit | x 4 strings |

String length must be between W-1 = 3 and 32 bytes. A shorter string could
start and end inside one word, surrounded by wildcards on both sides, which
no symbol covers. A longer one needs a wider state (`STATE_W`). A string's
merged symbol count must also stay within 64.

## How far this follows the published scheme, and where it departs

Taken from the scheme:

* the two-path classification (primary and secondary);
* TCAM input classifiers with lowest-address priority;
* classifier groups as shared-address tables with packed outputs;
* the level 2 / level 1 / merge & FSM stage structure;
* the merge bypass for wildcard-free symbols;
* table KMP FSMs;
* the sizes: 32-bit word, 6-bit token, 5-bit state, 753/165 TCAM entries.

Choices made here:

* **TCAM as logic.** The scheme uses external TCAM devices. Here `tcam` is a
  register array with a priority encoder, so the design simulates and
  synthesises as one unit. Swap it for a TCAM device interface if needed.
* **Tree size.** The default serves 4 strings, as in the small example
  architecture. The reference 74-string rule set at 32 bits would need 74
  string matchers. The TCAMs are sized for it, but the tree must be widened
  with the four shape parameters, as `tb_ids_workload` does.
* **Intermediate token width** (`MID_W` = 8), the token numbering that makes
  the bypass one compare, the table write port, and the sop/eop packet
  framing are this design's own.
* **Uniform tree.** Every level 1 group on one path serves the same number
  of strings. A tree with uneven fan-out, such as 2, 3 and 2 strings under
  three groups, needs either unused outputs or a hand-wired top.
* **Registered stages.** One register per stage gives 5 cycles of latency.
* **Whole words only.** A packet is a whole number of words, and there are no
  byte enables on the last word.
* **No case folding.** Rules are case-sensitive. Case-insensitive rules would
  need a second set of classifiers with case folded in the TCAMs.
* **Word size.** `WORD_BYTES` is a parameter. 4 (the default) and 8 bytes
  have been simulated. 1 byte would give zero-width secondary tokens. Wider
  words give more merged symbols per string, so long strings may no longer
  fit the 6-bit token.

## Simulating

All files are SystemVerilog 2017. The testbenches are self-checking and end
with a `TB_RESULT checks=N failures=M` line. For example, the end-to-end test
at full default size:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/ids_pkg.sv tb/ids_compile_pkg.sv rtl/tcam.sv rtl/classifier_group.sv \
  rtl/merge_stage.sv rtl/token_fsm.sv rtl/string_matcher.sv rtl/ids_top.sv \
  tb/tb_ids_top.sv --top-module tb_ids_top -o tb_ids_top
./obj_dir/tb_ids_top
```

| testbench | what it checks |
|---|---|
| `tb_tcam` | lowest matching address with many overlapping random entries, misses, 1-cycle latency |
| `tb_classifier_group` | every output field of random table words, 1-cycle latency |
| `tb_merge_stage` | bypass below the exact count, table path above it |
| `tb_token_fsm` | full random 2048-entry table against a model: packet-start reset, idle hold |
| `tb_string_matcher` | first, that the compiler's symbol sets for `ABCDEFG` equal the published example (8 primary, 4 secondary and 17 merged symbols); then compiled tables for five strings, including self-overlapping ones, the 3-byte minimum and a 16-byte string, with per-word and per-packet results checked against a byte search |
| `tb_ids_top` | the whole pipeline at default size: two rule sets loaded one after the other (a rule change), 600 random packets with planted occurrences ending at every byte offset, back-to-back pairs that end and start in one word, strings split across packets, and idle cycles; every result checked 5 cycles after its word |

| `tb_ids_word64` | the same procedure with `WORD_BYTES = 8`: two rule sets including a 7-byte string (the minimum at this width), occurrences ending at all 8 byte offsets |
| `tb_ids_workload` | the engine widened to 74 strings (37 primary level 1 groups of 2, 2 secondary groups of 37) with the default TCAMs: a 3-byte string and 73 generated signature-like strings of 4-12 bytes, which take 398 of the 753 primary and 22 of the 165 secondary entries, and 200 random packets |

`tb/ids_compile_pkg.sv` is the rule compiler used by the last four testbenches.
It builds the symbol sets, all table contents and the reference byte search.
Use it as the specification of table contents when writing a compiler in
another language.
