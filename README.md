# Shift-or signature matcher for network intrusion detection

A network intrusion detection system has to check every byte of the traffic
against a library of attack signatures: fixed strings such as `/etc/passwd` or
`cmd.exe`. This RTL does that exact-string search in hardware, at a fixed rate
of one or two bytes per clock, whatever the traffic contains.

Every signature (a *rule*) gets its own small matcher, and all matchers see the
same byte stream. A matcher is a ROM followed by a chain of OR gates and
flip-flops. It runs the *shift-or* string-matching algorithm in parallel over
all prefix lengths of its pattern. A rule costs one flip-flop per pattern
character plus a few ROM bits, and the critical path is one ROM read and one OR
gate. The architecture follows the publication "Efficient Logic Circuit for
Network Intrusion Detection" (shift-or matcher, symbol encoders, two-character
variant). The register stages at the edges, the handshake, the reset and the
exact encoder structures are choices made for this implementation. They are
listed under "Departures and open points" below.

```
              +-------------------+     +-- rule group 0 -----------------------+
 in_valid --->|                   |     | symbol encoder(s) --+--> ROM -> shift-or chain --> match_n[0]
 in_chars --->| broadcast circuit |---->|                     +--> ROM -> shift-or chain --> match_n[1]
  (Q bytes)   |  (register stage) |     |                     +--> ...                    |
              +-------------------+     +---------------------------------------+      v
                        |               +-- rule group 1 ... -------------------+   alarm encoder
                        +-------------->|  ...                                  |-->  alarm, alarm_id,
                                        +---------------------------------------+     alarm_hits, alarm_multi
```

## The shift-or step

Take a pattern `P = p1 p2 ... pm` and a text that arrives one character per
clock. Keep a bit vector `R` with one bit per prefix length: `R[i] = 0` means
"the last `i` characters of the text equal `p1..pi`". When character `c`
arrives, a prefix of length `i` can be extended only if the one of length
`i-1` was already there and `c == pi`:

```
R_new[i] = R_old[i-1] OR S_c[i],     R_old[0] = 0 always
S_c[i]   = 0 if c == p_i, else 1
```

`S_c` depends only on the character and the pattern, so it is read from a ROM
that the character addresses. The rest is a chain of `m` OR gates, each fed
by the previous stage's flip-flop and one ROM bit. `R_new[m]` is the answer:
it is 0 in the very clock in which the last character of an occurrence arrives.
It is therefore taken straight from the last OR gate, and that stage needs no
flip-flop. A pattern of `m` characters costs `m-1` flip-flops (`shift_or_sr`).
Occurrences that overlap are all found, because every prefix length is tracked
at once. For example, with pattern `aab` and text `acaab` the output goes low
on the fifth character only.

Reset loads all flip-flops with 1, which means "no prefix seen yet". A `valid`
input freezes the chain on idle clocks and holds the output at "no match".
Idle clocks can therefore fall anywhere, even in the middle of an occurrence.

The plain module (`basic_module`) addresses a 256-word ROM (`pattern_rom`)
with the raw byte. Most of those words are all ones, because most bytes do not
occur in a given pattern.

## Shrinking the ROMs: symbol encoders and rule groups

A symbol encoder sends every byte that the patterns do not use to one shared
code 0, whose ROM word is all ones. It gives each byte that is used its own
code 1..K. The ROM then needs only `2^ceil(log2(K+1))` words: 7 used symbols
give a 3-bit code and an 8-word ROM instead of 256 words. The encoder is logic
and the ROM is memory bits, so one encoder serves a whole *group* of rules
(`rule_group`). Each rule in the group keeps its own ROM (`rule_rom`) and chain
(`encoded_module`). Grouping rules that use much the same characters keeps K,
and hence every ROM in the group, small.

The encoder's table of *keys* is computed from the group's patterns at
elaboration (`rule_group.build_keys`). Each ROM's contents are computed from
that key table and from its own pattern (`rule_rom.build_rom`). Nothing is
stored in files, and changing the rule set means changing parameters only.

## Two characters per clock

With `Q = 2` each clock brings a *beat* of two bytes, `(t[2j+1], t[2j+2])`,
and the matcher treats the byte pair as one symbol. The pattern is cut into
`W = ceil(m/2)` pairs `u_i = (p[2i-1], p[2i])`. For odd `m` the last pair is
`(p[m], *)`, and its second byte matches anything. The chain now has `W` stages
and `W-1` flip-flops.

Stepping in pairs only finds occurrences whose first byte lies at one parity of
position. Each rule therefore has two chains (`q2_module`), each with its own
ROM:

* the **even chain** reads the current beat, `(t[2j+1], t[2j+2])`, and finds
  occurrences that start at an odd position (on the first byte of a beat);
* the **odd chain** reads the pair `(t[2j], t[2j+1])`, made of the last byte
  of the previous beat (a one-byte delay register in `rule_group`) and the
  first byte of the current one. It finds occurrences that start at an even
  position.

Both chain outputs are active low, so the rule's `match_n` is their AND.

The timing of a report depends on the pattern length and on where the
occurrence starts:

| pattern length | occurrence starts on | found by | reported in |
|---|---|---|---|
| even | first byte of a beat | even chain | the beat holding its last byte |
| even | second byte of a beat | odd chain | the beat holding its last byte |
| odd | first byte of a beat | even chain (last pair half filled) | the beat holding its last byte |
| odd | second byte of a beat | odd chain | **the next valid beat**: its last byte was the second byte of the previous beat, and the odd chain reads that byte only in the pair it forms with the next beat |

A report of the last kind therefore waits for one more valid beat. A stream
that stops right after such an occurrence reports it only when traffic
resumes.

The pair encoder and the two-character ROM need some care:

* **Keys.** The exact pairs `u_i` of the group's patterns come first. Next
  come first-byte-only keys `(p[m], *)` for the half pairs of odd-length
  patterns. The encoder returns `1 +` the index of the lowest-numbered key
  that matches, so an exact pair wins over a first-byte key. At most one exact
  key and at most one first-byte key can match a given pair.
* **ROM words.** A code of an exact key `(a,b)` means the input *is* `(a,b)`.
  Its word has a 0 at every full pair equal to `(a,b)`, and at the half pair
  if `p[m] == a`. A code of a first-byte key `(a,*)` means the input starts
  with `a` but is no exact key of the group. Its word has a 0 only at the half
  pair if `p[m] == a`. Each chain costs `2^CODE_W` words of `W` bits.
* The even and odd encoders of a group have the same keys. So do the two ROMs
  of a rule: there are two copies so that both chains can read in the same
  clock.

## Data flow and timing of `nids_top`

1. `broadcast_circuit` registers `{in_valid, in_chars}` and drives the result
   to every group. This is one clock.
2. Each group encodes the beat, and every rule's ROM and OR chain produce
   `match_n` in the same clock. The ROMs are read asynchronously.
3. `alarm_encoder` registers all match lines. It outputs `alarm` (some rule
   matched), `alarm_id` (the lowest-numbered matching rule), `alarm_hits`
   (one bit per rule) and `alarm_multi` (several rules matched). This is one
   clock.

A beat presented in clock `k` shows at the alarm outputs after the clock edge
that ends clock `k+1`. The odd-length, second-byte case above adds one beat.
A new beat is accepted every clock and nothing stalls, so throughput is
`8*Q` bits per clock. At the 321 MHz reported for this architecture on a
Stratix FPGA, that is 2.57 Gb/s for `Q = 1` and 5.14 Gb/s for `Q = 2`.

## Describing a rule set

All of it is in the parameters of `nids_top`:

| parameter | default | meaning |
|---|---|---|
| `Q` | 2 | characters per clock, 1 or 2 |
| `USE_ENCODER` | 1 | 0 selects 256-word ROMs without encoders (only with `Q = 1`) |
| `NRULES` | 6 | number of rules |
| `NGROUPS` | 2 | number of encoder groups |
| `MAXLEN` | 11 | bytes reserved per pattern |
| `PATTERNS` | `/etc/passwd`, `/etc/shadow`, `/bin/sh`, `cmd.exe`, `root.exe`, `xp_cmdshell` | the patterns, as string literals |
| `LENS` | 11, 11, 7, 7, 8, 11 | pattern lengths |
| `GROUP_SIZE` | 3, 3 | rules per group; rules are listed group by group |

A string literal is right-aligned in its `8*MAXLEN`-bit slot, so `p1` is byte
`LEN-1` and `p_m` is byte 0. Lengths are explicit so that patterns may contain
a zero byte. The default rules are only an example set of typical signature
strings. A real deployment would load its own signature library, for example
about 1,600 characters of rules. All ROM widths, shift-register lengths, key
tables and code widths follow from these parameters. The rule number reported
in `alarm_id` is the rule's index in `PATTERNS`.

## Modules

| module | role |
|---|---|
| `nids_pkg` | character type, key struct `key_t`, `make_key`, `code_width` |
| `nids_top` | top: broadcast, groups, alarm encoder |
| `broadcast_circuit` | input register stage, fan-out to all groups |
| `rule_group` | key table, shared encoder(s), pair delay register, the group's rules |
| `symbol_encoder` | comparators plus priority encoder: byte or pair to code |
| `rule_rom` | encoder-addressed ROM of one rule (Q = 1 or 2) |
| `encoded_module` | Q = 1 rule: `rule_rom` and `shift_or_sr` |
| `q2_module` | Q = 2 rule: two `rule_rom`s, two `shift_or_sr`s, AND |
| `pattern_rom`, `basic_module` | Q = 1 rule without encoder (256-word ROM) |
| `shift_or_sr` | the OR/flip-flop chain |
| `alarm_encoder` | registered priority encoder and hit vector |

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The reference values are computed
independently: mostly by comparing the accepted text directly with the
pattern strings, not by running shift-or again. With plain Verilator, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nids_pkg.sv tb/tb_nids_top.sv --top-module tb_nids_top
./obj_dir/Vtb_nids_top
```

* `tb_nids_top` tests the default configuration end to end. Whole signatures
  are embedded in random filler with random idle clocks, and every output is
  checked two clocks after its beat. The test counts, and requires at least
  once: reports of every rule, reports from the even and the odd chain,
  occurrences with idle clocks inside them, and bytes that no rule uses.
* `tb_nids_workload` runs rule sets of the published size (see "Scale and
  memory" above).
* `tb_nids_top_q1` runs the `Q = 1` configuration with and without encoders
  side by side against the same reference.
* `tb_rule_group` covers all three rule kinds on a group that is a sub-range
  of a larger rule set.
* `tb_q2_module` and `tb_shift_or_sr` test the chains, including the
  `aab`/`acaab` example. `tb_symbol_encoder` and `tb_rule_rom` check the
  encoders and ROM contents exhaustively for bytes and for a small pair
  alphabet. The remaining blocks have unit tests of their own.

The simulator used has no X state, so every register that is read is reset.

## Scale and memory

`tb_nids_workload` runs the matcher at the scale of the published
evaluation. The test rule sets are generated: 1568 pattern characters (150
rules of 5 to 16 characters in 8 groups) with `Q = 2` and `Q = 1`, and 5004
characters (476 rules in 24 groups) with `Q = 1`. Each group draws its
characters from its own 12-letter slice of printable ASCII. All alarms are
checked against direct string comparison. The generated rules only stand in
for a real signature library, which is not part of this RTL.

ROM bits for the 1568-character set follow from the key counts. The
published figures for a real 1568-character SNORT rule set are given for
comparison:

| configuration | ROM bits here | published | flip-flops in chains |
|---|---|---|---|
| `Q = 1`, no encoder | 401,408 (256 x 1568) | 387,584 | 1,418 |
| `Q = 1`, shared encoders | 25,088 | 25,738 | 1,418 |
| `Q = 2`, shared pair encoders | 210,432 | 40,768 | 1,344 |

For `Q = 1` the encoder saves memory as published: each group uses 12
characters, so codes are 4 bits and ROMs are 16 words deep. For `Q = 2` the
pair alphabet of a group is much larger, because every distinct pair of the
group's patterns gets its own code. Here that is 70 to 85 keys per group, so
7-bit codes and 128-word ROMs, twice over per rule.
Smaller groups (down to one rule per group, where `GROUP_SIZE` is all ones)
trade encoder logic for ROM depth. A real rule set, with more repeated pairs,
would also need fewer codes.

## Departures and open points

* **Added for this implementation.** The register stages in the broadcast
  circuit and the alarm encoder, the `valid` handshake, the asynchronous
  active-low reset, the priority/hit-vector form of the alarm output and the
  comparator structure of the encoders. The source architecture only names
  the broadcast circuit and the alarm encoder, and it gives the encoder's
  function but not its circuit.
* **Two-character encoders.** The source reports that its `Q = 2` circuit
  uses "more complex address encoders" and about 1.6 times the `Q = 1`
  memory, without describing them. The exact-pair plus first-byte key scheme
  here is one correct way to do it, but it is not memory-optimal (see "Scale
  and memory").
* **FPGA mapping.** Each ROM is a memory array loaded by an `initial` block
  from contents computed at elaboration, and it is read asynchronously. On an
  FPGA whose embedded RAM only reads synchronously, the ROMs would map to
  distributed memory or logic, or the design would need an extra pipeline
  stage. The published resource figures (LEs per character, 321 MHz on
  Stratix) were not reproduced.
* **Packets.** The matcher scans one continuous stream. Nothing clears the
  chains between packets, so a signature split across two packets is
  reported. Clearing at packet boundaries would take a synchronous clear of
  the `shift_or_sr` flip-flops (load all ones).
* **Rule library.** The SNORT rule set behind the published results (1,568
  and 5,004 characters) is not reproduced. Simulation used the small default
  set and generated sets of the same sizes.
* **Wider beats.** The architecture extends to `q` characters per clock with
  `q` chains per rule. Only `q = 1` and `q = 2` are worked out, and `Q` is
  limited to those two values.
