# Prefix-based multi-pattern matcher

This design finds every occurrence of a set of fixed-length patterns in a
text that streams in at several characters per clock. A direct hardware
matcher compares every pattern, in full, with every text position it looks
at. For N patterns of L characters and M positions per clock, that takes
N·M·L character comparators. This design compares only the first k
characters of each pattern (its *prefix*) with every position. It compares
the remaining L−k characters (the *body*) only when a prefix hits. The
bodies live in a small one-port RAM. One shared set of M body comparators
checks the body the RAM returns.

The cost in character comparators falls from N·M·L to N·M·k + M·(L−k). The
default configuration has N = 16, k = 4, L = 36 and M = 8. That is
512 + 256 = 768 comparators instead of 4,608. The price is that the text
stops moving for a few cycles each time a prefix hits.

## Windows and groups

A *matching window* is the L characters that start at one text position. Its
first k characters are the *prefix window* and the other L−k characters are
the *body window*. The design examines M windows at once, starting at
positions `pos … pos+M−1`. Call these M windows a *group*. Together they span
M+L−1 characters (43 at the defaults). Neighbouring windows overlap by all but
one character.

`text_window_buffer` holds these characters. It is a shift register of
⌈(M+L−1)/M⌉ beats (6 beats, 48 characters). When the group moves on
("slides"), the oldest beat drops out and a new beat may enter in the same
clock. If no prefix hits, the matcher therefore takes in M characters every
clock. `win_ok[i]` is set only when window i lies entirely inside the text.
A window that runs past the end of the text can never match.

## The pipeline and the stall

This is the part to understand before changing anything. Each group is
handled by the following sequence. Cycle `t` is when the group is first
shown.

| cycle | prefix part (`prefix_match`) | `resolver` | `pattern_ram` + `body_match` | window |
|---|---|---|---|---|
| t   | N×M prefix comparisons; `any_hit` is combinational | | | slides at the end of t if there was no hit |
| t   | on a hit, the N×M hit matrix is registered | | | held |
| t+1 | | stage 1: stores the matrix and the set of patterns with a hit | | held |
| t+2 | | stage 2: picks the lowest pending pattern and registers it as the address, with its row of the matrix as the window mask | | held |
| t+3 | | (next pattern, if any) | RAM read (asynchronous) and M body comparisons; result registered | slides at the end of t+3 if this was the last pattern |
| t+4 | | | `match_*` outputs valid | |

A group where no prefix hits costs 1 cycle. A group where one pattern's prefix
hits costs 1 + 3 cycles. The window is held for 3 cycles: two in the resolver
and one for the RAM read and body compare.

If h different patterns hit in the same group, the resolver issues them on h
consecutive cycles. The group then costs 1 + 2 + h cycles. One pattern that
hits in several windows of the group costs only one RAM read. All M body
comparators check that body at once, and the window mask keeps only the
windows whose prefix hit.

The controller in `mpm_top` has two states:

* `SCAN`: slide the group, or register the hits and move to `RESOLVE`.
* `RESOLVE`: hold the group until the resolver's last address is being
  compared.

The `stall` output is high in `RESOLVE`.

Throughput therefore depends on the data. At the defaults, random lower-case
text with a planted pattern every 500 characters runs at 7.64 characters per
clock, compared with a peak of 8. A text that keeps hitting prefixes is
slower: the worst case is one group every 2+N+1 cycles.

## Blocks

| module | role |
|---|---|
| `mpm_pkg` | default sizes, buffer depth function |
| `text_window_buffer` | text stream in, the M+L−1 characters of the current group out, slides on `advance` |
| `prefix_match` | N prefix registers with loaded flags; N×M k-character comparators; `any_hit`; registered hit matrix |
| `resolver` | two-stage sequential circuit; hit matrix in, one pattern address per cycle (lowest index first) with window mask and `last` |
| `pattern_ram` | one-port RAM, N words of L−k characters; synchronous write, asynchronous read |
| `body_match` | M comparators of L−k characters against the body windows, masked; registered result |
| `mpm_top` | wires the above together, shares the RAM port between loading and matching, window control FSM |

## Interface of `mpm_top`

Characters are `CHAR_W` = 8 bits. Character 0 of any multi-character bus is
in the low bits.

* **Loading patterns.**
  * `cfg_we`, `cfg_addr` and `cfg_pattern` (L characters) write pattern
    `cfg_addr`. The prefix goes to the prefix registers and the body goes
    to the pattern RAM.
  * A written pattern is marked loaded. Patterns that were never written do
    not match.
  * `cfg_clear` unloads all patterns.
  * Load only while no text is streaming. An assertion checks that no load
    happens during a stall. Loading takes the RAM's single port.
* **Text.**
  * `in_valid` / `in_ready` carry beats of M characters (`in_data`).
  * `in_keep` marks the valid characters of a beat. They must be contiguous
    from lane 0. Only the beat with `in_last` may be partial; an assertion
    checks this.
  * `in_ready` depends combinationally on the internal slide decision. It
    does not depend on `in_valid`.
* **Results.**
  * A result is one pattern in one group. `match_valid` carries
    `match_pat`, `match_mask` and `match_pos`.
  * Bit i of `match_mask` means the pattern occurs at text position
    `match_pos + i`.
  * There is no backpressure on results.
  * Occurrences of different patterns in one group come out on consecutive
    cycles, in ascending pattern order.
* **End of text.**
  * `text_done` pulses once every window of the text has been resolved. It
    comes no earlier than the last result.
  * The next text starts again at position 0.
  * Positions are 32 bits (`POS_W`).

Reset (`rst_n`, active low, synchronous) clears all control state and unloads
all patterns. The pattern RAM contents are not reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | number of patterns |
| `K` | 4 | prefix length k |
| `L` | 36 | pattern length (all patterns the same length) |
| `M` | 8 | characters per clock |
| `CHAR_W` | 8 | bits per character |
| `POS_W` | 32 | text position width |

N, k, L and M are the evaluated configuration of the architecture. `CHAR_W`
and `POS_W` are choices of this implementation. Synthesised at the defaults
with a generic flow, the matcher core has about 1,330 flip-flop bits and a
4,096-bit pattern RAM. The ~4,500 LUTs, ~3,500 registers and 160 MHz reported
for this architecture on a Zynq-7020 cover a complete AXI4 IP core, which also
has DMA engines and control. Those figures are not a measurement of this RTL.

## What is this design's own choice

The overall method comes from the architecture this RTL implements:

* the prefix part and the body part;
* a resolver that feeds a one-port pattern RAM;
* M shared body comparators;
* a throughput of M characters per clock;
* a 3-cycle hold on a prefix hit (2 resolver cycles, 1 RAM and compare
  cycle).

The following are not specified by that architecture and were chosen here:

* **Several patterns hitting in one group** are served one per cycle, in
  ascending index order. A single hit gives exactly the 3-cycle hold; h
  hits give 2+h.
* **Resolver insides**: a registered pending set and a lowest-index
  priority encoder.
* **Where the 3 cycles fall**: the prefix comparator outputs are registered
  before the resolver.
* **Pattern RAM read** is asynchronous (LUT RAM). This is what lets the RAM
  read and the body compare share one cycle.
* **Pattern loading** goes through a simple write port. The prefixes are
  held in registers.
* **Stream, result and end-of-text formats**, and the 8-bit characters.
* **Window buffer** structure.

Not included:

* The DMA engines, the thread-control unit and the AXI4 packaging that would
  surround the matcher in a processor system. The matcher's stream and load
  ports are where they would connect.
* Patterns of different lengths. The architecture assumes equal lengths.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
with an independent model and prints `TB_RESULT checks=… failures=…`:

* `tb_text_window_buffer`:
  * random texts, source gaps and slides;
  * every character shown and every `win_ok` bit against the text;
  * one group per beat;
  * one group per clock when nothing stalls.
* `tb_prefix_match`: random prefixes (shared and unloaded ones) and random
  windows. Checks `any_hit`, the registered matrix and `cfg_clear`.
* `tb_resolver`: random hit matrices. Checks:
  * the first address exactly 2 cycles after the matrix;
  * one address per cycle after that, in ascending order;
  * the window masks and `last`.
* `tb_pattern_ram`: same-cycle reads mixed with overwrites.
* `tb_body_match`: planted bodies, near misses that differ in one character,
  and random masks.
* `tb_mpm_top`: end to end at the default sizes.
  * Four texts: a partial last beat, source gaps, a text shorter than the
    buffer, and a reload after `cfg_clear`.
  * Every occurrence is checked against a full reference scan. No
    duplicates or false matches are allowed.
  * For gap-free texts, the exact cycle count from first group to
    `text_done` is checked against 1 cycle per group plus 2+h cycles for
    each group with h patterns hitting.
  * It counts, and requires at least once:
    * single-pattern stalls;
    * groups with several patterns hitting;
    * prefix hits whose body differs;
    * several occurrences in one group;
    * partial last beats;
    * source gaps and backpressure;
    * planted copies of an unloaded pattern;
    * a pattern rewrite;
    * a short text.
* `tb_mpm_workload`: default sizes.
  * 16 random patterns over texts of 10 KiB, 100 KiB, 1 MiB, 10 MiB and
    100 MiB.
  * Occurrences and exact cycle counts are checked as above.
  * It reports characters per clock and the time at 160 MHz: about 86 ms
    for 100 MiB.
  * It runs in well under a minute.

Simulate any of them with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_mpm_top rtl/mpm_pkg.sv tb/tb_mpm_top.sv
./obj_dir/Vtb_mpm_top
```

The RTL is plain synthesizable SystemVerilog (IEEE 1800-2017). It lints
cleanly with `verilator --lint-only -Wall` apart from unused-parameter notes
on the package constants.
