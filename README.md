# Reconfigurable pattern matching in hardware: a regexp scanner and a melody scanner

This repository holds two independent hardware pattern matchers that share one
idea: a pattern is cut into small *terms*, each term gets its own tiny engine,
and the engines are chained so that every input byte is consumed by all of them
in the same clock cycle. Changing the pattern means rewriting a few registers
and memory words, not re-synthesising the design.

* **CES (CCR engine scanner)** matches regular expressions exactly. Each term
  is a *CCR*, a character class with a repetition bound, `CC{bL,bU}` (for
  example `[a-z0-9]{2,4}`). A rule is a row of CCR engines; eight rules of up
  to 25 terms are scanned in parallel at one byte per clock.
* **Melody scanner** matches approximately. A hummed query, already turned
  into a string of pitches, becomes a chain of *ACCR* terms `p{1,4}` ("pitch p
  held for one to four frames"). Each ACCR engine keeps edit distances; the
  chain computes, for every song in a database, how far the best-matching
  stretch of that song is from the query.

Both are in `rtl/`, side by side under `pattern_matching_top`. Nothing is
shared between them except clock and reset.

## The MIN-MAX algorithm: counting repetitions without backtracking

A repetition like `{2,4}` is hard for a streaming matcher because, with
overlapping candidate matches, a term may have consumed different numbers of
symbols on different candidate paths. The classic fixes are a shift register
per repetition (large) or one counter (misses matches when neighbouring
character classes overlap, e.g. `[a-z0-9]{2,4}[-_a-z0-9]{3,4}`: is a letter
still part of the first term or already part of the second?).

Each CCR engine here keeps **two** counters instead:

* `MAX` – the longest run the term may have consumed so far;
* `MIN` – the shortest run it must have consumed.

Every candidate count lies between them, so the term can hand on a match
(assert its activation `AS`) when `MAX >= bL` and `MIN <= bU`. The update rules,
per accepted symbol:

| rule | effect |
|------|--------|
| IR-1 | the first term of a rule is always active, `MIN = 0` |
| IR-2 | `AS = MAX >= bL && MIN <= bU` |
| IR-3 | an activation from the previous term restarts `MIN` at 0 |
| IR-4 | a rejected symbol, or `MIN > bU` without a new activation, ends the term's runs |
| IR-5 | the rule matches when its last term asserts `AS` |
| CR-1 | `MAX` counts every accepted symbol |
| CR-2 | `MIN` goes from 0 to 1 only if the previous term cannot keep the symbol |
| CR-3 | a non-zero `MIN` counts every accepted symbol |
| CR-4 | `MAX` wraps to `bL` instead of reaching the counter's maximum |

`AS` is computed from registered state, so an activation reaches the next term
for the *next* symbol. With these timings the engine reproduces, cell by cell,
the classic worked example of the rule
`R2 = [a-z0-9]{2,4}[-_a-z0-9]{3,4}[a-z0-9]{2,5}` on `abc-1-_3d` (match on the
final `d`) and on `ab_def_44`, where overlapping bursts make the algorithm
report a match although no exact match exists. That second case is a known
limitation of the method for rules whose neighbouring classes overlap *and*
whose bursts collide; for rules whose adjacent terms have disjoint classes the
method is exact, which the array testbench checks against an exact automaton.

Two points needed an interpretation and are this design's own:

* **Polling.** When an activation arrives for a symbol the term rejects, the
  engine shows `ACTIVE` for that symbol (as the worked tables do) but keeps no
  open run. Only the next activation can start counting again. Carrying the
  stale activation over would match `abbd` against `[ac] b d`.
* **CR-2 with fan-in.** "The previous term can keep the symbol" is a `hold`
  signal from each predecessor: it is busy after this symbol and accepts it.
  With several predecessors (OR branches) the holds are ORed.

Counters are 11 bits (`ces_pkg::CNT_W`), so bounds up to 2046 are usable;
`MIN` saturates.

## CES structure

```
 host bytes ─► ces_controller ─► sym ──► cc_bram × 3 ─► accept bits ─┐
                 │   ▲                                               ▼
                 │   └──── match vector (1 bit per row) ◄──── ces_array (8 × 25 ccr_engine)
                 └─► configuration writes (engine registers, class memories)
```

* **Character classes** live in 256 × 72 memories (`cc_bram`) addressed by
  the input byte: one read gives the accept bit of 72 engines. 200 engines
  need three memories. Engine `e = row*COLS + col` uses bit `e % 72` of memory
  `e / 72`.
* **Engine configuration** (`ces_pkg::ccr_cfg_t`): `b_lo`, `b_hi`, four
  `enable` bits, `start` (first term of a rule) and `bypass`.
* **Topology** (`ces_array`): engine `(r,c)` feeds column `c+1`. Rows are
  grouped in `GROUP_W`-row groups; enable bit `j` routes the activation to row
  `group_base + j` of the next column, and each engine ORs what it receives.
  `GROUP_W = 1` (default) is the linear layout: one rule per row. With
  `GROUP_W = 2` a rule like `a(bc|d)e` fits in two rows: `a` fans out to `b`
  (row 0) and `d` (row 1), `d`'s branch is padded with a bypass engine, and
  both branches meet at `e`.
* **Bypass** engines forward activation and hold combinationally, so a rule
  shorter than the row still ends at the row's last engine, whose `AS` is the
  rule's match bit.
* **Simple columns** (`SIMPLE_COLS`, default none): most real rules consist
  of simple terms – `{1,1}`, `?`, `+`, `*` – which need no counters. A column
  whose bit is set is built from `simple_ccr_engine`: one state bit, a self
  loop for `+`/`*`, and a same-cycle pass-through for the optional `?`/`*`.
  Its mode is read from the configured bounds (`b_lo` 0 or 1, `b_hi` 1 or
  more), so such a column must only hold simple terms.
* **Latency**: a symbol's match vector leaves the array two cycles after the
  symbol enters (class-memory read, then engine register).

### Packet protocol (`ces_controller`)

The host talks to the scanner in packets on a byte stream (`in_valid /
in_ready / in_data / in_last`, plus `in_kind` sampled on the first byte). Every
packet starts with a 4-byte header.

* **String packet** (`PKT_STRING`): the header is echoed, then one match vector
  per payload byte (`VEC_BYTES` bytes, row 0 in bit 0, least significant byte
  first); `out_last` marks the final byte. The scanner is cleared at the start
  of each string packet. Example with rule R2 in row 2: input `01 23 45 67`
  + `abc-1-_3d` gives `01 23 45 67 00 00 00 00 00 00 00 00 04`.
* **Configuration packet** (`PKT_CONFIG`): the header, then records, multi-byte
  fields most significant byte first:
  * `0x01` class word: memory number, symbol, 9 bytes of accept bits
    (least significant first) – 12 bytes;
  * `0x02` engine: index (2), `bL` (2), `bU` (2), flags (bit 0 start, bit 1
    bypass, bits 7:4 enable) – 8 bytes.
  Nothing is answered.

The output has no back-pressure; it is meant to be written into a buffer. The
input accepts one symbol per `VEC_BYTES` cycles (one per clock at 8 rows) and
holds off the next packet until the previous answer has left. The record
format and the header echo layout are this design's; the flag that selects
configuration or string, the one-byte result per symbol for eight rules and
the bit-per-rule order follow the original system.

## Elastic matching for melodies

A hummed query is cut into frames (100 ms in the reference setting), each
frame a pitch. Humming is imprecise in tempo, so a query note may cover one to
four database frames: term `i` is `p_i{1,4}`. The cost of aligning frame `c`
with term `i` is `|c - p_i|`, and the distance of a song is the least total cost
over all ways of laying the query over any stretch of the song.

Each `accr_engine` holds four sub-state distances, one per number of frames
the term has taken so far:

```
ed_1 <- ed_0 + |c - p|          ed_0 = predecessor's best (curr_min), 0 for term 1
ed_j <- ed_(j-1) + |c - p|      j = 2..4
curr_min = min(ed_1..ed_4)      handed to the next engine
overall_min = running min of curr_min       (reported by the last term)
```

All sums saturate at 255 (8-bit distances). A newline byte (`0x0A`) ends a
song and resets every engine.

`mme` chains `T = 100` engines behind one repeater register. A query of
`n <= T` terms occupies engines 1..n (engine parameters are `{p, i, n}`); the
result multiplexer picks engine n. It is pipelined in two register stages
(groups of `MUX_GROUP = 10`, then the group), because the result is needed
only once per song: the distance of a song appears on `result` three cycles
after its newline is presented.

`melody_scanner` runs `N_MME = 3` MMEs in lockstep on one database stream,
each with its own query variant (the query shifted in pitch), so a 9-variant
search takes three rounds. Around them:

* a dual-clock FIFO (`async_fifo`, Gray-coded pointers, two-flop
  synchronisers, first-word fall-through) brings the database from the memory
  clock domain; each word is `{last, byte}`;
* one parameter buffer per MME (`sdp_ram`, addressed by engine position);
* `mme_controller`: on `start`, copies positions 0..T-1 of every parameter
  buffer into the engines, sends one flushing newline (its result is
  dropped), streams the FIFO to the MMEs, writes one output-buffer entry per
  newline (the three distances side by side, MME 0 in the low byte) and raises
  `done` after the result of the string closed by the `last` byte;
* the output buffer (`sdp_ram`, 8192 entries).

Host sequence: write parameters (`prm_we`, `prm_mme`, `prm_addr`,
`prm_wdata`), pulse `start`, stream the database on `db_*` in the memory clock
domain ending with a newline flagged `db_last`, wait for `done`, read
`songs` entries through `res_re/res_raddr/res_rdata` (one cycle latency).

## What is outside this RTL

* the host PC software: regexp parsing and mapping to CCR configuration,
  pitch tracking and query generation;
* the Ethernet host link with its input and output buffers: the CES byte
  streams and the melody parameter/result ports are where it connects;
* the external DDR2 memory holding the song database and its controller: the
  `db_*` stream is where it connects;
* extensions for context-dependent features (zero-width assertions, back
  references);
* retrospection (recovering the length each term matched once a rule has
  matched): the scanner reports the match only.

## Sizes and how they compare

| parameter | default | note |
|---|---|---|
| CES rows × columns | 8 × 25 | eight rules of up to 25 terms |
| CCR counter width | 11 bits | own choice |
| class memories | 256 × 72, three of them | |
| MME size `T` | 100 | a 10-s query at 100-ms frames |
| MMEs | 3 | 9 variants in 3 rounds |
| distance width | 8 bits, saturating | |
| FIFO depth / output entries | 512 / 8192 | own choice; a 5569-song database fits |

A large rule set (tens of thousands of CCRs) does not fit one default CES
instance; `ROWS`, `COLS` and `GROUP_W` are parameters, and the class memories
scale with them.

## Files

| file | content |
|---|---|
| `rtl/ces_pkg.sv` | CCR types: counter, engine configuration, packet kinds, record opcodes |
| `rtl/ccr_engine.sv` | one CCR engine (MIN-MAX) |
| `rtl/simple_ccr_engine.sv` | reduced engine for `{1,1}`, `?`, `+`, `*` terms |
| `rtl/cc_bram.sv` | 256 × 72 class memory |
| `rtl/ces_array.sv` | grid of engines, class memories, fan-out/fan-in |
| `rtl/ces_controller.sv` | packet parser, configuration writes, result serialiser |
| `rtl/ces_scanner.sv` | controller + array |
| `rtl/mme_pkg.sv` | distance type, saturating add, engine parameters |
| `rtl/accr_engine.sv` | one ACCR engine |
| `rtl/mme.sv` | chain of ACCR engines with pipelined result multiplexer |
| `rtl/async_fifo.sv` | dual-clock FIFO |
| `rtl/sdp_ram.sv` | simple dual-port RAM (parameter and output buffers) |
| `rtl/mme_controller.sv` | query-round sequencer |
| `rtl/melody_scanner.sv` | FIFO, buffers, controller, MMEs |
| `rtl/pattern_matching_top.sv` | both scanners side by side |

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`:

* `tb_ccr_engine` – three engines against the R2 worked tables, cell by cell;
* `tb_simple_ccr_engine` – chains of simple engines in all four modes against
  an automaton with empty-match closure;
* `tb_ces_array` – random rules against an exact automaton, the same array
  with every other column simple, and the two-row OR layout;
* `tb_ces_controller`, `tb_ces_scanner` – packet protocol; the R2 string
  experiment at full size;
* `tb_accr_engine`, `tb_mme`, `tb_mme_controller`, `tb_melody_scanner` – edit
  distances against an independent segment-based model (`ema_ref_pkg`), result
  latency, sequencing;
* `tb_cc_bram`, `tb_sdp_ram`, `tb_async_fifo` – memories and the clock
  crossing;
* `tb_pattern_matching_top` – both scanners at their default sizes running at
  once (eight rules on the CES, three query rounds on 300 ACCR engines); it
  prints how often each mechanism was used and fails if one never was.

To simulate one, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_pattern_matching_top \
    rtl/ces_pkg.sv rtl/mme_pkg.sv tb/ema_ref_pkg.sv tb/tb_pattern_matching_top.sv
./obj_dir/Vtb_pattern_matching_top
```

Packages must come first on the command line; the other modules are found
through `-Irtl`. The top-level testbench takes well under a minute.

## Trust and limits

* The CCR engine timing was fixed by reproducing published worked tables; the
  polling rule above is an interpretation that the array testbench supports
  (no false matches against an exact automaton for rules with disjoint
  neighbouring classes).
* Rules with overlapping neighbouring classes can give false positives
  (`ab_def_44` against R2). This is a property of the algorithm, not a defect
  of this implementation.
* Clock frequency and FPGA resource figures of the original system are not
  verified here.
* Distances saturate at 255: songs whose best alignment costs more all read
  as 255.
* The simple engine is exact even when neighbouring classes overlap (it
  tracks a set of states, not a counter range). It holds one state bit; the
  original reduced engine is only known by its size, so this one is a
  functional equivalent, not a copy of that circuit.
