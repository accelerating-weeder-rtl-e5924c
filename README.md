# Weeder motif scoring in hardware: Hamming automata plus a score pipeline

Weeder finds DNA motifs by brute force. For each candidate k-mer it looks for
occurrences in every input sequence. An occurrence is a window of k bases that
differs from the candidate in at most d positions: d = 1, 2, 3 for k = 6, 8, 10.
Each candidate then gets a statistical score. On large data sets this scan
(`oligo_scan`) takes most of the run time.

This RTL splits the scan into two stages:

1. **Matching.** There is one small automaton per candidate. All automata read
   the same stream of bases, one symbol per clock. In that stream the input
   sequences are joined by a separator symbol. An automaton reports when the
   last k symbols lie within Hamming distance d of its candidate. Whenever any
   automaton reports, the stage emits an *event*: the stream offset and the
   report bits of all automata. This is the mapping used on Micron's Automata
   Processor, written here as ordinary logic.
2. **Post-processing.** For every candidate p, the events are turned into
   Weeder's score

   ```
   Score(p) = sum over sequences i in which p occurs of
              ln( Obs(p,i,b_i) / ( f(p,b_i) * length(i) ) )
   ```

   - b_i is the smallest number of substitutions with which p occurs in
     sequence i.
   - Obs is how many occurrences have exactly b_i substitutions.
   - f is an expected frequency that the host computes beforehand.

   The circuit follows the FPGA post-processor of the published design:
   - an event RAM;
   - a central controller that splits the events into sequences;
   - an accumulator that counts reports per sequence;
   - a buffer pool;
   - a score calculator with one MUL/DIV/Ln/Acc lane per candidate.

The default size is the published 6-mer pass:
- 4095 candidates with 1 substitution each (3 report bits per candidate, a
  12285-bit output vector);
- a 500-line event RAM;
- sequence tables for 166666 sequences.

## The Hamming automaton (`hamming_automaton`)

The automaton is a grid of 2d+1 rows by k columns of state elements. Each
element tests one condition on the current symbol. It can be active only if
an element that feeds it was active after the previous symbol. For k = 6,
d = 1 and the candidate ACGTAT:

```
row 0  (exact so far)        A    C    G    T    A    T   R   0 substitutions
row 1  (1st substitution)   ^A   ^C   ^G   ^T   ^A   ^T   R   1 (at the last base)
row 2  (1 subst., then ok)        C    G    T    A    T   R   1 (earlier)
```

- `X` matches exactly symbol X; `^X` matches every byte except X.
- Rows 0 and 1 of column 0 are enabled on every symbol, so a window starts
  at every stream position.
- Each column feeds the next one:
  - row 0 feeds row 0 and row 1;
  - row 1 feeds row 2;
  - row 2 feeds row 2.
- The last element of each row is a report element (R).

For general d:
- Row 2m-1 holds "the m-th substitution happens here". It starts at column
  m-1.
- Row 2m holds "m substitutions so far, this base matches". It starts at
  column m.
- Match row m and mismatch row m both feed match row m and mismatch row m+1.

The grid then uses (2d+1)k - d² elements: 17 for 6-mers, 61 for 10-mers.

A window ends in exactly one row, so the report bits of one candidate are
one-hot. Report row r stands for (r+1)/2 substitutions
(`weeder_pkg::mism_of_row`).

The candidate is stored as k bytes. Writing new bytes (`pat_we`) is the
*symbol replacement* that swaps candidate sets between passes without
changing the wiring. Writing also clears the automaton's state.

**Separators.** `^X` elements accept the separator too. A window that
straddles two sequences can therefore report: the separator counts as one
substitution. The published automaton has the same property. The reference
models in the testbenches reproduce it.

## Events (`ap_pattern_matcher`)

`ap_pattern_matcher` holds `NUM_PAT` automata on one symbol stream. After a
symbol on which at least one report fires, `ev_valid` is high for one cycle
with:
- `ev_offset`: the 0-based stream position of that symbol;
- `ev_vector[p][r]`: report row r of candidate p.

`stream_start` clears all automata and the offset counter. `stream_end` on
the last symbol comes back out as `ev_end`, aligned with the last event.

## Splitting events into sequences (`central_controller`)

The host loads `range(i)`, the exclusive end offset of sequence i, counting
its separator. Event lines arrive in offset order. The controller keeps a
current sequence `seq` and reads one event line per cycle:

| condition on the line's offset | action |
|---|---|
| `offset < range(seq)` | `calc_ena`: the accumulator adds the line |
| `offset >= range(seq)` and seq had lines | hand seq over (below), then retry the line against seq+1 |
| `offset >= range(seq)` and seq had none | skip seq (1 cycle); it contributes nothing to any score |

To hand a sequence over, the controller waits for `read_finish`, meaning the
buffer pool is free. Then it raises, in two consecutive cycles:
- `write_ena`: the accumulator counts go to the buffer pool, and the
  accumulator restarts from zero;
- `read_ena`, with `calc_len = length(seq)`: this tells Score_calc that the
  pool is full.

The two strobes are never high in the same cycle; an assertion checks this.

When `finish` is high and no line is pending, the last sequence is handed
over and `calc_finish` is raised.

The event RAM is used as a circular buffer. The controller counts the writes
and the reads and reports `ev_free`. In the full system (`weeder_ap_top`),
`sym_ready` drops when fewer than 4 lines are free. The symbol stream then
stalls instead of losing events. So the 500-line RAM can carry a run with any
number of events.

## Overlap of counting and scoring (`accumulator`, `buffer_pool`, `score_calc`)

```
accumulator : | seq 1 |   | seq 2 |      | seq 3 |        ...
score_calc  :           |   seq 1   |   seq 2   |   seq 3   |
                        ^ copy from buffer pool, lanes start together
```

- **Accumulator.** It holds one 8-bit counter per report element. Each line
  adds 1 to every counter whose bit is set. Counters saturate at 255.
- **Buffer pool.** It is one register stage between the accumulator and
  Score_calc. It decouples them, so the accumulator can count sequence i+1
  while Score_calc scores sequence i.
- **Score_calc hand-shake.**
  - `read_ena` marks a copy request as pending.
  - As soon as every lane is idle, Score_calc copies the pool into its lanes
    (`bp_read`) and the request clears. `read_finish` equals "no request
    pending".
  - The controller therefore stalls only when sequences arrive faster than
    one every lane pass.
- **`work_done`.** It rises once `finish` has arrived, no copy is pending and
  every lane is idle.

Each `score_lane` does the following for one candidate:

1. Per substitution count m, add the counts of the rows that stand for m.
   b is the smallest m with a non-zero sum, and Obs is that sum. If every sum
   is zero, the candidate did not occur and the lane stays idle.
2. **MUL**: E = f(p,b) · length (1 cycle).
3. **DIV**: ratio = Obs / E (`serial_divider`, restoring, 57 cycles).
4. **Ln**: ln(ratio) (`fx_ln`, 18 cycles).
5. **Acc**: score(p) += ln(ratio).

A lane stays busy for exactly **81 cycles**, and all lanes start together. A
sequence therefore costs 83 cycles in Score_calc, counting from `read_ena`.
The published circuit, which used floating-point units, needed 86. Its
accumulator needed 44 cycles per sequence on average. Here the accumulator
takes one cycle per event line of the sequence, plus two cycles for the
hand-over.

Scores are read with `get_score` and `score_addr`; `score` is valid one cycle
later (`score_valid`). `start` clears all scores.

## Number formats

The original post-processor used floating point. This design uses fixed
point:

| quantity | format |
|---|---|
| f(p,b) | unsigned, 32 bits, all fraction (value = f · 2³²) |
| length(i) | unsigned 16-bit integer |
| E = f · length | 48 bits, 32 fraction bits |
| ratio = Obs·2⁴⁸ / E | 57 bits, 16 fraction bits; E = 0 gives all ones |
| ln, score | signed, 16 fraction bits; score is 48 bits |

`fx_ln` computes ln in three steps:
1. It finds the leading one of the input, which gives the integer part of
   log₂.
2. Sixteen square-and-compare steps give the fraction of log₂.
3. A multiply by ln 2 (`weeder_pkg::LN2_Q32`) gives ln.

It agrees with `$ln` to better than 2⁻¹³. The division truncates the ratio
to 2⁻¹⁶. So a score term is accurate to about 2⁻¹² + 2⁻¹⁴/ratio. The
testbenches check against this bound.

## Files

| file | contents |
|---|---|
| `rtl/weeder_pkg.sv` | symbol type, row and STE-count helpers, fixed-point constants |
| `rtl/hamming_automaton.sv` | one candidate's automaton |
| `rtl/ap_pattern_matcher.sv` | NUM_PAT automata, offset counter, event capture |
| `rtl/event_ram.sv` | output vector RAM + offset RAM, shared write address, 1-cycle read |
| `rtl/seq_ram.sv` | length RAM + length range RAM, asynchronous read |
| `rtl/frequency_ram.sv` | f(p,b) table with parallel read-out |
| `rtl/central_controller.sv` | sequence splitting and hand-shake state machine |
| `rtl/accumulator.sv`, `rtl/buffer_pool.sv` | counting, and the stage between counting and scoring |
| `rtl/serial_divider.sv`, `rtl/fx_ln.sv`, `rtl/score_lane.sv` | one score lane |
| `rtl/score_calc.sv` | NUM_PAT lanes, hand-shake, score read-out |
| `rtl/weeder_postproc.sv` | the post-processor with the pins of the original block diagram |
| `rtl/weeder_ap_top.sv` | matcher + post-processor: the whole scan for one candidate length |

Main parameters of `weeder_ap_top`:

| parameter | default | meaning |
|---|---|---|
| `NUM_PAT` | 4095 | candidates per pass |
| `K` | 6 | candidate length |
| `D` | 1 | maximum number of substitutions |
| `NUM_EV` | 500 | event RAM lines |
| `MAX_SEQ` | 166666 | sequence-table entries |

`CNT_W`, `LEN_W`, `FREQ_W`, `OFF_W` and `SCORE_W` (8, 16, 32, 64, 48) set
the widths.

The published 8-mer and 10-mer passes need:
- 8-mers: K=8, D=2, about 11165 candidates per pass;
- 10-mers: K=10, D=3, about 5589 candidates per pass.

Those are parameter changes. They are not simulated here.

## Using it

Host sequence for one pass on `weeder_ap_top`:

1. Write the candidates (`pat_we`, `pat_addr`, `pat_in`; symbol 0 is the
   first base of the window).
2. Write lengths and ranges (`length_wena`, `waddr_length`, `lengthin`,
   `lengthrangein`).
3. Write f(p,b) at `waddr_freq = p*(D+1)+b`.
4. Pulse `start`.
5. Stream symbols with `sym_valid` while `sym_ready` is high. Flag the last
   symbol with `stream_end`.
6. Wait for `workdone`, then read the scores.

`weeder_postproc` can also be used alone, with events written by the host
through `ram_ena`, `wena`, `waddr`, `vectorin` and `offsetin`. Write them at
addresses 0, 1, … wrapping at `NUM_EV`, while `ev_free` > 0. Then raise
`finish`.

## Simulation

Every testbench in `tb/` is self-checking. Each ends with a
`TB_RESULT checks=N failures=M` line. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_weeder_ap_top rtl/weeder_pkg.sv tb/tb_weeder_ap_top.sv -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_hamming_automaton` | 6-mer/d=1 and 8-mer/d=2 report rows vs. a Hamming-distance model, including the ACGTAT example |
| `tb_ap_pattern_matcher` | event offsets and vectors, replacement between passes |
| `tb_event_ram`, `tb_seq_ram`, `tb_frequency_ram`, `tb_buffer_pool`, `tb_accumulator` | storage behaviour, gating, saturation |
| `tb_serial_divider`, `tb_fx_ln` | exact quotients and 57-cycle latency; ln within 2⁻¹³ and 18-cycle latency |
| `tb_score_calc` | scores vs. a real-valued model, the 81-cycle lane pass, the copy hand-shake, `work_done` |
| `tb_central_controller` | per-sequence line counts, skipped sequences, waits for `read_finish`, one line per cycle |
| `tb_weeder_postproc` | the post-processor through its own pins, two passes |
| `tb_weeder_ap_top` | whole design at reduced size, two passes; requires stalls, event-RAM wrap-around, waits for Score_calc, skipped sequences and symbol replacement to each happen |
| `tb_weeder_ap_top_full` | one pass at the default size: all 4095 6-mers (all but TTTTTT) over four 60-base sequences, every score checked |

The full-size testbench builds slowly, because the design has 4095 lanes and
4095 automata. With single-threaded Verilator 5 it took about 11 minutes to
build, 4 GB of memory and 31 seconds to run (8191 checks). The small
testbenches run in seconds.

## Departures and open points

- **Matching stage.** This is a logic model of the automata, not of the
  Automata Processor chip. There is no DRAM-based symbol recognition, routing
  matrix, counters or Boolean elements, and no board interfaces. Element
  classes are stored as candidate bytes rather than 256-entry symbol sets.
- **Automaton rows for d > 1.** The row layout generalises the published
  d = 1 example. It reproduces the published element count (2d+1)k - d².
- **f(p,b).** The host provides f per candidate and per substitution count.
  The score formula writes f(p,i,b_i); here f is taken as not depending on
  the sequence.
- **Fixed point.** It replaces floating point, with the accuracy given above.
- **Hand-shake details.** The following are this design's own choices:
  - the exact pin timing (`Start`, `Finish`, `Ram_ena`);
  - the circular use of the event RAM and `ev_free`/`sym_ready`;
  - the exclusive-end convention for the length range;
  - counter saturation;
  - the asynchronous sequence-table read;
  - the separator symbol (any byte other than A/C/G/T; the tests use `#`).
- **One candidate length per instance.** A run over 6-, 8- and 10-mers uses
  one instance per (K, D), or a re-parameterised build.
