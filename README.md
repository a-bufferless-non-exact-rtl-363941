# Bufferless non-exact stream matcher

This is a hardware matcher for a raw binary stream. The stream has no packets or frames. The matcher checks every symbol-aligned position of the stream against a set of fixed bit patterns and reports each position whose Hamming distance to some pattern is at most a threshold E. Because it tolerates E differing bits, it finds near-copies as well as exact ones.

The stream never stops and is never stored. The only stream storage is one sliding window register, a little wider than a pattern. Only the results are buffered, in a small FIFO. Throughput grows with parallel hardware: M matching engines each look at a different offset in the same clock, and each engine holds N comparators.

## Dataflow

```
 s_data (S*M bits/clk)
      |
 stream_window ---- M windows of L bits, S bits apart, + position
      |
 M x matching_engine
      |     each: N x nem_comparator  (XOR -> hamming_weight -> <= E)
      |           priority_encoder    (lowest matching pattern wins)
      |
 record = {position, engine mask, pattern and distance per engine}
      |
 result_fifo (drop on full) ---- r_valid / r_ready
                                      ^
 pattern_store: N patterns, enables, E (writable while running)
```

## How the stream is cut into windows

This part is the easiest to get wrong when changing the design, so it gets the most detail here.

- **Bit numbering.** Each clock with `s_valid` high carries `W = S*M` bits. Stream bit number `k*W + j` is bit `j` of the k-th accepted word. The least significant bit comes first.
- **Window register.** `stream_window` keeps the last `NWORDS = 1 + ceil((L-S)/W)` words. With the defaults (L = 128, S = 2, M = 8) a word is 16 bits and 9 words, or 144 bits, are kept. New words shift in at the top.
- **Window positions.** Engine `m` reads the bits at offset `m*S` of that register. Its window starts at stream bit `base_pos + m*S`. Bit `i` of the window is stream bit `base_pos + m*S + i`, and it is compared with bit `i` of each pattern.
- **Coverage.** `base_pos` moves on by W for every word. Between them, the M engines therefore visit each position that is a multiple of S exactly once. A pattern is only found where it starts on a symbol boundary.
- **Throughput.** The stream moves S*M bits per clock with no stall, so the bandwidth is `S × M × f_clk`. At the defaults and 100 MHz that is 1.6 Gbps. With M = 48 at about 110 MHz it is about 10.5 Gbps.
- **Start and end of the stream.** The first NWORDS−1 words only fill the register, so nothing is evaluated for them. For each word after that, the M windows that end inside the newest word are evaluated. At the end of a stream, the last windows would need bits that have not arrived. They are evaluated only if more words are sent, for example padding words.

## The non-exact comparator

`nem_comparator` XORs the window with the pattern to get the Hamming distance vector. It then counts the ones of that vector.

**Counting the ones.** `hamming_weight` does the count and is where most of the logic is.
- The L-bit vector is split into segments of SEG_W bits. The default is 4 × 32 bits, the split that suits 6-input-LUT FPGAs best. The 128×1, 64×2 and 16×8 splits are available through `SEG_W`.
- Each segment has its own `popcount_tree`. The first level of the tree counts 6-bit groups, one 6-input LUT per result bit. Each later level adds pairs of results.
- This gives `1 + ceil(log2(ceil(L/6)))` levels in total.
- The comparator has C pipeline stages. C−1 of them are spread evenly over the levels of the segment trees, and the last register follows the sum of the segments.

**Threshold.** The threshold checker reports a match when `distance <= E`. E is a run-time register, so E = 0 gives exact matching without rebuilding.

**Exact-only build.** Setting the `EXACT` parameter leaves out the weight counter entirely and compares the two words directly. This build is much smaller. The equality is delayed by C clocks so that both builds have the same timing. The exact build reports a distance of 0 for a match and ignores E.

## Matching engine and priority

A `matching_engine` runs N comparators on the same window, one per pattern. The engine works as follows:

- A pattern whose enable bit is clear is ignored.
- `priority_encoder` selects the **lowest-numbered** enabled pattern within the threshold. The engine reports that pattern's index and distance. It does not report the closest pattern.
- The window's stream position travels down the pipeline alongside the data.
- The engine's outputs are registered. An engine therefore answers C + 1 clocks after it receives its window.

## Records and the result buffer

All M engines run in lock step. In a clock where at least one engine matches, `nem_accel` writes one record into `result_fifo`:

| field | width (defaults) | meaning |
|---|---|---|
| `r_pos` | 48 | stream bit position of engine 0's window; engine m's is `r_pos + m*S` |
| `r_mask` | M = 8 | engines that matched |
| `r_idx[m]` | M × 3 | selected pattern of engine m (valid where `r_mask[m]`) |
| `r_hdist[m]` | M × 8 | its Hamming distance (valid where `r_mask[m]`) |

Because a record holds the results of all engines, several matches in one clock cost no extra cycles and none is lost.

The buffer has 256 entries of 144 bits, about 36 Kb. The read side is first-word-fall-through with `r_valid`/`r_ready`. The stream cannot be held back, so if a record arrives while the buffer is full, that record is dropped. `dropped` counts the lost records, and the sticky `overflow` flag is set until reset. `match_count` counts selected windows, one per matching engine.

## Configuration

`pattern_store` holds the N patterns, one enable bit per pattern, and E. All of them can be written while the stream runs and take effect on the next clock. A window that is already inside the comparator pipeline may then be judged with the old pattern on one side and the new one on the other. For results that are exactly defined, change the configuration while `s_valid` is low and the C + 3 clocks of pipeline have drained.

`cfg_rd_addr`/`cfg_rd_data` read a stored pattern back. Reset clears all enables and sets E to 0. Pattern bits are not reset.

## Timing

- **Input.** One word is accepted on every clock with `s_valid` high. There is no ready signal.
- **Latency.** Once the window register is full, the record for a word accepted at clock edge t can be read after edge t + C + 2. With the defaults that is 4 clocks.
- **Reset.** `rst_n` is asynchronous and active low. It clears only the control state: valid bits, counters, pointers, enables and E.

## Parameters (`nem_accel`)

| parameter | default | meaning |
|---|---|---|
| `L` | 128 | matching word length in bits |
| `N` | 8 | patterns, one comparator each, per engine |
| `S` | 2 | symbol length: window step in bits |
| `M` | 8 | matching engines |
| `C` | 2 | comparator pipeline stages |
| `SEG_W` | 32 | segment width of the weight counter |
| `POS_W` | 48 | position width, which wraps after 2^48 bits |
| `FIFO_DEPTH` | 256 | result buffer entries |
| `EXACT` | 0 | 1 = exact-only comparators without weight counters |

The defaults are the reference configuration of the original design: L = 128, N = 8, S = 2, M = 8, C = 2, with the 4 × 32 weight counter. `POS_W`, `FIFO_DEPTH`, the record format and the configuration port are this design's own choices. The other configurations it was sized for are parameter settings:

- the M = 48 high-bandwidth point (`M = 48`);
- an M sweep from 2 to 32;
- L = 32 to 128;
- a 512-pattern build (`N = 512`).

At N = 512 the patterns alone take 64 Kb of registers. A build that size would be better served by RAM-based pattern storage, which this RTL does not provide.

## Departures and limits

- Matches are found only at positions that are multiples of S.
- When one window is within E of several patterns, the lowest index wins, not the nearest pattern.
- Patterns are held in flip-flops and shared by all engines.
- No host interface is included. The stream, configuration and result ports are plain signals, intended to be wrapped in AXI-Stream or a similar interface by the surrounding system.
- No timing constraints or FPGA implementation results come with the RTL. The rate S × M × f_clk assumes the chosen clock closes.
- The `SYNCASYNCNET` lint note on `rst_n` comes from the assertions, which sample the reset synchronously in `disable iff`. The logic itself uses only the asynchronous form.

## Files

| file | content |
|---|---|
| `rtl/nem_pkg.sv` | default sizes |
| `rtl/popcount_tree.sv` | 6-input-leaf pipelined adder tree |
| `rtl/hamming_weight.sv` | segmented weight counter |
| `rtl/nem_comparator.sv` | XOR, weight, threshold (or exact compare) |
| `rtl/priority_encoder.sv` | lowest-index select |
| `rtl/matching_engine.sv` | N comparators + priority encoder + position |
| `rtl/stream_window.sv` | sliding window, M offsets |
| `rtl/pattern_store.sv` | patterns, enables, threshold |
| `rtl/result_fifo.sv` | record buffer with drop counting |
| `rtl/nem_accel.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_nem_accel_exact`, `tb_nem_accel_m48` and `tb_nem_accel_n512` for other builds |

## Simulation

Every testbench is self-checking and ends with the line `TB_RESULT checks=<n> failures=<n>`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl +libext+.sv rtl/nem_pkg.sv tb/tb_nem_accel.sv \
    --top-module tb_nem_accel -o sim
./obj_dir/sim
```

**End-to-end test.** `tb_nem_accel` runs the top at its default sizes over a generated 24,000-bit stream. The stream contains planted copies of the patterns with 0–14 flipped bits and a run of a period-2 pattern that several engines match at once. A reference model checks every record. The test also checks:

- the 4-clock latency;
- one record per clock at full rate;
- a change of threshold and of a pattern during a pause in the stream;
- overflow: 300 records into 256 entries, 44 dropped.

It counts each mechanism: exact and near hits, multi-engine records, ties between patterns, a disabled pattern, stream gaps, reader stalls, threshold changes and drops. The test fails if any of them never occurs. It runs in a few seconds.

**Exact-only build.** `tb_nem_accel_exact` runs the top built with `EXACT = 1` at reduced sizes.

**Other evaluated configurations.** The same end-to-end test runs on two more configurations. `tb_nem_accel_m48` uses 48 engines: 96 bits and 384 comparisons per clock, and it builds in about 1.5 minutes. `tb_nem_accel_n512` uses 512 patterns per engine: 4096 comparisons per clock, and Verilator needs about 7 minutes to build it.
