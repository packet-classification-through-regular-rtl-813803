# δFA packet classifier

This is a packet classifier whose rules are regular expressions over a packet's 5-tuple. The tuple is not matched as fixed fields against prefixes. It is written out as a 13-character string: source IP, destination IP, source port, destination port and protocol, most significant byte first. That string is run through a deterministic finite automaton compiled from the rules. If the state reached after the last character accepts, the packet is forwarded together with the 52-bit result stored in that state. Otherwise it is dropped.

The automaton is stored in external SRAM as a **δFA** (delta finite automaton). It would be too large as a full DFA, which has 256 next-state pointers per state. The δFA rests on an observation: neighbouring DFA states send most characters to the same next state. So each state stores only the transitions in which it differs from the states that lead into it. The walker keeps the full 256-entry transition row of the current state in on-chip RAM, called the *local table*. When it enters a new state, it overwrites the entries that state stores and leaves the rest alone. The next state is then read from the local table entry of the input character. There is still exactly one state visit per character.

The architecture follows the paper "Packet Classification Through Regular Expression Matching on NetFPGA": a 125 MHz NetFPGA, 72-bit SRAM rows, the two state formats, the split local table and a flow cache. Sizes and signalling that the paper leaves open were chosen for this implementation. Each choice is marked below.

## Block diagram

```
 in_* ─► datapath_ctrl ──words──► packets FIFO (sync_fifo) ───────────► output_stage ─► out_*
              │                                                            ▲
              └──job──► job queue ─► flow_cache ──result──► result queue ──┘
                                        │  ▲ miss / verdict
                                        ▼  │
                                    dfa_automaton ── local_table (2 × local_bram)
                                        │  ▲ burst requests / rows
                                        ▼  │
                                     sram_ctrl ◄── hw_* (image loading)
                                        │  ▲
                                   sram_* (SRAM + driver, external)
```

| Module | Role |
|---|---|
| `dfa_pkg` | Shared widths, the tuple/job/result structs and header-field helpers |
| `datapath_ctrl` | Parses Ethernet/IPv4/TCP/UDP headers and emits one job per packet |
| `sync_fifo` | Packets FIFO (1024 × 68 bits), and the 16-deep job and result queues |
| `flow_cache` | 1024-entry direct-mapped result cache keyed by the full tuple |
| `dfa_automaton` | Walks the δFA over the 13 tuple characters |
| `local_table`, `local_bram` | Local transition set: two 128 × 24 dual-port read-first RAMs |
| `sram_ctrl` | Turns "N rows from address A" into single-row SRAM reads; also carries host writes |
| `output_stage` | Pairs results with buffered packets, then forwards or drops them |
| `dfa_classifier_top` | Wires the blocks together |

## State memory format

This is the part that must match whatever software builds the image. Each SRAM row is 72 bits. Every state starts on a new row, and its address is its *pointer*: a 24-bit row address, of which the low 19 bits are used (512K rows × 72 bits = 4.5 MB).

**Header row (both types)**

| bits | type 1 (bitmap state) | type 2 (list state) |
|---|---|---|
| 71 | 0 | 1 |
| 70 | accepting | accepting |
| 69:64 | 0 | number of stored transitions n (0..30) |
| 63:56 | number of stored transitions n (0 means 256) | 0 |
| 55:0 | classification result | classification result |

**Type 1 body.** Four bitmap rows come first. Bitmap row k (k = 0..3) holds characters 64k..64k+63 in bits 63:0, with character 64k+j at bit j; bits 71:64 are zero. Then come ⌈n/3⌉ pointer rows, each holding pointers at [71:48], [47:24] and [23:0]. The pointers belong to the set bitmap bits in increasing character order. A state therefore takes 5 + ⌈n/3⌉ rows. The fully specified root state takes 5 + 86 = 91 rows (819 bytes).

**Type 2 body.** There are ⌈n/2⌉ rows. Each row holds the pairs (char [63:56], pointer [55:32]) and (char [31:24], pointer [23:0]); bits 71:64 are zero. A state takes 1 + ⌈n/2⌉ rows (9 to 144 bytes).

The hardware reads the type from bit 71, so the image builder decides which type to use. A list is at most as large as a bitmap for n ≤ 24, and the list form is limited to 30 entries. The paper fixes the field positions. The bitmap bit order, the pointer order within a row and "0 means 256" for the one-byte type-1 count are choices made here; a count of 256 cannot be stored in a byte otherwise.

**Image requirements.** The root state (at `root_addr`) must store all 256 transitions, because it is visited first for every packet and reloads the whole local table. Every other state s must store each character c for which any predecessor p of s has T[p][c] ≠ T[s][c]. Under that rule, the local table always equals the current state's full DFA row. `tb/dfa_image_pkg.sv` contains a builder that follows this rule and can serve as a reference.

## Walking one packet (`dfa_automaton`)

For each character i = 0..12, starting at the root:

1. **Header.** A single-row read at the state's pointer gives the type, n, the accept flag and the result.
2. **Body.** One burst request reads the rest of the state: 4 + ⌈n/3⌉ rows for type 1, ⌈n/2⌉ rows for type 2.
   - Type 1: the bitmap rows are latched. Each pointer row is then paired with the next three set bitmap bits, found by three chained lowest-set-bit searches that clear each bit as it is used.
   - Type 2: the characters come with the pointers.
   - Each row's transitions are written into the local table in the cycle the row arrives.
3. **Lookup.** Once the writes are done, the local table entry of character i is read. It is the pointer of the next state.

After character 12, only the header of the state reached is read. Its accept bit is the verdict, and its result field (low 52 bits) is the classifier output. Jobs are handled one at a time.

**Cycle count.** Let D be the latency from a request being accepted to its first row arriving. Then each visited state costs 2D + rows + 3 cycles, or D + 3 if it stores nothing. Each bank conflict (next section) adds 1 cycle. The final header and the hand-over add D + 3 more. The automaton testbench checks this exact count for every job. The root visit alone costs 2D + 93 cycles.

## Local table and bank conflicts (`local_table`)

The 256 × 24-bit table is split by the lowest bit of the character: even characters go to bank 0 and odd characters to bank 1. Each bank is a dual-port read-first 128 × 24 RAM (`local_bram`), so four writes per cycle are possible.

- A type 2 row carries two transitions, and these always fit.
- A type 1 row carries three. They fit unless all three fall into the same bank. In that case two are written at once and the third goes into a one-entry hold register. The hold register is written on the next cycle, and `wr_ready` is low during that cycle, which stalls the row stream by one cycle.
- The lookup read uses port A of the character's bank, and only in a cycle without writes. An assertion checks this.

## SRAM access (`sram_ctrl`)

The walker issues requests of the form "read N consecutive rows from address A". `sram_ctrl` issues one read command per cycle to the SRAM driver and returns the rows in order on a valid/ready stream. The driver's read latency may be anything, as long as data returns in order with `sram_rvalid`. Returned rows go into an 8-row buffer. A read is only issued while buffered rows plus reads in flight are fewer than 8. This lets the walker stall (on a bank conflict) without losing data: with the consumer always ready, a burst streams one row per cycle, and otherwise nothing is lost.

Host writes (`hw_*`) load the image. They are accepted only when no burst is running and no request is waiting. The SRAM chips and the board's SRAM driver are not part of this RTL. `tb/sram_model.sv` is a fixed-latency behavioural stand-in for both.

## Flow cache (`flow_cache`)

Packets of one flow share a verdict, so the result of each flow is cached:

- 2^`CACHE_AW` entries (default 1024), direct mapped.
- The index is the XOR-fold of the 104 tuple bits.
- Each entry stores a valid bit, the full tuple as key, the match flag and the 52-bit class.

Each job takes a 1-cycle table read.
- **Hit:** the result is ready 2 cycles after the job is taken.
- **Miss:** the tuple goes to the automaton, and its verdict is returned and written into the entry, evicting the previous flow.
- **Non-IPv4 jobs:** these bypass both the cache and the automaton as non-matching.

After reset, the table is swept invalid one row per cycle, so `job_ready` is low for 1024 cycles. The paper asks for a hash table in BRAM. The size, hash and replacement policy are choices made here.

## Packet path (`datapath_ctrl`, packets FIFO, `output_stage`)

**Word format.** Input words are 64 bits, with frame byte 8k in bits 63:56 of word k. `in_sop` and `in_eop` mark the first and last words. `in_bytes` gives the number of valid bytes in the last word, with 0 meaning 8.

**Parsing.** The parser copies every word into the packets FIFO and picks tuple bytes by their position in the frame:
- protocol at byte 23;
- source and destination addresses at bytes 26..33;
- ports at byte 14 + 4·IHL, so IP options are skipped.

Ports are kept for TCP and UDP only; for other protocols they are zero. The job (tuple, length, IPv4 flag) leaves as soon as the last port byte has passed, or at the end of the frame for short or non-IPv4 frames. The length is the IPv4 total length + 14, or the counted frame length otherwise. `in_ready` falls while the packets FIFO or the job queue is full.

**Output.** `output_stage` binds the next result to the packet at the head of the FIFO. A match is sent on `out_*`, with `out_sop` on its first word and `out_cls`/`out_len` valid for the whole packet. A non-match is drained at one word per cycle. Results come back in packet order because the cache and the walker handle one job at a time.

## Performance

All figures assume a 125 MHz clock.

- **Cached flows.** Frames are handled far faster than a gigabit link can deliver them. The top-level test sends back-to-back 60-byte frames one 1 GbE minimum-frame time apart (84 cycles) and checks that they leave at least that fast (1.488 Mpps).
- **Uncached flows.** A frame needs 14 state reads, about 800 cycles with the randomly generated test automata and a 3-cycle SRAM; the root state alone takes about 100 cycles. The classifier keeps up with minimum-size traffic only while most frames hit the cache. Otherwise it applies back-pressure on `in_ready`.

`tb_workload_rates` models a gigabit port without buffering: a frame that arrives while the input is busy or not ready is lost. It replays two experiments reported for the original prototype:

| Experiment | Result here |
|---|---|
| All traffic matching, 64 flows, 0.3 to 1.22 Mpps | At most 4 of 600 frames lost per rate point, caused by flows that collide in the direct-mapped cache. This agrees with the near-lossless result reported for the original. |
| Constant interest traffic (about 61,000 frames/s from 4096 flows) plus non-matching background from random flows, link load 0.25 to 1 | The automaton saturates on background misses and most interest frames are lost: 27 of 40 at load 0.25, 38 of 40 at load 1. The original prototype reported almost no loss. |

The published design must therefore be faster on new flows than this implementation, for example through shorter walks or a larger cache. The paper does not say how. Treat miss throughput as the main open performance question.

## Departures and open points

- The paper does not say how the verdict is taken from the walk. Here it comes from the state reached after the last character. A pattern that accepts partway through the tuple and then leaves the accepting state does not match.
- The paper has the parser feed characters one at a time. Here the whole tuple is handed over as one job and the walker steps through it, which produces the same character sequence.
- Queue depths, the cache geometry, the port protocols, the SRAM driver interface, non-IPv4 handling (dropped) and the mapping of the 56-bit result field to the 52-bit output (low bits) are all choices made here.
- One job is in flight at a time. Overlapping the header read of one packet with another packet's walk is not attempted.
- The software that compiles rules into a DFA and then a δFA is not included. The test-side builder takes a DFA transition table as input, not regular expressions.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog. Example with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/dfa_pkg.sv tb/dfa_image_pkg.sv tb/pkt_gen_pkg.sv \
  tb/tb_dfa_classifier_top.sv --top-module tb_dfa_classifier_top
./obj_dir/Vtb_dfa_classifier_top
```

For the other testbenches, list `rtl/dfa_pkg.sv` (plus `tb/dfa_image_pkg.sv` for `tb_dfa_automaton` and `tb/pkt_gen_pkg.sv` for `tb_datapath_ctrl`) and the testbench file; `-y rtl -y tb` finds the rest.

| Testbench | What it checks |
|---|---|
| `tb_dfa_classifier_top` | Runs at default parameters. Loads a random δFA through the host port and sends about 900 frames (TCP/UDP/other, IP options, non-IPv4). Checks every forwarded word, its class and length against a reference DFA run. Checks that each of these happened: hit, miss, eviction, bypass, both state types, bank conflict, forward, drop, input and output back-pressure. Checks the 84-cycle line rate for cached flows. |
| `tb_dfa_automaton` | Verdicts against the reference DFA, the exact cycle count per job, and random stream gaps and back-pressure |
| `tb_local_table` | All 256 entries after writes; conflict detection and the one-cycle hold |
| `tb_sram_ctrl` | Burst data and order, one row per cycle when unstalled, no loss when stalled |
| `tb_flow_cache` | Results in order, hits on repeated flows within 4 cycles, evictions, non-IPv4 bypass |
| `tb_datapath_ctrl` | Word pass-through and tuple, length and IPv4 flag, under back-pressure |
| `tb_output_stage` | Forward/drop by result, sop/eop, class and length alignment |
| `tb_sync_fifo` | Order, count, full and empty behaviour |
| `tb_workload_rates` | The two throughput experiments above, with all forwarded frames checked |

`tb/dfa_image_pkg.sv` builds the test automata. It creates a random DFA whose "default" row leads to four hub states, derives the stored transition sets by the rule above and lays the states out in the format above. `tb/pkt_gen_pkg.sv` builds the frames.
