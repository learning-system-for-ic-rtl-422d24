# Learning-based JTAG intrusion detector

A JTAG test port is a backdoor: once a chip ships, its test and debug
instructions still give deep access to the silicon. Passwords and
challenge–response protocols guard such a port, but they fail when a secret
leaks. This design watches the port instead. A legitimate user knows what the
undocumented instructions do and drives them in a consistent way. An attacker
who probes them does not. Every instruction loaded into the TAP instruction
register is therefore described by eight features and classified on chip by
an 11-tree random forest as normal or illegitimate. The verdicts are gathered
in groups of four. A group that is mostly illegitimate raises a security
alert. The detector also learns: a table of legal instruction-to-instruction
transitions is edited at run time, and a transition seen in a suspicious
group is removed from it.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It follows a
published FPGA implementation of this scheme, which ran the detector at
150 MHz and the JTAG clock at 30 MHz. Where that description is silent, the
choices made here are listed in [Departures and own choices](#departures-and-own-choices).

## Data flow

```
 host ══AXI4-Lite══► axi_slave_core: CONTROL / STATUS / ALERT_COUNT ──► complete_board:

 pin memories ──► global_ctrl ──TDI/TMS/TRST──► jtag_tap ──state, IR, IR shift reg,
 (TDI,TMS,TRST)   (replay FSM)                              update_ir, shift_dr
                                                                  │
                         ┌────────────── detection_system ────────┼─────────────┐
                         │                                        ▼             │
                         │  transition_lut ◄──read── data_collector            │
                         │   256 x 32      ◄─r/w─┐     │ 42-bit features,      │
                         │                       │     │ pred_start            │
                         │                       │     ▼                       │
                         │                 feature_adapt ◄── rf_classifier     │
                         │                  alert, count      11 x (decision_tree
                         │                                      + tree_mem)    │
                         └─────────────────────────────────────────────────────┘
```

`complete_board` replays a recorded JTAG session from three one-bit
memories (one each for TDI, TMS and TRST) into the TAP controller. The
detector then classifies every instruction of that session. The host side
is a flag handshake: reset → `got_reset`, `start`, `out` (session over),
`finish`. The results are `alert` and `alert_count`. The top level,
`axi_slave_core`, puts those flags in three 32-bit registers on an AXI4-Lite
slave port, so that a processor can run the detector as a co-processor.

## The eight features

All features describe the instruction that is being *replaced*. They are
captured in the system-clock cycle in which `update_ir` rises. At that moment
the instruction register still holds the current opcode, and the IR shift
register holds the opcode about to be loaded (the "next" instruction).

| # | feature | width | kind |
|---|---------|-------|------|
| 1 | opcode bits 7:4 | 4 | categorical |
| 2 | opcode bits 3:0 | 4 | categorical |
| 3 | TCK cycles in Shift-DR since the last Update-IR | 8 | numerical |
| 4 | TCK cycles in Run-Test/Idle | 8 | numerical |
| 5 | TCK cycles in Test-Logic-Reset | 8 | numerical |
| 6 | TMS toggles | 8 | numerical |
| 7 | instruction undefined: its table word is all `8'hFF` | 1 | categorical |
| 8 | transition miss: the next opcode is none of the four bytes of the current opcode's table word | 1 | categorical |

The counters saturate at 255 and restart at every Update-IR. The vector is
42 bits wide and is declared as `features_t` in `jtag_sec_pkg`.

## How a tree is stored and walked

This is the least obvious part of the design. Each tree occupies a 512-word
by 40-bit memory. The memory has an asynchronous read port, so it maps to
distributed LUT RAM on an FPGA.

```
node word      [39:36] feature index (1..8)   [35:34] unused
               [33] leaf flag   [32] class of a leaf
               [31:24] threshold, or mask of valid candidate values
               [23:12] left-son address   [11:0] right-son address (low 9 bits used)
candidate word [39:32] unused   value k at [4k+3:4k], k = 0..7
```

The root sits at address 0. A `decision_tree` is a single universal node
driven by two small state machines: idle/active, and a two-phase read. For
every node it reads two words, the node word and then the word at the next
address. The test then depends on the node's feature:

* **Numerical (features 3–6):** go left when `feature < threshold`.
  Thresholds from training, such as 46.5, are stored rounded up, so integer
  compares give the same split.
* **Categorical (features 1, 2, 7, 8):** go left when the feature's four low
  bits equal a candidate value `k` whose bit `k` is set in the threshold
  field. Otherwise go right. For example, mask `8'b0010_1100` enables values
  2, 3 and 5.
* **Leaf (bit 33 set):** bit 32 is the tree's vote.

By convention, numerical nodes and leaves go in words 0–255 and the two-word
categorical nodes in words 256–511. That gives 256 + 128 nodes per tree. The
hardware does not enforce this. It takes the node type from the feature
index, so any placement works as long as a categorical node's second word
follows it.

`rf_classifier` starts all 11 trees at once. It collects their `done` and
`class` vectors. When every tree is done it sets the final class to 1 if more
than `NT/2` trees voted 1 (6 or more of 11).

## Timing

The system clock is `clk`. TCK is not a separate clock: `global_ctrl` pulses
`tck_en` once every `TCK_DIV` = 5 clocks. That is the 30 MHz / 150 MHz ratio
of the original implementation, and it keeps the whole design in one clock
domain.

| step | clocks |
|------|--------|
| `update_ir` rises → features registered | 1 |
| → `pred_start` | 1 |
| one tree, path of N nodes (leaf included) | 2N |
| forest, longest path Nmax → `pred_done` | 2·Nmax + 2 |
| end of a group of four → LUT word rewritten | 4 |

From Run-Test/Idle, an instruction-register scan takes at least 13 TCK
periods (65 clocks) between two Update-IR events. Root-to-leaf paths of up to
about 27 nodes therefore finish before the next instruction arrives. The
original implementation reports classifications of 22 and 28 cycles.

## Alert and learning (`feature_adapt`)

Predictions are counted on the rising edge of the classifier's `done` flag.
After every fourth prediction:

* **3 or 4 illegitimate:** `alert` ← 1, and `remove_req` is raised. The next
  opcode is erased (set to `8'h00`) from the current opcode's table word.
* **0 or 1 illegitimate:** `alert` ← 0, and `insert_req` is raised. The next
  opcode is written into the lowest free byte (`8'h00` or `8'hFF`) of that
  word, unless it is already there or the word is full.
* **2 illegitimate:** nothing changes.

A request is served in the order IDLE → READ → ADAPT → WRITE, one clock per
state. While the FSM is away from IDLE, `lut_addr_vld` switches the table's
address multiplexer from the data collector to this block. `alert_count`
counts every illegitimate prediction, so the host can compute detection and
escape rates per prediction.

## JTAG side

`jtag_tap` is a plain IEEE 1149.1 controller. It has the 16-state machine, an
8-bit instruction register with its shift register (Capture-IR loads
`8'b0000_0001`), and a 1-bit bypass register used for every instruction. Its
TDO is registered. TRST is active low. Test-Logic-Reset loads BYPASS
(`8'hFF`). It is 22 flip-flops.

`global_ctrl` is the replay FSM: INITIAL → (`start`) → READ → (`last_addr`
reached) → FINAL → (`finish`) → INITIAL. Reset returns it to INITIAL from any
state. During READ it applies one stored bit per TCK period. Outside READ the
pins idle at TMS = 1, TDI = 0, TRST_N = 1, so the TAP stays in
Test-Logic-Reset.

## Host registers (`axi_slave_core`)

| offset | register | access | bits |
|--------|----------|--------|------|
| 0x0 | CONTROL | read/write | 0 reset, 1 start, 2 finish |
| 0x4 | STATUS | read only | 0 got_reset, 1 out, 2 alert |
| 0x8 | ALERT_COUNT | read only | illegitimate predictions since reset |
| 0xC | – | reads 0 | |

The system is in reset while the bus reset is active or CONTROL bit 0 is
set. A host program works as follows:

1. Write 1 to CONTROL, then 0. Check `got_reset`.
2. Write 2 (start) and poll STATUS until `out` is set.
3. Write 4 (finish) and read ALERT_COUNT.

Each CONTROL write replaces all three flags. Only byte lane 0 is used.

On the bus side, AWREADY and WREADY are given together once both valids are
high and no response is pending. BVALID and RVALID come one cycle after the
address is accepted and hold until taken. Two assertions check the hold
rule. All responses are OKAY. The load ports and observation outputs of
`complete_board` pass through the wrapper unchanged.

## Size

Flip-flop bits after a generic yosys synthesis at the default parameters,
next to the published FPGA figures:

| block | flip-flops here | published |
|-------|-----------------|-----------|
| `jtag_tap` | 22 | 22 |
| `data_collector` | 93 | 85 |
| `feature_adapt` | 107 (32-bit counter included) | 173 |
| `rf_classifier` (11 trees) | 505 | 1 292, with the bus interface |
| `axi_slave_core` (everything) | 793 | 1 492, with the clock manager |

The memories stay memories: 11 × 512 × 40 bits of trees, 256 × 32 bits of
transition table and 3 × 32 768 bits of pin memory. All of them have
asynchronous reads, so on an FPGA they map to distributed RAM.

## Departures and own choices

* **One clock with a TCK enable** instead of two clocks from a clock manager.
  The ratio is an integer, so of the JTAG frequencies evaluated in the
  original (12.5, 25, 30 and 42 MHz against 150 MHz), 42 MHz cannot be
  reproduced exactly.
* **Load ports** (`tree_*`, `lut_cfg_*`, `stim_*`) fill the forest, the
  transition table and the pin memories. The original filled them from the
  FPGA bitstream. The trained trees and the processor's instruction table
  are not part of this RTL. The testbenches generate random ones.
* **Removal rule.** The source states the insertion rule: none or one of
  four illegitimate. Removal is taken as the mirror rule, three or four of
  four. The slot used by an insertion and the meaning of the alert counter
  are also this design's.
* **Encodings** are this design's: the feature-index encoding (1..8), the
  root at address 0, node type from the feature index, the saturating 8-bit
  counters, the TAP state encoding and the capture value.
* **Pin memory depth** is 32 768 bits. The largest recorded session in the
  original evaluation is 24 924 bits per pin.
* **Register map.** The original says which flags the three registers hold,
  but not where. The offsets, bit positions and channel timing are this
  design's. The original ran the detector at 150 MHz from a clock manager
  fed by the bus clock. Here everything runs on the bus clock.
* **Not built:**
  * the sequential single-memory classifier, an alternative the original
    dropped in favour of the parallel one;
  * the host processor and its program, and the bus interconnect;
  * the clock manager;
  * a boundary-scan register.

## Simulating

Every testbench in `tb/` checks itself. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. The testbenches use
`$urandom` and no constraint solver, and they run on two-state simulators.

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/jtag_sec_pkg.sv tb/tb_forest_pkg.sv tb/tb_system_pkg.sv \
  tb/tb_axi_slave_core.sv --top-module tb_axi_slave_core -o sim
./obj_dir/sim
```

Use the same command with another `tb_*` file as the top for the unit tests.

* `tb_forest_pkg`: builds random trees in the memory format above and walks
  them in software.
* `tb_system_pkg`: builds random JTAG sessions (IR scans with optional
  pauses, DR scans including long ones, idle, TMS resets, TRST pulses). It
  runs them through an independent model of the TAP, the features, the
  forest and the learning rules.
* `tb_axi_slave_core`: the full-size end-to-end test. It runs the top with
  no parameter overrides and acts as the host program over the bus. It also
  checks the register behaviour, stalled responses and a bus reset during a
  run. Then it runs the same two-session flow as `tb_complete_board`.
* `tb_complete_board`: runs `complete_board` at its defaults, through two
  sessions of 150 and 40 instructions. It compares every
  prediction, the alert, the alert count and the table edits with the model.
  It also requires that each mechanism occurred: both classes, alert set and
  cleared, removal, insertion, undefined instruction, transition miss and
  hit, counter saturation, TRST, TMS reset, IR pause and TDO activity.
* `tb_instruction_sets`: four sessions sized like the published evaluation
  sets. Each is random, but has the set's instruction count and exact
  bit count. All four run on three copies of the system, at TCK_DIV = 12, 6
  and 5. It checks every prediction, and that the run takes one TCK period
  per bit. It also compares the run time with the published execution
  times, which include the host's reset handshake:

  | set | instructions | bits | 12.5 MHz | 25 MHz | 30 MHz |
  |-----|--------------|------|----------|--------|--------|
  | 1 boundary scan | 1 | 24 924 | 1993.9 µs (2003) | 997.0 (1006) | 830.8 (840) |
  | 2 control-register reads | 66 | 5 980 | 478.4 (488) | 239.2 (248) | 199.3 (209) |
  | 3 fuse attack | 89 | 5 770 | 461.6 (471) | 230.8 (240) | 192.3 (202) |
  | 4 clock attack | 129 | 6 813 | 545.0 (554) | 272.5 (282) | 227.1 (236) |

  Published times are in parentheses. Each simulated time is about 9 µs
  lower, which is about the cost of the host's reset handshake. The
  published accuracy figures cannot be reproduced, because the trained
  trees and the real sessions are not available.
* `tb_detection_system`: drives the detector from the model's TAP trace. It
  checks every feature vector and the prediction latency.
* The unit testbenches: `tb_tree_mem`, `tb_decision_tree` (checks the class
  and the 2N-cycle latency), `tb_rf_classifier` (checks the vote, the vote
  count and the 2·Nmax + 2 latency), `tb_transition_lut`,
  `tb_data_collector`, `tb_feature_adapt`, `tb_jtag_tap`, `tb_stim_mem` and
  `tb_global_ctrl`.

## Files

| file | contents |
|------|----------|
| `rtl/jtag_sec_pkg.sv` | TAP state enum, `features_t`, node-word structs, feature selection |
| `rtl/axi_slave_core.sv` | top level: bus registers around the system |
| `rtl/complete_board.sv` | session replay, TAP and detector |
| `rtl/global_ctrl.sv`, `rtl/stim_mem.sv` | session replay |
| `rtl/jtag_tap.sv` | TAP controller |
| `rtl/detection_system.sv` | detector wiring |
| `rtl/data_collector.sv` | feature extraction |
| `rtl/transition_lut.sv`, `rtl/lut_mem.sv` | transition table and its access multiplexers |
| `rtl/feature_adapt.sv` | alert and table learning |
| `rtl/rf_classifier.sv`, `rtl/decision_tree.sv`, `rtl/tree_mem.sv` | random forest |
