# Nearest-spare online fault repair for a reconfigurable array (BLRB)

An array of 64 configurable logic blocks (CLBs) runs a circuit that is held
entirely in one configuration word. A few CLBs are left unused as spares. When
a CLB is reported faulty, a small hardware unit — the autonomous restructuring
unit — rewrites the configuration word so that the nearest free spare takes
over the faulty CLB's function and connections. The array keeps running while
this happens; the new word replaces the old one in a single clock.

The spare is chosen by the BLRB rule (best left / right block): find the first
spare to the left of the faulty CLB and the first to its right, and take the
nearer one. A nearby replacement keeps the rerouted connections short, which
is the point of the method: the circuit's paths stay about as long as before
the fault.

## The array and its configuration word

`vrc_fabric` is the array: 64 CLBs, thought of as 8 rows of 8 and numbered row
by row (CLB 9 is row 1, column 1). Each CLB is a 2-input look-up table followed
by a flip-flop. Every CLB input and each of the 8 primary outputs picks its
source with an *input number*:

| input number | source |
|---|---|
| 0 … 7 | primary input 0 … 7 |
| 8 + k (8 … 71) | registered output of CLB k |
| 72 … 127 | nothing (reads 0) |

So *input number = CF + CLB number*, with the correcting factor CF equal to the
number of primary inputs (8). This relation is used in both directions: to
find what a CLB is connected to, and to write the new connections after a
move.

The configuration word is 1208 bits, bit 0 first:

```
CLB k record, bits [k*18 +: 18]:  in0 [6:0] | in1 [13:7] | truth table [17:14]
output j selector, bits [1152 + j*7 +: 7]
```

The truth table is indexed by `{in1, in0}`. Because every CLB output is
registered, any connection pattern is legal and a CLB may read a CLB with a
higher number. A feed-forward circuit of depth *d* settles *d* clocks after its
inputs change. This matters for the repair: the spare that takes over can sit
on either side of the CLBs it feeds.

A 64-bit *active-spare word* comes with each configuration (bit k = 1: CLB k
is part of the circuit, 0: it is free).

## How a fault is repaired

A fault report (`fault_valid`, `fault_clb`) names a CLB. Detecting and locating
faults is not part of this design: the report comes from outside.
`aru_controller` handles one report at a time.

1. **Separate and decode** (`config_decoder`). The configuration word is cut
   into each CLB's input numbers and function bits and the output selectors.
   Every input number is decoded into "primary input p" or "CLB k".
2. **Is a repair needed?** Some faults need no reconfiguration.
   - If the CLB is already marked faulty, nothing happens (`RES_KNOWN`).
   - If the CLB is not active (an unused spare), the circuit is unaffected. The
     CLB is only taken out of the spare pool (`RES_RETIRED`).
3. **Choose the spare** (`spare_selector`). LSpare is the highest-numbered
   available spare below the faulty CLB. RSpare is the lowest-numbered one
   above it. The nearer one wins; on a tie, the left one. Searching by CLB
   number walks along the faulty CLB's row first and then into the rows above
   or below. The search does not wrap around, so the two end CLBs (0 and 63)
   each have only one side. If no spare is left, the CLB is marked faulty and
   the report ends with `RES_NO_SPARE`. The configuration is not changed.
4. **Rewrite the word** (`reconfig_generator`, with
   `interconnect_identifier`). In the new word:
   - the spare's record gets the faulty CLB's truth table;
   - the spare's inputs are the faulty CLB's inputs, re-encoded with
     CF + CLB number. An input that read the faulty CLB itself now reads the
     spare;
   - every CLB input and output selector that read the faulty CLB now reads the
     spare;
   - the faulty CLB's record is cleared to all zeros.
5. **Commit** (`aru_controller`, `clb_state_table`). The new word is written
   into the configuration register. In the same clock, the map is updated: the
   faulty CLB is marked faulty and inactive, and the spare becomes active
   (`RES_REPAIRED`).

Faults can keep coming, including on a spare that already replaced an earlier
fault. Each repair uses up one spare.

## Interface and timing of `blrb_ft_fpga` (top)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_load`, `cfg_load_word`, `cfg_load_active` | in | 1, 1208, 64 | load a configuration and its active-spare word; clears the fault map. Only while `fault_ready` |
| `fault_valid`, `fault_ready`, `fault_clb` | in/out/in | 1, 1, 6 | fault report, valid/ready |
| `repair_done`, `repair_result`, `repair_fault`, `repair_spare` | out | 1, 2, 6, 6 | one-clock completion pulse and its outcome (`aru_pkg::repair_result_e`) |
| `repair_moved` | out | 8 | number of connections the last repair moved to the spare |
| `lspare_found`, `lspare`, `rspare_found`, `rspare` | out | 1, 6, 1, 6 | the two BLRB candidates (LSpare, RSpare) for the CLB in `repair_fault`, under the current map |
| `pi`, `po` | in/out | 8, 8 | the running circuit |
| `clb_defect` | in | 64 | damage model: CLB k's output stuck at 0 (for simulation) |
| `cfg_word`, `active_map`, `fault_map`, `spare_map`, `n_spare` | out | 1208, 64×3, 7 | current configuration and CLB state |

Take a report at clock edge *t* (`fault_valid && fault_ready`). If it needs a
repair, the new configuration is in place from edge *t+3*, and `repair_done`
is high in the cycle that starts there. The other outcomes finish at *t+2*.
The next report can be taken one clock after `repair_done`.

The unit learns of faults only through reports. `clb_defect` models the
damage itself, so a testbench can show wrong outputs before a repair and
correct ones after it.

## What is given and what is chosen here

These parts come from the method itself:
- the 64-CLB array, arranged 8×8;
- the active-spare word;
- splitting the configuration into inputs, outputs and functions;
- the correcting-factor relation between input numbers and CLB numbers;
- the nearest left/right spare rule;
- the repair steps: the spare takes the faulty CLB's function bits and
  re-encoded inputs, and the active-spare word is updated;
- skipping reconfiguration for faults that do not affect the circuit;
- repair of multiple faults while the array keeps running.

The rest is this design's own. Check these points before you rely on it:

- **Configuration word size.** The method's reference application uses a
  608-bit word for 64 CLBs, but no field layout is known for it. 608 bits is
  not a whole number of bits per CLB, and two absolute 7-bit input numbers per
  CLB do not fit in it. The layout here therefore gives a 1208-bit word. A
  608-bit configuration must be re-encoded into this layout.
- **CLB contents.** Each CLB is a 2-input LUT with a registered output. This
  design also chose 8 primary inputs and 8 primary outputs, and CF = 8.
- **Spare search.** Row-major numbering, no wrap-around and the left-hand
  spare on a tie are this design's choices. In the worked example, CLB 9 is
  repaired by CLB 10. That is what this design does when CLB 10 is the nearer
  spare, or the only spare at distance 1.
- **Rerouting readers.** Readers of the faulty CLB (CLB inputs and output
  selectors) are rewritten to read the spare. The method only says that the
  faulty CLB's connections must be moved to the spare. Without this step the
  circuit would not work again.
- **Fault states and timing.** The separate fault map, the cleared record of
  the faulty CLB, the valid/ready handshake, the reset behaviour and the
  2-/3-clock timing are all this design's choices. The method gives no cycle
  counts.
- **Damage model.** The stuck-at-0 `clb_defect` model is a simulation aid.

## Files

| file | block |
|---|---|
| `rtl/aru_pkg.sv` | sizes, CF, word layout, `repair_result_e` |
| `rtl/config_decoder.sv` | bit separation and input-number decoding |
| `rtl/interconnect_identifier.sv` | readers of a CLB, fan-out count, used map |
| `rtl/clb_state_table.sv` | active / fault / spare maps |
| `rtl/spare_selector.sv` | BLRB search (LSpare, RSpare, best) |
| `rtl/reconfig_generator.sv` | reconfigured configuration word |
| `rtl/aru_controller.sv` | report sequencing |
| `rtl/vrc_fabric.sv` | the 64-CLB array |
| `rtl/blrb_ft_fpga.sv` | top |

Each module has a self-checking testbench `tb/tb_<module>.sv`, and there are
two system-level ones:

- `tb/tb_blrb_ft_fpga.sv` runs at full size. It places a random circuit on the
  array, with spares at both edges and about one CLB in four. It then damages
  and reports CLBs one by one, checking each time:
  - the LSpare/RSpare candidates and the spare chosen, against its own
    nearest-spare search;
  - the number of connections moved, counted in the old word;
  - the latency, the maps and the moved function bits;
  - that the outputs match the undamaged circuit again.

  It also covers repairs with a left spare and with a right spare, retiring an
  unused spare, a repeated report, a CLB that drives an output, a replacement
  that fails in turn, and running out of spares. It counts each of these
  events and fails if one never happens.
- `tb/tb_noise_filter_example.sv` builds a binary 3-tap median (majority)
  filter on the array: 8 outputs, 4 CLBs each. It repeats the worked example
  (CLB 9 fails, CLB 10 takes over) followed by seven more faults. After each
  repair it checks all 256 input patterns.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/aru_pkg.sv tb/tb_blrb_ft_fpga.sv --top-module tb_blrb_ft_fpga
./obj_dir/Vtb_blrb_ft_fpga
```

Swap in any other testbench name. `-y rtl` lets Verilator find the modules.
The package has to be named first. All testbenches finish in well under a
second of simulation time.

## Changing the size

The array size, inputs and outputs are parameters of every module (`P_N_CLB`,
`P_N_PI`, `P_N_PO`, `P_N_IN`, `P_LUT_W`, `P_CF`), with defaults in `aru_pkg`.
The input-number width (`clog2(N_CLB + CF)`), the record width and the word
width are derived from them. The testbenches are written for the defaults.
`P_N_IN` and `P_LUT_W` must satisfy `P_LUT_W = 2**P_N_IN`. Every block
is combinational except the configuration register, the map and the
controller. A larger array grows the decoder, the rewrite logic and the spare
search linearly in the number of CLBs.
