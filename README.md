# REAPR-style spatial automata engine with a Random Forest I/O kernel

A nondeterministic finite automaton (NFA) is slow on a CPU because every input
symbol requires walking the successor lists of every active state. In
hardware the automaton can be laid out *spatially*: every state becomes a
flip-flop plus a little logic, the input symbol is broadcast to all states at
once, and the whole automaton advances by one symbol per clock cycle, however
many states are active. This repository holds synthesizable SystemVerilog for
such an engine and for a complete kernel built around it: a Random Forest
classifier automaton that reads its input from memory over AXI, votes on-chip
and writes back one byte per input symbol. The architecture follows the
published REAPR engine (Reconfigurable Engine for Automata Processing) for
FPGAs; the sections below say where this RTL makes its own choices.

## The state-transition element

Automata are used in *homogeneous* form, where every transition into a state
carries the same symbol set. The transition condition can then be merged into
the state, giving a **state-transition element (STE)**:

```
            predecessors' match outputs
                 |  |  |
               [ OR ] --(+ start term)--> [ act_q ] --+
                                                      AND ---> match
   symbol ---> character class (256 x 1 bit) --------+
```

* `act_q` says the STE is *enabled* for the current symbol: one of its
  predecessors matched the previous symbol.
* The **character class** is a 256-entry, 1-bit column: bit *s* is 1 if the
  STE accepts byte *s*.
* `match = act_q & class[symbol]` is the STE's output; it enables its
  successors for the next symbol and, for a reporting STE, is a report.

Two start modes are supported per STE: *all-input* (enabled for every symbol,
so a pattern can start anywhere) and *start-of-data* (enabled for the first
symbol of a stream only). Example: the three-state automaton
`[a] -> [cd] <- [b]`, with `[a]` and `[b]` all-input starts, matches `[cd]`
on every `c` or `d` that directly follows an `a` or `b`. It is the default
automaton of `nfa_core`.

## Where the character classes live: BRAM or LUTs

The class column of an STE can be stored in two ways, and `nfa_core` mixes
them:

* **BRAM.** A block RAM configured 512 x 36 holds the columns of 36 STEs
  side by side; the symbol is the row address and one read gives the class
  bits of all 36 (`cc_bram`, only the 256 addressable rows are modelled).
  An 18 Kb BRAM could ideally hold 72 columns, but 36 is the widest
  aspect ratio available. With 2,160 BRAMs this gives 77,760 STEs.
* **LUTs.** The class is a constant compared with the symbol in logic.
  LUT designs are more compact and lower power but take far longer to
  place and route; BRAM designs compile faster but route to distant RAMs.

`N_BRAM_CELLS` sets how many BRAMs may be used. States are assigned to BRAM
first (state *i* goes to BRAM *i*/36, column *i* mod 36) and the rest
overflow into LUTs, so `N_BRAM_CELLS = 0` is the pure LUT engine and the
default of 2,160 is BRAM-first with LUT overflow.

Both storages have the same timing: a BRAM read is synchronous, so the LUT
path registers the symbol too. When `consume` is high the symbol is taken,
and from the next cycle `match[i]` gives state *i*'s output for it. The
engine consumes one symbol in every cycle where `consume` is high, with no
gaps required.

## Describing an automaton

A generator tool would normally write a netlist per automaton. Here one
generic engine elaborates the automaton from constant functions in
`rtl/reapr_pkg.sv`, selected by a parameter of type `aut_cfg_t`:

| function | returns |
|---|---|
| `aut_n_states(c)` | number of STEs |
| `aut_max_in(c)` | largest fan-in |
| `aut_src(c, i, k)` | *k*-th predecessor of STE *i*, or -1 |
| `aut_start(c, i)` | `START_NONE`, `START_SOD` or `START_ALL` |
| `aut_cc(c, i)` | 256-bit character class |
| `aut_n_reports(c)`, `aut_report_state(c, r)` | reporting STEs |

Three descriptions are provided: `AUT_FIG1` (the example above), `AUT_RF` (see
below) and `AUT_TEST` (a small random graph used by the tests). To map another
automaton, add a kind and extend these functions. Generate loops are split
into groups of 1,024 states, which keeps every loop short enough for
Verilator's unroll limit at any size.

## The Random Forest kernel (`reapr_rf_top`)

A Random Forest automaton has one reporting state per decision-tree leaf
path; each report is a vote for one of 10 classes (the digits 0-9).
Exporting all 1,661 report bits per symbol would make the output 200 times
larger than the input and leave the kernel waiting on the PCI-Express link:
about 6 MB/s instead of 250 MB/s at 250 MHz. The kernel instead counts the
votes on-chip and exports one byte per symbol:

```
 AXI R --> input FIFO --> nfa_core --> 10 class vectors --> rf_voter --> output FIFO --> AXI W
 (axi_read_master)        33,220 STEs   (1,661 report bits)   v0 .. v9     (axi_write_master)
```

**Voter.** The report bits are grouped into ten classification vectors
c0..c9 (report *r* votes for class *r* mod 10 and is bit *r*/10 of that
vector, 167 bits each). Ten identical stages follow each other. Stage v*i*
counts the ones in c*i* (its Hamming weight *w*). If *w* is larger than the
`max` it received, it passes on *i* as the vote and *w* as `max`; otherwise it
passes on what it received. Every stage forwards all ten vectors. The first
stage starts from vote 0 and max 0, so ties go to the lower class and a symbol
with no report votes 0. Every stage is registered, so the voter has a latency
of 10 cycles and delivers one vote per cycle.

**Flow control.** The automaton and the voter advance together whenever the
output FIFO is not full (`adv`); otherwise the whole pipeline freezes. On an
advancing cycle the automaton takes a symbol if the input FIFO has one, and
otherwise sends a bubble down the voter. The read master requests a burst
only if the input FIFO has room for it on top of the beats already in flight,
so read data is never refused. The write master issues a burst address only
once the output FIFO holds that burst's bytes. Its burst lengths wait in a
small queue, so the next address can go out while the current data is still
streaming. With memory that does not stall, a run of *n* symbols takes about
*n* + 45 cycles (3,000 symbols: 3,043 cycles).

**Control.** While `ap_idle` is high, pulse `ap_start` with `in_addr`,
`out_addr` and `n_symbols` valid. The kernel clears the automaton (start of a
new stream) and the FIFOs, reads `n_symbols` bytes and writes `n_symbols`
votes: `out[i]` is the vote after input symbol *i*. When the last write
response arrives, `ap_done` pulses for one cycle. `ap_err` is set if any AXI
response was not OKAY. The AXI port is AXI4 with an 8-bit data bus (one
symbol or vote per beat), 64-bit addresses and INCR bursts of up to 16 beats
that never cross a 4 KB boundary. The channel payloads are the packed structs
of `axi_pkg`.

**The default automaton is synthetic.** The trained forest is not
reproduced here. `AUT_RF` has the same size as the published Random Forest
benchmark: 1,661 chains of 20 STEs = 33,220 states, with the last STE of
each chain reporting. Its character classes, however, are byte ranges
derived from a fixed hash. The kernel, the voter and their timing do not
depend on the contents. To run a real model, supply its description through
the functions above.

## Files

| file | contents |
|---|---|
| `rtl/reapr_pkg.sv` | constants, types, automaton descriptions |
| `rtl/axi_pkg.sv` | AXI4 channel structs, burst-length helper |
| `rtl/ste.sv` | state-transition element |
| `rtl/cc_bram.sv` | 36-column character-class block RAM |
| `rtl/nfa_core.sv` | the spatial NFA engine |
| `rtl/voter_stage.sv`, `rtl/rf_voter.sv` | voter stage and 10-stage voter |
| `rtl/sync_fifo.sv` | FIFO |
| `rtl/axi_read_master.sv`, `rtl/axi_write_master.sv` | AXI4 burst masters |
| `rtl/reapr_rf_top.sv` | the Random Forest kernel (top) |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/nfa_ref_pkg.sv` | software reference automaton (successor-list simulation) |
| `tb/axi_mem_model.sv` | behavioural AXI4 memory with optional random stalls |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. For
example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_reapr_rf_top \
  -y rtl -y tb +libext+.sv rtl/reapr_pkg.sv rtl/axi_pkg.sv tb/nfa_ref_pkg.sv \
  tb/tb_reapr_rf_top.sv -o sim && ./obj_dir/sim
```

* `tb_ste`, `tb_cc_bram`, `tb_voter_stage`, `tb_rf_voter`,
  `tb_axi_read_master`, `tb_axi_write_master`: unit tests against
  independently computed expectations. They cover random stalls, ties, 4 KB
  boundaries and the 10-cycle voter latency.
* `tb_nfa_core`: the three-state example on `acbdcad`, then an 80-state
  random automaton in all-LUT, mixed and all-BRAM storage, compared with the
  reference model state by state after every symbol.
* `tb_reapr_rf_top`: the kernel at reduced size (60 chains of 4 STEs, 108
  states in BRAM and the rest in LUTs). It does five back-to-back runs, with
  and without memory stalls, checks every vote and the one-symbol-per-cycle
  rate, and counts that pipeline stalls, input bubbles, short bursts,
  BRAM and LUT matches, ties, empty votes and restarts all occurred.
* `tb_reapr_rf_top_full`: the kernel with all default parameters
  (33,220 STEs, 923 BRAMs), 1,500 symbols, every vote checked; the run takes
  1,543 cycles and about 3 s of simulation. Compiling the generated C++ is
  what takes time: roughly half an hour on one core (use `-j` to spread
  it). Verilator's lint of the full-size top takes about 2 minutes.

The simulator is two-state. The memory model and the testbenches never rely
on uninitialised values, and the RTL resets every register that is read
before it is written.

## Departures and limits

* The default automaton is a synthetic stand-in of the right size (see above).
  No published benchmark (Snort, ClamAV, Hamming, Levenshtein, ...) is
  included, because their state graphs are not reproduced here. Any of them
  can be expressed through the description functions, and `nfa_core` scales
  to them: up to 77,760 states in BRAM, with any overflow in LUTs.
* The maximally sized Levenshtein automaton (distance 20, length 1,550,
  63,570 states) is not included. Its construction is not described here.
* Start-state modes, the clear/consume handshake, the registered LUT-path
  symbol, FIFO depths (64), the burst length (16), the control handshake and
  the report-to-class grouping are design choices, not given values.
* The PCI-Express endpoint and the board DDR memory are outside the kernel;
  the kernel's `m_axi_*` port connects to the memory interconnect. In
  simulation a behavioural memory model replaces both.
* BRAM contents are set at elaboration from the description (an `initial`
  loop), as a bitstream would set them. There is no run-time write port.
* The AXI masters carry concurrent assertions for the valid/ready stability
  rule. The assertions use `disable iff (!rst_n)`, which makes Verilator
  report `rst_n` as used both synchronously and asynchronously. This refers
  to the assertion only, not to the logic.
