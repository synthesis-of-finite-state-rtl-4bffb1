# Shared-memory access controller: a six-state Moore machine in two syntheses

Two processors share one memory, and only one of them can be connected to it
at a time. Each processor raises a request line: `x` for processor 1 and `y`
for processor 2. A small controller decides who is connected. If both request
in the same cycle, the processor that currently holds priority wins, and
priority then passes to the other one. Under steady contention the two
processors therefore take turns.

The design is split into a **controller** and a **data path**:

* The controller is a six-state Moore machine. Its six one-hot *state lines*
  are also its outputs.
* The data path is a bus switch. It uses those state lines as control signals
  and routes the connected processor's bus to the memory port.

The controller is built in two ways, and both are included:

* **Unit A (`ctrl_decoder`)**: a 3-bit state register, a 3-to-8 decoder that
  turns the code into state lines, and excitation logic driven by the decoded
  lines.
* **Unit B (`ctrl_onehot`)**: one flip-flop per state, each with two-level
  NAND excitation logic.

The two units behave the same, cycle for cycle. They differ in structure:

* Unit B's outputs come straight from flip-flops, and every path through its
  logic has the same depth. Its state lines are free of decoding glitches.
* Unit A's state lines pass through a decoder after the register, so they can
  glitch when several code bits change at once. It uses three flip-flops
  instead of six.

In a published transistor-level comparison of these two circuits (0.35 µm
CMOS, 3.3 V), the one-hot circuit worked up to 350 MHz and the decoder circuit
up to 200 MHz. The decoder circuit used less power: 4.34 mW against 7.15 mW at
250 MHz. This RTL contains no delays and does not reproduce those figures.

## The state machine

| State | Meaning | Processor connected | Who has priority next |
|-------|---------|---------------------|-----------------------|
| A | idle | none | processor 1 |
| B | processor 1 served, no contention | 1 | processor 1 |
| C | processor 2 served | 2 | processor 1 (when C ends, go to A) |
| D | processor 1 served | 1 | processor 2 (when D ends, go to E) |
| E | idle | none | processor 2 |
| F | processor 2 served, no contention | 2 | processor 2 |

Transitions. `x`/`y` are the requests sampled at the rising clock edge, and
`-` means either value:

| From | x y | To | Why |
|------|-----|----|-----|
| A | 0 0 | A | nobody asks |
| A | 1 0 | B | P1 alone |
| A | 0 1 | C | P2 alone, P1 keeps priority |
| A | 1 1 | D | contention: P1 wins, priority moves to P2 |
| B | 0 - | A | P1 done |
| B | 1 - | B | P1 keeps the memory |
| C | - 0 | A | P2 done |
| C | - 1 | C | P2 keeps the memory |
| D | 0 - | E | P1 done, P2 now has priority |
| D | 1 - | D | P1 keeps the memory |
| E | 0 0 | E | nobody asks |
| E | 0 1 | F | P2 alone |
| E | 1 0 | D | P1 alone, P2 keeps priority |
| E | 1 1 | C | contention: P2 wins, priority moves to P1 |
| F | - 0 | E | P2 done |
| F | - 1 | F | P2 keeps the memory |

A processor is never taken off the memory while it keeps requesting. The
priority rule only matters at the moment of a grant from an idle state.

State codes in unit A (`G2 G1 G0`): A = 000, B = 001, C = 010, D = 011,
E = 100, F = 101. Codes 110 and 111 are unused. If the register ever holds
one, all excitation functions are 0 and the machine returns to A on the next
edge. No legal input sequence reaches these codes, so the testbenches do not
exercise this recovery. Unit B has no such recovery: a state word that is not
one-hot stays wrong until `init`.

### Excitation logic

Unit A. The inputs are the decoded state lines A..F and the requests:

    D_G2 = (D + E) x' + F
    D_G1 = (A + C) y  + (D + E) x
    D_G0 = (A + B + D) x + E (x xor y) + F y

Unit B. There is one equation per flip-flop, and each is written in the RTL
as NAND-NAND:

    D_A = A x'y' + B x' + C y'
    D_B = A x y' + B x
    D_C = A x'y  + C y  + E x y
    D_D = A x y  + D x  + E x y'
    D_E = D x'   + E x'y' + F y'
    D_F = E x'y  + F y

Both sets are read directly off the transition table. `tb/fsm_ref_pkg.sv`
holds the table itself, kept separately, and every testbench compares the
gates against it.

## Data path

`mem_switch` is combinational:

* In states B and D it connects processor 1's `addr`, `wdata` and `we` to the
  memory port and returns `mem_rdata` to processor 1.
* In states C and F it does the same for processor 2.
* In A and E the port is disabled (`mem_en = 0`) and all outputs are zero.

`gnt1` and `gnt2` tell each processor when it is connected. An immediate
assertion checks that both grants are never high together.

## Timing

* Requests are sampled at the rising edge. The state, the grant and the
  memory-port routing change right after that edge.
* A processor that raises its request before edge *n* is connected during
  cycle *n* (after the edge). It stays connected until the first edge at which
  its request is low.
* With the memory model used in the testbench, writes happen at the rising
  edge and reads are combinational. A processor can therefore do one access
  in every cycle it is connected. To release the memory right after its last
  access, it drops its request in that same cycle.
* `init` is asynchronous and active high:
  * It clears unit A's three flip-flops (state A).
  * It presets unit B's flip-flop A and clears the other five.
  * It must be pulsed once before operation.

A reference run (`tb_ctrl_*`, `tb_fsm_cdp_top`) applies the following request
sequence. The third row is the state after each edge:

| edge | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 |
|------|---|---|---|---|---|---|---|---|---|---|----|----|----|----|
| x    | 0 | 1 | 1 | 0 | 0 | 0 | 1 | 1 | 0 | 0 | 0 | 1 | 1 | 0 |
| y    | 0 | 0 | 0 | 1 | 1 | 0 | 1 | 1 | 1 | 0 | 1 | 1 | 1 | 1 |
| state| A | B | B | A | C | A | D | D | E | E | F | F | F | F |

## Module hierarchy

    fsm_cdp_top            both units side by side, sharing x, y and the processor buses
    ├─ ctrl_decoder        unit A controller
    │  ├─ decoder3to8      G2 G1 G0 -> lines A..H (G, H unused)
    │  └─ dff_pc ×3        state register
    ├─ mem_switch          unit A data path
    ├─ ctrl_onehot         unit B controller
    │  └─ dff_pc ×6        one flip-flop per state
    └─ mem_switch          unit B data path
    fsm_cdp_pkg            state_code_e (A..F codes), state_lines_t (packed {a,b,c,d,e,f})

The top brings out the following for each unit:

* state lines: `a_st`, `b_st`
* unit A's state code: `a_code`
* grants: `a_gnt1`, `a_gnt2`, `b_gnt1`, `b_gnt2`
* read data returned to each processor: `a_p1_rdata`, `a_p2_rdata`,
  `b_p1_rdata`, `b_p2_rdata`
* its own memory port, for example `a_mem_en`, `a_mem_we`, `a_mem_addr`,
  `a_mem_wdata` and `a_mem_rdata`

The memory itself is not part of the design. `tb/shared_mem_model.sv` is a
simple model of it, used only for simulation. The two processors are not part
of the design either.

Parameters: `ADDR_W` and `DATA_W` (default 8 each). They set the width of the
processor buses and of the memory port.

## Design choices and departures

The following were choices made for this RTL:

* **Clock and reset.** The clock edge (rising), the active level of `init`
  (high), and the rule that clear beats preset in `dff_pc` when both are
  asserted.
* **Synchronous requests.** The requests are assumed synchronous to `clk`.
  There are no synchronisers.
* **Meaning of the states.** The meaning in the first table is inferred from
  the transitions, and the grant mapping of the data path follows from it:
  processor 1 in B and D, processor 2 in C and F.
* **Data-path bus.** Its signals, widths and zero-when-idle behaviour.
* **Transistor-level flip-flop.** The original flip-flop is a master-slave
  circuit with complementary clocks and sized transistors. Here it is a single
  behavioural `always_ff` with asynchronous preset and clear. Because of its
  two asynchronous controls, some synthesis front ends do not accept
  `dff_pc`. Verilator and slang do.
* **Transition table.** Where a published example run disagrees with the
  transition table, the table is followed, because every excitation equation
  agrees with it. With the example's inputs, the original run listed E→F for
  `x y = 0 0` and F→E for `1 1`. The table keeps the machine in E and in F
  instead (see the reference run above).

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|-----------|----------------|
| `tb_dff_pc` | Random data, clocking, asynchronous preset and clear (also held across a clock edge), and clear-over-preset. |
| `tb_decoder3to8` | Exhaustive. |
| `tb_ctrl_decoder`, `tb_ctrl_onehot` | Init, the reference sequence, then 4000 cycles of random held requests. The state is compared after every edge, and all 16 table rows must be exercised. `tb_ctrl_decoder` also checks the state code. |
| `tb_mem_switch` | All states with random buses. |
| `tb_fsm_cdp_top` | End-to-end run at the default parameters. |

`tb_fsm_cdp_top` works as follows:

* The reference sequence comes first. Then two processor agents make 6000
  cycles of random traffic. Each agent requests, waits for its grant, makes
  1–6 random reads and writes over the whole address space, and then releases
  the memory.
* Every cycle it checks that:
  * both units match the reference state;
  * the grants are exclusive;
  * the correct bus is routed to each memory model;
  * every read returns the last value written by either processor.
* It counts how often each mechanism occurs, and fails if any count is zero:
  * contention won by each processor, with priority passing each way;
  * uncontended grants in both priority modes;
  * every state;
  * every transition row;
  * reads and writes by each processor.

Running one testbench with plain Verilator, from the directory that holds
`rtl/` and `tb/`:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/fsm_cdp_pkg.sv tb/fsm_ref_pkg.sv tb/tb_fsm_cdp_top.sv \
        --top-module tb_fsm_cdp_top
    ./obj_dir/Vtb_fsm_cdp_top

To run another testbench, replace `tb_fsm_cdp_top` with its name. The
testbenches use plain integer delays; one clock period is 10 time units.

## Changing the design

* **Other bus widths.** Set `ADDR_W` and `DATA_W` on `fsm_cdp_top`.
* **A different arbitration rule.** Change the transition table in
  `tb/fsm_ref_pkg.sv` first. Then change the excitation equations in both
  controllers to match it. The testbenches will show any row where the gates
  and the table disagree.
* **More states in unit A.** Adding states to unit A beyond the eight codes
  needs a wider register and decoder. For unit B, add one flip-flop and one
  equation per state.
