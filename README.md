# FPSM: a memory array that doubles as programmable peripherals

A microcontroller usually carries a fixed set of timers, PWM units and
counters. The Field Programmable Sequencer and Memory (FPSM) replaces part of
that set with an array of small RAMs that can be used in either of two ways:

* left alone, each RAM is ordinary data memory for the CPU;
* configured, each RAM becomes a tiny microcoded state machine. Each word
  names the next state, so a counter, a timer or a pulse generator is just a
  table in memory.

The programmable unit is therefore not a lookup table of a few inputs, as in
an FPGA, but a 256-word memory plus a little next-address logic. This is
"middle grained" programmability: a peripheral costs one to a few memories
instead of dozens of logic cells. Memory that no peripheral needs stays
usable as RAM.

This repository holds synthesizable SystemVerilog for the whole FPSM core:
* the PMU array with its switch boxes;
* the CPU-side interface with the address-window decoder;
* the row output flip-flops;
* a self-checking testbench for every block;
* an end-to-end testbench that builds a counter, a PWM, a 16-bit timer, a
  capture unit, a 24-bit counter, a FIFO write side and two truth-table
  functions out of memory words.

## The Programmable Memory Unit (PMU)

A PMU (`rtl/pmu.sv`) holds 256 words of 16 bits (`rtl/pmu_sram.sv`) and an
address sequencer (`rtl/add_flag_control.sv`). Each word is split into two
fields:

| bits  | field | meaning |
|-------|-------|---------|
| 15:14 | CF[1:0]  | carry flag. CF[1] = 1 marks a terminal word |
| 13:11 | SCC[2:0] | selector control code. SCC[1:0] picks the next-address path; SCC[2] is reserved |
| 10:8  | SEQ[2:0] | levels sent to other PMUs while this word is current |
| 7:0   | Data     | the next-state address, or truth-table data |

The top byte acts as the "opcode" of the word and the bottom byte as its
"operand".

### How the next address is chosen

An address register holds the current state. The word it selects is read
out in the same cycle (Fout = flags, Dout = data). On the next clock edge the
register loads one of four paths:

| SCC[1:0] | path | next address |
|----------|------|--------------|
| 00 | INT | Dout (jump to the address stored in the word) |
| 01 | INC | current + 1 |
| 10 | CUR | current (hold) |
| 11 | EXT | external address |

The state transition decoder (`rtl/state_transition_decoder.sv`) turns the
following inputs into a one-hot switch control for that selector:
* SCC;
* CF[1];
* the condition input CND;
* the enable EN.

Its rules, in priority order:

1. EN = 0: hold.
2. CF[1] = 1 and CND = 1: take the external address (reload).
3. CF[1] = 1 and CND = 0: hold (stop).
4. Otherwise: follow SCC.

The external address comes from one of two places:
* the PMU's external register, which the CPU writes;
* the switch box west of the PMU, as OUT2:OUT1. This is selected by a bit in
  the switch box register.

**Example: a down counter.** Word *a* holds Data = *a*−1, SCC = INT, and
CF[1] = 0. Word 0 holds CF[1] = 1.
* After the CPU loads N into the external register and the sequencer enters
  at an EXT word, the PMU walks N, N−1, … 0 and stops there.
* A CPU read of the PMU returns the current word.
* CF[1] = 1 can raise the interrupt.
* N = 5 stops after six cycles.

**Cascades.** SEQ[0] of the current word leaves the PMU in nibble IN3. A
switch box can route it to the EN, CND or write-enable input of another PMU.
* A lower counter word can set SEQ[0] on its last state. This enables an
  upper counter for one clock, which gives a 16-bit timer from two PMUs.
* Dout leaves the PMU as IN1/IN2, so the state of one PMU can be the
  address of the next. This is how capture and FIFO pointers work.

### PMU signal nibbles

All signals between PMUs travel as 4-bit nibbles.

| from switch box to PMU | use |
|---|---|
| OUT1, OUT2 | external address, low and high nibble |
| OUT3[0] | EN (ANDed with the global `en`) |
| OUT4[0] | CND |
| OUT5[0] | external write: store the external register into the Data Field at the address being entered (data store of a FIFO) |

| from PMU to the next switch box | use |
|---|---|
| IN1, IN2 | Dout, low and high nibble |
| IN3 | {CF[1], SEQ[2:0]} |

Every PMU output comes straight from its address register and memory.
No combinational path therefore runs through a PMU from its inputs to its
outputs, and chains of PMUs cannot form loops.

## Switch boxes and the array

Each row of the array (`rtl/fpsm_top.sv`) is

    SB  PMU  SB  PMU  SB  PMU  SB  PMU  SB  -> JK flip-flop -> pulse_out[r]

with COLS = 4 PMUs per row and ROWS = 4 rows by default (16 PMUs, 64 Kbit).
A switch box (`rtl/switch_box.sv`) has three stages:

* **Input selector.** Puts IN1, IN2, IN3 (from the PMU to its west) or
  `north` (from the switch box above) onto each of four 4-bit global wires,
  g1..g4.
* **Bus switch.** Joins each global wire to the neighbouring boxes. Per wire
  the setting is one of:
  * LOCAL: not joined;
  * DRIVE: this box drives it both ways;
  * FROM_WEST: pass from west to east;
  * FROM_EAST: pass from east to west.

  A bidirectional wire is built as two one-way lanes, so no tri-state is
  needed. A signal can be driven once and picked up several boxes away.
* **Output selector.** Chooses each of OUT1..OUT5 for the PMU to its east
  from IN1, IN2, g1..g4, constant 0 or constant 1111.

One selectable global wire goes to the box below (`south`).

The box also holds two bits of the PMU it feeds:
* `logic_mode`: memory or peripheral;
* `ext_src_sb`: the source of the external address.

Each box's register is 48 bits, written as three 16-bit words:

| bits | field |
|------|-------|
| 7:0   | isel: 2 bits per g (g4 on top). 0 IN1, 1 IN2, 2 IN3, 3 north |
| 22:8  | osel: 3 bits per OUT (OUT5 on top). 0 IN1, 1 IN2, 2..5 g1..g4, 6 zero, 7 ones |
| 30:23 | bsw: 2 bits per g. 0 LOCAL, 1 DRIVE, 2 FROM_WEST, 3 FROM_EAST |
| 32:31 | south_sel: which g goes south |
| 33    | ext_src_sb |
| 34    | logic_mode |
| 47:35 | reserved |

Several signals meet the array edge:
* The west-most box of each row takes its IN1..IN3 from `row_in[r]`
  (external events).
* The top row's `north` inputs come from `north_in`.
* The bottom row's south wires leave as `south_out`.
* The east-most box of each row drives `edge_out[r]` and a JK flip-flop
  (`rtl/jk_ff.sv`) with J = OUT1[0] and K = OUT2[0]. The flip-flop turns two
  flag streams into a pulse.

## The CPU side: windows, modes and timing

The CPU sees the FPSM through two address windows. When MAE is high, the bus
state controller (`rtl/bus_state_controller.sv`) raises one of two enables:
* CME, for the memory window (base `MEM_BASE` = 0x8000, 16 × 256 words);
* CPE, for the peripheral window (base `PER_BASE` = 0xC000, 18 × 256 words).

Either way it passes the offset on. The MCU interface (`rtl/mcu_interface.sv`)
splits the offset into a global part [15:8] that selects the PMU and a local
part [7:0]:

| window | block | words |
|--------|-------|-------|
| memory | PMU g (0..15) | 256 words of RAM while PMU g is in memory mode |
| peripheral | PMU g (0..15) | word 0 only, while PMU g is a peripheral. Write: external register. Read: {Fout, Dout} of the current word |
| peripheral | 16 | 0: INT mask, 1: wait cycles (4 bits), 2: INT status (read only) |
| peripheral | 17 | word 4·s + i: word i (0..2) of switch box s = r·5 + c |

Any other access completes normally; writes are ignored and reads return 0.

**Handshake.**
1. The CPU raises `cpu_req` for one clock while `cpu_busy` is low.
2. The interface performs the access one clock later.
3. It waits 1 + *wait* clocks, then pulses `cpu_ready` with `cpu_rdata`.

`cpu_ready` is therefore high 3 + *wait* clocks after the edge that took the
request. An assertion flags requests made while busy.

**Interrupt.** `irq` is a registered OR over all PMUs that meet all three
conditions:
* the PMU is in peripheral mode;
* its mask bit is set;
* its current word has CF[1] = 1.

**Memory-mode behaviour.** A CPU access loads the local address into the
PMU's address register. A write stores the whole 16-bit word. The read data
is the word at that address.

### Configuring a peripheral

1. After reset every PMU is RAM. Write the microcode into the PMU through
   the memory window. Write the word the sequencer should start at *last*:
   when the mode switches, the PMU starts from the address it was last
   accessed at.
2. Write the three register words of the switch box that feeds the PMU,
   with `logic_mode` = 1. This also sets the routing. The PMU disappears from
   the memory window and appears as one word in the peripheral window.
3. Write operands (reload values, FIFO data) to that word. Raise `en` to
   start.

## Worked configurations (all run in `tb/tb_fpsm_top.sv`)

* **16-count.** A single PMU walks words 0..15 on the INC path. Word 16 has
  CF[1] = 1. INT arrives 17 clocks after enable, then the PMU stops.
* **8-bit PWM.** Three PMUs in a row, each a down counter that reloads
  through EXT when it reaches its CF word:
  * PMU0 divides the clock by C;
  * PMU1 counts T divided ticks;
  * PMU2 counts X divided ticks.

  SEQ[0] of each PMU's terminal word enables the next PMU. The period and
  width flags reach J and K of the row's flip-flop. The pulse period is
  C·T clocks and the low time C·X clocks. Checked for (C, T, X) = (5, 10, 5),
  which gives a 50 % duty, and (15, 10, 3).
* **16-bit free-running timer.** PMU4 and PMU5 each step through words
  0..255, where each word jumps to the next. Word 255 is terminal and
  reloads 0 from the external register. The low PMU's word 255 sets SEQ[0],
  which enables the high PMU for one clock.
* **Capture.** PMU8 runs freely. Its Dout is the external address of PMU9,
  which is enabled by an event that arrives from the row above through a
  south wire. Each word of PMU9 jumps to itself, so PMU9 holds the time of
  the event.
* **FIFO write side.**
  * PMU8 is the write pointer; a write strobe on `row_in` advances it.
  * The strobe is carried on a global wire to the external-write input of
    PMU9.
  * PMU9 stores the value in its external register at the pointer address.
  * The eight stored bytes are read back through the memory window.
  * Only the write side is built. A read pointer would need the data PMU to
    switch at run time between two address sources, and the switch-box
    routing here is static.
* **24-bit counter.** Three PMUs in a row count together. The middle PMU is
  enabled by the low PMU's carry. The top PMU needs both carries:
  * EN is the low carry, brought along a global wire;
  * CND is the middle carry.

  Its words hold (CF[1] = 1) unless CND is high, and then jump to their own
  Dout. The switch box east of the top PMU loops that Dout back west on two
  global wires. The test starts just below a carry into the top byte. A
  fourth stage would have to see three carries, but a PMU has only two
  control inputs, so a 32-bit counter is not shown.
* **Truth-table logic.** PMU12 takes its address from `row_in[3]` through its
  switch box, and every word takes the external path. Dout is therefore
  f(input) one clock after the input changes. The test loads two tables:
  * a 4-bit adder (word {b, a} holds a + b);
  * an 8-bit rotate-left.

## Where this design departs from, or fills in, the source description

The block structure is taken from the description of the FPSM:
* 256×16 PMUs with 8-bit flag and data fields;
* the CF/SCC/SEQ flag fields;
* four address paths chosen by a decoder from SCC, CF and CND;
* switch boxes with IN1..IN3, north, south, OUT1..OUT5 and four 4-bit
  bidirectional global wires;
* memory and peripheral windows selected by CME/CPE;
* a PMU mapped as one word when it is a peripheral;
* a cycle-adjust register, interrupt from CF, and four PMUs per row.

Also taken from the source are the worked examples:
* a 3-bit down counter that stops in six cycles for N = 5;
* a 16-count;
* a PWM built from a divider, a period counter and a width counter with a JK
  output;
* capture with two PMUs.

The following are this design's own choices. They are where a user of
other FPSM material should expect differences:

* The order of the flag bits within the byte, and which SCC code selects
  which path.
* The CF[1] rule: reload on CND, else stop.
* EN = 0 holds the state.
* The assignment of signals to nibbles, including the use of SEQ[0] as the
  cascade signal.
* The external write that turns a PMU into a data store.
* The constant-0 and constant-1 choices in the output selector.
* Global wires built as pairs of one-way lanes.
* The switch box register format.
* Mode bits held in the switch box west of each PMU.
* The address map:
  * window bases;
  * the blocks for the interface and switch-box registers;
  * a 16-bit CPU address.
* The request/busy/ready handshake and the 3 + wait latency.
* The interrupt mask and status registers.
* Four rows.
* J = OUT1[0] and K = OUT2[0] for the row flip-flop.
* The sequencer starting from the last address the CPU accessed.

Not included:
* the CPU, the MCU's other memories and peripherals, and the flash from
  which a configuration is loaded at boot;
* a separate per-PMU logic reset and hold/release requests. A PMU starts
  at the word the CPU accessed last, and the configuration order ends with
  word 0, which gives the same start as a logic reset;
* the physical SRAM macro. Here the memory is a register array with
  asynchronous read at the registered address.

Several table-level uses of the array are not simulated: 32-bit counters,
shifters wider than 8 bits, serial interfaces, wider adders, and the 16-bit
dual PWM. By PMU count they fit in the 16 PMUs
of the default array. Their microcode is not specified, so no test claims to
reproduce them.

## Files

| file | contents |
|------|----------|
| `rtl/fpsm_pkg.sv` | word, flag, path, switch-box and register types |
| `rtl/pmu_sram.sv` | 256×(8+8) memory |
| `rtl/state_transition_decoder.sv` | path selection rules |
| `rtl/add_flag_control.sv` | selector, incrementer, address register |
| `rtl/pmu.sv` | one PMU |
| `rtl/switch_box.sv` | routing and its register |
| `rtl/bus_state_controller.sv` | CME/CPE window decode |
| `rtl/mcu_interface.sv` | CPU access, wait cycles, registers, INT |
| `rtl/jk_ff.sv` | row output flip-flop |
| `rtl/fpsm_top.sv` | the array |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

Each testbench compares against values it computes on its own:
* exhaustive decoder table;
* random reference models for the address sequencer, the JK flip-flop and
  the switch-box routing;
* a full sweep of the window decode;
* handshake latency per wait setting;
* the down counter's six-cycle stop for N = 5, and N + 1 cycles for every N up to 7;
* for the full array, the seven configurations above at default size.

Each testbench prints `TB_RESULT checks=N failures=M`. The full-array
testbench also counts how often each mechanism occurred:
* memory access;
* wait cycles;
* interrupt;
* increment path;
* stop;
* reload;
* PWM period;
* JK pulse;
* cascade;
* capture;
* south routing;
* FIFO write;
* truth-table logic;
* a two-level carry.

It fails if any of these counts is zero.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/fpsm_pkg.sv tb/tb_fpsm_top.sv --top-module tb_fpsm_top
    ./obj_dir/Vtb_fpsm_top

For a block test, replace `tb_fpsm_top` with the block's testbench (for
example `tb_switch_box`). The full-array test runs at the default 4×4 size
in well under a second. The array size is set by the `COLS` and `ROWS`
parameters of `fpsm_top`. The interface supports up to 16 PMUs and 64
switch boxes, because the global address and the register block are 8 bits
wide.
