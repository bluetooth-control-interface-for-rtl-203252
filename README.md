# Bluetooth radio serial control interface

A small FPGA controller that puts a Bluetooth radio into service and then keeps
it frequency hopping. The radio is configured through a four-wire serial control
port. After reset the controller writes four of the radio's control registers
(Control, charge-pump (CHP) control, Enable and Channel). From then on, each
request on its `hop` input rewrites the Channel register with the next entry of
a 75-step hop table. Everything runs from one system clock (20 MHz in the
original board design) and makes the serial clock by dividing it by 16.

The design is an RTL rendering of the control interface developed for the
PicoRadio sensor-node test bed, a board set with an ARM processor and a Xilinx
FPGA. That interface was adapted from an earlier one for a Proxim radio. The
Proxim interface, the processor, the boards and the radio itself are not part
of this RTL.

## The radio's serial port

The port has four wires: `SI_CLK` (clock), `SI_CMS` (control mode select),
`SI_CDI` (data into the radio) and `SI_CDO` (data out of the radio). The radio
side is a state machine like a JTAG TAP controller. At each rising edge of
`SI_CLK` the value of `SI_CMS` moves it along:

```
Run/Idle  --1-->  Select-DR --1--> Select-IR
   ^  (0 stays)      |0               |0
   |              Capture-DR       Capture-IR
   |                 |0               |0
   |              Shift-DR (0 stays)  Shift-IR (0 stays)   <- one SI_CDI bit per clock
   |                 |1               |1
   |              Exit-DR          Exit-IR
   |                 |1               |1
   +------0------ Update-DR        Update-IR ---1--> Select-DR
                     |1               |0 --> Run/Idle
                     +--> Select-DR
```

Writing a register takes two scans, each sent LSB first:

* An **IR scan** shifts in the register's 6-bit address. It selects which
  register the next data scan writes.
* A **DR scan** shifts in the 8-bit value.

Starting from Run/Idle, one IR scan followed by one DR scan is 24 `SI_CLK`
cycles. The controller sends it as two fixed 24-bit words, first bit on the
left:

```
cycle    1   5     11  15       23
SI_CMS   110000000111000000000110
SI_CDI   0000aaaaaa0000vvvvvvvv00     a = address bit 0..5, v = value bit 0..7
```

The instruction register keeps its address. So once the Channel register has
been selected, a new channel needs only a **DR-only scan**: the last 13 cycles
of the pattern above (`SI_CMS` = `1000000000110`, `SI_CDI` = `000vvvvvvvv00`).
Bits that carry no information are driven 0.

`SI_CDO` is not used: the controller only writes.

## How the controller works

```
          hop                                        SI_CLK
           |                                           ^
           v                                           |
   +----------------+  ld, ce     +----------------+   |
   |  bt_ctrl_fsm   |------------>| bt_phase_clock |---+
   |  (state, VAR0) |<------------| /16 + phase    |
   +----------------+   phase     +----------------+
     |CNTLMEM_Add |DATA_Add  |r_sel      | ld, ce
     v            v          v           v
 bt_ctrl_rom  bt_freq_rom -> bt_load_mux -> bt_shift_regs --> SI_CMS, SI_CDI
 (addr,value)  (channel)     (2x1 muxes)   (2 x 24-bit, MSB out)
```

* **Phase clock** (`bt_phase_clock`): a 4-bit counter on the system clock. Its
  top bit is `SI_CLK`. A strobe `si_tick` marks the system clock cycle in which
  `SI_CLK` falls. Every other register in the design changes only on that
  strobe. The phase counter (8 bits) is cleared by `ld` and counts with `ce`.
  It tells the state machine when a scan has been shifted out.
* **State machine** (`bt_ctrl_fsm`): see the table below. It also holds `VAR0`,
  the hop-table address counter, and `DATA_Add`, the register that addresses
  the hop table.
* **Control ROM** (`bt_ctrl_rom`): 8 entries of {6-bit register address, 8-bit
  power-up value}. Entries 4, 5, 6 and 0 are Control, CHP control, Enable and
  Channel.
* **Frequency ROM** (`bt_freq_rom`): 128 x 8. Entries 0 to 74 hold the hop
  sequence.
* **Load multiplexers** (`bt_load_mux`): `r_sel` picks the value source and
  the scan shape. At 0 it takes the control ROM value and builds an IR+DR scan;
  at 1 it takes the frequency ROM value and builds a DR-only scan.
* **Interface shift registers** (`bt_shift_regs`): two 24-bit left shift
  registers, one per data line, sharing `ld`, `ce` and the clock. The serial
  output is the MSB, and zeros fill in from the right.

### State sequence

One row per state. Each state lasts at least one `SI_CLK` period.

| state | outputs | left when | periods |
|---|---|---|---|
| ini | DATA_Add := 5 | always | 1 |
| LOAD1 | ld, CNTLMEM_Add = 100 (Control), DATA_Add := 1 | always | 1 |
| PROGRAM1 | ce | phase reaches 10111 | 23 |
| LOAD2 / PROGRAM2 | as above, CNTLMEM_Add = 101 (CHP), DATA_Add := 3 | | 1 + 23 |
| LOAD3 / PROGRAM3 | CNTLMEM_Add = 110 (Enable), DATA_Add := 5 | | 1 + 23 |
| LOAD4 / PROGRAM4 | CNTLMEM_Add = 000 (Channel), DATA_Add := 0 | | 1 + 23 |
| IDLE | ready, DATA_Add := VAR0 | hop = 1: to LOAD, or to RESETDATA_Add if VAR0 = 74 | 1 or more |
| LOAD | ld, ce, r_sel, DATA_Add := VAR0 | always | 1 |
| RESETDATA_Add | ld, ce, r_sel, VAR0 cleared, DATA_Add := VAR0 | always | 1 |
| PROGRAM | ce, r_sel | phase reaches 01100 | 12 |

How the pieces fit in time:

* **Loads.** A load state's single tick loads both shift registers and clears
  the phase counter. The first bit is on the lines in the period after the
  load.
* **Program states.** A program state is left on the tick at which the phase
  counter *reaches* its exit value. That is 23 shifts for an IR+DR scan and 12
  for a DR-only scan.
* **The last bit.** The final bit of each scan (`SI_CMS` = 0, back to Run/Idle)
  is on the lines during the following state.
* **Power-up.** Programming takes 97 `SI_CLK` periods (1552 system clocks)
  from reset until `ready` rises.
* **Hops.** A hop takes 13 periods from the tick that accepts it back to IDLE.
  With `hop` held high, hops follow each other every 14 periods.

**Address counter.** `VAR0` increments on every `ld`, including the four
power-up loads, and is cleared in RESETDATA_Add. The first hop therefore uses
table entry 4. The hop that finds `VAR0` = 74 goes through RESETDATA_Add. It
still sends entry 74 (DATA_Add was copied from VAR0 in IDLE), and the following
hops go 0, 1, 2 and on. The 75 entries are used in a fixed cycle.

### Timing at the pins

* `SI_CMS` and `SI_CDI` change at the falling edge of `SI_CLK`. They are
  stable for half a period either side of the rising edge where the radio
  samples them.
* `hop` is sampled once per `SI_CLK` period, in IDLE. It must be synchronous to
  `clk` and held until `ready` falls.
* `rst` is synchronous and active high.

## Top-level ports (`bt_control_if`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | system clock |
| rst | in | 1 | synchronous reset, starts power-up programming |
| hop | in | 1 | request the next hop frequency |
| si_clk | out | 1 | SI_CLK, clk / 16 |
| si_cms | out | 1 | SI_CMS |
| si_cdi | out | 1 | SI_CDI |
| ready | out | 1 | controller is in IDLE: power-up done, no hop in progress |
| data_add | out | 8 | current hop-table address |

The parameters of the blocks default to the original numbers: a 4-bit divider,
an 8-bit phase counter, 24-bit shift registers, an 8-entry control ROM, a
128-entry frequency ROM and 75 hops.

## What is fixed by the original design and what is chosen here

These come from the original description:

* the four-register power-up order;
* the radio port flow chart, and from it the scan patterns;
* 6-bit addresses and 8-bit values, LSB first;
* the state diagram: state names, outputs, exit values 10111 and 01100, and
  the `VAR0` increment and reset rule;
* the divide-by-16 with `SI_CLK` on counter bit 3;
* the 24-bit left shift registers with shared controls;
* the ROM sizes, the 75-entry hop cycle, and the two 2x1 multiplexers.

These are choices of this RTL:

* **Control ROM contents.** The radio's register addresses and power-up values
  are placeholders in `bt_pkg::CTRL_ROM`. Set them from the radio's data sheet
  before use.
* **Hop sequence.** Entry *i* holds (23 · *i*) mod 79, a fixed step through
  the 79 Bluetooth channels, with the channel number used directly as the
  register value. Change `bt_pkg::HOP_MUL`, `HOP_OFS` or `hop_channel` for the
  real sequence.
* **Control ROM width.** The entries are 14 bits wide (6 + 8). The original
  calls the ROM 8 x 12, but that cannot hold both fields.
* **Multiplexer select.** Both multiplexers are driven by `r_sel`: the four
  power-up loads come from the control ROM, and hops come from the frequency
  ROM.
* **Signals left out.** The original state diagram also drives signals named
  `sel` and `rst`, whose use is not described. They are not implemented.
  `DATA_Add` is still set in the power-up states as in that diagram, but those
  states never read the frequency ROM.
* **RESETDATA_Add.** This state asserts `r_sel`, like LOAD. It starts the same
  kind of DR-only hop, and the diagram does not list `r_sel` for it.
* **One clock domain.** The original clocks the state machine and phase
  counter by `SI_CLK` itself. Here they run on the system clock with the
  `si_tick` enable, and the falling edge was picked so the data lines are
  stable at the radio's sampling edge.
* **Counters and registers.** The phase counter is 8 bits, as in the
  counter-level description; the state diagram labels it `phase[4:0]`, and
  the exit values fit either. Each 24-bit shift register is a single register
  rather than six 4-bit library parts.
* **Additions.** The `ready` output and the synchronous reset are additions of
  this RTL.

Not checked against hardware:

* the real radio's register map;
* whether the radio accepts a 1.25 MHz `SI_CLK`;
* timing on the actual FPGA.

The controller was verified against a behavioural model of the radio port
written from the flow chart above.

## Files

`rtl/`:

* `bt_pkg.sv`: widths, scan patterns, state encoding, control ROM contents
  and the hop formula.
* `bt_phase_clock.sv`, `bt_ctrl_fsm.sv`, `bt_ctrl_rom.sv`, `bt_freq_rom.sv`,
  `bt_load_mux.sv`, `bt_shift_regs.sv`: the blocks.
* `bt_control_if.sv`: the top.

`tb/`:

* `bt_radio_model.sv`: behavioural model of the radio's serial port. It
  decodes scans, keeps a log of register writes and counts malformed scans.
* `tb_bt_control_if.sv`: end-to-end test at full size. It checks:
  * the four power-up writes and their timing, with `hop` held high during
    power-up to show that it is ignored;
  * 80 single hops through one wrap of the hop table, each a DR-only scan
    with the right value and a 13-period latency;
  * five back-to-back hops;
  * the `SI_CLK` period and duty cycle.
* `tb_bt_<block>.sv`: one self-checking testbench per block.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog stops it if it hangs.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/bt_pkg.sv tb/tb_bt_control_if.sv \
  --top-module tb_bt_control_if -o sim
./obj_dir/sim
```

Replace `tb_bt_control_if` with any other testbench name to run a block test.
All tests finish in well under a second. For lint only, use
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/bt_pkg.sv rtl/bt_control_if.sv`.
The remaining lint warnings are unused package constants, the state machine's
`state` output (brought out for debugging, unused in the top) and the unused
top address bit (`DATA_Add[7]` on the 128-entry ROM).
