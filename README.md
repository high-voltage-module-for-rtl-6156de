# Control logic for a nine-channel photomultiplier HV module

A forward calorimeter with 1728 photomultipliers (PMTs) can be powered cheaply
if PMTs share supplies. Eight PMTs sit on one board and take three voltages: a
cathode/divider voltage for the cathode and the first six dynodes, a seventh-dynode
voltage and an eighth-dynode voltage. Nine such boards (72 PMTs) hang on one
*cluster* of three HV channels:

| channel of a cluster | feeds             | range        |
|----------------------|-------------------|--------------|
| 1 (A1, B1, C1)       | divider / cathode | 0 … −2000 V  |
| 2 (A2, B2, C2)       | dynode 7          | 0 … −800 V   |
| 3 (A3, B3, C3)       | dynode 8          | 0 … −400 V   |

One HV module holds three clusters (A, B, C), so nine channels. Eight modules
in two crates supply the whole detector. A crate controller runs the modules
over a serial "crate local bus". Each channel is an analog chain: a 12-bit serial DAC
sets a DC-DC converter, whose voltage and current monitors go through a
multiplexer to one shared 12-bit serial ADC, and to an overvoltage and an
overcurrent comparator.

This repository holds the digital part: the module's **local control block**
(`rtl/hv_module.sv`). It decodes bus instructions. It loads the DACs, runs ADC
conversions and returns the results. It latches comparator alarms and switches
off a whole cluster when one of its channels trips. It also drops every channel
when the HV cable interlock loop opens. The analog parts are not in this RTL.
Their digital signals are ports of the top, and behavioural models of them live
in `tb/` for simulation.

## The bus transaction

This part takes the most care, because every other block is driven by it.

Bus lines: `bck` (clock), `bdw` (controller → module data), `bdr` (module →
controller data), `ien` (instruction enable), `ma[2:0]` and `all` (module
address), `bres` (bus reset). Each module has its own slot address `la[2:0]`.
A module is *selected* when `ma == la`, or for every module when `all = 1`.
A broadcast selects writes only. A read needs `ma == la` with `all = 0`, so only
one module ever drives the shared `bdr` line. `bdr_oe` tells when it does.

Every operation has two steps:

1. **Instruction step.** The controller sets `ien = 1` and sends 8 bits on
   `bdw`, b7 first, one per rising edge of `bck`. The selected modules shift
   them into ISRG. Bits b7..b4 are the operation code and b3..b0 the channel
   address.
2. **Execution step.** The controller sets `ien = 0` and sends as many `bck`
   cycles as the instruction needs. Extra clocks are ignored. A module runs the
   instruction only if it was selected when `ien` fell.

| code (b7..b0) | operation                                  | clocks | data |
|---------------|--------------------------------------------|--------|------|
| `0000 xxxx`   | read module data register (ID)             | 8      | out  |
| `0001 xxxx`   | load the shift register of all nine DACs   | 16     | in   |
| `0010 cccc`   | DAC of channel cccc: shift → output reg    | 1      |      |
| `0011 xxxx`   | all nine DACs: shift → output reg          | 1      |      |
| `0100 cccc`   | set protection latches of channel cccc     | 1      |      |
| `0101 xxxx`   | set protection latches of all channels     | 1      |      |
| `0110 cccc`   | clear protection latches of channel cccc   | 1      |      |
| `0111 xxxx`   | clear protection latches of all channels   | 1      |      |
| `10x0 cccc`   | ADC conversion, voltage of channel cccc    | 15     | out  |
| `10x1 cccc`   | ADC conversion, current of channel cccc    | 15     | out  |
| `110x xxxx`   | enable module, load ID into SR5            | 1      |      |
| `111x xxxx`   | disable module, load ID into SR5           | 1      |      |

Channel addresses are 0 = A1, 1 = A2, 2 = A3, 3 = B1 … 8 = C3. Codes 9 to 15 select
no channel. For the writes that have an "all channels" form, b4 = 1 selects all
nine channels. Combined with `all = 1`, the controller can reach one channel in
every module, or every channel in every module.

**Setting a voltage** takes two operations. First `0001` sends one 16-bit word.
All nine DACs shift it in together through the shared `dck`/`din`. The low 12
bits are the code and the upper 4 are ignored. Then `0010 cccc` pulses the load
strobe `dl[cccc]` of one DAC. Loading nine different values takes nine such
pairs. Sending `0011` instead copies one word into all nine outputs.

**Read frames.** `bdr` changes after each falling edge of `bck`. The controller
samples it before the next rising edge, so bit k of a frame belongs to clock k.

* ADC conversion, 15 clocks. `acs` is high for the whole conversion, and `ack`
  copies the 15 bus clocks. The multiplexer address is the instruction's channel
  (`amux_ch`) and its b4 (`amux_cur`). The ADC sends three leading bits without
  data, then d11..d0. The module replaces the first two leading bits, so the
  controller receives:

  `INH, protection latch, (leading ADC bit), d11, d10, …, d0`

  The protection latch is the overvoltage latch for a voltage conversion and
  the overcurrent latch for a current conversion. Each conversion therefore
  also reports the interlock state and whether the channel has tripped.
* Read module data register, 8 clocks: the 5-bit module ID from SR5, MSB
  first, then three 0 bits. The ID is loaded by the enable and disable
  instructions, so the controller can tell module types apart.

## Blocks

| block | file | what it does |
|-------|------|--------------|
| MAD   | `hv_mad.sv`     | module address decoder: `ms` (write select), `rd_ok` (read select) |
| ISRG  | `hv_isrg.sv`    | 8-bit instruction shift register, loads while IEn = MS = 1 |
| FDEC  | `hv_fdec.sv`    | decodes the instruction (`hv_pkg::decode`) and counts execution clocks; gives every strobe, window and select |
| CHAD  | `hv_chad.sv`    | channel address → nine select lines, or all nine |
| DAD   | `hv_dad.sv`     | drives `dck`, `din` and the load strobes `dl[8:0]` of the DACs |
| M3-1  | `hv_m31.sv`     | 3-to-1 multiplexer: ADC data, INH or protection latch into the read frame |
| SR5   | `hv_sr5.sv`     | 5-bit ID register and the `bdr` output flip-flop |
| CPRG  | `hv_cprg.sv`    | 9 overvoltage + 9 overcurrent latches and the cluster gates `cl_en[2:0]` |
| LE/INH| `hv_menable.sv` | LE latch, interlock inhibit INH, module enable ME |
| —     | `hv_sync.sv`    | two-flop synchronizers (helper) |
| —     | `hv_pkg.sv`     | widths, clock counts, opcodes, decoded-function struct |

## Protection and interlock

The enable instruction sets LE. **ME = LE ∧ ¬INH** enables the module. ME also
lights the remote LEDs (`rled`) in the PMT read-out boxes, which warn that high
voltage may be present.

The cluster enable of cluster X is

    cl_en[X] = ME ∧ no latch set in X's three channels ∧ no alarm active in them

When a comparator fires (`upr[c]` or `ipr[c]`), its raw signal switches its
cluster off in the same instant, through logic only. After two clocks the
synchronized alarm sets the latch, which keeps the cluster off once the
converter output has fallen and the alarm has gone. An active alarm wins
over a clear. The controller can set latches, which switches a cluster off on
purpose, and clear them, per channel or for all channels.

An open interlock loop (`intl = 1`) drops ME at once. Two clocks later it sets
INH, which lights `led_intl` and keeps the module off after the loop closes.
INH is cleared by the bus reset, or by an enable instruction sent while the
loop is closed. `bres` clears LE, INH, all latches and the sequencer.

## Clocking and timing

The logic runs on a local clock `clk`. `bck`, `bdw`, `ien`, `bres`, `intl` and
the 18 alarms each pass a two-flop synchronizer. Edges of `bck` are found in the
`clk` domain. Each phase of `bck` (high and low) must last at least three `clk`
cycles. The controller should change `bdw` while `bck` is low and hold
`ma`/`all` steady for the whole operation. Module actions follow the bus edges
by 2–3 `clk` cycles. DAC outputs (`dck`, `din`, `dl`) and `ack` are registered
copies of the synchronized bus clock, so `din` keeps the set-up time the
controller gave `bdw`.

## Where this design chooses for itself

The block structure, the instruction set, the clock counts, the widths and the
behaviour of the latches and enables above all follow the module as designed.
These points are this implementation's own choices:

* **Local clock and synchronizers.** The original block is described only by
  its bus clocks. Here everything runs on one local clock.
* **Two opcodes.** `110x` for *enable* is chosen next to `111x` for *disable*.
  *Read module data register* is given the free code `0000`, because the
  pattern `10xx` belongs to the ADC conversions.
* **Frame details.** These are chosen here: bit order (MSB first both ways),
  which leading ADC bits are replaced, zero fill after the ID, the unused top
  4 bits of the DAC word, active-high strobes and the channel numbering.
* **Latches.** A set or clear instruction acts on both latches of a channel. The
  raw alarms and raw `intl` gate the outputs directly, so that the switch-off
  is immediate.
* **Reads are never broadcast.**
* **Comparator limits are not in the control logic.** The limits are analog
  values outside it, and no instruction loads them.

The DACs, ADC, multiplexer, comparators and DC-DC converters (linear regulator,
single-transistor converter, two-stage Cockcroft-Walton multiplier) are analog
or commercial parts and have no RTL here.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/hv_pkg.sv \
        tb/tb_hv_module.sv --top-module tb_hv_module -o sim && ./obj_dir/sim

For a unit testbench, swap in its own name and add the module it tests (for
example `rtl/hv_cprg.sv tb/tb_hv_cprg.sv`); Verilator finds the others through
`-Irtl -Itb`.

`tb_hv_module` is the end-to-end test at the default sizes. It puts two modules
(slots 3 and 5) on one bus. Models of nine DACs (`tb/hv_dac_model.sv`), the
multiplexer and ADC (`tb/hv_adc_model.sv`) and a simple channel model surround
each module. The channel model's output follows its DAC code while the cluster
is on, its current is a quarter of that plus an injectable extra, and its
comparators trip above per-channel limits. The test sets and reads back all 18
channels. It trips overvoltage and overcurrent, sets and clears latches, opens
the interlock, and tries broadcast writes, a broadcast read (refused), an
unselected module, disable and the bus reset. It counts each of these 19
mechanisms and fails if any never happened. It also checks the 16 DAC clocks
and 15 ADC clocks per transfer. The unit testbenches compare against
independent reference models: exhaustive ones for the decoders and the
multiplexer, random stimulus with a reference model for CPRG and DAD, and
every opcode with counted strobes for FDEC.

`tb_hv_system` runs a system-level workload. Eight modules fill all eight
addresses of one bus, which is 72 channels. One broadcast enables them all. The
test reads every ID, and sets and reads back the voltage and current of every
channel. It then ramps one channel up one DAC code at a time, the way a crate
controller ramps a supply, and checks that each step costs 33 bus clocks.

## Sizing against the system

* 1728 PMTs / 72 = 24 clusters = 8 modules, 4 per crate. The 3-bit module
  address can reach 8 per bus.
* 12-bit DACs give 2000/4096 = 0.49 V, 800/4096 = 0.20 V and 400/4096 = 0.10 V
  steps. These meet the 0.5 / 0.2 / 0.1 V resolution of the module.
* Ramping is done by the controller rewriting the DACs. One channel update
  takes 33 bus clocks. Ramping all nine channels at the top rate (500 V/s in
  0.5 V steps) needs about 300 kHz of `bck`, and so a `clk` of at least about
  1.8 MHz.
