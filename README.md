# SynUTC / IEEE 1588 hardware clock synchronisation: RTL

Software can synchronise clocks over Ethernet only to about a millisecond.
Most of that error comes from *when* a packet is timestamped: a stamp taken
while the packet is built, or in a receive interrupt, includes unknown
protocol-stack and interrupt delays. The SynUTC approach, which IEEE 1588
(PTP) also relies on, takes the stamp in hardware on the MII between the
Ethernet MAC and the PHY. The stamp is taken in the clock cycle that the start
frame delimiter (SFD) passes, and it is written straight into the packet
while the packet streams through. Ethernet switches add a variable delay of
tens of microseconds. A small add-on on the switch ports measures how long
each synchronisation packet stayed in the switch and writes that into the
packet too. The receiver can then separate the constant path delay from the
variable switch delay, and synchronisation reaches the ~100 ns range.

This repository holds synthesizable SystemVerilog for the timing hardware of
such a system:

- the network node's timing core: an adder-based clock, two accuracy-bound
  clocks, MII timestampers for transmit and receive, event timestamping and
  generation, and a 1-pps input and serial port for a GPS receiver;
- the switch add-on that measures residence time;
- a system top with four nodes around the add-on.

## System structure

```
            MAC 0 ──┐                                   ┌── Ethernet switch (external)
  GPS ── node 0 ────┼── MII ── port 0 ┐                 │
            MAC 1 ──┤                 │  switch_addon  ─┤  sw_txd/sw_rxd per port
         node 1 ────┼── MII ── port 1 ┤  (own adder    ─┤
         node 2 ────┼── MII ── port 2 ┤   clock)       ─┤
         node 3 ────┴── MII ── port 3 ┘                 └──
```

`synutc_system` (top) instantiates `N_NODES` (4) `synutc_node`s and one
`switch_addon` with 4 ports. Each node's PHY-side MII goes directly to one
add-on port, so the PHY pair and cable act as a zero-delay link. The add-on's
switch-side MII ports, each node's MAC-side MII, and each node's CPU-side
controls are top-level ports. Node 0 gets the GPS receiver's 1-pps and RS232
lines.

| module | role |
|---|---|
| `synutc_pkg` | time types, control structs, nibble CRC-32, residence arithmetic |
| `adder_clock` | 96-bit adder-based clock: rate, load, amortization |
| `accuracy_clock` | one accuracy bound that grows by itself |
| `interval_clock` | forms the interval ends C − α⁻ and C + α⁺ |
| `mii_stamper` | SFD detection, field insertion, FCS regeneration, residence mode |
| `event_timestamp` | stamps rising edges of event pins and the 1-pps |
| `event_generator` | raises output pins at programmed times |
| `uart` | 8N1 serial port to the GPS receiver |
| `synutc_node` | one node's timing core |
| `switch_addon` | ingress stamping and residence insertion on N ports |
| `synutc_system` | four nodes and the add-on |

Outside this RTL: the CPU that runs the synchronisation algorithm and the
PTP stack, the Ethernet MACs, the Ethernet switch, the PHYs and the GPS
receiver. Their connections are ports of the top.

## Time format

All time values are 96 bits:

| bits | content |
|---|---|
| 95:64 | seconds |
| 63:32 | nanoseconds, 0 … 999 999 999 |
| 31:0 | binary fraction of a nanosecond |

The upper 64 bits are the IEEE 1588 seconds/nanoseconds format. Increments,
accuracy bounds and residence times use the lower 64 bits only ("ns.frac").
For example, 10 ns per tick is `64'h0000000A_00000000`.

## The adder-based clock (`adder_clock`)

A counter can only count oscillator ticks. This clock instead adds the
oscillator period, a programmable ns.frac increment, on every tick. Two things
follow:

- Any oscillator frequency can drive the clock.
- The rate can be trimmed in steps of 2^-32 ns per tick. That is about
  0.02 ns/s at 100 MHz, far finer than the 1 ns/s the scheme needs.

Commands come in as a `clk_ctrl_t` struct of one-cycle strobes:

- **`inc_stb`/`inc`**: sets a new increment (rate adjustment). It takes effect
  from the next tick.
- **`load_stb`/`load_val`**: sets the state (hard resynchronisation).
  `time_o` shows `load_val` in the cycle after the strobe and advances
  normally after that. So to step a clock by −d without losing a tick, load
  `time_o + inc − d`.
- **`amort_stb`/`amort_delta`/`amort_ticks`**: continuous amortization. For
  the next `amort_ticks` ticks, a signed `amort_delta` is added to the
  increment. The clock slews by `amort_ticks × amort_delta` and never jumps or
  runs backwards. `amort_busy` is high meanwhile. The increment plus
  correction must stay between 0 and 1 s.

**Pipelining.** A 96-bit add with a decimal wrap at 10^9 ns is too deep for
one cycle at high clock rates. The clock is split into two stages:

1. The 64-bit ns.frac accumulator adds the step. It subtracts 10^9 ns when
   the sum reaches a second and registers the carry.
2. The 32-bit seconds register adds that carry one cycle later.

A second register delays the ns.frac word by one cycle to match. So `time_o`
is always a coherent value, one cycle behind the accumulator. For resolution,
only the tick rate matters: every stamp has the granularity of one tick.

## Accuracy intervals (`accuracy_clock`)

SynUTC represents time as an interval. At real time t, a node guarantees that
t lies in [C − α⁻, C + α⁺]. Here C is the node's clock and α⁻, α⁺ are its
negative and positive accuracy bounds. The bounds must grow as the
oscillator drifts, so each one is another adder-based clock:

- On every tick it adds a programmed deterioration, the worst-case drift per
  tick.
- At resynchronisation the CPU loads fresh bounds (`acc_ctrl_t.load_stb`)
  and may set new rates (`rate_stb`).
- A bound saturates at all ones. After reset it is all ones, meaning "unknown".

`interval_clock` shows the interval itself as two 96-bit times, `interval_lo`
and `interval_hi`. These are registered and reflect the clock and bounds of
the previous cycle. The nanosecond word wraps at 10^9 with one borrow or
carry into the seconds, which is enough while a bound is below one second. A
bound of one second or more sets `interval_wide` and leaves that end at C.

## On-the-fly packet timestamping (`mii_stamper`)

This is the core of the design. One instance sits in each MII direction of a
node. The add-on has two per port.

**Capture.** The stamper watches the incoming nibbles. The SFD byte 0xD5 is
sent low nibble first, so the SFD is a `D` nibble after a `5` nibble. In the
cycle that this nibble is sampled, `time_i` is stored in `ts_capt` and
`ts_valid` pulses. Software can read the stamp of any frame, CSP or not.

**Delay line.** The stream passes through `DELAY` = 8 nibble registers and an
output register, so `out_*` lags `in_*` by exactly 9 nibbles. The delay is
needed because of the FCS. Once a field is overwritten, the frame's FCS is
wrong and must be replaced. The end of a frame is only known when `dv` falls,
and at that moment the 8 FCS nibbles are still inside the delay line, so they
can be replaced on the way out.

**CSP recognition and insertion.** On the output side, the stamper counts
nibbles after the SFD. A frame is a clock synchronisation packet (CSP) when
its EtherType (bytes 12–13) equals `cfg.ethertype`. In a CSP, `FIELD_BYTES`
bytes starting at byte `cfg.ts_offset` are overwritten:

- byte 0 is the first destination-address byte;
- bytes go most significant first;
- each byte goes low nibble first, as on MII.

The field must start at byte 14 or later, after the EtherType. Other frames
pass unchanged.

**FCS rule.** Two CRC-32s run over the outgoing data: one over the nibbles as
received, one over the nibbles as sent. When the FCS arrives, the stamper
sends

`FCS_out = ~CRC(sent) ^ FCS_in ^ ~CRC(received)`.

Three cases follow from this one rule:

- an unmodified frame leaves bit-identical;
- a modified good frame gets a correct FCS;
- a frame that arrived corrupt leaves with the same CRC error syndrome, so a
  stamper never turns a bad frame into a good one.

**Residence mode** (`RESIDENCE = 1`, used on the add-on's way out to the
nodes). The stamper reads the 12-byte ingress time from byte
`cfg.src_offset` of the passing frame. It then writes 8 bytes at
`cfg.ts_offset`: its own SFD time minus the ingress time, as ns.frac. The
result is correct across one seconds rollover and assumes a residence below
1 s. The source field must end before the written one starts; an assertion
checks this. `stamped` pulses when a CSP has left with its field written.

### CSP layout used here

The hardware places fields wherever `csp_cfg_t` says. The testbenches use
this layout (EtherType 0x88F7):

| bytes | field | written by |
|---|---|---|
| 14–25 | Send TS (96 bit) | sending node, transmit stamper |
| 26–37 | ingress time | add-on, port where the CSP enters the switch |
| 38–45 | residence time (ns.frac) | add-on, port where the CSP leaves the switch |
| 46–57 | Receive TS (96 bit) | receiving node, receive stamper |

### What a receiver can compute

Every stamper adds a constant 9-nibble delay. A CSP from node i to node j
therefore carries:

`Receive TS − Send TS = (C_j − C_i) + residence + 18 nibble times`

The 18 nibble times are the delays of the node's transmit stamper and the
add-on's egress stamper. The residence already includes the add-on's ingress
stamper, because it is measured from SFD to SFD at the two add-on inputs. With an ideal link,
the offset C_j − C_i follows exactly. The system testbench recovers
arbitrary offsets to the bit this way. On real links, the cable and PHY
delays add to this constant.

## Switch add-on (`switch_addon`)

For each port there are two stampers:

- **Ingress** (node → switch): stamp mode. It writes the add-on time into the
  ingress field.
- **Egress** (switch → node): residence mode. It reads the ingress field back
  and writes the residence time.

All ports share one `adder_clock` in the add-on, so a residence time is a
difference of two readings of the same clock and needs no synchronisation.
The switch can reorder, delay or broadcast frames freely. Its only
requirement is to forward the CSP bytes unchanged.

## Events, 1-pps and GPS serial port

- **`event_timestamp`**: two-flop synchroniser per pin and rising-edge
  capture of the 96-bit time.
  - The stamp is the time 2 clock cycles after the edge that first sampled
    the pin high. Software subtracts this constant.
  - A stamp is held until `clr`. A further edge meanwhile sets `overrun`.
  - In the node, channel `N_EVT_IN` is the GPS 1-pps input.
- **`event_generator`**: per channel, `arm` loads a 96-bit time.
  - The pin goes high one cycle after the first tick with `time ≥ target`,
    and stays high until `clr`.
  - Nodes with agreeing clocks raise their pins in the same cycle.
- **`uart`**: 8N1 serial port with `DIV` clocks per bit. The default of 868
  gives 115 200 baud at 100 MHz. The receiver samples mid-bit and flags a low
  stop bit with `rx_err`.

## Clocking and the CPU side

Everything runs on one core clock `clk`, which is also the oscillator of the
adder-based clocks. MII data is taken on cycles where `mii_ce` is high: every
cycle in most testbenches, every 4th cycle for 25 MHz MII on a 100 MHz core.
The stampers only move on `mii_ce` cycles. The SFD stamp is taken in the
`mii_ce` cycle itself, at full core-clock resolution.

The CPU's view is a set of struct ports rather than a bus:

- `clk_ctrl_t` and `acc_ctrl_t` for commands;
- `csp_cfg_t` for the CSP formats;
- the times, stamps, flags and event registers as outputs.

A register file for a particular CPU bus can be placed on these ports.
Reset is asynchronous, active low.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_NODES` | 4 | `synutc_system` | nodes (and add-on ports) |
| `N_EVT_IN` | 2 | node, system | event input pins (plus the 1-pps channel) |
| `N_EVT_OUT` | 2 | node, system | event output pins |
| `UART_DIV` / `DIV` | 868 | node, system, `uart` | core clocks per serial bit |
| `INC_RESET` | 10 ns | `adder_clock` | increment after reset (100 MHz oscillator) |
| `FIELD_BYTES` | 12 | `mii_stamper` | bytes written (8 in residence mode) |
| `RESIDENCE` | 0 | `mii_stamper` | 1: write residence time instead of own stamp |
| `DELAY` | 8 | `mii_stamper` | delay line length, must cover the 4-byte FCS |
| `N_PORTS` | 4 | `switch_addon` | ports |

## Design choices beyond the published description

The following are specified by the published SynUTC/IEEE 1588 prototype
description:

- the 96-bit adder clock, its IEEE 1588 seconds/nanoseconds part, rate
  adjustment, amortization and pipelining;
- the two deteriorating accuracy clocks and the interval [C − α⁻, C + α⁺];
- SFD-triggered capture and on-the-fly insertion of Send/Receive TS;
- the add-on's ingress stamp and residence insertion;
- event stamping and generation, and the 1-pps and RS232 GPS interface;
- four nodes around the add-on.

The following are this design's own:

- the 32-bit sub-nanosecond fraction and the two-stage pipeline split;
- the amortization command format (delta per tick for a number of ticks);
- CSP recognition by EtherType, the field offsets, the 8-nibble delay line
  and the FCS rule;
- one clock for the whole add-on, and the 64-bit residence format;
- the synchroniser, level-output and overrun policies of the event units;
- the one-second limit of the interval display;
- the UART frame format and baud rate;
- one clock domain with an MII clock enable, and struct ports instead of a
  CPU bus.

The system top joins nodes and add-on with zero-delay links.

Known limits:

- A residence time of 1 s or more is not represented.
- Frames shorter than the field positions are passed with the field left
  partly written.
- `in_er` is delayed but not acted on.

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_eth_pkg.sv` builds
Ethernet frames and computes the FCS byte by byte, independently of the
design's nibble CRC.

| testbench | covers |
|---|---|
| `tb_adder_clock` | cycle-by-cycle against a 128-bit reference, second rollover, rate, ± amortization, load latency |
| `tb_accuracy_clock` | growth per tick, rate change, saturation |
| `tb_interval_clock` | 5000 random clocks and bounds near second boundaries and above one second |
| `tb_mii_stamper` | two stampers chained (stamp + residence), CSP / non-CSP / corrupt-FCS frames, `mii_ce` every cycle and every 4th cycle, second rollover, 9-nibble latency |
| `tb_event_timestamp`, `tb_event_generator`, `tb_uart` | the peripheral units |
| `tb_switch_addon` | every port pair through a modelled switch with random residence |
| `tb_synutc_node` | every node function through its ports |
| `tb_synutc_system` | end to end, at default parameters |

`tb_synutc_system` runs two full broadcast rounds of 12 CSPs with a switch
model. It checks every field and FCS, recovers node offsets exactly, and
resynchronises the clocks by load and by amortization. It also covers
accuracy intervals, simultaneous events, synchronous event outputs, rate drift, non-CSP
pass-through, the 1-pps and the GPS serial port. It counts each mechanism and
fails if any never occurred.

Run any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/synutc_pkg.sv tb/tb_eth_pkg.sv tb/tb_synutc_system.sv \
    --top-module tb_synutc_system -o sim && ./obj_dir/sim
```

Lint a module with `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv
rtl/synutc_pkg.sv rtl/<module>.sv`.
