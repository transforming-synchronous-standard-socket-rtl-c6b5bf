# A GALS version of a one-master OCP socket design

A typical socket-based SoC has one master and several slaves talking through a
central switch, with the whole thing on one global clock. This design keeps
each OCP module synchronous and unchanged, but gives each its own local clock
and replaces the global wiring with asynchronous 4-phase bundled-data
channels. It is *globally asynchronous, locally synchronous* (GALS). Two
things make the conversion cheap:

* **Gaskets.** A small synchronous adapter between each OCP socket and its
  asynchronous wrapper turns OCP signals into the few control signals the
  wrapper needs. The wrapper itself knows nothing about OCP.
* **Stoppable clocks.** OCP idle periods are easy to see. A target's clock
  runs only from the arrival of a request until its response has left, so
  the slaves burn clock power only while they work.

The configuration built here is one initiator (a JTAG-port style master) and
two targets. In the reference frame these are a register bank at 100 MHz and
an SPI controller at 40 MHz. The OCP address and data are 8 bits wide. The
initiator's clock runs from 1 MHz to 100 MHz depending on a parameter. The
synchronous OCP modules themselves are not part of the RTL. Their sockets are
ports of the top level, and the testbenches drive them with behavioural
models.

```
            init_clk                                 tgt_clk[0]
 OCP master ──────── async_wrapper_init ──┐    ┌── async_wrapper_target ── OCP slave 0
                     (stretch clock)      │    │   (gated clock, 100 MHz)
                                     async_switch
                                     (1-to-2 split on MAddr MSB)
                                          │    │   tgt_clk[1]
                                          └────┴── async_wrapper_target ── OCP slave 1
                                                    (gated clock, 40 MHz)
```

## Channels and transfers

Every link between wrappers is a pair of 4-phase bundled-data channels:

* a **request channel** carrying `{MCmd[2:0], MAddr, MData}` (19 bits by default);
* a **response channel** carrying `{SResp[1:0], SData}` (10 bits by default).

The sender puts data on the bundle and raises `rq`. The receiver latches the
data and raises `ack`. Then `rq` and `ack` return to zero. The data must be
stable from the rising edge of `rq` to the rising edge of `ack`. In this
design the gaskets hold it in registers; there are no matched delay lines.

The OCP encodings come from the basic OCP interface in `gals_pkg`:

| Signal | Values |
|---|---|
| MCmd | IDLE=0, WR=1, RD=2 |
| SResp | NULL=0, DVA=1 |

The initiator works in OCP sequential mode. Each command is accepted and
answered before the next one is issued. Accept and response arrive in the
same cycle.

## The asynchronous ports

All ports are *poll type*: the synchronous module keeps running while the
port handles a transfer. A port is **edge enabled**. Each edge of `port_en`,
rising or falling, allows exactly one transfer. A gasket starts a transfer
by toggling a flip-flop, not by holding a level.

**`input_port`** is an eight-state asynchronous state machine plus a data
latch. Its state is encoded as `{rq_clk, ack, transf_active}`. One transfer
runs like this:

1. A request arrives with the enable in the expected phase.
2. The port asks its clock generator for a grant on `rq_clk`/`ack_clk`.
   Depending on the wrapper, the grant stretches or starts the local clock.
3. It acknowledges the sender and toggles `transf_active`.
4. It returns to zero in step with both the sender and the clock generator.

States 0–3 handle transfers with the enable high, states 4–7 with it low.
The latch is transparent while `ack` is low, so the data is captured when
`ack` rises.

**`output_port`** sends one bundle per enable edge. Its state is a phase bit
plus one of five steps: idle, request, release, clock-off, clock-off release.
With `CLK_OFF=1` (used in the targets) the port goes on after the response
handshake. It asks the clock generator to stop the clock (`rq_off`/`ack_off`)
and only then returns to idle.

**`transf_sync`** is an eight-state machine. It turns each edge of the
port's `transf_active` into a pulse, `transf_synch`. The pulse rises while
the local clock is low and stays high across exactly one rising edge. The
synchronous side can therefore sample it as an ordinary one-cycle strobe.

### How the state machines are written

Each asynchronous state machine is written as a Huffman machine:
`always_comb` computes the next state from the current state and the inputs,
and the result is fed straight back with no clock. Each one is described by
its state graph. A hazard-free gate-level version, as built by an
extended-burst-mode synthesis flow, is not part of the RTL.

This style has side effects in simulation and lint:

* Verilator reports the deliberate combinational loops as `UNOPTFLAT`
  warnings.
* All machines reset combinationally to state 0 while `rst_n` is low.
* In a 2-state simulator an input that changes exactly when the clock
  rises is resolved in a fixed order. In hardware that order comes from the
  timing margins.

## Local clock generators

**Stretchable clock (`clock_gen_stretch`, initiator).** A ring of `STAGES`
inverters gives the free-running clock. Each input port has a two-way
mutual-exclusion element (`mutex_element`) between its clock request and the
ring's "rise" request. A Muller C element (`muller_c`) makes `lclk` rise
only when the ring wants a rising edge and every mutex has granted the
clock side. While a port holds its grant, the clock stays low. The low phase
is stretched, never cut short, so the latched response meets setup time at
the next rising edge. The ring is modelled by its delay: half a period is
`STAGES × INV_DELAY_PS`. The mutex breaks ties at random.

**Gated clock (`clock_gen_gate`, targets).** `clock_gate_afsm` is a
five-state machine. It trades off two requests:

* the input port's *start* request (`rq1`): set `clk_en`, wait for the
  first rising clock edge, then acknowledge;
* the output port's *stop* request (`rq2`): accepted only while the clock
  is low, then `clk_en` is dropped and the stop is acknowledged.

`gated_ring_osc` closes the inverter ring through `clk_en`. The clock
therefore always stops low and restarts with a full high phase.

Default rates: 500 stages at 10 ps give a 10 ns period (100 MHz); 25 ps per
stage gives 25 ns (40 MHz); 1000 ps gives 1 MHz. The per-stage delay is a
parameter so that one ring length covers the whole range.

## Gaskets

**Initiator (`gasket_initiator`).**

* A command is any MCmd other than IDLE.
* When a new command appears, the gasket toggles `port_en` and registers
  the request bundle, in the same edge.
* A `sent` flag remembers that this command has gone out. The flag is
  cleared by the `transf_synch` pulse that marks the arrival of the
  response.
* In that same cycle the gasket gives `SCmdAccept` with `SResp`/`SData`
  from the input port's latch.
* `port_en` also enables the input port, so the wrapper allows exactly one
  response per request.

**Target (`gasket_target`).**

* A toggle flip-flop driven by `SCmdAccept` gives the output-port enable.
* The same flop XORed with `rst_n` gives the input-port enable. As a
  result the input port is ready for a new request from reset on, except
  while a transfer is in progress.
* A `pending` flag is set by `transf_synch` and cleared by `SCmdAccept`.
  The target sees `MCmd` only while the flag is set, so each request is
  executed exactly once.
* The response is registered on accept and is the output port's bundle.

## Wrappers, switch and top

**Initiator wrapper (`async_wrapper_init`).** One cycle of a transaction
runs:

1. The gasket toggles the enable.
2. The output port sends the request.
3. The response comes back through the input port, which stretches the
   clock while it latches the response.
4. `transf_sync` marks the response cycle.

**Target wrapper (`async_wrapper_target`).** The sequence here is:

1. The input port's clock request starts the gated clock.
2. `transf_sync` marks the new request.
3. The target accepts it.
4. The output port returns the response.
5. The output port then asks for the clock to stop.

With no traffic a target has no clock at all.

**Switch (`async_switch`, `splitter_1to2`).** `splitter_1to2` is purely
combinational:

* request strobes and response acknowledges are steered by one bit of the
  request bundle, the address MSB;
* request acknowledge, response strobe and response data are multiplexed
  back by the same bit;
* request data goes to both sides.

The select bit is held in the initiator gasket's register for the whole
transaction, so the steering cannot change in mid-handshake.
`async_switch` builds a binary tree of splitters for `NT` targets, where
`NT` must be a power of two. Tree level *d* selects on address bit MSB−*d*.
The top uses `NT=2`:

* addresses with MSB 0 go to target 0 (register bank, 100 MHz);
* addresses with MSB 1 go to target 1 (SPI, 40 MHz).

**Top (`gals_top`).** This is the converted design: one initiator wrapper,
the switch and two target wrappers. Its ports are the three OCP sockets,
the clocks generated for the three synchronous modules, and `rst_n`
(active low, asynchronous).

## Where this design departs from its source description

* **Initiator toggle rule.** The source circuit toggles the enable when a
  command is present and either it is new or `transf_synch` is high. If the
  command is held until its response, that also toggles at the response
  edge when the next cycle is idle. That toggle would send an IDLE request
  no target answers. The `sent` flag avoids this. The cost is one extra
  cycle between back-to-back commands.
* **Target pending flag and response register** are additions. They stop
  a request from executing twice and keep the response bundle stable.
* **Output port state machine.** The source does not give it; this one
  mirrors the input port's edge-enabled behaviour.
* **Clock-gate machine.** The stop request is taken as a rising `rq2` with
  the clock low, then a falling `rq2`, as a 4-phase request must be.
* **Synchronizer placement.** A transfer synchronizer is used in both
  wrapper types.
* **Ring oscillators, mutex and stretch generator** are behavioural models
  with `#` delays. They simulate but do not synthesize. Everything else is
  synthesizable.
* **Not built:**
  * demand-type ports, which keep the clock off until a transfer completes;
  * the synchronous JTAG master, register bank and SPI controller;
  * the script that generates the GALS top level from a synchronous one.

## Simulating

Everything runs on plain Verilator 5 with timing support. For example, the
full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/gals_pkg.sv tb/tb_gals_top.sv \
          --top-module tb_gals_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Use the same command with another `tb_*` module for any other test. Every
testbench:

* prints `TB_RESULT checks=<n> failures=<n>` and ends with `$finish`;
* has a watchdog that counts a failure if the run hangs.

Expect `UNOPTFLAT` and latch warnings from the asynchronous machines; they
are intended. Every testbench declares `rst_n` starting high, so the reset
at time 0 is a real falling edge for the asynchronously reset flip-flops.

| Testbench | What it shows |
|---|---|
| `tb_gals_top` | Default parameters, 400 random reads and writes to both targets with random accept latency (0–5) and random idle gaps. Every read is checked against shadow memories. It counts clock stretches, target clock starts and stops, back-to-back commands, and latency 0 and 5 accepts, and checks target activity below 1. |
| `tb_gals_jtag_sweep` | The same traffic with the initiator clock at 1, 10 and 100 MHz, with the clock periods measured. |
| `tb_gals_power` | Four traffic cases: random or burst, each with latency 0 or 5, each run with the initiator at 100 MHz and at 10 MHz (details below). |
| `tb_async_wrapper_init`, `tb_async_wrapper_target` | Each wrapper against a behavioural channel partner. |
| one `tb_<module>` per block | Unit tests of each block. `tb_async_switch` runs with four targets. |

`tb_gals_power` counts every clock's cycles and estimates the reduction of
dynamic power against the fully clocked design:
`1 − (0.176·α_JTAG + 0.484·α_SPI + 0.34·α_RB)`. In this formula:

* the weights are the synchronous modules' area shares (1100, 3000 and
  2100 equivalent gates);
* each α is the module's clock cycles × its ungated period ÷ elapsed time.

Helpers: `gals_frame` (a configurable frame with initiator model and
targets) and `ocp_target_model` (a register-file OCP target with a latency
input).

Results with 150 transactions per case, with the initiator at 100 MHz and
again at 10 MHz:

| Case | 100 MHz initiator | 10 MHz initiator | Reference estimate |
|---|---|---|---|
| random, latency 0 | 67.5 % | 80.2 % | 81 % |
| random, latency 5 | 56.4 % | 78.1 % | 64 % |
| burst, latency 0 | 40.6 % | 68.2 % | 76 % |
| burst, latency 5 | 39.0 % | 58.3 % | 53 % |

The orderings hold in both settings:

* latency 5 saves less than latency 0;
* a burst saves less than random traffic;
* a slower initiator saves more, because it leaves the targets idle for
  longer.

The absolute numbers depend on traffic density and the initiator clock,
which here are this design's own choices: 0–20 idle initiator cycles
between random commands, none within a burst. The initiator's stretch clock
never stops, so its 17.6 % share is always spent. The result is therefore
bounded by 82.4 %.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `gals_top` | `AW`, `DW` | 8, 8 | OCP address and data widths |
| `gals_top` | `STAGES` | 500 | inverters per ring |
| `gals_top` | `INIT_INV_DELAY_PS`, `T0_INV_DELAY_PS`, `T1_INV_DELAY_PS` | 10, 10, 25 | per-stage delay, which sets each clock rate |
| `async_switch` | `NT` | 2 | number of targets, a power of two |
| `async_switch` | `ADDR_MSB` | 15 | bundle bit the tree starts selecting on |
| `output_port` | `CLK_OFF` | 0 | 1 = ask for a clock stop after each transfer |
| `clock_gen_stretch` | `NPORTS` | 1 | number of ports that can stretch the clock |

## Limitations

* The asynchronous machines are verified as state graphs in a
  zero-delay, two-state simulator. Hazard freedom and the bundled-data
  timing margins must be checked on a gate-level netlist.
* Mutex metastability is not modelled; ties are decided at random.
* The power figures are activity estimates from cycle counts. They are not
  a power analysis: the extra handshake wires are not counted.
