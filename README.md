# Self-timed 2×2 packet router

This is a two-input, two-output packet switch. It is the building block of a
store-and-forward network that links the processors of a multiprocessor. A
network of N processors wired as an indirect binary hypercube needs
N/2·log2 N of these routers. The original router is a self-timed (clockless)
CMOS circuit. Every block in it talks to its neighbours over
request/acknowledge links, so no global clock has to be distributed and no
synchronizer can fail. This RTL reproduces that circuit block by block. It
keeps the original's split into *data paths* (registers and multiplexors,
each with its own small stage controller) and *system controllers* (a state
machine plus a distributed control structure).

The RTL is synthesizable SystemVerilog with one clock. It is an **emulation
of the self-timed circuit**, not a conventional synchronous redesign:

* Every state-holding node of the original is a flip-flop. That covers the
  C-elements, the delay registers, the register cells and the hold node of
  each domino gate.
* Plain gates are combinational logic.
* One clock cycle therefore stands for one gate delay.

A speed-independent circuit works for any gate delays, so it also works
when every delay is one cycle. The handshake order, the concurrency and the
deadlock behaviour all carry over. The speed in cycles is a property of this
emulation, not of the silicon.

## Packets

* A packet is a sequence of bytes sent one at a time (byte-serially).
* Each byte carries a ninth bit, **Last-Byte** (`lb`). It is 1 on the last
  byte of a packet and 0 on all the others.
* The first byte is the address. Its bit 0 picks the output: 0 for the upper
  output, 1 for the lower one.
* Every later byte of the packet follows the first.
* A packet must be **at least two bytes long**. The first byte engages the
  output's arbiter and the last byte releases it, and one byte cannot do
  both (see *Distributed structure*).
* The address byte is forwarded unchanged.

`router_pkg::flit_t` is `{lb, data[7:0]}`.

## Top-level structure

```
            +---------------------+        d0 (upper FIFO head)
 in[0] ---->| fifo: 4 x reg_stage |----+---------------------+----------------+
            +---------------------+    |                     |                |
                    | req/ack, d0, lb  |                 +---v-------+    +---v-------+
                    v                  |            c0/c1| mux_stage |    | mux_stage |
            +--------------------------+---+     +------>|  (upper)  |    |  (lower)  |
            | system_controller 0:         |-----+  Ack  +-----+-----+    +-----+-----+
            |   fsm (input 0) + ds (out 0) |<------------------|                |
            +------------------------------+                   v out[0]         v out[1]
                 ^  crossing requests, predicates fb/lb   ^
                 v                                        |
            +------------------------------+  c0/c1, Ack  |
            | system_controller 1:         |--------------+ (to/from the lower mux)
            |   fsm (input 1) + ds (out 1) |
            +--------------------------+---+
                    ^ req/ack, d0, lb  |
            +---------------------+    |
 in[1] ---->| fifo: 4 x reg_stage |----+----> d1 (lower FIFO head), to both muxes
            +---------------------+
```

Each FIFO's head byte goes to both output multiplexors and to its own
input's state machine (`fsm`). For every byte, the state machine asks one
output's distributed structure (`ds`) to take it. That structure tells its
multiplexor which input to load, using the dual-rail pair `c0`/`c1`. When
the multiplexor has latched the byte, its `Ack` travels back through the
structure and the state machine, and the FIFO is acknowledged. A
`system_controller` groups the state machine of input *i* with the
distributed structure of output *i*. A byte that crosses (upper input to
lower output, or the reverse) is handed to the other controller.

When the two inputs go to different outputs, both outputs work at the same
time. When they want the same output, the arbiter in that output's
structure lets one packet through whole and makes the other wait.

## Links

Every link is a **four-phase bundled-data handshake**:

1. `req` rises when the data are valid.
2. `ack` rises.
3. `req` falls.
4. `ack` falls.

The sender must hold `req` and the data stable until `ack` rises. The
router's external ports follow the same rule:

* `in_req`/`in_ack`/`in_data` and `out_req`/`out_ack`/`out_data` are
  indexed 0 for upper and 1 for lower.
* A new byte may be offered once `ack` has fallen again.

## Register module (`reg_stage`) and FIFO (`fifo`)

A stage holds a word register (`W` = 9 bits) and a **delay register**. The
delay register is a one-bit cell loaded with a constant 1 by the same
`LOAD` signal as the data, so its output `DONE` rises only once a load is
certain to be complete. The stage controller uses two C-elements:

* `x`, from `rin` and not `rout`;
* `rout`, from `DONE` and not `aout`.

These drive two control lines, `HOLD` (the register's feedback path) and
`LOAD` (its input path). The order of events is:

```
rin+ (rout low) -> x+ -> HOLD- -> LOAD+ -> DONE+ -> HOLD+ -> LOAD-
DONE+, LOAD-    -> ain+        DONE+, aout-  -> rout+
rin- (rout high)-> x- -> DONE- -> ain-       DONE-, aout+ -> rout-
```

Two points of this order matter:

* `HOLD` falls before `LOAD` rises, so a stage never drives back into the
  stage before it.
* `ain` waits for `LOAD` to fall, so the sender may change its data as soon
  as it sees `ain`.

Consecutive stages can therefore hold different words without
master/slave registers.

`fifo` chains `DEPTH` stages (default 4, this design's choice). In the
emulation:

* One stage takes 3 cycles from request to output request.
* An empty FIFO passes a word through in 3·`DEPTH` cycles.
* A FIFO whose output is held back accepts exactly `DEPTH` words.

## Multiplexor module (`mux_stage`)

The multiplexor is the register module with a two-way input:

* `c0` loads `d0` (the upper FIFO) and `c1` loads `d1` (the lower FIFO).
  The two never rise together, and an assertion checks this.
* Each rail has its own C-element and its own `HOLD`/`LOAD` pair. One shared
  delay register gives `DONE`.
* `ack` = `DONE` with neither `LOAD` high. It goes back to the system
  controller.
* The output side is the same `rout`/`aout` pair as in a register.

## State machine (`fsm`, `s_star`)

Per input, the state machine turns each byte into three predicates:

| predicate | meaning |
|-----------|---------|
| `fb` | this byte is the first of its packet |
| `lb` | this byte is the last of its packet (copied from the byte) |
| `dir` | the packet's address bit: taken from bit 0 of the first byte, then recycled |

The state is held in a master and a slave register:

* The **S\*** module (`s_star`) answers the FIFO's request with a one-cycle
  clock pulse `phi`. The pulse is ended by the same delay-register loop as
  in the register module.
* `phi` loads the master. While `phi` is low, the slave copies the master.
* The slave holds fb′ (the previous byte's `lb`) and dir′ (the previous
  `dir`). A byte is a first byte exactly when the byte before it was a last
  byte.
* A 2:1 multiplexer controlled by fb′ picks the new `dir`: `d0_in` on a
  first byte, dir′ otherwise.
* After reset fb′ = 1, so the first byte is treated as an address.

After the pulse, S\* runs a handshake on its second link through a static
Decision module:

* `dir` = 0 sends the request to the upper output's structure (`ru`).
* `dir` = 1 sends it to the lower output's structure (`rd`).

That structure's acknowledge becomes the FIFO's acknowledge.

## Distributed structure (`ds`): the part that needs care

Each output has one `ds`. It receives requests from both inputs' state
machines. For each input there is a **Sequence** module with three links,
built as plain wiring: each link's acknowledge is the next link's request.

1. **Decision on `fb`** (`decision`, one-way). On a first byte it sends an
   Engage request to the arbiter. Otherwise it acknowledges at once.
2. **Union/Decision** (`ud_module`). It raises `c0` for a request from the
   upper input or `c1` for one from the lower input, and steers the
   multiplexor's `Ack` back to that side only.
3. **Decision on `lb`** (one-way). On a last byte it sends a Release
   request. Otherwise it acknowledges at once.

The arbiter stays engaged from a packet's first byte to its last. The bytes
of one packet therefore leave together, and a packet from the other input
waits at step 1.

### Domino gates

These modules are built from **domino gates** (`domino_gate`):

* While the gate's enable is low, its output is low.
* While the enable is high, the output follows the gate's function.
* Once the output is high, it stays high until the enable falls.

This is what lets a chain of modules reset in parallel when one signal
falls. The gates form two enable groups:

* The fb Decision and the UD module are enabled by the incoming request. They
  reset together as soon as the state machine drops it.
* The lb Decision is enabled by the multiplexor's `Ack`. Its acknowledge to
  the state machine therefore stays up until the multiplexor has finished
  its own cycle, even after the link requests below it have fallen.

This second group is what makes the loop safe. Without it, the FIFO could
offer the next byte while the multiplexor's `Ack` from the previous byte is
still high, and that next byte would be acknowledged without ever being
loaded.

### Arbiter

The arbiter has two layers:

* `arbiter_circuit` is a two-way mutual exclusion element with a global
  reset.
* `arbiter_module` adds the Engage and Release links on top of it.

The arbiter module locks a port's grant through a feedback path: the
request into the mutex is `eng OR (grant AND NOT rel)`. The mutex does not
grant the other port until the first port's request/acknowledge cycle is
complete, and that includes the Release handshake returning to zero. By
then the releasing port's select (`c0` or `c1`) has fallen, so the two
selects at the multiplexor stay dual-rail. In the original circuit, ties are
resolved by a cross-coupled flip-flop and a metastability filter. Here a tie
is resolved in one cycle, in favour of the side that did not win the last
tie.

### Why at least two bytes

On a one-byte packet, the Engage request of link 1 is still high while
link 3 asks for the Release, because the wired Sequence module keeps
earlier links' requests up. The arbiter never lets go, and the router
deadlocks, as the original does. `fsm` carries an assertion that flags such
a packet.

## Timing of the emulation

A long packet streamed from one input to a free output, with the consumer
always ready, moves **8 cycles per byte**. The cycle of one byte is:

| cycle | what happens |
|-------|--------------|
| 0 | the FIFO head raises its request |
| 1 | S\* moves to link 2; `ru`, `c0` rise |
| 2 | the multiplexor's `x0`/`LOAD0` rise |
| 3 | `DONE` and `Ack` rise; the acknowledge reaches the FIFO head |
| 4 | the head drops its request |
| 5 | S\* clears; `ru` and `c0` fall; the head starts loading the next byte |
| 6 | the multiplexor's `x0` falls; the head's `DONE` rises |
| 7 | the multiplexor's `DONE` and `Ack` fall; the acknowledges fall |
| 8 | the head offers the next byte |

Other timings:

* An empty FIFO adds 3 cycles per stage.
* A first byte adds one cycle at the arbiter.

The original chip was measured between 4.76 and 10.9 million bytes per
second (5.96 on average), with about 1 µs latency. Those figures depend on
gate delays in silicon and have no cycle equivalent here.

## Where this RTL departs from the original, or fills gaps

* **The clock.** There is one clock, and each state-holding node is a
  flip-flop. The original has no clock. Its delay registers are matched
  delays; here each is one cycle.
* **Reset.** All state has an asynchronous active-low reset `rst_n`. The
  original describes a global reset only for the arbiter.
* **FIFO depth.** `DEPTH` = 4 is a choice; the original depth is not known
  here.
* **Gate-level details** were inferred where only the behaviour is known:
  * the second inputs of the register module's C-elements;
  * the multiplexor's `ack` equation;
  * the S\* link-2 request taken from the delay register output;
  * the feedback of the slave register (fb′ ← `lb`, dir′ ← `dir`);
  * the qualification of the UD module's acknowledges by each side's own
    request;
  * the Engage/Release equations of the arbiter module, including the wait
    for the Release handshake to complete.
* **The Decision module inside the state machine is static logic**, not a
  domino gate. A domino version enabled by its own request would drop its
  acknowledge too early (see *Domino gates*).
* **Domino gates** are modelled by their logical behaviour (evaluate while
  enabled, stay high once high). Their charge-sharing and precharge
  electrical rules do not apply.
* **Not modelled:** the pseudo-static pass-transistor register cells, the
  transistor sizing, the arbiter's threshold detector and the
  collapsing of gates across module boundaries that the original used for
  speed. These are circuit-level matters with no logic of their own.

## Files

| file | contents |
|------|----------|
| `rtl/router_pkg.sv` | byte width, `flit_t`, port enum |
| `rtl/router_2x2.sv` | top level |
| `rtl/fifo.sv`, `rtl/reg_stage.sv` | input queue and register module |
| `rtl/mux_stage.sv` | output multiplexor module |
| `rtl/system_controller.sv` | one fsm + one ds |
| `rtl/fsm.sv`, `rtl/s_star.sv` | per-input state machine, S\* pulse/sequence module |
| `rtl/ds.sv` | per-output distributed control structure |
| `rtl/decision.sv`, `rtl/ud_module.sv` | D and UD control modules |
| `rtl/arbiter_module.sv`, `rtl/arbiter_circuit.sv` | Engage/Release arbiter and mutex |
| `rtl/c_element.sv`, `rtl/domino_gate.sv` | primitives |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert rtl/router_pkg.sv rtl/*.sv \
          tb/tb_router_2x2.sv --top-module tb_router_2x2 -o tb_router
./obj_dir/tb_router
```

Replace the testbench file and the top-module name to run another one.
`tb_router_2x2` runs the router at its default size. It does three things:

* **Random phase.** It sends 400 random packets from each input. Each
  packet is 2–9 bytes long and carries its source, destination and a serial
  number in the first byte. The test stalls the outputs for long stretches
  so that the queues fill.
* **Packet checks.** It cuts each output stream into packets at `lb` and
  compares each packet with the next one expected from its source.
* **Mechanism and timing checks.** It counts how often each mechanism
  happened and fails if one never did. The mechanisms are straight and
  crossing packets, engage, release, arbiter contention, both outputs busy,
  output stall and full FIFO. It then streams a 40-byte packet and checks
  the 8 cycles per byte worked out above.

`tb_router_workloads` measures the router's timing. It checks three things:

* A first byte entering an empty router reaches the output after 17 cycles.
* Two streams on different outputs each keep 8 cycles per byte.
* When both inputs send back-to-back packets to the same output, the output
  changes hands at every packet boundary and no packet is damaged.

Every module also has its own testbench, run the same way.

The assertions inside the RTL are part of the checking. They cover
request/data stability on a register's input link, dual-rail selects, mutual
exclusion in the arbiter, and the two-byte minimum. Keep `--assert` on.

## How far to trust it

* **Checked by the testbenches:**
  * The router delivers every packet intact and in order per
    source/destination pair.
  * It never interleaves packets at an output.
  * It keeps the handshakes and the assertions above under heavy random
    contention and backpressure.
  * The register, FIFO, multiplexor, S\* and arbiter timings stated above
    hold.
* **Not checked:** the behaviour of the original silicon under real delays.
  Because the control is speed-independent, the emulation should follow the
  same order of events. Timing figures in seconds cannot be derived from it.
