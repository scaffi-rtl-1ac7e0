# SCAFFI: a pausable-clock interface between clock islands

A globally asynchronous, locally synchronous (GALS) system needs a safe way to move data
between synchronous islands that run on unrelated clocks. The usual answer, two flip-flops
in series on the receiving side, only makes metastability unlikely and adds latency.
SCAFFI (Stretchable Clock Asynchronous Flexible FPGA Interface) avoids metastability
altogether. Each island runs on its own ring-oscillator clock. That clock can be
*stretched*: held at its current level, high or low, for as long as needed. An island's
clock is frozen whenever a signal that it samples is about to change. When the clock
resumes, the signal is already stable. So no flip-flop ever samples a moving input.

Two properties set SCAFFI apart from earlier pausable-clock schemes:

- **No arbiter.** The stretcher can freeze the clock at either level, so it never has to
  decide between a request and the next clock edge.
- **Only small controllers.** Everything between the islands is two ten-state
  asynchronous controllers, one stretcher per island, and the wires. In an FPGA these
  parts are hard macros, which fix their placement and wire delays.

This repository holds SystemVerilog for:

- the basic bundled-data channel;
- the dual-rail (delay-insensitive) variant of that channel;
- a GALS RSA exponentiation core built on the channel.

Every part comes with a self-checking testbench.

## A word crossing the channel

```
      sender island                                         receiver island
 +------------------+   SR  +--------+   AR   +--------+  SR  +------------------+
 | data production  |------>| output |------->| input  |----->| data consumption |
 |  (2-phase)       |<------|  port  |<-------|  port  |<-----|  (2-phase)       |
 +--------^---------+   SA  +--------+   AA   +--------+  SA  +---------^--------+
          | clk              RS |  ^ AS         RS |  ^ AS               | clk
          |                     v  |               v  |                  |
          +------------------ stretcher         stretcher ----------------+
          ==================== data bus (bundled) ====================>
```

Each island talks to its port with a **2-phase** handshake. Every transition of SR is one
request, and SA is answered by making it equal to SR again. The two ports talk to each
other with a **4-phase** return-to-zero handshake on AR/AA. A port stretches its island's
clock by raising RS. It treats the clock as frozen once AS comes back. One word goes
through these steps:

1. On a sender clock edge, the sender puts the word on the bus and toggles SR.
2. The output port raises RS at once, which freezes the sender clock. This happens in the
   same half period, so the frozen level is normally high.
3. When AS arrives, the output port raises AR and sets SA = SR. SA changes while the
   sender is frozen.
4. The input port sees AR and raises its own RS (RS is AR). When the receiver's AS
   arrives, the receiver clock is frozen. The port then toggles the receiver-side SR and
   raises AA.
5. AA makes the output port drop AR. This releases the receiver clock, so the receiver
   stretch lasts only about one stretcher acknowledge delay.
6. On its next edge, the receiver sees SR != SA. It registers the bus and toggles SA. The
   bus is still stable, because the sender is still frozen.
7. The input port drops AA. The output port then drops RS, and the sender clock runs
   again. On the next sender edge, SA == SR, so the next word can go out.

The bundled-data timing constraint (data settled before the receiver looks) is met by
construction. The sender cannot change the bus until the receiver has taken the word.
If the receiver is busy (`rx_accept` low), the word stays pending and the sender clock
stays frozen. That is the channel's back-pressure.

The sender clock is stretched from its own request until the receiver has consumed the
word. The receiver clock is stretched only briefly, while its SR changes. Often the sender
is released before its frozen half period would have ended anyway. So in back-to-back
streaming the model moves a word in about one sender period (measured: 20.6 ns per word
with a 50 MHz sender and a 78 MHz receiver). Two sender periods is the published upper
bound for any frequency ratio. The published FPGA prototype reached 31 Mwords/s at
these frequencies. That figure includes real LUT and routing delays, which are not
modelled here.

## The two port controllers

Both ports are burst-mode machines with ten states: five for a rising request and five
for a falling one. Each row below is one input burst and the outputs it produces.

| from | output port (inputs / outputs) | input port (inputs / outputs) |
|------|-------------------------------|-------------------------------|
| 0→1 | SR+ / RS+         | AR+ / RS+        |
| 1→2 | AS+ / AR+ SA+     | AS+ / AA+ SR+    |
| 2→3 | AA+ / AR-         | AR- / RS-        |
| 3→4 | AA- / RS-         | AS- / –          |
| 4→5 | AS- / –           | SA+ / AA-        |
| 5→6 | SR- / RS+         | AR+ / RS+        |
| 6→7 | AS+ / AR+ SA-     | AS+ / AA+ SR-    |
| 7→8 | AA+ / AR-         | AR- / RS-        |
| 8→9 | AA- / RS-         | AS- / –          |
| 9→0 | AS- / –           | SA- / AA-        |

Each port is a two-level hazard-free cover of its table, with one feedback variable Y0:

```
output port                                 input port
RS = AA + SR.~Y0 + ~SR.Y0                   RS = AR
AR = SR.AS.~AA.~Y0 + ~SR.AS.~AA.Y0          SR = ~SA.AS + Y0 + SA.~AS.AR
SA = SR.Y0 + ~AS.Y0 + SR.AS                 AA = ~SA.Y0 + AS + SA.~AR.~Y0
Y0 = SR.AA + SR.Y0 + ~AA.Y0                 Y0 = ~SA.AS.AR + ~AR.Y0
```

In the output port, Y0 is 1 in states 3–7. In the input port, Y0 is 1 in states 2–5.

The complements in four terms were set by checking each equation against all ten states:
the last term of RS, the second term of AR, and the third terms of SR and AA. These are
the only equations consistent with the state tables.

The fed-back Y0 passes through a reset gate (`Y0 & ~rst`). With all inputs low, reset
therefore leaves both ports in state 0. The published output-port macro has this gate;
the input port gets the same gate here.

In `rtl/` the equations are plain `assign` statements with a genuine combinational loop
through Y0. Lint tools report that loop, and it is intended: it is how the controller
holds its state, exactly as in a LUT whose output is wired back to an input. The AR/AA
pair between the two ports also forms a loop, and that loop is the handshake itself.

The simulation model has zero delay, so it cannot show hazards. It also does not check
that the controllers are used in fundamental mode, where one burst settles before the
next begins. On silicon, correct behaviour depends on the isochronic forks that the hard
macro placement guarantees. The RTL gives the logic function, not that placement.

## The stretcher

`scaffi_stretcher` is a **behavioural model**, with delays and no synthesizable logic.
The real part is a hand-placed ring:

```
clk -> D3 -> inverter -> D2 -> mux(0) -> C-element -> clk
                 |                          ^
                 +--------------------------+      mux(1) = clk,  select = Req
Ack = Req delayed by D1
```

- **Req low:** the mux passes the delayed, inverted clock. The C-element sees two equal
  inputs, so it toggles, and the ring oscillates. The half period is
  D3 + inverter + D2 + mux + C-element.
- **Req high:** the mux passes the clock itself. The C-element then sees the clock and its
  inverted, delayed copy. They disagree, so the C-element holds, and the clock is frozen
  at whatever level it had.
- **Ack:** D1 must be longer than the mux plus the C-element. Ack therefore rises only
  once the clock is really frozen.

The element delays are not published, so this design sets its own in `scaffi_pkg`:

| element | delay |
|---------|-------|
| inverter | 100 ps |
| mux | 100 ps |
| C-element | 100 ps |
| D2 | 300 ps |
| D1 | 400 ps |

D3 sets the frequency. It is computed by `scaffi_pkg::d3_ps(MHz)`, so a 50 MHz stretcher
has D3 = 9400 ps. The testbench checks these properties:

- the exact period;
- that Ack is Req delayed by D1;
- that the clock is frozen from Ack until Req falls;
- that freezing happens at both levels;
- that the clock restarts within half a period.

Every element runs as its own process. Each process schedules every output change in a
`fork … join_none` thread, and then waits at level until its input differs from the last
value it saw. This gives true transport delays, even when several edges are in flight in
one delay line. Verilator's delayed non-blocking assignment shares a single temporary
between pending events, which silently drops edges. A plain `@(…)` wait can miss a
change that happens at time zero.

## Dual-rail channel

For islands placed far apart, the equal-delay assumption of a bundled bus is hard to
keep. `scaffi_dual_rail` therefore replaces the bus and the AR wire with W rail pairs:

- **Single to dual** (`scaffi_single_to_dual`): while the output port's AR is high, each
  bit drives its pair to (1,0) or (0,1). While AR is low, every pair is (0,0), the spacer.
  The request is therefore carried inside the data.
- **Validity detection** (`scaffi_validity_detection`): one XOR per pair, then a balanced
  tree of C-elements. Its output rises only when every bit is valid, and falls only when
  every bit is back at the spacer. This output is the receiver's AR.
- **Dual to single** (`scaffi_dual_to_single`): one C-element per bit, fed with the true
  rail and the inverted false rail. It passes a valid bit, and through the spacer its
  inputs disagree, so it holds. The receiver takes the word after AR has already fallen,
  so this hold is needed.

AA still returns on a single wire. The ports, stretchers and island adapters are the same
as in the bundled channel.

Three choices here are this design's own:

- gating the encoder with AR;
- using C(t, ~f) as the converter cell;
- the tree shape of the validity detector.

The published design fixes only the structure: an encoder, n XORs with a C-element tree,
and a C-element per bit.

## GALS RSA core

`rsa_gals` splits modular exponentiation into two islands joined by one SCAFFI channel:

- **MX** (`rsa_modexp`, 72 MHz) is the sender. It runs left-to-right square-and-multiply
  over all 128 exponent bits. Each step is one channel transfer of two 128-bit operands.
- **MM** (`rsa_modmul`, 40 MHz) is the receiver. It computes a·b mod n by interleaved
  shift-and-add, one operand bit per clock. It reduces with two conditional subtractions,
  so a product takes 129 cycles.

The published core changes one thing in how the channel is used. MM toggles SA only
after the product sits in its result register. The bundle also carries a 128-bit result
bus back to MX. So the output port keeps MX's clock frozen for the whole multiplication.
When MX resumes, its first edge finds SA == SR and takes the product. MX spends exactly
two clock edges per product: one to issue it and one to collect it. In the full-size
test, MX's clock is frozen 99.3 % of the time. This is the source of the power saving
of the GALS version.

The modulus is not part of the channel bundle. It is a static input of MM and must be
held for the whole exponentiation. The base must be smaller than the modulus.

These are this design's own choices:

- the multiplication algorithm;
- square-and-multiply without skipping leading zeros;
- the way the modulus is delivered.

The published design fixes the 128-bit widths, the two islands and their clock
frequencies, and the rule that MM acknowledges after completion.

## Files

| module | role |
|--------|------|
| `scaffi_pkg` | widths (16-bit channel, 128-bit RSA), stretcher delays, clock frequencies, `d3_ps()` |
| `scaffi_output_port`, `scaffi_input_port` | the two burst-mode controllers |
| `scaffi_stretcher` | behavioural ring-oscillator clock with stretch request/acknowledge |
| `c_element` | Muller C-element (latch enabled when inputs agree) |
| `scaffi_data_production`, `scaffi_data_consumption` | island-side 2-phase adapters with valid/ready and accept |
| `scaffi_bundled` | complete bundled channel, 50 MHz sender, 78 MHz receiver |
| `scaffi_single_to_dual`, `scaffi_validity_detection`, `scaffi_dual_to_single` | dual-rail pieces |
| `scaffi_dual_rail` | complete dual-rail channel |
| `rsa_modmul`, `rsa_modexp`, `rsa_gals` | GALS RSA core |
| `scaffi_top` | bundled channel, dual-rail channel and RSA core side by side |

The valid/ready interface of the sender adapter and the `accept` input of the receiver
adapter are this design's own. They stand in for whatever logic an island would hold.

All reset inputs are asynchronous and active high. Hold reset until both stretchers have
produced a rising edge. The stretchers start by themselves at time 0.

## Simulating

Each testbench in `tb/` is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/scaffi_pkg.sv tb/tb_scaffi_top.sv --top-module tb_scaffi_top
./obj_dir/Vtb_scaffi_top +verilator+rand+reset+2
```

`tb_scaffi_top` runs the whole design at its default sizes, and takes about 15 s. It
covers these runs:

- 320 words with random gaps and back-pressure on the bundled channel, including a 1 µs
  refusal during which the sender clock must not move;
- 300 words on the dual-rail channel;
- a full 128-bit exponentiation of 198 products, checked against a 256-bit reference.

It also counts each mechanism and fails if any of them never occurs:

- sender stretch;
- receiver stretch at the high level and at the low level;
- a word held by back-pressure;
- a sender frozen by a refusing receiver;
- dual-rail valid and spacer phases;
- the MX clock frozen across a product.

In all channel tests, no island clock phase may ever be shorter than nominal, because a
stretch only lengthens a phase. The per-block testbenches cover these points:

- each port against its ten-state table;
- the stretcher's timing;
- the rail codes;
- the 129-cycle multiplier latency;
- the product count of the exponentiator.

The island adapters also carry two concurrent assertions, which run when a simulation is
built with assertions enabled (`--assert`):

- the sender keeps SR and the bus unchanged while a word is pending;
- the receiver never acknowledges while `accept` is low.

Lint tools will report some warnings, all intended:

- the combinational loops of the ports and handshakes;
- the C-element latch;
- delays in the stretcher model.

## What to trust, and where the model departs from the hardware

- **Functionally verified:** handshakes, state sequences, data integrity, back-pressure,
  the dual-rail codes, and RSA arithmetic.
- **Idealised timing:** the controllers and the dual-rail logic have zero delay. Only the
  stretcher has delays, and those are illustrative. The published latencies are FPGA
  measurements: 20.2 ns from request to data, a 20 ns sender stretch and a 5.5 ns
  receiver stretch. This model does not reproduce them and is not meant to. In the model,
  a word reaches the receiver's SR about 0.85 ns after the sender's SR. That is two
  stretcher acknowledge delays. The sender's stretch request lasts 9.8 ns on average.
  `tb_scaffi_bundled` prints both figures.
- **Not modelled:**
  - hazards and glitch filtering inside the stretcher (its D2 sizing rule);
  - the isochronic-fork placement of the hard macros;
  - any FPGA-specific layout.
- **Not included:**
  - the dual-rail register / asynchronous FIFO extension, which is only named in the
    published design;
  - the synchronous RSA used there as a comparison point.
- **Synthesis:** the controllers, the C-element, the adapters, the dual-rail logic and
  the RSA islands are synthesizable. An FPGA flow would have to place them as
  hand-constrained macros to keep the asynchronous parts safe. The stretcher must be
  replaced by a real delay-line macro.
