# Humanoid robot electronics: a star of daisy-chained FPGA limb modules

A humanoid robot has many joints spread over its limbs, and each joint needs a
fast local controller, local sensors and a link to a central computer. This
design gives every limb segment a small FPGA module and connects each limb
with one cable. The modules of a limb form a daisy chain. A central controller
sits at the centre of a star of such chains, one high-speed port per limb.

Once per communication period the central controller sends a single frame
down each chain. The frame carries one sub-frame per module. Each module:

- finds the sub-frame with its own ID;
- copies the payload (set-points, gains, LED states) into its shared memory;
- swaps in its own sensor data while the bytes stream through;
- passes the frame on with less than half a microsecond of delay.

The last module turns the frame around, and it travels back up the same cable
to the hub. One round trip therefore refreshes both directions for every
module on the chain.

The RTL covers three parts:

- the network: the 8b/10b link, the module's frame processor and the hub's frame engine;
- the limb module's datapath: encoders, velocity estimation, Butterworth filtering of sensor values, PID with PWM, space-vector PWM for a brushless motor, a watchdog, timers and a shared memory with its bus;
- a top level wiring 13 modules to a 6-port hub.

## Topology and clocking

```
             central_hub (6 ports)
   port 0 ── M(1) ── M(2)                    head / neck
   port 1 ── M(17) ── M(18) ── M(19)         left arm
   port 2 ── M(33) ── M(34) ── M(35)         right arm
   port 3 ── M(49)                           pelvis
   port 4 ── M(65) ── M(66)                  left leg
   port 5 ── M(81) ── M(82)                  right leg
```

- **Module IDs.** Module `j` of port `p` has ID `16p + j + 1` and fills sub-frame `j` of that port's frame.
- **Chain lengths** are set by the `CHAIN` parameter of `humanoid_net_top` (default `'{2,3,3,1,2,2}`).
- **Clock.** Everything runs on one clock of 200 MHz.
  - One clock is one bit on an LVDS line.
  - With 8b/10b coding one byte takes ten clocks, or 50 ns.
- **What is not modelled:** the clock recovery between boards, and the pads.
  - A line is a 1-bit signal in the RTL.
  - All modules share the simulation clock.

## The frame

The links carry 9-bit symbols `{k, d}` (`comm_pkg::sym_t`) coded as 8b/10b.
While a line is idle it carries the K28.5 comma, which keeps the receivers
word-aligned. A frame looks like this:

```
SOF  { SOSF  ID  TYPE  payload[len(TYPE)]  CHK  FLAG  EOSF } x n  EOF
K27.7  K23.7                                           K30.7     K29.7
```

- Each sub-frame adds **six bytes** to its payload. At 10 clocks per byte a sub-frame with payload `M` takes `(M + 6) × 10` clocks on the line.
- `TYPE[2:0]` selects the payload length: 0, 16, 50, 64, 128, 150, 250 or 256 bytes (`comm_pkg::type_len`).
- A TYPE with bit 7 set is invalid. The module answers it with the type-error flag and does not touch its memory.
- `CHK` is the 8-bit sum of ID, TYPE and the payload.
  - The hub computes it on the way out.
  - Each module checks it against the bytes it receives.
  - When the module swaps in its own payload, it writes the new sum.
- `FLAG` is 0 when the hub sends it. The addressed module ORs in:
  - bit 0, processed;
  - bit 1, checksum error;
  - bit 2, type error.

  The hub then knows for each module whether its sub-frame was seen and was clean.

## How a module forwards and rewrites a frame (`node_ctrl`)

This block is the heart of the design. It has two paths with different rules.

**Downstream (away from the hub).**

- The received symbols go into a small FIFO (`sym_fifo`, depth 8).
- The transmitter starts draining the FIFO only once **four symbols** are in it. From then on one symbol goes in and one comes out every ten clocks.
  - The four-symbol margin absorbs the phase difference between the receive deserializer and the transmit serializer.
  - It also gives room for the rewrite described below.
  - An assertion checks that the FIFO never overflows.
- Between the receiver and the FIFO sits a parser that follows the sub-frame fields.
- When a sub-frame's ID equals `my_id`, each payload byte goes through a three-step pipeline:
  1. The received byte is written to the receive area (byte address `RX_BASE + i`).
  2. The byte at the same index of the transmit area (`TX_BASE + i`) is read.
  3. That byte is pushed into the FIFO in place of the received one.
- The module also updates CHK and FLAG in flight as described above.
- At EOSF it pulses `rx_update`, or `rx_error` if the checksum or type was bad.

**Upstream (towards the hub).**

- Sub-frames coming back are not parsed. The line is re-timed by one flip-flop and passed through.
- The last module of a chain has `loopback` set: its upstream output is its own downstream output. A chain therefore needs no separate return cable.

The delay through one module is about 52 clocks (0.26 µs):

- 40 clocks are the four-symbol start threshold;
- the rest is the deserializer, decoder, pipeline, encoder and serializer.

## Frame timing

The round-trip time of a frame of `n` modules with payloads `M_i` follows:

```
t = t_fixed + Σ (M_i + 6) · 50 ns + n · t_hop
```

In this design `t_hop` ≈ 52 clocks and `t_fixed` ≈ 34 clocks (SOF, EOF and
the hub's own pipeline). The hub's `frame_cycles` output measures `t` in clocks
from `send` to the return of EOF. `busy` is high for the same interval and can
be used as a debug pin.

| Case | Simulated | Reference (measured on the original hardware) |
|---|---|---|
| 1 module × 50 B | 3.22 µs | 3.18 µs |
| 3 modules × 50 B | 9.34 µs | 9.32 µs |
| 3 modules × 150 B | 24.33 µs | 24.30 µs |
| 3 modules × 250 B | 39.34 µs | 39.30 µs |

All nine measured cases (1–3 modules × 50/150/250 B) agree to within 0.05 µs.

The reference timing model has a smaller per-module delay (0.186 µs) and a
larger fixed overhead (0.48 µs). Long chains therefore run slightly slower
here; for example, 50 modules × 256 B takes 667.9 µs against a model value of
about 664.7 µs.

For the full robot the six ports run in parallel. The longest chain is
3 × 150 B, which takes 24.3 µs, well inside the 1 ms communication period (the
interval timer `COMM_DIV`) and inside a 200 µs (5 kHz) period.

## The limb module (`fpga_module`)

Each module holds the following blocks.

**Network and memory**

- `node_ctrl` with its two links.
- `shared_mem`: 512 × 16-bit words, dual-port, byte enables.
  - Port A belongs to the network node. A 16-bit word holds payload bytes `2k` (low) and `2k+1` (high).
  - Port B is shared by three masters through `mem_bus`, a round-robin arbiter:
    - `sensor_writer` stores 14 sensor words at every control tick;
    - `param_reader` copies the 10 parameter words into registers at every control tick;
    - the soft CPU port `cpu_*` is brought out.

**Timers** (`tick_gen`), at a 200 MHz clock:

| Tick | Rate | Division |
|---|---|---|
| Control | 5 kHz | 40 000 |
| ADC strobe | 320 kHz | 625 |
| Temperature strobe | 50 Hz | 4 000 000 |

**Two axes, each with:**

- `quad_decoder`: 4× decoding of the motor encoder.
- `vel_est` (×2): velocity as the position difference per control tick, for the motor encoder and for the absolute encoder.
- `biquad` (×6): 2nd-order Butterworth low-pass filters.
  - For the torque and current ADC samples: 5 kHz cut-off at 320 kHz.
  - For the positions and velocities: 500 Hz cut-off at 5 kHz.
- `pid` followed by `pwm_gen`: sign-magnitude PWM with period 8192 clocks, i.e. 24.4 kHz. The PID runs once per PWM period.
- `svpwm`: space-vector PWM for the six MOSFET gates.
  - Centre-aligned 20 kHz carrier.
  - Min-max common-mode injection.
  - 0.5 µs dead time.
  - The voltage vector comes from an external current controller (ports `v_alpha`, `v_beta`).

**Watchdog**

- Each good sub-frame (`rx_update`) kicks it.
- After 5 ms without one it disables the PID/PWM and space-vector outputs.

**LEDs**

- 17 LEDs, set from the receive area.

### Memory map (16-bit words, `fpga_map_pkg`)

| Word | Direction | Content |
|---|---|---|
| 0, 1 | hub → module | position set-point, axis 0 / 1 (encoder counts) |
| 2 | hub → module | LED[15:0] |
| 3 | hub → module | bit 0 LED[16], bit 1 axis 0 enable, bit 2 axis 1 enable, bit 3 space-vector enable |
| 4–6, 7–9 | hub → module | kp, ki, kd of axis 0 / 1 (gain / 256) |
| 128 + 6a + 0..5 | module → hub | axis a: filtered encoder position, its velocity, absolute position, its velocity, torque, current |
| 140 | module → hub | status: bit 0 watchdog expired, bits 1–2 axis enabled |
| 141 | module → hub | count of received sub-frames |
| 256–511 | — | free for the soft CPU |

The network sees byte addresses: receive area `0..255`, transmit area `256..511`.

## The hub (`central_hub`, `hub_port`)

- `central_hub` has `N_PORTS` = 6 `hub_port` frame engines and an interval timer.
  - The processor starts frames with `host_send`.
  - Or it sets `auto_send`, and all ports send on every `comm_tick` (1 kHz).
- Each `hub_port` has a transmit buffer and a receive buffer of `N_SUB × 256` bytes. The processor reaches them through a byte port (`host_port`, `host_addr`).
- On the return path the port:
  - checks each sub-frame's ID and checksum (`ret_ok`);
  - keeps its FLAG byte (`ret_flag`);
  - stores the returned payload for the processor.
- The processor itself (scheduling, filtering, high-level control) is outside this RTL.

## Files

| File | Contents |
|---|---|
| `rtl/comm_pkg.sv` | symbol type, control codes, frame constants, payload length table, 8b/10b code tables |
| `rtl/fpga_map_pkg.sv` | module memory map and loop rates |
| `rtl/enc8b10b.sv`, `rtl/dec8b10b.sv` | 8b/10b encoder and decoder with running disparity and error flags |
| `rtl/serdes_tx.sv`, `rtl/serdes_rx.sv` | 10-bit serializer; deserializer with comma alignment |
| `rtl/link_tx.sv`, `rtl/link_rx.sv` | symbol-level link ends (idle insertion and removal, error count) |
| `rtl/sym_fifo.sv` | symbol FIFO of the forwarding path |
| `rtl/node_ctrl.sv` | module frame processor |
| `rtl/hub_port.sv`, `rtl/central_hub.sv` | hub frame engine and hub |
| `rtl/shared_mem.sv`, `rtl/mem_bus.sv`, `rtl/param_reader.sv`, `rtl/sensor_writer.sv` | shared memory and its masters |
| `rtl/tick_gen.sv`, `rtl/watchdog.sv` | timers |
| `rtl/quad_decoder.sv`, `rtl/vel_est.sv`, `rtl/biquad.sv` | sensor processing |
| `rtl/pid.sv`, `rtl/pwm_gen.sv`, `rtl/svpwm.sv` | motor control |
| `rtl/fpga_module.sv` | limb module |
| `rtl/humanoid_net_top.sv` | hub plus 13 modules |

Each file opens with a description of its interface and timing.

## Simulating

Every testbench in `tb/` checks itself. Each one ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog that stops a hung run. With
Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/comm_pkg.sv rtl/fpga_map_pkg.sv $(ls rtl/*.sv | grep -v _pkg) \
  tb/tb_humanoid_net_top.sv --top-module tb_humanoid_net_top -o sim
./obj_dir/sim
```

Which testbench covers what:

| Testbench | Covers |
|---|---|
| `tb_enc8b10b` | reference code words for both disparities; every byte and control code: disparity bound, run length, comma uniqueness |
| `tb_dec8b10b` | reference words, round trip through the encoder, corrupted words raising code or disparity errors |
| `tb_link` | serial link with idle gaps: order, alignment, ten-clock symbol spacing, a flipped line bit detected |
| `tb_node_ctrl` | 3-module chain with the hub port: payload swap, flags, checksums, 3-module frame times against the measured ones |
| `tb_frame_timing` | 1–50 modules × 0–256 B against measured times and the timing model (builds the hub port with `N_SUB = 50`) |
| `tb_shared_mem`, `tb_mem_bus`, `tb_watchdog`, `tb_tick_gen` | one block each |
| `tb_quad_decoder`, `tb_vel_est`, `tb_biquad`, `tb_pid`, `tb_pwm_gen`, `tb_svpwm` | one block each, against reference models written in the testbench |
| `tb_fpga_module` | one module driven by a frame master: parameters in, sensors out, PWM duty, LEDs, watchdog |
| `tb_central_hub` | the hub (3 ports) with each port looped back: frame return, checksums, frame time, start by the interval timer |
| `tb_humanoid_net_top` | the full top at its default parameters (13 modules, 6 ports), end to end; about 10 s of wall time |

`tb_humanoid_net_top` counts each mechanism and fails if one never happens:

- frames, including one started by the timer;
- processed sub-frames and updates, plus a type-error sub-frame;
- LED updates and sensor read-back;
- PWM and gate activity;
- frame-time checks.

The biquad coefficients are Q24 values computed with the bilinear transform:
`K = tan(π fc / fs)`, `norm = 1 / (1 + √2 K + K²)`, `b0 = K² norm`,
`b1 = 2 b0`, `a1 = 2 (K² − 1) norm`, `a2 = (1 − √2 K + K²) norm`. `b1` is
adjusted by one LSB so that the DC gain is exactly 1.

## Where this design departs from the original system, or fills gaps

**Frame layout and coding**

- The order of the sub-frame fields, the control codes, the checksum and the flag bits are this design's choices. What is given is that a sub-frame holds an ID, a data type that fixes its length, the data, and a flag that reports processing and errors. Six overhead bytes per sub-frame is also given.

**Link and hub**

- **Hub ports:** six ports. One drawing of the hub shows five communication ports, but the text gives six.
- **Link model:** the link is synchronous to one shared clock. Real boards would need clock recovery or oversampling.
- **Chain length:** a hub port serves at most `N_SUB` = 4 modules per frame. Longer chains need a larger `N_SUB`.

**Timing**

- **Per-module delay:** 0.26 µs instead of the 0.186 µs measured on the original system. The four-byte forwarding buffer alone is 0.2 µs at 200 Mb/s.

**Limb module contents**

- **Module contents:** the sensor and actuator chain (filters, PID, PWM, space-vector stage, watchdog) follows the described rates. The following are this design's own choices:
  - the filter order and cut-offs;
  - the PID number formats;
  - the PWM period of 8192 clocks;
  - the dead time;
  - what the watchdog stops;
  - the memory map.
- **PID inputs:** the PID uses only the position set-point. Velocity set-points are not used.
- **Axes per module:** a module has two axes, the configuration of the high-current joint board. The original system also ran six position loops on one module for a pair of camera eyes. Here that takes three modules.

**Not built here** (their signals are brought out as ports where they meet the design):

- the soft CPU and its C controllers;
- the field-oriented current controller;
- the serial interfaces to the absolute encoder, the ADC, the IMU and the temperature sensor. Their sample strobes are generated;
- the 10BASE-T UDP Ethernet controller;
- the hub's ARM processors;
- flash, power and pads.
