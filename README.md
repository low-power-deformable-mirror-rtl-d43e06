# Low-power deformable-mirror actuator controller

A deformable mirror for adaptive optics is shaped by thousands of small
electromagnetic actuators. Each actuator is a coil in an H-bridge. Its force is
set by pulse-width modulation (PWM) of the bridge switches at about 61 kHz,
with 16-bit resolution. One controller serves 61 actuators. It receives new
setpoints over a 40 Mbit/s serial LVDS link and must apply each one well within
2 µs.

With thousands of actuators, the controllers' own power matters. This design
is the low-power form of such a controller. It rests on three ideas:

* **Local clocks instead of one fast clock.** The serial transceiver runs at
  200 MHz, the packet handler at 100 MHz and the PWM logic on its own clock.
  Handshake channels ("passivators") join the domains. Each part runs only as
  fast as it needs to.
* **No packet memory.** Received data goes straight on to the actuator
  registers, word by word. The master holds no packet buffer at all.
* **Recursive counting.** The PWM counter is a ripple chain of toggle
  flip-flops whose bit 0 is the clock itself. It advances on both clock edges,
  so the PWM logic needs 62.5 MHz instead of 125 MHz for the same 16.384 µs
  period, and only its first stage sees the full clock rate.

The top module is `actuator_controller`. All shared types and constants are in
`dmac_pkg`.

```
 lvds_rxd  ──►  dmac_lvds_trans  ══ passivators ══►  dmac_packet
 lvds_txd  ◄──  (200 MHz)        ◄═════════════════  (100 MHz)
 lvds_txen ◄──                                          ║   ▲
                                           passivator   ▼   ║  passivator
                 ┌─────────── dmac_async_slave (clk_slave) ──────────┐
                 │ dmac_decoder ──► dmac_pwm_tree                    │
                 │                  21 × dmac_hub ──► 61 × dmac_cell │──► pwm_a0/a1/c0/c1/b [60:0]
                 │ PWM counter ──────────────────────► (all cells)   │
                 └───────────────────────────────────────────────────┘
```

## The PWM signals of one actuator

Each actuator has five outputs. A0/A1 switch one leg of the H-bridge and C0/C1
the other. B drives one coil terminal through a resistor.

* The 16-bit setpoint splits into v = setpoint[15:4] (12 bits) and the low
  nibble setpoint[3:0].
* The two legs make a **three-level** PWM from v over a period of 2048 counts:

  ```
  A0 = (count < dutyA)   dutyA = min(ceil(v/2), 2047)
  C0 = (count < dutyC)   dutyC = 2047 - floor(v/2)
  A1 = ~A0, C1 = ~C0
  ```

  The coil sees +V while A0 is high and C0 low, -V in the opposite case, and
  0 V otherwise. The mean is (dutyA - dutyC)/2048 = (v - 2047)/2048 of the
  supply. Splitting v over two 11-bit comparators gives 12 bits of resolution
  from an 11-bit counter.
* A1 and C1 are the complements of A0 and C0. That makes a shoot-through
  (both switches of one leg closed) impossible by construction, and
  `dmac_cell` asserts it.
* **B** carries the four least significant bits. It is high while
  count[10:7] < setpoint[3:0], i.e. for setpoint[3:0] × 128 of the 2048
  counts. Through its resistor it adds a small current, so the fine bits need
  no faster clock.
* v = 4095 saturates at dutyA = 2047 (one count short of full scale). This is
  far outside the 37.5–62.5 % duty range an actuator uses.
* The reset setpoint 0x8000 gives v = 2048, within one 12-bit step of 0 V
  (dutyA = 1024, dutyC = 1023). With the cell enable or the global
  enable off, all four switches are open and B is low.

## PWM generation: three interchangeable kinds

`PWM_KIND` (type `dmac_pkg::pwm_kind_e`) chooses how `count < duty` is made.
All three kinds give the same waveforms and the same period.

| kind | counter | comparator | `clk_slave` |
|---|---|---|---|
| `PWM_SYNC` | `dmac_counter`, 11-bit binary, one per slave | registered `<` in every cell | 125 MHz |
| `PWM_REC_COUNTER` (default) | `dmac_rec_counter`, one per slave | combinational `<` in every cell | 62.5 MHz |
| `PWM_REC_UNIT` | none shared; a divider in every unit | `dmac_pwm_rec` bit chain, three per cell | 62.5 MHz |

**Recursive counter (`dmac_rec_counter`).**
* Bit 0 is the clock itself. Bit i (i ≥ 1) is a flip-flop that toggles on the
  rising edge of bit i-1, so each stage halves the frequency.
* The raw vector {div, clk} counts down, once per clock edge. Inverting it,
  `n = ~{div, clk}`, gives an up-count that advances on every edge, rising and
  falling. That is 2048 steps in 1024 clock cycles.
* The stages switch one flip-flop delay after each other, so for a moment
  after an edge the count may show wrong values. The outputs that follow it
  can therefore have short glitches. This is inherent to the method and
  accepted. Simulation shows it as zero-width pulses at clock edges. The
  testbenches sample in the middle of each half period.

**Recursive PWM unit (`dmac_pwm_rec`).** This builds the comparison into the
counter bits themselves. With c = {div, clk} (the inverted count) and
setpoint s, a chain of one-bit modules computes

```
p[0] = c[0] & s[0]
p[i] = ((c[i] & s[i]) | p[i-1]) & (c[i] | s[i])    = majority(c[i], s[i], p[i-1])
```

This is the carry chain of c + s. Since c = 2^11 - 1 - n, the final carry is
set exactly when n < s. So the last bit module's output is the PWM signal, and
no separate comparator or shared counter is needed. A cell of this kind holds
three such units, for A, C and B.

Choosing the recursive counter as the default follows the finding that it
gives the largest power saving of the measured variants. It is shared by all
cells, and the combinational comparators that follow it are cheap.

## Master: transceiver, packet handler, passivators

**Line format (`dmac_lvds_trans`, 200 MHz).**
* Each 16-bit word travels as an 18-bit frame: start bit 0, 16 data bits LSB
  first, stop bit 1. A bit lasts 25 ns, which is 5 clocks at 200 MHz.
* The receiver synchronizes the line, finds the start edge and samples each
  bit in its middle.
* A **pause** separates packets. When the line has been high for 18 bit times
  (one more than a data frame can produce), a pause indication is sent to the
  packet handler, once per idle stretch.
* The transmitter sends reply words in the same format. `lvds_txen`, the
  enable of the line driver, is high only while reply frames are on the line,
  so several controllers can share one return line.

**Packets (`dmac_packet`, 100 MHz).** After a pause, the first word is the
header {module id, command}. The rest of the packet is forwarded without
buffering:

| command | code | words after the header |
|---|---|---|
| WRITE | 0x01 | address, data, checksum |
| BURST_WRITE | 0x02 | start address, count, `count` data words, checksum |
| READ | 0x03 | address, checksum |

* The checksum is the 16-bit sum of all earlier words of the packet.
* Data words are passed on before the checksum arrives. A wrong checksum
  cannot stop them and only pulses `csum_err`.
* Packets for other module ids are skipped up to the next pause. Id 0xFF is a
  broadcast that every controller obeys.
* A READ is answered with the packet {module id, 0x83}, data, checksum.

**Passivators (`dmac_passivator`).** A passivator joins two handshake ports in
different clock domains. A transfer completes when both sides have requested
it: first on the receiver's side, then on the sender's.
* This implementation crosses a request toggle one way and an acknowledge
  toggle back, each through two flip-flops.
* The data wires are not synchronized. The sender holds them stable until its
  transfer completes, and an assertion checks this. That is why a
  passivator's data output is a plain wire from its input.
* Three passivators sit inside the master: received words, pauses, and reply
  words.
* Two more sit between master and slave: commands down, read data up.

## Slave: decoder and PWM tree

**Slave registers (`dmac_decoder`).** The 8-bit slave address selects:

| address | register |
|---|---|
| `00iiiiii` | setpoint of cell i (16 bits, reset 0x8000) |
| `01iiiiii` | control of cell i, bit 0 = enable (reset 0) |
| `0x80` | global control, bit 0 = PWM enable (reset 0) |
| `0x81` | number of cells (read only, 61) |

Cells 61–63 do not exist: writes to them are dropped and reads return 0. A
read of a cell waits for the answer to climb back up the tree, so only one
read is ever in flight.

**Tree (`dmac_pwm_tree`, `dmac_hub`).**
* The 61 cells sit at the leaves of a tree with branching factor 4 and
  depth 3: 1 + 4 + 16 = 21 hubs and 64 leaves.
* Each hub registers one command and steers it by two bits of the cell index:
  [5:4] at the root, then [3:2], then [1:0].
* Read answers are OR-merged and registered on the way up.
* A write accepted by the root reaches its cell register 4 slave clocks later.
  A read answer leaves the root 7 clocks after acceptance.
* The tree keeps every wire short and every fan-out at 4, instead of one bus
  to 61 cells.

## Timing

| quantity | value |
|---|---|
| PWM period | 2048 counts = 16.384 µs (2048 × 8 ns, or 1024 × 16 ns on both edges) |
| serial word | 18 bits × 25 ns = 450 ns |
| setpoint latency | 150 ns in simulation, from the end of the data word's stop bit to the cell register (requirement: < 2 µs) |
| burst rate | one setpoint per 450 ns word, no back-pressure on the line |

A setpoint takes effect at once, inside the running PWM period.

## Where this design departs from the original controller

* **Serial protocol and register map.** The original controller uses an
  externally defined link protocol. The packet format, command codes,
  checksum rule, broadcast id and register addresses here are this design's
  own, so it will not talk to existing host software unchanged.
* **Handshake circuits in RTL.** The original is written as handshake
  circuits. Here every process is clocked RTL, and every channel is
  valid/ready. The passivator is built from toggle synchronizers.
* **Configurations.** Only the configuration with the most savings is built:
  the two-clock asynchronous master with a single tree-based slave for all 61
  actuators. The slave's PWM kind is a parameter, so the synchronous and
  recursive-unit variants are available too. The earlier master with a packet
  RAM and the two-slave layout are not built.
* **Outside the RTL.** Clock generation (the FPGA's clock managers), the LVDS
  converter chips, the H-bridges, the Ethernet-to-LVDS bridge and any coil
  check are not part of the RTL. The three clocks are inputs of the top.
* **One link.** The original board has a second serial link and a few
  further outputs whose use is not described. Only one link is built, and
  the receiver enable of the converter chip is left to the board.
* **Receiver choices.** Mid-bit sampling, dropping of frames with a bad stop
  bit, and dropping of a word that the packet handler has not taken in time
  are choices made here.

## How far it can be trusted

* Every module has a self-checking testbench in `tb/`, and each testbench has
  been shown to catch a deliberately introduced fault.
* `tb_actuator_controller` runs the full-size top with its default parameters
  end to end, over the serial line:
  * burst writes of all setpoints and enables, then one full PWM period of
    all 305 outputs compared with duty values computed in the testbench;
  * the latency check;
  * reads decoded from the transmit line;
  * skipped, broadcast, bad-checksum and missing-cell packets;
  * global disable.
* `tb_actuator_controller_kinds` runs two full-size tops side by side, one
  with `PWM_SYNC` on 125 MHz and one with `PWM_REC_UNIT` on 62.5 MHz. It checks
  random setpoints over the full 16-bit range, the extreme setpoints, and
  a measured period of 16.384 µs for both.
* The recursive kinds use ripple clocks and combinational outputs from them.
  They need FPGA timing constraints for generated clocks, and their glitches
  should be checked on hardware. Simulation cannot show gate-level glitches.
* Nothing here has been synthesized for an FPGA or measured for power.

## Simulating

Verilator 5 with timing support is enough. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/dmac_pkg.sv tb/tb_actuator_controller.sv --top-module tb_actuator_controller
./obj_dir/Vtb_actuator_controller
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`.
Replace the testbench name to run another one. The block testbenches run in
well under a second. The full-size runs take 10–20 s.

Starting points for changes:
* cell count: `NUM_CELLS` (at most 64 with the default tree);
* PWM variant: `PWM_KIND`, together with the matching `clk_slave`;
* module id: `MODULE_ID`;
* widths, addresses and command codes: `rtl/dmac_pkg.sv`.
