# Event-based wireless sensor node in hardwired logic

This is the control logic of a battery-powered wireless sensor node for
event-based control loops. It has no processor or soft core. The node samples
a sensor at a fixed period and filters each sample. It transmits only when the
filtered value has moved far enough from the last value it sent. This rule is
called *send on delta*. Transmissions go out in the node's own slot of a time
division (TDMA) schedule. The node keeps its local clock aligned with the
network master.

The logic is split by how often it must run:

* A **low-power section** runs all the time on a ~32 kHz clock. It holds the
  sampling, filtering and event logic, and the supervisor that keeps time.
* A **high-power section** runs on a clock in the MHz range. It drives the
  radio chip (a TI CC2520, IEEE 802.15.4). Its clock is gated off, and the radio
  is powered down, except while a frame is sent or received.

The design follows the architecture of *"A Low Energy FPGA Platform for
Real-Time Event-Based Control"*. That description gives the partition, the
roles of the blocks, the filter equation, the send-on-delta rule and the
structure of the one-bit datapath. Everything it leaves open was chosen here:
widths of counters, timing, handshakes, frame layouts and the radio's command
contents. Each such choice is listed in the section on choices below, and at
the top of each RTL file.

```
            low-power section (clk_slow, 32.768 kHz)        high-power section (clk_fast, gated)
  ADC  <-SPI->  sensor_event_unit  --dout/event-->  node_supervisor  --hp_en/cmd/slot_go-->  trx_manager  <-SPI, STXON, SFD->  CC2520
                 (FSM + evgen_datapath)             (time, TDMA, sync)  <--done/rx_time--     (FSM + trx_cmd_rom + spi_master)
```

## Files

| file | what it is |
|---|---|
| `rtl/wsn_pkg.sv` | shared types: datapath select encodings, job command, ROM word, CC2520 opcodes, frame sizes |
| `rtl/evgen_datapath.sv` | one-bit-wide datapath: four 16-bit shift registers, serial adder, carry flip-flop |
| `rtl/sensor_event_unit.sv` | sensor manager and event trigger: one FSM that sequences the datapath |
| `rtl/node_supervisor.sv` | sampling period, local clock and timestamps, TDMA slot, synchronisation, wake-up |
| `rtl/trx_manager.sv` | radio power-up, command sequences, frame transfer, send-packet and start-of-frame lines |
| `rtl/trx_cmd_rom.sv` | ROM of CC2520 command sequences (INIT, TX, RX) |
| `rtl/spi_master.sv` | byte SPI master for the radio |
| `rtl/clock_gate.sv` | latch-based clock gate for the high-power section |
| `rtl/sync_2ff.sv` | two-flip-flop synchroniser |
| `rtl/wsn_node_top.sv` | top level |
| `tb/adc_model.sv`, `tb/cc2520_model.sv` | behavioural models of the two external chips (testbenches only) |
| `tb/tb_*.sv` | self-checking testbenches, one per block, plus two for the top and one closed-loop workload |

## The one-bit datapath

The sampling unit uses a datapath only one bit wide, to keep area and power
small. This is the least obvious part of the design. `evgen_datapath`
has four 16-bit registers:

| register | holds |
|---|---|
| R0 | working register: raw ADC sample, then intermediate results |
| R1 | filter output of the previous step, x(k-1) |
| R2 | filter output at the last event, x_le |
| R3 | send-on-delta threshold (loaded in parallel with `thr_load`) |

Each register is a right-shifting shift register. Its bit 0 is its serial
output. When it shifts, its new bit 15 is either its own bit 0 (so it rotates)
or the write-back bit, if the write-back demultiplexer picks it as
destination. One adder bit serves all arithmetic:

```
  A   = R0[0] or 0
  B   = R0[0] / R1[0] / R2[0] / R3[0], optionally inverted
  cin = carry flip-flop, or constant 0 / 1 (used in the first clock of a pass)
  sum, cout = full adder(A, B, cin);   carry flip-flop <= cout
  write-back bit = sum, serial input din (ADC data), or 0
```

A **pass** is 16 clocks with all four registers shifting. It computes
`dst = A + (B or ~B) + c0` least significant bit first, where `c0` is the
first carry-in. Every register that is not the destination rotates once
round and ends where it started. The sign of the result is the `sum` bit of
the 16th clock, which the controller captures. Two operations shift R0 on
its own:

* **serial load**: one clock per ADC bit with write-back = `din`;
* **right shift by one**: one clock with write-back = 0 (a logical shift).

### Sequence of one sampling step

`sensor_event_unit` runs this fixed program for every step (clocks are slow-clock cycles):

| phase | datapath operation | clocks |
|---|---|---|
| ADC read | CSn low; ADC_LEAD conversion clocks with the command on MOSI, then ADC_BITS data bits into R0 | 2·(ADC_LEAD+ADC_BITS) |
| pad | R0 filled with zeros: u(k), zero-extended | 16−ADC_BITS |
| filter, ALPHA_SHIFT times | R0 ← R0 + R1, then R0 ← R0 >> 1 | 17 each |
| (first step only, instead) | R1 ← R0 (x(0) = u(0)) | 16 |
| store | R1 ← R0 | 16 |
| delta | R0 ← R0 − R2, sign captured | 16 |
| absolute value, if negative | R0 ← −R0 | 16 |
| compare | R0 + ~R3 (= \|Δ\| − threshold − 1), no write-back; sign clear means event | 16 |
| on event | R2 ← R1; R0 ← R1; R0 shifted out on `dout` with `dout_valid` | 48 |

At the defaults (12-bit ADC, 3 lead clocks, α = 1/8), a step takes 133 clocks
with no event and up to 197 with one, plus 2 clocks of handshake. That is about
6 ms at 32.768 kHz, well inside the 100 ms sampling period.

**Why the filter works with only adds and shifts.** The filter is
x(k) = (1−α)·x(k−1) + α·u(k) with α = 2^−n. Start from t = u(k) and repeat
t ← (t + x(k−1))/2 n times. The result is 2^−n·u(k) + (1−2^−n)·x(k−1), the
filter equation. Each halving truncates, so the output can sit up to a few
LSBs below the exact value. The testbenches check the RTL against this
truncating arithmetic.

**Why the right shift may be logical.** The registers hold two's complement
values. But the ADC sample is zero-extended, so every value that gets halved
is non-negative and below 2^13. Writing 0 into the top bit is then the same as
an arithmetic shift. For the same reason the subtraction and the comparison
cannot overflow. ADC_BITS must stay at 15 or below.

## Supervisor: time, slots and synchronisation

`node_supervisor` owns a 32-bit `local_time` that counts slow-clock ticks.

* **Sampling**: every `PERIOD_TICKS` ticks it starts a step. It stamps the step
  with the local time of that moment.
* **Pending sample**: an event stores the shifted-out sample and its
  timestamp. A newer event overwrites a sample still waiting for its slot.
* **TDMA**: the frame phase is `local_time mod 2^FRAME_LOG2`. With a sample
  pending, the supervisor wakes the high-power section `WAKE_LEAD` ticks before
  its slot (phase `SLOT_OFFSET`) with a TX job. It raises `slot_go` when the slot
  starts. It puts the section back to sleep when the job reports done, or after
  `TX_ABORT` ticks.
* **Synchronisation**: every `SYNC_TICKS` ticks (60 s by default), and once
  right after reset, it opens a receive window `WAKE_LEAD` ticks before frame
  phase 0. It latches `local_time` on the rising edge of the radio's SFD line.
  The RX job returns the master time t_m carried by the frame. The supervisor
  then sets the clock so that the SFD instant reads t_m
  (`local_time += t_m − t_sfd`). This also aligns the TDMA frame. If no frame
  arrives within `WAKE_LEAD + RX_WINDOW` ticks, the window closes. The sync
  stays due and is retried in the next frame.

The SFD line is sampled by the slow clock through a synchroniser. After
synchronisation the node therefore runs 2–3 ticks (≈ 60–90 µs) behind the
master's SFD timestamp. For the same reason an SFD pulse must last at least
two slow ticks. Any 802.15.4 frame of six bytes or more meets this.

## Transceiver manager and command ROM

Each time the section wakes up, `trx_manager` starts again from reset and
runs one job:

1. Enable the radio's regulator. Wait `T_VREG`, release RESETn, wait `T_OSC`.
2. Play the INIT sequence from `trx_cmd_rom`: crystal oscillator on, then the
   register settings.
3. Play the job's own sequence: for TX, flush the TX buffer; for RX, flush the
   RX buffer and turn the receiver on.
4. **TX**: write the frame with one TXBUF instruction. Wait for `slot_go`,
   then pulse the dedicated send-packet line (STXON) for `STXON_W` clocks. Wait
   for SFD to rise and fall, which marks the end of transmission. Report done.
   **RX**: wait for SFD to rise and fall, which marks a received frame. Read
   the length and the 32-bit master time with RXBUF. Report done, with `rx_ok`
   if the length matched.

Sending and frame detection use dedicated pins instead of SPI commands. This
keeps their timing tight, which the TDMA schedule needs.

Each ROM word is `{last_of_instr, last_of_seq, byte}`. CSn rises after every
`last_of_instr` byte. Frame layouts (after the length byte; the radio appends
a 2-byte FCS):

| frame | payload |
|---|---|
| event (TX) | node id (8) · timestamp (32) · filtered sample (16), most significant byte first |
| sync (RX) | master time (32), most significant byte first |

## Clocks, gating and crossings

* `hp_en` from the supervisor passes through a two-flip-flop synchroniser.
  That synchroniser runs on the free-running fast clock, the only logic there
  that is never gated. Its output both enables `clock_gate` and releases the
  manager's asynchronous reset. So every sleep stops the manager's clock and
  resets it, which also powers the radio down, since `vreg_en` resets to 0.
* The job inputs (`hp_cmd`, `tx_time`, `tx_sample`, `node_id`) are held
  stable while `hp_en` is high. An assertion in the supervisor checks this.
* `done`, `rx_ok` and SFD return through synchronisers in the supervisor.
  `rx_time` is stable by the time `done` has been synchronised.
* The clock gate is a latch that is transparent while the clock is low,
  followed by an AND gate. The latch is intended.

## Parameters (top level defaults)

| parameter | default | meaning |
|---|---|---|
| ADC_BITS / ADC_LEAD / ADC_CMD | 12 / 3 / 8'h06 | ADC resolution, conversion clocks before data, command bits sent during them |
| ALPHA_SHIFT | 3 | filter coefficient α = 2^−3 |
| PERIOD_TICKS | 3277 | sampling period (≈ 100 ms) |
| FRAME_LOG2 / SLOT_OFFSET | 12 / 1024 | TDMA frame of 4096 ticks (125 ms), node slot at phase 1024 |
| WAKE_LEAD / TX_ABORT / RX_WINDOW | 64 / 256 / 64 | wake-up lead, TX job time limit, receive window (ticks) |
| SYNC_TICKS | 1966080 | synchronisation interval (60 s) |
| T_VREG / T_OSC | 800 / 2400 | radio power-up waits in fast clocks (100 µs / 300 µs at 8 MHz) |

The datapath width (16 bits), the ~32 kHz and MHz clocks and the 60 s
synchronisation interval come from the original description. All other
values are chosen here.

## Choices made here, and how far to trust them

* **Radio command contents.** The INIT sequence uses commonly published
  CC2520 register settings: TXPOWER, CCACTRL0, MDMCTRL0/1, RXCTRL, FSCTRL,
  FSCAL1, AGCCTRL1, ADCTEST0–2, and channel 26 in FREQCTRL. The original
  description does not list any of them. The opcodes and values should be
  checked against the CC2520 datasheet before hardware use. The GPIOs that
  carry STXON and SFD are assumed to be configured for that already. No GPIO
  setup is sent.
* **ADC interface.** The ADC type is unspecified. The RTL assumes a serial ADC
  that returns data least significant bit first, after a few clocks that run
  the conversion and carry a command. A real part may need a different
  framing.
* **Reference for the change.** One passage of the original description
  measures the change against the previous step's sample. The detailed
  datapath description measures it against x_le, the value at the last
  event. This design uses x_le, which is the usual send-on-delta rule.
  "Exceeds the threshold" is taken as strictly greater.
* **First step.** The filter state starts at the first sample. x_le starts at
  0, so the first step after reset normally fires an event.
* **Synchronisation.** The original description refers to an external
  synchronisation scheme and does not describe it. It even calls network
  synchronisation future work in one place. The correction rule here is the
  simplest one that fits its stated role: it sets the clock and does not
  estimate drift.
* **Figure-level details.** The original datapath drawing shows no register
  enables. The per-register shift enables are added here so that R0 can take
  ADC bits and be shifted on its own.
* **Not modelled.** The sensor, ADC and radio are external chips. Their
  behavioural models in `tb/` cover only what the controller uses.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. To build one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb -Irtl -Itb rtl/wsn_pkg.sv tb/tb_wsn_node_top.sv \
  --top-module tb_wsn_node_top -o sim && ./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_evgen_datapath` | random add, subtract, negate, compare and shift passes against integer arithmetic |
| `tb_sensor_event_unit` | 200 steps against a model of the filter and event rule; events, signs, output sample, clocks per step, ADC command |
| `tb_node_supervisor` | period, first sync and clock correction, TX wake and slot timing, abort, replaced sample, RX timeout |
| `tb_trx_manager` | power-up order, INIT register values, TX frame and slot wait, RX of a master time, against the CC2520 model |
| `tb_trx_cmd_rom`, `tb_spi_master`, `tb_clock_gate` | ROM contents, SPI bytes and timing, glitch-free gating |
| `tb_wsn_node_top` | whole node with shortened timing over 40 000 ticks. Counts events, non-events, negative changes, replaced samples, frames, a lost frame ended by the abort, syncs and a missed sync, sleep/wake cycles. Checks the frames' contents, the slot position and the clock against the master. |
| `tb_pt326_loop` | 100 s closed loop at the default node settings (fast clock 2 MHz). A first-order thermal process (time constant 2 s) takes a blower-speed disturbance at 10 s, removed at 60 s. The node samples it through the ADC model, and a PI controller in the testbench's master acts on each received frame. Checks that the loop rejects both steps and that frames are few: about 50 frames for 1000 samples with a 0.2 °C threshold. Takes about 1.5 min of host time. |
| `tb_wsn_node_full` | whole node at the default parameters: first sync, first event, frame sent in the slot, radio powered down again (≈ 1.5 s of host time) |

The simulator is two-state, and flip-flops start at random values until reset
takes effect. The testbenches pass from random initial states.
