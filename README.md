# Brain-ASNET SoC: a TDMA wireless network chip for neural recording implants

A few small implants, each recording four neural channels, share one radio
link to a coordinator outside the body. One chip serves both ends of the
link. The `M_Sbar` pin makes it a **sensor node** (it samples, packetizes and
transmits) or the **coordinator** (it sends beacons, receives packets and
talks to a host computer). The network is a star with time-division access:

* The coordinator opens every time frame with a beacon.
* Each sensor answers in a slot chosen by its 3-bit hardware address.
* The frame rate is also the sampling rate. Every sensor converts each of its
  channels once per frame and sends those four bytes in the same frame.

At the default clock (44 MHz crystal divided by 16, so 2.75 Mb/s with one bit
per clock) a 317-bit frame repeats at 8.675 kHz. That is the per-channel
sampling rate. Dividing by 32 halves everything, to 4.338 kS/s.

This repository holds the digital part of that chip in synthesizable
SystemVerilog:

* the network control unit (NCU);
* the ADC's successive-approximation logic and channel sequencer;
* clock generation;
* the coordinator's host interface;
* a top level that wires them together.

It also has a behavioural model of the OOK transmitter's ring-oscillator
multiplier. The analog parts are not here: RF receiver, crystal oscillator,
power-on reset, capacitive DAC, comparator, analog multiplexer and neural
amplifiers. Their signals are ports of the top level.

## The time frame

```
bit time  0            57           122          187          252         316
          | beacon     | slot 0     | slot 1     | slot 2     | slot 3     |
          | 57 bits    | 65 bits    | 65 bits    | 65 bits    | 65 bits    |
```

Every packet is a SYNC pattern followed by bytes, each byte followed by a
stuffed `0`:

| packet | SYNC | bytes (each + stuffed 0) | length |
|---|---|---|---|
| beacon (coordinator) | `0111_1111_1110` (12 bits) | 4 × {address[2:0], config[4:0]}, CRC-8 | 12 + 5·9 = 57 |
| sensor | `011_1111_1110` (11 bits) | {address[2:0], config[4:0]}, 4 samples (channel 0 first), CRC-8 | 11 + 6·9 = 65 |

This is a cut-down HDLC. Because a zero follows every byte, the data can never
hold more than eight ones in a row. The nine-ones sensor SYNC and the ten-ones
beacon SYNC can therefore not appear inside a packet, and they cannot be
mistaken for each other. A sensor hunting for a beacon simply ignores the
other sensors' packets. The CRC-8 covers the bytes after the SYNC, without the
stuffed bits:

* polynomial x⁸+x⁷+x⁶+x⁴+x²+1 (0xD5);
* initial value 0;
* MSB first, as all bytes are sent.

A receiver rejects a packet whose CRC or any stuffed bit is wrong. There is no
retransmission; the bad packet is simply lost.

The SYNC bit patterns, the polynomial and the beacon layout (one
{address, configuration} byte per slot) are this design's choices. They fit a
317-bit frame made of a beacon and four sensor packets of one
address/configuration byte plus one byte per channel. All of them are in
`brain_asnet_pkg.sv`.

## How the nodes stay aligned

This is the part that needs the most care.

**No clock recovery.** Every chip makes its bit clock from its own 44 MHz
crystal. A receiver samples the incoming bit stream once per system clock.
Crystal tolerance moves a bit by far less than one bit time over one 317-bit
frame, so the only thing a receiver needs is the bit phase of the frame. It
gets that from the SYNC pattern, once per frame. Any constant sub-bit phase
offset between two chips is harmless, because the receiver samples the bit
wherever it falls within its clock period. In the test bench every chip has
its own crystal clock, phase-shifted by a fraction of a period, and the chips
leave reset at different times. Their divided clocks therefore run at
arbitrary phases to each other.

**The frame timer** (`ncu_timer`) is a 9-bit bit-time counter that runs
0…316.

* In the coordinator it runs freely. Bit time 0 starts the beacon.
* In a sensor it is reloaded when the depacketizer reports the beacon SYNC.
  The SYNC is recognised in the cycle after its last bit has entered the
  receiver's input register, and the sender had launched bit 0 one register
  stage earlier. The counter is therefore loaded with 12 + 2 = 14. With that
  value the sensor's count equals the coordinator's.
* `slot_start` is high while the counter holds `57 + 65·address`, the first
  bit time of the sensor's slot. `frame_start` is high at count 0. The
  packetizer's first bit leaves one clock later. Beacon and sensor packets
  share that offset, so the slots stay back to back.
* A slot is used only if the sensor has converted a full set of samples since
  it gained sync. This keeps an empty buffer off the air.
* Each frame without a beacon increments a miss counter. After `WDT_FRAMES`
  (default 3) misses in a row the sensor drops sync (`wdt_expired` pulses). It
  stops transmitting and goes back to hunting for the beacon.
* A beacon that arrives while the sensor is in sync realigns the counter
  again. Small drifts are therefore corrected every frame.
* Realignment uses the SYNC pattern alone, before the CRC is known. A beacon
  with a bit error still keeps the sensor on time. Only its configuration
  bytes are thrown away.

**Transceiver duty cycling.** Once a sensor is in sync it knows when anything
meant for it can arrive. The top level therefore drives two power enables:

* `rx_en` is high only for bit times 1…57, while the beacon is on the air;
* `tx_en` is high only while the sensor's own packet is being sent.

That puts the receiver on 18 % and the transmitter on 20.5 % of the time. The
ADC works 40 of the 317 bit times, 12.6 %. A sensor out of sync keeps its
receiver on all the time. The coordinator listens whenever it is not sending
the beacon. The NCU sees 0s while `rx_en` is low. A window placed even one bit
wrong would therefore cut the beacon's CRC and the sensor would lose sync. The
receiver's wake-up time is not modelled. A real receiver that needs settling
time would need `rx_en` raised a few bit times early.

**Packetizer and depacketizer** (`ncu_packetizer`, `ncu_depacketizer`) are
each one module for both roles. The `master` input selects the beacon or the
sensor SYNC.

* The packetizer loads up to 40 bits of fields on `start` and sends the SYNC,
  the bytes with their stuffed zeros and the CRC. It holds `busy` until the
  last bit has gone.
* The depacketizer keeps a 12-bit shift register of the line. In a coordinator
  it hunts the sensor SYNC; in a sensor it hunts the beacon SYNC. After a SYNC
  it unstuffs and checks 5 (beacon) or 6 (sensor) bytes. It then pulses
  `frame_valid` or `frame_err` and returns to hunting.

## Sensor data path

`afe_controller` starts at the beginning of each frame. For channels 0…3 it
sets the analog multiplexer and starts one SAR conversion.

`sar_logic` takes 10 system clocks per conversion:

1. one clock in the sample phase (`adc_sample` = 1) while the DAC tracks the
   input;
2. eight trial clocks, MSB first, each keeping or clearing the trial bit on
   the comparator's answer;
3. one clock to present the result.

That makes 275 kS/s at 2.75 MHz. The four conversions take 40 clocks, within
the 57-bit beacon slot, so a fresh set of samples is always ready before slot
0. The comparator convention is `adc_cmp = 1` when the held input is at or
above the DAC level.

The sensor reads its configuration from the beacon byte whose address field
equals its `SAddr` pins. It drives the 5 configuration bits on `AFE0..4`, the
amplifiers' gain and bandwidth setting, and echoes them in its own packet
header.

## Coordinator host interface

Both directions use a data pin and a gated clock from or to a host
microcontroller.

* **DATAin / CLKin** (`coord_host_in`): the host shifts in a 32-bit word, MSB
  first, sampled on CLKin rising edges. Both pins pass through two-flop
  synchronisers, so CLKin must be several times slower than the system clock.
  The word holds the four beacon bytes, slot 0 first. It takes effect from the
  next beacon. If CLKin stays low for 256 system clocks, a half-sent word is
  dropped.
* **DATAout / CLKout** (`coord_host_out`): every error-free sensor packet's 40
  bits (header and four samples) are shifted out MSB first, one per system
  clock. CLKout is the system clock gated by an enable and inverted, so its
  rising edge is in the middle of each data bit. The 40 bits fit inside the
  65-bit slot before the next packet can arrive.

## Transmitter model

The OOK transmitter multiplies the 44 MHz LO by 21 without a PLL. Two
injection-locked ring oscillators (7 and 21 inverters) produce 21 evenly spaced
phases of the LO. An edge-combining power amplifier then ORs the 21 products
of neighbouring phases, `B_i·B_(i+1)`, including the wrap-around term. That
gives 21 pulses per LO period (924 MHz), switched on and off by the data bit.

* `ilro` models one locked ring: stage *i* is the injection delayed by
  (*i*+1)·t_p, inverted for odd *i*, with t_p = 1/(2·N·f). The extra delay
  stands for the injection device. It also keeps every stage from switching
  in the same instant as the injection edge. A zero-delay stage there lets a
  simulator miss output edges.
* `ook_ec_pa` is the combining logic.
* `ook_transmitter` chains the two rings and the PA. Its test bench times
  every pulse: 1.082 ns apart and 0.541 ns wide.

Lock-in, phase noise and output power are not modelled. These files use
delays, so they are for simulation only. `ook_ec_pa` itself is plain
combinational logic.

## Clocks, reset and test pins

* `clock_gen` selects the crystal or `EXT_Clk` (`IntXOorExtClk`). It divides
  by 16 or 32 (`FreqDivCtrl`) with a 5-bit counter. The selection is a plain
  multiplexer, so change it only while the chip is held in reset.
* `POR` is taken as active high. `reset_sync` releases it synchronously to the
  system clock.
* `TRX_bypass = 1` connects the NCU to the two test pins instead of the radio:
  * NCU output on `TxIN_NCUOUT`;
  * NCU input from `RxOUT_NCUIN`;
  * transmitter off.
* `TRX_Indp = 1` separates the radio from the NCU:
  * `TxIN_NCUOUT` drives the transmitter;
  * `RxOUT_NCUIN` shows the receiver's output.

  Each of these bidirectional pins appears as `_i`, `_o` and `_oe` signals.
  The assignment of directions to the two modes is this design's reading of
  the pin list.
* `rx_en` and `tx_en` are the transceiver power enables described above.
  Both are high in the `TRX_Indp` mode and low in the bypass mode.
* `sys_clk`, `synced`, `pkt_valid`, `pkt_err` and `wdt_expired` are extra
  observation outputs.

## Files

| file | contents |
|---|---|
| `rtl/brain_asnet_pkg.sv` | frame constants, SYNC patterns, CRC polynomial, slot positions |
| `rtl/brain_asnet_soc.sv` | top level (either role) |
| `rtl/ncu_timer.sv`, `ncu_packetizer.sv`, `ncu_depacketizer.sv`, `crc8.sv` | network control unit |
| `rtl/afe_controller.sv`, `sar_logic.sv` | ADC sequencing and SAR logic |
| `rtl/clock_gen.sv`, `reset_sync.sv` | clocks and reset |
| `rtl/coord_host_in.sv`, `coord_host_out.sv` | host interface |
| `rtl/ilro.sv`, `ook_ec_pa.sv`, `ook_transmitter.sv` | transmitter (behavioural rings, logic PA) |
| `tb/tb_<module>.sv` | one self-checking test bench per module |
| `tb/tb_link_pkg.sv` | reference CRC and frame builder used by the test benches |
| `tb/afe_analog_model.sv` | stand-in for multiplexer, DAC and comparator: four channel levels that change every conversion round |

## Simulating

Every test bench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
counts a failure if the run hangs. Build and run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/brain_asnet_pkg.sv tb/tb_link_pkg.sv tb/tb_brain_asnet_soc.sv \
    --top-module tb_brain_asnet_soc
./obj_dir/Vtb_brain_asnet_soc
```

Replace the test bench name for the others. `tb_brain_asnet_soc` builds a
complete network at the default parameters: one coordinator and four sensors,
each with its own crystal phase, wired through an ideal shared channel. It
takes about half a minute and runs through these phases:

* power-up in a random order;
* a configuration word from the host, checked on every sensor's AFE pins;
* a bit error injected into one sensor packet, which the coordinator must
  reject;
* a bit error in a beacon, which every sensor must reject while staying in
  sync and keeping its configuration;
* one sensor deaf to the beacon while it still hears the other sensors, so its
  watchdog fires and it resynchronises;
* the coordinator silenced, so all sensors drop sync;
* a switch to divide-by-32;
* one sensor running through the bypass pins;
* the coordinator's separated-transceiver mode.

In every complete frame that a node spends in sync, the test bench also counts
how long the receiver and the transmitter are enabled.

Every record on DATAout is compared with the values the analog model gave that
sensor in that frame. Each of the mechanisms above is counted, and one that
never occurs is a failure.

## Limits and departures

* **Fixed packet length.** Packets carry exactly 4 (beacon) or 5 (sensor)
  bytes. The general HDLC-style length formula for *n* information bytes does
  not apply beyond this frame. Longer payloads would need a wider byte counter
  and a longer frame.
* **Own choices.** These were chosen here and can be changed in one place each
  (package or parameter):
  * SYNC patterns;
  * CRC polynomial;
  * bit order;
  * watchdog length;
  * 10-cycle conversion;
  * conversion position in the frame;
  * host word formats;
  * reset value of the configuration (addresses 0…3, code 0).
* **Bit timing.** Alignment assumes the crystals agree to well within one bit
  per frame (one bit per 317-bit frame is about 3000 ppm; ordinary crystals are far better). There is no bit-level clock recovery. A receiver
  whose crystal drifts more would need one.
* **Addresses.** Addresses 4–7 have no slot in the 4-slot frame. Such a
  sensor listens but never transmits.
* **Clock switch.** The divider and the clock source switch without
  glitch protection. Changing either while running can:
  * corrupt the packet in flight;
  * cost a chip one system-clock edge, which puts a sensor one bit off.

  The next beacon realigns the sensor, so the network recovers within a
  frame or two.
* **Analog parts.** The transmitter rings are ideal delay models. Everything
  else analog is a port.
