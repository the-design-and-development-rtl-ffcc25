# Pulsed radar gateware for the Rhino FPGA board

This is SystemVerilog RTL for a simple pulsed radar that runs on an FPGA next
to an ARM host processor. The ARM writes a transmit waveform and three timing
parameters over its memory bus. The FPGA then sends the waveform to a DAC once
every pulse repetition interval (PRI). A programmable time after each pulse
starts, it records the same number of samples from an ADC. The recorded
samples are streamed out as UDP packets over Gigabit Ethernet, each tagged
with its pulse number, to a PC that stores them.

The design follows the pulsed radar block described for the Rhino platform
(a Spartan-6 FPGA board with a TI AM3517 ARM). No DAC or ADC cards were part
of that work, and none are modelled here: in tests the DAC output is simply
looped back to the ADC input. Where this RTL departs from that description,
or fills a gap it leaves, the sections below and the first comment of each
file say so.

## The pulse cycle

Four functions inside `radar_block` make a radar pulse. Each is a small
counter or state machine.

| Function | Module | Clock | What it does |
|---|---|---|---|
| PRI timer | `pri_timer` | 100 MHz | Counts to the PRI value, fires `tx_trigger`, starts again |
| Transmitter | `transmitter` | 100 MHz (DAC) | Reads `wave_len` samples from addresses 0, 1, 2, … and sends them to the DAC |
| Receive delay | `rx_delay` | 200 MHz | Counts to the delay value after each trigger, then fires the receive trigger |
| Receiver | `receiver` | ADC clock | Captures `wave_len` ADC samples, marks the last one, pulses `rx_done` |

The timing is as follows:

- **PRI.** It is counted in 10 ns steps, and triggers come exactly `PRI`
  clock cycles apart. The first trigger comes `PRI` cycles after transmitting
  is enabled, which gives the analogue front end time to prepare.
- **Comparison rule.** The timer fires when its count has reached *or
  passed* its goal. If the PRI were lowered while it was running, the next
  pulse would leave at once rather than after a wrap-around. In this design
  the parameters are frozen while running, so this case does not arise.
- **Receive delay.** It is counted in 5 ns steps on the 200 MHz clock.
- **Transmit start.** The first DAC sample (`dac_valid` high) appears one
  100 MHz clock after the edge that samples the trigger. This is the read
  latency of the wave memory.
- **Receive start.** The trigger crosses from 100 MHz to 200 MHz and then
  from 200 MHz to the ADC clock, each time through a toggle synchroniser. As
  a result, the first captured sample comes the programmed delay plus a
  fixed offset after the transmit trigger. The offset is about 30 ns with a
  100 MHz ADC clock. With a delay shorter than the pulse, the receiver sees
  the loop-back waveform from sample ≈ (delay·5 ns + offset)/10 ns onward,
  and zeros after the pulse ends.
- **Stopping.** When transmitting is stopped, no new pulses start, but a
  delay that is already running completes. The echo of the last pulse is
  therefore still recorded.
- **Pulse count.** `pulse_count` (16 bits) counts transmitted pulses. It is
  cleared each time transmitting is enabled, so the first pulse of a run is
  number 1.

## Parameter frame and the host bus

The ARM sees the FPGA as memory on its General Purpose Memory Controller
(GPMC), in multiplexed address/data mode. `gpmc_bus` turns each bus access
into one Wishbone cycle:

- **Address capture.** During the address phase (`nCS` and `nADV` low) it
  latches the address. That address is three bits giving the number of the
  active chip select, then the 10 address lines, then the 16 data lines: a
  29-bit address of 16-bit words.
- **Writes.** A write is issued on the first clock edge with `nWE` low.
- **Reads.** A read is issued on the first edge with `nOE` low. The word is
  in the read register three clocks later, and is driven on the pins while
  `nOE` stays low. The GPMC read timing must sample the data no earlier than
  the fourth rising edge after `nOE` falls.

`param_regs` decodes the parameter frame (constants in `radar_pkg`):

| Word address | Contents |
|---|---|
| 0 | start/stop: bit 0 = run |
| 1, 2 | PRI in 10 ns steps, low half first |
| 3, 4 | receive delay in 5 ns steps, low half first |
| 5 | wave length in samples (1 … 8096) |
| 6 + 2k | sample k, real part (bits 15:0 of the 32-bit sample) |
| 7 + 2k | sample k, imaginary part (bits 31:16) |

The order puts the fields that change most often first, so a short write
updates only the leading fields:

- A one-word write starts or stops the radar.
- A six-word write also changes the timing and the length.

All fields read back. Unmapped addresses read zero. The waveform lives in
`wave_mem`, a dual-port RAM:

- Its 16-bit Wishbone port is on the bus clock.
- Its 32-bit read port feeds the transmitter at 100 MHz.

**While the radar runs, the parameters are frozen.** Every write other than
to word 0 is acknowledged but dropped, and `write_refused` pulses for each
one. Reads still work. Word 0 stays writable so that the radar can always be
stopped. (The original design made the whole bus read-only while running; see
[Departures](#departures-and-gaps).)

## Start/stop control

`flow_control` runs a five-state machine on the 100 MHz clock. The state
number is visible on `run_state`.

| State | Action |
|---|---|
| 0 wait for start | stay until the run bit is 1 |
| 1 claim | raise `claim_mem`, copy PRI, delay and length into working registers |
| 2 enable | raise `tx_enable`; the PRI timer starts from zero |
| 3 wait for stop | stay until the run bit is 0 |
| 4 release | drop `tx_enable` and `claim_mem`, back to 0 |

Copying the registers at start means that the radar always runs with a
consistent set of parameters. Timing as seen from the run bit:

- The run bit comes from the bus clock and is synchronised in two flops.
- `tx_enable` rises five 100 MHz clocks after the run bit changes, and falls
  four clocks after it is cleared.

## Output path: FIFO and UDP packets

The receiver writes every captured sample into `async_fifo`:

- It has 8192 words. That holds one full 8096-sample pulse, rounded up to a
  power of two for its Gray-coded pointers.
- It is written on the ADC clock and read on the Ethernet clock.
- A write to a full FIFO is dropped and flagged on `fifo_overflow`.

`udp_tx` builds complete Ethernet/IPv4/UDP frames and hands them byte by byte
to a MAC over a valid/ready interface (`mac_data`, `mac_valid`, `mac_ready`,
`mac_sof`, `mac_eof`). Every frame has the same shape:

| Bytes | Contents |
|---|---|
| 0–13 | Ethernet: destination 00:a0:d1:ad:03:bb, source 00:37:ff:ff:37:37, type 0x0800 |
| 14–33 | IPv4: 192.168.0.1 → 192.168.0.3, TTL 64, no fragmentation, header checksum |
| 34–41 | UDP: port 2001 → 2001, length 510, checksum 0 (unused) |
| 42–43 | pulse number (the synchronised `pulse_count` when the packet started) |
| 44–543 | 125 samples of 4 bytes, most significant byte first |

The header is a constant built at elaboration from the parameters of
`udp_tx`, and the IPv4 checksum is computed by a constant function. To change
addresses or ports, change those parameters. The MAC adds the preamble and
the CRC.

Packet rules:

1. When the FIFO holds at least 125 samples, send a full packet.
2. When a pulse has been completely received (`rx_done`), send whatever is
   left in the FIFO as one more packet, padded with zero samples. The
   receiver signal crosses to the Ethernet clock through a four-stage
   synchroniser. That is two stages more than the FIFO's pointer, so the
   request can never arrive before the pulse's last sample is visible.
3. A flush request that finds an empty FIFO is dropped.

Rule 1 has priority. A pulse of N samples therefore normally arrives as
⌈N/125⌉ packets, the last one padded: a 930-sample pulse gives 7 full
packets and one with 55 samples and 70 zeros. If pulses come faster than the
link drains the FIFO, the tail of one pulse is sent together with the start
of the next instead of padding, and the pulse number in a packet is that of
the newest pulse.

**Throughput.** At 1 Gb/s a frame costs 568 byte times, including preamble,
CRC and inter-frame gap, or 4.54 µs. A full 8096-sample pulse takes 65
packets, about 295 µs. With the longest pulse the PRI must therefore be at
least about 0.3 ms, or the FIFO overflows. At the 100 kHz pulse rate wanted
for Doppler work, full-length pulses would need about 26 Gb/s. That is far
beyond one Gigabit link, as the original design also expected.

## Clock domains

| Clock | Nominal | Logic |
|---|---|---|
| `gpmc_clk` | ARM bus clock | `gpmc_bus`, `param_regs`, wave RAM write port |
| `clk_100` | 100 MHz | `flow_control`, `pri_timer`, `transmitter`, wave RAM read port, debug serial port |
| `clk_200` | 200 MHz | `rx_delay` |
| `adc_clk` | ADC sample clock (100 MHz here) | `receiver`, FIFO write side |
| `gige_clk` | Ethernet MAC clock (125 MHz) | FIFO read side, `udp_tx` |

Signals cross between domains in these places:

| Signal | From → to | Method | Module |
|---|---|---|---|
| run bit | bus → 100 MHz | two-flop synchroniser | `sync_ff` |
| `claim_mem` | 100 MHz → bus | two-flop synchroniser | `sync_ff` |
| transmit trigger | 100 → 200 MHz | toggle synchroniser | `pulse_sync` |
| receive trigger | 200 MHz → ADC | toggle synchroniser | `pulse_sync` |
| `tx_enable` | 100 → 200 MHz | two-flop synchroniser; its rising edge clears the delay counter | `sync_ff` |
| `rx_done` | ADC → Ethernet | four-stage toggle synchroniser | `pulse_sync` |
| pulse count | 100 MHz → Ethernet | Gray code | `gray_sync` |
| FIFO pointers | ADC ↔ Ethernet | Gray code | `async_fifo` |

The parameter registers cross from the bus clock to 100 MHz without
synchronisers. `flow_control` samples them only in state 1, two or more
cycles after the run bit has been seen. At that point they are stable,
because the bus cannot change them once the run bit is set.

Reset:

- `rst` is one synchronous reset used in every domain.
- Hold it for at least four cycles of the slowest clock.
- Every register that is read has a reset value. The RAM contents do not;
  wave memory must be written before use.

## Debug serial port

`uart_tx` and `uart_rx` implement a small serial port for debugging on the
100 MHz clock. Its frame is:

- a start bit,
- 7 data bits, least significant first,
- an even parity bit,
- two stop bits.

ASCII `A` is therefore sent as 0 1000001 0 11. The bit time is `CLKS_PER_BIT`
clocks, by default 868 (115 200 baud). Its character interface is brought out
on the `dbg_*` ports of the top level. The receiver:

- checks the start bit again half a bit later, so it ignores short glitches;
- samples each bit in its middle;
- reports parity and framing errors.

## Top level and what is outside it

`control_block` is the top. It has no parameters: all sizes are the defaults
listed below. These parts are not included, and their signals are top-level
ports instead:

- **DAC and ADC mezzanine cards.** The ports are `dac_data`, `dac_valid` and
  `adc_data`. Connect `dac_data` to `adc_data` for a loop-back.
- **Gigabit Ethernet MAC and PHY.** The `mac_*` byte stream is meant for an
  existing open-source MAC.
- **Differential clock buffer and clock manager.** All clocks are inputs.
- **Tri-state pad of the GPMC data pins.** These are split into
  `gpmc_d_in`, `gpmc_d_out` and `gpmc_d_oe`.
- **Debug LEDs and GPIOs.**
- **Host software.** The ARM-side driver and FPGA programmer, and the PC
  program that stores packets, are software.

Status outputs (`tx_trigger`, `tx_active`, `rx_active`, `claim_mem`,
`tx_enable`, `pulse_count`, `run_state`, `write_refused`, `fifo_full`,
`fifo_overflow`, `pkt_done`, `pkt_padded`) are provided for scope pins or LEDs.
`tx_active` and `rx_active` are the "transmitting" and "receiving" signals
that show the PRI and the receive delay on an oscilloscope.

## Sizes

| Quantity | Default | Where |
|---|---|---|
| PRI register | 32 bits, 10 ns steps (up to 42.9 s) | `radar_pkg::PRI_W` |
| Delay register | 32 bits, 5 ns steps (up to 21.5 s) | `radar_pkg::DELAY_W` |
| Wave length register | 16 bits | `radar_pkg::LEN_W` |
| Sample | 32 bits: 16-bit real + 16-bit imaginary | `radar_pkg::SAMPLE_W` |
| Wave memory | 8096 samples (32 384 bytes) | `radar_pkg::WAVE_DEPTH` |
| Output FIFO | 8192 samples | `control_block` |
| Samples per packet | 125 (502-byte UDP payload) | `udp_tx::PAYLOAD_WORDS` |
| Pulse counter | 16 bits | `radar_pkg::PCOUNT_W` |

## Departures and gaps

Places where this RTL differs from the original description:

- **Bus while running.** The original turns the data pins of the bus
  gateway to output while the memory is claimed, which makes the bus
  read-only. That would also block the stop command, which has to be
  written. Here writes are dropped in `param_regs` instead, except to the
  start/stop word.
- **Data pin direction.** The original drives the data pins except while
  `nWE` is low. Here they are driven only while the FPGA is selected and
  `nOE` is low.
- **Delay clock.** The description contradicts itself: one passage counts
  the delay at 100 MHz, others at 200 MHz. 200 MHz is used, because the
  5 ns resolution requirement needs it.
- **Changing the PRI.** The original notes that changing the PRI while
  running can give one irregular interval. Here parameters are frozen at
  start, so changes take effect at the next start.
- **Output FIFO depth.** It is 8192 instead of 8096.

Choices made where the original gives no detail:

- the GPMC address bit order and read access time;
- the half-word order inside 32-bit fields;
- the position of the pulse number in the payload;
- the UDP checksum (0) and the IPv4 TTL (64);
- the byte order of samples;
- the serial bit rate;
- all clock-domain crossing circuits;
- the reset scheme.

## Simulation

Each block has a self-checking testbench in `tb/`. Each testbench:

- prints `TB_RESULT checks=<n> failures=<n>` and finishes;
- has a watchdog that counts a failure if the test hangs;
- uses two-state simulation, which is why every register that is read is
  reset.

`tb/gpmc_host.sv` models the ARM's GPMC (write and read tasks with the timing
described above).

`tb_control_block` runs the whole top level at its default sizes, with
clocks of 100, 200, 100 (ADC, phase-shifted), 125 (Ethernet) and 50 MHz
(bus). The DAC is looped back to the ADC, and the MAC model stalls at random.
The test has two runs:

1. **930-sample waveform, PRI 60 µs, delay 200 ns, three pulses.** The
   host writes the frame, reads it back, starts the radar, and checks that
   writes are refused while running. Then it stops the radar, and checks
   that no pulse follows and the memory is released.
2. **8096-sample waveform, PRI 100 µs.** This forces the output FIFO to
   fill and overflow. It checks that the first pulse still arrives complete
   and that everything drains after stopping.

Every frame is parsed. The test checks:

- the frame length;
- every header field and the IPv4 checksum;
- the pulse numbers;
- every sample against the waveform.

It counts pulses, full and padded packets, MAC stalls, FIFO full and
overflow events, refused writes, readbacks, start/stop cycles and a debug
serial character. Any of these that never happened counts as a failure. It
runs in a few seconds of simulation.

`tb_radar_workload` runs the largest specified case at the default sizes.
It uses 8096-sample pulses, a 500 µs PRI and a 40 µs receive delay. Its MAC
model runs at 1 Gb/s line rate and includes the preamble, CRC and gap after
each frame. It checks:

- the 500 µs spacing;
- the 40 µs transmit-to-receive delay, measured on `tx_active` and
  `rx_active`;
- 65 packets per pulse, with correct data;
- no sample lost.

The last packet of a pulse leaves about 337 µs after the pulse started, so
the link keeps up at this PRI.

To run one test with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -y rtl -y tb rtl/radar_pkg.sv tb/tb_control_block.sv \
  --top-module tb_control_block -o sim
./obj_dir/sim
```

The same command runs any other testbench; replace `tb_control_block` with
its name. Block testbenches override parameters only where a smaller size
keeps them short (the FIFO test uses 16 words, the serial tests 8 clocks per
bit).
