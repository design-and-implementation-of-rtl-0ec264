# Synthesizable Bluetooth 1.1 baseband module

A Bluetooth device is split into a radio, a baseband and a host. The
baseband does the bit-level, time-critical work of the link: it builds and
checks every packet bit by bit, keeps the 3.2 kHz Bluetooth clock, picks the
hop channel and encrypts the payload. A small microcontroller running the
link manager firmware sits above it. Host data arrives through a host
controller interface (HCI), which is UART or USB, and voice goes to a PCM
codec chip.

This RTL implements that baseband module as one synthesizable IP block with
four units:

| unit | module | purpose |
|---|---|---|
| link controller (baseband unit) | `link_controller` | packet TX/RX, Bluetooth clocks, hopping, E0 encryption, RF module interface, 64-byte TX and 64-byte RX buffers |
| UART HCI | `uart` | 16C450-style UART, NCO baud generator (300 bit/s to 1.5 Mbit/s), 64-byte FIFOs, HCI packet decoder |
| USB HCI | `usb_controller` | USB 1.1 full-speed (12 Mbit/s) device controller |
| audio CODEC | `audio_codec` | A-law, µ-law and CVSD voice coding towards a linear PCM chip |

Each unit owns its buffer, and all four hang off one 8-bit microcontroller
bus. The design has two main ideas:

- **Streaming coding chains with one sequencer.** Inside the link controller
  there are no buffers between the coding stages (CRC, encryption,
  whitening, FEC). The bits stream through, and a sequencer decides for
  each bit which stage is active.
- **Hardware or software control.** The parts of link control that need
  flexibility can be left to firmware or done in hardware. These are the
  slot-aligned transmit start and the ARQN/SEQN acknowledgement bits.

The microcontroller, its memory, the radio and the line drivers are not part
of the module. Their signals are ports of the top.

## Top level and bus

`bt_baseband_top` wires the four units together. It is the module to use.

- **Clocks.** `clk` is the 12 MHz system clock. `usb_clk` is 48 MHz and is
  used only by the USB controller.
- **Bus.** The bus has a 10-bit address, 8-bit write and read data, and
  separate `bus_wr` and `bus_rd` strobes.
  - A write takes effect at the `clk` edge while `bus_wr` is high.
  - `bus_rdata` is combinational from `bus_addr`.
  - `bus_rd` marks the read cycle, since some reads pop a FIFO.
- **Address map.** The top two address bits select the unit:

  | address | unit |
  |---|---|
  | `0x000` | link controller |
  | `0x100` | UART |
  | `0x200` | USB |
  | `0x300` | audio CODEC |

- **Interrupts.** `irq[3:0]` has one line per unit: {codec, usb, uart, link
  controller}.
- **USB access timing.** USB register accesses cross into the 48 MHz domain
  through two-flop synchronisers. Leave one idle `clk` cycle after each USB
  strobe.
- **Voice without the processor.** The CODEC's voice byte stream is wired
  straight to the link controller. With direct mode set in both units, SCO
  voice travels between the PCM chip and the air with no firmware
  involvement.

Each unit's register map is listed in the opening comment of its RTL file.

## Link controller

`link_controller` holds these sub-blocks, one module each:

| module | role |
|---|---|
| `bt_clock_gen` | prescaler 12 MHz / 3750 = 3.2 kHz; 28-bit CLKN; CLKE and CLK offsets; phase lock |
| `hop_selection` | 79-channel connection-state hop kernel from the address and CLK |
| `sync_word_gen` | 64-bit sync word from the 24-bit LAP (BCH(64,30), Barker tail, PN overlay) |
| `rx_correlator` | 64-bit sliding correlator; hit when mismatches ≤ threshold (register, default 7) |
| `e0_engine` | E0 key stream: four LFSRs (25, 31, 33, 39 bits) and the blend state machine |
| `tx_bitstream` | transmit chain and its sequencer |
| `rx_bitstream` | receive chain, header and payload-header analysis, and its sequencer |
| `radio_interface` | 1 MHz bit timing to the RF module, register-driven RF control pins, IEEE 1149.1-style serial control master |
| `bb_fifo` | 64-byte TX and RX buffers (the same FIFO is used in the other units) |
| `bb_pkg` | packet types, header struct, bit-step functions for HEC, CRC, whitening and FEC 2/3 |

The firmware sees 8-bit registers, listed at the top of
`rtl/link_controller.sv`:

- control;
- command pulses;
- status;
- interrupt flags (write 1 to clear) and mask;
- LAP/UAP;
- TX and RX header fields and lengths;
- buffer ports;
- clock, offset and phase;
- RF control and scan;
- the 128-bit E0 initial state.

### Packet chains

Packets follow Bluetooth 1.1, LSB first:

- **Access code:** 72 bits, made of a 4-bit preamble, the 64-bit sync word
  and a 4-bit trailer.
- **Header:** 10 bits plus an 8-bit HEC (polynomial 0xA7, initialised with
  the UAP). It is whitened and sent with FEC 1/3, so each bit goes out three
  times.
- **Payload:**
  - a payload header of 0, 1 or 2 bytes;
  - the data;
  - a CRC-16 (0x1021, initialised with the UAP).

  The payload is encrypted, then whitened (x⁷+x⁴+1, seeded from the clock),
  then coded with FEC 2/3, FEC 1/3 or no FEC, depending on the type.

The supported types are NULL, POLL, DM1, DH1, HV1, HV2, HV3 and AUX1, that
is, all single-slot packets.

`tx_bitstream` produces one bit per 1 MHz tick. It reads payload bytes from
the TX buffer when it needs them. If the buffer is empty at that point, it
flags `underrun` and sends zeros.

`rx_bitstream` cannot know the type or length in advance, so it works them
out as the bits arrive:

1. It waits for the correlator hit.
2. It skips the trailer.
3. It decodes the header (majority of three, de-whiten, HEC check).
4. It checks the LT_ADDR. A packet for another device, or one with a bad
   HEC, is dropped at this point.
5. It decodes the payload header to get the length.
6. It takes the data into the RX buffer and checks the CRC.

**FEC 2/3 timing.** The (15,10) shortened Hamming decoder collects a whole
15-bit block and corrects one error. It then releases the 10 data bits in
10 consecutive clock cycles. RX bits must therefore be at least 11 system
clocks apart; at 1 Mbit/s they are 12 apart.

**Decryption timing.** `ks_adv` is combinational and high in exactly the
cycles that consume a key-stream bit. This keeps decryption in step with the
burst of bits from the FEC decoder.

### Clocks, slots and phase lock

- **CLKN** is a free-running 28-bit counter that advances at 3.2 kHz.
  - Bit 0 toggles every half slot (312.5 µs).
  - Bit 1 marks a slot.
- **CLKE** = CLKN + offset.
- **CLK** is CLKE delayed by a phase measured on a received packet.
- **Setting the offset.** Firmware writes the offset directly, or loads the
  master's clock value, in which case the offset becomes master − CLKN.
- **Phase lock.** With phase lock enabled, a correlator hit records the
  prescaler value at the end of the sync word, minus 816 system clocks
  (68 bits × 12 clocks). That difference is the lag of CLK's ticks behind
  CLKE's. A slave's slot boundaries then line up with the master's
  transmission.
- **Hopping.** `hop_selection` computes the channel from CLK.

### Software and hardware control

- **Software mode:** a TX command starts the packet at once, and firmware
  writes ARQN and SEQN into the next header.
- **Hardware mode:**
  - A TX command waits for the next even-slot boundary of CLK.
  - After each packet received for this device, the controller sets ARQN:
    - for packets with a CRC, ARQN is the CRC result;
    - for packets without a CRC, ARQN is 1 once the HEC has passed.
  - The controller toggles SEQN when the received ARQN acknowledges the last
    packet sent.

### Radio interface

- **Transmit timing:** transmit bits follow the RF module's 1 MHz clock.
- **Receive timing:** received bits follow the clock that the RF module
  recovers. Both clocks are synchronised into the 12 MHz domain and used on
  their rising edges.
- **RF control pins:** eight pins come straight from a register.
- **Radio set-up:** a small TAP master (TCK at 1 MHz) shifts an 8-bit
  instruction and a 16-bit data word into the radio. It captures the 16 bits
  shifted back.

The hop channel can be read from register 0x17 and is also output on
`channel`. The firmware passes it to the radio through the serial control
interface, because a radio of this kind takes its channel that way.

## UART

`uart` has the 16C450 register set: RBR/THR, IER, IIR, LCR, MCR, LSR, MSR
and SCR. It supports 5 to 8 data bits, parity and 1 or 2 stop bits.

- **Baud rate.** The divisor latch is replaced by an NCO. A 24-bit increment
  feeds a 20-bit accumulator that overflows at 8× the baud rate:
  baud = 12 MHz × inc / 2²³. For example:

  | inc | baud |
  |---|---|
  | 210 | 300 bit/s |
  | 2²⁰ | 1.5 Mbit/s |

- **FIFOs.** There is a 64-byte FIFO in each direction.
- **HCI decoder.** The decoder watches the received bytes:
  1. It reads the HCI packet indicator (command, ACL, SCO or event).
  2. It reads the length field at that type's position.
  3. It raises "packet complete" after the last byte.

  It reports the type and length in extra registers, so the firmware does
  not need to parse the byte stream.

## USB

`usb_controller` runs at 48 MHz and samples the bus 4× per 12 Mbit/s bit.
Its parts are:

- **Transceiver interface:**
  - drives `usb_oe` while it sends;
  - controls the `usb_pullup` attach;
  - recovers the clock by restarting the bit phase on every line transition.
- **Serial interface engine:**
  - NRZI decoding and encoding;
  - bit stuffing and unstuffing;
  - SYNC and EOP detection;
  - the PID check;
  - CRC5 and CRC16 checked through their residues.
- **Protocol handler:**
  - answers tokens for its address;
  - takes OUT/SETUP data packets, checks the data toggle and answers
    ACK or NAK;
  - sends an armed IN packet and waits for the ACK;
  - ignores anything damaged or unexpected.
- **Endpoint manager:**
  - one 64-byte OUT buffer and one 64-byte IN buffer, shared by all
    endpoints;
  - data toggles for endpoints 0 to 3;
  - SOF frame number;
  - bus-reset detection (SE0 ≥ 2.5 µs), which clears the address.

Standard device requests are left to firmware, which sees SETUP data as an
OUT packet flagged as SETUP.

## Audio CODEC

`audio_codec` is the PCM chip's master. Every 1500 clocks (8 kHz) it sends a
frame sync and moves 16 bits, or 8 bits in 8-bit mode, in each direction.

A register selects one of three codings:

| coding | air format | algorithm |
|---|---|---|
| A-law | one byte per sample | G.711 segments |
| µ-law | one byte per sample | G.711 segments |
| CVSD | one byte per sample, 8 bits at 64 kHz | Bluetooth parameters: J = K = 4, step 10 to 1280, 10 fraction bits |

For CVSD, upsampling is a sample hold and downsampling takes every eighth
value. There are no interpolation filters.

Encoded bytes go into a 32-byte TX FIFO and decoded bytes come from a
32-byte RX FIFO; together they form the 64-byte voice buffer. In direct mode
the FIFOs talk to the link controller instead of the processor.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with a
line of the form `TB_RESULT checks=N failures=M` and has a watchdog.
`tb/bt_ref_pkg.sv` holds independent reference models (HEC, CRC, whitening,
FEC) used by the bit-stream testbenches.

`tb_bt_baseband_top` runs two complete top instances at their default
parameters, with their RF pins cross-connected. It runs these scenarios:

- **File transfer.** Host A sends a 132-byte file over the UART as six
  HCI ACL packets. Firmware written as testbench tasks sends them
  alternately as DM1 (encrypted) and DH1 (whitened). Host B receives them over the other UART, byte for byte.
- **Error and buffer cases:**
  - a corrupted packet with a CRC error, followed by a retransmission;
  - an HV1 packet;
  - an RX overflow.
- **Register-level checks:**
  - a JTAG scan;
  - the µ-law and CVSD CODEC paths;
  - a USB bus reset.
- **Hands-free voice.** Hardware mode with direct SCO voice in A-law sends a
  PCM ramp over the air. The testbench checks:
  - hardware ARQ;
  - phase lock;
  - the played samples.

The testbench counts each of these mechanisms and fails if any never
occurred.

To simulate with Verilator 5:

```
verilator --binary --timing -Irtl \
  rtl/bb_pkg.sv rtl/bb_fifo.sv rtl/bt_clock_gen.sv rtl/hop_selection.sv \
  rtl/sync_word_gen.sv rtl/rx_correlator.sv rtl/e0_engine.sv \
  rtl/tx_bitstream.sv rtl/rx_bitstream.sv rtl/radio_interface.sv \
  rtl/link_controller.sv rtl/uart.sv rtl/audio_codec.sv \
  rtl/usb_controller.sv rtl/bt_baseband_top.sv tb/tb_bt_baseband_top.sv \
  --top-module tb_bt_baseband_top -o sim && ./obj_dir/sim
```

For a unit test, compile the module, its dependencies (`bb_pkg`, `bb_fifo`,
and for the bit-stream chains `tb/bt_ref_pkg.sv`) and its `tb_<module>.sv`.
The simulator is two-state, so every register that is read has a reset.

## Departures and limits

- **Encryption key generation is not built.** The 128-bit E0 starting state
  is written by firmware. E0's own key set-up from Kc, the address and the
  clock is left to software.
- **Packet types.** Only single-slot packets are supported. There are no
  multi-slot DM3/DH3/DM5/DH5 packets.
- **Link context switching.** Context switching between several links is
  done by firmware. The hardware keeps ARQN/SEQN state for one link only.
- **Hop modes.** Only the 79-channel connection hop is built. Inquiry, page
  and 23-channel modes are not.
- **4 MHz clock.** The original design mentions a 4 MHz RF sub-clock. This
  RF interface does not need it, so it is not generated.
- **Design choices.** The following were not specified and are this
  design's own:
  - register maps and the bus form;
  - the phase-lock constant;
  - correlator threshold default;
  - the JTAG register widths;
  - the USB oversampling and endpoint arrangement;
  - the PCM framing.
- **Microcontroller.** It is outside the module, and no firmware is
  included. The testbenches play its part with tasks.
- **Gate count.** Generic synthesis of the top gives about 3,100 cells,
  2,000 flip-flops and 3.5 kbit of FIFO memory. It has not been mapped to
  an ASIC library, so it cannot be compared with the 85k-gate figure
  published for the original chip, which also included the
  microcontroller.
