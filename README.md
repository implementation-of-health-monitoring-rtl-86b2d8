# A wireless health-monitoring link in SystemVerilog

This RTL carries a slowly varying biomedical signal, such as an ECG, over a
short-range radio link. One side samples the sensor voltage with an 8-bit
ADC. It compresses the samples with a bit-level run-length code and wraps
them in HDLC frames. It then sends the frames as a binary phase-shift-keyed
(BPSK) carrier. The other side demodulates the carrier and recovers the bit
clock. It de-frames and checks the frames, expands the samples again and
sends them one byte per SPI transfer to a display computer.

Every stage is written as synthesizable logic, except the ADC, which is a
behavioural model. The whole chain runs in simulation from the analog input
voltage to the bytes on the display's SPI bus.

```
 ecg_vin ─► adc8 ─SPI─► ┌──────────── tx_fpga ────────────┐
 (real)    (model)      │ spi_unit ─► tx_fsm ─► dual_ram  │
                        │            │ (2 x 128 B banks)  │
                        │            ▼                    │
                        │  rle_compressor ─► hdlc_tx ─────┼─► txd ─► psk_tx ─► psk_tx_out
                        └─────────────────────────────────┘                      │
                                                                        radio channel
                                                                  (outside, testbench model)
                        ┌──────────── rx_fpga ────────────┐                      │
 PC display ◄─SPI─ spi_unit ◄─ rx_fsm ◄─ sync_fifo       │                      ▼
                        │   ▲ (128 B)                     │             psk_rx_in ─► psk_rx
                        │ rle_decompressor ◄─ rx_fsm ◄─ hdlc_rx ◄─ cdr ◄───── rx_raw ┘
                        └─────────────────────────────────┘
```

`health_monitor_top` wires up the chain. The radio channel stays outside:
`psk_tx_out` is an output and `psk_rx_in` an input, so a testbench can add
noise between them.

## One clock, three rates

Everything runs on the single clock `clk`. Slower rates are clock enables
made by counters:

| Rate | Parameter | Default | Where |
|---|---|---|---|
| ADC sample period | `SAMPLE_PERIOD` | 2048 clocks | `tx_fsm` timer |
| Line bit period | `BIT_PERIOD` | 32 clocks | `tx_fpga` makes `tx_ce`; `cdr` uses the same nominal value |
| Carrier period | `PHASE_INC` of the DDS | 16 clocks (65536 / 4096) | `dds` inside `psk_tx` and `psk_rx` |
| Samples per frame | `FRAME_BYTES` | 128 | `tx_fsm` bank size |

A line bit therefore lasts two carrier cycles. A frame carries one RAM bank,
which is 128 samples.

The link keeps up even with the worst-case signal. The worst sample is a bit
pattern like 0x55, where every bit is its own run:

- That sample costs 8 tokens, which is 4 bytes or 32 bits.
- Bit stuffing adds at most one bit in five.
- Flags, address and a 32-bit FCS add 56 bits per frame.

A worst-case frame is therefore about 4,971 bits, or about 159,000 clocks.
Filling a bank takes 128 × 2048 = 262,144 clocks. A real ECG compresses far
better than this worst case.

If the line does fall behind, the acquisition side finds both banks still
waiting. It then skips the sample and counts it in `samples_dropped`.

## Bit-level run-length code

The compressor works on the bits of each sample, not on repeated sample
values. It scans each sample from the LSB upwards and splits it into runs of
equal bits. Each run becomes a 4-bit token:

```
token[3]   = value of the bits in the run
token[2:0] = run length - 1          (1..8 bits)
```

Tokens never cross a sample boundary, so a sample gives 1 to 8 tokens. Two
tokens fill one byte, the first token in the low nibble.

If a frame ends with an odd number of tokens, one pad token `4'h0` completes
the last byte. That pad stands for a single 0 bit. The decompressor restarts
its bit position at the first byte of every frame (`in_first`), which throws
the pad bit away.

Worked example: the sample `11110011` seen from the LSB is 1,1 / 0,0 /
1,1,1,1. That is runs of 2, 2 and 4, so the tokens are `9`, `1` and `B`,
plus the pad `0`. The output is the two bytes `0x19 0x0B`.

| Sample | Tokens | Cost |
|---|---|---|
| 0x00 or 0xFF | 1 | half a byte |
| Typical slowly changing ECG value | a few | under 8 bits |
| 0x55 | 8 | 4 bytes; the code expands it |

Timing:

- The compressor produces one token per clock. It takes a new sample in the
  same clock as the last token of the previous one.
- The decompressor uses one clock per token, so two clocks per byte.
- A run that would overfill a sample is a format error. The decompressor
  pulses `err` and discards that sample.

Both blocks use valid/ready handshakes on both sides.

## HDLC framing

This is the largest part of the design. Both ends are split into the units
of a classic HDLC controller. Each unit is its own module, and a small
controller sequences them.

### Frame format

```
7E | ADDR | data bytes ... | FCS (2 or 4 bytes) | 7E
```

- Bits go out LSB first.
- The address is the parameter `ADDR`, 8'h03 by default. There is no
  control field.
- `FCS16_32 = 0` selects CRC-16-CCITT (reflected polynomial 0x8408).
  `FCS16_32 = 1` selects CRC-32 (0xEDB88320).
- The CRC covers the address and data. It starts at all ones and is sent
  complemented, LSB first.
- The receiver runs the same CRC over the FCS as well. It accepts the frame
  when the register holds the fixed residue: 0xF0B8 for CRC-16, 0xDEBB20E3
  for CRC-32.

### Transmitter (`hdlc_tx`)

| Unit | Job |
|---|---|
| `hdlc_tx_ctrl` | State machine: idle → opening flag → address → data → FCS → closing flag, or → abort. It fetches each data byte with a `TX_LOAD` pulse in the last bit slot of the previous byte. |
| `hdlc_p2s` | Transmit register. Loads the address or `TX_DATA` and shifts it out LSB first. |
| `hdlc_fcs_gen` | Updates the CRC with each address and data bit. In the FCS phase it shifts the complemented register out instead. |
| `hdlc_zero_insert` | Counts ones in the address, data and FCS bits. After five ones it inserts a 0 and raises `stuff`. |
| `hdlc_flag_abort_gen` | Chooses what the line carries (data, flag, abort or all ones) and registers `TXD`. |

Every bit slot is one `TX_CE` clock. While `stuff` is high, the slot carries
the inserted zero and nothing upstream advances. The controller, shift
register and CRC all wait one slot. This is the one interlock the datapath
needs.

The closing flag has a corner case. The last FCS bits can end in five ones,
so a zero is still due when the closing flag starts. The controller lets
the stuffer add that zero before the flag.

Between frames the line carries either repeated flags (`IDLE_SEL = 1`) or
all ones (`IDLE_SEL = 0`).

An underrun happens when `TX_DATA_VALID` is low at a byte boundary before
`TX_EOF`. The framer then pulses `TX_UNDERRUN`, sends an abort (eight ones)
and returns to idle.

### Receiver (`hdlc_rx`)

| Unit | Job |
|---|---|
| `hdlc_flag_abort_det` | An 8-bit window of the last line bits. In every `RX_CE` clock it compares the window with the flag (01111110) and the abort pattern (seven ones). The bit leaving the window is the data bit, so data reach the rest of the receiver eight bits late. By then the detector already knows whether those bits belong to a flag. |
| `hdlc_zero_det` | Counts consecutive ones. A 0 after five ones is flagged as an inserted zero (`zero`) and skipped. |
| `hdlc_fcs_check` | CRC over every kept bit, including the FCS. `ok` is high when the register equals the residue. |
| `hdlc_s2p` | Serial-to-parallel converter with its own bit counter. `byte_done` marks the eighth bit. |
| `hdlc_rx_ctrl` | Hunts for a flag, then receives until the next flag or an abort. Holds back the FCS bytes and reports the status. |

The 8-bit delay in the flag detector removes the classic de-framer problem:
by the time a flag's bits reach the data path, the flag has already been
seen. When a flag is detected, the controller simply skips the next eight
delayed bits, which are the flag itself. Nothing of a flag is ever shifted
into the CRC or the byte converter.

The receiver does not know a frame's length in advance. It cannot tell which
bytes are the FCS until the closing flag arrives, so every completed byte
first enters a small pipe:

- The pipe is 2 bytes deep with CRC-16 and 4 bytes deep with CRC-32.
- A byte leaves the pipe, with `RX_READY`, only when a newer byte pushes it
  out.
- `RX_SOF` marks the first byte out, which is the address.

When the closing flag arrives, the pipe holds exactly the FCS, and it is
dropped. `RX_EOF` then pulses for one clock with
`RX_STATUS = {overflow, aborted, misaligned, fcs_error}`:

| Status bit | Meaning |
|---|---|
| `fcs_error` | The residue did not match, or the frame was too short to hold an FCS. |
| `misaligned` | The frame did not end on a whole byte. |
| `overflow` | A byte was due while `RX_SPACE_AVAIL` was low; that byte is lost. |
| `aborted` | The frame ended with an abort instead of a flag. |

A frame's bytes are delivered before its FCS is known. A user that must not
act on bad data has to buffer the frame until `RX_EOF`. This design does not
buffer: it passes the bytes on and counts bad frames.

## SPI unit

`spi_unit` is an SPI master and slave with the register set of a common
8-bit microcontroller SPI. Both FPGAs use it as a master: one to read the
ADC, the other to write to the display.

| addr | Register | Fields (bit 7 … 0) |
|---|---|---|
| 0 | SPCR | SPIE SPE DORD MSTR CPOL CPHA SPR1 SPR0 |
| 1 | SPSR | SPIF WCOL – – – – – SPI2X |
| 2 | SPDR | data |

A transfer works like this:

1. Writing SPDR while idle, with SPE and MSTR set, pulls `ss_n` low.
2. The unit sends eight SCK pulses and shifts the byte out on MOSI while
   shifting MISO in.
3. `ss_n` rises one clock after the last SCK edge, so a slave still sees
   that edge.
4. The received byte goes to a read buffer, which makes reads double
   buffered. SPIF is set, and `irq = SPIE & SPIF`.

SCK idles at CPOL. CPHA = 0 samples on the leading edge. DORD = 1 sends the
LSB first.

The SCK divider is selected by `{SPI2X, SPR1, SPR0}`:

| {SPI2X, SPR1, SPR0} | Divider |
|---|---|
| 000 / 001 / 010 / 011 | /4 / 16 / 64 / 128 |
| 100 / 101 / 110 / 111 | /2 / 8 / 32 / 64 |

Writing SPDR during a transfer is ignored and sets WCOL. The transfer in
progress completes undisturbed. Reading or writing SPDR clears SPIF and WCOL.

Both controllers program SPCR to `8'hD0`: interrupt on, enable, master,
mode 0, MSB first, /4.

**Slave mode** (SPE = 1, MSTR = 0) uses a separate set of pins: `slv_sck`,
`slv_ss_n` and `slv_mosi` in, and `slv_miso` out with an output enable
`slv_miso_oe`.

- The inputs pass two-flop synchronisers, and SCK edges are detected in the
  system clock domain. The external SCK must therefore be at most clk/8.
  `slv_miso` changes about three clocks after the shifting edge.
- The byte written to SPDR is sent. With CPHA = 0 its first bit is on MISO
  as soon as SS falls.
- After eight bits, the received byte goes to the read buffer and SPIF is
  set.
- A write to SPDR in the middle of a byte sets WCOL and is ignored.
- Raising SS in the middle of a byte restarts the bit count.

## Controllers and buffers

`tx_fsm` runs two state machines around the 2048-bit dual-port RAM
(`dual_ram`, 256 × 8, read latency one clock). The RAM is split into two
ping-pong banks of 128 samples.

- **Acquisition.** Every `SAMPLE_PERIOD` clocks it writes a dummy byte to
  SPDR, which starts an ADC conversion and read-out. It waits for the SPI
  interrupt, reads SPDR and stores the sample. When a bank is full, it hands
  the bank over and switches to the other one.
- **Streaming.** It reads a full bank and offers the samples to the
  compressor. It marks the last sample, so one bank becomes one frame.

`rx_fsm` has two sides:

- **Frame side.** It checks the address byte and ignores frames for other
  addresses. It passes the payload through a one-byte holding register to
  the decompressor; `RX_SPACE_AVAIL` is high while that register is free.
  It counts each frame as good (`frames_ok`, only frames for this address)
  or bad (`frames_bad`, any non-zero status).
- **Output side.** It writes the expanded samples into `sync_fifo`, a
  128 × 8 (1024-bit) show-ahead FIFO. A sample that meets a full FIFO is
  dropped and counted in `fifo_drops`. Each FIFO entry then goes out in one
  SPI transfer: write SPDR, wait for the interrupt, read SPDR to clear SPIF.

## BPSK modem and clock recovery

- **`dds`** is a 16-bit phase accumulator that addresses a 64-entry sine
  table. The table holds round(127·sin) values and is computed at
  elaboration. The output is 8-bit signed and registered.
- **`psk_tx`** is a multiplexer. It sends the carrier for bit 0 and the
  negated carrier, a 180° shift, for bit 1.
- **`psk_rx`** multiplies the received 10-bit samples by its own DDS
  carrier. That carrier is delayed one clock to line up with the
  modulator's output register. A 16-tap moving sum acts as the low-pass
  filter; it spans exactly one carrier period, which removes the
  double-frequency term. The sign of the sum is the bit decision (`rx_raw`).

The receiver carrier is coherent by construction. Both DDS start from reset
at the same phase, and the channel must add no delay. There is no carrier
recovery.

**`cdr`** recovers the bit clock from `rx_raw`:

- A counter restarts at every transition of the input.
- The input is sampled half a bit period later, giving `bit_out` with the
  strobe `bit_ce`.
- Through long runs without transitions, the counter free-runs at
  `BIT_PERIOD`.

HDLC bit stuffing limits a run of ones to six bits, so the counter is pulled
back into phase often. The test drives bit lengths of 30 to 34 clocks, and
the recovery holds. A lone noise-induced glitch near a bit edge can shift
the phase for one bit; the FCS catches the results.

## The ADC model

`adc8` is a behavioural model, not synthesizable logic. Its input `vin` is
a `real`:

- It takes its sample at the falling edge of `cs_n`. The code is
  floor(vin / VREF · 256), clipped to 0…255, with VREF = 3.3 V.
- It shifts the code out MSB first on the falling edges of `sclk`, which is
  SPI mode 0.

Because of the `real` port, the model and `health_monitor_top` are for
simulation. For synthesis, replace `adc8` with the pins of a real converter.
`tx_fpga` is the synthesizable transmitter.

## Where this design departs from or goes beyond the source description

The description this RTL was written from gives the block structure and the
behaviour of each block. It gives little of their insides. These choices are
this design's own:

- **Sizes and rates.** No sample rate, line rate, clock frequency or frame
  length was given. `SAMPLE_PERIOD`, `BIT_PERIOD`, `FRAME_BYTES` and
  `PHASE_INC` are choices. The RAM (2048 bits) and FIFO (1024 bits) sizes
  are as described, organised as bytes.
- **Run-length format.**
  - Runs are counted from the LSB, which matches the described example of
    runs 2, 2, 4 for `11110011`.
  - The described waveform shows 3-bit run counters and one bit per clock.
    Here tokens store length − 1, so a run of 8 fits, and a whole run is
    handled per clock.
  - Token packing and the pad token are choices.
- **HDLC.**
  - Only an address byte is inserted; there is no control field.
  - The polarity of `FCS16_32`, the underrun rule and the status encoding
    are choices.
  - The described framer has an active-high `RESET`. Every block here uses
    an active-low asynchronous `rst_n` instead.
  - "Targeted speed 400 MHz" was a goal of the original implementation.
    No timing has been checked for this RTL.
- **SPI.**
  - The register bit positions, address map, divider table and SPIF
    clearing follow the common microcontroller layout; they were not given.
  - Master and slave have separate pins rather than shared bidirectional
    pins. The slave side has a synchroniser, which limits its SCK to
    clk/8. Neither use in this system needs slave mode.
  - The description's SPI also lists a small distributed RAM and an
    "increment" unit. Their purpose is not given, so they are not built.
- **Modem.**
  - The described modem is a Simulink model with a cosine carrier, a
    designed low-pass filter and a separate NRZ stage. This RTL uses a sine
    table (only a fixed phase offset), a one-period moving sum and a sign
    decision.
  - Only one DDS per end; the described transmitter shows sine and cosine
    outputs, but only one carrier is needed.
- **Clock recovery.** The method is not given. The transition-reset
  counter is the simplest one that works here.
- **Bad frames.** The receiver passes a frame's samples to the display
  before its FCS is known. A corrupted frame is counted but not withdrawn.
- **Not built.** The analog parts (sensor and readout circuit), the radio
  channel and the display PC. The testbenches model the last two:
  `tb/awgn_channel.sv` adds noise from a sum of uniforms, and
  `tb/spi_slave_model.sv` is an SPI slave.

## Verification

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_hdlc` | Framer looped into de-framer. Expected line bits are built independently, including a bit-wise CRC and stuffing. Covers: the one-byte example frame (0x48), CRC-16 and CRC-32, flag and mark idle, all-ones data, a slow `TX_CE`, a line bit error, an underrun/abort, and an overflow. |
| `tb_spi_unit` | Master: all four modes, both bit orders and all eight dividers, checked against a behavioural slave. Also the SCK period, WCOL, SPIF and irq, and the double-buffered read. Slave: the testbench acts as master in all modes, and also covers a byte cut short by SS and a mid-byte collision. |
| `tb_rle` | Compressor and decompressor against a reference encoder: the example sample, constant and alternating data, random frames, odd token counts, back-pressure, and the token rate. |
| `tb_dual_ram`, `tb_sync_fifo` | Memory contents and read latency; FIFO order, flags, count, and ignored writes when full and reads when empty. |
| `tb_psk` | DDS table and period, modulator phase, and demodulated bits with noise. |
| `tb_cdr` | A random bit stream with ±2 clock jitter per bit; the recovered bits must match and the strobe spacing must be right. |
| `tb_adc8` | Codes against floor(v/VREF·256), including out-of-range inputs, and the serial read-out. |
| `tb_tx_fpga` | Reduced sizes. An independent HDLC/RLE decoder in the testbench decodes the line. The samples must match the ADC codes frame after frame, including while samples are dropped because the line is too slow. |
| `tb_rx_fpga` | Line built by the testbench with per-bit jitter: good frames, a frame for another address (ignored), a bad FCS (counted), and CRC-32. |
| `tb_health_monitor_top` | The whole link at the default parameters. An ECG-like input and a noisy channel: CRC-16/flag idle, then CRC-32/mark idle, then a noise burst that must give a bad frame. The bytes at the display must equal the ADC codes. Each mechanism (stuffing, destuffing, resync, both idle modes, both FCS sizes, both SPI buses) must occur. |

Run a testbench with plain Verilator from the repository root. List the
package first, then the modules the testbench uses. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hm_pkg.sv rtl/*.sv \
    tb/spi_slave_model.sv tb/awgn_channel.sv tb/tb_health_monitor_top.sv \
    --top-module tb_health_monitor_top -o sim
obj_dir/sim
```

The full-size end-to-end run covers about 1.4 million clocks, a little over
five frames of acquisition. It takes a few seconds.

## Files

- `rtl/hm_pkg.sv`: shared constants (flag, abort, CRC polynomials and
  residues, SPI register map), the CRC step function, and the receive status
  type.
- `rtl/*.sv`: one module per file, named after the module.
- `tb/*.sv`: the testbenches plus two helper models, `spi_slave_model` and
  `awgn_channel`.
