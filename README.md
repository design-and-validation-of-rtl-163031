# ISO15693 RFID tag digital core

A passive RFID sensor tag has no battery and no crystal: it lives off the
13.56 MHz field of the reader, takes its clock from that carrier, and talks
back by switching a load across its coil. This design is the digital part of
such a tag. It listens to the pulse-position coded request of an ISO15693
reader, checks it, executes **Read Single Block** (command 20h) or **Write
Single Block** (command 21h) on a small block memory, and answers after the
prescribed response time with a Manchester coded, subcarrier modulated frame
that carries the flags, the block data and a CRC-16. One block number
(FFh by default) returns the sample of the tag's sensor ADC instead of
memory, which is what makes the tag a sensor tag.

The RTL follows the architecture of a published thesis on an implantable
sensor tag: a frame decoder, a four-state controller and a frame encoder
built from a chain of small modules (delay, clock divider, SOF, data, CRC,
PISO, Manchester, two multiplexers, EOF, subcarrier AND). The analog front
end (rectifier, limiter, regulator, reference, clock extractor, ASK data
slicer, load modulator, ADC, power-on reset) is not part of the RTL; its
signals are the ports of the top module.

```
            ask_in ─► frame_decoder ──req/eof_rx/frame_error──► controller ◄── adc_data
                          ▲                                        │   ▲
                          └──────────── clear_rx ──────────────────┤   │ mem r/w
                                                                   │   ▼
                                                                   │ block_memory
                                                data_to_tx, nbits, │
                                                load, start_tx     ▼
                                                             frame_encoder ──► tx_out
                                                                   │
                                                 eof_tx ◄──────────┘
```

Everything runs on one clock, `clk` = the recovered carrier fc = 13.56 MHz,
with an asynchronous active-low reset `rst_n`.

## Top module `rfid_digital_core`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 13.56 MHz carrier clock |
| `rst_n` | in | 1 | power-on reset, active low |
| `ask_in` | in | 1 | data slicer output, low during a carrier pause (asynchronous) |
| `adc_data` | in | 8 | sensor ADC sample |
| `tx_out` | out | 1 | load-modulation switch: envelope AND fc/32 subcarrier, registered |
| `tx_env` | out | 1 | response envelope before the subcarrier (observation) |
| `state` | out | 2 | controller state: 0 IDLE, 1 COMPARE, 2 TRANSMIT, 3 WAIT |
| `rx_frame_error` | out | 1 | decoder is in its error state (observation) |

| parameter | default | meaning |
|---|---|---|
| `NUM_BLOCKS` | 32 | 32-bit blocks in memory (the thesis gives no number) |
| `ADC_BLOCK` | 8'hFF | block number that reads `{24'h0, adc_data}` |
| `DELAY_CYCLES` | 4218 | delay-module count; gives t1 = 4224 cycles (see below) |
| `RX_TOL` | 32 | accepted deviation of a pause gap, in cycles |

## Receiving: the 1-out-of-4 decoder (`frame_decoder`)

This is the least obvious part of the design.

The reader codes two bits at a time. A dibit occupies four slots of 256
carrier cycles (18.88 µs each), and the reader drops the carrier for 128
cycles (9.44 µs) in the second half of slot *v* to send the value *v*. Bytes
go least significant dibit first. The start of frame is a pause, 512 cycles
of carrier, another pause and 256 cycles of carrier; the end of frame is 256
cycles of carrier, a pause, and 128 cycles of carrier.

Instead of sampling slots, the decoder measures **the gap from the end of a
pause (rising `ask_in`) to the start of the next one (falling `ask_in`)**
with an 11-bit counter. This needs no slot alignment, only the previous
dibit *p*. The next dibit *n* gives a gap of

    gap = 256*k - 128,   k = 4 + n - p   (k = 1..7)

so the counter value identifies *n* = *p* + *k* (mod 4). After the SOF the
second SOF pause behaves as *p* = 2: the SOF itself counts 512, a dibit 00
right after it counts 384, and a 01 after a 00 counts 1152. A gap is
accepted within ±`TOL` cycles of its nominal value; the codes are 256 cycles
apart, so ±32 leaves wide margins.

The EOF pause sits half a slot later than any data position: after the last
dibit *p* of a byte its gap is 1024 − 256·*p*, which is 128 cycles from every
data code. The decoder accepts it only at a byte boundary. It pulses `eof`
at the end of the EOF pause, which is the reference point of the response
time.

States: IDLE → SOF pause → SOF gap → (pause, gap)* → EOF pause → DONE, with
ERROR for any gap outside all windows, a counter overflow (no pause for 2047
cycles), a tenth byte, or a malformed SOF. ERROR and DONE hold until the
controller's `clear`. Up to nine bytes are stored (flags, command, block
number, four data bytes, two CRC bytes) and each completed byte runs through
a byte-wise CRC-16; at EOF `req.crc_ok` tells whether the register holds the
residue F0B8h. `ask_in` passes two synchronising flip-flops first, which
delays every edge equally and so does not change the gaps.

## Deciding: the controller

Four states, as in the thesis:

- **IDLE**: decoder armed. On `eof_rx` with a good CRC the state goes to
  COMPARE. A frame error or a bad CRC gives a one-cycle `clear_rx`. The
  frame is dropped and the state stays IDLE.
- **COMPARE** (one cycle): a request is executed only if one of these holds,
  otherwise it is dropped like a bad frame:
  - command 20h with exactly 5 bytes and an existing block (or `ADC_BLOCK`);
  - command 21h with exactly 9 bytes and an existing block.

  A write stores the 32-bit data. The response is prepared:
  - read: 40 bits, `{block, flags=00h}`, sent flags first;
  - write: 8 bits, flags only.
- **TRANSMIT** (one cycle): `load` copies the response into the encoder,
  and `start_tx` rises.
- **WAIT**: `start_tx` stays high until the encoder reports `eof_done`. The
  state then returns to IDLE. Dropping `start_tx` resets the whole encoder.

`clear_rx` is high whenever the encoder is active. So the tag ignores
anything it hears while it answers.

## Answering: the frame encoder

The encoder is a chain in which each module's `done` starts the next one:

```
start ─► delay ─► clock divider ─► SOF ─► data ─► PISO(CRC) ─► EOF
                                    │       │  \      │           │
                                    │     CRC-16   2:1 mux        │
                                    │              └► Manchester  │
                                    └─────────► 4:1 mux ◄─────────┘
                                                   │
                                         AND fc/32 subcarrier ─► tx_out
```

- **Delay**: counts `DELAY_CYCLES` from `start_tx`. ISO15693 asks for the
  answer t1 = 4224/fc after the end of the request (window 4192..4256).
  Six cycles pass in the core between the end of the EOF pause and
  `start_tx` reaching the delay counter. They are spent in the input
  synchroniser, the decoder's `eof` register and the controller's COMPARE
  and TRANSMIT states.

  Hence the default of 4224 − 6 = 4218. The end-to-end test measures
  4224.
- **Clock divider**: a counter that starts with the delay's `done`. It
  makes three square waves, each high in the first half of its period:
  - `clk_32` (fc/32, the 423.75 kHz subcarrier);
  - `clk_256`;
  - `clk_512` (fc/512, the 26.48 kbit/s bit clock).

  It also makes one-cycle strobes at the end of each 256- and 512-cycle
  period. The other modules advance on those strobes.
- **SOF / EOF**: shift out an 8-character envelope, one character per 256
  cycles:
  - SOF is `00011101`: 768 cycles unmodulated, 768 cycles (24 subcarrier
    pulses) modulated, then a Manchester 1;
  - EOF is `10111000`: a Manchester 0, 24 pulses, 768 cycles unmodulated.
- **Data**: loads up to 40 bits and an explicit bit count (40 for a read
  answer, 8 for a write answer). It shifts them out LSB first, one per 512
  cycles.
- **CRC-16**: serial ISO13239 CRC (x^16 + x^12 + x^5 + 1, preset FFFFh).
  Internally it is an MSB-first LFSR fed with the LSB-first data; the output
  is bit-reversed and inverted. This equals the reflected 8408h form. Forty
  zero bits give CF77h, the value the thesis shows.
- **PISO**: sends the 16 CRC bits, low byte first and LSB first, each byte
  in its transmit order.
- **2:1 mux**: selects the data bit or the PISO bit.
- **Manchester**: XORs that bit with `clk_512`. A 1 becomes unmodulated then
  modulated; a 0 the reverse.
- **4:1 mux**: selected by `{piso_done, sof_done}`, it routes SOF, the
  Manchester stream, then EOF. It is disabled by `eof_done`.
- **Subcarrier modulator**: the output AND with `clk_32`, registered so
  that `tx_out` is glitch-free.

A response of *n* data bits lasts
256·(8 + 2·(*n* + 16) + 8) cycles after the delay:
- read answer: 32 768 cycles, about 2.4 ms;
- write answer: 16 384 cycles.

## Departures from the thesis, and choices of this design

- **One clock domain.** The thesis clocks its sub-modules from gated and
  divided clocks. Its decoder also clocks one process from the falling edge
  of `ask_in`. Here everything runs on `clk`, with enable strobes. The
  thesis's separate `enable` inputs are folded into `start`.
- **Subcarrier bit.** The thesis text names counter bits 5, 7 and 8 for the
  three clocks. Bit 5 of a counter divides by 64, but the subcarrier must be
  fc/32. This design takes bit 4.
- **Variable-length requests.** The thesis's decoder expects a fixed
  five-byte request and outputs only two bytes. This one recognises the EOF
  by its timing. It receives the nine-byte write request and hands every
  field to the controller.
- **CRC check on reception.** The standard requires it; the thesis's
  decoder lacks it. A bad CRC drops the frame.
- **Exact lengths and block range.** A request whose command, length or
  block number does not fit is dropped without an answer. The thesis does
  not say what happens then. Error responses of the standard (error flag
  set) are not implemented.
- **Response flags** are 00h (no error).
- **Sizes not given by the thesis:**
  - the memory size (32 blocks, reset to zero);
  - the ADC block number FFh;
  - the 8-bit ADC width.
- **Delay value** is derived from this core's own six-cycle latency. The
  thesis's circuit has a larger latency and therefore a shorter count.
- **`tx_out` is registered.** It follows the envelope one cycle late.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values are
computed independently of the RTL, for example with a bitwise CRC model, a
reference counter for the clock divider, or the nominal frame timing for
the encoder.

`tb_rfid_digital_core` runs the whole core at its default parameters.
`reader_model.sv` is a behavioural reader. It drives `ask_in` with real
1-out-of-4 frames, including optional timing jitter and misplaced pauses.
It decodes `tx_out` by counting subcarrier pulses in each 256-cycle
half-bit. The test does the following:
- reads an empty block;
- writes AABBCCDD to block 01h, and other words to 11h, 00h and 1Fh;
- reads all four back;
- reads the ADC block;
- checks that these are dropped without answer: a bad CRC, a framing error,
  an unknown command, a block out of range, and an over-long frame;
- repeats a read and a write with ±14 cycles of jitter on every pause.

Every answer's flags, data, CRC, SOF/EOF shape and t1 (4192..4256) are
checked. The test counts each of these mechanisms and fails if any never
occurred. It takes about a million clock cycles, well under a second of simulation
time with Verilator.

The jitter test uses ±14 cycles because moving both pauses around a gap
changes it by twice that, and the gap must stay inside ±32.

Not verified: behaviour against a real reader, the analog front end, and
requests with option, address or select flags set. The flags byte is not
interpreted; an addressed request carries an 8-byte UID, exceeds the
nine-byte buffer and is dropped.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/rfid_pkg.sv tb/reader_model.sv tb/tb_rfid_digital_core.sv \
    --top-module tb_rfid_digital_core
./obj_dir/Vtb_rfid_digital_core
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`. A single
block is tested the same way, e.g.
`verilator --binary --timing --assert -y rtl rtl/rfid_pkg.sv tb/tb_crc_module.sv --top-module tb_crc_module`.
`rfid_pkg.sv` holds the shared constants, the request struct, the
controller state enum and a byte-wise CRC function. It must come first.
`tb_frame_encoder` overrides the delay to 300 cycles to stay short. All
other testbenches use the defaults.

To change the design:
- The memory size is `NUM_BLOCKS`; the ADC block is `ADC_BLOCK`.
- The response time is `DELAY_CYCLES`. Keep it at 4224 minus the six
  latency cycles if the decoder or controller pipeline changes.
- The receive tolerance is `RX_TOL`. Keep it below 64, or the windows of
  neighbouring codes overlap with the EOF window.
