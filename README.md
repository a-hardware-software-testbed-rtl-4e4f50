# OFDM hardware/software testbed: baseband board FPGA logic

This is the FPGA logic of a baseband board that connects a PC to a 2.4 GHz radio front-end. The
board lets an OFDM receiver be developed in two halves:
- The PC runs the parts still being designed as C/C++ models.
- The FPGA runs the parts already written in HDL.
- Samples travel between the two in UDP packets over Ethernet.

A typical use is an equaliser. Its algorithm is first checked in software on FFT outputs captured
by the board. The HDL equaliser then runs on the board, and its outputs are compared with the
software model's on the same received frames.

The RTL here covers everything on the FPGA except the 8051-class microcontroller, which is taken
as an existing core and sits on a simple register bus:

```
            MII                 clk_sys (16 MHz)                 clk_bb (20 MHz)
 PHY <==========> eth_mac <--> dma_ctrl --> async_fifo (Tx) --> playout_ctrl --> DA (12 bit)
                               ^   |   <-- async_fifo (Rx) <-- capture_ctrl <--+
            MCU bus -----------+   |                                           | RX_SRC
            (8051)  --> spi_master --> RF front-end                            |
                                      AD (12 bit) --> ofdm_sync --> fft64 --> ls_equalizer
                                          |_____________________|_______________|
```

`baseband_board` is the top. It has two clock domains:
- `clk_sys` (16 MHz): the MCU, the DMA and the MAC.
- `clk_bb` (20 MHz): the converter clock, and the clock of the baseband logic under test.

They meet only in the two dual-clock sample FIFOs and in two toggle handshakes that start a
capture or a playback.

## How a session runs

The PC is the client and the board the server. Every exchange is a request followed by a reply.
- **PC to radio.** The PC sends a UDP packet of baseband samples. The MAC checks the frame's CRC.
  The MCU reads the 42-byte header (Ethernet 14 + IPv4 20 + UDP 8) from a header buffer. The DMA
  has already moved the payload into the Tx FIFO. The MCU then starts a playback: `playout_ctrl`
  sends one FIFO word per converter clock to the DA converter.
- **Radio to PC.** The PC asks for samples. The MCU starts a capture of `CAP_LEN` words from one
  of three sources, chosen by `CFG.RX_SRC`:
  - raw AD samples;
  - FFT output, for software equalisation on the PC;
  - output of the hardware equaliser, to check it against the software one.

  The MCU writes a header for the reply and starts a send. The DMA streams the header, then the
  Rx FIFO words. The MAC pads the frame, appends the CRC and transmits.

A FIFO word is one complex sample, `{I[15:0], Q[15:0]}`. On the wire it is 4 bytes, MSB first, I
before Q. AD samples are sign-extended from 12 bits. The DA takes the low 12 bits of each half.

### MCU register map (`bus_addr`, 8-bit data, combinational read)

| addr | name | bits |
|---|---|---|
| 0x00 | CTRL (write) | [0] send, [1] arm receive, [2] capture, [3] playback, [7] clear flags |
| 0x01 | STATUS | [0] TX_BUSY [1] TX_DONE [2] TX_ABORT [3] RX_DONE [4] RX_GOOD [5] RX_ARMED [6] CAP_BUSY [7] RX_OVF |
| 0x02 | CFG | [0] FULL_DUPLEX (reset 1), [2:1] RX_SRC: 0 AD, 1 FFT, 2 equaliser |
| 0x03 | HDR_LEN | header bytes sent before the payload (reset 42) |
| 0x04/05 | TX_WORDS | FIFO words in the next send (low, high) |
| 0x06/07 | RX_BYTES | payload bytes of the last received frame |
| 0x08/09 | CAP_LEN | words per capture |
| 0x0A/0B | Rx FIFO fill | |
| 0x0C/0D | PLAY_LEN | words per playback |
| 0x0E | STATUS2 | [0] PLAY_BUSY |
| 0x40-0x7F | header buffers | write: transmit header; read: header of the last received frame |
| 0x80-0x82 | SPI master | DATA, CTRL ([0] chip select, read [7] busy), DIV |

A received payload is cut to the UDP length field (bytes 38-39 minus 8). This keeps the Ethernet
padding of short frames out of the Tx FIFO.

## The receive chain under test

This is the part of the board that does signal processing, and the part where most of the design
decisions lie.

### Frame format

Frames follow the IEEE 802.11a layout at 20 MS/s:

| part | samples |
|---|---|
| short training | 10 × 16 |
| guard | 32 |
| long training symbols LT1, LT2 | 2 × 64 |
| SIGNAL | 80 |
| data symbols (16-QAM) | 22 × 80 |
| gap before the next frame | 411 |

Each SIGNAL and data symbol is a 16-sample cyclic prefix followed by 64 samples. A frame with its
gap is 2571 samples. The 64 subcarriers hold the 802.11a long-training values ±1 on bins −26..26
except DC (`lts_value` in `testbed_pkg`).

### Frame synchroniser (`ofdm_sync`)

The synchroniser has to find the exact sample where LT1 starts. Every later symbol boundary
follows from that.

**Correlator.** Each incoming sample is correlated with the 64-sample time-domain long training
symbol:
- The reference is only the signs of its real and imaginary parts.
- So the correlator has no multipliers: 64 signed additions per component, across a 64-sample
  shift register.
- The signs are computed at elaboration as the inverse DFT of the ±1 training values.

**Detection.** The squared magnitude `|c|^2` is compared with `52 * E`, where `E` is a running sum
of `|x|^2` over the same 64 samples. This is a normalised correlation above 0.81, so it does not
depend on the signal level. Typical normalised values:
- an aligned training symbol: about 1.3;
- noise: a few hundredths;
- the window that ends at the end of the guard: about 0.33.

That last window needs care. The guard is the second half of the training symbol, so half of that
window matches. A lower threshold made the design lock exactly one symbol early in testing.

**Timing decision.** After a crossing, the largest metric of the next 8 samples is taken as a
candidate peak. The candidate is accepted only if the metric also crossed the threshold 63 to 65
samples earlier. A 73-bit history of crossings keeps that record. An accepted candidate is
therefore the end of LT2, and the LT1 peak is what confirms it. A false or early candidate just
returns the search, and the LT2 peak still follows.

**Buffering and output.**
- Samples are written continuously into a 2048-entry circular buffer, so LT1 is still stored when
  the decision is made.
- From LT1 onwards, 2 × 64 + 23 × 80 = 1968 samples are kept.
- The 25 symbols are then read out as 64-sample blocks with the cyclic prefixes skipped. Each
  block is tagged `SYM_LT1`, `SYM_LT2` or `SYM_DATA`.
- Read-out is paced by the FFT's `in_ready`.

**Limits.**
- While a frame is being read out, new samples are not searched. The FFT needs 320 clocks per
  64-sample symbol, so frames that arrive during that time are skipped. The board works on
  captured frames, not on a continuous stream.
- Carrier frequency offset is neither estimated nor corrected.

### FFT (`fft64`)

A memory-based 64-point radix-2 decimation-in-time FFT:
1. It loads 64 samples in bit-reversed order.
2. It runs 6 stages of 32 butterflies, one butterfly per clock.
3. It outputs bins 0..63 in natural order, tagged with the symbol's kind.

Details:
- Each stage halves its results with rounding, so the output is DFT/64 and cannot overflow 16 bits.
- Twiddles are Q1.14 values computed at elaboration with `$cos`/`$sin`.
- A symbol takes 320 clocks from its first sample in to its last bin out.
- `in_ready` is high only while loading.

### LS equaliser (`ls_equalizer`)

The channel estimate for each subcarrier is the least-squares estimate H = Y_LT / X_LT, taken from
the two received training symbols. Each data value is then divided by it, X = Y / H.

Because X_LT is ±1, the equaliser stores S = (Y_LT1 + Y_LT2) · X_LT, which is twice the estimate
(64 entries of 18-bit complex values). For SIGNAL and data values it computes:

```
X = Y · conj(S) · 2 / |S|^2
```

The pipeline:
- two multiply stages;
- two pipelined restoring dividers, one for the real part and one for the imaginary part;
- a latency of 19 clocks in total.

Output properties:
- The output has `OUT_FRAC` = 12 fraction bits, so a unit constellation point reads 4096.
- It saturates.
- Bins with no training energy (DC and the guard bins) output 0.
- Only SIGNAL and data values produce output. Training values only update the estimate.

Accuracy is limited by the FFT. Its output is DFT/64, so a subcarrier of a frame at a moderate
level carries only some tens of LSBs. LT1 and LT2 are identical samples, so their rounding errors
are identical too, and averaging the two does not reduce them. The rounding error of the estimate
therefore sets the error floor. It is largest on subcarriers that the channel weakens, a few
percent of a constellation step there.

The formula, in the paper this design is based on, is printed as a product. The sentence before
it asks for the least-squares estimate of the transmitted data, which is the division built here.

## Ethernet MAC (`eth_mac`)

The MAC runs at 10 Mb/s on MII, clocked by `clk_sys`. The two MII clocks are synchronised and
their falling edges are detected. At 16 MHz that gives six or more system clocks per nibble.

**Transmit (`eth_mac_tx`).** The whole frame is first loaded into a 2048-byte buffer, so that a
collision can restart it. The MAC then:
1. waits for carrier sense to drop, plus a 96-bit gap;
2. sends preamble, SFD, data, padding to 60 bytes and the CRC-32;
3. on a collision, sends a 32-bit jam and backs off r × 512 bit times, with r uniform below
   2^min(n,10) and drawn from an LFSR;
4. gives up after 16 attempts (`tx_abort`).

**Receive (`eth_mac_rx`).** It hunts for the SFD and removes the FCS through a 4-byte delay line.
A frame is flagged good when:
- the CRC residue is correct;
- no `rx_er` was seen;
- it has whole bytes;
- it is at least 64 bytes long.

The board's link is full duplex (the `FULL_DUPLEX` CFG bit, set at reset). Clearing that bit
enables carrier sense and collision handling.

## Other blocks

- `async_fifo`: dual-clock FIFO, 4096 × 32 bits by default.
  - Gray-code pointers with two-flop synchronisers.
  - Show-ahead read data, and fill counts on both sides.
  - A whole reference frame with its gap (2571 words) fits.
- `capture_ctrl`: on a toggle from the clk_sys side, writes the next `CAP_LEN` valid words of the
  selected source into the Rx FIFO. Words that meet a full FIFO are counted in `dropped`, because
  a converter cannot be stalled.
- `playout_ctrl`: on a toggle, reads `PLAY_LEN` words to the DA converter, one per clock. Clocks
  where the FIFO is empty are counted as underruns and output zero.
- `spi_master`: SPI mode 0, 8-bit, MSB first, for the RF front-end's registers.
  - The SCLK half period is DIV+1 system clocks.
  - A byte takes 17 × (DIV+1) clocks.
  - Chip select is under MCU control, so multi-byte writes are possible.
- `dma_ctrl`: the register file, the header buffers and the two byte-stream engines between MAC
  and FIFOs (see the register map above).
- `testbed_pkg`: frame constants, `cplx_t`, `sym_kind_e`, the training table and a byte-wise
  CRC-32.

## Where this departs from the original testbed, and what is missing

- The MCU, Ethernet PHY, converters and RF front-end are outside the FPGA logic. Their signals are
  ports of `baseband_board`.
- The original system offers SPI *or* I2C for the radio. Only SPI is built.
- The original's baseband transmit module under test is not specified, so the transmit path plays
  host samples straight to the DA converter.
- Things that are this design's own choices:
  - the register map;
  - the capture and playback mechanism;
  - the raw-sample capture mode;
  - the MAC's link speed;
  - the FIFO depth;
  - the synchroniser's method;
  - the FFT architecture;
  - all internal widths.
- The synchroniser skips frames while busy and does no frequency-offset correction.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops through a watchdog if it hangs. The package has to
be compiled first:

```
verilator --binary --timing -Irtl -y rtl rtl/testbed_pkg.sv tb/tb_baseband_board.sv \
          --top-module tb_baseband_board -o sim && obj_dir/sim
```

What the testbenches cover:
- `tb_baseband_board`: the whole board at its default sizes, in about 2 ms of simulated time. The
  testbench plays the MCU, the PC (Ethernet frames on MII), the PHY, the SPI device and the radio.
  The radio side is full time-domain 802.11a-style frames through a 3-tap multipath channel. The
  run covers:
  - SPI configuration;
  - a host packet played to the DA converter;
  - a corrupted packet that is rejected;
  - a raw capture sent back;
  - an equaliser-mode capture, while the DMA stalls on the empty FIFO; the 16-QAM points are
    checked to within 6 % after the equaliser;
  - an FFT-mode capture of LT1, checked to ±3;
  - a collision with a resend in half duplex;
  - an Rx FIFO overflow.

  It counts each of these and fails if one never happened.
- `tb_frame_workload`: the reference frame workload on the whole board.
  - A full frame is equalised, and all 1472 subcarrier values (SIGNAL plus 22 data symbols) go
    back in four 368-sample UDP packets. Every value must decode to its 16-QAM point. The mean
    error is about 1 % of full scale.
  - The frame with its gap (2571 raw samples) goes back in seven packets as a gap-free run of the
    AD stream.
- `tb_ofdm_sync`: six frames with noise between them and a stalling consumer. It checks every
  output sample and tag.
- `tb_fft64`: the FFT against a direct DFT.
- `tb_ls_equalizer`: the equaliser against a floating-point model.
- `tb_eth_mac`: frames both ways, CRC, padding, deferral under carrier sense, and collisions with
  jam, backoff and resend.
- The remaining blocks are tested against their own behaviour models.
