# Burst-mode 2 x 6.25 Gb/s 8b/10b transceiver

An optically switched network connects a sender to a receiver only for the
length of a burst. Between bursts the link is dark, so a receiver must find
bit and word alignment again at the start of every burst. It also has no
reason to burn power while nothing is sent. This RTL is a transceiver PHY
built for that case. It follows the burst-mode protocol proposed in
"Power Optimized Transceivers for Future Switched Networks":

* 10 Gb/s of payload is carried on two lanes (two wavelengths) of
  6.25 Gb/s each.
* Each lane uses 8b/10b line code.
* A 10:1 serializer works from a 625 MHz word clock, built only from CMOS
  shift registers.
* The link has three states: reset (dark), preamble and data.

While nothing is sent, the coders are frozen and the lasers get all-zero
words.

## How a burst looks on the line

The same sequence goes out on every lane, one 10-bit word per 625 MHz clock:

```
  zeros ... | K28.7 x 8 | packet 1 ... K29.7 | [K28.5 fill] packet 2 ... K29.7 | zeros ...
   reset       preamble          data                   data                  reset
```

* **Reset.** The transmitter's encoders hold their inputs, and their running
  disparity (RD) is forced to negative. The serializers get `0000000000`.
* **Preamble.** `PREAMBLE_WORDS` (8) copies of K28.7 are sent.
  * K28.7 has zero disparity, so the RD-negative form `0011111000` repeats
    unchanged. It gives the clock recovery circuit many transitions.
  * It also holds a comma, `0011111`, that marks word boundaries.
  * Eight words are 80 bits, the alignment budget this design targets.
* **Data.** Client words are striped over the lanes, byte *i* to lane *i*.
  * Each packet ends with K29.7 on every lane.
  * A packet already waiting follows at once, in the same burst, with no
    new preamble. The 8b/10b code stays DC balanced across packets, so no
    re-training is needed.
  * If the client stalls in the middle of a packet, K28.5 fill is sent. The
    receiver drops it.
  * After a K29.7 with nothing waiting, the transmitter returns to reset.

Clients may therefore not send K28.5, K28.7 or K29.7 as data characters.
Other K characters, for example K23.7, pass through.

Code words are written `abcdei fghj`, with `a` in bit 9. Bit 9 is sent first.

## Receive lane

Each lane runs on the clock recovered from its own signal (`rx_clk_ser[i]`):

```
sin -> 1:10 shift register -> polarity -> comma align -> 8b/10b decode -> lane FIFO
                                   \-> PRBS-7 check (test mode)
           rx_burst_ctrl: reset / preamble / data, loss of signal, error handling
```

The lane's own state machine (`rx_burst_ctrl`) mirrors the transmitter:

* **Reset.** The aligner is cleared and the decoder is held. The first
  non-zero word moves the lane to preamble.
* **Preamble.** The aligner runs and the decoder stays off. Every aligned
  K28.7 word sets the decoder's RD to negative. The first aligned word that
  is neither preamble nor zeros starts data, and is decoded.
* **Data.** The aligner is frozen. Each character is written to the lane's
  bonding FIFO, tagged:
  * `sop` on the first character of a packet;
  * `sob` on the first character after a preamble;
  * an end mark (`eop`) for K29.7.

  After K29.7 the lane goes back to preamble, where the next packet or more
  preamble can follow.

### Word alignment on a repeated K28.7

`comma_align` joins the previous and current 10-bit words into a 20-bit
window. It searches all ten offsets for `0011111` and selects the word at
the locked offset. Details:

* Only the positive comma is searched. A train of `0011111000` words also
  contains the inverse comma `1100000`, five bits away, which would make the
  offset ambiguous. The transmitter therefore always sends the preamble at
  negative RD.
* Lock is declared after `LOCK_COMMAS` (4) commas at one offset. The lane
  aligns within the 8-word preamble, after at most 5 words in the tests.
* Once locked, a comma at another offset only starts a candidate count. The
  offset moves after 4 commas in a row there. A bit error that forms a false
  comma therefore does not break lock, while a new burst from another sender
  still re-aligns within its preamble.

### Errors, resynchronisation and loss of signal

A code or disparity error returns the lane to preamble, as an end of packet
does. Stopping there would leave the lane out of step with its partners, so
the design adds the following rules:

* The bad word is dropped, and an end mark closes the cut packet in the lane
  FIFO.
* The lane then ignores data until it sees a preamble word or a raw K29.7
  word, so it never resumes in the middle of a packet.
* K29.7 keeps RD unchanged, and its two forms (`1011101000` / `0100010111`)
  show which RD follows it. The decoder's disparity is reloaded from it, so
  the next packet in the burst decodes cleanly.
* `LOS_WORDS` (8) all-zero words in a row mean the light is gone. The lane
  returns to reset from any state.

## Channel bonding

The lanes reach the receiver with different delays and on different
recovered clocks. `chan_bond` gives each lane its own asynchronous FIFO and
reads one entry from every lane at once, only when all lanes have one. The
skew is thus held in the FIFO fill levels: up to about 10 words (100 bits)
with the default 16-entry FIFOs.

Lanes can fall out of step after an error or a late lock. Before each read,
the heads of the lane FIFOs are compared, and these rules apply in order:

1. If some lane FIFO is nearly full (4 entries from full) while another is
   empty, the non-empty lanes' heads are discarded. A lane that waits to
   resynchronise therefore cannot make the others overflow.
2. If some heads are end marks and others are not, the others are discarded.
   This finishes a packet that one lane cut short.
3. If all heads are end marks, the packet ends.
4. If some heads carry `sob` and others do not, the others are discarded:
   they are stale data from before the burst.
5. The same is done for `sop`: a lane that missed a packet's start loses
   that packet on all lanes.
6. Otherwise the heads form one output word.

One holding register delays the output by one word. The end mark, which
carries no data, then becomes the `rx_last` flag on the packet's final word.
A last asynchronous FIFO crosses to the client's receive clock.

## Transmit lane

`tx_burst_ctrl` reads the transmit FIFO (client clock to word clock) and
drives the encoders and a per-lane word select (zeros / preamble / encoder).
The select is delayed to meet the encoder's one-clock latency.

Each lane (`tx_lane`) has:

* an encoder;
* a bit-slip stage that delays the stream by 0-9 bits (`tx_slip_en`,
  `tx_slip`, for testing the receiver's alignment) or bypasses it;
* the 10:1 shift-register serializer.

`ser_clkdiv` divides the serial clock by 10 into the word clock. It also
gives the serializer its load pulse in the middle of each word, so that the
parallel data is stable when it is taken.

## Clocks, reset and ports

| clock | use |
|---|---|
| `tx_clk_ser` | transmit serial clock (6.25 GHz), from the transmit PLL |
| `tx_pclk` (output) | `tx_clk_ser`/10, transmit word clock (625 MHz) |
| `rx_clk_ser[i]` | recovered serial clock of lane *i*, from its clock and data recovery circuit |
| `rx_clk_core` | channel-bonding read side; must be at least the word rate |
| `tx_clk`, `rx_clk` | client clocks |

`rst_n` is one active-low asynchronous reset for all domains. Assert it with
a real falling edge. The word-clock flops run on clocks divided inside the
design, so they see no clock edge while those dividers are held in reset;
the asynchronous edge is what clears them.

Client side:

* Transmit: `tx_valid`/`tx_ready` handshake, `tx_data[15:0]`, `tx_k[1:0]`
  (one K flag per byte), `tx_last`.
* Receive: `rx_valid`/`rx_ready` handshake, `rx_data`, `rx_k`, `rx_sop`,
  `rx_last`.

Status outputs give per-lane state, alignment and offset, code errors, end
of packet, deskew discards, FIFO levels and the PRBS checkers' lock and
error counts (`rx_prbs_en` selects PRBS mode).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `LANES` | 2 | lanes (wavelengths); the bonding logic is written for any number |
| `PREAMBLE_WORDS` | 8 | K28.7 words per burst (80 bits) |
| `LOCK_COMMAS` | 4 | commas at one offset for word lock |
| `LOS_WORDS` | 8 | zero words that mean loss of signal |
| `FIFO_ADDR_W` | 4 | log2 of every FIFO's depth |

The lane rate and the 10:1 ratio are fixed by the structure: 10-bit words
and the `RATIO` parameter of the serializer, deserializer and divider.

## What is not here

These parts are analog or hand-made circuits, with no logic to write:

* the clock and data recovery circuit;
* the transmit and receive PLLs;
* current-mode-logic (MCML) multiplexer trees and their level converters;
* laser drivers and optical front ends.

Their clocks and serial data are ports of the top. The proposed 6.25 Gb/s
configuration needs no MCML stage at all. The 64B/66B coder that appears
beside 8b/10b in the source's block diagrams is the alternative it compares
against, not part of this design.

## Where this design chooses for itself

The source fixes these points:

* the lane rate and ratio;
* 8b/10b with a dual 16-bit client interface;
* the three burst states and what happens in each;
* a single zero-disparity preamble word;
* alignment within 80 bits (4 frames);
* return to preamble on an end of packet or an invalid word;
* one FIFO per lane for bonding;
* the chains of blocks in the transmitter (FIFO, encoder, bit slip) and the
  receiver (polarity, comma align with PRBS check beside it, decoder, FIFO,
  loss of synchronisation).

This RTL adds its own choices where the source is silent:

* the characters (K28.7 preamble, K29.7 end, K28.5 fill);
* the positive-comma-only aligner with hysteresis;
* the length of loss of signal;
* the error resynchronisation;
* all channel-bonding rules and tags;
* FIFO depths;
* the bit order;
* the PRBS polynomial (PRBS-7, x^7 + x^6 + 1);
* the behaviour of bit slip and polarity as static user controls;
* the client handshake.

Two divider stages are drawn in the source's diagrams. Here they are one
divide-by-10, because the proposed configuration has no MCML stage to
feed.

## Testbenches

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog:

| testbench | what it checks |
|---|---|
| `tb_enc_8b10b`, `tb_dec_8b10b` | code words and RD against the standard tables; round trip; code and disparity errors |
| `tb_async_fifo` | order, full/empty and levels with unrelated clocks |
| `tb_ser_clkdiv`, `tb_piso_ser`, `tb_sipo_deser` | word clock period and duty, load position, bit order, one word per 10 bits |
| `tb_tx_bitslip`, `tb_rx_polarity` | all slip values, bypass, inversion, one-clock latency |
| `tb_comma_align` | lock at every offset within the preamble, data after lock, restart, enable |
| `tb_prbs_check` | lock time, clean stream, single-bit errors, all-zero line |
| `tb_tx_burst_ctrl` | preamble length and RD, striping, K29.7, shared bursts, fill, return to reset, latency |
| `tb_rx_burst_ctrl` | states, tags, fill, mid-packet and first-word errors, resync via K29.7, loss of signal |
| `tb_chan_bond` | skew 0-6 words, cut packets, stale lanes, missed starts, overflow relief, back-pressure, rate |
| `tb_burst_xcvr_top` | whole transceiver at default parameters, looped back |

The end-to-end test, `tb_burst_xcvr_top`, covers:

* lanes skewed by 3 and 28 bits;
* bit slip on both lanes;
* inverted polarity on one lane;
* one injected bit error;
* PRBS mode.

It counts every mechanism (bursts, shared bursts, fill, loss of signal,
alignment and re-alignment, invalid words, deskew discards, skew, end of
packet, PRBS lock) and fails if any never happens. The recovered clocks
there are the transmit serial clock itself, an ideal clock recovery.
Packets are checked word for word, except in the error phase, where only
recovery is checked.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/xcvr_pkg.sv tb/tb_burst_xcvr_top.sv --top-module tb_burst_xcvr_top
./obj_dir/Vtb_burst_xcvr_top
```

## Limits

* The design was simulated only with ideal recovered clocks. A real clock
  recovery circuit has lock time and jitter; its lock time must fit in the
  preamble together with the 4 alignment commas, or `PREAMBLE_WORDS` must
  grow.
* A lane's FIFO is written on its recovered clock. If that clock stops
  mid-burst, entries already written wait until the next burst's
  start-of-burst rule discards them.
* After an error the cut packet reaches the client shortened and marked
  `rx_last`. Nothing marks it as damaged, so upper layers must check
  integrity.
