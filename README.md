# A transparent link protocol for free-space optical terminals

Two terminals talk over a laser beam, full duplex. The beam carries only one
serial bit stream in each direction. There is no second channel for a clock or
for flow control. The optical receiver also has a problem of its own. Its
preamplifier removes the DC part of the photodiode current, so a long run of
equal bits looks like "no signal". The link may also fade, or take bursts of
errors, at any time.

This RTL implements the physical-layer transceiving protocol described in
*Protocol design for free space optical communication* (Zhao, Wang, Sun, Guo).
It hides the optical link behind two FIFOs:

- on the sending terminal, the user writes bytes into an 8-bit FIFO;
- on the far terminal, the same bytes come out of an 8-bit FIFO, in order.

Everything else is done by the protocol: coding, serialising, finding the bit
and word boundaries again, checking the stream, and telling the other
terminal to stop and restart when something goes wrong.

The key ideas:

* **4B6B line code.** Every byte becomes two 6-bit code words: the high nibble
  first, then the low nibble. The code keeps the optical power close to
  balanced. No more than 5 equal bits ever follow each other.
* **The power-modify word `111000`.** With nothing to send, the transmitter
  sends `111000` over and over. This keeps the average power constant, and it
  is also the pattern the far receiver locks its word boundaries onto.
* **Command words.** Two more 6-bit words, *stoprec* and *startrec*, let each
  receiver tell the far transmitter to stop or resume user data.
* **A stream filter.** It judges every received word and shuts the
  receive path off as soon as the stream looks wrong.

## Contents

| file | block |
|---|---|
| `rtl/fso_pkg.sv` | code table, command words, shared types |
| `rtl/fso_protocol.sv` | **top**: one terminal = transmitter + receiver |
| `rtl/fso_transmitter.sv` | transmitting protocol |
| `rtl/tx_clock_gen.sv` | bit / word / byte timing of the transmitter |
| `rtl/async_fifo.sv` | dual-clock FIFO (transmit buffer 8x1014, receive buffer 9x1014) |
| `rtl/encoder_4b6b.sv` | byte fetch and 4B6B coding |
| `rtl/register_group.sv` | selects the next word: data code, command or `111000` |
| `rtl/output_mng.sv` | output manager: decides what goes out in each 6-bit slot |
| `rtl/serializer.sv` | parallel to serial, MSB first |
| `rtl/fso_receiver.sv` | receiving protocol |
| `rtl/rx_clock_gen.sv` | bit recovery by 4x oversampling, word counter |
| `rtl/deserializer.sv` | serial to parallel: sliding window and aligned word |
| `rtl/streamfilter.sv` | lock on `111000`, error detection, decode enable |
| `rtl/decoder_6b4b.sv` | word pairs to bytes, error entries |
| `rtl/exception_handle.sv` | receiver state to stoprec / startrec / stoptrans |

Each `tb/tb_<module>.sv` is a self-checking testbench for that module.
`tb/tb_recfifo.sv` tests `async_fifo` in its receive-buffer configuration.

## The line format

One bit is sent every `OVS` = 4 cycles of the transmitter clock. A word is 6
bits, sent MSB first. A byte is two words, so 12 bit periods.

| nibble | code | nibble | code | nibble | code | nibble | code |
|---|---|---|---|---|---|---|---|
| 0 | 001011 | 4 | 010110 | 8 | 100110 | C | 110010 |
| 1 | 001101 | 5 | 011001 | 9 | 101001 | D | 110100 |
| 2 | 010011 | 6 | 011010 | A | 101010 | E | 100010 |
| 3 | 010101 | 7 | 100101 | B | 101100 | F | 011101 |

| word | meaning |
|---|---|
| `111000` | power-modify (idle and synchronisation) |
| `001100` | stoprec command: "stop sending me user data" |
| `110011` | startrec command: "I can receive user data" |
| anything else | invalid, counts as an error |

The published description fixes only `111000`. It shows `011101` on the line
while a stream of `0xFF` is received, so that code is used for F. The rest of
the table is this implementation's choice, made by these rules:

- 14 of the codes have three ones, and E and F are complements of each other,
  so the line stays close to DC balance.
- No data or command word is a bit rotation of `111000`. The receiver locks
  onto four `111000` words in a row, six bits apart. A stream that repeats one
  word can only match that test if the word is `111000` itself. So user data
  can never pull the receiver onto a wrong word boundary.
- The longest run of equal bits, over every pair of words, is 5 (for example
  `001011` followed by `111000`).

## Transmitter

```
 dataclk domain          clkin domain
 ───────────────┐  ┌────────────────────────────────────────────────────────────┐
 datain,wrreq ──┼─►│ async_fifo ─q─► encoder_4b6b ─codregh/l─► register_group ─►│ serializer ─► dataout
 fifofull    ◄──┼──│   8 x 1014        ▲ fetchclk, hon/lon        ▲ regcon       │
                │  │                   └──────── output_mng ──────┘              │
                │  │ stoptrans, stoprec, startrec ──► (2-flop sync) output_mng    │
                │  │ tx_clock_gen ──► bit/word/byte ticks, clk12 ──► to receiver  │
                └──┴────────────────────────────────────────────────────────────┘
```

The three clocks of the transmitter (bit, word = 6 bits, byte = 12 bits) are
made as single-cycle enables on `clkin`, so the whole transmitter has one
clock domain. `clk6` (word) and `clk12` (byte) are also put out as square waves.
The receiver uses `clk12` (see below).

In each 6-bit slot:

1. At the end of bit 2 of the word on the line, the **output manager**
   picks the next word, in this order:
   1. the low code of a byte whose high code was just sent, so a byte is
      never split;
   2. a pending stoprec command;
   3. a pending startrec command;
   4. the high code of the next byte, if user data is allowed;
   5. otherwise `111000`.
2. The register group latches the choice one cycle later. This is before the
   coder, which has just been told that its code was taken, can load the next
   byte over it.
3. The serializer starts the new word after bit 5.

User data is allowed only when two things hold:

- **The local receiver is healthy.** The last request it made was startrec,
  not stoprec.
- **The far receiver is ready.** `stoptrans` is low.

The published description says that a stoprec request stops the local user
data and sends the stoprec command.

The coder fetches a byte only when both of its code registers are empty. So
the FIFO is read exactly once per byte sent. A byte that is waiting while the
link is stopped simply waits; nothing is dropped on the sending side.

## Receiver

```
 serial_in ─► 2-flop sync ─► rx_clock_gen ─bit_tick/word_tick─► deserializer
                                 ▲ align                         │ pdmnt (window, every bit)
                                 │                               │ pdata (word, every 6th bit)
                                 └──────────── streamfilter ◄────┤
                                          fifoen │ frameindi      ▼
                               exception_handle ◄┴──────── decoder_6b4b ─► async_fifo 9 x 1014 ─► rdata_out[8:0]
                                  │  ▲ transclk12                                   (rdclk_ex domain)
                   stoptrans, stoprec, startrec ─► local transmitter
```

### Recovering bits

The two terminals run from separate oscillators. The receiver samples the
line once per cycle of its own `clkin`, which has about the same frequency as
the far transmitter's. That gives 4 samples per bit.

- A phase counter restarts at every edge on the line.
- The bit is taken two cycles after the edge, in the middle of the bit.
- With no edge, the counter keeps running, so a run of equal bits is timed by
  the local clock.

With runs of at most 5 equal bits and a 3 % frequency offset, the sampling
point drifts by less than 0.7 of a cycle before the next edge re-phases it.
The margin is 2 cycles.

### Finding words: the stream filter

The deserializer gives the stream filter two views of the line:

- `datamoni`: the last 6 bits, after every bit;
- `pldata`: the aligned word, after every sixth bit.

The stream filter has three states:

| state | decoder and FIFO | leaves on |
|---|---|---|
| HUNT (no word phase) | off | 4 × `111000`, six bits apart, at any phase → pulse `align`, go to SYNCED, clear all flags |
| SYNCED | on; `frameindi` marks each word | an invalid word → `sper` (short-term error), go to ERR |
| ERR | off | 4 aligned `111000` in a row → SYNCED, clear flags; 16 invalid words with no `111000` between them → `dser` (long-term error), go to HUNT |

In SYNCED and ERR the filter keeps hunting for `111000` at every bit
position. Four of them in a row at a *different* phase mean the word boundary
has slipped. The filter then sets `syncer`, moves the word phase there, and
goes to ERR.

`align` makes the clock generator restart its word counter, so that the next
bit sampled is bit 0 of a word. The published description gives these points:

- the flag names;
- that short-term and long-term errors shut off the decoder and FIFO;
- that a long-term error is error data arriving with no power-modify signal;
- that the flags are cleared when synchronisation is regained.

These are this implementation's choices: the thresholds (4 and 16, both
parameters), the exact states, and reading `syncer` as "alignment slipped".

### Decoding

Two data words in a row form one byte. It is written to the receive FIFO as
`{0, byte}`. Power-modify and command words are not written. Two cases write
one **error entry** `{1, 8'h00}`:

- an invalid word;
- a high nibble whose low nibble never arrived.

This lets the reader of the FIFO see where data was lost. The protocol has no
retransmission.

## The recovery handshake

This is the part that ties the two terminals together. Take terminal B
receiving from terminal A.

1. B's stream filter sees an error. B's decoder and FIFO stop at once.
2. B's exception handler asks B's transmitter for a *stoprec*. B's
   transmitter stops its own user data and sends the stoprec word.
3. A's receiver decodes the stoprec word and raises `stoptrans`. A's
   transmitter finishes the byte it is sending, then sends only `111000`.
4. B's stream filter sees the `111000` words. It regains the word phase or,
   after a slip, finds the new one. Then it clears its flags.
5. B's exception handler asks for a *startrec*. B's transmitter resumes and
   sends the startrec word. A's receiver drops `stoptrans`, and A resumes.

Two other triggers work the same way:

- **A long-term error.** B's `stoptrans` also rises, so B stops sending too.
- **B's receive FIFO nearly full.** The threshold is `AFULL_MARGIN` = 32
  entries before full. Data is stopped before any byte is dropped.

Commands can be lost on a bad link, so the exception handler repeats the
current request every `CMD_PERIOD` = 16 byte periods.

At power-up both terminals follow the same path:

- every receiver starts in HUNT;
- every transmitter starts with data blocked and `stoptrans` high;
- the idle `111000` streams bring both receivers into lock;
- the startrec words then open both directions.

### Crossing from receiver to transmitter

The receiver and transmitter of one terminal run from two outputs of the same
PLL: same frequency, any phase. The three requests cross between them like
this:

- The transmitter gives its `clk12` (12-bit byte clock) to the receiver.
- The receiver resynchronises `clk12` and changes its three outputs only just
  after a rising edge of it.
- It holds a stoprec or startrec request for exactly one `clk12` period.
- The transmitter resynchronises the three signals with two flops and samples
  them once per byte period, just before the next rising edge. So it sees
  each request exactly once.

## Interface of the top, `fso_protocol`

| port | dir | width | meaning |
|---|---|---|---|
| `tx_clk`, `rx_clk` | in | 1 | transmitter and receiver clocks (two PLL outputs, same frequency) |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `input_fifo_clk`, `input_fifo_wrreq`, `input_data` | in | 1,1,8 | write port of the transmit FIFO |
| `input_fifo_full` | out | 1 | transmit FIFO full; writes are ignored |
| `output_fifo_clk`, `output_fifo_rdreq` | in | 1,1 | read port of the receive FIFO |
| `output_data`, `output_data_err` | out | 8,1 | entry read; valid the cycle after `rdreq`; `err` = lost or corrupted data |
| `output_fifo_empty` | out | 1 | receive FIFO empty |
| `serial_to_LD` | out | 1 | line to the laser driver (LVDS pad outside) |
| `serial_from_pin` | in | 1 | line from the limiting amplifier (LVDS pad outside) |
| `rx_sync`, `rx_sper`, `rx_syncer`, `rx_dser` | out | 1 each | receiver status: word phase known, short-term error, slip, long-term error |

| parameter | default | meaning |
|---|---|---|
| `OVS` | 4 | clock cycles per bit; the receiver oversamples by this factor |
| `TX_FIFO_DEPTH` | 1014 | transmit FIFO words (size from the published design) |
| `RX_FIFO_DEPTH` | 1014 | receive FIFO entries |
| `AFULL_MARGIN` | 32 | receive FIFO reports "full" this many entries early |
| `SYNC_WORDS` | 4 | `111000` words in a row needed to lock or to end an error |
| `LONG_ERR_WORDS` | 16 | invalid words with no `111000` between them that count as a long-term error |
| `CMD_PERIOD` | 16 | byte periods between repeated startrec / stoprec requests |

**Rates.** The line carries `f_clk / OVS` bit/s and `f_clk / (12·OVS)` bytes/s.
The repeated startrec word takes about one slot in 32. At 50 MHz that is
12.5 Mbit/s on the line and 8.3 Mbit/s of user data. The published system
reports 40 Mbit/s. With `OVS` = 4 this needs a 160 MHz clock for 40 Mbit/s on
the line, or 240 MHz for 40 Mbit/s of user data. A lower `OVS` is possible,
but 2 leaves little margin for the ±3 % clock offsets.

## How far it follows the published design

**Taken from the published design:**

- the block split and names of both sides;
- the FIFO interfaces and the 8 × 1014 transmit FIFO;
- the 9-bit receive entries with an error bit;
- 4B6B coding of the two nibbles;
- `111000` as idle and synchronisation word;
- the stoprec / startrec / stoptrans / clk12 signals and their roles;
- the recovery sequence;
- the flag names `sper`, `syncer`, `dser`.

**This implementation's own choices, where the description gives none:**

- the code table apart from F, and the two command values;
- the bit order;
- `OVS` and the oversampling bit recovery (the original picks one of several
  PLL clock phases);
- all thresholds, and the periodic repetition of commands;
- the early-full margin of the receive FIFO;
- the coder / output-manager handshake (`take_h`, `take_l`);
- the enable-based clocking;
- the reset.

**Not built:**

- The original receiver clock generator chooses among numbered global clock
  phases. This RTL does not model that.
- The stream filter's `sync` and `sync1` outputs are not built, because their
  function is not described. Its `syncindi` output is built: it is `rx_sync`.
- Some inputs drawn at the exception handler (`fifoemp`, `syncer`, `recclk`)
  and at the decoder (`erbindi`) are not used. The handler's requests follow
  from `fifoen`, `dser` and the early-full flag of the receive FIFO.
- The PLL is vendor IP; `tx_clk` and `rx_clk` come in as ports.
- The analog parts are not modelled: LVDS pads, laser driver, photodiode,
  transimpedance and limiting amplifiers, optics.

## Verification

Every testbench checks its results itself. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. Run one with plain
Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/fso_pkg.sv tb/tb_fso_protocol.sv --top-module tb_fso_protocol -o sim
./obj_dir/sim
```

`tb_fso_protocol` is the system test. It uses the default parameters and
links two terminals back to back in full duplex:

- terminal A at 50 MHz;
- terminal B first at 51.67 MHz, then at 48.44 MHz (+3.3 % and −3.1 %);
- random user data both ways.

It covers these cases:

- start-up;
- a throughput check against the line capacity;
- a receiver that stops reading, so that 2500 bytes back up through both
  FIFOs, with none lost;
- a noise burst (`sper`);
- 60 words of a dark line (`dser`);
- a 2.5-bit delay step (`syncer`).

After each error the link must recover by itself, and the next 300 bytes must
arrive exactly. The test counts every mechanism and fails if one never
happened. It runs in about 10 s.

The block testbenches check, among other things:

- the exact FIFO capacity of 1014;
- the code table;
- the slot priority of the output manager;
- bit recovery with ±3 % offset and edge jitter;
- every state change of the stream filter;
- the timing of the requests relative to `clk12`.
