# HIPERLAN/2 baseband modem with a programmable interface unit

This is a synthesizable HIPERLAN/2 (5 GHz wireless LAN) OFDM baseband modem. A
processor on an AMBA APB bus controls it through a small command program. The
processor does not drive the radio burst by burst. Instead it writes three things
into the modem's memories:

- a list of time-stamped commands, such as "transmit 12 long packets in QPSK 3/4 at
  slot 610" or "search for the broadcast preamble";
- the payload bytes;
- a few configuration words.

It then sets a run bit. The modem's interface unit carries out the commands against
its own slot counter, which counts 400 ns slots in a 2 ms MAC frame. It moves payload
bytes into the transmit chain and decoded bytes into the receive memory. It raises
interrupts for "synchronisation found", "end of receive" and "end of transmit".

The split follows the published architecture of this modem. Scheduling, frame
building and frame decoding run in processor software. Everything from scrambling
to the FFT is hardware, and so is the programmable unit that connects the two. This
repository holds the hardware part.

```
            APB  ┌──────────────────────────── modem_if ─────────────────────────────┐
 processor ─────►│ bus_if ─► command mem ─► cmd_translator ◄── slot_counter           │
                 │        ─► config mem     │  │  │    scr_init, irq_gen ──► irq     │
                 │        ─► tx data mem ─► addr_gen ─► bytes ──┐                     │
                 │        ◄─ rx data mem ◄─ addr_gen ◄─ bytes ──┼──┐                  │
                 └───────────────────────────┬──────────────────┼──┼──────────────────┘
                      start/flush/burst      │                  │  │
                 ┌───────── tx_path ─────────▼──────────────────▼┐ │   tx_i/tx_q
                 │ tx_ctrl → scrambler → conv_enc → puncturer →  │─┼──────────►
                 │ interleaver → mapper → pilot_insert → IFFT →  │ │
                 │ cp_insert                                     │ │
                 └───────────────────────────────────────────────┘ │
                 ┌───────── rx_path ───────────────────────────────┴┐
                 │ cp_remove → FFT → freq_eq(chan_est) → demapper → │◄── cfo_corr ◄── rx_i/rx_q
                 │ deinterleaver → depuncture → viterbi → descrambler│      ▲  (gated by IQ_EN)
                 └──────────────────────────────────────────────────┘      │ C
                 rx_sync (preamble search, re-times the slot counter) ─────┘
```

Everything runs in one clock domain. At the default parameters, one IQ sample is
taken or given every 5 clocks (20 MS/s at 100 MHz), and one slot is 40 clocks.

## The command program

This is the part of the design that differs most from an ordinary modem, so it gets
the most room here.

### Command word

Each command is one 32-bit word in the command memory:

| bits    | field  | meaning |
|---------|--------|---------|
| [31:28] | op     | 0 NOP, 1 TX, 2 TX_S, 3 TX_L, 4 RX, 5 RX_S, 6 RX_L, 7 IQ_EN, 8 RESET, 9 END, 10 BCH_SRCH, 11 CFG |
| [27:15] | slot   | slot number (0..4999) at which the command executes |
| [14]    | P1     | the burst carries a preamble |
| [13:11] | ptype  | packet type: 0 BCH, 1 FCH, 2 ACH, 3 SCH, 4 LCH, 5 RCH |
| [10:7]  | npkt   | number of packets (1..15) |
| [6:4]   | mode   | 0 BPSK 1/2, 1 BPSK 3/4, 2 QPSK 1/2, 3 QPSK 3/4, 4 16-QAM 9/16, 5 16-QAM 3/4, 6 64-QAM 3/4 |
| [3:0]   | arg    | IQ_EN: [0] on/off. END: [0] flush transmit, [1] flush receive |

Two commands use the fields differently:

- **RESET** uses [12:0] as the slot number to load when synchronisation is found, and
  [14:13] as the number of frames a BCH search may take (0 means no limit). It also
  resets the transmit and receive memory pointers to address 0.
- **BCH_SRCH** has no slot. It runs the preamble detector until a preamble is found or
  the frame limit runs out. When a preamble is found, the slot counter is loaded with
  the RESET slot number and the synchronisation interrupt is raised.

The burst size is `npkt × packet size`. Packet sizes are BCH 15, FCH 27, LCH 54, and
ACH/SCH/RCH 9 bytes.

The preamble is chosen as follows:

- none when P1 is clear;
- the long preamble (short training + long training, 16 µs) for TX_L, RX_L and any
  BCH burst;
- otherwise the short preamble (long training only, 8 µs).

### How a command executes

`cmd_translator` fetches word `pc` and waits until the slot counter equals the
command's slot. If the command needs a path that is still busy, it waits for that
path too. Then it acts and moves on to the next word. After `ncmd` commands it stops
and reports `halted`.

A transmit command starts `tx_path` with a burst description: mode, preamble,
number of bytes, and scrambler seed. `scr_init` makes the seed as `{1,1,1, frame
number}`.

`addr_gen` streams the payload from the transmit memory:

- bytes are read LSB byte first;
- every burst starts on the next 32-bit word boundary.

A receive command arms `rx_path`. The receive path takes the first valid input
sample after arming as the start of the burst. Decoded bytes go to the receive memory
with the same packing.

Sample timing:

- **Transmit:** the first sample leaves about 8 slots after the command's slot. The
  chain first fills its interleaver and IFFT buffers.
- **Receive:** decoding ends about 25 slots after the last sample of the burst. The
  receiver cannot be armed again before then. A receive command issued earlier waits,
  and misses the start of a burst that begins in that time.

### APB map

| address         | contents |
|-----------------|----------|
| 0x0000-0x00FC   | command memory, 64 words |
| 0x0100 CTRL     | [0] run, [14:8] number of commands |
| 0x0104 IRQ      | interrupt status; write 1 to clear |
| 0x0108 MASK     | interrupt enable |
| 0x010C STATUS   | [12:0] slot, [16] tx busy, [17] rx busy, [18] halted, [26:20] program counter |
| 0x0200-0x020C   | configuration memory: word 0 = frame number, word 1 = preamble-search energy threshold (copied into registers by CFG) |
| 0x1000-0x1FFC   | transmit data memory, 4 KB |
| 0x2000-0x2FFC   | receive data memory, 4 KB |

The bus has no wait states. An unmapped address returns 0 with PSLVERR. Interrupt
bits are [0] synchronisation, [1] end of receive and [2] end of transmit. Each bit is
sticky until cleared, and a new event wins over a clear in the same clock.

A minimal program that transmits one LCH in QPSK 3/4 at slot 20:

```
write 0x1000..0x1034  payload (54 bytes)
write 0x0000          {4'd1, 13'd20, 1'b1, 3'd4, 4'd1, 3'd3, 4'd0}   // TX, slot 20, P1, LCH, 1, QPSK34
write 0x0108          3'b100                                         // enable end-of-transmit
write 0x0100          (1 << 8) | 1                                   // one command, run
```

## Transmit chain

`tx_ctrl` forms the burst:

1. It asks `pilot_insert` for the preamble symbols.
2. It feeds the payload bits, LSB first, to the scrambler (x^7+x^4+1).
3. It appends 6 zero tail bits and zero pad bits up to a whole number of OFDM
   symbols. These bypass the scrambler, so the encoder ends in state zero.

The number of data symbols is ceil((8·bytes + 6) / N_DBPS).

The data then goes through these blocks:

- `conv_enc`: K = 7, generators 133/171.
- `puncturer`: rate 3/4 keeps a:110 and b:101. Rate 9/16 drops a at phase 4 and b at
  phase 8 of a 9-pair cycle. `punct_ctrl` holds the patterns.
- `interleaver`: the two-step HIPERLAN/2 permutation over one symbol's coded bits,
  ping-pong buffered.
- `mapper`: Gray BPSK/QPSK/16-QAM/64-QAM on levels ±1, ±3, ±5, ±7 times `AMP` = 512.
  The levels are not power-normalised.

`pilot_insert` then builds each 64-bin vector:

- 48 data carriers;
- pilots (1, 1, 1, −1) on carriers −21, −7, 7, 21, times a polarity sequence that
  restarts every burst;
- zero on DC and the guard carriers.

For training symbols it produces the short or long training vector instead.

`fft64` is one radix-2 butterfly per clock, so a 64-point transform takes 192
clocks. Stages 0-2 divide by two, so both the IFFT and the FFT scale by 1/8.

`cp_insert` sends each data symbol as its last 16 samples followed by all 64. It
sends a training symbol as a 32-sample guard followed by two copies. One sample leaves
per sample strobe, and a burst has no gaps.

A symbol lasts 400 clocks at the defaults. The slowest stage needs 288 clocks per
symbol (the interleaver in 64-QAM), so the chain keeps up in every mode.

## Receive chain

`cp_remove` frames the burst from the preamble kind and symbol count:

- it skips the short training field;
- it passes the first long-training copy to the FFT, tagged as training;
- it passes the 64 useful samples of each data symbol.

Two banks decouple the sample rate from the FFT rate. The `ovf` output reports a
symbol lost because both banks were full.

From the training symbol, `chan_est` stores H_k = Y_k·L_k, where L_k = ±1 is the
known training value.

`freq_eq` equalises without a divider. It outputs Z = Y·conj(H) and P = |H|² for each
data carrier. `demapper` compares Z with thresholds that are multiples of P:

- first bit of an axis: x > 0;
- 16-QAM second bit: |x| < 2P;
- 64-QAM: |x| < 4P and 2P < |x| < 6P.

This gives the same decision as dividing by H first.

The rest of the chain mirrors the transmitter:

- the deinterleaver;
- `depuncture`, which puts erasure flags where bits were deleted;
- a hard-decision Viterbi decoder (`viterbi`). It uses register exchange with a
  48-bit survivor depth and ends from state 0. Erased bits score zero.
- the descrambler, loaded with the same `{1,1,1, frame}` seed.

## Preamble search

`rx_sync` runs a delayed autocorrelation with a lag of 16 samples, the period of the
short training field. C is the sum of r(n)·conj(r(n−16)) over 16 samples, and E is
the matching energy. A preamble is found when Re C > ¾E and E > threshold hold for
48 samples in a row. The slot counter is then reloaded, so the receiving modem's slot
numbers line up with the sender's frame. The correlation C at that moment is held on
`corr_i/corr_q`.

## Frequency offset correction

A carrier offset of f turns per sample makes r(n) = s(n)·e^{j2πfn}. Over a 16-sample
lag, C therefore picks up an angle of 16·2πf. `cfo_corr` takes C when the preamble is
found. A vectoring CORDIC, one iteration per clock over 16 clocks, turns C into its
angle. One sixteenth of that angle is stored as `step`. Phases are 20-bit fractions
of a turn, so the unambiguous range is ±1/32 turn per sample (±625 kHz at 20 MS/s).

A phase accumulator advances by `step` at every sample strobe. It also runs while no
burst is being received, so it follows the offset's phase through the gaps between
bursts. Each received sample is rotated by minus the accumulator value, using an
unrolled 16-stage CORDIC. The CORDIC pre-rotates by half a turn when needed and
compensates its gain with a ×0.60725 multiply. The result is registered, so the
corrected samples reach `rx_path` one clock late. The accumulator restarts at zero
when a new estimate is loaded. The constant phase that leaves is removed by each
burst's channel estimate. Bursts sent without a preamble keep the previous estimate,
which holds because the phase never jumps.

The end-to-end testbench puts a random downlink offset of 1000 to 4000 units (20 to
76 kHz) on the access point to mobile link. The mobile's estimate comes within a few
units of it, and every downlink burst decodes.

## Where this design simplifies or departs

- **Each command is its own coded burst.** It carries its own tail bits and padding.
  In HIPERLAN/2, a train of packets across several commands is one coded stream. As a
  result, 12 LCH packets in QPSK 3/4 take 73 symbols here instead of 72. Schedules
  that pack bursts exactly into their slots need about one extra symbol per command.
- **The frequency offset is estimated once per BCH search.** It comes from the short
  training symbols only. It is not refined from the long training symbol or from
  pilots.
- **No fine timing.** The receive burst starts at the first sample after arming, so
  the two ends must agree on timing to within the cyclic prefix. Within a modem pair
  the slot counters provide that.
- **The channel estimate comes from one long-training copy.** Pilots are not used
  for phase tracking.
- **Hard decisions** are used in the demapper and the Viterbi decoder.
- **The receiver is not pipelined across bursts.** It cannot be re-armed until the
  previous burst is decoded (about 25 slots after its last sample).
- **BCH_SRCH only re-times the slot counter.** The broadcast burst it found is not
  decoded by the search. A following RX command receives the next burst.
- **The puncturing control sits in the data paths.** It is next to the puncturer and
  the depuncturer rather than inside the interface unit.
- **The final argument of every command is not modelled.** In the original command
  listings, each command ends with an extra argument whose meaning is not given.
- **Unspecified details are this design's own choices.** Three groups:
  - from HIPERLAN/2 practice: the scrambler polynomial, code, puncturing patterns,
    interleaver, pilot and training sequences, and the 400 ns slot;
  - the command word format, APB map and memory sizes;
  - the configuration word meanings and the interrupt mask/clear scheme.

Not included are the processor, its software (scheduler, frame builder, frame
decoder) and the radio. The radio's IQ samples and enable are top-level ports.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| h2_modem | CLKS_PER_SAMPLE | 5 | clocks per IQ sample |
| h2_modem, modem_if, slot_counter | CLKS_PER_SLOT | 40 | clocks per 400 ns slot |
| h2_modem, modem_if, slot_counter | SLOTS_PER_FRAME | 5000 | slots per 2 ms frame |
| tx_path, mapper, pilot_insert | AMP | 512 | size of one constellation level step |
| fft64 | SCALE_MASK | 6'b000111 | stages that divide by two |
| fft64 | W | 22 | internal word width |
| viterbi / rx_path | DEPTH / VIT_DEPTH | 48 | survivor length |
| rx_sync | PLATEAU | 48 | samples the detection condition must hold |
| cfo_corr | PW | 20 | phase word bits (2^PW per turn) |
| cfo_corr | ITER | 16 | CORDIC iterations |

Samples are 16-bit signed. A data symbol's time-domain peak stays well inside the
range at AMP = 512.

## Files

- `rtl/h2_pkg.sv` holds the shared enums (operations, modes, packet types, preamble
  kinds) and the structs for a command and a burst. It also has the packet-size,
  bits-per-carrier, rate and training-sequence functions.
- Every other `rtl/*.sv` file is one module named after the file.
- `tb/h2_ref_pkg.sv` is an independent reference model of the transmit bit chain
  (scrambler to constellation points) that the testbenches use.
- `tb/tb_<module>.sv` is the self-checking testbench of each module.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. With Verilator 5:

```
verilator --binary --timing -j 4 rtl/h2_pkg.sv tb/h2_ref_pkg.sv rtl/*.sv \
          tb/tb_viterbi.sv --top-module tb_viterbi -Mdir obj_viterbi
./obj_viterbi/Vtb_viterbi
```

Replace `viterbi` with any module name. `tb_h2_modem` is the end-to-end test. It runs
an access point and a mobile terminal at the default parameters, programmed over
APB, and joins them through a two-tap channel. The downlink also has a random
carrier frequency offset. The schedule is:

1. A broadcast burst with the long preamble, which the terminal finds with BCH_SRCH.
2. A frame-control burst with the short preamble.
3. A downlink train of SCH and LCH packets in QPSK 3/4.
4. Uplink bursts in 16-QAM and 64-QAM with short and long preambles.

It checks every received byte and the interrupt counts. It also counts the
mechanisms: every command type, every preamble kind, the synchronisation, the RF
gating, the flushes and the pointer reset. It also checks the mobile's frequency
offset estimate. It takes well under a minute.

The block testbenches compare against values computed independently in the
testbench:

- DFTs in real arithmetic;
- the reference bit chain;
- HIPERLAN/2 tables written out carrier by carrier;
- memory and register models.

They also check cycle counts where there is a rate to meet: one bit per clock in the
puncturer and interleaver, FFT latency, and sample pacing. `tb_tx_path` runs every
mode through the transmitter and compares the DFT of each transmitted symbol with
the reference constellation points. `tb_rx_path` sends every mode through a
frequency-selective channel and checks the decoded bytes.
