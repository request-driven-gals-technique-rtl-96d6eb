# Request-driven GALS infrastructure for an IEEE 802.11a baseband processor

A baseband processor for wireless LAN is a chain of large DSP pipelines.
These include the encoder, interleaver and IFFT in the transmitter, and the
synchronizer, FFT, channel estimator and Viterbi decoder in the receiver.
The data moves through them in bursts, with one OFDM symbol at a time, and
the chain is idle for long stretches in between. This design drops the
global clock tree. Each pipeline becomes a *locally synchronous* (LS)
island inside an *asynchronous wrapper*, and the islands talk to each other
over asynchronous 4-phase handshake channels. The result is a globally
asynchronous, locally synchronous (GALS) system.

The wrappers are **request-driven**. While a burst is arriving, the request
signal of the input channel is used directly as the island's clock, so every
incoming token clocks the pipeline exactly once. When the requests stop,
data is still inside the pipeline. A short time-out then starts a local ring
oscillator, which clocks the island just long enough to flush the pipeline.
After that the island has no clock at all until the next token arrives.
Idle blocks therefore cost no clock power, and no block needs a clock
synchronizer on its inputs.

This repository holds the RTL for everything that is not DSP:

- the wrapper;
- the interface blocks that connect wrappers with different token rates,
  with a feedback loop, and with synchronous neighbours;
- a built-in self-test (BIST) structure made for this kind of system;
- a top level, `gals_baseband`, that wires them into the transmitter and
  receiver of an 802.11a baseband.

The DSP pipelines are not included. Their clock, token-in and token-out
signals are ports of the top, so a real FFT or Viterbi decoder can be
plugged in. The testbench plugs in small models instead.

## The asynchronous wrapper

`async_wrapper` is the heart of the design and the part that needs the most
care to understand. It has four parts:

- `aw_input_port`;
- `aw_timeout_detect`;
- `aw_local_clock_gen` with its `ring_oscillator`;
- `aw_output_port`.

### The two clock sources

The LS clock is

    lsb_clk = req_clk | (osc & local_mode)
    req_clk = req_in & ~local_mode & ~hold

`local_mode` decides which source owns the clock.

- **Request-driven mode** (`local_mode = 0`): every rising edge of the
  input request is a clock edge, and `lsb_in_valid = 1` tells the pipeline
  that this edge carries a new token. The acknowledge is the granted
  request (`ack_in = req_clk`). The sender sees it right after the edge
  and releases the request, which ends the clock pulse. The clock's high
  time is therefore the handshake's request-to-acknowledge loop, and its
  period is the sender's token period.
- **Local mode** (`local_mode = 1`): the ring oscillator drives the
  clock. `lsb_in_valid = 0` tells the pipeline that these edges carry no
  new data and only move what is already inside.

### Time-out

A flop named `pending` is set by every request edge. It means "there may be
data in the pipeline". While `pending` is set and no request arrives, the
oscillator runs and `aw_timeout_detect` counts its cycles. After
`TIMEOUT_CYCLES` idle cycles (default 3), `local_mode` is set on a falling
oscillator edge.

Two to three cycles is the usual choice for this technique:

- a shorter time-out may fire on mere jitter between two tokens of one
  burst;
- a longer one adds latency at the end of every burst.

The time-out is counted in oscillator cycles, not in request cycles, because
no requests arrive while it runs. The oscillator's period is set to the
nominal token period of the channel.

### Flush

In local mode the generator gives exactly `LOCAL_CYCLES` clock cycles, as
many as the pipeline has stages. Then it clears `pending`, and the
oscillator stops at its next low phase. Any new request edge restarts the
count. So after the last token, the island always receives one full
pipeline depth of cycles and then falls silent.

### Hand-over

A request can arrive in the middle of the flush. It is not acknowledged at
once. On the next falling oscillator edge, `local_mode` is cleared because
`req_in` is high. The oscillator is low at that moment, so `lsb_clk` is low
as well. The pending request then passes through `req_clk` and makes a
clean rising edge. The current local cycle is always completed before the
hand-over, and the two clock sources are never active together. This
mutual exclusion comes from changing `local_mode` only in the oscillator's
low phase; there is no separate arbiter element.

Because the flush count restarts, the remaining flush cycles are not lost.
They run after the new burst ends.

### Output port and pausing

The output port works on both edges of the LS clock:

- it registers the island's output token on the rising edge;
- it raises `req_out` on the falling edge, once the data has settled (the
  bundled-data rule);
- the receiver's acknowledge clears `req_out` asynchronously.

The output channel is busy from the rising request until the acknowledge
has fallen again (`hold = req_out | ack_out`). During that time the island
must not produce another token. The wrapper enforces this in two ways:

- in local mode, `hold` stops the oscillator, so the clock simply pauses;
- in request-driven mode, a new input request is not granted (not used
  as a clock and not acknowledged) until the output handshake has
  finished.

Waiting for the acknowledge to fall matters with a slow receiver. A request
raised while the acknowledge is still high would be swallowed by the
flop's asynchronous clear.

`lsb_out_ready = ~hold` tells an island that can wait, such as a rate
adapter, whether it may present a token on the next edge. A second output
port can be added with `ext_hold`. The Rx_3 island uses this for its
feedback output.

One case needs a special path: a paused generator whose input request is
already waiting. Here `local_mode` is cleared asynchronously
(`hold & req_in & ~osc`), and the request takes over as soon as the output
is free.

### Timing summary

| Event | Edge / condition |
|---|---|
| LS data sampled | rising `lsb_clk` |
| output request raised | falling `lsb_clk` |
| `local_mode` set / cleared | falling oscillator edge (or asynchronous clear while paused) |
| input acknowledged | same time as the request-driven clock edge |
| time-out | `TIMEOUT_CYCLES` oscillator cycles with `pending` set and no request |
| flush length | `LOCAL_CYCLES` local cycles, counted from the last request edge |

## Channels

Every channel between blocks is a 4-phase bundled-data channel:

1. The sender sets the data.
2. It raises `req`.
3. The receiver raises `ack`.
4. The sender drops `req`.
5. The receiver drops `ack`.

The data must be stable from the rising request until the acknowledge.

There are two ways to connect a synchronous neighbour:

- **Synchronous producer to wrapper** (`clk_req_gate`): the producer's
  clock, gated by its valid flag through a latch, becomes the request. A
  request pulse appears in the low clock phase of each cycle that carries
  data, while that data is stable.
- **Wrapper to synchronous consumer** (`pipeline_sync`, used as Tx_int and
  Rx_int): tokens are written into a small FIFO with the request, and the
  Gray-coded write pointer crosses into the consumer clock through
  `SYNC_STAGES` flip-flops. The consumer gets one word per clock. More
  stages give more robustness at the cost of latency.

## Transmitter

    Tx_1 (80 MHz, synchronous) --clk_req_gate--> Tx_2 --8 tokens--> Tx_3 --> Tx_int --> DAC (20 MHz)

- **Tx_1** is outside the top: input buffer, scrambler, signal-field
  generator, encoder, interleaver and mapper. It runs on the external
  80 MHz clock and hands over one word per cycle.
- **Tx_2** collects the 64 words of one OFDM symbol at 80 Msps in a
  `token_rate_adapter` (two-burst buffer), using request-driven clocks.
  After the time-out, its 20 MHz local clock sends the symbol as 8 tokens
  of 8 words (128 bits each). The adapter sends only when a complete burst
  is present and the output port is free. Pilot insertion is part of the
  Tx_2 pipeline and is not included.
- **Tx_3** is the IFFT island and is outside the top. It receives its 8
  tokens as 8 request-driven clock edges. After the time-out its wrapper
  gives it 72 local cycles (`TX3_LOCAL`), during which it accepts no input.
  8 + 72 = 80 cycles produce the 80 samples of a symbol: 64 samples plus a
  16-sample guard interval.
- **Tx_int** moves the samples into the 20 MHz DAC domain.

## Receiver and its token ring

    ADC --clk_req_gate--> activation interface --+--> Rx_1 (tracking)
                                                 +--> join --> Rx_2 --> Rx_TRA --> Rx_3 --> Rx_int --> MAC
                                                       ^                            |
                                                       +---------- FIFO_TA <--------+ (feedback)

- **Activation interface** (`activation_interface`): a token multiplexer
  at the receiver input. Samples go to Rx_1, the tracking synchronizer,
  until Rx_1 reports `sync_found`. From then on they go to Rx_2 until Rx_2
  reports `frame_done`. The selection changes only on the falling edge of
  the input request, so a request is never cut. Most of the time only the
  small Rx_1 island is clocked.
- **Join** (`async_join`, built around a `c_element`): Rx_2's input
  channel is the join of the sample channel and the feedback channel from
  FIFO_TA. A joined token exists only when both inputs have one, so each
  sample is paired with its feedback word. Rx_2 drives `rx2_fb_en`.
  Without feedback the join passes samples alone, which is needed at the
  start of a frame when there is no feedback yet.
- **Rx_TRA** (a wrapper with a `token_rate_adapter`): collects 64-word
  bursts at Rx_2's 20 Msps rate and passes them to Rx_3 at 80 Msps.
- **Rx_3** is the decoder island and is outside the top. It has two output
  ports:
  - the decoded data, which goes to the MAC through Rx_int;
  - the re-encoded decisions, which go back through **FIFO_TA**
    (`fifo_ta`), an asynchronous FIFO.

  FIFO_TA is written with Rx_3's feedback request and read with the join's
  acknowledge. It answers the write handshake at once, so the feedback
  never stalls Rx_3. The joined flow therefore runs at the 20 Msps rate of
  the samples.

The backward path is a separate asynchronous flow. The loop
Rx_2 → Rx_TRA → Rx_3 → FIFO_TA → join → Rx_2 is a token ring whose latency
varies. The join makes it safe: feedback can never overtake or lose its
alignment with the samples.

## Built-in self-test

A tester drives a plain synchronous interface (`bist_clk`, `bist_start`,
`bist_test_sel`, `bist_num_words`) and reads `bist_done` and `test_ok`.

- **Pattern generators** (`bist_tpg`, TPG0..4) are Galois LFSRs (16 bits,
  x^16+x^14+x^13+x^11+1) with a 4-phase output channel. Started by the
  controller, a generator can first send a periodic preamble-like pattern
  and then `num_words` random words. The preamble is needed because the
  receiver beyond Rx_1 only opens after synchronization. When selected, a
  generator replaces the normal source of one channel. TPG0 drives Tx_1's
  input and also has an `init` output for the transmitter.
- **Data extractors** (`bist_tde`, TDE0..10) watch the channels. On each
  rising request (or acknowledge, for FIFO_TA's output), an extractor
  folds the data into a 32-bit signature register (CRC-32 polynomial) and
  counts the token. It samples only on handshake events, never on a clock,
  so the signature does not depend on how the wrappers' clocks happened to
  line up.
- **Controller** (`bist_cbc`) runs on the tester clock. It clears the
  extractors, starts the selected generators, and waits until they are
  done plus a settle time for the pipelines to flush. It then compares
  every enabled signature with the expected value on the `exp_sig` inputs
  and sets `test_ok`. A run that does not finish within `MAX_CYCLES`
  reports failure.

| Test | Source | Extractors | Loop |
|---|---|---|---|
| global | TPG0 at Tx_1 | all | Tx_int output fed into the receiver input |
| transmitter | TPG1 at Tx_2 | TDE1-4 | off |
| receiver | TPG2 at receiver input | TDE5-10 | off |
| receiver feedback loop | TPG3 at Rx_TRA input | TDE6-10 | off |
| Rx_3 | TPG4 at Rx_3 input | TDE7, 8, 10 | off |

Extractor positions:

| TDE | Position |
|---|---|
| 0 | Tx_1 input |
| 1 | Tx_2 input |
| 2 | Tx_2→Tx_3 |
| 3 | Tx_3 output |
| 4 | DAC samples |
| 5 | receiver input |
| 6 | Rx_TRA input |
| 7 | Rx_3 input |
| 8 | Rx_3 feedback |
| 9 | FIFO_TA output |
| 10 | Rx_3 decoded output |

The expected signatures depend on the DSP content of the islands, so the
tester supplies them.

## Top level ports

`gals_baseband` brings out the following, all plain signals:

- for each island: its LS clock, the input-token valid flag and data, the
  output-token valid flag and data, and the output-ready flag. Tx_3 has an
  8-word input token; Rx_2 has a `{feedback, sample}` input and the
  `rx2_frame_done` / `rx2_fb_en` controls. Rx_1 has `rx1_sync_found` and
  its own output channel; Rx_3 has a second (feedback) output;
- the external clocks: Tx_1's 80 MHz clock, the DAC, ADC and MAC clocks,
  and the tester clock;
- the BIST interface;
- `local_mode[5:0]` (Tx_2, Tx_3, Rx_1, Rx_2, Rx_TRA, Rx_3) and
  `act_datapath` for observation.

The main parameters and their defaults:

| Parameter | Default |
|---|---|
| `TIMEOUT_CYCLES` | 3 |
| `TX_BURST_WORDS` | 64 |
| `TX_TOKEN_WORDS` | 8 |
| `TX3_LOCAL` | 72 |
| `TX2_LOCAL` | 17 |
| `RX1_LOCAL` | 16 |
| `RX2_LOCAL` | 16 |
| `RXTRA_LOCAL` | 129 |
| `RX3_LOCAL` | 64 |
| `FIFO_TA_DEPTH` | 16 |
| `INT_DEPTH` | 16 |
| `SYNC_STAGES` | 2 |
| 20 MHz oscillator half period | 25 ns |
| 80 MHz oscillator half period | 6.25 ns |

Words are 16 bits (`gals_pkg::DATA_W`).

## How far to trust it, and where it departs from the original design

**Verified in simulation:**

- Each block has a self-checking testbench.
- Each testbench fails when a deliberate fault is put into its block.
- `tb_gals_baseband` runs the whole top at its default parameters:
  - the token traffic of a 100-byte frame at 54 Mbps in both directions;
  - on the transmit side, 5 symbols (SIGNAL + 4 data) checked sample by
    sample at the DAC, with 8 request edges and 72 local cycles of Tx_3 per
    symbol;
  - on the receive side, a 720-sample frame (16 µs preamble + 5 symbols).
    Rx_1 tracks the first 40 samples. Rx_2 forwards the 64 words of each
    symbol. The 320 words are checked one by one at the MAC, and the
    feedback words are checked at Rx_2;
  - a passing and a deliberately failing BIST transmitter test, whose
    expected signatures the testbench computes on its own;
  - the local Rx_3 BIST test, run twice against signatures computed in
    the testbench. It passes both times although the free-running local
    clocks start from different phases;
  - a global BIST run through the internal loop.
- It also counts every mechanism and requires each to occur at least
  once: time-out and flush in all six wrappers, hand-over, pausing,
  activation in both directions, FIFO_TA traffic and the loop.

**Limits of the simulation:**

- Simulation is zero-delay: a handshake completes within one time step,
  and the ring oscillator is a behavioural model with a fixed period.
- Hazards that depend on real gate delays cannot show up. Examples are a
  request arriving just as the oscillator rises, or the bundling delay
  between data and request. Check them with timing analysis, or with gate
  delays, on the real netlist.
- Synthesis tools report the handshake loops as combinational loops, and
  the latches in `c_element`, `clk_req_gate` and the oscillator as latches.
  Both are expected. Each module's header explains them.

**Departures and own choices:**

- The locally synchronous DSP functions are not implemented: IFFT, FFT,
  channel estimation, Viterbi decoding, pilot insertion, the tracking
  synchronizer and so on. The top exposes their wrapper signals instead.
- Waiting for a busy output port is added to the wrapper so that no token
  is ever overwritten. This covers both the paused clock and the withheld
  input request.
- Clock mutual exclusion is obtained by changing `local_mode` only in the
  oscillator's low phase. There is no separate mutex element.
- The flush counter restarts with every request. "No valid token in the
  pipeline" is approximated as "`LOCAL_CYCLES` cycles since the last
  token"; nothing tracks which stages actually hold data. End-of-burst
  marker tokens are not used.
- Token widths, FIFO depths, local cycle counts other than Tx_3's 72, the
  LFSR polynomial and seeds, and the signature scheme are this design's
  choices.
- The preamble pattern of the generators is a stand-in, not the real
  802.11a short preamble.
- The assignment of TPG1-4 and TDE0-10 to channels follows the positions
  described above. It is a reasonable reading, not a verified copy.
- Rx_3's oscillator is set to 80 MHz, the rate at which Rx_TRA delivers
  data. The decoder could run as slowly as 54 Msps; lower its oscillator
  with `OSC80_HALF_PS` only if the LS logic allows it.
- `pipeline_sync` is a Gray-pointer FIFO with a synchronizer chain. It is
  not necessarily the exact pipeline-synchronization circuit that the
  original chip used.

## Simulating

Everything is plain SystemVerilog, so verilator 5 can build each testbench
directly. From the repository root:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
        -y rtl -y tb +libext+.sv -Irtl -Itb \
        --top-module tb_gals_baseband rtl/gals_pkg.sv tb/tb_gals_baseband.sv
    ./obj_dir/Vtb_gals_baseband

Each testbench ends with the line `TB_RESULT checks=<n> failures=<m>`. The
top-level run takes a few seconds.

| Testbench | Covers |
|---|---|
| `tb_async_wrapper` | the wrapper and its parts with a 4-stage pipeline model: time-out delay, flush count, stop, short gaps, hand-over, pausing and held-off requests with a slow receiver |
| `tb_async_join` | the C-element join, with and without input B |
| `tb_fifo_ta` | FIFO_TA order, fill and empty behaviour |
| `tb_activation_interface` | token steering in both directions |
| `tb_token_rate_adapter` | burst collection, packing and back-pressure |
| `tb_pipeline_sync` | the asynchronous-to-synchronous crossing |
| `tb_bist_tpg` | generator patterns against a reference LFSR |
| `tb_bist_tde` | signatures against a reference |
| `tb_bist_cbc` | the controller's test table, compare and time-out |
| `tb_gals_baseband` | the complete top, as described above |

Notes on writing your own testbench:

- The simulator has two states (no X). All flops use asynchronous resets,
  so start with `rst_n = 1`, then drive it low and high again. A reset
  that starts low has no falling edge and resets nothing.
- Models of the LS islands should present their output through registers
  updated on the clock edge. Two wrapper clock pulses can fall into the
  same time step.

## Files

- `rtl/gals_pkg.sv`: shared widths, test codes and the signature step.
- `rtl/async_wrapper.sv`, `rtl/aw_*.sv`, `rtl/ring_oscillator.sv`: the
  wrapper.
- `rtl/c_element.sv`, `rtl/async_join.sv`, `rtl/fifo_ta.sv`,
  `rtl/activation_interface.sv`, `rtl/token_rate_adapter.sv`,
  `rtl/pipeline_sync.sv`, `rtl/clk_req_gate.sv`: interface blocks.
- `rtl/bist_tpg.sv`, `rtl/bist_tde.sv`, `rtl/bist_cbc.sv`: BIST.
- `rtl/gals_baseband.sv`: the top.
- `tb/`: one testbench per block, plus the top-level test.
