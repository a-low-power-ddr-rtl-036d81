# DDR edge-coded signaling link with BCH(15,7) error correction

A single-wire, low-power serial link where the receiver recovers no clock.
The information is not in voltage levels. It is in **how many transitions**
the line makes in a burst. Bursts are separated by short silences. The
transmitter toggles the line on both the rising and the falling edge of its
clock (double data rate, DDR). The receiver counts the transitions with a
local clock of the same frequency and any phase.

Each 7-bit message is protected by a BCH(15,7) code that corrects up to two
bit errors. Before it goes on the line, the codeword is reshaped so that it
needs as few transitions as possible:

- inversion of the whole word when it holds more ones than zeros;
- inversion of each 4-bit segment that holds more than two ones;
- index coding: a segment is sent as its number of ones plus the positions of
  those ones, not as four bits.

The top module `ddr_ecs_link` holds the transmitter `ddr_ecs_tx` and the
receiver `ddr_ecs_rx`. The wire between them is outside the top: `tx` is the
transmitter's line and `tx_in` the receiver's, and the environment connects
them.

## Data path

```
data_in[6:0] -> BCH encoder -> 15 -> '0' padding -> 16 -> global inversion check
  -> 4 x (segment processor + index encoder) -> packet former -> TX FSM + toggle counter -> tx
tx_in -> edge detector -> pulse counter -> packet controller -> data decoder -> 16
  -> drop padding -> 15 -> BCH decoder -> data_out[6:0]
```

## The frame on the line (the part to understand first)

One message becomes one frame of up to 13 numeric **fields**, always sent in
this order:

| phase | fields | value range | meaning |
|---|---|---|---|
| 0 | GF | 0..1 | whole 16-bit word was inverted |
| 1 | SF0..SF3 | 0..1 | segment k (bits 4k+3:4k) was inverted |
| 2 | NOI0..NOI3 | 0..2 | number of ones left in segment k |
| 3 | IDX0..IDX3 | 0..5 | positions of those ones; **not sent** when NOI_k = 0 |

A field of value N is sent as **N+1 transitions**, one per half clock period.
A value of 0 still makes one transition, so every field that is sent can be
seen. Each field is followed by `ALPHA_CYCLES` clock cycles of silence. The
receiver knows the NOI values before the indices arrive, so it knows which
Index fields will be missing.

Index codes:

- NOI = 1: the bit position of the single one (0..3).
- NOI = 2: the number of the pair, in the order
  {0,1}=0, {0,2}=1, {0,3}=2, {1,2}=3, {1,3}=4, {2,3}=5.

After both inversions a segment never holds more than two ones. So no field
needs more than 6 transitions.

Worked example. Message 0x55 encodes to codeword 0x55E5, and the padded word
is 0x55E5.

- It has 9 ones, so GF = 1 and the word becomes 0xAA1A.
- Segments from bit 0 upward: 1010, 0001, 1010, 1010. None has more than two
  ones, so SF = 0,0,0,0.
- NOI = 2,1,2,2.
- IDX = 4 (pair {1,3}), 0, 4, 4.
- On the line this is 33 transitions in 13 bursts. At the default
  `ALPHA_CYCLES = 4` it takes 100 transmitter cycles.

### Transmitter timing

`ecs_tx_fsm` has four states: `S_IDLE`, `S_LOAD`, `S_TRANSMIT` and
`S_WAIT_ALPHA`.

- `S_LOAD` looks up the edge count of the current (phase, segment) in the
  packet former. A count of 0 marks an absent Index field: the FSM goes
  straight to the gap. Otherwise it starts the toggle counter.
- `S_TRANSMIT` waits while the toggle counter is busy.
- `S_WAIT_ALPHA` waits `ALPHA_CYCLES` cycles. It then loads the next segment,
  or the first segment of the next phase. After phase 3, segment 3 it returns
  to `S_IDLE`.
- Phase 0 has a single field, so it starts at segment 3.

`toggle_counter` sends E edges in ceil(E/2) cycles. It has a rising-edge flop
and a falling-edge flop, and the line is their XOR. Each cycle, the
rising-edge logic toggles its own flop. It also arms the falling-edge flop
when a second edge is due in that cycle.

Frame length, in transmitter cycles:

    sum over the 13 fields of (1 + ALPHA_CYCLES)
      + sum over the fields that are sent of (ceil((N+1)/2) + 1)

With the default gap this is 83 to about 117 cycles, 94 on average for random
messages.

`ddr_ecs_tx` takes a message when `data_valid && data_ready`. `data_ready` is
low while a message is in the encoder, waiting for the FSM or being sent.

### Receiver

- `ecs_edge_detector` samples the line on the falling and on the rising edge
  of the receiver clock. It reports how many transitions (0..2) fell in each
  cycle.
- `pulse_counter` adds these up. A field ends after `GAP_CYCLES` (default 2)
  cycles without a transition, and the counter reports N = transitions - 1.
  `GAP_CYCLES` must be less than the silence between fields, which is
  `ALPHA_CYCLES` + 1 transmitter cycles.
- `rx_packet_fsm` stores the fields in transmission order and skips the Index
  fields of segments with NOI = 0. It pulses `pkt_valid` when the last expected
  field arrives.
- `data_decoder` rebuilds each segment from its NOI and index, then undoes the
  segment inversion and the global inversion.
- Latency: `data_out_valid` rises at the (`GAP_CYCLES` + 5)th receiver rising
  edge after the first one that follows the frame's last transition. That is
  one cycle in the edge detector, `GAP_CYCLES` + 1 in the pulse counter, one
  in the packet controller and three in the BCH decoder.

The receiver assumes two things about its clock:

- It runs at the transmitter's frequency. The phase may be anything that keeps
  line transitions away from its clock edges; the testbench uses a quarter
  period.
- The line idles low after reset.

Frequency offset between the two clocks is not handled: a receiver clock
that slips by half a period over one burst would miscount that burst.

## BCH(15,7)

The code is over GF(2^4), with primitive polynomial x^4 + x + 1. Its
generator is

    g(x) = x^8 + x^7 + x^6 + x^4 + 1   (0x1D1)

It is systematic, c(x) = x^8·m(x) + (x^8·m(x) mod g(x)). The message sits in
codeword bits 14:8 and the parity in bits 7:0. Bit i is the coefficient of
x^i.

**`bch15_7_encoder`** is the LFSR of g(x), unrolled over the 7 message bits.
It encodes one message per clock, with a registered output one cycle later.

**`bch15_7_decoder`** is a three-stage pipeline. Its latency is 3 cycles for
every input, and it accepts a word every cycle.

1. Syndromes: S1 = r(α) and S3 = r(α^3).
2. Error locator Λ(x) = 1 + Λ1·x + Λ2·x², with Λ1 = S1 and
   Λ2 = (S3 + S1³)/S1. S1 = S3 = 0 means no error.
3. Chien search over all 15 positions in parallel: bit i is flipped when
   Λ(α^-i) = 0.

If the number of roots does not match the degree of Λ, or if S1 = 0 while
S3 ≠ 0, the word is passed on unchanged and `uncorrectable` is set. When both
syndromes are zero, the stage 2 registers keep their old values. The
correction logic therefore does not switch on error-free traffic, and only the
syndrome stage works on every word. Every
pattern of three errors is detected (the minimum distance is 5). In the
decoder test about 60 % of them set `uncorrectable`; the rest decode to a
wrong codeword. That cannot be avoided when a 3-error word lies within distance 2 of another codeword.

Example: 0x55E5 with bits 13 and 2 flipped (error pattern 0x2004) is received
as 0x75E1. The decoder returns 0x55E5, error vector 0x2004 and message 0x55.

The GF(2^4) arithmetic is in `ecs_pkg`:

- `gf_mul`: shift-and-add multiplication reduced by x^4 + x + 1;
- `gf_alpha_pow`: powers of α (1,2,4,8,3,6,C,B,5,A,7,E,F,D,9);
- `gf_log`: the discrete logarithm (F,0,1,4,2,8,5,A,3,E,9,7,6,D,B,C for
  0..F, with F standing for the undefined log of 0);
- `gf_inv`: inverse as α^(15 − log a).

## Ports of the top, `ddr_ecs_link`

| port | dir | width | |
|---|---|---|---|
| clk_tx, clk_rx | in | 1 | transmitter and receiver clocks, same frequency |
| rst_n | in | 1 | asynchronous active-low reset of both sides |
| data_in, data_valid, data_ready | in, in, out | 7, 1, 1 | message input with valid/ready handshake |
| err_pattern | in | 15 | XORed onto the codeword before it is sent, to inject test errors; tie to 0 |
| tx | out | 1 | line out |
| tx_busy | out | 1 | transmitter FSM not idle |
| tx_in | in | 1 | line in |
| data_out, data_out_valid | out | 7, 1 | corrected message, one pulse per frame |
| corrected_codeword, error_vector | out | 15 | corrected codeword and the bits the decoder flipped |
| err_detected, uncorrectable | out | 1 | syndrome non-zero; more than two errors detected |

Parameters: `ALPHA_CYCLES` (default 4) and `GAP_CYCLES` (default 2).

## How far it follows the source description, and where it is its own

These parts follow the description:

- the code polynomials;
- the 7 → 15 → 16-bit path;
- the inversion thresholds (W > 8, W_k > 2);
- index coding with one field per segment;
- the field order GF, SF, NOI, Index;
- N+1 transitions per field on both clock edges;
- the four FSM states and their conditions;
- syndromes S1/S3, a closed-form key equation and a Chien search;
- a fixed decoder latency.

These are this design's own choices:

- the numbering of the pair codes;
- skipping Index fields for empty segments, which is our reading of the FSM's
  "pulse count = 0" path;
- the move from the last segment of one phase to the next phase;
- the gap lengths `ALPHA_CYCLES`/`GAP_CYCLES`;
- the whole receiver front end (edge detector, pulse counter, packet
  controller), of which the description gives only the names;
- one-cycle encoder latency and a three-stage decoder;
- the valid/ready handshake and the reset behaviour;
- the test error-injection input.

Known departures and limits:

- **Throughput.** The source quotes 10–53.5 Mb/s at 30 MHz. This design, at
  the default gap, carries one 16-bit word per about 94 cycles: 5.1 Mb/s of
  coded word, or 2.2 Mb/s of message, at 30 MHz. How the quoted figure is
  counted is not known. Shortening `ALPHA_CYCLES` (it must stay above
  `GAP_CYCLES`) raises the rate.
- **No resynchronisation.** A burst lost or miscounted on the line shifts all
  later frames until reset.
- **No clock-gating cells.** The decoder is inactive by default: for a
  clean word its locator registers are not loaded, so the key-equation and
  Chien-search logic stay still. Actual clock gating is left to the
  implementation flow.

## Files

`rtl/`:

- `ecs_pkg.sv`: shared types (`seg_code_t`, `ecs_packet_t`, `tx_state_t`),
  GF(2^4) and nibble functions;
- `bch15_7_encoder.sv`, `bch15_7_decoder.sv`: the BCH code;
- `global_inversion_check.sv`, `segment_processor.sv`, `noi_index_encoder.sv`
  and `ecs_data_encoder.sv` (which combines them): the transmit-side
  optimiser;
- `packet_former.sv`, `ecs_tx_fsm.sv`, `toggle_counter.sv`, `ddr_ecs_tx.sv`:
  the transmitter;
- `ecs_edge_detector.sv`, `pulse_counter.sv`, `rx_packet_fsm.sv`,
  `data_decoder.sv`, `ddr_ecs_rx.sv`: the receiver;
- `ddr_ecs_link.sv`: the top.

`tb/`:

- one self-checking testbench `tb_<module>.sv` per module;
- `ecs_ref_pkg.sv`: independent reference models, namely BCH by long division
  and the expected field sequence of a word.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_ddr_ecs_link` runs the top at its default parameters. It sends 400
  frames back to back with 0–3 injected errors, through a looped channel,
  with a quarter-period receiver clock offset. The channel adds 0–2 ns of
  random jitter to each transition.
- `tb_link_all_patterns` sends all 128 messages × all 121 error patterns of
  weight ≤ 2 through the link (15488 frames), with a three-quarter-period
  receiver clock offset.
- `tb_ddr_ecs_link` counts every mechanism: global and segment inversion, each NOI value,
  skipped Index fields, transmitter hold-off, each error class, and the
  uncorrectable flag.
- The exhaustive tests cover all 65536 words for the optimiser and the data
  decoder, and all 128 messages × all 121 patterns of weight ≤ 2 for the BCH
  decoder.

## Simulating

With Verilator 5, for example for the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ddr_ecs_link \
        -Irtl -Itb -y rtl -y tb rtl/ecs_pkg.sv tb/ecs_ref_pkg.sv tb/tb_ddr_ecs_link.sv
    ./obj_dir/Vtb_ddr_ecs_link

Replace the testbench name to run any other test. Every file is plain
SystemVerilog-2017. Under `verilator --lint-only -Wall` the RTL gives only
these warnings:

- unused signals: status outputs that the wrappers leave unconnected, and the
  dropped padding bit;
- unused package constants;
- `SYNCASYNCNET`: the asynchronous reset also appears in the `disable iff` of
  the transmitter FSM's assertion.
