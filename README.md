# Asynchronous bit-serial link with LEDR signalling

A network-on-chip spends a lot of area, leakage and routing effort on wide
parallel links between routers that are idle much of the time. This design
replaces such a link by **four wires**: two differential pairs, called *State*
(S) and *Phase* (P). Words are sent one bit at a time with no clock on the
wires and no clock recovery at the far end. A word is written in the
sender's clock domain and read out in the receiver's clock domain, and the
two clocks need not be related.

The RTL follows the link architecture of *Fast Asynchronous Bit-Serial
Interconnects for Network-on-Chip*: synchronizer, encoder, serializer and
wires on one side, and deserializer, decoder and synchronizer on the other.
Section 7 lists where this RTL had to fill in details of its own.

```
 tx_clk domain |              self-timed                                    | rx_clk domain
               |                                                            |
 SEND,DATA --> tx_synchronizer -> ledr_encoder -> 2 x serializer ==S,P==> 2 x sense_amp
 <-- ACK       |   REQ/ACK        (S,~S,P,~P     (driven by                 |
               |                   registers)     multiphase_clock_gen)     |
               |                                      wires (not included) |
               |            deserializer -> ledr_decoder -> rx_synchronizer --> REQ,DATA
```

Neighbouring stages use full REQ/ACK handshakes. **The wires are the one
place with no acknowledgement.** The transmitter sends a word whenever its
own handshake allows it, and the receiver has to be ready for it.

## 1. The line code: Level Encoded Dual Rail (LEDR)

Every bit changes **exactly one** of the two pairs:

* S carries the data bit itself: `S(i) = B(i)`.
* P changes when S does *not*: `P(i+1) = ~P(i)` if `S(i+1) == S(i)`, else
  `P(i+1) = P(i)`.

So `S xor P` flips once per bit. The receiver recovers a bit clock from that
flip without any clock wire. Bits are sent at one transition each. The code
is non-return-to-zero, so between words the wires simply keep their level.

Example: the word `B = 0,0,1,1` (bit 0 first), sent from the reset state
S = P = 0:

| bit | B | S | P | changed | S xor P |
|-----|---|---|---|---------|---------|
| reset | – | 0 | 0 | – | 0 |
| 0 | 0 | 0 | 1 | P | 1 |
| 1 | 0 | 0 | 0 | P | 0 |
| 2 | 1 | 1 | 0 | S | 1 |
| 3 | 1 | 1 | 1 | P | 0 |

The encoder works on a whole word in parallel. Each word is chained to the
last bit of the previous word, so a word boundary never loses a transition.
After reset the wires stand at S = P = 0. That state carries no data; it is
the starting point of the chain.

## 2. Transmit side

**`tx_synchronizer`** takes `tx_data` while `tx_send` is high. It answers with
a one-cycle `tx_ack` and passes the word to the encoder with a four-phase
REQ/ACK. The returning ACK crosses into `tx_clk` through two flip-flops.

Once the encoder's ACK has risen, the encoder holds the word in its own
registers. The synchronizer can then take the next word while the handshake
returns to zero, and it raises REQ for that word as soon as ACK has fallen.
This makes the transmitter a pipeline.

The sender must hold SEND and DATA until it sees ACK. SEND is ignored in the
cycle in which ACK is high.

**`ledr_encoder`** loads four M-bit registers (S, ~S, P, ~P) on the rising
edge of REQ. After a matched delay (`ENC_PS`) it raises GO, which starts the
serializer. Its ACK is the serializer's DONE.

**`multiphase_clock_gen`** is a tapped delay line with M+1 taps, `TAP_PS`
apart. A rising GO sends a rising edge down the line, and bit *i* is on the
wires while tap *i* is high and tap *i+1* is still low. The last tap is
DONE. When GO falls, a falling edge follows the same path. During it no bit
window opens, so the four-phase cycle returns to zero without disturbing the
wires. **The tap delay is the bit time.** Adjusting the delay line sets the
line rate. The model uses delays, because a delay line is a timing element.

There are two serializers, which give identical wire waveforms:

* **`serializer_inmux`** (default) multiplexes the register bits and their
  complements onto a single differential driver per pair.
* **`serializer_outmux`** has one driver per bit, all tied to the pair. Driver
  *i* is enabled by `phase[i] & ~phase[i+1]`.

In both, the pair keeps its level when no bit window is open. The low-swing
differential driver is represented by two complementary logic levels
(`line`, `line_n`).

`SER_OUTMUX` on `serial_link_top` chooses between them.

## 3. Receive side: a pipeline clocked by the data

This part is the least conventional, and it is the part to read carefully
before changing any delay.

**`sense_amp`** restores each differential pair to a full-swing level on true
and complement rails. This is a behavioural model: the output follows the +
input when the inputs differ and holds otherwise.

**`deserializer`** contains:

1. **A dual-rail XOR of S and P (`dr_xor`).** Its output X toggles once per
   received bit. That toggle is the only clock the receiver has.
2. **A chain of M transition latches (`transition_latch`, "XL").** An XL
   stores D on *every* edge of X, rising or falling. It does this with two
   latches, one holding while W is high and one while W is low, and Q is
   taken from the one that is holding. The XL also buffers the control on to
   the next stage (X → W → Y). S, through a short buffer, feeds the first
   stage. Each bit's control edge runs down the chain and shifts every stage
   by one place, so after M bits the chain holds the word. Bit 0 sits in the
   last stage.
3. **A completion-detection register.** This is a second chain of M XLs with
   the constant `1` as input. It runs on the same control, and its last
   stage rises at the M-th edge of the word.
4. **A word latch.** It follows the data chain until completion detection
   fires, then holds. After a further delay, REQ goes to the decoder.

When the decoder acknowledges, its ACK clears the completion register. That
drops REQ and reopens the latch, and the receiver is ready for the next word.
The data chain needs no clearing, because the next word pushes the old bits
out.

A second data chain can be switched on with `RECORD_P = 1`. It is fed from
the P rail and shares the same control, and it brings the Phase bits out on
`word_p`. A code other than LEDR would need them. LEDR needs only S, so the
link leaves this chain off, and `word_p` then reads zero. The deserializer
testbench runs both settings side by side.

The data and control edges travel down the chain together as a wave. There
is no handshake per stage, so **correct capture depends on relative delays**:

| condition | why | default values |
|-----------|-----|----------------|
| `DBUF_PS < XOR_PS + XL_W_PS` | the first XL must see the new S value before its control edge closes it | 10 < 15 + 10 |
| `XL_W_PS + XL_Y_PS < XL_Q_PS` | stage k+1 must close before stage k's output moves, or a bit skips a stage | 10 + 10 < 30 |
| `XL_Q_PS + LATCH_PS` after the last edge | the word latch must close only after the last shift has settled | 30 + 20 |
| bit time > `XL_Q_PS - XL_Y_PS` and > every delay above | a stage must settle before the next edge reaches it | 100 ps bit time |

These delays are parameters in `link_pkg` and on the modules. **Synthesis
ignores them.** In silicon they are the delay-matching constraints of the
receiver, and they must be met by sizing or delay cells.

With the defaults, REQ to the decoder rises exactly
`XOR + (M-1)(W+Y) + W + Q + 2·LATCH` = 155 ps (M = 4) after the last bit's
transition reaches the deserializer.

**`ledr_decoder`**: in LEDR the data bit *is* the State bit, so decoding
copies the S word into a holding register. It then signals the receive
synchronizer by toggling REQ_S (a two-phase handshake). It acknowledges the
deserializer `LATCH_PS` after its REQ. An assertion fires if a new word
arrives before the synchronizer has taken the previous one.

**`rx_synchronizer`** brings the REQ_S toggle into `rx_clk` through two
flip-flops. On the third rising edge it presents `rx_data` with a one-cycle
`rx_req` and toggles ACK_S back.

## 4. Handshakes at a glance

| between | protocol | notes |
|---------|----------|-------|
| sender → tx_synchronizer | SEND held until one-cycle ACK | `tx_clk` |
| tx_synchronizer → encoder | four-phase REQ/ACK | encoder ACK crosses back through 2 flip-flops |
| encoder → serializer | four-phase GO/DONE | DONE = last delay-line tap |
| transmitter → receiver | none | M LEDR transitions per word |
| deserializer → decoder | four-phase REQ/ACK | ACK clears completion detection |
| decoder → rx_synchronizer | two-phase REQ_S/ACK_S | one word of buffering |
| rx_synchronizer → receiver | one-cycle REQ strobe | no back-pressure |

## 5. Throughput and latency

* **Wire time per word.** A word occupies the wires for M bit times
  (`M × TAP_PS`, 400 ps at the defaults).
* **Word rate.** This is set by the transmit synchronizer's four-phase
  cycle: each edge of the encoder's ACK needs two `tx_clk` edges to cross
  back. The transmitter is pipelined: the next word is taken from the sender
  while the previous handshake returns to zero. In the end-to-end test, 200
  words took about 1 µs at 1 GHz, roughly five `tx_clk` cycles per word.
* **Receiver clock.** `rx_clk` must take words at least that fast, because
  nothing on the wires can stall the transmitter.
* **Measured latency.** In the end-to-end tests, the latency from `tx_ack` to
  `rx_req` was at most about 5.2 ns (M = 4, 100 ps bits) and 5.4 ns (M = 8,
  60 ps bits), with a 1 GHz `tx_clk` and a 1.3 GHz `rx_clk`. This includes
  the time a word accepted early waits for the previous handshake.
* **Bit times tested.** The deserializer on its own is also tested at 30 ps
  per bit.

## 6. Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `M` (`WORD_BITS`) | 4 | word width; the same serializer scheme serves any M |
| `SER_OUTMUX` | 0 | 0: input-multiplexed serializer; 1: output-multiplexed |
| `TAP_DLY_PS` (`TAP_PS`) | 100 | bit time = clock generator tap delay |
| `ENC_PS` | 40 | encoder register-to-GO matched delay |
| `SA_PS` | 20 | sense amplifier delay |
| `XOR_PS`, `DBUF_PS` | 15, 10 | receiver XOR and data buffer |
| `XL_W_PS`, `XL_Y_PS`, `XL_Q_PS` | 10, 10, 30 | transition latch control and data delays |
| `LATCH_PS` | 20 | word latch close delay, decoder ACK delay |
| `RECORD_P` (deserializer) | 0 | 1: build the second chain that records the P bits |

All delays are in picoseconds and are placeholders with the right ordering,
not figures from a process. Every file sets `timeunit 1ps`.

## 7. What comes from the original architecture and what is added here

Taken from the architecture:

* the stage order and the REQ/ACK handshake between neighbouring stages;
* a transmitter organised as a pipeline;
* the handshake-free wires;
* the LEDR rule;
* the four encoder registers;
* both serializer structures, including the enable from two successive clock
  phases;
* the delay-line clock generator;
* sense amplifiers;
* the dual-rail XOR feeding a chain of transition latches built from two
  latches;
* the buffered S input;
* the completion-detection register fed by `1`;
* the output latch.

Choices made here, because the architecture leaves them open:

* **Word width.** 4 bits, the width of the serializer example.
* **Encoding order and reset.** Bit 0 is sent first. The LEDR chain runs
  across words. Reset state is S = P = 0 with one asynchronous active-low
  reset for everything.
* **Synchronizers.** Plain two-flop synchronizers at both ends. The original
  calls for low-latency synchronizers but does not describe them.
* **Handshake details.** The encoder loads on REQ and starts the serializer
  after a matched delay. The clock generator has M+1 taps.
* **Completion detection.** The register is cleared by the decoder's ACK.
* **Decoder interface.** A two-phase decoder-to-synchronizer protocol with an
  overrun assertion.
* **Physical modelling.** Line keepers in the serializers. Differential
  low-swing pairs are shown as complementary logic levels. All delay values
  are this design's own.
* **Default serializer.** The input-multiplexed form is the default. The
  original weighs the two forms without choosing one.

Not included:

* the wires themselves;
* the transistor-level line driver and sense amplifier (only their logic
  function is modelled);
* the NoC routers that may be inserted along a link;
* the alternative receivers that are only mentioned (two half-rate chains,
  or a tree-structured asynchronous state machine).

## 8. Files

`rtl/`:

| file | contents |
|------|----------|
| `link_pkg.sv` | word width, delays, TX state type |
| `serial_link_top.sv` | the complete link |
| `tx_synchronizer.sv`, `ledr_encoder.sv`, `multiphase_clock_gen.sv` | transmit side |
| `serializer_inmux.sv`, `serializer_outmux.sv` | the two serializers |
| `sense_amp.sv`, `dr_xor.sv`, `transition_latch.sv`, `deserializer.sv` | receive front end |
| `ledr_decoder.sv`, `rx_synchronizer.sv` | receive back end |

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_serial_link_top.sv` (default parameters) and `tb_serial_link_outmux.sv`
(output-multiplexed serializer, M = 8, 60 ps bits). Each testbench prints
`TB_RESULT checks=N failures=F`. The end-to-end tests do the following:

* send 200 words, including all-zero, all-one and alternating words;
* check each word in order;
* check that each pair is complementary;
* check that every bit changes exactly one pair;
* check the serializer wave length and the latency bound;
* count State-pair bits, Phase-pair bits, sender stalls and
  completion-register restarts, and fail if any of them never happens.

The wires in these tests are three 50 ps segments, so more than one bit is in
flight at once.

## 9. Simulating

Verilator 5 with timing support is needed, because the self-timed parts rely
on delays:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/link_pkg.sv \
    tb/tb_serial_link_top.sv --top-module tb_serial_link_top -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_<name>.sv` to test one module. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/link_pkg.sv rtl/<module>.sv`.

Points to know before modifying:

* **Latches.** The serializer keepers, the sense amplifier, the transition
  latches and the word latch are intentional latches.
* **The deserializer loop.** The deserializer–decoder handshake is a loop
  that goes through delays, so lint reports a combinational loop there.
* **Inertial delays.** Continuous assignments with delays are inertial: a
  pulse shorter than the delay is swallowed. That is why the testbench wire
  model uses short segments. Keep every delay in the receive path below the
  bit time.
* **Reset.** Drive `rst_n` high and then low at start-up, so that the
  asynchronous resets see an edge.
