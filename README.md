# A fault-tolerant 4-phase delay-insensitive link

A delay-insensitive (DI) link sends data over a bundle of rails with no
timing assumptions between them. Each group of rails carries a code word
from an m-of-n code, for example 3 rails high out of 6. The receiver knows
that a word has arrived when the right number of rails in every group is
high. After that, all rails go back to zero (the spacer) before the next
word. This is the 4-phase return-to-zero protocol.

The same property makes the link fragile. A transient fault that pulls one
rail high can complete a word early, or turn it into a different valid code
word. The receiver then accepts wrong data and never notices. The transfer
cannot be "checked later" either: the completion detector has already
fired and the handshake has moved on.

This RTL makes the link tolerate one transient rail fault per transfer.
It has three parts:

* **A code-word mapping that keeps errors small.** For each m-of-n code,
  the data-word to code-word mapping is chosen so that a single fault can
  only mix up a word with a few neighbours. The decoder maps every word
  that can arise from one fault to something detectable.
* **Per-block check bits.** Two bits of each data block (the per-block
  check bits, PBCB) identify which neighbourhood the block is in. Their
  XOR over all blocks is sent in one extra 1-of-4 check block.
* **A resampling receiver.** The receiver captures the bus, decodes it and
  compares the check bits. If they disagree, or a block holds an unused
  code word, it captures the bus again. It repeats until a consistent
  snapshot arrives. A transient fault eventually disappears, so this ends.

The default configuration is an 8-bit payload in two 3-of-6 data blocks
plus one 1-of-4 check block: 16 rails. It uses the AND-masking transmitter
and the base receiver with the "version B" sampler. A 2-of-5 data-block
variant and other payload widths come from parameters.

## Why two check bits per block are enough

Model a single fault on a rail that is in flight. Take a sent word `c`.
The receiver can capture:

* `c` with some of its ones not yet arrived,
* `c` with the spacer of the previous word partly present, or
* either of these with one rail inverted by the fault.

The capture happens once enough ones are present for the completion
detector to fire. Two data words are *confusable* if a capture of one can
look like a valid or decodable capture of the other.

Draw a graph with one node per data word and an edge between every
confusable pair. If the nodes can be coloured so that confusable words
always get different colours, the colour is enough to detect every
mistake. For both the 3-of-6 and the 2-of-5 code, four colours suffice,
which is 2 bits.

The mapping is chosen so that this colour is simply the top two bits of
each data block. `check_bits_gen` XORs those pairs over all blocks. The
receiver does the same on what it decoded and compares. At most one block
is hit by a fault, so the XOR changes exactly when that block's colour
changes.

The decoder must also be *safe*: every word that can be captured from
`c` must decode either to `c`'s data or to data with a different colour.
A one-hot or "nearest" decoder does not guarantee this. Some decoder terms
below exist only to keep a captured invalid word away from a same-coloured
neighbour.

## The code mappings

### 3-of-6 (`enc_3of6`, `dec_3of6`)

The two low data bits are copied to rails `x1 x0`. The four upper rails
`x5..x2` complete the weight:

* low bits `00`: one-cold pattern on the upper rails;
* low bits `11`: one-hot pattern;
* low bits `01` and `10`: two ones.

| d    | x5..x0 | d    | x5..x0 | d    | x5..x0 | d    | x5..x0 |
|------|--------|------|--------|------|--------|------|--------|
| 0000 | 111000 | 0100 | 110100 | 1000 | 011100 | 1100 | 101100 |
| 0001 | 100101 | 0101 | 101001 | 1001 | 110001 | 1101 | 011001 |
| 0010 | 001110 | 0110 | 011010 | 1010 | 100110 | 1110 | 010110 |
| 0011 | 010011 | 0111 | 000111 | 1011 | 001011 | 1111 | 100011 |

Four 3-of-6 words are unused: `001101`, `110010`, `010101` and `101010`.
The completion detector fires on them like on any weight-3 word.
`dec_3of6` therefore flags them on its own `decode_err` output. The check
bits cannot be relied on here.

The decoder passes the low rails through. It recovers `d3 d2` from the
upper rails with different logic for each value of `x1 x0`. For low bits
`00`, the `d3` term has an extra `~x5` factor. Without it, the captured
invalid word `010100` decodes to `1100`. That word can arise from a
neighbour with the same check bits, so the fault would go unnoticed.
The unit testbench checks that exact case.

### 2-of-5 (`enc_2of5`, `dec_2of5`)

Three data bits per block:

* `d0` is sent on `x4`.
* With `d0 = 1`, the second one goes on rail `x[{d2,d1}]`.
* With `d0 = 0`, rails `x0, x1` carry `d2^d1` and its complement, and
  rails `x2, x3` carry `d1` and its complement.

The completion detector (`cd_2of5`) groups the rails as `{x0,x1}`, `{x4}`
and `{x2,x3}`. It fires when two different groups are active, so a word
with both ones in one group never completes. This is why the encoder
never produces such a word.

The decoder term `d1 = x3 | (x1 & ~x2)` (when `x4 = 1`) has the same
purpose as the `~x5` term above. It handles the captured word `10110`.

### Last block and check block

When the payload width is not a multiple of the block size, the leftover
1 or 2 bits go into a 1-of-2 or 1-of-4 block (`enc_1ofn`, `dec_1ofn`,
`cd_1ofn`). A one-hot block cannot be changed into another valid word by
a single fault without becoming detectable. The leftover bits are
zero-extended into the check-bit XOR.

The check block is always 1-of-4 and carries the 2-bit XOR.

Rails on the bus, from rail 0 upwards:

1. the full data blocks (block 0 holding data bits 0 and up),
2. the leftover block,
3. the 4 check rails.

`ftdi_pkg::total_rails()` gives the count: 16 / 28 / 52 / 100 rails for
8 / 16 / 32 / 64 bits with 3-of-6, and 18 / 31 / 58 / 111 with 2-of-5.

## The transmitter

`and_mask_tx` encodes the payload combinationally (`di_encoder`). It
drives the rails through an AND array: each rail is `code & en`. The
array is registered here, so rails switch together on a clock edge.

`and_mask_tx_ctrl` sequences one transfer:

1. Wait for the delayed request with the DI acknowledge low. This arc
   also stops a new word from starting while the previous spacer is
   still being acknowledged.
2. Raise `en`.
3. Wait for the DI acknowledge, then drop `en`. The spacer now goes out.
4. Acknowledge the sender.
5. Wait for the sender to drop its request.

`Delta_req` (`DELTA_REQ`, default 6 cycles) delays the rising edge of the
request, so the encoder's output is settled before `en` rises. The
falling edge is not delayed. `Delta_ack` (`DELTA_ACK`, default 0) does the
same for the returned acknowledge.

Timing at the defaults: the first rail rises `DELTA_REQ + 2` cycles after
`tx_req` (delay, controller state, output register).

### The D flip-flop transmitter

`dff_tx` is an alternative transmitter, selected with `TX_DFF = 1` on the
top. It needs no masking logic. The encoder output goes straight into an
output register:

* the register captures the code word when the controller raises
  `ack_out`;
* the register's reset input produces the spacer.

Two acknowledgment generators are available (`dff_tx_ctrl`):

* **Simple (`ADVANCED = 0`).** One C-element on `req` and `~ack_in`. The
  input and output handshakes are interlocked: `ack_out` falls only after
  the receiver has acknowledged. Its falling edge starts a reset pulse of
  `DELTA_RST` cycles, which clears the register.
* **Advanced (`ADVANCED = 1`, default).** The two handshakes run
  independently. They meet only at `ack_out+`, which needs a pending
  request, an idle DI channel, and the previous word acknowledged. An
  internal flag `t` remembers a captured word that has not been
  acknowledged yet.

With the advanced controller, the reset comes from `dff_tx_rst_gen`:

* **Version A** holds the register in reset while `ack_in` is high. It
  shows the controller an acknowledge whose edges are delayed by
  `DELTA_RST`.
* **Version B** resets with a `DELTA_RST`-cycle pulse on the rising edge of
  `ack_in`.

The code word appears `DELTA_REQ + 1` cycles after the request when the
channel is idle.

## The receiver

`base_receiver` chains these stages:

1. **Completion detection.** `bus_cd` runs one completion detector per
   block and joins them with a C-element. `done` rises when every block
   holds a complete word. It falls only when every block is back to zero.
   The 3-of-6 detector is a sorting network of OR/AND pairs whose three
   highest outputs feed a 3-input C-element.
2. **Protocol controller.** `rx_protocol_ctrl` forms `s` from `done` and
   the inverted consumer acknowledge with a C-element. `s = 1` starts
   sampling. The consumer request and the DI acknowledge both equal the
   sampler's `c`.
   With `RX_CTRL_ADV = 1` on the top, an advanced controller decouples
   the two handshakes. They meet only when a new word is captured.
   * `s` rises when `done` is high and the consumer has taken the
     previous word.
   * `s` falls as soon as `done` falls, so the DI acknowledge returns to
     zero while the consumer may still be busy.
   * The consumer request is a separate flip-flop. It is set once per
     word when `c` is high, and cleared by the consumer acknowledge.
3. **Sampler, version B** (`sampler`). When `s` rises, `trg` rises and the
   input register captures the rails. After `Delta_ED` cycles
   (`DELTA_ED`, default 6) the error output of `rx_error_detect` is
   sampled:
   * On an error, `trg` drops for `Delta_P` cycles (`DELTA_P`, default 1)
     and rises again. This takes a new snapshot and restarts the wait.
   * With no error, `c` rises. The consumer sees `rx_req`, and the
     transmitter sees the DI acknowledge.

   Version A of the sampler (`RX_SAMPLER_B = 0` on the top) differs only
   in the shape of `trg`. Each snapshot is a `Delta_P` pulse, and `trg`
   stays low during the wait and while `c` is high. The register still
   loads on the rising edge. The error is still evaluated `Delta_ED`
   cycles after that edge, so version A needs `DELTA_ED > DELTA_P`.
4. **Error detection.** `rx_error_detect` decodes the snapshot and
   recomputes the check bits. It reports `checkblock_error` (the check
   bits disagree) and `decode_error` (an unused 3-of-6 word).

The acknowledge falls once the spacer has arrived and the consumer has
acknowledged. `s` drops, which clears `c` at once.

A fault on a rail that is still high during the return to zero can hide
it, so the spacer is detected one rail early. The rail reappearing
afterwards acts on the next transfer like any other single fault and is
corrected there.

### The dual-use completion detector receiver

`dual_use_cd_receiver` is an alternative receiver, selected with
`RX_DUAL = 1` on the top. It moves the completion detector behind the
input stage. The input stage is a set of latches, open while
`en = ~trg | f_en`.

* At rest, `trg` and `f_en` are low. The latches pass the rails to the
  completion detector, so its `done` output drives the sampler's `s`
  directly. There is no C-element with the consumer acknowledge.
* When `trg` rises, the latches close on the current snapshot. An error
  drops `trg` for `Delta_P`, which reopens the latches and takes a new
  snapshot. Only sampler version B works here, because its `trg` stays
  high while the error detection runs.
* `c` raises the DI acknowledge and, once the previous consumer handshake
  has finished, the consumer request.
* When the consumer acknowledges, the controller (`dual_use_rx_ctrl`)
  raises `f_en`. The spacer then reaches the completion detector while
  `trg` is still high.
* `done` falls, the sampler clears `c` and `trg`, then `f_en` falls, and
  finally the DI acknowledge falls.

Each controller output is a flip-flop with set and clear terms:

| Output | Set on | Cleared on |
|--------|--------|------------|
| `req` | `c & ~f_en & ~ack_in` | `ack_in` |
| `f_en` | `req & ack_in` | `~c` |
| `ack_out` | `c` | `~c & ~f_en` |

In gates, the latch enable has an ordering constraint: the falling `trg`
must reach the OR gate before the falling `f_en`. Here the enable is
formed from registered signals, so the constraint holds by construction.
The detector's gates are not shared with the decoder; the same detector,
decoder and checker as in the base receiver are used.

## Clocked realisation of the asynchronous circuits

The original circuits are speed-independent asynchronous logic: C-gates,
delay lines and controllers synthesised from signal transition graphs.
This RTL expresses every one of them on a local clock, so that standard
simulators and synthesis flows apply:

* A C-element is a flip-flop that sets when all inputs are 1, clears when
  all are 0, and otherwise holds (`c_element`).
* A delay element counts clock cycles (`rise_delay`, and the counters
  inside `sampler`).
* Each controller is a small state machine that follows the ordering of
  its transition graph. The unit testbenches check that order.

The clock stands for the time resolution of the delay elements. With a
250 ps period, the delays of the evaluated link (1.5 ns, 0, 1.5 ns and
250 ps) become 6, 0, 6 and 1 cycles, which are the defaults.

The DI bus itself stays delay-insensitive. The top `ft_di_link` brings
both ends of the bus out as separate ports:

* `dibus_tx` / `dibus_ack_tx` at the transmitter,
* `dibus_rx` / `dibus_ack` at the receiver.

The wires between them, with arbitrary per-rail delays and faults, belong
to the environment. The testbenches model them.

Constraint: `DELTA_ED` must be at least 2 cycles, so that the error signal
is evaluated on the new snapshot (an elaboration-time `$error` enforces
this). The error detection logic is combinational and must settle within
`DELTA_ED` clock periods in a real implementation.

## Departures and own choices

* The clocked realisation described above.
* The code mappings were derived for this RTL under the single-fault model
  and checked exhaustively against it. They reproduce the reference
  decodings the design must meet:
  * `101001 → 0101` and `111001 → 1101`;
  * the unused word `101010 → 0010`, flagged;
  * `010100` not decoding to `1100`.
* In the 2-of-5 code, `d0` is carried on `x4`, the rail that forms a group
  of its own in the completion detector. A straight `d0 → x0` assignment
  does not fit that grouping.
* The transmitter's AND array is followed by a register, and the input
  register of the receiver loads on the clock edge after `trg` rises.
* The rail order on the bus is this design's choice. Bit 0 of the
  payload is in data block 0 on the lowest rails, and the check block is
  on the top rails.
* Only the fault assumption f = 1 is built: one check block, no forward
  error correction. The D-latch transmitter and the receiver with the
  decoder in front of its register are not included. Neither is a link without check block, nor the original
  flip-flop transmitter with an encoder phase input. The simple
  controller of the flip-flop transmitter is read from its description
  as a C-element on `req` and `~ack_in`, with the reset pulse started by
  the falling `ack_out`.
* The advanced receiver controller is built from its stated rule only:
  the handshakes meet at the capture of a new word. The exact set and
  clear terms are this design's choice.

## Files

| File | Contents |
|------|----------|
| `rtl/ftdi_pkg.sv` | code selection enum, block sizes, rail-count functions |
| `rtl/ft_di_link.sv` | top: transmitter + receiver |
| `rtl/and_mask_tx.sv`, `rtl/and_mask_tx_ctrl.sv` | AND-masking transmitter and its controller |
| `rtl/dff_tx.sv`, `rtl/dff_tx_ctrl.sv`, `rtl/dff_tx_rst_gen.sv` | flip-flop transmitter, its controllers and reset generator |
| `rtl/di_encoder.sv`, `rtl/check_bits_gen.sv` | bus encoder and check bits |
| `rtl/enc_3of6.sv`, `rtl/dec_3of6.sv`, `rtl/cd_3of6.sv` | 3-of-6 block codec and completion detector |
| `rtl/enc_2of5.sv`, `rtl/dec_2of5.sv`, `rtl/cd_2of5.sv` | 2-of-5 block codec and completion detector |
| `rtl/enc_1ofn.sv`, `rtl/dec_1ofn.sv`, `rtl/cd_1ofn.sv` | one-hot last block and check block |
| `rtl/bus_cd.sv` | completion detection for the whole bus |
| `rtl/rx_error_detect.sv` | decode, check-bit compare, unused-word flag |
| `rtl/sampler.sv`, `rtl/rx_protocol_ctrl.sv`, `rtl/base_receiver.sv` | receiver |
| `rtl/dual_use_cd_receiver.sv`, `rtl/dual_use_rx_ctrl.sv` | receiver with latches in front of the completion detector, and its controller |
| `rtl/c_element.sv`, `rtl/rise_delay.sv` | C-element and delay element |

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line. Reference values are computed in
`tb/tb_ref_pkg.sv` from the mapping tables and the fault model, not from
the RTL. The codec testbenches enumerate every word that one fault can
produce from every code word and check that it decodes safely.

`tb_ft_di_link` runs the default link end to end for 2000 transfers:

* every rail and the acknowledge get their own 2–4 cycle wire delay,
  sometimes with one 8-cycle slow wire;
* about 60% of the transfers carry one transient rail inversion of 1–16
  cycles;
* the consumer sometimes stalls for 30 cycles.

The first transfers send `0x00` with a fault on rail 0 or 1 of block 0
while rail 4 is late. This reproduces the three classic cases: a valid but
wrong word, an unused word, and an invalid word. The testbench checks
that every payload arrives once, unchanged and in order. It also checks
that each mechanism was used at least once:

* resampling,
* check block error,
* decode error,
* invalid capture,
* back-pressure.

It also checks that the rail transitions per data bit equal 1.75.

`tb_link_widths` runs the same environment for 8, 16, 32 and 64-bit
payloads with both block codes. It checks the rail counts and the
transitions per bit:

| bits | 2-of-5 | 3-of-6 |
|------|--------|--------|
| 8    | 1.50   | 1.75   |
| 16   | 1.50   | 1.63   |
| 32   | 1.38   | 1.56   |
| 64   | 1.38   | 1.53   |

To run a testbench with plain Verilator:

```
verilator --binary --timing -Irtl -Itb --top-module tb_ft_di_link \
    rtl/ftdi_pkg.sv tb/tb_ref_pkg.sv tb/tb_link_harness.sv tb/tb_ft_di_link.sv \
    $(ls rtl/*.sv | grep -v ftdi_pkg)
./obj_dir/Vtb_ft_di_link
```

The same pattern works for any `tb/tb_*.sv`. The package files must come
first on the command line.

More link testbenches use the same environment:

* `tb_link_dff_tx` runs the flip-flop transmitter in three variants:
  advanced controller with reset version B, advanced with version A, and
  the simple controller.
* `tb_dual_use_cd_receiver` runs the dual-use receiver in an 8-bit
  3-of-6 link and a 16-bit 2-of-5 link. On the 8-bit link it also checks
  the controller's event order edge by edge.
* `tb_link_rx_variants` runs two 8-bit links: one with sampler
  version A, one with the advanced protocol controller. For the second
  it counts the DI handshakes that finished while the consumer was still
  busy.
* `tb_dff_tx` checks that transmitter on its own: latency, the spacer
  between words, and that no capture coincides with a reset.

## Changing the design

* **Payload width and block code:** set `DATA_W` and `CODE`
  (`CODE_3OF6` or `CODE_2OF5`) on `ft_di_link`. All rail counts follow
  from `ftdi_pkg`.
* **Transmitter:** `TX_DFF`, `DFF_ADVANCED`, `DFF_RST_VER_B` and
  `DFF_DELTA_RST` select the flip-flop transmitter and its variants.
* **Receiver:** `RX_DUAL = 1` selects the dual-use completion detector
  receiver. `RX_SAMPLER_B = 0` selects sampler version A in the
  base receiver, and `RX_CTRL_ADV = 1` its advanced protocol controller.
* **Delays:** set `DELTA_REQ`, `DELTA_ACK`, `DELTA_ED` and `DELTA_P` in
  clock cycles. `DELTA_ED` must cover the decode and compare path.
* **New block code:** it needs an encoder/decoder pair whose top two data
  bits are a valid colouring for that code's confusable words under one
  fault, plus a completion detector. Add it to `di_encoder`,
  `rx_error_detect` and `bus_cd`.
