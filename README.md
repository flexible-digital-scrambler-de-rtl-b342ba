# Flexible scrambler / de-scrambler with pseudo-randomly varying delay lengths

A classic self-synchronising scrambler XORs each data bit with two earlier
*output* bits, taken at delays L1 and L1+L2. The de-scrambler XORs each
received bit with the same two earlier *received* bits, and so gets the data
back. With fixed L1 and L2 the scrambled stream is easy to undo. This design
varies both lengths:

* The delay line is a **programmable length shift register (PLSR)**. It is made
  of two bidirectional shift registers, R1 and R2, and its tap points can be
  moved.
* The lengths come from a word in a **128-word EPROM**. The word is picked by a
  **loadable pseudo-random sequence generator (PRSG)** through a
  1-out-of-128 decoder.
* Inside a message, two counters split the stream into **key periods**. The
  first L1 bits of a period shift through the registers left to right. The
  next L2 bits shift right to left. At the start of every new message the
  PRSG steps, which selects a new word and so new lengths.

The owner of the device sets the code in two ways: by programming the EPROM
words, and by choosing the seed that is loaded into the PRSG.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with self-checking
testbenches for every module.

## The scrambling equations

Let D^k be a delay of k bits and ⊕ addition modulo 2.

    scrambler:     T1 = S ⊕ D^a·T1 ⊕ D^(L1+L2)·T1     (feedback of the output)
    de-scrambler:  R  = T2 ⊕ D^a·T2 ⊕ D^(L1+L2)·T2    (feed-forward of the input)

Here a = L1 on the right route and a = L2 on the left route (see below). If
T2 = T1, each de-scrambler output is the received bit XORed with exactly the
bits the scrambler XORed into it, so R = S.

This argument does not need the delay line to be a pure delay. It only needs
the scrambler's and the de-scrambler's delay lines to hold the same bits before
every step. They do when both lines are shifted by the same stream (T1 = T2)
under the same controls. This is what makes the moving taps safe. **Both ends
must run the same key schedule, bit for bit** (see "Keeping the two ends in
step").

In hardware both configurations compute `out = in ^ tap1 ^ tap2`. The only
difference is what is shifted into the PLSR: `out` in the scrambler and `in`
in the de-scrambler. One `descramble` pin selects between them, so the same
device can work at either end.

## The PLSR and its two routes

R1 and R2 each have HALF = N/2 cells, numbered 0 (left) to HALF-1 (right).
N is the largest total delay; this design uses N = 32. The lengths L1 and L2
are each 1..HALF.

**Right route** (signals SHR and TRR):

    din ─► R1[0] → R1[1] → … → R1[L1-1] ══TRR══► R2[0] → … → R2[L2-1] → …
                                  │                           │
                                tap1 (delay L1)         tap2 (delay L1+L2)

* Both registers shift right.
* The data bit enters R1 at its left end.
* The transfer TRR hands the bit in R1 cell L1-1 to the left end of R2.

**Left route** (signals SHL and TRL), the mirror image:

    … ← R1[HALF-L1] ← … ← R1[HALF-1] ◄══TRL══ R2[HALF-L2] ← … ← R2[HALF-1] ◄─ din
            │                                      │
      tap2 (delay L1+L2)                     tap1 (delay L2)

* Both registers shift left.
* The data bit enters R2 at its right end.
* TRL hands the bit in R2 cell HALF-L2 to the right end of R1.

Cells beyond the transfer point keep shifting, and bits fall off the far end.
Without TRR/TRL, the whole first register lies in the path, so the two
registers form one N-bit register. The control unit always asserts the
transfer together with the shift, so this mode only shows in the PLSR's own
test.

**When the route changes** the registers are not reordered. After the switch,
the taps at first read bits that were laid down under the other route. This
mixes the history further. The scrambler and the de-scrambler make the same
switch at the same bit, so recovery is not affected. Within a route, once it
has run for L1+L2 bits, the taps are exact delays of the input.

## Control unit: how a key period is produced

    PRSG (7 bit) ─► 1-of-128 decoder ─► EPROM word {L2-1, L1-1} ─► L1, L2
                                                            │
                                    counter A ◄── L1 ◄── Load C ──► L2 ──► counter B
                                        │                              │
                                   zero flags ─► combinational logic ─► CDEA, CDEB, Load C,
                                                                       SHR, TRR, SHL, TRL

* The **combinational logic** looks only at the two counters' zero flags:

  | counter A | counter B | active signals        | phase     |
  |-----------|-----------|-----------------------|-----------|
  | ≠ 0       | any       | CDEA, SHR, TRR        | `PH_A`    |
  | 0         | ≠ 0       | CDEB, SHL, TRL        | `PH_B`    |
  | 0         | 0         | Load C                | `PH_LOAD` |

* On **Load C**, at the next clock edge, counter A is loaded with L1 and
  counter B with L2, both from the selected word. No data bit is taken in
  that cycle.
* Each **accepted** data bit decrements the active counter. The counters
  count bits, not clock cycles, so gaps in the input do not shift the
  schedule.
* A key period is therefore L1 bits on the right route, then L2 bits on the
  left route, then one load cycle. It repeats with the same word until the
  message ends.
* **seed_load** is for switch-on. It loads the user's seed into the PRSG.
* **enp** (ENP) is for a new message. It steps the PRSG once.
* Either of these two also clears both counters and empties the PLSR. The next
  cycle is then a Load C from the new word. The input is not ready during the
  seed_load/enp cycle.
* The **PRSG** is a Fibonacci LFSR with polynomial x^7 + x^6 + 1. From any
  non-zero seed it visits all 127 non-zero codes. Reset clears it to 0. Code 0
  does not step, but word 0 is still a valid word.
* The **EPROM** is read through the decoder's one-hot word lines, as an
  AND-OR over the words. Each word is `{L2-1, L1-1}` with log2(HALF) bits per
  field, so every word is a legal length pair. Its initial contents (set
  at time zero) are `(a·167 + 61) mod 256` in word `a`. A synchronous write port (`prog_we`,
  `prog_addr`, `prog_data`) stands in for the device programmer.

## Keeping the two ends in step

Both devices must have:

* the same EPROM contents;
* the same seed, loaded before the first message;
* an `enp` pulse at the same bit position in both streams, between messages;
* an error-free stream from T1 to T2.

The test keeps the two ends in step by pulsing `enp` on both devices once the
receiver has returned every bit of a message. How sender and receiver agree
on message boundaries in a real link (framing) is outside this design.

A wrong bit on the channel spoils the output bits that read it through a
tap. Because every message starts from an emptied PLSR, the damage ends at
the next message at the latest.

This is a scrambler, not a cipher. Its key space is small: 128 words of two
4-bit lengths, plus the seed. Treat it as obfuscation.

## Interface and timing

`flex_scrambler` is one device. `flex_scrambler_system` is the top level: a
sender device (`descramble = 0`) and a receiver device (`descramble = 1`),
each with its own control inputs (`tx_*`, `rx_*`). T1 (`tx_out_*`) and T2
(`rx_in_*`) are ports, so the channel between them (a wire, a FIFO, an error
injector) is up to the user.

| port (per device) | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `descramble` | in | 0 scrambler, 1 de-scrambler (fixed inside the top level) |
| `seed_load`, `seed[6:0]` | in | load the PRSG (switch-on) |
| `enp` | in | step the PRSG, start a new message |
| `prog_we`, `prog_addr[6:0]`, `prog_data[7:0]` | in | write an EPROM word `{L2-1, L1-1}` |
| `in_valid`, `in_ready`, `in_bit` | in/out/in | serial input; a bit moves when valid and ready are both high |
| `out_valid`, `out_bit` | out | serial output, exactly one clock after the bit was accepted |
| `phase`, `load_c`, `len1`, `len2`, `code` | out | observation: schedule phase, Load C, current lengths, PRSG state |

Throughput is one bit per clock. `in_ready` drops for one cycle:

* at every Load C (once per key period);
* in every seed_load or enp cycle.

With the input always offered, a message of B bits takes
`B + ceil(B / (L1+L2))` cycles from the cycle after `enp`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `HALF` | 16 | cells in each of R1 and R2 (N = 2·HALF = 32). Must be a power of two. |
| `PRSG_W` | 7 | PRSG width. The decoder and the EPROM have 2^PRSG_W = 128 outputs/words. |

The 128-word decoder and EPROM follow the original design. The original gives
no value for N, so N = 32 is this design's choice. Shared types live in
`rtl/scr_pkg.sv`: `route_t` holds {SHR, TRR, SHL, TRL}, `phase_e` the
schedule phase, and the default EPROM formula is there too.

## What follows the original and what is this design's own

These follow the original design:

* the scrambler and de-scrambler equations;
* the operational unit / control unit split;
* a PLSR of two N/2 bidirectional registers, with data streamed left to
  right in the first part of the sequence and right to left in the second;
* the control signals SHR, TRR, SHL, TRL, CDEA, CDEB, Load C and ENP;
* a loadable PRSG, a 1-out-of-128 decoder, an EPROM, and counters A and B
  that count down to zero and are reloaded together;
* a new PRSG value, and so new lengths, for each message.

These are this design's own readings or choices:

* **Exact tap and transfer points.** On the right route, R1 cell L1-1 feeds
  R2 cell 0. On the left route, R2 cell HALF-L2 feeds R1 cell HALF-1. The
  taps are the ends of the two segments. As a result, the first delay on the
  left route is L2, not L1.
* **Lengths and period parts.** Counter A is loaded with L1 and counter B
  with L2. The lengths in the word therefore set both the delays and how many
  bits each route carries.
* **Word format** `{L2-1, L1-1}` and the default EPROM contents.
* **PRSG.** The LFSR type and its polynomial.
* **Load cycle.** Load C takes one cycle.
* **Message start.** seed_load and enp clear the counters and the PLSR.
* **Interfaces.** The valid/ready handshake, the registered output, the mode
  pin, the EPROM write port and the observation outputs.
* **Technology.** Flip-flop registers, not a MOS shift-register realisation.

## Files

| file | contents |
|---|---|
| `rtl/scr_pkg.sv` | shared types, default sizes, default EPROM formula |
| `rtl/bidir_shift_register.sv` | one HALF-bit bidirectional register (R1 or R2) |
| `rtl/plsr.sv` | R1 + R2 with the transfer paths and taps |
| `rtl/scrambler_unit.sv` | PLSR + modulo-2 adders, scrambler or de-scrambler |
| `rtl/prsg.sv` | loadable LFSR |
| `rtl/decoder_1of128.sv` | 1-of-2^W decoder |
| `rtl/eprom.sv` | word store with one-hot read and write port |
| `rtl/load_counter.sv` | down counter with load enable (counters A and B) |
| `rtl/control_logic.sv` | CDEA/CDEB/Load C and route signals |
| `rtl/control_unit.sv` | PRSG → decoder → EPROM → counters → logic |
| `rtl/flex_scrambler.sv` | one device |
| `rtl/flex_scrambler_system.sv` | top level: sender + receiver |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the module against values it works out itself, and
ends with a `TB_RESULT checks=N failures=M` line.

* `tb_bidir_shift_register`: random shift, hold and clear commands against a
  bit-array model.
* `tb_plsr`: for all 256 length pairs on both routes, checks that the taps
  equal the input delayed by L1 (or L2 on the left route) and by L1+L2. Also
  checks the transfer-less mode.
* `tb_scrambler_unit`: for every L1 and a spread of L2 values, on both routes,
  checks the recurrence `T1[n] = S[n] ^ T1[n-a] ^ T1[n-L1-L2]`. Then runs a
  scrambler→de-scrambler pair under a random route and length for every bit
  and checks R = S.
* `tb_prsg`: load, hold, the recurrence, and the 127-step period.
* `tb_decoder_1of128`: all 128 codes.
* `tb_eprom`: the default formula, and programmed words read back.
* `tb_load_counter`: random commands against an integer model.
* `tb_control_logic`: the truth table above.
* `tb_control_unit`: checks the whole key schedule against a model: the load
  cycle, L1 right-route bits, then L2 left-route bits. Also covers seed load,
  ENP and a reprogrammed word.
* `tb_flex_scrambler`: one device scrambles three messages, checking the cycle
  count. The same plain message sent under a new code must come out
  differently. The device is then switched to de-scramble mode and must return
  the messages.
* `tb_flex_scrambler_system`: the top level at its default parameters, with
  12 messages of random length. It checks:
  * T1 against an independent bit-level model of the whole device;
  * R = S at the receiver;
  * the one-clock output latency;
  * the cycle count of messages sent with the input always offered;
  * that the code and lengths of each message are the predicted ones.

  One message has a single channel bit inverted. The receiver's output must
  first go wrong at exactly that bit, and the next message must be clean
  again.

  It also requires that each mechanism happened: right-route and left-route
  bits, Load C, ENP, seed load, EPROM programming, input stalls, a change of
  lengths, and the channel error.

To run a testbench with Verilator 5 (from the repository root):

    verilator --binary --timing --assert -Irtl -Itb rtl/scr_pkg.sv \
        tb/tb_flex_scrambler_system.sv --top-module tb_flex_scrambler_system
    ./obj_dir/Vtb_flex_scrambler_system

Replace the testbench name to run another one. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/scr_pkg.sv rtl/<module>.sv`.
Every testbench runs in well under a second.
