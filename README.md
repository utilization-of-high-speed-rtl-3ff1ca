# CRC-15 encoder and decoder for CAN, three bits per clock

Every CAN data or remote frame carries a 15-bit cyclic redundancy check over
its start-of-frame bit, arbitration, control and data fields. The textbook
circuit for it is a 15-stage linear feedback shift register (LFSR) that
takes one bit per clock. That is enough at CAN's own bit rate, but it ties
the CRC unit's throughput to its clock. This design computes the same CRC
three bits per clock. It derives the parallel circuit from the serial LFSR
with three standard DSP transformations:

- **unfolding** by 3, so one clock takes three message bits;
- **4-level look-ahead pipelining**, which puts four delays in the feedback
  loop and so lowers its iteration bound;
- **retiming**, which spreads those four delays through the loop's XOR
  network.

The design has a transmit encoder, which produces a frame's CRC sequence,
and a receive decoder, which checks a received frame and its CRC and sets
the level of the ACK slot. Next to them, on separate ports, sits a small
bit-serial CRC encoder/decoder pair: 12-bit data words protected by a 5-bit
CRC. It is the simplest version of the same idea, and its decoder is fed
through an error-injection mask.

All of it is synthesizable SystemVerilog with self-checking testbenches. It
runs under plain Verilator 5.

## The polynomial and the serial LFSR

The CAN generator polynomial is

    P(x) = x^15 + x^14 + x^10 + x^8 + x^7 + x^4 + x^3 + 1      (binary 1100_0101_1001_1001)

With the leading term dropped, the taps are `15'h4599` (`crc_pkg::CAN_CRC_POLY`).

`crc_lfsr_serial` is the serial LFSR. It has 15 flip-flops, L0 to L14. The
message bit is XORed with L14 to form the feedback bit. The feedback goes
straight into L0 (the x^0 term). It is also XORed into stage Li for every
term x^i, which puts the XORs in front of L3, L4, L7, L8, L10 and L14.
Because the message bit joins the feedback rather than entering at L0, the
register divides M(x)·x^15 by P(x) as the bits arrive, most significant
first. After the last message bit it holds the CRC, and no 15 zeros need to
be shifted in. The register starts from zero, as CAN requires. The width
and the polynomial are parameters, so the same module serves the 5-bit and
4-bit examples below.

Write one step of this register with a zero input as the 15×15 matrix `M`.
One step with input bit `d` is then `s' = M·s + d·n`, where `n` is a fixed
vector. All arithmetic is over GF(2), so `+` is XOR.

## From one bit to three bits per clock (`crc15_unfolded`)

This is the core of the design. The derivation goes in three steps.

**Unfolding by 3.** Apply the step three times. The register after beat `k`
(three bits `d(k)`) is

    s(k+1) = M^3 · s(k) + N · d(k)

Here `N·d(k)` is what the three bits put into an all-zero register. `M^3` is
small: each bit of `M^3·s` is an XOR of at most 4 register bits.

**Look-ahead by 4.** Substitute the recurrence into itself four times:

    s(k+4) = M^12 · s(k) + w(k+3)
    w(k)   = N d(k) + M^3 N d(k-1) + M^6 N d(k-2) + M^9 N d(k-3)

The loop now spans four beats, so it can hold four delays. `w(k)` depends
only on the last 12 message bits and not on the register, so it lies
outside the loop. It equals the CRC of those 12 bits from a zero register.
The module computes it from a sliding window of four beats and registers
it. That register is a feed-forward pipeline stage and adds one cycle of
latency.

**Retiming.** One `M^12` block feeding four registers in a row would put the
whole `M^12` network between two registers. Instead, write `M^12` as
`M^3·M^3·M^3·M^3` and place one register after each factor. The loop
becomes a ring of four registers:

               +-------- w (registered, from the 4-beat window)
               v
    ring[3] -> M^3 -> (+) -> ring[0] -> M^3 -> ring[1] -> M^3 -> ring[2] -> M^3 -> ring[3]

Each register update is

    ring[0] <= M^3 · ring[3] + w
    ring[i] <= M^3 · ring[i-1]            (i = 1..3)

After every beat, `ring[0]` holds the true CRC register `s`. The other three
registers hold `M^3·s(k)`, `M^6·s(k-1)` and `M^9·s(k-2)`, partial products
that the ring needs four beats later. Starting a frame (`in_sof`) clears the
ring and the window, which is the same as a zero start value.

What it costs and gains, with 2-input XOR gates:

| | serial LFSR | unfolded by 3 only | unfolded by 3, 4-level look-ahead, retimed |
|---|---|---|---|
| bits per clock | 1 | 3 | 3 |
| 15-bit registers in the loop | 1 | 1 | 4 |
| XOR levels between loop registers | 2 | 3 | 3 into `ring[0]`, 2 elsewhere |
| loop XOR levels per loop delay (iteration bound, in T_XOR per clock) | 2 | 3 | 9/4 |
| the same per message bit | 2 | 1 | 3/4 |

The `M^12` network written out directly would have up to 11 terms per bit.
The retimed ring never has more than 5 terms between two registers.

The unfolding factor and the look-ahead level are parameters (`UNFOLD`,
`LOOKAHEAD`). Both default to the values the design was specified with
(3 and 4). Setting `UNFOLD=1` or `LOOKAHEAD=1` gives back the intermediate
architectures of the derivation, as the next table shows. The engine's
polynomial and width are also parameters.

**Frame lengths.** A frame is a stream of 3-bit beats. When its length is
not a multiple of 3, the first beat is padded with leading zeros. With a
zero start value, leading zeros leave the CRC unchanged, so no partial-beat
logic is needed.

**Timing.** The beat that carries `in_last` is presented in cycle *t*.
`out_valid` is then high in cycle *t+2*, and `out_crc` holds the CRC until
the next frame completes. Beats may have idle cycles between them, during
which every stage holds still. A new frame may start in the cycle right
after `in_last`. A message of N bits takes ceil(N/3) beats plus 2 cycles.
For a 15-bit message the measured counts are:

| configuration (`UNFOLD`/`LOOKAHEAD`) | first beat to valid CRC, 15-bit message |
|---|---|
| 1/1 serial loop | 17 cycles |
| 1/2 2-level look-ahead | 17 cycles |
| 1/4 4-level look-ahead, retimed | 17 cycles |
| 3/1 unfolded | 7 cycles |
| 3/4 unfolded, 4-level look-ahead, retimed (default) | 7 cycles |

Look-ahead does not change the number of cycles. It lowers the loop's
iteration bound, the lower limit on the clock period that retiming can
reach. In this placement, though, the longest register-to-register path is
still 3 XOR levels: the M^3 network plus the XOR with `w` into `ring[0]`.
That is the same as unfolding alone. A shorter clock period would need
further retiming of that one stage, which this design does not do.

## Receive side: syndrome and ACK slot (`crc15_can_checker`)

The receiver does not recompute the CRC and compare it. It streams the
whole received code word through a second engine: the frame followed by
its 15 CRC bits. An intact code word is a multiple of P(x), so the final
register is zero. Any other value is the syndrome.

The engine multiplies by x^15 before it divides, so the syndrome equals
(T(x)·x^15 mod P(x)) for the received word T(x). It is zero exactly when
T(x) mod P(x) is zero.

The ACK slot level follows from the syndrome:

- A zero syndrome gives `crc_ok = 1` and `ack_slot = 0`, a dominant
  acknowledgement.
- A non-zero syndrome gives `crc_ok = 0` and `ack_slot = 1`, recessive.

After reset the slot is recessive. The results are valid in the third cycle
after the last beat, one cycle later than the engine because the decision
is registered.

## The serial 12-bit / 5-bit link

`crc_serial_encoder` and `crc_serial_decoder` protect a 12-bit word with
the 5-bit polynomial x^5 + x^4 + x^2 + 1. Both are built on
`crc_lfsr_serial`, with a small controller that moves from `SER_IDLE` to
`SER_SHIFT` to `SER_FINISH`.

- **Encoder.** A `crc_en` strobe loads `data_in`. The 12 bits are shifted
  through the LFSR, and the encoder outputs `crc_out` and
  `data_trans = {data_in, crc_out}`. `done` is high 14 cycles after the
  cycle that presents `crc_en`.
- **Decoder.** A `dec_en` strobe loads a 17-bit word and shifts all of it
  through the LFSR. It returns the 12 data bits as `data_decod` and the
  syndrome as `error`. `done` is high 19 cycles after `dec_en`.

In `can_crc_top` the encoder's `done` starts the decoder. The code word is
XORed with `chan_err` on its way, so a test can inject any error pattern. An
assertion flags a code word that arrives while the decoder is still busy.

For data `12'hAF5` the polynomial gives CRC `5'h0A` and code word
`17'h15EAA`. Some published values for this example (CRC `5'h15`, code word
`17'h15EB5`) do not follow from this polynomial; the RTL follows the
polynomial. In the same way, the textbook division of 1010111 by
x^4 + x^2 + 1 leaves 1111, and `tb_crc_lfsr_serial` checks that value.

## Top level (`can_crc_top`)

The top level brings out three groups of ports:

| group | ports | what they do |
|---|---|---|
| CAN transmit | `tx_valid`, `tx_sof`, `tx_last`, `tx_bits[2:0]`, then `tx_crc_valid`, `tx_crc[14:0]` | CRC sequence of a frame, SOF through the data field |
| CAN receive | `rx_valid`, `rx_sof`, `rx_last`, `rx_bits[2:0]`, then `rx_result_valid`, `rx_syndrome`, `rx_crc_ok`, `rx_ack_slot` | checks a frame plus its CRC |
| serial link | `crc_en`, `data_in[11:0]`, `chan_err[16:0]`, then `data_trans`, `crc_out`, `enc_done`, `data_decod`, `dec_error`, `dec_done`, `link_busy` | the 12-bit / 5-bit encoder-to-decoder link |

Transmit and receive are independent streams. A node can check one frame
while it encodes another.

Conventions:

- `clk` is the only clock.
- `rst` is a synchronous, active-high reset.
- In every beat, the earliest bit on the bus is the most significant bit.

## What is not here, and where this departs from its source

- **Bus framing and bit stuffing.** Serialisation onto the bus, bit stuffing
  and destuffing, the CRC delimiter and the ACK slot timing on the wire are
  outside this design. The CRC units take the bit sequence they are given.
  The design was specified as covering the stuffed bits. ISO 11898 computes
  the CRC over the destuffed bits. Feed whichever sequence your controller
  needs.
- **Delay placement.** The unfolding factor, the look-ahead level and the
  order of the transformations follow the design as specified. The exact
  placement of the delays was not specified and is this design's own:

  - the ring of `M^3` stages;
  - one register on `w`;
  - the sliding window.

  The cycle counts and iteration bounds above describe this implementation.
- **Added control ports.** The `in_sof`/`in_last`/`in_valid` framing and
  the serial units' `busy`/`done` outputs were added here. So was the
  decoder's `dec_en` start strobe, because the decoder was specified with
  only a code-word input.
- **No timing closure.** Nothing here has been through place and route. The
  XOR-level counts are logic depth, not measured frequency.

## Files

`rtl/`:

| file | what it holds |
|---|---|
| `crc_pkg.sv` | polynomials, widths, the `crc15_t` type, the serial controller states |
| `crc_lfsr_serial.sv` | bit-serial LFSR, any width and polynomial |
| `crc15_unfolded.sv` | parallel engine: unfold, look-ahead, retimed ring |
| `crc15_can_checker.sv` | receive decoder: syndrome and ACK slot |
| `crc_serial_encoder.sv` | serial 12-bit / 5-bit encoder |
| `crc_serial_decoder.sv` | serial 12-bit / 5-bit decoder |
| `can_crc_top.sv` | top level |

`tb/`:

| file | what it holds |
|---|---|
| `crc_ref_pkg.sv` | reference CRC by polynomial long division on bit vectors (a different method from the LFSR) |
| `tb_crc_lfsr_serial.sv` | LFSR tests, including the CRC-15/CAN check value 0x059E for ASCII "123456789" |
| `tb_crc15_unfolded.sv` | engine tests: random frames, idle beats, back-to-back frames, latency |
| `tb_crc15_architectures.sv`, `crc15_arch_probe.sv` | the five `UNFOLD`/`LOOKAHEAD` configurations above, each checked and timed |
| `tb_crc15_can_checker.sv` | intact and corrupted frames, syndrome, ACK level |
| `tb_crc_serial_encoder.sv`, `tb_crc_serial_decoder.sv` | serial link units |
| `tb_can_crc_top.sv` | end to end at default parameters, described below |

`tb_can_crc_top` runs transmit, receive and the serial link at the same
time. It feeds every transmit CRC back into the receiver, with one frame in
three corrupted. It counts each mechanism and fails if any never occurs:

- idle beats;
- back-to-back frames;
- transmit/receive overlap;
- dominant and recessive ACK;
- clean and corrupted serial transfers.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/crc_pkg.sv tb/crc_ref_pkg.sv tb/tb_can_crc_top.sv \
        --top-module tb_can_crc_top -Mdir obj_top
    ./obj_top/Vtb_can_crc_top

For the other testbenches, replace `tb_can_crc_top` with the testbench's
name. The simulator finds the modules through `-I`. Each run takes well
under a second.

To lint a module on its own:

    verilator --lint-only -Wall -Irtl rtl/crc_pkg.sv rtl/<module>.sv

The only warnings are unused package constants.

To try another polynomial, override `WIDTH` and `POLY` on
`crc_lfsr_serial` or `crc15_unfolded`. `POLY` is the polynomial without its
top term, and its bit 0 must be 1. To try another degree of parallelism,
override `UNFOLD`, and `LOOKAHEAD` for the pipelining.
