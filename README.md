# Rate-1/2 convolutional encoders for an OQPSK transmitter

A satellite link that uses offset QPSK (OQPSK) needs forward error correction
(FEC) in front of the modulator. Here the FEC is a convolutional encoder. For
every message bit it sends two code bits. Each code bit is the XOR of a few of
the last K message bits. K is the constraint length. The receiver, usually a
Viterbi decoder, uses this redundancy to correct bit errors without asking for
a retransmission.

This RTL builds the encoder in two strengths:

* **K = 3**, generators 7 and 5 (binary 111 and 101). This is small and serves
  as the teaching case.
* **K = 7**, generators 171 and 133 (octal). This is the usual choice for
  satellite links.

The two small codes that introduce the idea are also built: a rate-1/2 code
with generators 111/110 and a rate-1/3 code with generators 111/110/101. All
four are independent channels in one top module, `fec_top`. Each channel takes
message bits with a valid/ready handshake. It sends its code bits as one serial
stream, one bit per clock, ready for a modulator.

## The codes

Each encoder holds a window of the last K message bits. Below, `M[n]` is the
newest bit and `M[n-i]` is the bit from i steps earlier. After reset the
register is all zeros, so bits "before" the message count as 0.

| channel | K | rate | first code bit (X1 / pa0) | second (X2 / pa1) | third (pa2) |
|---|---|---|---|---|---|
| `conv_enc_k3` | 3 | 1/2 | M[n]^M[n-1]^M[n-2] | M[n]^M[n-2] | – |
| `conv_enc_k7` | 7 | 1/2 | M[n]^M[n-1]^M[n-2]^M[n-3]^M[n-6] | M[n]^M[n-2]^M[n-3]^M[n-5]^M[n-6] | – |
| `conv_enc_fig2` | 3 | 1/2 | M[n]^M[n-1]^M[n-2] | M[n]^M[n-1] | – |
| `conv_enc_rate13` | 3 | 1/3 | M[n]^M[n-1]^M[n-2] | M[n]^M[n-1] | M[n]^M[n-2] |

### Register orientation (read this before changing a generator)

The shift register is exposed as `window[K-1:0]`. The newest bit is in
`window[K-1]`, and bits move down towards `window[0]`. The K=7 register is
named M6..M0 with M6 the newest bit. In that form its equations read:

    X1 = M6 ^ M5 ^ M4 ^ M3 ^ M0        X2 = M6 ^ M4 ^ M3 ^ M1 ^ M0

If you shift a run of ones into a cleared K=7 encoder, `window` shows 1000000,
1100000, 1110000, and so on up to 1111111. At 1111100 the code word is
X1 = 0 and X2 = 1.

A generator is a K-bit constant in `fec_pkg`. Bit j of the constant taps
`window[j]`. This makes the constants read the usual way, newest tap on the
left: K=7 has `7'b1111001` (octal 171) and `7'b1011011` (octal 133). The K=3
equations are symmetric, so reversing the register does not change the K=3
code. It does change the K=7 code, so mind the orientation there.

The second K=7 output is not inverted. Some standards invert it; this design
does not.

### Reference encodings

All of these start from a cleared register. Code bits are listed in the order
they leave, X1 first.

| code | message | code stream |
|---|---|---|
| K=3 | 011 | 00 11 01 |
| K=3 | 01111011 | 00 11 01 10 10 01 00 01 |
| K=3 | 11111111 | 11 01 10 10 10 10 10 10 |
| K=7 | 11111111 | 11 01 10 01 01 00 11 11 |
| K=7 | 01111011 | 00 11 01 10 01 10 10 00 |
| example 1/2 | 01111011 | 00 11 00 10 10 01 01 00 |
| example 1/3 | 01111011 | 000 111 001 100 100 011 010 001 |

## One encoder channel

Every channel is an instance of `fec_encoder` with its own K, N (code bits per
message bit) and generators. A channel works in three steps, each one clock:

1. **Shift** (`conv_shift_xor`). An accepted bit enters `window[K-1]`.
2. **XOR**. One clock later, N reduction-XORs of `window & GEN[i]` are stored
   as the parallel code word `code`. On the named channels this word is `x`/`y`
   or `pa`. `code_valid` marks it.
3. **Commutate** (`code_serializer`). The word is loaded into an N-bit shift
   register and leaves on `out_bit`, `code[0]` first, one bit per clock while
   `out_valid` is high.

Timing, counting edges from the edge that takes a message bit (edge t):

    edge t     message bit taken, window updated, flag rises
    edge t+1   code word stored, code_valid and flag1 rise
    edge t+2   first code bit on out_bit, op_ready rises
    edge t+N+1 last code bit of this word

The serializer takes the next word in the same clock as it sends the last bit
of the current one. Back pressure travels up through `code_ready` and
`in_ready`. So with a message bit offered on every clock, a channel settles to:

* one message bit taken every N clocks (every 2 clocks for rate 1/2);
* an output stream with no gaps.

During pipeline fill, the first two or three bits are taken faster.
`in_ready` is low while the pipeline is full. A source that does not watch it
would lose bits.

The output has no ready signal. The modulator is assumed to take one bit per
clock.

### Progress flags

`status` is an `enc_status_t` packed struct, `{flag, flag1, op_ready}`. Each
bit goes high the first time its step produces a result and stays high until
reset:

* `flag`: the shift register has taken a bit.
* `flag1`: the XOR network has stored a word.
* `op_ready`: a code bit has been output.

These flags show that the channel has started. They are not per-word strobes.
For per-word timing, use `code_valid` and `out_valid`.

### Reset

`reset` is synchronous and active high. It clears the register to zero, drops
any word in flight, idles the output and clears the flags. A reset in the
middle of a stream is safe. The next message is encoded from the all-zero
state.

## Top level: `fec_top`

`fec_top` has no parameters. It shares `clk` and `reset` among four
independent channels. Their port groups have the prefixes `k3_`, `k7_`, `ex2_`
and `ex3_`. Each group has these ports:

| port | dir | width | meaning |
|---|---|---|---|
| `*_in_valid`, `*_in_bit` | in | 1 | message bit offered |
| `*_in_ready` | out | 1 | the bit is taken at this edge |
| `*_window` | out | K | shift register, newest bit at the top index |
| `*_code_valid` | out | 1 | parallel code word valid |
| `*_x`, `*_y` or `*_pa` | out | 1,1 / N | parallel code word |
| `*_out_valid`, `*_out_bit` | out | 1 | serial code stream |
| `*_status` | out | 3 | `{flag, flag1, op_ready}` |

The K=3 and K=7 encoders are alternatives for the same FEC stage. No logic
selects between them: either serial output can drive the modulator.

## How far to trust it, and where it departs from the original

What matches the original design:

* The code equations.
* The register contents during a run of ones.
* The serial order, X1 before X2.
* The all-zero start.

Each of these is checked against values worked out independently of the RTL.

Choices made here:

* **One clock, with handshakes.** The original used three clocks: one for
  shifting, one for storing X and Y, and one for unloading the output. Here
  there is one clock. Valid/ready handshakes replace the other two, and the
  serial output runs at N times the message rate within that clock.
* **Flag timing.** The original says what the three flags mean but not exactly
  when each rises. The timing above is this design's choice.
* **Example codes.** The two introductory codes are not given a serial output
  in the original. Here they are serialized like the main encoders, in the
  order pa0, pa1 (pa2).
* **No tail bits.** The encoder does not flush the register with zeros at the
  end of a message. An 8-bit message gives exactly 16 code bits, as in the
  original results. To terminate a trellis, append K-1 zeros to the message.
* **Out of scope.** The modulator itself and a decoder are not part of this
  RTL.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`. For example, the end-to-end test:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/fec_pkg.sv tb/tb_fec_top.sv --top-module tb_fec_top
    ./obj_dir/Vtb_fec_top

To run a different test, swap in another testbench and top-module name:

| testbench | what it checks |
|---|---|
| `tb_fec_top` | all four channels at once, each against its own reference model (`tb_fec_chan_model`). It covers the 01111011 message, a bit offered every clock (rate and gap-free output), random traffic, and a reset in the middle of a stream. It counts stalls, back-to-back output, the flag order and the reset, and fails if any of them never happened. |
| `tb_conv_enc_k3`, `tb_conv_enc_k7`, `tb_conv_enc_fig2`, `tb_conv_enc_rate13`, `tb_fec_encoder` | one channel each: the reference encodings above, every window value, every code word, the flags, the latency, the rate, and random traffic with resets |
| `tb_conv_shift_xor` | the register and XOR stage at K=3 and K=7, with random stalls downstream |
| `tb_code_serializer` | the commutator at N=2 and N=3: bit order, back-to-back words, and the ready rule |

Each run takes well under a second. `fec_pkg` produces unused-parameter lint
warnings in modules that use only some of its constants. These warnings are
harmless.

## Changing it

* **A different code.** Add generator constants to `fec_pkg`. Then instantiate
  `fec_encoder` with the new `K`, `N` and `GEN`. Nothing else depends on K or
  N.
* **Inverted output.** To invert an output, as some standards do, apply the
  inversion to that bit of `code` in the channel wrapper.
* **Output back pressure.** Put an `out_ready` into `code_serializer`'s shift
  condition and into `word_ready`.
