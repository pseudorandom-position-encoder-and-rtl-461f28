# Single-track pseudorandom absolute encoder with bidirectional serial code conversion

An absolute rotary encoder normally needs one code track, and one detector, per
output bit. This design needs only one code track and one code detector,
whatever the resolution. The track carries a maximal-length pseudorandom
sequence of 2^n - 1 bits. Any n consecutive bits of it occur only once per turn,
so they identify the position. The detector reads one bit per code position and
shifts it into an n-bit register. After the disc has moved n code positions,
the register holds the window that names the current position. Until then the
position is unknown, which is why such encoders are called *virtual* absolute
encoders.

A second track, an ordinary incremental track, gives two quadrature signals A
and B. They tell the electronics when to read a code bit and in which direction
the disc turns. They also split every code position into four, which adds two
low-order bits.

The pseudorandom window then has to be turned into a binary position. A lookup
table with 2^n entries is impractical for large n. The converter here does it
serially instead: it runs a copy of the sequence generator from the read window
back to a fixed reference window and counts the steps. Running the generator
the short way round roughly halves the worst-case conversion time. The preceding
position decides which way is short.

The RTL is parameterised by the register length `N`. The feedback laws cover
`N = 3 .. 14`. The default `N = 3` is a 5-bit encoder: 3 code bits plus 2
quadrature bits, so 7 code positions and 28 steps per turn.

## Block structure

```
 a_in, b_in ──► read_pulse_gen ──read_pulse──► led_pulse (fires code-track LED)
                 │ a_s,b_s   │shift_cw/shift_ccw
                 ▼           ▼
         quad_lsb_decoder  code_shift_register ◄── code_bit
                 │           │ word                startup_validity ──► code_valid
                 │           ▼
                 │     serial_code_converter ◄── MSB of preceding position
                 │           │ p
                 ▼           ▼
            position = { p (N bits), lsb (2 bits) }
```

| module | role |
|---|---|
| `virtual_abs_encoder` | top level: wiring, conversion start, preceding-position register, output word |
| `read_pulse_gen` | synchronises A and B, detects edges of A while B = 0, gives the read pulse and the direction |
| `quad_lsb_decoder` | two low-order bits from A and B (one inversion, one exclusive-OR) |
| `code_shift_register` | bidirectional code-forming register |
| `startup_validity` | flags the code as wrong until n bits were read in one direction |
| `serial_code_converter` | pseudorandom-to-binary conversion by counting generator steps |
| `prbs_pkg` | feedback laws for n = 3 .. 14 |

## Reading the track

The code track is read in the middle of each code bit. That moment is marked by
the incremental track: a transition of A while B is 0. `read_pulse_gen` brings
A and B into the clock domain with two flip-flops each. It compares A with a
copy delayed by one clock, which is a clocked form of the classic
exclusive-OR-with-RC-delay edge detector. It then gates the result with `~B`.
The level of A just after the edge gives the direction:

* A = 1: clockwise. The register shifts left, and the new bit enters at `X(1)`.
* A = 0: counter-clockwise. The register shifts right, and the new bit enters at `X(n)`.

The read pulse is also the `led_pulse` output. The code-track light source only
needs to be on while a bit is read, so it can be driven hard in short pulses
through a single slit. `code_bit` is sampled at the clock edge that ends
`led_pulse`. The photodetector and comparator therefore have one clock to settle
once the LED is lit.

Quadrature states inside one code position, clockwise:

| (A,B) | 10 | 11 | 01 | 00 |
|---|---|---|---|---|
| lsb | 0 | 1 | 2 | 3 |

so `lsb[1] = ~A` and `lsb[0] = A ^ ~B`. The read edge lies between state 3 of
one code position and state 0 of the next. Turning clockwise, the output
therefore counts 4p, 4p+1, ... without a jump.

## Register convention and the feedback table

The register is `{X(n), ..., X(1)}`, with `X(n)` as the MSB. The track bit of
code position j is S(j). At code position p the register holds
`X(k) = S(p + n - k)`: `X(n)` is S(p) and `X(1)` is the newest bit,
S(p + n - 1). The sequence obeys the *direct* law:

    X(1) <= X(n) ^ c(n-1)X(n-1) ^ ... ^ c(1)X(1),   X(i) <= X(i-1)

One direct step is undone by the *inverse* law:

    X(n) <= X(1) ^ b(2)X(2) ^ ... ^ b(n)X(n),       X(i) <= X(i+1),   b(k+1) = c(k)

The taps `c(k)` in `prbs_pkg`, next to `X(n)`:

| n | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| taps | 1 | 1 | 2 | 1 | 3 | 4,3,2 | 5 | 3 | 2 | 6,4,1 | 10,6,4 | 13,8,4 |

Every one of these laws was checked to have period 2^n - 1. The n = 9 law,
`X(9) ^ X(5)`, is this design's choice: the taps `X(9) ^ X(6)` give a period of
only 21, so they were not used.

The reference window is all ones (`INIT_WORD`, position 0). Any window of the
sequence could serve. The tap table used to cut the code track must be the one
in `prbs_pkg`. The track must also be cut so that position 0 is the all-ones
window.

## The serial converter

This is the heart of the design. `serial_code_converter` loads the read word
into a working shift register. Every clock it compares the register with
`INIT_WORD`, and on a mismatch it applies one generator step and increments a
counter.

* **Inverse mode** (shift right). Each step moves one position back. The count
  at the match is p itself.
* **Direct mode** (shift left). Each step moves one position forward, round the
  end of the turn. The count is m = 2^n - 1 - p. Bitwise complementing the
  n-bit count gives 2^n - 1 - m = p. In hardware that is one exclusive-OR per
  count bit, controlled by the mode bit. One corner case needs care: m = 0 (the
  word is `INIT_WORD`) would complement to all ones, so it is output as 0.

The mode comes from the MSB of the position converted last. In the upper half of
the range the shorter way to position 0 is forward, so an MSB of 1 selects
direct mode. The encoder moves at most a few code positions between
conversions. So a conversion takes at most 2^(n-1) shifts, instead of up to
2^n - 2 with the inverse law alone:

| n | inverse only, worst case | MSB-selected, worst case |
|---|---|---|
| 3 | 7 clocks | 4 clocks |
| 14 | 16383 clocks | 8192 clocks |

(Each number is the clocks from the first compare to `done`, measured in
simulation with the preceding position equal to the current one.)

Limits of the halving:

* **Wrong or missing mode bit.** After reset no previous position is known, and
  inverse mode is used. A wrong mode bit only makes the conversion longer; the
  result is still exact.
* **Wrap from position 0 to 2^n - 2.** When the disc turns backwards across
  position 0, the previous MSB is 0. The walk is then the long one,
  2^n - 2 shifts.

**Timing.** `start` loads the word. `done` follows k + 1 clocks later for k
shifts, with `position`, `error` and `used_direct` valid; they hold until the
next `done`. `busy` is high from the clock after `start` until `done`. A
`start` while busy abandons the running conversion. In the encoder this happens
when a new bit is read before the last word was converted.

**Words off the sequence.** A word that is not a window of the sequence never
matches, for example all zeros from a dark or broken track. After 2^n - 1
shifts the converter stops with `error` set.

**Speed.** The conversion time is what limits the speed of the disc. To keep up
in the worst case, the clock must satisfy
f_clk > (2^(n-1) + 2) x (code bits per second) when moving steadily. On top of
that come about 4 clocks for synchronisation and start-up.

## Top level behaviour and timing

`virtual_abs_encoder` ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `a_in`, `b_in` | in | squared quadrature signals (asynchronous) |
| `code_bit` | in | squared code-track detector output, valid while `led_pulse` is high |
| `led_pulse` | out | one-clock pulse that lights the code-track LED |
| `position[N+1:0]` | out | `{p, lsb}` |
| `code_valid` | out | n bits read in one direction since reset |
| `pos_valid` | out | `code_valid`, a finished error-free conversion, no conversion running |
| `conv_busy`, `conv_error`, `conv_direct` | out | converter state and result flags |
| `dir_cw` | out | direction of the last read |

**Sequence of a read.** After an A edge, `led_pulse` is high in the third clock.
The register shifts at the end of that clock. The conversion starts in the next
clock and ends k + 1 clocks later. Only then is the `p` part of `position`
updated. The `lsb` part follows A and B after the two synchroniser clocks.

**Output lag.** Just after a code boundary is crossed, `position` briefly shows
the old `p` with the new `lsb`. `pos_valid` covers the conversion itself but not
the three clocks before it starts. Sample `position` when `pos_valid` is high
and A and B have been stable for at least three clocks.

**Start-up.** `code_valid` rises after n reads in one direction. A change of
direction before that restarts the count. Once set, it stays set until reset.
Conversions only start while `code_valid` is high.

**Reset.** For the first three clocks after reset no edge is reported, because
the synchroniser still holds its reset value rather than the real level of A.

## Departures and open points

* The edge detector uses the clock as its delay instead of an RC network. A and
  B are synchronised, which adds two clocks of latency.
* **Counter-clockwise reading.** With a single code detector, the bit that
  counter-clockwise motion needs is the one at the far end of the n-bit window.
  The design shifts in whatever `code_bit` shows during the read pulse, in
  either direction. Detector placement, or a second detector, that provides
  the right bit for each direction is left to the optics. The testbench disc
  model presents the correct bit for the direction of motion.
* **Track length.** The track carries 2^n - 1 code positions, the length of the
  sequence. It does not have 2^n.
* **Validity detection.** The start-up flag is a simple run counter. More
  elaborate schemes exist, for example ones that also re-check after direction
  reversals; they are not built.
* **Status outputs.** The error guard, the restart on a new read, `pos_valid`
  and the status flags are additions of this design.
* **Not modelled.** The optical part is not modelled as hardware: LEDs,
  photodetectors, the comparators that square the signals, and the LED driver
  transistor. Their digital interface is the top's `a_in`, `b_in`, `code_bit`
  and `led_pulse`.

## Verification

Each module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* `tb_read_pulse_gen`: every legal quadrature move. It checks that a pulse
  comes exactly on A edges with B = 0, in the expected clock, with the right
  direction.
* `tb_quad_lsb_decoder`: all four states.
* `tb_code_shift_register`: random shifts for n = 3 and 14 against a
  reference model.
* `tb_startup_validity`: fixed and random read patterns for n = 3 and 5.
* `tb_serial_code_converter`: runs `conv_checker` for every n from 3 to 14. It
  checks all positions up to n = 10 and random subsets above, in inverse mode,
  in direct mode and in the MSB-selected mode. It checks the exact latency,
  the 2^(n-1) bound, an off-sequence word and a restart. The reference sequence
  is generated inside the testbench from its own copy of the tap table.
* `tb_virtual_abs_encoder` (default N = 3) and `tb_virtual_abs_encoder_n14`
  (N = 14, 16-bit output): end-to-end tests using the disc model and checker
  `enc_env`. They run a random walk with slow phases and fast dithering, which
  restarts conversions, and they cross the zero position. They check
  `code_valid`, the result, mode and exact duration of every conversion, and
  the output word whenever the disc rests. A final phase reads a track of zeros
  and must see `conv_error`. The test fails if any of these mechanisms never
  happened: clockwise and counter-clockwise reads, reads before valid,
  direct-mode and inverse-mode conversions, restarts, wrap-around and error
  detection.

## Simulating

With Verilator 5 (the package must come first; `-y rtl` finds the modules):

```
verilator --binary --timing --assert -y rtl rtl/prbs_pkg.sv \
    tb/enc_env.sv tb/tb_virtual_abs_encoder.sv --top-module tb_virtual_abs_encoder
./obj_dir/Vtb_virtual_abs_encoder
```

The same pattern works for the other testbenches. Add `tb/conv_checker.sv` for
`tb_serial_code_converter`.

To build another resolution, set `N` on `virtual_abs_encoder` (3 .. 14). A
value outside the table stops elaboration with an error. The code track must
then be cut from the sequence generated by the matching law above, starting
from the all-ones window at position 0.
