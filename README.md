# LFSR code generators for spread-spectrum radio and built-in self-test

A linear feedback shift register (LFSR) is a shift register whose input bit is
the XOR (or XNOR) of a few of its own stages. With well-chosen taps it steps
through all 2^N − 1 non-zero states before repeating, and its serial output is
a maximal-length pseudo-noise (PN) sequence: cheap to make, exactly
reproducible at the receiver, and with the sharp two-valued autocorrelation
that CDMA spreading, code acquisition and signature analysis rely on.

This RTL implements a family of such generators, described in a thesis on
LFSRs in wireless systems, as synthesizable SystemVerilog:

| design | module | what it is |
|---|---|---|
| 8-bit LFSR | `shift_reg8` | Fibonacci LFSR for x^8+x^4+x^3+x^2+1, enable, async reset to a seed |
| 13-bit LFSR | `shift_reg13` | same, x^13+x^4+x^3+x+1 |
| 16-bit 4-tap parallel LFSR | `lfsr_16` | four shift-register-LUT delay lines fed by one bit, XNOR parity, serial fill; lines over 16 stages cascade |
| 16-bit multicycle LFSR | `sr_16_tap1` | one addressable shift register, four taps read in turn at 4× the chip rate (or two at 2×, three at 4×) |
| I/Q PN generator | `iq_pn_gen` | two 17-stage LFSRs for QPSK spreading, I(x)=x^17+x^5+1, Q(x)=x^17+x^9+x^5+x^4+1 |
| RS code generator | `rs_code` (+ `rs_lfsr`) | XOR of two 41-stage 2-tap LFSRs primed with different fills (Gold-style codes) |
| BIST pair | `stand_alone_bist` (+ `maximal_length_lfsr`, `signature_register`) | 10-bit pattern generator and 10-bit serial signature register |
| shift-register LUT | `srl16e` | addressable 16-deep shift register with clock enable (SRL16E behaviour) |
| top | `lfsr_wireless_top` | all of the above side by side, each with its own ports |

`lfsr_pkg` holds the one shared helper, `parity(state, mask)`.

The designs are independent examples rather than one system. The top simply
instantiates each with its own prefixed ports (`s8_`, `s13_`, `p16_`, `mc_`,
`pn_`, `rs_`, `bist_`). They share the chip clock `clk`; the multicycle LFSR
runs on `clk4x`.

## Reading a polynomial as hardware

Most of the confusion around LFSRs comes from mapping polynomial terms onto
register stages, and this collection uses two mappings. Keep them apart.

**Right-shifting registers** (`shift_reg8`, `shift_reg13`, `iq_pn_gen`,
`rs_lfsr`). Stage N−1 receives the new bit, the register moves towards stage
0, and stage 0 is the serial output. Stage *k* holds the bit that entered
N−k clocks ago.

* In `iq_pn_gen` and `rs_lfsr`, term x^k is the output of stage *k*, and the
  trailing 1 (x^0) is stage 0. Q(x)=x^17+x^9+x^5+x^4+1 therefore feeds
  stage9 ^ stage5 ^ stage4 ^ stage0 back into stage 16. These registers are
  maximal: both PN channels have period 131 071.
* In `shift_reg8` and `shift_reg13`, the taps reproduce the original design's
  simulation trace. There, term x^k taps register bit k−1: bits 7,3,2,1 for
  the 8-bit design and bits 12,3,2,0 for the 13-bit one. This is **not**
  maximal. From its seed the 8-bit register cycles through 105 states, not
  255, and the 13-bit one through 6141, not 8191. The 8-bit taps never use
  bit 0, so that bit is only a one-clock delay. For true m-sequences, set the
  `TAPS` parameter to the mapping that counts powers from the MSB end:
  `8'b0111_0001` gives 255 and `13'b1_0110_0000_0001` gives 8191. The default
  follows the trace, so the RTL behaves like the design it reproduces.

**Left-shifting registers** (`maximal_length_lfsr`, `signature_register`).
Bit 0 receives the new bit and the register moves towards bit WIDTH−1. The
10-bit generator feeds bit9 ^ bit6 into bit 0 (x^10+x^7+1, period 1023). From
the all-ones reset it runs 3FF, 3FE, 3FC, 3F8, … Set WIDTH=3, TAP_A=1 and
TAP_B=2 to get the textbook 3-bit generator (Q1 xor Q2 into Q0). Its states,
read Q0Q1Q2, run 7, 3, 1, 4, 2, 5, 6, and its Q2 stream 1110010 is the 7-chip
m-sequence. That stream's autocorrelation (agreements minus disagreements) is
7 at zero shift and −1 at every other shift.

**Delay-line designs** (`lfsr_16`, `sr_16_tap1`). These are described by the
delays of their taps. Both use delays 2, 3, 5 and 16, so the new bit is
b[n] = f(b[n−2], b[n−3], b[n−5], b[n−16]), period 65 535.

## The parallel shift-register-LUT LFSR (`lfsr_16`)

An FPGA shift-register LUT (SRL16) packs 16 stages into one LUT, but it can
output only one stage. A 4-tap LFSR needs four stages at once. The trick is to
keep **four delay lines of lengths 2, 3, 5 and 16, all fed with the same new
bit**. Each line receives the same bit stream, so the end of the length-*k*
line always holds what stage *k* of one long register would hold. All four
taps are therefore available every clock. The four line ends are XNORed
(`FB_XNOR=1`) into the new bit, and `dout[3]` (the length-16 line) is the LFSR
output.

With XNOR the forbidden lock-up state is all ones, so an all-zero start is
legal. That matters because shift-register LUTs have no reset. A 2:1
multiplexer in front of the lines selects `din` while `fill` is high. Sixteen
enabled clocks of fill load any state, and all four lines stay consistent
because they see the same bits. `ce` is the chip-rate clock enable.
`FB_XNOR=0` gives the XOR form, whose lock-up state is all zeros.

The line lengths are parameters (`LEN_U1`..`LEN_U4`, 1 to 64). A line longer
than 16 is built from chained 16-stage `srl16e` segments, and the last
segment is read at the remaining depth. So the same module builds longer
LFSRs. For example, lengths 1, 2, 22 and 32 give a 32-stage register with
taps 32, 22, 2 and 1, using six segments. Only long lines cost extra
segments, so the cost grows with the tap positions, not with twice the
length. The testbench runs this 32-stage version next to the default one;
its 2^32−1 period is too long to simulate.

## The multicycle tap-access LFSR (`sr_16_tap1`)

This design keeps the whole LFSR in one addressable 16-stage shift register
(`srl16e`). It reads the four taps one after another, using an address that
changes four times per chip. Everything runs on `clk4x`. A 2-bit sub-cycle
counter produces the chip rate:

```
clk4x sub-cycle :  0        1        2        3  (chip_en=1)
address         :  1        2        4        15
parity flop     :  ~(0^t1)  ~(acc^t2) ~(acc^t4) cleared
register        :  ---      ---      ---      shifts in ~(acc^t15), or din if fill
dout            :                             <= stage 16 (address 15)
```

A single flip-flop folds each tap in with an XNOR gate. In sub-cycle 3 the
last tap is XNORed in combinationally, the result is shifted in, and the
flip-flop is cleared. Four XNOR steps starting from 0 equal the plain XOR of
the four taps. So this design follows b[n] = b[n−2]^b[n−3]^b[n−5]^b[n−16],
locks up at all zeros, and must be loaded by `fill` (16 chips) before use.
`dout` changes once per chip, at the `chip_en` edge. `reset` (asynchronous)
clears the counter, the parity flip-flop and `dout`, but not the shift
register.

Other tap counts use the same structure. `SUB_W` sets the clock multiple,
2^`SUB_W`, so 1 gives 2× and 2 gives 4×. `NTAPS` taps are read in the last
`NTAPS` sub-cycles of each chip. In the idle sub-cycles before them, the
parity flip-flop is not enabled and stays cleared. Two taps run on a 2×
clock. Three taps run on a 4× clock with the flip-flop enabled for three of
the four cycles. An odd number of XNOR steps gives the complement of the
XOR, so a 3-tap register has XNOR feedback and locks up at all ones. List the
output (longest) tap last in `TAP_ADDR`, because `dout` samples the tap read
in the `chip_en` sub-cycle. A polynomial with an odd number of taps is never
maximal, because it is divisible by x+1. So 3-tap use is for sequences that
need not be maximal.

The original design has a separate chip-rate clock input. Here the chip rate
is the `chip_en` strobe output instead, which keeps the design in one clock
domain. Logic that consumes chips should use `chip_en` as its clock enable on
`clk4x`.

## Serial fill

None of the SRL-style registers can be loaded in parallel. Each has a 2:1
multiplexer that feeds a serial fill bit into the register in place of the
feedback: `fill`/`din`, `fill_sel`/`data_in_*`, `fill_en_*`/`new_fill_*`. An
N-stage register is fully loaded after N enabled chips of fill. If the next
fill state is known in advance, assert fill for the last N chips before the
switch-over. The feedback bits those chips would have produced are never
output anyway, so the new state is in place exactly at the transition.

## PN generator (`iq_pn_gen`)

The I and Q channels share `shift_en` (chip enable), `fill_sel` and the
synchronous `reset`, which loads all ones into both registers. `data_in_i`
and `data_in_q` are the fill bits. The outputs are the two stage-0 bits,
which change one clock after an enabled edge.

## RS code generator (`rs_code`)

Two identical 41-stage registers run in lock step, and the code bit is the XOR
of their last stages. Each register has its own fill input, so users get
different codes by priming the pair with different factor codes. The
original design fixes only the length and the two-tap form. The tap used
here is x^41+x^3+1, a primitive trinomial, so each register has period
2^41−1. This tap is this implementation's choice, set by `TAP_A` and `TAP_B`.
Both registers use the same polynomial by default. With one polynomial, the
XOR of two phases of the same m-sequence is another phase of it. For a true
Gold family, give the two registers a preferred pair of polynomials; this
needs a small change to `rs_lfsr`, which supports only two taps. `rst` is
synchronous and loads all ones.

## BIST (`stand_alone_bist`)

`maximal_length_lfsr` generates the patterns (`lfsr_out`) for a circuit under
test. `signature_register` compacts the circuit's serial response
(`serial_in`) into a 10-bit signature (`signature_out`). It is the same LFSR
with `data_in` XORed into the feedback. Both registers share clock and a
synchronous reset: the generator resets to all ones and the signature to
zero. A test session is one reset clock followed by a known number of clocks
(1023 covers every pattern once), then a compare of `signature_out` against
the value from a known-good circuit. The circuit under test and any scan
chain are outside this RTL.

## Choices made where the original is silent or inconsistent

* 8/13-bit taps follow the simulation trace, not the maximal mapping (see
  above). Reset is asynchronous and loads the seed while high: 8'h08 and
  13'h000D, both taken from the trace. One passage describes reset as holding
  the previous state; the trace shows it loading the seed, and the trace was
  followed.
* `lfsr_16` uses XNOR parity. One description of the same structure says XOR.
  `FB_XNOR` selects either.
* `dout` bit order of `lfsr_16` (the length-2 line is bit 0 and the length-16
  line is bit 3) and the meaning of `sr_16_tap1`'s `dout` (the 16th stage)
  are this implementation's choices.
* PN and RS reset values (all ones) and the RS tap position are this
  implementation's choices.
* `shift_reg8` and `shift_reg13` have a parallel `state` output added for
  observation; the original has only the serial output pin.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbenches compare against bit-level
models written from the tap lists, and check the documented traces and the
full sequence periods. `tb_lfsr_wireless_top` runs every design in the top at
default sizes through a complete operation: reset, fill, enable hold, a full
period and BIST fault detection. It counts each of these mechanisms. For
example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/lfsr_pkg.sv \
    tb/tb_lfsr_wireless_top.sv --top-module tb_lfsr_wireless_top -o sim
./obj_dir/sim
```

The same command, with the testbench name changed, runs any block's
testbench. Every testbench finishes in well under a second. Registers without
reset (`srl16e`, and hence `lfsr_16` and the shift register in `sr_16_tap1`)
power up unknown, so the testbenches fill them before checking.
