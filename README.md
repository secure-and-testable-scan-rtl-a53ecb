# Secure and testable scan chain from extended shift registers

A scan chain makes a chip testable by letting a tester shift any state into the
flip-flops and shift any state out. On a chip that holds secrets, such as a
cipher key or round state, the same access helps an attacker: they can stop the
chip mid-computation and read its state. This design keeps full scan access for
a tester who knows the chain's structure. Someone who only sees the pins cannot
tell what the chain does to the bits.

The approach adds no circuit beside the scan chain. Each scan register is
replaced by an *extended shift register* (ESR), a register whose scan path has
a few extra XOR or NOT gates. Each ESR is built to be *functionally equivalent*
to a plain shift register of the same length: a bit shifted in comes out
unchanged K clocks later. The value held in each flip-flop, though, is the
shifted bits mixed in a secret way. The tester knows the mixing. From it they
compute the scan-in sequence for any wanted state, and they decode the state
from K scan-out bits. An attacker sees a plain delay line and does not know
which internal state it stands for.

In normal mode every flip-flop loads its kernel bit directly, as an ordinary
scan flip-flop does. All the extra gates sit on the scan path, so normal
operation runs at full speed.

## The three register types

In all three types, stage `y[i]` (i = 0 … K-1) is a scan flip-flop. Stage `y[0]`
is next to `scan_in`, and stage `y[K-1]` drives `scan_out`. One shift clock does
the following in each type:

| type | module | scan update | without correction it is … |
|------|--------|-------------|------------------------------|
| inversion-inserted (I2SR) | `i2sr` | `y[i] <= y[i-1] ^ INV_MASK[i]` | already a pure delay, if the number of NOT gates is even |
| linear feed-forward (LF2SR) | `lf2sr` | `y[i] <= src[i] ^ XOR_{j<i} FF_TAPS[i*K+j]·src[j]`, where `src[0] = scan_in` and `src[j] = y[j-1]` | *input-equivalent*: the last K inputs fix the state, but `y[K-1]` is not the input from K clocks back |
| linear feedback (LFSR) | `lfsr_esr` | `y[i] <= pred[i] ^ XOR_{j>=i} FB_TAPS[i*K+j]·y[j]` | *output-equivalent*: the state can be read from the next K outputs, but inputs do not simply pass through |

For the I2SR, stage `i` holds the bit that entered `i+1` clocks ago, XORed with
the parity of the NOT gates it passed. An even total leaves the output
unchanged. The module stops elaboration with an error if `INV_MASK` has an odd
number of ones.

### Making LF2SR and LFSR pure delays

This part needs the most care. Each linear register gets one correction. The
module computes it from its taps while it elaborates, so only the taps need to
be chosen.

**LF2SR: output correction.** Feed-forward taps only go forward, so stage `i`
holds `scan_in(t-i-1)` XORed with some more recent inputs. Each stage has a
different oldest input, so these expressions form a triangle. XORing a suitable
set of stages, `OUT_SEL`, cancels every term except `scan_in(t-K)`. The function
`out_select` finds the set:

1. It gets each stage's expression from the register's impulse response.
2. It starts from the last stage.
3. Going down in age, it removes each unwanted input by XORing in the one stage
   whose oldest input that is.

`scan_out = ^(y & OUT_SEL)`.

**LFSR: input correction.** Feedback taps only go backward, so the next K
outputs depend only on the present state, and input bits need exactly K clocks
to reach the output. The correction adds an XOR of some stages, `IN_SEL`, to
the input of stage 0. The function `feedback_row` works on unit states one at a
time, as follows:

1. Compute the K output bits that follow the unit state.
2. Shift the state once with a 0 input. Stages 1 … K-1 of the result are fixed
   by the taps.
3. Pick the value of stage 0 whose next K outputs are the old outputs moved on
   by one.

The chosen bits form the complete stage-0 feedback row. `IN_SEL` is that row
XORed with the raw stage-0 taps. With this row the register is exactly a
K-clock delay.

A correct row always exists, for any feedback taps. The input of stage 0 can
steer the state to anywhere, so a stage-0 feedback row can make the register's
state matrix nilpotent. The subdiagonal of ones then makes the response a pure
K-clock delay.

`OUT_MANIP = 0` or `IN_MANIP = 0` builds the register without its correction.
That version is not a pure delay. It is there to show the difference.

## Security measures

**Dummy stages (LF2SR, LFSR).** A stage whose `DUMMY_MASK` bit is set stays in
the scan path but is cut off from the kernel. In normal mode it keeps its value.
Its `d` bit is ignored, and its `q` bit is not meant to drive kernel logic. An
attacker can flip kernel bits through the chip's inputs and watch where the
change comes out of the chain. That does not work on a dummy stage. As a result,
different tap structures give the same responses, and the attacker cannot tell
them apart.

**Reset guard (I2SR).** Reset clears every stage to 0. If the attacker could
scan out right after reset, every 1 they saw would mark a NOT gate. The
`scan_guard` module prevents this. Its flip-flop `locked` is set by reset. While
`locked` is set:

- A scan clock neither shifts nor captures.
- The I2SR drives `scan_out` to 0.

The first normal-mode clock (`scan_en = 0`) loads the kernel's values and clears
`locked`. The I2SR exports the guarded commands `shift_ok` and `capture_ok`, so
registers cascaded with it obey the same guard.

## The chain: `secure_scan_top`

```
scan_in -> lf2sr (K_FF) -> lfsr_esr (K_FB) -> i2sr (K_INV) -> scan_out
                                                  |
                                              scan_guard -> shift_ok / capture_ok to all three
```

A cascade of pure delays is itself a pure delay. Scan-in, capture and scan-out
therefore work on the whole chain of N = K_FF + K_FB + K_INV bits, just as on
one register. The I2SR is last in the chain, so its masked output is the chain
output.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | rising-edge clock, asynchronous active-low reset (clears all stages, locks scan) |
| `scan_en` | in | 1 | 1 = scan mode, 0 = normal mode (capture every clock) |
| `scan_in`, `scan_out` | in/out | 1 | chain ends; `scan_out` is combinational from the last stage |
| `scan_locked` | out | 1 | guard flip-flop |
| `kernel_d` | in | N | next state from the kernel; bits [K_FF-1:0] go to the LF2SR, then the LFSR, then the I2SR |
| `kernel_q` | out | N | present state to the kernel, in the same order |

The kernel itself, the logic that uses these flip-flops as its state, is not
part of this RTL. Connect it between `kernel_q` and `kernel_d`, and leave the
dummy positions unconnected.

**Timing.** Each shift or capture takes one clock. Loading a full state takes N
scan clocks, and reading one out takes N scan clocks. Unloading the old state
and loading the next can overlap, as with any scan chain. In normal mode the
flip-flops behave exactly like plain D flip-flops with a 2:1 multiplexer.

**Using the chain as a tester.** Keep a bit-level model of the three registers:
taps, NOT positions and corrections. Start it from the zero state and apply N
bits. That gives the state that the same N scan-in bits produce in the chip,
whatever state the chip was in before. To set a state, invert this map; the
testbench simply searches all 2^N sequences. To read a state, take N scan-out
bits, first bit out first, feed them to the same model, and the model gives the
state the chain held.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `i2sr` | `K`, `INV_MASK` | 3, `3'b101` | length; bit i = NOT gate in front of stage i (even count) |
| `lf2sr` | `K`, `FF_TAPS`, `DUMMY_MASK`, `OUT_MANIP` | 3, `9'b001_001_000`, `3'b010`, 1 | bit `i*K+j` = tap from source j into stage i (j < i) |
| `lfsr_esr` | `K`, `FB_TAPS`, `DUMMY_MASK`, `IN_MANIP` | 3, `9'b100_100_010`, `3'b001`, 1 | bit `i*K+j` = tap from stage j into stage i (j >= i) |
| `secure_scan_top` | `K_FF`, `FF_TAPS`, `FF_DUMMY`, `K_FB`, `FB_TAPS`, `FB_DUMMY`, `K_INV`, `INV_MASK` | as above | one set per register |

Both linear registers ignore taps that break their source-order rule. The I2SR needs `K >= 2`. When
changing `K`, give new tap and mask values of the matching width.

The three-stage size follows the worked example of a three-stage register. The
tap positions, NOT positions and dummy positions are this design's own choices:

- Taps were chosen so that both corrections are non-trivial. With other taps
  the raw register can happen to be a pure delay already.
- The security of the scheme grows with the number of structures an attacker
  must tell apart. That number is about 2^K for the I2SR and grows faster for
  the linear types. For a real chip, use longer registers with secret taps.

## Where this RTL makes its own choices

The following points are not fixed by the scheme. They are decisions of this
implementation:

- Reset clears the stages to 0.
- The guard is cleared by a normal-mode clock.
- A refused scan clock holds the registers, and `scan_out` is masked.
- Dummy stages hold their value in normal mode.
- The corrections are computed from the taps at elaboration.
- One chain contains all three register types, in the order shown, with one
  guard.

The scheme also allows other structures, such as general sequential circuits
equivalent to a shift register. They are not built here. Neither is any
analysis of how many structures an attacker must distinguish.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…`.

- `tb_scan_guard`: lock on reset, refusal while locked, unlock by a normal
  clock, lock again on a second reset.
- `tb_i2sr`: refusal after reset, capture, the state after every shift clock
  (each stage is the delayed input inverted by its NOT-gate parity), pure
  K-clock delay. Runs at 3 and 6 stages.
- `tb_lf2sr`, `tb_lfsr_esr`: share `esr_harness`, which checks:
  - the state against a tap-level model on every shift;
  - `scan_out` against `scan_in` K clocks earlier;
  - that a scan-in sequence computed from the model reaches a random target
    state, whatever the state was before;
  - capture with dummy stages holding, and hold;
  - decoding of the captured state from K scan-out bits.

  Each runs at 3 and 6 stages. A further copy without the correction must
  differ from a pure delay. For the LFSR the harness does not take the
  correction from the RTL: it finds its own correction row by trying every
  candidate.
- `tb_secure_scan_top`: the whole chain at its default sizes. It runs an attack
  (reset, then scan), unlocking, 12 rounds of scan-in, capture and scan-out with
  decoding, a pure-delay check over the whole chain, and a second reset. It
  counts each mechanism and fails if one never happened: refusal, unlock, shift,
  capture, a dummy stage holding, a NOT gate acting, the LF2SR correction acting
  and the LFSR correction acting.

- `tb_bit_change_attack`: the attacker's view. The attacker captures two kernel
  values that differ in one bit and compares the two scan-outs. Two I2SRs with
  different NOT positions give the same one-hot responses. These responses
  reveal each stage's depth but not where the NOT gates are. The LF2SR tap sets
  `9'b001_001_000` and `9'b010_001_000` can be told apart when every stage is
  on the kernel. They give identical responses once stage 1 is a dummy.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_secure_scan_top.sv \
          --top-module tb_secure_scan_top
./obj_dir/Vtb_secure_scan_top
```
