# Obfuscated folded third-order IIR filter

A third-order IIR filter normally has one multiplier per coefficient and one adder per
sum. Here one pipelined multiplier and one pipelined adder do all of that work by taking
turns: the filter is *folded*. Switches in front of the two units change setting every
clock cycle and decide what each unit works on in that cycle. Which filter the hardware
computes is therefore not visible in its structure, only in the switch settings. The same
datapath can be two different, equally plausible filters, and it can also run schedules
that produce wrong results.

This gives two layers of protection for the design:

* **Structural obfuscation.** The netlist is one multiplier, one adder, a few delay lines
  and multiplexers. Nothing in it shows which transfer function is meant.
* **Functional obfuscation.** A key FSM must see the right initialization key after reset.
  Until it does, the switches play a schedule with the coefficients rotated. The circuit
  runs and produces a well-formed IIR response, but a wrong one.

The structure follows the folding and switch-period technique of Lao and Parhi,
*Protecting DSP Circuits Through Obfuscation via High-Level Transformations*. The
following are this implementation's own choices, listed under "Design choices" below:
the number format, the key mechanism, the locked behaviour, the mode encoding and the
interfaces.

## The two filters

Both filters share the numerator and differ in the feedback:

| cfg | transfer function | schedule | samples |
|-----|-------------------|----------|---------|
| 0 | H1(z) = (1 + m2 z^-1 + m3 z^-2) / (1 - m0 z^-2 - m1 z^-3) | 4 cycles | 1 per 4 cycles |
| 1 | H2(z) = (1 + m2 z^-1 + m3 z^-2) / (1 - m1 z^-3) | 3 cycles | 1 per 3 cycles |
| 2 | H2(z), same as cfg 1 | 4 cycles, instance 0 idle | 1 per 4 cycles |
| 3 | reserved, runs as cfg 0 | | |

Written as difference equations, with w the internal state:

    H1:  w(n) = u(n) + m0 w(n-2) + m1 w(n-3)      y(n) = w(n) + m2 w(n-1) + m3 w(n-2)
    H2:  w(n) = u(n) + m1 w(n-3)                  y(n) = w(n) + m2 w(n-1) + m3 w(n-2)

The operations are named M0..M3 for the products m_i·w and A0..A3 for the additions.
For H1 these are A0 = M0 + M1, A1 = u + A0 (that is w), A2 = M2 + M3 and A3 = w + A2
(that is y). H2 has no M0 and no A0.

## The hardware

```
                      +--------- mult tap 0 ----------------------------+
                      |                                                 v
 adder taps -->[mul_in]--> [ x | 3 stages ] --+--> D --+--> D       [add_a]<-- u, adder tap 1, null
 m0..m3 ----->[coef  ]                    mult tap 0  tap 1   tap 2      |
                                              |        |       |         v
                                              +------>[add_b]<-- adder tap 0, null
                                                         |
                                                         v
                                  [ + | 1 stage ] --> adder reg (tap 0) -> D -> D -> 3D -> 2D
                                                           |              tap1  tap2  tap5  tap7
                                                           +--[y switch]--> y
```

* `pipe_mult`: operands are registered, then the full product, then the product shifted
  right by FRAC_W. The result appears 3 cycles after the operands.
* `pipe_adder`: the sum is registered, so it appears 1 cycle later.
* `tap_delay_line`, twice:
  * Behind the adder: 7 registers. Taps 0, 1, 2, 5 and 7 are used.
  * Behind the multiplier: 2 registers. Taps 0, 1 and 2 are used.
* Five switches, plus the output switch:

  | switch | inputs |
  |--------|--------|
  | multiplier data | null, adder taps 0/1/2/5/7 |
  | coefficient | m0..m3 |
  | upper adder input | null, u, multiplier tap 0, adder tap 1 |
  | lower adder input | null, multiplier taps 0/1/2, adder tap 0 |

  A null input feeds zero, so a unit can idle without this showing in the structure.

## How the switch schedules are derived (the hard part)

Folding maps operation U, executed at *instance* u of a period of N cycles, onto a
shared unit. An edge U -> V with w(e) delays in the filter then needs

    DF(U -> V) = N·w(e) - P_U + v - u

registers between the output of U's unit and the input switch of V's unit. P_U is the
pipeline depth of that unit: 3 for the multiplier, 1 for the adder. Every DF must be
≥ 0. For these filters, some edges come out negative, because a product is needed
in the same iteration in which it is started.

The fix is to retime the filter before folding:

* Every multiplication moves one iteration earlier: it multiplies w(n-1) when sample n is
  computed, and the product serves sample n+1.
* On the 3-cycle schedule, the output addition also moves one iteration later.

After retiming, every folded delay is small and non-negative, and each one is exactly a
tap of the two delay lines above. The schedules below are the result. The instance
numbers at which the input and output switches close, and the taps each switch uses,
agree with the published folded structures.

**cfg 0: H1, folding factor 4.** Multiplier order {M0, M1, M2, M3}, adder order
{A0, A1, A2, A3}.

| inst | multiplier: data × coef | adder: a + b | meaning |
|------|-------------------------|--------------|---------|
| 0 | adder tap 2 (w(n-1)) × m0 | mult tap 0 + mult tap 1 | A0 = m1 w(n-3) + m0 w(n-2); output switch takes y(n-1) |
| 1 | adder tap 7 (w(n-2)) × m1 | u(n) + adder tap 0 | A1: w(n) = u(n) + A0; input switch takes u(n) |
| 2 | adder tap 0 (w(n)) × m2 | mult tap 0 + mult tap 1 | A2 = m3 w(n-2) + m2 w(n-1) |
| 3 | adder tap 5 (w(n-1)) × m3 | adder tap 1 + adder tap 0 | A3: y(n) = w(n) + A2 |

**cfg 1: H2, folding factor 3.** Multiplier order {M3, M1, M2}, adder order {A2, A1, A3}.
Here A2 is the output sum and A3 = M2 + M3.

| inst | multiplier: data × coef | adder: a + b | meaning |
|------|-------------------------|--------------|---------|
| 0 | adder tap 1 (w(n-1)) × m3 | adder tap 1 + adder tap 0 | y(n-1) = w(n-1) + A3(n-1) |
| 1 | adder tap 5 (w(n-2)) × m1 | u(n) + mult tap 0 | w(n) = u(n) + m1 w(n-3); output switch takes y(n-1); input switch takes u(n) |
| 2 | adder tap 0 (w(n)) × m2 | mult tap 0 + mult tap 2 | A3(n) = m2 w(n-1) + m3 w(n-2) |

**cfg 2: H2, folding factor 4.** This is the cfg 0 schedule with M0 and A0 removed.
Instance 0 is a null operation on every switch. Instance 1 takes m1 w(n-3) from
multiplier tap 1 instead of from the adder.

**One 12-cycle period for both.** The N=4 and N=3 schedules have different periods. A
single phase counter modulo lcm(3, 4) = 12 drives both:

* Instance i of the 4-cycle schedule plays at phases i, 4+i and 8+i.
* Instance i of the 3-cycle schedule plays at phases i, 3+i, 6+i and 9+i.

So each filter keeps the latency and rate of its own folding. The switches get a
12-entry control, and this is what hides which period is the real one.

## Key and lock behaviour

`key_fsm` holds a 32-bit secret, set by a parameter. After reset it expects four 8-bit
words, most significant first, one in each cycle with `key_valid` high:

* Each right word moves it along the unlock path.
* The first wrong word sends it to LOCKED.
* After the last right word it is UNLOCKED.

Both end states hold until the next reset. Key words that arrive later are ignored.

As long as the FSM is not UNLOCKED, `switch_reconfigurator` plays the requested schedule
with every coefficient choice rotated: m_i becomes m_(i+1 mod 4). For cfg 0 the circuit
then computes (1 + m3 z^-1 + m0 z^-2) / (1 - m1 z^-2 - m2 z^-3). This is a valid filter
that looks reasonable but is wrong.

When the lock state or the configuration changes, there is one flush cycle. All switches
are on null, every datapath register is cleared, and the phase restarts at 0.

## Interface of `obf_iir_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| key_valid, key_word | in | 1, 8 | initialization key, one word per strobe |
| cfg | in | 2 | configure data: mode, see table above |
| coef | in | 4 × COEF_W | m0..m3, signed, FRAC_W fraction bits |
| u | in | DATA_W | input sample, taken in cycles where u_take is high |
| u_take | out | 1 | the input switch is on u in this cycle |
| y, y_valid | out | DATA_W, 1 | output sample; y_valid is high for one cycle per new sample |

Timing:

* In every mode, y(n) is valid 4 cycles after the cycle in which u(n) was taken.
* Samples arrive every 4 cycles (cfg 0 and 2) or every 3 cycles (cfg 1).
* The schedule sets when samples are taken. There is no backpressure: the source must
  present a sample whenever `u_take` is high.
* After a flush, `y_valid` stays low until the first new sample has passed through.

Number format: data are two's complement DATA_W = 16 bits. Coefficients are
COEF_W = 16 bits with FRAC_W = 14 fraction bits, so the range is -2 to 2. Each product is
rounded down (arithmetic shift) to 16 bits. Every sum wraps modulo 2^16. The result is
bit-exact with the direct-form equations above, evaluated with the same rounding.

## Files

| file | contents |
|------|----------|
| `rtl/obf_iir_pkg.sv` | switch encodings, control struct, mode enum, the three schedules as functions |
| `rtl/pipe_mult.sv` | 3-stage multiplier |
| `rtl/pipe_adder.sv` | 1-stage adder |
| `rtl/tap_delay_line.sv` | shift register with all taps |
| `rtl/folded_iir_datapath.sv` | multiplier, adder, both delay lines, switches, output register |
| `rtl/switch_reconfigurator.sv` | phase counter mod 12, schedule lookup, rotation when locked, flush on change |
| `rtl/key_fsm.sv` | key-controlled FSM |
| `rtl/obf_iir_top.sv` | top: FSM + reconfigurator + datapath, output-valid logic |
| `tb/tb_iir_ref_pkg.sv` | bit-exact direct-form reference filter (unfolded) used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

To change the schedules, edit the `sched_*` functions in the package. Any new schedule
must be checked against the reference model with `tb_folded_iir_datapath`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example, the
end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/obf_iir_pkg.sv tb/tb_iir_ref_pkg.sv \
    rtl/pipe_mult.sv rtl/pipe_adder.sv rtl/tap_delay_line.sv \
    rtl/folded_iir_datapath.sv rtl/switch_reconfigurator.sv rtl/key_fsm.sv \
    rtl/obf_iir_top.sv tb/tb_obf_iir_top.sv \
    --top-module tb_obf_iir_top -o sim
./obj_dir/sim
```

Use the same file list with another `tb/tb_*.sv` and `--top-module` to run a unit test.
The packages must come first.

What the testbenches check:

* `tb_obf_iir_top` runs the top at its default parameters. It covers the following
  scenario:
  * no key (locked);
  * the right key;
  * cfg 1, 0, 2, 3, 1, then new coefficients, then cfg 0 and 2;
  * a reset followed by a wrong key.

  Every output is compared with the reference filter of the configuration in force,
  including the rotation when locked. The test also checks the 4-cycle latency and the
  rate. It counts how often each mechanism occurred and fails if any never did: unlock,
  wrong key, flush, null operation, each cfg, and a locked output that differs from the
  correct filter.
* `tb_obf_iir_impulse` feeds an impulse through cfg 0, 1 and 2. It compares each
  response with the impulse response of H1 or H2, computed in double precision from the
  transfer function, within 6 LSB; the worst error seen is 4 LSB. It also checks that
  without the key the cfg 0 response is far from H1.
* `tb_folded_iir_datapath` plays the three schedules directly into the datapath and
  compares 1500 outputs bit-exactly with the reference.
* The unit testbenches check the multiplier (3-cycle latency, scaling), the adder, the
  taps, the key FSM (a wrong word in each position, words after the decision), and the
  reconfigurator (flush cycle, period, switch instances, rotation).

All of them pass.

## Design choices and limits

Taken from the source design:

* one 3-stage multiplier and one 1-stage adder;
* the two filters;
* the folding orders and folding factors;
* the delays D, D, 3D, 2D behind the adder and D, D behind the multiplier;
* null inputs on the switches;
* the 12-cycle switch period.

Chosen for this implementation:

* **Retiming.** The retiming that comes before folding is derived here. The source only
  says retiming may be needed, and prints the resulting switch instances.
* **Numbers.** Widths, fixed-point format, truncation and wrap-around.
* **Key.** Its length, its word-serial loading and the FSM states. Only the idea of a
  key-controlled FSM enabling the correct mode is given.
* **Without the key.** The coefficient rotation.
* **Interface.** The cfg encoding, including that the slower cfg 2 schedule is
  selectable; the flush on a mode change; the fixed-instance input with no stall; and
  the output-valid logic.

Not built:

* Clock gating of the idle cycles of cfg 2. It is only suggested as a power saving.
* Any particular hardened switch cell or layout technique that would keep the switch
  instances hidden. The switches here are ordinary multiplexers driven from a decoded
  table.
* The key and the configure data are plain inputs. How they are stored or programmed
  after fabrication is outside this RTL.
