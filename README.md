# CORDIC rotators: folded, unfolded-parallel and unfolded-pipelined

CORDIC (COordinate Rotation DIgital Computer) rotates a vector (x, y) by an
angle z using only shifts, additions and a small table of constants. Each
iteration i turns the vector by ±atan(2^-i):

    d  = +1 or -1                 (the rotation decision)
    x' = x - d * (y >>> i)
    y' = y + d * (x >>> i)
    z' = z - d * atan(2^-i)

After n iterations the vector has been turned by almost exactly the requested
angle and stretched by a constant gain K_n = prod sqrt(1 + 2^-2i)
(K_7 ≈ 1.6467).

The same recurrence can be mapped to hardware in very different ways, and
this library holds three of them. They compute exactly the same bits for the
same inputs. What differs is their area, clock rate and throughput:

| structure | what is built | results |
|---|---|---|
| **folded (word-serial)** `cordic_folded` | one iteration's hardware, reused n times: registers, variable shifters, angle ROM, FSM | one result per n+1 clocks |
| **unfolded parallel** `cordic_unfolded #(.PIPELINED(0))` | n copies of the iteration, fixed wired shifts, hardwired constants, no registers | combinational: a result as fast as the n-stage adder chain settles |
| **unfolded pipelined** `cordic_unfolded #(.PIPELINED(1))` | the same array with a register after every stage | one result per clock, n clocks latency |

The default configuration is 7 iterations on 32-bit words. A 16-bit version is
obtained by setting `WIDTH = 16`.

## Number formats and the gain

* **x, y**: signed two's-complement integers of `WIDTH` bits. The cores do
  not compensate the gain, so every x/y result is K_n times the ideal rotated
  vector. Keep the input magnitude sqrt(x0² + y0²) below about 0.6 of full
  scale (1/K_n). Larger inputs overflow, and the adders wrap.
* **z**: a signed *binary angle* of `WIDTH` bits. 2^(WIDTH-1) stands for π, so
  the word covers [-π, π) and wraps modulo 2π for free. For 32 bits,
  π/4 = `32'h2000_0000`.
* **Angle constants**: alpha_i = round(atan(2^-i) / π · 2^(WIDTH-1)).
  `cordic_pkg::atan_angle(i, WIDTH)` computes them at elaboration from a
  64-bit master table, round(atan(2^-i) / π · 2^63).

The seven angles add up to about 99.7°. This is the range of z0 over which
rotation mode converges. After 7 iterations the residual angle is at most
atan(2^-6) ≈ 0.9°. For more accuracy, raise `ITERATIONS`.

### Modes

* **Rotation** (all three structures) drives z to zero: d = sign(z). The
  result is xn = K(x0 cos z0 − y0 sin z0), yn = K(y0 cos z0 + x0 sin z0), and
  zn is the residual angle.
* **Vectoring** (unfolded cores only) drives y to zero: d = −sign(y). With
  x0 > 0 the result is xn = K·sqrt(x0² + y0²) and zn = z0 + atan(y0/x0), and
  yn is the residual.

The unfolded stages have a decision multiplexer that picks sign(z) or the
inverted sign(y). The mode enters with each operation and travels down the
pipeline with its data, so consecutive operations may use different modes.
The folded core takes its decision from the z register only, so it is a
rotator.

## Folded word-serial core (`cordic_folded`)

```
 x0 ─► mux ─► X reg ─┬──────────────► ADD/SUB ─► xn
                     └► shifter >>i ─┐   ▲ (from Y shifter)
 y0 ─► mux ─► Y reg ─┬──────────────► ADD/SUB ─► yn
                     └► shifter >>i ─┘   ▲ (from X shifter)
 z0 ─► mux ─► Z reg ─┬──────────────► ADD/SUB ─► zn
                     │                   ▲
                     └ sign ─► decision  ROM[i]
 FSM: iteration counter i ─► shifters, ROM address
```

Each branch has a register with an input multiplexer, and an add/sub unit
whose result is written back every clock. The x and y branches also have a
barrel shifter (`cordic_shifter`) that shifts the *other* branch's value by
the iteration number. The z branch adds or subtracts the ROM constant
(`cordic_angle_rom`). The sign of the Z register sets all three add/sub units
(`cordic_addsub`). The controller (`cordic_fsm`) has two states. In IDLE it
turns a start pulse into `load`. In ITER it counts i = 0 … n−1, and that count
is both the shift distance and the ROM address.

Timing, with n = ITERATIONS:

```
edge:        1        2        3   ...   n        n+1
start  ‾‾‾‾‾‾\________________________________________
load   ‾‾‾‾‾‾\___                                       (combinational, IDLE & start)
state   IDLE | ITER i=0| i=1   | ... | i=n-1  | IDLE
done    ___________________________/‾‾‾‾‾‾‾‾\______
```

* Edge 1 samples `start` and loads x0/y0/z0.
* Iteration i runs between edges i+1 and i+2.
* `done` is high after the n-th edge, counting edge 1. During that cycle
  `xn/yn/zn` carry the outputs of the adders in their last iteration.
* The results are **valid only while `done` is high**. The next edge writes
  them into the registers, and the adders then show a further step.
* A start while `busy` is high is ignored.
* A new start can be given in the cycle after `done`, so back-to-back
  operations take n+1 clocks each.

The variable shifters are the expensive part of this structure. They are
log2(WIDTH) levels of multiplexers, and with the ROM they set its clock
period.

## Unfolded cores (`cordic_stage`, `cordic_unfolded`)

Unfolding gives each iteration its own processing element (`cordic_stage`,
parameter `STAGE` = i):

* the shift by i is plain wiring, not a shifter;
* atan(2^-i) is a hardwired constant, so there is no ROM;
* a multiplexer chooses the decision (sign z or inverted sign y);
* three add/sub units compute x', y' and z'.

`cordic_unfolded` chains `ITERATIONS` elements. With `PIPELINED = 0` there is
no register anywhere, and the outputs are a combinational function of the
inputs. The clock and reset ports exist but are unused, so lint reports them
as unused. With `PIPELINED = 1` each element's outputs, its mode and a valid
flag are registered:

* operands presented with `in_valid` are sampled at an edge;
* the result appears with `out_valid` after the n-th edge, counting that one;
* a new operation can enter on every clock;
* only the valid flags are reset. Data registers start undefined and are
  masked by `out_valid`.

## Top level (`cordic_top`)

`cordic_top #(WIDTH = 32, ITERATIONS = 7)` places the three structures side
by side, each with its own ports. They share only `clk` and the asynchronous
active-low reset `rst_n`.

| prefix | core | inputs | outputs |
|---|---|---|---|
| `f_` | folded | `f_start`, `f_x0`, `f_y0`, `f_z0` | `f_busy`, `f_done`, `f_xn`, `f_yn`, `f_zn` |
| `p_` | unfolded parallel | `p_vectoring`, `p_x0`, `p_y0`, `p_z0` | `p_xn`, `p_yn`, `p_zn` |
| `q_` | unfolded pipelined | `q_in_valid`, `q_vectoring`, `q_x0`, `q_y0`, `q_z0` | `q_out_valid`, `q_out_vectoring`, `q_xn`, `q_yn`, `q_zn` |

`*_vectoring` is 0 for rotation and 1 for vectoring. The shared type
`cordic_pkg::cordic_mode_e` is used inside the cores.

## Files

| file | contents |
|---|---|
| `rtl/cordic_pkg.sv` | defaults, mode type, angle-constant functions |
| `rtl/cordic_addsub.sv` | add/sub unit |
| `rtl/cordic_shifter.sv` | variable arithmetic right shifter |
| `rtl/cordic_angle_rom.sv` | atan(2^-i) look-up table |
| `rtl/cordic_fsm.sv` | folded-core controller |
| `rtl/cordic_folded.sv` | folded word-serial core |
| `rtl/cordic_stage.sv` | one unfolded processing element |
| `rtl/cordic_unfolded.sv` | unfolded array, parallel or pipelined |
| `rtl/cordic_top.sv` | the three cores side by side |
| `tb/cordic_ref_pkg.sv` | bit-exact software model for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cordic_workloads.sv` | 16- and 32-bit batches with cycle counts |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* **Reference model.** `cordic_ref_pkg` is a separate software model. It
  recomputes the angle constants with `$atan` in double precision and runs
  the same recurrence on 64-bit integers.
* **Block tests.** The unit testbenches check the following bit-exactly
  against that model:
  * the add/sub unit and the shifter (including wrap-around and all shift
    distances);
  * every ROM entry at 16 and 32 bits;
  * the FSM sequence and its latency;
  * one stage in both forms and both modes;
  * the whole array at 16 and 32 bits, pipelined and parallel, with the
    7-clock latency and full-rate input;
  * the folded core at 16 and 32 bits, with its 7-clock latency and a start
    while busy.
* **End-to-end test.** `tb_cordic_top` runs `cordic_top` at its default size
  with no overrides. In each round the same rotation goes to all three cores,
  and the test requires:
  * identical bits from all three cores;
  * agreement with the ideal floating-point rotation, by the angle actually
    turned, within 0.2 % of the magnitude;
  * a residual angle below atan(2^-6);
  * vectoring angles and magnitudes within tolerance.

  While the folded core iterates, the other two cores get a random stream
  that mixes both modes and includes bubbles. The test counts each of these
  and fails if any count is zero:
  * start ignored while busy;
  * both rotation directions;
  * a full pipeline;
  * bubbles;
  * mode switches;
  * correct latencies.

* **Workload test.** `tb_cordic_workloads` runs the two evaluated sizes, 7
  iterations on 16-bit and on 32-bit words. Each size gets a batch of 64
  rotations through every core, and the test counts clock cycles: the folded
  core must take 64·(7+1) = 512 cycles, and the pipelined core 64+7−1 = 70
  cycles from the first operand to the last result.

Run any testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cordic_pkg.sv tb/cordic_ref_pkg.sv tb/tb_cordic_top.sv \
    --top-module tb_cordic_top -Mdir obj_top
./obj_top/Vtb_cordic_top
```

Every test finishes in well under a second of simulation time.

## Design choices and departures

These points are choices made for this RTL. They are not dictated by the
original architecture description:

* **Handshakes.** These signals are additions: `start`/`busy`/`done` on the
  folded core, `in_valid`/`out_valid` on the pipelined core, and the mode
  port of the unfolded cores. The architecture itself defines only the
  data paths; its pin counts leave room for at most one or two control
  pins besides the operands and results.
* **Folded core's load cycle.** The folded core loads its registers through
  the input multiplexers in a separate cycle. One result therefore takes n+1
  clocks rather than n.
* **Folded core's outputs.** It presents its result combinationally from the
  adders during the `done` cycle, instead of holding it in an output
  register.
* **Z-branch shifter.** The folded core's structure also shows a shifter in
  the z branch. The z recurrence needs no shift, so this one is left out, and
  the Z register feeds its adder directly.
* **Folded core is rotation only.** Vectoring exists only in the unfolded
  cores.
* **Gain compensation.** There is none, and the outputs carry K_n.
* **Formats and reset.** The number formats, the rounding of the constants
  and the reset style were all chosen for this RTL.
* **Implementation results not covered.** The FPGA figures that motivate the
  three structures are properties of a particular device and tool flow:
  delay, maximum clock, power and LUT/register counts on a Virtex-5 at 16 and
  32 bits. This RTL does not model or check them. The only rate and latency
  checks are in clock cycles: n+1 clocks per folded result, and for the
  pipeline one result per clock after an n-clock latency.

## Changing it

* `WIDTH` may be anything from 8 to 63.
* `ITERATIONS` may be from 1 up to `WIDTH`.
* Beyond about `WIDTH − 2` iterations the extra stages stop helping, because
  the shifted operands become zero.
* Every testbench except `tb_cordic_top` sets its own sizes, so it can be
  edited freely.
