# Reduced-dynamics fractional sliding-mode controller (FCFP) in fixed point

This design is a hardware sliding-mode controller. It uses fractional-order
calculus and is built for a plant that is itself modelled with fractional
derivatives. The plant is a five-state nonlinear compartment model, an SEIR-type
epidemic model. Its states x1..x4 are the susceptible, latent, infective and
immune groups, and x5 is their total. The control input V moves people from x1
into x4 at the rate x5·V, which is a vaccination rate. The controller drives x4
onto a reference x5ref through V, which is bounded.

The main idea is that a fractional-order plant model lets the control law get by
with fractional operators of order α alone. A law derived from an integer-order
model needs a fractional integral of order 2α, and its order passes 1 once α is
above 0.5. Fewer and lower-order fractional operators mean fewer IIR filters, so
less logic and power for the same tracking and robustness.

The RTL contains:

- the controller datapath. It has fractional differentiators and a fractional
  integrator, each realized as an IIR filter built from cascaded second-order
  sections, plus a switching function, a multiply-accumulate and a divider;
- the board-side plumbing of the FPGA-in-the-loop setup that runs it: clock
  generation, reset synchronization and an RMII Ethernet bridge.

## The control law

With e = x4 − x5ref, the sliding variable and control law are

    S = e + c1·D^α e

    V = [ (u+w)·x4 − γ·x3 + D^α x5ref − (1/c1)·e − (kd/c1)·D^−α sw(S) ] / x5

- D^α is a fractional differentiator and D^−α a fractional integrator, with
  α = 0.99.
- sw() is sgn(S). An input can select the saturation function sat(S/ε)
  instead. It is linear for |S| < ε, so V does not jump when S crosses zero.
- The constants are c1 = 0.5, kd = 0.01, ε = 0.5, u = 1/255, w = 1/12 and
  γ = 1/1.2 per day.

The integrator on the switching term is the reason this controller chatters less
than a classical sliding-mode controller. It acts as a low-pass filter on the
discontinuous signal.

`fcfp_ctrl` computes one control step per accepted sample:

| clock after accept | what happens |
|---|---|
| 0 (accept edge) | x3, x4, x5 and e = x4 − x5ref are registered. Both differentiators (`u_der_e` on e, `u_der_ref` on x5ref) take their sample. |
| 1 | S = e + c1·D^α e is formed and passed through `switch_fn`. The integrator `u_int` takes sw(S). S is registered. |
| 2 | The numerator is summed at full precision: five constant multiplies. The divider starts. |
| 3 … 51 | `seq_div` produces one quotient bit per clock (48 bits). |
| 52 | V is registered, saturated, and `out_valid` pulses. |

`in_ready` is low from the accept edge until `out_valid`. An `in_valid` raised
in that time is ignored. At the 10 MHz controller clock a step takes 5.2 µs.

The term D^α e inside S needs its own differentiator. So the controller uses
two differentiators and one integrator, and none of order 2α.

## Fractional operators as IIR filters (`frac_op`, `sos_df1`)

This is the least obvious part of the design.

A fractional operator s^α cannot be written as a finite transfer function, so
it is approximated:

1. **Oustaloup approximation.** s^−0.99 is approximated over the band
   [0.001, 1500] rad/s, order 2, by a 5th-order rational function in s.
2. **Tustin discretization.** The sample time is T = 0.01 (one hundredth of a
   day in the plant's time unit). Tustin maps the approximation to
   N(z)/D(z). That fraction is improper, and its coefficients span four orders
   of magnitude (D = [1 −4.333 7.365 −6.097 2.431 −0.366]).
3. **Quotient and remainder.** The leading coefficients are divided:
   Q = N1/D1 = 0.0060. With R = N − Q·D, the fraction is N/D = Q + R/D, and
   R/D is strictly proper.
4. **Second-order sections.** R/D is factored into three sections, with the
   scale 0.010427 at the input:

| section | b0 | b1 | b2 | a1 | a2 |
|---|---|---|---|---|---|
| 1 | 0 | 1 | 0 | −0.38643 | 0 |
| 2 | 1 | −1.3454 | 0.37496 | −1.9468 | 0.94694 |
| 3 | 1 | −1.9969 | 0.99692 | −1.9998 | 0.99982 |

After this factoring every coefficient lies in (−2, 2).

`frac_op` realizes

    y[n] = Q·x[n] + SOS3(SOS2(SOS1(GAIN·x[n])))

Each section is a direct form I biquad (`sos_df1`). Direct form I is the form
least sensitive to coefficient rounding and internal overflow. The cascade is
combinational between the delay registers. The output is rounded to 22 bits,
saturated and registered one clock after `in_valid`.

A unit sine through this integrator gives a curve that follows 1 − cos t. It
peaks at 1.93 near t = 3.0 and returns close to zero after one period, as the
fractional integral of order 0.99 should.

### The differentiator

The coefficients of the α = +0.99 differentiator are derived here (the
`DER_*` constants in `fcfp_pkg`). Oustaloup's s^+α over a band is the
reciprocal of s^−α over the same band. So the numerator and denominator of the
s-domain approximation are exchanged, and steps 2–4 are repeated with
T = 0.01. The result:

- Q = 167.675 and an input gain of −293.157;
- section 1 = z^−1 / (1 − 0.39830 z^−1);
- two further sections.

In section 3 the pole and zero pairs are nearly equal (both near 0.99692), and
they nearly cancel. That small difference carries the low-frequency fractional
behaviour, so the coefficients need 24 fractional bits. With 20 bits the
differentiator's response to a slow sine comes out about six times too large.

The differentiator has a high-frequency gain of about 168. It therefore
amplifies the quantization of its 8-fraction-bit input. It behaves well on
signals of tens of units and more, which covers the plant states and the
reference. It does not behave well on signals of the order of one unit.

## Number formats (`fcfp_pkg`)

| type | bits | fraction bits | holds |
|---|---|---|---|
| `sig_t` | 22 | 8 | plant states, reference, every operator input and output (range ±8192) |
| `coef_t` | 36 | 24 | filter and controller constants |
| `acc_t` | 48 | 24 | signals between sections and in the delay lines (the differentiator's reach about 6·10^5 for a step of 1000) |
| `v_t` | 22 | 18 | the control signal V (range ±8) |

Every requantization rounds half up and saturates. The numerator of V is held
with 26 fractional bits, so that the division by x5 (8 fractional bits) leaves
V's 18 fractional bits.

## Board-side system (`fcfp_fil_top`)

In the FPGA-in-the-loop setup the plant runs in floating point on a host PC. The
PC exchanges samples with the board over 100 Mbit/s Ethernet.

| clock | frequency | used by |
|---|---|---|
| SYSCLK | 100 MHz | board input; `clk_gen` derives the other three from it |
| ETH_REFCLK | 50 MHz | RMII to the PHY, and the whole `rmii_bridge` |
| TXCLK / RXCLK | 25 MHz | brought out for the FPGA-in-the-loop core |
| DUT_CLK | 10 MHz | the controller |

`rst_sync` releases the board reset separately in each domain. The bridge domain
and the controller domain share no signals in this top.

- **`rmii_bridge`** assembles received dibits into bytes while CRS_DV is high.
  Dibits arrive least significant first, and byte alignment restarts at each
  rise of CRS_DV. Each byte comes out with a one-cycle strobe (RXCLK_EN) and an
  error flag if RX_ER was seen during it. For transmit it takes bytes over a
  valid/ready handshake (TXCLK_EN is the ready) and sends each as four dibits
  with TXEN. Bytes offered back to back give a frame without gaps.
- **`clk_gen`** produces the clocks with counters. On the FPGA this job belongs
  to a clock manager (MMCM). The counters run freely from power-up, so the
  reset synchronizers see edges. Reset only clears `locked`.
- **Parts not built:**
  - The FPGA-in-the-loop core is a vendor-generated wrapper. It unpacks frames
    into plant samples and packs V back; its protocol is not available. Its two
    faces are top-level ports: the bridge byte stream (`RXD`, `RXCLK_EN`,
    `RX_ERR`, `TXD`, `TX_VALID`, `TXCLK_EN`) and the controller's sample
    interface (`CTRL_IN_VALID`/`CTRL_IN_READY`, `X3`, `X4`, `X5`, `X5REF`,
    `SAT_MODE`, `CTRL_OUT_VALID`, `V`, `S`).
  - The Ethernet PHY is an external chip.
  - The host-side plant model is software.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line. `tb/fcfp_model_pkg.sv` holds bit-exact
reference models written from the equations: the operator as gain, section
cascade and direct term, and one step of the control law, all in 128-bit
integer arithmetic.

| testbench | what it shows |
|---|---|
| `tb_sos_df1` | The section matches the difference equation on random data with gaps in `en`. Reset clears its state. |
| `tb_frac_op` | The integrator and differentiator are bit-exact on 1000 sine samples. The integrator gives the 1 − cos response (peak 1.93 at t = 2.97, 0.344 at t = 9.99). The differentiator gives ≈100·cos t (−83.8 at t = 9.99). Output saturates at full scale. Latency is one cycle. |
| `tb_switch_fn` | sgn and sat(S/ε) on directed and random values. |
| `tb_seq_div` | Division of all sign combinations against the simulator's own division. Latency is NW+1 clocks. A start while busy is ignored. Division by zero is checked. |
| `tb_fcfp_ctrl` | 400 steps (signum, then saturation) are bit-exact in V and S. Latency is 52 clocks and requests while busy are ignored. |
| `tb_rmii_bridge` | Receive frames with an RX_ER byte. Transmit back to back and with gaps. TXEN behaviour. |
| `tb_clk_gen` | Periods and duty cycles of 50, 25 and 10 MHz; `locked`. |
| `tb_fcfp_fil_top` | End to end at default sizes, from the 100 MHz clock: RMII receive and transmit, and 300 controller steps against the model. It counts each mechanism and fails if one never occurs: receive error, back-to-back and interrupted transmit, both switching functions, busy rejection, a saturated differentiator output, division by zero. |
| `tb_fcfp_closed_loop` | The controller in closed loop with a floating-point model of the fractional plant (α = 0.99, Grünwald–Letnikov), 50 days: nominal parameters, perturbed parameters, and nominal parameters with sat(S/ε). See below. |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
        --top-module tb_fcfp_fil_top -Irtl -y rtl -y tb +libext+.sv \
        rtl/fcfp_pkg.sv tb/fcfp_model_pkg.sv tb/tb_fcfp_fil_top.sv
    ./obj_dir/Vtb_fcfp_fil_top

Replace the top module and the last file name to run another testbench. All of
them finish within seconds.

### Closed-loop behaviour

The plant starts at x = (400, 190, 210, 200) with x5 = 1000. The reference is
x5ref = 1000·exp((v − u)·t), the natural growth of the total.

With nominal rates:

- x4 reaches the reference within a few days;
- x2 and x3 decay to zero;
- V settles at 0.093 against (u + w) + (v − u) = 0.092.

With every rate perturbed by its stated uncertainty (1/u = 275, 1/w = 14.5,
1/v = 130, 1/γ = 1/σ = 2.2 days), x4 stays within about 1 % of the reference.
The switching gain kd = 0.01 is small, so it does little to reject the
mismatch.

x1 ends where the plant's total x5 and the reference disagree. The total
follows a fractional growth law, while the reference is exponential.

At the first step the reference jumps from 0 to 1000 while the filters are at
rest. The differentiators saturate and V is pinned at +8 for a few steps.

A third run uses nominal rates with sat(S/ε) instead of sgn(S). It gives the
same V as the signum run. In steady state the tracking error is a few units,
so S never enters the boundary layer |S| < ε = 0.5. The step-to-step ripple
of V, about 0.002, comes from quantization noise amplified by the
differentiators and not from the switching term.

## Departures and open points

- **Word lengths.** The controller's signals are 22 bits wide, but the
  coefficients (36 bits) and the internal filter word (48 bits) are wider. The
  integer/fraction splits are choices made for this design.
- **Differentiator coefficients.** They are derived as described above; only
  the integrator's are tabulated.
- **Sample time.** T = 0.01 is inferred from the integrator's coefficients,
  which it reproduces.
- **Controller interface.** The sample handshake, the state-machine sequencing
  and the 52-clock latency are this design's own.
- **Saturation mode.** The control law uses sgn(S). The sat(S/ε) option
  follows a remark that saturation can replace the signum function. It is
  also where the tabulated ε = 0.5 is assumed to enter.
- **Separate operators.** Each fractional operator has its own filter; none is
  time-shared.
- **Byte-side clocking.** The bridge's byte side is in the 50 MHz domain with
  one-cycle strobes rather than on the 25 MHz clock with enables. The
  FPGA-in-the-loop core, which would bridge to 25 MHz, is not included.
- **Clock generation.** Counters stand in for the FPGA clock manager.
- **Convergence time.** In the closed-loop model, x4 converges in a few days.
  The published experiments report 23 to 25 days. The plant simulation, its
  initial states and the reference used here are reconstructions, so the
  closed-loop test checks convergence and the steady-state V, not the
  transient's timing.
- **Baselines not built.** The classical sliding-mode controller and the
  fractional controller for the integer-order plant are not included. They
  serve only as points of comparison.
