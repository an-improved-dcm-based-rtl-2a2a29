# Tunable DCM-based beat-frequency TRNG

A true random number generator for Xilinx FPGAs (Virtex-5 class) that
harvests the jitter of two on-chip Digital Clock Managers (DCMs). The two
DCMs synthesise clocks of almost the same frequency from one reference. A
flip-flop samples the faster clock with the slower one; the sampled level
flips every half *beat* (the time the faster clock needs to gain one full
period on the slower one). A counter measures each half beat in clock cycles.
Because the DCMs jitter, the exact cycle at which the flip-flop flips, and
therefore the count reached, is random. The three low bits of each count go
through a Von Neumann corrector and form the random output.

The generator is *tunable*: the multiply/divide factors (M, D) of both DCMs
can be rewritten at run time through their Dynamic Reconfiguration Ports
(DRP). That changes the beat length and the jitter. To keep this safe, only
23 pre-computed (M, D) pairs can ever be written. They are kept in a block
RAM, and a small controller copies a chosen pair into the DCMs on request.

This repository holds synthesizable SystemVerilog for everything except the
DCMs themselves (vendor primitives) and the processor that would drive the
control ports. A behavioural DCM model with jitter, used by the testbenches,
is in `tb/`.

## How a beat becomes a number

Let DCM-A run at F_A and DCM-B at F_B, with F_A slightly above F_B, both
derived from the reference as F = F_ref * M / D. On every rising edge of
DCM-B the phase of DCM-A advances by T_B - T_A. After N = T_A / (T_B - T_A)
cycles of DCM-B it has gained a full period. The sampled level Q is therefore
a square wave N cycles long, high for half of it and low for the other half.

The counter runs on DCM-B. It counts while Q is low and is held at zero while
Q is high. So the value it reaches before Q rises again (the *peak*) is about
half a beat:

    n = F_B / (2 (F_A - F_B)) = M_B * D_A / (2 (M_A * D_B - M_B * D_A))

Example: set 1 is A = 100 MHz * 15/31 = 48.387 MHz and B = 100 MHz * 14/29 =
48.276 MHz. This gives n = 217.

The randomness is in the few cycles around each flip of Q. There, DCM-A's
edge lies within the jitter of DCM-B's sampling edge, so whether Q reads 0 or
1 is decided by noise. The peak wanders by a few counts from beat to beat.
Its low bits carry the entropy, and the top bits are nearly constant. Near a
flip, Q can also chatter for a few cycles. That produces some very short
"peaks" (1, 2, 3 ...), which are passed on like any other peak. This is
expected behaviour of the circuit, not an error.

The slower the beat (the closer F_A is to F_B), the more cycles the jitter
window covers. It also takes longer to produce each number. The 23 stored
settings keep n between about 200 and 500.

## The entropy path (DCM-B clock domain)

| module | role |
|---|---|
| `beat_dff` | samples DCM-A (as data) on DCM-B's rising edge. `STAGES` > 1 adds synchroniser flops behind it against metastability (default 1, a single flop). |
| `beat_counter` | 9-bit counter: +1 per cycle while Q is low, 0 while Q is high. On the first cycle Q is seen high it copies the count into `count_max` and pulses `max_valid`. It saturates at 511 rather than wrapping. |
| `post_processing_unit` | Von Neumann corrector on the 3 LSBs of each peak. |

**Von Neumann corrector.** The 3 LSBs of each peak are appended, LSB first,
to one continuous bit stream. The stream is cut into non-overlapping pairs.
A `00` or `11` pair is dropped, and a `01` or `10` pair yields its first bit.
Three bits per peak is an odd number, so one bit is often left over. It is
held in a one-bit register and paired with the first bit of the next peak.
Each peak therefore yields 0, 1 or 2 output bits. They appear one cycle after
`max_valid` on `out_bits` (oldest in bit 0), with `out_n` giving the count.
Expect about a quarter of the raw bits to survive. A reset of the domain
(for example while the DCMs are being reprogrammed) discards the held bit.

## Tuning: stored settings and DRP programming (reference clock domain)

| module | role |
|---|---|
| `address_gen` | 5-bit register holding the set to use. `load` writes it and `next` steps it, wrapping from 22 to 0. Loads of 23..31 are refused (`load_err`), so no unlisted setting can be selected. |
| `md_bram` | 64 x 16 block RAM, read-only, with one-cycle synchronous read. Word 2k is DCM-A's DRP value for set k and word 2k+1 is DCM-B's; 46 words are used. Each word is already in DRP format, `{M-1, D-1}`. |
| `drp_controller` | reprograms both DCMs on `drp_req`. |
| `trng_pkg` | shared types, widths and the function `md_table()` holding the 23 settings. |

The controller sequence, one state per step:

1. Latch the set address. Read DCM-A's word, then DCM-B's word (BRAM latency is one cycle each).
2. Raise `dcm_rst` and hold it for `RST_HOLD` cycles (default 3).
3. Write both words in the same cycle: `den`/`dwe` high for one cycle, `daddr` = 0x50 (the DCM_ADV M/D register).
4. Wait until each DCM has answered with `drdy`, then release `dcm_rst`.
5. Wait until both DCMs report `locked`, then pulse `done`.
   If that takes more than `LOCK_TIMEOUT` cycles, `done` is pulsed with `lock_err` set.

`busy` is high from the request to `done`. Requests made while busy are
ignored. Assertions check that a DRP strobe lasts one cycle and only occurs
while the DCMs are in reset.

### The 23 settings (reference 100 MHz)

Sets are listed as `(M_A/D_A, M_B/D_B)` with the expected peak n in brackets.

| # | settings |
|---|---|
| 0-5 | (15/31, 14/29) [217]; (21/22, 20/21) [220]; (17/21, 21/26) [220.5]; (20/27, 17/23) [229.5]; (15/29, 16/31) [232]; (17/25, 19/28) [237.5] |
| 6-11 | (22/23, 21/22) [241.5]; (19/29, 17/26) [246.5]; (19/32, 16/27) [256]; (22/31, 17/24) [263.5]; (23/24, 22/23) [264]; (19/25, 22/29) [275] |
| 12-17 | (24/25, 23/24) [287.5]; (21/32, 19/29) [304]; (23/31, 20/27) [310]; (25/26, 24/25) [312]; (21/26, 25/31) [325]; (26/27, 25/26) [337.5] |
| 18-22 | (27/28, 26/27) [364]; (28/29, 27/28) [391.5]; (29/30, 28/29) [420]; (30/31, 29/30) [449.5]; (31/32, 30/31) [480] |

The brackets come from the formula above. For sets 9 and 10 the published
expected peaks are 268 and 269, which the listed M and D do not give. The
M/D values (which also match the published output frequencies) were kept.

## Top level: `dcm_trng_top`

The top wires the two paths together. The DCMs are outside it.

- **DCM connections.** `clk_a`, `clk_b`, both `locked` inputs and both DRP
  buses are ports, together with one `dcm_rst` output for both DCMs. Connect
  them to two `DCM_ADV` instances that share the reference `dclk`. That clock
  also clocks the DRP ports and the tuning logic. The DCM with the higher
  frequency must drive `clk_a`. In every stored set, that is the DCM written with
  word 2k.
- **Control.** `en` low holds both DCMs in reset. `sel_load`/`sel_addr`,
  `sel_next` and `drp_req` are the control requests, and `tune_busy`,
  `tune_done` and `tune_lock_err` report progress. All of these are
  synchronous to `dclk`.
- **Output.** `count_max`/`count_valid`/`count_saturated` and
  `rnd_bits`/`rnd_n`/`rnd_valid` are synchronous to `clk_b`. A consumer in
  another clock domain needs its own synchroniser or FIFO.
- **Reset.** `rst_n` is asynchronous. The `clk_b` domain is held in reset
  while `rst_n` is low or either DCM is unlocked. It is released two `clk_b`
  edges after both lock, because `clk_b` stops while the DCMs are
  reprogrammed.

On power-up the DCMs run with the M/D given in their instance attributes.
Issue one `drp_req` to move to a stored set.

Output rate: one peak per beat, i.e. every 2n cycles of `clk_b`. At set 11
(n = 275, `clk_b` = 75.86 MHz) that is about 138 000 peaks per second, or
about 414 kbit/s of raw LSBs. About a quarter, roughly 100 kbit/s, leaves the
corrector. The chatter peaks near each flip add a little on top. The sweep
testbench prints this beat rate for every setting (100 to 217 thousand per
second).

Parameters: `DFF_STAGES` (1), `RST_HOLD` (3), `LOCK_TIMEOUT` (65535). The
widths and the table are in `trng_pkg`.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. Build and run with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/trng_pkg.sv tb/tb_dcm_trng_sweep.sv --top-module tb_dcm_trng_sweep
    ./obj_dir/Vtb_dcm_trng_sweep

Substitute the testbench name for the other tests.

In simulation with random initial values, the `clk_b`-domain reset is only
applied once `clk_b` is running. The system testbenches therefore pulse
`rst_n` once more after the DCMs first lock. On the device the DCM outputs
run from configuration, so this is not needed there.

- `tb/dcm_adv_model.sv` is a behavioural DCM. It produces
  CLKFX = CLKIN * M / D on an ideal time grid. Each edge is displaced by a
  bounded bell-shaped random amount (the sum of four uniforms, spanning the
  peak-to-peak jitter). It also has a DRP with register 0x50 = `{M-1, D-1}`
  and a LOCKED output.
- `tb_dcm_trng_top` is the end-to-end test. It runs the power-up setting and
  sets 0, 11 and 22, reached by a load, a refused load and a step. It then
  disables and re-enables the DCMs. It checks every corrected bit against its
  own Von Neumann model and checks the peak statistics. It also checks that
  each mechanism (tuning, load, refusal, step, beat capture, keep and drop in
  the corrector, disable) occurred.
- `tb_dcm_trng_sweep` uses all default parameters. It tunes through all 23
  settings. Each setting uses its own measured jitter (0.44-0.62 ns peak to
  peak), and the test checks the mean peak and beat length of each setting.

Typical sweep output against hardware measurements of the same design:

| set address | expected n | simulated mean | hardware mean |
|---|---|---|---|
| 0 | 217 | 214 | 215 |
| 11 | 275 | 266 | 271 |
| 22 | 480 | 451 | 468 |

Simulated means fall a few percent below n because jitter can only cut a
count-up run short. The amount depends on the jitter model, so the tests
accept -12 % / +3 %. The corrected stream in the sweep is balanced (about
48 % ones). It is not long enough for statistical test suites. Such
testing, and any entropy claim, needs real hardware.

## Where this implementation makes its own choices

The structure (DCM pair, sampling flip-flop, reset-on-Q counter, three LSBs,
Von Neumann corrector, 23 stored settings in a BRAM with a 5-bit set
address, a DRP controller started by a request) follows the original
design. The following are this implementation's own choices:

- **DRP controller in hardware.** The original ran the DRP sequencing in
  software on a soft processor. Here it is a state machine, and the
  processor's role is reduced to the top-level control ports.
- **BRAM layout.** One 16-bit word per DCM per set (46 words). The
  original's stated size of 46 bytes (23 x 16 bits) cannot hold four 5-bit
  values per set.
- **DRP details.** Register address 0x50 and the `{M-1, D-1}` word are the
  Virtex-5 DCM_ADV convention. Check them against the target device's DRP
  map before use.
- **Timing and sizing choices.** Counter width (9 bits) with saturation, bit
  order into the corrector, carrying of the odd bit, the output format,
  `en` acting through the DCM reset, reset handling across domains,
  refusal of out-of-range set addresses, wrap-around stepping, lock timeout.
- **Addressing.** Set address k means row k+1 of the table above
  (0-based).

The design was checked in simulation only. Timing closure of the DFF (its
data input is a clock, so it is asynchronous by design) and placement of the
two DCMs need the usual care on the device. In particular, the DFF must not
be optimised or retimed away.

## Files

- `rtl/`: `trng_pkg`, `beat_dff`, `beat_counter`, `post_processing_unit`,
  `address_gen`, `md_bram`, `drp_controller`, `reset_sync` (a helper) and
  `dcm_trng_top`.
- `tb/`: one testbench per module, the sweep and `dcm_adv_model`.
