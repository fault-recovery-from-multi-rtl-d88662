# Recovering from voltage-attack timing faults on a shared FPGA

When several tenants share an FPGA, one of them can pull down the supply
voltage of the whole die by switching on thousands of ring oscillators
("power wasters"). The droop slows every path on the chip, and a circuit with
a long critical path, such as a wide ripple-carry adder, starts to capture
wrong results. This design keeps such a circuit correct under attack. It does
not try to stop the attacker. Instead it:

1. **detects** the droop within two clock cycles, using a carry-chain
   time-to-digital converter (TDC) whose reading is compared with a
   calibrated threshold;
2. **withholds** every result the victim produced in the last K cycles,
   because those results may already be wrong; a result is only released after
   it has waited K cycles in an output shift register with no alarm;
3. **stalls** the victim and its requester while the droop lasts;
4. **recomputes** the K withheld results from copies of their inputs, which an
   input shift register has kept, and then resumes normal work.

The cost is K cycles of extra latency per operation and some lost throughput
during attacks. No result is ever wrong.

The protected circuit here is a 512-bit adder. It is used in two
configurations:

* the only adder of a **1,024-bit RSA core** that uses the Chinese Remainder
  Theorem (CRT), with K = 2 and threshold 68 (the main configuration), and
* a **stand-alone adder test rig** fed with long-carry test vectors, with
  K = 5 and threshold 70 (the configuration used to characterise the method).

Both are in the top module `fr_rsa_top`.

## Structure

```
                 +-------------------- fault_recovery_unit -------------------+
 request  ------>|--+-----------------------------+                           |
 (a,b,cin)       |  |                             v                           |
 in_valid ------>|  |  input_shift_register   +-------+   victim   +--------+ |
 in_ready <------|  +->[ depth K, frozen in    |  mux  |--> adder -->| output | |--> out_valid
 (= OutValid)    |     recovery ]--rd_idx----->|       |  (outside)  | shift  | |--> out_data
                 |                             +---^---+             | reg K  | |    (cout,sum)
                 |                      Recovery Mode|               +----^---+ |
 tdc_q  -------->| hamming_weight --> recovery_controller ---Unsafe-------+     |
 (tdc_sensor)    |                    (threshold register)                      |
                 +------------------------------------------------------------+
```

| Module | Role |
|---|---|
| `tdc_sensor` | Behavioural model of the 128-stage carry-chain TDC. It has no logic function on its own: its reading depends on analog delay. |
| `hamming_weight` | Counts the ones in the 128-bit TDC word. |
| `recovery_controller` | Holds the threshold register and produces Unsafe, Recovery Mode, OutValid and the replay index. |
| `input_shift_register` | Keeps the last K victim inputs. Each entry has a valid bit. |
| `output_shift_register` | Holds the last K victim results. Stage 0 is the victim's result register. |
| `fault_recovery_unit` | Wires the parts above together with the input mux around an external victim. |
| `victim_adder` | The protected 512-bit adder, with carry in and carry out. |
| `modmul` | Modular multiplier whose additions all go through the protected adder. |
| `rsa_crt` | CRT exponentiation: two 512-bit exponentiations and the recombination. |
| `input_generator` | Test vectors for the rig: carry paths of 80 to 440 stages, chosen at random. |
| `pw_enable_gen` | The attacker's enable pattern. Each cycle it switches the wasters on with probability `rate`/65536, and keeps them on for 5 cycles. |
| `fr_rsa_top` | The RSA system and the adder rig, side by side. |
| `fr_pkg` | Shared constants: widths, depths and thresholds. |

## Timing of detection and recovery

This part needs the most care. Everything else follows from it.

**Normal operation.** A request accepted in cycle *t* is applied to the
combinational victim in cycle *t*. Its result is captured at the end of *t*
into output stage 0, and at the same edge the input is captured into input
stage 0. Input stage *i* and output stage *i* therefore always belong to the
same operation. The result leaves output stage K-1 in cycle *t+K*. Idle
cycles also move through both registers, as entries marked invalid, so
"K cycles" always means K clock cycles.

**Detection.** Suppose the wasters switch on in cycle *a*. The TDC captures
the slowed carry chain at the end of *a*. The Hamming weight is compared with
the threshold during *a+1*, and the registered result, **Unsafe**, is high in
*a+2*. That is a two-cycle detection delay. At 130 MHz it is about 15 ns.

**Withholding.** **Recovery Mode** is Unsafe OR'd with a hold flag, so it
rises in the same cycle as Unsafe. **OutValid** is its inverse. It is both
the result-valid window and the requester's `in_ready`. From that cycle on:

* no result is released;
* no new request is accepted;
* both shift registers are frozen.

The K results still in the output register were computed in cycles
*a+1-K … a+1*. Results that left earlier were computed before *a*, so they
are safe as long as **K ≥ 2**, the detection delay. This is the real
constraint on the depth. If faults can appear earlier than the sensor sees
them, or if the clock is faster, K must grow. That is why the stand-alone
adder at 200 MHz uses K = 5.

**Replay.** When Unsafe falls, the controller spends exactly K cycles in
replay. The input mux takes its operand from the input shift register, read
at index K-1, K-2, …, 0, which is oldest first. The output register shifts
the fresh results in. After K cycles each output stage again holds the
result of its matching input stage. Recovery Mode and the hold flag then
clear, OutValid returns, and the oldest recomputed result leaves first. If
the sensor trips again during the replay, the replay stops. It restarts from
the oldest input once the supply is safe. The saved inputs were never
shifted, so nothing is lost and the order is kept.

**What the requester sees.** Results come out in order, one per request. In
the absence of attacks each takes exactly K cycles. An attack adds the length
of the droop plus K replay cycles. The requester only has to follow the
valid/ready handshake. An assertion checks that a request is held until it is
taken.

## The RSA core around the adder

`rsa_crt` computes `c^d mod pq` from the key parts p, q, dp = d mod (p-1),
dq = d mod (q-1) and qinv = q⁻¹ mod p:

```
mp = (c mod p)^dp mod p          mq = (c mod q)^dq mod q
h  = qinv * ((mp - mq) mod p) mod p
m  = mq + h*q
```

Every arithmetic step uses the single protected adder, so the adder is the
only part of the core that needs protection:

* **Modular multiplication** (`modmul`) works left to right over the bits of
  the multiplier: `R = 2R mod m`, then `R = (R + b) mod m` if the bit is set.
  Each modular addition takes two adder operations:
  1. the sum, with its carry out c1;
  2. the trial subtraction `sum + ~m + 1`, with its carry out c2.

  The difference is kept when c1 OR c2 is set. That means the cost is 2 adder
  operations per bit, plus 2 more for each set bit.
* **Reduction** of the 1,024-bit input modulo a 512-bit prime uses the same
  loop, with the multiplier's bit fed into the carry in of the doubling
  (`R = (2R + bit) mod m`).
* **Exponentiation** is square-and-multiply over all 512 exponent bits.
* **Recombination** takes one subtraction, plus one more addition of p if the
  difference is negative, and one modular multiplication. The 1,024-bit
  `h*q + mq` is then built by shift-and-add, as a low and a high 512-bit half
  linked through the carry.

The core issues one addition and waits for its result. With K = 2 each
addition therefore takes 3 cycles. One full 1,024-bit operation takes about
2.37 million additions:

| Supply | Cycles per operation |
|---|---|
| Quiet | 7.1 million |
| Wasters enabled on 6% of cycles | 10.5 million (+47%) |

## Parameters

| Parameter (module) | Default | Meaning |
|---|---|---|
| `W` (`fr_rsa_top`, `rsa_crt`, `modmul`, `victim_adder`) | 512 | Adder width. The RSA modulus is 2W bits. |
| `K` / `K_RIG` (`fr_rsa_top`) | 2 / 5 | Shift register depth for the RSA adder / the rig. |
| `THRESHOLD` / `THRESHOLD_RIG` | 68 / 70 | Threshold register value after reset. |
| `TDC_STAGES` | 128 | TDC length. The Hamming weight is 8 bits. |
| `NOMINAL_WEIGHT`, `WEIGHT_PER_DROOP` (`tdc_sensor`) | 60, 1 | Sensor model only: weight with a quiet supply, and its rise per unit of droop. |
| `MIN_LEN`, `STEP`, `N_LEN` (`input_generator`) | 80, 40, 10 | Carry-path lengths 80, 120, …, 440. |

The threshold can be rewritten at run time through `thr_we`/`thr_wdata`. This
allows recalibration after aging, without rebuilding the design.

## Where this design departs from, or adds to, the method

* **Sensor clock.** The TDC is clocked by the protected circuit's own clock.
  On the FPGA the sensor runs from its own 200 MHz clock, and a 750 ps
  shifted copy captures the chain. A second clock domain would need a
  synchroniser, which would add detection delay.
* **Sensor model.** `tdc_sensor` is a behavioural model. Its word holds
  `60 + droop` ones, as a thermometer code. The `droop` input of
  `fr_rsa_top` (and `rig_droop`) is not a real pin. It stands for the
  supply, so that a simulation can stage an attack.
* **Replay by index.** The input shift register is read back by index while
  it stays frozen, rather than being shifted out. The victim sees the inputs
  in the same order. The saved order also survives an attack that interrupts
  the replay.
* **Output register and the victim's register.** The output register's first
  stage is the victim's own result register. As a result, exactly K results
  are unconfirmed at any time, matching the K saved inputs, and the latency is
  K.
* **Valid bits, handshake, reset.** Each shift register entry has a valid bit.
  Requests use valid/ready. Reset is asynchronous and active low. All three
  are this design's choices.
* **RSA internals.** The modular multiplication algorithm, the exponentiation
  order and the recombination are this design's own. The method only needs a
  core that does its additions on one 512-bit adder. The numbers differ from a
  core designed for speed: this core needs about 2.4 million additions per
  1,024-bit operation, where about a million would be typical.
* **Throughput under attack.** In the rig testbench's attack model, the
  wasters corrupt every sum whose carry ripples through 380 stages or more.
  The recovery unit does not know which sums those are. It replays K results
  after every droop, so with K = 5 it delivers 0.57 results per cycle at a 6%
  activation rate, a 43% loss, against about 30% reported for the hardware. In this model K = 2 is
  already error-free, because faults never come before the sensor sees the
  droop. On silicon, faults can show up earlier than the sensor reacts, which
  calls for a deeper register: K = 5 at 200 MHz.
* **Not built.** The power wasters are the attacker's ring oscillators. They
  are combinational loops with no logic function. Their enable pattern is
  built (`pw_enable_gen`, one per side in the top, with `pw_enable` brought
  out). The testbenches model the wasters' effect: a droop fed to the TDC
  model, and forced wrong sums at the victim adder.

## Simulating

All code is SystemVerilog 2017. `rtl/fr_pkg.sv` must be read first. Every
testbench prints `TB_RESULT checks=N failures=M` and stops itself through a
watchdog. Example, the end-to-end test at reduced width:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/fr_pkg.sv tb/tb_fr_rsa_top.sv --top-module tb_fr_rsa_top
./obj_dir/Vtb_fr_rsa_top
```

Replace `tb_fr_rsa_top` with any other testbench name to run that one.

| Testbench | What it shows | Run time |
|---|---|---|
| `tb_fr_rsa_full` | One 1,024-bit CRT operation at the default parameters, under attack. It checks the result against a wide-integer model and runs the K = 5 rig alongside. | about 1 min |
| `tb_fr_rsa_top` | The same at W = 32, with four operations. It checks each mechanism and counts it: detection exactly 2 cycles after the wasters switch on, K-cycle latency, interrupted recovery, backpressure, a run-time threshold write, and the negative CRT difference. | seconds |
| `tb_adder_workload` | Five protected 512-bit adders, with K = 1…5. It prints throughput against activation rate (0–6%) and escaped errors against depth. It then sweeps the TDC threshold from 66 to 90 at 6%. Last, at 3.5%, it sorts results by carry path length, next to an unprotected adder. | under a minute |
| `tb_<module>` | Unit tests for each module, against independent models. | seconds |

The wasters switch on with a set probability per cycle and stay on for 5
cycles. In the top-level tests, `pw_enable_gen` decides when. While they are
on, the testbench's supply model makes the sensor read a high weight and
forces wrong every sum with a carry path of 380 stages or more.

The threshold sweep uses droops of random depth, and faults only when the
weight reaches 73. With that model:

* thresholds up to 72 release no wrong sum;
* relaxing the threshold trades errors for throughput. At threshold 90,
  0.88 results per cycle come out, and about 3% of them are wrong.

In the path-length phase, the unprotected adder fails only on the 400- and
440-stage paths, about 15% of those sums. The protected adder releases no
wrong sum at any length. It completes about 72% as many operations as the
unprotected one in the same time.

## How far it has been checked

Every unit test compares its module with an independently written model:

* bit-serial ripple addition;
* 64-bit or wide-integer modular arithmetic;
* an event model of the controller.

The end-to-end tests inject more than two million wrong sums into the RSA
adder. The RSA result stays exact, and no result is ever released while
Unsafe is high.

Beyond simulation, nothing was checked:

* timing on an FPGA;
* the sensor's real behaviour;
* the resource figures.

For reference, the source design reports 900 LUTs and 1,159 registers for
the recovery circuit next to a 14,825-LUT RSA core.
