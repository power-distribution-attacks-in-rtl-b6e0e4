# Multi-tenant FPGA power-distribution attack test bed

This is SystemVerilog for the test bed described in "Power Distribution Attacks in Multi-Tenant
FPGAs". Several tenants share one FPGA and share nothing but its supply:

- **Attacker.** An array of single-stage ring oscillators ("power wasters"). Switching them on
  together draws a current step, and that step makes the supply voltage droop.
- **Victim 1.** An RSA-CRT decryption core. If the droop causes a fault while Yp is being
  computed, Lenstra's gcd attack can factor the modulus.
- **Victim 2.** A 64-bit ripple-carry adder driven by a delay-fault tester. The tester logs every
  wrong sum with a timestamp measured from the start of the attack.
- **Monitor.** A network of ring-oscillator voltage sensors. A controller samples all of them at
  once every 10 µs and stores the samples for the host.

The default configuration is the Cyclone V one:

| Item | Default |
|---|---|
| Sensors | 46 |
| Power wasters | 12,000 |
| RSA prime width | 128-bit |
| Adder width | 64-bit |
| Sampling window | 10 µs |
| Samples per run | up to 100 |

All logic runs on one 50 MHz system clock. The document does not give this clock; it is this
design's choice.

## Top level: `pdn_testbed_top`

The top has only plain ports.

- **Clock and reset:** `clk`, and `rst_n`, an asynchronous active-low reset.
- **Attacker control:**
  - `attack_enable` is the attacker's switch.
  - `attack_active` is its registered state.
  - The clock in which `attack_active` rises is the "time zero" for the fault tester's
    timestamps.
- **Host buses:** `rsa_*`, `dft_*` and `mon_*`, one per tenant. Each has `we`, `re`, a 20-bit
  `addr`, 32-bit `wdata` and `rdata`, and `rvalid`.
  - The region is in `addr[19:16]` and the 32-bit word index in `addr[15:0]`.
  - Read data comes back one clock after `re`, with `rvalid` high.
  - Inside the top each bus becomes a `host_bus_if` instance.
  - In the document the host reached the on-chip memories over JTAG. Here the buses stand in
    for that link.
- **`dft_fault`:** a one-clock pulse for each adder fault detected.
- **`sensor_vdd_mv[NUM_SENSORS]`:** the supply voltage in millivolts at each sensor.
  - The voltage is an input because the supply is physics, not logic.
  - A testbench drives it from a droop model. On silicon it would be the die's own supply.

Parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_SENSORS` | 46 | sensors in the monitor |
| `NUM_WASTERS` | 12000 | power wasters in the attacker |
| `KEY_BITS` | 128 | width of the RSA primes |
| `ADDER_W` | 64 | adder width |
| `NUM_VECTORS` | 64 | size of the fault tester's vector table |
| `LOG_DEPTH` | 256 | size of the fault tester's log |
| `MAX_SAMPLES` | 100 | samples per monitor run |
| `RO_F_NOM_KHZ` | 105000 | nominal sensor ring frequency |
| `V_NOM_MV` | 1100 | nominal supply voltage |

The monitor window is derived from the 50 MHz clock: 500 cycles, which is 10 µs.

## Attacker

### `power_waster` (behavioural model)

- **What it is.** A single LUT wired as an inverter in a loop, with an enable.
- **What the model does.** When enabled it toggles every `HALF_PERIOD_PS` (600 ps, assumed) and
  counts its toggles, so a testbench can see the activity.
- **Why it is a model.** A combinational loop has no synthesizable description. On silicon the
  waster is placed by hand, and each ALM holds two of them.

### `power_waster_array` (behavioural model)

- `NUM_WASTERS` wasters share one registered enable.
- `active` is the registered enable, one clock after `enable`. All wasters start in the same
  clock, which produces the largest current step.

## Victim 1: RSA-CRT

Decryption by the Chinese remainder theorem:

- Yp = X^(d mod (p-1)) mod p
- Yq = X^(d mod (q-1)) mod q

The core computes Yp and then Yq on one exponentiation unit. The host reads both and recombines
them into Y with Garner's formula.

If Yp is faulty and Yq is correct, then gcd(X − Y'^e mod n, n) = q, and the key is broken.

### `rsa_host_mem`

The host-visible memory of the core. The primes are N = `KEY_BITS` bits wide; d and X are 2N
bits wide. Operands are stored least significant word first.

| Region | Contents |
|---|---|
| 0 | write word 0 bit 0 = start; read word 0 = {busy, done}; read word 1 = clock cycles of the last operation |
| 1 | p |
| 2 | q |
| 3 | d |
| 4 | X |
| 5 | Yp (read only) |
| 6 | Yq (read only) |

Writes to the operands are ignored while the core is busy.

### `rsa_crt_core`

A state machine drives one `mod_reducer` and one `mod_exp` unit. For each prime P (first p,
then q) it runs these steps:

1. Compute R² mod P, with R = 2^N, as a reduction of 2^(2N).
2. Compute X mod P.
3. Compute d mod (P−1).
4. Exponentiate.

### `mod_exp`

- **Method.** Left-to-right square-and-multiply in the Montgomery domain. It uses one
  multiplier for every operation: entering the domain, each square, each multiply, and leaving
  the domain.
- **Exponent bits.** It walks all N exponent bits.
- **Latency.** (3 + N + popcount(exp)) · (N + 3) + 1 clocks.

### `montgomery_multiplier`

- **Method.** Radix-2, bit-serial: it computes a·b·2^(−N) mod m at one bit of `a` per clock.
- **Result.** Fully reduced, less than m.
- **Latency.** `done` comes N + 2 clocks after `start`.

### `mod_reducer`

- **Method.** Serial shift-and-subtract, with one input bit per clock.
- **Latency.** `len` + 1 clocks.

### Timing

One 128-bit operation takes about 2·(3 + 128 + 64)·131 cycles, plus the reductions. That is
about 52,600 cycles in total. At the document's 94.74 MHz Fmax this is 0.56 ms, against the
0.59 ms it reports.

Doubling N multiplies the cycle count by about four, as the document states. That agreement is
why `KEY_BITS` is taken as the width of the primes.

## Victim 2: adder and delay-fault tester

### `ripple_carry_adder`

- **Structure.** A chain of 64 full adders between a launch register and a capture register.
  The longest carry path is 64 stages; the document's test vectors sensitise paths of 53 to 64
  stages.
- **Latency.** The sum is captured two clocks after the operands are presented.

### `delay_fault_tester`

The host loads vectors into a table: a, b and the expected sum. It then sets the number of
active vectors and starts a run.

- **Operation.**
  - Every clock the next vector goes to the adder.
  - `ADDER_LAT` clocks later the captured sum is compared with the expected sum.
  - A mismatch is logged and pulses `fault_pulse`.
- **Log entry.** Each entry holds the timestamp (clocks since `time_zero`), the vector number and
  the captured sum.
- **Counters.** A fault counter keeps counting after the log is full.

| Region | Contents |
|---|---|
| 0, write word 0 | bit 0 = run, bit 1 = clear |
| 0, write word 1 | number of active vectors |
| 0, read words 0–3 | running, fault count, log entries, vectors applied |
| 1 | vector table: word vec·16 + k; k = 0–3 for a, 4–7 for b, 8–11 for the expected sum |
| 2 | fault log: word entry·8 + k; k = 0 timestamp, 1 vector, 2–5 sum |

The document computes the expected sums off chip. The comparison is on chip here, so a fault in
the supply cannot corrupt the reference.

## Monitor

### `ring_oscillator` (behavioural model)

- **What it models.** A 19-stage ring whose frequency follows its local supply:
  f = F_NOM · (1 + 1.2 · (V − V_NOM) / V_NOM).
  - F_NOM is 105 MHz; the document gives this for Cyclone V.
  - The slope of 1.2 is an assumption. It gives about 0.1 % of frequency per millivolt, close
    to the sub-millivolt resolution the document claims for 0.1 % frequency changes.
- **Why it is a model.** The ring is a combinational loop and its frequency is analog.
- **Timing.** The model uses delays in real time. A zero-delay-loop lint warning from it stands
  for that reason, as explained in its file.

### `ro_sensor`

- **Structure.** The ring clocks a saturating 20-bit counter.
- **Window.** The controller's `gate` is synchronised into the ring domain by two flops. The
  counter is cleared when the window opens and counts until it closes.
- **Clear.** Lowering `ro_en` clears the counter asynchronously.
- **Output.** `count` holds the last window's result. Nominally that is 1,050 counts per 10 µs.

### `sensor_controller`

- **Starting a run.** Writing the number of samples (1–100) to region 0, word 0 starts a run.
- **Sampling period.**
  - The rings are enabled and warm up for 16 clocks.
  - Each period then has a 500-clock window, an 8-clock guard while the synchronisers settle,
    and a one-clock snapshot of all counts.
  - The sampling period is therefore 509 clocks, 10.18 µs.
- **Logging.** The snapshot is written to the sample memory one sensor per clock while the next
  window is already open. Sample s of sensor k is at word s·NUM_SENSORS + k.

| Region | Contents |
|---|---|
| 0, read word 0 | {busy, done} |
| 0, read word 1 | samples logged |
| 1 | sample memory |

### `sample_log_ram`

A simple dual-port memory of 4,600 words of 20 bits, with a synchronous read.

## Shared files

- `pdn_pkg`: package with the document's constants, the region numbers and the address helper.
- `host_bus_if`: the register bus interface. Its assertions check that there is never a read and
  a write in the same cycle, and that every read is answered in the next cycle.

## Testbenches

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- checks latencies in clock cycles where they are defined;
- compares arithmetic against `rsa_ref_pkg`, a reference package of big-integer functions: modular
  power, gcd, inverse, CRT recombination and Lenstra factoring.

`tb/host_bus_tasks.svh` holds the bus read and write tasks.

### End-to-end testbenches

`tb_pdn_testbed_top` (reduced size) and `tb_pdn_testbed_full` (all defaults) share
`tb/pdn_scenario.svh`.

**Supply model.** The scenario replaces physics with a model. When the attack is on:

- Each sensor sees a droop that shrinks with its distance from the attacker.
- An extra dip lasts from 10 µs to 20 µs after switch-on. It stands in for the inductive
  undershoot.
- The adder fails while its local supply is below 1.0 V. The testbench then corrupts the
  captured sum.
- One timing fault is injected into the Montgomery datapath while Yp is being computed.

**Mechanisms checked.** The scenario counts each mechanism and fails any that never happened:

- the RSA cycle count on a clean run;
- the droop seen by every sensor;
- the deepest droop at the attacker's sensor, with the droop shrinking with distance;
- adder faults counted and logged, with timestamps inside the dip;
- the factor q recovered by Lenstra's method, and d recovered from it.

**Run times.** The full-size run takes about 2.5 minutes under verilator.

### Running a testbench

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/pdn_pkg.sv tb/rsa_ref_pkg.sv tb/tb_pdn_testbed_top.sv
obj_dir/Vtb_pdn_testbed_top +verilator+rand+reset+2
```

## Where this design goes beyond, or differs from, the document

- **Clock.** The system clock of 50 MHz is assumed. The RSA timing is compared at the
  document's 94.74 MHz Fmax.
- **Exponent.** The reduced exponent is d mod (p−1), as CRT decryption requires.
- **On-chip reductions.** X mod p, d mod (p−1) and R² mod p are computed on chip by a serial
  reducer. The document only names the exponentiation unit and the state machine.
- **Host link.** JTAG is replaced by plain register buses. The host software is not hardware and
  is not built. That software covers CRT recombination, key extraction, vector generation, and
  locating the attacker by interpolating contours.
- **Analog parts.** These are absent from the RTL: the board regulator, the inline inductor, the
  on-die network and Arria 10's hard voltage sensor. Their effect enters only through
  `sensor_vdd_mv` and the testbenches' supply model.
- **Sampling period.** The period is 10 µs of counting plus 0.18 µs of guard and snapshot.
  The document gives only the 10 µs measurement period.
- **Sensor flip-flops.** Each sensor has 23 flip-flops: the 20-bit counter plus three to
  synchronise the window. The document counts 20 flip-flops per sensor, which suggests it
  synchronises differently or not at all.
- **Arria 10 configuration.** This configuration (132 sensors, 28,160 wasters, 150 MHz rings,
  2 µs windows) needs parameters changed from their defaults.
- **Weaker attacks.** The 3,200-waster attack needs `NUM_WASTERS` changed from its default.

## Lint notes

These warnings from the lint step remain, and each is intended:

- **Unused values.** A few package constants and the spare bits of wide intermediates (the
  Montgomery subtraction's top bit, the wasters' outputs) are not used.
- **Reset on the host bus.** The bus interface uses `rst_n` in its assertion's disable clause.
- **Zero-delay loop.** The ring-oscillator model uses a real-time loop.
