# COPACOBANA v2 in SystemVerilog: an FPGA cluster for elliptic-curve cryptography and factoring

This is RTL for a low-cost, massively parallel FPGA cluster aimed at
cryptographic work that needs much computation but little memory or
communication, together with the two arithmetic applications that run on it:

* **ECDSA point multiplication over NIST P-256** — kP for signing and kP + lQ
  for verification — six cores per compute FPGA;
* **phase 1 of the Elliptic Curve Method (ECM)** of integer factoring — a
  Montgomery-ladder point multiplication modulo an arbitrary odd number
  (151-bit numbers and 980-bit scalars by default).

The machine has 128 compute FPGAs: 16 plug-in modules with 8 FPGAs each. A
controller FPGA masters one shared backplane bus (64-bit data, 16-bit
address). On each module a CPLD bridges that bus to the module's eight FPGAs
and also looks after the module's temperature and power. Traffic is meant to
be condensed as it moves up the hierarchy, from FPGA to CPLD to controller to
host, so a slow shared bus can feed a large number of arithmetic cores.

## Block map

```
host side ──cmd/rsp──► bus_master ──bp (64 data, 16 addr, rd/wr)──┬─► module 0 … module 15
                          ▲                                       │
                          └────── bp_rsp (OR of module returns) ◄─┘

module m:  cpld_bridge ──lb──► v4_node ×8 ──► ecdsa_core ×6    (modules 0–14)
              ▲   ▲                       └─► ecm_core  ×4    (module 15)
              │   └── cpld_monitor ◄── temp[m][0..7]   ──► power_en[m] (holds the FPGAs in reset)
              └────── smbus_client ◄──► SMBus (smb_scl_i, smb_sda_i, smb_sda_pull)
```

| File | What it is |
|---|---|
| `rtl/copa_pkg.sv` | shared constants, bus structs, the P-256 prime |
| `rtl/copacobana_top.sv` | the cluster |
| `rtl/bus_master.sv` | controller side of the backplane bus |
| `rtl/cpld_bridge.sv` | module CPLD: backplane ⇄ local bus, aggregated status |
| `rtl/cpld_monitor.sv` | module CPLD: thermal shutdown |
| `rtl/smbus_client.sv` | module CPLD: management-bus client |
| `rtl/v4_node.sv` | one compute FPGA: register file plus cores |
| `rtl/ecdsa_core.sv` | P-256 kP / kP + lQ |
| `rtl/p256_mul.sv`, `rtl/p256_reduce.sv` | 256×256 multiplier, NIST fast reduction |
| `rtl/ecm_core.sv` | ECM phase 1 |
| `rtl/mont_mul.sv` | radix-2^17 Montgomery multiplier |
| `rtl/mod_addsub.sv` | modular add/subtract, used by both cores |

## Addressing and the three tiers

A backplane address is `{module[15:12], fpga[11:9], register[8:0]}`, and a
register address is `{slot[8:6], word[5:0]}`. Slots 0–6 belong to the cores of
the addressed FPGA. Slot 7 is answered by the module's CPLD whatever the FPGA
field holds:

| CPLD word | read value |
|---|---|
| 0 | bitmap of the module's FPGAs that hold a finished result |
| 1 | `{hot[7:0], hottest °C[7:0], 7'b0, shutdown}` |
| 2 | module number |
| 3 | `{any, 4'b0, index}` of the lowest-numbered FPGA with a finished result |

These registers are the aggregation step of the hierarchy: to find work that
has finished, the controller reads one CPLD word per module instead of polling
48 cores.

Bus timing, all on one clock:
* `bus_master` puts an access on the bus for one clock.
* `cpld_bridge` registers it onto the local bus.
* `v4_node` answers one clock later.
* The CPLD registers the answer back onto the backplane.

An FPGA read therefore returns 3 clocks after it was on the bus, and a CPLD
register after 1 clock. Modules that are not addressed return zeros, so the
shared return bus is an OR. If a read gets no answer within 16 clocks, it ends
with `rsp_timeout` set. That happens for an absent module or a powered-down
one.

### Register map of a compute FPGA (per core slot, 64-bit words, least significant word first)

| word | ECDSA core | ECM core |
|---|---|---|
| 0–3 | k | n (modulus) |
| 4–7 | l | a24 = (A+2)/4, Montgomery domain |
| 8–11 | Px | x0, Montgomery domain |
| 12–15 | Py | z0, Montgomery domain |
| 16–23 | Qx, Qy | k, words 16–31 (1024 bits, the low 980 used) |
| 32 write | bit 0 start, bit 1 = kP + lQ | bit 0 start |
| 32 read | `{inf, done, busy}` | `{0, done, busy}` |
| 40–51 | X, Y, Z (Chudnovsky) | X (40–43), Z (44–47) |

`done` stays set until the core is started again. Each FPGA's OR of its cores'
`done` flags goes to the CPLD.

## The ECDSA core (`ecdsa_core`)

**Algorithm.** Points are held in Chudnovsky coordinates (X, Y, Z, Z², Z³),
so the core never inverts a field element. The scalar is scanned MSB first
(double-and-add). In kP + lQ mode the core first computes S = P + Q. At each
bit, after the doubling, it adds P, Q or S according to the bit pair
(Shamir's trick), so kP + lQ costs about one doubling and ¾ of an addition per
bit. The result comes out projective. The affine point is
x = X/Z², y = Y/Z³; the core does not compute it.

**Field unit.** The field unit has one modular adder/subtractor and one
modular multiplier. The multiplier has two stages:
1. `p256_mul` is a serial-to-parallel multiplier. It holds a in parallel,
   feeds b in 16-bit digits and builds the 512-bit product in 16 clocks.
2. `p256_reduce` applies the NIST P-256 reduction
   r = s1 + 2s2 + 2s3 + s4 + s5 − s6 − s7 − s8 − s9 over the 32-bit words of
   the product. It takes one term per clock in a signed accumulator and then
   adds or subtracts p until the result lies in [0, p): 10 to 15 clocks.

A modular multiplication costs about 32 clocks in total, and an
addition/subtraction costs 1.

**Sequencer.** A 44-word micro-program ROM holds point doubling (a = −3: 9
multiplications, 14 additions/subtractions) and general point addition (14
multiplications, 7 additions/subtractions). The operands live in a 16-entry
register file: R in 0–4, the addend in 5–9 and temporaries in 10–15. The
addend slots are loaded with P, Q or S before each addition. If R is still
the point at infinity, the addend is copied into R instead.

**Timing.**

| Operation | Clocks |
|---|---|
| doubling | ≈ 300 |
| addition | ≈ 460 |
| 256-bit kP | ≈ 126,000 |
| kP + lQ | ≈ 155,000 |

Both totals stay within the per-core budget implied by the published estimate
for this machine: 4,840 kP/s and 4,000 (kP + lQ)/s per FPGA, with six cores
at 245 MHz. The testbench checks this.

**Limits.** The core does not handle three exceptional additions:
* R = ±A in the loop;
* P + Q = O;
* P = ±Q in kP + lQ mode.

They do not arise for independent random scalars and points. A zero scalar
gives `inf = 1`.

## The ECM phase-1 core (`ecm_core`, `mont_mul`)

**Ladder.** Phase 1 computes kP on a Montgomery curve By² = x³ + Ax² + x
modulo n, with x-only arithmetic. The ladder keeps (R0, R1) with R1 − R0 = P.
Each step does a differential addition (6 multiplications) and a doubling
(5 multiplications). For a set bit, the roles of R0 and R1 are exchanged by
register renaming, so every step takes the same 142 clocks, even for leading
zero bits. R0 starts as the point at infinity, written (x0 : 0), so the core
needs no special first step. The ECM core published for this machine
takes 377 clocks per doubling-and-addition.

**Montgomery multiplier.** `mont_mul` works in radix 2^17, the widest
unsigned operand of the target's DSP multipliers. It consumes one 17-bit digit
of a per clock:
1. q = ((T + aᵢ·b)·n′) mod 2^17
2. T = (T + aᵢ·b + q·n) / 2^17

One conditional subtraction follows. For 151 bits (D = 9 digits) a
multiplication takes 10 clocks. The core computes n′ = −n⁻¹ mod 2^17 itself
at start, by Newton iteration.

**Montgomery domain.** All core values are in the Montgomery domain
(v·2^(17·D) mod n). The host converts a24, x0 and z0 before it loads them.
The factor cancels in X/Z, so the host can take gcd(Z, n) on the raw output.

Phase 2 of ECM is not part of this RTL.

## Thermal protection and the management bus

`cpld_monitor` compares each FPGA's die temperature with 80 °C, which is 5 °C
below the devices' 85 °C maximum. The temperature arrives already digitised,
in °C. When any FPGA reaches 80 °C:
* the monitor drops the module's `power_en` on the next clock;
* the top holds that module's FPGAs in reset.

The shutdown latches. It is released only by a clear command while every
temperature is below the limit.

`smbus_client` is each CPLD's client on the two-wire management bus. It sits
at address `SMB_BASE + module` and oversamples SCL and SDA.

| Command | Transaction | Meaning |
|---|---|---|
| 0–7 | Read Byte | temperature of FPGA 0–7 |
| 8 | Read Byte | hot bitmap |
| 9 | Read Byte | shutdown flag |
| 10 | Read Byte | hottest temperature |
| 16 | Write Byte, data bit 0 = 1 | clear a shutdown |

The bus master of this bus is outside the design; its lines are top-level
ports.

## Parameters (defaults)

| Parameter | Default | Origin |
|---|---|---|
| `N_MODULES` × `N_FPGAS` | 16 × 8 | machine description |
| `N_ECDSA_CORES` | 6 | machine description |
| `ECM_NBITS`, `ECM_KBITS` | 151, 980 | machine description (ECM benchmark) |
| radix of `mont_mul` | 2^17 | machine description |
| `N_ECM_MODULES` | 1 | own choice: last module runs ECM |
| `N_ECM_CORES` | 4 per FPGA | own choice (count not published) |
| `p256_mul` digit | 16 bits | own choice |
| bus timeout | 16 clocks | own choice |
| shutdown threshold | 80 °C | own reading of "close to 85 °C" |
| `SMB_BASE` | 7'h20 | own choice |

## Where this RTL departs from, or goes beyond, the published design

* **Taken from the published design:**
  * the three-tier organisation, 16 × 8 FPGAs, and 64-bit data / 16-bit
    address on the backplane;
  * Chudnovsky coordinates, double-and-add with Shamir's trick, a
    serial-to-parallel multiplier with NIST fast reduction, and six ECDSA
    cores per FPGA;
  * radix-2^17 Montgomery multiplication on Montgomery curves for ECM, with
    151/980-bit sizes;
  * the SMBus monitoring client in the CPLD, and power-down near 85 °C.
* **This design's own choices:**
  * the address split, the rd/wr strobes, the bus timing and timeout, and
    the register maps;
  * what the CPLD aggregates, and the SMBus command set;
  * the point formulas and micro-programs, the multiplier digit width, the
    reduction schedule, and the ECM core count;
  * the shutdown margin and latch, and the ECM/ECDSA split of the modules.
* **Clocking:** everything runs on one clock. The real machine runs the
  backplane at 20 MHz and the cores much faster, so a real build needs a
  clock-domain crossing in each FPGA.
* **Target mapping:** the arithmetic is written as generic `*` and `+`. Nothing
  maps it onto DSP48 cascades, and the cycle counts are those of this RTL, not
  of the published cores.
* **Not built:**
  * ECM phase 2, whose algorithm and tables are not published;
  * the controller's embedded processor, TCP/IP stack and Gigabit Ethernet;
  * the SMBus master;
  * the analog parts: supply, DC/DC converters and temperature diodes.
  * direct links between the eight FPGAs of a module. The machine's FPGAs are
    described as "locally interconnected", but the wiring is not given. Here
    each FPGA talks only to its CPLD over the module's local bus.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/copa_pkg.sv tb/p256_ref_pkg.sv tb/tb_ecdsa_core.sv --top-module tb_ecdsa_core
./obj_dir/Vtb_ecdsa_core
```

Swap in any other testbench name in the same command.

| Testbench | What it checks |
|---|---|
| unit benches | `tb_mod_addsub`, `tb_p256_mul`, `tb_p256_reduce`, `tb_mont_mul`, `tb_bus_master`, `tb_cpld_bridge`, `tb_cpld_monitor`, `tb_smbus_client` |
| `tb_ecdsa_core` | against an affine reference (`tb/p256_ref_pkg.sv`: '%'-based field arithmetic, inversion by Fermat), including full 256-bit scalars |
| `tb_ecm_core` | against a plain-arithmetic ladder on four random moduli, plus the identity [a]([b]P) = [ab]P and k = 0 giving the point at infinity |
| `tb_v4_node` | cores through their register interface, including two ECDSA cores of one FPGA running side by side |
| `tb_copacobana_top` | a reduced cluster end to end: kP, kP + lQ, ECM, aggregation, bus timeouts, thermal shutdown, and the SMBus read and clear |

The reduced cluster is 2 modules × 2 FPGAs. It has 4 ECDSA cores and 2 ECM
cores with 64-bit scalars.

**Largest sizes simulated:**
* the cores alone, at their full default sizes: 256-bit kP and kP + lQ, and
  151-bit n with a 980-bit k;
* the cluster at the reduced size above.

The cluster at its default size passes lint and elaboration, but it has not
been simulated. Verilator flattens all 752 cores into one C++ class. At that
size the compile runs for hours, which is far longer than the simulation
itself.
