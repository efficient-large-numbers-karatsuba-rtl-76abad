# Hybrid recursive Karatsuba-Ofman multiplier for 128-bit binary polynomials

This RTL multiplies two 128-bit polynomials over GF(2), which is the costly core of
binary-field elliptic-curve arithmetic. It returns the full 255-bit carry-less product.
It uses the Karatsuba-Ofman split: each operand is cut into halves,
`A = A1·x^(n/2) + A0`, and only three half-size products are needed:

    T1 = A1·B1      T2 = (A1+A0)·(B1+B0)      T3 = A0·B0
    A·B = T1·x^n + (T1+T2+T3)·x^(n/2) + T3

Over GF(2) every `+` is an XOR, so no subtractor is needed and no carries appear.
The split is applied at 128, 64 and 32 bits. It ends in 16-bit multipliers that are
fully combinational Karatsuba trees.

The main idea is that each level can trade area for time on its own. A level either
builds three half-size multipliers and runs them in parallel, or builds fewer and
reuses one of them over several clock cycles. This gives a family of designs, from the
fastest and largest (everything parallel) to the smallest (one unit reused at every
level). The multiplier does no modular reduction. A field multiplier for
`GF(2^n)` with a trinomial `x^n + x^k + 1` would add an XOR-only reduction stage after it.

## The design family A_ij

Each level of width N has one of three organisations (`rkm_pkg::rkm_mode_e`):

| mode            | units built | rounds | what each round computes                                  |
|-----------------|-------------|--------|-----------------------------------------------------------|
| `RKM_PAR3`      | 3           | 1      | T1, T2, T3 on units 0, 1, 2                               |
| `RKM_PAR2_SEQ1` | 2           | 2      | round 1: T1 on unit 0, T3 on unit 1; round 2: T2 on unit 1 |
| `RKM_SEQ3`      | 1           | 3      | T1, then T3, then T2 on the single unit                   |

A 128-bit design is named **A_ij**:

* `i` (`DESIGN_I`) is the organisation of the 128-bit level: 1 = three parallel, 2 = two
  parallel plus one sequential, 3 = three sequential 64-bit units.
* `j` (`DESIGN_J`) selects one of five 64-bit designs, RKM_j:

| j | 64-bit level   | 32-bit level   | 16-bit leaves per 64-bit unit |
|---|----------------|----------------|-------------------------------|
| 1 | three parallel | three parallel | 9 |
| 2 | three parallel | 2 par + 1 seq  | 6 |
| 3 | three parallel | three sequential | 3 |
| 4 | 2 par + 1 seq  | three parallel | 6 |
| 5 | 2 par + 1 seq  | 2 par + 1 seq  | 4 |

The default is **A11**: 27 leaf multipliers, everything in parallel, the fastest design.
**A33** is the smallest. It has three 16-bit leaves in one 64-bit unit, and that unit is
reused three times at the 128-bit level. Fourteen of the fifteen combinations were the
designs originally evaluated; A22 was not among them, but this RTL accepts it as well.
`rkm_pkg::design_modes(i, j)` turns `(i, j)` into the per-level mode vector.

## How a level works (`rkm_level`)

`rkm_level` is recursive. One instance of width N contains:

* **operand registers** that hold A and B for all rounds;
* the **XOR network** (`kom_xor_net`). It forms `A1+A0` and `B1+B0` for the middle
  product. It also recombines T1, T2, T3 into the 2N-1 bit result;
* an **operand multiplexer** in front of each sub-unit. It picks (A1,B1), (A1+A0,B1+B0)
  or (A0,B0), depending on the round;
* one to three **sub-multipliers** of width N/2. Each is `rkm_base` when N/2 is the leaf
  width (16); otherwise it is another `rkm_level` that takes the next two bits of `MODES`;
* three **product registers** T1..T3 and an **output register**;
* a **control unit** (`rkm_ctrl`). It latches the operands, starts the round's units,
  captures their products when they report done, and after the last round registers the
  combined result.

Every unit has the same interface. `start` comes in the same cycle as `a` and `b`. Later
`done` pulses for one cycle, and `p` is valid from then until the next result. A `start`
while busy is ignored. The control unit takes one cycle to issue a round and one cycle
to finish, so a level whose sub-units take S cycles has latency

    L = ROUNDS · (S + 1) + 2,     with S = 1 for a 16-bit leaf.

All units started in the same round have the same latency, so the level ends a round on
the `done` of its last unit. That unit takes part in every round. An assertion checks
that the other active units finish in the same cycle.

### Latency of every 128-bit design

| design | A11 | A21 | A31 | A12 | A32 | A14 | A24 | A34 | A15 | A25 | A35 | A13 | A23 | A33 |
|--------|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|-----|
| cycles, `rkm128` | 10 | 18 | 26 | 12 | 32 | 15 | 28 | 41 | 19 | 36 | 53 | 14 | 26 | 38 |
| cycles, original evaluation | 13 | 28 | 42 | 25 | 78 | 26 | 52 | 78 | 48 | 96 | 144 | 34 | 70 | 105 |

The ordering is broadly the same, with A11 fastest and the A3x designs slowest. The
absolute numbers are not. The original cycle schedule was never specified, so this RTL
uses its own schedule, described above.
The whole system (`rkm_top`) adds 11 cycles of RAM and control traffic, so one product
takes 21 cycles from `start` to `done` for A11 and 49 cycles for A33.

Smaller building blocks: a 32-bit level takes 4 cycles with three parallel 16-bit units
and 8 cycles with one reused unit. The 64-bit designs RKM1..RKM5 take 7, 9, 11, 12 and
16 cycles.

## The leaf: combinational Karatsuba tree (`ckm`, `rkm_base`)

`ckm` is the classic recursive combinational Karatsuba multiplier. CKM1 is an AND
gate. CKM of width 2k uses three CKMs of width k and the XOR network. A 16-bit CKM
therefore has 3^4 = 81 AND gates, against 256 for schoolbook multiplication.
`rkm_base` registers the output of a 16-bit CKM: `done` and `p` appear one cycle after
`start`.

## The system around the multiplier (`rkm_top`)

```
 host ── rkm_fsm ──(port A)── operand_ram ──(port B)── rkm_acu ── rkm128 (A_ij)
            └───────────── acu_go / acu_done ────────────┘
```

* `rkm_fsm` is the host-side state machine. On `start` it writes `a_in` to RAM word 0
  and `b_in` to word 1, then starts the ACU and waits. It then reads the result words
  back and presents them on `c_out` with a one-cycle `done`. It ignores `start` while
  busy.
* `operand_ram` holds four 128-bit words: A, B, product bits [127:0], and product bits
  [254:128] zero-extended. It has two ports with registered reads, one for the FSM and
  one for the ACU.
* `rkm_acu` is the arithmetic control unit. It reads A into a register. It feeds B from
  the RAM read port straight onto the multiplier input through its operand multiplexer,
  and pulses the multiplier's `start`. When the multiplier is done, it writes the two
  product words back. The per-level sequencing lives in each level's own control unit,
  not in the ACU.

Top-level ports: `clk`, `rst` (synchronous, active high), `start`, `a_in[127:0]`,
`b_in[127:0]`, `busy`, `done`, `c_out[254:0]`. Parameters: `DESIGN_I` and `DESIGN_J`,
both defaulting to 1.

## Where this RTL makes its own choices

The block structure, the three organisations, the A_ij naming, the combinational leaf
and the XOR recombination follow the original description. The following are this
implementation's own choices:

* the cycle schedule of every level and of the FSM and ACU, and hence all latencies;
* the order in which a shared unit computes the products (T1, T3, then T2);
* the RAM size, its two ports and its word map, and full-width operand ports on the
  top (no bus width was specified);
* synchronous active-high reset of all control state, and pulse-style `start` / `done`;
* only power-of-two widths. Operands of other lengths must be padded with leading zeros,
  for example 240-bit operands in a 256-bit level;
* no modular reduction.

FPGA area, delay and power figures, and the curve-fitted Area(n)/Delay(n) models, are
properties of particular implementations and are not reproduced here.

## Files

| file | content |
|------|---------|
| `rtl/rkm_pkg.sv` | mode enum, rounds/units per mode, `design_modes(i, j)` |
| `rtl/ckm.sv` | combinational recursive Karatsuba multiplier |
| `rtl/kom_xor_net.sv` | pre-additions and recombination of one Karatsuba level |
| `rtl/rkm_base.sv` | registered 16-bit leaf multiplier |
| `rtl/rkm_ctrl.sv` | per-level control unit |
| `rtl/rkm_level.sv` | recursive hybrid level |
| `rtl/rkm128.sv` | 128-bit architecture unit, design A_ij |
| `rtl/operand_ram.sv`, `rtl/rkm_acu.sv`, `rtl/rkm_fsm.sv` | memory, arithmetic control unit, host FSM |
| `rtl/rkm_top.sv` | complete system |
| `tb/rkm_tb_pkg.sv` | schoolbook carry-less reference and operand patterns |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the ones below |
| `tb/tb_rkm_top.sv` | end to end, A11, A25 and A33 side by side, each mechanism counted |
| `tb/tb_rkm_top_full.sv` | the top at its default parameters |
| `tb/tb_rkm_workloads.sv` | 32-bit, all five 64-bit and 256-bit (240-bit padded) configurations |

## Simulating

Each testbench checks results against a schoolbook carry-less reference, and checks
cycle counts against the latency formula. It ends by printing
`TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/rkm_pkg.sv tb/rkm_tb_pkg.sv tb/tb_rkm_top.sv --top-module tb_rkm_top
./obj_dir/Vtb_rkm_top
```

Replace `tb_rkm_top` with any other testbench name. `tb_rkm128` prints the latency of
all fourteen designs. All testbenches finish in well under a second.

## Trust and known issues

* Every module has its own testbench, and each testbench was shown to fail when its
  module is broken in a targeted way. `tb_rkm128` checks all fourteen 128-bit designs
  with random, all-ones, single-bit and zero operands.
* `verilator --lint-only -Wall` reports the half-product nets inside the recursive
  generate branch of `ckm` and `rkm_level` as undriven, and their half-width operands as
  unused. This is how Verilator lints any self-instantiating module. Simulation and
  synthesis show the nets are driven. For example, a 16-bit `ckm` synthesises to
  81 AND gates.
* The multiplier is sized for 128-bit operands. Larger fields (163, 233, 240 or 256 bits)
  need an `rkm_level` of width 256 with one more mode pair in `MODES`. The FSM, ACU and
  RAM would also need widening, because they have an `N` parameter but `rkm_top` fixes
  it at 128.
