# AES-128 in dual-rail logic without early evaluation

This is an AES-128 encryption coprocessor meant for FPGAs. Its datapath uses one
logic style that defends against two attacks at once:

- **Power analysis.** The datapath uses dual-rail logic with precharge. Every
  logical bit is a pair of wires, and one wire of each pair toggles in every
  phase, whatever the data. Power draw therefore says little about the values.
- **Fault injection.** The gates do not evaluate early. A gate gives a valid
  result only once *all* its inputs are valid, and passes on any invalid input.
  A fault that breaks a pair therefore spreads through the rest of the round,
  and the output comes out invalid instead of wrong. The attacker gets nothing
  to compare with a correct ciphertext.

The logic style is called WDDL without early evaluation (WDDL = Wave Dynamic
Differential Logic). Each gate is two 4-input LUTs. Only the datapath holds
secrets, so only the datapath is dual-rail. The controller and the host
interface are ordinary single-rail logic.

## Tokens and the gate

A bit `a` travels as the pair `(a.t, a.f)` (type `dpl_pkg::dr_t`):

| `(t, f)` | token  | meaning |
|----------|--------|---------|
| `(0, 0)` | NULL0  | spacer (this design precharges with NULL0) |
| `(1, 1)` | NULL1  | spacer |
| `(1, 0)` | VALID1 | `a = 1` |
| `(0, 1)` | VALID0 | `a = 0` |

The design alternates two phases. In a precharge phase every pair returns to
NULL0. In an evaluation phase, exactly one wire of each pair rises.

`wddl_noee_gate2` is a two-input gate. It has one `lut4` for the true rail and
one for the false rail. Both LUTs read all four input wires, addressed as
`{a.t, a.f, b.t, b.f}`. The masks follow three rules:

1. If both inputs are VALID, the output is VALID `f(a, b)`.
2. Otherwise the output is NULL. Its type is that of the first non-VALID input
   (`a` before `b`).
3. Inconsistent inputs (one NULL0, one NULL1) also give a NULL, by the same rule.

For AND this gives the masks `16'hFC80` (true rail) and `16'hFAE0` (false rail):

| a.t a.f b.t b.f | T | F | input state |
|---|---|---|---|
| 0000 | 0 | 0 | NULL0 |
| 0001, 0010, 0100, 1000 | 0 | 0 | on the way from NULL0 |
| 0101 / 0110 / 1001 | 0 | 1 | VALID, a·b = 0 |
| 1010 | 1 | 0 | VALID, a·b = 1 |
| 0111, 1011, 1101, 1110 | 1 | 1 | on the way from NULL1 |
| 0011 / 1100 | 0 0 / 1 1 | | inconsistent |
| 1111 | 1 | 1 | NULL1 |

The masks are not typed in by hand. `dpl_pkg::noee_mask_t` and `noee_mask_f`
compute them from the 4-bit truth table `FUNC`. So the same gate serves OR,
XOR, NAND, NOR and XNOR. The AND masks come from the published table of this
logic style. The masks of the other functions extend the same rules and are
this design's own. Inverting and non-positive functions are allowed: the LUT
sees both rails, so it cannot glitch to VALID. XOR with a constant 1 costs no
gate, because it is only a swap of the two rails, and a swap leaves NULL0 as NULL0.

### Why the gate blocks faults

Compare a plain WDDL AND (`y.t = a.t & b.t`, `y.f = a.f | b.f`):

- It can **stop** a NULL. With `a` = NULL0 and `b` = VALID0, the output is
  VALID0, so the fault disappears silently.
- It can **make** a false VALID from two NULLs. With `a` = NULL1 and
  `b` = NULL0, the output is VALID0.

The gate here outputs NULL in both cases (checked in `wddl_noee_gate2_tb`).

## How faults play out

A fault that flips **one** wire of a pair turns a VALID into a NULL. The NULL
reaches every output that depends on that bit. In the S-box that is all eight
output bits: any single-wire fault on an S-box input makes the whole byte NULL.
One round of AES later, the NULL has reached the whole state.

The only fault that gets through flips **both** wires of a pair (VALID1 ↔ VALID0):
a "coherent" fault. Even then, one extra one-wire fault anywhere in the same
logic cone creates a NULL, and the NULL absorbs the wrong value.

Take `m` random flips among the `2n` wires of `n` pairs. A wrong VALID survives
only if every flip is paired with a flip of the other wire of the same pair.
This happens with probability

    p(2n, m) = C(n, m/2) / C(2n, m)   for even m,  0 for odd m.

`dpl_sbox_fault_tb` tries all 2^16 flip patterns on the 16 input wires of one
S-box (n = 8). It counts exactly these rates:

| flips m | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| wrong VALID output | 0 | 6.67 % | 0 | 1.54 % | 0 | 0.70 % | 0 | 0.54 % |

Every other pattern makes all eight outputs NULL. Compare a linear error-detecting
code that catches all errors of up to r = 2 bits: it misses 1/2^r = 25 % of all
larger errors. The dual-rail style is weakest at small even multiplicities, and
gets stronger as the attack gets heavier.

## Coprocessor

```
        start,key,pt             busy,done,ct,ct_ok,fault
             |                           ^
   +---------v---------------------------+--------+
   | aes_controller   dpl_wrapper                  |   single-rail
   |  eval/cap/load/   encode x -> (x,~x) or NULL0 |
   |  last/rcon        check all-VALID, release ct |
   +---------+---------------------------^--------+
             | pt_dr,key_dr,rcon_dr       | state_dr
   +---------v---------------------------+--------+
   | dpl_aes_datapath (WDDL w/o EE gates only)    |   dual-rail
   |  state reg, key reg -> gated by eval          |
   |  16 S-boxes, ShiftRows, MixColumns, ARK       |
   |  key expansion: 4 S-boxes, rcon, XORs         |
   +-----------------------------------------------+
```

### Phases and timing

Each step of the algorithm takes two clock cycles:

| cycle | eval | what happens |
|---|---|---|
| precharge | 0 | Register outputs are forced to `(0,0)`; wrapper inputs are NULL0. The whole round network drains to NULL0. |
| evaluate | 1 | Register outputs and inputs are VALID. The network evaluates, and the registers capture at the end (`cap`). |

Step 0 is the initial key addition (`load`): state ← plaintext ⊕ key,
round key ← key. Steps 1–10 are the rounds, each with its next round key
expanded on the fly. Step 10 skips MixColumns (`last`). Timing from the
clock edge that samples `start`:

- `done` pulses after **22 cycles**.
- A new `start` is accepted one cycle after `done`.
- One encryption therefore takes 23 cycles end to end.

The registers hold VALID data through each precharge cycle. A fault injected
into them then appears as a NULL in the next evaluation.

### Interface of `aes_dpl_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (registers → NULL0) |
| `start` | in | 1 | begin an encryption; accepted only when idle |
| `key`, `pt` | in | 128 | key and plaintext; byte 0 is bits 127:120; **hold stable while `busy`** |
| `busy` | out | 1 | encryption in progress |
| `done` | out | 1 | one-cycle pulse when the result is in |
| `ct_ok` | out | 1 | with `done`: all 128 state pairs VALID, `ct` is the ciphertext |
| `fault` | out | 1 | with `done`: some pair was NULL; `ct` is forced to 0 |
| `ct` | out | 128 | ciphertext while `ct_ok`, else 0 |

### The S-box

The S-box (`dpl_aes_sbox`) is the hardest part to read. It inverts in the
composite field GF((2^4)^2) = GF(2^4)[Y]/(Y² + Y + L), where L = 8 and GF(2^4)
uses X⁴ + X + 1. For `a = a1·Y + a0`:

    D     = L·a1² + a1·a0 + a0²
    D⁻¹   = D¹⁴ = D²·D⁴·D⁸
    a⁻¹   = (a1·D⁻¹)·Y + (a0 + a1)·D⁻¹

The data flows through these stages:

1. **Input basis change** from the AES polynomial basis (matrix `IN_MAT`).
2. **Five GF(2^4) multiplications** (`dpl_gf16_mul`: 16 ANDs plus an XOR
   reduction). Squarings and the factor L are linear maps (`dpl_lin_map`).
3. **Output basis change, merged with the AES affine matrix** (`OUT_MAT`).
4. **The constant 0x63**, applied as rail swaps.

The isomorphism maps X to `8'h20` (= 2·Y), the first root of the AES polynomial
x⁸ + x⁴ + x³ + x + 1 among the composite-field elements 2…255. Row o of
`IN_MAT` holds bit o of `8'h20`^i for i = 7…0. Column j of `OUT_MAT` is the
affine matrix applied to the AES element whose composite image is 2^j.

The S-box costs 229 gates (458 LUT4s). The design uses 20 S-boxes: 16 for
SubBytes and 4 for the key expansion. Any other S-box circuit made of these
gates would do. This one was chosen for area, and the exhaustive testbench
checks it against an independent model.

## Size

After coarse synthesis each LUT4 appears as a 16-bit ROM. The whole coprocessor
comes to 10,872 LUT4s in the gates. On top of that come about 1,300
single-rail cells (precharge gating and the load/last multiplexers), plus 528
flip-flops. 512 of the flip-flops are the dual-rail state and key. For scale,
a Stratix EP1S25 FPGA has 25,660 logic elements.
A published AES datapath in this logic style on the same FPGA family used
14,126 LUT4s and ran at about 27 MHz. Its architecture is not known, so that
number is a sanity check for this datapath, not a target it reproduces. No
clock frequency is claimed here.

The RTL carries no timing. Each phase lasts one clock cycle, so the clock
period must cover the longest path through one round of the network: an
S-box, MixColumns and AddRoundKey in series, with the key expansion beside them.

## What is specified and what is chosen here

These parts follow the published description of the logic style:

- the token encoding;
- the gate rules and the AND masks;
- the restriction to two-input gates mapped to LUT pairs;
- the split into single-rail controller, wrapper and dual-rail datapath;
- the use of AES as the protected algorithm.

These parts are choices of this design:

- The masks of the functions other than AND. The rule for inconsistent inputs
  is fixed as "NULL of the first invalid input's type".
- The iterative architecture: one round per two-cycle step, with on-the-fly
  key expansion.
- Precharge done by AND-gating the register outputs with a single-rail `eval`.
- NULL0 as the only spacer. The gates also handle NULL1 correctly.
- Single-rail control signals and rail-by-rail multiplexers for `load`/`last`.
- The S-box decomposition.
- The controller FSM and the start/busy/done handshake.
- Withholding the ciphertext and raising `fault` whenever any output pair is NULL.

## Limits

- The RTL says nothing about the physical balance of the two rails. In
  silicon, protection against power analysis also needs matched placement
  and routing of each pair, and a synthesis flow that does not merge or
  simplify the two rails. A generic FPGA synthesis run on this RTL will
  optimise across the LUT pairs unless they are kept (for example with
  keep/`dont_touch` attributes on `lut4`).
- The plaintext/key encoding in `dpl_wrapper` and the control multiplexers are
  single-rail. The wrapper handles the key in single-rail form, as any host
  interface must.
- Coherent faults (both wires of a pair flipped, and no other fault) get
  through as a wrong ciphertext. This is the residual case quantified above.
- Zero-delay simulation cannot show early evaluation, which is a timing
  effect. What the testbenches check is its logical counterpart: no output
  becomes VALID while any input it depends on is NULL.

## Files

| file | content |
|---|---|
| `rtl/dpl_pkg.sv` | token type, function codes, LUT mask generation, GF helpers |
| `rtl/lut4.sv` | 4-input LUT, `o = MASK[i]` |
| `rtl/wddl_noee_gate2.sv` | the two-LUT dual-rail gate |
| `rtl/dpl_gate_vec.sv` | W gates side by side |
| `rtl/dpl_xor_reduce.sv`, `rtl/dpl_lin_map.sv` | XOR chains and constant GF(2) matrices |
| `rtl/dpl_gf16_mul.sv` | GF(2^4) multiplier |
| `rtl/dpl_gf256_xtime.sv` | multiplication by 02 for MixColumns |
| `rtl/dpl_aes_sbox.sv` | composite-field S-box |
| `rtl/dpl_aes_datapath.sv` | registers, precharge gating, round and key schedule |
| `rtl/aes_controller.sv` | phase and round sequencer |
| `rtl/dpl_wrapper.sv` | single/dual-rail boundary and output check |
| `rtl/aes_dpl_top.sv` | the coprocessor |
| `tb/aes_ref_pkg.sv` | behavioural AES-128 reference (S-box by brute-force inverse) |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `dpl_sbox_fault_tb` and `aes_fault_multiplicity_tb` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It
has a watchdog that counts a failure if the run hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -Wno-fatal \
  rtl/dpl_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/aes_dpl_top_tb.sv \
  --top-module aes_dpl_top_tb -o sim && obj_dir/sim
```

Swap in another `tb/<name>_tb.sv` and `--top-module` to run a block on its own.
The testbenches cover:

- **`wddl_noee_gate2_tb`**: all 16 input rows for five functions, plus the two
  plain-WDDL failure cases.
- **`dpl_aes_sbox_tb`**: all 256 values, and all 4,096 single-wire faults.
- **`dpl_sbox_fault_tb`**: the multiplicity experiment above.
- **`aes_fault_multiplicity_tb`**: the same experiment on a running encryption.
  It flips m = 1…8 wires of one state byte before a random round. The result
  must be withheld unless every flip is paired, and wrong-but-VALID when all
  flips are paired.
- **`dpl_aes_datapath_tb`**: the state after every round, and all-NULL0 logic in
  every precharge cycle.
- **`aes_controller_tb`**: the full schedule, cycle by cycle.
- **`dpl_wrapper_tb`**: the encoding and the release/withhold decision.
- **`aes_dpl_top_tb`**: the whole coprocessor, in three parts:
  - two FIPS-197 known answers and random vectors, with the 22-cycle latency
    checked;
  - fault injection into the state register during a random precharge cycle:
    one-wire faults (always withheld), coherent pairs (wrong ciphertext, as
    expected), and a coherent pair plus a one-wire fault (absorbed);
  - a count of each mechanism, where one that never occurs counts a failure.

The top-level test runs the design at its only size in well under a second,
after about 30 s of compilation.
