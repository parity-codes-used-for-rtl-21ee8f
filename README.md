# Self-checking FPGA logic with parity check bits

Logic in an SRAM-based FPGA can be corrupted while it runs: a particle strike
flips a bit of a look-up table (LUT), and the circuit silently computes a
different function. This design detects such errors while the circuit is in use
(concurrent error detection). Each protected combinational circuit gets a second,
independent circuit that predicts *check bits* for its outputs, and a checker
that verifies data and check bits form a valid code word. The aim is a
*totally self-checking* (TSC) circuit:

- **fault secure (FS):** a modelled fault never produces a wrong output that
  is still a valid code word. A fault either leaves the output correct or is
  flagged.
- **self-testing (ST):** every modelled fault is flagged by at least one input
  that occurs in normal operation.

The twist for larger designs is that a block's checker does not look at the
block's own outputs. It checks the block's **inputs**, which are the previous
block's outputs plus their check bits. Detection moves one stage down the
chain, and the checker and the logic it watches sit in different blocks.

Everything here is combinational: no clock and no reset. A checker flags an
error in the same evaluation in which the error appears.

## The check-bit code

A data word o_1..o_m (o_i is bit i-1 of the vector) gets check bits
x_1..x_k. Each check bit is the XOR of a subset of the data bits:

    x_j = a_1j·o_1 ⊕ a_2j·o_2 ⊕ … ⊕ a_mj·o_m

Two codes are provided (`tsc_pkg::code_e`):

* **Single parity** (`CODE_SINGLE_PARITY`). One check bit, the XOR of all data
  bits. It is cheap, but it misses every error that flips an even number of
  bits.
* **Hamming-like code** (`CODE_HAMMING`). It uses k = ⌈log2 m⌉ + 1 check
  bits. This is the right-hand part of a systematic Hamming generator matrix,
  cut down to m rows. Column k is all ones, so x_k is the overall parity.
  For row i, columns 1..k-1 hold the binary digits of 2^(k-1) − i. For
  m = 8 the rows are:

      o1 1111   o2 0111   o3 1011   o4 0011
      o5 1101   o6 0101   o7 1001   o8 0001      (x1 x2 x3 x4)

  Each column splits the outputs into two halves, much like a binary search.
  A single wrong data bit o_i therefore gives syndrome = row i, which names
  the bit. Every row is different and every row has x_k set. So the code
  detects any single or double error and any odd number of errors. The rule
  for k gives 2, 4, 5, 6 and 7 check bits for 2, 8, 12, 31 and 47 outputs.

`ODD = 1` inverts every check bit (odd parity). This makes the all-zero word
invalid.

`parity_encoder` builds the XOR trees, one per column. The matrix itself comes
from `tsc_pkg::matrix_bit` and `tsc_pkg::encode`, which are evaluated during
elaboration.

## One TSC block and where its errors are caught

`tsc_block` has three parts, and all three are fed from the same primary
inputs:

```
              pi_chk ──(1)──────────────────────► checker ──► ok, fail, syndrome, err_loc
                                            ┌(2)─►
 pi ──(5)──┬──────(4)───────────────────────┤
           │                                └(3)─► check bits generator ──► po_chk
           └──(6)─────────────────────────────────► original circuit    ──► po
```

The checker compares the checked part of `pi` (the previous block's outputs)
with `pi_chk` (their check bits). The generator predicts the check bits of this
block's own outputs `po`. The next block in the chain checks `po` against
`po_chk`.

The numbered nets are the places where an error can show up. Each has an
injection input `inj_n1` … `inj_n6`, which XORs the given bits onto that net.
Where an error is caught depends on the net:

| net | where it is | an error there is caught by |
|-----|-------------|-----------------------------|
| 1 | incoming check bits | this block's checker |
| 2 | checker data input only | this block's checker |
| 4 | branch feeding checker and generator | this block's checker, and by the next one if the generator's output changes |
| 5 | input stem, before any branch (the wire from the previous block) | this block's checker. The original circuit and the generator both see the wrong value, so downstream the word stays consistent |
| 3 | generator input only | the **next** checker: `po` is right but `po_chk` is not |
| 6 | original circuit input only | the **next** checker: `po` is wrong but `po_chk` is predicted from the right input |

An error on net 3 or 6 is masked when the circuit's output does not depend on
the flipped bit for that input value. That is not a failure: nothing wrong
leaves the block.

Parameters: `CIRCUIT` selects the original circuit. `N_CHECKED` sets how many
of the upper input bits the checker covers. The lower bits are side inputs
that bypass the checker. `CODE`, `FLOW` and `ODD` are described in the other
sections.

## The check bits generator: two constructions

The generator must share no logic with the original circuit. Otherwise one
fault could corrupt a data word and its check bits consistently.
`check_bits_generator` offers two constructions (`tsc_pkg::flow_e`):

* `FLOW_PLA` (default). The check bits are treated as functions of the
  primary inputs in their own right. At elaboration their truth table is
  computed (encode the circuit's output for every input value) and placed in
  a separate LUT. Before mapping, this corresponds to minimising the parity
  outputs as their own two-level network. For the three-input example with one
  odd-parity bit, the table reduces to x = b·c.
* `FLOW_XOR`. The generator holds a private duplicate of the original circuit
  followed by `parity_encoder` XOR trees.

Both constructions give the same function. They differ in area and in which
upsets can reach them. The `seu` input of the generator flips bits of whichever
LUT it holds. Synthesis tools may merge identical logic across the two
circuits. Keep the original circuit and the generator in separate hierarchy or
partitions, with flattening disabled, if they must stay independent in the
netlist.

## The checker

`tsc_checker` recomputes the check bits of `data` and compares them with `chk`.
Each of `ok` and `fail` comes from its own encoder copy and its own compare
logic:

* `ok = 1, fail = 0`: the word is a code word;
* `ok = 0, fail = 1`: error detected;
* `ok == fail`: the checker itself is faulty.

This way a single fault inside the checker cannot turn into a silent false OK.
`syndrome` is the XOR of recomputed and received check bits. With the
Hamming-like code, `err_loc` decodes a single-data-bit syndrome back to the bit
position (1-based), and is 0 otherwise. The code matrix's last row equals the
last check bit's unit vector when m = 2^(k-1). In that case an error in x_k
alone is reported as an error in o_m.

## Fault model: LUT upsets

Every circuit is held in `lut_circuit`, an FPGA-style LUT in which the inputs
address a table of stored bits. An upset (`seu` input, one bit per stored bit)
flips a stored bit. The output is then wrong only while that cell is selected,
so an upset can stay hidden until an input reaches it. This is the stuck-at
behaviour at the LUT output that the error detection is designed for. Each
circuit is a single LUT here. A real FPGA mapping would use several 4- to
6-input LUTs.

## The example chain (`tsc_chain`, the top)

```
 pi[4:0], pi_chk ─► block N-1: c17 ─► {N23,N22}, check bits ─┐
                                                             ├─► block N: {c,b,a} → {f,e} ─► po, po_chk ─► terminal checker
 side_a ─────────────────────────────────────────────────────┘
```

* **Block N-1** is the c17 benchmark circuit: 5 inputs, 2 outputs, six NAND
  gates. Its inputs are `pi[0..4]` = N1, N2, N3, N6, N7, and it outputs
  {N23, N22}. It checks `pi` against `pi_chk`, which an upstream circuit
  supplies.
* **Block N** is a three-input example circuit, defined by this truth table:

  | c b a | f e |
  |-------|-----|
  | 000 | 01 |
  | 001 | 10 |
  | 010 | 10 |
  | 011 | 10 |
  | 100 | 01 |
  | 101 | 01 |
  | 110 | 11 |
  | 111 | 00 |

  It takes c = N23 and b = N22, and checks them against block N-1's check
  bits. Its third input, a = `side_a`, comes straight from the system.
* **Terminal checker.** It plays the role of the next block's checker for
  block N. Block N plus this checker is also the basic single-block
  arrangement: circuit, check-bit predictor, and a checker on the block's own
  output code word. `po` and `po_chk` are also outputs, so that a further block can be
  attached.

Outputs: `ok[2:0]` / `fail[2:0]` (index 0 = block N-1, 1 = block N,
2 = terminal), the syndromes, `err_loc_*` and `error` (any checker not
reporting OK). All injection ports (`a_inj_n*`, `b_inj_n*`, `a_seu_*`,
`b_seu_*`) must be tied to zero in normal use.

Defaults: `CODE = CODE_HAMMING`, `FLOW = FLOW_PLA`, `ODD = 0`. With these,
block N-1 receives 4 check bits for its 5 inputs. Each 2-bit output word
carries 2 check bits.

**Known gap:** `side_a` has no check bits. A stuck-at on its wire before it
branches inside block N changes `po` and `po_chk` consistently, so no checker
sees it. A chain of equal-width blocks avoids this. So does giving every system
input check bits, as `pi` has.

## Measured fault coverage

`tb_tsc_fault_coverage` simulates every single fault against all 64 input
combinations. The fault list is: stuck-at-0 and stuck-at-1 on every bit of
nets 1–6 of both blocks, and an upset of every stored LUT bit. It runs four
configurations of the chain:

| configuration | faults | ST | FS |
|---------------|--------|----|----|
| Hamming-like, table generator | 250 | 99.2 % | 99.2 % |
| Hamming-like, XOR generator | 250 | 99.2 % | 99.2 % |
| single parity, table generator | 202 | 96.0 % | 93.1 % |
| single parity, XOR generator | 242 | 96.7 % | 94.2 % |

With the Hamming-like code, the only faults that escape are the two stuck-at
faults on the unchecked `side_a` stem. Single parity misses faults that flip
both c17 outputs at once.

These figures use this RTL's own fault list. They are not comparable
one-for-one with gate-level fault simulation of a synthesised netlist. The
published gate-level results for c17 are 100 % ST and FS with both codes.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/tsc_pkg.sv tb/tb_ref_pkg.sv tb/tb_tsc_chain.sv --top-module tb_tsc_chain
./obj_dir/Vtb_tsc_chain
```

Replace `tb_tsc_chain` with any other testbench:

| testbench | what it does |
|-----------|--------------|
| `tb_tsc_chain` | Runs the top at its defaults. First all 64 inputs, fault-free. Then 3000 random single injections, compared with a reference model of the whole chain. Counts each mechanism: caught by its own checker, caught by the next checker, masked, LUT upset hidden, LUT upset caught, and wrong bit located |
| `tb_tsc_chain_codes` | The XOR / Hamming-like and table / single-parity configurations. Checks that a double error on an input is caught by the Hamming-like code and missed by single parity |
| `tb_tsc_fault_coverage` | The coverage table above (helper: `tb/tsc_coverage_bench.sv`) |
| `tb_tsc_block`, `tb_tsc_checker`, `tb_check_bits_generator`, `tb_parity_encoder`, `tb_orig_circuit`, `tb_lut_circuit` | Unit tests |

`tb/tb_ref_pkg.sv` holds the reference models. They are written separately
from the RTL: c17 as NAND gates, the example circuit as its truth table, and
the code from the printed 8×4 matrix. Every run finishes in well under a
second.

## Changing the design

* **Another protected circuit.** Add an entry to `tsc_pkg::circuit_e`, give
  its widths in `circ_inputs` and `circ_outputs`, and give its function in
  `circ_eval` (currently limited to 5 inputs by `MAX_IN`, and to 2 outputs by
  the return width). Everything else derives its tables from these functions.
* **Wider words.** `parity_encoder` and `tsc_checker` take any `M` up to
  `tsc_pkg::MAX_M` = 64. The unit tests cover 2, 5, 8, 12, 31 and 47.
* The LUT tables grow as 2^inputs. For circuits with many inputs, a gate-level
  or two-level description of the circuit and of its check bits is the
  practical route.

## What this RTL does not include

* The larger benchmark circuits (alu1, apla, b11, br1, al2, alu2, alu3). Only
  their sizes are known here, not their functions. The encoder and checker
  sizes they would need are covered.
* Self-checking sequential logic. The approach extends to state machines by
  treating the next-state logic and the output logic as separate combinational
  blocks between flip-flops. No such machine is built here.
* Reconfiguration of a block after an error has been flagged.
* The design flow that produces minimised two-level and multi-level netlists
  for the generators, and the area results of FPGA synthesis.
