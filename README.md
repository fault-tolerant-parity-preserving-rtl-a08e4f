# Fault-tolerant full adder with a parity-preserving reversible majority voter

Triple modular redundancy (TMR) makes a circuit tolerate one faulty module. You build three
copies of the module and take a bit-wise majority vote of their outputs. If one copy goes
wrong, the other two outvote it. The voter then becomes the one part that everything
depends on. This design writes that voter in *reversible logic*: every gate maps its
inputs one-to-one onto its outputs, and constant lines and garbage outputs fill the
places an irreversible function would lose information. The voter is also *parity
preserving*: the XOR of all its output lines equals the XOR of all its input lines. A
single parity comparison can therefore test the voter itself. A second, *robust* form of
the voter adds diagnosis lines that tell which of the three copies disagrees.

The RTL models each reversible gate as a small combinational module and wires the gates
line by line, exactly as a reversible circuit diagram would. The example system is a
fault-tolerant one-bit full adder: three parity-preserving reversible full adders, one
voter for Sum and one for Cout.

Everything is combinational. There is no clock and no reset.

## Reversible gates used

| module | lines | function |
|---|---|---|
| `feynman_gate` (FG, controlled NOT) | 2 | P = A, Q = A⊕B |
| `feynman_double_gate` (F2G) | 3 | P = A, Q = A⊕B, R = A⊕C |
| `fredkin_gate` (FRG, controlled swap) | 3 | P = A; B and C swap when A = 1 |
| `toffoli_gate` (TG) | 3 | P = A, Q = B, R = AB⊕C |

F2G and Fredkin both preserve parity. F2G flips two lines together, and Fredkin only moves
values between lines. Any cascade of them is parity preserving. Feynman and Toffoli
gates are not parity preserving on their own.

## The majority voter (`majority_voter`)

Four lines: the votes a, b, c and a constant line k0 = 0. Three gates act on them:

| step | gate | line 1 | line 2 | line 3 | line 4 |
|---|---|---|---|---|---|
| in | | a | b | c | 0 |
| 1 | F2G, control line 1 → lines 2, 3 | a | a⊕b | a⊕c | 0 |
| 2 | Fredkin, control line 2, swaps lines 3, 4 | a | a⊕b | (a⊕b)'(a⊕c) | (a⊕b)(a⊕c) |
| 3 | F2G, control line 4 → lines 1, 3 | ab⊕bc⊕ca | a⊕b | a⊕c | (a⊕b)(a⊕c) |

This works because (a⊕b)(a⊕c) is 1 exactly when a disagrees with both other votes, that
is, when a is the odd one out. XORing that into a turns a into the majority. Line 1 is
the voted value. Lines 2-4 are garbage, but they are useful garbage: they are the
syndrome that the robust voter builds on.

Truth table (k0 = 0):

| abc | maj | a⊕b | a⊕c | (a⊕b)(a⊕c) |
|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 |
| 001 | 0 | 0 | 1 | 0 |
| 010 | 0 | 1 | 0 | 0 |
| 011 | 1 | 1 | 1 | 1 |
| 100 | 0 | 1 | 1 | 1 |
| 101 | 1 | 1 | 0 | 0 |
| 110 | 1 | 0 | 1 | 0 |
| 111 | 1 | 0 | 0 | 0 |

Each row has the same parity on both sides, and so do the eight rows with k0 = 1.

### Testing the voter by parity (`parity_checker`)

`parity_checker #(N_IN, N_OUT)` XORs a block's input lines and its output lines and raises
`parity_err` when the two differ. In the top, one checker sits on each voter. It sees
the three votes plus the constant 0 going in and the four lines coming out. A fault
inside the voter that flips an odd number of its output lines is flagged. A fault that
flips an even number is not. Parity testing detects faults but does not correct them. The
vote does the correcting.

## The robust voter and fault location

`robust_majority_voter` is the four-line voter followed by one more constant line k1 = 0
and two more gates:

| step | gate | effect |
|---|---|---|
| 4 | Feynman, control a⊕b, target line 3 | line 3: a⊕c → b⊕c |
| 5 | Toffoli, controls b⊕c and (a⊕b)(a⊕c), target k1 | line 5 = (a⊕b)(a⊕c)(b⊕c) |

Its outputs are the final value, the garbage a⊕b, b⊕c and (a⊕b)(a⊕c), and the *fault
check* line (a⊕b)(a⊕c)(b⊕c). Three binary votes can never all differ from one another,
so the fault check is 0 for every input. It can only become 1 through a defect on the
voter's own lines. The Feynman gate of step 4 breaks parity preservation. That is why
the top tests parity on the plain voter and not on the robust one.

`fault_locator` decodes the four diagnosis lines:

| a⊕b | b⊕c | (a⊕b)(a⊕c) | fault check | `fault_loc_e` | meaning |
|---|---|---|---|---|---|
| 0 | 0 | 0 | 0 | `FLOC_NONE` | all copies agree (000, 111) |
| 0 | 1 | 0 | 0 | `FLOC_C` | copy c is wrong (001, 110) |
| 1 | 1 | 0 | 0 | `FLOC_B` | copy b is wrong (010, 101) |
| 1 | 0 | 1 | 0 | `FLOC_A` | copy a is wrong (011, 100) |
| 1 | 1 | 1 | 1 | `FLOC_ALL` | all input lines faulty |
| other | | | | `FLOC_UNLISTED` | cannot come from a fault-free robust voter |

The locator is ordinary irreversible logic. `FLOC_UNLISTED` is this design's own
addition, so that every pattern has a defined result.

## The parity-preserving full adder (`pp_full_adder`)

Five lines: A, B, Cin and two constants k0 = k1 = 0. Five parity-preserving gates act on
them:

| gate | line 1 | line 2 | line 3 | line 4 | line 5 |
|---|---|---|---|---|---|
| in | A | B | Cin | 0 | 0 |
| F2G(1; 2, 4) | A | A⊕B | Cin | A | 0 |
| FRG(2; 3, 4) | A | A⊕B | s | Cout | 0 |
| F2G(1; 3, 5) | A | A⊕B | Cin⊕Cout | Cout | A |
| F2G(4; 3, 5) | A | A⊕B | Cin | Cout | A⊕Cout |
| F2G(2; 3, 1) | B | A⊕B | Sum | Cout | A⊕Cout |

Cout comes from the Fredkin gate: if A ≠ B the carry is Cin, otherwise it is A. Here
s = (A⊕B) ? A : Cin. Only s ⊕ Cout = A ⊕ Cin is needed later, so s is undone by the next
two gates. The outputs, top to bottom, are G2 = B, G3 = A⊕B, Sum, Cout and G1 = A⊕Cout.

The published adder is made of two Islam gates (IG), whose equations are not available
here. This cascade is this design's own. It keeps everything the published adder states:
five lines, two constant inputs, three garbage outputs, reversibility and parity
preservation, and even the order of the output lines. Its garbage functions may differ
from those of the IG-based adder.

## The TMR voting stage (`tmr_voter_bank`)

TMR votes every output line separately. `tmr_voter_bank #(WIDTH)` takes the WIDTH-bit
outputs `mod_out[0..2]` of the three copies (copy 0, 1, 2 = votes a, b, c) and holds one
channel per line:

- a `majority_voter`, whose output is the voted line `voted[n]`;
- a `parity_checker` on that voter's four input and four output lines;
- a `robust_majority_voter` on the same three votes, followed by a `fault_locator`.

`status[n]` is a `ft_voter_pkg::vote_status_t` with `final_value`, `garbage` =
{(a⊕b)(a⊕c), a⊕c, a⊕b}, `parity_err`, the robust voter's `diag_final` and `diag_garbage` =
{(a⊕b)(a⊕c), b⊕c, a⊕b}, `fault_check` and `fault_loc`.

The robust voter is a second instance beside the plain voter, not a replacement for it.
This keeps a parity-testable voter on the output path and adds diagnosis beside it. That
arrangement, and one parity checker per voter, are this design's choices. The cost of a
channel is therefore two voters, not one. A design that only needs masking can use
`majority_voter` alone for each line.

## The TMR full adder (`ft_full_adder_tmr`, top)

```
a[0],b[0],cin[0] -> pp_full_adder copy 0 --+
a[1],b[1],cin[1] -> pp_full_adder copy 1 --+--> {Cout, Sum} x 3 --> tmr_voter_bank #(2) --> final_sum, final_cout, vote[1:0]
a[2],b[2],cin[2] -> pp_full_adder copy 2 --+
```

- Each copy has its own operand inputs, as each module of a TMR system has its own input
  path. Drive all three with the same operands in normal use. A faulty module can be
  modelled by giving one copy different operands.
- `vote[0]` is the status of the Sum line and `vote[1]` that of the Cout line. So
  `vote[1].fault_loc == FLOC_A` means copy 0 produced a wrong carry.
- `fa_garbage[i]` = {G3, G2, G1} of copy i.

### Depth

Counted in reversible gate levels: the adder has 5, the voter 3, and the robust voter 5.
An F2G is two Feynman gates in a row, so the voter is 5 unit stages deep when counted
that way. That matches the delay increase of 4-5 stages reported for the benchmark
circuits below. Parity checker and locator add a few ordinary gate levels on the diagnosis
outputs only.

## Applying the voter to other circuits

The voter works on any bit. To make a reversible circuit with n output lines fault
tolerant, triplicate it and vote each output line, for example with
`tmr_voter_bank #(.WIDTH(n))`. This approach was evaluated on standard reversible
benchmarks (rd32, 5bitadder, 8bitadder, 4mod5, hwb5, ham15, cycle10_2 and others). The
reported costs fit this rule: the fault-tolerant gate count is three times the original
plus 5 per output line. Quantum cost is three times the original plus 11 per output
line. For example, rd32 (2 outputs) goes from 4 gates to 3·4 + 2·5 = 22, and its quantum
cost from 8 to 3·8 + 2·11 = 46. The delay grew by a constant 4-5 unit stages. Those
benchmark netlists are not part of this RTL.

## Where this RTL departs from, or fills in, the published design

- Gate order inside the voter and the choice of the two gates added for the robust voter
  (a Feynman and a Toffoli gate) are a reading of the circuit drawings. They reproduce
  exactly the published output functions of every line. The published quantum costs
  agree with this reading: 17 for the robust voter is 11 for the voter plus 1 + 5 for
  the two added gates.
- The quoted gate count of 5 for the voter matches one Fredkin and two F2G gates only
  if each F2G is counted as two Feynman gates.
- One row of the published robust-voter truth table (input 101) gives a⊕b = 0. That
  contradicts the formula and the fault location table. This RTL follows the formula.
- The full adder's internal gates and its garbage functions are this design's own (see
  above).
- The quantum-gate (NCV) realizations and quantum cost figures have no counterpart in
  this RTL.
- The parity checker, the fault locator's encoding and `FLOC_UNLISTED`, and the
  side-by-side placement of the robust voter in `tmr_voter_bank` are design choices.
- The inverter and the swap gate of the usual reversible gate library are not provided.
  Nothing here uses them.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each ends with a
line `TB_RESULT checks=N failures=M`.

- `tb_tmr_voter_bank` applies every vote pattern to the default 2-line bank. It also runs
  300 random single-copy faults on a 9-line bank.
- The gates, voters, adder, locator and parity checker are tested exhaustively,
  constant lines included. Expected values come from literal truth tables or integer
  arithmetic in the testbench. Bijectivity (no two inputs give the same output) and
  parity preservation are checked where they apply.
- `tb_ft_full_adder_tmr` runs the top at its only configuration. For all eight operand
  triples it checks the fault-free case. It also makes each copy in turn wrong with every
  other operand triple, 176 cases in all. It checks that Final Sum and Final Cout are
  always correct, that parity errors and fault check stay 0, that the fault location
  names the wrong copy exactly for the bits where it differs, and all garbage. It counts
  masked Sum faults, masked Cout faults and each location (none, a, b, c), and fails if
  any count is zero.
- A parity error or a raised fault check needs a defect inside a voter. The fault-free
  RTL cannot produce one, so the top-level test only checks that they stay 0. The
  `parity_checker` and `fault_locator` testbenches drive those cases directly.

Run one test with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ft_voter_pkg.sv tb/tb_ft_full_adder_tmr.sv --top-module tb_ft_full_adder_tmr
./obj_dir/Vtb_ft_full_adder_tmr
```

Replace the testbench name to run another. Every test finishes in well under a second.

## Files

- `rtl/ft_voter_pkg.sv`: `fault_loc_e` and `vote_status_t`
- `rtl/feynman_gate.sv`, `rtl/feynman_double_gate.sv`, `rtl/fredkin_gate.sv`,
  `rtl/toffoli_gate.sv`: gate primitives
- `rtl/majority_voter.sv`, `rtl/robust_majority_voter.sv`, `rtl/fault_locator.sv`,
  `rtl/parity_checker.sv`: voting, testing and diagnosis
- `rtl/tmr_voter_bank.sv`: one voting channel per output line
- `rtl/pp_full_adder.sv`: parity-preserving reversible full adder
- `rtl/ft_full_adder_tmr.sv`: top
- `tb/tb_*.sv`: one testbench per module
