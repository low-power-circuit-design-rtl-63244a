# Reversible-logic 4-bit adders: carry skip and carry select from TSG, Toffoli and Fredkin gates

A reversible gate has as many outputs as inputs, and it maps each input pattern to its own output
pattern. No information is erased, so in principle the gate avoids the kT ln 2 of heat that erasing
a bit costs. Building adders from such gates is one route to low-power arithmetic. This RTL
describes two 4-bit adders made only of three reversible gates:

- a **carry skip (bypass) adder**: four TSG full adders, three Toffoli gates and one Fredkin gate;
- a **carry select adder**: eight TSG full adders and five Fredkin gates.

The key point is that one TSG gate is a complete full adder. It needs no helper gates and leaves
only two garbage outputs, meaning outputs that nothing uses. Everything here is combinational and
synthesizable. In real hardware, the low power of these adders comes from how the gates are built
out of transistors (pass-transistor circuits). RTL cannot express that, so these modules describe
the logic function and the gate-level structure, not the power or the delay.

## The three gates

Each gate is its own module. The outputs named P, Q, R (and S) follow the usual naming for these gates.

| Gate | Module | Inputs | Outputs | Role in the adders |
|---|---|---|---|---|
| Toffoli (3x3) | `toffoli_gate` | A, B, C | P = A, Q = B, R = AB ⊕ C | with C = 0, a reversible AND |
| Fredkin (3x3) | `fredkin_gate` | A, B, C | P = A, Q = A'B ⊕ AC, R = A'C ⊕ AB | controlled swap; Q is a 2:1 mux with select A |
| TSG (4x4, third input 0) | `tsg_gate` | A, B, C | P = A, Q = A ⊕ B, R = A ⊕ B ⊕ C, S = (A ⊕ B)C ⊕ AB | full adder: R = sum, S = carry, Q = propagate |

**TSG only in its full-adder form.** TSG is a 4-input gate. It works as a full adder when its
third input is held at constant 0, and that is the only way these adders use it. `tsg_gate`
therefore has three ports: A, B and the carry in, which sits on the gate's fourth input. The
constant input is implied. The gate's outputs when the third input is 1 are not modelled.
P is always garbage. Q is garbage in the carry select adder. In the carry skip adder, Q is the
bit's propagate signal and is used.

The Fredkin gate is used only as a multiplexer: Q = B when A = 0 and Q = C when A = 1. R then
carries the input that was not selected, and it is garbage.

## Carry skip adder (`rev_carry_skip_adder`)

This block takes the most explaining. A 4-bit ripple adder is slow because a carry may have to
pass through all four full adders. If every bit position propagates (Xi ⊕ Yi = 1 for all i),
the block's carry out equals its carry in. In that case the carry out can come straight from Cin
and skip the chain:

```
            X3 Y3        X2 Y2        X1 Y1        X0 Y0
             |  |         |  |         |  |         |  |
   C4 <--- [TSG] <-C3-- [TSG] <-C2-- [TSG] <-C1-- [TSG] <---- Cin
             |  P3        |  P2        |  P1        |  P0      |
             S3           S2           S1           S0         |
                                                               |
   T1 = Toffoli(P0, P1, 0).R = P0P1                            |
   T2 = Toffoli(T1, P2, 0).R = P0P1P2                          |
   P  = Toffoli(T2, P3, 0).R = P0P1P2P3                        |
                                                               |
   cout = Fredkin(A = P, B = C4, C = Cin).Q  <-----------------+
```

- **Sum.** Four TSG gates form a ripple chain (`tsg_ripple_adder`). Bit i gives sum Si on R and
  carry C(i+1) on S.
- **Block propagate.** Each TSG also gives Pi = Xi ⊕ Yi on Q. Three Toffoli gates, each with
  C = 0, form P = P0·P1·P2·P3. Here they are chained (T1 = P0P1, T2 = T1·P2, T3 = T2·P3). A
  balanced tree would give the same value with the same three gates.
- **Bypass multiplexer.** A Fredkin gate has P on its control input A, the ripple carry C4 on B
  and Cin on C. Its Q output is `cout = P ? Cin : C4`, which is the AND/OR of a 2:1 multiplexer
  formed by one reversible gate.

The bypass does not change the result. When P = 1, C4 equals Cin anyway. The bypass only shortens
the worst-case carry path from Cin to Cout, from four full-adder stages to one Fredkin stage. That
path matters when many such blocks are cascaded. The sum bits still ripple. `block_p` is brought
out as a port so that a testbench or an observer can see when the bypass is in use.

Gate count at 4 bits: 4 TSG, 3 Toffoli and 1 Fredkin, eight reversible gates in all.

## Carry select adder (`rev_carry_select_adder`)

Two TSG ripple chains add X and Y at the same time. One chain has its carry in fixed at 0, the
other at 1. The real carry in then drives the common select of five Fredkin multiplexers: four
pick the sum bits and one picks the carry out.

```
   sum[i] = Cin ? sum_1[i] : sum_0[i]      (Fredkin: A = Cin, B = chain-0, C = chain-1)
   cout   = Cin ? cout_1   : cout_0
```

Neither path through the chains depends on Cin. So the delay from Cin to any output is a single
Fredkin stage, at the cost of a second ripple chain. Gate count at 4 bits: 8 TSG and 5 Fredkin.
Using TSG gates for the full adders and Fredkin gates for the multiplexers is this design's own
choice. It reuses the way the carry skip adder uses the same gates. Only the block structure (two
ripple adders and five multiplexers selected by Cin) is the published one.

## Top level (`reversible_adders_top`)

The two adders are independent designs. The top places them side by side, and nothing is shared:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `skip_x`, `skip_y` | in | WIDTH | carry skip adder operands |
| `skip_cin` | in | 1 | its carry in |
| `skip_sum`, `skip_cout` | out | WIDTH, 1 | its result |
| `skip_bypass` | out | 1 | 1 when all bits propagate and the carry out is taken from the bypass |
| `sel_x`, `sel_y` | in | WIDTH | carry select adder operands |
| `sel_cin` | in | 1 | its carry in and multiplexer select |
| `sel_sum`, `sel_cout` | out | WIDTH, 1 | its result |

There is no clock and no reset. The outputs follow the inputs combinationally.

## Parameters

`WIDTH` (default `rev_adder_pkg::ADDER_WIDTH` = 4) sets the operand width of both adders and of
the top. The published design is a 4-bit block, and 4 is the intended size. Other widths build
the same structures: a skip block uses WIDTH TSG and WIDTH-1 Toffoli gates. The carry skip adder
requires WIDTH ≥ 2. It is a single skip block: a cascade of several blocks is not described, so
none is provided.

## Where this RTL departs from or goes beyond the published design

- **The gates are modelled as logic, not as transistors.** The pass-transistor circuits are not
  included: the 18-transistor TSG full adder, and the Fredkin and Toffoli-AND cells. Their
  transistor counts, power and delay are not reproduced either. For reference, the full adder takes
  18 transistors against 28 in a conventional design, and the carry skip adder takes 85. Synthesis of this RTL maps the
  gates to ordinary standard cells, and it does not keep the reversible structure.
- **Garbage outputs are left unconnected** inside the adders. They are not brought out as ports.
  A reversible implementation would keep them.
- **The Toffoli AND is a chain**, as described above. The published drawing only fixes that three
  Toffoli gates compute the 4-input AND.
- **Which Fredkin pin gets which signal in the bypass** (P on A, C4 on B, Cin on C) was chosen so
  that the gate gives the described behaviour: Cin when all bits propagate, C4 otherwise.
- **Carry select adder.** It has eight full adders: two ripple chains of four. The gates used inside
  it are this design's choice (see above).
- **`block_p` / `skip_bypass`** are extra observation outputs.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.

| Testbench | What it checks |
|---|---|
| `toffoli_gate_tb` | all 8 inputs; the outputs are a permutation (reversible); AND behaviour with C = 0 |
| `fredkin_gate_tb` | all 8 inputs against a swap reference; reversibility; the number of ones is conserved |
| `tsg_gate_tb` | all 8 inputs: {S,R} = A+B+C, Q = A⊕B, P = A; the outputs identify the inputs uniquely |
| `rev_carry_skip_adder_tb` | all 512 (x, y, cin) cases against integer addition; `block_p`; bypass cases give cout = cin; both carry paths exercised |
| `rev_carry_select_adder_tb` | all 512 cases; both chains selected; cases where the chains' carries differ |
| `reversible_adders_top_tb` | both adders at once with different operand streams (all 512 cases each), at default parameters; counts bypass, ripple, ripple-with-carry, chain-0, chain-1 and differing-carry cases, and fails if any never occurs |

To run one with Verilator 5 from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/rev_adder_pkg.sv \
    tb/reversible_adders_top_tb.sv --top-module reversible_adders_top_tb
./obj_dir/Vreversible_adders_top_tb
```

Replace the testbench name to run any other testbench. The package file must come first because
the modules take their default width from it. Lint gives one kind of expected warning: output pins
are left empty on purpose, because they are the gates' garbage outputs.

## Files

- `rtl/rev_adder_pkg.sv`: the shared default width.
- `rtl/toffoli_gate.sv`, `rtl/fredkin_gate.sv`, `rtl/tsg_gate.sv`: the reversible gates.
- `rtl/tsg_ripple_adder.sv`: a WIDTH-bit ripple chain of TSG full adders, which outputs the
  per-bit propagate signals.
- `rtl/rev_carry_skip_adder.sv`, `rtl/rev_carry_select_adder.sv`: the two adders.
- `rtl/reversible_adders_top.sv`: both adders side by side.
- `tb/*_tb.sv`: one testbench per module, as listed above.
