# Transient fault injection and triple-modular-redundant 74-series circuits

This design shows, in hardware, that triple modular redundancy (TMR) hides a
transient fault. A small on-chip fault injector flips one random bit of a
4-bit operand in every clock cycle it is enabled. It feeds that corrupted
operand into one of three copies of a combinational circuit, and a bitwise
two-out-of-three majority voter combines the three outputs. Copies two and
three always get the clean operand, so the voted output must always be the
fault-free answer. Four classic 74-series parts serve as the protected
circuits: the 74283 adder, the 74182 carry look-ahead generator, the 74181
ALU and the 74L85 magnitude comparator. The reference scenario is 100 faults
per circuit at a 10 ns clock: one fault per cycle, 1000 ns in all, all 100
tolerated.

The design is written in synthesizable SystemVerilog. Each module is small.
The care goes into cycle alignment, so that the faulted copy and the clean
copies always work on the same cycle's inputs.

## Block structure

```
               +-----------+   4    +-------------+
  LFSR-1 ----->|   XOR     |------->| control     |-- fault_sel, rand_word --+
  LFSR-2 ----->|           |        | (inject_en) |                          |
               +-----------+        +-------------+                          v
                                                               +------------------+
                                                               | one-hot register |
                                                               +------------------+
                                                                        | onehot (4)
  user_data (4) ----------------------------> data register --+-- XOR --+--> fault_data --> copy 1 --+
                                                              |                                      |
                                                              +--------- clean_op --> copy 2 --------+--> majority --> result
                                                              |                                      |    voter    --> disagree
                                                              +--------- clean_op --> copy 3 --------+
  other_in ---------------------------------> input register ---- shared by all three copies
```

| Module | Role |
|---|---|
| `bma_lfsr` | 4-bit Fibonacci LFSR; connection polynomial and seed are parameters |
| `fault_logic` | XOR of the two LFSR words, plus the control unit that applies the user's `inject_en` |
| `one_hot_register` | encodes the random word to a single set bit and holds it in flip-flops |
| `fault_data_register` | registers the user data; XORs the one-hot word into it |
| `tfi_system` | the fault injector: the four modules above |
| `ttl74283`, `ttl74182`, `ttl74181`, `ttl74l85` | the protected circuits |
| `circuit_74x` | wraps one of the four behind a common port shape (helper) |
| `majority_voter` | bitwise `c1c2 + c2c3 + c1c3`, plus a `disagree` flag |
| `fault_tolerant_system` | three `circuit_74x` copies and the voter |
| `tfi_fts` | injector + input register + TMR for one circuit (`CIRCUIT` parameter) |
| `tfi_fts_top` | the four `tfi_fts` variants side by side on one clock and reset |
| `tfi_fts_pkg` | circuit enum, widths and the bus packing of every circuit |

## How a fault is made

The two LFSRs use the two primitive polynomials of degree 4:
`1 + x + x^4` (seed `0001`) and `1 + x^3 + x^4` (seed `1010`). Each runs
through all 15 non-zero states. They run freely from reset. Each LFSR is the
shortest register that generates its bit stream. In other words, a
Berlekamp-Massey analysis of its output gives linear complexity 4 and
returns the same polynomial. The testbench checks this.

Every clock, the XOR of the two LFSR states forms a 4-bit random word. When
`inject_en` is high, the control unit passes that word on. The one-hot
register then loads `1 << (rand_word mod 4)`, a word with exactly one bit set.
When `inject_en` is low, the register loads zero. On the same clock edge, the
data register captures `user_data`. The faulted operand is the register
output XORed with the one-hot word. So every cycle with injection enabled
yields one single-bit fault that lasts exactly one cycle, at a
pseudo-random bit position. Over long runs the four positions are not used
equally (34/27/26/13 of the first 100 faults after reset). That is a property of
this LFSR pair.

## Cycle alignment

All inputs of a `tfi_fts` are sampled on the same rising edge:
- `user_data` into the injector's data register;
- `inject_en` into the one-hot register, through the control unit;
- `other_in` into a separate input register.

The three circuit copies and the voter are purely combinational after those
registers. So `result`, `disagree`, `fault_data` and `fault_active` are valid
after the same edge. The latency is one clock, and a new operand can be
applied every cycle. Without the input register on `other_in`, copy 1 would
combine one cycle's operand with the next cycle's other inputs. The
testbenches check for this: they change the inputs right after each edge.

`rst_n` is an asynchronous, active-low reset. It clears the one-hot, data
and input registers and loads the LFSR seeds.

## The protected circuits and their port packing

Each circuit is written from the function table of the standard part. It
uses active-high data, and the carries are computed with look-ahead
equations. The internal gates of the original TTL parts are not copied.
`circuit_74x` maps a circuit onto three buses:
- `op`: the 4-bit input that copy 1 receives faulted;
- `other`: every other input;
- `result`: all outputs.

| `CIRCUIT` | faulted `op` | `other` (MSB..LSB) | `result` (MSB..LSB) |
|---|---|---|---|
| `C74283` | A | B[3:0], C0 | C4, S[3:0] |
| `C74182` | /P[3:0] (active low) | /G[3:0], Cn | Cn+x, Cn+y, Cn+z, /G, /P |
| `C74181` | A | B[3:0], S[3:0], M, /Cn | A=B, /P, /G, /Cn+4, F[3:0] |
| `C74L85` | A | B[3:0], I(A>B), I(A<B), I(A=B) | A>B, A<B, A=B |

74181 in brief: per bit, `x = A | B&S0 | ~B&S1` and `y = A&B&S3 | A&~B&S2`.
With `M = 1` the output is `F = ~(x ^ y)`, which gives the 16 logic
functions. With `M = 0` it is `F = x + y + ~Cn`, which gives the 16
arithmetic functions (for example, S = 1001 is A plus B). The carry in and
carry out are active low.

74L85 with equal words: `I(A=B)` high gives only A=B. Otherwise
`A>B = ~I(A<B)` and `A<B = ~I(A>B)`.

## Voting and the `disagree` flag

The voter applies `c1c2 + c2c3 + c1c3` to every output bit. Only copy 1 can
be faulted, so the result is always the fault-free value. `tfi_fts` asserts
this with a concurrent assertion: the result equals copies 2 and 3.

`disagree` is high when the three copies' outputs are not all equal. It
therefore marks the faults that reached an output and were outvoted. Many
faults never reach an output. For example, a flipped bit of A may not change
a comparison, and in several 74181 logic functions F does not depend on A at
all. For these faults `fault_active` is high but `disagree` stays low.

## What follows the source description and what is this design's own

Taken from the description of the design:
- the block chain: two 4-bit LFSRs, XOR, control unit, one-hot word, data
  register, and an XOR of the one-hot word with the register output;
- faults into circuit 1 only;
- the majority equation;
- the four 74-series parts;
- one fault per 10 ns clock, 100 faults in 1000 ns.

Choices made here, where the description is silent:
- **LFSR polynomials and seeds.**
- **Fault position.** The random word picks the bit position (its two low
  bits). The one-hot word is loaded in parallel and is not shifted around a
  ring, although the original calls this block a one-hot shift register.
- **Logic-0 path.** The one-hot word is cleared when injection is off.
- **Faulted input.** It is operand A, or /P for the 74182.
- **Input register.** It aligns the non-faulted inputs with the injector.
- **Reset style.**
- **`disagree` output.**
- **Combined top.** All four circuits sit in one top. The original builds
  and measures one TFI-FTS per circuit.

Flip-flop counts per `tfi_fts` are 21 (74283, 74182), 26 (74181) and
23 (74L85). The original reports 26 registers for each circuit on an Artix-7
device. Timing and power figures (about 606 MHz; about 0.09 W) are
device results, and this RTL does not reproduce them.

Only the combinational use of the protected circuits is covered. Applying the
injector to sequential circuits is outside this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`:
- the four 74-series parts are checked exhaustively against reference models
  (`tb_ref_pkg`). The models are written from the parts' function tables, not
  from the RTL equations;
- the LFSR is checked step by step, for period 15 and with a
  Berlekamp-Massey run;
- the injector is checked cycle by cycle against an independent model,
  including 100 faults in 1000 ns;
- the TMR is checked with random single-bit faults for every circuit;
- `tb_tfi_fts` runs the 100-fault scenario on each circuit and requires
  100 % of faults tolerated in 1000 ns;
- `tb_tfi_fts_top` runs all four circuits together at default parameters.
  Its phases are: injection off, the 100-fault run, random per-circuit
  enable toggling, a reset in mid-run, and injection on again. It requires
  faults injected, faults outvoted, clean cycles and all four bit positions
  faulted, for every circuit.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/tfi_fts_pkg.sv tb/tb_ref_pkg.sv tb/tb_tfi_fts_top.sv \
  --top-module tb_tfi_fts_top -Mdir obj_top
./obj_top/Vtb_tfi_fts_top
```

Modules are found by file name (`-Irtl -Itb`). The packages must be listed
first. To protect another combinational circuit:
1. add it to `circuit_e`;
2. give its widths in `other_width` and `result_width`;
3. add a branch to `circuit_74x`.
