# Six-dimensional piecewise-linear function evaluator

This design computes a continuous piecewise-linear (PWL) function
F: R^6 -> R. The function is given in high-level canonical form: the value
c is stored at every vertex of a regular grid, and F is linear inside each
simplex of a fixed partition of every grid cell. The main application is
identification of nonlinear dynamical systems with a nonlinear output-error
model. There, F is evaluated once per sample on delayed inputs and outputs,
and fine input resolution matters.

An earlier approach compared every input with a ramp, which takes 2^F cycles
for F fraction bits (about a million cycles at 20 bits). This design instead
**sorts the six fractional parts**. The weights and vertices then follow
from the sorted order, so one evaluation takes 115 clock cycles, whatever
the precision.

## The algorithm

Each input x_j is 24 bits: 4 integer bits and 20 fraction bits.

* The integer parts select a unit hypercube. Its lower corner is
  V = <x_int1 x_int2 ... x_int6>, the six 4-bit integer parts concatenated
  with x_1 in the most significant field. V is directly a 24-bit memory
  address.
* Sort the fractions in ascending order: x_s1 <= x_s2 <= ... <= x_s6.
* The seven weights are x_s1, x_s2 - x_s1, ..., x_s6 - x_s5 and 1 - x_s6.
  They are non-negative and add up to 1.
* The seven vertices start at V + <1 1 1 1 1 1>. After each vertex, the 1
  of the input with the smallest remaining fraction is cleared. The last
  vertex is V itself.
* F(X) is the sum of weight x c(vertex) over the seven vertices.

Worked example, reduced to two inputs: x = (1.5, 0.75) and grid values
c(2,1) = 2, c(2,0) = 1, c(1,0) = 2.

| step | vertex (V + S) | weight        | term |
|------|----------------|---------------|------|
| 0    | (2,1)          | 0.5           | 1.0  |
| 1    | (2,0)          | 0.75 - 0.5    | 0.25 |
| 2    | (1,0)          | 1 - 0.75      | 0.5  |

F = 1.75. The top-level testbench runs this case, with the other four inputs
set to 0.

## The machine

The evaluator is a small, fixed-program processor. All names below are
module and signal names in `rtl/`.

| part | module | width | role |
|------|--------|-------|------|
| SR38 | `pwl_sr38` | 3 x 8 | assembles one 24-bit input from three bytes |
| CNT | `pwl_cnt` | 3 | index 1..6 of the input being loaded |
| VRT | `pwl_vrt` | 24 | V, the six integer parts |
| RSX | `pwl_rsx` | 24 | S = <S_1 .. S_6>, each field 0 or 1 |
| Reg.1-Reg.6 | `pwl_regfile` | 23 | {fraction[19:0], index[2:0]} |
| Reg.7 (Acc) | `pwl_regfile` | 28 | accumulator, holds F(X) |
| Reg.A | `pwl_reg` | 23 | ALU operand register |
| Reg.B | `pwl_reg` | 28 | ALU operand register |
| Rout | `pwl_reg` | 28 | ALU result; its low 24 bits address the RAM |
| Selector | `pwl_selector` | 23/28 | source of Reg.A and of register-file writes |
| MUX A / MUX B | `pwl_mux_a`, `pwl_mux_b` | 28 | ALU operands: {Reg.A, VRT, Rout} and {Reg.B, RSX, RAM} |
| ALU | `pwl_alu` | 28 | compare, subtract, 1 - b, 21x8 multiply, add |
| control | `pwl_ctrl` | | sequences everything |

Shared sizes and encodings are in `pwl_pkg`. The top module is `pwl_top`.

**The index field is the key trick.** Each fraction is stored with its
input's index in the three low bits. The sort moves whole 23-bit words, so
after sorting each register still knows which input it came from. That index
goes straight to RSX and clears the matching S field. Compares use the whole
word, so equal fractions are ordered by index. This does not change F: an
equal pair gives a zero weight.

Numbers are unsigned fixed point. The weights have 20 fraction bits (1.0 is
2^20). c is an 8-bit unsigned integer. F(X) is 28 bits: 8 integer bits and 20
fraction bits. The accumulation is exact, because the weights add up to 1.

## One operation, cycle by cycle

**Data input: 19 cycles.** Bytes arrive on `in_data` with a `in_valid` /
`in_ready` handshake: x_1 first, most significant byte of each input first.
CNT increments on the first byte of each input. One cycle after the third
byte, {SR38[19:0], CNT} is written to Reg.CNT and SR38[23:20] to field CNT of
VRT. That write overlaps the next input's first byte, so gaps in `in_valid`
only stretch this stage.

**Sorting: 36 cycles.** Twelve compare-switch operations run in the order
(2,3) (5,6) (1,3) (4,6) (1,2) (4,5) (3,6) (1,4) (2,5) (3,5) (2,4) (3,4).
This is an optimal six-input sorting network (Bose-Nelson). Here it runs one
comparator at a time on the register file, not as a parallel network. Each
operation takes three cycles:

1. Load Reg.i into Reg.A and Reg.j into Reg.B.
2. Compare. The ALU flag is latched.
3. If Reg.A > Reg.B, write Reg.A into Reg.j and Reg.B into Reg.i. Both
   register-file write ports are used in this cycle.

The third cycle is spent even when nothing is switched.

**Evaluation: 59 cycles.**

| term | cycles | sequence |
|------|--------|----------|
| 1 | 6 | Reg.1 -> Reg.A and RSX <- all ones; Rout <- VRT+RSX; RAM read; Rout <- frac(Reg.A) x c; Reg.7 <- Rout; clear S at index(Reg.1) |
| 2..6 | 9 each | Reg.t -> Reg.A and Reg.t-1 -> Reg.B; Rout <- frac(A) - frac(B); Rout -> Reg.A and Reg.7 -> Reg.B; Rout <- VRT+RSX; RAM read; Rout <- A x c; Rout <- Rout + B; Reg.7 <- Rout; clear S at index(Reg.t) |
| 7 | 8 | Reg.6 -> Reg.B and Reg.A <- 0; Rout <- 1 - frac(B); Rout -> Reg.A and Reg.7 -> Reg.B; Rout <- VRT+RSX; RAM read; Rout <- A x c; Rout <- Rout + B; Reg.7 <- Rout |

**Done: 1 cycle.** `f_valid` is high and `f_out` (Reg.7) holds F(X). The
value stays there until the next operation writes Reg.7, in the fifth cycle
of that operation's evaluation stage. The next operation's input can start in the
cycle after `f_valid`.

In total, the last input byte is followed by the result 96 cycles later. An
evaluation with no input gaps takes 18 + 1 + 36 + 59 + 1 = 115 cycles.

## External vertex memory

The c values live in a memory outside this design.

* Ports: `ram_addr` (24 bits, equal to Rout[23:0]), `ram_rd` and `ram_rdata`
  (8 bits).
* Read timing: `ram_rd` is high for one cycle with the address. The data
  must be on `ram_rdata` in the next cycle, as from a synchronous SRAM.
* Layout: c at grid point (k_1, .., k_6) is stored at the address whose
  4-bit field j (field 1 most significant) holds k_j.

A 4-bit integer part can address grid points 0..15. An input whose integer
part is 15 needs point 16 for the upper vertices. The plain 24-bit addition
V + S then carries into the neighbouring field. To stay inside the grid,
keep inputs below 15.0, or size the table knowing that the carry happens.
The testbench exercises this case and expects the carry.

## Where this design makes its own choices

The architecture description fixes these points: the blocks, their widths,
the fraction/index register format, the three-byte input with CNT counted on
the first byte, the twelve-pair order, the three-cycle compare-switch, and
the order of the evaluation steps. The rest is this design's own:

* **Paired register loads.** Two loads that the description lists one after
  the other happen in one cycle, one per register-file read port.
* **The 1 - x_s6 step keeps the integer bit.** If every fraction is 0, the
  last weight is exactly 1.0. That needs 21 bits, so a 20-bit result would
  wrongly give F = 0 on the grid points themselves. The ALU has a dedicated
  `ALU_SUB1` operation, 2^20 - b, for this step.
* **Interfaces and formats.** The byte handshake, the byte order, the
  one-cycle RAM latency, the output port, unsigned c, and synchronous
  active-low reset of every register.
* **Fraction views in the operand multiplexers.** Reg.A[22:3] and
  Reg.B[22:3] give the fractions without the index bits.
* **RSX fields.** RSX stores 4-bit fields of which only bit 0 is ever set,
  matching the 24-bit register of the description. Synthesis keeps only 6
  flip-flops.

The description estimates sorting at about 22 % of the execution time. In
this schedule it is 36 of 115 cycles (31 %). The description does not say
how its figure was counted, so no attempt was made to match it.

Not included:

* The external memory itself. It is a behavioural model in the testbench.
* The delay lines of the surrounding system-identification loop. They are
  application context.
* The parallel Batcher sorting network. It is only a comparison point.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pwl_pkg.sv tb/pwl_top_tb.sv --top-module pwl_top_tb -o sim
./obj_dir/sim
```

For another block, replace the testbench file and top name, for example
`tb/pwl_ctrl_tb.sv` / `pwl_ctrl_tb`.

`tb/pwl_top_tb.sv` runs the design at its default sizes. It checks:

* the two-input example (F = 1.75);
* all fractions zero;
* equal fractions;
* sorted and reverse-sorted inputs;
* integer parts of 15;
* 20 operations on 8-bit inputs (4 integer and 4 fraction bits, placed in
  the top byte);
* 200 random operations, half with random input gaps and half back to back.

For each operation, the testbench compares F with its own reference model,
which uses a different sort and exact integer arithmetic. It also checks:

* the seven RAM addresses, in order;
* 36 sorting cycles and 59 evaluation cycles;
* 96 cycles from the last byte to the result.

At the end, it checks that switches, kept pairs, input stalls, a weight of
exactly 1.0, equal fractions and address carries all occurred.

Each block has its own testbench `tb/<module>_tb.sv`. `tb/pwl_ram_model.sv`
models the memory. Words that were never written read as a fixed scramble
of the address, ((a x 2654435761) >> 13) mod 256, so every vertex has a
reproducible value without storing 16M words.

## Changing it

The sizes are in `pwl_pkg`. DIM = 6, IN_W = 4 and FN_W = 20 set the
dimension and the number format. Changing the dimension also needs:

* a new compare-switch list in `sort_pair` (NSORT entries);
* an IDX_W wide enough for DIM + 1 registers.

The control program in `pwl_ctrl` is written for the accumulator at
register index 7 (`ACC_IDX`).
