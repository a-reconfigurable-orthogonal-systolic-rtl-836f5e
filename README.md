# A reconfigurable orthogonal systolic array for the Kalman filter

A Kalman filter spends nearly all of its time on dense matrix work. That means
products like `P*F^T`, `G*Q*G^T` and `H*P*H^T`, sums, and one small symmetric
inverse, `(R + H*P*H^T)^-1`, per step. This design runs all of those
operations on a single N x N mesh of identical processing elements (PEs).
Each PE has its own microcode memory. Nothing is rewired between operations.
Instead, a 4-bit opcode sweeps across the mesh as a diagonal wavefront, and
each PE runs whichever microcode group that opcode selects. Operations can
therefore follow each other back to back without draining the pipeline.

The arithmetic uses a logarithmic number system (LNS). Multiply, divide,
square and square root become fixed-point add, subtract and shift operations.
Only addition and subtraction need a table look-up. That is what makes a
one-clock multiply-accumulate cell with square root and divide (both needed
by the inversion) cheap enough to repeat N^2 times.

The default size is N = 5: a 5 x 5 array, enough for a filter with up to
five states.

## Number format

Every data word is 21 bits wide (`lns_pkg::lns_t`):

| bits  | field | meaning |
|-------|-------|---------|
| 20    | zero  | 1 = the value is exactly 0; the other bits are then ignored |
| 19    | sign  | sign of the value |
| 18:0  | exp   | base-2 exponent, two's complement, 6 integer and 12 fractional bits |

The value of a word is `(-1)^sign * 2^(exp/4096)`. The exponent range is
[-64, 64), about ±19 decades. Zero needs its own flag because log(0) does not
exist.

### The arithmetic unit (`lns_alu`, `lns_rom`)

The ALU has three sections. They compute in parallel every clock, and all
three are combinational:

* **Square / square root.** The exponent is shifted one bit left (with zero
  fill) or one bit right (with sign extension).
* **Multiply / divide.** The exponents are added or subtracted, and the signs
  are XORed.
* **Add / subtract.** With `emax` the larger exponent and `D = emax - emin`:
  * same effective sign: `e = emax + log2(1 + 2^-D)`
  * opposite effective sign: `e = emax + log2(1 - 2^-D)`

  The sign of the result is the sign of the larger operand.

A 3-bit ALU field picks the variant of each section independently:

* bit 2: multiply (1) or divide (0)
* bit 1: square (1) or square root (0)
* bit 0: add (1) or subtract (0)

One microword can therefore use, say, a multiply and a subtract in the same
clock.

The correction `log2(1 ± 2^-D)` comes from a 7152-entry table per function.
The table is sampled more finely where the functions are steep:

| D range | entries | step of D |
|---------|---------|-----------|
| 0 – 0.5 | 2048 | 2^-12 |
| 0.5 – 1 | 1024 | 2^-11 |
| 1 – 2   | 2048 | 2^-11 |
| 2 – 3   | 1024 | 2^-10 |
| 3 – 4, …, 8 – 9 | 512, 256, …, 16 | doubling per unit |

The table ends at D = 9. Beyond that, the correction is taken as 0. That
drops at most log2(1 + 2^-9) ≈ 0.0028 from the exponent, an error of about
0.2 % in the value of a sum whose terms differ by a factor of more than 512.

The address is computed from the integer part of D and its top fractional
bits. Each entry holds the function at the lower end of its step, rounded to
12 fractional bits. The tables are computed from the formula at elaboration,
so there is no data file. Each entry is stored at its full 20-bit width.
(A production design would compress the flat regions of the tables into
narrower words.)

The ALU testbench compares sums and differences with real arithmetic. It
allows 16 exponent LSBs, which covers the table step and the cut-off at
D = 9. Products, quotients, squares and roots are exact on the exponent and
are compared bit for bit.

**Overflow.** A result exponent above the range saturates to the largest
magnitude and raises the overflow flag. A result below the range becomes
zero.

Special cases:

* A zero operand is handled through the zero flag.
* `x - x` gives zero.
* Division by zero saturates and flags overflow.
* The square root of a negative number is taken of its magnitude.

Each section reports its own overflow. The PE passes on only the flags of
sections whose results it actually routes somewhere, so an unused section
that happens to overflow raises no alarm.

## The processing element (`processing_element`)

```
          top (21)                       right (32)
             ^                               ^
   +---------|-------------------------------|-----------+
   |   8 data muxes: TOP RIGHT MEM X_SQ X_MUL Y_MUL X_ADD Y_ADD
   |   sources: left bottom mul/div sqr/root add/sub scratch hold ground
   |         |                               |           |
   |      LNS ALU (3 sections)         scratch pad 8x21  |
   |         ^                                           |
   |   microcontroller + 1K x 31 microcode RAM           |
   +--REG------------REG------------------REG------------+
      opcode (4)     left (32)           bottom (21)
```

The three inputs are registered. Everything after the registers is
combinational, and that includes the top and right outputs. The neighbour's
input register is therefore the only register between two PEs, and data
moves one PE per clock. The opcode is passed on unchanged (`opcode_out`).

Each clock, the microcontroller supplies one 32-bit control word:

| bits  | field    | drives |
|-------|----------|--------|
| 31    | –        | unused |
| 30:28 | ALU      | section variants (see above) |
| 27:25 | MULT_X   | source of the multiplier X operand |
| 24:22 | MULT_Y   | source of the multiplier Y operand |
| 21:19 | SQUARE_X | source of the square/root operand |
| 18:16 | ADD_X    | source of the adder X operand |
| 15:13 | ADD_Y    | source of the adder Y operand |
| 12:10 | TOP      | source of the top output |
| 9:7   | RIGHT    | source of the right output |
| 6:4   | MEM      | source of the scratch-pad write data |
| 3     | W/R      | scratch-pad write enable |
| 2:0   | MEM_ADDR | scratch-pad address |

Source codes for the eight multiplexers:

| code | source |
|------|--------|
| 000 | left |
| 001 | bottom |
| 010 | multiply/divide result |
| 011 | square/root result |
| 100 | add/subtract result |
| 101 | scratch-pad output |
| 110 | hold: this multiplexer's output in the previous clock |
| 111 | ground: LNS zero |

The TOP multiplexer has codes 000 and 001 swapped. With that swap, the
all-zero control word (no operation) moves bottom to top and left to right,
so idle PEs act as pipeline stages.

**Chained arithmetic in one clock.** The ALU sections can feed each other
within one clock:

* The multiplier operands may select the live square output.
* The adder operands may select the live multiply or square outputs.

So `a*b + c` and `a + b^2` each finish in one clock. An operand multiplexer
can also select the output of its own section, or of a section later in the
order square → multiply → add. It then receives that section's result from
the previous clock, through a register. This keeps the datapath free of
combinational loops and gives each section a one-clock accumulator.

**The right port.** The right port is 32 bits wide, while data words are 21.

* When RIGHT selects `left`, the whole 32-bit left word goes out. This is
  how microwords and addresses travel along a row.
* Any other source comes out zero-extended.

### Microcontroller (`pe_microcontroller`)

The microcode RAM holds 1024 words of 31 bits. It is split into four control
groups. Each group has a start address and an end address. Opcodes (see the table
below) arrive at one per clock:

| opcode | action |
|--------|--------|
| 0000 | no operation (all-zero control word) |
| 0001–0100 | run group 1–4 |
| 0101–1000 | load start address of group 1–4 from `left[9:0]` |
| 1001–1100 | load end address of group 1–4 from `left[9:0]` |
| 1101 | pass data to the right (all-zero control word) |
| 1110 | read microcode: group 1's range, word by word, out of the right port |
| 1111 | write microcode: the left word goes into group 1's range, word by word |

**Running a group.**

* On the first clock of a run (whenever the opcode differs from the last
  clock's), execution starts at the group's start address.
* Each later clock executes the next word.
* After the end address, execution wraps back to the start.

A group of length L therefore repeats every L clocks for as long as its
opcode keeps arriving.

**Programming a row.** Microcode enters through the left port of column 0. It
reaches the other PEs of the row through their right ports, moving in step
with the opcode. Every PE of a row therefore stores the same program. Rows
can be programmed differently, because each row has its own left input. The
whole array is programmed in parallel with a short opcode sequence:

1. load start 1
2. load end 1
3. N_words × write
4. load start/end of the group being set up

## Wavefront control and data skew (`systolic_array`)

PE(r,c) counts rows r from the bottom and columns c from the left, both from
0. The opcode enters PE(0,0). The bottom row passes it to the right, and
every column passes it upward. PE(r,c) therefore receives any opcode r+c
clocks after PE(0,0), and a full N x N array is covered after 2N-1 clocks.

Data must arrive with the same skew:

* the input of row r is delayed by r clocks;
* the input of column c is delayed by c clocks.

An operation on an N x N matrix uses N consecutive identical opcodes.

**Load.** A matrix A is streamed into the bottom of the array, one column per
array column, last row first. The load program of row r keeps the (N-r)-th
word that passes, so PE(r,c) ends up holding a(r,c). The load takes N clocks.

**Multiply-accumulate, Z = A*B + C.** A is held in the PEs (scratch pad).

* Row j of B enters column j from the bottom and rises through the column.
* Row i of C enters row i from the left.
* Each PE computes `right = left + a_local * bottom` and passes bottom
  upward.

Row i of Z leaves the right edge of row i. The first element comes out 2N
clocks after the load of A started (N for the load, N for the sweep). A
second product that reuses the loaded A follows only N clocks later. One
multiply-accumulate program also covers:

* multiply-subtract, C - A*B, by switching the ALU's add bit;
* matrix addition, with B = I.

## Transpose switch (`transpose_switch`)

Products such as `P*F^T` need an operand transposed. The matrix is fed in
row order with the usual column skew. Row j then appears on column j, and in
any clock the elements b(i,j) and b(j,i) are on columns i and j at the same
time. Transposing therefore only means crossing the columns.

* Each column has an N:1 multiplexer over all column inputs, and a 2:1
  multiplexer that chooses between its own input and the crossed one.
* A counter, restarted by `start` on the first element, gives column 1 its
  select.
* The select and the transpose enable are passed to each further column
  through one register. With 1-based numbering, column c picks column
  t-c+2 in clock t.
* `dim` sets the size of the matrix (2..N). Columns dim and above are never
  crossed, so smaller matrices can share the array.

## Re-route switch (`reroute_switch`)

The symmetric inverse is built in three steps:

1. decompose into an upper triangular U;
2. invert U;
3. form U^-1 (U^-1)^T.

When the matrix is m x m with m < N, the results of steps 1 and 2 would have
to cross the N-m unused rows or columns before they could enter the next
step. The re-route switch takes them back to the bottom of the array early,
for the m left-most columns:

* decomposition mode: the top output of PE(m,c) feeds the bottom of
  column c;
* inverse mode: the right output of PE(c,m) feeds the bottom of column c;
* off: the external inputs pass through.

## Top level (`kalman_systolic_top`)

```
bottom_in --> transpose_switch --> reroute_switch --> systolic_array --> top_out
left_in  ---------------------------------------------^          \--> right_out
opcode_in ---------------------------------------------> PE(0,0)
```

The top expects an external controller to drive it. That controller issues
opcodes, supplies the skewed matrix streams, and collects the results. The
memory banks that feed the boundaries are outside the design (see below).

## How far it goes, and where it departs

Built and tested:

* LNS ALU with the full segmented tables
* PE with all eight multiplexers, scratch pad, microcode RAM and
  microcontroller
* N x N array with the opcode wavefront
* transpose switch
* re-route switch
* load, multiply-accumulate with reuse of the loaded matrix,
  multiply-subtract, transposed products, matrix addition, overflow, and
  both re-route modes, all on the full 5 x 5 array

**Not run on the array: the inversion.**

* The Cholesky-style decomposition needs different programs per row. It also
  needs different programs for diagonal and off-diagonal cells.
* The triangular inverse needs different programs per column.
* Together, every PE needs its own microprogram. This microarchitecture can
  only load one program per row, because a row's words reach all its PEs in
  step with the opcode.
* The operations the inversion needs are built and tested at PE level: the
  diagonal cell (square root and divide) and the off-diagonal
  multiply-subtract. For example, the diagonal cell sends up sqrt(9) = 3 and
  then 6/3 = 2, and the off-diagonal cell computes 10 - 1.5*2 = 7. The
  2 x 2 example C = [1 2; 2 5] is also worked step by step through one PE's
  cell programs. It gives U = [1 2; 0 1] and U^-1 = [1 -2; 0 1]. A per-PE
  program path (for example a column-select bit during writes) would be
  needed to run the inversion on the array.

**Transposed load from the left.** A matrix could also be loaded transposed
by streaming it in from the left, with PE(r,c) keeping a(c,r). That needs
each PE of a row to keep a different word, so it has the same per-column
programming problem as the inversion, and it is not supported. None of the
filter's transposed operands is a loaded matrix. Transposed operands are
streamed through the transpose switch instead.

**Not included.**

* The per-column four-port memory banks and the external sequencer. They are
  only outlined, and are left to future work.
* A converter between floating point and LNS.

The testbenches play the sequencer's role.

**Implementation choices:**

* bit positions of the zero flag and sign within the 21-bit word;
* operand registers that break ALU feedback loops;
* per-section overflow;
* asynchronous, active-low reset of all control and pipeline registers (the
  RAMs are not reset);
* asynchronous-read scratch pad and microcode RAM;
* a run restarts whenever the opcode changes;
* the microcode read opcode uses group 1's range;
* the `dim` input of the transpose switch;
* the mode encoding and pairing of the re-route switch;
* full-width table entries.

**Size.** The microcode RAM alone is 31,744 bits per PE. At N = 5 the array
holds about 800 kbit of microcode, plus two 7152 x 20 tables per PE. The
design scales to larger N through the `N` parameter. For n = 10, 64 or 100
the array needs n^2 PEs.

## Files

| file | content |
|------|---------|
| `rtl/lns_pkg.sv` | word format, control-word layout, opcodes, saturation helper |
| `rtl/lns_rom.sv` | add/subtract correction tables and segment addressing |
| `rtl/lns_alu.sv` | square/root, multiply/divide and add/subtract sections |
| `rtl/pe_scratchpad.sv` | 8 x 21 scratch pad |
| `rtl/pe_microcontroller.sv` | 1K x 31 microcode RAM, four control groups |
| `rtl/processing_element.sv` | one PE |
| `rtl/systolic_array.sv` | N x N mesh and opcode wavefront |
| `rtl/transpose_switch.sv` | column-crossing transpose network |
| `rtl/reroute_switch.sv` | feedback paths for small inversions |
| `rtl/kalman_systolic_top.sv` | top level |
| `tb/tb_lns_pkg.sv` | real <-> LNS conversion, tolerance compare, microword builder |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops by
itself. A watchdog ends a hung run. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lns_pkg.sv tb/tb_lns_pkg.sv tb/tb_kalman_systolic_top.sv \
    --top-module tb_kalman_systolic_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_kalman_systolic_top` with any other `tb_*` module to test one
block. `tb_kalman_systolic_top` runs the full default-size (N = 5) design end
to end. It programs all rows, then runs these operations and compares each
against real-number arithmetic:

* load, then multiply
* a second multiply reusing the loaded matrix
* multiply-subtract
* transposed product
* addition
* an overflow case
* both re-route modes

It also prints how often each mechanism occurred. `tb_systolic_array` uses a
3 x 3 array to keep its wavefront checks readable.

`tb_kalman_workload` runs one complete filter step on the 5 x 5 array, for
two filter sizes:

* n = m = p = 5;
* n = 5 states, p = 3 noise inputs, m = 2 measurements. The smaller matrices
  are zero-padded.

The step is made of 12 array operations, each of the form "load A, stream B
and C": QG^T, PH^T, PF^T, R + Hb, G(QG^T), K, FK, Fx, z - Hx, F - aH, the
state update and the covariance update. Each result is read back and fed
into the operations after it. The m x m inverse is computed by the testbench
between the operations. Each operation is checked against real arithmetic on
its actual operands. The final state and covariance are checked against a
filter step computed entirely in real numbers, to 3 % of their largest
entry.

To change the array size, override `N` on `kalman_systolic_top` or
`systolic_array`. The table depth `ROM_DEPTH` should stay at 7152, because the
address decode assumes the ten segments above.
