# LNS matrix coprocessor for Model Predictive Control

Model Predictive Control (MPC) solves an optimisation problem at every
sampling instant. In a Newton-type solver, each iteration computes

    u(t+1) = u(t) - H^-1 * grad f(u)

where H is the Hessian of the cost and grad f its gradient. That means matrix
products, matrix-vector products, vector subtractions, element-wise
reciprocal powers and a matrix inversion, over and over. That load is too
much for the small 16-bit microcontroller of an embedded controller (a drug
pump, a micro-chemical plant).

This RTL is a **matrix coprocessor** that takes those operations off such a
host. The host stays the master. It loads matrices into the coprocessor,
issues one command at a time, is free to do other work while the command
runs, and reads back the result, which is in the end the new control moves.
The coprocessor has four parts:

* a **16-bit logarithmic-number-system (LNS) ALU**. It does one
  multiply-accumulate per clock cycle, plus add, subtract, divide, 1/a² and 1/a³.
* a **one-hot state machine**. It walks each command over the matrix
  elements, one element or one multiply-accumulate per cycle.
* a **1024-word matrix memory** with two read ports and one write port.
* a **register-mapped host bus slave** with wait states and an interrupt.

LNS is used instead of floating point because MPC needs a wide dynamic range
and LNS gives it in 16 bits. A multiplication becomes one addition and a
division one subtraction. The only hard operation is addition, covered in
[LNS arithmetic](#lns-arithmetic).

```
             16-bit host bus                      +-------------+
 host  <====================>  host_if  --cmd-->  | coproc_ctrl |  one-hot FSM
 CPU    sel/we/addr/wdata       regs, mailbox  <--| counters,   |
        rdata/ready, irq        STATUS, irq       | acc, pivot  |
                                                  +------+------+
                                       addresses, we |   ^ operands, result
                                                     v   |
                                    +------------+   +---+------+
                                    | matrix_mem |-->| lns_alu  |  lns_mul -> lns_add
                                    | 1024 x 16  |<--| (comb.)  |
                                    +------------+   +----------+
```

## Number format

Every word is 16 bits:

| bits  | meaning |
|-------|---------|
| 15    | sign of the value (1 = negative) |
| 14:0  | log2 of the magnitude, two's complement, 9 fractional bits |

This gives magnitudes from about 2.3e-10 to 4.3e9. The step is 2^(1/512), a
relative spacing of 0.14 %. The most negative log code, `15'h4000`, stands
for **zero**. That keeps magnitude order equal to the signed order of the
log field, so the pivot search is a plain signed comparison. Examples:
`16'h0000` = +1.0, `16'h8000` = -1.0, `16'h0200` = +2.0, `16'h0400` = +4.0,
`16'h4000` = 0.

Overflow saturates to the largest magnitude. Underflow gives zero. x/0 and
1/0 give the largest magnitude.

## LNS arithmetic

**Multiply / divide** (`lns_mul`). The unit adds or subtracts the 15-bit log
fields and XORs the signs, then clamps the result.

**Reciprocal powers** (`lns_alu`). log2(1/a²) = -2·log2|a| and
log2(1/a³) = -3·log2|a|, so POW2A and POW3A are a shift and an add on the log
field. This is why these commands are cheap in LNS, although they are costly
in floating point. They show up in the gradient and Hessian of barrier and
penalty terms.

**Add / subtract** (`lns_add`). Order the operands so that |big| ≥ |small|,
and let n = log2|big| - log2|small| ≥ 0. Then

    log2|big ± small| = log2|big| + log2(1 ± 2^-n)

and the sign is that of `big`. Most LNS units read the correction term from a
stored table. This unit computes it instead, in fixed point with G = 21
fractional bits:

1. **2^-n.** The integer part of n becomes a right shift. Each fractional
   bit m of n that is set multiplies in the constant 2^(-2^-m), for
   m = 1..9. The nine constants come from repeated integer square roots of
   2 in a constant function, so there is no table to maintain.
2. **s = 1 ± 2^-n.** The leading one of s gives the integer part of
   log2(s), and s is normalised to [1, 2).
3. **Fraction bits.** Squaring the normalised mantissa ten times gives ten
   fraction bits of log2(s): each squaring that reaches 2 yields a 1 and
   halves the mantissa. The tenth bit rounds the result to nearest.

When n ≥ 12 (the log difference, 9 + 3), the correction is below half a unit
and `big` is returned unchanged. Exact cancellation gives zero.

The random test measures the accuracy. The result is within one unit of the
log of the exact sum. Under cancellation, the linear error is within 2^-8 of
the larger operand, which is inherent to a 16-bit format. The whole adder is
combinational and deep: about nine multiplies, a leading-one search and ten
squarings. That depth fits the low clock rate of an embedded controller
(the architecture was demonstrated at 5 MHz). For a faster clock it is the
path to pipeline; see [Changing the design](#changing-the-design).

**The ALU** (`lns_alu`) chains the multiplier into the adder. So `c + a*b`
(MAC), `c - a*b` (used by elimination), `a ± b`, `a / b`, `1/a²`, `1/a³` and
pass-through each take one cycle. It also outputs `mag_gt = |a| > |b|`.

## Commands

Matrices live in the coprocessor memory, row-major at a base address.
Element (i, j) of a matrix with C columns at base B is at B + i·C + j. Each
command takes the operand fields `dst`, `src_a`, `src_b`, `rows`, `cols`, `k`
and `p`. Dimensions are 1..255. N = rows·cols. Every command spends one extra
cycle being accepted.

| opcode | name   | effect | cycles |
|--------|--------|--------|--------|
| 1  | LOADC  | N words written by the host to DATA go to `dst` | 1 per word (host-paced) |
| 2  | STOREC | copy `src_a` → `dst` | N |
| 3  | OUTC   | N words of `src_a` are read by the host from DATA | 1 per word (host-paced) |
| 4  | ADDC   | `dst = A + B`, element-wise | N |
| 5  | SUBC   | `dst = A - B`, element-wise | N |
| 6  | MULC   | `dst[rows×cols] = A[rows×k] · B[k×cols]` | rows·cols·k |
| 7  | MULV   | `dst[rows] = A[rows×cols] · b[cols]` | rows·cols |
| 8  | POW2A  | `dst_i = 1/a_i²` | N |
| 9  | POW3A  | `dst_i = 1/a_i³` | N |
| 10 | PIVOT  | STATUS.result = first row i ≥ k with the largest \|A[i][k]\| | rows - k |
| 11 | GJSTEP | in place on A: swap rows k and p, divide row k by A[k][k], subtract A[i][k]·row k from every other row i | 2·cols (0 if p = k) + 1 + cols + (rows+1) + (rows-1)·cols |

Only GJSTEP may work in place. For every other command the source and
destination regions must not overlap, with one exception: an element-wise
command may write over one of its own sources at the same addresses.

### Matrix inversion with PIVOT and GJSTEP

PIVOT finds the pivot row for Gauss-Jordan inversion. GJSTEP is the rest of
one elimination step. To invert an n×n matrix H, the host loads the
augmented matrix [H | I] (n rows, 2n columns) and then repeats, for
k = 0 .. n-1:

    PIVOT  src_a=AUG rows=n cols=2n k=k        -> read STATUS, p = result
    GJSTEP src_a=AUG rows=n cols=2n k=k p=p

The region then holds [I | H^-1]. This is Gauss-Jordan elimination with
partial pivoting. Inside GJSTEP the pivot and each row's elimination factor
are first copied into a register, so the in-place updates do not corrupt
them.

### One Newton step

The end-to-end testbench uses this recipe, and it shows how the row-major
layout is used. Because the inverse sits in the right half of [I | H^-1],
the testbench does not copy it out. It multiplies the whole augmented
matrix by a vector whose upper half is zero:

    MULV   t  = [H | I] · [u ; 0]          (= H u, before the inversion)
    SUBC   t  = t - c
    POW2A  w  = 1 ./ x.^2
    SUBC   g  = t - w                      (written into the lower half of [0 ; g])
    STOREC us = u
    PIVOT/GJSTEP × n                        ([H | I] -> [I | H^-1])
    MULV   d  = [I | H^-1] · [0 ; g]       (= H^-1 g)
    SUBC   u_new = us - d
    OUTC   u_new

In the 1024-word memory, this layout needs 2n² + 11n words, so the largest
Newton step that fits is n = 20, at 1020 words. The testbench runs that
size. It takes 19,590 coprocessor cycles, about 3.9 ms at 5 MHz, plus 961
bus cycles to load the 900 input words. At n = 16 the same step takes
10,376 coprocessor cycles. The inversion dominates, at about 2n³ cycles.

## Host interface

The host interface is a register-mapped 16-bit slave with wait states:

* A transfer is `bus_sel` with `bus_we`, `bus_addr` and `bus_wdata`.
* It completes in the cycle in which `bus_ready` is high. Read data are
  valid in that cycle.
* Transfers may follow back to back.
* While `bus_ready` is low, the host must hold the transfer unchanged. An
  assertion in `host_if` checks this.

| addr | register | access |
|------|----------|--------|
| 0 | OP     | write: opcode; **starts the command** (write it last) |
| 1–7 | DST, SRCA, SRCB, ROWS, COLS, K, P | read/write operand fields |
| 8 | DATA   | write: next LOADC word; read: next OUTC word |
| 9 | STATUS | read: `{busy, done, 6'b0, result[7:0]}` |

The bus inserts wait states in these cases:

* **Opcode while busy.** The host writes OP while a command is still
  pending or running. The write completes when the coprocessor is free, so
  the host can queue the next command's fields and its opcode without
  polling.
* **DATA write, full mailbox.** The one-word mailbox still holds a word that
  the controller is not taking in this cycle.
* **DATA read, no word yet.** The host reads DATA before the controller
  offers a word.

**Completion.** `done` and `irq` are set when a command ends. They are
cleared by a STATUS read or by the next opcode write. The busy bit of STATUS
also covers the cycle between the opcode write and the controller's
acceptance, so polling right after an issue never sees a stale idle. The
operand registers may be rewritten while a command runs, because the
controller keeps its own copy of the command.

## Controller and memory timing

`coproc_ctrl` is a twelve-state FSM with one-hot encoding. An assertion
checks that the state stays one-hot. Its states are:

* IDLE, LOAD, OUT, EW (element-wise) and MAC;
* PIV (pivot search);
* SWAP1/SWAP2, NPIV (latch the pivot), NORM, EFAC (latch the factor) and
  ELIM (the GJSTEP phases).

Each cycle the FSM works out the operand addresses from its counters. The
memory returns the operands combinationally, the ALU computes, and the
result is written, or accumulated into `acc`, on the clock edge. So the
path is: memory read → ALU → memory write, all in one cycle. A dot product
of length K takes K cycles: the first term is added to zero and the last
one is written to memory.

`matrix_mem` has asynchronous reads and a synchronous write. A read of the
word being written returns the old value. This matches distributed (LUT)
RAM on an FPGA. A block-RAM version would need synchronous reads and one
more pipeline stage in the controller.

## Files

| file | contents |
|------|----------|
| `rtl/mpc_pkg.sv` | number format, opcodes, ALU ops, command struct, register map |
| `rtl/lns_mul.sv` | LNS multiplier / divider |
| `rtl/lns_add.sv` | LNS adder / subtractor (table-free) |
| `rtl/lns_alu.sv` | ALU: MAC, MSB, add, sub, div, 1/a², 1/a³, magnitude compare |
| `rtl/matrix_mem.sv` | 1024 × 16 memory, 2 read ports, 1 write port |
| `rtl/coproc_ctrl.sv` | one-hot command FSM |
| `rtl/host_if.sv` | host bus slave |
| `rtl/mpc_coproc.sv` | top level |
| `tb/tb_lns_pkg.sv` | real-number reference helpers for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`, stops with
`$finish`, and has a watchdog. The end-to-end run, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mpc_pkg.sv tb/tb_lns_pkg.sv rtl/lns_mul.sv rtl/lns_add.sv rtl/lns_alu.sv \
  rtl/matrix_mem.sv rtl/coproc_ctrl.sv rtl/host_if.sv rtl/mpc_coproc.sv \
  tb/tb_mpc_coproc.sv --top-module tb_mpc_coproc -Mdir obj_top
./obj_top/Vtb_mpc_coproc
```

For the other testbenches, swap in the modules that each one instantiates.
Each test checks:

* **`tb_lns_mul`**: 20,000 random products and quotients against
  double-precision arithmetic rounded back to LNS, which must match exactly.
  Also zero, division by zero, overflow and underflow.
* **`tb_lns_add`**: about 8,000 random and directed sums and differences,
  including cancellation, saturation and far-apart operands. The tolerance
  is the one given in [LNS arithmetic](#lns-arithmetic).
* **`tb_lns_alu`**: every operation and the magnitude compare, with random
  operands.
* **`tb_matrix_mem`**: a full fill and read-back on both ports, and
  read-during-write behaviour.
* **`tb_host_if`**: the register map, the command pulse, each wait-state
  case with its exact length, and STATUS / irq.
* **`tb_coproc_ctrl`**: every command against a real-number reference, with
  random gaps on both data streams. It also checks the cycle counts of the
  table above, a 4×4 inversion (H·H^-1 ≈ I) and an explicit row swap.
* **`tb_mpc_coproc`**: the Newton step above with n = 20, driven over the
  bus. The inputs are random, and the large entries of H are placed off the
  diagonal so that pivoting must swap rows. It checks:
  * u_new and H^-1 against double precision;
  * 1/x³ and a MULC product;
  * that MULV and MULC keep their one-multiply-accumulate-per-cycle busy
    time;
  * that each mechanism occurred: opcode stalls, DATA-read stalls, pivot
    row swaps, irq completions and host work overlapped with a running
    command.

  It runs with the design at its default sizes.

## Departures from the source architecture

These parts follow the published microprocessor/coprocessor architecture:

* the split between a master microprocessor and a matrix coprocessor;
* the one-hot FSM with an iterative ALU doing one multiply-accumulate per
  cycle;
* the 16-bit LNS arithmetic;
* the commands LOADC, STOREC, OUTC, POW2A, POW3A, MULV and PIVOT, and the
  matrix addition and multiplication;
* letting the host run other work while a command executes.

That description gives names and functions, not circuits. Everything below
is this design's own choice and should be judged as such:

* the LNS field split (9 fractional bits), the zero code, saturation, and the
  table-free adder algorithm;
* the command encoding and operand fields, the row-major layout, and the
  reading of STOREC as an on-chip matrix copy;
* ADDC, SUBC and MULC as separate commands, and the GJSTEP command that
  completes the inversion around PIVOT;
* the memory: 1024 words, two asynchronous read ports and one write port;
* the host bus protocol, the register map, the mailbox, and irq/STATUS;
* the single-cycle (unpipelined) datapath and the asynchronous active-low
  reset.

The original host was a commercial 16-bit embedded processor on a Virtex-4
FPGA board. Neither is part of this RTL. The top level brings out the bus
that such a host would drive, and the testbench plays the host.

Not verified here:

* timing closure on any device;
* the published performance figure, an antenna-control MPC solved in
  0.89 ms at 5 MHz. Its problem dimensions are not known, so it was not
  reproduced. The nonlinear glucose-regulation example was not run either,
  for the same reason.

## Changing the design

* **Word format.** `LNS_F` in `mpc_pkg` sets the log precision. `lns_add`
  rebuilds its constants and its squaring chain from it.
* **Memory size.** `ADDR_W` sets the memory size: DEPTH = 2^ADDR_W, with the
  address fields sized to match. `DIM_W` sets the width of the dimension
  fields.
* **Opcodes.** To add one, extend `opcode_e`, the IDLE dispatch in
  `coproc_ctrl`, and a state, or reuse `S_EW` / `S_MAC` with a new ALU op.
* **Pipelining for a faster clock.** Put a register between `lns_mul` and
  `lns_add` and another inside `lns_add` (after step 1). Then delay the
  controller's write-back by the same number of cycles. A MAC chain would
  then need the accumulator forwarded or several dot products interleaved.
