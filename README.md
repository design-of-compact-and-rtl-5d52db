# Baugh-Wooley multiplier in majority logic

This is a two's complement multiplier built from a regular array of identical
one-bit full adders. The array is made only from three-input majority gates and
inverters, the gate set of quantum-dot cellular automata (QCA). The same array
also multiplies unsigned numbers.

The main idea comes from Baugh and Wooley. Multiplying two's complement
numbers directly gives partial products that are themselves signed. Each one
would need sign extension across the full product width. Baugh-Wooley instead
rewrites the negative-weight terms. A few bit products are complemented and
two constant ones are added. After that, every bit of the partial-product matrix
is a plain positive bit. The matrix can then be summed by an ordinary
carry-save array, the same one an unsigned multiplier uses, with no
sign-handling cells.

The RTL is synthesizable SystemVerilog and is parameterized by the word size
`N`, which defaults to 4. It is pipelined by one register stage per adder row.

## The arithmetic

Take an N-bit multiplicand `a` and multiplier `b` in two's complement. The
top bit of each has weight −2^(N−1). Expanding the product gives four groups
of terms:

* `a_i·b_j` for i, j < N−1: positive, weight 2^(i+j)
* `a_(N−1)·b_(N−1)`: positive (two negative weights), weight 2^(2N−2)
* `a_(N−1)·b_j` and `a_i·b_(N−1)` for i, j < N−1: negative

The negative terms are folded using −x = x̄ − 1, applied bit by bit. A negative
row `−Σ a_(N−1)·b_j·2^(N−1+j)` becomes `Σ NAND(a_(N−1), b_j)·2^(N−1+j)` minus a
constant. Adding the constants of both negative rows modulo 2^(2N) leaves
**+2^N + 2^(2N−1)**. So:

    P = Σ (bit products, the 2(N−1) mixed-sign ones taken as NAND)
      + 2^N + 2^(2N−1)        (mod 2^(2N))

For N = 4 the matrix is as follows (¬ marks a complemented product):

    column:          7      6      5      4      3      2      1      0
    row 0                                    ¬a3b0   a2b0   a1b0   a0b0
    row 1                             ¬a3b1   a2b1   a1b1   a0b1       
    row 2                      ¬a3b2   a2b2   a1b2   a0b2              
    row 3                a3b3  ¬a2b3  ¬a1b3  ¬a0b3                     
    constants        1                    1                            
                    p7     p6     p5     p4     p3     p2     p1     p0

**Unsigned mode.** With `signed_mode = 0`, no product is complemented and both
constants are zero. The same array then computes the unsigned product. The
mode travels with each operation, so signed and unsigned operations can be
mixed in the pipeline.

## Gate set

Everything reduces to two primitives:

| module     | function                                 |
|------------|------------------------------------------|
| `qca_maj3` | majority M(a,b,c) = ab + ac + bc         |
| `qca_inv`  | inverter                                 |
| `qca_and2` | M(a,b,0): a majority gate with one input fixed at 0 |
| `qca_or2`  | M(a,b,1): a majority gate with one input fixed at 1 |
| `qca_xor2` | (a·b̄) + (ā·b), built from the gates above |

`qca_full_adder` is the usual three-majority adder:

    cout = M(a, b, cin)
    sum  = M(¬cout, cin, M(a, b, ¬cin))

The carry costs one majority gate. That keeps the carry path short, which
matters in QCA because wire length there is delay.

Each bit product is one AND gate (`pp_gen`). The 2(N−1) mixed-sign products
also pass through an XOR with `signed_mode`, so they become NAND in signed mode.
This selectable complement is a choice of this implementation. A signed-only
multiplier would use a NAND there and tie the constants to 1.

## The carry-save array

The core is N−1 rows of N full adders (`csa_row`). No carry moves sideways
within a row: every carry goes down to the next row. Each row's delay is
therefore one full adder, whatever N is.

The array keeps a sum vector `s` and a carry vector `c`. After row k, `s`
covers columns k…k+N−1 and `c` covers columns k+1…k+N.

* **Start.** `s` = row 0 of the matrix. `c` = 0, except its top bit, which
  is in column N. That bit holds the constant 2^N in signed mode.
* **Row k (k = 1…N−1).** Cell i adds `pp[k][i]`, `s[i+1]` and `c[i]`, which all
  sit in column k+i. The top cell has no `s` bit above it and adds 0. Cell 0's
  sum is finished: it becomes product bit `p[k]`.
* **End.** After row N−1, bits `p[N−1:0]` are done. The upper half is still a
  sum/carry pair.

`final_adder` turns that pair into `p[2N−1:N]`. It is a ripple chain of the
same full adder. Its bottom cell has a carry-in of 0. Its top cell adds the top
carry bit, the ripple carry and `signed_mode`: that third input is the second
constant, 2^(2N−1). In the 2N-bit result, adding it simply inverts `p[2N−1]`.
The top cell's carry-out would weigh 2^(2N) and is discarded. `final_adder.sv`
leaves it unread on purpose, and that is the one lint warning.

To widen the multiplier, add one bit slice per row and one row per extra bit.
Only `N` changes. The scheme is intended for words below 32 bits. The
testbenches run N = 2, 3, 4, 8, 16 and 31.

## Pipeline and interface

`bw_multiplier` is the top.

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | clock |
| `rst_n`       | in  | 1     | synchronous, active-low reset; clears the valid flags only |
| `in_valid`    | in  | 1     | `a`, `b`, `signed_mode` carry an operation this cycle |
| `signed_mode` | in  | 1     | 1 = two's complement, 0 = unsigned |
| `a`, `b`      | in  | N     | operands |
| `out_valid`   | out | 1     | `p` holds a result |
| `p`           | out | 2N    | product |

There is a register stage after every carry-save row and after the final
adder. The combinational path is therefore one full adder inside the array, or
the N-cell ripple at the end.

* **Latency:** exactly N cycles from `in_valid` to `out_valid`.
* **Throughput:** one operation per cycle.
* **Back-pressure:** none.

Each stage register carries a packed struct: valid flag, mode, bit-product
matrix, `s`, `c`, and the low product bits finished so far. Rows of the matrix
that are no longer needed are trimmed by synthesis.

Two assertions in `bw_multiplier` state the handshake:

* every `in_valid` is followed by `out_valid` N cycles later;
* no `out_valid` appears without a matching `in_valid`.

Reset flushes any operations in flight. The data registers are not reset,
because nothing reads them while their valid flag is low.

## Relation to the QCA layout, and design choices

This RTL is a synchronous, gate-accurate rendering of a 4×4 Baugh-Wooley
multiplier that was laid out in QCA. That layout is reported at:

* 3210 cells
* 4.85 µm²
* a delay of 5.5 clocks. A QCA clock has four phases (switch, hold, release,
  relax), and data moves forward by one clock zone per phase.

The RTL does not model QCA clock zones, cells, wires or crossovers. Those are
physical structures with no logic function of their own. Here, the pipeline
registers play the role of the clock zones, which move data forward in step.
The RTL latency of 4 cycles is therefore not the same quantity as the 5.5 QCA
clocks.

Followed from the source design:

* the 4-bit default size;
* the bit-product matrix with complemented mixed-sign terms;
* the carry-save array of one-bit full adders built from majority gates and
  inverters;
* AND and OR as majority gates with a fixed input;
* the use of pipeline registers, with one clock between neighbouring rows.

Choices made here, where the source is silent:

* the gate structure of the full adder (the common three-majority form);
* the wiring of the array and a ripple-carry final adder;
* where the two constants enter: the 2^N one at the top of the initial carry
  vector, the 2^(2N−1) one at the final adder's top cell. The source shows only
  one constant 1 in its matrix; this design adds the second one, 2^(2N−1),
  because the identity needs it to give correct results;
* the `signed_mode` input and the XOR that selects complementing;
* one register stage per row;
* the valid handshake and the synchronous reset.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_qca_maj3`, `tb_qca_inv`, `tb_qca_and2`, `tb_qca_or2`, `tb_qca_xor2`, `tb_qca_full_adder` | exhaustive truth tables |
| `tb_pp_gen`          | all 512 inputs: every matrix bit, and that the matrix plus constants equals the product |
| `tb_csa_row`         | all 2048 inputs: every cell's sum/carry, and conservation of the weighted sum |
| `tb_final_adder`     | all 256 inputs against an integer add |
| `tb_bw_multiplier`   | default N = 4, end to end (details below) |
| `tb_bw_widths`       | N = 2, 3, 8, 16, 31: corner operands (0, 1, −1, most negative, most positive) plus thousands of random operations, value and latency checked |

`tb_bw_multiplier` streams all 256 operand pairs in both modes (512
operations) in random order. It inserts random idle cycles and random mode
switches, and applies a reset mid-stream. Every result is compared with the
simulator's multiply, and its latency must be exactly N cycles. The testbench
also counts signed operations, unsigned operations, mode switches,
back-to-back issues, bubbles, reset flushes and the most-negative × most-negative
case. If any of these never happens, that counts as a failure.

To simulate with Verilator (5.x), for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb \
        tb/tb_bw_multiplier.sv --top-module tb_bw_multiplier
    ./obj_dir/Vtb_bw_multiplier

For lint only:

    verilator --lint-only -Wall -Irtl rtl/bw_multiplier.sv

To change the word size, override `N` on `bw_multiplier`. `tb_bw_widths`
shows how.

## Files

* `rtl/bw_multiplier.sv`: top; pipeline and array assembly
* `rtl/pp_gen.sv`: bit-product matrix
* `rtl/csa_row.sv`: one carry-save row of full adders
* `rtl/final_adder.sv`: ripple vector-merging adder with the top-bit correction
* `rtl/qca_full_adder.sv`, `rtl/qca_maj3.sv`, `rtl/qca_inv.sv`,
  `rtl/qca_and2.sv`, `rtl/qca_or2.sv`, `rtl/qca_xor2.sv`: the gate set
* `tb/`: the testbenches above, plus `bw_stream_checker.sv`, the per-width
  driver and scoreboard used by `tb_bw_widths`
