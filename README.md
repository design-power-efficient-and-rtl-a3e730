# 8x8 Urdhwa multiplier with XOR-XNOR/MUX compressors

An unsigned 8-bit by 8-bit multiplier, `c[15:0] = a[7:0] * b[7:0]`. It works like
*Urdhwa Tiryakbhyam* ("vertically and crosswise") multiplication. Every product column
`k` collects its crosswise terms `a[i] & b[k-i]` and the carries sent up from lower columns,
and sums them down to one product bit. The summing is done with multi-input
*compressors* instead of chains of full adders. A compressor adds four or seven bits of one
weight in a few gate delays. Its main delay improvement comes from a 4:3 compressor made of
XOR-XNOR cells and 2:1 multiplexers: signals that settle early drive the multiplexer
selects, so late carries pass through only one multiplexer.

This RTL implements the multiplier and compressors proposed in the paper "Design Power
Efficient and High Speed Multipliers using of Approximate Compressors". The paper gives the
4:3 compressor at gate level, the 7:4 compressor's ports and parts, the multiplier's size
and ports, and which cells it uses. It does not give the wiring of the 7:4 compressor or of
the multiplier. Those are this design's own, and so is every point listed under
"Departures" below. Everything is purely combinational: there is no clock, reset or
register.

## Cells

| module        | what it is                                                                 |
|---------------|----------------------------------------------------------------------------|
| `half_adder`  | 2 bits -> sum, carry                                                        |
| `full_adder`  | 3 bits -> sum, carry                                                        |
| `xor_xnor`    | dual-rail XOR: `a^b` and its complement                                     |
| `mux2`        | 2:1 multiplexer                                                            |
| `comp43`      | 4:3 compressor (the proposed XOR-XNOR/MUX cell)                            |
| `comp74`      | 7:4 compressor built from two `comp43` and a full adder                     |
| `urdhwa_pp`   | crosswise AND terms, grouped by product column                             |
| `urdhwa_mult8`| the multiplier (top)                                                       |

### 4:3 compressor (`comp43`)

Inputs `x[4:1]` and `cin`, all of one weight. Outputs `sum` (same weight) and `carry`,
`cout` (double weight):

    x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)

The name counts the four data inputs and the three outputs. The same cell is often called a
4:2 compressor. It has two XOR-XNOR cells and four multiplexers:

    cout  = (x1^x2) ? x3       : x1          -- majority of x1,x2,x3; independent of cin
    u     = (x1^x2) ? ~(x3^x4) : (x3^x4)     -- u = x1^x2^x3^x4
    sum   = u ? ~cin : cin                   -- u ^ cin
    carry = u ? cin  : x4

`cout` does not depend on `cin`. A row of these cells can therefore pass each `cout` to the
next column's `cin` without the carry rippling along the row. `cin` is the latest input, and
it only passes through the last multiplexer level: the paper counts this as fewer than the
three XOR delays of the XOR/MUX cell and the four of the two-full-adder cell.

### 7:4 compressor (`comp74`)

Inputs `x[7:1]`, `cin1`, `cin2` (nine bits of one weight). Outputs:

    x1 + ... + x7 + cin1 + cin2 = sum + 2*(carry + cout1) + 4*cout2

Nine bits can add up to 9, but `sum` plus three double-weight bits can only reach 7.
So in this design `cout2` has quadruple weight and goes **two** columns up. Inside, compressor A
takes `x1..x4, cin1`. Compressor B takes A's sum, `x5..x7` and `cin2`, and B's sum is the
cell's `sum`. B's `cout` becomes `cout1`. The three other double-weight bits (A's carry and
cout, B's carry) go into a full adder, whose sum is `carry` and whose carry-out is `cout2`.
`cout1` depends on `cin1` (through A's sum). In the multiplier, `cin1` always comes from a
lower column, so this adds ripple delay but never a loop.

## The column plan (`urdhwa_mult8`)

`urdhwa_pp` produces 64 AND terms. Column `k` (0..14) holds `min(k, 14-k) + 1` of them, packed as
`pp[k][q] = a[i] & b[k-i]` with `i = q + max(0, k-7)`. Unused entries are constant 0.

The multiplier then handles one column at a time, from column 0 up. It takes the column's
terms plus all carries that lower columns have sent into it. While more than one bit is
left, it feeds the first bits into a cell:

* 7 to 9 bits left: a `comp74` (unused inputs tied to 0)
* 4 or 5 bits: a `comp43`
* 3 bits: a full adder
* 2 bits: a half adder

The cell's sum goes back into the column. Its carries go to column `k+1`, and a `comp74`'s
`cout2` goes to `k+2`. The last bit left is product bit `c[k]`. A compressor's carry-in slots
(`cin`, or `cin1`/`cin2`) take the `cout` outputs of lower-column compressors first, so the
compressors form chains, each one's carry-out feeding the next one's carry-in. A 4:3 `cout`
does not depend on that cell's carry-in. A 7:4 `cout1`/`cout2` does depend on its own
carry-ins, which come only from lower columns. In columns 4 to 10, each 7:4
`cout1` feeds `cin2` of the 7:4 one column up, and each `cout2` feeds `cin1` two columns up.
The other inputs are filled in order: crosswise terms, then the other carries, then the sums
of earlier cells in the same column.

| column | terms | carries in | cells                 |
|-------:|------:|-----------:|-----------------------|
| 0      | 1     | 0          | none (`c[0] = a[0]&b[0]`) |
| 1      | 2     | 0          | HA                    |
| 2      | 3     | 1          | 4:3                   |
| 3      | 4     | 2          | 4:3, HA               |
| 4      | 5     | 3          | 7:4                   |
| 5      | 6     | 2          | 7:4                   |
| 6      | 7     | 3          | 7:4, HA               |
| 7      | 8     | 4          | 7:4, 4:3              |
| 8      | 7     | 5          | 7:4, 4:3              |
| 9      | 6     | 5          | 7:4, FA               |
| 10     | 5     | 4          | 7:4                   |
| 11     | 4     | 3          | 7:4                   |
| 12     | 3     | 3          | 4:3, HA               |
| 13     | 2     | 4          | 4:3, HA               |
| 14     | 1     | 3          | 4:3                   |
| 15     | 0     | 2          | HA (carry always 0)   |

In total: 8 × 7:4, 7 × 4:3, 1 full adder and 6 half adders. Each cell's outputs add up to its
inputs, so `c` is exact. No final carry-propagate adder is needed: each column ends with
one bit. Column 15 receives two bits, and because `a*b < 2^16` they are never both 1, so its
half adder's carry (`unused_col16`) is always 0. The price of this plan is a carry path that
runs through the columns from low to high, the same path as in hand Urdhwa multiplication.

The netlist in `urdhwa_mult8.sv` is written out instance by instance, one comment per
column. Wire names say where each bit comes from: `u74_c9_0_cout2` is the `cout2` of the
first 7:4 cell of column 9. To change the plan, re-apply the rule above column by column and
check that every column ends with exactly one bit.

## Departures from the published design

* **Cell count.** The paper lists four half adders, two full adders, five 7:4 and ten 4:3
  compressors. Those cells can remove at most 5·5 + 10·2 + 2·1 = 47 bits, but an exact 8x8
  product needs 64 terms reduced to 16 bits (48 removed). The paper gives no wiring, so the
  column plan above is this design's own and uses a different mix.
* **7:4 compressor internals.** The paper builds it from two 4:3 compressors, two full adders and one
  half adder, without giving the wiring or output weights. Here it uses two 4:3 compressors
  and one full adder, and `cout2` has weight 4, so the cell is exact.
* **4:3 compressor wiring.** The gate structure (two XOR-XNOR cells, four multiplexers) and the
  equations above are the published ones. Two things are this design's reading of the
  block diagram: which signal drives each multiplexer's select, and the use of `~cin` as the
  sum multiplexer's second input.
* **Only the proposed variant.** The paper compares three 4:3 cells: two full adders, four XOR gates with two
  multiplexers, and the proposed XOR-XNOR/MUX cell. It builds a multiplier from each. Only
  the proposed one is here.
* **Unsigned operands**, with no register stage. The paper says nothing about signedness or
  pipelining for this multiplier.
* The paper's area and delay numbers are for a Xilinx FPGA. They are not reproduced here.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each has a watchdog that fails the run if it hangs.

| testbench          | what it checks                                                              |
|--------------------|-----------------------------------------------------------------------------|
| `tb_half_adder`    | all 4 input pairs                                                          |
| `tb_full_adder`    | all 8 input triples                                                        |
| `tb_comp43`        | all 32 inputs against the identity; `cout` = majority and independent of `cin` |
| `tb_comp74`        | all 512 inputs against the weighted identity; every output toggles         |
| `tb_urdhwa_pp`     | each column word against a separate grouping of the terms, 2004 operand pairs |
| `tb_urdhwa_mult8`  | all 65,536 operand pairs against `a*b`                                      |

`tb_urdhwa_mult8` also counts how often each carry mechanism in the top was used, and fails if
one never was: a 4:3 `cout`, a 7:4 `cout1`, a 7:4 `cout2` skipping a column, a carry-in
reaching a compressor's `carry`, and `c[15]`. It reads these through hierarchical references
to instance names inside `urdhwa_mult8`. If you rename instances, update them.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
              --top-module tb_urdhwa_mult8 tb/tb_urdhwa_mult8.sv
    ./obj_dir/Vtb_urdhwa_mult8

Replace the testbench name to run any other one. The exhaustive multiplier test takes well
under a second. For lint: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/urdhwa_mult8.sv`.
