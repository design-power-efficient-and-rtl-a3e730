// urdhwa_mult8: 8x8 unsigned Urdhwa (vertical-and-crosswise) multiplier whose columns are
// reduced with 4:3 and 7:4 compressors.
//
// c = a * b. The 16-bit product is formed one column at a time, the way a column of an Urdhwa
// Tiryakbhyam multiplication is summed by hand. Column k gathers its crosswise terms
// a[i] & b[k-i] (urdhwa_pp) and every carry sent up from lower columns. Compressors then reduce
// those bits to a single product bit c[k], and each cell's carries go to column k+1 (and,
// for a 7:4 compressor's cout2, to column k+2). The cell for each step is picked by how many
// bits are left in the column: a 7:4 compressor (comp74) takes 7..9 bits, a 4:3 compressor
// (comp43) 4..5 bits, a full adder 3 bits and a half adder 2 bits. Unused cell inputs are
// tied to 0. A compressor's carry-in slots take the carry-outs (cout, cout1, cout2) of
// lower-column compressors first, so compressors chain carry-out to carry-in. The cell outputs in a column always add up to its inputs, so the product is
// exact. There is no final carry-propagate adder: column 15 already gets at most one set bit.
//
// Totals: 8 comp74, 7 comp43, 1 full adder, 6 half adders. The published design lists five
// 7:4 compressors, ten 4:3 compressors, two full adders and four half adders. Those cells
// can remove at most 47 of the 48 bits an exact 8x8 column reduction must remove (64 partial
// products down to 16 product bits), and the published wiring is not given, so this column
// plan is this design's own. The port names a[7:0], b[7:0] and c[15:0], the 8-bit size and
// the use of the proposed XOR-XNOR/MUX 4:3 compressor (also inside each 7:4) follow the
// published design.
//
// Interface: a, b unsigned operands; c unsigned product. Purely combinational, no clock or
// reset: c is valid one combinational delay after a and b settle.
module urdhwa_mult8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] c
);
  // pp[k][q]: the q-th crosswise term of column k (see urdhwa_pp).
  logic [7:0] pp [15];

  urdhwa_pp #(.WIDTH(8)) u_pp (.a(a), .b(b), .pp(pp));

  logic uha_c1_0_s,
        uha_c1_0_co,
        u43_c2_0_s,
        u43_c2_0_carry,
        u43_c2_0_cout,
        u43_c3_0_s,
        u43_c3_0_carry,
        u43_c3_0_cout,
        uha_c3_1_s,
        uha_c3_1_co,
        u74_c4_0_s,
        u74_c4_0_carry,
        u74_c4_0_cout1,
        u74_c4_0_cout2,
        u74_c5_0_s,
        u74_c5_0_carry,
        u74_c5_0_cout1,
        u74_c5_0_cout2,
        u74_c6_0_s,
        u74_c6_0_carry,
        u74_c6_0_cout1,
        u74_c6_0_cout2,
        uha_c6_1_s,
        uha_c6_1_co,
        u74_c7_0_s,
        u74_c7_0_carry,
        u74_c7_0_cout1,
        u74_c7_0_cout2,
        u43_c7_1_s,
        u43_c7_1_carry,
        u43_c7_1_cout,
        u74_c8_0_s,
        u74_c8_0_carry,
        u74_c8_0_cout1,
        u74_c8_0_cout2,
        u43_c8_1_s,
        u43_c8_1_carry,
        u43_c8_1_cout,
        u74_c9_0_s,
        u74_c9_0_carry,
        u74_c9_0_cout1,
        u74_c9_0_cout2,
        ufa_c9_1_s,
        ufa_c9_1_co,
        u74_c10_0_s,
        u74_c10_0_carry,
        u74_c10_0_cout1,
        u74_c10_0_cout2,
        u74_c11_0_s,
        u74_c11_0_carry,
        u74_c11_0_cout1,
        u74_c11_0_cout2,
        u43_c12_0_s,
        u43_c12_0_carry,
        u43_c12_0_cout,
        uha_c12_1_s,
        uha_c12_1_co,
        u43_c13_0_s,
        u43_c13_0_carry,
        u43_c13_0_cout,
        uha_c13_1_s,
        uha_c13_1_co,
        u43_c14_0_s,
        u43_c14_0_carry,
        u43_c14_0_cout,
        uha_c15_0_s,
        unused_col16;

  // Column 0: 1 partial product(s) + 0 carry bit(s) from lower columns
  assign c[0] = pp[0][0];
  // Column 1: 2 partial product(s) + 0 carry bit(s) from lower columns
  half_adder uha_c1_0 (.a(pp[1][0]), .b(pp[1][1]), .sum(uha_c1_0_s), .cout(uha_c1_0_co));
  assign c[1] = uha_c1_0_s;
  // Column 2: 3 partial product(s) + 1 carry bit(s) from lower columns
  comp43 u43_c2_0 (.x({uha_c1_0_co, pp[2][2], pp[2][1], pp[2][0]}), .cin(1'b0),
    .sum(u43_c2_0_s), .carry(u43_c2_0_carry), .cout(u43_c2_0_cout));
  assign c[2] = u43_c2_0_s;
  // Column 3: 4 partial product(s) + 2 carry bit(s) from lower columns
  comp43 u43_c3_0 (.x({pp[3][3], pp[3][2], pp[3][1], pp[3][0]}), .cin(u43_c2_0_cout),
    .sum(u43_c3_0_s), .carry(u43_c3_0_carry), .cout(u43_c3_0_cout));
  half_adder uha_c3_1 (.a(u43_c2_0_carry), .b(u43_c3_0_s), .sum(uha_c3_1_s), .cout(uha_c3_1_co));
  assign c[3] = uha_c3_1_s;
  // Column 4: 5 partial product(s) + 3 carry bit(s) from lower columns
  comp74 u74_c4_0 (.x({uha_c3_1_co, u43_c3_0_carry, pp[4][4], pp[4][3], pp[4][2], pp[4][1], pp[4][0]}), .cin1(u43_c3_0_cout), .cin2(1'b0),
    .sum(u74_c4_0_s), .carry(u74_c4_0_carry), .cout1(u74_c4_0_cout1), .cout2(u74_c4_0_cout2));
  assign c[4] = u74_c4_0_s;
  // Column 5: 6 partial product(s) + 2 carry bit(s) from lower columns
  comp74 u74_c5_0 (.x({u74_c4_0_carry, pp[5][5], pp[5][4], pp[5][3], pp[5][2], pp[5][1], pp[5][0]}), .cin1(u74_c4_0_cout1), .cin2(1'b0),
    .sum(u74_c5_0_s), .carry(u74_c5_0_carry), .cout1(u74_c5_0_cout1), .cout2(u74_c5_0_cout2));
  assign c[5] = u74_c5_0_s;
  // Column 6: 7 partial product(s) + 3 carry bit(s) from lower columns
  comp74 u74_c6_0 (.x({pp[6][6], pp[6][5], pp[6][4], pp[6][3], pp[6][2], pp[6][1], pp[6][0]}), .cin1(u74_c4_0_cout2), .cin2(u74_c5_0_cout1),
    .sum(u74_c6_0_s), .carry(u74_c6_0_carry), .cout1(u74_c6_0_cout1), .cout2(u74_c6_0_cout2));
  half_adder uha_c6_1 (.a(u74_c5_0_carry), .b(u74_c6_0_s), .sum(uha_c6_1_s), .cout(uha_c6_1_co));
  assign c[6] = uha_c6_1_s;
  // Column 7: 8 partial product(s) + 4 carry bit(s) from lower columns
  comp74 u74_c7_0 (.x({pp[7][6], pp[7][5], pp[7][4], pp[7][3], pp[7][2], pp[7][1], pp[7][0]}), .cin1(u74_c5_0_cout2), .cin2(u74_c6_0_cout1),
    .sum(u74_c7_0_s), .carry(u74_c7_0_carry), .cout1(u74_c7_0_cout1), .cout2(u74_c7_0_cout2));
  comp43 u43_c7_1 (.x({u74_c7_0_s, uha_c6_1_co, u74_c6_0_carry, pp[7][7]}), .cin(1'b0),
    .sum(u43_c7_1_s), .carry(u43_c7_1_carry), .cout(u43_c7_1_cout));
  assign c[7] = u43_c7_1_s;
  // Column 8: 7 partial product(s) + 5 carry bit(s) from lower columns
  comp74 u74_c8_0 (.x({pp[8][6], pp[8][5], pp[8][4], pp[8][3], pp[8][2], pp[8][1], pp[8][0]}), .cin1(u74_c6_0_cout2), .cin2(u74_c7_0_cout1),
    .sum(u74_c8_0_s), .carry(u74_c8_0_carry), .cout1(u74_c8_0_cout1), .cout2(u74_c8_0_cout2));
  comp43 u43_c8_1 (.x({u74_c8_0_s, u43_c7_1_cout, u43_c7_1_carry, u74_c7_0_carry}), .cin(1'b0),
    .sum(u43_c8_1_s), .carry(u43_c8_1_carry), .cout(u43_c8_1_cout));
  assign c[8] = u43_c8_1_s;
  // Column 9: 6 partial product(s) + 5 carry bit(s) from lower columns
  comp74 u74_c9_0 (.x({u74_c8_0_carry, pp[9][5], pp[9][4], pp[9][3], pp[9][2], pp[9][1], pp[9][0]}), .cin1(u74_c7_0_cout2), .cin2(u74_c8_0_cout1),
    .sum(u74_c9_0_s), .carry(u74_c9_0_carry), .cout1(u74_c9_0_cout1), .cout2(u74_c9_0_cout2));
  full_adder ufa_c9_1 (.a(u43_c8_1_carry), .b(u43_c8_1_cout), .cin(u74_c9_0_s), .sum(ufa_c9_1_s), .cout(ufa_c9_1_co));
  assign c[9] = ufa_c9_1_s;
  // Column 10: 5 partial product(s) + 4 carry bit(s) from lower columns
  comp74 u74_c10_0 (.x({ufa_c9_1_co, u74_c9_0_carry, pp[10][4], pp[10][3], pp[10][2], pp[10][1], pp[10][0]}), .cin1(u74_c8_0_cout2), .cin2(u74_c9_0_cout1),
    .sum(u74_c10_0_s), .carry(u74_c10_0_carry), .cout1(u74_c10_0_cout1), .cout2(u74_c10_0_cout2));
  assign c[10] = u74_c10_0_s;
  // Column 11: 4 partial product(s) + 3 carry bit(s) from lower columns
  comp74 u74_c11_0 (.x({u74_c10_0_cout1, u74_c10_0_carry, u74_c9_0_cout2, pp[11][3], pp[11][2], pp[11][1], pp[11][0]}), .cin1(1'b0), .cin2(1'b0),
    .sum(u74_c11_0_s), .carry(u74_c11_0_carry), .cout1(u74_c11_0_cout1), .cout2(u74_c11_0_cout2));
  assign c[11] = u74_c11_0_s;
  // Column 12: 3 partial product(s) + 3 carry bit(s) from lower columns
  comp43 u43_c12_0 (.x({u74_c11_0_carry, pp[12][2], pp[12][1], pp[12][0]}), .cin(u74_c10_0_cout2),
    .sum(u43_c12_0_s), .carry(u43_c12_0_carry), .cout(u43_c12_0_cout));
  half_adder uha_c12_1 (.a(u74_c11_0_cout1), .b(u43_c12_0_s), .sum(uha_c12_1_s), .cout(uha_c12_1_co));
  assign c[12] = uha_c12_1_s;
  // Column 13: 2 partial product(s) + 4 carry bit(s) from lower columns
  comp43 u43_c13_0 (.x({u43_c12_0_cout, u43_c12_0_carry, pp[13][1], pp[13][0]}), .cin(u74_c11_0_cout2),
    .sum(u43_c13_0_s), .carry(u43_c13_0_carry), .cout(u43_c13_0_cout));
  half_adder uha_c13_1 (.a(uha_c12_1_co), .b(u43_c13_0_s), .sum(uha_c13_1_s), .cout(uha_c13_1_co));
  assign c[13] = uha_c13_1_s;
  // Column 14: 1 partial product(s) + 3 carry bit(s) from lower columns
  comp43 u43_c14_0 (.x({uha_c13_1_co, u43_c13_0_cout, u43_c13_0_carry, pp[14][0]}), .cin(1'b0),
    .sum(u43_c14_0_s), .carry(u43_c14_0_carry), .cout(u43_c14_0_cout));
  assign c[14] = u43_c14_0_s;
  // Column 15: 0 partial product(s) + 2 carry bit(s) from lower columns
  // The two column-15 bits never both equal 1 (the product fits in 16 bits), so this
  // half adder's carry is always 0 and is kept as unused_col16.
  half_adder uha_c15_0 (.a(u43_c14_0_carry), .b(u43_c14_0_cout), .sum(uha_c15_0_s), .cout(unused_col16));
  assign c[15] = uha_c15_0_s;
endmodule
