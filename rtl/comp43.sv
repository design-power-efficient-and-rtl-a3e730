// comp43: 4:3 compressor built from XOR-XNOR cells and multiplexers.
//
// It adds four bits x[1..4] and a carry-in cin, all of one weight, and gives three outputs:
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// (this cell is often called a 4:2 compressor, after its two weight-2 outputs).
//
// How it works: two XOR-XNOR cells form x1^x2 and x3^x4, each with its complement. Then four
// multiplexers do the rest:
//   cout  = (x1^x2) ? x3 : x1                    never depends on cin
//   u     = (x1^x2) ? ~(x3^x4) : (x3^x4)         u = x1^x2^x3^x4
//   sum   = u ? ~cin : cin                       sum = u ^ cin
//   carry = u ? cin : x4
// Because cout does not depend on cin, a row of these cells can pass cout to the cin of the
// next column without the carry rippling along the row.
//
// The structure (two XOR-XNOR cells, four 2:1 multiplexers) and the equations for cout, u and
// carry follow the published design. Three things are this design's own choices: using the
// complement of cin as the sum multiplexer's second data input, the port order, and packing
// x1..x4 into x[4:1]. Purely combinational, no clock.
module comp43 (
  input  logic [4:1] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic x12, x12_n, x34, x34_n;
  logic u;
  logic cin_n;

  xor_xnor u_xx12 (.a(x[1]), .b(x[2]), .x(x12), .xn(x12_n));
  xor_xnor u_xx34 (.a(x[3]), .b(x[4]), .x(x34), .xn(x34_n));

  assign cin_n = ~cin;

  mux2 u_mux_cout  (.sel(x12), .d0(x[1]), .d1(x[3]),  .y(cout));
  mux2 u_mux_u     (.sel(x12), .d0(x34),  .d1(x34_n), .y(u));
  mux2 u_mux_sum   (.sel(u),   .d0(cin),  .d1(cin_n), .y(sum));
  mux2 u_mux_carry (.sel(u),   .d0(x[4]), .d1(cin),   .y(carry));

  // x12_n is the idle half of the first dual-rail cell: the cout multiplexer only needs the
  // true polarity of x1^x2.
  logic unused_x12_n;
  assign unused_x12_n = x12_n;
endmodule
