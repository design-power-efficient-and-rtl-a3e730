// comp74: 7:4 compressor.
//
// It adds seven bits x[1..7] and two carry-ins (cin1, cin2), all of one weight w, and gives four
// outputs:
//   x1 + ... + x7 + cin1 + cin2 = sum + 2*(carry + cout1) + 4*cout2
// sum keeps weight w. carry and cout1 go to the next column (2w). cout2 goes two columns up (4w).
// Nine inputs can add up to 9, so one of the four outputs must have weight 4 for the sum to
// stay exact.
//
// How it works: two 4:3 compressors are cascaded. The first takes x1..x4 and cin1. The second
// takes the first one's sum, x5..x7 and cin2, and its sum is the cell's sum. That leaves four
// weight-2 bits. A full adder merges three of them (first carry, first cout, second carry): its
// sum becomes `carry` and its carry-out becomes `cout2`. The second compressor's cout is
// `cout1`.
//
// The ports (seven inputs, two carry-ins, carry, sum and two carry-outs) and building the cell
// from two 4:3 compressors follow the published design. The exact wiring, the weight-4 cout2,
// and using one full adder (the published cell also lists a second full adder and a half
// adder) are this design's own choices. Purely combinational. cout1 depends on cin1, which
// comes from a lower column, so the carry ripples through the columns but never loops.
module comp74 (
  input  logic [7:1] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic s_a, carry_a, cout_a;
  logic carry_b;

  comp43 u_c43_a (.x(x[4:1]), .cin(cin1),
                  .sum(s_a), .carry(carry_a), .cout(cout_a));
  comp43 u_c43_b (.x({x[7:5], s_a}), .cin(cin2),
                  .sum(sum), .carry(carry_b), .cout(cout1));
  full_adder u_fa (.a(carry_a), .b(cout_a), .cin(carry_b), .sum(carry), .cout(cout2));
endmodule
