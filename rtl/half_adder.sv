// half_adder: one-bit half adder, the smallest cell of the Urdhwa multiplier's column
// reduction.
//
// Adds two bits of equal weight: sum = a ^ b (same weight), cout = a & b (next weight up).
// Purely combinational, no clock. The multiplier uses it wherever a column is left with
// exactly two bits to merge.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end
endmodule
