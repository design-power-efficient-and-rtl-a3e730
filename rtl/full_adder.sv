// full_adder: one-bit full adder (a 3:2 counter).
//
// Adds three bits of equal weight: sum = a ^ b ^ cin keeps the weight, cout (the majority of
// the three) carries to the next weight. Purely combinational. Used inside the 7:4
// compressor and wherever a multiplier column is left with three bits.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
