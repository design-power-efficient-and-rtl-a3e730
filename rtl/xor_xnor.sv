// xor_xnor: dual-rail XOR-XNOR cell. It gives both x = a ^ b and its complement xn, so a
// following multiplexer can pick either polarity without an inverter in the path. It is the
// first level of the 4:3 compressor. Combinational.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);
  always_comb begin
    x  = a ^ b;
    xn = ~(a ^ b);
  end
endmodule
