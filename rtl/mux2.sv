// mux2: 2-to-1 one-bit multiplexer, y = sel ? d1 : d0. Combinational. The 4:3 compressor is
// built from four of these: each select line is a signal that settles early, and each data
// input is a signal that arrives late.
module mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);
  always_comb y = sel ? d1 : d0;
endmodule
