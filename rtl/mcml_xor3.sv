// mcml_xor3 -- three-input XOR (full-adder sum) gate of the MCML library.
//
// The transistor circuit stacks three levels of differential pairs: the A
// pairs at the top, B in the middle and C at the bottom, next to the tail
// current source. Whichever pair conducts decides which load branch takes
// the current, giving OUT_P = A ^ B ^ C and OUT_N its complement. The
// carry-in of an adder is meant to go on the bottom (C) level, which is
// the lightest input load. Combinational; the 105 ps / 160 ps delays are
// not modelled. Differential pairs are carried as single bits; y is OUT_P.
module mcml_xor3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  always_comb y = a ^ b ^ c;
endmodule
