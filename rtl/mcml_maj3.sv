// mcml_maj3 -- three-input majority (full-adder carry) gate of the MCML
// library.
//
// Output is 1 when at least two of a, b, c are 1. The current-mode circuit
// is a stack of differential pairs driven by A, B and C above one tail
// current source, with OUT_P / OUT_N as its two load branches. Written
// here as a&b | c&(a^b). Combinational; the 120 ps / 185 ps delays are not
// modelled. Differential pairs are carried as single bits; y is OUT_P.
module mcml_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  always_comb y = (a & b) | (c & (a ^ b));
endmodule
