// mcml_full_adder -- full adder of the MCML library.
//
// One XOR3 gate makes the sum and one majority gate the carry, both fed by
// the same three inputs; together the two current-mode gates use 24
// transistors. Following the gate design, the carry input `ci` drives the
// bottom (lightest) level of the sum gate. Interface: a + b + ci =
// {co, s}. Combinational.
module mcml_full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  mcml_xor3 u_sum (.a(a), .b(b), .c(ci), .y(s));
  mcml_maj3 u_cy  (.a(a), .b(b), .c(ci), .y(co));
endmodule
