// mcml_mux2 -- 2:1 multiplexer of the MCML gate library.
//
// y = s ? i1 : i0. In a current-mode circuit this is two differential pairs
// (one per data input) whose tails are switched by a select pair; logically
// it is a plain mux. The multiplier uses it three times in every 2-bit
// carry-select adder, to pick the two sum bits and the carry-out once the
// real carry-in is known. Combinational; the 35 ps / 50 ps gate delays are
// not modelled. Differential pairs are carried as single bits.
module mcml_mux2 (
  input  logic i0,
  input  logic i1,
  input  logic s,
  output logic y
);
  always_comb y = s ? i1 : i0;
endmodule
