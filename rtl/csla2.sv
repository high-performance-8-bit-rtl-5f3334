// csla2 -- 2-bit carry-select adder used for the final addition of the
// multiplier's right-boundary outputs.
//
// Two 2-bit ripple adders (two full adders each) compute a + b once with
// carry-in 0 and once with carry-in 1, in parallel with whatever produces
// the real carry-in. Three 2:1 muxes then pick the two sum bits and the
// carry-out, so the carry ripples through the chain of CSLAs at one mux
// delay per 2 bits. Interface: {co, s} = a + b + ci. Combinational.
// Four full adders and three 2:1 muxes, as the design specifies.
module csla2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       ci,
  output logic [1:0] s,
  output logic       co
);
  logic [1:0] s0, s1;   // sums for carry-in 0 / 1
  logic       k0, k1;   // internal ripple carries
  logic       co0, co1; // carry-outs for carry-in 0 / 1

  mcml_full_adder u_fa00 (.a(a[0]), .b(b[0]), .ci(1'b0), .s(s0[0]), .co(k0));
  mcml_full_adder u_fa01 (.a(a[1]), .b(b[1]), .ci(k0),   .s(s0[1]), .co(co0));
  mcml_full_adder u_fa10 (.a(a[0]), .b(b[0]), .ci(1'b1), .s(s1[0]), .co(k1));
  mcml_full_adder u_fa11 (.a(a[1]), .b(b[1]), .ci(k1),   .s(s1[1]), .co(co1));

  mcml_mux2 u_mux_s0 (.i0(s0[0]), .i1(s1[0]), .s(ci), .y(s[0]));
  mcml_mux2 u_mux_s1 (.i0(s0[1]), .i1(s1[1]), .s(ci), .y(s[1]));
  mcml_mux2 u_mux_co (.i0(co0),   .i1(co1),   .s(ci), .y(co));
endmodule
