// cell_ii -- second type cell of the mux-based array multiplier, on the
// right boundary of row j (it is also the last cell of diagonal j).
//
// It holds two separate circuits.
//  * A full adder that extends the running sum S = X + Y by one bit:
//    s_j = x_j ^ y_j ^ c_j and carry c_{j+1}. s_j is broadcast along row j
//    to the first type cells; c_{j+1} goes to the next second type cell.
//  * The completion of diagonal j: the top bit of x_j*Y_j + y_j*X_j, which
//    is nonzero only when x_j = y_j = 1 and then equals c_j, so it is
//    x_j y_j c_j (two AND gates). A second full adder adds it to s_in and
//    c_in from the row above, at weight 2^(2j). The first AND gate's output
//    x_j y_j, also of weight 2^(2j), is brought out for the final adder.
//
// Outputs of weight 2^(2j): s_out and xy; of weight 2^(2j+1): c_out.
// Purely combinational. Structure and names follow the design.
module cell_ii (
  input  logic x_j,
  input  logic y_j,
  input  logic c_j,     // carry of X + Y into bit j
  input  logic s_in,
  input  logic c_in,
  output logic s_j,     // bit j of X + Y (broadcast as s_i along the row)
  output logic c_j1,    // carry of X + Y into bit j+1
  output logic s_out,
  output logic c_out,
  output logic xy       // x_j AND y_j
);
  logic xyc;

  mcml_full_adder u_fa_sum (.a(x_j), .b(y_j), .ci(c_j), .s(s_j), .co(c_j1));

  mcml_and2 u_and_xy  (.a(x_j), .b(y_j), .y(xy));
  mcml_and2 u_and_xyc (.a(xy),  .b(c_j), .y(xyc));

  mcml_full_adder u_fa_pp (.a(s_in), .b(xyc), .ci(c_in), .s(s_out), .co(c_out));
endmodule
