// cell_i -- first type cell of the mux-based array multiplier.
//
// The cell at row i, diagonal j (i < j) adds one bit of weight 2^(i+j) of
// the partial product x_j*Y_j + y_j*X_j, where X_j, Y_j are the operands'
// j low-order bits. That bit depends only on the operand bits at j:
//   x_j y_j = 00 -> 0,  01 -> x_i,  10 -> y_i,  11 -> s_i
// where s_i is bit i of X + Y, formed by the second type cell of row i.
// A 4:1 mux selected by (x_j, y_j) picks it and a full adder adds it to
// the sum (s_in) and carry (c_in) arriving from the row above.
//
// Interface: x_i, y_i, s_i run along the row; x_j, y_j come down the
// diagonal. s_out (weight 2^(i+j)) goes straight down to the next row, c_out
// (weight 2^(i+j+1)) diagonally to the next row. The array wires the row
// and diagonal broadcasts itself, so the cell has no feed-through ports.
// Purely combinational: one mux delay then one full-adder delay.
// The mux / full-adder structure and the signal names follow the design;
// which operand bit drives which select input is this design's choice
// (both orders give the same product).
module cell_i (
  input  logic x_i,
  input  logic y_i,
  input  logic s_i,
  input  logic x_j,
  input  logic y_j,
  input  logic s_in,
  input  logic c_in,
  output logic s_out,
  output logic c_out
);
  logic pp;  // selected partial-product bit

  mcml_mux4 u_mux (
    .i  ({s_i, y_i, x_i, 1'b0}),
    .s1 (x_j),
    .s0 (y_j),
    .y  (pp)
  );

  mcml_full_adder u_fa (
    .a  (s_in),
    .b  (pp),
    .ci (c_in),
    .s  (s_out),
    .co (c_out)
  );
endmodule
