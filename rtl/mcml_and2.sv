// mcml_and2 -- two-input AND/NAND gate of the MCML gate library.
//
// A current-mode gate steers one tail current into one of two load
// branches, so every gate gives a true and a complementary output at no
// extra cost: OUT_P is a AND b, OUT_N is a NAND b. Here `y` is OUT_P; the
// NAND is its complement, the other rail of the same pair. In the
// multiplier the gate forms x_j*y_j and x_j*y_j*c_j inside the second type
// cell. Purely combinational; the gate delay (25 ps at 30 uA tail current,
// 34 ps at 20 uA) is not modelled. The differential input pairs are carried
// as single logic bits (the negative rail is the complement), and the bias
// inputs are analog and have no place here.
module mcml_and2 (
  input  logic a,
  input  logic b,
  output logic y    // a AND b (OUT_P)
);
  always_comb y = a & b;
endmodule
