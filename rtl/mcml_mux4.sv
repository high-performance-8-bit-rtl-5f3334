// mcml_mux4 -- 4:1 multiplexer of the MCML library (17 transistors).
//
// Four differential data pairs I0..I3 share one pair of loads. Their tails
// are switched two at a time by the S0 pairs, and those by the S1 pair
// sitting on the tail current source: S1 low routes the current to the
// (I0, I1) half, S1 high to (I2, I3); S0 low then picks I0 / I2 and S0
// high I1 / I3. Logically y = i[{s1, s0}]. In the multiplier the selects
// are the operand bits x_j, y_j of the first type cell. Combinational; the
// 160 ps / 240 ps delays are not modelled. Differential pairs are carried
// as single bits.
module mcml_mux4 (
  input  logic [3:0] i,   // I3..I0
  input  logic       s1,
  input  logic       s0,
  output logic       y
);
  always_comb begin
    unique case ({s1, s0})
      2'b00:   y = i[0];
      2'b01:   y = i[1];
      2'b10:   y = i[2];
      default: y = i[3];
    endcase
  end
endmodule
