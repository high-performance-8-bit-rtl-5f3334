// mux_array_multiplier -- unsigned N x N bit multiplier built as a
// multiplexer-based array (default N = 8, product 16 bits).
//
// Idea. Let X_j, Y_j be the j low-order bits of the operands. Then
//   X_{j+1} Y_{j+1} = X_j Y_j + 2^j Z_j + 2^(2j) x_j y_j,
//   Z_j = x_j Y_j + y_j X_j = { 0, X_j, Y_j, X_j + Y_j } selected by (x_j, y_j).
// So each step needs no multiplication, only a 4-way choice among 0, X_j,
// Y_j and the running sum S_j = X_j + Y_j, which is itself built one bit per
// step. The product is the sum over j of 2^j Z_j + 2^(2j) x_j y_j.
//
// Array. Cell (i, j), i <= j, has weight 2^(i+j). Row i holds a second type
// cell (cell_ii) at j = i and first type cells (cell_i) at j = i+1 .. N-1;
// diagonal j holds j first type cells and one second type cell. The second
// type cells form the carry chain of S = X + Y (c_0 = 0) and broadcast
// s_i along their row; each first type cell adds bit i of Z_j. Sums move
// straight down from (i-1, j+1) to (i, j), carries diagonally from
// (i-1, j) to (i, j); row 0 and the left edge (j = N-1) take 0.
// In all: N(N-1)/2 first type cells (one 4:1 mux and one full adder each)
// and N second type cells (two full adders, two AND gates each).
//
// Final addition. Row i leaves four bits on the right boundary: s_out and
// x_i y_i of cell (i, i) at weight 2^(2i), c_out of (i, i) and s_out of
// (i, i+1) at weight 2^(2i+1). p[0] = x_0 y_0 and p[1] = s_out of (0, 1)
// (cell (0, 0) adds only zeros, so its s_out and c_out are left open).
// Rows 1 .. N-2 each feed one 2-bit carry-select adder, chained by their
// carries (N-2 CSLAs), giving p[2] .. p[2N-3]. Row N-1 has no first type
// cell: one more full adder adds its two bits of weight 2^(2N-2) and the
// last CSLA carry, giving p[2N-2] and, as its carry, p[2N-1]. The c_out of
// cell (N-1, N-1) is left open: that cell's s_in is 0, and its c_out is
// never 1 for any operands (checked exhaustively for N = 2 .. 8 by the
// testbenches), so adding it would change nothing.
//
// Timing. Purely combinational, no clock or reset; the critical path runs
// about N+1 full-adder delays through the array and the CSLA chain.
// Following the design: the algorithm, both cell types, their wiring in
// rows and diagonals, and the CSLA final adder. This design's
// own choices: the handling of row 0 and the left edge with constant 0
// inputs, and taking the top product bit straight from the last adder's
// carry. Lint reports the open outputs named above, and the top bit of
// S = X + Y, as unused; they are unused by construction.
module mux_array_multiplier #(
  parameter int unsigned N = 8   // operand width
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  if (N < 2) begin : g_bad_n
    $error("mux_array_multiplier: N must be at least 2");
  end

  // Every cell's outputs live in its own row block, so each signal
  // depends only on earlier rows and the tools see no false loop.
  logic [N-1:0] sb;   // bits of S = X + Y, broadcast along the rows
  logic [N-1:0] xy;   // x_i AND y_i from each second type cell

  for (genvar i = 0; i < int'(N); i++) begin : g_row
    logic [N-1:0] so;     // s_out of cell (i, j), j >= i
    logic [N-1:0] co;     // c_out of cell (i, j), j >= i
    logic         c_j;    // carry of X + Y into bit i
    logic         c_j1;   // carry of X + Y into bit i+1

    if (i == 0) begin : g_cs0
      assign c_j = 1'b0;
    end else begin : g_cs
      assign c_j = g_row[i-1].c_j1;
    end

    // Cells left of the diagonal do not exist.
    if (i > 0) begin : g_unused
      assign so[i-1:0] = '0;
      assign co[i-1:0] = '0;
    end

    for (genvar j = i; j < int'(N); j++) begin : g_col
      logic s_in, c_in;
      if (i == 0 || j == int'(N) - 1) begin : g_s0
        assign s_in = 1'b0;
      end else begin : g_s
        assign s_in = g_row[i-1].so[j+1];
      end
      if (i == 0) begin : g_c0
        assign c_in = 1'b0;
      end else begin : g_c
        assign c_in = g_row[i-1].co[j];
      end

      if (j == i) begin : g_cell2
        cell_ii u_cell (
          .x_j   (x[j]),
          .y_j   (y[j]),
          .c_j   (c_j),
          .s_in  (s_in),
          .c_in  (c_in),
          .s_j   (sb[j]),
          .c_j1  (c_j1),
          .s_out (so[j]),
          .c_out (co[j]),
          .xy    (xy[j])
        );
      end else begin : g_cell1
        cell_i u_cell (
          .x_i   (x[i]),
          .y_i   (y[i]),
          .s_i   (sb[i]),
          .x_j   (x[j]),
          .y_j   (y[j]),
          .s_in  (s_in),
          .c_in  (c_in),
          .s_out (so[j]),
          .c_out (co[j])
        );
      end
    end
  end

  // Right-boundary final addition: one CSLA per row 1 .. N-2, chained.
  logic c_last;   // carry out of the last CSLA (0 when there is none)
  logic k_top;    // carry of the last full adder = p[2N-1]

  assign p[0] = xy[0];
  assign p[1] = g_row[0].so[1];

  for (genvar i = 1; i <= int'(N) - 2; i++) begin : g_csla
    logic ci, co;
    if (i == 1) begin : g_ci0
      assign ci = 1'b0;
    end else begin : g_ci
      assign ci = g_csla[i-1].co;
    end
    csla2 u_csla (
      .a  ({g_row[i].so[i+1], g_row[i].so[i]}),
      .b  ({g_row[i].co[i],   xy[i]}),
      .ci (ci),
      .s  (p[2*i+1:2*i]),
      .co (co)
    );
  end

  if (N > 2) begin : g_last_cy
    assign c_last = g_csla[N-2].co;
  end else begin : g_no_cy
    assign c_last = 1'b0;
  end

  mcml_full_adder u_fa_top (
    .a  (g_row[N-1].so[N-1]),
    .b  (xy[N-1]),
    .ci (c_last),
    .s  (p[2*N-2]),
    .co (k_top)
  );

  assign p[2*N-1] = k_top;
endmodule
