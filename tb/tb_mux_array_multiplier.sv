// tb_mux_array_multiplier -- end-to-end, full-size self-check of the 8 x 8
// multiplier at its default parameters: all 65,536 operand pairs, one per
// clock cycle of the testbench, product compared with x * y computed by
// the simulator's own arithmetic.
//
// It also counts how often each mechanism of the array is exercised and
// fails if one never is:
//   * each of the four 4:1-mux selections (x_j, y_j) = 00, 01, 10, 11;
//   * the term x_j y_j c_j of a second type cell being 1 (running-sum carry
//     reaching a position where both operand bits are 1);
//   * a carry passed from one carry-select adder to the next;
//   * a carry out of the top full adder (product bit 15).
// It also checks that the open c_out of the last second type cell stays 0
// for every operand pair, which is what allows it to be left open.
// The multiplier is combinational: the product is checked half a clock
// after the operands change, i.e. a latency of zero cycles.
module tb_mux_array_multiplier;
  localparam int N          = 8;
  localparam int MAX_CYCLES = 70000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int             checks = 0, failures = 0;

  int n_sel [4];
  int n_xyc = 0, n_csla_carry = 0, n_top_carry = 0;

  mux_array_multiplier dut (.x(x), .y(y), .p(p));

  initial begin
    foreach (n_sel[k]) n_sel[k] = 0;
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      logic [N:0] sum_xy;
      logic [N:0] carries;   // carry into each bit of x + y
      @(negedge clk);
      {x, y} = (2 * N)'(v);
      sum_xy  = x + y;
      carries = sum_xy ^ {1'b0, x} ^ {1'b0, y};
      for (int j = 1; j < N; j++) n_sel[{x[j], y[j]}]++;
      for (int j = 0; j < N; j++) if (x[j] && y[j] && carries[j]) n_xyc++;
      @(posedge clk);
      checks++;
      if (p !== (2 * N)'(x * y)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", x, y, x * y, p);
      end
      if (dut.g_csla[1].co || dut.g_csla[2].co || dut.g_csla[3].co ||
          dut.g_csla[4].co || dut.g_csla[5].co) n_csla_carry++;
      if (dut.k_top) n_top_carry++;
      checks++;
      if (dut.g_row[N-1].co[N-1]) begin
        failures++;
        $display("FAIL last cell carry set for %0d * %0d", x, y);
      end
    end
    $display("mux selections 00/01/10/11: %0d %0d %0d %0d", n_sel[0], n_sel[1], n_sel[2], n_sel[3]);
    $display("x_j y_j c_j terms: %0d, CSLA-to-CSLA carries: %0d", n_xyc, n_csla_carry);
    $display("top adder carries: %0d", n_top_carry);
    foreach (n_sel[k]) begin
      checks++;
      if (n_sel[k] == 0) failures++;
    end
    checks += 3;
    if (n_xyc == 0)        failures++;
    if (n_csla_carry == 0) failures++;
    if (n_top_carry == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
