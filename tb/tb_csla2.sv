// tb_csla2 -- exhaustive self-check of the 2-bit carry-select adder: all
// 32 combinations of a, b and ci, with {co, s} compared to a + b + ci.
// Also confirms that both carry-in values were exercised.
module tb_csla2;
  localparam int MAX_CYCLES = 200;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] a, b, s;
  logic       ci, co;
  int         checks = 0, failures = 0;
  int         n_ci1 = 0, n_co1 = 0;

  csla2 dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 32; v++) begin
      @(negedge clk);
      {ci, a, b} = 5'(v);
      @(posedge clk);
      checks++;
      if (int'({co, s}) != int'(a) + int'(b) + int'(ci)) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0b -> co=%0b s=%0d", a, b, ci, co, s);
      end
      if (ci) n_ci1++;
      if (co) n_co1++;
    end
    checks++;
    if (n_ci1 == 0 || n_co1 == 0) failures++;
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
