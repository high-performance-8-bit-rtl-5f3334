// tb_mcml_full_adder -- exhaustive self-check of the full adder: {co, s}
// must equal the integer sum a + b + ci for all eight inputs.
module tb_mcml_full_adder;
  localparam int MAX_CYCLES = 100;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, ci, s, co;
  int   checks = 0, failures = 0;

  mcml_full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {a, b, ci} = 3'(v);
      @(posedge clk);
      checks++;
      if (int'({co, s}) != int'(a) + int'(b) + int'(ci)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
    end
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
