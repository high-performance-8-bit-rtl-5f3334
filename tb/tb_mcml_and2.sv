// tb_mcml_and2 -- exhaustive self-check of the AND gate: all four input
// combinations, compared with the truth table written out below.
module tb_mcml_and2;
  localparam int MAX_CYCLES = 100;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, y;
  int   checks = 0, failures = 0;
  localparam logic [3:0] TRUTH = 4'b1000;   // index {a, b}

  mcml_and2 dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 4; v++) begin
      @(negedge clk);
      {a, b} = 2'(v);
      @(posedge clk);
      checks++;
      if (y !== TRUTH[v]) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b", a, b, y);
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
