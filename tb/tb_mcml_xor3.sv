// tb_mcml_xor3 -- exhaustive self-check of the 3-input XOR (sum) gate: the
// output must be the parity of the number of ones among a, b, c.
module tb_mcml_xor3;
  localparam int MAX_CYCLES = 100;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, c, y;
  int   checks = 0, failures = 0;

  mcml_xor3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {a, b, c} = 3'(v);
      @(posedge clk);
      checks++;
      if (y !== 1'((int'(a) + int'(b) + int'(c)) % 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b y=%0b", a, b, c, y);
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
