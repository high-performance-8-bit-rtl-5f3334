// tb_mcml_mux2 -- exhaustive self-check of the 2:1 mux: all eight input
// combinations against y = s ? i1 : i0.
module tb_mcml_mux2;
  localparam int MAX_CYCLES = 100;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic i0, i1, s, y, exp_y;
  int   checks = 0, failures = 0;

  mcml_mux2 dut (.i0(i0), .i1(i1), .s(s), .y(y));

  initial begin
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {s, i1, i0} = 3'(v);
      exp_y = s ? i1 : i0;
      @(posedge clk);
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL s=%0b i1=%0b i0=%0b y=%0b", s, i1, i0, y);
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
