// tb_mcml_mux4 -- exhaustive self-check of the 4:1 mux: all 16 data
// patterns under all 4 select codes (64 checks). The expected output is
// data input number 2*s1 + s0.
module tb_mcml_mux4;
  localparam int MAX_CYCLES = 200;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] i;
  logic       s1, s0, y;
  int         checks = 0, failures = 0;

  mcml_mux4 dut (.i(i), .s1(s1), .s0(s0), .y(y));

  initial begin
    for (int v = 0; v < 64; v++) begin
      @(negedge clk);
      {s1, s0, i} = 6'(v);
      @(posedge clk);
      checks++;
      if (y !== i[2*int'(s1) + int'(s0)]) begin
        failures++;
        $display("FAIL s1=%0b s0=%0b i=%b y=%0b", s1, s0, i, y);
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
