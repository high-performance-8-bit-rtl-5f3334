// tb_mux_array_multiplier_sizes -- checks that the array generator is
// right for every operand width from 2 to 7 bits: one multiplier of each
// width, each run exhaustively over all operand pairs (about 22,000
// products in all), each product compared with x * y. For each it also
// checks that the open c_out of the last second type cell stays 0.
module tb_mux_array_multiplier_sizes;
  localparam int MIN_N      = 2;
  localparam int MAX_N      = 7;
  localparam int MAX_CYCLES = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, done = 0;

  for (genvar n = MIN_N; n <= MAX_N; n++) begin : g_n
    logic [n-1:0]   x, y;
    logic [2*n-1:0] p;

    mux_array_multiplier #(.N(n)) dut (.x(x), .y(y), .p(p));

    initial begin
      for (int v = 0; v < (1 << (2 * n)); v++) begin
        @(negedge clk);
        {x, y} = (2 * n)'(v);
        @(posedge clk);
        checks++;
        if (p !== (2 * n)'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d: %0d * %0d = %0d, got %0d", n, x, y, x * y, p);
        end
        checks++;
        if (dut.g_row[n-1].co[n-1]) begin
          failures++;
          $display("FAIL N=%0d: last cell carry set for %0d * %0d", n, x, y);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == MAX_N - MIN_N + 1);
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
