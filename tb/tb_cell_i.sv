// tb_cell_i -- exhaustive self-check of the first type cell over all 128
// combinations of its seven inputs. The expected partial-product bit is
// the i-th bit of x_j*Y + y_j*X written out case by case (0, x_i, y_i or
// s_i), and {c_out, s_out} must equal s_in + c_in + that bit.
module tb_cell_i;
  localparam int MAX_CYCLES = 400;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic x_i, y_i, s_i, x_j, y_j, s_in, c_in, s_out, c_out;
  logic pp_exp;
  int   checks = 0, failures = 0;

  cell_i dut (
    .x_i(x_i), .y_i(y_i), .s_i(s_i), .x_j(x_j), .y_j(y_j),
    .s_in(s_in), .c_in(c_in), .s_out(s_out), .c_out(c_out)
  );

  initial begin
    for (int v = 0; v < 128; v++) begin
      @(negedge clk);
      {x_i, y_i, s_i, x_j, y_j, s_in, c_in} = 7'(v);
      // x_j*Y + y_j*X: neither -> 0, only y_j -> X, only x_j -> Y, both -> X+Y
      if (x_j && y_j)      pp_exp = s_i;
      else if (y_j)        pp_exp = x_i;
      else if (x_j)        pp_exp = y_i;
      else                 pp_exp = 1'b0;
      @(posedge clk);
      checks++;
      if (int'({c_out, s_out}) != int'(s_in) + int'(c_in) + int'(pp_exp)) begin
        failures++;
        $display("FAIL inputs=%b -> c_out=%0b s_out=%0b", 7'(v), c_out, s_out);
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
