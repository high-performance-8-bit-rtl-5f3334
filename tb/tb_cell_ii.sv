// tb_cell_ii -- exhaustive self-check of the second type cell over all 32
// combinations of its five inputs. Checks the running-sum adder
// ({c_j1, s_j} = x_j + y_j + c_j), the product bit xy = x_j y_j, and the
// diagonal completion ({c_out, s_out} = s_in + c_in + x_j y_j c_j).
module tb_cell_ii;
  localparam int MAX_CYCLES = 200;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic x_j, y_j, c_j, s_in, c_in;
  logic s_j, c_j1, s_out, c_out, xy;
  int   checks = 0, failures = 0;

  cell_ii dut (
    .x_j(x_j), .y_j(y_j), .c_j(c_j), .s_in(s_in), .c_in(c_in),
    .s_j(s_j), .c_j1(c_j1), .s_out(s_out), .c_out(c_out), .xy(xy)
  );

  initial begin
    for (int v = 0; v < 32; v++) begin
      @(negedge clk);
      {x_j, y_j, c_j, s_in, c_in} = 5'(v);
      @(posedge clk);
      checks += 3;
      if (int'({c_j1, s_j}) != int'(x_j) + int'(y_j) + int'(c_j)) begin
        failures++;
        $display("FAIL sum inputs=%b -> c_j1=%0b s_j=%0b", 5'(v), c_j1, s_j);
      end
      if (xy !== (x_j && y_j)) begin
        failures++;
        $display("FAIL xy inputs=%b -> xy=%0b", 5'(v), xy);
      end
      if (int'({c_out, s_out}) !=
          int'(s_in) + int'(c_in) + ((x_j && y_j && c_j) ? 1 : 0)) begin
        failures++;
        $display("FAIL pp inputs=%b -> c_out=%0b s_out=%0b", 5'(v), c_out, s_out);
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
