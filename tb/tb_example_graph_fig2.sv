// tb_example_graph_fig2: exhaustive test of the 3-2 counter example graph.
// For all 16 values of the 4-bit input, y must equal 9x + S1, where
// S1 = (4x) ^ (2x) ^ x is the sum vector of the first counter, as obtained by
// eliminating the intermediate variables of the graph's equations.
module tb_example_graph_fig2;
  int checks = 0;
  int failures = 0;
  logic [3:0] x;
  logic [7:0] y;

  example_graph_fig2 u_dut (.x(x), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s1, exp;
    for (int v = 0; v < 16; v++) begin
      x = 4'(v);
      #1;
      s1 = (4 * v) ^ (2 * v) ^ v;
      exp = 9 * v + s1;
      checks++;
      if (int'(y) != exp) begin
        failures++;
        $display("FAIL x=%0d y=%0d expected %0d", v, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
