// tb_bs_half_adder: exhaustive test of the bit-serial half-adder node:
// 2*co + s must equal x1 + x2 for all four input combinations.
module tb_bs_half_adder;
  int checks = 0;
  int failures = 0;
  logic x1, x2, co, s;

  bs_half_adder u_dut (.x1(x1), .x2(x2), .co(co), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x1, x2} = 2'(v);
      #1;
      checks++;
      if (2 * int'(co) + int'(s) != $countones(v)) begin
        failures++;
        $display("FAIL inputs %b: co=%b s=%b", 2'(v), co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
