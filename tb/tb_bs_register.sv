// tb_bs_register: test of the 1-bit register node. A random stream goes in;
// after each rising edge y must equal the bit applied in the previous cycle
// (one cycle of latency), and 0 in the cycle after a reset. As integers of
// LSB-first streams this is y = 2*x, which is checked on whole 16-bit words.
module tb_bs_register;
  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst, x, y;
  logic prev;

  bs_register u_dut (.clk(clk), .rst(rst), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [17:0] xin, yout;
    rst = 1; x = 1;
    @(posedge clk); #1;
    check(y == 1'b0, "reset clears");
    rst = 0;
    repeat (200) begin
      x = 1'($urandom);
      prev = x;
      @(posedge clk); #1;
      check(y == prev, "one-cycle delay");
    end
    // Whole words: the output stream is worth twice the input stream.
    repeat (50) begin
      rst = 1; @(posedge clk); #1; rst = 0;
      xin = {2'b00, 16'($urandom)};
      yout = '0;
      for (int t = 0; t < 18; t++) begin
        x = xin[t];
        #1 yout[t] = y;
        @(posedge clk); #1;
      end
      check(yout == 18'(2 * xin), "y = 2x on words");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
