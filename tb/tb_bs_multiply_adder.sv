// tb_bs_multiply_adder: test of the bit-serial multiply-adder y = 3*x1 + 5*x2
// (default coefficients) and of a second instance with K1 = 7, K2 = 2. Random
// 12-bit words go in LSB first, followed by zeros, back to back without reset;
// every output bit must equal the bit of the same weight of K1*x1 + K2*x2 in
// the cycle its input bits are applied.
module tb_bs_multiply_adder;
  localparam int B = 12;
  localparam int WORDS = 300;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst;
  logic x1, x2;
  logic y [2];

  bs_multiply_adder u_dut0 (.clk(clk), .rst(rst), .x1(x1), .x2(x2), .y(y[0]));
  bs_multiply_adder #(.K1(7), .K2(2)) u_dut1 (.clk(clk), .rst(rst), .x1(x1), .x2(x2), .y(y[1]));

  localparam int K1 [2] = '{3, 7};
  localparam int K2 [2] = '{5, 2};
  localparam int L = B + 4;   // cycles per word

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [B-1:0] a, b;
    longint exp [2];
    rst = 1; x1 = 0; x2 = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int w = 0; w < WORDS; w++) begin
      a = (w == 0) ? '1 : B'($urandom);
      b = (w == 0) ? '1 : B'($urandom);
      for (int k = 0; k < 2; k++) exp[k] = K1[k] * longint'(a) + K2[k] * longint'(b);
      for (int t = 0; t < L; t++) begin
        x1 = (t < B) ? a[t] : 1'b0;
        x2 = (t < B) ? b[t] : 1'b0;
        #1;
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (y[k] != exp[k][t]) begin
            failures++;
            if (failures < 10) $display("FAIL K=%0d,%0d x1=%0d x2=%0d bit %0d", K1[k], K2[k], a, b, t);
          end
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
