// tb_example_bitserial_fig3: test of the 2-input bit-serial example graph.
// Random 8-bit words x1, x2 are shifted in LSB first after a reset and followed
// by zeros until T = 24 cycles have passed. The streams of y, w4, w5 and w8 are
// collected as integers (bit t weighs 2^t) and must satisfy the relation
// obtained by eliminating the other variables of the graph's equations:
//     2*y == 3*x1 + x2 - w4 - w5 + w8   (mod 2^T).
// The relation holds modulo 2^T because the loop w8 -> register -> half adder
// -> full adder -> w8 can hold a 1 for ever once the inputs are zero: such a
// stream 1 1 1 ... is a negative number in the 2-adic reading of bit streams.
// y, w4 and w5 must be back to zero at the end of the word, and both the
// nonlinear terms and the self-sustaining loop must have shown up.
module tb_example_bitserial_fig3;
  localparam int B = 8;
  localparam int T = 24;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst, x1, x2, y, w4, w5, w8;

  example_bitserial_fig3 u_dut (.clk(clk), .rst(rst), .x1(x1), .x2(x2),
                                .y(y), .w4(w4), .w5(w5), .w8(w8));

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
    longint iy, i4, i5, i8;
    int nonlinear = 0;
    int held = 0;
    x1 = 0; x2 = 0;
    repeat (300) begin
      rst = 1; @(posedge clk); #1; rst = 0;
      a = B'($urandom); b = B'($urandom);
      iy = 0; i4 = 0; i5 = 0; i8 = 0;
      for (int t = 0; t < T; t++) begin
        x1 = (t < B) ? a[t] : 1'b0;
        x2 = (t < B) ? b[t] : 1'b0;
        #1;
        iy += longint'(y)  << t;
        i4 += longint'(w4) << t;
        i5 += longint'(w5) << t;
        i8 += longint'(w8) << t;
        @(posedge clk); #1;
      end
      checks++;
      if (T'(2 * iy) != T'(3 * longint'(a) + longint'(b) - i4 - i5 + i8)) begin
        failures++;
        if (failures < 10) $display("FAIL x1=%0d x2=%0d y=%0d w4=%0d w5=%0d w8=%0d", a, b, iy, i4, i5, i8);
      end
      checks++;
      if (w8) held++;
      if ({y, w4, w5} != 3'b0) begin
        failures++;
        if (failures < 10) $display("FAIL outputs not flushed after the word");
      end
      if (2 * iy != 3 * longint'(a) + longint'(b)) nonlinear++;
    end
    // The graph is not an adder: the leftover terms must show up at least once.
    checks++;
    if (nonlinear == 0) begin
      failures++;
      $display("FAIL the nonlinear terms never appeared");
    end
    checks++;
    if (held == 0) begin
      failures++;
      $display("FAIL the w8 loop never held a 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
