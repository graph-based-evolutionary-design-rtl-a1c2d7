// tb_egg_top: end-to-end test of the top level at its default parameters.
// All five circuits run at once:
//   * the multiplier gets a new random 16-bit x every cycle (plus 0 and
//     all-ones) and must return 10075 * x;
//   * the 3-2 counter graph cycles through all 16 inputs and must return
//     9x + (4x ^ 2x ^ x);
//   * the bit-serial circuits get random words, LSB first, back to back with
//     no reset after the first: 8-bit words for the example graph, whose
//     relation 2y = 3x1 + x2 - w4 - w5 + w8 + w9(0) is checked modulo 2^T
//     (w9(0), the register content at the start of the word, is the last w8
//     of the previous word), and 16-bit words for the 8-operand adder and the
//     multiply-adder, every output bit compared with the exact sum in the
//     same cycle.
// Counted mechanisms, each of which must occur at least once: a multiplier
// product wider than 16 bits, an example-graph output with a non-zero
// nonlinear term, the w8 loop of the bit-serial example holding a 1 after the
// word, an adder word whose sum carries beyond 16 bits (flushed in the extra
// cycles), a multiply-adder word likewise, and a word that follows another
// without reset.
module tb_egg_top;
  localparam int B   = 16;   // bit-serial word width for adder and multiply-adder
  localparam int B3  = 8;    // word width for the bit-serial example graph
  localparam int T3  = 24;   // cycles per example-graph word
  localparam int NOPS = 8;
  localparam int WORDS = 150;
  localparam longint R = 10075;

  int checks = 0;
  int failures = 0;
  int n_wide_product = 0, n_nonlinear = 0, n_loop_held = 0;
  int n_add_carry = 0, n_madd_carry = 0, n_back_to_back = 0;

  logic clk = 0;
  logic rst;
  logic [15:0] mult_x;
  logic [29:0] mult_y;
  logic [3:0]  g2_x;
  logic [7:0]  g2_y;
  logic g3_x1, g3_x2, g3_y, g3_w4, g3_w5, g3_w8;
  logic [NOPS-1:0] add_x;
  logic add_y;
  logic madd_x1, madd_x2, madd_y;

  egg_top u_top (
    .clk, .rst, .mult_x, .mult_y, .g2_x, .g2_y,
    .g3_x1, .g3_x2, .g3_y, .g3_w4, .g3_w5, .g3_w8,
    .add_x, .add_y, .madd_x1, .madd_x2, .madd_y
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit done_comb = 0, done_g3 = 0, done_ser = 0;

  // Combinational circuits: new operands every cycle.
  initial begin
    mult_x = '0; g2_x = '0;
    for (int i = 0; i < 2000; i++) begin
      mult_x = (i == 0) ? '0 : (i == 1) ? '1 : 16'($urandom);
      g2_x = 4'(i);
      #1;
      check(longint'(mult_y) == R * longint'(mult_x), "multiplier product");
      if (mult_y > 30'hffff) n_wide_product++;
      check(int'(g2_y) == 9 * int'(g2_x) + ((4 * int'(g2_x)) ^ (2 * int'(g2_x)) ^ int'(g2_x)),
            "counter graph output");
      if (int'(g2_y) != 9 * int'(g2_x)) n_nonlinear++;
      @(posedge clk); #1;
    end
    done_comb = 1;
  end

  // Bit-serial example graph.
  initial begin
    logic [B3-1:0] a, b;
    longint iy, i4, i5, i8;
    longint w9_start;
    w9_start = 0;
    g3_x1 = 0; g3_x2 = 0;
    @(negedge rst);
    for (int w = 0; w < WORDS; w++) begin
      a = B3'($urandom); b = B3'($urandom);
      iy = 0; i4 = 0; i5 = 0; i8 = 0;
      for (int t = 0; t < T3; t++) begin
        g3_x1 = (t < B3) ? a[t] : 1'b0;
        g3_x2 = (t < B3) ? b[t] : 1'b0;
        #1;
        iy += longint'(g3_y)  << t;
        i4 += longint'(g3_w4) << t;
        i5 += longint'(g3_w5) << t;
        i8 += longint'(g3_w8) << t;
        @(posedge clk); #1;
      end
      check(T3'(2 * iy) == T3'(3 * longint'(a) + longint'(b) - i4 - i5 + i8 + w9_start),
            "bit-serial graph relation");
      if (g3_w8) n_loop_held++;
      w9_start = longint'(g3_w8);
    end
    done_g3 = 1;
  end

  // Multi-operand adder and multiply-adder: words back to back.
  initial begin
    logic [B-1:0] ops [NOPS];
    logic [B-1:0] a, b;
    longint sum, madd;
    add_x = '0; madd_x1 = 0; madd_x2 = 0;
    @(negedge rst);
    for (int w = 0; w < WORDS; w++) begin
      sum = 0;
      for (int i = 0; i < NOPS; i++) begin
        ops[i] = (w == 0) ? '1 : B'($urandom);
        sum += longint'(ops[i]);
      end
      a = (w == 0) ? '1 : B'($urandom);
      b = (w == 0) ? '1 : B'($urandom);
      madd = 3 * longint'(a) + 5 * longint'(b);
      if (sum >= (longint'(1) << B)) n_add_carry++;
      if (madd >= (longint'(1) << B)) n_madd_carry++;
      if (w > 0) n_back_to_back++;
      for (int t = 0; t < B + 4; t++) begin
        for (int i = 0; i < NOPS; i++) add_x[i] = (t < B) ? ops[i][t] : 1'b0;
        madd_x1 = (t < B) ? a[t] : 1'b0;
        madd_x2 = (t < B) ? b[t] : 1'b0;
        #1;
        check(add_y == sum[t], "8-operand adder bit");
        check(madd_y == madd[t], "multiply-adder bit");
        @(posedge clk); #1;
      end
    end
    done_ser = 1;
  end

  // One reset at the start.
  initial begin
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
  end

  initial begin
    wait (done_comb && done_g3 && done_ser);
    check(n_wide_product > 0, "mechanism: product wider than the input");
    check(n_nonlinear > 0,    "mechanism: nonlinear term of the counter graph");
    check(n_loop_held > 0,    "mechanism: self-sustaining loop of the bit-serial graph");
    check(n_add_carry > 0,    "mechanism: adder carries flushed after the word");
    check(n_madd_carry > 0,   "mechanism: multiply-adder carries flushed after the word");
    check(n_back_to_back > 0, "mechanism: words back to back without reset");
    $display("mechanisms: wide_product=%0d nonlinear=%0d loop_held=%0d add_carry=%0d madd_carry=%0d back_to_back=%0d",
             n_wide_product, n_nonlinear, n_loop_held, n_add_carry, n_madd_carry, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
