// tb_bs_multiop_adder: test of the n-operand bit-serial adder for every operand
// count from 2 to 10. Each instance gets random 16-bit words, LSB first, one
// bit per clock, each followed by clog2(n) zero cycles, back to back and with
// no reset between words (the carries must flush by themselves). The output bit
// of each cycle must equal the bit of the same weight of the exact sum, in the
// same cycle as the inputs (no latency). Words with all-ones operands check the
// largest sums.
module tb_bs_multiop_adder;
  localparam int B = 16;
  localparam int NMIN = 2;
  localparam int NMAX = 10;
  localparam int WORDS = 200;

  int checks = 0;
  int failures = 0;
  logic clk = 0;
  logic rst;

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit done [NMAX+1];

  for (genvar n = NMIN; n <= NMAX; n++) begin : g_n
    localparam int L = B + $clog2(n);   // cycles per word
    logic [n-1:0] x;
    logic y;

    bs_multiop_adder #(.NOPS(n)) u_dut (.clk(clk), .rst(rst), .x(x), .y(y));

    initial begin
      logic [B-1:0] ops [n];
      longint sum;
      x = '0;
      done[n] = 1'b0;
      @(negedge rst);
      for (int w = 0; w < WORDS; w++) begin
        sum = 0;
        for (int i = 0; i < n; i++) begin
          ops[i] = (w == 0) ? '1 : B'($urandom);
          sum += longint'(ops[i]);
        end
        for (int t = 0; t < L; t++) begin
          for (int i = 0; i < n; i++) x[i] = (t < B) ? ops[i][t] : 1'b0;
          #1;
          checks++;
          if (y != sum[t]) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d word %0d bit %0d: got %b expected %b", n, w, t, y, sum[t]);
          end
          @(posedge clk); #1;
        end
      end
      done[n] = 1'b1;
    end
  end

  initial begin
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    #10;
    forever begin
      bit all;
      all = 1'b1;
      for (int n = NMIN; n <= NMAX; n++) all &= done[n];
      if (all) break;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
