// bs_multiply_adder: bit-serial multiply-adder y = K1*x1 + K2*x2.
//
// Two LSB-first operand streams, one bit per clock, constant non-negative
// coefficients K1 and K2 (defaults 3 and 5). Multiplying a stream by 2^b is a
// delay of b cycles, so each input runs through a chain of bs_register nodes
// and every set bit b of its coefficient taps the chain after b registers.
// All taps are summed by a bs_multiop_adder (for 3*x1 + 5*x2: x1, 2*x1, x2 and
// 4*x2, four operands). The output bit of weight 2^t appears in cycle t, the
// cycle in which the input bits of weight 2^t are applied. For B-bit operands
// the result takes B + clog2(K1 + K2 + 1) cycles; zeros are fed after the
// word, after which every register is zero again. rst (synchronous, active
// high) clears all registers.
// The target function is the method's example; the tapped delay lines feeding
// one multi-operand adder are this design's own construction.
module bs_multiply_adder #(
  parameter int unsigned K1 = 3,
  parameter int unsigned K2 = 5
) (
  input  logic clk,
  input  logic rst,
  input  logic x1,
  input  logic x2,
  output logic y
);

  localparam int unsigned D1   = (K1 == 0) ? 1 : $clog2(K1 + 1);  // chain lengths
  localparam int unsigned D2   = (K2 == 0) ? 1 : $clog2(K2 + 1);
  localparam int unsigned NOPS = $countones(K1) + $countones(K2);

  // Position of the n-th set bit of k, counted from bit 0.
  function automatic int unsigned nth_one(int unsigned k, int unsigned n);
    int unsigned seen;
    seen = 0;
    for (int unsigned i = 0; i < 32; i++)
      if (k[i]) begin
        if (seen == n) return i;
        seen++;
      end
    return 0;
  endfunction

  // d1[b] = x1 delayed by b cycles = 2^b * x1, likewise d2.
  logic [D1-1:0] d1;
  logic [D2-1:0] d2;
  assign d1[0] = x1;
  assign d2[0] = x2;
  for (genvar b = 1; b < D1; b++) begin : g_d1
    bs_register u_reg (.clk(clk), .rst(rst), .x(d1[b-1]), .y(d1[b]));
  end
  for (genvar b = 1; b < D2; b++) begin : g_d2
    bs_register u_reg (.clk(clk), .rst(rst), .x(d2[b-1]), .y(d2[b]));
  end

  logic [NOPS-1:0] ops;
  for (genvar n = 0; n < NOPS; n++) begin : g_op
    if (n < $countones(K1)) begin : g_x1
      assign ops[n] = d1[nth_one(K1, n)];
    end else begin : g_x2
      assign ops[n] = d2[nth_one(K2, n - $countones(K1))];
    end
  end

  bs_multiop_adder #(.NOPS(NOPS)) u_add (
    .clk(clk),
    .rst(rst),
    .x  (ops),
    .y  (y)
  );

  initial assert (NOPS >= 2) else $error("bs_multiply_adder needs at least two non-zero coefficient bits");

endmodule
