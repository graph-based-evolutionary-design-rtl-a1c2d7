// egg_top: the arithmetic circuits side by side.
//
// Five independent circuits built from the same small node libraries share
// this top only for convenience; none is connected to another.
//   * mult_*  : combinational constant-coefficient multiplier y = MULT_R * x
//               (16-bit unsigned x, R = 10075 by default) made of shifts,
//               signed-weight 3-2 counters and a final stage adder.
//   * g2_*    : the 3-2 counter example graph on a 4-bit input (y = 9x + S1).
//   * g3_*    : the 2-input bit-serial example graph, with its internal
//               streams w4, w5 and w8 brought out.
//   * add_*   : ADD_NOPS-operand bit-serial adder (8 operands by default).
//   * madd_*  : bit-serial multiply-adder y = MADD_K1*x1 + MADD_K2*x2 (3, 5).
// The bit-serial circuits take one bit per operand per rising edge of clk,
// LSB first, and answer in the same cycle; rst is synchronous, active high,
// and clears all of their registers. The combinational circuits ignore clk.
// The choice of circuits and their default sizes follow the method's
// experiments; placing them in one top is only for convenience.
module egg_top #(
  parameter int unsigned MULT_N   = 16,
  parameter int unsigned MULT_R   = 10075,
  parameter int unsigned ADD_NOPS = 8,
  parameter int unsigned MADD_K1  = 3,
  parameter int unsigned MADD_K2  = 5,
  localparam int unsigned MULT_OW = MULT_N + $clog2(MULT_R + 1)
) (
  input  logic                clk,
  input  logic                rst,
  // constant-coefficient multiplier
  input  logic [MULT_N-1:0]   mult_x,
  output logic [MULT_OW-1:0]  mult_y,
  // 3-2 counter example graph
  input  logic [3:0]          g2_x,
  output logic [7:0]          g2_y,
  // bit-serial example graph
  input  logic                g3_x1,
  input  logic                g3_x2,
  output logic                g3_y,
  output logic                g3_w4,
  output logic                g3_w5,
  output logic                g3_w8,
  // multi-operand bit-serial adder
  input  logic [ADD_NOPS-1:0] add_x,
  output logic                add_y,
  // bit-serial multiply-adder
  input  logic                madd_x1,
  input  logic                madd_x2,
  output logic                madd_y
);

  const_coeff_mult #(.N(MULT_N), .R(MULT_R)) u_mult (
    .x(mult_x),
    .y(mult_y)
  );

  example_graph_fig2 u_g2 (
    .x(g2_x),
    .y(g2_y)
  );

  example_bitserial_fig3 u_g3 (
    .clk(clk),
    .rst(rst),
    .x1 (g3_x1),
    .x2 (g3_x2),
    .y  (g3_y),
    .w4 (g3_w4),
    .w5 (g3_w5),
    .w8 (g3_w8)
  );

  bs_multiop_adder #(.NOPS(ADD_NOPS)) u_add (
    .clk(clk),
    .rst(rst),
    .x  (add_x),
    .y  (add_y)
  );

  bs_multiply_adder #(.K1(MADD_K1), .K2(MADD_K2)) u_madd (
    .clk(clk),
    .rst(rst),
    .x1 (madd_x1),
    .x2 (madd_x2),
    .y  (madd_y)
  );

endmodule
