// example_bitserial_fig3: a small 2-input bit-serial circuit graph.
//
// A worked example of how a circuit graph of full adders (FA), a half adder
// (HA) and 1-bit registers (R) is read as a set of equations over the integers
// carried by LSB-first bit streams. The netlist is
//     w1 = w2 = x1                  (fan-out of input x1)
//     w3 = R(w1)        ->  w3 = 2*w1
//     FA(w2, w3, w4)    ->  2*w5 + w6 = w2 + w3 + w4
//     HA(x2, w9)        ->  2*w4 + w7 = x2 + w9
//     w9 = R(w8)        ->  w9 = 2*w8
//     FA(w5, w6, w7)    ->  2*y  + w8 = w5 + w6 + w7
// and eliminating the other variables gives 2*y = 3*x1 + x2 - w4 - w5 + w8.
// The carries w4, w5 and y are used directly as graph edges, not through a
// register, so the circuit is not an adder: the leftover terms are its
// nonlinear part. w4, w5 and w8 are brought out so the relation can be
// observed. rst (synchronous, active high) clears both registers.
// The netlist and its equations are the method's worked example; the extra
// outputs w4, w5, w8 and the reset are this design's additions.
module example_bitserial_fig3 (
  input  logic clk,
  input  logic rst,
  input  logic x1,
  input  logic x2,
  output logic y,
  output logic w4,
  output logic w5,
  output logic w8
);

  logic w1, w2, w3, w6, w7, w9;

  assign w1 = x1;
  assign w2 = x1;

  bs_register   u_r1  (.clk(clk), .rst(rst), .x(w1), .y(w3));
  bs_full_adder u_fa1 (.x1(w2), .x2(w3), .x3(w4), .co(w5), .s(w6));
  bs_half_adder u_ha  (.x1(x2), .x2(w9), .co(w4), .s(w7));
  bs_register   u_r2  (.clk(clk), .rst(rst), .x(w8), .y(w9));
  bs_full_adder u_fa2 (.x1(w5), .x2(w6), .x3(w7), .co(y), .s(w8));

endmodule
