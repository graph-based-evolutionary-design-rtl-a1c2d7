// example_graph_fig2: a small circuit graph of 3-2 counter nodes.
//
// Shows how a data-flow graph of shifters and 3-2 counters becomes a bit-level
// circuit once its input format (here 4-bit unsigned) is fixed. The graph is
//     C1 + S1 = 4x + 2x + x        (counter 1; 4x and 2x are 2- and 1-bit shifts)
//     C2 + S2 = S1 + x + x         (counter 2)
//     C3 + S3 = C1 + C2 + 2*S2     (counter 3; 2*S2 is a 1-bit shift)
//     y       = C3 + S3            (final stage adder)
// which works out to y = 9x + S1. Since S1 = 4x ^ 2x ^ x is not a multiple of
// x, the graph is not a constant multiplier; it is the kind of intermediate
// individual whose function the symbolic check rejects. Each counter's digits
// become wires, half adders or full adders according to the digits that are
// active at its inputs (counter32). All vectors are 8 bits, enough for the
// largest result 9*15 + 63 = 198. Combinational.
// The graph and its equations are the method's worked example; the 8-bit
// width and the final stage adder realising y = C3 + S3 are this design's.
module example_graph_fig2 (
  input  logic [3:0] x,
  output logic [7:0] y
);

  import egg_pkg::*;

  localparam int unsigned W = 8;
  localparam mask_t A_X  = mask_t'(8'b0000_1111);   // x
  localparam mask_t A_2X = A_X << 1;                 // 2x
  localparam mask_t A_4X = A_X << 2;                 // 4x
  localparam mask_t A_C1 = c_active(A_4X, A_2X, A_X);
  localparam mask_t A_S1 = s_active(A_4X, A_2X, A_X);
  localparam mask_t A_C2 = c_active(A_S1, A_X, A_X);
  localparam mask_t A_S2 = s_active(A_S1, A_X, A_X);
  localparam mask_t A_2S2 = A_S2 << 1;
  localparam mask_t A_C3 = c_active(A_C1, A_C2, A_2S2);
  localparam mask_t A_S3 = s_active(A_C1, A_C2, A_2S2);

  logic [W-1:0] xw, c1, s1, c2, s2, c3, s3;

  assign xw = W'(x);

  counter32 #(.W(W), .ACT_A(A_4X), .ACT_B(A_2X), .ACT_C(A_X)) u_n1 (
    .a(xw << 2), .b(xw << 1), .c(xw), .c_out(c1), .s_out(s1));

  counter32 #(.W(W), .ACT_A(A_S1), .ACT_B(A_X), .ACT_C(A_X)) u_n2 (
    .a(s1), .b(xw), .c(xw), .c_out(c2), .s_out(s2));

  counter32 #(.W(W), .ACT_A(A_C1), .ACT_B(A_C2), .ACT_C(A_2S2)) u_n3 (
    .a(c1), .b(c2), .c(s2 << 1), .c_out(c3), .s_out(s3));

  final_stage_adder #(.W(W), .OW(W), .ACT_A(A_C3), .ACT_B(A_S3)) u_fsa (
    .a(c3), .b(s3), .y(y));

endmodule
