// sw_counter32: signed-weight (SW) 3-2 counter node.
//
// Adds three vectors whose digits each carry their own sign: digit i of input a
// is worth -a[i]*2^i where SGN_A[i] is 1 and +a[i]*2^i otherwise (likewise for
// b and c). ACT_x marks the digits that can be non-zero; the others are ignored.
// The result is again a pair of SW vectors, carry c_out and sum s_out, with
//     val(c_out, C_SGN) + val(s_out, S_SGN) == val(a) + val(b) + val(c)
// where C_SGN / S_SGN are egg_pkg::c_sign / s_sign of the input masks: the
// output signs depend on the input signs.
//
// Per digit, with m the majority sign of the active inputs (ties count as +):
// the inputs of the minority sign are inverted and the three (or two) bits go
// through an ordinary full (or half) adder. Its carry has sign m; its sum, the
// XOR of the original bits, has sign m when all inputs agree and the opposite
// sign when they are mixed. No sign extension or two's-complement step is
// needed anywhere. One active input is a wire, none gives nothing.
// The carry of digit W-1 is dropped (exact modulo 2^W). Combinational.
// The node's function (carry-free addition of signed-weight operands with
// input-dependent output signs) is that of the method's library; the
// inversion scheme and the tie rule are this design's own construction.
module sw_counter32 #(
  parameter int unsigned    W     = 8,
  parameter egg_pkg::mask_t ACT_A = egg_pkg::low_mask(W),
  parameter egg_pkg::mask_t ACT_B = egg_pkg::low_mask(W),
  parameter egg_pkg::mask_t ACT_C = egg_pkg::low_mask(W),
  parameter egg_pkg::mask_t SGN_A = '0,
  parameter egg_pkg::mask_t SGN_B = '0,
  parameter egg_pkg::mask_t SGN_C = '0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] c_out,
  output logic [W-1:0] s_out
);

  logic [W-1:0] carry;   // carry leaving digit i, weight 2^(i+1)

  for (genvar i = 0; i < W; i++) begin : g_digit
    // Majority sign of this digit, fixed at elaboration.
    localparam logic M = egg_pkg::maj_sign(ACT_A, ACT_B, ACT_C, SGN_A, SGN_B, SGN_C, i);
    // Active input bits, with the minority-sign ones inverted; inactive ones 0.
    logic xa, xb, xc;
    assign xa = ACT_A[i] & (a[i] ^ (SGN_A[i] != M));
    assign xb = ACT_B[i] & (b[i] ^ (SGN_B[i] != M));
    assign xc = ACT_C[i] & (c[i] ^ (SGN_C[i] != M));
    assign carry[i] = (xa & xb) | (xa & xc) | (xb & xc);
    assign s_out[i] = (ACT_A[i] & a[i]) ^ (ACT_B[i] & b[i]) ^ (ACT_C[i] & c[i]);
  end

  assign c_out = {carry[W-2:0], 1'b0};

endmodule
