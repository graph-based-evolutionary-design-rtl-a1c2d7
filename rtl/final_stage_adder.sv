// final_stage_adder: final stage adder (FSA) of a counter tree.
//
// Turns the last two signed-weight vectors a and b of a tree into one
// two's-complement result y = val(a) + val(b) mod 2^OW, where digit i of a is
// worth -a[i]*2^i if SGN_A[i] and +a[i]*2^i otherwise, and only the digits in
// ACT_A count (likewise for b).
// A negative digit is rewritten as -d = (1 - d) - 1: the adder inverts it and
// the constant -sum(2^i) over all negative active digits of both inputs is
// added as a bias that cancels the offsets. The three operands then go through
// one carry-propagate addition. Combinational.
// Carry-propagate addition with bias cancellation is the node's defined job;
// folding the bias into one constant operand and leaving the adder
// architecture to synthesis are this design's choices.
module final_stage_adder #(
  parameter int unsigned    W     = 8,
  parameter int unsigned    OW    = 8,
  parameter egg_pkg::mask_t ACT_A = egg_pkg::low_mask(W),
  parameter egg_pkg::mask_t ACT_B = egg_pkg::low_mask(W),
  parameter egg_pkg::mask_t SGN_A = '0,
  parameter egg_pkg::mask_t SGN_B = '0
) (
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic [OW-1:0] y
);

  localparam egg_pkg::mask_t NEG_A = ACT_A & SGN_A & egg_pkg::low_mask(W);
  localparam egg_pkg::mask_t NEG_B = ACT_B & SGN_B & egg_pkg::low_mask(W);
  // Bias cancelling the -1 offsets of all inverted digits, modulo 2^OW.
  localparam logic [OW-1:0] BIAS = OW'(-(NEG_A[OW-1:0] + NEG_B[OW-1:0]));

  logic [OW-1:0] pa, pb;   // operands with negative digits inverted

  always_comb begin
    pa = '0;
    pb = '0;
    for (int unsigned i = 0; i < OW; i++)
      if (i < W) begin
        pa[i] = ACT_A[i] & (a[i] ^ SGN_A[i]);
        pb[i] = ACT_B[i] & (b[i] ^ SGN_B[i]);
      end
  end

  assign y = pa + pb + BIAS;

endmodule
