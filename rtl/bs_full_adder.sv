// bs_full_adder: full-adder node of the bit-serial circuits.
//
// Adds three bit-serial (LSB-first) streams one bit position per clock:
// 2*co + s = x1 + x2 + x3 for the bits of the current cycle. The carry co has
// twice the weight of s; in a bit-serial circuit it is brought to the weight
// of the next cycle by a bs_register or, as a free graph edge, used directly.
// Combinational, two XOR delays on the sum path. Node and equation are the
// method's.
module bs_full_adder (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic co,
  output logic s
);

  assign s  = x1 ^ x2 ^ x3;
  assign co = (x1 & x2) | (x1 & x3) | (x2 & x3);

endmodule
