// bs_half_adder: half-adder node of the bit-serial circuits.
//
// 2*co + s = x1 + x2 for the bits of the current cycle of two LSB-first
// streams. Combinational, one XOR delay. Node and equation are the method's.
module bs_half_adder (
  input  logic x1,
  input  logic x2,
  output logic co,
  output logic s
);

  assign s  = x1 ^ x2;
  assign co = x1 & x2;

endmodule
