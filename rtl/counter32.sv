// counter32: the 3-2 counter node of a circuit graph.
//
// Adds three unsigned binary vectors a, b and c without carry propagation and
// returns a carry vector c_out and a sum vector s_out with
//     c_out + s_out == a + b + c   (c_out already carries its weight of 2).
// Which digits of each input can be non-zero is fixed by the parameters ACT_A,
// ACT_B and ACT_C. Each digit position is built from the number of active
// inputs it receives: none gives nothing, one a wire, two a half adder and
// three a full adder. Inactive input digits are ignored, so the node's logic
// depends on where it sits in the graph, as in the circuit-graph model.
// The carry of digit W-1 is dropped (results are exact modulo 2^W).
// Purely combinational; the deepest path is one full adder.
// The per-digit rule (none / wire / half adder / full adder by the number of
// active inputs) is the node's defining rule; passing the active digits as bit
// masks and the vector width are this design's choices.
module counter32 #(
  parameter int unsigned   W     = 8,
  parameter egg_pkg::mask_t ACT_A = egg_pkg::low_mask(W),
  parameter egg_pkg::mask_t ACT_B = egg_pkg::low_mask(W),
  parameter egg_pkg::mask_t ACT_C = egg_pkg::low_mask(W)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] c_out,
  output logic [W-1:0] s_out
);

  logic [W-1:0] carry;   // carry leaving digit i, weight 2^(i+1)

  for (genvar i = 0; i < W; i++) begin : g_digit
    localparam int unsigned N = egg_pkg::n_active(ACT_A, ACT_B, ACT_C, i);
    // The active inputs of this digit, packed from bit 0 upwards.
    logic [2:0] in_bits;
    always_comb begin
      in_bits = '0;
      if (ACT_C[i]) in_bits = {in_bits[1:0], c[i]};
      if (ACT_B[i]) in_bits = {in_bits[1:0], b[i]};
      if (ACT_A[i]) in_bits = {in_bits[1:0], a[i]};
    end
    if (N == 3) begin : g_fa
      assign s_out[i] = in_bits[0] ^ in_bits[1] ^ in_bits[2];
      assign carry[i] = (in_bits[0] & in_bits[1]) | (in_bits[0] & in_bits[2]) |
                        (in_bits[1] & in_bits[2]);
    end else if (N == 2) begin : g_ha
      assign s_out[i] = in_bits[0] ^ in_bits[1];
      assign carry[i] = in_bits[0] & in_bits[1];
    end else if (N == 1) begin : g_wire
      assign s_out[i] = in_bits[0];
      assign carry[i] = 1'b0;
    end else begin : g_none
      assign s_out[i] = 1'b0;
      assign carry[i] = 1'b0;
    end
  end

  assign c_out = {carry[W-2:0], 1'b0};

endmodule
