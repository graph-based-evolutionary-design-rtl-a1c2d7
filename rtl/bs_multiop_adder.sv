// bs_multiop_adder: n-operand bit-serial data-parallel adder.
//
// NOPS operands arrive in parallel, each as an LSB-first bit stream, one bit
// per clock; y streams out their sum, LSB first, in the same cycle as the
// input bits of the same weight (no pipeline latency). An n-operand sum of
// B-bit words needs B + clog2(n) cycles; feeding zeros for the extra cycles
// flushes the carries, after which all registers are zero again and the next
// word can follow immediately.
//
// Structure: every cycle the NOPS input bits and the NOPS-1 carries saved in
// the previous cycle all have the same weight. NOPS-1 full adders reduce these
// 2*NOPS-1 bits to one output bit; the carry of each full adder goes through
// its own 1-bit register (weight x2 = one cycle later) and re-enters the pool
// next cycle. The bits form a queue: full adder j takes pool entries 3j..3j+2
// and appends its sum, which arranges the adders into a Wallace-like tree of
// about log3(2*NOPS) full-adder stages. With NOPS = 2 this is the classic
// serial adder. rst (synchronous, active high) clears the carry registers.
// The target function and the node types (full adder, 1-bit register) are
// those of the method; this particular arrangement is this design's own
// regular construction, not a searched graph. For NOPS = 8 it has 3 full-adder
// stages, the fewest possible for 15 bits reduced three to one.
module bs_multiop_adder #(
  parameter int unsigned NOPS = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NOPS-1:0] x,
  output logic            y
);

  localparam int unsigned NFA   = NOPS - 1;
  localparam int unsigned NPOOL = 3 * NOPS - 2;

  logic [NPOOL-1:0] pool;   // all bits of the current weight
  logic [NFA-1:0]   carry;  // full-adder carries, weight of the next cycle
  logic [NFA-1:0]   saved;  // carries of the previous cycle

  assign pool[NOPS-1:0]         = x;
  assign pool[2*NOPS-2:NOPS]    = saved;

  for (genvar j = 0; j < NFA; j++) begin : g_fa
    bs_full_adder u_fa (
      .x1(pool[3*j]),
      .x2(pool[3*j+1]),
      .x3(pool[3*j+2]),
      .co(carry[j]),
      .s (pool[2*NOPS-1+j])
    );
    bs_register u_reg (
      .clk(clk),
      .rst(rst),
      .x  (carry[j]),
      .y  (saved[j])
    );
  end

  assign y = pool[NPOOL-1];

  initial assert (NOPS >= 2) else $error("bs_multiop_adder needs at least two operands");

endmodule
