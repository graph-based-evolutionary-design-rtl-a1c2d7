// const_coeff_mult: fast constant-coefficient multiplier y = R * x.
//
// A combinational multiplier built only from the node library of the circuit
// graphs: fixed shifts, signed-weight 3-2 counters and one final stage adder.
//   1. R is recoded at elaboration into canonic signed-digit form (digits
//      -1/0/+1, fewest non-zero digits). Each non-zero digit d_k contributes a
//      partial product x << k whose digits all carry the sign of d_k; the
//      shifts are wiring.
//   2. The partial products are reduced by levels of sw_counter32 nodes
//      (Wallace style, three operands into two per counter) until two
//      operands remain. Negative partial products need no sign extension or
//      complementing: the signed-weight counters carry the signs per digit.
//   3. final_stage_adder converts the pair into the unsigned product, adding
//      a constant that cancels the bias of the negative digits.
// Internal vectors are OW+2 bits wide and all arithmetic is exact modulo
// 2^(OW+2); since 0 <= R*x < 2^OW the low OW bits are the exact product.
// x is unsigned by default. With X_SIGNED = 1, x is two's complement and so is
// y: the top digit of x simply gets negative weight in every partial product,
// again without sign extension (-2^(N-1)*R .. (2^(N-1)-1)*R fits in OW bits).
// Delay: tree_levels(R) counter stages plus the final adder;
// for R = 10075 (CSD weight 6) that is 3 counter stages.
// The target (16-bit x, R = 10075) and the node types are the method's. The
// CSD recoding, the regular reduction topology (not a searched graph), the
// unsigned default input, the X_SIGNED option and the widths are this
// design's choices.
module const_coeff_mult #(
  parameter int unsigned N = 16,      // input width
  parameter int unsigned R = 10075,   // constant coefficient, R >= 1
  parameter bit X_SIGNED = 1'b0,      // 1: x and y are two's complement
  localparam int unsigned OW = N + $clog2(R + 1)
) (
  input  logic [N-1:0]  x,
  output logic [OW-1:0] y
);

  import egg_pkg::*;

  localparam int unsigned IW   = OW + 2;
  localparam int unsigned NLEV = tree_levels(R);
  localparam int unsigned NOP0 = tree_nops(R, 0);

  // Level 0: one shifted copy of x per non-zero CSD digit.
  logic [IW-1:0] pp [MAXOPS];
  for (genvar k = 0; k < MAXOPS; k++) begin : g_pp
    if (k < NOP0) begin : g_used
      localparam int unsigned P = csd_nth_pos(R, k);
      assign pp[k] = IW'({{(IW - N){1'b0}}, x} << P);
    end else begin : g_unused
      assign pp[k] = '0;
    end
  end

  // Level l reads the operands of level l-1 (cur) and drives those of level l
  // (nxt).
  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int unsigned NL = tree_nops(R, l);
    localparam int unsigned G  = NL / 3;
    logic [IW-1:0] cur [MAXOPS];
    logic [IW-1:0] nxt [MAXOPS];
    if (l == 0) begin : g_first
      assign cur = pp;
    end else begin : g_next
      assign cur = g_lvl[l-1].nxt;
    end
    for (genvar k = 0; k < MAXOPS; k++) begin : g_op
      if (k < G) begin : g_cnt
        sw_counter32 #(
          .W    (IW),
          .ACT_A(tree_mask(R, N, IW, l, 3*k,   TREE_ACT, X_SIGNED)),
          .ACT_B(tree_mask(R, N, IW, l, 3*k+1, TREE_ACT, X_SIGNED)),
          .ACT_C(tree_mask(R, N, IW, l, 3*k+2, TREE_ACT, X_SIGNED)),
          .SGN_A(tree_mask(R, N, IW, l, 3*k,   TREE_SGN, X_SIGNED)),
          .SGN_B(tree_mask(R, N, IW, l, 3*k+1, TREE_SGN, X_SIGNED)),
          .SGN_C(tree_mask(R, N, IW, l, 3*k+2, TREE_SGN, X_SIGNED))
        ) u_cnt (
          .a    (cur[3*k]),
          .b    (cur[3*k+1]),
          .c    (cur[3*k+2]),
          .c_out(nxt[2*k]),
          .s_out(nxt[2*k+1])
        );
      end
      // Operands left over after the groups of three pass down unchanged.
      if (k < NL % 3) begin : g_pass
        assign nxt[2*G+k] = cur[3*G+k];
      end
      // Unused slots of the next level.
      if (k >= 2*G + NL % 3) begin : g_zero
        assign nxt[k] = '0;
      end
    end
  end

  // Operands reaching the final stage adder.
  logic [IW-1:0] fin [MAXOPS];
  if (NLEV == 0) begin : g_fin0
    assign fin = pp;
  end else begin : g_fin
    assign fin = g_lvl[NLEV-1].nxt;
  end

  final_stage_adder #(
    .W    (IW),
    .OW   (OW),
    .ACT_A(tree_mask(R, N, IW, NLEV, 0, TREE_ACT, X_SIGNED)),
    .ACT_B(tree_mask(R, N, IW, NLEV, 1, TREE_ACT, X_SIGNED)),
    .SGN_A(tree_mask(R, N, IW, NLEV, 0, TREE_SGN, X_SIGNED)),
    .SGN_B(tree_mask(R, N, IW, NLEV, 1, TREE_SGN, X_SIGNED))
  ) u_fsa (
    .a(fin[0]),
    .b(fin[1]),
    .y(y)
  );

endmodule
