// tb_counter32: self-checking test of the 3-2 counter node.
// Three instances: all digits active (every position a full adder), the
// shifted-operand pattern of the first counter of a constant multiplier
// (4x, 2x, x of a 4-bit x: wires, half adders and full adders side by side),
// and a sparse pattern with positions of zero and one input. For random inputs
// it checks c_out + s_out == a + b + c (active digits only, modulo 2^W), that
// s_out is the XOR of the active input digits, that c_out[0] is 0 and that no
// output digit outside the active masks is ever set.
module tb_counter32;

  import egg_pkg::*;

  localparam int W = 8;
  localparam mask_t AA [3] = '{mask_t'(8'hff), mask_t'(8'b0011_1100), mask_t'(8'b0000_0011)};
  localparam mask_t AB [3] = '{mask_t'(8'hff), mask_t'(8'b0001_1110), mask_t'(8'b0000_1110)};
  localparam mask_t AC [3] = '{mask_t'(8'hff), mask_t'(8'b0000_1111), mask_t'(8'b0010_0000)};

  int checks = 0;
  int failures = 0;

  logic [W-1:0] a, b, c;
  logic [W-1:0] co [3];
  logic [W-1:0] so [3];

  for (genvar k = 0; k < 3; k++) begin : g_dut
    counter32 #(.W(W), .ACT_A(AA[k]), .ACT_B(AB[k]), .ACT_C(AC[k])) u_dut (
      .a(a), .b(b), .c(c), .c_out(co[k]), .s_out(so[k]));
  end

  task automatic check(bit ok, string what, int k);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cfg %0d %s a=%h b=%h c=%h", k, what, a, b, c);
    end
  endtask

  task automatic check_all();
    logic [W-1:0] ma, mb, mc, sum;
    logic [W-1:0] cact, sact;
    #1;
    for (int k = 0; k < 3; k++) begin
      ma = a & AA[k][W-1:0];
      mb = b & AB[k][W-1:0];
      mc = c & AC[k][W-1:0];
      sum = ma + mb + mc;
      cact = '0;
      for (int i = 0; i + 1 < W; i++)
        cact[i+1] = (32'(AA[k][i]) + 32'(AB[k][i]) + 32'(AC[k][i])) >= 2;
      sact = (AA[k] | AB[k] | AC[k]) & mask_t'(8'hff);
      check(W'(co[k] + so[k]) == sum, "value", k);
      check(so[k] == (ma ^ mb ^ mc), "sum digits", k);
      check((co[k] & ~cact) == '0 && (so[k] & ~sact) == '0, "inactive digits", k);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '1; c = '1; check_all();
    a = '0; b = '0; c = '0; check_all();
    repeat (3000) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
