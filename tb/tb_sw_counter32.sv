// tb_sw_counter32: self-checking test of the signed-weight 3-2 counter.
// Five instances with different sign patterns: all positive, all negative,
// two positive and one negative, one positive and two negative, and a mix of
// partly active, partly negative digits. For random inputs the signed integer
// value of the two outputs (interpreted with the sign masks egg_pkg::c_sign /
// s_sign give for the inputs) must equal the signed sum of the three inputs,
// modulo 2^W. Values are evaluated here digit by digit in 64-bit arithmetic.
module tb_sw_counter32;

  import egg_pkg::*;

  localparam int W = 10;
  localparam int NC = 5;
  localparam mask_t FULL = mask_t'(10'h3ff);
  localparam mask_t AA [NC] = '{FULL, FULL, FULL, FULL, mask_t'(10'b00_1111_1100)};
  localparam mask_t AB [NC] = '{FULL, FULL, FULL, FULL, mask_t'(10'b01_1111_1000)};
  localparam mask_t AC [NC] = '{FULL, FULL, FULL, FULL, mask_t'(10'b00_0011_1111)};
  localparam mask_t SA [NC] = '{'0, FULL, '0,   FULL, mask_t'(10'b00_1111_1100)};
  localparam mask_t SB [NC] = '{'0, FULL, '0,   FULL, '0};
  localparam mask_t SC [NC] = '{'0, FULL, FULL, '0,   mask_t'(10'b00_0000_0111)};

  int checks = 0;
  int failures = 0;

  logic [W-1:0] a, b, c;
  logic [W-1:0] co [NC];
  logic [W-1:0] so [NC];

  for (genvar k = 0; k < NC; k++) begin : g_dut
    sw_counter32 #(.W(W), .ACT_A(AA[k]), .ACT_B(AB[k]), .ACT_C(AC[k]),
                   .SGN_A(SA[k]), .SGN_B(SB[k]), .SGN_C(SC[k])) u_dut (
      .a(a), .b(b), .c(c), .c_out(co[k]), .s_out(so[k]));
  end

  function automatic longint sval(logic [W-1:0] v, mask_t act, mask_t sgn);
    longint r;
    r = 0;
    for (int i = 0; i < W; i++)
      if (act[i] && v[i]) r += sgn[i] ? -(longint'(1) << i) : (longint'(1) << i);
    return r;
  endfunction

  task automatic check_all();
    longint lhs, rhs;
    #1;
    for (int k = 0; k < NC; k++) begin
      rhs = sval(a, AA[k], SA[k]) + sval(b, AB[k], SB[k]) + sval(c, AC[k], SC[k]);
      lhs = sval(co[k], c_active(AA[k], AB[k], AC[k]), c_sign(AA[k], AB[k], AC[k], SA[k], SB[k], SC[k]))
          + sval(so[k], s_active(AA[k], AB[k], AC[k]), s_sign(AA[k], AB[k], AC[k], SA[k], SB[k], SC[k]));
      checks++;
      if (W'(lhs) != W'(rhs)) begin
        failures++;
        if (failures < 10) $display("FAIL cfg %0d a=%h b=%h c=%h got %0d expected %0d", k, a, b, c, lhs, rhs);
      end
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
