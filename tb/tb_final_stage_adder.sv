// tb_final_stage_adder: self-checking test of the final stage adder.
// Four instances: both inputs positive, a negative, both negative, and mixed
// per-digit signs with partly inactive digits and a wider output than input.
// For random inputs y must equal the signed value of a plus that of b,
// modulo 2^OW, with the values evaluated here digit by digit.
module tb_final_stage_adder;

  import egg_pkg::*;

  localparam int W  = 8;
  localparam int OW = 10;
  localparam int NC = 4;
  localparam mask_t FULL = mask_t'(8'hff);
  localparam mask_t AA [NC] = '{FULL, FULL, FULL, mask_t'(8'b1111_0110)};
  localparam mask_t AB [NC] = '{FULL, FULL, FULL, mask_t'(8'b0111_1111)};
  localparam mask_t SA [NC] = '{'0,   FULL, FULL, mask_t'(8'b1010_0100)};
  localparam mask_t SB [NC] = '{'0,   '0,   FULL, mask_t'(8'b0000_1111)};

  int checks = 0;
  int failures = 0;

  logic [W-1:0]  a, b;
  logic [OW-1:0] y [NC];

  for (genvar k = 0; k < NC; k++) begin : g_dut
    final_stage_adder #(.W(W), .OW(OW), .ACT_A(AA[k]), .ACT_B(AB[k]),
                        .SGN_A(SA[k]), .SGN_B(SB[k])) u_dut (.a(a), .b(b), .y(y[k]));
  end

  function automatic longint sval(logic [W-1:0] v, mask_t act, mask_t sgn);
    longint r;
    r = 0;
    for (int i = 0; i < W; i++)
      if (act[i] && v[i]) r += sgn[i] ? -(longint'(1) << i) : (longint'(1) << i);
    return r;
  endfunction

  task automatic check_all();
    longint exp;
    #1;
    for (int k = 0; k < NC; k++) begin
      exp = sval(a, AA[k], SA[k]) + sval(b, AB[k], SB[k]);
      checks++;
      if (y[k] != OW'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL cfg %0d a=%h b=%h got %h expected %h", k, a, b, y[k], OW'(exp));
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
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j += 17) begin
        a = W'(i); b = W'(j);
        check_all();
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
