// tb_const_coeff_mult: self-checking test of the constant-coefficient
// multiplier. One instance per coefficient: the default R = 10075 and the
// thirteen 16-bit coefficients of the comparison table (971 ... 61073), plus
// the corner cases R = 1 (a single partial product) and R = 3 (two, so no
// counter level). Each instance gets x = 0, 1, 2^16-1 and random 16-bit values;
// the product is compared with R * x computed in 64-bit integer arithmetic.
// A second set of instances (R = 10075, 971, 45995, 1, 3) runs with
// X_SIGNED = 1 and is compared with R * x for x read as two's complement.
// The design is combinational, so the result is checked 1 ns after x changes.
module tb_const_coeff_mult;

  localparam int NC = 16;
  localparam int unsigned COEF [NC] = '{10075, 971, 8967, 12345, 19444, 23719,
                                        27937, 32168, 33591, 41123, 45995, 57091,
                                        59077, 61073, 1, 3};
  localparam int N = 16;

  int checks = 0;
  int failures = 0;

  logic [N-1:0] x;
  logic [63:0]  y [NC];

  for (genvar i = 0; i < NC; i++) begin : g_dut
    localparam int unsigned OW = N + $clog2(COEF[i] + 1);
    logic [OW-1:0] yi;
    const_coeff_mult #(.N(N), .R(COEF[i])) u_dut (.x(x), .y(yi));
    assign y[i] = 64'(yi);
  end

  localparam int NS = 5;
  localparam int unsigned SCOEF [NS] = '{10075, 971, 45995, 1, 3};
  logic [63:0] ys [NS];

  for (genvar i = 0; i < NS; i++) begin : g_sdut
    localparam int unsigned OW = N + $clog2(SCOEF[i] + 1);
    logic [OW-1:0] yi;
    const_coeff_mult #(.N(N), .R(SCOEF[i]), .X_SIGNED(1'b1)) u_dut (.x(x), .y(yi));
    assign ys[i] = 64'(signed'(yi));   // sign-extended
  end

  task automatic check_all();
    #1;
    for (int i = 0; i < NC; i++) begin
      longint unsigned exp;
      exp = longint'(COEF[i]) * longint'(x);
      checks++;
      if (y[i] != exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL R=%0d x=%0d got %0d expected %0d", COEF[i], x, y[i], exp);
      end
    end
    for (int i = 0; i < NS; i++) begin
      longint sexp;
      sexp = longint'(SCOEF[i]) * longint'(signed'(x));
      checks++;
      if (longint'(ys[i]) != sexp) begin
        failures++;
        if (failures < 10)
          $display("FAIL signed R=%0d x=%0d got %0d expected %0d", SCOEF[i], signed'(x), longint'(ys[i]), sexp);
      end
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;         check_all();
    x = 1;          check_all();
    x = '1;         check_all();
    x = 16'h8000;   check_all();
    x = 16'h5555;   check_all();
    x = 16'haaaa;   check_all();
    repeat (2000) begin
      x = N'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
