// tb_egg_pkg: test of the elaboration-time functions of egg_pkg, called here
// at run time.
//   * CSD recoding: for 1..70000 and random 31-bit values, sum of +2^k over
//     csd_pos minus 2^k over csd_neg equals r, no two adjacent digits are
//     non-zero, the two masks never overlap, and the digit count is no larger
//     than the number of ones of r.
//   * Counter mask rules, checked against a per-digit count: carry live where
//     at least two inputs are live, sum live where any is.
//   * Tree layout for the default coefficient 10075: 6 partial products,
//     3 levels, and the level-0 masks of the first and last partial product.
module tb_egg_pkg;
  import egg_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic longint csd_value(mask_t p, mask_t n);
    longint v;
    v = 0;
    for (int i = 0; i < 63; i++) begin
      if (p[i]) v += longint'(1) << i;
      if (n[i]) v -= longint'(1) << i;
    end
    return v;
  endfunction

  task automatic check_csd(int unsigned r);
    mask_t p, n, nz;
    p = csd_pos(r);
    n = csd_neg(r);
    nz = p | n;
    check(csd_value(p, n) == longint'(r), $sformatf("CSD value of %0d", r));
    check((nz & (nz >> 1)) == '0, $sformatf("CSD adjacency of %0d", r));
    check((p & n) == '0, $sformatf("CSD overlap of %0d", r));
    check(csd_weight(r) <= $countones(r), $sformatf("CSD weight of %0d", r));
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mask_t a, b, c, ca, sa;
    for (int unsigned r = 1; r <= 70000; r++) check_csd(r);
    repeat (2000) check_csd($urandom & 32'h7fff_ffff);

    repeat (500) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      c = {$urandom, $urandom};
      ca = c_active(a, b, c);
      sa = s_active(a, b, c);
      for (int i = 0; i < 63; i++) begin
        check(ca[i+1] == ((int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2), "carry live mask");
        check(sa[i] == (a[i] | b[i] | c[i]), "sum live mask");
      end
      check(ca[0] == 1'b0, "no carry into digit 0");
    end

    check(csd_weight(10075) == 6, "CSD weight of 10075");
    check(tree_levels(10075) == 3, "tree levels of 10075");
    check(tree_nops(10075, 1) == 4 && tree_nops(10075, 2) == 3 && tree_nops(10075, 3) == 2,
          "operand counts per level");
    // Partial product 0 is -x (digit -1 at 2^0); partial product 5 is +x << 13.
    check(tree_mask(10075, 16, 32, 0, 0, TREE_ACT) == mask_t'(32'h0000_ffff), "pp0 live mask");
    check(tree_mask(10075, 16, 32, 0, 0, TREE_SGN) == mask_t'(32'h0000_ffff), "pp0 sign mask");
    check(tree_mask(10075, 16, 32, 0, 5, TREE_ACT) == mask_t'(32'h1fff_e000), "pp5 live mask");
    check(tree_mask(10075, 16, 32, 0, 5, TREE_SGN) == '0, "pp5 sign mask");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
