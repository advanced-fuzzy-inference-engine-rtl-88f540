// tb_md_condition -- self-checking test of the case detector.
//
// Drives the worked examples (crossover, full match, no match, triangles) and
// then random pairs of trapezoids and triangles. For each it works out the
// grade g with the reference sup-min model and checks that the case code agrees
// (MD_FULL for g = 1, MD_NONE for g = 0, a crossover case otherwise, EQ1/EQ3
// when A's plateau lies left of X's, EQ3/EQ4 only for two triangles) and that
// the selected gaps reproduce the crossover height: b2 / (b1 + b2) = g.
module tb_md_condition;
  import maxmin_pkg::*;
  import md_ref_pkg::*;

  logic [5:0] a1, a2, a3, a4, x1, x2, x3, x4;
  md_cond_e   cond;
  logic [5:0] b1, b2;
  int checks = 0, failures = 0;
  int seen[md_cond_e];

  md_condition dut (.a1, .a2, .a3, .a4, .x1, .x2, .x3, .x4, .cond, .b1, .b2);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int pa1, int pa2, int pa3, int pa4, int px1, int px2, int px3, int px4);
    ref_mf_t ra, rx;
    real g, hb;
    bit both_tri, ok;
    a1 = 6'(pa1); a2 = 6'(pa2); a3 = 6'(pa3); a4 = 6'(pa4);
    x1 = 6'(px1); x2 = 6'(px2); x3 = 6'(px3); x4 = 6'(px4);
    #1;
    ra = widen(pa1, pa2, pa3, pa4);
    rx = widen(px1, px2, px3, px4);
    g = grade(ra, rx);
    both_tri = (pa4 == 0) && (px4 == 0);
    if (g >= 1.0 - 1e-9) ok = (cond == MD_FULL) && b1 == 0 && b2 == 0;
    else if (g <= 1e-9) ok = (cond == MD_NONE) && b1 == 0 && b2 == 0;
    else begin
      hb = real'(b2) / (real'(b1) + real'(b2));
      ok = (b1 != 0) && (b2 != 0) && (hb - g < 1e-9) && (g - hb < 1e-9);
      if (ra.p3 < rx.p2) ok &= (cond == (both_tri ? MD_EQ3 : MD_EQ1));
      else               ok &= (cond == (both_tri ? MD_EQ4 : MD_EQ2));
    end
    seen[cond]++;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL A=(%0d,%0d,%0d,%0d) X=(%0d,%0d,%0d,%0d) cond=%s b1=%0d b2=%0d g=%f",
                 pa1, pa2, pa3, pa4, px1, px2, px3, px4, cond.name(), b1, b2, g);
    end
  endtask

  initial begin
    int p[4], r[4];
    // Worked examples: crossover with gaps 1 and 3, full match, no match.
    check(1, 3, 5, 7, 4, 6, 7, 9);
    checks++;
    if (!(cond == MD_EQ1 && b1 == 6'd1 && b2 == 6'd3)) begin
      failures++;
      $display("FAIL example gaps b1=%0d b2=%0d", b1, b2);
    end
    check(1, 3, 5, 7, 3, 5, 7, 9);
    check(8, 10, 12, 14, 1, 3, 5, 7);
    // Mirror image and triangles.
    check(4, 6, 7, 9, 1, 3, 5, 7);
    check(1, 3, 6, 0, 4, 7, 9, 0);
    check(4, 7, 9, 0, 1, 3, 6, 0);
    check(2, 5, 8, 0, 2, 5, 8, 0);
    check(1, 3, 6, 0, 2, 4, 8, 11);
    for (int n = 0; n < 20000; n++) begin
      random_mf(bit'($urandom_range(0, 2) == 0), p[0], p[1], p[2], p[3]);
      random_mf(bit'($urandom_range(0, 2) == 0), r[0], r[1], r[2], r[3]);
      check(p[0], p[1], p[2], p[3], r[0], r[1], r[2], r[3]);
    end
    for (int c = 0; c < 6; c++) begin
      checks++;
      if (!seen.exists(md_cond_e'(c))) begin
        failures++;
        $display("FAIL case %0d never produced", c);
      end
    end
    $display("cases: NONE=%0d EQ1=%0d EQ2=%0d EQ3=%0d EQ4=%0d FULL=%0d",
             seen[MD_NONE], seen[MD_EQ1], seen[MD_EQ2], seen[MD_EQ3], seen[MD_EQ4], seen[MD_FULL]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
