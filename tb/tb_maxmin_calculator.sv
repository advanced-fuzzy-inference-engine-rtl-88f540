// tb_maxmin_calculator -- end-to-end test of the matching-degree calculator at
// its default sizes (6-bit points, 12-bit h).
//
// 1. The worked examples: A(1,3,5,7)/X(4,6,7,9) must give h = 00C (grade
//    3/4 on 16 levels); A(1,3,5,7)/X(3,5,7,9) gives FFF;
//    A(8,a,c,e)/X(1,3,5,7) gives 000.
// 2. Directed pairs for every case, two triangles (8 levels), a triangle
//    paired with a trapezoid, and a crossover so close to grade 1 that the
//    result is limited to 15.
// 3. A random stream of trapezoids and triangles with idle cycles between
//    them. Each result is compared with the reference sup-min model and must
//    appear exactly one clock after its inputs (one result per clock).
// Each mechanism (the six cases, triangle mode, mixed shapes, the limit, idle
// cycles) is counted, and one that never happened counts as a failure.
module tb_maxmin_calculator;
  import maxmin_pkg::*;
  import md_ref_pkg::*;

  localparam int HW = 12;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [5:0]  a1 = '0, a2 = '0, a3 = '0, a4 = '0;
  logic [5:0]  x1 = '0, x2 = '0, x3 = '0, x4 = '0;
  logic        out_valid;
  md_cond_e    cond;
  logic [11:0] h;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_case[6];
  int n_tri = 0, n_mixed = 0, n_limit = 0, n_idle = 0;

  typedef struct {
    int h;
    int issued;
    bit both_tri;
    bit mixed;
  } exp_t;
  exp_t pending[$];

  maxmin_calculator dut (
    .clk, .rst_n, .in_valid,
    .a1, .a2, .a3, .a4, .x1, .x2, .x3, .x4,
    .out_valid, .cond, .h
  );

  always #6.5ns clk = ~clk;   // about 76 MHz
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result checker: every out_valid must match the oldest outstanding input,
  // one clock after it was applied.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (pending.size() == 0) begin
        failures++;
        $display("FAIL out_valid with no input pending at cycle %0d", cycle);
      end else begin
        e = pending.pop_front();
        if (int'(h) != e.h || cycle - e.issued != 1) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d: h=%03h exp=%03h latency=%0d", cycle, h, e.h, cycle - e.issued);
        end
        if (int'(cond) < 6) n_case[int'(cond)]++;
        if (e.both_tri && (cond == MD_EQ3 || cond == MD_EQ4)) n_tri++;
        if (e.mixed && cond != MD_FULL && cond != MD_NONE) n_mixed++;
      end
    end
  end

  // Apply one pair for one clock.
  task automatic apply(int pa1, int pa2, int pa3, int pa4, int px1, int px2, int px3, int px4);
    exp_t e;
    @(negedge clk);
    a1 = 6'(pa1); a2 = 6'(pa2); a3 = 6'(pa3); a4 = 6'(pa4);
    x1 = 6'(px1); x2 = 6'(px2); x3 = 6'(px3); x4 = 6'(px4);
    in_valid = 1'b1;
    e.h = expected_h(pa1, pa2, pa3, pa4, px1, px2, px3, px4, HW);
    e.issued = cycle;
    e.both_tri = (pa4 == 0) && (px4 == 0);
    e.mixed = (pa4 == 0) != (px4 == 0);
    pending.push_back(e);
    if (is_limited(pa1, pa2, pa3, pa4, px1, px2, px3, px4)) n_limit++;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    n_idle++;
  endtask

  task automatic expect_now(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int p[4], r[4];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Worked example: crossover at grade 3/4, 16 levels -> 00C.
    apply(1, 3, 5, 7, 4, 6, 7, 9);
    idle();
    expect_now("example h = 00C", h == 12'h00C && cond == MD_EQ1);
    apply(1, 3, 5, 7, 3, 5, 7, 9);
    idle();
    expect_now("example h = FFF", h == 12'hFFF && cond == MD_FULL);
    apply(8, 10, 12, 14, 1, 3, 5, 7);
    idle();
    expect_now("example h = 000", h == 12'h000 && cond == MD_NONE);

    // Directed cases, back to back.
    apply(4, 6, 7, 9, 1, 3, 5, 7);          // X left of A
    apply(1, 3, 6, 0, 4, 7, 9, 0);          // two triangles, A left
    apply(4, 7, 9, 0, 1, 3, 6, 0);          // two triangles, X left
    apply(2, 5, 8, 0, 2, 5, 8, 0);          // identical triangles
    apply(1, 3, 6, 0, 2, 4, 8, 11);         // triangle against trapezoid
    apply(0, 1, 2, 40, 3, 3, 10, 20);       // grade just under 1: limited to 15
    apply(1, 3, 5, 7, 7, 9, 11, 13);        // supports touch at one point: 0
    apply(1, 3, 5, 7, 5, 9, 11, 13);        // plateaus touch: full
    idle();

    // Random stream with idle cycles.
    for (int n = 0; n < 1000000; n++) begin
      if ($urandom_range(0, 4) == 0) idle();
      random_mf(bit'($urandom_range(0, 2) == 0), p[0], p[1], p[2], p[3]);
      random_mf(bit'($urandom_range(0, 2) == 0), r[0], r[1], r[2], r[3]);
      apply(p[0], p[1], p[2], p[3], r[0], r[1], r[2], r[3]);
    end
    idle();
    idle();

    expect_now("all results delivered", pending.size() == 0);
    foreach (n_case[c]) expect_now($sformatf("case %0d happened", c), n_case[c] > 0);
    expect_now("two-triangle crossover happened", n_tri > 0);
    expect_now("mixed-shape crossover happened", n_mixed > 0);
    expect_now("limit to 2^i - 1 happened", n_limit > 0);
    expect_now("idle cycle happened", n_idle > 0);
    $display("mechanisms: NONE=%0d EQ1=%0d EQ2=%0d EQ3=%0d EQ4=%0d FULL=%0d tri=%0d mixed=%0d limit=%0d idle=%0d",
             n_case[0], n_case[1], n_case[2], n_case[3], n_case[4], n_case[5],
             n_tri, n_mixed, n_limit, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
