// tb_md_divider -- exhaustive check of the fractional divider.
//
// Applies every numerator (6 bits) and denominator (7 bits) and compares q with
// floor(16 * num / den) worked out by integer arithmetic, or with 15 when the
// quotient would not be a fraction (num >= den, including den = 0).
module tb_md_divider;

  logic [5:0] num;
  logic [6:0] den;
  logic [3:0] q;
  int checks = 0, failures = 0;

  md_divider dut (.num, .den, .q);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_q;
    for (int d = 0; d < 128; d++) begin
      for (int n = 0; n < 64; n++) begin
        num = 6'(n);
        den = 7'(d);
        #1;
        exp_q = (n >= d) ? 15 : (n * 16) / d;
        checks++;
        if (int'(q) != exp_q) begin
          failures++;
          if (failures < 10) $display("FAIL num=%0d den=%0d q=%0d exp=%0d", n, d, q, exp_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
