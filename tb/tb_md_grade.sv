// tb_md_grade -- exhaustive check of the output stage.
//
// For every case code and every divider result q it compares h with the value
// given by the quantisation rule: FFF for a full match, 000 for none,
// 16 - q (trapezoids) or 8 - q/2 (triangles), at most 2^i - 1.
module tb_md_grade;
  import maxmin_pkg::*;

  md_cond_e    cond;
  logic [3:0]  q;
  logic [11:0] h;
  int checks = 0, failures = 0;

  md_grade dut (.cond, .q, .h);

  initial begin : watchdog
    #1ms;
    failures++;
    // Worked example: 16 * 1/4 = 4 subtracted from 2^4 gives 00C.
    cond = MD_EQ1;
    q    = 4'd4;
    #1;
    checks++;
    if (h != 12'h00C) begin
      failures++;
      $display("FAIL example h=%03h", h);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int exp_h, d;
    automatic md_cond_e codes[6] = '{MD_NONE, MD_EQ1, MD_EQ2, MD_EQ3, MD_EQ4, MD_FULL};
    foreach (codes[c]) begin
      for (int k = 0; k < 16; k++) begin
        cond = codes[c];
        q    = 4'(k);
        #1;
        case (codes[c])
          MD_FULL: exp_h = 4095;
          MD_NONE: exp_h = 0;
          MD_EQ1, MD_EQ2: begin
            d = k;
            exp_h = (d == 0) ? 15 : 16 - d;
          end
          default: begin
            d = k / 2;
            exp_h = (d == 0) ? 7 : 8 - d;
          end
        endcase
        checks++;
        if (int'(h) != exp_h) begin
          failures++;
          $display("FAIL cond=%0d q=%0d h=%0d exp=%0d", codes[c], k, h, exp_h);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
