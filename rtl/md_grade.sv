// md_grade -- output stage of the max-min calculator: turns the case and the
// divider result into the discrete matching degree h.
//
//   MD_FULL          h = all ones ("FFF"h for 12 bits), grade 1
//   MD_NONE          h = 0, grade 0
//   MD_EQ1, MD_EQ2   h = 16 - q        (trapezoids, 16 levels, i = 4)
//   MD_EQ3, MD_EQ4   h = 8 - (q >> 1)  (triangles,   8 levels, i = 3)
//
// (in general 2^QW - q and 2^TQ - (q >> (QW - TQ)))
//
// q is floor(16 * b1 / (b1 + b2)); dropping its last digit gives
// floor(8 * b1 / (b1 + b2)), so one divider serves both resolutions. A crossover
// grade is strictly between 0 and 1, so the result is limited to 1 .. 2^i - 1:
// a crossover so close to the top that truncation would give 2^i is reported as
// 2^i - 1. The 2^i - d formula, the levels and the FFF/000 codes follow the
// document; the truncation and the clamp are this design's choices.
//
// Purely combinational.
module md_grade
  import maxmin_pkg::*;
#(
  parameter int unsigned HW = maxmin_pkg::MD_HW,
  parameter int unsigned QW = maxmin_pkg::TRAP_BITS,  // trapezoid levels 2^QW
  parameter int unsigned TQ = maxmin_pkg::TRI_BITS    // triangle levels 2^TQ, TQ <= QW
) (
  input  md_cond_e      cond,
  input  logic [QW-1:0] q,
  output logic [HW-1:0] h
);

  logic [HW-1:0] y1;   // 2^i
  logic [HW-1:0] d1;   // 2^i * b1 / (b1 + b2), truncated
  logic [HW-1:0] diff;
  logic          tri_cross;

  assign tri_cross = (cond == MD_EQ3) || (cond == MD_EQ4);
  assign y1        = tri_cross ? HW'(1 << TQ) : HW'(1 << QW);
  assign d1        = tri_cross ? HW'(q >> (QW - TQ)) : HW'(q);
  assign diff      = y1 - d1;

  always_comb begin
    unique case (cond)
      MD_FULL: h = '1;
      MD_NONE: h = '0;
      default: h = (d1 == '0) ? y1 - HW'(1) : diff;
    endcase
  end

endmodule
