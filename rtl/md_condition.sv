// md_condition -- case detector and operand selector of the max-min calculator.
//
// Given the break points of an antecedent MF A = (a1..a4) and a fuzzified
// input MF X = (x1..x4), it decides which of the six mutually exclusive cases
// holds and selects the two gaps that set the height of the crossover point:
//
//   A left of X (a3 < x2, x1 < a4):  b1 = x2 - a3, b2 = a4 - x1   (eq. 1 / 3)
//   X left of A (x3 < a2, a1 < x4):  b1 = a2 - x3, b2 = x4 - a1   (eq. 2 / 4)
//
// The crossover grade is then 1 - b1 / (b1 + b2) = b2 / (b1 + b2), which is
// where the falling edge of the left MF meets the rising edge of the right one.
// When the plateaus overlap (x2 <= a3 and a2 <= x3) the grade is 1 (MD_FULL);
// when one support ends before the other begins it is 0 (MD_NONE), and b1, b2
// are then zero.
//
// Combined triangle/trapezoid handling: an MF whose fourth point is 0 is a
// triangle (p1, p2, p3) and is widened internally to the degenerate trapezoid
// (p1, p2, p2, p3). The trapezoid cases then also cover the document's triangle
// cases 3 and 4, which is how one set of comparators and subtractors serves
// both shapes. When both MFs are triangles the crossover cases are reported as
// MD_EQ3 / MD_EQ4, for which the grade is quantised to 8 levels instead of 16. The case conditions and equations follow
// the document; the p4 = 0 triangle encoding, the handling of a triangle paired
// with a trapezoid and the plateau-overlap test for case 5 are this design's
// reading.
//
// Purely combinational. Inputs must satisfy p1 <= p2 <= p3 <= p4 (triangles:
// p1 <= p2 <= p3).
module md_condition
  import maxmin_pkg::*;
#(
  parameter int unsigned PW = maxmin_pkg::MF_PW
) (
  input  logic [PW-1:0] a1, a2, a3, a4,
  input  logic [PW-1:0] x1, x2, x3, x4,
  output md_cond_e      cond,
  output logic [PW-1:0] b1,
  output logic [PW-1:0] b2
);

  logic          a_tri, x_tri, tri_mode;
  logic [PW-1:0] an3, an4, xn3, xn4;   // break points after triangle widening
  logic          plateau_overlap, a_left, x_left;

  assign a_tri = (a4 == '0);
  assign x_tri = (x4 == '0);
  assign an3   = a_tri ? a2 : a3;
  assign an4   = a_tri ? a3 : a4;
  assign xn3   = x_tri ? x2 : x3;
  assign xn4   = x_tri ? x3 : x4;

  assign tri_mode        = a_tri && x_tri;
  assign plateau_overlap = (x2 <= an3) && (a2 <= xn3);
  assign a_left          = (an3 < x2);   // plateau of A ends before that of X starts

  assign x_left = (xn3 < a2);

  always_comb begin
    cond = MD_NONE;
    b1   = '0;
    b2   = '0;
    if (plateau_overlap) begin
      cond = MD_FULL;
    end else if (a_left) begin
      if (x1 < an4) begin
        cond = tri_mode ? MD_EQ3 : MD_EQ1;
        b1   = x2 - an3;
        b2   = an4 - x1;
      end
    end else if (x_left) begin
      if (a1 < xn4) begin
        cond = tri_mode ? MD_EQ4 : MD_EQ2;
        b1   = a2 - xn3;
        b2   = xn4 - a1;
      end
    end
  end

endmodule
