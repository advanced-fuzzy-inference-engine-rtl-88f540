// maxmin_pkg -- shared types and constants of the max-min matching-degree
// calculator.
//
// A membership function (MF) is given by four break points p1 <= p2 <= p3 <= p4
// on a 6-bit universe of discourse (64 elements): the grade rises from 0 at p1
// to 1 at p2, stays 1 up to p3 and falls back to 0 at p4. A triangular MF has
// only three points (foot, peak, foot); it is presented on the same four inputs
// with p4 = 0, a value no trapezoid can have as its last point unless it is
// empty. The point width and the 16/8 grade levels follow the document; the
// p4 = 0 encoding of a triangle is this design's choice.
//
// md_cond_e names the six mutually exclusive cases of the calculation:
//   MD_EQ1  A lies left of X, trapezoids: falling edge of A meets rising edge of X
//   MD_EQ2  X lies left of A, trapezoids: falling edge of X meets rising edge of A
//   MD_EQ3  as MD_EQ1 for two triangles
//   MD_EQ4  as MD_EQ2 for two triangles
//   MD_FULL the plateaus (peaks) overlap: matching degree 1
//   MD_NONE the supports do not overlap: matching degree 0
package maxmin_pkg;

  // Width of one MF break point (document: 6 bits, 64-element universe).
  localparam int unsigned MF_PW = 6;
  // Width of the matching-degree output h (document: 12 bits, "FFF"h = 1).
  localparam int unsigned MD_HW = 12;
  // Grade resolution exponent i: 2^4 = 16 levels for trapezoids, 2^3 = 8 for triangles.
  localparam int unsigned TRAP_BITS = 4;
  localparam int unsigned TRI_BITS  = 3;

  typedef enum logic [2:0] {
    MD_NONE = 3'd0,
    MD_EQ1  = 3'd1,
    MD_EQ2  = 3'd2,
    MD_EQ3  = 3'd3,
    MD_EQ4  = 3'd4,
    MD_FULL = 3'd5
  } md_cond_e;

endpackage
