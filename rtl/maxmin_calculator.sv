// maxmin_calculator -- matching-degree (max-min) calculator of a fuzzy
// inference engine.
//
// The matching degree of an antecedent membership function A and a fuzzified
// input X is max over m of min(A(m), X(m)). For trapezoidal and triangular MFs
// this maximum is either 1 (plateaus overlap), 0 (supports disjoint) or the
// height of the single point where the falling edge of the left MF crosses the
// rising edge of the right one. The calculator evaluates that height directly
// from the eight break points instead of sweeping the universe of discourse:
//
//   md_condition  picks the case and the two gaps b1, b2
//   adder         z = b1 + b2
//   md_divider    q = floor(16 * b1 / z)
//   md_grade      h = 2^i - (q scaled to i digits), or all ones / zero
//
// Interface: all eight 6-bit points are applied together with in_valid; h (12
// bits, all ones = grade 1) and the case code appear with out_valid one clock
// later. One new pair of MFs can be accepted every clock. The datapath is one
// combinational stage followed by the output register; the document gives the
// datapath and its signal names (b1, b2, z, y1, d1, h), while the registered
// output, the valid flags and the synchronous active-low reset are this
// design's choices.
//
// Point coding: trapezoid (p1 <= p2 <= p3 <= p4); triangle (p1 <= p2 <= p3,
// p4 = 0). Two triangles are graded on 8 levels (h = 1..7), any other crossover
// on 16 levels (h = 1..15).
module maxmin_calculator
  import maxmin_pkg::*;
#(
  parameter int unsigned PW = maxmin_pkg::MF_PW,
  parameter int unsigned HW = maxmin_pkg::MD_HW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [PW-1:0] a1, a2, a3, a4,   // antecedent MF break points
  input  logic [PW-1:0] x1, x2, x3, x4,   // fuzzified input MF break points
  output logic          out_valid,
  output md_cond_e      cond,             // which of the six cases applied
  output logic [HW-1:0] h                 // matching degree
);

  localparam int unsigned QW = maxmin_pkg::TRAP_BITS;

  md_cond_e      cond_c;
  logic [PW-1:0] b1, b2;
  logic [PW:0]   z;
  logic [QW-1:0] q;
  logic [HW-1:0] h_c;

  md_condition #(.PW(PW)) u_condition (
    .a1, .a2, .a3, .a4,
    .x1, .x2, .x3, .x4,
    .cond (cond_c),
    .b1, .b2
  );

  assign z = {1'b0, b1} + {1'b0, b2};

  md_divider #(.NW(PW), .DW(PW + 1), .QW(QW)) u_divider (
    .num (b1),
    .den (z),
    .q
  );

  md_grade #(.HW(HW), .QW(QW)) u_grade (
    .cond (cond_c),
    .q,
    .h    (h_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      cond      <= MD_NONE;
      h         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        cond <= cond_c;
        h    <= h_c;
      end
    end
  end

  // Break points of each MF must be non-decreasing (a triangle ends at p3).
  property p_ordered(logic [PW-1:0] p1, logic [PW-1:0] p2, logic [PW-1:0] p3,
                     logic [PW-1:0] p4);
    @(posedge clk) disable iff (!rst_n)
      in_valid |-> (p1 <= p2) && (p2 <= p3) && ((p4 == '0) || (p3 <= p4));
  endproperty
  a_a_ordered: assert property (p_ordered(a1, a2, a3, a4));
  a_x_ordered: assert property (p_ordered(x1, x2, x3, x4));

endmodule
