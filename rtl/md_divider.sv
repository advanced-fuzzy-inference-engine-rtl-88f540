// md_divider -- fractional divider of the max-min calculator.
//
// Computes q = floor(2^QW * num / den) for num < den, i.e. the first QW binary
// digits of the fraction num/den. With num = b1 and den = b1 + b2 this is the
// term 2^i * b1 / (b1 + b2) that equations 1 to 4 subtract from 2^i.
//
// Implementation: a combinational restoring divider of QW steps. Each step
// doubles the partial remainder, compares it with den and, where it is not
// smaller, subtracts den and sets the next quotient digit. When num >= den (not
// a fraction, or den = 0) q saturates to all ones. The document gives the
// formula only; the restoring structure, truncation (not rounding) and the
// saturation are this design's choices.
//
// Purely combinational, QW compare/subtract stages deep.
module md_divider #(
  parameter int unsigned NW = 6,   // numerator width
  parameter int unsigned DW = 7,   // denominator width
  parameter int unsigned QW = 4    // quotient (fraction) digits
) (
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic [QW-1:0] q
);

  // One spare bit over the denominator so that 2 * remainder never overflows.
  localparam int unsigned RW = DW + 1;

  logic [RW-1:0] rem;

  always_comb begin
    q   = '0;
    rem = RW'(num);
    if (RW'(num) >= RW'(den)) begin
      q = '1;
    end else begin
      for (int k = int'(QW) - 1; k >= 0; k--) begin
        rem = rem << 1;
        if (rem >= RW'(den)) begin
          rem  = rem - RW'(den);
          q[k] = 1'b1;
        end
      end
    end
  end

endmodule
