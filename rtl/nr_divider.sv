// Combinational unsigned non-restoring divider.
// Divides an NW-bit dividend by a DW-bit divisor in NW add/subtract steps:
// the partial remainder is shifted left by one dividend bit, then the divisor
// is subtracted when the remainder is non-negative and added back when it is
// negative; each quotient bit is the inverted sign of the new remainder. A
// final add restores a negative remainder. The division and square-root units
// use it on magnitudes, complementing before and after for signed values, as
// the document describes. Division by zero gives an all-ones quotient.
// Purely combinational; no clock.
module nr_divider #(
  parameter int unsigned NW = 8,  // dividend / quotient width
  parameter int unsigned DW = 4   // divisor / remainder width
) (
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder
);
  logic signed [DW+1:0] r;
  logic signed [DW+1:0] d;

  always_comb begin
    d = $signed({2'b00, divisor});
    r = '0;
    quotient = '0;
    for (int i = NW - 1; i >= 0; i--) begin
      if (r >= 0) r = ((r <<< 1) | (DW+2)'(dividend[i])) - d;
      else        r = ((r <<< 1) | (DW+2)'(dividend[i])) + d;
      quotient[i] = (r >= 0);
    end
    if (r < 0) r = r + d;
    remainder = r[DW-1:0];
  end
endmodule
