// pp_gen: one Modified Booth partial-product row.
//
// Bit i of the row is ((x[i] & one) | (x[i-1] & two)) ^ neg, i.e. the
// multiplexer picks X (one), 2X (two, a one-bit left shift) or zero, and the
// XOR inverts the row for a negative digit. x[-1] is 0 and x[WIDTH] is the
// sign bit of X, so the row is WIDTH+1 bits wide and holds every value of
// d*X for d in {-2..+2}. A negative row is only inverted here; the +1 that
// completes its two's complement is the digit's cin, added later by the
// multiplier's adder tree. The row therefore equals d*X - cin as a signed
// WIDTH+1-bit number.
//
// The bit-level select/XOR structure is the design's. The inversion is driven
// by the digit's cin (negative and non-zero) rather than its raw sign bit, so
// that the "111" group, encoded with sign 1 and carry 0, gives a zero row;
// this keeps the row consistent with the encoding table's carry column.
//
// Interface: x is the WIDTH-bit signed multiplicand, digit the encoded Booth
// digit, pp the WIDTH+1-bit signed row. Purely combinational.
module pp_gen
  import am_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  mb_digit_t        digit,
  output logic [WIDTH:0]   pp
);

  logic [WIDTH:0] xe;   // X sign-extended by one bit
  logic [WIDTH:0] xs;   // X shifted left by one bit (2X)

  always_comb begin
    xe = {x[WIDTH-1], x};
    xs = {x, 1'b0};
    for (int i = 0; i <= WIDTH; i++) begin
      pp[i] = ((xe[i] & digit.one) | (xs[i] & digit.two)) ^ digit.cin;
    end
  end

endmodule
