// mb_encoder: Modified Booth (radix-4) encoder for one digit.
//
// The multiplier Y is read in overlapping groups of three bits
// {y[2j+1], y[2j], y[2j-1]} (y[-1] = 0), starting at the LSB. Each group is
// worth -2*y[2j+1] + y[2j] + y[2j-1], one of -2, -1, 0, +1, +2, and is encoded
// into the four control signals of am_pkg::mb_digit_t:
//   one  = y[2j] ^ y[2j-1]
//   two  = (y[2j+1] ^ y[2j]) & ~one
//   sign = y[2j+1]
//   cin  = y[2j+1] & ~(y[2j] & y[2j-1])   (negative and non-zero)
// These follow the design's encoding table: sign is y[2j+1] in every row,
// including "111", which is a zero digit with no carry. The gate equations
// themselves are the usual two-level realisation of that table.
//
// Interface: y_bits = {y[2j+1], y[2j], y[2j-1]}; digit is the encoded digit.
// Purely combinational.
module mb_encoder
  import am_pkg::*;
(
  input  logic [2:0] y_bits,
  output mb_digit_t  digit
);

  logic y_hi, y_mid, y_lo;

  always_comb begin
    {y_hi, y_mid, y_lo} = y_bits;
    digit.one  = y_mid ^ y_lo;
    digit.two  = (y_hi ^ y_mid) & ~(y_mid ^ y_lo);
    digit.sign = y_hi;
    digit.cin  = y_hi & ~(y_mid & y_lo);
  end

endmodule
