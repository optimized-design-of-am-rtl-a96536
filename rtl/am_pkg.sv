// am_pkg: types shared by the Add-Multiply (AM) operator.
//
// The Modified Booth (radix-4) recoding turns every pair of multiplier bits,
// together with the upper bit of the pair below, into one signed digit in
// {-2,-1,0,+1,+2}. That digit travels from the encoder to the partial-product
// generator as four control signals, bundled here as mb_digit_t:
//   sign - the digit's sign bit, equal to y[2j+1]
//   one  - the magnitude is 1 (select X)
//   two  - the magnitude is 2 (select 2X)
//   cin  - the digit is negative and non-zero: the row is inverted and a +1
//          correction at the row's least significant weight is owed.
// The four-signal form follows the encoding table of the design; naming them
// as one struct is a choice of this implementation.
package am_pkg;

  typedef struct packed {
    logic sign;
    logic one;
    logic two;
    logic cin;
  } mb_digit_t;

  // Number of radix-4 digits for an N-bit (N even) multiplier.
  function automatic int unsigned mb_digits(input int unsigned n);
    return n / 2;
  endfunction

endpackage
