// am_unit: Add-Multiply (AM) operator, p = (a + b) * y.
//
// The sum X = a + b is formed first by an N-bit modified Kogge-Stone adder
// and then multiplied by y in a Modified Booth multiplier whose partial
// products are also summed by modified Kogge-Stone adders. Replacing the
// carry-lookahead and carry-save adders of a conventional AM unit with these
// prefix adders is the point of the design; its structure (pre-adder, Booth
// encoding of Y, partial-product generation, Kogge-Stone accumulation)
// follows the design, and N = 8 with a 16-bit product is its main
// configuration.
//
// X is kept to N bits: a + b wraps modulo 2^N like the N-bit pre-adder it
// comes from, and its carry-out is dropped. This is this implementation's
// choice; it makes p exact whenever a + b fits in N signed bits.
//
// Interface: a, b, y are N-bit two's complement; p is the 2N-bit two's
// complement product (X * y with X the wrapped sum). Purely combinational,
// no clock or reset.
module am_unit #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  logic [N-1:0] x;
  logic         x_cout;

  ks_adder #(.WIDTH(N)) u_preadd (
    .a    (a),
    .b    (b),
    .cin  (1'b0),
    .s    (x),
    .cout (x_cout)
  );

  mb_multiplier #(.N(N)) u_mul (
    .x (x),
    .y (y),
    .p (p)
  );

endmodule
