// mb_multiplier: signed Modified Booth multiplier, p = x * y, whose partial
// products are summed by modified Kogge-Stone adders.
//
// How it works:
//  1. Y is cut into N/2 overlapping three-bit groups {y[2j+1], y[2j], y[2j-1]}
//     (y[-1] = 0); an mb_encoder turns each into a digit d_j in {-2..+2}.
//  2. A pp_gen per digit forms the N+1-bit row d_j*X - cin_j.
//  3. Row j is sign-extended to 2N bits and shifted left by 2j. The correction
//     bit cin_j belongs at weight 2^(2j); row j+1 is empty there, so cin_j is
//     placed into it. The last correction, cin_(N/2-1), has no row below it
//     and forms one extra operand. That gives N/2+1 operands of 2N bits.
//  4. The operands are added by a balanced binary tree of 2N-bit ks_adder
//     instances (N/2 adders, ceil(log2(N/2+1)) adder levels). Sums are taken
//     modulo 2^(2N), which is exact because a signed N x N product fits in
//     2N bits.
// Steps 1-3 and the use of Kogge-Stone adders for the accumulation follow the
// design. The tree shape, the placement of the correction bits and the extra
// operand for the last one are this implementation's choices.
//
// Interface: x (multiplicand) and y (multiplier) are N-bit two's complement,
// p is the 2N-bit two's complement product. Purely combinational; N must be
// even and at least 2. Default N = 8.
module mb_multiplier
  import am_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  localparam int unsigned M = mb_digits(N);  // Booth digits
  localparam int unsigned K = M + 1;         // operands of the adder tree
  localparam int unsigned W = 2 * N;         // product width

  mb_digit_t        digit [M];
  logic [N:0]       pp    [M];
  logic [W-1:0]     opnd  [K];

  // y extended with the implicit y[-1] = 0 at bit 0.
  logic [N:0] yx;
  assign yx = {y, 1'b0};

  for (genvar j = 0; j < M; j++) begin : g_digit
    mb_encoder u_enc (
      .y_bits (yx[2*j+2 -: 3]),
      .digit  (digit[j])
    );
    pp_gen #(.WIDTH(N)) u_pp (
      .x     (x),
      .digit (digit[j]),
      .pp    (pp[j])
    );
  end

  // Align the rows and place the correction bits.
  always_comb begin
    for (int j = 0; j < M; j++) begin
      opnd[j] = W'(signed'(pp[j])) << (2 * j);
      if (j > 0) opnd[j][2*(j-1)] = digit[j-1].cin;
    end
    opnd[M] = '0;
    opnd[M][2*(M-1)] = digit[M-1].cin;
  end

  // Adder tree in heap order: node i adds nodes 2i+1 and 2i+2; the K leaves
  // are nodes K-1 .. 2K-2 and node 0 is the product.
  logic [W-1:0] node [2*K-1];
  logic         node_cout [K-1];

  for (genvar l = 0; l < K; l++) begin : g_leaf
    assign node[K-1+l] = opnd[l];
  end

  for (genvar i = 0; i < K - 1; i++) begin : g_add
    ks_adder #(.WIDTH(W)) u_add (
      .a    (node[2*i+1]),
      .b    (node[2*i+2]),
      .cin  (1'b0),
      .s    (node[i]),
      .cout (node_cout[i])
    );
  end

  assign p = node[0];

endmodule
