// ks_adder: modified Kogge-Stone parallel-prefix adder, s = a + b + cin.
//
// Bit i first forms propagate p = a^b and generate g = a&b; the carry-in is
// folded into bit 0's generate. A Kogge-Stone prefix network then combines
// (G,P) pairs over distances 1, 2, 4, ... in ceil(log2(WIDTH)) levels, so
// every carry is ready after that many cell delays, with fan-out of at most
// two per cell. The modification: once a position's group reaches bit 0 its
// G is the final carry and its group propagate is never needed again. Those
// positions use a gray cell (G only) instead of a black cell (G and P), and in
// later levels they are just wires. This removes the redundant black cells of
// the plain Kogge-Stone network. The Kogge-Stone structure, fan-out two and
// the removal of redundant black cells come from the original design; exactly
// which cells count as redundant is this implementation's reading of it.
//
// Interface: a, b and s are WIDTH bits, cin and cout one bit each. Purely
// combinational, no clock. WIDTH must be at least 2. Default WIDTH = 16,
// the width of the adder the design demonstrates; the AM operator also uses
// an 8-bit pre-adder and 16-bit adders in its multiplier. The last level
// holds only gray cells and wires; its propagate outputs are wires that
// nothing reads.
module ks_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH);

  logic [WIDTH-1:0] p0, g0;

  assign p0 = a ^ b;
  // Carry-in folded into bit 0's generate.
  assign g0 = {a[WIDTH-1:1] & b[WIDTH-1:1], (a[0] & b[0]) | (p0[0] & cin)};

  // Each level k combines group (G,P) pairs a distance D = 2^k apart.
  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << k;
    logic [WIDTH-1:0] gi, pi_, go, po;
    if (k == 0) begin : g_first
      assign gi  = g0;
      assign pi_ = p0;
    end else begin : g_next
      assign gi  = g_level[k-1].go;
      assign pi_ = g_level[k-1].po;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i < D) begin : g_wire
        // Group already complete: pass through.
        assign go[i] = gi[i];
        assign po[i] = pi_[i];
      end else if (i < 2 * D) begin : g_gray
        // Group reaches bit 0 at this level: gray cell, generate only.
        assign go[i] = gi[i] | (pi_[i] & gi[i-D]);
        assign po[i] = pi_[i];
      end else begin : g_black
        assign go[i] = gi[i] | (pi_[i] & gi[i-D]);
        assign po[i] = pi_[i] & pi_[i-D];
      end
    end
  end

  // Carry into bit i is the group generate of bits i-1..0 (with cin).
  logic [WIDTH-1:0] c;
  assign c = g_level[LEVELS-1].go;
  assign s = p0 ^ {c[WIDTH-2:0], cin};
  assign cout = c[WIDTH-1];

endmodule
