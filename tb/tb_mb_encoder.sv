// tb_mb_encoder: self-checking test of the Modified Booth digit encoder.
//
// All eight bit groups are applied. The expected outputs are derived from the
// digit value d = -2*y[2j+1] + y[2j] + y[2j-1]: one = (|d| == 1),
// two = (|d| == 2), sign = y[2j+1], cin = (d < 0). A second check encodes the
// whole byte Y = 8'b1111_1110 with four encoders; its digits are -2, 0, 0, 0,
// so the sign, one and two vectors (digit 3 first) must be 1111, 0000, 0001.
module tb_mb_encoder;
  import am_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  localparam int unsigned MAX_CYCLES = 1000;
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] tri_in;
  mb_digit_t  dig;
  mb_encoder u_dut (.y_bits(tri_in), .digit(dig));

  // Four encoders on one byte.
  logic [7:0] ybyte;
  logic [8:0] yx;
  mb_digit_t  d4 [4];
  assign yx = {ybyte, 1'b0};
  for (genvar j = 0; j < 4; j++) begin : g_enc
    mb_encoder u_e (.y_bits(yx[2*j+2 -: 3]), .digit(d4[j]));
  end

  initial begin
    int d;
    logic [3:0] sv, ov, tv;
    for (int t = 0; t < 8; t++) begin
      tri_in = 3'(t);
      @(posedge clk);
      d = -2 * int'(tri_in[2]) + int'(tri_in[1]) + int'(tri_in[0]);
      checks++;
      if (dig.sign !== tri_in[2] || dig.one !== (d == 1 || d == -1) ||
          dig.two !== (d == 2 || d == -2) || dig.cin !== (d < 0)) begin
        failures++;
        $display("group %b (d=%0d): sign=%b one=%b two=%b cin=%b", tri_in, d,
                 dig.sign, dig.one, dig.two, dig.cin);
      end
    end
    ybyte = 8'b1111_1110;
    @(posedge clk);
    for (int j = 0; j < 4; j++) begin
      sv[j] = d4[j].sign; ov[j] = d4[j].one; tv[j] = d4[j].two;
    end
    checks++;
    if (sv !== 4'b1111 || ov !== 4'b0000 || tv !== 4'b0001) begin
      failures++;
      $display("Y=%b: sign=%b one=%b two=%b", ybyte, sv, ov, tv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
