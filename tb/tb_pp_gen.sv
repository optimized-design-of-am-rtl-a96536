// tb_pp_gen: self-checking test of the partial-product row generator.
//
// For every 8-bit multiplicand x and every Booth digit d in {-2..+2}, the
// digit's control signals are built here from d (not by the encoder), and the
// row must satisfy signed(pp) + cin == d * x, where cin is 1 for a negative
// digit. The zero digit is applied in both of its encodings (sign 0 and
// sign 1, as produced by groups 000 and 111). A 4-bit instance is checked the
// same way.
module tb_pp_gen;
  import am_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  localparam int unsigned MAX_CYCLES = 10_000;
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] x8;  logic [8:0] pp8;
  logic [3:0] x4;  logic [4:0] pp4;
  mb_digit_t  dig;

  pp_gen #(.WIDTH(8)) u8 (.x(x8), .digit(dig), .pp(pp8));
  pp_gen #(.WIDTH(4)) u4 (.x(x4), .digit(dig), .pp(pp4));

  function automatic mb_digit_t make_digit(input int d, input logic zero_sign);
    mb_digit_t r;
    r.sign = (d < 0) ? 1'b1 : (d == 0 ? zero_sign : 1'b0);
    r.one  = (d == 1 || d == -1);
    r.two  = (d == 2 || d == -2);
    r.cin  = (d < 0);
    return r;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int k = 0; k < 6; k++) begin
        int d;
        d = (k < 5) ? k - 2 : 0;
        dig = make_digit(d, k == 5);
        x8 = 8'(v);
        x4 = 4'(v);
        @(posedge clk);
        checks++;
        if (int'(signed'(pp8)) + int'(dig.cin) != d * int'(signed'(x8))) begin
          failures++;
          if (failures < 10) $display("w8: x=%0d d=%0d pp=%b", signed'(x8), d, pp8);
        end
        if (v < 16) begin
          checks++;
          if (int'(signed'(pp4)) + int'(dig.cin) != d * int'(signed'(x4))) begin
            failures++;
            if (failures < 10) $display("w4: x=%0d d=%0d pp=%b", signed'(x4), d, pp4);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
