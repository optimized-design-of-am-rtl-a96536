// tb_am_unit: end-to-end test of the Add-Multiply operator at its default
// size (N = 8, 16-bit product).
//
// Reference model: X = (a + b) wrapped to 8 signed bits, p = X * y.
// Vectors: the known case a = 8'hF6, b = 8'hFE, y = 8'hC0 (X = -12,
// p = 768 = 16'h0300), the extreme operands, and 300,000 random triples.
// The run also counts how often each mechanism of the datapath was used and
// fails if any never was: every Booth digit value -2, -1, +1, +2, the zero
// digit in both encodings (groups 000 and 111), a pre-adder sum that wraps
// (signed overflow), and a pre-adder carry out without overflow.
module tb_am_unit;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  localparam int unsigned MAX_CYCLES = 1_000_000;
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  a, b, y;
  logic [15:0] p;

  am_unit u_dut (.a(a), .b(b), .y(y), .p(p));

  // Mechanism counters.
  int n_digit [6];   // -2, -1, 0 (000), 0 (111), +1, +2
  int n_wrap = 0, n_carry = 0;

  task automatic apply(input logic [7:0] ai, input logic [7:0] bi, input logic [7:0] yi);
    int xs, sum;
    logic [8:0] yx;
    a = ai; b = bi; y = yi;
    @(posedge clk);
    sum = int'(signed'(ai)) + int'(signed'(bi));
    xs  = int'(signed'(8'(ai + bi)));
    if (sum != xs) n_wrap++;
    if ((9'(ai) + 9'(bi)) > 9'd255 && sum == xs) n_carry++;
    yx = {yi, 1'b0};
    for (int j = 0; j < 4; j++) begin
      case (yx[2*j+2 -: 3])
        3'b100:          n_digit[0]++;
        3'b101, 3'b110:  n_digit[1]++;
        3'b000:          n_digit[2]++;
        3'b111:          n_digit[3]++;
        3'b001, 3'b010:  n_digit[4]++;
        default:         n_digit[5]++;
      endcase
    end
    checks++;
    if (int'(signed'(p)) != xs * int'(signed'(yi))) begin
      failures++;
      if (failures < 10)
        $display("a=%0d b=%0d y=%0d: p=%0d, expected %0d", signed'(ai), signed'(bi),
                 signed'(yi), signed'(p), xs * int'(signed'(yi)));
    end
  endtask

  initial begin
    for (int k = 0; k < 6; k++) n_digit[k] = 0;
    apply(8'hF6, 8'hFE, 8'hC0);
    checks++;
    if (p !== 16'h0300) begin
      failures++;
      $display("known vector: p=%h, expected 0300", p);
    end
    apply(8'h80, 8'h00, 8'h80);   // (-128) * (-128) = 16384
    apply(8'h7F, 8'h00, 8'h80);
    apply(8'h80, 8'h00, 8'h7F);
    apply(8'h7F, 8'h7F, 8'h7F);   // sum wraps
    apply(8'h80, 8'h80, 8'h01);   // sum wraps to 0
    apply(8'h00, 8'h00, 8'h00);
    apply(8'hFF, 8'h01, 8'hAA);   // carry out, no overflow
    repeat (300_000) apply(8'($urandom), 8'($urandom), 8'($urandom));

    $display("digits: -2:%0d -1:%0d 0(000):%0d 0(111):%0d +1:%0d +2:%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4], n_digit[5]);
    $display("pre-adder: wrapped %0d times, carry without overflow %0d times",
             n_wrap, n_carry);
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (n_digit[k] == 0) begin
        failures++;
        $display("digit class %0d never exercised", k);
      end
    end
    checks++;
    if (n_wrap == 0)  begin failures++; $display("pre-adder overflow never exercised"); end
    checks++;
    if (n_carry == 0) begin failures++; $display("pre-adder carry never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
