// tb_am_exhaustive: exhaustive test of the 8-bit Add-Multiply operator.
//
// Applies all 2^24 combinations of a, b and y to the default-size operator
// and compares p with (a + b wrapped to 8 signed bits) * y. This is the
// complete input space of the operator in its 8-bit configuration.
module tb_am_exhaustive;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  localparam int unsigned MAX_CYCLES = 20_000_000;
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

  initial begin
    for (int v = 0; v < (1 << 24); v++) begin
      {a, b, y} = 24'(v);
      @(posedge clk);
      checks++;
      if (int'(signed'(p)) != int'(signed'(8'(a + b))) * int'(signed'(y))) begin
        failures++;
        if (failures < 10)
          $display("a=%0d b=%0d y=%0d: p=%0d", signed'(a), signed'(b), signed'(y), signed'(p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
