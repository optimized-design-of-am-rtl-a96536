// tb_mb_multiplier: self-checking test of the Modified Booth multiplier.
//
// The default 8 x 8 multiplier is checked exhaustively over all 65,536
// signed operand pairs against the integer product; 6 x 6 and 4 x 4
// instances are checked exhaustively too, so that digit counts other than
// four (and with them other adder-tree shapes) are covered.
module tb_mb_multiplier;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #1 clk = ~clk;

  localparam int unsigned MAX_CYCLES = 200_000;
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish in %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] x8, y8;  logic [15:0] p8;
  logic [5:0] x6, y6;  logic [11:0] p6;
  logic [3:0] x4, y4;  logic [7:0]  p4;

  mb_multiplier u8 (.x(x8), .y(y8), .p(p8));
  mb_multiplier #(.N(6)) u6 (.x(x6), .y(y6), .p(p6));
  mb_multiplier #(.N(4)) u4 (.x(x4), .y(y4), .p(p4));

  initial begin
    for (int v = 0; v < (1 << 16); v++) begin
      {x8, y8} = 16'(v);
      {x6, y6} = 12'(v);
      {x4, y4} = 8'(v);
      @(posedge clk);
      checks++;
      if (int'(signed'(p8)) != int'(signed'(x8)) * int'(signed'(y8))) begin
        failures++;
        if (failures < 10) $display("8x8: %0d * %0d = %0d", signed'(x8), signed'(y8), signed'(p8));
      end
      if (v < (1 << 12)) begin
        checks++;
        if (int'(signed'(p6)) != int'(signed'(x6)) * int'(signed'(y6))) begin
          failures++;
          if (failures < 10) $display("6x6: %0d * %0d = %0d", signed'(x6), signed'(y6), signed'(p6));
        end
      end
      if (v < (1 << 8)) begin
        checks++;
        if (int'(signed'(p4)) != int'(signed'(x4)) * int'(signed'(y4))) begin
          failures++;
          if (failures < 10) $display("4x4: %0d * %0d = %0d", signed'(x4), signed'(y4), signed'(p4));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
