// tb_ks_adder: self-checking test of the modified Kogge-Stone adder.
//
// Three instances are checked against the plain integer sum a + b + cin:
// the default 16-bit adder (a known vector, corner cases and random
// operands), an 8-bit adder exhaustively over all 2^17 input combinations,
// and a 5-bit adder (a width that is not a power of two) exhaustively.
// The adder is combinational; one vector is applied every clock cycle and a
// watchdog ends the run after a fixed number of cycles.
module tb_ks_adder;

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

  logic [15:0] a16, b16, s16;  logic c16, co16;
  logic [7:0]  a8,  b8,  s8;   logic c8,  co8;
  logic [4:0]  a5,  b5,  s5;   logic c5,  co5;

  ks_adder #(.WIDTH(16)) u16 (.a(a16), .b(b16), .cin(c16), .s(s16), .cout(co16));
  ks_adder #(.WIDTH(8))  u8  (.a(a8),  .b(b8),  .cin(c8),  .s(s8),  .cout(co8));
  ks_adder #(.WIDTH(5))  u5  (.a(a5),  .b(b5),  .cin(c5),  .s(s5),  .cout(co5));

  task automatic check16(input logic [15:0] a, input logic [15:0] b, input logic c);
    logic [16:0] exp;
    a16 = a; b16 = b; c16 = c;
    @(posedge clk);
    exp = 17'(a) + 17'(b) + 17'(c);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      if (failures < 10)
        $display("16-bit: %h + %h + %b = %h, expected %h", a, b, c, {co16, s16}, exp);
    end
  endtask

  initial begin
    // Known vector of the 16-bit adder: 0xF007 + 0xFBE7 = 0xEBEE, carry out 1.
    check16(16'hF007, 16'hFBE7, 1'b0);
    if (s16 !== 16'hEBEE || co16 !== 1'b1) begin
      failures++;
      $display("known vector wrong: s=%h cout=%b", s16, co16);
    end
    checks++;
    // Full carry propagation chains and other corners.
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h7FFF, 16'h0001, 1'b0);
    check16(16'h5555, 16'hAAAA, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    for (int i = 0; i < 16; i++) check16(16'hFFFF >> i, 16'(1) << i, 1'b0);
    repeat (100_000) check16(16'($urandom), 16'($urandom), 1'($urandom));

    // Exhaustive 8-bit and 5-bit.
    for (int v = 0; v < (1 << 17); v++) begin
      {c8, a8, b8} = 17'(v);
      {c5, a5, b5} = 11'(v);
      @(posedge clk);
      checks++;
      if ({co8, s8} !== 9'(a8) + 9'(b8) + 9'(c8)) begin
        failures++;
        if (failures < 10) $display("8-bit: %h + %h + %b = %h", a8, b8, c8, {co8, s8});
      end
      if (v < (1 << 11)) begin
        checks++;
        if ({co5, s5} !== 6'(a5) + 6'(b5) + 6'(c5)) begin
          failures++;
          if (failures < 10) $display("5-bit: %h + %h + %b = %h", a5, b5, c5, {co5, s5});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
