// Self-checking testbench of compressor_multiplier.
//  - 8 x 8 (the main size): all 65,536 operand pairs, including the board examples
//    13 x 210 = 2730, 87 x 107 = 9309, 15 x 15 = 225, 1 x 3 = 3 and 255 x 255 = 65025.
//  - 16 x 16 (the second size): corner cases, 65535 x 65535 = 4294836225, and 20,000 random pairs.
//  - 5 x 5: all pairs, an odd width with a different column layout.
// Expected products come from the simulator's own * operator on wider integers.
module tb_compressor_multiplier;
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  logic [15:0] x16, y16;
  logic [31:0] p16;
  logic [4:0]  x5, y5;
  logic [9:0]  p5;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  compressor_multiplier                dut8  (.x(x8),  .y(y8),  .p(p8));
  compressor_multiplier #(.N(16))      dut16 (.x(x16), .y(y16), .p(p16));
  compressor_multiplier #(.N(5))       dut5  (.x(x5),  .y(y5),  .p(p5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] a, input logic [15:0] b);
    logic [63:0] want;
    x16 = a;
    y16 = b;
    #1;
    want = 64'(a) * 64'(b);
    checks++;
    if (p16 != want[31:0]) begin
      failures++;
      if (failures < 10) $display("FAIL 16x16 %0d * %0d = %0d, expected %0d", a, b, p16, want);
    end
  endtask

  initial begin
    x16 = '0; y16 = '0; x5 = '0; y5 = '0;
    // 8 x 8, exhaustive, one pair per clock
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a);
        y8 = 8'(b);
        @(posedge clk);
        checks++;
        if (int'(p8) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d * %0d = %0d", a, b, p8);
        end
      end
    end
    // worked example from the board demonstration
    x8 = 8'b0000_1101; y8 = 8'b1101_0010; #1;
    checks++;
    if (p8 != 16'b0000_1010_1010_1010) begin failures++; $display("FAIL 13*210 = %0d", p8); end
    x8 = 8'hff; y8 = 8'hff; #1;
    checks++;
    if (p8 != 16'hfe01) begin failures++; $display("FAIL ff*ff = %h", p8); end

    // 16 x 16
    check16(16'hffff, 16'hffff);
    checks++;
    if (p16 != 32'd4294836225) begin failures++; $display("FAIL ffff*ffff = %0d", p16); end
    check16(16'h0000, 16'hffff);
    check16(16'h8000, 16'h8000);
    check16(16'h0001, 16'h0001);
    check16(16'h00ff, 16'hff00);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom));

    // 5 x 5, exhaustive
    for (int a = 0; a < 32; a++) begin
      for (int b = 0; b < 32; b++) begin
        x5 = 5'(a);
        y5 = 5'(b);
        #1;
        checks++;
        if (int'(p5) != a * b) begin
          failures++;
          if (failures < 10) $display("FAIL 5x5 %0d * %0d = %0d", a, b, p5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
