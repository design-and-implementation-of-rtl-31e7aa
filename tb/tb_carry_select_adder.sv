// Self-checking testbench of carry_select_adder. Three widths are tested: 16 bits (the 8-bit
// MAC's accumulator adder, the default), 32 bits (the 16-bit MAC's) and 10 bits (a width that
// is not a multiple of the 4-bit block, so the top block is narrower). Corner cases force a
// carry through every block (all ones plus one); then random operand pairs. The expected sum
// and carry out come from the simulator's + operator on a wider integer.
module tb_carry_select_adder;
  logic [15:0] a16, b16, s16;
  logic [31:0] a32, b32, s32;
  logic [9:0]  a10, b10, s10;
  logic        co16, co32, co10;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  carry_select_adder                   dut16 (.a(a16), .b(b16), .s(s16), .co(co16));
  carry_select_adder #(.WIDTH(32))     dut32 (.a(a32), .b(b32), .s(s32), .co(co32));
  carry_select_adder #(.WIDTH(10))     dut10 (.a(a10), .b(b10), .s(s10), .co(co10));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] a, input logic [31:0] b);
    logic [16:0] w16;
    logic [32:0] w32;
    logic [10:0] w10;
    a16 = a[15:0]; b16 = b[15:0];
    a32 = a;       b32 = b;
    a10 = a[9:0];  b10 = b[9:0];
    @(posedge clk);
    w16 = 17'(a[15:0]) + 17'(b[15:0]);
    w32 = 33'(a) + 33'(b);
    w10 = 11'(a[9:0]) + 11'(b[9:0]);
    checks += 3;
    if ({co16, s16} != w16) begin
      failures++;
      if (failures < 10) $display("FAIL 16: %h + %h = %b_%h", a[15:0], b[15:0], co16, s16);
    end
    if ({co32, s32} != w32) begin
      failures++;
      if (failures < 10) $display("FAIL 32: %h + %h = %b_%h", a, b, co32, s32);
    end
    if ({co10, s10} != w10) begin
      failures++;
      if (failures < 10) $display("FAIL 10: %h + %h = %b_%h", a[9:0], b[9:0], co10, s10);
    end
  endtask

  initial begin
    apply(32'h0, 32'h0);
    apply(32'hffff_ffff, 32'h1);
    apply(32'h1, 32'hffff_ffff);
    apply(32'hffff_ffff, 32'hffff_ffff);
    apply(32'h0000_000f, 32'h0000_0001);
    apply(32'h0000_00ff, 32'h0000_0001);
    apply(32'h7fff_ffff, 32'h0000_0001);
    for (int i = 0; i < 8; i++) apply(32'((1 << (4 * i)) - 1), 32'h1);
    for (int i = 0; i < 30000; i++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
