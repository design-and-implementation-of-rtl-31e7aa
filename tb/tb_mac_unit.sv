// Self-checking testbench of mac_unit at both evaluated sizes: the default 8-bit MAC (16-bit
// accumulator) and a 16-bit MAC (32-bit accumulator), driven with the same control sequence.
// A reference model in the testbench keeps acc modulo 2**(2*WIDTH) and follows the rules
// rst/clr -> 0, en -> acc + x*y, otherwise hold. The accumulator is compared with the model after
// every clock edge, which also checks the one-cycle latency: a product presented before an edge
// must be in acc right after that edge. The sequence covers a long run of maximum products
// (so the 8-bit accumulator wraps), cycles with en low, clears and a reset in mid-sum.
module tb_mac_unit;
  logic        clk = 1'b0;
  logic        rst, en, clr;
  logic [7:0]  x8, y8;
  logic [15:0] acc8;
  logic [15:0] x16, y16;
  logic [31:0] acc16;
  logic [15:0] ref8;
  logic [31:0] ref16;
  int   checks = 0, failures = 0;
  int   wraps8 = 0;

  mac_unit                 dut8  (.clk, .rst, .en, .clr, .x(x8),  .y(y8),  .acc(acc8));
  mac_unit #(.WIDTH(16))   dut16 (.clk, .rst, .en, .clr, .x(x16), .y(y16), .acc(acc16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: apply the controls and operands, update the model, compare after the edge.
  task automatic step(input logic r, input logic e, input logic c,
                      input logic [15:0] a, input logic [15:0] b);
    logic [16:0] next8;
    rst = r; en = e; clr = c;
    x8 = a[7:0]; y8 = b[7:0];
    x16 = a;     y16 = b;
    @(posedge clk);
    if (r || c) begin
      ref8  = '0;
      ref16 = '0;
    end else if (e) begin
      next8 = 17'(ref8) + 17'(a[7:0]) * 17'(b[7:0]);
      if (next8[16]) wraps8++;
      ref8  = next8[15:0];
      ref16 = ref16 + 32'(a) * 32'(b);
    end
    #1;
    checks += 2;
    if (acc8 != ref8) begin
      failures++;
      if (failures < 10) $display("FAIL 8-bit MAC acc=%h expected %h", acc8, ref8);
    end
    if (acc16 != ref16) begin
      failures++;
      if (failures < 10) $display("FAIL 16-bit MAC acc=%h expected %h", acc16, ref16);
    end
  endtask

  initial begin
    ref8 = '0; ref16 = '0;
    step(1, 0, 0, 0, 0);
    step(0, 0, 0, 16'h1234, 16'h5678);          // hold at zero
    step(0, 1, 0, 16'd13, 16'd210);             // 2730
    step(0, 1, 0, 16'd87, 16'd107);             // + 9309
    step(0, 0, 0, 16'd255, 16'd255);            // hold
    step(0, 1, 0, 16'd15, 16'd15);              // + 225
    checks++;
    if (acc8 != 16'd12264) begin failures++; $display("FAIL sum of examples = %0d", acc8); end
    step(0, 0, 1, 16'hffff, 16'hffff);          // clear
    for (int i = 0; i < 4; i++) step(0, 1, 0, 16'hffff, 16'hffff);  // 8-bit acc wraps
    step(1, 1, 0, 16'hffff, 16'hffff);          // reset wins over en
    for (int i = 0; i < 3000; i++)
      step(0, ($urandom % 4) != 0, ($urandom % 50) == 0, 16'($urandom), 16'($urandom));
    checks++;
    if (wraps8 == 0) begin failures++; $display("FAIL the 8-bit accumulator never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
