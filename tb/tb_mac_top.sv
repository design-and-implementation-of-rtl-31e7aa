// End-to-end testbench of mac_top at its default sizes (8-bit MAC and 16-bit MAC). Both MACs run
// independent multiply-accumulate streams with their own enables and clears; a reference model
// checks both accumulators after every clock. Each mechanism of the design is counted and must
// occur at least once:
//   accumulate   en high, acc <= acc + x*y (per MAC)
//   hold         en low, acc unchanged although the operands change (per MAC)
//   clear        clr high, a new sum starts from zero (per MAC)
//   wrap         the sum passes the accumulator's top and wraps around (per MAC)
//   reset        shared synchronous reset in the middle of a sum
// The run ends with a dot product of length 16 on the 8-bit MAC (a small FIR tap sum) whose
// result is also worked out by hand-checkable arithmetic: sum over i of i*(255-i), i = 0..15.
module tb_mac_top;
  logic        clk = 1'b0;
  logic        rst;
  logic        m8_en, m8_clr, m16_en, m16_clr;
  logic [7:0]  m8_x, m8_y;
  logic [15:0] m8_acc;
  logic [15:0] m16_x, m16_y;
  logic [31:0] m16_acc;
  logic [15:0] ref8;
  logic [31:0] ref16;
  int   checks = 0, failures = 0;
  int   n_acc8 = 0, n_hold8 = 0, n_clr8 = 0, n_wrap8 = 0;
  int   n_acc16 = 0, n_hold16 = 0, n_clr16 = 0, n_wrap16 = 0;
  int   n_rst = 0;

  mac_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r,
                      input logic e8, input logic c8, input logic [7:0] a8, input logic [7:0] b8,
                      input logic e16, input logic c16, input logic [15:0] a16,
                      input logic [15:0] b16);
    logic [16:0] n8;
    logic [32:0] n16;
    rst = r;
    m8_en = e8;   m8_clr = c8;   m8_x = a8;   m8_y = b8;
    m16_en = e16; m16_clr = c16; m16_x = a16; m16_y = b16;
    @(posedge clk);
    if (r) begin
      n_rst++;
      ref8 = '0;
      ref16 = '0;
    end else begin
      if (c8) begin n_clr8++; ref8 = '0; end
      else if (e8) begin
        n_acc8++;
        n8 = 17'(ref8) + 17'(a8) * 17'(b8);
        if (n8[16]) n_wrap8++;
        ref8 = n8[15:0];
      end else n_hold8++;
      if (c16) begin n_clr16++; ref16 = '0; end
      else if (e16) begin
        n_acc16++;
        n16 = 33'(ref16) + 33'(a16) * 33'(b16);
        if (n16[32]) n_wrap16++;
        ref16 = n16[31:0];
      end else n_hold16++;
    end
    #1;
    checks += 2;
    if (m8_acc != ref8) begin
      failures++;
      if (failures < 10) $display("FAIL m8_acc=%h expected %h", m8_acc, ref8);
    end
    if (m16_acc != ref16) begin
      failures++;
      if (failures < 10) $display("FAIL m16_acc=%h expected %h", m16_acc, ref16);
    end
  endtask

  task automatic need(input string what, input int n);
    checks++;
    $display("mechanism %-14s occurred %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never occurred", what);
    end
  endtask

  initial begin
    int dot;
    ref8 = '0; ref16 = '0;
    step(1, 0, 0, 0, 0, 0, 0, 0, 0);
    // Random mixed traffic on both MACs, with a reset in the middle.
    for (int i = 0; i < 2000; i++) begin
      step(i == 1000,
           ($urandom % 5) != 0, ($urandom % 64) == 0, 8'($urandom), 8'($urandom),
           ($urandom % 5) != 0, ($urandom % 64) == 0, 16'($urandom), 16'($urandom));
    end
    // Force a wrap of the 16-bit MAC's 32-bit accumulator: clear, then maximum products.
    step(0, 0, 1, 0, 0, 0, 1, 0, 0);
    for (int i = 0; i < 3; i++) step(0, 0, 0, 0, 0, 1, 0, 16'hffff, 16'hffff);
    // Dot product of length 16 on the 8-bit MAC.
    step(0, 0, 1, 0, 0, 0, 0, 0, 0);
    dot = 0;
    for (int i = 0; i < 16; i++) begin
      step(0, 1, 0, 8'(i), 8'(255 - i), 0, 0, 0, 0);
      dot += i * (255 - i);
    end
    checks++;
    if (int'(m8_acc) != dot) begin
      failures++;
      $display("FAIL dot product %0d expected %0d", m8_acc, dot);
    end
    need("accumulate8", n_acc8);   need("hold8", n_hold8);
    need("clear8", n_clr8);        need("wrap8", n_wrap8);
    need("accumulate16", n_acc16); need("hold16", n_hold16);
    need("clear16", n_clr16);      need("wrap16", n_wrap16);
    need("reset", n_rst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
