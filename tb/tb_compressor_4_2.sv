// Self-checking testbench of compressor_4_2. All 32 input combinations are applied; for each,
// the outputs must satisfy x1+x2+x3+x4+cin = sum + 2*(carry+cout), and cout must not change when
// only cin changes (no carry ripples through a row of 4:2 compressors). Expected values are
// computed here from the input count, not from the compressor's own equations.
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin;
  logic sum, carry, cout;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  compressor_4_2 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int ones;
      {cin, x4, x3, x2, x1} = 5'(v);
      @(posedge clk);
      ones = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != ones) begin
        failures++;
        $display("FAIL in=%05b sum=%0d carry=%0d cout=%0d", v[4:0], sum, carry, cout);
      end
      checks++;
      if (sum != ones[0]) begin
        failures++;
        $display("FAIL parity in=%05b sum=%0d", v[4:0], sum);
      end
      // cout with cin = 0 against cin = 1 for the same x1..x4
    end
    for (int v = 0; v < 16; v++) begin
      logic c0;
      {x4, x3, x2, x1} = 4'(v);
      cin = 1'b0;
      @(posedge clk);
      c0 = cout;
      cin = 1'b1;
      @(posedge clk);
      checks++;
      if (cout != c0) begin
        failures++;
        $display("FAIL cout depends on cin for x=%04b", v[3:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
