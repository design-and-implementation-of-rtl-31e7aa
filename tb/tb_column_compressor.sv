// Self-checking testbench of column_compressor. One instance for every column size from 2 to 16
// bits (covering every tail case: 1, 2, 3 or 4 bits left after the 4:2 chain) is driven by the
// low bits of one stimulus word. All 65,536 values of the word are applied, so each instance sees
// every input pattern. For each instance the sum bit plus twice the number of set carry bits must
// equal the number of set input bits.
module tb_column_compressor;
  localparam int NMAX = 16;
  logic [NMAX-1:0] stim;
  int   sum_ones   [2:NMAX];
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  for (genvar n = 2; n <= NMAX; n++) begin : g_n
    logic           s;
    logic [n/2-1:0] c;
    column_compressor #(.N(n)) dut (.in(stim[n-1:0]), .sum(s), .carry(c));
    assign sum_ones[n] = int'(s) + 2 * $countones(c);
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << NMAX); v++) begin
      stim = NMAX'(v);
      @(posedge clk);
      for (int n = 2; n <= NMAX; n++) begin
        int expect_ones;
        expect_ones = $countones(stim & NMAX'((1 << n) - 1));
        checks++;
        if (sum_ones[n] != expect_ones) begin
          failures++;
          if (failures < 10)
            $display("FAIL N=%0d in=%0h got %0d expected %0d", n, v, sum_ones[n], expect_ones);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
