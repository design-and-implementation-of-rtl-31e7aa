// Ripple-carry adder of W bits: a chain of full adders, the carry running from bit 0 to bit W-1.
// Combinational, no clock. The carry-select adder builds its blocks from it, one copy per
// assumed carry-in.
module ripple_carry_adder #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = ci;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign co = c[W];
endmodule
