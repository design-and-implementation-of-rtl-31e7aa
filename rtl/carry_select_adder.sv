// Carry-select adder of WIDTH bits, used as the accumulation adder of the MAC.
//
// The operands are cut into blocks of BLOCK bits. The lowest block is a plain ripple-carry adder
// with carry-in 0 (the sum needs no carry-in there). Every higher block holds two ripple-carry
// adders working at the same time, one assuming a carry-in of 0 and one assuming 1; once the
// real carry out of the block below is known, a multiplexer picks that block's sum and carry.
// The delay is therefore one block ripple plus one multiplexer per block, not WIDTH full adders.
// If WIDTH is not a multiple of BLOCK the top block is narrower.
//
// Interface: a, b operands; s = (a + b) mod 2**WIDTH; co the carry out of the top bit.
// Combinational, no clock. The block size of 4 is this design's choice.
module carry_select_adder
  import mac_pkg::*;
#(
  parameter int WIDTH = 2 * DEFAULT_WIDTH,
  parameter int BLOCK = CSLA_BLOCK
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  localparam int NBLK = (WIDTH + BLOCK - 1) / BLOCK;

  if (WIDTH < 1 || BLOCK < 1) begin : g_bad_size
    $error("carry_select_adder needs WIDTH >= 1 and BLOCK >= 1");
  end

  // carry[j] is the real carry into block j.
  logic [NBLK:0] carry;
  assign carry[0] = 1'b0;

  for (genvar j = 0; j < NBLK; j++) begin : g_blk
    localparam int LSB = j * BLOCK;
    localparam int W   = (WIDTH - LSB < BLOCK) ? WIDTH - LSB : BLOCK;

    if (j == 0) begin : g_first
      ripple_carry_adder #(.W(W)) u_rca (
        .a(a[LSB +: W]), .b(b[LSB +: W]), .ci(1'b0), .s(s[LSB +: W]), .co(carry[1])
      );
    end else begin : g_select
      logic [W-1:0] s0, s1;
      logic         c0, c1;
      ripple_carry_adder #(.W(W)) u_rca0 (
        .a(a[LSB +: W]), .b(b[LSB +: W]), .ci(1'b0), .s(s0), .co(c0)
      );
      ripple_carry_adder #(.W(W)) u_rca1 (
        .a(a[LSB +: W]), .b(b[LSB +: W]), .ci(1'b1), .s(s1), .co(c1)
      );
      assign s[LSB +: W] = carry[j] ? s1 : s0;
      assign carry[j+1]  = carry[j] ? c1 : c0;
    end
  end

  assign co = carry[NBLK];
endmodule
