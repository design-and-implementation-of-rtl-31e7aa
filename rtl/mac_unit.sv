// Multiply-accumulate unit: acc <= acc + x * y on every enabled clock edge.
//
// Datapath: the compressor_multiplier forms the 2*WIDTH-bit product of the unsigned operands
// x and y in one combinational pass; a carry-select adder adds it to the accumulator register;
// the register takes the sum at the rising clock edge. The accumulator is 2*WIDTH bits wide
// (16 flip-flops for the 8-bit MAC, 32 for the 16-bit MAC) and has no guard bits, so a sum that
// passes 2**(2*WIDTH)-1 wraps around modulo 2**(2*WIDTH); no saturation or rounding is applied.
//
// Control (this design's choice; only clock and accumulator are fixed by the architecture):
//   rst  synchronous, active high: acc <= 0. Highest priority.
//   clr  synchronous, active high: acc <= 0, starting a new sum.
//   en   active high: acc <= acc + x*y. With en low and clr low the accumulator holds.
// Timing: x and y presented before rising edge t are included in acc right after edge t, so a
// product appears in acc one clock after it is presented; one product is accepted per clock.
module mac_unit
  import mac_pkg::*;
#(
  parameter int WIDTH = DEFAULT_WIDTH
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  logic               clr,
  input  logic [WIDTH-1:0]   x,
  input  logic [WIDTH-1:0]   y,
  output logic [2*WIDTH-1:0] acc
);
  logic [2*WIDTH-1:0] product;
  logic [2*WIDTH-1:0] sum;
  logic               sum_co;   // carry out of the accumulator adder: the wrap-around is intended

  compressor_multiplier #(.N(WIDTH)) u_mult (.x(x), .y(y), .p(product));

  carry_select_adder #(.WIDTH(2 * WIDTH)) u_add (.a(acc), .b(product), .s(sum), .co(sum_co));

  always_ff @(posedge clk) begin
    if (rst || clr) acc <= '0;
    else if (en)    acc <= sum;
  end
endmodule
