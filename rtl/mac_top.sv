// Top level of the area-efficient multiply-accumulate design: the two MAC configurations
// evaluated, an 8-bit MAC (16-bit accumulator) and a 16-bit MAC (32-bit accumulator), side by
// side. They share clock and reset and nothing else; each has its own enable, clear, operands
// and accumulator output. Each MAC is a mac_unit (compressor_multiplier + carry_select_adder +
// accumulator register); see mac_unit for timing: a product enters the accumulator at the
// clock edge it is presented at and is visible one cycle later.
module mac_top
  import mac_pkg::*;
#(
  parameter int W8  = DEFAULT_WIDTH,
  parameter int W16 = WIDE_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  // 8-bit MAC
  input  logic             m8_en,
  input  logic             m8_clr,
  input  logic [W8-1:0]    m8_x,
  input  logic [W8-1:0]    m8_y,
  output logic [2*W8-1:0]  m8_acc,
  // 16-bit MAC
  input  logic             m16_en,
  input  logic             m16_clr,
  input  logic [W16-1:0]   m16_x,
  input  logic [W16-1:0]   m16_y,
  output logic [2*W16-1:0] m16_acc
);
  mac_unit #(.WIDTH(W8)) u_mac8 (
    .clk(clk), .rst(rst), .en(m8_en), .clr(m8_clr), .x(m8_x), .y(m8_y), .acc(m8_acc)
  );

  mac_unit #(.WIDTH(W16)) u_mac16 (
    .clk(clk), .rst(rst), .en(m16_en), .clr(m16_clr), .x(m16_x), .y(m16_y), .acc(m16_acc)
  );
endmodule
