// Full adder: adds three bits of equal weight into a sum bit and a carry bit of the next weight
// (a + b + ci = s + 2*co). Pure combinational logic, no clock. It is the cell of the ripple-carry
// adders inside the carry-select adder and of the tail of each compressor column.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = p ? ci : a;   // majority(a, b, ci) written as a 2:1 multiplexer on the propagate bit
endmodule
