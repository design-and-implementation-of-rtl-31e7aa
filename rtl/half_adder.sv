// Half adder: adds two bits of equal weight into a sum bit and a carry bit of the next weight.
// Pure combinational logic, no clock. It closes the tail of a compressor column where two bits
// remain (see column_compressor).
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,    // a xor b
  output logic c     // a and b, weight 2
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
