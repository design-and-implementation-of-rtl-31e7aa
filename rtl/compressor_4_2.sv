// Classic 4:2 compressor. Four bits x1..x4 of one weight and a carry-in cin from the column to
// the right are reduced to one sum bit of the same weight and two bits of the next weight
// (carry and cout):  x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// The Boolean form follows the classic two-level description with a three-XOR critical path:
//   cout  = (x1^x2) ? x3  : x1
//   sum   = x1^x2^x3^x4^cin
//   carry = (x1^x2^x3^x4) ? cin : x4
// cout does not depend on cin, so a row of these compressors has no rippling carry.
// Combinational, no clock. In this design column_compressor chains them inside one column.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic p12, p1234;
  assign p12   = x1 ^ x2;
  assign p1234 = p12 ^ x3 ^ x4;
  assign cout  = p12 ? x3 : x1;
  assign sum   = p1234 ^ cin;
  assign carry = p1234 ? cin : x4;
endmodule
