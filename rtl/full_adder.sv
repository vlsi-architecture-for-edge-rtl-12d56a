// full_adder: one-bit full adder cell, the building block of both the array
// multiplier rows and the ripple-carry adder.
// sum = a ^ b ^ cin; carry out = majority(a, b, cin). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
