// half_adder: one-bit half adder cell (sum = a XOR b, carry = a AND b).
// Used at the low end of every partial-product row of the array multiplier.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
