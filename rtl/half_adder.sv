// half_adder: one-bit half adder, sum = a xor b, carry = a and b.
// Two of these plus an OR of their carries form the full adder used in the
// carry-save accumulator. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
