// full_adder: one-bit full adder built from two half adders.
//
// The first half adder adds a and b, the second adds the carry-in to that
// partial sum; the carry-out is set when either half adder produced a carry
// (the two can never both be set). Building the full adder out of half adders
// follows the filter's description; joining the two carries with an OR is the
// usual textbook completion and this design's choice.
// Interface: a, b, cin in; s (sum) and cout out. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic s1, c1, c2;

  half_adder u_ha0 (.a(a),  .b(b),   .s(s1), .c(c1));
  half_adder u_ha1 (.a(s1), .b(cin), .s(s),  .c(c2));

  assign cout = c1 | c2;
endmodule
