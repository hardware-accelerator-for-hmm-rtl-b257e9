// full_adder: one-bit full adder (sum = a ^ b ^ cin, carry = majority).
// Two of them in series form the 2-bit adder cells of the 16-bit approximate
// adder. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (cin & (a ^ b));
endmodule
