// Signed 3-2 compressor for one or two negative-weight inputs.
// Inputs a and b share one polarity, c has the other. Output s takes the
// polarity of c and co the polarity of a and b:
//   one negative bit  (c < 0):      a + b - c = 2*co - s
//   two negative bits (a, b < 0):   c - a - b = s - 2*co
// Both cases are the same logic, because the second is the negation of the
// first. s is the parity of the inputs; co is high when a and b are both
// high, or exactly one of them is high and c is low.
// Purely combinational. The input/output polarities follow the document;
// the carry equation is derived here from the arithmetic above.
module comp32_s (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  logic axb;
  assign axb = a ^ b;
  assign s   = axb ^ c;
  assign co  = (a & b) | (axb & ~c);
endmodule
