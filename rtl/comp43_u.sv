// Conventional (unsigned) 4-3 compressor: counts four equal-weight bits.
//   a + b + c + d = s + 2*c0 + 4*c1
// Purely combinational. s is the parity of the inputs, c0 is bit 1 of the
// count and c1 is set only when all four inputs are high. The document
// names this kind of cell without giving its gates; this is a plain
// sum-of-products form.
module comp43_u (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic s,
  output logic c0,
  output logic c1
);
  logic axb, cxd;
  assign axb = a ^ b;
  assign cxd = c ^ d;
  assign s   = axb ^ cxd;
  // count is 2 or 3: exactly one pair is full, or both pairs odd
  assign c0  = ((a & b) ^ (c & d)) | (axb & cxd);
  assign c1  = a & b & c & d;
endmodule
