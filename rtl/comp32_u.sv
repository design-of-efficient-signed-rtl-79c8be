// Full adder, used as the conventional (unsigned) 3-2 compressor.
// All three inputs and both outputs carry positive weight:
//   a + b + c = s + 2*co.
// Purely combinational. The document names conventional compressors for the
// columns of a partial-product array that hold no negative bits; the gate
// form (two XORs and a majority) is the textbook one.
module comp32_u (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  logic axb;
  assign axb = a ^ b;
  assign s   = axb ^ c;
  assign co  = (a & b) | (axb & c);
endmodule
