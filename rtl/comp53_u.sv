// Conventional (unsigned) 5-3 compressor: counts five equal-weight bits.
//   a + b + c + d + e = s + 2*c0 + 4*c1
// Purely combinational. It is the cell of the 5-3 multicolumn adder used in
// the butterfly and of the all-positive columns of the signed multiplier.
// The document refers to the 5-3 compressor of the literature without its
// gates; this version adds {a,b} and {c,d,e} as 2-bit counts.
module comp53_u (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic s,
  output logic c0,
  output logic c1
);
  logic [1:0] n_ab, n_cde;
  logic [2:0] n;
  assign n_ab  = {a & b, a ^ b};
  assign n_cde = {(c & d) | (c & e) | (d & e), c ^ d ^ e};
  assign n     = {1'b0, n_ab} + {1'b0, n_cde};
  assign s     = n[0];
  assign c0    = n[1];
  assign c1    = n[2];
endmodule
