// Signed 4-3 compressor with two negative-weight inputs.
// a and b carry weight -1, c and d weight +1; of the outputs only c0 is
// negative:
//   c + d - a - b = s - 2*c0 + 4*c1      (range -2 .. +2)
// s is the parity of all four inputs: a 2:1 multiplexer passes c^d or its
// inverse, selected by a^b. c0 is a 4:1 multiplexer selected by the signed pair {a,b}, with
// data c&d (a,b = 00), ~(c|d) (exactly one of a,b high) and ~(c&d) (11).
// c1 is set only for the +2 case (c,d high, a,b low). Structure and
// equations follow the document; purely combinational.
module comp43_s2 (
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
  // 2:1 multiplexer: c^d or its inverse, selected by a^b
  assign s   = axb ? ~cxd : cxd;
  always_comb begin
    unique case ({a, b})
      2'b00:          c0 = c & d;
      2'b01, 2'b10:   c0 = ~(c | d);
      default:        c0 = ~(c & d);
    endcase
  end
  assign c1 = c & d & ~(a | b);
endmodule
