// Signed 4-3 compressor with one negative-weight input.
// a carries weight -1, b, c and d weight +1; of the outputs only s is
// negative:
//   b + c + d - a = -s + 2*c0 + 4*c1     (range -1 .. +3)
// s is the parity of the four inputs. c0 is a 4:1 multiplexer selected by
// {a,b} choosing among OR, AND and NAND of c and d; c1 is set only for +3
// (b, c, d high, a low). The ports, output polarities, s and c1 follow the
// document. The multiplexer data inputs are derived here from the
// arithmetic above (c|d for a=b, c&d for a=1,b=0, ~(c&d) for a=0,b=1).
// Purely combinational.
module comp43_s1 (
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
      2'b10:   c0 = c & d;
      2'b01:   c0 = ~(c & d);
      default: c0 = c | d;
    endcase
  end
  assign c1 = b & c & d & ~a;
endmodule
