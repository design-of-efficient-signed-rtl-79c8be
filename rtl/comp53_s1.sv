// Signed 5-3 compressor with one negative-weight input.
// a carries weight -1, b, c, d and e weight +1; only output s is negative:
//   b + c + d + e - a = -s + 2*c0 + 4*c1   (range -1 .. +4)
// s is the parity. The carries are selected by {a,b} from the majority,
// "all three high" and "any high" of c, d, e:
//   a=b      : c1 = all3,  c0 = any3 & ~all3   (value c+d+e)
//   a=0, b=1 : c1 = maj,   c0 = ~maj           (value c+d+e+1)
//   a=1, b=0 : c1 = 0,     c0 = maj            (value c+d+e-1)
// Ports and polarities follow the document; the carry selections are
// derived here from the arithmetic above.
// Purely combinational.
module comp53_s1 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic s,
  output logic c0,
  output logic c1
);
  logic maj, all3, any3;
  assign maj  = (c & d) | (c & e) | (d & e);
  assign all3 = c & d & e;
  assign any3 = c | d | e;
  // 2:1 multiplexer: d^e or its inverse, selected by a^b^c
  assign s    = (a ^ b ^ c) ? ~(d ^ e) : (d ^ e);
  always_comb begin
    unique case ({a, b})
      2'b01: begin c1 = maj;  c0 = ~maj;        end
      2'b10: begin c1 = 1'b0; c0 = maj;         end
      default: begin c1 = all3; c0 = any3 & ~all3; end
    endcase
  end
endmodule
