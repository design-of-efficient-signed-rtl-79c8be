// Signed 5-3 compressor with two negative-weight inputs.
// a and b carry weight -1, c, d and e weight +1; only output c0 is negative:
//   c + d + e - a - b = s - 2*c0 + 4*c1   (range -2 .. +3)
// s is the parity: a 2:1 multiplexer passes d^e or its inverse, selected
// by a^b^c. The carries are selected by
// the signed pair {a,b} from three functions of the positive bits: the
// majority, "all three high" and "none high". c1 follows the document's
// equation; c0 is a 4:1 multiplexer whose data inputs are derived from the
// arithmetic above (majority for a,b = 00, all-or-none for exactly one of
// a,b, inverted majority for 11). Purely combinational.
module comp53_s2 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic s,
  output logic c0,
  output logic c1
);
  logic maj, all3, none3;
  assign maj   = (c & d) | (c & e) | (d & e);
  assign all3  = c & d & e;
  assign none3 = ~(c | d | e);
  // 2:1 multiplexer: d^e or its inverse, selected by a^b^c
  assign s     = (a ^ b ^ c) ? ~(d ^ e) : (d ^ e);
  assign c1    = (~a & ~b & maj) | ((a ^ b) & all3);
  always_comb begin
    unique case ({a, b})
      2'b00:          c0 = maj;
      2'b01, 2'b10:   c0 = all3 | none3;
      default:        c0 = ~maj;
    endcase
  end
endmodule
