// Three-operand adder/subtractor built as a 5-3 multicolumn compressor row.
//
//   y = (+/-)x0 (+/-)x1 (+/-)x2   (mod 2^W), sign of each operand by SUB
//
// Every column k holds five bits: the three operand bits, the first carry
// c0 of column k-1 and the second carry c1 of column k-2. One conventional
// 5-3 compressor per column turns them into the sum bit y[k] and the two
// carries it passes up, so the row adds three words with no separate
// carry-propagate adder. A subtracted operand enters inverted (two's
// complement); the +1 per subtracted operand is placed in the carry slots
// that are free at the bottom of the row: the c0 slot of column 0 takes bit 0
// of the count and the c1 slot of column 1 takes bit 1, so up to three
// operands may be subtracted. Operands are taken at the full output width W
// (the caller sign-extends). Purely combinational.
//
// The document replaces the butterfly's adders and subtractors by 5-3
// multicolumn compressors and subtracts by adding the two's complement; the
// ripple arrangement of the carries and the placement of the +1 terms are
// this design's choices.
module mc53_adder #(
  parameter int         W   = 16,
  parameter logic [2:0] SUB = 3'b000
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  output logic [W-1:0] y
);
  localparam logic [1:0] NSUB = 2'(int'(SUB[0]) + int'(SUB[1]) + int'(SUB[2]));

  logic [W-1:0] o0, o1, o2;
  logic [W:0]   c0;   // c0[k]: first carry into column k (c0[W] is dropped)
  logic [W+1:0] c1;   // c1[k]: second carry into column k (c1[W+1:W] dropped)

  assign o0 = SUB[0] ? ~x0 : x0;
  assign o1 = SUB[1] ? ~x1 : x1;
  assign o2 = SUB[2] ? ~x2 : x2;

  assign c0[0] = NSUB[0];
  assign c1[0] = 1'b0;
  assign c1[1] = NSUB[1];

  for (genvar k = 0; k < W; k++) begin : g_col
    comp53_u u_c (
      .a (o0[k]),
      .b (o1[k]),
      .c (o2[k]),
      .d (c0[k]),
      .e (c1[k]),
      .s (y[k]),
      .c0(c0[k+1]),
      .c1(c1[k+2])
    );
  end
endmodule
