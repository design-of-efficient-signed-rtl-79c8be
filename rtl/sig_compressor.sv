// Column cell selector for the signed partial-product array.
// Instantiates the compressor that matches one column position: N bits
// (1..5) of which K (0..2) have the minority polarity. The inputs arrive
// minority first, x[0..K-1]. The cell computes as if the minority bits were
// the negative ones; when they are in fact the positive ones the caller
// reads every output with the opposite polarity, which is exact because the
// mirrored column is the negation of the modelled one.
//
//   N=1        pass-through to s
//   N=2,3 K=0  full adder            (s +, c0 +)
//   N=2,3 K=1  signed 3-2            (s -, c0 +)   (N=2 pads with a 0)
//   N=4   K=0/1/2  4-3 unsigned / one signed / two signed
//   N=5   K=0/1/2  5-3 unsigned / one signed / two signed
// The 4-3 and 5-3 signed cells give (s -, c0 +, c1 +) for K=1 and
// (s +, c0 -, c1 +) for K=2. Unused outputs are driven low. Combinational.
module sig_compressor #(
  parameter int N = 5,
  parameter int K = 0
) (
  input  logic [4:0] x,
  output logic       s,
  output logic       c0,
  output logic       c1
);
  if (N == 1) begin : g_pass
    assign s  = x[0];
    assign c0 = 1'b0;
    assign c1 = 1'b0;
  end else if (N <= 3 && K == 0) begin : g_fa
    comp32_u u_fa (.a(x[0]), .b(x[1]), .c(N == 3 ? x[2] : 1'b0), .s(s), .co(c0));
    assign c1 = 1'b0;
  end else if (N <= 3) begin : g_c32
    comp32_s u_c32 (.a(x[1]), .b(N == 3 ? x[2] : 1'b0), .c(x[0]), .s(s), .co(c0));
    assign c1 = 1'b0;
  end else if (N == 4 && K == 0) begin : g_c43u
    comp43_u u_c (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .s(s), .c0(c0), .c1(c1));
  end else if (N == 4 && K == 1) begin : g_c43s1
    comp43_s1 u_c (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .s(s), .c0(c0), .c1(c1));
  end else if (N == 4) begin : g_c43s2
    comp43_s2 u_c (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .s(s), .c0(c0), .c1(c1));
  end else if (K == 0) begin : g_c53u
    comp53_u u_c (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .e(x[4]), .s(s), .c0(c0), .c1(c1));
  end else if (K == 1) begin : g_c53s1
    comp53_s1 u_c (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .e(x[4]), .s(s), .c0(c0), .c1(c1));
  end else begin : g_c53s2
    comp53_s2 u_c (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .e(x[4]), .s(s), .c0(c0), .c1(c1));
  end
endmodule
