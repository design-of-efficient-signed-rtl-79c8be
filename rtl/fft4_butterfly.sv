// Four-point radix-2 decimation-in-time FFT butterfly, pipelined, built from
// signed compressor multipliers and 5-3 multicolumn adders.
//
// Inputs are four complex samples A, B, C, D and two complex twiddle
// factors W1, W2, all DW-bit signed integers per component. The outputs are
//   E = A + B*W1 + C*W1 + D*W1^2      G = A + B*W1 - C*W1 - D*W1^2
//   F = A - B*W1 + C*W2 - D*W1*W2     H = A - B*W1 - C*W2 + D*W1*W2
// i.e. two radix-2 stages, (A,B) and (C,D) first and the pairs of results
// second, expanded into products of inputs so that each output is a single
// three-operand sum per component. With A=x0, B=x2, C=x1, D=x3, W1=1 and
// W2=-j this is the 4-point DFT of x.
//
// The E/G half (bfly_eg) and the F/H half (bfly_fh) are separate
// datapaths with 16 multipliers each, as in the document's structure; they
// share only the inputs. Both have three pipeline stages: one new input set
// per clock, E, F, G, H and out_valid three clocks after the inputs and
// in_valid. PIPE=0 gives the same datapath without pipeline registers.
// Outputs are OW = 3*DW+3 bits and exact (no rounding, no overflow).
// rst_n is an active-low asynchronous reset of the pipeline registers.
module fft4_butterfly #(
  parameter int DW   = 8,
  parameter bit PIPE = 1'b1,
  parameter int OW   = 3 * DW + 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] a_re, a_im,
  input  logic signed [DW-1:0] b_re, b_im,
  input  logic signed [DW-1:0] c_re, c_im,
  input  logic signed [DW-1:0] d_re, d_im,
  input  logic signed [DW-1:0] w1_re, w1_im,
  input  logic signed [DW-1:0] w2_re, w2_im,
  output logic                 out_valid,
  output logic signed [OW-1:0] e_re, e_im,
  output logic signed [OW-1:0] f_re, f_im,
  output logic signed [OW-1:0] g_re, g_im,
  output logic signed [OW-1:0] h_re, h_im
);
  logic eg_valid, fh_valid;

  bfly_eg #(.DW(DW), .PIPE(PIPE), .OW(OW)) u_eg (
    .clk, .rst_n, .in_valid,
    .a_re, .a_im, .b_re, .b_im, .c_re, .c_im, .d_re, .d_im,
    .w1_re, .w1_im,
    .out_valid(eg_valid),
    .e_re, .e_im, .g_re, .g_im
  );

  bfly_fh #(.DW(DW), .PIPE(PIPE), .OW(OW)) u_fh (
    .clk, .rst_n, .in_valid,
    .a_re, .a_im, .b_re, .b_im, .c_re, .c_im, .d_re, .d_im,
    .w1_re, .w1_im, .w2_re, .w2_im,
    .out_valid(fh_valid),
    .f_re, .f_im, .h_re, .h_im
  );

  // both halves have the same depth, so their valid flags always agree
  assign out_valid = eg_valid & fh_valid;

  a_halves_aligned: assert property (@(posedge clk) disable iff (!rst_n) eg_valid == fh_valid)
    else $error("E/G and F/H pipelines out of step");
endmodule
