// F/H half of the four-point radix-2 DIT butterfly, with twiddles W1 and W2.
//
// With complex inputs A, B, C, D the two outputs are
//   F = A - B*W1 + (C*W2 - D*W1*W2)
//   H = A - B*W1 - (C*W2 - D*W1*W2)
// i.e. the differences of the first-stage butterflies (A,B) and (C,D)
// combined by a second-stage butterfly with twiddle W2. The product W1*W2 is
// built from four multipliers, Re = W1r*W2r - W1i*W2i and
// Im = W1i*W2r + W1r*W2i, and then multiplied by Dr and Di. All 16
// multipliers are signed compressor multipliers (pezaris_mult). Every
// three-term sum is a 5-3 multicolumn row (mc53_adder):
//   Pr = Ar - Br*W1r + Bi*W1i            Pi = Ai - Br*W1i - Bi*W1r
//   Qr = Cr*W2r - Ci*W2i - Dr*Re(W1W2)   Qi = Cr*W2i + Ci*W2r - Di*Re(W1W2)
//   Fr = Pr + Qr + Di*Im(W1W2)           Hr = Pr - Qr - Di*Im(W1W2)
//   Fi = Pi + Qi - Dr*Im(W1W2)           Hi = Pi - Qi + Dr*Im(W1W2)
// The only other adders are the subtractor and adder that form W1*W2.
//
// Pipeline (PIPE=1, three stages, one new input set per clock):
//   stage 1  first multiplier layer (B*W1, C*W2, the four W1*W2 terms)
//   stage 2  Re/Im(W1W2), the four D products, the P rows
//   stage 3  the Q rows and the four output rows
// Outputs and out_valid appear three clocks after the inputs and in_valid;
// PIPE=0 builds the datapath without registers. Widths as in bfly_eg:
// DW-bit signed inputs, OW = 3*DW+3 bit outputs that cannot overflow. The
// dataflow follows the document's figures; the data width, the stage
// boundaries and the valid flag are this design's choices.
module bfly_fh #(
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
  output logic signed [OW-1:0] f_re, f_im,
  output logic signed [OW-1:0] h_re, h_im
);
  localparam int PW  = 2 * DW;       // product of two inputs
  localparam int TW  = 2 * DW + 1;   // Re/Im of W1*W2
  localparam int DPW = DW + TW;      // D times Re/Im of W1*W2

  // ---------------- stage 1: first multiplier layer ----------------
  typedef struct packed {
    logic                 v;
    logic signed [DW-1:0] a_re, a_im, d_re, d_im;
    logic signed [PW-1:0] br_w1r, bi_w1i, br_w1i, bi_w1r;
    logic signed [PW-1:0] cr_w2r, ci_w2i, cr_w2i, ci_w2r;
    logic signed [PW-1:0] w1r_w2r, w1i_w2i, w1i_w2r, w1r_w2i;
  } s1_t;
  s1_t s1_d, s1_q;

  pezaris_mult #(.AW(DW), .BW(DW)) u_m01 (.a(b_re),  .b(w1_re), .p(s1_d.br_w1r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m02 (.a(b_im),  .b(w1_im), .p(s1_d.bi_w1i));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m03 (.a(b_re),  .b(w1_im), .p(s1_d.br_w1i));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m04 (.a(b_im),  .b(w1_re), .p(s1_d.bi_w1r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m05 (.a(c_re),  .b(w2_re), .p(s1_d.cr_w2r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m06 (.a(c_im),  .b(w2_im), .p(s1_d.ci_w2i));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m07 (.a(c_re),  .b(w2_im), .p(s1_d.cr_w2i));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m08 (.a(c_im),  .b(w2_re), .p(s1_d.ci_w2r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m09 (.a(w1_re), .b(w2_re), .p(s1_d.w1r_w2r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m10 (.a(w1_im), .b(w2_im), .p(s1_d.w1i_w2i));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m11 (.a(w1_im), .b(w2_re), .p(s1_d.w1i_w2r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m12 (.a(w1_re), .b(w2_im), .p(s1_d.w1r_w2i));

  assign s1_d.v    = in_valid;
  assign s1_d.a_re = a_re;
  assign s1_d.a_im = a_im;
  assign s1_d.d_re = d_re;
  assign s1_d.d_im = d_im;

  pipe_reg #(.W($bits(s1_t)), .EN(PIPE)) u_r1 (.clk(clk), .rst_n(rst_n), .d(s1_d), .q(s1_q));

  // ---------------- stage 2: W1*W2, D products, P rows ----------------
  typedef struct packed {
    logic                  v;
    logic signed [OW-1:0]  p_re, p_im;
    logic signed [PW-1:0]  cr_w2r, ci_w2i, cr_w2i, ci_w2r;
    logic signed [DPW-1:0] dr_re12, di_re12, dr_im12, di_im12;
  } s2_t;
  s2_t s2_d, s2_q;

  logic signed [TW-1:0] re12, im12;
  assign re12 = TW'(s1_q.w1r_w2r) - TW'(s1_q.w1i_w2i);
  assign im12 = TW'(s1_q.w1i_w2r) + TW'(s1_q.w1r_w2i);

  pezaris_mult #(.AW(DW), .BW(TW)) u_m13 (.a(s1_q.d_re), .b(re12), .p(s2_d.dr_re12));
  pezaris_mult #(.AW(DW), .BW(TW)) u_m14 (.a(s1_q.d_im), .b(re12), .p(s2_d.di_re12));
  pezaris_mult #(.AW(DW), .BW(TW)) u_m15 (.a(s1_q.d_re), .b(im12), .p(s2_d.dr_im12));
  pezaris_mult #(.AW(DW), .BW(TW)) u_m16 (.a(s1_q.d_im), .b(im12), .p(s2_d.di_im12));

  mc53_adder #(.W(OW), .SUB(3'b010)) u_pr (
    .x0(OW'(s1_q.a_re)), .x1(OW'(s1_q.br_w1r)), .x2(OW'(s1_q.bi_w1i)), .y(s2_d.p_re));
  mc53_adder #(.W(OW), .SUB(3'b110)) u_pi (
    .x0(OW'(s1_q.a_im)), .x1(OW'(s1_q.br_w1i)), .x2(OW'(s1_q.bi_w1r)), .y(s2_d.p_im));

  assign s2_d.v      = s1_q.v;
  assign s2_d.cr_w2r = s1_q.cr_w2r;
  assign s2_d.ci_w2i = s1_q.ci_w2i;
  assign s2_d.cr_w2i = s1_q.cr_w2i;
  assign s2_d.ci_w2r = s1_q.ci_w2r;

  pipe_reg #(.W($bits(s2_t)), .EN(PIPE)) u_r2 (.clk(clk), .rst_n(rst_n), .d(s2_d), .q(s2_q));

  // ---------------- stage 3: Q rows and output rows ----------------
  typedef struct packed {
    logic                 v;
    logic signed [OW-1:0] f_re, f_im, h_re, h_im;
  } s3_t;
  s3_t s3_d, s3_q;

  logic signed [OW-1:0] q_re, q_im;

  mc53_adder #(.W(OW), .SUB(3'b110)) u_qr (
    .x0(OW'(s2_q.cr_w2r)), .x1(OW'(s2_q.ci_w2i)), .x2(OW'(s2_q.dr_re12)), .y(q_re));
  mc53_adder #(.W(OW), .SUB(3'b100)) u_qi (
    .x0(OW'(s2_q.cr_w2i)), .x1(OW'(s2_q.ci_w2r)), .x2(OW'(s2_q.di_re12)), .y(q_im));

  mc53_adder #(.W(OW), .SUB(3'b000)) u_fr (
    .x0(s2_q.p_re), .x1(q_re), .x2(OW'(s2_q.di_im12)), .y(s3_d.f_re));
  mc53_adder #(.W(OW), .SUB(3'b110)) u_hr (
    .x0(s2_q.p_re), .x1(q_re), .x2(OW'(s2_q.di_im12)), .y(s3_d.h_re));
  mc53_adder #(.W(OW), .SUB(3'b100)) u_fi (
    .x0(s2_q.p_im), .x1(q_im), .x2(OW'(s2_q.dr_im12)), .y(s3_d.f_im));
  mc53_adder #(.W(OW), .SUB(3'b010)) u_hi (
    .x0(s2_q.p_im), .x1(q_im), .x2(OW'(s2_q.dr_im12)), .y(s3_d.h_im));

  assign s3_d.v = s2_q.v;

  pipe_reg #(.W($bits(s3_t)), .EN(PIPE)) u_r3 (.clk(clk), .rst_n(rst_n), .d(s3_d), .q(s3_q));

  assign out_valid = s3_q.v;
  assign f_re      = s3_q.f_re;
  assign f_im      = s3_q.f_im;
  assign h_re      = s3_q.h_re;
  assign h_im      = s3_q.h_im;
endmodule
