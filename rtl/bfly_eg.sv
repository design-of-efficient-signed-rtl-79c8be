// E/G half of the four-point radix-2 DIT butterfly, with twiddle W1.
//
// With complex inputs A, B, C, D and twiddle W1 the two outputs are
//   E = A + B*W1 + (C*W1 + D*W1^2)
//   G = A + B*W1 - (C*W1 + D*W1^2)
// i.e. the two first-stage butterflies (A,B) and (C,D) followed by the
// second-stage butterfly of their sums, written out so that every term is
// a product of inputs. W1^2 is never formed as a complex number: its real
// part W1r^2 - W1i^2 and its imaginary part 2*W1r*W1i are built from
// multipliers and then multiplied by Dr and Di. All 16 multipliers are
// signed compressor multipliers (pezaris_mult); the ×2 is a one-bit shift.
// Every addition of three terms is a 5-3 multicolumn row (mc53_adder):
//   Pr = Ar + Br*W1r - Bi*W1i           Pi = Ai + Br*W1i + Bi*W1r
//   Qr = Cr*W1r - Ci*W1i + Dr*Re(W1^2)  Qi = Cr*W1i + Ci*W1r + Di*Re(W1^2)
//   Er = Pr + Qr - Di*Im(W1^2)          Gr = Pr - Qr + Di*Im(W1^2)
//   Ei = Pi + Qi + Dr*Im(W1^2)          Gi = Pi - Qi - Dr*Im(W1^2)
// The only other adder is the subtractor for Re(W1^2).
//
// Pipeline (PIPE=1, three stages, one new input set per clock):
//   stage 1  first multiplier layer (B*W1, C*W1, W1r^2, W1i^2, 2*W1r*W1i)
//   stage 2  Re(W1^2), the four D products, the P rows
//   stage 3  the Q rows and the four output rows
// Outputs and out_valid appear three clocks after the inputs and in_valid.
// PIPE=0 builds the same datapath without registers (latency 0).
//
// Inputs are DW-bit signed integers; outputs are OW = 3*DW+3 bits, wide
// enough that no result can overflow. The dataflow follows the document's
// figures; the data width, the stage boundaries and the valid flag are
// this design's choices.
module bfly_eg #(
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
  output logic                 out_valid,
  output logic signed [OW-1:0] e_re, e_im,
  output logic signed [OW-1:0] g_re, g_im
);
  localparam int PW  = 2 * DW;       // product of two inputs
  localparam int TW  = 2 * DW + 1;   // Re/Im of W1^2
  localparam int DPW = DW + TW;      // D times Re/Im of W1^2

  // ---------------- stage 1: first multiplier layer ----------------
  typedef struct packed {
    logic                 v;
    logic signed [DW-1:0] a_re, a_im, d_re, d_im;
    logic signed [PW-1:0] br_w1r, bi_w1i, br_w1i, bi_w1r;
    logic signed [PW-1:0] cr_w1r, ci_w1i, cr_w1i, ci_w1r;
    logic signed [PW-1:0] w1r_w1r, w1i_w1i;
    logic signed [TW-1:0] im2;
  } s1_t;
  s1_t s1_d, s1_q;

  logic signed [DW:0] w1r_x2;
  assign w1r_x2 = {w1_re, 1'b0};

  pezaris_mult #(.AW(DW), .BW(DW)) u_m01 (.a(b_re),  .b(w1_re), .p(s1_d.br_w1r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m02 (.a(b_im),  .b(w1_im), .p(s1_d.bi_w1i));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m03 (.a(b_re),  .b(w1_im), .p(s1_d.br_w1i));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m04 (.a(b_im),  .b(w1_re), .p(s1_d.bi_w1r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m05 (.a(c_re),  .b(w1_re), .p(s1_d.cr_w1r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m06 (.a(c_im),  .b(w1_im), .p(s1_d.ci_w1i));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m07 (.a(c_re),  .b(w1_im), .p(s1_d.cr_w1i));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m08 (.a(c_im),  .b(w1_re), .p(s1_d.ci_w1r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m09 (.a(w1_re), .b(w1_re), .p(s1_d.w1r_w1r));
  pezaris_mult #(.AW(DW), .BW(DW)) u_m10 (.a(w1_im), .b(w1_im), .p(s1_d.w1i_w1i));
  pezaris_mult #(.AW(DW+1), .BW(DW)) u_m11 (.a(w1r_x2), .b(w1_im), .p(s1_d.im2));

  assign s1_d.v    = in_valid;
  assign s1_d.a_re = a_re;
  assign s1_d.a_im = a_im;
  assign s1_d.d_re = d_re;
  assign s1_d.d_im = d_im;

  pipe_reg #(.W($bits(s1_t)), .EN(PIPE)) u_r1 (.clk(clk), .rst_n(rst_n), .d(s1_d), .q(s1_q));

  // ---------------- stage 2: Re(W1^2), D products, P rows ----------------
  typedef struct packed {
    logic                  v;
    logic signed [OW-1:0]  p_re, p_im;
    logic signed [PW-1:0]  cr_w1r, ci_w1i, cr_w1i, ci_w1r;
    logic signed [DPW-1:0] dr_re2, di_re2, dr_im2, di_im2;
  } s2_t;
  s2_t s2_d, s2_q;

  logic signed [TW-1:0] re2;
  assign re2 = TW'(s1_q.w1r_w1r) - TW'(s1_q.w1i_w1i);

  pezaris_mult #(.AW(DW), .BW(TW)) u_m12 (.a(s1_q.d_re), .b(re2),      .p(s2_d.dr_re2));
  pezaris_mult #(.AW(DW), .BW(TW)) u_m13 (.a(s1_q.d_im), .b(re2),      .p(s2_d.di_re2));
  pezaris_mult #(.AW(DW), .BW(TW)) u_m14 (.a(s1_q.d_re), .b(s1_q.im2), .p(s2_d.dr_im2));
  pezaris_mult #(.AW(DW), .BW(TW)) u_m15 (.a(s1_q.d_im), .b(s1_q.im2), .p(s2_d.di_im2));

  mc53_adder #(.W(OW), .SUB(3'b100)) u_pr (
    .x0(OW'(s1_q.a_re)), .x1(OW'(s1_q.br_w1r)), .x2(OW'(s1_q.bi_w1i)), .y(s2_d.p_re));
  mc53_adder #(.W(OW), .SUB(3'b000)) u_pi (
    .x0(OW'(s1_q.a_im)), .x1(OW'(s1_q.br_w1i)), .x2(OW'(s1_q.bi_w1r)), .y(s2_d.p_im));

  assign s2_d.v      = s1_q.v;
  assign s2_d.cr_w1r = s1_q.cr_w1r;
  assign s2_d.ci_w1i = s1_q.ci_w1i;
  assign s2_d.cr_w1i = s1_q.cr_w1i;
  assign s2_d.ci_w1r = s1_q.ci_w1r;

  pipe_reg #(.W($bits(s2_t)), .EN(PIPE)) u_r2 (.clk(clk), .rst_n(rst_n), .d(s2_d), .q(s2_q));

  // ---------------- stage 3: Q rows and output rows ----------------
  typedef struct packed {
    logic                 v;
    logic signed [OW-1:0] e_re, e_im, g_re, g_im;
  } s3_t;
  s3_t s3_d, s3_q;

  logic signed [OW-1:0] q_re, q_im;

  mc53_adder #(.W(OW), .SUB(3'b010)) u_qr (
    .x0(OW'(s2_q.cr_w1r)), .x1(OW'(s2_q.ci_w1i)), .x2(OW'(s2_q.dr_re2)), .y(q_re));
  mc53_adder #(.W(OW), .SUB(3'b000)) u_qi (
    .x0(OW'(s2_q.cr_w1i)), .x1(OW'(s2_q.ci_w1r)), .x2(OW'(s2_q.di_re2)), .y(q_im));

  mc53_adder #(.W(OW), .SUB(3'b100)) u_er (
    .x0(s2_q.p_re), .x1(q_re), .x2(OW'(s2_q.di_im2)), .y(s3_d.e_re));
  mc53_adder #(.W(OW), .SUB(3'b010)) u_gr (
    .x0(s2_q.p_re), .x1(q_re), .x2(OW'(s2_q.di_im2)), .y(s3_d.g_re));
  mc53_adder #(.W(OW), .SUB(3'b000)) u_ei (
    .x0(s2_q.p_im), .x1(q_im), .x2(OW'(s2_q.dr_im2)), .y(s3_d.e_im));
  mc53_adder #(.W(OW), .SUB(3'b110)) u_gi (
    .x0(s2_q.p_im), .x1(q_im), .x2(OW'(s2_q.dr_im2)), .y(s3_d.g_im));

  assign s3_d.v = s2_q.v;

  pipe_reg #(.W($bits(s3_t)), .EN(PIPE)) u_r3 (.clk(clk), .rst_n(rst_n), .d(s3_d), .q(s3_q));

  assign out_valid = s3_q.v;
  assign e_re      = s3_q.e_re;
  assign e_im      = s3_q.e_im;
  assign g_re      = s3_q.g_re;
  assign g_im      = s3_q.g_im;
endmodule
