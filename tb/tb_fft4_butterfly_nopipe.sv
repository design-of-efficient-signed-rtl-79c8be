// Testbench for fft4_butterfly built without its pipeline (PIPE=0), side by
// side with the default pipelined build.
// Random input sets (with extreme component values) are applied every clock.
// The PIPE=0 build must give the reference result in the same cycle; the
// reference expands E, F, G, H term by term with W1^2 and W1*W2 formed
// explicitly. The pipelined build must give the very same four outputs three
// clocks later. Both builds are therefore tied to one independent model.
module tb_fft4_butterfly_nopipe;
  int checks = 0, failures = 0;
  localparam int DW = 8, OW = 3 * DW + 3, LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] x [12];   // ar ai br bi cr ci dr di w1r w1i w2r w2i
  logic signed [OW-1:0] zc [8], zp [8];
  logic vc, vp;
  longint hist [$][8];

  always #5 clk = ~clk;

  fft4_butterfly #(.PIPE(1'b0)) u_comb (
    .clk, .rst_n, .in_valid,
    .a_re(x[0]), .a_im(x[1]), .b_re(x[2]), .b_im(x[3]), .c_re(x[4]), .c_im(x[5]),
    .d_re(x[6]), .d_im(x[7]), .w1_re(x[8]), .w1_im(x[9]), .w2_re(x[10]), .w2_im(x[11]),
    .out_valid(vc),
    .e_re(zc[0]), .e_im(zc[1]), .f_re(zc[2]), .f_im(zc[3]),
    .g_re(zc[4]), .g_im(zc[5]), .h_re(zc[6]), .h_im(zc[7]));

  fft4_butterfly u_pipe (
    .clk, .rst_n, .in_valid,
    .a_re(x[0]), .a_im(x[1]), .b_re(x[2]), .b_im(x[3]), .c_re(x[4]), .c_im(x[5]),
    .d_re(x[6]), .d_im(x[7]), .w1_re(x[8]), .w1_im(x[9]), .w2_re(x[10]), .w2_im(x[11]),
    .out_valid(vp),
    .e_re(zp[0]), .e_im(zp[1]), .f_re(zp[2]), .f_im(zp[3]),
    .g_re(zp[4]), .g_im(zp[5]), .h_re(zp[6]), .h_im(zp[7]));

  task automatic model(output longint o [8]);
    longint ar, ai, br, bi, cr, ci, dr, di, w1r, w1i, w2r, w2i;
    longint bw_r, bw_i, c1_r, c1_i, c2_r, c2_i, sq_r, sq_i, pr_r, pr_i;
    {ar, ai, br, bi} = {longint'(x[0]), longint'(x[1]), longint'(x[2]), longint'(x[3])};
    {cr, ci, dr, di} = {longint'(x[4]), longint'(x[5]), longint'(x[6]), longint'(x[7])};
    {w1r, w1i, w2r, w2i} = {longint'(x[8]), longint'(x[9]), longint'(x[10]), longint'(x[11])};
    bw_r = br * w1r - bi * w1i;    bw_i = br * w1i + bi * w1r;
    c1_r = cr * w1r - ci * w1i;    c1_i = cr * w1i + ci * w1r;
    c2_r = cr * w2r - ci * w2i;    c2_i = cr * w2i + ci * w2r;
    sq_r = w1r * w1r - w1i * w1i;  sq_i = 2 * w1r * w1i;
    pr_r = w1r * w2r - w1i * w2i;  pr_i = w1r * w2i + w1i * w2r;
    o[0] = ar + bw_r + c1_r + (dr * sq_r - di * sq_i);
    o[1] = ai + bw_i + c1_i + (dr * sq_i + di * sq_r);
    o[2] = ar - bw_r + c2_r - (dr * pr_r - di * pr_i);
    o[3] = ai - bw_i + c2_i - (dr * pr_i + di * pr_r);
    o[4] = ar + bw_r - c1_r - (dr * sq_r - di * sq_i);
    o[5] = ai + bw_i - c1_i - (dr * sq_i + di * sq_r);
    o[6] = ar - bw_r - c2_r + (dr * pr_r - di * pr_i);
    o[7] = ai - bw_i - c2_i + (dr * pr_i + di * pr_r);
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint o [8];
    foreach (x[i]) x[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000 + LAT; n++) begin
      @(posedge clk);
      #1;
      // pipelined build: result of the set applied LAT clocks ago
      if (n >= LAT) begin
        checks++;
        if (!vp) begin failures++; $display("FAIL pipelined out_valid low at set %0d", n - LAT); end
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (zp[k] != hist[0][k]) begin
            failures++;
            if (failures < 10) $display("FAIL pipelined output %0d of set %0d", k, n - LAT);
          end
        end
        void'(hist.pop_front());
      end
      foreach (x[i]) begin
        int r = $urandom_range(0, 9);
        x[i] = (r == 0) ? 8'h80 : (r == 1) ? 8'h7f : 8'($urandom);
      end
      in_valid = 1'b1;
      #1;
      model(o);
      checks++;
      if (!vc) failures++;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (zc[k] != o[k]) begin
          failures++;
          if (failures < 10) $display("FAIL PIPE=0 output %0d: got %0d expected %0d", k, zc[k], o[k]);
        end
      end
      hist.push_back(o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
