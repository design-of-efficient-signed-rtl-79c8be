// End-to-end testbench for fft4_butterfly at its default parameters.
//
// Three kinds of traffic go through the pipelined butterfly:
//   * general twiddles: random complex A..D, W1, W2 (with extreme values);
//     the reference expands E, F, G, H term by term with an explicitly
//     formed W1^2 and W1*W2;
//   * 4-point DFT: W1 = 1, W2 = -j and A=x0, B=x2, C=x1, D=x3; the
//     reference is the DFT definition X[k] = sum x[n] * (-j)^(n*k), and
//     E, F, G, H must equal X[0], X[1], X[2], X[3];
//   * a reset in the middle of a burst, after which no result of the
//     flushed inputs may appear.
// Results must arrive in order, three clocks after their inputs. The test
// counts how often each mechanism occurred (pipeline fill, back-to-back
// results, bubbles, flush by reset, DFT sets, negative results produced by
// the two's-complement subtraction rows, most-negative operands) and counts
// a failure for any that never did.
module tb_fft4_butterfly;
  int checks = 0, failures = 0;
  localparam int DW = 8, OW = 3 * DW + 3, LAT = 3;

  typedef struct { longint ar, ai, br, bi, cr, ci, dr, di, w1r, w1i, w2r, w2i; } in_t;
  typedef struct { longint er, ei, fr, fi, gr, gi, hr, hi; int cyc; bit dft; } out_t;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] a_re, a_im, b_re, b_im, c_re, c_im, d_re, d_im, w1_re, w1_im, w2_re, w2_im;
  logic signed [OW-1:0] e_re, e_im, f_re, f_im, g_re, g_im, h_re, h_im;
  logic out_valid;
  int cyc = 0;
  out_t expq[$];

  // mechanism counters
  int n_fill = 0, n_b2b = 0, n_bubble = 0, n_flush = 0, n_dft = 0, n_neg = 0, n_min = 0;
  logic prev_valid = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fft4_butterfly dut (
    .clk, .rst_n, .in_valid,
    .a_re, .a_im, .b_re, .b_im, .c_re, .c_im, .d_re, .d_im,
    .w1_re, .w1_im, .w2_re, .w2_im,
    .out_valid,
    .e_re, .e_im, .f_re, .f_im, .g_re, .g_im, .h_re, .h_im
  );

  function automatic out_t model(in_t v);
    out_t o;
    longint bw_r, bw_i, cw1_r, cw1_i, cw2_r, cw2_i, sq_r, sq_i, pr_r, pr_i, d2_r, d2_i, d12_r, d12_i;
    bw_r  = v.br * v.w1r - v.bi * v.w1i;   bw_i  = v.br * v.w1i + v.bi * v.w1r;
    cw1_r = v.cr * v.w1r - v.ci * v.w1i;   cw1_i = v.cr * v.w1i + v.ci * v.w1r;
    cw2_r = v.cr * v.w2r - v.ci * v.w2i;   cw2_i = v.cr * v.w2i + v.ci * v.w2r;
    sq_r  = v.w1r * v.w1r - v.w1i * v.w1i; sq_i  = 2 * v.w1r * v.w1i;
    pr_r  = v.w1r * v.w2r - v.w1i * v.w2i; pr_i  = v.w1r * v.w2i + v.w1i * v.w2r;
    d2_r  = v.dr * sq_r - v.di * sq_i;     d2_i  = v.dr * sq_i + v.di * sq_r;
    d12_r = v.dr * pr_r - v.di * pr_i;     d12_i = v.dr * pr_i + v.di * pr_r;
    o.er = v.ar + bw_r + cw1_r + d2_r;     o.ei = v.ai + bw_i + cw1_i + d2_i;
    o.gr = v.ar + bw_r - cw1_r - d2_r;     o.gi = v.ai + bw_i - cw1_i - d2_i;
    o.fr = v.ar - bw_r + cw2_r - d12_r;    o.fi = v.ai - bw_i + cw2_i - d12_i;
    o.hr = v.ar - bw_r - cw2_r + d12_r;    o.hi = v.ai - bw_i - cw2_i + d12_i;
    o.cyc = 0;
    o.dft = 1'b0;
    return o;
  endfunction

  // DFT by definition: X[k] = sum_n x[n] * (-j)^(n*k)
  function automatic out_t dft4(longint xr[4], longint xi[4]);
    out_t o;
    longint Xr[4], Xi[4];
    for (int k = 0; k < 4; k++) begin
      Xr[k] = 0; Xi[k] = 0;
      for (int n = 0; n < 4; n++) begin
        case ((n * k) % 4)     // (-j)^m = 1, -j, -1, j
          0: begin Xr[k] += xr[n]; Xi[k] += xi[n]; end
          1: begin Xr[k] += xi[n]; Xi[k] -= xr[n]; end
          2: begin Xr[k] -= xr[n]; Xi[k] -= xi[n]; end
          default: begin Xr[k] -= xi[n]; Xi[k] += xr[n]; end
        endcase
      end
    end
    o.er = Xr[0]; o.ei = Xi[0]; o.fr = Xr[1]; o.fi = Xi[1];
    o.gr = Xr[2]; o.gi = Xi[2]; o.hr = Xr[3]; o.hi = Xi[3];
    o.cyc = 0;
    o.dft = 1'b1;
    return o;
  endfunction

  function automatic longint pick();
    int r = $urandom_range(0, 9);
    if (r == 0) return -(1 << (DW - 1));
    if (r == 1) return (1 << (DW - 1)) - 1;
    return longint'($urandom_range(0, (1 << DW) - 1)) - (1 << (DW - 1));
  endfunction

  task automatic cmp(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d: got %0d expected %0d", what, cyc, got, exp);
    end
  endtask

  task automatic drive(in_t v, bit valid, bit is_dft, out_t dref);
    out_t e;
    a_re = DW'(v.ar); a_im = DW'(v.ai); b_re = DW'(v.br); b_im = DW'(v.bi);
    c_re = DW'(v.cr); c_im = DW'(v.ci); d_re = DW'(v.dr); d_im = DW'(v.di);
    w1_re = DW'(v.w1r); w1_im = DW'(v.w1i); w2_re = DW'(v.w2r); w2_im = DW'(v.w2i);
    in_valid = valid;
    if (valid) begin
      e = is_dft ? dref : model(v);
      e.cyc = cyc;
      expq.push_back(e);
      if (v.ar == -(1 << (DW - 1)) || v.dr == -(1 << (DW - 1)) || v.w1r == -(1 << (DW - 1))) n_min++;
    end
  endtask

  // output side: order, latency and values
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        out_t e;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL result without input at cycle %0d", cyc);
        end else begin
          e = expq.pop_front();
          cmp("latency", cyc - e.cyc, LAT);
          cmp("E re", e_re, e.er); cmp("E im", e_im, e.ei);
          cmp("F re", f_re, e.fr); cmp("F im", f_im, e.fi);
          cmp("G re", g_re, e.gr); cmp("G im", g_im, e.gi);
          cmp("H re", h_re, e.hr); cmp("H im", h_im, e.hi);
          if (e.dft) n_dft++;
          if (e_re < 0 || f_re < 0 || g_re < 0 || h_re < 0) n_neg++;
          if (!prev_valid && n_fill == 0) n_fill++;
          if (prev_valid) n_b2b++;
        end
      end else if (prev_valid) n_bubble++;
      prev_valid <= out_valid;
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_t v, z;
    out_t none;
    longint xr[4], xi[4];
    z = '{default: 0};
    none = model(z);
    drive(z, 1'b0, 1'b0, none);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // general twiddles, random gaps
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk);
      #1;
      v = '{pick(), pick(), pick(), pick(), pick(), pick(), pick(), pick(),
            pick(), pick(), pick(), pick()};
      drive(v, n < 20 || $urandom_range(0, 4) != 0, 1'b0, none);
    end

    // 4-point DFT sets, back to back
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < 4; i++) begin xr[i] = pick(); xi[i] = pick(); end
      v = '{xr[0], xi[0], xr[2], xi[2], xr[1], xi[1], xr[3], xi[3], 1, 0, 0, -1};
      drive(v, 1'b1, 1'b1, dft4(xr, xi));
    end

    // reset in the middle of a burst: the inputs in flight are dropped
    @(posedge clk);
    #1;
    drive(z, 1'b0, 1'b0, none);
    @(posedge clk);
    #1;
    for (int n = 0; n < 2; n++) begin
      v = '{pick(), pick(), pick(), pick(), pick(), pick(), pick(), pick(),
            pick(), pick(), pick(), pick()};
      drive(v, 1'b1, 1'b0, none);
      @(posedge clk);
      #1;
    end
    drive(z, 1'b0, 1'b0, none);
    // wait until the results queued before the burst have all come out
    while (expq.size() > 2) @(posedge clk);
    #1 rst_n = 1'b0;
    expq.delete();
    n_flush++;
    @(posedge clk);
    #1;
    cmp("out_valid low in reset", out_valid, 0);
    rst_n = 1'b1;
    repeat (LAT + 2) begin
      @(posedge clk);
      #1;
      cmp("no result from flushed inputs", out_valid, 0);
    end

    // a few more sets after the reset
    for (int n = 0; n < 50; n++) begin
      @(posedge clk);
      #1;
      v = '{pick(), pick(), pick(), pick(), pick(), pick(), pick(), pick(),
            pick(), pick(), pick(), pick()};
      drive(v, 1'b1, 1'b0, none);
    end
    @(posedge clk);
    #1 drive(z, 1'b0, 1'b0, none);
    repeat (LAT + 2) @(posedge clk);
    cmp("all results delivered", expq.size(), 0);

    $display("mechanisms: fill=%0d back_to_back=%0d bubbles=%0d reset_flush=%0d dft_sets=%0d negative_results=%0d most_negative_operands=%0d",
             n_fill, n_b2b, n_bubble, n_flush, n_dft, n_neg, n_min);
    if (n_fill == 0 || n_b2b == 0 || n_bubble == 0 || n_flush == 0 || n_dft == 0 || n_neg == 0 || n_min == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
