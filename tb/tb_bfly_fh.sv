// Self-checking testbench for bfly_fh.
// Drives random input sets (random and extreme component values, random
// gaps in in_valid) into the pipelined default instance and into a PIPE=0
// instance. The reference is F = A - B*W1 + C*W2 - D*W1*W2 and H = A - B*W1 - C*W2 + D*W1*W2, evaluated with complex integer
// arithmetic in the testbench. Every result of the pipelined instance must
// appear exactly three clocks after its input, in order; the PIPE=0
// instance is checked in the same cycle as its inputs.
module tb_bfly_fh;
  int checks = 0, failures = 0;
  localparam int DW = 8, OW = 3 * DW + 3, LAT = 3;

  typedef struct { longint ar, ai, br, bi, cr, ci, dr, di, w1r, w1i, w2r, w2i; } in_t;
  typedef struct { longint o1r, o1i, o2r, o2i; int cyc; } out_t;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] a_re, a_im, b_re, b_im, c_re, c_im, d_re, d_im, w1_re, w1_im, w2_re, w2_im;
  logic signed [OW-1:0] o1_re, o1_im, o2_re, o2_im, z1_re, z1_im, z2_re, z2_im;
  logic out_valid, z_valid;
  int cyc = 0;
  out_t expq[$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  bfly_fh dut (.clk, .rst_n, .in_valid, .a_re, .a_im, .b_re, .b_im, .c_re, .c_im, .d_re, .d_im,
              .w1_re, .w1_im, .w2_re, .w2_im,
              .out_valid, .f_re(o1_re), .f_im(o1_im), .h_re(o2_re), .h_im(o2_im));
  bfly_fh #(.PIPE(1'b0)) comb (.clk, .rst_n, .in_valid, .a_re, .a_im, .b_re, .b_im, .c_re, .c_im,
              .d_re, .d_im, .w1_re, .w1_im, .w2_re, .w2_im,
              .out_valid(z_valid), .f_re(z1_re), .f_im(z1_im), .h_re(z2_re), .h_im(z2_im));

  // complex product helpers
  function automatic longint mre(longint xr, longint xi, longint yr, longint yi); return xr*yr - xi*yi; endfunction
  function automatic longint mim(longint xr, longint xi, longint yr, longint yi); return xr*yi + xi*yr; endfunction

  function automatic out_t model(in_t v);
    out_t o;
    longint pr, pi, qr, qi, tr, ti;
    // P = A - B*W1, Q = C*W2 - D*W1*W2 = (C - D*W1)*W2
    pr = v.ar - mre(v.br, v.bi, v.w1r, v.w1i);
    pi = v.ai - mim(v.br, v.bi, v.w1r, v.w1i);
    tr = v.cr - mre(v.dr, v.di, v.w1r, v.w1i);
    ti = v.ci - mim(v.dr, v.di, v.w1r, v.w1i);
    qr = mre(tr, ti, v.w2r, v.w2i);
    qi = mim(tr, ti, v.w2r, v.w2i);
    o.o1r = pr + qr; o.o1i = pi + qi;
    o.o2r = pr - qr; o.o2i = pi - qi;
    o.cyc = 0;
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

  // pipelined instance: results in order, LAT clocks after their inputs
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      out_t e;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL output without input at cycle %0d", cyc);
      end else begin
        e = expq.pop_front();
        cmp("latency", cyc - e.cyc, LAT);
        cmp("o1_re", o1_re, e.o1r); cmp("o1_im", o1_im, e.o1i);
        cmp("o2_re", o2_re, e.o2r); cmp("o2_im", o2_im, e.o2i);
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_t v;
    out_t e;
    {a_re, a_im, b_re, b_im, c_re, c_im, d_re, d_im, w1_re, w1_im, w2_re, w2_im} = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      #1;
      v.ar = pick(); v.ai = pick(); v.br = pick(); v.bi = pick();
      v.cr = pick(); v.ci = pick(); v.dr = pick(); v.di = pick();
      v.w1r = pick(); v.w1i = pick(); v.w2r = pick(); v.w2i = pick();
      a_re = DW'(v.ar); a_im = DW'(v.ai); b_re = DW'(v.br); b_im = DW'(v.bi);
      c_re = DW'(v.cr); c_im = DW'(v.ci); d_re = DW'(v.dr); d_im = DW'(v.di);
      w1_re = DW'(v.w1r); w1_im = DW'(v.w1i); w2_re = DW'(v.w2r); w2_im = DW'(v.w2i);
      in_valid = ($urandom_range(0, 3) != 0);
      e = model(v);
      #1;
      cmp("comb o1_re", z1_re, e.o1r); cmp("comb o1_im", z1_im, e.o1i);
      cmp("comb o2_re", z2_re, e.o2r); cmp("comb o2_im", z2_im, e.o2i);
      cmp("comb valid", z_valid, in_valid);
      if (in_valid) begin
        e.cyc = cyc;   // cycle in which the input set is presented
        expq.push_back(e);
      end
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    cmp("all results delivered", expq.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
