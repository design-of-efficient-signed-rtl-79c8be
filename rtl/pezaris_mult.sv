// Signed two's-complement array multiplier built from signed compressors.
//
// p = a * b, with a AW bits and b BW bits wide, both signed, p AW+BW bits.
//
// Partial products a[i]&b[j] are formed directly, as in a Pezaris array:
// a bit whose row or column (but not both) is the sign position carries a
// negative weight, the sign-by-sign bit a positive one. No correction
// constant and no recoding is needed. From column AW-1 upwards a column
// therefore holds two negative bits, which the signed 3-2, 4-3 and 5-3
// compressors absorb directly; all-positive columns use the conventional
// cells.
//
// Reduction is a linear carry-save array. Every stage keeps, per column, a
// sum bit s, a carry c0 from the column below and a second carry c1 from
// two columns below. Stage 0 compresses partial-product rows 0..4 (five
// bits per column at most); every later stage takes the three state bits
// plus the next two rows, again at most five bits, so one 3-2, 4-3 or 5-3
// cell per column suffices. 1 + ceil((BW-5)/2) stages absorb all rows (one
// stage for BW <= 5). The polarity of every state bit
// is fixed at elaboration: the constant functions below replay the array,
// pick each column's cell (sig_compressor) from the number of bits and of
// minority-polarity bits, and record the polarity of its outputs. The
// remaining three rows are merged at the end by one word-level adder that
// adds the positive-weight bits and subtracts the negative-weight ones.
// Carries past the top column are dropped (arithmetic is modulo 2^(AW+BW),
// which is exact for a full-width product).
//
// The document gives the cells, the use of signed cells from column n on and
// a dot diagram of its 8x8 tree; the linear stage order and the final merge
// are this design's own choices. Purely combinational, no clock.
module pezaris_mult #(
  parameter int AW = 8,
  parameter int BW = 8
) (
  input  logic signed [AW-1:0]    a,
  input  logic signed [BW-1:0]    b,
  output logic signed [AW+BW-1:0] p
);
  localparam int W  = AW + BW;
  localparam int T  = (BW <= 5) ? 1 : 1 + (BW - 4) / 2;
  localparam int NS = (T + 1) * 3 * W;

  // one column of one stage: number of bits, minority count, mirror flag and
  // the ordered sources (0..2 state s/c0/c1, 3..7 partial-product rows
  // row0(t)..row0(t)+4, 15 unused)
  typedef struct packed {
    logic [2:0]      n;
    logic [1:0]      k;
    logic            flip;
    logic [4:0][3:0] src;
  } col_t;

  // stage 0 takes rows 0..4, every later stage two more rows
  function automatic int row0(int t);
    return (t == 0) ? 0 : 5 + 2 * (t - 1);
  endfunction

  function automatic int nrows(int t);
    return (t == 0) ? 5 : 2;
  endfunction

  function automatic bit pp_neg(int i, int j);
    return (i == AW - 1) ^ (j == BW - 1);
  endfunction

  function automatic int sidx(int t, int slot, int k);
    return (t * 3 + slot) * W + k;
  endfunction

  function automatic col_t col_info(logic [NS-1:0] v, logic [NS-1:0] ng, int t, int k);
    col_t c;
    int nneg, npos, q;
    logic [4:0][3:0] negl, posl;
    nneg = 0;
    npos = 0;
    negl = '1;
    posl = '1;
    for (int sl = 0; sl < 8; sl++) begin
      bit ex, isn;
      if (sl < 3) begin
        ex  = v[sidx(t, sl, k)];
        isn = ng[sidx(t, sl, k)];
      end else begin
        int r, i;
        r   = row0(t) + sl - 3;
        i   = k - r;
        ex  = (sl - 3 < nrows(t)) && (r < BW) && (i >= 0) && (i < AW);
        isn = ex && pp_neg(i, r);
      end
      if (ex && isn) begin
        negl[nneg] = 4'(sl);
        nneg++;
      end else if (ex) begin
        posl[npos] = 4'(sl);
        npos++;
      end
    end
    c.n    = 3'(nneg + npos);
    c.flip = nneg > npos;
    c.k    = 2'(c.flip ? npos : nneg);
    c.src  = '1;
    q = 0;
    for (int m = 0; m < 5; m++)
      if (c.flip ? m < npos : m < nneg) begin c.src[q] = c.flip ? posl[m] : negl[m]; q++; end
    for (int m = 0; m < 5; m++)
      if (c.flip ? m < nneg : m < npos) begin c.src[q] = c.flip ? negl[m] : posl[m]; q++; end
    return c;
  endfunction

  // {negative flags, valid flags} of every state bit of every stage
  function automatic logic [2*NS-1:0] calc_tables();
    logic [NS-1:0] v, ng;
    col_t c;
    bit ns, nc0, nc1;
    v  = '0;
    ng = '0;
    for (int t = 0; t < T; t++) begin
      for (int k = 0; k < W; k++) begin
        c = col_info(v, ng, t, k);
        if (c.n != 0) begin
          // base polarities of the chosen cell, minority taken as negative
          ns  = (c.n != 1) && (c.k == 1);
          nc0 = (c.n >= 4) && (c.k == 2);
          nc1 = 1'b0;
          v[sidx(t + 1, 0, k)]  = 1'b1;
          ng[sidx(t + 1, 0, k)] = ns ^ c.flip;
          if (c.n >= 2 && k + 1 < W) begin
            v[sidx(t + 1, 1, k + 1)]  = 1'b1;
            ng[sidx(t + 1, 1, k + 1)] = nc0 ^ c.flip;
          end
          if (c.n >= 4 && k + 2 < W) begin
            v[sidx(t + 1, 2, k + 2)]  = 1'b1;
            ng[sidx(t + 1, 2, k + 2)] = nc1 ^ c.flip;
          end
        end
      end
    end
    return {ng, v};
  endfunction

  localparam logic [2*NS-1:0] TAB = calc_tables();
  localparam logic [NS-1:0]   VT  = TAB[NS-1:0];
  localparam logic [NS-1:0]   NT  = TAB[2*NS-1:NS];

  // running state and raw cell outputs per stage
  logic [W-1:0] st_s  [T+1];
  logic [W-1:0] st_c0 [T+1];
  logic [W-1:0] st_c1 [T+1];
  logic [W-1:0] cs    [T];
  logic [W-1:0] cc0   [T];
  logic [W-1:0] cc1   [T];

  assign st_s[0]  = '0;
  assign st_c0[0] = '0;
  assign st_c1[0] = '0;

  for (genvar t = 0; t < T; t++) begin : g_stage
    for (genvar k = 0; k < W; k++) begin : g_col
      localparam col_t CI = col_info(VT, NT, t, k);
      if (CI.n == 0) begin : g_empty
        assign cs[t][k]  = 1'b0;
        assign cc0[t][k] = 1'b0;
        assign cc1[t][k] = 1'b0;
      end else begin : g_cell
        logic [4:0] x;
        for (genvar q = 0; q < 5; q++) begin : g_in
          if (q >= CI.n) begin : g_zero
            assign x[q] = 1'b0;
          end else if (CI.src[q] == 4'd0) begin : g_s
            assign x[q] = st_s[t][k];
          end else if (CI.src[q] == 4'd1) begin : g_c0
            assign x[q] = st_c0[t][k];
          end else if (CI.src[q] == 4'd2) begin : g_c1
            assign x[q] = st_c1[t][k];
          end else begin : g_pp
            localparam int R = row0(t) + int'(CI.src[q]) - 3;
            assign x[q] = a[k-R] & b[R];
          end
        end
        sig_compressor #(.N(int'(CI.n)), .K(int'(CI.k))) u_cell (
          .x (x),
          .s (cs[t][k]),
          .c0(cc0[t][k]),
          .c1(cc1[t][k])
        );
      end
    end
    assign st_s[t+1]  = cs[t];
    assign st_c0[t+1] = {cc0[t][W-2:0], 1'b0};
    assign st_c1[t+1] = {cc1[t][W-3:0], 2'b00};
  end

  // final merge: positive-weight rows added, negative-weight rows subtracted
  localparam logic [W-1:0] V_S  = VT[sidx(T, 0, 0) +: W];
  localparam logic [W-1:0] V_C0 = VT[sidx(T, 1, 0) +: W];
  localparam logic [W-1:0] V_C1 = VT[sidx(T, 2, 0) +: W];
  localparam logic [W-1:0] N_S  = NT[sidx(T, 0, 0) +: W];
  localparam logic [W-1:0] N_C0 = NT[sidx(T, 1, 0) +: W];
  localparam logic [W-1:0] N_C1 = NT[sidx(T, 2, 0) +: W];

  logic [W-1:0] pos_sum, neg_sum;
  assign pos_sum = (st_s[T] & V_S & ~N_S) + (st_c0[T] & V_C0 & ~N_C0) + (st_c1[T] & V_C1 & ~N_C1);
  assign neg_sum = (st_s[T] & N_S) + (st_c0[T] & N_C0) + (st_c1[T] & N_C1);
  assign p       = pos_sum - neg_sum;
endmodule
