// soft_symbol_pu: "Soft-symbols & variances" processing unit.
//
// From the a-priori LLRs of each stream it forms the soft symbol
// s_hat_i = E[s_i] and its variance E_i = Var[s_i], and then the matrix
// A = G * diag(E_1..E_MT) + N0 * I that is inverted further down the pipeline.
//
// Bit probabilities enter through t = tanh(L/2) = E[2x-1], read from a table
// (the LLR has an LSB of 0.5, so 17 magnitudes cover the 5-bit range). For
// Gray-mapped 802.11n constellations with independent bits the mean and the
// second moment of one real dimension with m bits t0..t(m-1) are products of
// these values (unnormalised odd-integer grid):
//   m = 1: mean = t0                    , E[x^2] = 1
//   m = 2: mean = t0 (2 - t1)           , E[x^2] = 5 - 4 t1
//   m = 3: mean = t0 (4 - 2 t1 + t1 t2) , E[x^2] = 21 - 16 t1 - 4 t2 + 8 t1 t2
// and s_hat = Kmod (mean_I + j mean_Q), E = Kmod^2 (E_I[x^2] - mean_I^2 +
// E_Q[x^2] - mean_Q^2). The closed forms are this design's own way of doing
// the expectation; the original only says it is done by table look-up and an
// efficient method for Gray mappings. With all LLRs zero (first iteration)
// s_hat = 0 and E = Es = 1.
//
// Schedule in the 18-cycle period: cycles 0..3 stream i = cyc (soft symbol and
// variance), cycles 4..7 row r = cyc-4 of A (four complex-by-real products).
// Data memory is loaded in the exchange cycle; G, yMF and the mode are fed
// through to the next PUs.
module soft_symbol_pu
  import mmse_pic_pkg::*;
(
  input  logic             clk,
  input  logic [CYCW-1:0]  cyc,
  input  logic             xchg,
  input  gram_out_t        din,
  output soft_out_t        dout
);

  gram_out_t mem;
  cvec_t     shat_q;
  rvec_t     e_q;
  cmat_t     a_q;

  // tanh(k/4) for k = 0..16, k = |LLR| in LSBs of 0.5, scaled by 2^16
  function automatic fx_t tanh_lut(input la_t l);
    int k;
    fx_t v;
    k = (l < 0) ? -int'(l) : int'(l);
    case (k)
      0: v = 0;      1: v = 16051;  2: v = 30285;  3: v = 41625;
      4: v = 49912;  5: v = 55593;  6: v = 59320;  7: v = 61694;
      8: v = 63179;  9: v = 64096;  10: v = 64659; 11: v = 65003;
      12: v = 65212; 13: v = 65339; 14: v = 65417; 15: v = 65464;
      default: v = 65492;
    endcase
    return (l < 0) ? -v : v;
  endfunction

  function automatic fx_t fxi(input int n);
    return fx_t'(n) <<< F;
  endfunction

  // mean and second moment of one real dimension with m bits t[0..m-1]
  function automatic void pam_moments(input int m, input fx_t t0, input fx_t t1,
                                      input fx_t t2, output fx_t mean, output fx_t sq);
    fx_t t12;
    t12 = fx_mul(t1, t2);
    case (m)
      1: begin
        mean = t0;
        sq   = fxi(1);
      end
      2: begin
        mean = fx_mul(t0, fx_sub(fxi(2), t1));
        sq   = fx_sub(fxi(5), fx_shift(t1, 2));
      end
      default: begin
        mean = fx_mul(t0, fx_add(fx_sub(fxi(4), fx_shift(t1, 1)), t12));
        sq   = fx_add(fx_sub(fx_sub(fxi(21), fx_shift(t1, 4)), fx_shift(t2, 2)),
                      fx_shift(t12, 3));
      end
    endcase
  endfunction

  // ---- cycles 0..3: soft symbol and variance of stream i ----
  cfx_t sh_c;
  fx_t  e_c;
  always_comb begin
    int   i, m;
    fx_t  t [QMAX];
    fx_t  mi, si, mq, sq, var_c;
    i = int'(cyc) % MT;
    m = bits_per_dim(mem.mode);
    for (int b = 0; b < QMAX; b++) t[b] = tanh_lut(mem.la[i][b]);
    pam_moments(m, t[0], t[1], t[2], mi, si);
    if (mem.mode == MOD_BPSK) begin
      mq = '0;
      sq = '0;
    end else begin
      pam_moments(m, t[m], t[m+1 < QMAX ? m+1 : 0], t[m+2 < QMAX ? m+2 : 0], mq, sq);
    end
    var_c = fx_add(fx_sub(si, fx_mul(mi, mi)), fx_sub(sq, fx_mul(mq, mq)));
    if (var_c < 0) var_c = '0;
    e_c     = fx_mul(var_c, kmod2(mem.mode));
    sh_c.re = fx_mul(mi, kmod(mem.mode));
    sh_c.im = fx_mul(mq, kmod(mem.mode));
  end

  // ---- cycles 4..7: row r of A = G diag(E) + N0 I ----
  cfx_t arow [MT];
  always_comb begin
    int r;
    r = int'(cyc) % MT;
    for (int c = 0; c < MT; c++) begin
      arow[c] = c_scale(mem.g[r][c], e_q[c]);
      if (c == r) arow[c].re = fx_add(arow[c].re, mem.n0);
    end
  end

  always_ff @(posedge clk) begin
    if (xchg) begin
      mem <= din;
    end else if (int'(cyc) < MT) begin
      shat_q[int'(cyc)] <= sh_c;
      e_q[int'(cyc)]    <= e_c;
    end else if (int'(cyc) < 2 * MT) begin
      for (int c = 0; c < MT; c++) a_q[int'(cyc) - MT][c] <= arow[c];
    end
  end

  always_comb begin
    dout.shat = shat_q;
    dout.e    = e_q;
    dout.g    = mem.g;
    dout.ymf  = mem.ymf;
    dout.a    = a_q;
    dout.mode = mem.mode;
  end

endmodule
