// lu_fwd_pu: "LU-decomposition & forward-substitution" processing unit.
//
// Factors A = L U in place (Doolittle form: L unit lower triangular, U upper
// triangular, no pivoting) and solves L v_i = e_i for the unit vectors, i.e.
// forms L^-1. The back-substitution PU then solves U x_i = v_i, which gives
// A^-1 = [x_1 .. x_MT] without inverting L and U separately.
// A = G diag(E) + N0 I equals a Hermitian positive definite matrix times a
// positive diagonal, so all pivots are non-zero and pivoting is not needed.
//
// The only divisions are by the pivots: 1/u = conj(u) / |u|^2, with 1/|u|^2
// from one pipelined Newton-Raphson reciprocal unit (recip_nr, two cycles of
// latency) followed by an arithmetic shift. The reciprocals of the pivots are
// also handed to the back-substitution PU, which has no reciprocal unit.
//
// Schedule (pivot k = 0..3 starts in cycle s = 4k):
//   s     |U[k][k]|^2 enters the reciprocal unit
//   s+2   1/U[k][k] and column k of L (L[i][k] = A[i][k] / U[k][k]) written
//   s+3   trailing update A[i][j] -= L[i][k] U[k][j], i, j > k
//   11..13 rows 1..3 of L^-1 by forward substitution,
//          Linv[i][j] = -(L[i][j] + sum_{j<m<i} L[i][m] Linv[m][j])
// All results are in registers after cycle 14. The cycle-level schedule is
// this design's own; the original gives the method and the 18-cycle budget.
module lu_fwd_pu
  import mmse_pic_pkg::*;
(
  input  logic             clk,
  input  logic [CYCW-1:0]  cyc,
  input  logic             xchg,
  input  soft_out_t        din,     // only the matrix A is used
  output lu_out_t          dout
);

  cmat_t w_q;      // working copy of A, becomes U on and above the diagonal
  cmat_t l_q;      // L below the diagonal
  cmat_t linv_q;
  cvec_t udinv_q;

  // ---- reciprocal unit ----
  fx_t               rx;
  logic [F+1:0]      rmant;
  logic signed [6:0] re_exp;
  recip_nr #(.LUT_BITS(8), .MF(F)) u_recip (
    .clk  (clk),
    .x    (rx),
    .mant (rmant),
    .e    (re_exp)
  );

  logic signed [31:0] c_i, k_i, ph;   // small schedule indices
  always_comb begin
    c_i = int'(cyc);
    k_i = (c_i / 4) % MT;
    ph  = c_i % 4;
    rx  = c_abs2(w_q[k_i][k_i]);
  end

  // 1/u = conj(u) * (1/|u|^2), available in phase 2
  cfx_t uinv_c;
  always_comb begin
    cfx_t uc;
    uc          = c_conj(w_q[k_i][k_i]);
    uinv_c.re   = fx_shift(fx_mul(uc.re, fx_t'(rmant)), -int'(re_exp));
    uinv_c.im   = fx_shift(fx_mul(uc.im, fx_t'(rmant)), -int'(re_exp));
  end

  // forward substitution for row fr = c_i - 10 (cycles 11..13 -> rows 1..3)
  cfx_t linv_row [MT];
  always_comb begin
    int fr;
    cfx_t s;
    fr = (c_i - 10) % MT;
    for (int j = 0; j < MT; j++) begin
      s = c_zero();
      if (j < fr) begin
        s = l_q[fr][j];
        for (int m = 0; m < MT; m++)
          if (m > j && m < fr) s = c_add(s, c_mul(l_q[fr][m], linv_q[m][j]));
        s = c_sub(c_zero(), s);
      end
      linv_row[j] = s;
    end
  end

  always_ff @(posedge clk) begin
    if (xchg) begin
      w_q <= din.a;
    end else begin
      if (c_i == 0) begin
        for (int r = 0; r < MT; r++)
          for (int c = 0; c < MT; c++) begin
            linv_q[r][c] <= c_zero();
            if (r == c) linv_q[r][c].re <= FX_ONE;
          end
      end
      if (c_i < 4 * MT && ph == 2) begin
        udinv_q[k_i] <= uinv_c;
        for (int i = 0; i < MT; i++)
          if (i > k_i) l_q[i][k_i] <= c_mul(w_q[i][k_i], uinv_c);
      end
      if (c_i < 4 * MT && ph == 3) begin
        for (int i = 0; i < MT; i++)
          for (int j = 0; j < MT; j++)
            if (i > k_i && j > k_i)
              w_q[i][j] <= c_sub(w_q[i][j], c_mul(l_q[i][k_i], w_q[k_i][j]));
      end
      if (c_i >= 11 && c_i <= 13) begin
        for (int j = 0; j < MT; j++)
          if (j < c_i - 10) linv_q[c_i - 10][j] <= linv_row[j];
      end
    end
  end

  always_comb begin
    for (int r = 0; r < MT; r++)
      for (int c = 0; c < MT; c++)
        dout.u[r][c] = (c >= r) ? w_q[r][c] : c_zero();
    dout.linv  = linv_q;
    dout.udinv = udinv_q;
  end

endmodule
