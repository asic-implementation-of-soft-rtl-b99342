// llr_pu: "LLR computation" processing unit.
//
// Computes the extrinsic LLRs of all bits of every stream with the max-log
// approximation and without the prior term:
//   L_{i,b} = rho_i * lambda_b(z_i),
//   lambda_b(z) = min_{a: bit b = 0} |z - a|^2 - min_{a: bit b = 1} |z - a|^2 .
// For a Gray-mapped QAM the bits of one real dimension depend only on that
// dimension. With a0 and a1 the nearest points of the dimension whose bit b is
// 0 and 1, lambda_b = (a1 - a0) (2 z - a0 - a1), which this unit evaluates on
// the unnormalised odd-integer grid (z scaled by 1/Kmod, result by Kmod^2):
// the nearest points are found by comparing |z - n| over the at most eight
// grid points, and (a1 - a0) is a small even integer. This evaluation is
// this design's own; the original only notes that lambda_b is piecewise linear.
//
// Cycle i = 0..3 handles stream i; slots beyond the bits of the mode are 0.
// LLRs are rounded to 6 bits with an LSB of 0.5 and saturated. The results are
// moved to the output register llr_out in the exchange cycle (xchg) and held
// there for the whole next period.
module llr_pu
  import mmse_pic_pkg::*;
(
  input  logic             clk,
  input  logic [CYCW-1:0]  cyc,
  input  logic             xchg,
  input  mmse_out_t        din,
  output le_arr_t          llr_out,
  output mod_e             mode_out
);

  mmse_out_t mem;
  le_arr_t   llr_q;

  // lambda of bit b (0 = MSB) of an m-bit Gray PAM dimension, z unnormalised
  function automatic fx_t pam_lambda(input int m, input int b, input fx_t zu);
    fx_t   best0, best1, d;
    int    n0, n1, n, lab;
    logic signed [2*W-1:0] p;
    best0 = FX_MAX; best1 = FX_MAX;
    n0 = 0; n1 = 0;
    for (int k = 0; k < 8; k++) begin
      if (k < (1 << m)) begin
        n   = 2 * k - ((1 << m) - 1);
        lab = k ^ (k >> 1);
        d   = fx_sub(zu, fx_t'(n) <<< F);
        if (d < 0) d = fx_sub('0, d);
        if (lab[m-1-b] == 1'b0) begin
          if (d < best0) begin best0 = d; n0 = n; end
        end else begin
          if (d < best1) begin best1 = d; n1 = n; end
        end
      end
    end
    p = (2 * W)'(n1 - n0) * (2 * W)'(fx_sub(fx_shift(zu, 1), fx_t'(n0 + n1) <<< F));
    return fx_sat(p);
  endfunction

  function automatic le_t quant(input fx_t l);
    logic signed [W-1:0] q;
    q = (fx_add(l, fx_t'(1) <<< (F - 2))) >>> (F - 1);
    if (q > 31)  return le_t'(31);
    if (q < -32) return le_t'(-32);
    return le_t'(q);
  endfunction

  le_t llr_c [QMAX];
  always_comb begin
    int  i, m, nb;
    fx_t zi, zq, lam;
    i  = int'(cyc) % MT;
    m  = bits_per_dim(mem.mode);
    nb = bits_per_sym(mem.mode);
    zi = fx_mul(mem.z[i].re, kmod_inv(mem.mode));
    zq = fx_mul(mem.z[i].im, kmod_inv(mem.mode));
    lam = '0;
    for (int b = 0; b < QMAX; b++) begin
      if (b >= nb) begin
        llr_c[b] = '0;
      end else begin
        if (b < m) lam = pam_lambda(m, b, zi);
        else       lam = pam_lambda(m, b - m, zq);
        llr_c[b] = quant(fx_mul(mem.rho[i], fx_mul(lam, kmod2(mem.mode))));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (xchg) begin
      mem      <= din;
      llr_out  <= llr_q;
      mode_out <= mem.mode;
    end else if (int'(cyc) < MT) begin
      for (int b = 0; b < QMAX; b++) llr_q[int'(cyc)][b] <= llr_c[b];
    end
  end

endmodule
