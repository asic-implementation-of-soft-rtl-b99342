// mmse_sinr_pu: "MMSE filtering & SINR computation" processing unit.
//
// With a_i the i-th row of A^-1 (A = G diag(E) + N0 I) and g_i the i-th
// column of G, it computes for every stream
//   mu_i  = a_i g_i                          (real in exact arithmetic)
//   z_i   = (a_i yhat_i) / mu_i              (unbiased MMSE filter output)
//   rho_i = mu_i / (1 - E_i mu_i)            (post-equalisation SINR)
// The rows of A^-1 are the MMSE filters up to a real scale per stream, which
// dividing by mu_i removes. Both divisions use one pipelined Newton-Raphson
// reciprocal unit (two cycles of latency) and arithmetic shifts.
//
// Schedule (this design's own):
//   cycles 0..3    stream i = cyc: mu_i and a_i yhat_i
//   cycles 4..7    mu_i enters the reciprocal unit, z_i written in 6..9
//   cycles 8..11   1 - E_i mu_i enters it, rho_i written in 10..13
// 1 - E_i mu_i is kept at least one LSB. The mode is passed on with the data.
// Both inputs are loaded in the exchange cycle (xchg).
module mmse_sinr_pu
  import mmse_pic_pkg::*;
(
  input  logic             clk,
  input  logic [CYCW-1:0]  cyc,
  input  logic             xchg,
  input  pic2_out_t        din,
  input  cmat_t            ainv_in,
  output mmse_out_t        dout
);

  pic2_out_t mem;
  cmat_t     ainv;
  rvec_t     mu_q;
  cvec_t     u_q;
  cvec_t     z_q;
  rvec_t     rho_q;

  logic signed [31:0] c_i;   // cycle in the period
  assign c_i = int'(cyc);

  // ---- cycles 0..3: filter products ----
  fx_t  mu_c;
  cfx_t u_c;
  always_comb begin
    int   i;
    cfx_t sm, su;
    i  = c_i % MT;
    sm = c_zero();
    su = c_zero();
    for (int k = 0; k < MT; k++) begin
      sm = c_add(sm, c_mul(ainv[i][k], mem.g[k][i]));
      su = c_add(su, c_mul(ainv[i][k], mem.yhat[i][k]));
    end
    mu_c = sm.re;
    u_c  = su;
  end

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

  always_comb begin
    int  i;
    fx_t d;
    i = c_i % MT;
    d = fx_sub(FX_ONE, fx_mul(mem.e[i], mu_q[i]));
    if (d < fx_t'(1)) d = fx_t'(1);
    rx = (c_i < 8) ? mu_q[i] : d;
  end

  // x * (1/rx) for the value that entered the unit two cycles ago
  function automatic fx_t times_recip(input fx_t v, input logic [F+1:0] m,
                                      input logic signed [6:0] ex);
    return fx_shift(fx_mul(v, fx_t'(m)), -int'(ex));
  endfunction

  always_ff @(posedge clk) begin
    if (xchg) begin
      mem  <= din;
      ainv <= ainv_in;
    end else begin
      if (c_i < MT) begin
        mu_q[c_i] <= mu_c;
        u_q[c_i]  <= u_c;
      end
      if (c_i >= 6 && c_i < 6 + MT) begin
        z_q[c_i - 6].re <= times_recip(u_q[c_i - 6].re, rmant, re_exp);
        z_q[c_i - 6].im <= times_recip(u_q[c_i - 6].im, rmant, re_exp);
      end
      if (c_i >= 10 && c_i < 10 + MT)
        rho_q[c_i - 10] <= times_recip(mu_q[c_i - 10], rmant, re_exp);
    end
  end

  always_comb begin
    dout.z    = z_q;
    dout.rho  = rho_q;
    dout.mode = mem.mode;
  end

endmodule
