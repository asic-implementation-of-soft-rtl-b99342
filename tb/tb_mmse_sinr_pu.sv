// tb_mmse_sinr_pu: checks the MMSE filtering & SINR PU. Random channels,
// soft symbols and variances give G, the PIC outputs yhat_i and A^-1 (all in
// floating point, A^-1 by Gauss-Jordan elimination); the PU must return
// z_i = (a_i yhat_i)/mu_i and rho_i = mu_i/(1 - E_i mu_i), mu_i = a_i g_i,
// within a relative 2e-3 (rho: 1e-2, since 1 - E_i mu_i can be a small
// difference that magnifies the rounding of mu_i), one vector per period.
`timescale 1ns/1ps
module tb_mmse_sinr_pu;
  import mmse_pic_pkg::*;
  import mmse_pic_ref_pkg::*;

  localparam int NV = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [CYCW-1:0] cyc = '0;
  logic xchg;
  assign xchg = (int'(cyc) == TS - 1);
  always @(posedge clk) cyc <= xchg ? '0 : cyc + 1'b1;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  function automatic bit near(input real a, input real b, input real tol);
    real t;
    t = tol * (1.0 + (b < 0 ? -b : b));
    return (a - b <= t) && (b - a <= t);
  endfunction
  function automatic bit cnear(input cfx_t a, input rcx b, input real tol);
    return near(fx2r(a.re), b.re, tol) && near(fx2r(a.im), b.im, tol);
  endfunction

  initial begin
    repeat ((NV + 3) * TS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pic2_out_t din;
  cmat_t     ain;
  mmse_out_t dout;
  mmse_sinr_pu dut (.clk(clk), .cyc(cyc), .xchg(xchg), .din(din), .ainv_in(ain), .dout(dout));

  rcmat ainv_v [NV], g_v [NV], yh_v [NV];
  rrvec e_v [NV];
  mod_e m_v [NV];
  initial begin
    int sym [MT];
    det_in_t d;
    rcmat a;
    rcvec ymf, shat, z;
    rrvec rho;
    for (int n = 0; n < NV; n++) begin
      m_v[n] = mod_e'(n % 4);
      gen_vector(m_v[n], 0.1, n % 2, d, sym);
      ref_gram(d, g_v[n], ymf);
      ref_soft(d.la, d.mode, shat, e_v[n]);
      ref_amat(g_v[n], e_v[n], 0.1, a);
      ref_inv(a, ainv_v[n]);
      ref_pic(ymf, g_v[n], shat, yh_v[n]);
    end
    din = '0;
    ain = '0;
    for (int n = 0; n <= NV; n++) begin
      @(negedge clk);
      while (!xchg) @(negedge clk);
      if (n > 0) begin
        ref_mmse(ainv_v[n-1], g_v[n-1], yh_v[n-1], e_v[n-1], z, rho);
        for (int i = 0; i < MT; i++) begin
          chk(cnear(dout.z[i], z[i], 2e-3), $sformatf("z[%0d] %f %f", i, fx2r(dout.z[i].re), z[i].re));
          chk(near(fx2r(dout.rho[i]), rho[i], 1e-2), $sformatf("rho[%0d] %f %f", i, fx2r(dout.rho[i]), rho[i]));
        end
        chk(dout.mode == m_v[n-1], "mode");
      end
      if (n < NV) begin
        din = '0;
        for (int r = 0; r < MT; r++) begin
          din.e[r] = r2fx(e_v[n][r]);
          for (int c = 0; c < MT; c++) begin
            din.g[r][c]    = r2cfx(g_v[n][r][c]);
            din.yhat[r][c] = r2cfx(yh_v[n][r][c]);
            ain[r][c]      = r2cfx(ainv_v[n][r][c]);
          end
        end
        din.mode = m_v[n];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
