// tb_lu_fwd_pu: checks the LU-decomposition & forward-substitution PU.
// Matrices A = G diag(E) + N0 I are built from random channels, variances and
// noise levels, as the detector produces them. A floating-point Doolittle
// factorisation gives the expected U, 1/U[k][k] and L^-1 (computed by
// inverting L with Gauss-Jordan elimination). One matrix per 18-cycle
// period, results checked at the following exchange cycle; relative
// tolerance 2e-3.
`timescale 1ns/1ps
module tb_lu_fwd_pu;
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

  soft_out_t din;
  lu_out_t   dout;
  lu_fwd_pu dut (.clk(clk), .cyc(cyc), .xchg(xchg), .din(din), .dout(dout));

  rcmat amat [NV];
  initial begin
    int sym [MT];
    det_in_t d;
    rcmat g, u, l, linv;
    rcvec ymf;
    rrvec e;
    for (int n = 0; n < NV; n++) begin
      gen_vector(MOD_QAM16, 0.1, 0, d, sym);
      ref_gram(d, g, ymf);
      for (int i = 0; i < MT; i++) e[i] = urand(0.02, 1.0);
      ref_amat(g, e, urand(0.05, 0.5), amat[n]);
    end
    din = '0;
    for (int n = 0; n <= NV; n++) begin
      @(negedge clk);
      while (!xchg) @(negedge clk);
      if (n > 0) begin
        // reference Doolittle LU without pivoting
        u = amat[n-1];
        for (int r = 0; r < MT; r++)
          for (int c = 0; c < MT; c++) l[r][c] = mk((r == c) ? 1.0 : 0.0, 0.0);
        for (int k = 0; k < MT; k++)
          for (int i = k + 1; i < MT; i++) begin
            l[i][k] = rdiv(u[i][k], u[k][k]);
            for (int j = 0; j < MT; j++) u[i][j] = rsub(u[i][j], rmul(l[i][k], u[k][j]));
          end
        ref_inv(l, linv);
        for (int r = 0; r < MT; r++) begin
          chk(cnear(dout.udinv[r], rdiv(mk(1.0, 0.0), u[r][r]), 2e-3), $sformatf("1/U[%0d]", r));
          for (int c = 0; c < MT; c++) begin
            if (c >= r) chk(cnear(dout.u[r][c], u[r][c], 2e-3), $sformatf("U[%0d][%0d]", r, c));
            chk(cnear(dout.linv[r][c], linv[r][c], 2e-3),
                $sformatf("Linv[%0d][%0d] %f %f", r, c, fx2r(dout.linv[r][c].re), linv[r][c].re));
          end
        end
      end
      if (n < NV) begin
        din = '0;
        for (int r = 0; r < MT; r++)
          for (int c = 0; c < MT; c++) din.a[r][c] = r2cfx(amat[n][r][c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
