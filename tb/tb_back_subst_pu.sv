// tb_back_subst_pu: checks the back-substitution PU. For random matrices
// A = G diag(E) + N0 I, a floating-point LU factorisation supplies the PU's
// inputs (L^-1, U, 1/U[k][k]); the PU's output must equal A^-1 computed
// independently by Gauss-Jordan elimination (relative tolerance 2e-3), one
// matrix per 18-cycle period.
`timescale 1ns/1ps
module tb_back_subst_pu;
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

  lu_out_t din;
  cmat_t   ainv;
  back_subst_pu dut (.clk(clk), .cyc(cyc), .xchg(xchg), .din(din), .ainv(ainv));

  rcmat amat [NV];
  initial begin
    int sym [MT];
    det_in_t d;
    rcmat g, u, l, linv, x;
    rcvec ymf;
    rrvec e;
    for (int n = 0; n < NV; n++) begin
      gen_vector(MOD_QPSK, 0.1, 0, d, sym);
      ref_gram(d, g, ymf);
      for (int i = 0; i < MT; i++) e[i] = urand(0.02, 1.0);
      ref_amat(g, e, urand(0.05, 0.5), amat[n]);
    end
    din = '0;
    for (int n = 0; n <= NV; n++) begin
      @(negedge clk);
      while (!xchg) @(negedge clk);
      if (n > 0) begin
        ref_inv(amat[n-1], x);
        for (int r = 0; r < MT; r++)
          for (int c = 0; c < MT; c++)
            chk(cnear(ainv[r][c], x[r][c], 2e-3),
                $sformatf("Ainv[%0d][%0d] %f %f", r, c, fx2r(ainv[r][c].re), x[r][c].re));
      end
      if (n < NV) begin
        u = amat[n];
        for (int r = 0; r < MT; r++)
          for (int c = 0; c < MT; c++) l[r][c] = mk((r == c) ? 1.0 : 0.0, 0.0);
        for (int k = 0; k < MT; k++)
          for (int i = k + 1; i < MT; i++) begin
            l[i][k] = rdiv(u[i][k], u[k][k]);
            for (int j = 0; j < MT; j++) u[i][j] = rsub(u[i][j], rmul(l[i][k], u[k][j]));
          end
        ref_inv(l, linv);
        din = '0;
        for (int r = 0; r < MT; r++) begin
          din.udinv[r] = r2cfx(rdiv(mk(1.0, 0.0), u[r][r]));
          for (int c = 0; c < MT; c++) begin
            din.u[r][c]    = r2cfx(u[r][c]);
            din.linv[r][c] = r2cfx(linv[r][c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
