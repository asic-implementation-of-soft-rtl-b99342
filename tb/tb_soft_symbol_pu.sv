// tb_soft_symbol_pu: checks soft symbols, variances and A = G diag(E) + N0 I
// against a floating-point model that enumerates every constellation point
// with its a-priori probability. All four modes, zero and random priors;
// results are checked at the exchange cycle after loading (18-cycle budget).
`timescale 1ns/1ps
module tb_soft_symbol_pu;
  import mmse_pic_pkg::*;
  import mmse_pic_ref_pkg::*;

  localparam int NV = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [CYCW-1:0] cyc = '0;
  logic xchg;
  assign xchg = (int'(cyc) == TS - 1);
  always @(posedge clk) cyc <= xchg ? '0 : cyc + 1'b1;

  gram_out_t din;
  soft_out_t dout;
  soft_symbol_pu dut (.clk(clk), .cyc(cyc), .xchg(xchg), .din(din), .dout(dout));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  function automatic bit near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  gram_out_t vec [NV];
  initial begin
    int sym [MT];
    det_in_t d;
    rcmat g, a; rcvec ymf, shat; rrvec e;
    for (int n = 0; n < NV; n++) begin
      gen_vector(mod_e'(n % 4), 0.2, (n / 4) % 2, d, sym);
      if (n >= 8)  // arbitrary LLRs over the whole 5-bit range
        for (int i = 0; i < MT; i++)
          for (int b = 0; b < QMAX; b++) d.la[i][b] = la_t'($urandom_range(0, 31));
      ref_gram(d, g, ymf);
      vec[n].g = '0;
      for (int r = 0; r < MT; r++) begin
        for (int c = 0; c < MT; c++) vec[n].g[r][c] = r2cfx(g[r][c]);
        vec[n].ymf[r] = r2cfx(ymf[r]);
      end
      vec[n].la = d.la;
      vec[n].n0 = fx_t'(d.n0);
      vec[n].mode = d.mode;
    end
    din = '0;
    for (int n = 0; n <= NV; n++) begin
      @(negedge clk);
      while (!xchg) @(negedge clk);
      if (n > 0) begin
        ref_soft(vec[n-1].la, vec[n-1].mode, shat, e);
        for (int r = 0; r < MT; r++)
          for (int c = 0; c < MT; c++) g[r][c] = cfx2r(vec[n-1].g[r][c]);
        ref_amat(g, e, fx2r(vec[n-1].n0), a);
        for (int i = 0; i < MT; i++) begin
          chk(near(fx2r(dout.shat[i].re), shat[i].re, 2e-3), $sformatf("shat[%0d].re %f %f", i, fx2r(dout.shat[i].re), shat[i].re));
          chk(near(fx2r(dout.shat[i].im), shat[i].im, 2e-3), $sformatf("shat[%0d].im", i));
          chk(near(fx2r(dout.e[i]), e[i], 2e-3), $sformatf("E[%0d] %f %f mode %0d", i, fx2r(dout.e[i]), e[i], vec[n-1].mode));
          for (int c = 0; c < MT; c++) begin
            chk(near(fx2r(dout.a[i][c].re), a[i][c].re, 1e-2), "A.re");
            chk(near(fx2r(dout.a[i][c].im), a[i][c].im, 1e-2), "A.im");
          end
        end
        chk(dout.g == vec[n-1].g && dout.ymf == vec[n-1].ymf && dout.mode == vec[n-1].mode,
            "feed-through");
      end
      if (n < NV) din = vec[n];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NV + 3) * TS) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
