// tb_pic2_pu: checks PIC part 2, yhat_i = t + g_i s_hat_i for all streams i,
// against a floating-point model; with t = yMF - G s_hat this equals the
// interference-cancelled vector yMF - sum_{j != i} g_j s_hat_j. G, E and the
// mode must be fed through unchanged.
`timescale 1ns/1ps
module tb_pic2_pu;
  import mmse_pic_pkg::*;
  import mmse_pic_ref_pkg::*;

  localparam int NV = 10;
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
    return (a - b <= tol) && (b - a <= tol);
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

  pic1_out_t din;
  pic2_out_t dout;
  pic2_pu dut (.clk(clk), .cyc(cyc), .xchg(xchg), .din(din), .dout(dout));

  pic1_out_t vec [NV];
  initial begin
    rcx t;
    for (int n = 0; n < NV; n++) begin
      vec[n] = '0;
      for (int r = 0; r < MT; r++) begin
        for (int c = 0; c < MT; c++) vec[n].g[r][c] = r2cfx(mk(urand(-4, 4), urand(-4, 4)));
        vec[n].t[r] = r2cfx(mk(urand(-8, 8), urand(-8, 8)));
        vec[n].shat[r] = r2cfx(mk(urand(-1, 1), urand(-1, 1)));
        vec[n].e[r] = r2fx(urand(0, 1));
      end
      vec[n].mode = mod_e'(n % 4);
    end
    din = '0;
    for (int n = 0; n <= NV; n++) begin
      @(negedge clk);
      while (!xchg) @(negedge clk);
      if (n > 0) begin
        for (int i = 0; i < MT; i++)
          for (int r = 0; r < MT; r++) begin
            t = radd(cfx2r(vec[n-1].t[r]), rmul(cfx2r(vec[n-1].g[r][i]), cfx2r(vec[n-1].shat[i])));
            chk(cnear(dout.yhat[i][r], t, 1e-3), $sformatf("yhat[%0d][%0d]", i, r));
          end
        chk(dout.e == vec[n-1].e && dout.g == vec[n-1].g && dout.mode == vec[n-1].mode,
            "feed-through");
      end
      if (n < NV) din = vec[n];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
