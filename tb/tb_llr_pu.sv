// tb_llr_pu: checks the LLR PU against an exhaustive max-log search over the
// whole 2-D constellation, for all four modes and random filter outputs z
// (around and between the constellation points) and SINRs rho. LLRs must
// match the rounded and saturated reference within one LSB, unused slots must
// be 0. The LLRs of a vector loaded in one exchange cycle must appear in the
// output register one period later and be held there for the whole period.
`timescale 1ns/1ps
module tb_llr_pu;
  import mmse_pic_pkg::*;
  import mmse_pic_ref_pkg::*;

  localparam int NV = 40;
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

  mmse_out_t din;
  le_arr_t   llr;
  mod_e      mode_o;
  llr_pu dut (.clk(clk), .cyc(cyc), .xchg(xchg), .din(din), .llr_out(llr), .mode_out(mode_o));

  mmse_out_t vec [NV];
  int nsat = 0;
  initial begin
    int q, ex, dd;
    for (int n = 0; n < NV; n++) begin
      vec[n] = '0;
      vec[n].mode = mod_e'(n % 4);
      for (int i = 0; i < MT; i++) begin
        vec[n].z[i] = r2cfx(mk(urand(-1.3, 1.3), urand(-1.3, 1.3)));
        vec[n].rho[i] = r2fx(urand(0.1, 3.0) * ((n % 4 == 3) ? 8.0 : 1.0));
      end
    end
    din = '0;
    for (int n = 0; n <= NV + 1; n++) begin
      @(negedge clk);
      while (!xchg) @(negedge clk);
      // vector n-2 was loaded two exchanges ago, its LLRs are now in llr_out
      if (n > 1) begin
        q = nbits(vec[n-2].mode);
        chk(mode_o == vec[n-2].mode, "mode");
        for (int i = 0; i < MT; i++)
          for (int b = 0; b < QMAX; b++) begin
            ex = (b < q) ? quant_llr(ref_llr(cfx2r(vec[n-2].z[i]), fx2r(vec[n-2].rho[i]),
                                              vec[n-2].mode, b)) : 0;
            if (ex == 31 || ex == -32) nsat++;
            dd = int'(llr[i][b]) - ex;
            chk(dd >= -1 && dd <= 1, $sformatf("vec %0d llr[%0d][%0d] %0d ref %0d", n-2, i, b, llr[i][b], ex));
          end
      end
      if (n < NV) din = vec[n];
      else din = '0;
    end
    chk(nsat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
