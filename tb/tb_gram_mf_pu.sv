// tb_gram_mf_pu: checks the Gram / matched-filter PU against a floating-point
// model. Random vectors are loaded back to back, one per 18-cycle period; the
// results of each are compared at the next exchange cycle (so the 18-cycle
// budget is checked too): G = H^H H and yMF = H^H y within 1e-3, and the
// fed-through LLRs, N0 and mode exactly.
`timescale 1ns/1ps
module tb_gram_mf_pu;
  import mmse_pic_pkg::*;
  import mmse_pic_ref_pkg::*;

  localparam int NV = 12;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [CYCW-1:0] cyc = '0;
  logic xchg;
  assign xchg = (int'(cyc) == TS - 1);
  always @(posedge clk) cyc <= xchg ? '0 : cyc + 1'b1;

  det_in_t   din;
  gram_out_t dout;
  gram_mf_pu dut (.clk(clk), .cyc(cyc), .xchg(xchg), .din(din), .dout(dout));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  function automatic bit near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  det_in_t vec [NV];
  initial begin
    int sym [MT];
    rcmat g; rcvec ymf;
    for (int n = 0; n < NV; n++)
      gen_vector(mod_e'(n % 4), 0.1, n % 2, vec[n], sym);
    din = '0;
    for (int n = 0; n <= NV; n++) begin
      @(negedge clk);
      while (!xchg) @(negedge clk);
      if (n > 0) begin
        ref_gram(vec[n-1], g, ymf);
        for (int r = 0; r < MT; r++) begin
          for (int c = 0; c < MT; c++) begin
            chk(near(fx2r(dout.g[r][c].re), g[r][c].re, 1e-3), $sformatf("G[%0d][%0d].re", r, c));
            chk(near(fx2r(dout.g[r][c].im), g[r][c].im, 1e-3), $sformatf("G[%0d][%0d].im", r, c));
          end
          chk(near(fx2r(dout.ymf[r].re), ymf[r].re, 1e-3), "ymf.re");
          chk(near(fx2r(dout.ymf[r].im), ymf[r].im, 1e-3), "ymf.im");
        end
        chk(dout.la == vec[n-1].la, "la feed-through");
        chk(dout.n0 == fx_t'(vec[n-1].n0), "n0");
        chk(dout.mode == vec[n-1].mode, "mode");
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
