// tb_recip_nr: checks the pipelined Newton-Raphson reciprocal unit. A new
// random input enters every cycle, spread over the whole positive range of
// the internal word (2^-16 .. 2^11). Two cycles later mant * 2^-16 * 2^-e
// must equal 1/x with a relative error below 2^-14 (the 16-bit truncation of
// the normalised input alone costs up to 2^-15), and
// the normalising exponent must put the mantissa in (1, 2].
`timescale 1ns/1ps
module tb_recip_nr;
  import mmse_pic_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fx_t               x;
  logic [F+1:0]      mant;
  logic signed [6:0] e;
  recip_nr dut (.clk(clk), .x(x), .mant(mant), .e(e));

  int checks = 0, failures = 0;
  fx_t hist [$];
  real worst = 0.0;

  initial begin
    real r, got, err;
    int sh;
    x = fx_t'(1);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (hist.size() == 2) begin
        r = real'(hist[0]) / 65536.0;
        got = real'(mant) / 65536.0 * (2.0 ** (-real'(e)));
        err = (got * r - 1.0);
        if (err < 0) err = -err;
        if (err > worst) worst = err;
        checks++;
        if (err > 1.0 / 16384.0 || mant <= (F + 2)'(65536) || mant > (F + 2)'(131072)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%f got %f", r, got);
        end
        void'(hist.pop_front());
      end
      sh = $urandom_range(0, W - 2);
      x = fx_t'(($urandom() | 32'h1) & ((32'h1 << sh) | ((32'h1 << sh) - 1)));
      if (x <= 0) x = fx_t'(1);
      if (n % 97 == 0) x = fx_t'(1 << (n % 27));   // exact powers of two
      hist.push_back(x);
    end
    $display("worst relative error %e", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
