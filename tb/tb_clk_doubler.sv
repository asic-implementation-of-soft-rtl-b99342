// tb_clk_doubler: two clocks of 8 ns period, the second 2 ns (90 degrees)
// behind the first, must give an output with a rising edge every 4 ns and a
// 50 % duty cycle, i.e. twice the input frequency; the output is checked at
// the middle of every 1 ns slot against clk_0 XOR clk_90.
`timescale 1ns/1ps
module tb_clk_doubler;
  logic clk_0 = 1'b0, clk_90 = 1'b0, clk_2x;
  clk_doubler dut (.clk_0(clk_0), .clk_90(clk_90), .clk_2x(clk_2x));

  int checks = 0, failures = 0;
  realtime last = 0.0;
  int n_in = 0, n_out = 0;

  always #4 clk_0 = ~clk_0;
  initial begin
    #2;
    forever #4 clk_90 = ~clk_90;
  end
  always @(posedge clk_0) n_in++;
  always @(posedge clk_2x) begin
    if (n_out > 0) begin
      checks++;
      if ($realtime - last != 4.0) begin
        failures++;
        $display("FAIL period %f", $realtime - last);
      end
    end
    last = $realtime;
    n_out++;
  end

  initial begin
    int high = 0;
    #0.5;
    for (int n = 0; n < 400; n++) begin
      checks++;
      if (clk_2x !== (clk_0 ^ clk_90)) failures++;
      if (clk_2x) high++;
      #1;
    end
    checks++;
    if (high < 190 || high > 210) failures++;
    checks++;
    if (n_out < 2 * n_in - 2 || n_out > 2 * n_in + 2) failures++;
    $display("input edges %0d output edges %0d", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
