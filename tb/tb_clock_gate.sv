// tb_clock_gate: checks the latch-based clock gate. The enable is changed at
// random times, also while the clock is high. Every rising edge of the gated
// clock must coincide with a rising edge of the clock at which the enable
// was high during the preceding low phase, every such clock edge must be
// passed, and the gated clock must be low whenever the clock is low (no
// glitches, no shortened pulses).
`timescale 1ns/1ps
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", s, $time); end
  endtask

  logic en_low;        // enable as it was at the end of the low phase
  int n_pass = 0, n_block = 0, n_gedge = 0, n_exp = 0;

  always #5 clk = ~clk;
  always @(posedge gclk) n_gedge++;

  initial begin
    for (int n = 0; n < 700; n++) begin
      // change the enable at a random moment of the period
      #($urandom_range(1, 9));
      en = $urandom_range(0, 1);
    end
  end

  initial begin
    for (int n = 0; n < 150; n++) begin
      @(negedge clk);
      #4.9 en_low = en;
      @(posedge clk);
      #0.1;
      chk(gclk == en_low, "gclk follows enable latched in low phase");
      if (en_low) begin n_pass++; n_exp++; end else n_block++;
      #4.8;
      chk(gclk == en_low, "gclk stable while clk high");
      #0.2;
      chk(gclk == 1'b0, "gclk low while clk low");
    end
    chk(n_gedge >= n_exp && n_exp > 0, "gated edges seen");
    chk(n_pass > 0 && n_block > 0, "both enabled and blocked edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #8000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
