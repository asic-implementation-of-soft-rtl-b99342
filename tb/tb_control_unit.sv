// tb_control_unit: checks the exchange-cycle sequencer. After reset the
// counter must run 0..17 and xchg/in_ready must be high exactly in cycle 17.
// Vectors are offered in a random pattern of exchange cycles; a cycle-level
// model of the six-period pipeline predicts stage_valid, out_valid (108
// cycles after acceptance) and the clock enables of the eight PUs, which are
// compared every cycle. Offers outside the exchange cycle must be ignored.
`timescale 1ns/1ps
module tb_control_unit;
  import mmse_pic_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, xchg, out_valid;
  logic [CYCW-1:0] cyc;
  logic [NSTAGE:1] stage_valid;
  logic [7:0] gate_en;
  control_unit dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                    .cyc(cyc), .xchg(xchg), .stage_valid(stage_valid), .gate_en(gate_en),
                    .out_valid(out_valid));

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", s, $time); end
  endtask

  int m_cyc = 0;
  logic [NSTAGE:1] m_sv = '0;
  logic m_ov = 1'b0;
  longint acc_t [$];
  longint t = 0;
  int n_out = 0, n_gated = 0;

  initial begin
    logic [NSTAGE:1] run;
    logic [7:0] en;
    rst_n = 1'b0;
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 18 * 60; n++) begin
      // stimulus: random offers, also outside exchange cycles
      in_valid = ($urandom_range(0, 2) != 0);
      if (n > 18 * 45) in_valid = 1'b0;      // drain
      #1;
      // compare with the model
      chk(int'(cyc) == m_cyc, "cyc");
      chk(xchg == (m_cyc == TS - 1) && in_ready == xchg, "xchg");
      chk(stage_valid == m_sv, "stage_valid");
      chk(out_valid == m_ov, "out_valid");
      run[1] = m_sv[1] | (xchg & in_valid);
      for (int k = 2; k <= NSTAGE; k++) run[k] = m_sv[k] | (xchg & m_sv[k-1]);
      en = {run[6], run[5], run[4], run[3], run[4], run[3], run[2], run[1]};
      chk(gate_en == en, "gate_en");
      if (gate_en != 8'hff) n_gated++;
      // advance the model over the coming edge
      @(posedge clk);
      t++;
      if (m_cyc == TS - 1) begin
        if (in_valid) acc_t.push_back(t);
        if (m_sv[NSTAGE]) begin
          // the vector leaving stage 6 was accepted 6 periods ago
          chk(acc_t.size() > 0 && t - acc_t[0] == NSTAGE * TS, "latency 108");
          if (acc_t.size() > 0) void'(acc_t.pop_front());
          n_out++;
        end
        m_ov = m_sv[NSTAGE];
        m_sv = {m_sv[NSTAGE-1:1], in_valid};
        m_cyc = 0;
      end else m_cyc++;
      @(negedge clk);
    end
    chk(n_out > 10, "vectors passed through");
    chk(n_gated > 0, "gating seen");
    chk(acc_t.size() == 0, "all drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (18 * 70) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
