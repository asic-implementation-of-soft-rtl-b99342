// tb_mmse_pic_detector: end-to-end test of the complete detector at its
// default (full) size.
//
// Random 4x4 channels, symbols, noise and a-priori LLRs are generated for all
// four modulations, with and without prior information (first and later
// iterations). Each vector's LLRs are predicted by the floating-point
// reference model (mmse_pic_ref_pkg) from the same quantised inputs and
// compared with the detector output to within one LSB (0.5); LLR slots the
// mode does not use must be 0. The test also checks the latency of every
// vector (108 cycles from acceptance to output), that one vector is accepted
// per 18-cycle period at full rate, and counts how often each mechanism
// occurred: back-to-back input with all six pipeline periods busy, input gaps,
// gated (idle) processing-unit clocks, every modulation mode, a mode change
// between consecutive vectors, zero and non-zero priors. A mechanism that
// never occurred counts as a failure.
//
// The internal clock is the XOR of clk_0 and clk_90 (each 4 ns period,
// 1 ns apart), giving a 2 ns internal clock; the testbench drives and samples
// on its falling edges.
`timescale 1ns/1ps
module tb_mmse_pic_detector;
  import mmse_pic_pkg::*;
  import mmse_pic_ref_pkg::*;

  localparam int NVEC = 48;
  localparam int LAT  = NSTAGE * TS;

  logic clk_0 = 1'b0, clk_90 = 1'b0;
  logic tclk;
  logic rst_n, in_valid, in_ready, out_valid;
  det_in_t din;
  le_arr_t llr;
  mod_e    out_mode;

  always #2 clk_0 = ~clk_0;
  initial begin
    #1;
    forever #2 clk_90 = ~clk_90;
  end
  assign tclk = clk_0 ^ clk_90;

  mmse_pic_detector dut (
    .clk_0(clk_0), .clk_90(clk_90), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .din(din),
    .out_valid(out_valid), .llr(llr), .out_mode(out_mode)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge tclk) cycle <= cycle + 1;

  // expected results, in order of acceptance
  int     exp_llr [NVEC][MT][QMAX];
  mod_e   exp_mode [NVEC];
  longint acc_cycle [NVEC];
  int n_acc = 0, n_out = 0;

  // mechanism counters
  int m_full = 0, m_gap = 0, m_gated = 0, m_modechg = 0, m_prior0 = 0, m_prior1 = 0;
  int m_mode [4] = '{0, 0, 0, 0};
  int max_err = 0;
  int n_llr = 0, n_unsat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // build the reference LLRs of a vector
  task automatic predict(input det_in_t d, input int idx);
    rcmat g, a, ainv, yhat;
    rcvec ymf, shat, z;
    rrvec e, rho;
    int q;
    ref_gram(d, g, ymf);
    ref_soft(d.la, d.mode, shat, e);
    ref_amat(g, e, real'(d.n0) / 65536.0, a);
    ref_inv(a, ainv);
    ref_pic(ymf, g, shat, yhat);
    ref_mmse(ainv, g, yhat, e, z, rho);
    q = nbits(d.mode);
    for (int i = 0; i < MT; i++)
      for (int b = 0; b < QMAX; b++)
        exp_llr[idx][i][b] = (b < q) ? quant_llr(ref_llr(z[i], rho[i], d.mode, b)) : 0;
    exp_mode[idx] = d.mode;
  endtask

  // input side: schedule with back-to-back bursts and gaps
  initial begin
    det_in_t v;
    int sym [MT];
    mod_e m, prev_m;
    int prior;
    real n0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    din = '0;
    prev_m = MOD_BPSK;
    repeat (5) @(negedge tclk);
    rst_n = 1'b1;
    for (int n = 0; n < NVEC; n++) begin
      // vectors 0..19 back to back, then gaps of 0..3 periods
      if (n >= 20) begin
        int gap;
        gap = $urandom_range(0, 3);
        if (n == 20) gap = 3;
        if (gap > 0) m_gap++;
        repeat (gap * TS) @(negedge tclk);
      end
      m = mod_e'((n / 2) % 4);
      prior = (n % 3 == 0) ? 0 : 1;
      n0 = (m == MOD_QAM64) ? 0.04 : ((m == MOD_QAM16) ? 0.15 : ((m == MOD_QPSK) ? 0.6 : 0.9));
      gen_vector(m, n0, prior, v, sym);
      if (n > 0 && m != prev_m) m_modechg++;
      prev_m = m;
      if (prior != 0) m_prior1++; else m_prior0++;
      m_mode[int'(m)]++;
      // wait for the exchange cycle
      @(negedge tclk);
      while (!in_ready) @(negedge tclk);
      din = v;
      in_valid = 1'b1;
      predict(v, n_acc);
      acc_cycle[n_acc] = cycle + 1;
      n_acc++;
      @(negedge tclk);
      in_valid = 1'b0;
      din = '0;
    end
  end

  // rate check: at full rate consecutive acceptances are TS cycles apart
  initial begin
    wait (n_acc == 20);
    check(acc_cycle[19] - acc_cycle[0] == 19 * TS, "one vector per 18-cycle period");
  end

  // output side
  always @(negedge tclk) begin
    if (rst_n) begin
      if (&dut.stage_valid) m_full++;
      if (dut.gate_en != 8'hff) m_gated++;
      if (out_valid && int'(dut.cyc) == 0) begin
        int d;
        check(n_out < n_acc, "output without input");
        if (n_out < n_acc) begin
          check(cycle - acc_cycle[n_out] == LAT, $sformatf("latency %0d", cycle - acc_cycle[n_out]));
          check(out_mode == exp_mode[n_out], "mode");
          for (int i = 0; i < MT; i++)
            for (int b = 0; b < QMAX; b++) begin
              d = int'(llr[i][b]) - exp_llr[n_out][i][b];
              if (d < 0) d = -d;
              if (d > max_err) max_err = d;
              if (b < nbits(exp_mode[n_out])) begin
                n_llr++;
                if (exp_llr[n_out][i][b] > -32 && exp_llr[n_out][i][b] < 31) n_unsat++;
              end
              check(d <= 1, $sformatf("vec %0d mode %0d llr[%0d][%0d] dut %0d ref %0d",
                                      n_out, exp_mode[n_out], i, b, llr[i][b],
                                      exp_llr[n_out][i][b]));
            end
        end
        n_out++;
        if (n_out == NVEC) begin
          check(n_unsat * 2 > n_llr, "most LLRs inside the output range");
          check(m_full > 0, "pipeline full");
          check(m_gap > 0, "input gaps");
          check(m_gated > 0, "clock gating");
          check(m_modechg > 0, "mode change");
          check(m_prior0 > 0 && m_prior1 > 0, "zero and non-zero priors");
          for (int k = 0; k < 4; k++) check(m_mode[k] > 0, "every mode");
          $display("mechanisms: full-pipeline cycles %0d, gaps %0d, gated cycles %0d, mode changes %0d, prior0 %0d prior1 %0d, modes %0d/%0d/%0d/%0d, max LLR error %0d LSB, unsaturated %0d of %0d",
                   m_full, m_gap, m_gated, m_modechg, m_prior0, m_prior1,
                   m_mode[0], m_mode[1], m_mode[2], m_mode[3], max_err, n_unsat, n_llr);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat (NVEC * TS * 6 + 200) @(posedge tclk);
    failures++;
    $display("watchdog: %0d of %0d outputs seen", n_out, NVEC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
