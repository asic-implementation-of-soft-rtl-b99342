// tb_packet_workload: the detector on one whole coded packet, at full size.
//
// Workload: 4 x 4 MIMO with 16-QAM and a rate-1/2 code on 864-bit packets.
// That gives 1728 coded bits, or 1728 / (4 streams * 4 bits) = 108 received
// vectors per packet. The packet is detected twice, back to back:
//   iteration 1: all a-priori LLRs zero (plain MMSE detection),
//   iteration 2: the same 108 vectors (same H, y, N0) with a-priori LLRs
//                standing in for a channel decoder's output: mostly reliable
//                (magnitude 2..7.5, 2 % with the wrong sign).
// The channel decoder itself is not part of the detector and is not modelled.
//
// Checks:
//  - every LLR of all 216 vectors against the floating-point reference model
//    to within one LSB (0.5);
//  - one vector accepted every 18 cycles without a gap, 108 cycles of latency
//    per vector, and the whole run ending (216 - 1) * 18 + 108 cycles after
//    the first acceptance;
//  - with priors, interference cancellation must not raise the number of
//    wrong hard decisions of the extrinsic LLRs (bit errors are counted
//    against the transmitted bits and printed for both iterations).
// The internal clock is the XOR of two 4 ns clocks 1 ns apart (2 ns period).
`timescale 1ns/1ps
module tb_packet_workload;
  import mmse_pic_pkg::*;
  import mmse_pic_ref_pkg::*;

  localparam int NPKT = 108;          // vectors per packet
  localparam int NIT  = 2;            // detection passes
  localparam int NVEC = NPKT * NIT;
  localparam int LAT  = NSTAGE * TS;
  localparam real N0  = 0.12;

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

  det_in_t pkt [NPKT];
  int      pkt_sym [NPKT][MT];
  int      exp_llr [NVEC][MT][QMAX];
  longint  acc_cycle [NVEC];
  int n_acc = 0, n_out = 0;
  int berr [NIT] = '{0, 0};
  int max_err = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic predict(input det_in_t d, input int idx);
    rcmat g, a, ainv, yhat;
    rcvec ymf, shat, z;
    rrvec e, rho;
    ref_gram(d, g, ymf);
    ref_soft(d.la, d.mode, shat, e);
    ref_amat(g, e, real'(d.n0) / 65536.0, a);
    ref_inv(a, ainv);
    ref_pic(ymf, g, shat, yhat);
    ref_mmse(ainv, g, yhat, e, z, rho);
    for (int i = 0; i < MT; i++)
      for (int b = 0; b < QMAX; b++)
        exp_llr[idx][i][b] = (b < 4) ? quant_llr(ref_llr(z[i], rho[i], d.mode, b)) : 0;
  endtask

  // stand-in decoder output for bit value v
  function automatic la_t prior_llr(input int v);
    int l;
    l = $urandom_range(4, 15);
    if ($urandom_range(0, 49) == 0) l = -l;
    return la_t'((v != 0) ? l : -l);
  endfunction

  initial begin
    det_in_t v;
    int sym [MT];
    rst_n = 1'b0;
    in_valid = 1'b0;
    din = '0;
    for (int n = 0; n < NPKT; n++) begin
      gen_vector(MOD_QAM16, N0, 0, v, sym);
      pkt[n] = v;
      for (int c = 0; c < MT; c++) pkt_sym[n][c] = sym[c];
    end
    repeat (5) @(negedge tclk);
    rst_n = 1'b1;
    for (int n = 0; n < NVEC; n++) begin
      v = pkt[n % NPKT];
      if (n >= NPKT)
        for (int c = 0; c < MT; c++)
          for (int b = 0; b < 4; b++)
            v.la[c][b] = prior_llr(symbit(4, pkt_sym[n % NPKT][c], b));
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

  always @(negedge tclk) begin
    if (rst_n && out_valid && int'(dut.cyc) == 0) begin
      int d, it, s;
      check(n_out < n_acc, "output without input");
      if (n_out < n_acc) begin
        it = n_out / NPKT;
        check(cycle - acc_cycle[n_out] == LAT, $sformatf("latency %0d", cycle - acc_cycle[n_out]));
        if (n_out > 0)
          check(acc_cycle[n_out] - acc_cycle[n_out - 1] == TS, "back-to-back input");
        check(out_mode == MOD_QAM16, "mode");
        for (int i = 0; i < MT; i++)
          for (int b = 0; b < QMAX; b++) begin
            d = int'(llr[i][b]) - exp_llr[n_out][i][b];
            if (d < 0) d = -d;
            if (d > max_err) max_err = d;
            check(d <= 1, $sformatf("vec %0d llr[%0d][%0d] dut %0d ref %0d",
                                    n_out, i, b, llr[i][b], exp_llr[n_out][i][b]));
            if (b < 4) begin
              s = symbit(4, pkt_sym[n_out % NPKT][i], b);
              if ((llr[i][b] > 0) != (s != 0)) berr[it]++;
            end
          end
      end
      n_out++;
      if (n_out == NVEC) begin
        check(acc_cycle[NVEC - 1] + LAT - acc_cycle[0] == (NVEC - 1) * TS + LAT, "total cycles");
        check(berr[1] <= berr[0], "priors do not increase errors");
        $display("packet: %0d vectors x %0d passes, %0d cycles, bit errors per pass %0d / %0d of %0d, max LLR error %0d LSB",
                 NPKT, NIT, acc_cycle[NVEC - 1] + LAT - acc_cycle[0], berr[0], berr[1],
                 NPKT * MT * 4, max_err);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // watchdog
  initial begin
    repeat (NVEC * TS + LAT + 400) @(posedge tclk);
    failures++;
    $display("watchdog: %0d of %0d outputs seen", n_out, NVEC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
