// mmse_pic_detector: four-stream soft-input soft-output MIMO detector using
// MMSE parallel interference cancellation (top level).
//
// For each received vector y = H s + n (4 x 4 channel H, noise variance N0)
// and a-priori LLRs of all coded bits from a channel decoder, it delivers
// extrinsic LLRs of all MT*Q bits, for BPSK, QPSK, 16-QAM or 64-QAM. Only one
// 4 x 4 matrix A = G diag(E) + N0 I (G = H^H H, E the soft-symbol variances)
// is inverted per vector; its rows serve as the MMSE filters of all streams.
//
// Eight processing units (PUs) work as a coarse-grained pipeline:
//   Gram & matched filter -> soft symbols & variances -> PIC 1 -> PIC 2 ----+
//                                                 \-> LU & fwd -> back subst -> MMSE & SINR -> LLR
// Every PU finishes its work in TS = 18 cycles; in the exchange cycle (the
// last of the 18) all PUs pass their data memories on at once. Six vectors
// are in flight, a new one can enter every 18 cycles, and its LLRs appear
// 6 * 18 = 108 cycles after it was accepted. Throughput is MT*Q/TS bits per
// cycle (1.33 bit/cycle at 64-QAM).
//
// Clocking: the internal clock is the XOR of two input clocks 90 degrees
// apart (twice their frequency). Each PU runs on its own gated copy of it;
// the control unit enables a PU only while it holds or receives a vector.
//
// Interface: din is accepted in a cycle with in_ready = in_valid = 1
// (in_ready is high one cycle in 18). llr/out_mode are valid while
// out_valid = 1 (one full period). Reset rst_n is synchronous, active low.
// The per-period valid bits (stage_valid) are used only inside the control
// unit; the net is kept here so that a testbench can observe pipeline
// occupancy. Two pairs of PUs share enables (PIC 1 with LU, PIC 2 with back
// substitution), so synthesis may merge their clock-gate latches.
module mmse_pic_detector
  import mmse_pic_pkg::*;
(
  input  logic      clk_0,
  input  logic      clk_90,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  det_in_t   din,
  output logic      out_valid,
  output le_arr_t   llr,
  output mod_e      out_mode
);

  logic clk;
  clk_doubler u_clk (.clk_0(clk_0), .clk_90(clk_90), .clk_2x(clk));

  logic [CYCW-1:0] cyc;
  logic            xchg;
  logic [NSTAGE:1] stage_valid;
  logic [7:0]      gate_en;
  logic [7:0]      gclk;

  control_unit u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .cyc        (cyc),
    .xchg       (xchg),
    .stage_valid(stage_valid),
    .gate_en    (gate_en),
    .out_valid  (out_valid)
  );

  for (genvar p = 0; p < 8; p++) begin : g_gate
    clock_gate u_cg (.clk(clk), .en(gate_en[p]), .gclk(gclk[p]));
  end

  gram_out_t gram_d;
  soft_out_t soft_d;
  pic1_out_t pic1_d;
  pic2_out_t pic2_d;
  lu_out_t   lu_d;
  cmat_t     ainv_d;
  mmse_out_t mmse_d;

  gram_mf_pu     u_gram (.clk(gclk[0]), .cyc(cyc), .xchg(xchg), .din(din),    .dout(gram_d));
  soft_symbol_pu u_soft (.clk(gclk[1]), .cyc(cyc), .xchg(xchg), .din(gram_d), .dout(soft_d));
  pic1_pu        u_pic1 (.clk(gclk[2]), .cyc(cyc), .xchg(xchg), .din(soft_d), .dout(pic1_d));
  pic2_pu        u_pic2 (.clk(gclk[3]), .cyc(cyc), .xchg(xchg), .din(pic1_d), .dout(pic2_d));
  lu_fwd_pu      u_lu   (.clk(gclk[4]), .cyc(cyc), .xchg(xchg), .din(soft_d), .dout(lu_d));
  back_subst_pu  u_bs   (.clk(gclk[5]), .cyc(cyc), .xchg(xchg), .din(lu_d),   .ainv(ainv_d));
  mmse_sinr_pu   u_mmse (.clk(gclk[6]), .cyc(cyc), .xchg(xchg), .din(pic2_d), .ainv_in(ainv_d),
                         .dout(mmse_d));
  llr_pu         u_llr  (.clk(gclk[7]), .cyc(cyc), .xchg(xchg), .din(mmse_d), .llr_out(llr),
                         .mode_out(out_mode));

endmodule
