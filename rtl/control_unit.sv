// control_unit: exchange-cycle sequencer and pipeline control of the detector.
//
// A free-running counter cyc steps 0..TS-1 (TS = 18); the last cycle of each
// period is the exchange cycle (xchg = 1). At the end of it every processing
// unit (PU) loads the data of the previous PU, the first PU takes a new input
// vector and the last PU moves its LLRs to the output register.
//
// Input/output handshake (this design's own): in_ready equals xchg; a vector
// offered with in_valid = 1 in that cycle is accepted. One valid bit per
// pipeline period follows each accepted vector through the six periods
// (1 Gram, 2 soft symbols, 3 PIC 1 / LU, 4 PIC 2 / back subst., 5 MMSE,
// 6 LLR); out_valid rises exactly 6*TS = 108 cycles after acceptance and
// stays high for one period while the LLRs are held at the output.
//
// Clock gating: the clock of a PU is enabled while its period holds a valid
// vector and, in the exchange cycle, when its predecessor hands one over, so a
// PU without data gets no clock edges. Enables are combinational from
// registers and meant for latch-based clock gates. PU order of gate_en:
// 0 Gram, 1 soft, 2 PIC 1, 3 PIC 2, 4 LU, 5 back subst., 6 MMSE, 7 LLR.
module control_unit
  import mmse_pic_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,     // synchronous, active low
  input  logic             in_valid,
  output logic             in_ready,
  output logic [CYCW-1:0]  cyc,
  output logic             xchg,
  output logic [NSTAGE:1]  stage_valid,
  output logic [7:0]       gate_en,
  output logic             out_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc         <= '0;
      stage_valid <= '0;
      out_valid   <= 1'b0;
    end else begin
      cyc <= (int'(cyc) == TS - 1) ? '0 : cyc + 1'b1;
      if (xchg) begin
        stage_valid <= {stage_valid[NSTAGE-1:1], in_valid};
        out_valid   <= stage_valid[NSTAGE];
      end
    end
  end

  assign xchg     = (int'(cyc) == TS - 1);
  assign in_ready = xchg;

  // stage k is clocked while it holds data or receives data at the exchange
  logic [NSTAGE:1] run;
  always_comb begin
    run[1] = stage_valid[1] | (xchg & in_valid);
    for (int k = 2; k <= NSTAGE; k++)
      run[k] = stage_valid[k] | (xchg & stage_valid[k-1]);
  end

  assign gate_en = {run[6], run[5], run[4], run[3], run[4], run[3], run[2], run[1]};

  // handshake rule: a vector is only ever accepted in an exchange cycle
  a_accept_in_xchg: assert property (@(posedge clk) disable iff (!rst_n)
    stage_valid[1] && $changed(stage_valid) |-> $past(xchg));

endmodule
