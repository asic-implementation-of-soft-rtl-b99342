// pic1_pu: "PIC part 1" processing unit.
//
// First half of parallel interference cancellation done on the matched-filter
// output: it subtracts the whole soft-symbol estimate from yMF,
//   t = yMF - G * s_hat .
// The second half (pic2_pu) adds each stream's own term back, which gives the
// per-stream cancelled vectors yhat_i = yMF - sum_{j != i} g_j s_hat_j. How
// the work is divided between the two PIC units is this design's own choice.
//
// One complex multiply-subtract per cycle: in cycle k = 0..15 row r = k/4 is
// updated with column j = k%4 (t[r] starts from yMF[r] at j = 0). s_hat, E
// and G are fed through to PIC part 2. Data memory is loaded in the exchange
// cycle (xchg), results are complete after cycle 15.
module pic1_pu
  import mmse_pic_pkg::*;
(
  input  logic             clk,
  input  logic [CYCW-1:0]  cyc,
  input  logic             xchg,
  input  soft_out_t        din,
  output pic1_out_t        dout
);

  soft_out_t mem;
  cvec_t     t_q;

  logic signed [31:0] r_c, j_c;   // small schedule indices
  cfx_t nxt;
  always_comb begin
    cfx_t base;
    r_c  = (int'(cyc) / MT) % MT;
    j_c  = int'(cyc) % MT;
    base = (j_c == 0) ? mem.ymf[r_c] : t_q[r_c];
    nxt  = c_sub(base, c_mul(mem.g[r_c][j_c], mem.shat[j_c]));
  end

  always_ff @(posedge clk) begin
    if (xchg) mem <= din;
    else if (int'(cyc) < MT * MT) t_q[r_c] <= nxt;
  end

  always_comb begin
    dout.t    = t_q;
    dout.shat = mem.shat;
    dout.e    = mem.e;
    dout.g    = mem.g;
    dout.mode = mem.mode;
  end

endmodule
