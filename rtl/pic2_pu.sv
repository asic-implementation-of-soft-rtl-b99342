// pic2_pu: "PIC part 2" processing unit.
//
// Completes parallel interference cancellation: for every stream i and row r
//   yhat_i[r] = t[r] + G[r][i] * s_hat_i ,
// where t = yMF - G s_hat comes from PIC part 1, so that yhat_i holds the
// matched-filter output with the estimated interference of all other streams
// removed. One complex multiply-add per cycle: cycle k = 0..15 handles stream
// i = k/4, row r = k%4. G and the variances E are fed through to the MMSE
// filter PU. Data memory is loaded in the exchange cycle (xchg).
module pic2_pu
  import mmse_pic_pkg::*;
(
  input  logic             clk,
  input  logic [CYCW-1:0]  cyc,
  input  logic             xchg,
  input  pic1_out_t        din,
  output pic2_out_t        dout
);

  pic1_out_t mem;
  cmat_t     yhat_q;

  logic signed [31:0] i_c, r_c;   // small schedule indices
  cfx_t nxt;
  always_comb begin
    i_c = (int'(cyc) / MT) % MT;
    r_c = int'(cyc) % MT;
    nxt = c_add(mem.t[r_c], c_mul(mem.g[r_c][i_c], mem.shat[i_c]));
  end

  always_ff @(posedge clk) begin
    if (xchg) mem <= din;
    else if (int'(cyc) < MT * MT) yhat_q[i_c][r_c] <= nxt;
  end

  always_comb begin
    dout.yhat = yhat_q;
    dout.g    = mem.g;
    dout.e    = mem.e;
    dout.mode = mem.mode;
  end

endmodule
