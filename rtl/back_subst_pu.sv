// back_subst_pu: "Back-substitution" processing unit.
//
// Solves U x_i = v_i for every column v_i of L^-1 (i = 1..MT), starting from
// the last row, which yields the inverse A^-1 = [x_1 .. x_MT] column by column:
//   x_i[r] = (1/U[r][r]) * (v_i[r] - sum_{k>r} U[r][k] x_i[k]) .
// The pivot reciprocals come from the LU PU, so this PU needs only
// multipliers and adders. Cycle c = 0..15 computes row r = 3 - c/4 of column
// i = c%4 (up to four complex multiplications in one cycle); all of A^-1 is
// in registers after cycle 15. The schedule is this design's own. Data memory
// is loaded in the exchange cycle (xchg).
module back_subst_pu
  import mmse_pic_pkg::*;
(
  input  logic             clk,
  input  logic [CYCW-1:0]  cyc,
  input  logic             xchg,
  input  lu_out_t          din,
  output cmat_t            ainv     // ainv[row][col]
);

  lu_out_t mem;
  cmat_t   x_q;

  logic signed [31:0] r_c, i_c;   // small schedule indices
  cfx_t nxt;
  always_comb begin
    cfx_t s;
    r_c = MT - 1 - (int'(cyc) / MT) % MT;
    i_c = int'(cyc) % MT;
    s   = mem.linv[r_c][i_c];
    for (int k = 0; k < MT; k++)
      if (k > r_c) s = c_sub(s, c_mul(mem.u[r_c][k], x_q[k][i_c]));
    nxt = c_mul(s, mem.udinv[r_c]);
  end

  always_ff @(posedge clk) begin
    if (xchg) mem <= din;
    else if (int'(cyc) < MT * MT) x_q[r_c][i_c] <= nxt;
  end

  assign ainv = x_q;

endmodule
