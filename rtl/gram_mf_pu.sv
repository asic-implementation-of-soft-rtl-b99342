// gram_mf_pu: "Gram matrix & matched filter" processing unit (PU).
//
// Computes, once per received vector, the Gram matrix G = H^H H and the
// matched-filter output yMF = H^H y, on which all later PUs work instead of
// H and y. The a-priori LLRs, N0 and the modulation mode are passed on
// unchanged (feed-through).
//
// Like every PU it is time-shared over an exchange period of TS = 18 cycles:
// its data memory (flip-flops) is loaded from the detector input in the
// exchange cycle (xchg = 1, the last cycle of a period) and its results are
// taken over by the next PU at the following exchange. One arithmetic pass
// of four complex multiply-accumulates (16 real multipliers, as in the
// original PU) produces one output element per cycle:
//   cycles 0..9   the ten entries on and above the diagonal of G; the
//                 entries below follow by Hermitian symmetry,
//   cycles 10..13 the four entries of yMF.
// The element order is this design's own schedule. All results are in
// registers by cycle 13, well before the exchange at cycle 17.
module gram_mf_pu
  import mmse_pic_pkg::*;
(
  input  logic             clk,
  input  logic [CYCW-1:0]  cyc,    // position in the exchange period, 0..TS-1
  input  logic             xchg,   // exchange cycle: load new data at its end
  input  det_in_t          din,
  output gram_out_t        dout
);

  det_in_t mem;
  cmat_t   g_q;
  cvec_t   ymf_q;

  function automatic cfx_t h2fx(input hcplx_t v);
    cfx_t r;
    r.re = fx_t'(v.re) <<< (F - INF);
    r.im = fx_t'(v.im) <<< (F - INF);
    return r;
  endfunction

  function automatic cfx_t y2fx(input ycplx_t v);
    cfx_t r;
    r.re = fx_t'(v.re) <<< (F - INF);
    r.im = fx_t'(v.im) <<< (F - INF);
    return r;
  endfunction

  // row/column of the upper-triangle entry computed in cycle c (0..9)
  function automatic int tri_row(input int c);
    case (c)
      0, 1, 2, 3: return 0;
      4, 5, 6:    return 1;
      7, 8:       return 2;
      default:    return 3;
    endcase
  endfunction

  function automatic int tri_col(input int c);
    case (c)
      0: return 0;  1: return 1;  2: return 2;  3: return 3;
      4: return 1;  5: return 2;  6: return 3;
      7: return 2;  8: return 3;
      default: return 3;
    endcase
  endfunction

  // shared arithmetic: sum_k conj(a_k) * b_k over the four receive antennas
  cfx_t ca [MR];
  cfx_t cb [MR];
  cfx_t acc;
  logic signed [31:0] r_sel, c_sel;   // small schedule indices

  always_comb begin
    int c;
    c     = int'(cyc);
    r_sel = (c < 10) ? tri_row(c) : (c - 10) % MT;
    c_sel = tri_col(c);
    for (int k = 0; k < MR; k++) begin
      ca[k] = h2fx(mem.h[k][r_sel]);
      cb[k] = (c < 10) ? h2fx(mem.h[k][c_sel]) : y2fx(mem.y[k]);
    end
    acc = c_zero();
    for (int k = 0; k < MR; k++)
      acc = c_add(acc, c_cmul(ca[k], cb[k]));
  end

  always_ff @(posedge clk) begin
    if (xchg) begin
      mem <= din;
    end else if (int'(cyc) < 10) begin
      if (r_sel == c_sel) begin
        g_q[r_sel][c_sel].re <= acc.re;
        g_q[r_sel][c_sel].im <= '0;
      end else begin
        g_q[r_sel][c_sel] <= acc;
        g_q[c_sel][r_sel] <= c_conj(acc);
      end
    end else if (int'(cyc) < 10 + MT) begin
      ymf_q[r_sel] <= acc;
    end
  end

  always_comb begin
    dout.g    = g_q;
    dout.ymf  = ymf_q;
    dout.la   = mem.la;
    dout.n0   = fx_t'({1'b0, mem.n0});
    dout.mode = mem.mode;
  end

endmodule
