// mmse_pic_pkg: types, sizes and fixed-point helpers shared by every block
// of the four-stream soft-input soft-output MMSE parallel-interference-
// cancellation (PIC) detector.
//
// Numbers: every internal real value is a signed two's-complement word of
// W = 28 bits with F = 16 fraction bits (range about +-2048, step 2^-16).
// 28 bits is the widest word of the original chip; using one format for all
// internal values is this design's own simplification. Complex values are
// packed {re, im} pairs. Products are rounded toward minus infinity (arith.
// shift) and saturated to the word range.
//
// Input formats: channel matrix H entries 14 bit (Q2.11) and received vector
// y 16 bit (Q4.11) per real/imaginary part, a-priori LLRs 5 bit and output
// LLRs 6 bit (both with an LSB of 0.5), noise variance N0 as unsigned Q0.16.
// The bit counts follow the chip; the placement of the binary point is this
// design's own choice.
//
// Constellations are IEEE 802.11n Gray-mapped BPSK/QPSK/16-QAM/64-QAM with
// unit average symbol energy (Es = 1). Per real dimension with m bits the
// points are Kmod*(2k - 2^m + 1), k = 0..2^m-1, carrying the label gray(k)
// = k ^ (k >> 1) with the first LLR bit as MSB. LLR slot b of a stream holds
// bits b = 0..m-1 of the in-phase and b = m..2m-1 of the quadrature part.
package mmse_pic_pkg;

  // ---- system sizes ----
  localparam int MT   = 4;   // spatial streams (transmit antennas)
  localparam int MR   = 4;   // receive antennas
  localparam int QMAX = 6;   // bits per symbol, 64-QAM
  localparam int TS   = 18;  // clock cycles per exchange period
  localparam int NSTAGE = 6; // pipeline periods from input to output
  localparam int CYCW = 5;   // width of the exchange-cycle counter

  // ---- word formats ----
  localparam int W  = 28;    // internal word
  localparam int F  = 16;    // internal fraction bits
  localparam int HW = 14;    // H entry width, 11 fraction bits
  localparam int YW = 16;    // y entry width, 11 fraction bits
  localparam int INF = 11;   // fraction bits of H and y
  localparam int LAW = 5;    // a-priori LLR width, LSB 0.5
  localparam int LEW = 6;    // extrinsic LLR width, LSB 0.5
  localparam int N0W = 16;   // N0 width, unsigned Q0.16

  typedef logic signed [W-1:0] fx_t;
  typedef struct packed { fx_t re; fx_t im; } cfx_t;
  typedef cfx_t [MT-1:0]          cvec_t;   // vector over streams
  typedef cfx_t [MT-1:0][MT-1:0]  cmat_t;   // [row][col]
  typedef fx_t  [MT-1:0]          rvec_t;

  typedef logic signed [HW-1:0] hw_t;
  typedef logic signed [YW-1:0] yw_t;
  typedef struct packed { hw_t re; hw_t im; } hcplx_t;
  typedef struct packed { yw_t re; yw_t im; } ycplx_t;
  typedef logic signed [LAW-1:0] la_t;
  typedef logic signed [LEW-1:0] le_t;
  typedef la_t [MT-1:0][QMAX-1:0] la_arr_t;
  typedef le_t [MT-1:0][QMAX-1:0] le_arr_t;

  typedef enum logic [1:0] {
    MOD_BPSK  = 2'd0,
    MOD_QPSK  = 2'd1,
    MOD_QAM16 = 2'd2,
    MOD_QAM64 = 2'd3
  } mod_e;

  // ---- data handed from one processing unit (PU) to the next ----
  typedef struct packed {
    hcplx_t [MR-1:0][MT-1:0] h;    // H[receive][stream]
    ycplx_t [MR-1:0]         y;
    la_arr_t                 la;
    logic [N0W-1:0]          n0;
    mod_e                    mode;
  } det_in_t;

  typedef struct packed {          // Gram & matched filter -> soft symbols
    cmat_t          g;
    cvec_t          ymf;
    la_arr_t        la;
    fx_t            n0;
    mod_e           mode;
  } gram_out_t;

  typedef struct packed {          // soft symbols -> PIC 1 and LU
    cvec_t          shat;
    rvec_t          e;
    cmat_t          g;
    cvec_t          ymf;
    cmat_t          a;
    mod_e           mode;
  } soft_out_t;

  typedef struct packed {          // PIC 1 -> PIC 2
    cvec_t          t;
    cvec_t          shat;
    rvec_t          e;
    cmat_t          g;
    mod_e           mode;
  } pic1_out_t;

  typedef struct packed {          // PIC 2 -> MMSE
    cmat_t          yhat;          // yhat[stream i][row]
    cmat_t          g;
    rvec_t          e;
    mod_e           mode;
  } pic2_out_t;

  typedef struct packed {          // LU & forward subst. -> back subst.
    cmat_t          linv;          // L^-1, unit lower triangular
    cmat_t          u;             // U, upper triangular
    cvec_t          udinv;         // 1 / U[k][k]
  } lu_out_t;

  typedef struct packed {          // MMSE & SINR -> LLR
    cvec_t          z;
    rvec_t          rho;
    mod_e           mode;
  } mmse_out_t;

  localparam fx_t FX_MAX = {1'b0, {(W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(W-1){1'b0}}};
  localparam fx_t FX_ONE = fx_t'(1) <<< F;

  // ---- fixed-point helpers ----
  function automatic fx_t fx_sat(input logic signed [2*W-1:0] v);
    if (v > $signed({{W{1'b0}}, FX_MAX})) return FX_MAX;
    if (v < $signed({{W{1'b1}}, FX_MIN})) return FX_MIN;
    return fx_t'(v);
  endfunction

  function automatic fx_t fx_add(input fx_t a, input fx_t b);
    logic signed [2*W-1:0] ea, eb;
    ea = {{W{a[W-1]}}, a}; eb = {{W{b[W-1]}}, b};
    return fx_sat(ea + eb);
  endfunction

  function automatic fx_t fx_sub(input fx_t a, input fx_t b);
    logic signed [2*W-1:0] ea, eb;
    ea = {{W{a[W-1]}}, a}; eb = {{W{b[W-1]}}, b};
    return fx_sat(ea - eb);
  endfunction

  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*W-1:0] p;
    p = a * b;
    return fx_sat(p >>> F);
  endfunction

  // multiply by 2^sh (sh may be negative)
  function automatic fx_t fx_shift(input fx_t a, input int sh);
    logic signed [2*W-1:0] e;
    e = {{W{a[W-1]}}, a};
    if (sh >= W - 1) return fx_sat(e <<< (W - 1));
    if (sh >= 0) return fx_sat(e <<< sh);
    if (sh <= -W) return fx_sat(e >>> W);
    return fx_sat(e >>> (-sh));
  endfunction

  function automatic cfx_t c_add(input cfx_t a, input cfx_t b);
    cfx_t r;
    r.re = fx_add(a.re, b.re);
    r.im = fx_add(a.im, b.im);
    return r;
  endfunction

  function automatic cfx_t c_sub(input cfx_t a, input cfx_t b);
    cfx_t r;
    r.re = fx_sub(a.re, b.re);
    r.im = fx_sub(a.im, b.im);
    return r;
  endfunction

  function automatic cfx_t c_mul(input cfx_t a, input cfx_t b);
    cfx_t r;
    logic signed [2*W-1:0] pr, pi;
    pr = a.re * b.re - a.im * b.im;
    pi = a.re * b.im + a.im * b.re;
    r.re = fx_sat(pr >>> F);
    r.im = fx_sat(pi >>> F);
    return r;
  endfunction

  // conj(a) * b
  function automatic cfx_t c_cmul(input cfx_t a, input cfx_t b);
    cfx_t r;
    logic signed [2*W-1:0] pr, pi;
    pr = a.re * b.re + a.im * b.im;
    pi = a.re * b.im - a.im * b.re;
    r.re = fx_sat(pr >>> F);
    r.im = fx_sat(pi >>> F);
    return r;
  endfunction

  function automatic cfx_t c_scale(input cfx_t a, input fx_t s);
    cfx_t r;
    r.re = fx_mul(a.re, s);
    r.im = fx_mul(a.im, s);
    return r;
  endfunction

  function automatic cfx_t c_shift(input cfx_t a, input int sh);
    cfx_t r;
    r.re = fx_shift(a.re, sh);
    r.im = fx_shift(a.im, sh);
    return r;
  endfunction

  function automatic cfx_t c_conj(input cfx_t a);
    cfx_t r;
    r.re = a.re;
    r.im = fx_sub('0, a.im);
    return r;
  endfunction

  function automatic cfx_t c_zero();
    cfx_t r;
    r.re = '0;
    r.im = '0;
    return r;
  endfunction

  // |a|^2
  function automatic fx_t c_abs2(input cfx_t a);
    logic signed [2*W-1:0] p;
    p = a.re * a.re + a.im * a.im;
    return fx_sat(p >>> F);
  endfunction

  // bits per real dimension and squared normalisation Kmod^2 of a mode
  function automatic int bits_per_dim(input mod_e m);
    case (m)
      MOD_BPSK:  return 1;
      MOD_QPSK:  return 1;
      MOD_QAM16: return 2;
      default:   return 3;
    endcase
  endfunction

  function automatic int bits_per_sym(input mod_e m);
    case (m)
      MOD_BPSK:  return 1;
      MOD_QPSK:  return 2;
      MOD_QAM16: return 4;
      default:   return 6;
    endcase
  endfunction

  // Kmod = 1, 1/sqrt(2), 1/sqrt(10), 1/sqrt(42) rounded to F fraction bits
  function automatic fx_t kmod(input mod_e m);
    case (m)
      MOD_BPSK:  return fx_t'(65536);
      MOD_QPSK:  return fx_t'(46341);
      MOD_QAM16: return fx_t'(20724);
      default:   return fx_t'(10112);
    endcase
  endfunction

  function automatic fx_t kmod_inv(input mod_e m);
    case (m)
      MOD_BPSK:  return fx_t'(65536);
      MOD_QPSK:  return fx_t'(92682);
      MOD_QAM16: return fx_t'(207243);
      default:   return fx_t'(424722);
    endcase
  endfunction

  function automatic fx_t kmod2(input mod_e m);
    case (m)
      MOD_BPSK:  return fx_t'(65536);
      MOD_QPSK:  return fx_t'(32768);
      MOD_QAM16: return fx_t'(6554);
      default:   return fx_t'(1560);
    endcase
  endfunction

endpackage
