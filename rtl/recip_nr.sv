// recip_nr: pipelined Newton-Raphson reciprocal unit.
//
// Computes 1/x for a positive internal fixed-point word x (mmse_pic_pkg::fx_t,
// F fraction bits). The input is first normalised by a shift so that the
// mantissa xt = x * 2^-e lies in [0.5, 1). An 8-bit look-up table addressed by
// the eight mantissa bits below the leading one gives a first guess x0 of
// 1/xt (the reciprocal of the interval midpoint). One Newton-Raphson step
// x1 = 2*x0 - x0^2 * xt then gives about 17 correct bits. The result is
// returned as a mantissa and a shift: 1/x = (mant / 2^16) * 2^-e. Applying
// the shift is left to the unit that uses the result, as an arithmetic
// shifter there.
//
// Structure and timing follow the pipelined variant of the original design:
// register after the table (xt, x0), register after the squarer (xt, x0^2,
// x0), then multiplier, doubler and subtractor without a register. An input
// applied in cycle c gives its result combinationally in cycle c+2; a new
// input may be applied every cycle. The exponent e is carried alongside the
// data through both registers (this design's choice; the shift path is drawn
// without registers in the original block diagram). Inputs <= 0 are treated
// as the smallest positive value.
module recip_nr
  import mmse_pic_pkg::*;
#(
  parameter int LUT_BITS = 8,    // table address bits
  parameter int MF       = 16    // mantissa fraction bits
) (
  input  logic                  clk,
  input  fx_t                   x,
  output logic [MF+1:0]         mant,   // 1/xt in (1, 2], MF fraction bits
  output logic signed [6:0]     e       // 1/x = mant * 2^-MF * 2^-e
);

  localparam int LUTN = 1 << LUT_BITS;
  typedef logic [MF+1:0] lut_t [LUTN];

  // x0 for table entry i = 1 / (midpoint of [0.5 + i/2^(L+1), 0.5 + (i+1)/2^(L+1)))
  function automatic lut_t init_lut();
    lut_t t;
    longint mid;
    for (int i = 0; i < LUTN; i++) begin
      mid  = (longint'(1) << (MF - 1)) + (longint'(i) << (MF - 1 - LUT_BITS))
           + (longint'(1) << (MF - 2 - LUT_BITS));
      t[i] = (MF + 2)'(((longint'(1) << (2 * MF)) + mid / 2) / mid);
    end
    return t;
  endfunction

  localparam lut_t LUT = init_lut();

  // ---- normalising shift ----
  logic [MF-1:0]      xt_c;
  logic signed [6:0]  e_c;
  always_comb begin
    logic [W-1:0] xp;
    int p;
    xp = (x > 0) ? W'(x) : W'(1);
    p  = 0;
    for (int i = 0; i < W; i++)
      if (xp[i]) p = i;
    if (p >= MF - 1) xt_c = MF'(xp >> (p - (MF - 1)));
    else             xt_c = MF'(xp << ((MF - 1) - p));
    e_c = 7'(p + 1 - F);
  end

  // ---- stage 1: table ----
  logic [MF-1:0]      xt1;
  logic [MF+1:0]      x01;
  logic signed [6:0]  e1;
  always_ff @(posedge clk) begin
    xt1 <= xt_c;
    x01 <= LUT[xt_c[MF-2 -: LUT_BITS]];
    e1  <= e_c;
  end

  // ---- stage 2: squarer ----
  logic [MF-1:0]      xt2;
  logic [MF+3:0]      x0sq2;
  logic [MF+1:0]      x02;
  logic signed [6:0]  e2;
  always_ff @(posedge clk) begin
    xt2   <= xt1;
    x0sq2 <= (MF + 4)'((2 * MF + 4)'(x01) * (2 * MF + 4)'(x01) >> MF);
    x02   <= x01;
    e2    <= e1;
  end

  // ---- output: x1 = 2*x0 - x0^2 * xt ----
  always_comb begin
    logic [2*MF+3:0] prod;
    logic [MF+3:0]   x1;
    prod = (2 * MF + 4)'(x0sq2) * (2 * MF + 4)'(xt2);
    x1   = (MF + 4)'({x02, 1'b0}) - (MF + 4)'(prod >> MF);
    mant = x1[MF+1:0];
    e    = e2;
  end

endmodule
