// fpa_ref_pkg: reference model for the double-precision adder testbenches.
// It computes the sum with wide integers, independently of the RTL structure:
// both significands are placed at a common exponent with 64 extra low bits
// (bits shifted out beyond that collapse into a sticky 1 at bit 0), added as
// signed 128-bit numbers, normalized and rounded in the requested mode.
// Behaviour matches the adder's conventions: denormal operands read as zero,
// results below the normal range flushed to a signed zero with underflow,
// overflow to infinity or the largest finite number by rounding mode, and the
// NaN / infinity cases of IEEE addition with a canonical quiet NaN.
package fpa_ref_pkg;
  typedef struct packed {
    logic [63:0] z;
    logic        inv, ovf, unf;
    logic        rc;          // rounding carried into a new leading bit
    logic [11:0] eshift;      // result exponent minus larger exponent (before rc)
    logic        ezero;       // exact zero from cancellation
  } ref_t;

  localparam logic [63:0] QNAN = 64'h7FF8_0000_0000_0000;

  function automatic logic rup(logic [1:0] rm, logic sign, logic lsb, logic g, logic st);
    case (rm)
      2'd0:    return g & (st | lsb);
      2'd1:    return 1'b0;
      2'd2:    return ~sign & (g | st);
      default: return sign & (g | st);
    endcase
  endfunction

  function automatic ref_t ref_add(logic [63:0] x, logic [63:0] y, logic sub, logic [1:0] rm);
    ref_t r;
    logic sx, sy, xn, yn, xi, yi, sign, g, st;
    logic [10:0] ex, ey;
    logic [52:0] mx, my;
    logic signed [129:0] X, Y, S;
    logic [129:0] mag, mant, rem;
    int e, er, p, dX, dY;
    r = '0;
    sx = x[63]; sy = y[63] ^ sub;
    ex = x[62:52]; ey = y[62:52];
    xn = (ex == 11'h7FF) && (x[51:0] != 0);
    yn = (ey == 11'h7FF) && (y[51:0] != 0);
    xi = (ex == 11'h7FF) && (x[51:0] == 0);
    yi = (ey == 11'h7FF) && (y[51:0] == 0);
    if (xn || yn) begin r.z = QNAN; return r; end
    if (xi && yi && sx != sy) begin r.z = QNAN; r.inv = 1; return r; end
    if (xi) begin r.z = x; return r; end
    if (yi) begin r.z = {sy, y[62:0]}; return r; end
    mx = (ex != 0) ? {1'b1, x[51:0]} : '0;
    my = (ey != 0) ? {1'b1, y[51:0]} : '0;
    if (mx == 0 && my == 0) begin
      r.z = {(sx == sy) ? sx : (rm == 2'd3), 63'b0};
      r.ezero = (sx != sy);
      return r;
    end
    e  = (ex > ey) ? int'(ex) : int'(ey);
    dX = e - int'(ex); dY = e - int'(ey);
    X = 130'(mx) << 64; Y = 130'(my) << 64;
    if (dX > 0) X = (dX >= 120) ? ((mx != 0) ? 130'(1) : 130'(0)) : ((X >> dX) | 130'(((X & ((130'(1) << dX) - 1)) != 0)));
    if (dY > 0) Y = (dY >= 120) ? ((my != 0) ? 130'(1) : 130'(0)) : ((Y >> dY) | 130'(((Y & ((130'(1) << dY) - 1)) != 0)));
    S = (sx ? -X : X) + (sy ? -Y : Y);
    if (S == 0) begin
      r.z = {(rm == 2'd3), 63'b0};
      r.ezero = 1;
      return r;
    end
    sign = S < 0;
    mag  = sign ? 130'(-S) : 130'(S);
    p = 0;
    for (int i = 0; i < 130; i++) if (mag[i]) p = i;
    er = e + (p - 116);
    r.eshift = 12'(p - 116);
    if (p >= 53) begin
      mant = mag >> (p - 52);
      rem  = mag & ((130'(1) << (p - 52)) - 1);
      g    = rem[p-53];
      st   = (rem & ((130'(1) << (p - 53)) - 1)) != 0;
    end else begin
      mant = mag << (52 - p);
      g = 0; st = 0;
    end
    if (rup(rm, sign, mant[0], g, st)) mant = mant + 1;
    if (mant[53]) begin mant = mant >> 1; er = er + 1; r.rc = 1; end
    if (er >= 2047) begin
      r.ovf = 1;
      if (rm == 2'd0 || (rm == 2'd2 && !sign) || (rm == 2'd3 && sign)) r.z = {sign, 11'h7FF, 52'b0};
      else r.z = {sign, 11'h7FE, {52{1'b1}}};
    end else if (er <= 0) begin
      r.unf = 1;
      r.z = {sign, 63'b0};
    end else begin
      r.z = {sign, 11'(er), mant[51:0]};
    end
    return r;
  endfunction
endpackage
