// fpa_cvt_d2s: double- to single-precision conversion with rounding. A normal
// double is rebiased (-896); its 53-bit significand is cut to 24 bits with the
// next bit as guard and the OR of the remaining 28 bits as sticky, and rounded
// in the selected mode (0 nearest-even, 1 toward zero, 2 toward +inf,
// 3 toward -inf). An exponent beyond the single range raises overflow and gives
// infinity or the largest finite single, by mode. Results below the single
// normal range, and denormal doubles, become a signed zero with underflow, the
// same convention as the adder. NaNs stay NaNs, infinities and zeros keep
// their sign. Combinational. The overflow flag and rounding follow the
// document's description; the flush to zero and NaN handling are this design's.
module fpa_cvt_d2s
  import fpa_pkg::*;
(
  input  logic [63:0] d,
  input  rmode_e      rm,
  output logic [31:0] s,
  output logic        overflow,
  output logic        underflow
);
  logic        sg, g, st, rnd, to_inf;
  logic [10:0] e;
  logic [24:0] m;
  logic signed [12:0] es;
  always_comb begin
    sg  = d[63];
    e   = d[62:52];
    g   = d[28];
    st  = |d[27:0];
    rnd = round_up(rm, sg, d[29], g, st);
    m   = {1'b0, 1'b1, d[51:29]} + 25'(rnd);
    es  = 13'(e) - 13'sd896 + 13'(m[24]);
    unique case (rm)
      RM_RNE:  to_inf = 1'b1;
      RM_RTZ:  to_inf = 1'b0;
      RM_RUP:  to_inf = ~sg;
      default: to_inf = sg;
    endcase
    overflow  = 1'b0;
    underflow = 1'b0;
    if (e == 11'h7FF)
      s = (d[51:0] != '0) ? {sg, 8'hFF, 1'b1, d[50:29]} : {sg, 8'hFF, 23'b0};
    else if (e == 11'h000)
      s = {sg, 31'b0};
    else if (es >= 13'sd255) begin
      overflow = 1'b1;
      s = to_inf ? {sg, 8'hFF, 23'b0} : {sg, 8'hFE, {23{1'b1}}};
    end else if (es <= 13'sd0) begin
      underflow = 1'b1;
      s = {sg, 31'b0};
    end else
      s = {sg, es[7:0], m[24] ? m[23:1] : m[22:0]};
  end
endmodule
