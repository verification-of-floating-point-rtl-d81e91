// fpa_cvt_s2d: single- to double-precision conversion. Every single-precision
// value is exactly representable in double precision, so no rounding is
// needed: the exponent is rebiased (+896), the fraction is extended with zeros,
// and a denormal single is normalized with a leading-zero count. Zeros,
// infinities and NaNs keep their sign; a NaN keeps its payload in the upper
// fraction bits. Combinational. The exact-conversion requirement follows the
// document; the treatment of denormals and NaN payloads is this design's.
module fpa_cvt_s2d (
  input  logic [31:0] s,
  output logic [63:0] d
);
  logic [7:0]  e;
  logic [22:0] f, fn;
  logic [4:0]  lz;
  always_comb begin
    e  = s[30:23];
    f  = s[22:0];
    lz = '0;
    for (int i = 0; i < 23; i++)
      if (f[i]) lz = 5'(22 - i);
    fn = f << (lz + 5'd1);   // drops the leading one of a denormal fraction
    if (e == 8'hFF)
      d = {s[31], 11'h7FF, f, 29'b0};
    else if (e != 8'h00)
      d = {s[31], 11'(e) + 11'd896, f, 29'b0};
    else if (f == '0)
      d = {s[31], 63'b0};
    else
      d = {s[31], 11'd896 - 11'(lz), fn, 29'b0};
  end
endmodule
