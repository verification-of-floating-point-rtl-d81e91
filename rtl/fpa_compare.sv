// fpa_compare: swap control of the adder variant with a mantissa comparator.
// d = (Mx < My), e = (Ex = Ey), g = (Ex < Ey), f = d AND e, h = f OR g.
// When h is 1 the mantissas are swapped so that A >= C whenever the exponents
// are equal, which makes the ones complementer unnecessary. Combinational.
// The gate structure and signal names follow the document's figure.
module fpa_compare #(
  parameter int unsigned NM = 53
) (
  input  logic [NM-1:0] mx,
  input  logic [NM-1:0] my,
  input  logic          x_eq_y,
  input  logic          x_lt_y,
  output logic          h
);
  logic d, e, f, g;
  always_comb begin
    d = (mx < my);
    e = x_eq_y;
    g = x_lt_y;
    f = d & e;
    h = f | g;
  end
endmodule
