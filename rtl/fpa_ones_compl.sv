// fpa_ones_compl: makes the close-path difference positive. When the exponents
// are equal and A < C, the adder's s0 = A + NOT(C) is the ones complement of
// C - A, so inverting it gives |A - C| without another carry chain. Otherwise
// the unit passes the selected adder output (base) through. Combinational.
// Only the variant without the mantissa comparator instantiates it.
module fpa_ones_compl #(
  parameter int unsigned NM = 53
) (
  input  logic [NM-1:0] s0,
  input  logic [NM-1:0] base,
  input  logic          neg,
  output logic [NM-1:0] mag
);
  assign mag = neg ? ~s0 : base;
endmodule
