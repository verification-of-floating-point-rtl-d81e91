// fpa_exp_select: picks the larger of the two exponents, which feeds the
// exponent adjust adder. Uses the Ex<Ey flag of the subtractor. Combinational.
module fpa_exp_select #(
  parameter int unsigned NE = 11
) (
  input  logic [NE-1:0] ex,
  input  logic [NE-1:0] ey,
  input  logic          x_lt_y,
  output logic [NE-1:0] el
);
  assign el = x_lt_y ? ey : ex;
endmodule
