// fpa_swap: routes the mantissa of the operand with the larger exponent to the
// adder's A input and the other one to the alignment shifter. Combinational.
module fpa_swap #(
  parameter int unsigned NM = 53
) (
  input  logic [NM-1:0] mx,
  input  logic [NM-1:0] my,
  input  logic          swap,
  output logic [NM-1:0] a,
  output logic [NM-1:0] b
);
  assign a = swap ? my : mx;
  assign b = swap ? mx : my;
endmodule
