// fpa_exp_sub: exponent subtractor. Computes diff = Ex - Ey as an (NE+1)-bit
// two's-complement number and the two flags the rest of the adder uses,
// Ex < Ey (the sign of the difference) and Ex = Ey. Purely combinational.
// The subtractor and the Ex<Ey output follow the document; producing Ex=Ey
// here as well is this design's choice.
module fpa_exp_sub #(
  parameter int unsigned NE = 11
) (
  input  logic [NE-1:0] ex,
  input  logic [NE-1:0] ey,
  output logic [NE:0]   diff,
  output logic          x_lt_y,
  output logic          x_eq_y
);
  always_comb begin
    diff   = {1'b0, ex} - {1'b0, ey};
    x_lt_y = diff[NE];
    x_eq_y = (diff == '0);
  end
endmodule
