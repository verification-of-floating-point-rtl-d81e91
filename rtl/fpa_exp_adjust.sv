// fpa_exp_adjust: exponent adjust adder. Adds the signed offset to the larger
// exponent and, in parallel, the same plus one for the case where rounding
// carries into a new leading bit. For both sums it flags overflow (exponent
// field all ones or more) and underflow (zero or below). Combinational.
module fpa_exp_adjust #(
  parameter int unsigned NE = 11,
  parameter int unsigned OW = 8
) (
  input  logic [NE-1:0] el,
  input  logic [OW-1:0] off,
  output logic [NE-1:0] e0,
  output logic [NE-1:0] e1,
  output logic          ovf0,
  output logic          ovf1,
  output logic          unf0,
  output logic          unf1
);
  localparam int unsigned XW = (NE > OW ? NE : OW) + 2;
  logic signed [XW-1:0] x0, x1;
  localparam logic signed [XW-1:0] EMAX = XW'((1 << NE) - 1);
  always_comb begin
    x0   = $signed({2'b00, el}) + XW'($signed(off));
    x1   = x0 + XW'(1);
    e0   = x0[NE-1:0];
    e1   = x1[NE-1:0];
    ovf0 = (x0 >= EMAX);
    ovf1 = (x1 >= EMAX);
    unf0 = (x0 <= 0);
    unf1 = (x1 <= 0);
  end
endmodule
