// fpa_sign_select: sign of the result. It is the sign of the operand whose
// mantissa went to A (Y's sign is the effective one, inverted for X - Y),
// flipped when the ones-complement path found A < C. An exact zero from a true
// subtraction is +0, or -0 when rounding toward -infinity (IEEE rule, assumed
// by this design). Combinational.
module fpa_sign_select
  import fpa_pkg::*;
(
  input  logic   sx,
  input  logic   sy,
  input  logic   swap,
  input  logic   neg,
  input  logic   eff_sub,
  input  logic   exact_zero,
  input  rmode_e rm,
  output logic   sign
);
  always_comb begin
    if (eff_sub && exact_zero) sign = (rm == RM_RDN);
    else                       sign = (swap ? sy : sx) ^ neg;
  end
endmodule
