// fpa_result_mux: final multiplexor. Selects the mantissa of the normalization
// case chosen by the path select from four candidates, each NM+1 bits so that
// a carry out of rounding shows in the top bit (rc). With rc it takes the
// mantissa one place lower and the exponent from the +1 output of the
// exponent adjust adder. It then packs sign, exponent and fraction and applies,
// in order of priority, the special-operand result, an exact zero, overflow
// (infinity or the largest finite number, by rounding mode) and underflow
// (flush to a signed zero, since results below the normal range are not
// produced). Combinational.
module fpa_result_mux
  import fpa_pkg::*;
#(
  parameter int unsigned NE = 11,
  parameter int unsigned NM = 53
) (
  input  norm_e            norm,
  input  logic [NM:0]      cand_r1,
  input  logic [NM:0]      cand_none,
  input  logic [NM:0]      cand_l1,
  input  logic [NM:0]      cand_close,
  input  logic             exact_zero,
  input  logic             sign,
  input  rmode_e           rm,
  input  logic [NE-1:0]    e0,
  input  logic [NE-1:0]    e1,
  input  logic             ovf0,
  input  logic             ovf1,
  input  logic             unf0,
  input  logic             unf1,
  input  logic             special,
  input  logic [NE+NM-1:0] special_z,
  input  logic             special_inv,
  output logic [NE+NM-1:0] z,
  output logic             invalid,
  output logic             overflow,
  output logic             underflow
);
  localparam int unsigned FW = NM - 1;
  logic [NM:0]   cand;
  logic [NM-1:0] mant;
  logic          rc, ovf, unf, to_inf;
  logic [NE-1:0] e;
  always_comb begin
    unique case (norm)
      NORM_R1:   cand = cand_r1;
      NORM_NONE: cand = cand_none;
      NORM_L1:   cand = cand_l1;
      default:   cand = cand_close;
    endcase
    rc   = cand[NM];
    mant = rc ? cand[NM:1] : cand[NM-1:0];
    e    = rc ? e1 : e0;
    ovf  = rc ? ovf1 : ovf0;
    unf  = rc ? unf1 : unf0;
    unique case (rm)
      RM_RNE:  to_inf = 1'b1;
      RM_RTZ:  to_inf = 1'b0;
      RM_RUP:  to_inf = ~sign;
      default: to_inf = sign;
    endcase
    invalid   = 1'b0;
    overflow  = 1'b0;
    underflow = 1'b0;
    if (special) begin
      z       = special_z;
      invalid = special_inv;
    end else if (exact_zero || !mant[NM-1]) begin
      z = {sign, {(NE+FW){1'b0}}};
    end else if (ovf) begin
      overflow = 1'b1;
      z = to_inf ? {sign, {NE{1'b1}}, {FW{1'b0}}}
                 : {sign, {(NE-1){1'b1}}, 1'b0, {FW{1'b1}}};
    end else if (unf) begin
      underflow = 1'b1;
      z = {sign, {(NE+FW){1'b0}}};
    end else begin
      z = {sign, e, mant[FW-1:0]};
    end
  end
endmodule
