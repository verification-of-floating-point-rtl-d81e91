// fpa_path_select: the two decisions that steer the datapath.
// 1. From the exponent difference it picks the version of C (unshifted,
//    shifted by one, or from the right shifter).
// 2. After the adder it picks the normalization case: right shift by one when
//    a true addition carries out, no shift, left shift by one when a far
//    subtraction lost its leading bit, or the massive left shift of a close
//    subtraction (|Ex-Ey| <= 1) whose difference has a leading zero.
//    A true addition that does not carry out but whose rounded value A+C+1
//    does (A+C = 01.11..1 and rounding up) is classed as a right shift by one.
// Combinational. The two roles follow the document; the exact equations are
// this design's.
module fpa_path_select
  import fpa_pkg::*;
#(
  parameter int unsigned NE = 11
) (
  input  logic [NE-1:0] absd,
  input  logic          eff_sub,
  input  logic          s0_carry,   // s0[NM]: carry out of A + C'
  input  logic          s1_carry,   // s1[NM]
  input  logic          base_msb,   // base[NM-1]
  input  logic          rnd_none,
  output csel_e         csel,
  output norm_e         norm
);
  always_comb begin
    if (absd == '0)                 csel = CSEL_UNSH;
    else if (absd == NE'(1))        csel = CSEL_SH1;
    else                            csel = CSEL_FAR;

    if (!eff_sub) begin
      if (s0_carry || (rnd_none && s1_carry)) norm = NORM_R1;
      else                                    norm = NORM_NONE;
    end else if (csel == CSEL_UNSH)           norm = NORM_CLOSE;
    else if (base_msb)                        norm = NORM_NONE;
    else if (csel == CSEL_SH1)                norm = NORM_CLOSE;
    else                                      norm = NORM_L1;
  end
endmodule
