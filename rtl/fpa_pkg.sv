// fpa_pkg: shared types and constants of the floating-point adder.
// The default format is IEEE double precision: NE=11 exponent bits and a
// mantissa of NM=53 bits counting the hidden bit (the document's n and m).
// Rounding-mode encoding and the normalization-case names are this design's own.
package fpa_pkg;
  // Rounding modes (all four IEEE modes).
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,  // round to nearest, ties to even
    RM_RTZ = 2'd1,  // toward zero
    RM_RUP = 2'd2,  // toward +infinity
    RM_RDN = 2'd3   // toward -infinity
  } rmode_e;

  // Which version of C the path select feeds to the mantissa adder.
  typedef enum logic [1:0] {
    CSEL_UNSH = 2'd0,  // exponent difference 0
    CSEL_SH1  = 2'd1,  // exponent difference 1
    CSEL_FAR  = 2'd2   // difference >= 2, from the right shifter
  } csel_e;

  // Normalization case chosen after the mantissa adder.
  typedef enum logic [1:0] {
    NORM_R1    = 2'd0,  // carry out of the true addition: right shift by 1
    NORM_NONE  = 2'd1,  // no shift
    NORM_L1    = 2'd2,  // far subtraction lost its leading bit: left shift by 1
    NORM_CLOSE = 2'd3   // close subtraction: massive left shift (LZA)
  } norm_e;

  // Round-up decision for the given mode from the lsb, guard and sticky.
  function automatic logic round_up(rmode_e rm, logic sign, logic lsb, logic g, logic st);
    unique case (rm)
      RM_RNE:  return g & (st | lsb);
      RM_RTZ:  return 1'b0;
      RM_RUP:  return ~sign & (g | st);
      default: return sign & (g | st);
    endcase
  endfunction
endpackage
