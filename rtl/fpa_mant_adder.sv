// fpa_mant_adder: the mantissa adder. For a true subtraction C is first
// complemented (ones complement), so s0 = A + C' is A - C - 1 modulo 2^NM and
// s1 = A + C' + 1 is the two's-complement difference. The adder delivers
// A+C', A+C'+1 and A+C'+2 at once so that rounding after a possible right
// shift by one is a selection, not a second addition. Outputs are NM+2 bits
// wide. Combinational.
module fpa_mant_adder #(
  parameter int unsigned NM = 53
) (
  input  logic [NM-1:0] a,
  input  logic [NM-1:0] c,
  input  logic          eff_sub,
  output logic [NM+1:0] s0,
  output logic [NM+1:0] s1,
  output logic [NM+1:0] s2
);
  logic [NM-1:0] cop;
  always_comb begin
    cop = eff_sub ? ~c : c;
    s0  = (NM+2)'(a) + (NM+2)'(cop);
    s1  = s0 + (NM+2)'(1);
    s2  = s0 + (NM+2)'(2);
  end
endmodule
