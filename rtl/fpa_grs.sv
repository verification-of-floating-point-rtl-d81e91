// fpa_grs: guard/round/sticky unit. From the bits of C that fell below A's lsb
// (grs_in) it forms the true low bits of the exact result. For a true
// subtraction these are the two's complement of grs_in, and the borrow decides
// whether the unrounded value is A+C' (s0) or A+C'+1 (s1); c_low says which.
// shift_in is the bit that enters at the lsb on a left shift by one. It also
// makes the round-up decision for each normalization case (right shift by one,
// no shift, left shift by one) in the selected rounding mode. Combinational.
// The unit's role follows the document; the directed-mode rules are IEEE's.
module fpa_grs
  import fpa_pkg::*;
#(
  parameter int unsigned NM = 53
) (
  input  logic          eff_sub,
  input  logic [2:0]    grs_in,
  input  rmode_e        rm,
  input  logic          sign,
  input  logic [NM+1:0] s0,
  input  logic [NM+1:0] s1,
  output logic          c_low,
  output logic [2:0]    low,
  output logic          shift_in,
  output logic [NM+1:0] base,
  output logic          rnd_r1,
  output logic          rnd_none,
  output logic          rnd_l1
);
  always_comb begin
    if (eff_sub) begin
      c_low = (grs_in == 3'b000);
      low   = 3'(-grs_in);
    end else begin
      c_low = 1'b0;
      low   = grs_in;
    end
    shift_in = low[2];
    base     = c_low ? s1 : s0;
    rnd_r1   = round_up(rm, sign, s0[1],   s0[0],  |low);
    rnd_none = round_up(rm, sign, base[0], low[2], low[1] | low[0]);
    rnd_l1   = round_up(rm, sign, low[2],  low[1], low[0]);
  end
endmodule
