// fpa_result_mux_tb: random candidates, controls and exponents. The
// reference selects the candidate, renormalizes a rounding carry, and
// applies the priorities special > zero > overflow > underflow > normal,
// with the overflow value chosen by rounding mode and sign.
`include "tb_common.svh"
module fpa_result_mux_tb;
  import fpa_pkg::*;
  int checks = 0, failures = 0;
  norm_e norm;
  logic [53:0] c[4], sel;
  logic ez, sign, o0, o1, u0, u1, sp, spi, inv, ovf, unf, rc, eovf, eunf, toinf;
  rmode_e rm;
  logic [10:0] e0, e1;
  logic [63:0] spz, z, want;
  logic [52:0] m;
  fpa_result_mux dut (.norm, .cand_r1(c[0]), .cand_none(c[1]), .cand_l1(c[2]), .cand_close(c[3]),
    .exact_zero(ez), .sign, .rm, .e0, .e1, .ovf0(o0), .ovf1(o1), .unf0(u0), .unf1(u1),
    .special(sp), .special_z(spz), .special_inv(spi), .z, .invalid(inv), .overflow(ovf), .underflow(unf));
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 20000; i++) begin
      for (int k = 0; k < 4; k++) begin
        c[k] = {1'b0, 1'b1, 20'($urandom), 32'($urandom)};
        if ($urandom % 4 == 0) c[k] = {2'b10, 52'b0};
      end
      norm = norm_e'($urandom % 4); rm = rmode_e'($urandom % 4); sign = 1'($urandom);
      ez = ($urandom % 10 == 0); sp = ($urandom % 10 == 0); spi = 1'($urandom);
      spz = {32'($urandom), 32'($urandom)};
      e0 = 11'($urandom); e1 = e0 + 1;
      o0 = ($urandom % 8 == 0); o1 = o0 | ($urandom % 8 == 0);
      u0 = !o0 && ($urandom % 8 == 0); u1 = u0 && 1'($urandom);
      #1;
      sel  = c[int'(norm)];
      rc   = sel[53];
      m    = rc ? sel[53:1] : sel[52:0];
      eovf = rc ? o1 : o0;
      eunf = rc ? u1 : u0;
      toinf = (rm == RM_RNE) || (rm == RM_RUP && !sign) || (rm == RM_RDN && sign);
      if (sp) want = spz;
      else if (ez) want = {sign, 63'b0};
      else if (eovf) want = toinf ? {sign, 11'h7FF, 52'b0} : {sign, 11'h7FE, {52{1'b1}}};
      else if (eunf) want = {sign, 63'b0};
      else want = {sign, rc ? e1 : e0, m[51:0]};
      `TB_CHECK(z == want, "result")
      `TB_CHECK(inv == (sp && spi) && ovf == (!sp && !ez && eovf) && unf == (!sp && !ez && !eovf && eunf), "flags")
    end
    `TB_FINISH
  end
endmodule
