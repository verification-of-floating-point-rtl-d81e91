// fpa_sign_select_tb: all input combinations against the rule: sign of the
// operand routed to A, inverted for a negative difference, and +0 (or -0
// toward -infinity) for an exact zero from a subtraction.
`include "tb_common.svh"
module fpa_sign_select_tb;
  import fpa_pkg::*;
  int checks = 0, failures = 0;
  logic sx, sy, swap, neg, sub, ez, sign, want;
  rmode_e rm;
  fpa_sign_select dut (.sx, .sy, .swap, .neg, .eff_sub(sub), .exact_zero(ez), .rm, .sign);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 256; i++) begin
      {sx, sy, swap, neg, ez} = 5'(i); rm = rmode_e'(i >> 5 & 3);
      sub = sx ^ sy;
      neg = neg & sub;   // a negative difference exists only for a subtraction
      #1;
      if (sub && ez) want = (rm == RM_RDN);
      else if (!sub) want = sx;
      else want = swap ? (neg ? sx : sy) : (neg ? sy : sx);
      `TB_CHECK(sign == want, "sign")
    end
    `TB_FINISH
  end
endmodule
