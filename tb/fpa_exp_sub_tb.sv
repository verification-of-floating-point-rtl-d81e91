// fpa_exp_sub_tb: random and corner exponent pairs; the difference and the
// two flags are compared with integer arithmetic.
`include "tb_common.svh"
module fpa_exp_sub_tb;
  int checks = 0, failures = 0;
  logic [10:0] ex, ey;
  logic [11:0] diff;
  logic lt, eq;
  fpa_exp_sub dut (.ex, .ey, .diff, .x_lt_y(lt), .x_eq_y(eq));
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 5000; i++) begin
      ex = 11'($urandom); ey = (i % 4 == 0) ? ex : (i % 4 == 1) ? ex + 11'($urandom % 3) : 11'($urandom);
      #1;
      `TB_CHECK($signed(diff) == int'(ex) - int'(ey), "diff")
      `TB_CHECK(lt == (ex < ey), "lt")
      `TB_CHECK(eq == (ex == ey), "eq")
    end
    `TB_FINISH
  end
endmodule
