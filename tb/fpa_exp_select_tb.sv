// fpa_exp_select_tb: the selected exponent must be the larger one.
`include "tb_common.svh"
module fpa_exp_select_tb;
  int checks = 0, failures = 0;
  logic [10:0] ex, ey, el;
  logic lt;
  fpa_exp_select dut (.ex, .ey, .x_lt_y(lt), .el);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 3000; i++) begin
      ex = 11'($urandom); ey = (i % 3 == 0) ? ex : 11'($urandom); lt = ex < ey;
      #1;
      `TB_CHECK(el == ((ex > ey) ? ex : ey), "max")
    end
    `TB_FINISH
  end
endmodule
