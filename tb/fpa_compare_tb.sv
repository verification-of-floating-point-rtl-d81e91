// fpa_compare_tb: the swap signal must be 1 exactly when operand Y has the
// larger magnitude, judged on {exponent, mantissa} as one number.
`include "tb_common.svh"
module fpa_compare_tb;
  int checks = 0, failures = 0;
  logic [52:0] mx, my;
  logic [10:0] ex, ey;
  logic eq, lt, h;
  fpa_compare dut (.mx, .my, .x_eq_y(eq), .x_lt_y(lt), .h);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 5000; i++) begin
      mx = {1'b1, 20'($urandom), 32'($urandom)};
      my = (i % 3 == 0) ? mx ^ (53'(1) << ($urandom % 52)) : {1'b1, 20'($urandom), 32'($urandom)};
      ex = 11'($urandom % 8); ey = 11'($urandom % 8);
      eq = (ex == ey); lt = (ex < ey);
      #1;
      `TB_CHECK(h == ({ex, mx} < {ey, my}), "swap")
    end
    `TB_FINISH
  end
endmodule
