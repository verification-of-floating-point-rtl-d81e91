// fpa_exp_adjust_tb: random exponents and offsets from -56 to +1, including
// the ends of the range; sums and overflow/underflow flags against integers.
`include "tb_common.svh"
module fpa_exp_adjust_tb;
  int checks = 0, failures = 0;
  logic [10:0] el, e0, e1;
  logic [7:0] off;
  logic o0, o1, u0, u1;
  int eo, x0;
  fpa_exp_adjust dut (.el, .off, .e0, .e1, .ovf0(o0), .ovf1(o1), .unf0(u0), .unf1(u1));
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 10000; i++) begin
      el = (i % 3 == 0) ? 11'(2044 + $urandom % 4) : (i % 3 == 1) ? 11'($urandom % 60) : 11'($urandom);
      eo = int'($urandom % 58) - 56;
      off = 8'(eo);
      #1;
      x0 = int'(el) + eo;
      `TB_CHECK(e0 == 11'(x0) && e1 == 11'(x0 + 1), "sum")
      `TB_CHECK(o0 == (x0 >= 2047) && o1 == (x0 + 1 >= 2047), "overflow")
      `TB_CHECK(u0 == (x0 <= 0) && u1 == (x0 + 1 <= 0), "underflow")
    end
    `TB_FINISH
  end
endmodule
