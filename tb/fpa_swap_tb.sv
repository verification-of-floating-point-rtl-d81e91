// fpa_swap_tb: A and B must be the right operands for both swap values.
`include "tb_common.svh"
module fpa_swap_tb;
  int checks = 0, failures = 0;
  logic [52:0] mx, my, a, b;
  logic swap;
  fpa_swap dut (.mx, .my, .swap, .a, .b);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 2000; i++) begin
      mx = {21'($urandom), 32'($urandom)}; my = {21'($urandom), 32'($urandom)}; swap = 1'($urandom);
      #1;
      `TB_CHECK(a == (swap ? my : mx) && b == (swap ? mx : my), "swap")
      `TB_CHECK(a != b || mx == my, "distinct")
    end
    `TB_FINISH
  end
endmodule
