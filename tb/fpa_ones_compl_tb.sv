// fpa_ones_compl_tb: with equal exponents and A < C the output must be C - A
// computed from s0 = A + not(C); otherwise the base value passes through.
`include "tb_common.svh"
module fpa_ones_compl_tb;
  int checks = 0, failures = 0;
  logic [52:0] s0, base, mag, a, c;
  logic neg;
  fpa_ones_compl dut (.s0, .base, .neg, .mag);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 4000; i++) begin
      a = {1'b1, 20'($urandom), 32'($urandom)}; c = {1'b1, 20'($urandom), 32'($urandom)};
      s0 = a + ~c; base = a - c; neg = (a < c);
      #1;
      `TB_CHECK(mag == ((a < c) ? c - a : a - c), "magnitude")
    end
    `TB_FINISH
  end
endmodule
