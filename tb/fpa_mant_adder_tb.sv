// fpa_mant_adder_tb: random mantissas; for addition s0/s1/s2 must be A+C,
// A+C+1, A+C+2, for subtraction s1 mod 2^53 must be A-C mod 2^53 and s0, s2
// one below and above it.
`include "tb_common.svh"
module fpa_mant_adder_tb;
  int checks = 0, failures = 0;
  logic [52:0] a, c;
  logic sub;
  logic [54:0] s0, s1, s2;
  longint unsigned ua, uc;
  fpa_mant_adder dut (.a, .c, .eff_sub(sub), .s0, .s1, .s2);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = {1'b1, 20'($urandom), 32'($urandom)}; c = {21'($urandom), 32'($urandom)};
      if (i % 5 == 0) c = a;
      if (i % 7 == 0) begin a = '1; c = '1; end
      sub = 1'($urandom); ua = a; uc = c;
      #1;
      if (!sub) begin
        `TB_CHECK(s0 == 55'(ua + uc) && s1 == 55'(ua + uc + 1) && s2 == 55'(ua + uc + 2), "add")
      end else begin
        `TB_CHECK(s1[52:0] == 53'(ua - uc), "sub")
        `TB_CHECK(s0[52:0] == 53'(ua - uc - 1) && s2[52:0] == 53'(ua - uc + 1), "sub neighbours")
        `TB_CHECK(s1[53] == (ua >= uc) || (ua == uc), "borrow")
      end
    end
    `TB_FINISH
  end
endmodule
