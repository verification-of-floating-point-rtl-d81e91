// fpa_lza_tb: random 54-bit operand pairs, many of them nearly equal and in
// both orders. The leading zeros predicted from the indicator string must
// equal the true count of |a - c| or be one less.
`include "tb_common.svh"
module fpa_lza_tb;
  int checks = 0, failures = 0;
  logic [53:0] a, c, f, d;
  int lz, plz;
  fpa_lza dut (.a, .c, .f);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = {22'($urandom), 32'($urandom)};
      c = (i % 2) ? a ^ {22'($urandom), 32'($urandom)} >> ($urandom % 54) : {22'($urandom), 32'($urandom)};
      if (i % 3 == 0) c = a - 54'($urandom % 16);
      if (a == c) continue;
      #1;
      d = (a > c) ? a - c : c - a;
      lz = 54; plz = 54;
      for (int k = 0; k < 54; k++) begin
        if (d[k]) lz = 53 - k;
        if (f[k]) plz = 53 - k;
      end
      `TB_CHECK(plz == lz || plz == lz - 1, $sformatf("lza a=%h c=%h lz=%0d pred=%0d", a, c, lz, plz))
    end
    `TB_FINISH
  end
endmodule
