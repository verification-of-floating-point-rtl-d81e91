// fpa_path_select_tb: random mantissas A >= 2^52 and C, exponent differences
// 0..3 and both operations. The expected normalization case is derived from
// the value: for an addition a right shift when A+C, or A+C rounded up,
// reaches 2^53; for a subtraction a close massive shift when |Ex-Ey| <= 1 and
// the difference lost its leading bit (always for difference 0), else no
// shift or a left shift by one.
`include "tb_common.svh"
module fpa_path_select_tb;
  import fpa_pkg::*;
  int checks = 0, failures = 0;
  logic [10:0] absd;
  logic sub, rn;
  logic [52:0] a, c;
  logic [54:0] s0, s1, base;
  csel_e csel;
  norm_e norm, want;
  fpa_path_select dut (.absd, .eff_sub(sub), .s0_carry(s0[53]), .s1_carry(s1[53]),
                       .base_msb(base[52]), .rnd_none(rn), .csel, .norm);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 20000; i++) begin
      absd = 11'($urandom % 4); sub = 1'($urandom); rn = 1'($urandom);
      a = {1'b1, 20'($urandom), 32'($urandom)};
      c = {21'($urandom), 32'($urandom)} >> absd;
      if (i % 5 == 0) begin a = '1; c = (i % 10 == 0) ? '0 : 53'(1); end
      s0 = sub ? 55'(a) + 55'(~c) : 55'(a) + 55'(c);
      s1 = s0 + 1;
      base = (i % 2) ? s1 : s0;
      #1;
      `TB_CHECK(csel == ((absd == 0) ? CSEL_UNSH : (absd == 1) ? CSEL_SH1 : CSEL_FAR), "C select")
      if (absd == 0) want = NORM_CLOSE;
      else if (base[52]) want = NORM_NONE;
      else want = (absd == 1) ? NORM_CLOSE : NORM_L1;
      if (!sub) want = ((64'(s0) + 64'(rn)) >= 64'(1) << 53) ? NORM_R1 : NORM_NONE;
      `TB_CHECK(norm == want, $sformatf("norm a=%h c=%h sub=%0d rn=%0d", a, c, sub, rn))
    end
    `TB_FINISH
  end
endmodule
