// fpa_cvt_s2d_tb: random singles of every class (normal, denormal, zero,
// infinity, NaN). The double result must have exactly the value of the
// single, rebuilt with real arithmetic from its fields, and the same sign;
// infinities and NaNs must stay what they are.
`include "tb_common.svh"
module fpa_cvt_s2d_tb;
  int checks = 0, failures = 0;
  logic [31:0] s;
  logic [63:0] d;
  real m;
  fpa_cvt_s2d dut (.s, .d);
  function automatic real pow2(int k);
    real p = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) p = p * 2.0;
    else        for (int i = 0; i < -k; i++) p = p / 2.0;
    return p;
  endfunction
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 20000; i++) begin
      s = $urandom;
      case (i % 5)
        0: s[30:23] = 8'h00;
        1: s[30:23] = 8'hFF;
        2: s[22:0] = 23'(1) << ($urandom % 23);
        default: ;
      endcase
      if (i % 11 == 0) s[22:0] = '0;
      #1;
      if (s[30:23] == 8'hFF) begin
        `TB_CHECK(d[62:52] == 11'h7FF && ((d[51:0] == 0) == (s[22:0] == 0)) && d[63] == s[31], "inf/nan")
      end else begin
        m = (s[30:23] == 0) ? real'(s[22:0]) * pow2(-149) : real'({1'b1, s[22:0]}) * pow2(int'(s[30:23]) - 150);
        if (s[31]) m = -m;
        `TB_CHECK($bitstoreal(d) == m && d[63] == s[31], $sformatf("value %h -> %h", s, d))
      end
    end
    `TB_FINISH
  end
endmodule
