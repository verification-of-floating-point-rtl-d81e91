// fpa_cvt_d2s_tb: random doubles around the single-precision range in all
// rounding modes. For results in the normal single range the expected value
// is whichever of the two neighbouring singles (truncated and next up) the
// mode selects, decided by comparing real distances; beyond the range
// overflow must be raised with infinity or the largest single, below it a
// signed zero with underflow. NaN, infinity and zero inputs are checked too.
`include "tb_common.svh"
module fpa_cvt_d2s_tb;
  import fpa_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] d;
  rmode_e rm;
  logic [31:0] s, t, u, want;
  logic ovf, unf, up, toinf;
  real v, rt, ru;
  int es;
  fpa_cvt_d2s dut (.d, .rm, .s, .overflow(ovf), .underflow(unf));
  function automatic real pow2(int k);
    real p = 1.0;
    if (k >= 0) for (int i = 0; i < k; i++) p = p * 2.0;
    else        for (int i = 0; i < -k; i++) p = p / 2.0;
    return p;
  endfunction
  function automatic real sval(logic [31:0] w);
    return real'({1'b1, w[22:0]}) * pow2(int'(w[30:23]) - 150);
  endfunction
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 20000; i++) begin
      d = {$urandom, $urandom};
      d[62:52] = 11'(896 - 4 + $urandom % 264);
      if (i % 4 == 0) d[28:0] = (i % 12 == 0) ? 29'h1000_0000 : (i % 12 == 4) ? 29'h1000_0001 : 29'h0000_0001;
      if (i % 50 == 0) d[62:52] = 11'h7FF;
      if (i % 50 == 1) d[62:0] = '0;
      if (i % 50 == 2) d = {1'($urandom), 11'h47E, {23{1'b1}}, 29'h1000_0000};
      rm = rmode_e'($urandom % 4);
      #1;
      es = int'(d[62:52]) - 896;
      toinf = (rm == RM_RNE) || (rm == RM_RUP && !d[63]) || (rm == RM_RDN && d[63]);
      if (d[62:52] == 11'h7FF) begin
        `TB_CHECK(s[30:23] == 8'hFF && ((s[22:0] == 0) == (d[51:0] == 0)) && s[31] == d[63] && !ovf, "inf/nan")
      end else if (d[62:0] == 0) begin
        `TB_CHECK(s == {d[63], 31'b0} && !ovf && !unf, "zero")
      end else if (es <= 0) begin
        `TB_CHECK(s == {d[63], 31'b0} && unf, "underflow")
      end else if (es >= 255) begin
        `TB_CHECK(ovf && s == (toinf ? {d[63], 8'hFF, 23'b0} : {d[63], 8'hFE, {23{1'b1}}}), "overflow")
      end else begin
        t = {1'b0, 8'(es), d[51:29]};
        u = t + 1;
        v = $bitstoreal({1'b0, d[62:0]});
        rt = sval(t); ru = sval(u);
        if (v == rt) up = 0;
        else case (rm)
          RM_RNE:  up = (v - rt > ru - v) || (v - rt == ru - v && t[0]);
          RM_RTZ:  up = 0;
          RM_RUP:  up = !d[63];
          default: up = d[63];
        endcase
        want = up ? u : t;
        if (want[30:23] == 8'hFF) begin
          `TB_CHECK(ovf && s == (toinf ? {d[63], 8'hFF, 23'b0} : {d[63], 8'hFE, {23{1'b1}}}), "round overflow")
        end else begin
          want[31] = d[63];
          `TB_CHECK(s == want && !ovf && !unf, $sformatf("d=%h rm=%0d got %h want %h", d, rm, s, want))
        end
      end
    end
    `TB_FINISH
  end
endmodule
