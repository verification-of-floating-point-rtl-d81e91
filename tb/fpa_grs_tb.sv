// fpa_grs_tb: random adder outputs and low bits in every mode. The reference
// builds the exact value times 8 (A+C'+1 minus the low bits for a
// subtraction, A+C plus them for an addition) and checks that base and low
// encode it, then rounds that value by integer division at the three
// possible lsb positions (2, 1 and 1/2 of A's ulp) and compares the
// round-up decisions.
`include "tb_common.svh"
module fpa_grs_tb;
  import fpa_pkg::*;
  int checks = 0, failures = 0;
  logic sub, sign, c_low, shift_in, r1, rn, rl;
  logic [2:0] gin, low;
  rmode_e rm;
  logic [54:0] s0, s1, base;
  longint unsigned v8;
  fpa_grs dut (.eff_sub(sub), .grs_in(gin), .rm, .sign, .s0, .s1, .c_low, .low, .shift_in,
               .base, .rnd_r1(r1), .rnd_none(rn), .rnd_l1(rl));

  function automatic logic want_up(rmode_e m, logic sg, longint unsigned v, int sh);
    longint unsigned rem, half, tr;
    rem  = v & ((64'(1) << sh) - 1);
    half = 64'(1) << (sh - 1);
    tr   = v >> sh;
    case (m)
      RM_RNE:  return rem > half || (rem == half && tr[0]);
      RM_RTZ:  return 1'b0;
      RM_RUP:  return !sg && rem != 0;
      default: return sg && rem != 0;
    endcase
  endfunction

  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 20000; i++) begin
      sub = 1'($urandom); sign = 1'($urandom); rm = rmode_e'($urandom % 4);
      gin = 3'($urandom);
      s0 = {23'($urandom), 32'($urandom)}; s1 = s0 + 1;
      #1;
      v8 = sub ? 64'(s1) * 8 - 64'(gin) : 64'(s0) * 8 + 64'(gin);
      `TB_CHECK(64'(base) * 8 + 64'(low) == v8, "exact value")
      `TB_CHECK(shift_in == low[2], "shift-in bit")
      `TB_CHECK(rn == want_up(rm, sign, v8, 3), "round, no shift")
      `TB_CHECK(rl == want_up(rm, sign, v8, 2), "round, left shift")
      if (!sub) `TB_CHECK(r1 == want_up(rm, sign, v8, 4), "round, right shift")
    end
    `TB_FINISH
  end
endmodule
