// fpa_mux_abs_tb: every exponent pair of a reduced range plus random ones;
// the output must equal |Ex - Ey|.
`include "tb_common.svh"
module fpa_mux_abs_tb;
  int checks = 0, failures = 0;
  logic [11:0] diff;
  logic [10:0] absd;
  int ex, ey;
  fpa_mux_abs dut (.diff, .absd);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 5000; i++) begin
      ex = $urandom % 2048; ey = (i % 2) ? $urandom % 2048 : ex + int'($urandom % 5) - 2;
      if (ey < 0) ey = 0;
      if (ey > 2047) ey = 2047;
      diff = 12'(ex - ey);
      #1;
      `TB_CHECK(int'(absd) == ((ex > ey) ? ex - ey : ey - ex), "abs")
    end
    `TB_FINISH
  end
endmodule
