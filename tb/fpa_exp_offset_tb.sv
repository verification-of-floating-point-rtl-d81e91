// fpa_exp_offset_tb: all normalization cases, shift counts and adjust bits;
// the offset read as a signed number must be +1, 0, -1 or -(lz+adj).
`include "tb_common.svh"
module fpa_exp_offset_tb;
  import fpa_pkg::*;
  int checks = 0, failures = 0;
  norm_e norm;
  logic [5:0] lz;
  logic adj;
  logic [7:0] off;
  int want;
  fpa_exp_offset dut (.norm, .lz, .adj, .off);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int n = 0; n < 4; n++)
      for (int k = 0; k <= 54; k++)
        for (int j = 0; j < 2; j++) begin
          norm = norm_e'(n); lz = 6'(k); adj = 1'(j);
          #1;
          want = (n == 0) ? 1 : (n == 1) ? 0 : (n == 2) ? -1 : -(k + j);
          `TB_CHECK(int'($signed(off)) == want, "offset")
        end
    `TB_FINISH
  end
endmodule
