// fpa_encode_tb: indicator strings with a leading one at every position and
// random bits below it, and the all-zero string.
`include "tb_common.svh"
module fpa_encode_tb;
  int checks = 0, failures = 0;
  logic [53:0] f;
  logic [5:0] lz;
  fpa_encode dut (.f, .lz);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int p = -1; p < 54; p++)
      for (int k = 0; k < 20; k++) begin
        f = (p < 0) ? '0 : ((54'(1) << p) | ({22'($urandom), 32'($urandom)} & ((54'(1) << p) - 1)));
        #1;
        `TB_CHECK(int'(lz) == 53 - p, "encode")
      end
    `TB_FINISH
  end
endmodule
