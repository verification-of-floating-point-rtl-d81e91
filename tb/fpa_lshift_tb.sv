// fpa_lshift_tb: every shift amount 0..54 on random values, against the
// product with a power of two.
`include "tb_common.svh"
module fpa_lshift_tb;
  int checks = 0, failures = 0;
  logic [53:0] v, q;
  logic [5:0] lz;
  fpa_lshift dut (.v, .lz, .q);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int k = 0; k <= 54; k++)
      for (int i = 0; i < 30; i++) begin
        v = {22'($urandom), 32'($urandom)}; lz = 6'(k);
        #1;
        `TB_CHECK(q == 54'(128'(v) * (128'(1) << k)), "shift")
      end
    `TB_FINISH
  end
endmodule
