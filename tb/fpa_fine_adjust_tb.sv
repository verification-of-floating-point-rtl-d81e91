// fpa_fine_adjust_tb: values with the leading one in the top or the next
// position; the output must always have its msb set and adj must tell
// whether a shift was made.
`include "tb_common.svh"
module fpa_fine_adjust_tb;
  int checks = 0, failures = 0;
  logic [53:0] v, q;
  logic adj;
  fpa_fine_adjust dut (.v, .q, .adj);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 4000; i++) begin
      v = {22'($urandom), 32'($urandom)};
      v[53] = i[0]; v[52] = 1'b1;
      #1;
      `TB_CHECK(q[53] && adj == !v[53], "normalized")
      `TB_CHECK(q == (i[0] ? v : v * 2), "value")
    end
    `TB_FINISH
  end
endmodule
