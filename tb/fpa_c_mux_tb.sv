// fpa_c_mux_tb: for each selection C and its low bits must be the unshifted
// mantissa, the mantissa shifted by one with its lsb as guard, or the
// shifter's output and bits.
`include "tb_common.svh"
module fpa_c_mux_tb;
  import fpa_pkg::*;
  int checks = 0, failures = 0;
  logic [52:0] b, q, c;
  logic [2:0] qg, grs;
  csel_e sel;
  fpa_c_mux dut (.b, .q, .q_grs(qg), .sel, .c, .grs);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 3000; i++) begin
      b = {21'($urandom), 32'($urandom)}; q = {21'($urandom), 32'($urandom)}; qg = 3'($urandom);
      sel = csel_e'(i % 3);
      #1;
      case (i % 3)
        0: `TB_CHECK({c, grs} == {b, 3'b000}, "unshifted")
        1: `TB_CHECK({c, grs} == ({b, 3'b000} >> 1), "shift by one")
        default: `TB_CHECK({c, grs} == {q, qg}, "far")
      endcase
    end
    `TB_FINISH
  end
endmodule
