// fpa_rshift_tb: shift amounts 0..60 (including 53, 54 and 55, the cases
// around the mantissa width) and random large ones. The reference places the
// mantissa in a 256-bit field, shifts it and reads the kept bits, guard, round
// and sticky from it.
`include "tb_common.svh"
module fpa_rshift_tb;
  int checks = 0, failures = 0;
  logic [52:0] b, q;
  logic [10:0] shamt;
  logic g, r, s;
  logic [255:0] full;
  fpa_rshift dut (.b, .shamt, .q, .g, .r, .s);
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 6000; i++) begin
      b = {1'b1, 20'($urandom), 32'($urandom)};
      if (i % 5 == 0) b = {1'b1, 52'(1) << ($urandom % 3)};
      if (i % 7 == 0) b = {1'b1, 52'b0};
      shamt = (i % 4 == 3) ? 11'($urandom) : 11'(i % 61);
      #1;
      // shifts above 128 push every bit out of the field: only sticky remains
      full = (shamt > 128) ? 256'(1) : (256'(b) << 128) >> shamt;
      `TB_CHECK(q == full[180:128], "kept bits")
      `TB_CHECK(g == full[127], "guard")
      `TB_CHECK(r == full[126], "round")
      `TB_CHECK(s == (|full[125:0]), "sticky")
    end
    `TB_FINISH
  end
endmodule
