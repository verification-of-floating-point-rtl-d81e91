// fpa_special_tb: operand pairs drawn from NaNs, infinities, zeros and finite
// numbers; where either operand is a NaN or an infinity the result and the
// invalid flag must match the reference model, otherwise special must be 0.
`include "tb_common.svh"
module fpa_special_tb;
  import fpa_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] x, y, z;
  logic sp, inv;
  ref_t r;
  fpa_special dut (.x, .y, .special(sp), .z, .invalid(inv));
  function automatic logic [63:0] pick();
    case ($urandom % 4)
      0: return {1'($urandom), 11'h7FF, 52'b0};
      1: return {1'($urandom), 11'h7FF, 20'($urandom), 32'($urandom) | 32'(1)};
      2: return {1'($urandom), 11'h000, 52'b0};
      default: return {1'($urandom), 11'(1 + $urandom % 2045), 20'($urandom), 32'($urandom)};
    endcase
  endfunction
  `TB_WATCHDOG(1000000)
  initial begin
    for (int i = 0; i < 4000; i++) begin
      x = pick(); y = pick();
      #1;
      r = ref_add(x, y, 1'b0, 2'd0);
      if (x[62:52] == 11'h7FF || y[62:52] == 11'h7FF) begin
        `TB_CHECK(sp && z == r.z && inv == r.inv, $sformatf("special %h %h", x, y))
      end else begin
        `TB_CHECK(!sp && !inv, "not special")
      end
    end
    `TB_FINISH
  end
endmodule
