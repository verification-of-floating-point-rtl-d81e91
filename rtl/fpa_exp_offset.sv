// fpa_exp_offset: exponent correction for the chosen normalization: +1 for a
// right shift, 0 for none, -1 for a left shift by one, and -(lz + adj) for the
// close path, where lz is the encoded LZA count and adj the fine adjust.
// Output is a two's-complement number of OW bits. Combinational.
module fpa_exp_offset
  import fpa_pkg::*;
#(
  parameter int unsigned LW = 6,
  parameter int unsigned OW = LW + 2
) (
  input  norm_e         norm,
  input  logic [LW-1:0] lz,
  input  logic          adj,
  output logic [OW-1:0] off
);
  always_comb begin
    unique case (norm)
      NORM_R1:    off = OW'(1);
      NORM_NONE:  off = '0;
      NORM_L1:    off = '1;
      default:    off = -(OW'(lz) + OW'(adj));
    endcase
  end
endmodule
