// fpa_c_mux: selects the C input of the mantissa adder. The unshifted mantissa
// is used for an exponent difference of 0, the mantissa shifted right by one
// (its lsb becomes the guard bit) for a difference of 1, and the output of the
// right shifter for larger differences. grs carries the guard, round and
// sticky bits that lie below C. Combinational.
module fpa_c_mux
  import fpa_pkg::*;
#(
  parameter int unsigned NM = 53
) (
  input  logic [NM-1:0] b,
  input  logic [NM-1:0] q,
  input  logic [2:0]    q_grs,
  input  csel_e         sel,
  output logic [NM-1:0] c,
  output logic [2:0]    grs
);
  always_comb begin
    unique case (sel)
      CSEL_UNSH: begin c = b;          grs = 3'b000;           end
      CSEL_SH1:  begin c = b >> 1;     grs = {b[0], 2'b00};    end
      default:   begin c = q;          grs = q_grs;            end
    endcase
  end
endmodule
