// fpa_mux_abs: absolute value of the exponent difference (the alignment
// shift amount). It negates the subtractor output when it is negative.
// Combinational; input is the (NE+1)-bit two's-complement Ex-Ey.
module fpa_mux_abs #(
  parameter int unsigned NE = 11
) (
  input  logic [NE:0]   diff,
  output logic [NE-1:0] absd
);
  logic [NE:0] neg;
  always_comb begin
    neg  = -diff;
    absd = diff[NE] ? neg[NE-1:0] : diff[NE-1:0];
  end
endmodule
