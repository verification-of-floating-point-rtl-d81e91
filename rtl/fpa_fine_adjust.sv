// fpa_fine_adjust: corrects the one-position error of the LZA. If the msb of
// the left-shifted value is still 0 it shifts one more place and raises adj,
// which the exponent offset subtracts. Combinational.
module fpa_fine_adjust #(
  parameter int unsigned W = 54
) (
  input  logic [W-1:0] v,
  output logic [W-1:0] q,
  output logic         adj
);
  always_comb begin
    adj = ~v[W-1];
    q   = adj ? (v << 1) : v;
  end
endmodule
