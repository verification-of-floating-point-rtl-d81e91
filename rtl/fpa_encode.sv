// fpa_encode: priority encoder behind the LZA. Returns the number of zeros
// above the first set bit of the indicator string f (W when f is all zero),
// which is the predicted left-shift amount. Combinational.
module fpa_encode #(
  parameter int unsigned W  = 54,
  parameter int unsigned LW = $clog2(W + 1)
) (
  input  logic [W-1:0]  f,
  output logic [LW-1:0] lz
);
  always_comb begin
    lz = LW'(W);
    for (int i = 0; i < W; i++)
      if (f[i]) lz = LW'(W - 1 - i);
  end
endmodule
