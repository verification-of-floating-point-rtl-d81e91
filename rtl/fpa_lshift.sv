// fpa_lshift: normalization left shifter of the close path. Shifts the W-bit
// difference left by the amount predicted by the LZA (zeros enter at the lsb).
// Combinational.
module fpa_lshift #(
  parameter int unsigned W  = 54,
  parameter int unsigned LW = $clog2(W + 1)
) (
  input  logic [W-1:0]  v,
  input  logic [LW-1:0] lz,
  output logic [W-1:0]  q
);
  assign q = v << lz;
endmodule
