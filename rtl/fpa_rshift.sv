// fpa_rshift: alignment right shifter with guard, round and sticky bits.
// The smaller-exponent mantissa b is shifted right by shamt. q holds the bits
// that stay inside the NM-bit frame of A, g and r are the first two bits below
// it and s is the OR of every bit further down. Shifts of NM+2 or more leave
// only the sticky bit, so a shift of NM+1 (54 for double precision) puts the
// leading one in the round position and still computes s from the remaining
// bits, and any larger shift gives s = OR of b. Combinational.
module fpa_rshift #(
  parameter int unsigned NE = 11,
  parameter int unsigned NM = 53
) (
  input  logic [NM-1:0] b,
  input  logic [NE-1:0] shamt,
  output logic [NM-1:0] q,
  output logic          g,
  output logic          r,
  output logic          s
);
  localparam int unsigned W  = 2*NM + 2;
  localparam int unsigned SW = $clog2(NM + 3);

  logic [W-1:0]  ext;
  logic [SW-1:0] sh;
  logic          big;

  always_comb begin
    big = (shamt >= NE'(NM + 2));
    sh  = big ? SW'(NM + 2) : shamt[SW-1:0];
    ext = {b, {(NM+2){1'b0}}} >> sh;
    q   = ext[W-1 -: NM];
    g   = ext[NM+1];
    r   = ext[NM];
    s   = |ext[NM-1:0];
  end
endmodule
