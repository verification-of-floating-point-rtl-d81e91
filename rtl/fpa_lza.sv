// fpa_lza: leading-zero anticipator for the subtraction a - c, computed from
// the operands in parallel with the adder. Bit i of the indicator string f is
// set where the leading one of the difference may lie; the first set bit (from
// the msb) marks the predicted leading one, which is exact or one position too
// high, whatever the sign of the difference. With w = a XOR NOT(c),
// gen = a AND NOT(c), zer = NOT(a) AND c (the bit operands of a + NOT(c) + 1):
//   f[i] = t[i+1] & (gen[i] & ~zer[i-1] | zer[i] & ~gen[i-1])
//        | ~t[i+1] & (zer[i] & ~zer[i-1] | gen[i] & ~gen[i-1])
// with t[W] = 1 above the msb and gen/zer of bit -1 taken as 0.
// The equations are a standard LZA formulation chosen by this design; the
// document gives only the LZA's function and its one-bit error. Combinational.
module fpa_lza #(
  parameter int unsigned W = 54
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] c,
  output logic [W-1:0] f
);
  logic [W-1:0] cb, t, gen, zer;
  logic [W:0]   tx;
  logic [W:0]   gx, zx;   // index shifted by one: gx[i+1] = gen[i]
  always_comb begin
    cb  = ~c;
    t   = a ^ cb;
    gen = a & cb;
    zer = ~a & ~cb;
    tx  = {1'b1, t};
    gx  = {gen, 1'b0};
    zx  = {zer, 1'b0};
    for (int i = 0; i < W; i++) begin
      f[i] = ( tx[i+1] & ((gen[i] & ~zx[i]) | (zer[i] & ~gx[i]))) |
             (~tx[i+1] & ((zer[i] & ~zx[i]) | (gen[i] & ~gx[i])));
    end
  end
endmodule
