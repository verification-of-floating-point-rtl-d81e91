// fpa_special: operands that are not finite numbers. Any NaN operand gives a
// NaN; infinities of opposite effective sign give a NaN and the invalid flag;
// otherwise an infinity operand passes through. When special is 0 the
// datapath result is used. y must already carry the effective sign (inverted
// for X - Y). Combinational. The case table follows the document; the quiet
// NaN produced (sign 0, fraction msb 1) is this design's choice.
module fpa_special #(
  parameter int unsigned NE = 11,
  parameter int unsigned NM = 53
) (
  input  logic [NE+NM-1:0] x,
  input  logic [NE+NM-1:0] y,
  output logic             special,
  output logic [NE+NM-1:0] z,
  output logic             invalid
);
  localparam int unsigned FW = NM - 1;
  logic x_max, y_max, x_nan, y_nan, x_inf, y_inf;
  always_comb begin
    x_max = &x[NE+FW-1:FW];
    y_max = &y[NE+FW-1:FW];
    x_nan = x_max & (|x[FW-1:0]);
    y_nan = y_max & (|y[FW-1:0]);
    x_inf = x_max & ~(|x[FW-1:0]);
    y_inf = y_max & ~(|y[FW-1:0]);
    special = x_max | y_max;
    invalid = x_inf & y_inf & (x[NE+FW] != y[NE+FW]);
    if (x_nan || y_nan || invalid) z = {1'b0, {NE{1'b1}}, 1'b1, {(FW-1){1'b0}}};
    else if (x_inf)                z = x;
    else if (y_inf)                z = y;
    else                           z = '0;
  end
endmodule
