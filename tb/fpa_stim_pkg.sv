// fpa_stim_pkg: operand generator shared by the adder testbenches. It draws
// double-precision operand pairs biased toward the cases that exercise the
// adder's paths: exponent differences of 0, 1, 2, around the mantissa width
// (52..56) and large ones, mantissas with long runs of ones or zeros, exponents
// near the top and bottom of the range, zeros, denormals, infinities and NaNs.
package fpa_stim_pkg;
  function automatic logic [51:0] rand_frac();
    logic [51:0] f;
    f = {$urandom, $urandom};
    case ($urandom % 8)
      0: f = '1;
      1: f = '0;
      2: f = 52'(1);
      3: f = f | ({52{1'b1}} >> ($urandom % 52));
      4: f = f & ({52{1'b1}} << ($urandom % 52));
      default: ;
    endcase
    return f;
  endfunction

  function automatic logic [10:0] rand_exp();
    case ($urandom % 10)
      0: return 11'(1 + $urandom % 3);
      1: return 11'(2046 - $urandom % 3);
      default: return 11'(900 + $urandom % 250);
    endcase
  endfunction

  function automatic logic [63:0] rand_special();
    case ($urandom % 5)
      0: return {1'($urandom), 11'h7FF, 52'b0};
      1: return {1'($urandom), 11'h7FF, rand_frac() | 52'(1)};
      2: return {1'($urandom), 11'h000, 52'b0};
      3: return {1'($urandom), 11'h000, rand_frac() | 52'(1)};
      default: return {1'($urandom), 11'h7FE, {52{1'b1}}};
    endcase
  endfunction

  task automatic gen_pair(output logic [63:0] x, output logic [63:0] y);
    logic [10:0] ex, ey;
    int d;
    ex = rand_exp();
    case ($urandom % 10)
      0, 1:    d = 0;
      2, 3:    d = ($urandom % 2) ? 1 : -1;
      4:       d = ($urandom % 2) ? 2 : -2;
      5:       d = 52 + $urandom % 5;
      6:       d = -(52 + $urandom % 5);
      7:       d = int'($urandom % 120) - 60;
      default: d = int'($urandom % 2000) - 1000;
    endcase
    if (int'(ex) - d < 1 || int'(ex) - d > 2046) d = 0;
    ey = 11'(int'(ex) - d);
    x = {1'($urandom), ex, rand_frac()};
    y = {1'($urandom), ey, rand_frac()};
    if ($urandom % 4 == 0) y[51:0] = x[51:0] ^ (52'(1) << ($urandom % 52));  // near cancellation
    if ($urandom % 25 == 0) x = rand_special();
    if ($urandom % 25 == 0) y = rand_special();
  endtask
endpackage
