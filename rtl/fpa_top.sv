// fpa_top: the floating-point units side by side. Two pipelined adders, one
// with the ones complementer after the mantissa adder (adder I) and one with
// the mantissa comparator in the swap control instead (adder II), each with
// its own operand and result ports, and the two precision converters
// (single to double, double to single). The adders have a three-cycle latency
// and accept one operation per cycle; the converters are combinational.
// rm encodes the rounding mode: 0 nearest-even, 1 toward zero, 2 toward +inf,
// 3 toward -inf. rst_n (asynchronous, active low) clears the adders' valid bits.
module fpa_top
  import fpa_pkg::*;
#(
  parameter int unsigned NE = 11,
  parameter int unsigned NM = 53
) (
  input  logic             clk,
  input  logic             rst_n,
  // adder I
  input  logic             a1_valid,
  input  logic [NE+NM-1:0] a1_x,
  input  logic [NE+NM-1:0] a1_y,
  input  logic             a1_sub,
  input  logic [1:0]       a1_rm,
  output logic             r1_valid,
  output logic [NE+NM-1:0] r1_z,
  output logic             r1_invalid,
  output logic             r1_overflow,
  output logic             r1_underflow,
  // adder II
  input  logic             a2_valid,
  input  logic [NE+NM-1:0] a2_x,
  input  logic [NE+NM-1:0] a2_y,
  input  logic             a2_sub,
  input  logic [1:0]       a2_rm,
  output logic             r2_valid,
  output logic [NE+NM-1:0] r2_z,
  output logic             r2_invalid,
  output logic             r2_overflow,
  output logic             r2_underflow,
  // converters
  input  logic [31:0]      s2d_in,
  output logic [63:0]      s2d_out,
  input  logic [63:0]      d2s_in,
  input  logic [1:0]       d2s_rm,
  output logic [31:0]      d2s_out,
  output logic             d2s_overflow,
  output logic             d2s_underflow
);
  fp_adder #(.NE(NE), .NM(NM), .COMPARE(1'b0)) u_adder_i (
    .clk, .rst_n, .in_valid(a1_valid), .x(a1_x), .y(a1_y), .sub(a1_sub), .rm(rmode_e'(a1_rm)),
    .out_valid(r1_valid), .z(r1_z), .invalid(r1_invalid), .overflow(r1_overflow), .underflow(r1_underflow));

  fp_adder #(.NE(NE), .NM(NM), .COMPARE(1'b1)) u_adder_ii (
    .clk, .rst_n, .in_valid(a2_valid), .x(a2_x), .y(a2_y), .sub(a2_sub), .rm(rmode_e'(a2_rm)),
    .out_valid(r2_valid), .z(r2_z), .invalid(r2_invalid), .overflow(r2_overflow), .underflow(r2_underflow));

  fpa_cvt_s2d u_s2d (.s(s2d_in), .d(s2d_out));
  fpa_cvt_d2s u_d2s (.d(d2s_in), .rm(rmode_e'(d2s_rm)), .s(d2s_out), .overflow(d2s_overflow), .underflow(d2s_underflow));
endmodule
