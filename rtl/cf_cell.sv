// cf_cell: one node of the carry-free GSD multiplier.
//
// Per step of the carry-free algorithm, digit position j does three things:
//   line 8   z = w + t            remainder kept here plus transfer from j-1
//   line 4/5 p = z + x*y          product term added only in "circle" nodes
//   line 7   p = R*t' + w'        new transfer t' (to j+1) and remainder w'
// The node is purely combinational; the arrays put registers on its outputs.
// A "square" node is the same circuit with mul_en low. The top row of an
// array feeds w = t = 0, and the bottom row uses only the z output.
//
// The split in line 7 takes the high bits of p as t' and the low LOG2R bits
// as w', then moves w' down by R (and t' up by one) when it exceeds WU, as in
// the per-step cost estimate of the source algorithm. With the transfer range
// [-ceil(ALPHA*BETA/(R-1)), ceil(max(ALPHA^2,BETA^2)/(R-1))] this keeps the
// partial-product digit z inside [ZL, ZH] = [WU-R+1-TNEG, WU+TPOS], a set of
// R+TNEG+TPOS digits, which is the minimum size the algorithm needs.
// The value of WU (here 1, giving z in [-5,4] for radix 4 with digits
// [-3,3]) is a choice of this design.
module cf_cell
  import gsd_pkg::*;
#(
  parameter int LOG2R = 2,
  parameter int ALPHA = 3,
  parameter int BETA  = 3,
  parameter int WU    = 1,
  localparam int R    = 1 << LOG2R,
  localparam int TNEG = cdiv(ALPHA * BETA, R - 1),
  localparam int TPOS = cdiv(imax(ALPHA * ALPHA, BETA * BETA), R - 1),
  localparam int WL   = WU - R + 1,
  localparam int XW   = sbits(-ALPHA, BETA),
  localparam int TW   = sbits(-TNEG, TPOS),
  localparam int WW   = sbits(WL, WU),
  localparam int ZW   = sbits(WL - TNEG, WU + TPOS)
) (
  input  logic signed [WW-1:0] w_in,    // remainder of this position, previous step
  input  logic signed [TW-1:0] t_in,    // transfer from position j-1, previous step
  input  logic signed [XW-1:0] x,       // multiplier digit x_i
  input  logic signed [XW-1:0] y,       // multiplicand digit y_(j-i)
  input  logic                 mul_en,  // circle node: add x*y
  output logic signed [ZW-1:0] z,       // line 8 result
  output logic signed [TW-1:0] t_out,   // transfer to position j+1
  output logic signed [WW-1:0] w_out    // remainder kept at position j
);

  split_t s;
  integer zi, p;

  always_comb begin
    zi = int'(w_in) + int'(t_in);
    p  = zi + (mul_en ? int'(x) * int'(y) : 0);
    s  = split_digit(p, LOG2R, WU);
  end

  assign z     = ZW'(zi);
  assign t_out = TW'(s.t);
  assign w_out = WW'(s.w);

endmodule
