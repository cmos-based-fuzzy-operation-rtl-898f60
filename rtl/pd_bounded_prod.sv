// pd_bounded_prod: fuzzy bounded product max(0, A + B - 1).
//
// The carry-free PD adder gives A + B = F + U; the inequality discrimination
// decides the sign of A + B - 1 = (F - 1) + U. If it is not positive the output
// is 0; otherwise pd_normalize folds the integer part F - 1 into the digits.
// Inputs are expected to be grades in 0..1. The sign test on the sum less one
// follows the paper; the final normalisation is this design's.
//
// Interface: a, b (N digits) -> y (N digits), clip (the result was limited to 0).
// Timing: combinational.
module pd_bounded_prod
  import pd_pkg::*;
#(
  parameter int unsigned N = PD_DIGITS
) (
  input  pd_digit_t [N-1:0] a,
  input  pd_digit_t [N-1:0] b,
  output pd_digit_t [N-1:0] y,
  output logic              clip
);

  pd_digit_t [N-1:0] u;
  pd_digit_t [N-1:0] v;
  logic signed [3:0] ipart;
  logic signed [3:0] xpart;
  logic              gt;

  pd_add #(.N(N)) u_add (
    .a    (a),
    .b    (b),
    .u    (u),
    .ocar (),
    .ipart(ipart)
  );

  assign xpart = ipart - 4'sd1;

  pd_ineq #(.N(N)) u_ineq (
    .ipart(xpart),
    .u    (u),
    .gt   (gt),
    .eq   (),
    .lt   ()
  );

  pd_normalize #(.N(N)) u_norm (
    .ipart(xpart),
    .u    (u),
    .y    (v)
  );

  assign clip = ~gt;
  assign y    = gt ? v : '0;

endmodule
