// pd_bounded_diff: fuzzy bounded difference max(0, A - B).
//
// The complement adder gives A - B = (E - 3) + U without carry propagation and
// the inequality discrimination decides its sign. If A - B <= 0 the output is 0;
// otherwise pd_normalize folds the integer part E - 3 into the digits. Inputs
// are expected to be grades in 0..1. The complement addition and the sign test
// follow the paper; the final normalisation is this design's.
//
// Interface: a, b (N digits) -> y (N digits), clip (the result was limited to 0).
// Timing: combinational.
module pd_bounded_diff
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
  logic              gt;

  pd_csub #(.N(N)) u_csub (
    .a    (a),
    .b    (b),
    .u    (u),
    .ecar (),
    .ipart(ipart)
  );

  pd_ineq #(.N(N)) u_ineq (
    .ipart(ipart),
    .u    (u),
    .gt   (gt),
    .eq   (),
    .lt   ()
  );

  pd_normalize #(.N(N)) u_norm (
    .ipart(ipart),
    .u    (u),
    .y    (v)
  );

  assign clip = ~gt;
  assign y    = gt ? v : '0;

endmodule
