// pd_bounded_sum: fuzzy bounded sum min(1, A + B).
//
// The carry-free PD adder gives A + B = F + U. The inequality discrimination
// compares that with 1 by deciding the sign of (F - 1) + U. If A + B >= 1 the
// output is the grade 1, written 0.2000...; otherwise F is 0 and the adder's
// digits U are the result as they are, with no conversion. Adder, comparison
// with 1 and the limit follow the paper; the coding of 1 is this design's.
//
// Interface: a, b (N digits) -> y (N digits), sat (the limit 1 was applied).
// Timing: combinational.
module pd_bounded_sum
  import pd_pkg::*;
#(
  parameter int unsigned N = PD_DIGITS
) (
  input  pd_digit_t [N-1:0] a,
  input  pd_digit_t [N-1:0] b,
  output pd_digit_t [N-1:0] y,
  output logic              sat
);

  pd_digit_t [N-1:0] u;
  logic signed [3:0] ipart;
  logic              lt;

  pd_add #(.N(N)) u_add (
    .a    (a),
    .b    (b),
    .u    (u),
    .ocar (),
    .ipart(ipart)
  );

  pd_ineq #(.N(N)) u_ineq (
    .ipart(ipart - 4'sd1),
    .u    (u),
    .gt   (),
    .eq   (),
    .lt   (lt)
  );

  assign sat = ~lt;

  always_comb begin
    y = u;
    if (sat) begin
      y        = '0;
      y[N-1]   = 2'd2;
    end
  end

endmodule
