// pd_maxmin: fuzzy logical sum (MAX) and logical product (MIN) of two grades.
//
// The complement adder forms A - B as (E - 3) + U without carry propagation,
// the inequality discrimination scans its digits from the top to decide
// whether A > B, A = B or A < B, and a digit-wise 2:1 selector passes the
// digits of the larger grade to "max" and those of the smaller to "min". The
// selected digits are the inputs' own, so a redundant input stays in the same
// redundant form. Complement adder, discrimination and selector follow the
// paper's block diagram; on A = B this design passes A to max and B to min.
//
// Interface: a, b (N digits) -> max, min (N digits), a_gt_b, a_eq_b.
// Timing: combinational.
module pd_maxmin
  import pd_pkg::*;
#(
  parameter int unsigned N = PD_DIGITS
) (
  input  pd_digit_t [N-1:0] a,
  input  pd_digit_t [N-1:0] b,
  output pd_digit_t [N-1:0] max,
  output pd_digit_t [N-1:0] min,
  output logic              a_gt_b,
  output logic              a_eq_b
);

  pd_digit_t [N-1:0] u;
  logic signed [3:0] ipart;
  logic              gt, eq;
  logic              sel_a;

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
    .eq   (eq),
    .lt   ()
  );

  assign sel_a  = gt | eq;
  assign a_gt_b = gt;
  assign a_eq_b = eq;

  // Digit selector.
  for (genvar j = 0; j < N; j++) begin : g_sel
    assign max[j] = sel_a ? a[j] : b[j];
    assign min[j] = sel_a ? b[j] : a[j];
  end

endmodule
