// pd_fuzzy_unit: parallel fuzzy operation unit on two PD-coded grades.
//
// Two membership grades A and B, each an N-digit positive-digit fraction with
// digits 0..3, enter together and five fuzzy operations come out at once:
//   lsum  = max(A, B)            logical sum
//   lprod = min(A, B)            logical product
//   bsum  = min(1, A + B)        bounded sum
//   bdiff = max(0, A - B)        bounded difference
//   bprod = max(0, A + B - 1)    bounded product
// Every operation starts from a carry-free digit-parallel stage (PD adder or
// complement adder) and an inequality discrimination; only the bounded
// difference and product end in a short binary normalisation. Each operation
// has its own datapath, as the paper builds one circuit per operation.
//
// Interface: a, b (N digits) in; the five results plus a_gt_b, a_eq_b and the
// limit flags bsum_sat, bdiff_clip, bprod_clip out. Timing: combinational, no
// clock; results follow the inputs after the logic delay.
module pd_fuzzy_unit
  import pd_pkg::*;
#(
  parameter int unsigned N = PD_DIGITS
) (
  input  pd_digit_t [N-1:0] a,
  input  pd_digit_t [N-1:0] b,
  output pd_digit_t [N-1:0] lsum,
  output pd_digit_t [N-1:0] lprod,
  output pd_digit_t [N-1:0] bsum,
  output pd_digit_t [N-1:0] bdiff,
  output pd_digit_t [N-1:0] bprod,
  output logic              a_gt_b,
  output logic              a_eq_b,
  output logic              bsum_sat,
  output logic              bdiff_clip,
  output logic              bprod_clip
);

  pd_maxmin #(.N(N)) u_maxmin (
    .a     (a),
    .b     (b),
    .max   (lsum),
    .min   (lprod),
    .a_gt_b(a_gt_b),
    .a_eq_b(a_eq_b)
  );

  pd_bounded_sum #(.N(N)) u_bsum (
    .a  (a),
    .b  (b),
    .y  (bsum),
    .sat(bsum_sat)
  );

  pd_bounded_diff #(.N(N)) u_bdiff (
    .a   (a),
    .b   (b),
    .y   (bdiff),
    .clip(bdiff_clip)
  );

  pd_bounded_prod #(.N(N)) u_bprod (
    .a   (a),
    .b   (b),
    .y   (bprod),
    .clip(bprod_clip)
  );

endmodule
