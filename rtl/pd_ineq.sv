// pd_ineq: inequality discrimination for a PD result.
//
// Decides the sign of X = ipart + U, where ipart is a small signed integer (the
// carry part left by the adder or complement adder) and U = 0.u(-1)...u(-N) is a
// PD fraction with digits 0..3. As the paper prescribes, the digits are
// examined from the most significant one down, and each digit only matters as
// far as it is 0, 1, or 2-and-above relative to what the digits above left open.
//
// The scan keeps a residue r: r = ipart at the start and r = 2r + u at each
// digit, so after k digits X * 2^k = r + T with 0 <= T < 3 (T is the value of the
// digits not yet seen). Hence r >= 1 already means X > 0 and r <= -4 already
// means X < 0, and both stay so: the residue saturates to -4..1 and needs only
// four bits. After the last digit r is exact or saturated, and its sign is the
// sign of X. The paper states the three-group rule only for the top digit and
// describes the lower digits in words; the saturating residue is this design's
// exact form of that rule.
//
// Interface: ipart (signed, -8..7), u (N digits) -> gt (X > 0), eq (X = 0),
// lt (X < 0); exactly one is set. Timing: combinational, N steps deep.
module pd_ineq
  import pd_pkg::*;
#(
  parameter int unsigned N = PD_DIGITS
) (
  input  logic signed [3:0]  ipart,
  input  pd_digit_t [N-1:0]  u,
  output logic               gt,
  output logic               eq,
  output logic               lt
);

  pd_res_t r;

  always_comb begin
    if (ipart > PD_RES_MAX)      r = PD_RES_MAX;
    else if (ipart < PD_RES_MIN) r = PD_RES_MIN;
    else                         r = ipart;
    for (int k = N - 1; k >= 0; k--) begin
      r = pd_ineq_step(r, u[k]);
    end
    gt = (r > 0);
    eq = (r == 0);
    lt = (r < 0);
  end

endmodule
