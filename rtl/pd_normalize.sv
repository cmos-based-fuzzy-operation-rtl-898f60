// pd_normalize: writes a non-negative result ipart + U, known to lie in 0..1, as
// an N-digit PD fraction.
//
// The bounded difference and the bounded product leave their result as a PD
// fraction U plus a small signed integer part; when that integer part is not
// zero it has to be folded into the digits. This block adds the two as a binary
// number, V = ipart * 2^N + sum(u_j * 2^j), and writes V back with digits 0 and 1
// (a plain binary fraction is a valid PD number). V = 2^N, the grade 1, is
// written 0.2000...; V <= 0 gives 0 and V > 2^N, which valid grades never
// produce, also gives 1. The paper does not say how its results are brought
// back to digit form; this carry-propagating step is this design's own.
//
// Interface: ipart (signed), u (N digits) -> y (N digits).
// Timing: combinational, one (N+4)-bit addition.
module pd_normalize
  import pd_pkg::*;
#(
  parameter int unsigned N = PD_DIGITS
) (
  input  logic signed [3:0]  ipart,
  input  pd_digit_t [N-1:0]  u,
  output pd_digit_t [N-1:0]  y
);

  localparam int unsigned VW = N + 6;

  logic signed [VW-1:0] v;

  always_comb begin
    v = VW'(ipart) <<< N;
    for (int j = 0; j < N; j++) begin
      v = v + $signed({{(VW-2){1'b0}}, u[j]} << j);
    end

    y = '0;
    if (v >= $signed(VW'(1) << N)) begin
      y[N-1] = 2'd2;
    end else if (v > 0) begin
      for (int j = 0; j < N; j++) begin
        y[j] = {1'b0, v[j]};
      end
    end
  end

endmodule
