// pd_csub: N-digit PD complement adder, computing A + 1 - B without carry
// propagation.
//
// Each digit is a pd_csub_digit; a carry travels at most two digits, so the
// delay does not grow with N. The digits u are a PD fraction U, and the carries
// leaving the top (c1 and c0 of the most significant digit, c1 of the next one)
// form the end-around carry E = 2*c1(-1) + c0(-1) + c1(-2), 0..4.
// Below the least significant digit a constant carry of value +1 (c1 = c0 = 1) is
// injected; it plays the part of the +1 of the two's complement 1 - B. With it
//
//     A - B = (E - 3) + U        exactly,
//
// which is brought out as the small signed integer "ipart" = E - 3 (-3..1).
// The paper gives the digit cell and the column of cells; the injected carry
// and the exact identity are this design's reading of it.
//
// Interface: a, b (N digits each), u (N digits), ecar = {c1(-1), c0(-1), c1(-2)},
// ipart = E - 3. Timing: combinational. Needs N >= 2.
module pd_csub
  import pd_pkg::*;
#(
  parameter int unsigned N = PD_DIGITS
) (
  input  pd_digit_t [N-1:0]  a,
  input  pd_digit_t [N-1:0]  b,
  output pd_digit_t [N-1:0]  u,
  output logic [2:0]         ecar,
  output logic signed [3:0]  ipart
);

  logic [N-1:0] c1, c0;
  logic [N-1:0] cin0, cin1;

  for (genvar j = 0; j < N; j++) begin : g_digit
    if (j == 0) begin : g_lsd
      assign cin0[j] = 1'b1;           // injected carry, bit 0
      assign cin1[j] = 1'b0;
    end else if (j == 1) begin : g_lsd1
      assign cin0[j] = c0[j-1];
      assign cin1[j] = 1'b1;           // injected carry, bit 1
    end else begin : g_mid
      assign cin0[j] = c0[j-1];
      assign cin1[j] = c1[j-2];
    end

    pd_csub_digit u_digit (
      .a   (a[j]),
      .b   (b[j]),
      .cin0(cin0[j]),
      .cin1(cin1[j]),
      .c1  (c1[j]),
      .c0  (c0[j]),
      .w0  (),
      .u   (u[j])
    );
  end

  assign ecar  = {c1[N-1], c0[N-1], c1[N-2]};
  assign ipart = $signed({1'b0, c1[N-1], 1'b0}) + $signed({2'b0, c0[N-1]})
               + $signed({2'b0, c1[N-2]}) - 4'sd3;

endmodule
