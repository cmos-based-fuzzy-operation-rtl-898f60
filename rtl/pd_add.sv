// pd_add: N-digit carry-free PD adder, computing A + B.
//
// Each digit is a pd_add_digit; a carry travels at most two digits, so the
// delay does not grow with N. The digits u form a PD fraction U and the carries
// leaving the top form the integer part F = 2*c1(-1) + c0(-1) + c1(-2), 0..4, so
//
//     A + B = F + U        exactly.
//
// No carry enters below the least significant digit.
//
// Interface: a, b (N digits each), u (N digits), ocar = {c1(-1), c0(-1), c1(-2)},
// ipart = F. Timing: combinational. Needs N >= 2.
module pd_add
  import pd_pkg::*;
#(
  parameter int unsigned N = PD_DIGITS
) (
  input  pd_digit_t [N-1:0]  a,
  input  pd_digit_t [N-1:0]  b,
  output pd_digit_t [N-1:0]  u,
  output logic [2:0]         ocar,
  output logic signed [3:0]  ipart
);

  logic [N-1:0] c1, c0;
  logic [N-1:0] cin0, cin1;

  for (genvar j = 0; j < N; j++) begin : g_digit
    if (j == 0) begin : g_lsd
      assign cin0[j] = 1'b0;
      assign cin1[j] = 1'b0;
    end else if (j == 1) begin : g_lsd1
      assign cin0[j] = c0[j-1];
      assign cin1[j] = 1'b0;
    end else begin : g_mid
      assign cin0[j] = c0[j-1];
      assign cin1[j] = c1[j-2];
    end

    pd_add_digit u_digit (
      .a   (a[j]),
      .b   (b[j]),
      .cin0(cin0[j]),
      .cin1(cin1[j]),
      .c1  (c1[j]),
      .c0  (c0[j]),
      .w   (),
      .u   (u[j])
    );
  end

  assign ocar  = {c1[N-1], c0[N-1], c1[N-2]};
  assign ipart = $signed({1'b0, c1[N-1], 1'b0}) + $signed({2'b0, c0[N-1]})
               + $signed({2'b0, c1[N-2]});

endmodule
