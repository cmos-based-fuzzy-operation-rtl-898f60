// pd_pkg: shared types and small functions for binary-coded positive-digit (PD)
// fuzzy arithmetic.
//
// A fuzzy grade is an N-digit radix-2 fraction 0.d(-1) d(-2) ... d(-N) whose digits
// take the four values 0..3, each coded as a plain 2-bit binary number [d1 d0].
// The digits 2 and 3 make the representation redundant: 0.2000 and 0.1111+1 ulp
// both equal 1. In the RTL a number is a packed array "pd_digit_t [N-1:0]" whose
// element j has weight 2^(j-N): element N-1 is the most significant digit d(-1).
//
// The digit cells split a carry into two one-bit carries: bit 0 goes to the next
// digit up and bit 1 (weight 2 there) goes two digits up. pd_final_sum() is the
// final-sum stage shared by the adder and the complement adder: it adds the
// one-bit intermediate sum and the two incoming carry bits and never overflows,
// since 1+1+1 = 3 is still a digit.
//
// pd_ineq_step() is one step of the most-significant-first inequality scan used
// by pd_ineq; see that module for the argument why the residue may saturate.
package pd_pkg;

  typedef logic [1:0] pd_digit_t;

  // Digit count of the grades; four digits is the width drawn for the
  // discrimination circuit.
  localparam int unsigned PD_DIGITS = 4;

  // Saturated residue of the inequality scan, range -4..1.
  typedef logic signed [3:0] pd_res_t;
  localparam pd_res_t PD_RES_MIN = -4'sd4;
  localparam pd_res_t PD_RES_MAX = 4'sd1;

  // Final sum u = w + x + y of three one-bit terms; u1 is the majority, u0 the parity.
  function automatic pd_digit_t pd_final_sum(input logic w, input logic x, input logic y);
    pd_digit_t u;
    u[1] = (w & x) | (w & y) | (x & y);
    u[0] = w ^ x ^ y;
    return u;
  endfunction

  // One step of the scan: r' = clamp(2r + d, -4, 1).
  function automatic pd_res_t pd_ineq_step(input pd_res_t r, input pd_digit_t d);
    logic signed [5:0] t;
    t = 6'(2 * r) + $signed({4'b0, d});
    if (t > 6'(PD_RES_MAX))      return PD_RES_MAX;
    else if (t < 6'(PD_RES_MIN)) return PD_RES_MIN;
    else                         return pd_res_t'(t);
  endfunction

endpackage
