// pd_add_digit: one digit of carry-free PD addition a + b.
//
// The digit sum a + b lies in 0..6 and is split as 2*c + w with w in {0,1} and
// c = 2*c1 + c0 in 0..3: w is the parity of the low bits and c is the sum
// shifted right by one. c0 goes to the next digit up and c1, worth 2 there, to
// the digit two places up. The final digit u = w + c0(from the digit below)
// + c1(from two digits below) is 0..3, so no carry ever leaves a final digit.
// The paper gives this split; the gate-level form here is this design's.
//
// Interface: a, b digit inputs; cin0 = c0 of the digit below, cin1 = c1 of the
// digit two below; c1, c0, w carry and intermediate sum; u final digit.
// Timing: purely combinational.
module pd_add_digit
  import pd_pkg::*;
(
  input  pd_digit_t a,
  input  pd_digit_t b,
  input  logic      cin0,
  input  logic      cin1,
  output logic      c1,
  output logic      c0,
  output logic      w,
  output pd_digit_t u
);

  logic [2:0] s;

  // Half addition.
  assign s  = {1'b0, a} + {1'b0, b};
  assign w  = s[0];
  assign c0 = s[1];
  assign c1 = s[2];

  // Full addition of the intermediate sum and the two incoming carry bits.
  assign u = pd_final_sum(w, cin0, cin1);

endmodule
