// pd_csub_digit: one digit of the PD complement addition a + (1 - b).
//
// The digit sum a + 1 - b lies in -2..4. It is split as 2*c + w with an
// intermediate sum w in {2,3} and a carry c in {-2,-1,0,1}:
//   sum = 4     -> c =  1, w = 2        sum = 2,3  -> c =  0, w = sum
//   sum = 0,1   -> c = -1, w = sum + 2  sum = -2,-1 -> c = -2, w = sum + 4
// w is sent as the single bit w0 (w = w0 + 2). The carry is coded as
// c = 2*c1 + c0 - 2, so c1 = (a > b) and c0 = (a - b in {-1, 0, 3}). The +2 offset
// of w and the -2 offset of the incoming carry cancel, so the final digit is
// u = w0 + c0(from the digit below) + c1(from two digits below), always 0..3.
// The carry and intermediate-sum equations are the two-level sums of products
// of the paper's Boolean expressions; the carry coding c = 2*c1 + c0 - 2 is
// this design's reading of them, chosen because it makes the digit identity exact.
//
// Interface: a, b digit inputs; cin0 = c0 of the digit below, cin1 = c1 of the
// digit two below; c1, c0, w0 carry and intermediate sum; u final digit.
// Timing: purely combinational, constant depth independent of the word length.
module pd_csub_digit
  import pd_pkg::*;
(
  input  pd_digit_t a,
  input  pd_digit_t b,
  input  logic      cin0,
  input  logic      cin1,
  output logic      c1,
  output logic      c0,
  output logic      w0,
  output pd_digit_t u
);

  // Intermediate sum generation: parity of a + 1 - b.
  assign w0 = (a[0] & b[0]) | (~a[0] & ~b[0]);

  // Carry generation.
  assign c1 = (a[1] & ~b[1]) | (a[0] & ~b[1] & ~b[0]) | (a[1] & a[0] & ~b[0]);
  assign c0 = (~a[1] & ~a[0] & ~b[1]) | (~a[1] & ~b[1] & b[0])
            | ( a[1] & ~a[0] &  b[1]) | ( a[1] &  b[1] & b[0])
            | (~a[1] &  a[0] &  b[1] & ~b[0])
            | ( a[1] &  a[0] & ~b[1] & ~b[0]);

  // Final sum generation.
  assign u = pd_final_sum(w0, cin0, cin1);

endmodule
