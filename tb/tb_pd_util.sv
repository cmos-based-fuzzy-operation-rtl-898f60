// tb_pd_util: reference arithmetic for the PD testbenches.
//
// Numbers are handled as packed digit vectors of up to MAXN digits (digit j
// in bits 2j+1:2j, weight 2^(j-N)); pd_val() returns the value scaled by 2^N
// as a plain integer, computed digit by digit independently of the RTL.
// rand_grade() draws random digits 0..3 and redraws until the value is at
// most 1, so that redundant digits occur often in valid grades.
package tb_pd_util;

  localparam int MAXN = 16;
  typedef logic [2*MAXN-1:0] pd_vec_t;

  function automatic int pd_val(input pd_vec_t v, input int n);
    int s = 0;
    for (int j = 0; j < n; j++) s += int'(v[2*j +: 2]) << j;
    return s;
  endfunction

  function automatic pd_vec_t rand_digits(input int n);
    pd_vec_t v = '0;
    for (int j = 0; j < n; j++) v[2*j +: 2] = 2'($urandom_range(0, 3));
    return v;
  endfunction

  // Valid grade: value <= 1. The top digit is drawn from 0..2 to keep the
  // rejection rate low.
  function automatic pd_vec_t rand_grade(input int n);
    pd_vec_t v;
    do begin
      v = rand_digits(n);
      v[2*(n-1) +: 2] = 2'($urandom_range(0, 2));
    end while (pd_val(v, n) > (1 << n));
    return v;
  endfunction

  function automatic bit has_redundant(input pd_vec_t v, input int n);
    for (int j = 0; j < n; j++) if (v[2*j+1]) return 1'b1;
    return 1'b0;
  endfunction

endpackage
