// tb_pd_csub_digit: exhaustive test of one complement-addition digit.
// For all 16 digit pairs and 4 incoming carry pairs it checks the carry and
// intermediate sum against the case table (sum 4 -> c=1; 2..3 -> 0; 0..1 -> -1;
// -2..-1 -> -2, w = sum - 2c in {2,3}) and the final digit u = w0 + cin0 + cin1.
module tb_pd_csub_digit;
  import pd_pkg::*;

  pd_digit_t a, b, u;
  logic cin0, cin1, c1, c0, w0;
  int checks = 0, failures = 0;

  pd_csub_digit dut (.a(a), .b(b), .cin0(cin0), .cin1(cin1), .c1(c1), .c0(c0), .w0(w0), .u(u));

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 4; ia++)
      for (int ib = 0; ib < 4; ib++)
        for (int k = 0; k < 4; k++) begin
          int s, c_exp, w_exp, c_got, w_got, u_exp;
          a = 2'(ia); b = 2'(ib); {cin1, cin0} = 2'(k);
          #1;
          s = ia + 1 - ib;
          if (s == 4)      c_exp = 1;
          else if (s >= 2) c_exp = 0;
          else if (s >= 0) c_exp = -1;
          else             c_exp = -2;
          w_exp = s - 2 * c_exp;
          c_got = 2 * int'(c1) + int'(c0) - 2;
          w_got = int'(w0) + 2;
          u_exp = (w_exp - 2) + int'(cin0) + int'(cin1);
          checks += 3;
          if (c_got != c_exp) begin failures++; $display("a=%0d b=%0d carry %0d exp %0d", ia, ib, c_got, c_exp); end
          if (w_got != w_exp) begin failures++; $display("a=%0d b=%0d w %0d exp %0d", ia, ib, w_got, w_exp); end
          if (int'(u) != u_exp) begin failures++; $display("a=%0d b=%0d cin=%0d u %0d exp %0d", ia, ib, k, u, u_exp); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
