// tb_pd_add_digit: exhaustive test of one PD addition digit: a + b = 2c + w with
// w in {0,1}, c = 2*c1 + c0, and u = w + cin0 + cin1.
module tb_pd_add_digit;
  import pd_pkg::*;

  pd_digit_t a, b, u;
  logic cin0, cin1, c1, c0, w;
  int checks = 0, failures = 0;

  pd_add_digit dut (.a(a), .b(b), .cin0(cin0), .cin1(cin1), .c1(c1), .c0(c0), .w(w), .u(u));

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
          int s;
          a = 2'(ia); b = 2'(ib); {cin1, cin0} = 2'(k);
          #1;
          s = ia + ib;
          checks += 3;
          if (2 * int'(c1) + int'(c0) != s / 2) begin failures++; $display("a=%0d b=%0d carry wrong", ia, ib); end
          if (int'(w) != s % 2) begin failures++; $display("a=%0d b=%0d w wrong", ia, ib); end
          if (int'(u) != s % 2 + int'(cin0) + int'(cin1)) begin failures++; $display("a=%0d b=%0d u wrong", ia, ib); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
