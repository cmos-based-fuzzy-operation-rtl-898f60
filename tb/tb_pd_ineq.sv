// tb_pd_ineq: the inequality discrimination.
// A 4-digit instance is driven with every integer part from -6 to 5 and all
// 256 digit vectors, a 6-digit one with random vectors; gt/eq/lt must match the
// sign of ipart * 2^N + U computed as an integer.
module tb_pd_ineq;
  import pd_pkg::*;
  import tb_pd_util::*;

  localparam int N4 = 4;
  localparam int N6 = 6;

  logic signed [3:0] ip4, ip6;
  pd_digit_t [N4-1:0] u4;
  pd_digit_t [N6-1:0] u6;
  logic gt4, eq4, lt4, gt6, eq6, lt6;
  int checks = 0, failures = 0;
  int seen[3];

  pd_ineq #(.N(N4)) dut4 (.ipart(ip4), .u(u4), .gt(gt4), .eq(eq4), .lt(lt4));
  pd_ineq #(.N(N6)) dut6 (.ipart(ip6), .u(u6), .gt(gt6), .eq(eq6), .lt(lt6));

  task automatic check(input int n, input int ip, input pd_vec_t u, input logic gt,
                       input logic eq, input logic lt);
    int x = ip * (1 << n) + pd_val(u, n);
    logic [2:0] exp = {x > 0, x == 0, x < 0};
    checks++;
    seen[x > 0 ? 0 : (x == 0 ? 1 : 2)]++;
    if ({gt, eq, lt} != exp) begin
      failures++;
      $display("N=%0d ipart=%0d u=%h: got %b exp %b", n, ip, u, {gt, eq, lt}, exp);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ip6 = '0; u6 = '0;
    for (int ip = -6; ip <= 5; ip++)
      for (int x = 0; x < 256; x++) begin
        ip4 = 4'(ip); u4 = 8'(x);
        #1;
        check(N4, ip, pd_vec_t'(u4), gt4, eq4, lt4);
      end
    for (int t = 0; t < 20000; t++) begin
      int ip = $urandom_range(0, 6) - 4;
      ip6 = 4'(ip); u6 = 12'(rand_digits(N6));
      #1;
      check(N6, ip, pd_vec_t'(u6), gt6, eq6, lt6);
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("outcome %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
