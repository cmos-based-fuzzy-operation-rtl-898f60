// tb_pd_bounded_sum: bounded sum min(1, A + B).
// Every pair of 4-digit PD grades with value at most 1 (redundant digits
// included) is applied. The result must have the reference value, computed
// with integers, and the limit flag must be set exactly when the limit applies;
// the grade 1 must come out as 0.2000. Both outcomes of the limit must occur.
module tb_pd_bounded_sum;
  import pd_pkg::*;
  import tb_pd_util::*;

  localparam int N = 4;
  localparam int ONE = 1 << N;

  pd_digit_t [N-1:0] a, b, y;
  logic flag;
  int checks = 0, failures = 0;
  int n_lim = 0, n_pass = 0, n_red = 0;

  pd_bounded_sum #(.N(N)) dut (.a(a), .b(b), .y(y), .sat(flag));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int z = 0; z < 256; z++) begin
        int va, vb, s;
        a = 8'(x); b = 8'(z);
        va = pd_val(pd_vec_t'(a), N);
        vb = pd_val(pd_vec_t'(b), N);
        if (va > ONE || vb > ONE) continue;
        #1;
        s = va + vb; if (s > ONE) s = ONE;
        if (has_redundant(pd_vec_t'(a), N) || has_redundant(pd_vec_t'(b), N)) n_red++;
        if (flag) n_lim++; else n_pass++;
        checks += 2;
        if (pd_val(pd_vec_t'(y), N) != s) begin
          failures++; $display("a=%h b=%h y=%h (%0d) exp %0d", a, b, y, pd_val(pd_vec_t'(y), N), s);
        end
        if (flag != (va + vb >= ONE)) begin
          failures++; $display("a=%h b=%h flag %b", a, b, flag);
        end
        if (s == ONE) begin
          checks++;
          if (y != 8'h80) begin failures++; $display("a=%h b=%h: 1 coded as %h", a, b, y); end
        end
      end
    checks++;
    if (n_lim == 0 || n_pass == 0 || n_red == 0) begin
      failures++; $display("coverage: limited %0d passed %0d redundant %0d", n_lim, n_pass, n_red);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
