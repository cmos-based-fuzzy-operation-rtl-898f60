// tb_pd_maxmin: logical sum (MAX) and logical product (MIN).
// All 65536 pairs of 4-digit PD numbers are applied. max must be one of the two
// input words, unchanged, with the larger value, and min the other one; the
// flags must match the integer comparison of the two values.
module tb_pd_maxmin;
  import pd_pkg::*;
  import tb_pd_util::*;

  localparam int N = 4;

  pd_digit_t [N-1:0] a, b, mx, mn;
  logic a_gt_b, a_eq_b;
  int checks = 0, failures = 0;
  int n_gt = 0, n_eq = 0, n_lt = 0;

  pd_maxmin #(.N(N)) dut (.a(a), .b(b), .max(mx), .min(mn), .a_gt_b(a_gt_b), .a_eq_b(a_eq_b));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        int va, vb;
        a = 8'(x); b = 8'(y);
        #1;
        va = pd_val(pd_vec_t'(a), N);
        vb = pd_val(pd_vec_t'(b), N);
        if (va > vb) n_gt++; else if (va == vb) n_eq++; else n_lt++;
        checks += 4;
        if (a_gt_b != (va > vb) || a_eq_b != (va == vb)) begin
          failures++; $display("a=%h b=%h flags %b%b", a, b, a_gt_b, a_eq_b);
        end
        if (!((mx == a && mn == b) || (mx == b && mn == a))) begin
          failures++; $display("a=%h b=%h outputs are not the inputs", a, b);
        end
        if (pd_val(pd_vec_t'(mx), N) != (va > vb ? va : vb)) begin
          failures++; $display("a=%h b=%h max=%h", a, b, mx);
        end
        if (pd_val(pd_vec_t'(mn), N) != (va > vb ? vb : va)) begin
          failures++; $display("a=%h b=%h min=%h", a, b, mn);
        end
      end
    checks++;
    if (n_gt == 0 || n_eq == 0 || n_lt == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
