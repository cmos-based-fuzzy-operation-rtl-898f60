// tb_pd_normalize: folding an integer part into a PD fraction.
// Every integer part from -4 to 3 is combined with all 256 four-digit vectors.
// The output must have the value ipart + U clamped to 0..1, use only digits 0
// and 1, and write the grade 1 as 0.2000.
module tb_pd_normalize;
  import pd_pkg::*;
  import tb_pd_util::*;

  localparam int N = 4;
  localparam int ONE = 1 << N;

  logic signed [3:0] ipart;
  pd_digit_t [N-1:0] u, y;
  int checks = 0, failures = 0;
  int n_zero = 0, n_one = 0, n_mid = 0;

  pd_normalize #(.N(N)) dut (.ipart(ipart), .u(u), .y(y));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ip = -4; ip <= 3; ip++)
      for (int x = 0; x < 256; x++) begin
        int v, e;
        ipart = 4'(ip); u = 8'(x);
        #1;
        v = ip * ONE + pd_val(pd_vec_t'(u), N);
        e = (v < 0) ? 0 : (v > ONE) ? ONE : v;
        if (e == 0) n_zero++; else if (e == ONE) n_one++; else n_mid++;
        checks += 2;
        if (pd_val(pd_vec_t'(y), N) != e) begin
          failures++; $display("ipart=%0d u=%h: y=%h exp value %0d", ip, u, y, e);
        end
        if (e == ONE ? (y != 8'h80) : has_redundant(pd_vec_t'(y), N)) begin
          failures++; $display("ipart=%0d u=%h: y=%h not in normal form", ip, u, y);
        end
      end
    checks++;
    if (n_zero == 0 || n_one == 0 || n_mid == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
