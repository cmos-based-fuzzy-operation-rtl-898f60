// tb_pd_csub: the N-digit complement adder.
// A 4-digit instance is run over all 65536 digit pairs and an 8-digit instance
// over random pairs; each time A - B must equal (E - 3) + U exactly, with E
// rebuilt from the carry bits, and no digit of U may exceed 3.
module tb_pd_csub;
  import pd_pkg::*;
  import tb_pd_util::*;

  localparam int N4 = 4;
  localparam int N8 = 8;

  pd_digit_t [N4-1:0] a4, b4, u4;
  pd_digit_t [N8-1:0] a8, b8, u8;
  logic [2:0] e4, e8;
  logic signed [3:0] i4, i8;
  int checks = 0, failures = 0;
  int ecount[5];

  pd_csub #(.N(N4)) dut4 (.a(a4), .b(b4), .u(u4), .ecar(e4), .ipart(i4));
  pd_csub #(.N(N8)) dut8 (.a(a8), .b(b8), .u(u8), .ecar(e8), .ipart(i8));

  task automatic check(input int n, input pd_vec_t a, input pd_vec_t b, input pd_vec_t u,
                       input logic [2:0] e, input int ip);
    int ev = 2 * int'(e[2]) + int'(e[1]) + int'(e[0]);
    int lhs = pd_val(a, n) - pd_val(b, n);
    int rhs = (ev - 3) * (1 << n) + pd_val(u, n);
    checks += 2;
    ecount[ev]++;
    if (lhs != rhs) begin
      failures++;
      $display("N=%0d a=%h b=%h: A-B=%0d but (E-3)+U=%0d", n, a, b, lhs, rhs);
    end
    if (ip != ev - 3) begin
      failures++;
      $display("N=%0d ipart %0d, E-3 = %0d", n, ip, ev - 3);
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
    a8 = '0; b8 = '0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a4 = 8'(x); b4 = 8'(y);
        #1;
        check(N4, pd_vec_t'(a4), pd_vec_t'(b4), pd_vec_t'(u4), e4, int'(i4));
      end
    for (int t = 0; t < 20000; t++) begin
      a8 = 16'(rand_digits(N8)); b8 = 16'(rand_digits(N8));
      #1;
      check(N8, pd_vec_t'(a8), pd_vec_t'(b8), pd_vec_t'(u8), e8, int'(i8));
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (ecount[k] == 0) begin failures++; $display("end-around carry %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
