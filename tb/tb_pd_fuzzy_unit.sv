// tb_pd_fuzzy_unit: end-to-end test of the fuzzy operation unit at its default
// size (4-digit grades).
//
// Every pair of PD grades with value at most 1 is applied, redundant codings
// included. All five results are checked against integer references:
// max, min, min(1, A+B), max(0, A-B), max(0, A+B-1), together with the flags.
// The test also counts how often each mechanism of the design was exercised:
// each comparison outcome, the limit of every bounded operation taken and not
// taken, inputs with redundant digits, the grade 1 written as 0.2000, and
// results whose integer part had to be folded back into the digits; any
// mechanism never exercised counts as a failure.
module tb_pd_fuzzy_unit;
  import pd_pkg::*;
  import tb_pd_util::*;

  localparam int N = PD_DIGITS;
  localparam int ONE = 1 << N;

  pd_digit_t [N-1:0] a, b, lsum, lprod, bsum, bdiff, bprod;
  logic a_gt_b, a_eq_b, bsum_sat, bdiff_clip, bprod_clip;
  int checks = 0, failures = 0;

  typedef enum int {
    M_GT, M_EQ, M_LT, M_BSUM_SAT, M_BSUM_PASS, M_BDIFF_CLIP, M_BDIFF_POS,
    M_BPROD_CLIP, M_BPROD_POS, M_REDUNDANT_IN, M_ONE_OUT, M_FOLD_DIFF, M_FOLD_PROD,
    M_COUNT
  } mech_e;
  int mech[M_COUNT];
  string mech_name[M_COUNT] = '{"a>b", "a=b", "a<b", "bsum limited", "bsum passed",
    "bdiff limited", "bdiff positive", "bprod limited", "bprod positive",
    "redundant input", "grade 1 output", "bdiff fold", "bprod fold"};

  pd_fuzzy_unit dut (
    .a(a), .b(b), .lsum(lsum), .lprod(lprod), .bsum(bsum), .bdiff(bdiff), .bprod(bprod),
    .a_gt_b(a_gt_b), .a_eq_b(a_eq_b), .bsum_sat(bsum_sat), .bdiff_clip(bdiff_clip),
    .bprod_clip(bprod_clip)
  );

  function automatic int val(input pd_digit_t [N-1:0] v);
    return pd_val(pd_vec_t'(v), N);
  endfunction

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("a=%h b=%h %s: got %0d exp %0d", a, b, what, got, exp);
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pairs;
    pairs = 0;
    for (int x = 0; x < (1 << 2 * N); x++)
      for (int z = 0; z < (1 << 2 * N); z++) begin
        int va, vb, e_bsum, e_bdiff, e_bprod;
        a = (2 * N)'(x); b = (2 * N)'(z);
        va = val(a); vb = val(b);
        if (va > ONE || vb > ONE) continue;
        #1;
        pairs++;
        e_bsum  = (va + vb > ONE) ? ONE : va + vb;
        e_bdiff = (va - vb < 0) ? 0 : va - vb;
        e_bprod = (va + vb - ONE < 0) ? 0 : va + vb - ONE;

        expect_eq("lsum",  val(lsum),  (va > vb) ? va : vb);
        expect_eq("lprod", val(lprod), (va > vb) ? vb : va);
        expect_eq("bsum",  val(bsum),  e_bsum);
        expect_eq("bdiff", val(bdiff), e_bdiff);
        expect_eq("bprod", val(bprod), e_bprod);
        expect_eq("a_gt_b", int'(a_gt_b), int'(va > vb));
        expect_eq("a_eq_b", int'(a_eq_b), int'(va == vb));
        expect_eq("bsum_sat", int'(bsum_sat), int'(va + vb >= ONE));
        expect_eq("bdiff_clip", int'(bdiff_clip), int'(va <= vb));
        expect_eq("bprod_clip", int'(bprod_clip), int'(va + vb <= ONE));

        if (va > vb) mech[M_GT]++; else if (va == vb) mech[M_EQ]++; else mech[M_LT]++;
        if (bsum_sat) mech[M_BSUM_SAT]++; else mech[M_BSUM_PASS]++;
        if (bdiff_clip) mech[M_BDIFF_CLIP]++; else mech[M_BDIFF_POS]++;
        if (bprod_clip) mech[M_BPROD_CLIP]++; else mech[M_BPROD_POS]++;
        if (has_redundant(pd_vec_t'(a), N) || has_redundant(pd_vec_t'(b), N)) mech[M_REDUNDANT_IN]++;
        if (bsum == (2 * N)'(2 << (2 * (N - 1)))) mech[M_ONE_OUT]++;
        if (!bdiff_clip && dut.u_bdiff.ipart != 0) mech[M_FOLD_DIFF]++;
        if (!bprod_clip && dut.u_bprod.xpart != 0) mech[M_FOLD_PROD]++;
      end

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-16s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("mechanism %s never exercised", mech_name[m]); end
    end
    $display("pairs applied: %0d", pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
