// tb_lifting_section: drives random sample pairs and random previous-pair carries
// and checks the four step outputs (s1..s3 in the carry, hi, lo) against the
// lifting equations evaluated with the reference lifting step, including
// full-range words that saturate.
module tb_lifting_section;
  import dwt_ref_pkg::*;
  import dwt_pkg::word_t;
  import dwt_pkg::carry_t;

  word_t  a, b, hi, lo;
  carry_t prev, cur;

  lifting_section dut (.a, .b, .prev, .cur, .hi, .lo);

  int checks = 0, failures = 0;

  task automatic cmp(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s1, s2, s3, s4;
    for (int n = 0; n < 4000; n++) begin
      if (n < 2000) begin
        a = 12'($urandom_range(0, 255)); b = 12'($urandom_range(0, 255));
        prev.b  = 12'($urandom_range(0, 255));
        prev.s1 = 12'($urandom_range(0, 1000)) - 12'd800;
        prev.s2 = 12'($urandom_range(0, 400));
        prev.s3 = 12'($urandom_range(0, 600)) - 12'd300;
      end else begin
        a = 12'($urandom); b = 12'($urandom);
        prev = carry_t'($urandom) ^ (carry_t'($urandom) << 32);
      end
      #1;
      s1 = lc(int'(a), int'(b), int'(prev.b), q(R_ALPHA));
      s2 = lc(int'(prev.b), s1, int'(prev.s1), q(R_BETA));
      s3 = lc(int'(prev.s1), s2, int'(prev.s2), q(R_GAMMA));
      s4 = lc(int'(prev.s2), s3, int'(prev.s3), q(R_DELTA));
      cmp(int'(cur.b), int'(b), "carry b");
      cmp(int'(cur.s1), s1, "s1");
      cmp(int'(cur.s2), s2, "s2");
      cmp(int'(cur.s3), s3, "s3");
      cmp(int'(hi), s3, "hi");
      cmp(int'(lo), s4, "lo");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
