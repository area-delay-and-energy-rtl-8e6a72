// tb_column_processor: feeds strips of random u_l and u_h columns (with stall
// cycles carrying garbage and a stray first_col) and checks all four sub-band
// outputs against the reference column lifting of whole image columns. The
// block's own column counter addresses R1..R4, so a wrong count shows up as
// wrong strip-to-strip carries.
module tb_column_processor;
  import dwt_ref_pkg::*;
  localparam int M = 4;
  localparam int N = 12;          // 6 columns per strip: counter wrap is not a power of two
  localparam int C = N / 2;
  localparam int STRIPS = 4;
  localparam int H = STRIPS * M;

  logic clk = 0, rst_n = 0, en = 0, first_col = 0, first_strip = 0;
  logic signed [11:0] u_l [M], u_h [M];
  logic signed [11:0] v_ll [M/2], v_lh [M/2], v_hl [M/2], v_hh [M/2];

  column_processor #(.M(M), .N(N)) dut (.clk, .rst_n, .en, .first_col, .first_strip,
                                        .u_l, .u_h, .v_ll, .v_lh, .v_hl, .v_hh);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0, carried = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(int got, int exp, string what, int s, int c, int k);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s s=%0d c=%0d k=%0d got=%0d exp=%0d", what, s, c, k, got, exp);
    end
  endtask

  initial begin
    int il [H][C], ih [H][C];
    int a[], b[], hi[], lo[];
    int e_ll [H/2][C], e_lh [H/2][C], e_hl [H/2][C], e_hh [H/2][C];
    foreach (u_l[i]) begin u_l[i] = 0; u_h[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      foreach (il[r, c]) begin il[r][c] = $urandom_range(0, 800); ih[r][c] = $urandom_range(0, 600) - 300; end
      for (int c = 0; c < C; c++) begin
        a = new[H/2]; b = new[H/2];
        for (int k = 0; k < H/2; k++) begin a[k] = il[2*k][c]; b[k] = il[2*k+1][c]; end
        lift1d(a, b, hi, lo);
        for (int k = 0; k < H/2; k++) begin e_lh[k][c] = hi[k]; e_ll[k][c] = scale(lo[k], q(R_K * R_K)); end
        for (int k = 0; k < H/2; k++) begin a[k] = ih[2*k][c]; b[k] = ih[2*k+1][c]; end
        lift1d(a, b, hi, lo);
        for (int k = 0; k < H/2; k++) begin e_hh[k][c] = scale(hi[k], q(1.0 / (R_K * R_K))); e_hl[k][c] = lo[k]; end
      end
      for (int s = 0; s < STRIPS; s++) begin
        for (int c = 0; c < C; c++) begin
          if ($urandom_range(0, 3) == 0) begin
            @(negedge clk);
            en = 0;
            first_col = $urandom_range(0, 1);
            foreach (u_l[i]) begin u_l[i] = 12'($urandom); u_h[i] = 12'($urandom); end
            stalls++;
          end
          @(negedge clk);
          en = 1;
          first_col = (c == 0);
          first_strip = (s == 0);
          if (s > 0) carried++;
          for (int i = 0; i < M; i++) begin u_l[i] = 12'(il[s*M+i][c]); u_h[i] = 12'(ih[s*M+i][c]); end
          #1;
          for (int k = 0; k < M/2; k++) begin
            cmp(int'(v_ll[k]), e_ll[s*M/2+k][c], "LL", s, c, k);
            cmp(int'(v_lh[k]), e_lh[s*M/2+k][c], "LH", s, c, k);
            cmp(int'(v_hl[k]), e_hl[s*M/2+k][c], "HL", s, c, k);
            cmp(int'(v_hh[k]), e_hh[s*M/2+k][c], "HH", s, c, k);
          end
        end
      end
    end
    @(negedge clk);
    en = 0;
    if (stalls == 0 || carried == 0) begin failures++; $display("FAIL mechanism not exercised"); end
    $display("stalls=%0d strip-carry columns=%0d", stalls, carried);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
