// tb_col_lowpass_block: feeds two frames of random row-low-pass columns, strip by
// strip (M rows, N/2 columns per strip, random stall cycles), and checks v_lh and
// v_ll of every section and column against the reference: a 1-D lifting of each
// whole image column across all strips, with v_ll scaled by K^2. The second
// frame starts while R1..R4 still hold the first frame's data, so the zero top
// border on first_strip is checked too.
module tb_col_lowpass_block;
  import dwt_ref_pkg::*;
  localparam int M = 4;
  localparam int N = 8;
  localparam int C = N / 2;
  localparam int STRIPS = 4;
  localparam int H = STRIPS * M;
  localparam int AW = $clog2(C);

  logic clk = 0, en = 0, first_strip = 0;
  logic [AW-1:0] addr = '0;
  logic signed [11:0] u [M];
  logic signed [11:0] v_ll [M/2], v_lh [M/2];

  col_lowpass_block #(.M(M), .N(N)) dut (.clk, .en, .first_strip, .addr, .u, .v_ll, .v_lh);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0, carried = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img [H][C];
    int a[], b[], hi[], lo[];
    int exp_ll [H/2][C], exp_lh [H/2][C];
    foreach (u[i]) u[i] = 0;
    for (int f = 0; f < 2; f++) begin
      foreach (img[r, c]) img[r][c] = $urandom_range(0, 1200) - 600;
      for (int c = 0; c < C; c++) begin
        a = new[H/2]; b = new[H/2];
        for (int k = 0; k < H/2; k++) begin a[k] = img[2*k][c]; b[k] = img[2*k+1][c]; end
        lift1d(a, b, hi, lo);
        for (int k = 0; k < H/2; k++) begin
          exp_lh[k][c] = hi[k];
          exp_ll[k][c] = scale(lo[k], q(R_K * R_K));
        end
      end
      for (int s = 0; s < STRIPS; s++) begin
        for (int c = 0; c < C; c++) begin
          if ($urandom_range(0, 3) == 0) begin
            @(negedge clk);
            en = 0;
            foreach (u[i]) u[i] = 12'($urandom);
            stalls++;
          end
          @(negedge clk);
          en = 1;
          addr = AW'(c);
          first_strip = (s == 0);
          if (s > 0) carried++;
          for (int i = 0; i < M; i++) u[i] = 12'(img[s*M+i][c]);
          #1;
          for (int k = 0; k < M/2; k++) begin
            checks += 2;
            if (int'(v_lh[k]) != exp_lh[s*M/2+k][c] || int'(v_ll[k]) != exp_ll[s*M/2+k][c]) begin
              failures++;
              if (failures < 10)
                $display("FAIL f=%0d s=%0d c=%0d k=%0d lh=%0d/%0d ll=%0d/%0d", f, s, c, k,
                         v_lh[k], exp_lh[s*M/2+k][c], v_ll[k], exp_ll[s*M/2+k][c]);
            end
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
