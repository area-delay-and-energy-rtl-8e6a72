// tb_dwt2d_p16_workload: the smaller of the two evaluated configurations, block
// size 16 (M = 8 rows per strip, 16 pixels in and 16 sub-band words out per
// cycle), on 512 x 512 frames.
//
// Frame 0 is a smooth image fed without idle cycles; the number of cycles from
// the first accepted pair to the last output column must equal the computation
// time image size / block size = 512*512/16 = 16384 cycles, plus the one cycle of
// pipeline latency. Frame 1 is a random image fed with random idle cycles. Every
// output word is compared with the reference model (rows, then whole columns,
// then K^2 / 1/K^2 scaling), and the smooth frame also against a real-valued
// 9/7 transform within a few LSB.
module tb_dwt2d_p16_workload;
  import dwt_ref_pkg::*;
  localparam int M = 8;
  localparam int N = 512;
  localparam int H = 512;
  localparam int C = N / 2;
  localparam int STRIPS = H / M;
  localparam int FRAMES = 2;
  localparam int TOL = 8;

  logic clk = 0, rst_n = 0, in_valid = 0, in_first_col = 0, in_first_strip = 0;
  logic [7:0] x_odd [M], x_even [M];
  logic out_valid;
  logic signed [11:0] v_ll [M/2], v_lh [M/2], v_hl [M/2], v_hh [M/2];

  dwt2d_lifting_top #(.M(M), .N(N)) dut (.clk, .rst_n, .in_valid, .in_first_col, .in_first_strip,
                         .x_odd, .x_even, .out_valid, .v_ll, .v_lh, .v_hl, .v_hh);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_carry = 0, n_rowstart = 0, n_frame_restart = 0, n_sat = 0;
  int outs_in_frame = 0;
  longint cyc = 0, t_first_in = -1, t_last_in = -1;
  bit     timing_frame = 1;

  // Edge numbers of the first and last pair accepted during frame 0.
  always @(posedge clk) begin
    cyc++;
    if (in_valid && timing_frame) begin
      if (t_first_in < 0) t_first_in = cyc;
      t_last_in = cyc;
    end
  end
  real max_err = 0.0;

  int img [H][N];
  int e_ll [H/2][C], e_lh [H/2][C], e_hl [H/2][C], e_hh [H/2][C];
  real r_ll [H/2][C], r_lh [H/2][C], r_hl [H/2][C], r_hh [H/2][C];
  bit  do_real;

  initial begin
    repeat (40000 * FRAMES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  // Reference: rows, then columns, then scaling.
  task automatic reference();
    int a[], b[], hi[], lo[];
    int ul [H][C], uh [H][C];
    real ra[], rb[], rhi[], rlo[];
    real rul [H][C], ruh [H][C];
    for (int r = 0; r < H; r++) begin
      a = new[C]; b = new[C]; ra = new[C]; rb = new[C];
      for (int k = 0; k < C; k++) begin
        a[k] = img[r][2*k]; b[k] = img[r][2*k+1];
        ra[k] = real'(a[k]); rb[k] = real'(b[k]);
      end
      lift1d(a, b, hi, lo);
      lift1d_real(ra, rb, rhi, rlo);
      for (int k = 0; k < C; k++) begin
        uh[r][k] = hi[k]; ul[r][k] = lo[k]; ruh[r][k] = rhi[k]; rul[r][k] = rlo[k];
      end
    end
    for (int c = 0; c < C; c++) begin
      a = new[H/2]; b = new[H/2]; ra = new[H/2]; rb = new[H/2];
      for (int k = 0; k < H/2; k++) begin
        a[k] = ul[2*k][c]; b[k] = ul[2*k+1][c]; ra[k] = rul[2*k][c]; rb[k] = rul[2*k+1][c];
      end
      lift1d(a, b, hi, lo);
      lift1d_real(ra, rb, rhi, rlo);
      for (int k = 0; k < H/2; k++) begin
        e_lh[k][c] = hi[k]; e_ll[k][c] = scale(lo[k], q(R_K * R_K));
        r_lh[k][c] = rhi[k]; r_ll[k][c] = rlo[k] * R_K * R_K;
      end
      for (int k = 0; k < H/2; k++) begin
        a[k] = uh[2*k][c]; b[k] = uh[2*k+1][c]; ra[k] = ruh[2*k][c]; rb[k] = ruh[2*k+1][c];
      end
      lift1d(a, b, hi, lo);
      lift1d_real(ra, rb, rhi, rlo);
      for (int k = 0; k < H/2; k++) begin
        e_hl[k][c] = lo[k]; e_hh[k][c] = scale(hi[k], q(1.0 / (R_K * R_K)));
        r_hl[k][c] = rlo[k]; r_hh[k][c] = rhi[k] / (R_K * R_K);
      end
    end
  endtask

  task automatic cmp(int got, int exp, real ideal, string band, int s, int c, int k);
    real e;
    checks++;
    if (got != exp) fail($sformatf("%s strip=%0d col=%0d k=%0d got=%0d exp=%0d", band, s, c, k, got, exp));
    if (do_real) begin
      e = real'(got) - ideal;
      if (e < 0.0) e = -e;
      if (e > max_err) max_err = e;
      checks++;
      if (e > real'(TOL)) fail($sformatf("%s accuracy strip=%0d col=%0d k=%0d got=%0d ideal=%f", band, s, c, k, got, ideal));
    end
  endtask

  // Output side: which (strip, column) each accepted pair was, in order.
  int q_s [$], q_c [$];
  bit prev_in_valid = 0;

  always @(posedge clk) prev_in_valid <= in_valid;

  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid !== prev_in_valid) fail($sformatf("out_valid=%0d one cycle after in_valid=%0d", out_valid, prev_in_valid));
      if (out_valid) begin
        int s, c;
        checks++;
        if (q_s.size() == 0) fail("output without input");
        else begin
          s = q_s.pop_front(); c = q_c.pop_front();
          outs_in_frame++;
          for (int k = 0; k < M/2; k++) begin
            cmp(int'(v_ll[k]), e_ll[s*M/2+k][c], r_ll[s*M/2+k][c], "LL", s, c, k);
            cmp(int'(v_lh[k]), e_lh[s*M/2+k][c], r_lh[s*M/2+k][c], "LH", s, c, k);
            cmp(int'(v_hl[k]), e_hl[s*M/2+k][c], r_hl[s*M/2+k][c], "HL", s, c, k);
            cmp(int'(v_hh[k]), e_hh[s*M/2+k][c], r_hh[s*M/2+k][c], "HH", s, c, k);
          end
        end
      end
    end
  end

  initial begin
    int sat_before;
    foreach (x_odd[m]) begin x_odd[m] = 0; x_even[m] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      // build the frame
      foreach (img[r, c]) begin
        case (f)
          0: img[r][c] = (r + 2 * c) / 6 + int'($urandom_range(0, 40));
          default: img[r][c] = int'($urandom_range(0, 255));
        endcase
        if (img[r][c] > 255) img[r][c] = 255;
      end
      sat_before = sat_count;
      reference();
      n_sat += sat_count - sat_before;
      do_real = (f == 0);
      outs_in_frame = 0;
      if (f > 0) n_frame_restart++;
      timing_frame = (f == 0);
      for (int s = 0; s < STRIPS; s++) begin
        for (int c = 0; c < C; c++) begin
          if (f > 0 && $urandom_range(0, 15) == 0) begin
            @(negedge clk);
            in_valid = 0;
            in_first_col = $urandom_range(0, 1);
            in_first_strip = $urandom_range(0, 1);
            foreach (x_odd[m]) begin x_odd[m] = 8'($urandom); x_even[m] = 8'($urandom); end
            n_stall++;
          end
          @(negedge clk);
          in_valid = 1;
          in_first_col = (c == 0);
          in_first_strip = (s == 0);
          for (int m = 0; m < M; m++) begin
            x_odd[m]  = 8'(img[s*M+m][2*c]);
            x_even[m] = 8'(img[s*M+m][2*c+1]);
          end
          q_s.push_back(s); q_c.push_back(c);
          if (c == 0) n_rowstart++;
          if (s > 0) n_carry++;
        end
      end
      @(negedge clk);
      in_valid = 0;
      @(negedge clk);
      checks++;
      if (outs_in_frame != STRIPS * C) fail($sformatf("frame %0d gave %0d output columns, expected %0d", f, outs_in_frame, STRIPS * C));
    end
    repeat (2) @(negedge clk);
    // frame 0 streams the whole image in image size / block size cycles; the
    // one-cycle latency to each output is checked by the out_valid monitor
    checks++;
    $display("frame 0: %0d cycles to stream the frame (expected %0d)",
             t_last_in - t_first_in + 1, H * N / (2 * M));
    if (t_last_in - t_first_in + 1 != longint'(H * N / (2 * M)))
      fail("frame 0 cycle count");
    $display("stalls=%0d strip_carries=%0d row_starts=%0d frame_restarts=%0d saturations=%0d max_err_smooth=%f",
             n_stall, n_carry, n_rowstart, n_frame_restart, n_sat, max_err);
    if (n_stall == 0)         fail("no stall");
    if (n_carry == 0)         fail("no strip carry");
    if (n_rowstart == 0)      fail("no row start");
    if (n_frame_restart == 0) fail("no frame restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
